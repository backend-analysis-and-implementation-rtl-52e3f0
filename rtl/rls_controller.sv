// rls_controller: sequencer of one RLS iteration.
//
// The five steps of the algorithm (filter output, gain vector, error,
// weight update, matrix update) are executed in order, spread over eight
// clock stages, so that a result leaves the filter 8 clocks after its
// sample was accepted:
//   accept : sample taken (ready & in_valid); delay line shifts
//   S1     : y = w.x, u = P x, z = x^T P registered
//   S2     : e = d - y, x^T u registered
//   S3     : 1 / (lambda + x^T u) registered
//   S4     : k = inv * u registered
//   S5     : w += k e
//   S6     : Pd = P - k z^T
//   S7     : P = Pd / lambda
//   S8     : outputs registered; out_valid is high the clock after
// ready is high only in IDLE, so a new sample is taken every 8 clocks at
// most; a sample offered while busy waits (in_valid must stay high). The
// stage split and the handshake are this design's choices; the 8-clock
// latency is the design target. The two assertions are disabled during
// reset; linters may note that rst_n is then seen both asynchronously (by
// the state register) and synchronously (by the assertions), which is
// intended.
module rls_controller
  import rls_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       ready,
  output logic       accept,
  output rls_stage_t stage
);

  rls_state_e state, state_next;

  always_comb begin
    ready  = (state == ST_IDLE);
    accept = ready && in_valid;
    stage  = '0;
    unique case (state)
      ST_S1:   stage.s1 = 1'b1;
      ST_S2:   stage.s2 = 1'b1;
      ST_S3:   stage.s3 = 1'b1;
      ST_S4:   stage.s4 = 1'b1;
      ST_S5:   stage.s5 = 1'b1;
      ST_S6:   stage.s6 = 1'b1;
      ST_S7:   stage.s7 = 1'b1;
      ST_S8:   stage.s8 = 1'b1;
      default: stage    = '0;
    endcase
  end

  always_comb begin
    unique case (state)
      ST_IDLE: state_next = in_valid ? ST_S1 : ST_IDLE;
      ST_S1:   state_next = ST_S2;
      ST_S2:   state_next = ST_S3;
      ST_S3:   state_next = ST_S4;
      ST_S4:   state_next = ST_S5;
      ST_S5:   state_next = ST_S6;
      ST_S6:   state_next = ST_S7;
      ST_S7:   state_next = ST_S8;
      ST_S8:   state_next = ST_IDLE;
      default: state_next = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_next;
  end

  // At most one stage is active, and none while a sample can be taken.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(stage));
  a_idle:   assert property (@(posedge clk) disable iff (!rst_n) ready |-> (stage == '0));

endmodule

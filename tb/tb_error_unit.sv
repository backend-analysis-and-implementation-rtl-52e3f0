// tb_error_unit: e = d - y over random operands and the overflow corners,
// compared with a saturating model.
module tb_error_unit;
  import tb_fx_pkg::*;
  logic signed [15:0] d, y, e;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  error_unit #(.DW(16)) dut (.d(d), .y(y), .e(e));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint ex;
      case (t)
        0: begin d = 16'sh7fff; y = 16'sh8000; end
        1: begin d = 16'sh8000; y = 16'sh7fff; end
        2: begin d = 16'sh8000; y = 16'sh0001; end
        default: begin d = 16'($urandom); y = 16'($urandom); end
      endcase
      #1;
      ex = longint'(d) - longint'(y);
      if (ex > 32767) sat_hi++;
      if (ex < -32768) sat_lo++;
      ex = sat(ex, 16);
      checks++;
      if (longint'(e) != ex) begin
        failures++;
        if (failures < 10) $display("d=%0d y=%0d e=%0d expected %0d", d, y, e, ex);
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

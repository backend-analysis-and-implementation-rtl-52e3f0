// tb_fx_pkg: reference fixed-point arithmetic for the testbenches.
//
// Written independently of the RTL helpers: rounding is done with an
// integer quotient and remainder (round half up), saturation with explicit
// bounds. All values are 64-bit signed.
package tb_fx_pkg;

  // round(v / 2^sh), ties toward +infinity
  function automatic longint rnd(input longint v, input int sh);
    longint d, q, r;
    if (sh == 0) return v;
    d = longint'(1) << sh;
    q = v / d;             // toward zero
    r = v - q * d;
    if (r < 0) begin       // make it a floor division
      q = q - 1;
      r = r + d;
    end
    if (2 * r >= d) q = q + 1;
    return q;
  endfunction

  // clamp to a signed w-bit word
  function automatic longint sat(input longint v, input int w);
    longint hi, lo;
    hi = (longint'(1) << (w - 1)) - 1;
    lo = -(longint'(1) << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // round(num / den) for den > 0, num >= 0, ties up
  function automatic longint rdiv(input longint num, input longint den);
    longint q, r;
    q = num / den;
    r = num % den;
    if (2 * r >= den) q = q + 1;
    return q;
  endfunction

  // random signed value in [-2^(b-1), 2^(b-1))
  function automatic longint rand_bits(input int b);
    longint v;
    v = {$urandom, $urandom};
    v = v & ((longint'(1) << b) - 1);
    if (v >= (longint'(1) << (b - 1))) v = v - (longint'(1) << b);
    return v;
  endfunction

endpackage

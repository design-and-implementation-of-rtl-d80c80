// tb_ref_pkg: reference arithmetic for the accelerator's testbenches.
//
// Written with 64-bit integers and in a different form from the RTL, so that
// the testbenches compare against an independent model:
//   dot()      : sum over four lanes of w * (x + input_offset)
//   quantize() : (sum << left) * multiplier / 2^31 rounded to nearest,
//                ties up in magnitude for a positive product and down in
//                magnitude for a negative one (the usual int8 runtime rule,
//                with its one saturating case), then divided by
//                2^right rounded half away from zero, plus the output
//                offset, clamped to [min, max].
package tb_ref_pkg;

  function automatic int dot(input int unsigned xs, input int unsigned ws,
                             input int input_offset);
    int s = 0;
    for (int i = 0; i < 4; i++) begin
      byte x, w;
      x = byte'(xs >> (8*i));
      w = byte'(ws >> (8*i));
      s += int'(w) * (int'(x) + input_offset);
    end
    return s;
  endfunction

  function automatic longint round_div_pow2(input longint v, input int e);
    longint a, q;
    if (e == 0) return v;
    a = (v < 0) ? -v : v;
    q = (a + (64'sd1 << (e-1))) >>> e;
    return (v < 0) ? -q : q;
  endfunction

  function automatic int quantize(input int sum, input int mult, input int shift,
                                  input int out_off, input int lo, input int hi);
    int     left, right, x;
    longint h, y;
    left  = (shift > 0) ? ((shift > 31) ? 31 : shift) : 0;
    right = (shift < 0) ? ((shift < -31) ? 31 : -shift) : 0;
    x = sum << left;
    if (x == 32'sh8000_0000 && mult == 32'sh8000_0000) h = 64'sd2147483647;
    else begin
      longint p;
      p = longint'(x) * longint'(mult);
      if (p >= 0) h = (p + (64'sd1 << 30)) >>> 31;
      else        h = -((-p + (64'sd1 << 30) - 1) >>> 31);
    end
    // h always fits in 32 bits; keep it as a 32-bit value as the hardware does.
    h = longint'(int'(h));
    y = round_div_pow2(h, right) + longint'(out_off);
    y = longint'(int'(y));
    if (y < longint'(lo)) y = longint'(lo);
    if (y > longint'(hi)) y = longint'(hi);
    return int'(y);
  endfunction

endpackage

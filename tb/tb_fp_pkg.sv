// tb_fp_pkg -- reference helpers for the floating-point testbenches.
//
// Converts IEEE single-precision bit patterns to and from SystemVerilog
// 'real' (double) through the double's bit pattern, so that expected results
// are computed with the simulator's own double arithmetic and then rounded to
// single precision (round to nearest even, subnormals flushed to zero as the
// hardware does). Products of two singles and sums of singles whose
// exponents are close are exact in double, so the single rounding is the
// correctly rounded IEEE result.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] q;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    g  = m[28];
    st = |m[27:0];
    q = {1'b0, m[52:29]} + {24'd0, (g & (st | m[29]))};
    if (q[24]) begin
      q = q >> 1;
      e++;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), q[22:0]};
  endfunction

  // random single with exponent in [127-span, 127+span] and random sign
  function automatic logic [31:0] rand_f(int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(2*span, 0)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage

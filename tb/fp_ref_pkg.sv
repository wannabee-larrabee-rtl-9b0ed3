// fp_ref_pkg: reference single-precision arithmetic for the testbenches, computed
// with the simulator's double-precision reals and rounded to single precision by
// an independent routine. Results that would be subnormal flush to zero, like the
// design. Add and fused multiply-add are checked only where the double result is
// exact (tested with the TwoSum error-free transformation); products of two singles
// are always exact in double, and quotients and square roots are correctly rounded in
// double with no double-rounding error for single precision operands.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  // Round a double to single precision with rounding mode rm (0 RNE, 1 RTZ, 2 RDN, 3 RUP)
  function automatic logic [31:0] r2f(real r, int rm);
    logic [63:0] d;
    logic s, g, st, inc;
    int fe;
    logic [52:0] m53;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:0] == 0) return {s, 31'd0};
    fe  = int'(d[62:52]) - 1023 + 127;
    m53 = {1'b1, d[51:0]};
    m   = {1'b0, m53[52:29]};
    g   = m53[28];
    st  = |m53[27:0];
    case (rm)
      0: inc = g && (st || m[0]);
      1: inc = 0;
      2: inc = s && (g || st);
      default: inc = !s && (g || st);
    endcase
    m = m + 25'(inc);
    if (m[24]) begin m = m >> 1; fe++; end
    if (fe >= 255) begin
      if (rm == 1 || (rm == 2 && !s) || (rm == 3 && s)) return {s, 8'hfe, 23'h7fffff};
      return {s, 8'hff, 23'd0};
    end
    if (fe <= 0) return {s, 31'd0};
    return {s, 8'(fe), m[22:0]};
  endfunction

  // True when a + b is exactly representable as a double
  function automatic bit sum_exact(real a, real b);
    real s, bb, err;
    s   = a + b;
    bb  = s - a;
    err = (a - (s - bb)) + (b - bb);
    return err == 0.0;
  endfunction

  // Random normal single with exponent field in [elo, ehi]
  function automatic logic [31:0] rand_float(int elo, int ehi);
    logic [31:0] r;
    int e;
    r = $urandom;
    e = elo + int'($urandom % (ehi - elo + 1));
    return {r[31], 8'(e), r[22:0]};
  endfunction

endpackage

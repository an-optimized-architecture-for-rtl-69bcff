// tb_fp_pkg: reference arithmetic for the testbenches.
//
// Converts between IEEE 754 single-precision bit patterns and SystemVerilog
// real (double precision) without any help from the design: f2r widens a
// single to a double exactly, r2f rounds a double to single precision with
// round-to-nearest-even, flushing results below the smallest normal to zero
// the way the design does. A single add, multiply or divide done in double
// precision and then rounded by r2f gives the correctly rounded single result
// (double rounding is harmless because 53 >= 2 * 24 + 2).
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    st = (d[27:0] != 0);
    mr = {1'b0, m} + {24'd0, (g & (st | m[0]))};
    if (mr[24]) begin
      e  = e + 1;
      mr = mr >> 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  // Random normal single with an unbiased exponent in [emin, emax].
  function automatic logic [31:0] rand_f32(int emin, int emax);
    int unsigned span;
    int          e;
    span = unsigned'(emax - emin + 1);
    e = emin + int'($urandom % span);
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

  // |a - b| within rel * max(|a|, |b|) + abs_tol.
  function automatic bit close(real a, real b, real rel, real abs_tol);
    real d, m;
    d = (a > b) ? a - b : b - a;
    m = (a < 0 ? -a : a);
    if ((b < 0 ? -b : b) > m) m = (b < 0 ? -b : b);
    return d <= rel * m + abs_tol;
  endfunction

endpackage

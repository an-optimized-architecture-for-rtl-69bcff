// fp_mul: IEEE 754 single-precision multiplier, combinational.
//
// Multiplies the two 24-bit significands, normalises the 48-bit product by at
// most one place, and rounds to nearest even using the guard bit and a sticky
// OR of the bits below it. Subnormal inputs and results are flushed to zero,
// overflow gives infinity, NaN and inf * 0 give the quiet NaN 7fc00000.
// The document builds its multipliers from vendor floating-point cores; this
// is an independent implementation of the same function (flush-to-zero is
// this design's choice). No clock.
module fp_mul
  import cga_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  output f32_t y
);

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st, rnd;
    logic [24:0] mr;
    int          e;

    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_nan  = (ea == 8'hff) && (a[22:0] != 0);
    b_nan  = (eb == 8'hff) && (b[22:0] != 0);
    a_inf  = (ea == 8'hff) && (a[22:0] == 0);
    b_inf  = (eb == 8'hff) && (b[22:0] == 0);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);
    p = '0; m = '0; g = 1'b0; st = 1'b0; rnd = 1'b0; mr = '0; e = 0;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = F32_QNAN;
    end else if (a_inf || b_inf) begin
      y = {s, 8'hff, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {s, 31'd0};
    end else begin
      p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
      e = int'(ea) + int'(eb) - 127;
      if (p[47]) begin
        m  = p[47:24];
        g  = p[23];
        st = (p[22:0] != 0);
        e  = e + 1;
      end else begin
        m  = p[46:23];
        g  = p[22];
        st = (p[21:0] != 0);
      end
      rnd = g & (st | m[0]);
      mr  = {1'b0, m} + {24'd0, rnd};
      if (mr[24]) e = e + 1;
      if (e <= 0)        y = {s, 31'd0};
      else if (e >= 255) y = {s, 8'hff, 23'd0};
      else               y = {s, 8'(e), mr[24] ? 23'd0 : mr[22:0]};
    end
  end

endmodule

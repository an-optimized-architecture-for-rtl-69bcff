// fp_div: IEEE 754 single-precision divider, combinational.
//
// Divides the significands as integers, (ma << 25) / mb, which gives a 25- or
// 26-bit quotient; the quotient supplies 24 result bits plus a guard bit, and
// the guard bit's lower neighbours and the remainder form the sticky bit for
// round-to-nearest-even. Subnormals are flushed to zero; x/0 gives infinity,
// 0/0, inf/inf and NaN give the quiet NaN 7fc00000.
// The reflector needs a division by the squared norm of the mirror vector;
// the document does not describe a divider, so this unit is this design's
// own. No clock.
module fp_div
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
    logic [48:0] num;
    logic [48:0] den;
    logic [48:0] q, r;
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
    num = '0; den = '0; q = '0; r = '0; m = '0; g = 1'b0; st = 1'b0;
    rnd = 1'b0; mr = '0; e = 0;

    if (a_nan || b_nan || (a_inf && b_inf) || (a_zero && b_zero)) begin
      y = F32_QNAN;
    end else if (a_inf || b_zero) begin
      y = {s, 8'hff, 23'd0};
    end else if (a_zero || b_inf) begin
      y = {s, 31'd0};
    end else begin
      num = {1'b1, a[22:0], 25'd0};
      den = {25'd0, 1'b1, b[22:0]};
      q = num / den;
      r = num % den;
      if (q[25]) begin
        m  = q[25:2];
        g  = q[1];
        st = q[0] | (r != 0);
        e  = int'(ea) - int'(eb) + 127;
      end else begin
        m  = q[24:1];
        g  = q[0];
        st = (r != 0);
        e  = int'(ea) - int'(eb) + 126;
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

// fp_add: IEEE 754 single-precision adder/subtractor, combinational.
//
// Computes a + b (sub = 0) or a - b (sub = 1) with round-to-nearest-even.
// The larger operand is kept, the smaller one is aligned to it with guard,
// round and sticky bits, the mantissas are added or subtracted, the result
// is normalised and rounded. Subnormal inputs and results are flushed to
// zero, NaN results are the quiet NaN 7fc00000, and overflow gives infinity.
// The document builds these units from FPGA vendor floating-point cores; this
// is an independent implementation of the same IEEE 754 function. Flushing
// subnormals is this design's choice. No clock: the instantiating pipeline
// registers the result.
module fp_add
  import cga_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  input  logic sub,
  output f32_t y
);

  always_comb begin
    logic        sa, sb, sx, sy;
    logic [7:0]  ea, eb, ex, ey_;
    logic [23:0] ma, mb, mx, my;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [7:0]  d;
    logic [26:0] mx_e, my_e, my_sh;
    logic [27:0] sum;
    logic [26:0] m;
    logic [4:0]  lz;
    logic        found;
    int          e;
    logic        rnd;
    logic [24:0] mr;

    sa = a[31];  ea = a[30:23];
    sb = b[31] ^ sub;  eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    a_nan  = (ea == 8'hff) && (a[22:0] != 0);
    b_nan  = (eb == 8'hff) && (b[22:0] != 0);
    a_inf  = (ea == 8'hff) && (a[22:0] == 0);
    b_inf  = (eb == 8'hff) && (b[22:0] == 0);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);
    y = F32_ZERO;
    sx = 1'b0; sy = 1'b0; ex = '0; ey_ = '0; mx = '0; my = '0;
    d = '0; mx_e = '0; my_e = '0; my_sh = '0; sum = '0; m = '0;
    lz = '0; found = 1'b0; e = 0; rnd = 1'b0; mr = '0;

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = F32_QNAN;
    end else if (a_inf) begin
      y = {sa, 8'hff, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hff, 23'd0};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 31'd0};
    end else if (a_zero) begin
      y = {sb, b[30:0]};
    end else if (b_zero) begin
      y = a;
    end else begin
      // x is the operand of larger magnitude
      if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
        sx = sa; ex = ea; mx = ma; sy = sb; ey_ = eb; my = mb;
      end else begin
        sx = sb; ex = eb; mx = mb; sy = sa; ey_ = ea; my = ma;
      end
      d    = ex - ey_;
      mx_e = {mx, 3'b000};
      my_e = {my, 3'b000};
      if (d >= 8'd27) begin
        my_sh = 27'd1;  // only the sticky bit survives
      end else begin
        my_sh = my_e >> d;
        my_sh[0] = my_sh[0] | ((my_e & ((27'd1 << d) - 27'd1)) != 0);
      end
      e = int'(ex);
      if (sx == sy) begin
        sum = {1'b0, mx_e} + {1'b0, my_sh};
        if (sum[27]) begin
          m = sum[27:1];
          m[0] = m[0] | sum[0];
          e = e + 1;
        end else begin
          m = sum[26:0];
        end
      end else begin
        m = mx_e - my_sh;
        for (int i = 26; i >= 0; i--) begin
          if (!found && m[i]) begin
            found = 1'b1;
            lz = 5'(26 - i);
          end
        end
        m = m << lz;
        e = e - int'(lz);
      end
      if (m == 0) begin
        y = F32_ZERO;
      end else begin
        rnd = m[2] & (m[1] | m[0] | m[3]);
        mr  = {1'b0, m[26:3]} + {24'd0, rnd};
        if (mr[24]) e = e + 1;
        if (e <= 0)        y = {sx, 31'd0};
        else if (e >= 255) y = {sx, 8'hff, 23'd0};
        else               y = {sx, 8'(e), mr[24] ? 23'd0 : mr[22:0]};
      end
    end
  end

endmodule

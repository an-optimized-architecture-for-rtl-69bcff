// reflector: pipelined reflection of a 5D conformal vector x in the mirror
// given by a 5D vector n (plane or sphere):
//     y = -n x n^-1 = x - 2 (x . n) / (n . n) * n
// with the metric e1^2 = e2^2 = e3^2 = e4^2 = +1, e5^2 = -1 (the last
// coefficient is the e- component). With bypass set, y = x (used when only
// one reflection is wanted).
//
// Pipeline, one vector per clock, LATENCY = 7 clocks:
//   1: ten products x_i n_i and n_i n_i (e5 terms negated)
//   2-4: adder tree for x . n and n . n
//   5: f = 2 (x . n) / (n . n)
//   6: t_i = f n_i
//   7: y_i = x_i - t_i
// An opaque side-band word of SIDE_W bits travels with each vector so that
// the caller can carry an id or the next mirror along. The document says
// only that the motor unit is built from two cascaded pipelined reflector
// units; the formula, the metric, the stage split and the side band are this
// design's own.
module reflector
  import cga_pkg::*;
#(
  parameter int SIDE_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  f32_t [4:0]        x,
  input  f32_t [4:0]        n,
  input  logic              bypass,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  output f32_t [4:0]        y,
  output logic [SIDE_W-1:0] out_side
);

  localparam int LATENCY = 7;

  // vector, mirror, bypass and side band delayed along stages 1..6
  f32_t [4:0]        x_d [1:6];
  f32_t [4:0]        n_d [1:6];
  logic              byp_d [1:6];
  logic [SIDE_W-1:0] side_d [1:6];
  logic [LATENCY:1]  v_d;

  always_ff @(posedge clk) begin
    x_d[1] <= x;  n_d[1] <= n;  byp_d[1] <= bypass;  side_d[1] <= in_side;
    for (int s = 2; s <= 6; s++) begin
      x_d[s] <= x_d[s-1];  n_d[s] <= n_d[s-1];
      byp_d[s] <= byp_d[s-1];  side_d[s] <= side_d[s-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_d <= '0;
    else        v_d <= {v_d[LATENCY-1:1], in_valid};
  end

  // stage 1: products
  f32_t xn [5], nn [5];
  f32_t xn_q [5], nn_q [5];
  for (genvar i = 0; i < 5; i++) begin : g_p
    f32_t xn_raw, nn_raw;
    fp_mul u_xn (.a(x[i]), .b(n[i]), .y(xn_raw));
    fp_mul u_nn (.a(n[i]), .b(n[i]), .y(nn_raw));
    assign xn[i] = (i == 4) ? fneg(xn_raw) : xn_raw;
    assign nn[i] = (i == 4) ? fneg(nn_raw) : nn_raw;
  end
  always_ff @(posedge clk) begin
    xn_q <= xn;
    nn_q <= nn;
  end

  // stages 2-4: sums of five terms, ((0+1) + (2+3)) + 4
  f32_t xa01, xa23, na01, na23;
  f32_t xa01_q, xa23_q, na01_q, na23_q, x4_q2, n4_q2;
  fp_add u_xa01 (.a(xn_q[0]), .b(xn_q[1]), .sub(1'b0), .y(xa01));
  fp_add u_xa23 (.a(xn_q[2]), .b(xn_q[3]), .sub(1'b0), .y(xa23));
  fp_add u_na01 (.a(nn_q[0]), .b(nn_q[1]), .sub(1'b0), .y(na01));
  fp_add u_na23 (.a(nn_q[2]), .b(nn_q[3]), .sub(1'b0), .y(na23));
  always_ff @(posedge clk) begin
    xa01_q <= xa01;  xa23_q <= xa23;  x4_q2 <= xn_q[4];
    na01_q <= na01;  na23_q <= na23;  n4_q2 <= nn_q[4];
  end

  f32_t xa0123, na0123, xa0123_q, na0123_q, x4_q3, n4_q3;
  fp_add u_xa0123 (.a(xa01_q), .b(xa23_q), .sub(1'b0), .y(xa0123));
  fp_add u_na0123 (.a(na01_q), .b(na23_q), .sub(1'b0), .y(na0123));
  always_ff @(posedge clk) begin
    xa0123_q <= xa0123;  x4_q3 <= x4_q2;
    na0123_q <= na0123;  n4_q3 <= n4_q2;
  end

  f32_t xdot, ndot, xdot_q, ndot_q;
  fp_add u_xdot (.a(xa0123_q), .b(x4_q3), .sub(1'b0), .y(xdot));
  fp_add u_ndot (.a(na0123_q), .b(n4_q3), .sub(1'b0), .y(ndot));
  always_ff @(posedge clk) begin
    xdot_q <= xdot;
    ndot_q <= ndot;
  end

  // stage 5: f = 2 (x . n) / (n . n)
  f32_t xdot2, f, f_q;
  fp_mul u_two (.a(xdot_q), .b(F32_TWO), .y(xdot2));
  fp_div u_div (.a(xdot2), .b(ndot_q), .y(f));
  always_ff @(posedge clk) f_q <= f;

  // stage 6: t = f n
  f32_t t [5], t_q [5];
  for (genvar i = 0; i < 5; i++) begin : g_t
    fp_mul u_t (.a(f_q), .b(n_d[5][i]), .y(t[i]));
  end
  always_ff @(posedge clk) t_q <= t;

  // stage 7: y = x - t
  f32_t r [5];
  for (genvar i = 0; i < 5; i++) begin : g_y
    fp_add u_y (.a(x_d[6][i]), .b(t_q[i]), .sub(1'b1), .y(r[i]));
  end
  always_ff @(posedge clk) begin
    for (int i = 0; i < 5; i++) y[i] <= byp_d[6] ? x_d[6][i] : r[i];
    out_side <= side_d[6];
  end

  assign out_valid = v_d[LATENCY];

endmodule

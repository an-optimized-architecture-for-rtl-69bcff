// products_unit: pipelined product of two quadruples (CGA ALU, opcodes
// 00xx): geometric product, outer product, left and right contraction.
//
// Operand A is the quadruple of type tag1 in coefficients 0..3, operand B
// the quadruple of type tag2 in coefficients 4..7 (see cga_pkg for the
// quadruple layout). The result is one quadruple of type tag1 ^ tag2 in
// coefficients 0..3; tag2 of the result repeats tag1 and coefficients 4..7
// are zero. Output coefficient k is the sum over i of
// sign(i, k) * A[i] * B[i ^ k], where the sign comes from reordering the two
// basis blades and from e5 * e5 = -1, and a term is dropped when the blade
// pair does not contribute to the selected product (outer: blades share no
// index; left contraction: A's blade lies in B's; right contraction: the
// reverse).
//
// Pipeline, one operation accepted per clock, latency LATENCY = 3:
//   stage 1: 16 multiplications with sign and mask, registered
//   stage 2: 8 pairwise additions, registered
//   stage 3: 4 final additions, registered on the outputs
// The document gives the operations and opcodes and says the unit is a
// pipeline; the quadruple layout, the adder tree and the latency are this
// design's own.
module products_unit
  import cga_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  instr_t  in,
  output logic    out_valid,
  output result_t out
);

  // stage 1: products
  f32_t prod [4][4];       // [k][i]
  f32_t prod_q [4][4];
  logic [ID_W-1:0] id_q1, id_q2;
  logic [2:0]      tag_q1, tag_q2;
  logic            v_q1, v_q2;

  for (genvar k = 0; k < 4; k++) begin : g_k
    for (genvar i = 0; i < 4; i++) begin : g_i
      f32_t p_raw;
      logic [4:0] ba, bb;
      fp_mul u_mul (.a(in.c[i]), .b(in.c[4 + (i ^ k)]), .y(p_raw));
      always_comb begin
        ba = quad_blade(in.tag1, 2'(i));
        bb = quad_blade(in.tag2, 2'(i ^ k));
        if (!blade_keep(in.op[1:0], ba, bb))
          prod[k][i] = F32_ZERO;
        else if (blade_gp_neg(ba, bb))
          prod[k][i] = fneg(p_raw);
        else
          prod[k][i] = p_raw;
      end
    end
  end

  always_ff @(posedge clk) begin
    prod_q <= prod;
    id_q1  <= in.id;
    tag_q1 <= in.tag1 ^ in.tag2;
  end

  // stage 2: pairwise sums
  f32_t s_pair [4][2];
  f32_t s_pair_q [4][2];
  for (genvar k = 0; k < 4; k++) begin : g_add1
    fp_add u_add0 (.a(prod_q[k][0]), .b(prod_q[k][1]), .sub(1'b0), .y(s_pair[k][0]));
    fp_add u_add1 (.a(prod_q[k][2]), .b(prod_q[k][3]), .sub(1'b0), .y(s_pair[k][1]));
  end

  always_ff @(posedge clk) begin
    s_pair_q <= s_pair;
    id_q2    <= id_q1;
    tag_q2   <= tag_q1;
  end

  // stage 3: final sums
  f32_t s_fin [4];
  for (genvar k = 0; k < 4; k++) begin : g_add2
    fp_add u_add (.a(s_pair_q[k][0]), .b(s_pair_q[k][1]), .sub(1'b0), .y(s_fin[k]));
  end

  always_ff @(posedge clk) begin
    out.id   <= id_q2;
    out.tag1 <= tag_q2;
    out.tag2 <= tag_q2;
    for (int k = 0; k < 4; k++) begin
      out.c[k]     <= s_fin[k];
      out.c[k + 4] <= F32_ZERO;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q1 <= 1'b0;
      v_q2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q1 <= in_valid;
      v_q2 <= v_q1;
      out_valid <= v_q2;
    end
  end

endmodule

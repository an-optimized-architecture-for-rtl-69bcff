// unary_unit: pipelined unary operations on one quadruple (CGA ALU, opcodes
// 10xx): dual, reverse, conjugate and grade involution.
//
// The operand is the quadruple of type tag1 in coefficients 0..3. Reverse,
// conjugate and grade involution keep every blade and only flip signs by
// grade g: reverse negates grades 2 and 3, conjugate grades 1, 2 and 5,
// involution the odd grades. The dual is A * I^-1 with I = e12345 (I^-1 = -I
// in this metric); it maps blade b to b ^ 11111, which turns coefficient k
// of type t into coefficient k ^ 3 of type t ^ 4. The result is one
// quadruple in coefficients 0..3 (tag1 = tag2 = its type, coefficients 4..7
// zero). Only sign bits and positions change, so no arithmetic unit is
// needed. One operation per clock, latency 1. The operations and opcodes are
// the document's; the dual convention (right multiplication by I^-1) is this
// design's choice.
module unary_unit
  import cga_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  instr_t  in,
  output logic    out_valid,
  output result_t out
);

  f32_t       res [4];
  logic [2:0] res_tag;

  // Output coefficient j comes from input coefficient src (src = j ^ 3 for
  // the dual, j otherwise) with the sign belonging to that input blade.
  always_comb begin
    logic [1:0]  src;
    logic [4:0]  b;
    int unsigned g;
    logic        neg;
    for (int j = 0; j < 4; j++) begin
      src = (in.op == OP_DUAL) ? 2'(j ^ 3) : 2'(j);
      b   = quad_blade(in.tag1, src);
      g   = grade(b);
      case (in.op)
        OP_DUAL:    neg = ~blade_gp_neg(b, 5'b11111);
        OP_REVERSE: neg = (g == 2) || (g == 3);
        OP_CONJ:    neg = (g == 1) || (g == 2) || (g == 5);
        default:    neg = g[0];  // grade involution
      endcase
      res[j] = neg ? fneg(in.c[src]) : in.c[src];
    end
    res_tag = (in.op == OP_DUAL) ? (in.tag1 ^ 3'b100) : in.tag1;
  end

  always_ff @(posedge clk) begin
    out.id   <= in.id;
    out.tag1 <= res_tag;
    out.tag2 <= res_tag;
    for (int k = 0; k < 4; k++) begin
      out.c[k]     <= res[k];
      out.c[k + 4] <= F32_ZERO;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule

// sums_unit: pipelined sum and difference of two quadruples (CGA ALU,
// opcodes 0100 sum and 0101 difference).
//
// Operand A is the quadruple of type tag1 in coefficients 0..3, operand B the
// quadruple of type tag2 in coefficients 4..7. When the two types are equal
// the result is one quadruple A[k] +/- B[k] of that type in coefficients 0..3
// (tag1 = tag2 = that type, coefficients 4..7 zero). When they differ the two
// quadruples hold different blades and nothing is added: the result is the
// two quadruples A and +/-B, with tags tag1 and tag2. This is how a result can
// be one or two quadruples, as the document's result format allows; the
// exact rule is this design's own. One operation per clock, latency 2: the
// operands are registered first, then the adders feed the output register.
// The document only says that unary operations are the fastest; the two
// stages here make the sums pipeline one clock slower than the unary one.
module sums_unit
  import cga_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  instr_t  in,
  output logic    out_valid,
  output result_t out
);

  // stage 1: operand register
  instr_t s1;
  logic   s1_valid;
  f32_t   sum [4];
  logic   is_diff, same_type;

  always_ff @(posedge clk) s1 <= in;

  assign is_diff   = s1.op[0];
  assign same_type = (s1.tag1 == s1.tag2);

  // stage 2: four adders and the output register
  for (genvar k = 0; k < 4; k++) begin : g_add
    fp_add u_add (.a(s1.c[k]), .b(s1.c[4 + k]), .sub(is_diff), .y(sum[k]));
  end

  always_ff @(posedge clk) begin
    out.id   <= s1.id;
    out.tag1 <= s1.tag1;
    out.tag2 <= s1.tag2;
    for (int k = 0; k < 4; k++) begin
      if (same_type) begin
        out.c[k]     <= sum[k];
        out.c[k + 4] <= F32_ZERO;
      end else begin
        out.c[k]     <= s1.c[k];
        out.c[k + 4] <= is_diff ? fneg(s1.c[k + 4]) : s1.c[k + 4];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      out_valid <= s1_valid;
    end
  end

endmodule

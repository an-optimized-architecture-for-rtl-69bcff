// motor_unit: pipelined rigid body motion unit (opcodes 11xx): reflection,
// rotation, translation and dilation of a 5D conformal vector, each done as
// reflections in two cascaded reflector pipelines.
//
// Operands: coefficients 0..4 hold the vector to transform, 5..9 the first
// mirror vector n1, 10..14 the second mirror vector n2 (the host works out
// the mirrors from the angle, direction, distance or scale factor). The unit
// returns n2 n1 x n1^-1 n2^-1, i.e. x reflected in n1 and then in n2. For a
// reflection (1100) the second reflector passes the vector through
// unchanged, so n2 is ignored. Rotation (1101), translation (1110) and
// dilation (1111) differ only in the mirrors the host supplies. The result
// vector is in coefficients 0..4 of the result; tags and coefficients 5..7
// are zero.
//
// One operation per clock; latency 2 x 7 = 14 clocks. The document gives the
// two-reflector structure, the operand layout (vector, first and second
// mirror) and the opcodes 1100-1110; the opcode 1111 for dilation and the
// metric are this design's reading.
module motor_unit
  import cga_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  instr_t  in,
  output logic    out_valid,
  output result_t out
);

  localparam int SIDE1_W = ID_W + 1 + 5 * 32;

  f32_t [4:0] x, n1, n2, y1, y2, n2_d;
  logic       v1, single, single_d;
  logic [ID_W-1:0] id_d, id_out;
  logic [SIDE1_W-1:0] side1_out;

  for (genvar i = 0; i < 5; i++) begin : g_unpack
    assign x[i]  = in.c[i];
    assign n1[i] = in.c[5 + i];
    assign n2[i] = in.c[10 + i];
  end

  assign single = (in.op == OP_REFLECT);

  reflector #(.SIDE_W(SIDE1_W)) u_refl1 (
    .clk, .rst_n,
    .in_valid (in_valid),
    .x        (x),
    .n        (n1),
    .bypass   (1'b0),
    .in_side  ({in.id, single, n2}),
    .out_valid(v1),
    .y        (y1),
    .out_side (side1_out)
  );

  assign {id_d, single_d, n2_d} = side1_out;

  reflector #(.SIDE_W(ID_W)) u_refl2 (
    .clk, .rst_n,
    .in_valid (v1),
    .x        (y1),
    .n        (n2_d),
    .bypass   (single_d),
    .in_side  (id_d),
    .out_valid(out_valid),
    .y        (y2),
    .out_side (id_out)
  );

  always_comb begin
    out      = '0;
    out.id   = id_out;
    for (int i = 0; i < 5; i++) out.c[i] = y2[i];
  end

endmodule

// cga_pkg: types, opcodes and small combinational helpers shared by the
// coprocessor.
//
// Instruction word (512 bits, four 128-bit FIFO words, first word on the
// MSB side): {id[21:0], tag1[2:0], tag2[2:0], opcode[3:0], coefficient 0 .. 14},
// each coefficient an IEEE 754 single-precision number. The field widths and
// their order follow the document's instruction format; putting the first
// field at the MSB end and sending the MSB word first is this design's choice.
//
// Result word (three 128-bit FIFO words): {4'b0, id, tag1, tag2,
// coefficient 0 .. 7, 96'b0}. The 288-bit result of the document is padded
// with zeros at the end to a whole number of 128-bit words (own choice).
//
// Quadruples. The document states only that basic operations work on
// "quadruples" of four coefficients with eight types (3-bit tag). This design
// defines them as follows. A 5D basis blade is a 5-bit mask, bit i-1 standing
// for e_i (e1, e2, e3 Euclidean, e4 = e+ with square +1, e5 = e- with square
// -1). The 32 blades are split into eight cosets of the group
// S = {1, e12, e34, e1234}: quadruple type t holds the blades
// rep(t) ^ S[k], k = 0..3, with rep(t) = {t[2] -> e5, t[1] -> e3, t[0] -> e1}
// and S[k] = {k[1] -> e34, k[0] -> e12}. Coefficient k of a quadruple of
// type t multiplies the blade with mask quad_blade(t, k), written with its
// indices in ascending order (e.g. e125). Because S is a group, the product
// of any two quadruples is a single quadruple of type t1 ^ t2, and output
// coefficient k collects the four terms (i, i ^ k).
package cga_pkg;

  typedef logic [31:0] f32_t;

  typedef enum logic [3:0] {
    OP_GP      = 4'b0000,  // geometric product
    OP_OUTER   = 4'b0001,  // outer (wedge) product
    OP_LCONT   = 4'b0010,  // left contraction
    OP_RCONT   = 4'b0011,  // right contraction
    OP_SUM     = 4'b0100,
    OP_DIFF    = 4'b0101,
    OP_DUAL    = 4'b1000,
    OP_REVERSE = 4'b1001,
    OP_CONJ    = 4'b1010,
    OP_INVOL   = 4'b1011,  // grade involution
    OP_REFLECT = 4'b1100,
    OP_ROTATE  = 4'b1101,
    OP_TRANSL  = 4'b1110,
    OP_DILATE  = 4'b1111
  } opcode_e;

  // Operation class = two most significant opcode bits.
  typedef enum logic [1:0] {
    CLS_PRODUCT = 2'b00,
    CLS_SUM     = 2'b01,
    CLS_UNARY   = 2'b10,
    CLS_MOTOR   = 2'b11
  } op_class_e;

  localparam int ID_W      = 22;
  localparam int TAG_W     = 3;
  localparam int N_IN_COEF = 15;
  localparam int N_OUT_COEF = 8;
  localparam int BUS_W     = 128;
  localparam int INSTR_W   = 512;
  localparam int RESULT_W  = 384;
  localparam int INSTR_BEATS  = INSTR_W / BUS_W;   // 4
  localparam int RESULT_BEATS = RESULT_W / BUS_W;  // 3

  typedef struct packed {
    logic [ID_W-1:0]              id;
    logic [TAG_W-1:0]             tag1;
    logic [TAG_W-1:0]             tag2;
    opcode_e                      op;
    f32_t [N_IN_COEF-1:0]         c;    // c[k] = coefficient k
  } instr_t;

  typedef struct packed {
    logic [ID_W-1:0]              id;
    logic [TAG_W-1:0]             tag1;
    logic [TAG_W-1:0]             tag2;
    f32_t [N_OUT_COEF-1:0]        c;
  } result_t;

  localparam int INSTR_T_W  = $bits(instr_t);
  localparam int RESULT_T_W = $bits(result_t);

  localparam f32_t F32_ZERO = 32'h0000_0000;
  localparam f32_t F32_TWO  = 32'h4000_0000;
  localparam f32_t F32_QNAN = 32'h7fc0_0000;

  function automatic f32_t fneg(f32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Instruction word -> struct.
  function automatic instr_t unpack_instr(logic [INSTR_W-1:0] w);
    instr_t r;
    r.id   = w[511:490];
    r.tag1 = w[489:487];
    r.tag2 = w[486:484];
    r.op   = opcode_e'(w[483:480]);
    for (int k = 0; k < N_IN_COEF; k++) r.c[k] = w[479-32*k -: 32];
    return r;
  endfunction

  // Struct -> result word.
  function automatic logic [RESULT_W-1:0] pack_result(result_t r);
    logic [RESULT_W-1:0] w;
    w = '0;
    w[383:352] = {4'b0000, r.id, r.tag1, r.tag2};
    for (int k = 0; k < N_OUT_COEF; k++) w[351-32*k -: 32] = r.c[k];
    return w;
  endfunction

  // Blade mask of coefficient k of a quadruple of type t.
  function automatic logic [4:0] quad_blade(logic [2:0] t, logic [1:0] k);
    return {t[2], k[1], t[1] ^ k[1], k[0], t[0] ^ k[0]};
  endfunction

  function automatic int unsigned grade(logic [4:0] b);
    return $countones(b);
  endfunction

  // 1 when the geometric product of canonical blades a and b carries a
  // minus sign: reordering swaps plus the e5 * e5 = -1 metric factor.
  function automatic logic blade_gp_neg(logic [4:0] a, logic [4:0] b);
    int unsigned swaps;
    swaps = 0;
    for (int i = 0; i < 5; i++)
      if (b[i]) for (int j = i + 1; j < 5; j++) if (a[j]) swaps++;
    return swaps[0] ^ (a[4] & b[4]);
  endfunction

  // Whether the (a, b) term survives in the product selected by op[1:0].
  function automatic logic blade_keep(logic [1:0] op, logic [4:0] a, logic [4:0] b);
    case (op)
      2'b00:   return 1'b1;                 // geometric
      2'b01:   return (a & b) == 5'd0;      // outer
      2'b10:   return (a & b) == a;         // left contraction: a within b
      default: return (a & b) == b;         // right contraction: b within a
    endcase
  endfunction

endpackage

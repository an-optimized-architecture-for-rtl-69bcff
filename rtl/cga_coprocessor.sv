// cga_coprocessor: conformal geometric algebra (CGA) coprocessor, top level.
//
// The host writes 512-bit instructions as four 128-bit words into the
// instruction FIFO and reads 384-bit results as three 128-bit words from the
// result FIFO (formats in cga_pkg). Inside, the controller decodes each
// instruction and sends it by its opcode class to one of four pipelines that
// run in parallel, each with an input FIFO before it and an output FIFO after
// it:
//   products        (geometric/outer product, left/right contraction)
//   sums/differences
//   unary            (dual, reverse, conjugate, grade involution)
//   motor unit       (reflection, rotation, translation, dilation, as two
//                     cascaded reflectors)
// The first three form the CGA ALU and work on quadruples (four
// coefficients with a 3-bit type tag); the motor unit works on 5D vectors.
// Pipelines have different latencies, so results can leave in a different
// order from the instructions; every result carries the 22-bit id of its
// instruction so the host can put them back in order.
//
// Interface: instr_wr_en/instr_wr_data/instr_full is a FIFO write port,
// result_rd_en/result_rd_data/result_empty a FIFO read port whose data
// appears the clock after result_rd_en. Both accept a word per clock. The
// processor bus that drives these ports on the original system is not part
// of this design. Event outputs report a dispatch stall (the selected input
// FIFO is full) and the number of results waiting per pipeline.
//
// The structure (controller, four pipelines with input and output FIFOs,
// 128 x 16384 instruction and result FIFOs, opcode routing) follows the
// document; the depth of the per-pipeline FIFOs (PIPE_DEPTH) is this
// design's choice.
module cga_coprocessor
  import cga_pkg::*;
#(
  parameter int IFQ_DEPTH  = 16384,
  parameter int RFQ_DEPTH  = 16384,
  parameter int PIPE_DEPTH = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               instr_wr_en,
  input  logic [BUS_W-1:0]   instr_wr_data,
  output logic               instr_full,
  input  logic               result_rd_en,
  output logic [BUS_W-1:0]   result_rd_data,
  output logic               result_empty,
  output logic               dispatch_stall,
  output logic [3:0]         pipe_start    // a pipeline starts an operation
);

  // instruction FIFO
  logic                 ifq_empty, ifq_rd_en;
  logic [BUS_W-1:0]     ifq_rd_data;
  logic [$clog2(IFQ_DEPTH):0] ifq_count;

  sync_fifo #(.WIDTH(BUS_W), .DEPTH(IFQ_DEPTH)) u_instr_fifo (
    .clk, .rst_n,
    .wr_en  (instr_wr_en),
    .wr_data(instr_wr_data),
    .full   (instr_full),
    .rd_en  (ifq_rd_en),
    .rd_data(ifq_rd_data),
    .empty  (ifq_empty),
    .count  (ifq_count)
  );

  // result FIFO
  logic                 rfq_wr_en, rfq_full;
  logic [BUS_W-1:0]     rfq_wr_data;
  logic [$clog2(RFQ_DEPTH):0] rfq_count;

  sync_fifo #(.WIDTH(BUS_W), .DEPTH(RFQ_DEPTH)) u_result_fifo (
    .clk, .rst_n,
    .wr_en  (rfq_wr_en),
    .wr_data(rfq_wr_data),
    .full   (rfq_full),
    .rd_en  (result_rd_en),
    .rd_data(result_rd_data),
    .empty  (result_empty),
    .count  (rfq_count)
  );

  // per-pipeline FIFOs (index = opcode class: 0 products, 1 sums, 2 unary, 3 motor)
  logic [3:0] in_wr_en, in_full, in_empty, in_rd_en, issue_valid;
  instr_t     in_wr_data;
  instr_t     in_rd_data [4];
  logic [3:0] unit_valid, out_full, out_empty, out_rd_en;
  result_t    unit_res [4];
  result_t    out_rd_data [4];
  logic [$clog2(PIPE_DEPTH):0] in_count [4], out_count [4];

  for (genvar k = 0; k < 4; k++) begin : g_pipe
    sync_fifo #(.WIDTH(INSTR_T_W), .DEPTH(PIPE_DEPTH)) u_in_fifo (
      .clk, .rst_n,
      .wr_en  (in_wr_en[k]),
      .wr_data(in_wr_data),
      .full   (in_full[k]),
      .rd_en  (in_rd_en[k]),
      .rd_data(in_rd_data[k]),
      .empty  (in_empty[k]),
      .count  (in_count[k])
    );
    sync_fifo #(.WIDTH(RESULT_T_W), .DEPTH(PIPE_DEPTH)) u_out_fifo (
      .clk, .rst_n,
      .wr_en  (unit_valid[k]),
      .wr_data(unit_res[k]),
      .full   (out_full[k]),
      .rd_en  (out_rd_en[k]),
      .rd_data(out_rd_data[k]),
      .empty  (out_empty[k]),
      .count  (out_count[k])
    );
  end

  cga_controller #(.PIPE_DEPTH(PIPE_DEPTH), .RFQ_DEPTH(RFQ_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .ifq_empty, .ifq_rd_en, .ifq_rd_data,
    .in_wr_en, .in_wr_data, .in_full, .in_empty, .in_rd_en, .issue_valid,
    .unit_out_valid(unit_valid),
    .out_count, .out_empty, .out_rd_en, .out_rd_data,
    .rfq_count, .rfq_wr_en, .rfq_wr_data,
    .dispatch_stall
  );

  cga_alu u_alu (
    .clk, .rst_n,
    .prod_valid    (issue_valid[CLS_PRODUCT]),
    .prod_in       (in_rd_data[CLS_PRODUCT]),
    .prod_out_valid(unit_valid[CLS_PRODUCT]),
    .prod_out      (unit_res[CLS_PRODUCT]),
    .sum_valid     (issue_valid[CLS_SUM]),
    .sum_in        (in_rd_data[CLS_SUM]),
    .sum_out_valid (unit_valid[CLS_SUM]),
    .sum_out       (unit_res[CLS_SUM]),
    .un_valid      (issue_valid[CLS_UNARY]),
    .un_in         (in_rd_data[CLS_UNARY]),
    .un_out_valid  (unit_valid[CLS_UNARY]),
    .un_out        (unit_res[CLS_UNARY])
  );

  motor_unit u_motor (
    .clk, .rst_n,
    .in_valid (issue_valid[CLS_MOTOR]),
    .in       (in_rd_data[CLS_MOTOR]),
    .out_valid(unit_valid[CLS_MOTOR]),
    .out      (unit_res[CLS_MOTOR])
  );

  assign pipe_start = issue_valid;

  a_out_fifo_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) (unit_valid & out_full) == '0);

endmodule

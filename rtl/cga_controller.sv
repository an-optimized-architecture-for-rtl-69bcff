// cga_controller: instruction fetch, decode and dispatch, pipeline issue,
// and result collection for the coprocessor.
//
// Fetch: reads 128-bit words from the instruction FIFO (one per clock while
// it is not empty), assembles four of them, MSB word first, into a 512-bit
// instruction and places it in a dispatch register. Decode and dispatch: the
// two most significant opcode bits select the pipeline (00 products,
// 01 sums/differences, 10 unary, 11 motor unit) and the instruction is
// written into that pipeline's input FIFO. If the FIFO is full the dispatch
// register waits (dispatch stall) and fetching stops once the next
// instruction is complete. A fully used stream takes one instruction per
// four clocks, i.e. one 128-bit word per clock.
//
// Issue: each pipeline is started from its input FIFO whenever the FIFO is
// not empty and the pipeline's output FIFO has room for every operation
// already started (a credit count), so the pipelines never have to stop.
// The word read from the input FIFO reaches the pipeline one clock after the
// read (issue_valid).
//
// Collection: a round-robin pointer picks a non-empty output FIFO, the result
// is read and written to the result FIFO as three 128-bit words, MSB word
// first. Reading the next result overlaps the last word of the previous one,
// so back-to-back results take three clocks each. A result is only read when
// the result FIFO has room for all three of its words.
//
// The document gives the controller's job (fetch, decode by the two opcode
// MSBs, dispatch to four pipelines, collect results into the result FIFO);
// the assembly order, the credit scheme and the round-robin collector are
// this design's own.
module cga_controller
  import cga_pkg::*;
#(
  parameter int PIPE_DEPTH  = 512,    // depth of each pipeline output FIFO
  parameter int RFQ_DEPTH   = 16384   // depth of the result FIFO
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // instruction FIFO read side
  input  logic                        ifq_empty,
  output logic                        ifq_rd_en,
  input  logic [BUS_W-1:0]            ifq_rd_data,
  // pipeline input FIFOs: write side (dispatch) and read side (issue)
  output logic [3:0]                  in_wr_en,
  output instr_t                      in_wr_data,
  input  logic [3:0]                  in_full,
  input  logic [3:0]                  in_empty,
  output logic [3:0]                  in_rd_en,
  output logic [3:0]                  issue_valid,
  // pipeline results and output FIFOs
  input  logic [3:0]                  unit_out_valid,
  input  logic [$clog2(PIPE_DEPTH):0] out_count [4],
  input  logic [3:0]                  out_empty,
  output logic [3:0]                  out_rd_en,
  input  result_t                     out_rd_data [4],
  // result FIFO write side
  input  logic [$clog2(RFQ_DEPTH):0]  rfq_count,
  output logic                        rfq_wr_en,
  output logic [BUS_W-1:0]            rfq_wr_data,
  // event strobes (for monitoring)
  output logic                        dispatch_stall
);

  // ---------------------------------------------------------------- fetch
  logic                 rd_pend;       // a word read last clock arrives now
  logic [1:0]           rcv_idx;       // beats of the current instruction received
  logic [INSTR_W-1:0]   asm_buf;
  logic                 asm_done;      // complete instruction parked in asm_buf
  logic                 dis_valid;
  instr_t               dis_instr;
  logic                 dis_fire, dis_free, last_beat;
  logic [INSTR_W-1:0]   asm_next;
  op_class_e            dis_cls;

  assign dis_cls   = op_class_e'(dis_instr.op[3:2]);
  assign dis_fire  = dis_valid && !in_full[dis_cls];
  assign dis_free  = !dis_valid || dis_fire;
  assign last_beat = rd_pend && (rcv_idx == 2'd3);
  assign asm_next  = {asm_buf[INSTR_W-BUS_W-1:0], ifq_rd_data};
  assign ifq_rd_en = !ifq_empty && !asm_done && !(last_beat && !dis_free);
  assign dispatch_stall = dis_valid && in_full[dis_cls];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend   <= 1'b0;
      rcv_idx   <= '0;
      asm_done  <= 1'b0;
      dis_valid <= 1'b0;
    end else begin
      rd_pend <= ifq_rd_en;
      if (rd_pend) rcv_idx <= rcv_idx + 1'b1;
      if (asm_done && dis_free) begin
        asm_done  <= 1'b0;
        dis_valid <= 1'b1;
      end else if (last_beat) begin
        if (dis_free) dis_valid <= 1'b1;
        else          asm_done  <= 1'b1;
      end else if (dis_fire) begin
        dis_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_pend) asm_buf <= asm_next;
    if (asm_done && dis_free)       dis_instr <= unpack_instr(asm_buf);
    else if (last_beat && dis_free) dis_instr <= unpack_instr(asm_next);
  end

  assign in_wr_data = dis_instr;
  always_comb begin
    in_wr_en = '0;
    in_wr_en[dis_cls] = dis_fire;
  end

  // ---------------------------------------------------------------- issue
  localparam int CW = $clog2(PIPE_DEPTH) + 1;
  logic [CW-1:0] inflight [4];

  for (genvar k = 0; k < 4; k++) begin : g_issue
    logic [CW:0] occupancy;
    assign occupancy   = {1'b0, inflight[k]} + {1'b0, out_count[k]};
    assign in_rd_en[k] = !in_empty[k] && (occupancy < (CW+1)'(PIPE_DEPTH));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        inflight[k]    <= '0;
        issue_valid[k] <= 1'b0;
      end else begin
        issue_valid[k] <= in_rd_en[k];
        inflight[k]    <= inflight[k] + CW'(in_rd_en[k]) - CW'(unit_out_valid[k]);
      end
    end
  end

  // ------------------------------------------------------------- collect
  logic [1:0]          rr_ptr, pick, pend_k;
  logic                pick_ok, col_pend;
  logic [1:0]          ser_cnt;        // result words still to write
  logic [RESULT_W-1:0] ser_buf, popped;
  logic [$clog2(RFQ_DEPTH)+1:0] rfq_free;

  always_comb begin
    pick_ok = 1'b0;
    pick    = rr_ptr;
    for (int j = 3; j >= 0; j--) begin
      if (!out_empty[2'(rr_ptr + 2'(j))]) begin
        pick_ok = 1'b1;
        pick    = 2'(rr_ptr + 2'(j));
      end
    end
  end

  assign rfq_free = ($clog2(RFQ_DEPTH)+2)'(RFQ_DEPTH) - ($clog2(RFQ_DEPTH)+2)'(rfq_count);
  assign popped   = pack_result(out_rd_data[pend_k]);

  always_comb begin
    out_rd_en = '0;
    if (pick_ok && !col_pend && ser_cnt <= 2'd1 &&
        rfq_free >= ($clog2(RFQ_DEPTH)+2)'(ser_cnt) + ($clog2(RFQ_DEPTH)+2)'(RESULT_BEATS))
      out_rd_en[pick] = 1'b1;
  end

  always_comb begin
    rfq_wr_en   = 1'b0;
    rfq_wr_data = ser_buf[RESULT_W-1 -: BUS_W];
    if (col_pend) begin
      rfq_wr_en   = 1'b1;
      rfq_wr_data = popped[RESULT_W-1 -: BUS_W];
    end else if (ser_cnt != 0) begin
      rfq_wr_en   = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr   <= '0;
      col_pend <= 1'b0;
      pend_k   <= '0;
      ser_cnt  <= '0;
    end else begin
      col_pend <= |out_rd_en;
      if (|out_rd_en) begin
        pend_k <= pick;
        rr_ptr <= pick + 2'd1;
      end
      if (col_pend)          ser_cnt <= 2'(RESULT_BEATS - 1);
      else if (ser_cnt != 0) ser_cnt <= ser_cnt - 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (col_pend)          ser_buf <= popped << BUS_W;
    else if (ser_cnt != 0) ser_buf <= ser_buf << BUS_W;
  end

  a_no_write_full_rfq: assert property (@(posedge clk) disable iff (!rst_n)
    rfq_wr_en |-> (rfq_count < ($clog2(RFQ_DEPTH)+1)'(RFQ_DEPTH)));

endmodule

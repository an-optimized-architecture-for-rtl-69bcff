// tb_cga_controller: the controller with real FIFOs around it (instruction
// and result FIFOs of 16 words, pipeline FIFOs of 4 entries) and four
// stand-in pipelines of latencies 1, 2, 3 and 5 that return the instruction's
// id, their own pipeline number as tag1, the opcode as tag2 and the first
// eight coefficients. Checks that every instruction goes to the pipeline
// selected by its two opcode MSBs, that its 512-bit word is assembled from
// four 128-bit words MSB first, that each result comes back once as three
// words with the right fields, that the credit scheme never overfills an
// output FIFO (assertion in the FIFO), and that dispatch stalls happen while
// the results are not read.
module tb_cga_controller;
  import cga_pkg::*;
  import tb_fp_pkg::*;

  localparam int PD = 4, RD = 16, ID = 16;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // instruction FIFO
  logic ifq_wr = 0, ifq_full, ifq_empty, ifq_rd_en;
  logic [127:0] ifq_wdata = '0, ifq_rd_data;
  logic [$clog2(ID):0] ifq_count;
  sync_fifo #(.WIDTH(128), .DEPTH(ID)) u_ifq (.clk, .rst_n, .wr_en(ifq_wr), .wr_data(ifq_wdata),
    .full(ifq_full), .rd_en(ifq_rd_en), .rd_data(ifq_rd_data), .empty(ifq_empty), .count(ifq_count));

  // result FIFO
  logic rfq_wr_en, rfq_full, rfq_empty, rfq_rd = 0;
  logic [127:0] rfq_wr_data, rfq_rd_data;
  logic [$clog2(RD):0] rfq_count;
  sync_fifo #(.WIDTH(128), .DEPTH(RD)) u_rfq (.clk, .rst_n, .wr_en(rfq_wr_en), .wr_data(rfq_wr_data),
    .full(rfq_full), .rd_en(rfq_rd), .rd_data(rfq_rd_data), .empty(rfq_empty), .count(rfq_count));

  logic [3:0] in_wr_en, in_full, in_empty, in_rd_en, issue_valid;
  instr_t in_wr_data;
  instr_t in_rd_data [4];
  logic [3:0] unit_valid, out_full, out_empty, out_rd_en;
  result_t unit_res [4];
  result_t out_rd_data [4];
  logic [$clog2(PD):0] in_count [4], out_count [4];
  logic dispatch_stall;

  for (genvar k = 0; k < 4; k++) begin : g_pipe
    localparam int L = (k == 3) ? 5 : k + 1;
    logic [L-1:0] v_sr;
    result_t r_sr [L];
    sync_fifo #(.WIDTH($bits(instr_t)), .DEPTH(PD)) u_in (.clk, .rst_n, .wr_en(in_wr_en[k]),
      .wr_data(in_wr_data), .full(in_full[k]), .rd_en(in_rd_en[k]), .rd_data(in_rd_data[k]),
      .empty(in_empty[k]), .count(in_count[k]));
    sync_fifo #(.WIDTH($bits(result_t)), .DEPTH(PD)) u_out (.clk, .rst_n, .wr_en(unit_valid[k]),
      .wr_data(unit_res[k]), .full(out_full[k]), .rd_en(out_rd_en[k]), .rd_data(out_rd_data[k]),
      .empty(out_empty[k]), .count(out_count[k]));
    // stand-in pipeline of latency L
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_sr <= '0;
      else begin
        result_t r;
        r.id = in_rd_data[k].id;
        r.tag1 = 3'(k);
        r.tag2 = 3'(in_rd_data[k].op);
        for (int i = 0; i < 8; i++) r.c[i] = in_rd_data[k].c[i];
        v_sr <= {v_sr, issue_valid[k]};
        r_sr[0] <= r;
        for (int i = 1; i < L; i++) r_sr[i] <= r_sr[i-1];
      end
    end
    assign unit_valid[k] = v_sr[L-1];
    assign unit_res[k]   = r_sr[L-1];
  end

  cga_controller #(.PIPE_DEPTH(PD), .RFQ_DEPTH(RD)) dut (
    .clk, .rst_n, .ifq_empty, .ifq_rd_en, .ifq_rd_data,
    .in_wr_en, .in_wr_data, .in_full, .in_empty, .in_rd_en, .issue_valid,
    .unit_out_valid(unit_valid), .out_count, .out_empty, .out_rd_en, .out_rd_data,
    .rfq_count, .rfq_wr_en, .rfq_wr_data, .dispatch_stall);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int op; logic [31:0] c[8]; int tag2; } exp_t;
  exp_t expected [int];
  logic [127:0] wq[$];
  bit read_on = 1;
  int n_stall = 0, n_results = 0;

  always @(posedge clk) if (dispatch_stall) n_stall++;

  // writer
  always @(negedge clk) begin
    ifq_wr <= 0;
    if (rst_n && wq.size() != 0 && !ifq_full) begin
      ifq_wr <= 1;
      ifq_wdata <= wq.pop_front();
    end
  end

  // reader
  bit rd_pend = 0;
  int beat = 0;
  logic [383:0] rbuf;
  always @(negedge clk) rfq_rd <= rst_n && read_on && !rfq_empty && !(rfq_rd && rfq_count == 1);
  always @(posedge clk) begin
    if (rd_pend) begin
      rbuf = {rbuf[255:0], rfq_rd_data};
      if (++beat == 3) begin
        int id;
        exp_t e;
        beat = 0;
        n_results++;
        id = int'(rbuf[379:358]);
        checks++;
        if (!expected.exists(id)) begin
          failures++;
          $display("FAIL unknown id %0d", id);
        end else begin
          e = expected[id];
          expected.delete(id);
          checks++;
          if (rbuf[383:380] != 0 || int'(rbuf[357:355]) != (e.op >> 2) || int'(rbuf[354:352]) != (e.op & 7)) begin
            failures++;
            $display("FAIL id %0d pipeline %0d op %0d", id, rbuf[357:355], e.op);
          end
          for (int k = 0; k < 8; k++) begin
            checks++;
            if (rbuf[351 - 32*k -: 32] != e.c[k]) begin
              failures++;
              $display("FAIL id %0d c%0d", id, k);
            end
          end
        end
      end
    end
    rd_pend <= rfq_rd;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      logic [511:0] w;
      exp_t e;
      e.op = $urandom % 16;
      w = {22'(n), 3'($urandom), 3'($urandom), 4'(e.op), 480'd0};
      for (int k = 0; k < 15; k++) w[479 - 32*k -: 32] = $urandom;
      for (int k = 0; k < 8; k++) e.c[k] = w[479 - 32*k -: 32];
      expected[n] = e;
      for (int b = 0; b < 4; b++) wq.push_back(w[511 - 128*b -: 128]);
      if (n == 300) begin
        // stop reading for a while so that the queues fill up
        read_on = 0;
        repeat (400) @(posedge clk);
        read_on = 1;
      end
    end
    for (int t = 0; t < 100000 && expected.size() != 0; t++) @(posedge clk);
    checks++;
    if (expected.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expected.size());
    end
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL no dispatch stall seen");
    end
    $display("results %0d, dispatch stall clocks %0d", n_results, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

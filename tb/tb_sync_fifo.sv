// tb_sync_fifo: pushes and pops random words against a queue model, with
// random simultaneous reads and writes, fills the FIFO to full and drains it
// to empty, and checks data order, full, empty and count.
module tb_sync_fifo;
  localparam int W = 40, D = 16;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  logic [W-1:0] expect_q[$];
  logic         rd_pending = 0;
  int           saw_full = 0, saw_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare read data one cycle after the read request
  always @(posedge clk) begin
    if (rd_pending) begin
      checks++;
      if (rd_data !== expect_q[0]) begin
        failures++;
        $display("FAIL data %h expected %h", rd_data, expect_q[0]);
      end
      void'(expect_q.pop_front());
    end
  end

  initial begin
    logic w, r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // state check against the model
      checks++;
      if (count != model.size() || full != (model.size() == D) || empty != (model.size() == 0)) begin
        failures++;
        $display("FAIL state count=%0d model=%0d full=%b empty=%b", count, model.size(), full, empty);
      end
      if (full) saw_full++;
      if (empty) saw_empty++;
      // phases: fill-biased, drain-biased, mixed
      case ((i / 300) % 3)
        0: begin w = ($urandom % 4) != 0; r = ($urandom % 4) == 0; end
        1: begin w = ($urandom % 4) == 0; r = ($urandom % 4) != 0; end
        default: begin w = 1'($urandom); r = 1'($urandom); end
      endcase
      w = w && !full;
      r = r && !empty;
      wr_en = w; rd_en = r;
      wr_data = {8'($urandom), 32'($urandom)};
      @(posedge clk);
      rd_pending <= r;
      if (r) expect_q.push_back(model.pop_front());
      if (w) model.push_back(wr_data);
    end
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    @(posedge clk);
    rd_pending <= 0;
    @(posedge clk);
    checks++;
    if (saw_full == 0 || saw_empty == 0) begin
      failures++;
      $display("FAIL full seen %0d empty seen %0d", saw_full, saw_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

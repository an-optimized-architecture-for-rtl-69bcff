// tb_sums_unit: one random sum or difference per clock over all tag pairs.
// Equal types must give the rounded coefficient-wise sum or difference in
// one quadruple; different types must give both quadruples, the second one
// negated for a difference. Checks tags, ids and the latency of two clocks.
module tb_sums_unit;
  import cga_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 2;
  localparam int N   = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  instr_t in;
  result_t out;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_same = 0, n_diff_types = 0;

  typedef struct {
    logic [31:0] c[8];
    int tag1, tag2, id, t_in;
  } exp_t;
  exp_t exp_q[$];

  sums_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (out.id != e.id || out.tag1 != 3'(e.tag1) || out.tag2 != 3'(e.tag2) || cycle - e.t_in != LAT) begin
        failures++;
        $display("FAIL id %0d tags %0d %0d latency %0d", out.id, out.tag1, out.tag2, cycle - e.t_in);
      end
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (out.c[k] !== e.c[k]) begin
          failures++;
          $display("FAIL id %0d c%0d %h expected %h", e.id, k, out.c[k], e.c[k]);
        end
      end
    end
  end

  initial begin
    exp_t e;
    int t1, t2;
    bit d;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      t1 = $urandom % 8;
      t2 = ($urandom % 2) ? t1 : $urandom % 8;
      d  = 1'($urandom);
      in.id = 22'(n);
      in.op = d ? OP_DIFF : OP_SUM;
      in.tag1 = 3'(t1);
      in.tag2 = 3'(t2);
      for (int k = 0; k < 15; k++) in.c[k] = rand_f32(-10, 10);
      for (int k = 0; k < 4; k++) begin
        if (t1 == t2) begin
          e.c[k]     = r2f(d ? f2r(in.c[k]) - f2r(in.c[k+4]) : f2r(in.c[k]) + f2r(in.c[k+4]));
          e.c[k + 4] = 32'h0;
        end else begin
          e.c[k]     = in.c[k];
          e.c[k + 4] = r2f(d ? -f2r(in.c[k+4]) : f2r(in.c[k+4]));
        end
      end
      if (t1 == t2) n_same++; else n_diff_types++;
      e.tag1 = t1; e.tag2 = t2; e.id = n; e.t_in = cycle;
      exp_q.push_back(e);
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_same == 0 || n_diff_types == 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

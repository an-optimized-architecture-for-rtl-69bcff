// tb_products_unit: drives one random product per clock (all four product
// opcodes, all 64 tag pairs), and compares every result with the reference
// product of the expanded multivectors. Also checks that the product
// touches no blade outside the result quadruple, that the result tag is
// tag1 ^ tag2, and that every result appears exactly 3 clocks after its
// operands.
module tb_products_unit;
  import cga_pkg::*;
  import tb_fp_pkg::*;
  import tb_ga_pkg::*;

  localparam int LAT = 3;
  localparam int N   = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  instr_t in;
  result_t out;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    real   c[4];
    int    tag;
    int    id;
    int    t_in;
  } exp_t;
  exp_t exp_q[$];

  products_unit dut (.*);

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
      if (out.id != e.id || out.tag1 != 3'(e.tag) || cycle - e.t_in != LAT) begin
        failures++;
        $display("FAIL id %0d/%0d tag %0d/%0d latency %0d", out.id, e.id, out.tag1, e.tag, cycle - e.t_in);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (!close(f2r(out.c[k]), e.c[k], 1e-5, 5e-4)) begin
          failures++;
          $display("FAIL id %0d c%0d %g expected %g", e.id, k, f2r(out.c[k]), e.c[k]);
        end
      end
    end
  end

  initial begin
    mv_t x, y, r;
    exp_t e;
    int op, t1, t2, tr;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      op = n % 4;
      t1 = (n / 4) % 8;
      t2 = (n / 32) % 8;
      in.id   = 22'(n);
      in.op   = opcode_e'(op);
      in.tag1 = 3'(t1);
      in.tag2 = 3'(t2);
      foreach (x[i]) begin x[i] = 0.0; y[i] = 0.0; end
      for (int k = 0; k < 15; k++) in.c[k] = rand_f32(-4, 4);
      for (int k = 0; k < 4; k++) begin
        if ($urandom % 5 == 0) in.c[k] = 32'h0;
        x[qblade(t1, k)] = f2r(in.c[k]);
        y[qblade(t2, k)] = f2r(in.c[4 + k]);
      end
      r = mv_prod(x, y, op);
      tr = t1 ^ t2;
      for (int k = 0; k < 4; k++) e.c[k] = r[qblade(tr, k)];
      // nothing may fall outside the result quadruple
      for (int b = 0; b < 32; b++) begin
        bit in_q;
        in_q = 0;
        for (int k = 0; k < 4; k++) if (qblade(tr, k) == b) in_q = 1;
        if (!in_q && r[b] != 0.0) begin
          failures++;
          $display("FAIL reference leaves the quadruple");
        end
      end
      e.tag = tr; e.id = n; e.t_in = cycle;
      exp_q.push_back(e);
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

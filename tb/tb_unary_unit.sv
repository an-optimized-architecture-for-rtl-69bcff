// tb_unary_unit: one random unary operation per clock over all quadruple
// types. The reference expands the quadruple to a full multivector, applies
// the grade signs (reverse, conjugate, involution) or multiplies by I^-1 =
// -e12345 (dual) with the reference product, and reads the result back.
// Results are exact (only signs move), so they are compared bit for bit.
module tb_unary_unit;
  import cga_pkg::*;
  import tb_fp_pkg::*;
  import tb_ga_pkg::*;

  localparam int LAT = 1;
  localparam int N   = 1000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  instr_t in;
  result_t out;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    logic [31:0] c[4];
    int tag, id, t_in;
  } exp_t;
  exp_t exp_q[$];

  unary_unit dut (.*);

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
      if (out.id != e.id || out.tag1 != 3'(e.tag) || out.tag2 != 3'(e.tag) || cycle - e.t_in != LAT) begin
        failures++;
        $display("FAIL id %0d tag %0d expected %0d latency %0d", out.id, out.tag1, e.tag, cycle - e.t_in);
      end
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (out.c[k] !== (k < 4 ? e.c[k] : 32'h0)) begin
          failures++;
          $display("FAIL id %0d c%0d %h expected %h", e.id, k, out.c[k], k < 4 ? e.c[k] : 32'h0);
        end
      end
    end
  end

  initial begin
    exp_t e;
    mv_t x, r, iinv;
    int t, op, g, tr;
    in = '0;
    foreach (iinv[i]) iinv[i] = 0.0;
    iinv[31] = -1.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      t  = n % 8;
      op = (n / 8) % 4;
      in.id = 22'(n);
      in.op = opcode_e'(4'b1000 | op);
      in.tag1 = 3'(t);
      in.tag2 = 3'($urandom);
      for (int k = 0; k < 15; k++) in.c[k] = rand_f32(-10, 10);
      foreach (x[i]) x[i] = 0.0;
      for (int k = 0; k < 4; k++) x[qblade(t, k)] = f2r(in.c[k]);
      if (op == 0) begin
        r = mv_prod(x, iinv, 0);
      end else begin
        foreach (r[b]) begin
          g = popc(b);
          r[b] = x[b];
          if (op == 1 && ((g * (g - 1) / 2) % 2 == 1)) r[b] = -x[b];
          if (op == 2 && ((g * (g + 1) / 2) % 2 == 1)) r[b] = -x[b];
          if (op == 3 && (g % 2 == 1)) r[b] = -x[b];
        end
      end
      // find the type that holds the result
      tr = -1;
      for (int tt = 0; tt < 8; tt++)
        for (int k = 0; k < 4; k++) if (r[qblade(tt, k)] != 0.0) tr = tt;
      for (int k = 0; k < 4; k++) e.c[k] = r2f(r[qblade(tr, k)]);
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

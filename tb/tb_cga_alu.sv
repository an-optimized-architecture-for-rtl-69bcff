// tb_cga_alu: drives the three CGA ALU pipelines at the same time, one
// random operation per pipeline per clock, and checks each pipeline's
// results against the reference multivector algebra: products (tolerance
// for rounding), sums/differences and unary operations (bit exact). Also
// checks the latencies 3, 2 and 1 and that the pipelines do not disturb
// each other.
module tb_cga_alu;
  import cga_pkg::*;
  import tb_fp_pkg::*;
  import tb_ga_pkg::*;

  localparam int N = 1500;

  logic clk = 0, rst_n = 0;
  logic prod_valid = 0, sum_valid = 0, un_valid = 0;
  logic prod_out_valid, sum_out_valid, un_out_valid;
  instr_t prod_in, sum_in, un_in;
  result_t prod_out, sum_out, un_out;
  int checks = 0, failures = 0;
  int cycle = 0;

  cga_alu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real c[8]; int tag1, tag2, id, t_in; bit exact; } exp_t;
  exp_t q [3][$];
  localparam int LAT [3] = '{3, 2, 1};

  function automatic exp_t model(instr_t in);
    exp_t e;
    mv_t x, y, r, iinv;
    int op, t1, t2, tr, g;
    op = int'(in.op); t1 = int'(in.tag1); t2 = int'(in.tag2);
    foreach (x[i]) begin x[i] = 0.0; y[i] = 0.0; iinv[i] = 0.0; end
    iinv[31] = -1.0;
    for (int k = 0; k < 4; k++) begin
      x[qblade(t1, k)] = f2r(in.c[k]);
      y[qblade(t2, k)] = f2r(in.c[4 + k]);
    end
    foreach (e.c[k]) e.c[k] = 0.0;
    e.exact = 1;
    if (op < 4) begin
      r = mv_prod(x, y, op);
      tr = t1 ^ t2; e.tag1 = tr; e.tag2 = tr; e.exact = 0;
      for (int k = 0; k < 4; k++) e.c[k] = r[qblade(tr, k)];
    end else if (op < 8) begin
      e.tag1 = t1; e.tag2 = t2;
      for (int k = 0; k < 4; k++)
        if (t1 == t2) e.c[k] = f2r(r2f(op == 5 ? f2r(in.c[k]) - f2r(in.c[k+4]) : f2r(in.c[k]) + f2r(in.c[k+4])));
        else begin e.c[k] = f2r(in.c[k]); e.c[k+4] = (op == 5 ? -1.0 : 1.0) * f2r(in.c[k+4]); end
    end else begin
      if (op == 8) r = mv_prod(x, iinv, 0);
      else foreach (r[b]) begin
        g = popc(b);
        r[b] = x[b];
        if (op == 9  && ((g * (g - 1) / 2) % 2 == 1)) r[b] = -x[b];
        if (op == 10 && ((g * (g + 1) / 2) % 2 == 1)) r[b] = -x[b];
        if (op == 11 && (g % 2 == 1)) r[b] = -x[b];
      end
      tr = (op == 8) ? (t1 ^ 4) : t1;
      e.tag1 = tr; e.tag2 = tr;
      for (int k = 0; k < 4; k++) e.c[k] = r[qblade(tr, k)];
    end
    e.id = int'(in.id);
    return e;
  endfunction

  task automatic compare(int u, result_t r);
    exp_t e;
    e = q[u].pop_front();
    checks++;
    if (int'(r.id) != e.id || int'(r.tag1) != e.tag1 || int'(r.tag2) != e.tag2 || cycle - e.t_in != LAT[u]) begin
      failures++;
      $display("FAIL pipe %0d id %0d/%0d tags %0d %0d latency %0d", u, r.id, e.id, r.tag1, r.tag2, cycle - e.t_in);
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (e.exact ? f2r(r.c[k]) != e.c[k] : !close(f2r(r.c[k]), e.c[k], 1e-5, 5e-4)) begin
        failures++;
        $display("FAIL pipe %0d id %0d c%0d %g expected %g", u, e.id, k, f2r(r.c[k]), e.c[k]);
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (prod_out_valid) compare(0, prod_out);
      if (sum_out_valid)  compare(1, sum_out);
      if (un_out_valid)   compare(2, un_out);
    end
  end

  function automatic instr_t rand_instr(int op, int id);
    instr_t in;
    in.id = 22'(id);
    in.op = opcode_e'(op);
    in.tag1 = 3'($urandom);
    in.tag2 = (op inside {4, 5} && ($urandom % 2)) ? in.tag1 : 3'($urandom);
    for (int k = 0; k < 15; k++) in.c[k] = rand_f32(-4, 4);
    return in;
  endfunction

  initial begin
    exp_t e;
    prod_in = '0; sum_in = '0; un_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      prod_in = rand_instr($urandom % 4, 3 * n);
      sum_in  = rand_instr(4 + $urandom % 2, 3 * n + 1);
      un_in   = rand_instr(8 + $urandom % 4, 3 * n + 2);
      e = model(prod_in); e.t_in = cycle; q[0].push_back(e);
      e = model(sum_in);  e.t_in = cycle; q[1].push_back(e);
      e = model(un_in);   e.t_in = cycle; q[2].push_back(e);
      prod_valid = 1; sum_valid = (n % 3 != 2); un_valid = (n % 5 != 4);
      if (!sum_valid) void'(q[1].pop_back());
      if (!un_valid)  void'(q[2].pop_back());
    end
    @(negedge clk);
    prod_valid = 0; sum_valid = 0; un_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (q[0].size() + q[1].size() + q[2].size() != 0) begin
      failures++;
      $display("FAIL results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cga_coprocessor: end-to-end test of the coprocessor at its default
// sizes (128 x 16384 instruction and result FIFOs, 512-entry pipeline FIFOs).
//
// Instructions are written as 128-bit words into the instruction FIFO and
// results read from the result FIFO, exactly as a host would. Every result
// is matched by its id with a reference computed in the testbench (full
// multivector products, grade signs, double-precision reflections).
// Phases:
//   A  mixed random instructions of all 14 opcodes, results read at once:
//      every pipeline used, several pipelines busy at once, results
//      returned out of order;
//   B  a burst of unary instructions: the stream must be consumed at one
//      128-bit word per clock (four clocks per instruction);
//   C  results not read while sums are sent until the result FIFO, the
//      output and input FIFOs and finally the instruction FIFO are full:
//      dispatch stalls and a full instruction FIFO must occur; then
//      everything is drained and checked.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_cga_coprocessor;
  import cga_pkg::*;
  import tb_fp_pkg::*;
  import tb_ga_pkg::*;

  logic clk = 0, rst_n = 0;
  logic instr_wr_en = 0, instr_full;
  logic [127:0] instr_wr_data = '0;
  logic result_rd_en = 0, result_empty;
  logic [127:0] result_rd_data;
  logic dispatch_stall;
  logic [3:0] pipe_start;

  cga_coprocessor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- model
  typedef struct {
    int  tag1, tag2;
    real c[8];
    bit  exact;
  } exp_t;
  exp_t expected [int];

  function automatic void refl(ref real v[5], input real m[5]);
    real vd, md, f;
    vd = 0.0; md = 0.0;
    for (int i = 0; i < 5; i++) begin
      vd += (i == 4 ? -1.0 : 1.0) * v[i] * m[i];
      md += (i == 4 ? -1.0 : 1.0) * m[i] * m[i];
    end
    f = 2.0 * vd / md;
    for (int i = 0; i < 5; i++) v[i] = v[i] - f * m[i];
  endfunction

  // builds an instruction and its expected result
  function automatic logic [511:0] make_instr(int op, int id, ref exp_t e);
    logic [511:0] w;
    logic [31:0] c[15];
    int t1, t2, tr, g;
    mv_t x, y, r, iinv;
    t1 = $urandom % 8;
    t2 = (op inside {4, 5} && ($urandom % 2)) ? t1 : $urandom % 8;
    for (int k = 0; k < 15; k++) c[k] = rand_f32(-3, 3);
    if (op >= 12) begin
      c[9] = rand_f32(-8, -6);
      c[14] = rand_f32(-8, -6);
    end
    w = {22'(id), 3'(t1), 3'(t2), 4'(op), 480'd0};
    for (int k = 0; k < 15; k++) w[479 - 32*k -: 32] = c[k];
    foreach (x[i]) begin x[i] = 0.0; y[i] = 0.0; iinv[i] = 0.0; end
    iinv[31] = -1.0;
    for (int k = 0; k < 4; k++) begin
      x[qblade(t1, k)] = f2r(c[k]);
      y[qblade(t2, k)] = f2r(c[4 + k]);
    end
    foreach (e.c[k]) e.c[k] = 0.0;
    e.exact = 1;
    case (op >> 2)
      0: begin
        r = mv_prod(x, y, op);
        tr = t1 ^ t2;
        e.tag1 = tr; e.tag2 = tr; e.exact = 0;
        for (int k = 0; k < 4; k++) e.c[k] = r[qblade(tr, k)];
      end
      1: begin
        e.tag1 = t1; e.tag2 = t2;
        for (int k = 0; k < 4; k++) begin
          if (t1 == t2) begin
            e.c[k] = f2r(r2f(op == 5 ? f2r(c[k]) - f2r(c[k+4]) : f2r(c[k]) + f2r(c[k+4])));
          end else begin
            e.c[k] = f2r(c[k]);
            e.c[k+4] = (op == 5) ? -f2r(c[k+4]) : f2r(c[k+4]);
          end
        end
      end
      2: begin
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
      default: begin
        real v[5];
        for (int i = 0; i < 5; i++) v[i] = f2r(c[i]);
        refl(v, '{f2r(c[5]), f2r(c[6]), f2r(c[7]), f2r(c[8]), f2r(c[9])});
        if (op != 12) refl(v, '{f2r(c[10]), f2r(c[11]), f2r(c[12]), f2r(c[13]), f2r(c[14])});
        e.tag1 = 0; e.tag2 = 0; e.exact = 0;
        for (int i = 0; i < 5; i++) e.c[i] = v[i];
      end
    endcase
    return w;
  endfunction

  // -------------------------------------------------------------- writer
  logic [127:0] wq[$];
  bit  write_on = 1;
  int  n_instr_full = 0;
  int  next_id = 0;

  task automatic queue_instr(int op);
    exp_t e;
    logic [511:0] w;
    w = make_instr(op, next_id, e);
    expected[next_id] = e;
    next_id++;
    for (int b = 0; b < 4; b++) wq.push_back(w[511 - 128*b -: 128]);
  endtask

  always @(negedge clk) begin
    instr_wr_en <= 0;
    if (rst_n && write_on && wq.size() != 0) begin
      if (instr_full) n_instr_full++;
      else begin
        instr_wr_en   <= 1;
        instr_wr_data <= wq.pop_front();
      end
    end
  end

  // -------------------------------------------------------------- reader
  bit  read_on = 1;
  bit  rd_pend = 0;
  int  beat = 0;
  logic [383:0] rbuf;
  int  n_results = 0, n_out_of_order = 0, max_id = -1;

  always @(negedge clk) begin
    result_rd_en <= rst_n && read_on && !result_empty && !(result_rd_en && dut.u_result_fifo.count == 1);
  end

  task automatic check_result(logic [383:0] w);
    int id;
    exp_t e;
    real mag;
    id = int'(w[379:358]);
    n_results++;
    if (id < max_id) n_out_of_order++;
    if (id > max_id) max_id = id;
    checks++;
    if (w[383:380] != 0 || !expected.exists(id)) begin
      failures++;
      $display("FAIL unexpected result id %0d", id);
      return;
    end
    e = expected[id];
    expected.delete(id);
    checks++;
    if (int'(w[357:355]) != e.tag1 || int'(w[354:352]) != e.tag2 || w[95:0] != 0) begin
      failures++;
      $display("FAIL id %0d tags %0d %0d expected %0d %0d", id, w[357:355], w[354:352], e.tag1, e.tag2);
    end
    mag = 0.0;
    foreach (e.c[k]) if ((e.c[k] < 0 ? -e.c[k] : e.c[k]) > mag) mag = (e.c[k] < 0 ? -e.c[k] : e.c[k]);
    for (int k = 0; k < 8; k++) begin
      real got;
      got = f2r(w[351 - 32*k -: 32]);
      checks++;
      if (e.exact ? (got != e.c[k]) : !close(got, e.c[k], 1e-4, 1e-4 * mag + 1e-6)) begin
        failures++;
        $display("FAIL id %0d c%0d %g expected %g", id, k, got, e.c[k]);
      end
    end
  endtask

  always @(posedge clk) begin
    if (rd_pend) begin
      rbuf = {rbuf[255:0], result_rd_data};
      beat++;
      if (beat == 3) begin
        beat = 0;
        check_result(rbuf);
      end
    end
    rd_pend <= result_rd_en;
  end

  // ---------------------------------------------------- event counters
  int n_stall = 0, n_parallel = 0;
  int n_start [4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    if (rst_n) begin
      if (dispatch_stall) n_stall++;
      // operations in flight in two or more pipelines at once
      if ((dut.u_ctrl.inflight[0] != 0) + (dut.u_ctrl.inflight[1] != 0) +
          (dut.u_ctrl.inflight[2] != 0) + (dut.u_ctrl.inflight[3] != 0) >= 2) n_parallel++;
      for (int k = 0; k < 4; k++) if (pipe_start[k]) n_start[k]++;
    end
  end

  task automatic wait_drained(int limit);
    int t;
    t = 0;
    while ((expected.size() != 0 || wq.size() != 0) && t < limit) begin
      @(posedge clk);
      t++;
    end
  endtask

  task automatic expect_event(string name, int count);
    checks++;
    $display("event %-28s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL event '%s' never happened", name);
    end
  endtask

  localparam int N_MIXED = 400;
  localparam int N_BURST = 200;
  localparam int N_FILL  = 16384 / 3 + 2 * 512 + 16384 / 4 + 64;

  initial begin
    longint t0, t1;
    int ops[14] = '{0, 1, 2, 3, 4, 5, 8, 9, 10, 11, 12, 13, 14, 15};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // phase A: mixed
    for (int i = 0; i < N_MIXED; i++) queue_instr(ops[$urandom % 14]);
    wait_drained(100000);

    // phase B: throughput of the instruction stream
    for (int i = 0; i < N_BURST; i++) queue_instr(9);
    t0 = cycle;
    wait_drained(100000);
    t1 = cycle;
    checks++;
    $display("burst of %0d instructions took %0d clocks", N_BURST, t1 - t0);
    if (t1 - t0 > 4 * N_BURST + 40) begin
      failures++;
      $display("FAIL stream slower than one 128-bit word per clock");
    end

    // phase C: back-pressure all the way to the instruction FIFO
    read_on = 0;
    for (int i = 0; i < N_FILL; i++) queue_instr(4 + (i % 2));
    t0 = cycle;
    while (n_instr_full == 0 && cycle - t0 < 200000) @(posedge clk);
    repeat (20) @(posedge clk);
    read_on = 1;
    wait_drained(400000);

    checks++;
    if (expected.size() != 0) begin
      failures++;
      $display("FAIL %0d results never arrived", expected.size());
    end
    $display("results %0d", n_results);
    expect_event("products pipeline start", n_start[0]);
    expect_event("sums pipeline start", n_start[1]);
    expect_event("unary pipeline start", n_start[2]);
    expect_event("motor pipeline start", n_start[3]);
    expect_event("pipelines busy in parallel", n_parallel);
    expect_event("out-of-order result", n_out_of_order);
    expect_event("dispatch stall", n_stall);
    expect_event("instruction FIFO full", n_instr_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

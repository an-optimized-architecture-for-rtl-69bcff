// tb_cga_workloads: runs the operations of the published evaluation through
// the whole coprocessor at its default sizes, the way the host library uses
// it: on whole homogeneous multivectors, not on single quadruples.
//
// A host model in this testbench splits each operand (scalar S, vector V,
// bivector BV, trivector TV, pseudovector PV, random coefficients) into its
// non-zero quadruples. It sends one instruction per pair of quadruples to the
// 128-bit instruction port, reads the results back by id and adds the
// partial quadruples up in double precision. The sum is compared with the
// full 32-coefficient reference product from tb_ga_pkg. Covered:
//   - every product, sum and difference row of the basic-operation table;
//   - the operand pairs of the grasping and inverse-kinematics profiles,
//     and the dual of BV, TV and PV;
//   - reflection, translation, rotation and dilation of a conformal point on
//     the motor unit, checked against the Euclidean geometry;
//   - a rotation done both ways: as the sandwich R X ~R of geometric products
//     on the CGA ALU (two rounds of quadruple products, the intermediate
//     rounded to single precision by the host) and as one motor-unit
//     instruction. Both must agree with the rotated point.
// The testbench prints the hardware clocks each operation took, from the
// first word written to the last result read. These clocks exclude the host
// software time that the published cycle counts include, so they are only
// reported, not compared. Each operation is one batch: the next starts when
// all its results are back.
module tb_cga_workloads;
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

  // ------------------------------------------------------ host interface
  logic [127:0] wq[$];
  logic [383:0] results [int];
  int next_id = 0;

  always @(negedge clk) begin
    instr_wr_en <= 0;
    if (rst_n && wq.size() != 0 && !instr_full) begin
      instr_wr_en   <= 1;
      instr_wr_data <= wq.pop_front();
    end
  end

  always @(negedge clk)
    result_rd_en <= rst_n && !result_empty && !(result_rd_en && dut.u_result_fifo.count == 1);

  logic rd_pend = 0;
  int beat = 0;
  logic [383:0] rbuf;
  always @(posedge clk) begin
    if (rd_pend) begin
      rbuf = {rbuf[255:0], result_rd_data};
      beat++;
      if (beat == 3) begin
        beat = 0;
        results[int'(rbuf[379:358])] = rbuf;
      end
    end
    rd_pend <= result_rd_en;
  end

  // queues one instruction, returns its id
  function automatic int send(int op, int t1, int t2, logic [31:0] c[15]);
    logic [511:0] w;
    int id;
    id = next_id++;
    w = {22'(id), 3'(t1), 3'(t2), 4'(op), 480'd0};
    for (int k = 0; k < 15; k++) w[479 - 32*k -: 32] = c[k];
    for (int b = 0; b < 4; b++) wq.push_back(w[511 - 128*b -: 128]);
    return id;
  endfunction

  // waits until every id in the list has a result
  task automatic collect(int ids[$]);
    longint t0;
    bit done;
    t0 = cycle;
    do begin
      @(posedge clk);
      done = 1;
      foreach (ids[i]) if (!results.exists(ids[i])) done = 0;
    end while (!done && cycle - t0 < 200000);
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL results missing");
    end
  endtask

  function automatic real coef(logic [383:0] r, int k);
    return f2r(r[351 - 32*k -: 32]);
  endfunction

  // ------------------------------------------------------ multivectors
  function automatic mv_t mv_zero();
    mv_t m;
    foreach (m[i]) m[i] = 0.0;
    return m;
  endfunction

  // random homogeneous multivector of grade g, single-precision values
  function automatic mv_t mv_rand(int g);
    mv_t m;
    m = mv_zero();
    for (int b = 0; b < 32; b++) if (popc(b) == g) m[b] = f2r(rand_f32(-3, 1));
    return m;
  endfunction

  function automatic bit quad_used(mv_t m, int t);
    for (int k = 0; k < 4; k++) if (m[qblade(t, k)] != 0.0) return 1;
    return 0;
  endfunction

  // Runs a binary basic operation (0000..0101) on two multivectors through
  // the coprocessor; returns the assembled result and the clocks taken.
  task automatic run_binary(int op, mv_t x, mv_t y, output mv_t r, output longint clocks);
    int ids[$];
    logic [31:0] c[15];
    longint t0;
    t0 = cycle;
    for (int ta = 0; ta < 8; ta++)
      for (int tb = 0; tb < 8; tb++) begin
        bit use_pair;
        if (op >= 4) use_pair = (ta == tb) && (quad_used(x, ta) || quad_used(y, ta));
        else         use_pair = quad_used(x, ta) && quad_used(y, tb);
        if (!use_pair) continue;
        foreach (c[i]) c[i] = 32'd0;
        for (int k = 0; k < 4; k++) begin
          c[k]     = r2f(x[qblade(ta, k)]);
          c[4 + k] = r2f(y[qblade(tb, k)]);
        end
        ids.push_back(send(op, ta, tb, c));
      end
    collect(ids);
    clocks = cycle - t0;
    r = mv_zero();
    foreach (ids[i]) begin
      logic [383:0] w;
      int t;
      w = results[ids[i]];
      results.delete(ids[i]);
      t = int'(w[357:355]);
      for (int k = 0; k < 4; k++) r[qblade(t, k)] += coef(w, k);
    end
  endtask

  task automatic run_dual(mv_t x, output mv_t r, output longint clocks);
    int ids[$];
    logic [31:0] c[15];
    longint t0;
    t0 = cycle;
    for (int t = 0; t < 8; t++) begin
      if (!quad_used(x, t)) continue;
      foreach (c[i]) c[i] = 32'd0;
      for (int k = 0; k < 4; k++) c[k] = r2f(x[qblade(t, k)]);
      ids.push_back(send(8, t, 0, c));
    end
    collect(ids);
    clocks = cycle - t0;
    r = mv_zero();
    foreach (ids[i]) begin
      logic [383:0] w;
      int t;
      w = results[ids[i]];
      results.delete(ids[i]);
      t = int'(w[357:355]);
      for (int k = 0; k < 4; k++) r[qblade(t, k)] += coef(w, k);
    end
  endtask

  function automatic real mv_mag(mv_t m);
    real a;
    a = 0.0;
    foreach (m[i]) if ((m[i] < 0 ? -m[i] : m[i]) > a) a = (m[i] < 0 ? -m[i] : m[i]);
    return a;
  endfunction

  function automatic void compare_mv(string name, mv_t got, mv_t ref_mv);
    real mag;
    int bad;
    mag = mv_mag(ref_mv);
    bad = 0;
    foreach (ref_mv[b]) begin
      checks++;
      if (!close(got[b], ref_mv[b], 1e-4, 1e-5 * mag + 1e-6)) begin
        failures++;
        bad++;
        if (bad <= 3) $display("FAIL %s blade %0d: %g expected %g", name, b, got[b], ref_mv[b]);
      end
    end
  endfunction

  // ------------------------------------------------------ conformal points
  typedef real vec3_t [3];

  function automatic mv_t point(vec3_t p);
    mv_t m;
    real q;
    m = mv_zero();
    q = p[0]*p[0] + p[1]*p[1] + p[2]*p[2];
    m[5'b00001] = p[0];
    m[5'b00010] = p[1];
    m[5'b00100] = p[2];
    m[5'b01000] = 0.5 * q - 0.5;  // e4 = e+
    m[5'b10000] = 0.5 * q + 0.5;  // e5 = e-
    return m;
  endfunction

  // Euclidean point of a conformal vector of any weight
  function automatic vec3_t euclid(real v[5]);
    vec3_t p;
    real w;
    w = v[4] - v[3];
    for (int i = 0; i < 3; i++) p[i] = v[i] / w;
    return p;
  endfunction

  function automatic void compare_point(string name, vec3_t got, vec3_t want);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (!close(got[i], want[i], 1e-4, 1e-4)) begin
        failures++;
        $display("FAIL %s axis %0d: %g expected %g", name, i, got[i], want[i]);
      end
    end
  endfunction

  // one motor-unit instruction: point p, mirrors m1 and m2
  task automatic run_motor(int op, vec3_t p, real m1[5], real m2[5], output vec3_t q, output longint clocks);
    int ids[$];
    logic [31:0] c[15];
    mv_t x;
    real y[5];
    longint t0;
    x = point(p);
    c[0] = r2f(x[1]); c[1] = r2f(x[2]); c[2] = r2f(x[4]); c[3] = r2f(x[8]); c[4] = r2f(x[16]);
    for (int i = 0; i < 5; i++) begin
      c[5 + i]  = r2f(m1[i]);
      c[10 + i] = r2f(m2[i]);
    end
    t0 = cycle;
    ids.push_back(send(op, 0, 0, c));
    collect(ids);
    clocks = cycle - t0;
    for (int i = 0; i < 5; i++) y[i] = coef(results[ids[0]], i);
    results.delete(ids[0]);
    q = euclid(y);
  endtask

  function automatic vec3_t rand_p();
    vec3_t p;
    for (int i = 0; i < 3; i++) p[i] = ($urandom % 2001) / 500.0 - 2.0;
    return p;
  endfunction

  // ------------------------------------------------------ the runs
  localparam string GN [6] = '{"S", "V", "BV", "TV", "PV", "I"};
  localparam string ON [6] = '{"geometric product", "outer product", "left contraction",
                               "right contraction", "sum", "subtraction"};

  task automatic basic(int op, int ga, int gb);
    mv_t x, y, r, rf;
    longint clocks;
    x = mv_rand(ga);
    y = mv_rand(gb);
    run_binary(op, x, y, r, clocks);
    if (op < 4) rf = mv_prod(x, y, op);
    else foreach (rf[b]) rf[b] = (op == 4) ? x[b] + y[b] : x[b] - y[b];
    compare_mv($sformatf("%s %s-%s", ON[op], GN[ga], GN[gb]), r, rf);
    $display("%-18s %-2s %-2s %0d clocks", ON[op], GN[ga], GN[gb], clocks);
  endtask

  initial begin
    static int table7 [][3] = '{
      '{1, 0, 1}, '{1, 1, 1}, '{1, 1, 2}, '{1, 2, 2},
      '{2, 0, 1}, '{2, 1, 1}, '{2, 1, 2}, '{2, 2, 2}, '{2, 2, 3}, '{2, 3, 3}, '{2, 4, 4},
      '{3, 1, 1}, '{3, 2, 2},
      '{0, 0, 1}, '{0, 1, 1}, '{0, 1, 2}, '{0, 2, 2},
      '{4, 1, 1}, '{4, 2, 2}, '{5, 1, 1}, '{5, 2, 2}};
    // operand pairs of the grasping and inverse-kinematics profiles not
    // already in the list above
    static int apps [][3] = '{'{0, 2, 3}, '{1, 1, 3}};
    mv_t x, r, rf, iinv;
    longint clocks;
    vec3_t p, q, want;
    real n1[5], n2[5];

    repeat (3) @(posedge clk);
    rst_n = 1;

    foreach (table7[i]) basic(table7[i][0], table7[i][1], table7[i][2]);
    foreach (apps[i])   basic(apps[i][0], apps[i][1], apps[i][2]);

    iinv = mv_zero();
    iinv[31] = -1.0;
    for (int g = 2; g <= 4; g++) begin
      x = mv_rand(g);
      run_dual(x, r, clocks);
      rf = mv_prod(x, iinv, 0);
      compare_mv($sformatf("dual %s", GN[g]), r, rf);
      $display("%-18s %-5s %0d clocks", "dual", GN[g], clocks);
    end

    // rigid body motions of a point on the motor unit
    for (int rep = 0; rep < 4; rep++) begin
      real th, d, rad1, rad2, s;
      p = rand_p();

      // reflection in the plane x = 0
      n1 = '{1.0, 0.0, 0.0, 0.0, 0.0};
      run_motor(12, p, n1, n1, q, clocks);
      want = '{-p[0], p[1], p[2]};
      compare_point("reflection", q, want);
      if (rep == 0) $display("%-18s %-5s %0d clocks", "reflection", "V", clocks);

      // translation by 2d along z: planes z = 0 and z = d
      d = ($urandom % 1001) / 500.0 - 1.0;
      n1 = '{0.0, 0.0, 1.0, 0.0, 0.0};
      n2 = '{0.0, 0.0, 1.0, d, d};
      run_motor(14, p, n1, n2, q, clocks);
      want = '{p[0], p[1], p[2] + 2.0 * d};
      compare_point("translation", q, want);
      if (rep == 0) $display("%-18s %-5s %0d clocks", "translation", "V", clocks);

      // rotation by th about z: planes through z at angle th/2
      th = ($urandom % 6283) / 1000.0;
      n1 = '{1.0, 0.0, 0.0, 0.0, 0.0};
      n2 = '{$cos(th / 2.0), $sin(th / 2.0), 0.0, 0.0, 0.0};
      run_motor(13, p, n1, n2, q, clocks);
      want = '{p[0] * $cos(th) - p[1] * $sin(th), p[0] * $sin(th) + p[1] * $cos(th), p[2]};
      compare_point("rotation", q, want);
      if (rep == 0) $display("%-18s %-5s %0d clocks", "rotation", "V", clocks);

      // dilation by (rad2/rad1)^2 about the origin: two centred spheres
      rad1 = 1.0;
      rad2 = 1.0 + ($urandom % 1000) / 1000.0;
      n1 = '{0.0, 0.0, 0.0, -0.5 - 0.5 * rad1 * rad1, 0.5 - 0.5 * rad1 * rad1};
      n2 = '{0.0, 0.0, 0.0, -0.5 - 0.5 * rad2 * rad2, 0.5 - 0.5 * rad2 * rad2};
      run_motor(15, p, n1, n2, q, clocks);
      s = (rad2 * rad2) / (rad1 * rad1);
      want = '{p[0] * s, p[1] * s, p[2] * s};
      compare_point("dilation", q, want);
      if (rep == 0) $display("%-18s %-5s %0d clocks", "dilation", "V", clocks);
    end

    // the same rotation on the CGA ALU (sandwich product) and on the motor unit
    for (int rep = 0; rep < 4; rep++) begin
      mv_t rot, rrev, xp, t1, t2;
      longint c1, c2;
      real th, y5[5];
      th = ($urandom % 6283) / 1000.0;
      p = rand_p();
      rot = mv_zero();
      rot[0] = $cos(th / 2.0);
      rot[5'b00011] = -$sin(th / 2.0);
      rrev = rot;
      rrev[5'b00011] = -rot[5'b00011];
      foreach (rot[i]) begin
        rot[i]  = f2r(r2f(rot[i]));
        rrev[i] = f2r(r2f(rrev[i]));
      end
      xp = point(p);
      run_binary(0, rot, xp, t1, c1);
      foreach (t1[i]) t1[i] = f2r(r2f(t1[i]));
      run_binary(0, t1, rrev, t2, c2);
      for (int i = 0; i < 5; i++) y5[i] = t2[1 << i];
      q = euclid(y5);
      want = '{p[0] * $cos(th) - p[1] * $sin(th), p[0] * $sin(th) + p[1] * $cos(th), p[2]};
      compare_point("rotation on CGA ALU", q, want);
      // only grade 1 may remain
      foreach (t2[b]) if (popc(b) != 1) begin
        checks++;
        if (!close(t2[b], 0.0, 0.0, 1e-4)) begin
          failures++;
          $display("FAIL rotation on CGA ALU leaves blade %0d = %g", b, t2[b]);
        end
      end
      n1 = '{1.0, 0.0, 0.0, 0.0, 0.0};
      n2 = '{$cos(th / 2.0), $sin(th / 2.0), 0.0, 0.0, 0.0};
      run_motor(13, p, n1, n2, q, clocks);
      compare_point("rotation on motor unit", q, want);
      if (rep == 0)
        $display("rotation: CGA ALU %0d clocks, motor unit %0d clocks", c1 + c2, clocks);
    end

    checks++;
    if (results.size() != 0) begin
      failures++;
      $display("FAIL %0d unexpected results", results.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

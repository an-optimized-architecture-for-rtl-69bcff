// tb_motor_unit: random reflections, rotations, translations and dilations
// at one per clock, compared with two successive reflections computed in
// double precision (one for opcode 1100), with a 14-clock latency check.
// Then three geometric cases on conformal points: a translation by 2 along
// z (two parallel planes), a 90 degree rotation about z (two planes 45
// degrees apart) and a dilation by 4 (two spheres at the origin, radii 1
// and 2).
module tb_motor_unit;
  import cga_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 14;
  localparam int N   = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  instr_t in;
  result_t out;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { real y[5]; int id; int t_in; } exp_t;
  exp_t exp_q[$];
  result_t last [int];

  motor_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      real mag;
      e = exp_q.pop_front();
      last[e.id] = out;
      checks++;
      if (out.id != 22'(e.id) || cycle - e.t_in != LAT || out.tag1 != 0 || out.tag2 != 0) begin
        failures++;
        $display("FAIL id %0d/%0d latency %0d", out.id, e.id, cycle - e.t_in);
      end
      mag = 0.0;
      for (int i = 0; i < 5; i++) if ((e.y[i] < 0 ? -e.y[i] : e.y[i]) > mag) mag = (e.y[i] < 0 ? -e.y[i] : e.y[i]);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (i < 5 ? !close(f2r(out.c[i]), e.y[i], 1e-4, 1e-4 * mag) : out.c[i] != 0) begin
          failures++;
          $display("FAIL id %0d c%0d %g expected %g", e.id, i, f2r(out.c[i]), i < 5 ? e.y[i] : 0.0);
        end
      end
    end
  end

  task automatic send(opcode_e op, real v[5], real m1[5], real m2[5], int id);
    exp_t e;
    real w[5];
    in.id = 22'(id);
    in.op = op;
    in.tag1 = 3'($urandom);
    in.tag2 = 3'($urandom);
    for (int i = 0; i < 5; i++) begin
      in.c[i]      = r2f(v[i]);
      in.c[5 + i]  = r2f(m1[i]);
      in.c[10 + i] = r2f(m2[i]);
      w[i] = f2r(in.c[i]);
    end
    refl(w, '{f2r(in.c[5]), f2r(in.c[6]), f2r(in.c[7]), f2r(in.c[8]), f2r(in.c[9])});
    if (op != OP_REFLECT)
      refl(w, '{f2r(in.c[10]), f2r(in.c[11]), f2r(in.c[12]), f2r(in.c[13]), f2r(in.c[14])});
    e.y = w; e.id = id; e.t_in = cycle;
    exp_q.push_back(e);
    in_valid = 1;
  endtask

  // conformal point of (px, py, pz): x + x^2/2 e_inf + e0, e_inf = e4 + e5, e0 = (e5 - e4)/2
  function automatic void cpoint(output real v[5], input real px, real py, real pz);
    real h;
    h = 0.5 * (px * px + py * py + pz * pz);
    v = '{px, py, pz, h - 0.5, h + 0.5};
  endfunction

  // Euclidean part of a (weighted) conformal point: divide by the e0 weight e5 - e4
  task automatic check_point(result_t r, real ex, real ey, real ez, string what);
    real w;
    w = f2r(r.c[4]) - f2r(r.c[3]);
    checks++;
    if (!close(f2r(r.c[0]) / w, ex, 1e-4, 1e-4) || !close(f2r(r.c[1]) / w, ey, 1e-4, 1e-4) ||
        !close(f2r(r.c[2]) / w, ez, 1e-4, 1e-4)) begin
      failures++;
      $display("FAIL %s: (%g, %g, %g) expected (%g, %g, %g)", what, f2r(r.c[0]) / w,
               f2r(r.c[1]) / w, f2r(r.c[2]) / w, ex, ey, ez);
    end
  endtask

  initial begin
    real v[5], m1[5], m2[5];
    real s2;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        v[i]  = f2r(rand_f32(-3, 3));
        m1[i] = f2r(rand_f32(-3, 3));
        m2[i] = f2r(rand_f32(-3, 3));
      end
      m1[4] = f2r(rand_f32(-8, -6));
      m2[4] = f2r(rand_f32(-8, -6));
      send(opcode_e'(4'b1100 | (k % 4)), v, m1, m2, k);
    end
    s2 = 0.70710678118654752;
    @(negedge clk);  // translation by 2 along z: planes z = 0 and z = 1
    cpoint(v, 1.0, 2.0, 3.0);
    send(OP_TRANSL, v, '{0.0, 0.0, 1.0, 0.0, 0.0}, '{0.0, 0.0, 1.0, 1.0, 1.0}, 5000);
    @(negedge clk);  // rotation by 90 degrees about z
    cpoint(v, 1.0, 0.0, 5.0);
    send(OP_ROTATE, v, '{1.0, 0.0, 0.0, 0.0, 0.0}, '{s2, s2, 0.0, 0.0, 0.0}, 5001);
    @(negedge clk);  // dilation by 4: spheres of radius 1 and 2 about the origin
    cpoint(v, 1.0, 1.0, 0.0);
    send(OP_DILATE, v, '{0.0, 0.0, 0.0, -1.0, 0.0}, '{0.0, 0.0, 0.0, -2.5, -1.5}, 5002);
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    check_point(last[5000], 1.0, 2.0, 5.0, "translation");
    check_point(last[5001], 0.0, 1.0, 5.0, "rotation");
    check_point(last[5002], 4.0, 4.0, 0.0, "dilation");
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

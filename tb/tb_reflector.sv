// tb_reflector: one random reflection per clock, compared with
// x - 2 (x . n) / (n . n) n computed in double precision (metric
// + + + + -); also checks bypass, the side band and the 7-clock latency,
// and reflects a conformal point in the plane x = 1 to check the geometry.
module tb_reflector;
  import cga_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 7;
  localparam int N   = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid, bypass = 0;
  f32_t [4:0] x, n, y;
  logic [15:0] in_side = '0, out_side;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { real y[5]; int side; int t_in; } exp_t;
  exp_t exp_q[$];

  reflector #(.SIDE_W(16)) dut (.*);

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
      real mag;
      e = exp_q.pop_front();
      checks++;
      if (out_side != 16'(e.side) || cycle - e.t_in != LAT) begin
        failures++;
        $display("FAIL side %0d/%0d latency %0d", out_side, e.side, cycle - e.t_in);
      end
      mag = 0.0;
      for (int i = 0; i < 5; i++) if ((e.y[i] < 0 ? -e.y[i] : e.y[i]) > mag) mag = (e.y[i] < 0 ? -e.y[i] : e.y[i]);
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (!close(f2r(y[i]), e.y[i], 1e-5, 1e-4 * mag)) begin
          failures++;
          $display("FAIL side %0d y%0d %g expected %g", e.side, i, f2r(y[i]), e.y[i]);
        end
      end
    end
  end

  task automatic send(f32_t [4:0] tx, f32_t [4:0] tn, logic tb_byp, int side);
    exp_t e;
    real xd, nd, f;
    xd = 0.0; nd = 0.0;
    for (int i = 0; i < 5; i++) begin
      xd += (i == 4 ? -1.0 : 1.0) * f2r(tx[i]) * f2r(tn[i]);
      nd += (i == 4 ? -1.0 : 1.0) * f2r(tn[i]) * f2r(tn[i]);
    end
    f = 2.0 * xd / nd;
    for (int i = 0; i < 5; i++) e.y[i] = tb_byp ? f2r(tx[i]) : f2r(tx[i]) - f * f2r(tn[i]);
    e.side = side; e.t_in = cycle;
    exp_q.push_back(e);
    x = tx; n = tn; bypass = tb_byp; in_side = 16'(side); in_valid = 1;
  endtask

  initial begin
    f32_t [4:0] tx, tn;
    x = '0; n = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        tx[i] = rand_f32(-3, 3);
        tn[i] = rand_f32(-3, 3);
      end
      // keep n . n away from zero: make the e5 part small
      tn[4] = rand_f32(-8, -6);
      send(tx, tn, (k % 10) == 9, k);
    end
    // conformal point (2, 3, 4) reflected in the plane x = 1, i.e. n = e1 + e_inf,
    // e_inf = e4 + e5; the image is (0, 3, 4)
    @(negedge clk);
    tx = {r2f(15.0), r2f(14.0), r2f(4.0), r2f(3.0), r2f(2.0)};   // e5..e1
    tn = {r2f(1.0), r2f(1.0), 32'h0, 32'h0, r2f(1.0)};
    send(tx, tn, 1'b0, 9999);
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    // y must be the point (0,3,4) with some weight w: e1 = 0, e2 = 3w, e3 = 4w, e5 - e4 = w
    begin
      real w;
      w = f2r(y[4]) - f2r(y[3]);
      if (!close(f2r(y[0]), 0.0, 0, 1e-5) || !close(f2r(y[1]) / w, 3.0, 1e-6, 0) ||
          !close(f2r(y[2]) / w, 4.0, 1e-6, 0)) begin
        failures++;
        $display("FAIL plane reflection gives %g %g %g weight %g", f2r(y[0]), f2r(y[1]), f2r(y[2]), w);
      end
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

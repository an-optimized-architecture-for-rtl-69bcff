// tb_fp_mul: checks fp_mul against double-precision products rounded to
// single precision, plus zero, infinity, NaN and overflow cases.
module tb_fp_mul;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] exp);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL fp_mul %h * %h = %h, expected %h", ta, tb_, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ra, rb;
    for (int i = 0; i < 4000; i++) begin
      ra = rand_f32(-30, 30);
      rb = rand_f32(-30, 30);
      check(ra, rb, r2f(f2r(ra) * f2r(rb)));
    end
    check(32'h3f800000, 32'hc0400000, 32'hc0400000);
    check(32'h00000000, 32'hc0400000, 32'h80000000);
    check(32'h7f800000, 32'h00000000, 32'h7fc00000);
    check(32'h7f800000, 32'hbf800000, 32'hff800000);
    check(32'h7f000000, 32'h7f000000, 32'h7f800000);
    check(32'h00800000, 32'h00800000, 32'h00000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

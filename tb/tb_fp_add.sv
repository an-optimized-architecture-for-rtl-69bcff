// tb_fp_add: checks fp_add against double-precision arithmetic rounded to
// single precision, for random operands (close and far exponents, addition
// and subtraction, exact cancellation) and for zero, infinity and NaN.
module tb_fp_add;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic ts, logic [31:0] exp);
    a = ta; b = tb_; sub = ts;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL fp_add %h %s %h = %h, expected %h", ta, ts ? "-" : "+", tb_, y, exp);
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
    logic        rs;
    for (int i = 0; i < 4000; i++) begin
      ra = rand_f32(-20, 20);
      rb = (i % 4 == 0) ? {ra[31:12], 12'($urandom)} : rand_f32(-20, 20);
      rs = 1'($urandom);
      check(ra, rb, rs, r2f(rs ? f2r(ra) - f2r(rb) : f2r(ra) + f2r(rb)));
    end
    // exact cancellation, zeros, infinities, NaN
    check(32'h3fc00000, 32'h3fc00000, 1'b1, 32'h00000000);
    check(32'h00000000, 32'h80000000, 1'b0, 32'h00000000);
    check(32'h80000000, 32'h80000000, 1'b0, 32'h80000000);
    check(32'h00000000, 32'hc0400000, 1'b1, 32'h40400000);
    check(32'h7f800000, 32'h3f800000, 1'b0, 32'h7f800000);
    check(32'h7f800000, 32'h7f800000, 1'b1, 32'h7fc00000);
    check(32'h7fc00001, 32'h3f800000, 1'b0, 32'h7fc00000);
    check(32'h7f7fffff, 32'h7f7fffff, 1'b0, 32'h7f800000);
    // 1 + 2^-24 ties to even, 1 + 3 * 2^-25 rounds up
    check(32'h3f800000, 32'h33800000, 1'b0, 32'h3f800000);
    check(32'h3f800000, 32'h33c00000, 1'b0, 32'h3f800001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

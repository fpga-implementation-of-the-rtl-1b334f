// tb_fp_mul: checks fp_mul against the exact double-precision product rounded to
// single, for random operands, plus zero, infinity, overflow and underflow cases.
module tb_fp_mul;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [31:0] exp_y;
    a = ta; b = tb_;
    #1;
    if (ta[30:23] == 8'd0 || tb_[30:23] == 8'd0) exp_y = {ta[31] ^ tb_[31], 31'd0};
    else exp_y = r2f(f2r(ta) * f2r(tb_));
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("fp_mul mismatch %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) check(rand_f(30), rand_f(30));
    check(32'h3f800000, 32'h40490fdb);
    check(32'h00000000, 32'h40490fdb);
    check(32'h7f000000, 32'h7f000000);  // overflow to infinity
    check(32'h01000000, 32'h01000000);  // underflow to zero
    check(32'h42c80000, 32'h3f7d70a4);  // 100 * 0.99
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_add: checks fp_add against a reference sum computed in double precision
// and rounded to single, for random operands (near and far exponents, both
// signs, add and subtract), cancellation cases and the zero/infinity cases.
module tb_fp_add;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic ts);
    logic [31:0] exp_y;
    real r;
    a = ta; b = tb_; sub = ts;
    #1;
    r = ts ? f2r(ta) - f2r(tb_) : f2r(ta) + f2r(tb_);
    exp_y = r2f(r);
    if (r == 0.0) exp_y = 32'h0;
    if (ta[30:23] == 8'd0 && tb_[30:23] == 8'd0) exp_y = y; // sign of zero not checked
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("fp_add mismatch %h %s %h = %h, expected %h", ta, ts ? "-" : "+", tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) check(rand_f(20), rand_f(20), 1'($urandom));
    for (int i = 0; i < 2000; i++) check(rand_f(2), rand_f(2), 1'($urandom));
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] x;
      x = rand_f(10);
      check(x, {x[31:1], 1'($urandom)} ^ 32'h0000_0001, 1'b1); // heavy cancellation
      check(x, x + 32'd1, 1'b1);
    end
    check(32'h3f800000, 32'h3f800000, 1'b1);  // 1 - 1 = 0
    check(32'h00000000, 32'h40490fdb, 1'b0);  // 0 + pi
    check(32'h40490fdb, 32'h00000000, 1'b1);  // pi - 0
    check(32'h3f800000, 32'h33800000, 1'b0);  // 1 + 2^-24 (tie to even)
    check(32'h3f800001, 32'h33800000, 1'b0);  // tie rounds up to even
    a = 32'h7f800000; b = 32'h3f800000; sub = 1'b0; #1;
    checks++; if (y !== 32'h7f800000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

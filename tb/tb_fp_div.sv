// tb_fp_div: checks fp_div against the double-precision quotient rounded to
// single, for random operands and special cases, and checks that every division
// takes the documented 28 cycles (2 for zero or infinity operands) from start to done.
module tb_fp_div;
  import tb_fp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [31:0] a = '0, b = '0, q;
  int checks = 0, failures = 0;

  fp_div dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .busy(busy), .done(done), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] expq, input int lat = 28);
    int cyc;
    @(negedge clk);
    a = ta; b = tb_; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (q !== expq) begin
      failures++;
      if (failures < 10) $display("fp_div mismatch %h / %h = %h, expected %h", ta, tb_, q, expq);
    end
    checks++;
    if (cyc != lat) begin
      failures++;
      $display("fp_div latency %0d, expected %0d", cyc, lat);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x, y;
      x = rand_f(30); y = rand_f(30);
      check(x, y, r2f(f2r(x) / f2r(y)));
    end
    check(32'h3f800000, 32'h3d2c0831, r2f(1.0 / f2r(32'h3d2c0831)));  // 1/0.042
    check(32'h3dcccccd, 32'h460d9a00, r2f(f2r(32'h3dcccccd) / f2r(32'h460d9a00)));
    check(32'h3f800000, 32'h00000000, 32'h7f800000, 2);
    check(32'h00000000, 32'h3f800000, 32'h00000000, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_param_ident: checks the reset values of R0, R1 and C1 (0.026 ohm,
// 0.016 ohm, 145 s / 0.016 ohm), their bus reads and direct outputs, and that
// processor writes replace them one register at a time.
module tb_param_ident;
  import sopc_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mm_req_t req = MM_REQ_IDLE;
  mm_rsp_t rsp;
  logic [31:0] r0, r1, c1;
  int checks = 0, failures = 0;

  param_ident dut (.clk(clk), .rst_n(rst_n), .s_req(req), .s_rsp(rsp), .r0(r0), .r1(r1), .c1(c1));
  always #5 clk = ~clk;

  task automatic rd(input logic [5:0] r, output logic [31:0] d);
    @(negedge clk); req = '{addr: BASE_PARAM + {24'd0, r, 2'b00}, read: 1'b1, write: 1'b0, wdata: 0};
    #1 d = rsp.rdata;
    @(negedge clk); req = MM_REQ_IDLE;
  endtask
  task automatic wr(input logic [5:0] r, input logic [31:0] d);
    @(negedge clk); req = '{addr: BASE_PARAM + {24'd0, r, 2'b00}, read: 1'b0, write: 1'b1, wdata: d};
    @(negedge clk); req = MM_REQ_IDLE;
  endtask
  task automatic chk(input string what, input logic [31:0] got, input real exp);
    checks++;
    if (!near(got, r2f(exp), 1e-7, 0.0)) begin failures++; $display("%s = %g, expected %g", what, f2r(got), exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(PI_R0, d); chk("R0", d, 0.026);
    rd(PI_R1, d); chk("R1", d, 0.016);
    rd(PI_C1, d); chk("C1", d, 145.0 / 0.016);
    chk("r0 out", r0, 0.026); chk("r1 out", r1, 0.016); chk("c1 out", c1, 145.0 / 0.016);
    wr(PI_R1, r2f(0.02));
    rd(PI_R0, d); chk("R0 kept", d, 0.026);
    rd(PI_R1, d); chk("R1 new", d, 0.02);
    chk("r1 out new", r1, 0.02);
    wr(PI_C1, r2f(5000.0)); wr(PI_R0, r2f(0.03));
    rd(PI_C1, d); chk("C1 new", d, 5000.0);
    rd(PI_R0, d); chk("R0 new", d, 0.03);
    checks++; if (rsp.waitreq) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

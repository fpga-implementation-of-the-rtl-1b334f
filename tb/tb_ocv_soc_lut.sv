// tb_ocv_soc_lut: reads all 100 entries of the OCV-SoC ROM over the bus and
// compares each with the mean OCV curve recomputed here: linear interpolation,
// at SoC = (k + 0.5) %, between the breakpoints of the curve, rounded to 1 mV.
// Also checks the one wait state of every read, that a write leaves the ROM
// unchanged and that an address past entry 99 reads 0.
module tb_ocv_soc_lut;
  import sopc_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mm_req_t req = MM_REQ_IDLE;
  mm_rsp_t rsp;
  int checks = 0, failures = 0;

  ocv_soc_lut dut (.clk(clk), .rst_n(rst_n), .s_req(req), .s_rsp(rsp));
  always #5 clk = ~clk;

  // breakpoints of the mean OCV curve: SoC in %, OCV in V
  real bp_s [22] = '{0, 2, 5, 10, 15, 20, 25, 30, 35, 40, 45, 50, 55, 60, 65, 70, 75, 80, 85, 90, 95, 100};
  real bp_v [22] = '{3.00, 3.25, 3.45, 3.53, 3.58, 3.63, 3.68, 3.73, 3.75, 3.76, 3.77, 3.78,
                     3.80, 3.82, 3.85, 3.88, 3.92, 3.97, 4.01, 4.06, 4.12, 4.20};

  function automatic real ocv_ref(input int k);
    real x, v;
    x = k + 0.5;
    v = 0.0;
    for (int j = 0; j < 21; j++)
      if (x >= bp_s[j] && x <= bp_s[j + 1])
        v = bp_v[j] + (bp_v[j + 1] - bp_v[j]) * (x - bp_s[j]) / (bp_s[j + 1] - bp_s[j]);
    return real'($rtoi(v * 1000.0 + 0.5)) / 1000.0;
  endfunction

  task automatic rd(input int k, output logic [31:0] d, output int waits);
    @(negedge clk);
    req = '{addr: BASE_LUT + 32'(4 * k), read: 1'b1, write: 1'b0, wdata: 0};
    waits = 0;
    #1;
    while (rsp.waitreq) begin @(negedge clk); waits++; #1; end
    d = rsp.rdata;
    @(negedge clk);
    req = MM_REQ_IDLE;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int w;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 100; k++) begin
      rd(k, d, w);
      checks++;
      if (!near(d, r2f(ocv_ref(k)), 1e-6, 0.0)) begin
        failures++; $display("entry %0d: %f expected %f", k, f2r(d), ocv_ref(k));
      end
      checks++;
      if (w != 1) begin failures++; $display("entry %0d: %0d wait states", k, w); end
    end
    @(negedge clk);
    req = '{addr: BASE_LUT + 32'd40, read: 1'b0, write: 1'b1, wdata: 32'h1234_5678};
    @(negedge clk);
    req = MM_REQ_IDLE;
    rd(10, d, w);
    checks++; if (!near(d, r2f(ocv_ref(10)), 1e-6, 0.0)) failures++;
    rd(100, d, w);
    checks++; if (d !== 32'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

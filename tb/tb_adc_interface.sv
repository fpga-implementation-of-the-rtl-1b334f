// tb_adc_interface: drives adc_interface against the serial ADC model with a
// short sample period (CLK_HZ 10000, SAMPLE_HZ 10: 1000 cycles) and checks the
// sample period in cycles, the three frames per sample, the voltage and current
// codes read from the selected channels (default 0 and 1, then 5 and 2), the
// sample counter and the enable bit.
module tb_adc_interface;
  import sopc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mm_req_t req = MM_REQ_IDLE;
  mm_rsp_t rsp;
  logic cs_n, sclk, din, dout, sample_valid;
  logic [11:0] v_code, i_code;
  logic [11:0] code [8];
  int frames;
  int checks = 0, failures = 0;

  adc_interface #(.CLK_HZ(10000), .SAMPLE_HZ(10), .SCLK_HALF(2)) dut (
    .clk(clk), .rst_n(rst_n), .s_req(req), .s_rsp(rsp),
    .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_din(din), .adc_dout(dout),
    .sample_valid(sample_valid), .v_code(v_code), .i_code(i_code));

  adc_spi_model adc (.cs_n(cs_n), .sclk(sclk), .din(din), .dout(dout), .code(code), .frames(frames));

  always #5 clk = ~clk;

  task automatic bus_write(input logic [5:0] r, input logic [31:0] d);
    @(negedge clk); req = '{addr: BASE_ADC + {24'd0, r, 2'b00}, read: 1'b0, write: 1'b1, wdata: d};
    @(negedge clk); req = MM_REQ_IDLE;
  endtask
  task automatic bus_read(input logic [5:0] r, output logic [31:0] d);
    @(negedge clk); req = '{addr: BASE_ADC + {24'd0, r, 2'b00}, read: 1'b1, write: 1'b0, wdata: 0};
    #1 d = rsp.rdata;
    @(negedge clk); req = MM_REQ_IDLE;
  endtask
  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    longint t_prev, t_now;
    int f0;
    for (int c = 0; c < 8; c++) code[c] = 12'(100 * c + 7);
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    expect_eq("no sample while disabled", frames, 0);
    bus_write(AD_CTRL, 1);
    for (int s = 0; s < 6; s++) begin
      code[0] = 12'($urandom); code[1] = 12'($urandom);
      f0 = frames;
      @(posedge sample_valid);
      t_now = cyc;
      @(negedge clk);
      expect_eq("frames per sample", frames - f0, 3);
      expect_eq("v_code", v_code, code[0]);
      expect_eq("i_code", i_code, code[1]);
      bus_read(AD_VCODE, d); expect_eq("VCODE reg", d, code[0]);
      bus_read(AD_ICODE, d); expect_eq("ICODE reg", d, code[1]);
      if (s > 0) expect_eq("sample period", 32'(t_now - t_prev), 1000);
      t_prev = t_now;
    end
    bus_read(AD_COUNT, d); expect_eq("COUNT", d, 6);
    bus_write(AD_CHSEL, 32'h25);   // voltage on channel 5, current on channel 2
    @(posedge sample_valid); @(negedge clk);   // may be mid-acquisition: skip one
    @(posedge sample_valid); @(negedge clk);
    expect_eq("v_code ch5", v_code, code[5]);
    expect_eq("i_code ch2", i_code, code[2]);
    bus_read(AD_CHSEL, d); expect_eq("CHSEL", d, 32'h25);
    bus_write(AD_CTRL, 0);
    repeat (300) @(negedge clk);
    f0 = frames;
    repeat (3000) @(negedge clk);
    expect_eq("stopped when disabled", frames - f0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

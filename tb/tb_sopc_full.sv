// tb_sopc_full: the whole system at its default parameters (50 MHz clock,
// 10 Hz sampling, 115200 baud). The processor model enables sampling; the test
// then runs two complete sample periods. It checks that the first sample strobe comes
// 5,000,000 cycles after sampling is enabled plus the 1584-cycle acquisition
// of three ADC frames, and the next one 5,000,000 cycles later,
// that each estimation step matches a single-precision reference of the Mix
// algorithm, that the step ends within 400 cycles of the strobe, and that a
// byte sent over the UART at the default bit time (434 cycles) comes back
// through the looped-back receiver.
module tb_sopc_full;
  import sopc_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mm_req_t cpu_req = MM_REQ_IDLE, xmem_req;
  mm_rsp_t cpu_rsp, xmem_rsp;
  logic adc_cs_n, adc_sclk, adc_din, adc_dout, uart_line, soc_irq, soc_busy, bus_decode_err;
  logic [31:0] soc_value;
  logic [11:0] code [8];
  int frames;
  int checks = 0, failures = 0;

  sopc_top dut (
    .clk(clk), .rst_n(rst_n), .cpu_req(cpu_req), .cpu_rsp(cpu_rsp),
    .xmem_req(xmem_req), .xmem_rsp(xmem_rsp),
    .adc_cs_n(adc_cs_n), .adc_sclk(adc_sclk), .adc_din(adc_din), .adc_dout(adc_dout),
    .uart_tx(uart_line), .uart_rx(uart_line),
    .soc_irq(soc_irq), .soc_busy(soc_busy), .soc_value(soc_value), .bus_decode_err(bus_decode_err));

  adc_spi_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout), .code(code), .frames(frames));

  assign xmem_rsp = '{rdata: 32'd0, waitreq: 1'b0};

  always #10 clk = ~clk;   // 50 MHz

  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic cpu_wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); cpu_req = '{addr: a, read: 1'b0, write: 1'b1, wdata: d};
    #1; while (cpu_rsp.waitreq) begin @(negedge clk); #1; end
    @(negedge clk); cpu_req = MM_REQ_IDLE;
  endtask
  task automatic cpu_rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); cpu_req = '{addr: a, read: 1'b1, write: 1'b0, wdata: 0};
    #1; while (cpu_rsp.waitreq) begin @(negedge clk); #1; end
    d = cpu_rsp.rdata;
    @(negedge clk); cpu_req = MM_REQ_IDLE;
  endtask

  logic [31:0] lut [100];
  logic [31:0] r_soc = 32'h3f80_0000, r_vrc = 32'h0;

  task automatic ref_step();
    logic [31:0] vt, il, x100, vm, err, l, ieff, g1, krc;
    real xr;
    int idx;
    vt = fmul(r2f(real'(code[0])), 32'h3aa0_0000);
    il = fadd(fmul(r2f(real'(code[1])), 32'h3a80_0000), 32'hc000_0000);
    x100 = fmul(r_soc, 32'h42c8_0000);
    xr = f2r(x100);
    idx = (xr < 1.0) ? 0 : (xr >= 99.0) ? 99 : $rtoi(xr);
    vm  = fsub(fsub(lut[idx], fmul(r2f(0.026), il)), r_vrc);
    err = fsub(vt, vm);
    l   = fdiv(32'h3f80_0000, fadd(r2f(0.026), r2f(0.016)));
    ieff = fsub(il, fmul(l, err));
    g1  = fdiv(32'h3f80_0000, r2f(0.016));
    krc = fdiv(32'h3dcc_cccd, r2f(9062.5));
    r_vrc = fadd(r_vrc, fmul(krc, fsub(il, fmul(r_vrc, g1))));
    r_soc = fsub(r_soc, fmul(32'h379b_5837, ieff));
  endtask

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    longint t_en, t_sv, t_prev;
    for (int c = 0; c < 8; c++) code[c] = 12'd0;
    code[0] = 12'd3420;   // 4.175 V
    code[1] = 12'd3584;   // 1.5 A discharge
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 100; k++) cpu_rd(BASE_LUT + 32'(4 * k), lut[k]);
    cpu_wr(BASE_ADC + {24'd0, AD_CTRL, 2'b00}, 1);
    t_en = cyc;
    cpu_wr(BASE_UART + {24'd0, UA_TXDATA, 2'b00}, 32'h5a);
    t_prev = t_en;
    for (int s = 0; s < 2; s++) begin
      @(posedge dut.sample_valid);
      t_sv = cyc;
      checks++;
      if ((s == 0 && (t_sv - t_prev < 5_001_584 - 3 || t_sv - t_prev > 5_001_584 + 3)) ||
          (s == 1 && t_sv - t_prev != 5_000_000)) begin failures++; $display("sample %0d after %0d cycles", s, t_sv - t_prev); end
      t_prev = t_sv;
      @(posedge soc_irq);
      checks++;
      if (cyc - t_sv > 400) begin failures++; $display("step took %0d cycles", cyc - t_sv); end
      ref_step();
      @(negedge clk);
      checks++;
      if (!near(soc_value, r_soc, 1e-6, 1e-9)) begin failures++; $display("SoC %g expected %g", f2r(soc_value), f2r(r_soc)); end
      cpu_rd(BASE_SOCEST + {24'd0, SE_VRC, 2'b00}, d);
      checks++;
      if (!near(d, r_vrc, 1e-6, 1e-9)) begin failures++; $display("v_RC1 %g expected %g", f2r(d), f2r(r_vrc)); end
      if (s == 0) begin
        cpu_rd(BASE_UART + {24'd0, UA_STATUS, 2'b00}, d);
        checks++; if (!d[1]) failures++;
        cpu_rd(BASE_UART + {24'd0, UA_RXDATA, 2'b00}, d);
        checks++; if (d !== 32'h5a) begin failures++; $display("UART %h", d); end
      end
    end
    $display("SoC after two steps: %f", f2r(soc_value));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sopc_top: end-to-end test of the whole system. A behavioural cell (the
// same one-RC model, true OCV interpolated from the ROM table) is discharged by
// a pulsed current profile; its terminal voltage and current are quantised to
// 12-bit codes and served by the serial ADC model. The processor port is driven
// by a bus-functional model that configures the system, polls and logs results
// to an external-memory model and over the UART (looped back), and the UART
// receiver output is checked. Every estimation step is mirrored by a reference
// model rounding each operation to single precision. The system clock is
// scaled to CLK_HZ = 20 kHz so that one 10 Hz sample period is 2000 cycles.
// Mechanisms counted (each must occur): bus contention between the two
// masters, wait states from the ROM and the external memory, an unmapped
// access, the gain-mode switch, a parameter update, an overrun, the LUT index
// clamp, UART traffic and the current-offset register. The estimate starts at
// 100 % while the cell is at 92 %; over the last 500 steps the error must stay
// below 1.5 % of SoC, and under a third of the initial error. The sample
// strobe must come every 2000 cycles.
module tb_sopc_top;
  import sopc_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned CLK_HZ = 20_000;
  localparam int unsigned PERIOD = CLK_HZ / 10;
  localparam int N_STEPS = 8000;

  logic clk = 1'b0, rst_n = 1'b0;
  mm_req_t cpu_req = MM_REQ_IDLE, xmem_req;
  mm_rsp_t cpu_rsp, xmem_rsp;
  logic adc_cs_n, adc_sclk, adc_din, adc_dout, uart_line, soc_irq, soc_busy, bus_decode_err;
  logic [31:0] soc_value;
  logic [11:0] code [8];
  int frames;
  int checks = 0, failures = 0;

  sopc_top #(.CLK_HZ(CLK_HZ)) dut (
    .clk(clk), .rst_n(rst_n), .cpu_req(cpu_req), .cpu_rsp(cpu_rsp),
    .xmem_req(xmem_req), .xmem_rsp(xmem_rsp),
    .adc_cs_n(adc_cs_n), .adc_sclk(adc_sclk), .adc_din(adc_din), .adc_dout(adc_dout),
    .uart_tx(uart_line), .uart_rx(uart_line),
    .soc_irq(soc_irq), .soc_busy(soc_busy), .soc_value(soc_value), .bus_decode_err(bus_decode_err));

  adc_spi_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout), .code(code), .frames(frames));

  always #5 clk = ~clk;

  // ---------------- external memory model: 256 words, one wait state ----------------
  logic [31:0] xmem [256];
  logic xm_ack = 1'b0;
  assign xmem_rsp.waitreq = (xmem_req.read || xmem_req.write) && !xm_ack;
  assign xmem_rsp.rdata   = xmem[xmem_req.addr[9:2]];
  always @(posedge clk) begin
    xm_ack <= (xmem_req.read || xmem_req.write) && !xm_ack;
    if (xmem_req.write && xm_ack) xmem[xmem_req.addr[9:2]] <= xmem_req.wdata;
  end

  // ---------------- mechanism counters ----------------
  int n_contend = 0, n_wait = 0, n_decode = 0, n_auto = 0, n_manual = 0, n_param = 0;
  int n_overrun = 0, n_clamp = 0, n_uart = 0, n_offset = 0;
  always @(posedge clk) begin
    if ((dut.m_req[0].read || dut.m_req[0].write) && (dut.m_req[1].read || dut.m_req[1].write)) n_contend++;
    if (dut.s_req[SL_LUT].read && dut.s_rsp[SL_LUT].waitreq) n_wait++;
    if (bus_decode_err) n_decode++;
  end

  // ---------------- processor bus-functional model ----------------
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
  function automatic logic [31:0] se(input logic [5:0] r); return BASE_SOCEST + {24'd0, r, 2'b00}; endfunction

  // ---------------- behavioural cell ----------------
  real lut_r [100];
  real c_soc = 0.92, c_vrc = 0.0, c_i = 0.0;
  real C_R0 = 0.026, C_R1 = 0.016, C_C1 = 9062.5, C_CN = 5400.0, TS = 0.1;

  function automatic real ocv_true(input real s);
    real x;
    int k;
    x = s * 100.0 - 0.5;
    if (x <= 0.0) return lut_r[0];
    if (x >= 99.0) return lut_r[99];
    k = $rtoi(x);
    return lut_r[k] + (lut_r[k + 1] - lut_r[k]) * (x - k);
  endfunction

  task automatic cell_codes();
    real v;
    v = ocv_true(c_soc) - C_R0 * c_i - c_vrc;
    code[0] = 12'($rtoi(v / (5.0 / 4096.0) + 0.5));
    code[1] = 12'($rtoi(c_i / (2.0 / 2048.0) + 2048.0 + 0.5));
  endtask

  task automatic cell_advance();
    c_vrc = c_vrc + TS * (c_i / C_C1 - c_vrc / (C_R1 * C_C1));
    c_soc = c_soc - TS * c_i / C_CN;
  endtask

  // ---------------- reference of the estimator ----------------
  logic [31:0] lut [100];
  logic [31:0] p_r0, p_r1, p_c1;
  logic [31:0] r_soc, r_vrc, r_vm, r_vt, r_il, r_l;
  logic r_auto = 1'b1;
  logic [31:0] r_lreg = 32'h41be_79e8, r_vsc = 32'h3aa0_0000, r_voff = 32'h0, r_isc = 32'h3a80_0000;
  logic [31:0] r_ioff = 32'hc000_0000, r_k = 32'h379b_5837, r_ts = 32'h3dcc_cccd;
  int r_count = 0;

  task automatic ref_step();
    logic [31:0] x100, err, ieff, g1, krc;
    real xr;
    int idx;
    r_vt = fadd(fmul(r2f(real'(code[0])), r_vsc), r_voff);
    r_il = fadd(fmul(r2f(real'(code[1])), r_isc), r_ioff);
    x100 = fmul(r_soc, 32'h42c8_0000);
    xr = f2r(x100);
    idx = (xr < 1.0) ? 0 : (xr >= 99.0) ? 99 : $rtoi(xr);
    if (xr >= 100.0) n_clamp++;
    r_vm = fsub(fsub(lut[idx], fmul(p_r0, r_il)), r_vrc);
    err  = fsub(r_vt, r_vm);
    r_l  = r_auto ? fdiv(32'h3f80_0000, fadd(p_r0, p_r1)) : r_lreg;
    ieff = fsub(r_il, fmul(r_l, err));
    g1   = fdiv(32'h3f80_0000, p_r1);
    krc  = fdiv(r_ts, p_c1);
    r_vrc = fadd(r_vrc, fmul(krc, fsub(r_il, fmul(r_vrc, g1))));
    r_soc = fsub(r_soc, fmul(r_k, ieff));
    r_count++;
    if (r_auto) n_auto++; else n_manual++;
  endtask

  task automatic cmpf(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (!near(got, exp, 1e-6, 1e-9)) begin
      failures++;
      if (failures < 20) $display("%s: %g expected %g", what, f2r(got), f2r(exp));
    end
  endtask

  // UART receive monitor: count bytes the CPU reads back
  logic [7:0] uart_sent [$];

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;
  int irq_count = 0, handled = 0, n_periods = 0;
  longint t_sv = 0;
  always @(posedge clk) if (soc_irq) irq_count++;
  always @(posedge clk) if (rst_n && dut.sample_valid) begin
    if (t_sv != 0) begin
      checks++; n_periods++;
      if (cyc - t_sv != PERIOD) begin failures++; $display("sample period %0d", cyc - t_sv); end
    end
    t_sv = cyc;
  end

  initial begin
    logic [31:0] d;
    real err0, err_end, max_err_late;
    code[2] = 0; code[3] = 0; code[4] = 0; code[5] = 0; code[6] = 0; code[7] = 0;
    code[0] = 12'd3440; code[1] = 12'd2048;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // configuration by the processor: read back the OCV table and the parameters
    for (int k = 0; k < 100; k++) begin
      cpu_rd(BASE_LUT + 32'(4 * k), lut[k]);
      lut_r[k] = f2r(lut[k]);
    end
    checks++; if (lut_r[0] < 2.9 || lut_r[0] > 3.2 || lut_r[99] < 4.1 || lut_r[99] > 4.25) failures++;
    cpu_rd(BASE_PARAM + 0, p_r0); cpu_rd(BASE_PARAM + 4, p_r1); cpu_rd(BASE_PARAM + 8, p_c1);
    cmpf("R0", p_r0, r2f(0.026));
    cpu_rd(32'h0000_0f00, d);                       // unmapped
    checks++; if (d !== 0) failures++;
    r_soc = 32'h3f80_0000; r_vrc = 0;
    c_i = 0.0; cell_codes();
    cpu_wr(BASE_UART + {24'd0, UA_BAUD, 2'b00}, 8);
    cpu_wr(BASE_ADC + {24'd0, AD_CTRL, 2'b00}, 1);

    err0 = 1.0 - c_soc;
    max_err_late = 0.0;
    for (int s = 0; s < N_STEPS; s++) begin
      if (s % 50 == 20) begin
        // poll the status register while the step runs: both masters compete
        @(posedge dut.sample_valid);
        while (irq_count == handled) cpu_rd(se(SE_STATUS), d);
      end else wait (irq_count > handled);
      handled++;
      ref_step();
      @(negedge clk);
      cmpf("soc_value", soc_value, r_soc);
      // software step issued just before a sample: the sample is dropped (overrun)
      if (s == 1200) begin
        repeat (PERIOD - 200) @(negedge clk);
        cpu_wr(se(SE_CTRL), 32'h0000_000b);
        wait (irq_count > handled);
        handled++;
        ref_step();
        @(negedge clk);
        cpu_rd(se(SE_STATUS), d);
        checks++; if (!d[1]) begin failures++; $display("no overrun"); end else n_overrun++;
        cpu_wr(se(SE_STATUS), 2);
        cmpf("after overrun", soc_value, r_soc);
      end
      // the cell moves on by one sample period, with a new current
      cell_advance();
      c_i = ((s % 200) < 120) ? 1.5 : (((s % 200) < 150) ? -0.5 : 0.0);
      cell_codes();
      // processor activity: poll, log to external memory, send over the UART
      if (s % 50 == 7) begin
        cpu_rd(se(SE_SOC), d); cmpf("SE_SOC", d, r_soc);
        cpu_rd(se(SE_VT), d);  cmpf("SE_VT", d, r_vt);
        cpu_rd(se(SE_IL), d);  cmpf("SE_IL", d, r_il);
        cpu_rd(se(SE_VM), d);  cmpf("SE_VM", d, r_vm);
        cpu_wr(BASE_XMEM + 32'(4 * ((s / 50) % 256)), r_soc);
        cpu_rd(BASE_XMEM + 32'(4 * ((s / 50) % 256)), d); cmpf("xmem log", d, r_soc);
        cpu_rd(BASE_UART + {24'd0, UA_STATUS, 2'b00}, d);
        if (!d[0]) begin
          cpu_wr(BASE_UART + {24'd0, UA_TXDATA, 2'b00}, {24'd0, r_soc[31:24]});
          uart_sent.push_back(r_soc[31:24]);
        end
      end
      if (s % 50 == 40) begin
        cpu_rd(BASE_UART + {24'd0, UA_STATUS, 2'b00}, d);
        if (d[1]) begin
          cpu_rd(BASE_UART + {24'd0, UA_RXDATA, 2'b00}, d);
          checks++;
          if (uart_sent.size() == 0 || d[7:0] !== uart_sent.pop_front()) begin
            failures++; $display("UART byte mismatch");
          end else n_uart++;
        end
      end
      // gain-mode switch to a register gain and back
      if (s == 400) begin r_auto = 1'b0; r_lreg = r2f(15.0); cpu_wr(se(SE_L_REG), r_lreg); cpu_wr(se(SE_CTRL), 1); end
      if (s == 700) begin r_auto = 1'b1; cpu_wr(se(SE_CTRL), 3); end
      // parameter update through the identification block
      if (s == 900) begin p_r1 = r2f(0.018); cpu_wr(BASE_PARAM + 4, p_r1); n_param++; end
      // a current-sensor offset entered as an offset register change and removed
      if (s == 1500) begin r_ioff = r2f(-1.9); cpu_wr(se(SE_I_OFFSET), r_ioff); n_offset++; end
      if (s == 1700) begin r_ioff = 32'hc000_0000; cpu_wr(se(SE_I_OFFSET), r_ioff); end
      if (s > N_STEPS - 500) begin
        real e;
        e = rabs(f2r(soc_value) - c_soc);
        if (e > max_err_late) max_err_late = e;
      end
    end
    err_end = rabs(f2r(soc_value) - c_soc);
    cpu_rd(se(SE_COUNT), d);
    checks++; if (d != 32'(r_count)) begin failures++; $display("count %0d vs %0d", d, r_count); end
    checks++;
    if (max_err_late > 0.015 || err_end > err0 / 3.0) begin failures++; $display("estimate did not converge: %f", max_err_late); end
    checks++;
    if (n_contend == 0 || n_wait == 0 || n_decode == 0 || n_auto == 0 || n_manual == 0 || n_param == 0 ||
        n_overrun == 0 || n_clamp == 0 || n_uart == 0 || n_offset == 0 || n_periods < N_STEPS - 10) begin
      failures++; $display("a mechanism did not occur");
    end
    $display("SoC error: start %f, end %f, max over last 500 steps %f (true SoC %f)", err0, err_end, max_err_late, c_soc);
    $display("contention %0d, ROM waits %0d, unmapped %0d, auto %0d, manual %0d, param %0d, overrun %0d, clamp %0d, uart %0d, offset %0d",
             n_contend, n_wait, n_decode, n_auto, n_manual, n_param, n_overrun, n_clamp, n_uart, n_offset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workload_offset: current-sensor offset test. Two copies of the whole
// system (clock scaled to 20 kHz, so one 10 Hz sample is 2000 cycles) watch the
// same behavioural cell. The first sees the true current. The second sees it
// through a current sensor that reads 100 mA high (102 ADC codes). The cell is
// discharged from full charge with a step-wise current profile that changes
// every 30 s (300 samples), between -0.5 A and 1.5 A, for 1500 s. A 300 s
// rest at zero current follows. Plain Coulomb counting with the same offset is
// computed alongside. The test passes when both Mix estimates stay within 2 %
// of the true SoC and within 1 % of each other, while Coulomb counting drifts
// by more than 2.5 %.
module tb_workload_offset;
  import sopc_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned CLK_HZ = 20_000;
  localparam int N_DRIVE = 15000;
  localparam int N_REST  = 3000;
  localparam int OFFSET_CODES = 102;

  logic clk = 1'b0, rst_n = 1'b0;
  mm_req_t cpu_req [2];
  mm_rsp_t cpu_rsp [2], xmem_rsp;
  mm_req_t xmem_req [2];
  logic cs_n [2], sclk [2], din [2], dout [2], tx [2], irq [2], busy [2], derr [2];
  logic [31:0] soc_value [2];
  logic [11:0] code [2][8];
  int frames [2];
  int checks = 0, failures = 0;

  assign xmem_rsp = '{rdata: 32'd0, waitreq: 1'b0};

  for (genvar u = 0; u < 2; u++) begin : g_sys
    sopc_top #(.CLK_HZ(CLK_HZ)) dut (
      .clk(clk), .rst_n(rst_n), .cpu_req(cpu_req[u]), .cpu_rsp(cpu_rsp[u]),
      .xmem_req(xmem_req[u]), .xmem_rsp(xmem_rsp),
      .adc_cs_n(cs_n[u]), .adc_sclk(sclk[u]), .adc_din(din[u]), .adc_dout(dout[u]),
      .uart_tx(tx[u]), .uart_rx(tx[u]),
      .soc_irq(irq[u]), .soc_busy(busy[u]), .soc_value(soc_value[u]), .bus_decode_err(derr[u]));
    adc_spi_model adc (.cs_n(cs_n[u]), .sclk(sclk[u]), .din(din[u]), .dout(dout[u]),
                       .code(code[u]), .frames(frames[u]));
  end

  always #5 clk = ~clk;

  task automatic cpu_wr(input int u, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); cpu_req[u] = '{addr: a, read: 1'b0, write: 1'b1, wdata: d};
    #1; while (cpu_rsp[u].waitreq) begin @(negedge clk); #1; end
    @(negedge clk); cpu_req[u] = MM_REQ_IDLE;
  endtask
  task automatic cpu_rd(input int u, input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); cpu_req[u] = '{addr: a, read: 1'b1, write: 1'b0, wdata: 0};
    #1; while (cpu_rsp[u].waitreq) begin @(negedge clk); #1; end
    d = cpu_rsp[u].rdata;
    @(negedge clk); cpu_req[u] = MM_REQ_IDLE;
  endtask

  // behavioural cell, true OCV interpolated from the ROM contents
  real lut_r [100];
  real c_soc = 1.0, c_vrc = 0.0, c_i = 0.0, cc_soc = 1.0;
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

  task automatic set_codes();
    real v;
    int ic;
    v = ocv_true(c_soc) - C_R0 * c_i - c_vrc;
    ic = $rtoi(c_i / (2.0 / 2048.0) + 2048.0 + 0.5);
    for (int u = 0; u < 2; u++) begin
      code[u][0] = 12'($rtoi(v / (5.0 / 4096.0) + 0.5));
      code[u][1] = 12'(ic + (u == 1 ? OFFSET_CODES : 0));
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    real e0, e1, d01, max_e0 = 0.0, max_e1 = 0.0, max_d01 = 0.0, i_off;
    i_off = OFFSET_CODES * (2.0 / 2048.0);
    for (int u = 0; u < 2; u++) begin
      cpu_req[u] = MM_REQ_IDLE;
      for (int c = 0; c < 8; c++) code[u][c] = 12'd0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 100; k++) begin cpu_rd(0, BASE_LUT + 32'(4 * k), d); lut_r[k] = f2r(d); end
    set_codes();
    cpu_wr(0, BASE_ADC, 1);
    cpu_wr(1, BASE_ADC, 1);
    for (int s = 0; s < N_DRIVE + N_REST; s++) begin
      @(posedge irq[1]);
      @(negedge clk);
      e0  = rabs(f2r(soc_value[0]) - c_soc);
      e1  = rabs(f2r(soc_value[1]) - c_soc);
      d01 = rabs(f2r(soc_value[0]) - f2r(soc_value[1]));
      if (e0 > max_e0) max_e0 = e0;
      if (e1 > max_e1) max_e1 = e1;
      if (d01 > max_d01) max_d01 = d01;
      // the cell and the offset Coulomb counter move on by one sample
      c_vrc  = c_vrc + TS * (c_i / C_C1 - c_vrc / (C_R1 * C_C1));
      c_soc  = c_soc - TS * c_i / C_CN;
      cc_soc = cc_soc - TS * (c_i + i_off) / C_CN;
      if (s < N_DRIVE) begin
        if (s % 300 == 0) c_i = -0.5 + 0.125 * $urandom_range(16, 0);
      end else c_i = 0.0;
      set_codes();
    end
    $display("true SoC %f; Mix %f, Mix with offset %f, Coulomb counting with offset %f",
             c_soc, f2r(soc_value[0]), f2r(soc_value[1]), cc_soc);
    $display("max |error|: Mix %f, Mix with offset %f; max difference %f", max_e0, max_e1, max_d01);
    checks++; if (max_e0 > 0.02) begin failures++; $display("Mix error too large"); end
    checks++; if (max_e1 > 0.02) begin failures++; $display("Mix error with offset too large"); end
    checks++; if (max_d01 > 0.01) begin failures++; $display("offset not rejected"); end
    checks++; if (rabs(cc_soc - c_soc) < 0.025) begin failures++; $display("Coulomb counting did not drift"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_soc_estimation: runs soc_estimation alone against bus slaves modelled here
// (ADC codes, R0/R1/C1, an OCV table of 3.0 V + 12 mV per entry), each read
// stalled by a random number of wait states. A reference model recomputes every
// step of the Mix algorithm with each operation rounded to single precision
// and the results (SoC, v_M, v_T, i_L, v_RC1, gain, LUT index, step count) are
// compared after each step. It covers: the L = 1/(R0+R1) mode and the register
// gain mode, parameter changes, re-initialisation, the software step, the
// run-enable bit, the overrun flag, the LUT index clamps at 0 and 99, and the
// step latency (must end well inside the 5,000,000-cycle sample period).
module tb_soc_estimation;
  import sopc_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 1'b0;
  mm_req_t s_req = MM_REQ_IDLE, m_req;
  mm_rsp_t s_rsp, m_rsp;
  logic done, busy;
  logic [31:0] soc_out;
  int checks = 0, failures = 0;
  int n_auto = 0, n_manual = 0, n_clamp_hi = 0, n_clamp_lo = 0, n_overrun = 0;

  soc_estimation dut (.clk(clk), .rst_n(rst_n), .sample_valid(sample_valid),
    .s_req(s_req), .s_rsp(s_rsp), .m_req(m_req), .m_rsp(m_rsp),
    .done(done), .busy(busy), .soc_out(soc_out));
  always #5 clk = ~clk;

  // ---------------- bus slaves seen by the estimator ----------------
  logic [11:0] vcode = 12'd3400, icode = 12'd2048;
  logic [31:0] p_r0, p_r1, p_c1;
  logic [31:0] lut [100];
  int stall = 0;

  always_comb begin
    m_rsp.waitreq = (m_req.read || m_req.write) && stall > 0;
    m_rsp.rdata   = 32'hdead_beef;
    if (m_req.addr == BASE_ADC + 32'd4)        m_rsp.rdata = {20'd0, vcode};
    else if (m_req.addr == BASE_ADC + 32'd8)   m_rsp.rdata = {20'd0, icode};
    else if (m_req.addr == BASE_PARAM + 32'd0) m_rsp.rdata = p_r0;
    else if (m_req.addr == BASE_PARAM + 32'd4) m_rsp.rdata = p_r1;
    else if (m_req.addr == BASE_PARAM + 32'd8) m_rsp.rdata = p_c1;
    else if (m_req.addr[31:9] == BASE_LUT[31:9] && m_req.addr[8:2] < 7'd100) m_rsp.rdata = lut[m_req.addr[8:2]];
  end
  always @(posedge clk) begin
    if (m_req.read || m_req.write) begin
      if (stall > 0) stall <= stall - 1;
      else stall <= $urandom_range(3, 0);
    end
  end

  // ---------------- register access ----------------
  task automatic wr(input logic [5:0] r, input logic [31:0] d);
    @(negedge clk); s_req = '{addr: BASE_SOCEST + {24'd0, r, 2'b00}, read: 1'b0, write: 1'b1, wdata: d};
    @(negedge clk); s_req = MM_REQ_IDLE;
  endtask
  task automatic rd(input logic [5:0] r, output logic [31:0] d);
    @(negedge clk); s_req = '{addr: BASE_SOCEST + {24'd0, r, 2'b00}, read: 1'b1, write: 1'b0, wdata: 0};
    #1 d = s_rsp.rdata;
    @(negedge clk); s_req = MM_REQ_IDLE;
  endtask

  // ---------------- reference model ----------------
  logic [31:0] r_soc, r_vrc, r_vm, r_vt, r_il, r_l;
  int r_idx, r_count;
  logic r_auto;
  logic [31:0] r_lreg, r_vsc, r_voff, r_isc, r_ioff, r_k, r_ts;

  task automatic ref_step();
    logic [31:0] x100, voc, err, ieff, g1, krc;
    real xr;
    r_vt = fadd(fmul(r2f(real'(vcode)), r_vsc), r_voff);
    r_il = fadd(fmul(r2f(real'(icode)), r_isc), r_ioff);
    x100 = fmul(r_soc, 32'h42c8_0000);
    xr = f2r(x100);
    if (xr < 1.0) r_idx = 0;
    else if (xr >= 99.0) r_idx = 99;
    else r_idx = $rtoi(xr);
    if (r_idx == 99 && xr >= 100.0) n_clamp_hi++;
    if (xr < 0.0) n_clamp_lo++;
    voc  = lut[r_idx];
    r_vm = fsub(fsub(voc, fmul(p_r0, r_il)), r_vrc);
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
      if (failures < 20) $display("%s: %g (%h) expected %g (%h)", what, f2r(got), got, f2r(exp), exp);
    end
  endtask
  task automatic cmpi(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; if (failures < 20) $display("%s: %0d expected %0d", what, got, exp); end
  endtask

  task automatic check_all();
    logic [31:0] d;
    rd(SE_SOC, d);     cmpf("SoC", d, r_soc);
    cmpf("soc_out", soc_out, r_soc);
    rd(SE_VM, d);      cmpf("v_M", d, r_vm);
    rd(SE_VT, d);      cmpf("v_T", d, r_vt);
    rd(SE_IL, d);      cmpf("i_L", d, r_il);
    rd(SE_VRC, d);     cmpf("v_RC1", d, r_vrc);
    rd(SE_L_USED, d);  cmpf("L", d, r_l);
    rd(SE_LUT_IDX, d); cmpi("LUT index", d, r_idx);
    rd(SE_COUNT, d);   cmpi("count", d, r_count);
  endtask

  int max_lat = 0;
  // one sample through the hardware block and the reference
  task automatic sample_step(input logic hw_trigger);
    int lat;
    @(negedge clk);
    if (hw_trigger) sample_valid = 1'b1; else begin
      s_req = '{addr: BASE_SOCEST, read: 1'b0, write: 1'b1, wdata: {28'd0, 1'b1, 1'b0, r_auto, 1'b1}};
    end
    @(negedge clk);
    sample_valid = 1'b0; s_req = MM_REQ_IDLE;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    if (lat > max_lat) max_lat = lat;
    ref_step();
    check_all();
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int k = 0; k < 100; k++) lut[k] = r2f(3.0 + 0.012 * k);
    p_r0 = r2f(0.026); p_r1 = r2f(0.016); p_c1 = r2f(9062.5);
    r_soc = 32'h3f80_0000; r_vrc = 32'h0; r_count = 0; r_auto = 1'b1;
    r_lreg = 32'h41be_79e8; r_vsc = 32'h3aa0_0000; r_voff = 32'h0; r_isc = 32'h3a80_0000;
    r_ioff = 32'hc000_0000; r_k = 32'h379b_5837; r_ts = 32'h3dcc_cccd;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(SE_CTRL, d); cmpi("reset CTRL", d, 3);
    rd(SE_SOC, d);  cmpf("reset SoC", d, 32'h3f80_0000);
    rd(SE_K_SOC, d); cmpf("Ts/Cn", d, r2f(0.1 / 5400.0));

    // a discharge: 1 A pulses, voltages around the model output
    for (int s = 0; s < 150; s++) begin
      icode = 12'(2048 + ((s % 20 < 10) ? 1024 : 0) + $urandom_range(40, 0) - 20);
      vcode = 12'($urandom_range(3300, 3000));
      sample_step(1'b1);
    end
    // parameters change, as an identification engine would
    p_r0 = r2f(0.03); p_r1 = r2f(0.02); p_c1 = r2f(6000.0);
    for (int s = 0; s < 20; s++) begin
      icode = 12'($urandom_range(3500, 600)); vcode = 12'($urandom_range(3400, 2600));
      sample_step(1'b1);
    end
    // register gain mode, larger gain and faster integration for a visible effect
    r_lreg = r2f(10.0); r_auto = 1'b0; r_k = r2f(0.001);
    wr(SE_L_REG, r_lreg); wr(SE_K_SOC, r_k); wr(SE_CTRL, 32'h1);
    for (int s = 0; s < 20; s++) begin
      icode = 12'($urandom_range(3500, 600)); vcode = 12'($urandom_range(3400, 2600));
      sample_step(1'b1);
    end
    // other scaling registers
    r_vsc = r2f(0.0011); r_voff = r2f(0.2); r_isc = r2f(0.0015); r_ioff = r2f(-3.0);
    wr(SE_V_SCALE, r_vsc); wr(SE_V_OFFSET, r_voff); wr(SE_I_SCALE, r_isc); wr(SE_I_OFFSET, r_ioff);
    r_ts = r2f(0.5); wr(SE_TS, r_ts);
    for (int s = 0; s < 10; s++) begin
      icode = 12'($urandom_range(3500, 600)); vcode = 12'($urandom_range(3400, 2600));
      sample_step(1'b1);
    end
    // re-initialise above full (index clamps at 99), then below empty (clamps at 0)
    r_auto = 1'b1; wr(SE_CTRL, 32'h3);
    wr(SE_SOC_INIT, r2f(1.02)); wr(SE_CTRL, 32'h7);
    repeat (3) @(negedge clk);
    r_soc = r2f(1.02); r_vrc = 32'h0;
    rd(SE_SOC, d); cmpf("init SoC", d, r_soc);
    rd(SE_VRC, d); cmpf("init v_RC1", d, 32'h0);
    icode = 12'd2048; vcode = 12'd3440;
    sample_step(1'b1);
    wr(SE_SOC_INIT, r2f(-0.03)); wr(SE_CTRL, 32'h7);
    repeat (3) @(negedge clk);
    r_soc = r2f(-0.03); r_vrc = 32'h0;
    vcode = 12'd2400;
    sample_step(1'b1);
    // software step with sampling disabled; a sample strobe is then ignored
    wr(SE_CTRL, 32'h2);
    @(negedge clk); sample_valid = 1'b1; @(negedge clk); sample_valid = 1'b0;
    repeat (300) @(negedge clk);
    rd(SE_COUNT, d); cmpi("no step while disabled", d, r_count);
    sample_step(1'b0);
    // overrun: a second strobe while a step runs
    wr(SE_CTRL, 32'h3);
    @(negedge clk); sample_valid = 1'b1; @(negedge clk); sample_valid = 1'b0;
    repeat (10) @(negedge clk); sample_valid = 1'b1; @(negedge clk); sample_valid = 1'b0;
    while (busy) @(negedge clk);
    ref_step();
    rd(SE_STATUS, d); cmpi("overrun", d[1], 1);
    if (d[1]) n_overrun++;
    rd(SE_COUNT, d); cmpi("overrun drops sample", d, r_count);
    wr(SE_STATUS, 32'h2);
    rd(SE_STATUS, d); cmpi("overrun cleared", d[1:0], 0);
    check_all();

    checks++;
    if (max_lat > 400) begin failures++; $display("step latency %0d cycles", max_lat); end
    checks++;
    if (n_auto == 0 || n_manual == 0 || n_clamp_hi == 0 || n_clamp_lo == 0 || n_overrun == 0) begin
      failures++; $display("mechanism not exercised");
    end
    $display("max step latency %0d cycles; steps auto %0d manual %0d; clamps %0d/%0d", max_lat, n_auto, n_manual, n_clamp_hi, n_clamp_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

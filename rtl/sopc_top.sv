// sopc_top: system on a programmable chip for State-of-Charge estimation of a
// lithium-ion cell. A memory-mapped interconnect joins two masters, the
// processor (outside this RTL; its port is cpu_req/cpu_rsp) and the SoC
// estimation block, to the slaves: SoC estimation registers, parameter
// identification (R0, R1, C1), the OCV-SoC look-up ROM, the ADC interface, the
// UART and the external memory interface (outside this RTL; xmem_req/xmem_rsp).
// The ADC interface samples cell voltage and current at SAMPLE_HZ and strobes
// the SoC estimation block, which reads the codes, the parameters and the OCV
// entry over the bus and updates the estimate; soc_irq pulses after each step
// soc_busy is high while a step runs, and soc_value always holds the latest estimate (0..1). Everything runs on one
// clock, clk, at CLK_HZ (50 MHz). Address map: sopc_pkg.
// The set of blocks and their connection through the interconnect follow the
// document; the address map, bus protocol and sideband strobe are this design's.
module sopc_top
  import sopc_pkg::*;
  import fp_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 10,
  parameter int unsigned BAUD_RATE = 115_200
) (
  input  logic    clk,
  input  logic    rst_n,
  // processor master port
  input  mm_req_t cpu_req,
  output mm_rsp_t cpu_rsp,
  // external memory interface slave port
  output mm_req_t xmem_req,
  input  mm_rsp_t xmem_rsp,
  // serial ADC
  output logic    adc_cs_n,
  output logic    adc_sclk,
  output logic    adc_din,
  input  logic    adc_dout,
  // UART to the host PC
  output logic    uart_tx,
  input  logic    uart_rx,
  // status
  output logic    soc_irq,
  output logic    soc_busy,
  output f32_t    soc_value,
  output logic    bus_decode_err
);

  mm_req_t m_req [N_MASTERS];
  mm_rsp_t m_rsp [N_MASTERS];
  mm_req_t s_req [N_SLAVES];
  mm_rsp_t s_rsp [N_SLAVES];

  logic        sample_valid;

  assign m_req[0] = cpu_req;
  assign cpu_rsp  = m_rsp[0];

  mm_interconnect u_ic (
    .clk(clk), .rst_n(rst_n),
    .m_req(m_req), .m_rsp(m_rsp),
    .s_req(s_req), .s_rsp(s_rsp),
    .decode_err(bus_decode_err)
  );

  soc_estimation u_est (
    .clk(clk), .rst_n(rst_n),
    .sample_valid(sample_valid),
    .s_req(s_req[SL_SOCEST]), .s_rsp(s_rsp[SL_SOCEST]),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .done(soc_irq), .busy(soc_busy), .soc_out(soc_value)
  );

  param_ident u_param (
    .clk(clk), .rst_n(rst_n),
    .s_req(s_req[SL_PARAM]), .s_rsp(s_rsp[SL_PARAM]),
    .r0(), .r1(), .c1()
  );

  ocv_soc_lut u_lut (
    .clk(clk), .rst_n(rst_n),
    .s_req(s_req[SL_LUT]), .s_rsp(s_rsp[SL_LUT])
  );

  adc_interface #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_adc (
    .clk(clk), .rst_n(rst_n),
    .s_req(s_req[SL_ADC]), .s_rsp(s_rsp[SL_ADC]),
    .adc_cs_n(adc_cs_n), .adc_sclk(adc_sclk), .adc_din(adc_din), .adc_dout(adc_dout),
    .sample_valid(sample_valid), .v_code(), .i_code()
  );

  uart_interface #(.CLK_HZ(CLK_HZ), .BAUD_RATE(BAUD_RATE)) u_uart (
    .clk(clk), .rst_n(rst_n),
    .s_req(s_req[SL_UART]), .s_rsp(s_rsp[SL_UART]),
    .uart_tx(uart_tx), .uart_rx(uart_rx)
  );

  assign xmem_req         = s_req[SL_XMEM];
  assign s_rsp[SL_XMEM]   = xmem_rsp;

endmodule

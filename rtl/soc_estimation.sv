// soc_estimation: State-of-Charge estimator for one lithium-ion cell using the
// Mix algorithm, in single-precision floating point.
//
// Per sample k (started by sample_valid from the ADC interface, or by a
// software step), with SoC and v_RC1 the two states and Ts the sample period:
//   v_T  = V_SCALE * vcode + V_OFFSET          measured cell voltage
//   i_L  = I_SCALE * icode + I_OFFSET          measured cell current (discharge > 0)
//   v_M  = OCV(SoC) - R0 * i_L - v_RC1         one-RC cell model output
//   L    = 1 / (R0 + R1)  (L_opt)  or the L_REG register, chosen by CTRL[1]
//   SoC  <- SoC - (Ts / Cn) * (i_L - L * (v_T - v_M))      corrected Coulomb counting
//   v_RC1 <- v_RC1 + (Ts / C1) * (i_L - v_RC1 / R1)        forward-Euler RC update
// The model equations, the error feedback through L, L_opt = 1/(R0+R1), the
// OCV-SoC table and the float format follow the document. The discretisation
// (forward Euler), the sign convention, the ADC scaling registers and the
// sequencing below are this design's choices.
//
// The block is both a bus master and a bus slave. As a master it reads, each
// step, the two ADC codes, R0/R1/C1 from the parameter identification block
// and the OCV word LUT[floor(100 * SoC)] (clamped to 0..99) from the OCV-SoC
// ROM. One adder, one multiplier and one sequential divider are shared by a
// state machine, one operation of each kind per state. A step takes about 120
// cycles plus bus wait states, far below the 5,000,000-cycle sample period.
// As a slave it exposes the control, status, result and scaling registers
// (sopc_pkg SE_*), without wait states. done pulses when a step has updated
// the states; a sample arriving while a step runs is dropped and sets the
// sticky overrun flag STATUS[1].
module soc_estimation
  import fp_pkg::*;
  import sopc_pkg::*;
#(
  parameter f32_t SOC_INIT_DEFAULT = 32'h3f80_0000,  // 1.0: starts from a full charge
  parameter f32_t L_DEFAULT        = 32'h41be_79e8,  // 23.81 A/V = 1/(R0+R1) of the mean parameters
  parameter f32_t V_SCALE_DEFAULT  = 32'h3aa0_0000,  // 5 V / 4096 codes
  parameter f32_t V_OFFSET_DEFAULT = 32'h0000_0000,  // 0 V
  parameter f32_t I_SCALE_DEFAULT  = 32'h3a80_0000,  // 2 A / 2048 codes
  parameter f32_t I_OFFSET_DEFAULT = 32'hc000_0000,  // -2 A (code 2048 is 0 A)
  parameter f32_t K_SOC_DEFAULT    = 32'h379b_5837,  // Ts / Cn = 0.1 s / 5400 C
  parameter f32_t TS_DEFAULT       = 32'h3dcc_cccd,  // 0.1 s (10 Hz)
  parameter logic [6:0] LUT_LAST   = 7'd99
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_valid,
  input  mm_req_t s_req,
  output mm_rsp_t s_rsp,
  output mm_req_t m_req,
  input  mm_rsp_t m_rsp,
  output logic    done,
  output logic    busy,
  output f32_t    soc_out
);

  typedef enum logic [4:0] {
    S_IDLE, S_RD_V, S_RD_I, S_RD_R0, S_RD_R1, S_RD_C1,
    S_VT, S_IL, S_IDX, S_IDX2, S_RD_LUT,
    S_VM1, S_VM2, S_VM3, S_ERR, S_LWAIT,
    S_CORR, S_IEFF, S_DSOC, S_SOC, S_G1WAIT,
    S_KSTART, S_KWAIT, S_VRC1, S_VRC2
  } state_e;

  state_e st;

  // configuration and status
  logic run, l_auto, init_pend, step_pend, overrun;
  f32_t soc_init, l_reg, v_scale, v_offset, i_scale, i_offset, k_soc, ts;
  logic [31:0] count;

  // datapath registers
  logic [11:0] code_v, code_i;
  f32_t r0, r1, c1, vt, il, tmp, tmp2, rsum, voc, vm, err, lval, ieff, soc, soc_n, vrc, g1, krc;
  logic [6:0] idx;

  // shared arithmetic
  f32_t mul_a, mul_b, mul_y, add_a, add_b, add_y, div_a, div_b, div_q;
  logic add_sub, div_start, div_busy, div_done;

  fp_mul u_mul (.a(mul_a), .b(mul_b), .y(mul_y));
  fp_add u_add (.a(add_a), .b(add_b), .sub(add_sub), .y(add_y));
  fp_div u_div (.clk(clk), .rst_n(rst_n), .start(div_start), .a(div_a), .b(div_b),
                .busy(div_busy), .done(div_done), .q(div_q));

  assign busy    = (st != S_IDLE);
  assign soc_out = soc;

  always_comb begin
    mul_a = soc; mul_b = F32_HUND;
    add_a = tmp; add_b = v_offset; add_sub = 1'b0;
    div_a = F32_ONE; div_b = rsum; div_start = 1'b0;
    m_req = MM_REQ_IDLE;
    unique case (st)
      S_RD_V:   begin m_req.read = 1'b1; m_req.addr = BASE_ADC   + {24'd0, AD_VCODE, 2'b00}; end
      S_RD_I:   begin m_req.read = 1'b1; m_req.addr = BASE_ADC   + {24'd0, AD_ICODE, 2'b00}; end
      S_RD_R0:  begin m_req.read = 1'b1; m_req.addr = BASE_PARAM + {24'd0, PI_R0, 2'b00}; end
      S_RD_R1:  begin m_req.read = 1'b1; m_req.addr = BASE_PARAM + {24'd0, PI_R1, 2'b00}; end
      S_RD_C1:  begin m_req.read = 1'b1; m_req.addr = BASE_PARAM + {24'd0, PI_C1, 2'b00}; end
      S_RD_LUT: begin m_req.read = 1'b1; m_req.addr = BASE_LUT   + {23'd0, idx, 2'b00}; end
      S_VT:     begin mul_a = fp_from_u12(code_v); mul_b = v_scale; end
      S_IL:     begin add_a = tmp; add_b = v_offset;
                      mul_a = fp_from_u12(code_i); mul_b = i_scale; end
      S_IDX:    begin add_a = tmp; add_b = i_offset; mul_a = soc; mul_b = F32_HUND; end
      S_IDX2:   begin add_a = r0; add_b = r1; end
      S_VM1:    begin mul_a = r0; mul_b = il; end
      S_VM2:    begin add_a = voc; add_b = tmp; add_sub = 1'b1; end
      S_VM3:    begin add_a = tmp2; add_b = vrc; add_sub = 1'b1; end
      S_ERR:    begin add_a = vt; add_b = vm; add_sub = 1'b1;
                      div_a = F32_ONE; div_b = rsum; div_start = l_auto; end
      S_CORR:   begin mul_a = lval; mul_b = err; end
      S_IEFF:   begin add_a = il; add_b = tmp; add_sub = 1'b1; end
      S_DSOC:   begin mul_a = k_soc; mul_b = ieff;
                      div_a = F32_ONE; div_b = r1; div_start = 1'b1; end
      S_SOC:    begin add_a = soc; add_b = tmp; add_sub = 1'b1; end
      S_KSTART: begin mul_a = vrc; mul_b = g1;
                      div_a = ts; div_b = c1; div_start = 1'b1; end
      S_KWAIT:  begin add_a = il; add_b = tmp; add_sub = 1'b1; end
      S_VRC1:   begin mul_a = krc; mul_b = tmp2; end
      S_VRC2:   begin add_a = vrc; add_b = tmp; end
      default: ;
    endcase
  end

  wire bus_ok = !m_rsp.waitreq;
  wire [5:0] widx = s_req.addr[7:2];
  wire csr_wr = s_req.write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      run <= 1'b1; l_auto <= 1'b1; init_pend <= 1'b0; step_pend <= 1'b0; overrun <= 1'b0;
      soc_init <= SOC_INIT_DEFAULT; l_reg <= L_DEFAULT;
      v_scale <= V_SCALE_DEFAULT; v_offset <= V_OFFSET_DEFAULT;
      i_scale <= I_SCALE_DEFAULT; i_offset <= I_OFFSET_DEFAULT;
      k_soc <= K_SOC_DEFAULT; ts <= TS_DEFAULT;
      count <= '0; done <= 1'b0;
      code_v <= '0; code_i <= '0;
      r0 <= F32_ZERO; r1 <= F32_ZERO; c1 <= F32_ZERO; vt <= F32_ZERO; il <= F32_ZERO;
      tmp <= F32_ZERO; tmp2 <= F32_ZERO; rsum <= F32_ZERO; voc <= F32_ZERO; vm <= F32_ZERO;
      err <= F32_ZERO; lval <= F32_ZERO; ieff <= F32_ZERO; soc_n <= F32_ZERO;
      g1 <= F32_ZERO; krc <= F32_ZERO; idx <= '0;
      soc <= SOC_INIT_DEFAULT; vrc <= F32_ZERO;
    end else begin
      done <= 1'b0;

      // register writes from the processor
      if (csr_wr) begin
        case (widx)
          SE_CTRL: begin
            run <= s_req.wdata[0]; l_auto <= s_req.wdata[1];
            if (s_req.wdata[2]) init_pend <= 1'b1;
            if (s_req.wdata[3]) step_pend <= 1'b1;
          end
          SE_STATUS:   if (s_req.wdata[1]) overrun <= 1'b0;
          SE_SOC_INIT: soc_init <= s_req.wdata;
          SE_L_REG:    l_reg    <= s_req.wdata;
          SE_V_SCALE:  v_scale  <= s_req.wdata;
          SE_V_OFFSET: v_offset <= s_req.wdata;
          SE_I_SCALE:  i_scale  <= s_req.wdata;
          SE_I_OFFSET: i_offset <= s_req.wdata;
          SE_K_SOC:    k_soc    <= s_req.wdata;
          SE_TS:       ts       <= s_req.wdata;
          default: ;
        endcase
      end

      if (sample_valid && st != S_IDLE) overrun <= 1'b1;

      unique case (st)
        S_IDLE: begin
          if (init_pend) begin
            soc <= soc_init; vrc <= F32_ZERO; init_pend <= 1'b0;
          end else if ((run && sample_valid) || step_pend) begin
            step_pend <= 1'b0;
            st <= S_RD_V;
          end
        end
        S_RD_V:   if (bus_ok) begin code_v <= m_rsp.rdata[11:0]; st <= S_RD_I; end
        S_RD_I:   if (bus_ok) begin code_i <= m_rsp.rdata[11:0]; st <= S_RD_R0; end
        S_RD_R0:  if (bus_ok) begin r0 <= m_rsp.rdata; st <= S_RD_R1; end
        S_RD_R1:  if (bus_ok) begin r1 <= m_rsp.rdata; st <= S_RD_C1; end
        S_RD_C1:  if (bus_ok) begin c1 <= m_rsp.rdata; st <= S_VT; end
        S_VT:     begin tmp <= mul_y; st <= S_IL; end
        S_IL:     begin vt <= add_y; tmp <= mul_y; st <= S_IDX; end
        S_IDX:    begin il <= add_y; tmp2 <= mul_y; st <= S_IDX2; end
        S_IDX2:   begin idx <= fp_floor_index(tmp2, LUT_LAST); rsum <= add_y; st <= S_RD_LUT; end
        S_RD_LUT: if (bus_ok) begin voc <= m_rsp.rdata; st <= S_VM1; end
        S_VM1:    begin tmp <= mul_y; st <= S_VM2; end
        S_VM2:    begin tmp2 <= add_y; st <= S_VM3; end
        S_VM3:    begin vm <= add_y; st <= S_ERR; end
        S_ERR: begin
          err <= add_y;
          if (l_auto) st <= S_LWAIT;
          else begin lval <= l_reg; st <= S_CORR; end
        end
        S_LWAIT:  if (div_done) begin lval <= div_q; st <= S_CORR; end
        S_CORR:   begin tmp <= mul_y; st <= S_IEFF; end
        S_IEFF:   begin ieff <= add_y; st <= S_DSOC; end
        S_DSOC:   begin tmp <= mul_y; st <= S_SOC; end
        S_SOC:    begin soc_n <= add_y; st <= S_G1WAIT; end
        S_G1WAIT: if (div_done) begin g1 <= div_q; st <= S_KSTART; end
        S_KSTART: begin tmp <= mul_y; st <= S_KWAIT; end
        S_KWAIT: begin
          tmp2 <= add_y;
          if (div_done) begin krc <= div_q; st <= S_VRC1; end
        end
        S_VRC1:   begin tmp <= mul_y; st <= S_VRC2; end
        S_VRC2: begin
          vrc   <= add_y;
          soc   <= soc_n;
          count <= count + 32'd1;
          done  <= 1'b1;
          st    <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    s_rsp.waitreq = 1'b0;
    case (widx)
      SE_CTRL:     s_rsp.rdata = {30'd0, l_auto, run};
      SE_STATUS:   s_rsp.rdata = {30'd0, overrun, busy};
      SE_SOC:      s_rsp.rdata = soc;
      SE_SOC_INIT: s_rsp.rdata = soc_init;
      SE_VM:       s_rsp.rdata = vm;
      SE_VT:       s_rsp.rdata = vt;
      SE_IL:       s_rsp.rdata = il;
      SE_L_USED:   s_rsp.rdata = lval;
      SE_L_REG:    s_rsp.rdata = l_reg;
      SE_V_SCALE:  s_rsp.rdata = v_scale;
      SE_V_OFFSET: s_rsp.rdata = v_offset;
      SE_I_SCALE:  s_rsp.rdata = i_scale;
      SE_I_OFFSET: s_rsp.rdata = i_offset;
      SE_K_SOC:    s_rsp.rdata = k_soc;
      SE_TS:       s_rsp.rdata = ts;
      SE_COUNT:    s_rsp.rdata = count;
      SE_VRC:      s_rsp.rdata = vrc;
      SE_LUT_IDX:  s_rsp.rdata = {25'd0, idx};
      default:     s_rsp.rdata = 32'd0;
    endcase
  end

  // Bus rule for this master: a read is held, with the same address, until the
  // slave removes waitreq; the block never writes as a master.
  a_hold_addr: assert property (@(posedge clk) disable iff (!rst_n)
                                m_req.read && m_rsp.waitreq |=> m_req.read && $stable(m_req.addr))
    else $error("master request changed while waiting");
  a_no_write: assert property (@(posedge clk) disable iff (!rst_n) !m_req.write)
    else $error("unexpected master write");

endmodule

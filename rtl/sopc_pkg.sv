// sopc_pkg: bus types, address map and register offsets shared by the blocks of
// the battery-monitoring system on a chip.
//
// All blocks talk over one memory-mapped bus, a subset of a standard
// memory-mapped interface: a master drives mm_req_t (byte address, read, write,
// 32-bit write data) and holds it until the slave's mm_rsp_t shows waitreq low;
// in that cycle the transfer completes and, for a read, rdata is valid. Slaves
// without wait states answer in the cycle of the request.
package sopc_pkg;

  typedef struct packed {
    logic [31:0] addr;   // byte address, word aligned
    logic        read;
    logic        write;
    logic [31:0] wdata;
  } mm_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        waitreq;
  } mm_rsp_t;

  localparam mm_req_t MM_REQ_IDLE = '{addr: 32'd0, read: 1'b0, write: 1'b0, wdata: 32'd0};

  // Slave indices on the interconnect
  typedef enum logic [2:0] {
    SL_SOCEST = 3'd0,   // SoC estimation control/status registers
    SL_PARAM  = 3'd1,   // parameter identification (R0, R1, C1)
    SL_LUT    = 3'd2,   // OCV-SoC look-up table ROM
    SL_ADC    = 3'd3,   // ADC interface
    SL_UART   = 3'd4,   // UART interface
    SL_XMEM   = 3'd5,   // external memory interface (outside this RTL)
    SL_NONE   = 3'd7    // unmapped address
  } slave_e;

  localparam int unsigned N_SLAVES  = 6;
  localparam int unsigned N_MASTERS = 2;   // 0: processor, 1: SoC estimation

  // Address map (byte addresses)
  localparam logic [31:0] BASE_SOCEST = 32'h0000_0000;  // 256 B
  localparam logic [31:0] BASE_PARAM  = 32'h0000_0100;  // 256 B
  localparam logic [31:0] BASE_LUT    = 32'h0000_0200;  // 512 B (100 words used)
  localparam logic [31:0] BASE_ADC    = 32'h0000_0400;  // 256 B
  localparam logic [31:0] BASE_UART   = 32'h0000_0500;  // 256 B
  localparam logic [31:0] BASE_XMEM   = 32'h0200_0000;  // 32 MiB

  function automatic slave_e mm_decode(input logic [31:0] addr);
    if (addr[31:8] == BASE_SOCEST[31:8]) return SL_SOCEST;
    if (addr[31:8] == BASE_PARAM[31:8])  return SL_PARAM;
    if (addr[31:9] == BASE_LUT[31:9])    return SL_LUT;
    if (addr[31:8] == BASE_ADC[31:8])    return SL_ADC;
    if (addr[31:8] == BASE_UART[31:8])   return SL_UART;
    if (addr[31:25] == BASE_XMEM[31:25]) return SL_XMEM;
    return SL_NONE;
  endfunction

  // Register word offsets, SoC estimation
  localparam logic [5:0] SE_CTRL     = 6'd0;   // [0] run on samples, [1] L = L_opt, [2] init (self-clearing), [3] step (self-clearing)
  localparam logic [5:0] SE_STATUS   = 6'd1;   // [0] busy, [1] overrun (write 1 to clear)
  localparam logic [5:0] SE_SOC      = 6'd2;   // estimated SoC (0..1), read only
  localparam logic [5:0] SE_SOC_INIT = 6'd3;   // SoC loaded by init
  localparam logic [5:0] SE_VM       = 6'd4;   // model output v_M, read only
  localparam logic [5:0] SE_VT       = 6'd5;   // measured voltage v_T, read only
  localparam logic [5:0] SE_IL       = 6'd6;   // measured current i_L, read only
  localparam logic [5:0] SE_L_USED   = 6'd7;   // gain used in the last step, read only
  localparam logic [5:0] SE_L_REG    = 6'd8;   // gain used when CTRL[1] is clear
  localparam logic [5:0] SE_V_SCALE  = 6'd9;   // volt per ADC code
  localparam logic [5:0] SE_V_OFFSET = 6'd10;  // volt
  localparam logic [5:0] SE_I_SCALE  = 6'd11;  // ampere per ADC code
  localparam logic [5:0] SE_I_OFFSET = 6'd12;  // ampere
  localparam logic [5:0] SE_K_SOC    = 6'd13;  // Ts / Cn
  localparam logic [5:0] SE_TS       = 6'd14;  // sample period Ts in seconds
  localparam logic [5:0] SE_COUNT    = 6'd15;  // completed estimation steps, read only
  localparam logic [5:0] SE_VRC      = 6'd16;  // relaxation voltage v_RC1, read only
  localparam logic [5:0] SE_LUT_IDX  = 6'd17;  // LUT index used in the last step, read only

  // Parameter identification
  localparam logic [5:0] PI_R0 = 6'd0;
  localparam logic [5:0] PI_R1 = 6'd1;
  localparam logic [5:0] PI_C1 = 6'd2;

  // ADC interface
  localparam logic [5:0] AD_CTRL  = 6'd0;  // [0] enable periodic sampling
  localparam logic [5:0] AD_VCODE = 6'd1;  // last voltage code
  localparam logic [5:0] AD_ICODE = 6'd2;  // last current code
  localparam logic [5:0] AD_COUNT = 6'd3;  // number of completed samples
  localparam logic [5:0] AD_CHSEL = 6'd4;  // [2:0] voltage channel, [6:4] current channel

  // UART interface
  localparam logic [5:0] UA_TXDATA = 6'd0;  // write: byte to send
  localparam logic [5:0] UA_RXDATA = 6'd1;  // read: received byte (clears rx_valid)
  localparam logic [5:0] UA_STATUS = 6'd2;  // [0] tx_busy, [1] rx_valid, [2] rx_overrun
  localparam logic [5:0] UA_BAUD   = 6'd3;  // clock cycles per bit

endpackage

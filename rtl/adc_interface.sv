// adc_interface: acquires the cell voltage and the cell current from two
// channels of an 8-channel 12-bit serial A/D converter, at SAMPLE_HZ (10 Hz)
// from the CLK_HZ (50 MHz) system clock, and makes the two codes available on
// the memory-mapped bus. A sample timer of CLK_HZ / SAMPLE_HZ cycles starts an
// acquisition while CTRL[0] is set. An acquisition is three 16-clock serial
// frames: the converter returns in each frame the conversion of the channel
// addressed in the previous one, so frame 1 addresses the voltage channel,
// frame 2 the current channel (returning the voltage) and frame 3 the current
// channel again (returning the current). Frame format: chip select low for 16
// SCLK periods; the channel address goes out on DIN bits 13..11 (MSB first,
// changed after the falling SCLK edge); DOUT is sampled on the rising edge and
// its last 12 bits are the code. SCLK runs at CLK_HZ / (2 * SCLK_HALF).
// When both codes are stored, sample_valid pulses for one cycle; it starts the
// SoC estimation step. Register map: sopc_pkg AD_*; bus access has no wait
// states. The sampling rate, clock, channel count and resolution follow the
// document; the frame format and the sample_valid strobe are this design's.
module adc_interface
  import sopc_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 10,
  parameter int unsigned SCLK_HALF = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mm_req_t     s_req,
  output mm_rsp_t     s_rsp,
  output logic        adc_cs_n,
  output logic        adc_sclk,
  output logic        adc_din,
  input  logic        adc_dout,
  output logic        sample_valid,
  output logic [11:0] v_code,
  output logic [11:0] i_code
);

  localparam int unsigned SAMPLE_DIV = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned TW = $clog2(SAMPLE_DIV);
  localparam int unsigned HW = $clog2(SCLK_HALF + 1);

  typedef enum logic [1:0] {A_IDLE, A_GAP, A_LOW, A_HIGH} astate_e;

  astate_e        st;
  logic [TW-1:0]  timer;
  logic [HW-1:0]  half_cnt;
  logic [3:0]     bit_cnt;
  logic [1:0]     frame;
  logic [15:0]    tx_sh, rx_sh;
  logic           enable;
  logic [2:0]     ch_v, ch_i;
  logic [31:0]    count;
  logic           tick;
  logic [5:0]     widx;

  assign widx = s_req.addr[7:2];
  assign tick = enable && (timer == TW'(SAMPLE_DIV - 1));

  function automatic logic [15:0] frame_word(input logic [2:0] ch);
    return {2'b00, ch, 11'd0};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
    end else if (!enable || tick) begin
      timer <= '0;
    end else begin
      timer <= timer + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; half_cnt <= '0; bit_cnt <= '0; frame <= '0;
      tx_sh <= '0; rx_sh <= '0;
      adc_cs_n <= 1'b1; adc_sclk <= 1'b1; adc_din <= 1'b0;
      v_code <= '0; i_code <= '0; count <= '0; sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      case (st)
        A_IDLE: if (tick) begin
          st <= A_GAP; frame <= 2'd0; half_cnt <= '0;
          tx_sh <= frame_word(ch_v);
        end
        A_GAP: begin  // chip select high for one half period, then a frame starts
          if (half_cnt == HW'(SCLK_HALF - 1)) begin
            half_cnt <= '0; adc_cs_n <= 1'b0; st <= A_LOW; bit_cnt <= '0;
          end else half_cnt <= half_cnt + 1'b1;
        end
        A_LOW: begin
          if (half_cnt == '0) begin
            adc_sclk <= 1'b0;
            adc_din  <= tx_sh[15];
            tx_sh    <= {tx_sh[14:0], 1'b0};
          end
          if (half_cnt == HW'(SCLK_HALF - 1)) begin half_cnt <= '0; st <= A_HIGH; end
          else half_cnt <= half_cnt + 1'b1;
        end
        A_HIGH: begin
          if (half_cnt == '0) begin
            adc_sclk <= 1'b1;
            rx_sh    <= {rx_sh[14:0], adc_dout};
          end
          if (half_cnt == HW'(SCLK_HALF - 1)) begin
            half_cnt <= '0;
            if (bit_cnt == 4'd15) begin
              adc_cs_n <= 1'b1;
              adc_din  <= 1'b0;
              if (frame == 2'd1) v_code <= rx_sh[11:0];
              if (frame == 2'd2) begin
                i_code       <= rx_sh[11:0];
                count        <= count + 1'b1;
                sample_valid <= 1'b1;
                st           <= A_IDLE;
              end else begin
                frame <= frame + 1'b1;
                tx_sh <= frame_word(ch_i);
                st    <= A_GAP;
              end
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
              st      <= A_LOW;
            end
          end else half_cnt <= half_cnt + 1'b1;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  // configuration registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0; ch_v <= 3'd0; ch_i <= 3'd1;
    end else if (s_req.write) begin
      case (widx)
        AD_CTRL:  enable <= s_req.wdata[0];
        AD_CHSEL: begin ch_v <= s_req.wdata[2:0]; ch_i <= s_req.wdata[6:4]; end
        default: ;
      endcase
    end
  end

  always_comb begin
    s_rsp.waitreq = 1'b0;
    case (widx)
      AD_CTRL:  s_rsp.rdata = {31'd0, enable};
      AD_VCODE: s_rsp.rdata = {20'd0, v_code};
      AD_ICODE: s_rsp.rdata = {20'd0, i_code};
      AD_COUNT: s_rsp.rdata = count;
      AD_CHSEL: s_rsp.rdata = {25'd0, ch_i, 1'b0, ch_v};
      default:  s_rsp.rdata = 32'd0;
    endcase
  end

endmodule

// uart_interface: memory-mapped UART (8 data bits, no parity, one stop bit) for
// the link to the host PC used for configuration and data logging. A write to
// TXDATA while the transmitter is idle sends one byte (writes while busy are
// dropped, so software polls STATUS[0]). The receiver synchronises rx, waits
// for a start bit, samples each bit in its middle and stores the byte in RXDATA
// with STATUS[1] set; reading RXDATA clears it, and a byte arriving while it is
// still set raises STATUS[2] (write 1 to clear). The bit time is BAUD cycles,
// reset to CLK_HZ / BAUD_RATE and writable. The document only names the UART;
// frame format, baud rate and register map are this design's choices.
// Register map: sopc_pkg UA_*; bus access has no wait states.
module uart_interface
  import sopc_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned BAUD_RATE = 115_200
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mm_req_t s_req,
  output mm_rsp_t s_rsp,
  output logic    uart_tx,
  input  logic    uart_rx
);

  logic [15:0] baud;
  logic [5:0]  widx;
  assign widx = s_req.addr[7:2];

  // transmitter
  logic [9:0]  tx_sh;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  logic        tx_busy;

  // receiver
  logic [2:0]  rx_sync;
  logic        rx_busy;
  logic [15:0] rx_cnt;
  logic [3:0]  rx_bits;
  logic [7:0]  rx_sh, rx_data;
  logic        rx_valid, rx_ovr;

  wire rx_in = rx_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baud <= 16'(CLK_HZ / BAUD_RATE);
      tx_sh <= '1; tx_bits <= '0; tx_cnt <= '0; tx_busy <= 1'b0; uart_tx <= 1'b1;
    end else begin
      if (s_req.write && widx == UA_BAUD) baud <= s_req.wdata[15:0];
      if (!tx_busy) begin
        uart_tx <= 1'b1;
        if (s_req.write && widx == UA_TXDATA) begin
          tx_sh   <= {1'b1, s_req.wdata[7:0], 1'b0};
          tx_bits <= 4'd10;
          tx_cnt  <= '0;
          tx_busy <= 1'b1;
        end
      end else begin
        uart_tx <= tx_sh[0];
        if (tx_cnt == baud - 16'd1) begin
          tx_cnt  <= '0;
          tx_sh   <= {1'b1, tx_sh[9:1]};
          tx_bits <= tx_bits - 4'd1;
          if (tx_bits == 4'd1) tx_busy <= 1'b0;
        end else tx_cnt <= tx_cnt + 16'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync <= '1; rx_busy <= 1'b0; rx_cnt <= '0; rx_bits <= '0;
      rx_sh <= '0; rx_data <= '0; rx_valid <= 1'b0; rx_ovr <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[1:0], uart_rx};
      if (s_req.read && widx == UA_RXDATA) rx_valid <= 1'b0;
      if (s_req.write && widx == UA_STATUS && s_req.wdata[2]) rx_ovr <= 1'b0;
      if (!rx_busy) begin
        if (!rx_in) begin
          rx_busy <= 1'b1;
          rx_cnt  <= '0;
          rx_bits <= '0;
        end
      end else begin
        // first wait half a bit (start bit middle), then a full bit per data/stop bit
        if ((rx_bits == 4'd0 && rx_cnt == (baud >> 1) - 16'd1) ||
            (rx_bits != 4'd0 && rx_cnt == baud - 16'd1)) begin
          rx_cnt <= '0;
          if (rx_bits == 4'd0) begin
            if (rx_in) rx_busy <= 1'b0;          // false start
            else       rx_bits <= 4'd1;
          end else if (rx_bits <= 4'd8) begin
            rx_sh   <= {rx_in, rx_sh[7:1]};
            rx_bits <= rx_bits + 4'd1;
          end else begin                          // stop bit
            rx_busy <= 1'b0;
            if (rx_in) begin
              rx_data  <= rx_sh;
              rx_valid <= 1'b1;
              if (rx_valid && !(s_req.read && widx == UA_RXDATA)) rx_ovr <= 1'b1;
            end
          end
        end else rx_cnt <= rx_cnt + 16'd1;
      end
    end
  end

  always_comb begin
    s_rsp.waitreq = 1'b0;
    case (widx)
      UA_RXDATA: s_rsp.rdata = {24'd0, rx_data};
      UA_STATUS: s_rsp.rdata = {29'd0, rx_ovr, rx_valid, tx_busy};
      UA_BAUD:   s_rsp.rdata = {16'd0, baud};
      default:   s_rsp.rdata = 32'd0;
    endcase
  end

endmodule

// tb_uart_interface: loops uart_tx back to uart_rx with a bit time of 16
// cycles, sends random bytes through TXDATA and checks that each arrives in
// RXDATA, that the transmitted frame has the start bit, the 8 data bits LSB
// first and the stop bit at 16-cycle spacing, that STATUS[0] is high for
// exactly 10 bit times, and that an unread byte followed by another one raises
// the overrun flag. It also checks the reset value of the bit-time register.
module tb_uart_interface;
  import sopc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  mm_req_t req = MM_REQ_IDLE;
  mm_rsp_t rsp;
  logic tx;
  int checks = 0, failures = 0;

  uart_interface #(.CLK_HZ(50_000_000), .BAUD_RATE(115_200)) dut (
    .clk(clk), .rst_n(rst_n), .s_req(req), .s_rsp(rsp), .uart_tx(tx), .uart_rx(tx));
  always #5 clk = ~clk;

  task automatic rd(input logic [5:0] r, output logic [31:0] d);
    @(negedge clk); req = '{addr: BASE_UART + {24'd0, r, 2'b00}, read: 1'b1, write: 1'b0, wdata: 0};
    #1 d = rsp.rdata;
    @(negedge clk); req = MM_REQ_IDLE;
  endtask
  task automatic wr(input logic [5:0] r, input logic [31:0] d);
    @(negedge clk); req = '{addr: BASE_UART + {24'd0, r, 2'b00}, read: 1'b0, write: 1'b1, wdata: d};
    @(negedge clk); req = MM_REQ_IDLE;
  endtask
  task automatic eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  // frame sampler: sample tx in the middle of each bit after the start edge
  logic [9:0] frame_bits;
  int busy_cycles;
  task automatic capture_frame();
    @(negedge tx);
    repeat (8) @(posedge clk);
    for (int b = 0; b < 10; b++) begin
      frame_bits[b] = tx;
      repeat (16) @(posedge clk);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0] byte_v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(UA_BAUD, d); eq("reset bit time", d, 50_000_000 / 115_200);
    wr(UA_BAUD, 16);
    for (int i = 0; i < 20; i++) begin
      byte_v = 8'($urandom);
      fork
        capture_frame();
        begin
          wr(UA_TXDATA, {24'd0, byte_v});
          busy_cycles = 0;
          while (dut.tx_busy) begin @(negedge clk); busy_cycles++; end
        end
      join
      eq("frame", {22'd0, frame_bits}, {22'd0, 1'b1, byte_v, 1'b0});
      eq("busy time", busy_cycles, 10 * 16);
      repeat (20) @(negedge clk);
      rd(UA_STATUS, d); eq("rx_valid", d[1], 1);
      rd(UA_RXDATA, d); eq("rx byte", d, {24'd0, byte_v});
      rd(UA_STATUS, d); eq("rx_valid cleared", d[1], 0);
    end
    // overrun: two bytes without reading
    wr(UA_TXDATA, 32'h55);
    repeat (200) @(negedge clk);
    wr(UA_TXDATA, 32'hAA);
    repeat (200) @(negedge clk);
    rd(UA_STATUS, d); eq("overrun", d[2:1], 2'b11);
    rd(UA_RXDATA, d); eq("latest byte", d, 32'hAA);
    wr(UA_STATUS, 32'h4);
    rd(UA_STATUS, d); eq("overrun cleared", d[2:0], 3'b000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// adc_spi_model: behavioural model (not synthesizable) of an 8-channel 12-bit
// serial A/D converter with a 16-clock frame: while cs_n is low it shifts in
// the channel address on din bits 13..11 at rising sclk edges and shifts out,
// after each falling sclk edge, four zeros and then the 12-bit code of the
// channel addressed in the previous frame. The codes come from the code input
// array, one per channel, so a testbench can set the analog values it wants.
module adc_spi_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] code [8],
  output int          frames
);
  logic [2:0]  prev_addr = 3'd0;
  logic [15:0] in_sh = '0;
  logic [15:0] out_word = '0;
  int          nbit = 0;

  initial begin
    dout   = 1'b0;
    frames = 0;
  end

  always @(negedge cs_n) begin
    out_word = {4'b0000, code[prev_addr]};
    nbit = 0;
    in_sh = '0;
  end

  always @(negedge sclk) begin
    if (!cs_n) begin
      dout = (nbit < 16) ? out_word[15 - nbit] : 1'b0;
      nbit = nbit + 1;
    end
  end

  always @(posedge sclk) begin
    if (!cs_n) in_sh = {in_sh[14:0], din};
  end

  always @(posedge cs_n) begin
    if (nbit >= 16) begin
      prev_addr = in_sh[13:11];
      frames = frames + 1;
    end
  end
endmodule

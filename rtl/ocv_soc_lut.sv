// ocv_soc_lut: on-chip ROM holding the open-circuit voltage of the cell against
// its state of charge, as single-precision floats in volt. It has DEPTH = 100
// entries, one per 1 % of SoC: entry k is the OCV at SoC = (k + 0.5) %, so that
// floor(100 * SoC) selects the entry whose 1 % bin contains SoC. The contents
// are the mean of the charge and discharge OCV curves of a 1.5 Ah NMC cell and
// are loaded from ocv_soc_lut.hex. It is a memory-mapped slave: a read takes one
// wait state (synchronous ROM), then returns the word; reads past the last
// entry return 0 and writes are ignored.
module ocv_soc_lut
  import sopc_pkg::*;
#(
  parameter int unsigned DEPTH = 100,
  parameter string       INIT_FILE = "rtl/ocv_soc_lut.hex"
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mm_req_t s_req,
  output mm_rsp_t s_rsp
);

  logic [31:0] rom [DEPTH];
  initial $readmemh(INIT_FILE, rom);

  logic [6:0]  idx;
  logic [31:0] data_q;
  logic        valid_q;

  assign idx = s_req.addr[8:2];

  always_ff @(posedge clk) begin
    data_q <= (32'(idx) < DEPTH) ? rom[idx] : 32'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= s_req.read && !valid_q;
  end

  assign s_rsp.waitreq = s_req.read && !valid_q;
  assign s_rsp.rdata   = data_q;

endmodule

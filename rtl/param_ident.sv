// param_ident: parameter identification block. It supplies the cell-model
// parameters R0 (ohm), R1 (ohm) and C1 (farad) to the SoC estimation block as
// single-precision floats. In this design, as in the document, identification
// is not performed: the block holds one constant value per parameter, the mean
// of the values measured over the SoC range, and a future identification engine
// would replace it. The values sit in registers that reset to those means and
// that the processor may overwrite over the memory-mapped bus (a choice of this
// design, so the model can be retuned without rebuilding). Reads and writes
// complete without wait states. Register map: sopc_pkg PI_*.
module param_ident
  import sopc_pkg::*;
  import fp_pkg::*;
#(
  parameter f32_t R0_DEFAULT = 32'h3cd4_fdf4,  // 0.026 ohm
  parameter f32_t R1_DEFAULT = 32'h3c83_126f,  // 0.016 ohm
  parameter f32_t C1_DEFAULT = 32'h460d_9a00   // 9062.5 F (tau1 = 145 s)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mm_req_t s_req,
  output mm_rsp_t s_rsp,
  output f32_t    r0,
  output f32_t    r1,
  output f32_t    c1
);

  logic [5:0] widx;
  assign widx = s_req.addr[7:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= R0_DEFAULT;
      r1 <= R1_DEFAULT;
      c1 <= C1_DEFAULT;
    end else if (s_req.write) begin
      case (widx)
        PI_R0: r0 <= s_req.wdata;
        PI_R1: r1 <= s_req.wdata;
        PI_C1: c1 <= s_req.wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    s_rsp.waitreq = 1'b0;
    case (widx)
      PI_R0:   s_rsp.rdata = r0;
      PI_R1:   s_rsp.rdata = r1;
      PI_C1:   s_rsp.rdata = c1;
      default: s_rsp.rdata = 32'd0;
    endcase
  end

endmodule

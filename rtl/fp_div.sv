// fp_div: sequential IEEE-754 single-precision divider, q = a / b.
// A pulse on start latches the operands; a restoring division then produces one
// quotient bit per clock (26 bits: 24 significand bits, a guard bit and one spare
// for normalisation), and done pulses for one cycle with q valid (q holds its
// value until the next start). Latency: done comes 28 cycles after the start cycle (2 for the zero and infinity cases). Division by
// zero gives infinity, a zero dividend gives zero, subnormals count as zero.
// The sequential form is this design's choice; a divider is needed for the
// optimal gain 1/(R0+R1) and for the cell-model coefficients 1/R1 and Ts/C1.
module fp_div
  import fp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  f32_t a,
  input  f32_t b,
  output logic busy,
  output logic done,
  output f32_t q
);

  localparam int unsigned QBITS = 26;

  logic        sign_r;
  logic signed [10:0] exp_r;
  logic [24:0] rem_r;
  logic [23:0] div_r;
  logic [QBITS-1:0] quo_r;
  logic [4:0]  cnt_r;
  logic        special_r;
  f32_t        special_q;

  logic [24:0] rem_sub;
  assign rem_sub = rem_r - {1'b0, div_r};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; q <= F32_ZERO;
      sign_r <= 1'b0; exp_r <= '0; rem_r <= '0; div_r <= '0; quo_r <= '0;
      cnt_r <= '0; special_r <= 1'b0; special_q <= F32_ZERO;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        sign_r    <= a[31] ^ b[31];
        exp_r     <= 11'(a[30:23]) - 11'(b[30:23]) + 11'sd127;
        rem_r     <= {1'b0, 1'b1, a[22:0]};
        div_r     <= {1'b1, b[22:0]};
        quo_r     <= '0;
        cnt_r     <= 5'(QBITS);
        special_r <= 1'b0;
        if (b[30:23] == 8'd0 || a[30:23] == 8'hff) begin
          special_r <= 1'b1; special_q <= {a[31] ^ b[31], 8'hff, 23'd0};
        end else if (a[30:23] == 8'd0 || b[30:23] == 8'hff) begin
          special_r <= 1'b1; special_q <= {a[31] ^ b[31], 31'd0};
        end
      end else if (busy) begin
        if (special_r) begin
          q <= special_q; busy <= 1'b0; done <= 1'b1;
        end else if (cnt_r != 5'd0) begin
          if (!rem_sub[24]) begin
            quo_r <= {quo_r[QBITS-2:0], 1'b1};
            rem_r <= {rem_sub[23:0], 1'b0};
          end else begin
            quo_r <= {quo_r[QBITS-2:0], 1'b0};
            rem_r <= {rem_r[23:0], 1'b0};
          end
          cnt_r <= cnt_r - 5'd1;
        end else begin
          if (quo_r[QBITS-1])
            q <= fp_round_pack(sign_r, exp_r, quo_r[25:2], quo_r[1], quo_r[0] | (rem_r != 25'd0));
          else
            q <= fp_round_pack(sign_r, exp_r - 11'sd1, quo_r[24:1], quo_r[0], rem_r != 25'd0);
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule

// fp_add: combinational IEEE-754 single-precision adder/subtractor, y = a + b
// (or a - b when sub is set). The operands are ordered by magnitude, the smaller
// one is aligned with guard/round/sticky bits, the significands are added or
// subtracted, the result is renormalised with a leading-zero search and rounded
// to nearest even. Subnormals are treated as zero (see fp_pkg). An exact zero
// difference gives +0. No clock: the result is valid in the same cycle.
module fp_add
  import fp_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  input  logic sub,
  output f32_t y
);

  always_comb begin
    logic        sa, sb, sx, sy;
    logic [7:0]  ea, eb, ex, ey;
    logic [22:0] fa, fb;
    logic [26:0] mx, my, mys;
    logic [27:0] s;
    logic [26:0] n;
    logic [7:0]  d;
    logic signed [10:0] e;
    int unsigned lz;

    sa = a[31];       ea = a[30:23]; fa = a[22:0];
    sb = b[31] ^ sub; eb = b[30:23]; fb = b[22:0];
    y  = F32_ZERO;
    mx = '0; my = '0; mys = '0; s = '0; n = '0; d = '0; e = '0; lz = 0;
    sx = 1'b0; sy = 1'b0; ex = '0; ey = '0;

    if (ea == 8'hff)      y = {sa, 8'hff, 23'd0};
    else if (eb == 8'hff) y = {sb, 8'hff, 23'd0};
    else if (ea == 8'd0 && eb == 8'd0) y = {sa & sb, 31'd0};
    else if (eb == 8'd0)  y = {sa, ea, fa};
    else if (ea == 8'd0)  y = {sb, eb, fb};
    else begin
      // x is the operand of larger magnitude
      if ({ea, fa} >= {eb, fb}) begin
        sx = sa; ex = ea; mx = {1'b1, fa, 3'b000};
        sy = sb; ey = eb; my = {1'b1, fb, 3'b000};
      end else begin
        sx = sb; ex = eb; mx = {1'b1, fb, 3'b000};
        sy = sa; ey = ea; my = {1'b1, fa, 3'b000};
      end
      d = ex - ey;
      if (d >= 8'd27) mys = {26'd0, |my};
      else begin
        mys = my >> d;
        // sticky: any bit shifted out
        if ((my & ((27'd1 << d) - 27'd1)) != 27'd0) mys[0] = 1'b1;
      end
      e = 11'(ex);
      if (sx == sy) begin
        s = {1'b0, mx} + {1'b0, mys};
        if (s[27]) begin
          n = s[27:1];
          n[0] = s[1] | s[0];
          e = e + 11'sd1;
        end else n = s[26:0];
        y = fp_round_pack(sx, e, n[26:3], n[2], |n[1:0]);
      end else begin
        s = {1'b0, mx} - {1'b0, mys};
        if (s == 28'd0) y = F32_ZERO;
        else begin
          lz = 0;
          for (int i = 26; i >= 0; i--) begin
            if (s[i]) break;
            lz++;
          end
          n = s[26:0] << lz;
          e = e - 11'(lz);
          y = fp_round_pack(sx, e, n[26:3], n[2], |n[1:0]);
        end
      end
    end
  end

endmodule

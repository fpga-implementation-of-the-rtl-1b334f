// fp_mul: combinational IEEE-754 single-precision multiplier, y = a * b.
// The 24-bit significands are multiplied into a 48-bit product, which is
// normalised by at most one place and rounded to nearest even. Zero or
// subnormal operands give a signed zero, infinite operands an infinity.
// No clock: the result is valid in the same cycle.
module fp_mul
  import fp_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  output f32_t y
);

  always_comb begin
    logic        s;
    logic [47:0] p;
    logic signed [10:0] e;
    s = a[31] ^ b[31];
    p = '0;
    e = '0;
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) y = {s, 8'hff, 23'd0};
    else if (a[30:23] == 8'd0 || b[30:23] == 8'd0) y = {s, 31'd0};
    else begin
      p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
      e = 11'(a[30:23]) + 11'(b[30:23]) - 11'sd127;
      if (p[47]) y = fp_round_pack(s, e + 11'sd1, p[47:24], p[23], |p[22:0]);
      else       y = fp_round_pack(s, e, p[46:23], p[22], |p[21:0]);
    end
  end

endmodule

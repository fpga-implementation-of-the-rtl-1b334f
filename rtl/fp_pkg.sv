// fp_pkg: shared helpers for the IEEE-754 single-precision arithmetic used by the
// State-of-Charge estimator. The estimator computes in single-precision floating
// point, as the reference implementation does; the units here follow IEEE-754
// binary32 with round-to-nearest-even, but, as a design choice that keeps the
// logic small, subnormal inputs are read as zero and subnormal results are
// flushed to zero. NaN is not produced on purpose: invalid cases give infinity.
package fp_pkg;

  typedef logic [31:0] f32_t;

  localparam f32_t F32_ZERO = 32'h0000_0000;
  localparam f32_t F32_ONE  = 32'h3f80_0000;
  localparam f32_t F32_HUND = 32'h42c8_0000; // 100.0

  // Round a normalised significand (hidden bit at mant[23]) and pack it.
  // exp is the biased exponent before rounding, as a signed value.
  function automatic f32_t fp_round_pack(input logic sign, input logic signed [10:0] exp,
                                         input logic [23:0] mant, input logic guard,
                                         input logic sticky);
    logic [24:0] m;
    logic signed [10:0] e;
    m = {1'b0, mant};
    e = exp;
    if (guard && (sticky || mant[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 11'sd1;
    end
    if (e <= 0)        return {sign, 31'd0};            // flush to zero
    else if (e >= 255) return {sign, 8'hff, 23'd0};     // overflow to infinity
    else               return {sign, e[7:0], m[22:0]};
  endfunction

  // Unsigned 12-bit integer to float (exact).
  function automatic f32_t fp_from_u12(input logic [11:0] v);
    int unsigned msb;
    logic [23:0] m;
    if (v == 12'd0) return F32_ZERO;
    msb = 0;
    for (int unsigned i = 0; i < 12; i++) if (v[i]) msb = i;
    m = 24'(v) << (23 - msb);
    return {1'b0, 8'(127 + msb), m[22:0]};
  endfunction

  // floor(x) of a float, clamped to 0..max_idx (negative and small values give 0).
  function automatic logic [6:0] fp_floor_index(input f32_t x, input logic [6:0] max_idx);
    logic [7:0] e;
    logic [23:0] m;
    logic [23:0] ip;
    e = x[30:23];
    m = {1'b1, x[22:0]};
    if (x[31] || e < 8'd127) return 7'd0;
    if (e > 8'd133) return max_idx;          // value >= 128
    ip = m >> (8'd150 - e);
    if (ip > 24'(max_idx)) return max_idx;
    return ip[6:0];
  endfunction

endpackage

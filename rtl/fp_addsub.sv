// fp_addsub: combinational IEEE 754 single precision adder/subtractor.
//
// y = a + b when sub = 0, y = a - b when sub = 1.
//
// How it works, following the classic structure the FFT is built on:
//   * Sign logic: the operation actually carried out on the magnitudes is
//     the XOR of the two sign bits and the sub control. When that XOR is 0 the
//     magnitudes are added and the result takes the common sign; when it is 1
//     they are subtracted and the result takes the sign of the operand with the
//     greater magnitude (b's sign being flipped by sub).
//   * Alignment: the operand of greater magnitude is found by comparing
//     exponent and mantissa together; the smaller significand (with its hidden
//     1) is shifted right by the exponent difference. Bits shifted past the
//     24-bit significand are dropped.
//   * The significands are extended by three low zero bits (guard, round,
//     sticky positions) to 28 bits and added or subtracted.
//   * Normalisation: after an addition the leading 1 is in one of the top two
//     places; after a subtraction a leading-zero count finds it anywhere in
//     the 27 bits and the mantissa is shifted left while the exponent is
//     reduced by the same count.
//   * The result is truncated to 23 mantissa bits (no rounding), as in the
//     reference design.
// Own choices, not in the reference design: an operand with exponent field 0
// is taken as zero (denormals flushed), a zero result is +0, a result whose
// exponent would fall to 0 or below is flushed to +0, and one that overflows
// becomes infinity. NaN and infinity operands are not treated specially.
module fp_addsub
  import fft_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb;        // signs, sb after the sub control
  logic        a_zero, b_zero;
  logic        a_big;         // |a| >= |b|
  fp32_t       grt, sml;      // greater and smaller magnitude operand
  logic        g_sign, s_sign;
  logic [7:0]  exp_diff;
  logic [23:0] grt_m, sml_m;  // significands with hidden 1
  logic [23:0] sml_sh;        // aligned smaller significand
  logic        eff_sub;       // magnitudes are subtracted
  logic [27:0] sum;           // 28-bit working value, hidden 1 at bit 26
  logic [4:0]  lz;            // position of leading 1 counted from bit 26
  logic        lz_found;
  logic [27:0] norm;
  logic [9:0]  exp_res;       // signed working exponent
  logic        res_sign;

  always_comb begin
    sa     = a[31];
    sb     = b[31] ^ sub;
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    a_big  = (a[30:0] >= b[30:0]);
    grt    = a_big ? a : b;
    sml    = a_big ? b : a;
    g_sign = a_big ? sa : sb;
    s_sign = a_big ? sb : sa;
    eff_sub = g_sign ^ s_sign;          // = a[31] ^ b[31] ^ sub
    grt_m  = {1'b1, grt[22:0]};
    sml_m  = {1'b1, sml[22:0]};
    exp_diff = grt[30:23] - sml[30:23];
    sml_sh = (sml[30:23] == 8'd0) ? 24'd0 : (sml_m >> exp_diff);

    if (eff_sub) sum = {1'b0, grt_m, 3'b000} - {1'b0, sml_sh, 3'b000};
    else         sum = {1'b0, grt_m, 3'b000} + {1'b0, sml_sh, 3'b000};

    // leading-one search over bits 27..0
    lz = 5'd0;
    lz_found = 1'b0;
    for (int i = 27; i >= 0; i--) begin
      if (!lz_found && sum[i]) begin
        lz_found = 1'b1;
        lz = 5'(27 - i);
      end
    end

    // shift so that the leading 1 lands at bit 27, mantissa is then [26:4]
    norm = sum << lz;
    // leading 1 at bit 27 means exponent + 1; at bit 26 unchanged; lower
    // positions reduce it by the distance
    exp_res  = {2'b00, grt[30:23]} + 10'd1 - {5'd0, lz};
    res_sign = g_sign;

    if (a_zero && b_zero) begin
      y = {sa & sb, 31'd0};
    end else if (b_zero) begin
      y = a;
    end else if (a_zero) begin
      y = {sb, b[30:0]};
    end else if (!lz_found || exp_res[9] || exp_res == 10'd0) begin
      y = FP_ZERO;
    end else if (exp_res >= 10'd255) begin
      y = {res_sign, 8'hFF, 23'd0};
    end else begin
      y = {res_sign, exp_res[7:0], norm[26:4]};
    end
  end

endmodule

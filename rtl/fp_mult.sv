// fp_mult: combinational IEEE 754 single precision multiplier.
//
// y = a * b, worked out the traditional way:
//   * sign = XOR of the operand signs;
//   * exponent = sum of the biased exponents minus the bias 127;
//   * the 24-bit significands (hidden 1 restored) are multiplied into a
//     48-bit product. If product bit 47 is set the mantissa is taken from
//     bits [46:24] and the exponent is raised by one, otherwise from bits
//     [45:23]. The lower bits are dropped (truncation, no rounding), as in
//     the reference design.
// Own choices: an operand with exponent field 0 is taken as zero and gives a
// signed zero (the reference design returns a fixed small non-zero pattern
// there instead); an exponent that falls to 0 or below is flushed to signed
// zero and one that reaches 255 gives signed infinity. NaN and infinity
// operands are not treated specially.
module fp_mult
  import fft_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [47:0] prod;
  logic [9:0]  exp_sum;   // signed working exponent
  logic [9:0]  exp_res;
  logic [22:0] man;

  always_comb begin
    s       = a[31] ^ b[31];
    prod    = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    exp_sum = {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127;
    if (prod[47]) begin
      man     = prod[46:24];
      exp_res = exp_sum + 10'd1;
    end else begin
      man     = prod[45:23];
      exp_res = exp_sum;
    end

    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) y = {s, 31'd0};
    else if (exp_res[9] || exp_res == 10'd0)  y = {s, 31'd0};
    else if (exp_res >= 10'd255)              y = {s, 8'hFF, 23'd0};
    else                                      y = {s, exp_res[7:0], man};
  end

endmodule

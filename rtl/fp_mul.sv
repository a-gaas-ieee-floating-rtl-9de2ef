// fp_mul: IEEE 754 single precision floating point multiplier.
//
// Two blocks work side by side. The exponent block forms the sign, the sum
// of the exponents less the bias, and the overflow/underflow flags. The
// significand block multiplies the two 24-bit significands (hidden 1
// restored): the multiplier operand is Booth recoded into 13 radix-4 digits,
// the modified carry-save array reduces the 13 partial products to a
// sum/carry pair, the final carry-select adder (22-bit low and 26-bit high
// sections) adds them, and the trailing-1's rounder rounds to nearest even
// and reports the normalising shift, which the exponent block folds into the
// exponent. The final format adjust packs the result.
//
// Interface: a, b in; p (product), ovf, unf out. Fully combinational, no
// clock: one multiplication per evaluation.
//
// Operands with exponent field 0 are treated as zero; exponent field 255 has
// no special meaning (no infinity or NaN inputs). Overflow gives infinity,
// underflow gives zero. These conventions are this design's choices; the
// block structure follows the multiplier it implements.
module fp_mul
  import fp_mul_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] p,
  output logic        ovf,
  output logic        unf
);

  // Significands with the hidden bit.
  logic [MANT_W-1:0] ma, mb;
  assign ma = {1'b1, a[FRAC_W-1:0]};
  assign mb = {1'b1, b[FRAC_W-1:0]};

  // Mantissa block.
  booth_digit_t [MANT_W/2:0] digits;
  booth_recoder #(.N(MANT_W)) u_booth (.y(mb), .d(digits));

  logic [PROD_W-1:0] arr_s, arr_c;
  mcs_array #(.N(MANT_W)) u_array (.x(ma), .d(digits), .sum(arr_s), .carry(arr_c));

  logic [PROD_W-1:0] prod;
  logic              c22;
  final_adder u_fadd (.a(arr_s), .b(arr_c), .s(prod), .c22(c22));

  logic [FRAC_W-1:0] frac;
  logic              shift;
  t1p_rounder u_round (
    .a_hi (arr_s[47:22]),
    .b_hi (arr_c[47:22]),
    .s_hi (prod[47:22]),
    .s_lo (prod[21:0]),
    .frac (frac),
    .shift(shift)
  );

  // Exponent block.
  logic             sign, zero;
  logic [EXP_W-1:0] exp;
  exponent_block u_exp (
    .sign_a(a[31]), .sign_b(b[31]),
    .exp_a (a[30:23]), .exp_b(b[30:23]),
    .shift (shift),
    .sign  (sign), .exp(exp), .ovf(ovf), .unf(unf), .zero(zero)
  );

  format_adjust u_fmt (
    .sign(sign), .exp(exp), .frac(frac),
    .ovf(ovf), .unf(unf), .zero(zero),
    .result(p)
  );

  logic unused_c22;
  assign unused_c22 = c22;

endmodule

// exponent_block: sign, exponent and range checks of the product.
//
// The sign is the XOR of the operand signs. The exponent adder forms
// ea + eb, the bias is subtracted, and the two candidate exponents, without
// and with the normalising increment, are both ready before the significand
// path decides `shift`, which then only selects between them. The chosen
// biased exponent is checked against the normal range: 255 or more is an
// overflow, 0 or less an underflow. An operand with a zero exponent field is
// taken as zero; the product is then zero and neither flag is raised.
//
// Interface: operand signs and exponent fields, shift in; sign, exp (8-bit
// biased, valid when no flag is set), ovf, unf, zero out. Combinational.
//
// Sign, exponent add, bias subtraction and overflow/underflow detection are
// the units of the exponent path; the precomputed pair selected by `shift`,
// treating exponent field 0 as zero (subnormals flushed), and giving no
// special meaning to field 255 are this design's choices.
module exponent_block
  import fp_mul_pkg::*;
(
  input  logic             sign_a,
  input  logic             sign_b,
  input  logic [EXP_W-1:0] exp_a,
  input  logic [EXP_W-1:0] exp_b,
  input  logic             shift,
  output logic             sign,
  output logic [EXP_W-1:0] exp,
  output logic             ovf,
  output logic             unf,
  output logic             zero
);

  typedef logic signed [EXP_W+1:0] wexp_t;  // 10 bits: -127 .. 383

  wexp_t e_sum, e0, e1, e;

  assign sign  = sign_a ^ sign_b;
  assign zero  = (exp_a == '0) || (exp_b == '0);
  assign e_sum = wexp_t'({2'b00, exp_a}) + wexp_t'({2'b00, exp_b});  // exp adder
  assign e0    = e_sum - wexp_t'(BIAS);                              // - bias
  assign e1    = e0 + wexp_t'(1);
  assign e     = shift ? e1 : e0;
  assign exp   = e[EXP_W-1:0];
  assign ovf   = !zero && (e >= wexp_t'(255));
  assign unf   = !zero && (e <= wexp_t'(0));

endmodule

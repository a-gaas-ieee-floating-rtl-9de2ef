// format_adjust: final packing of the product into IEEE 754 single format.
//
// Normal results are packed as {sign, exponent, fraction}. An overflow is
// delivered as infinity of the product's sign, an underflow or a zero
// operand as zero of the product's sign (no subnormal results).
//
// Interface: sign, exp, frac, ovf, unf, zero in; 32-bit result out.
// Combinational. Packing is the block's named job; what it delivers on
// overflow, underflow and zero is this design's choice.
module format_adjust
  import fp_mul_pkg::*;
(
  input  logic              sign,
  input  logic [EXP_W-1:0]  exp,
  input  logic [FRAC_W-1:0] frac,
  input  logic              ovf,
  input  logic              unf,
  input  logic              zero,
  output logic [31:0]       result
);

  always_comb begin
    if (zero || unf)  result = {sign, {EXP_W{1'b0}}, {FRAC_W{1'b0}}};
    else if (ovf)     result = {sign, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else              result = {sign, exp, frac};
  end

endmodule

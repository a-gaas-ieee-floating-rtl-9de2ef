// gaas_mul_top: the two multipliers of this design side by side.
//
// fp_mul is the IEEE 754 single precision multiplier (radix-4 Booth
// recoding, modified carry-save array, 22 + 26-bit carry-select final
// adder, trailing-1's rounding, exponent block). mult16 is the companion
// 16 x 16-bit fixed point multiplier built with the same Booth recoding and
// modified carry-save array. The two share no signals; each keeps its own
// ports here.
//
// Interface: fp_a, fp_b in, fp_p, fp_ovf, fp_unf out (single precision);
// fx_x, fx_y in, fx_p out (16 x 16 unsigned). Both are combinational.
module gaas_mul_top (
  input  logic [31:0] fp_a,
  input  logic [31:0] fp_b,
  output logic [31:0] fp_p,
  output logic        fp_ovf,
  output logic        fp_unf,
  input  logic [15:0] fx_x,
  input  logic [15:0] fx_y,
  output logic [31:0] fx_p
);

  fp_mul u_fp (.a(fp_a), .b(fp_b), .p(fp_p), .ovf(fp_ovf), .unf(fp_unf));

  mult16 u_fx (.x(fx_x), .y(fx_y), .p(fx_p));

endmodule

// final_adder: the 48-bit final adder of the significand multiplier.
//
// Adds the sum and carry vectors left by the carry-save array. It is split
// the way the datapath uses it: a 22-bit carry-select section for product
// bits 21..0 (blocks of 7, 7 and 8 bits, the first a plain ripple adder with
// carry in 0) and a 26-bit carry-select section for bits 47..22 (blocks of
// 8, 9 and 9 bits, all selected by the carry coming out of the low section).
// The low section only feeds the sticky bit and the carry c22 into bit 22;
// the high section holds every bit the rounder looks at.
//
// Interface: a, b (48 bits) in; s = (a + b) mod 2^48 out, and c22, the carry
// from bit 21 into bit 22. Combinational.
//
// The 22/26 split and the block widths are those of the reference adder
// partition; bringing out c22 as a port is this design's choice.
module final_adder #(
  parameter int LO_W = 22,  // low section width
  parameter int HI_W = 26   // high section width
) (
  input  logic [LO_W+HI_W-1:0] a,
  input  logic [LO_W+HI_W-1:0] b,
  output logic [LO_W+HI_W-1:0] s,
  output logic                 c22
);

  localparam int W = LO_W + HI_W;

  cs_adder #(
    .W(LO_W), .NB(3), .BW('{7, 7, 8, 0, 0, 0, 0, 0}), .FIRST_RIPPLE(1'b1)
  ) u_lo (
    .a(a[LO_W-1:0]), .b(b[LO_W-1:0]), .cin(1'b0),
    .s(s[LO_W-1:0]), .cout(c22)
  );

  logic unused_cout;
  cs_adder #(
    .W(HI_W), .NB(3), .BW('{8, 9, 9, 0, 0, 0, 0, 0}), .FIRST_RIPPLE(1'b0)
  ) u_hi (
    .a(a[W-1:LO_W]), .b(b[W-1:LO_W]), .cin(c22),
    .s(s[W-1:LO_W]), .cout(unused_cout)
  );

endmodule

// t1p_rounder: round-to-nearest-even of the significand product with a
// trailing-1's predictor instead of a second adder.
//
// The 48-bit product P = a + b is the output of the final adder. Its top 26
// bits (47..22) arrive here as the addends a_hi, b_hi and the finished sum
// s_hi; the low 22 sum bits only form the sticky bit. Named bits:
//   v = P[47]  product >= 2 (normalisation shift needed)
//   l = P[23]  last kept bit when v = 0
//   r = P[22]  round bit when v = 0
// Without overflow the result is P[46:23] with round bit r; with overflow it
// is P[47:24], its round bit is l and r joins the sticky bits.
//
// Rounding up means adding one unit at bit 23 (v = 0) or at bit 24 (v = 1).
// One t1p over bits 47..24 predicts, from the addends, which sum bits an
// increment at bit 24 inverts; ANDed with s[23] the same flags serve an
// increment at bit 23. The control logic decides round-up from v, l, r, the
// bit above l and sticky (ties go to the even result), the chosen flag set
// is gated by that decision (AND), inverted into the sum (XOR), and the
// normalising shift is v OR the flag that reaches bit 47 (a round-up that
// carries into bit 47). With v = 1 the round-up cannot carry out of bit 47,
// since P <= (2^24 - 1)^2 keeps P[24] clear when P[47:25] are all ones.
//
// Interface: a_hi, b_hi, s_hi (26 bits), s_lo (22 bits) in; frac (23 stored
// fraction bits of the rounded significand) and shift (add 1 to the
// exponent) out. Combinational.
//
// The AND / XOR / OR / shift structure follows the trailing-1's rounding
// scheme; this design decides round-up directly from l, r and sticky rather
// than by adding a half unit first, which gives the same IEEE result.
module t1p_rounder #(
  parameter int T1P_GROUP = 4   // group size of the carry-select predictor
) (
  input  logic [25:0] a_hi,   // final adder addends, bits 47..22
  input  logic [25:0] b_hi,
  input  logic [25:0] s_hi,   // product bits 47..22
  input  logic [21:0] s_lo,   // product bits 21..0
  output logic [22:0] frac,
  output logic        shift
);

  logic v, l, r, b24, sticky;
  assign v      = s_hi[25];
  assign l      = s_hi[1];
  assign r      = s_hi[0];
  assign b24    = s_hi[2];
  assign sticky = |s_lo;

  // Flags for an increment at bit 24: rr[k] <-> product bit 24 + k.
  logic [24:0] rr;
  t1p #(.W(24), .GROUP(T1P_GROUP)) u_t1p (
    .a (a_hi[25:2]),
    .b (b_hi[25:2]),
    .s0(s_hi[2]),
    .r (rr)
  );

  // Flag sets over bits 47..23 (index k <-> bit 23 + k).
  logic [24:0] f_l;   // increment at bit 23
  logic [24:0] f_h;   // increment at bit 24
  assign f_l = {rr[23:0] & {24{l}}, 1'b1};
  assign f_h = {rr[23:0], 1'b0};

  // Control logic.
  logic round_up;
  assign round_up = v ? (l & (b24 | r | sticky)) : (r & (l | sticky));

  logic [24:0] flags, res;
  logic        r_msb;
  assign flags = (v ? f_h : f_l) & {25{round_up}};   // AND
  assign res   = s_hi[25:1] ^ flags;                 // XOR
  assign r_msb = flags[24];
  assign shift = v | r_msb;                          // OR
  assign frac  = shift ? res[23:1] : res[22:0];      // shift

  // a_hi/b_hi bits 23..22 only reach the sum; res[24] is the hidden bit and
  // rr[24] a carry out of bit 47 that cannot occur (see above).
  logic unused;
  assign unused = ^{a_hi[1:0], b_hi[1:0], rr[24], res[24]};

endmodule

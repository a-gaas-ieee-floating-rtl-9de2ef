// t1p: trailing-1's predictor.
//
// To increment a number it is enough to invert its bits from the l.s.b. up
// to and including the first 0. This block finds those bits for a sum
// s = a + b + c without waiting for the sum: r[i] is 1 exactly when
// s[i-1:0] is all ones, so s + 1 = s ^ r[W-1:0] and r[W] reports that the
// increment carries out of the top bit.
//
// How: if s[j-1:0] are all ones then the carry into bit j equals the
// generate term a[j-1] & b[j-1] of the bit below (a propagating bit below
// cannot have received a carry, or its sum bit would be 0). So s[j] is 1 in
// that situation exactly when z[j] = (a[j] ^ b[j]) ^ (a[j-1] & b[j-1]) is 1,
// a function of two neighbouring bit pairs only, and r[i] is the AND of
// z[0..i-1]. Bit 0 depends on the carry into the field, so the caller
// supplies the finished sum bit s0 as z[0]. The predictor is therefore exact
// whatever carry enters the field.
//
// The AND prefix is built carry-select style: the field is cut into groups
// of GROUP bits, each group forms its own prefix starting from a constant 1,
// and the group results are gated by the AND of all whole groups below. With
// GROUP >= W this is the plain carry-ripple predictor.
//
// Interface: a, b (W bits), s0 in; r (W+1 bits) out. Combinational.
// The AND-prefix structure and its two forms follow the carry-ripple and
// carry-select predictors; the neighbour generate term in z and the group
// size are this design's choices.
module t1p #(
  parameter int W     = 8,
  parameter int GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         s0,
  output logic [W:0]   r
);

  localparam int NG = (W + GROUP - 1) / GROUP;

  logic [W-1:0] z;
  always_comb begin
    z[0] = s0;
    for (int j = 1; j < W; j++) z[j] = (a[j] ^ b[j]) ^ (a[j-1] & b[j-1]);
  end

  logic [W-1:0] lp;  // prefix inside the group, restarted at 1
  logic [NG-1:0] ga; // the whole group is ones
  always_comb begin
    for (int g = 0; g < NG; g++) begin
      logic run;
      run = 1'b1;
      for (int i = g * GROUP; i < (g + 1) * GROUP && i < W; i++) begin
        lp[i] = run;
        run   = run & z[i];
      end
      ga[g] = run;
    end
  end

  logic [NG:0] blk;  // all whole groups below are ones
  assign blk[0] = 1'b1;
  for (genvar g = 0; g < NG; g++) begin : g_blk
    assign blk[g+1] = blk[g] & ga[g];
  end

  for (genvar i = 0; i < W; i++) begin : g_r
    assign r[i] = blk[i / GROUP] & lp[i];
  end
  assign r[W] = blk[NG];

endmodule

// cs_adder: carry-select adder built from pairs of ripple-carry blocks.
//
// The W operand bits are cut into NB blocks of widths BW[0] (lowest) to
// BW[NB-1] (entries above NB-1 are ignored). When FIRST_RIPPLE is set, block 0 is a single ripple adder fed
// by cin. Every other block holds two ripple adders, one with carry in 0 and
// one with carry in 1, that work in parallel; the carry arriving from the
// block below drives a mux that picks one sum and one carry out. The
// incoming carry thus crosses one mux per block instead of rippling through
// the block, and the delay is about m * d_carry + (W/m - 1) * d_mux for
// blocks of about m bits. Widths that grow towards the top balance the
// ripple inside a block against the mux chain below it.
//
// Defaults: the 48-bit partition 7, 7, 8, 8, 9, 9 with a plain ripple first
// block, the final adder of the single precision multiplier.
//
// Interface: a, b, cin in; s = a + b + cin (W bits) and cout out.
// Combinational. BW[0..NB-1] must sum to W.
//
// The paired-ripple structure, the delay model and the default partition
// follow the reference adder; the 8-entry width array is this design's way
// of making the partition a parameter.
module cs_adder #(
  parameter int W            = 48,
  parameter int NB           = 6,                          // blocks used, at most 8
  parameter int BW [8]       = '{7, 7, 8, 8, 9, 9, 0, 0},  // widths, low block first
  parameter bit FIRST_RIPPLE = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  function automatic int offset(int k);
    int o = 0;
    for (int j = 0; j < k; j++) o += BW[j];
    return o;
  endfunction

  if (offset(NB) != W) begin : g_bad_partition
    $error("cs_adder: block widths do not sum to W");
  end

  logic [NB:0] c;  // carry into each block
  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int O = offset(k);
    localparam int B = BW[k];
    if (k == 0 && FIRST_RIPPLE) begin : g_ripple
      ripple_adder #(.W(B)) u_add (
        .a(a[O +: B]), .b(b[O +: B]), .cin(c[k]), .s(s[O +: B]), .cout(c[k+1])
      );
    end else begin : g_select
      logic [B-1:0] s0, s1;
      logic         c0, c1;
      ripple_adder #(.W(B)) u_add0 (
        .a(a[O +: B]), .b(b[O +: B]), .cin(1'b0), .s(s0), .cout(c0)
      );
      ripple_adder #(.W(B)) u_add1 (
        .a(a[O +: B]), .b(b[O +: B]), .cin(1'b1), .s(s1), .cout(c1)
      );
      assign s[O +: B] = c[k] ? s1 : s0;
      assign c[k+1]    = c[k] ? c1 : c0;
    end
  end

  assign cout = c[NB];

endmodule

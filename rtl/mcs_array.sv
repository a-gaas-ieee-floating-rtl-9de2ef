// mcs_array: Booth partial product array with modified carry-save reduction.
//
// Every cell of the array is a selection mux followed by a full adder. The
// mux forms one bit of a partial product d_i * x from the Booth digit
// controls (0, x, 2x, and the bitwise inverse of either for a negative
// digit). The full adders do not form one long carry-save chain: the even
// partial products (rows 0, 2, 4, ...) are accumulated in one carry-save
// chain and the odd ones (rows 1, 3, 5, ...) in a second, interleaved chain,
// and at the bottom the two sum/carry pairs are merged by two more rows of
// full adders. For N = 24 the 13 rows give an even chain of 7 rows (5 full
// adders deep) and the merge adds 2, so the tree is 7 full adders deep.
//
// Negative digits: a row for a negative digit is the one's complement of
// |d_i| * x, sign-extended over the full 2N-bit width, and the +1 that
// completes the two's complement is collected, for all rows, into one
// correction vector (bit 2i set when digit i is negative). That vector
// enters the odd chain as its extra row, which keeps the odd chain (6 rows +
// 1) no deeper than the even one. Sign handling and the place of the
// correction vector are this design's choices; the split into even and odd
// chains and the final merge follow the modified carry-save scheme.
//
// Interface: x (multiplicand), d (Booth digits of the multiplier) in; sum
// and carry out, with sum + carry = x * y modulo 2^(2N). Combinational.
module mcs_array
  import fp_mul_pkg::*;
#(
  parameter int N = 24  // operand width, even, at least 8
) (
  input  logic [N-1:0]          x,
  input  booth_digit_t [N/2:0]  d,
  output logic [2*N-1:0]        sum,
  output logic [2*N-1:0]        carry
);

  localparam int W  = 2 * N;        // product width
  localparam int ND = N / 2 + 1;    // Booth digits = partial product rows
  localparam int NE = (ND + 1) / 2; // even rows
  localparam int NO = ND / 2 + 1;   // odd rows plus the correction vector

  // Full adder depth of the reduction: a chain of k rows is k - 2 full
  // adders deep, the merge adds 2 (7 for N = 24, 6 for N = 16).
  localparam int EVEN_DEPTH = NE - 2;
  localparam int ODD_DEPTH  = NO - 2;
  localparam int FA_DEPTH   = ((EVEN_DEPTH > ODD_DEPTH) ? EVEN_DEPTH : ODD_DEPTH) + 2;

  typedef logic [W-1:0] row_t;

  // 3:2 compression of three rows (one row of full adders).
  function automatic void fa_row(input row_t i0, input row_t i1, input row_t i2,
                                 output row_t s, output row_t c);
    s = i0 ^ i1 ^ i2;
    c = ((i0 & i1) | (i0 & i2) | (i1 & i2)) << 1;
  endfunction

  row_t pp   [ND];  // partial product rows, already shifted into place
  row_t negv;       // +1 corrections of the negative rows
  row_t even [NE];
  row_t odd  [NO];

  // Selection muxes.
  always_comb begin
    negv = '0;
    for (int i = 0; i < ND; i++) begin
      logic [N:0] mag;
      row_t       ext;
      mag = d[i].two ? {x, 1'b0} : (d[i].one ? {1'b0, x} : '0);
      ext = row_t'(mag) ^ {W{d[i].neg}};
      pp[i] = ext << (2 * i);
      negv[2*i] = d[i].neg;
    end
    for (int k = 0; k < NE; k++) even[k] = pp[2*k];
    for (int k = 0; k < NO - 1; k++) odd[k] = pp[2*k + 1];
    odd[NO-1] = negv;
  end

  // Two interleaved carry-save chains and the final merge.
  row_t es, ec, os, oc, ms, mc;
  always_comb begin
    fa_row(even[0], even[1], even[2], es, ec);
    for (int k = 3; k < NE; k++) fa_row(es, ec, even[k], es, ec);
    fa_row(odd[0], odd[1], odd[2], os, oc);
    for (int k = 3; k < NO; k++) fa_row(os, oc, odd[k], os, oc);
    fa_row(es, ec, os, ms, mc);
    fa_row(ms, mc, oc, sum, carry);
  end

endmodule

// mult16: 16 x 16-bit fixed point (unsigned integer) multiplier.
//
// The same significand datapath as the floating point multiplier, at 16
// bits: radix-4 modified Booth recoding of y into 9 digits, the modified
// carry-save array (even rows with even rows, odd rows with odd rows, then
// the two merged), and a 32-bit carry-select final adder.
//
// Interface: x, y in; p = x * y (32 bits) out. Combinational.
//
// Booth recoding and the modified carry-save array follow the companion
// 16 x 16 multiplier built with the same method; unsigned operands and the
// final adder partition 6, 6, 6, 7, 7 (from the block-size rule
// m = sqrt(n * d_mux / d_carry), about 6.2 bits for n = 32) are this
// design's choices.
module mult16
  import fp_mul_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  booth_digit_t [N/2:0] digits;
  booth_recoder #(.N(N)) u_booth (.y(y), .d(digits));

  logic [2*N-1:0] arr_s, arr_c;
  mcs_array #(.N(N)) u_array (.x(x), .d(digits), .sum(arr_s), .carry(arr_c));

  logic unused_cout;
  cs_adder #(
    .W(2*N), .NB(5), .BW('{6, 6, 6, 7, 7, 0, 0, 0}), .FIRST_RIPPLE(1'b1)
  ) u_add (
    .a(arr_s), .b(arr_c), .cin(1'b0), .s(p), .cout(unused_cout)
  );

endmodule

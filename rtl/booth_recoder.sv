// booth_recoder: radix-4 modified Booth recoding of an unsigned multiplier.
//
// The N-bit unsigned multiplier y is scanned in overlapping triplets
// (y[2i+1], y[2i], y[2i-1]) with y[-1] = 0 and zeros above bit N-1. Each
// triplet becomes one signed digit in {-2..2}, so y = sum d_i * 4^i. For the
// 24-bit single precision significand this gives the 13 digits (and so 13
// partial products instead of 24) that the multiplier array uses; the extra
// top digit absorbs the unsigned operand's upper bit.
//
// Interface: y in, d[N/2:0] out, one booth_digit_t per digit. Purely
// combinational; one gate level per digit.
//
// The recoding follows the standard modified Booth table; the neg/two/one
// encoding of a digit is this design's choice. `neg` is kept low for the
// triplet 111 (digit 0), so a negative digit always has a nonzero magnitude.
module booth_recoder
  import fp_mul_pkg::*;
#(
  parameter int N = 24  // multiplier width, must be even
) (
  input  logic [N-1:0]               y,
  output booth_digit_t [N/2:0]       d
);

  // y extended with y[-1] = 0 at the bottom and zeros at the top.
  logic [N+2:0] yx;
  assign yx = {2'b00, y, 1'b0};

  always_comb begin
    for (int i = 0; i <= N/2; i++) begin
      logic b2, b1, b0;
      b0 = yx[2*i];      // y[2i-1]
      b1 = yx[2*i + 1];  // y[2i]
      b2 = yx[2*i + 2];  // y[2i+1]
      d[i].one = b1 ^ b0;
      d[i].two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
      d[i].neg = b2 & ~(b1 & b0);
    end
  end

endmodule

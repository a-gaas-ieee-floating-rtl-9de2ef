// fp_mul_pkg: types and constants shared by the single precision multiplier.
//
// IEEE 754 single precision field widths and exponent bias, and the control
// word of one radix-4 modified Booth digit. A Booth digit d in {-2,-1,0,1,2}
// is carried as three wires: `one` (|d| = 1), `two` (|d| = 2) and `neg`
// (d < 0). That split matches the two-input selection mux that sits in every
// cell of the partial product array; the encoding itself is a choice of this
// design.
package fp_mul_pkg;

  localparam int EXP_W  = 8;    // exponent field
  localparam int FRAC_W = 23;   // stored fraction field
  localparam int MANT_W = 24;   // significand with hidden bit
  localparam int BIAS   = 127;  // exponent bias
  localparam int PROD_W = 2 * MANT_W;  // full significand product

  typedef struct packed {
    logic neg;  // digit is negative: select the inverted multiplicand
    logic two;  // |digit| = 2: select the multiplicand shifted left by one
    logic one;  // |digit| = 1: select the multiplicand
  } booth_digit_t;

  // Value of a Booth digit as a signed integer (used by checks only).
  function automatic int booth_value(booth_digit_t d);
    int m;
    m = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -m : m;
  endfunction

endpackage

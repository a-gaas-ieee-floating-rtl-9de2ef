// ripple_adder: W-bit ripple-carry adder, the building block of the
// carry-select adders.
//
// A chain of full adders: s = a + b + cin, cout the carry out of the top
// bit. Combinational; the delay grows with W by one full adder carry delay
// per bit, which is the d_carry term of the carry-select delay model.
// A textbook full adder chain; nothing here is specific to this design.
module ripple_adder #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];

endmodule

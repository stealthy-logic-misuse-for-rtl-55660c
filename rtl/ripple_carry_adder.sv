// ripple_carry_adder: WIDTH-bit adder built as a chain of full adders.
//
// Bit i's carry-out is bit i+1's carry-in, so the longest path runs from bit 0
// to the top carry. This is the path an overflow or underflow sensitises; the
// published work names the ripple-carry adder of an ALU as its example.
// Combinational: y = a + b + cin, cout the carry out of the top bit.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 192
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign y[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[WIDTH];

endmodule

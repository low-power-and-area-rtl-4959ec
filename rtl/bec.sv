// bec -- Binary to Excess-1 Converter.
//
// Adds one to its input without a full adder chain: x = b + 1 modulo
// 2^WIDTH. Bit 0 is inverted, and every higher bit i is XORed with the AND of
// all bits below it:
//   X0 = ~B0
//   X1 = B1 ^ B0
//   X2 = B2 ^ (B1 & B0)
//   X3 = B3 ^ (B2 & B1 & B0)
// so 1111 wraps to 0000. This is the 4-bit converter of the design (WIDTH = 4,
// the default); larger widths extend the same pattern, one XOR and one wider
// AND per bit, which is how the carry-select sectors use it at one bit more
// than their sector width. The AND terms are formed as a running prefix
// (one two-input AND per bit); the gate drawing shows them as wide ANDs,
// which compute the same function.
//
// Interface: b (WIDTH bits) -> x (WIDTH bits). Combinational.
module bec #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  // all_ones[i] = AND of b[i-1:0]; all_ones[0] = 1.
  logic [WIDTH-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  assign x[0]        = ~b[0];

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    assign all_ones[i] = all_ones[i-1] & b[i-1];
    assign x[i]        = b[i] ^ all_ones[i];
  end
endmodule

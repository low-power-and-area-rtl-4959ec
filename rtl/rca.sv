// rca -- N-bit ripple carry adder.
//
// A chain of WIDTH full_adder cells. Cell i adds a[i], b[i] and the carry
// from cell i-1; the carry-in of cell 0 is ci and the carry-out of the last
// cell is co. The worst-case delay is (WIDTH-1) carry delays plus one sum
// delay, because every carry waits for the one below it.
//
// Interface: a, b (WIDTH bits), ci -> s (WIDTH bits), co. Combinational.
// The chain structure follows the FA chain of the design; WIDTH defaults to 4,
// the sector width chosen for the 32-bit carry-select adder.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  // c[i] is the carry into bit i; c[WIDTH] is the carry out of the chain.
  logic [WIDTH:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (c[i]),
      .s  (s[i]),
      .co (c[i+1])
    );
  end

  assign co = c[WIDTH];
endmodule

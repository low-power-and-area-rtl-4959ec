// full_adder -- one-bit full adder, the FA cell of the ripple carry chain.
//
// Produces the sum bit and carry-out of operand bits a, b and carry-in ci.
// Purely combinational: s = a ^ b ^ ci, co = majority(a, b, ci).
// The adder uses FA cells as the unit of its ripple chains, with the ports
// A_i, B_i, C_i,i, S_i, C_o,i. The gate-level form (two XORs and an AND-OR
// majority) is the textbook one; the cell's insides are not specified further.
module full_adder (
  input  logic a,   // operand bit A_i
  input  logic b,   // operand bit B_i
  input  logic ci,  // carry-in C_i,i
  output logic s,   // sum bit S_i
  output logic co   // carry-out C_o,i
);
  logic p;  // propagate: a ^ b

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (p & ci);
  end
endmodule

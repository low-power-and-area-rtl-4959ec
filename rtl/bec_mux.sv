// bec_mux -- BEC followed by a 2:1 word multiplexer.
//
// Produces b or b + 1 depending on cin, with no adder in the path: the BEC
// computes b + 1 in parallel, and the multiplexer takes its input "0" from b
// unchanged and its input "1" from the BEC, selected by cin. With the default
// WIDTH = 4 this is the 4-bit BEC with an 8:4 multiplexer of the design.
//
// Interface: b (WIDTH bits), cin -> s (WIDTH bits). Combinational.
module bec_mux #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s
);
  logic [WIDTH-1:0] x;  // BEC output, b + 1

  bec #(.WIDTH(WIDTH)) u_bec (
    .b (b),
    .x (x)
  );

  always_comb begin
    s = cin ? x : b;
  end
endmodule

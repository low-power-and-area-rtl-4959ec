// csla_bec_sector -- one upper sector of the BEC carry-select adder.
//
// A carry-select sector computes its result for both possible incoming
// carries before that carry arrives, and picks one when it does. Here only
// one ripple carry adder is used: it adds a and b with carry-in 0, giving the
// (WIDTH+1)-bit value {c0, s0}. The result for carry-in 1 is that value plus
// one, which a (WIDTH+1)-bit BEC computes from {c0, s0} instead of a second
// RCA. The incoming carry cin drives the multiplexer: 0 passes {c0, s0},
// 1 passes the BEC output. The top bit of the selected word is the sector's
// carry-out, which becomes the select of the next sector.
//
// Replacing the carry-in-1 RCA by a BEC and a multiplexer is the design's
// idea. Making the BEC one bit wider than the sector, so that it also
// produces the carry-out, is this implementation's choice.
//
// Interface: a, b (WIDTH bits), cin -> s (WIDTH bits), co. Combinational;
// the path from cin to s and co is one multiplexer.
module csla_bec_sector #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH-1:0] s0;   // sum assuming carry-in 0
  logic             c0;   // carry-out assuming carry-in 0
  logic [WIDTH:0]   sel;  // selected {carry, sum}

  rca #(.WIDTH(WIDTH)) u_rca (
    .a  (a),
    .b  (b),
    .ci (1'b0),
    .s  (s0),
    .co (c0)
  );

  bec_mux #(.WIDTH(WIDTH + 1)) u_bec_mux (
    .b   ({c0, s0}),
    .cin (cin),
    .s   (sel)
  );

  assign s  = sel[WIDTH-1:0];
  assign co = sel[WIDTH];
endmodule

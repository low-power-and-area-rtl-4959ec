// csla_bec -- 32-bit low-power, area-efficient carry-select adder (CSLA).
//
// Computes {co, s} = a + b + ci. The word is cut into WIDTH/SECTOR sectors
// of SECTOR bits. The least significant sector is a plain ripple carry adder
// fed by ci. Every other sector is a csla_bec_sector: one RCA with carry-in 0,
// whose result is also incremented by a Binary to Excess-1 Converter (BEC),
// and a multiplexer that picks the direct or the incremented result once the
// carry from the sector below is known. A regular CSLA would use a second RCA
// with carry-in 1 for the incremented result; the BEC needs fewer gates.
// After the sectors have settled in parallel, the carry passes from sector to
// sector through one multiplexer each.
//
// Interface: a, b (WIDTH bits), ci -> s (WIDTH bits), co. Combinational, no
// clock or reset. The 32-bit width and the port set (A, B, CI, S, CO) follow
// the design; the sector width of 4 (eight equal sectors) is this
// implementation's choice, matching the 4-bit BEC the design is built around.
// WIDTH must be a multiple of SECTOR.
module csla_bec #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned SECTOR = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  localparam int unsigned NSECT = WIDTH / SECTOR;

  // c[k] is the carry into sector k; c[NSECT] is the adder's carry-out.
  logic [NSECT:0] c;

  assign c[0] = ci;

  // Least significant sector: a single RCA, no selection.
  rca #(.WIDTH(SECTOR)) u_sector0 (
    .a  (a[SECTOR-1:0]),
    .b  (b[SECTOR-1:0]),
    .ci (c[0]),
    .s  (s[SECTOR-1:0]),
    .co (c[1])
  );

  for (genvar k = 1; k < NSECT; k++) begin : g_sector
    csla_bec_sector #(.WIDTH(SECTOR)) u_sector (
      .a   (a[k*SECTOR +: SECTOR]),
      .b   (b[k*SECTOR +: SECTOR]),
      .cin (c[k]),
      .s   (s[k*SECTOR +: SECTOR]),
      .co  (c[k+1])
    );
  end

  assign co = c[NSECT];

  // The sectors must tile the word exactly.
  initial begin
    assert (WIDTH % SECTOR == 0 && NSECT >= 1)
      else $error("csla_bec: WIDTH (%0d) must be a positive multiple of SECTOR (%0d)",
                  WIDTH, SECTOR);
  end
endmodule

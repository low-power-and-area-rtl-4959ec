// tb_csla_bec_sector -- exhaustive self-checking test of one carry-select sector.
//
// At the default sector width of 4 all 512 combinations of a, b and cin are
// applied; {co, s} must equal a + b + cin. The run also counts how often the
// incoming carry selected the incremented (BEC) result and how often that
// increment had to carry out of the sector (a + b = 1111 with cin = 1), and
// fails if either never happened. A watchdog fails the run after 10000 cycles.
module tb_csla_bec_sector;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s;
  logic         cin, co;
  logic clk;
  int   checks = 0, failures = 0;
  int   n_bec_selected = 0, n_bec_carry_out = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  csla_bec_sector dut (.a(a), .b(b), .cin(cin), .s(s), .co(co));

  initial begin : stimulus
    logic [W:0] expected;
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {cin, a, b} = (2*W+1)'(v);
      @(posedge clk);
      expected = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      checks++;
      if ({co, s} !== expected) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0b: got %0d expected %0d", a, b, cin, {co, s}, expected);
      end
      if (cin) n_bec_selected++;
      if (cin && (W'(a + b) == '1)) n_bec_carry_out++;
    end
    $display("BEC result selected %0d times, BEC carried out %0d times", n_bec_selected, n_bec_carry_out);
    checks++;
    if (n_bec_selected == 0 || n_bec_carry_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rca -- exhaustive self-checking test of the ripple carry adder.
//
// At the default WIDTH of 4 every combination of a, b and ci (512 in all) is
// applied, one per cycle of a pacing clock, and {co, s} is compared with the
// integer sum a + b + ci. A second instance at WIDTH 9 is checked with random
// operands plus the full carry-ripple case (all ones plus carry-in), so the
// chain is also exercised at a width that is not a power of two.
// A watchdog fails the run after 10000 cycles.
module tb_rca;
  localparam int unsigned W  = 4;
  localparam int unsigned W2 = 9;

  logic [W-1:0]  a, b, s;
  logic          ci, co;
  logic [W2-1:0] a2, b2, s2;
  logic          ci2, co2;
  logic clk;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  rca dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  rca #(.WIDTH(W2)) dut9 (.a(a2), .b(b2), .ci(ci2), .s(s2), .co(co2));

  task automatic check9();
    logic [W2:0] expected;
    @(posedge clk);
    expected = (W2+1)'(a2) + (W2+1)'(b2) + (W2+1)'(ci2);
    checks++;
    if ({co2, s2} !== expected) begin
      failures++;
      $display("FAIL W=9 a=%0d b=%0d ci=%0b: got %0d expected %0d", a2, b2, ci2, {co2, s2}, expected);
    end
  endtask

  initial begin : stimulus
    logic [W:0] expected;
    a2 = '0; b2 = '0; ci2 = 1'b0;
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {a, b, ci} = (2*W+1)'(v);
      @(posedge clk);
      expected = (W+1)'(a) + (W+1)'(b) + (W+1)'(ci);
      checks++;
      if ({co, s} !== expected) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0b: got %0d expected %0d", a, b, ci, {co, s}, expected);
      end
    end
    // Carry ripples through all nine cells.
    a2 = '1; b2 = '0; ci2 = 1'b1;
    check9();
    for (int n = 0; n < 500; n++) begin
      a2 = W2'($urandom); b2 = W2'($urandom); ci2 = 1'($urandom);
      check9();
    end
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

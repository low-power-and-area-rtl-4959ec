// tb_full_adder -- exhaustive self-checking test of the one-bit full adder.
//
// Applies all eight combinations of a, b and ci, one per clock of a local
// pacing clock, and compares s and co with the integer sum a + b + ci.
// A watchdog ends the run as failed if it has not finished in 1000 cycles.
module tb_full_adder;
  logic a, b, ci, s, co;
  logic clk;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : stimulus
    logic [1:0] expected;
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      @(posedge clk);
      expected = 2'(a) + 2'(b) + 2'(ci);
      checks++;
      if ({co, s} !== expected) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b: got co=%0b s=%0b, expected %02b", a, b, ci, co, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

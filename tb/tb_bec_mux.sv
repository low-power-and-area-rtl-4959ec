// tb_bec_mux -- exhaustive self-checking test of the BEC with its multiplexer.
//
// Applies all 16 values of b with cin = 0 and cin = 1 and expects b itself
// when cin is 0 and b + 1 (modulo 16) when cin is 1.
// A watchdog fails the run after 1000 cycles.
module tb_bec_mux;
  logic [3:0] b, s;
  logic       cin;
  logic clk;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  bec_mux dut (.b(b), .cin(cin), .s(s));

  initial begin : stimulus
    logic [3:0] expected;
    for (int v = 0; v < 32; v++) begin
      {cin, b} = 5'(v);
      @(posedge clk);
      expected = cin ? 4'(b + 4'd1) : b;
      checks++;
      if (s !== expected) begin
        failures++;
        $display("FAIL b=%04b cin=%0b: got %04b expected %04b", b, cin, s, expected);
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

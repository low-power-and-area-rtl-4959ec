// tb_bec -- self-checking test of the Binary to Excess-1 Converter.
//
// First the four rows of the converter's truth table that fix its behaviour
// at both ends (0000 -> 0001, 0001 -> 0010, 1110 -> 1111, 1111 -> 0000) are
// checked against literal values; then all 16 inputs of the 4-bit converter
// and all 32 inputs of a 5-bit instance (the width the carry-select sectors
// use) are compared with b + 1 modulo 2^WIDTH.
// A watchdog fails the run after 1000 cycles.
module tb_bec;
  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  logic clk;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  bec dut (.b(b4), .x(x4));
  bec #(.WIDTH(5)) dut5 (.b(b5), .x(x5));

  task automatic check4(input logic [3:0] in, input logic [3:0] expected);
    b4 = in;
    @(posedge clk);
    checks++;
    if (x4 !== expected) begin
      failures++;
      $display("FAIL 4-bit B=%04b: got X=%04b expected %04b", in, x4, expected);
    end
  endtask

  initial begin : stimulus
    b5 = '0;
    // Truth-table rows, written out.
    check4(4'b0000, 4'b0001);
    check4(4'b0001, 4'b0010);
    check4(4'b1110, 4'b1111);
    check4(4'b1111, 4'b0000);
    // Every input, against the arithmetic increment.
    for (int v = 0; v < 16; v++) check4(4'(v), 4'(v + 1));
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v);
      @(posedge clk);
      checks++;
      if (x5 !== 5'(v + 1)) begin
        failures++;
        $display("FAIL 5-bit B=%05b: got X=%05b expected %05b", b5, x5, 5'(v + 1));
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

// tb_csla_bec -- end-to-end self-checking test of the 32-bit BEC carry-select
// adder at its default parameters (WIDTH 32, sectors of 4 bits).
//
// Stimulus, one addition per cycle of a pacing clock:
//   * the operand pairs of the reference simulation waveform (carry-in 0),
//     read both as decimal and as hexadecimal numbers, since both readings
//     add up the same way;
//   * directed corner cases: zero, all ones, a carry that ripples through
//     every sector (a = ~b with carry-in 1), carry-out alone;
//   * 20000 random operand pairs and carry-ins.
// Every result {co, s} is compared with the 33-bit integer sum a + b + ci,
// and the carry each upper sector's multiplexer receives is compared with the
// carry out of the bits below it, computed from the operands.
//
// Mechanism coverage: for every upper sector the test counts how often the
// incoming carry selected the BEC (incremented) result and how often it
// selected the direct RCA result, how often a carry crossed every sector,
// and how often the adder carried out. Each count that stays at zero is a
// failure. A watchdog fails the run after 100000 cycles.
module tb_csla_bec;
  localparam int unsigned WIDTH  = 32;
  localparam int unsigned SECTOR = 4;
  localparam int unsigned NSECT  = WIDTH / SECTOR;

  logic [WIDTH-1:0] a, b, s;
  logic             ci, co;
  logic clk;
  int   checks = 0, failures = 0;

  int n_bec_sel  [NSECT];
  int n_direct_sel [NSECT];
  int n_full_ripple = 0;
  int n_carry_out   = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  csla_bec dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  task automatic add_check(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y,
                           input logic cin);
    logic [WIDTH:0] expected;
    logic [WIDTH:0] sum_no_cin;
    a = x; b = y; ci = cin;
    @(posedge clk);
    expected = (WIDTH+1)'(x) + (WIDTH+1)'(y) + (WIDTH+1)'(cin);
    checks++;
    if ({co, s} !== expected) begin
      failures++;
      $display("FAIL a=%08h b=%08h ci=%0b: got %09h expected %09h", x, y, cin, {co, s}, expected);
    end
    // Carry into each upper sector, worked out from the operands alone, and
    // compared with the select the sector's multiplexer actually received.
    for (int k = 1; k < NSECT; k++) begin
      logic [63:0] mask;
      logic [63:0] low;
      mask = (64'd1 << (k*SECTOR)) - 64'd1;
      low  = (64'(x) & mask) + (64'(y) & mask) + 64'(cin);
      checks++;
      if (dut.c[k] !== low[k*SECTOR]) begin
        failures++;
        $display("FAIL a=%08h b=%08h ci=%0b: carry into sector %0d is %0b, expected %0b",
                 x, y, cin, k, dut.c[k], low[k*SECTOR]);
      end
      if (low[k*SECTOR]) n_bec_sel[k]++;
      else               n_direct_sel[k]++;
    end
    sum_no_cin = (WIDTH+1)'(x) + (WIDTH+1)'(y);
    if (cin && sum_no_cin == (WIDTH+1)'({WIDTH{1'b1}})) n_full_ripple++;
    if (expected[WIDTH]) n_carry_out++;
  endtask

  // Operand pairs of the reference waveform and their printed sums.
  task automatic waveform_check(input int x, input int y, input int sum);
    checks++;
    if (x + y != sum) begin
      failures++;
      $display("FAIL waveform table entry %0d + %0d != %0d", x, y, sum);
    end
    add_check(WIDTH'(x), WIDTH'(y), 1'b0);
  endtask

  initial begin : stimulus
    static int waveform [7][3] = '{'{20, 30, 50}, '{40, 30, 70}, '{40, 56, 96},
                            '{3333, 56, 3389}, '{3333, 2222, 5555},
                            '{1111, 2222, 3333}, '{1111, 4444, 5555}};
    static int hx [7][3] = '{'{'h20, 'h30, 'h50}, '{'h40, 'h30, 'h70}, '{'h40, 'h56, 'h96},
                      '{'h3333, 'h56, 'h3389}, '{'h3333, 'h2222, 'h5555},
                      '{'h1111, 'h2222, 'h3333}, '{'h1111, 'h4444, 'h5555}};
    for (int k = 0; k < NSECT; k++) begin
      n_bec_sel[k] = 0;
      n_direct_sel[k] = 0;
    end

    foreach (waveform[i]) waveform_check(waveform[i][0], waveform[i][1], waveform[i][2]);
    foreach (hx[i])       waveform_check(hx[i][0], hx[i][1], hx[i][2]);

    add_check('0, '0, 1'b0);
    add_check('0, '0, 1'b1);
    add_check('1, '1, 1'b0);
    add_check('1, '1, 1'b1);
    add_check('1, '0, 1'b1);                  // carry crosses every sector
    add_check(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    add_check(32'h8000_0000, 32'h8000_0000, 1'b0);  // carry-out only
    for (int k = 1; k < NSECT; k++) begin
      // Low sectors all ones plus carry-in: the carry reaches sector k exactly.
      add_check(WIDTH'((64'd1 << (k*SECTOR)) - 1), '0, 1'b1);
    end

    for (int n = 0; n < 20000; n++) begin
      add_check($urandom, $urandom, 1'($urandom));
    end

    for (int k = 1; k < NSECT; k++) begin
      $display("sector %0d: BEC result selected %0d times, direct result %0d times",
               k, n_bec_sel[k], n_direct_sel[k]);
      checks++;
      if (n_bec_sel[k] == 0 || n_direct_sel[k] == 0) begin
        failures++;
        $display("FAIL sector %0d did not see both selections", k);
      end
    end
    $display("carry through all sectors: %0d, carry-out: %0d", n_full_ripple, n_carry_out);
    checks += 2;
    if (n_full_ripple == 0) failures++;
    if (n_carry_out == 0)   failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

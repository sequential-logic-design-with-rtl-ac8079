// tb_lab2_full: the display at its default size, driven like a real button.
//
// lab2 is built with no parameter overrides: ID A00123456 and a 20 ms
// debounce window (1,000,000 cycles of the 50 MHz clock). The buttons are
// worked through the demonstration routine: hold reset_n, press and release
// clock_in once (first digit), let go of reset_n, three more presses; hold
// reset_n, one press; let go, eleven presses, which run through all digits and
// start over because the ID ends in an even digit. Each press and release
// bounces for about 1 ms and is held for 25 ms, so the run covers about
// 0.8 s of board time. After each release the display must not change within
// the 20 ms window and must show the expected digit 20 ms + 2 cycles after
// the last bounce. Expected digits come from the position sequence and the ID
// written out here, and the segments from an independent table of lit
// segments.
module tb_lab2_full;
  localparam int unsigned WINDOW = 1_000_000;   // cycles, matches the default
  localparam int unsigned HOLD   = 1_250_000;   // 25 ms

  int checks = 0, failures = 0;

  logic clock50 = 1'b0, clock_in = 1'b1, reset_n = 1'b1;
  logic [6:0] seg;

  lab2 dut (
    .clock50(clock50), .clock_in(clock_in), .reset_n(reset_n),
    .a(seg[6]), .b(seg[5]), .c(seg[4]), .d(seg[3]), .e(seg[2]), .f(seg[1]), .g(seg[0]));

  always #10 clock50 = ~clock50;   // 50 MHz, one cycle per 20 time units

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  int id_digits [8] = '{0, 0, 1, 2, 3, 4, 5, 6};

  function automatic logic [6:0] pattern(input int digit);
    logic [6:0] p = 7'h7f;
    for (int i = 0; i < lit[digit].len(); i++)
      p[6 - (lit[digit][i] - "a")] = 1'b0;
    return p;
  endfunction

  initial begin
    repeat (60_000_000) @(posedge clock50);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (seg=%h)", what, seg);
    end
  endtask

  task automatic button(input logic level, input int hold_cycles);
    for (int i = 0; i < 4; i++) begin
      @(negedge clock50) clock_in = level;
      repeat (1000 + $urandom % 10000) @(negedge clock50);
      clock_in = ~level;
      repeat (1000 + $urandom % 10000) @(negedge clock50);
    end
    @(negedge clock50) clock_in = level;
    repeat (hold_cycles) @(negedge clock50);
  endtask

  int pos = 0;
  int presses = 0;

  // One press and release of clock_in, with reset_n at the given level.
  task automatic step(input logic rst_n);
    logic [6:0] prev_seg;
    reset_n = rst_n;
    button(1'b0, HOLD);
    prev_seg = seg;
    button(1'b1, WINDOW);
    check("no change inside the debounce window", seg == prev_seg);
    repeat (2) @(negedge clock50);
    pos = !rst_n ? 0 : (pos == 7 ? 0 : pos + 1);
    presses++;
    check($sformatf("press %0d shows digit %0d", presses, id_digits[pos]),
          seg == pattern(id_digits[pos]));
    repeat (HOLD - WINDOW) @(negedge clock50);
  endtask

  initial begin
    repeat (WINDOW + 10) @(negedge clock50);
    step(1'b0);                                  // reset: first digit
    repeat (3)  step(1'b1);
    step(1'b0);                                  // reset again
    repeat (11) step(1'b1);                      // all digits, then start over
    reset_n = 1'b1;
    check("sequence started over after the last digit", pos == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

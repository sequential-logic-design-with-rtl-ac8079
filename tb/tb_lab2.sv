// tb_lab2: end-to-end run of the ID display, two IDs side by side.
//
// Two displays share the buttons: one for ID A00123456 (ends in an even
// digit, so it starts over after the last digit) and one for A01234567 (ends
// odd, so it stays on the last digit). The debounce window is cut to 8
// cycles of the 50 MHz clock so the run is short.
//
// Buttons are modelled as on the board: pulled up, so pressed = 0 and the
// register clock rises when clock_in is released. Every press and release
// bounces a few times. reset_n is held low across the first two releases and
// the sixth, then kept high for twelve more: the digits expected after each
// release are the example sequences the display is specified with
//   A00123456: 0 0 0 1 2 0 0 1 2 3 4 5 6 0 0 1 2 3
//   A01234567: 0 0 1 2 3 0 1 2 3 4 5 6 7 7 7 7 7 7
// The segments are compared with an independent table of lit segments.
// After each release the display must not change before the window ends and
// must have changed STABLE + 2 clock cycles after the last bounce. Each
// mechanism (reset, step, restart after last digit, stay on last digit,
// bounce rejected) is counted and must occur at least once.
module tb_lab2;
  localparam int unsigned STABLE = 8;
  localparam int NPRESS = 18;

  int checks = 0, failures = 0;
  int n_reset = 0, n_step = 0, n_wrap = 0, n_hold = 0, n_bounce = 0;

  logic clock50 = 1'b0, clock_in = 1'b1, reset_n = 1'b1;
  logic [6:0] seg_a, seg_b;

  lab2 #(.ID(32'h0012_3456), .STABLE_CYCLES(STABLE)) dut_a (
    .clock50(clock50), .clock_in(clock_in), .reset_n(reset_n),
    .a(seg_a[6]), .b(seg_a[5]), .c(seg_a[4]), .d(seg_a[3]), .e(seg_a[2]), .f(seg_a[1]), .g(seg_a[0]));
  lab2 #(.ID(32'h0123_4567), .STABLE_CYCLES(STABLE)) dut_b (
    .clock50(clock50), .clock_in(clock_in), .reset_n(reset_n),
    .a(seg_b[6]), .b(seg_b[5]), .c(seg_b[4]), .d(seg_b[3]), .e(seg_b[2]), .f(seg_b[1]), .g(seg_b[0]));

  always #10 clock50 = ~clock50;   // 50 MHz, one cycle per 20 time units

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  function automatic logic [6:0] pattern(input int digit);
    logic [6:0] p = 7'h7f;
    for (int i = 0; i < lit[digit].len(); i++)
      p[6 - (lit[digit][i] - "a")] = 1'b0;
    return p;
  endfunction

  bit rst_at   [NPRESS] = '{1,1,0,0,0,1,0,0,0,0,0,0,0,0,0,0,0,0};
  int exp_a    [NPRESS] = '{0,0,0,1,2,0,0,1,2,3,4,5,6,0,0,1,2,3};
  int exp_b    [NPRESS] = '{0,0,1,2,3,0,1,2,3,4,5,6,7,7,7,7,7,7};
  // Position of each display after each release, for counting mechanisms.
  int pos_a    [NPRESS] = '{0,0,1,2,3,0,1,2,3,4,5,6,7,0,1,2,3,4};

  initial begin
    repeat (200_000) @(posedge clock50);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (a=%h b=%h)", what, seg_a, seg_b);
    end
  endtask

  // Move the button to a level, bouncing on the way, then hold it long
  // enough for the debouncer. Returns once the last bounce has settled.
  task automatic button(input logic level, input int hold_cycles);
    int bounces = 1 + $urandom % 4;
    for (int i = 0; i < bounces; i++) begin
      @(negedge clock50) clock_in = level;
      repeat (1 + $urandom % (STABLE - 2)) @(negedge clock50);
      clock_in = ~level;
      repeat (1 + $urandom % (STABLE - 2)) @(negedge clock50);
      n_bounce++;
    end
    @(negedge clock50) clock_in = level;
    repeat (hold_cycles) @(negedge clock50);
  endtask

  initial begin
    logic [6:0] before_a, before_b;
    repeat (3 * STABLE) @(negedge clock50);   // debouncer settles, button up

    for (int k = 0; k < NPRESS; k++) begin
      reset_n = ~rst_at[k];
      button(1'b0, 2 * STABLE);               // press, display must not move
      before_a = seg_a;
      before_b = seg_b;
      button(1'b1, STABLE);                   // release: STABLE cycles later
      check($sformatf("release %0d: no change inside window", k),
            seg_a == before_a && seg_b == before_b);
      @(negedge clock50);                     // STABLE+1 edges after release
      check($sformatf("release %0d: no change before STABLE+2", k),
            seg_a == before_a && seg_b == before_b);
      @(negedge clock50);                     // STABLE+2 edges: updated
      check($sformatf("release %0d: ID A00123456 shows %0d", k, exp_a[k]),
            seg_a == pattern(exp_a[k]));
      check($sformatf("release %0d: ID A01234567 shows %0d", k, exp_b[k]),
            seg_b == pattern(exp_b[k]));
      if (rst_at[k]) n_reset++;
      else if (k > 0 && pos_a[k] == 0 && pos_a[k-1] == 7) n_wrap++;
      else n_step++;
      if (!rst_at[k] && exp_b[k] == 7 && k > 0 && exp_b[k-1] == 7) n_hold++;
      repeat (STABLE) @(negedge clock50);
      reset_n = 1'b1;
    end

    $display("mechanisms: reset=%0d step=%0d restart=%0d stay_on_last=%0d bounces=%0d",
             n_reset, n_step, n_wrap, n_hold, n_bounce);
    check("reset happened", n_reset > 0);
    check("step happened", n_step > 0);
    check("restart after last digit happened", n_wrap > 0);
    check("stay on last digit happened", n_hold > 0);
    check("bounces injected", n_bounce > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

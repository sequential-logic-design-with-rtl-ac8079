// tb_debounce: the pushbutton debouncer, with a short window.
//
// STABLE_CYCLES is set to 16 so the run is short. Checked:
//   - a clean change of sw_in reaches sw at exactly the 18th (16 + 2) rising
//     clk edge after it, in both directions;
//   - a bouncing press (level flipping with gaps below 16 cycles) gives one
//     clean change, 18 edges after the last bounce;
//   - a pulse of 15 cycles is swallowed, one of 16 cycles gets through;
//   - sw never changes at any other time (monitored on every edge).
module tb_debounce;
  localparam int unsigned N = 16;

  int checks = 0, failures = 0;

  logic clk = 1'b0, sw_in = 1'b1, sw;
  int   edges_since_input = 0;  // rising clk edges since sw_in last changed
  int   sw_changes = 0;
  int   last_latency = -1;
  logic sw_prev;

  debounce #(.STABLE_CYCLES(N)) dut (.sw_in(sw_in), .clk(clk), .sw(sw));

  always #10 clk = ~clk;   // the 50 MHz clock, one cycle per 20 time units

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    edges_since_input <= edges_since_input + 1;
    #1;
    if (sw !== sw_prev) begin
      sw_changes++;
      last_latency = edges_since_input;
    end
    sw_prev = sw;
  end

  task automatic set_input(input logic v);
    @(negedge clk);
    sw_in = v;
    edges_since_input = 0;
  endtask

  task automatic wait_edges(input int n);
    repeat (n) @(posedge clk);
    #2;
  endtask

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (sw=%0b changes=%0d latency=%0d)", what, sw, sw_changes, last_latency);
    end
  endtask

  initial begin
    // Settle from the random power-up state with the button released (high).
    wait_edges(3 * N);
    check("settles to released level", sw == 1'b1);
    sw_prev = sw;
    sw_changes = 0;

    // Clean press.
    set_input(1'b0);
    wait_edges(N + 1);
    check("no change before the window ends", sw == 1'b1 && sw_changes == 0);
    wait_edges(1);
    check("clean press seen", sw == 1'b0 && sw_changes == 1);
    check("clean press latency N+2", last_latency == N + 2);

    // Bouncing release: flips with gaps of 3..N-1 cycles, then stays high.
    sw_changes = 0;
    for (int i = 0; i < 10; i++) begin
      set_input(~sw_in);
      repeat (3 + ($urandom % (N - 4))) @(posedge clk);
    end
    set_input(1'b1);
    wait_edges(N + 1);
    check("bounces ignored", sw == 1'b0 && sw_changes == 0);
    wait_edges(1);
    check("bouncing release gives one change", sw == 1'b1 && sw_changes == 1);
    check("release latency N+2 after last bounce", last_latency == N + 2);

    // A glitch one cycle too short is swallowed.
    sw_changes = 0;
    set_input(1'b0);
    repeat (N - 1) @(negedge clk);
    sw_in = 1'b1;
    edges_since_input = 0;
    wait_edges(3 * N);
    check("short pulse swallowed", sw == 1'b1 && sw_changes == 0);

    // A pulse of exactly N cycles passes, and comes back after it.
    set_input(1'b0);
    repeat (N) @(negedge clk);
    sw_in = 1'b1;
    edges_since_input = 0;
    wait_edges(3 * N);
    check("pulse of N cycles passes", sw == 1'b1 && sw_changes == 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

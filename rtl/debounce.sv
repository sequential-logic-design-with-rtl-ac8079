// debounce: removes contact bounce from a pushbutton level.
//
// The raw switch level sw_in is brought into the clk domain (50 MHz on the
// board) through two flip-flops, then compared with the debounced output sw.
// While they differ a counter runs; any bounce back to the old level clears
// it. Only when the new level has been seen for STABLE_CYCLES consecutive clk
// cycles does sw take it. Timing: a clean change of sw_in shows on sw at the
// (STABLE_CYCLES + 2)-th rising clk edge after it; a pulse or gap shorter
// than STABLE_CYCLES cycles never reaches sw.
//
// The design only requires that the button be debounced and fixes the port
// order (switch input, 50 MHz clock, debounced output); the counting scheme
// and the 20 ms window (STABLE_CYCLES = 1,000,000 at 50 MHz) are this
// design's own. The module has no reset, like the button it serves: whatever
// its power-up state, sw settles to the button level within STABLE_CYCLES + 2
// cycles of a steady input.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 1_000_000
) (
  input  logic sw_in,
  input  logic clk,
  output logic sw
);

  localparam int unsigned CNT_W = $clog2(STABLE_CYCLES + 1);

  logic [1:0]       sync;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    sync <= {sync[0], sw_in};
    if (sync[1] == sw) begin
      count <= '0;
    end else if (count >= CNT_W'(STABLE_CYCLES - 1)) begin
      sw    <= sync[1];
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule

// lab2: steps a seven-segment display through the digits of an ID number.
//
// Each release of the clock_in pushbutton shows the next of the eight digits
// of ID. Holding reset_n low (active low, level sensitive) while releasing
// clock_in shows the first digit. After the last digit the display starts
// over at the first digit when the ID ends in an even digit, and stays on the
// last digit when it ends in an odd one.
//
// Structure, as specified:
//   debounce          cleans clock_in, sampled by the 50 MHz clock50, giving
//                     the register clock `clock` (rising edge = button release
//                     with the board's pull-up wiring);
//   next_position     0 on reset, else position + 1 with the wrap rule;
//   position_register 3-bit position, clocked by `clock`;
//   digit_segments    position -> ID digit -> active-low segments a..g.
// Timing: the segment outputs are combinational from the position register,
// so they change right after each rising edge of `clock`, which follows a
// clean release of clock_in by STABLE_CYCLES + 2 clock50 cycles. reset_n is not debounced: it is only sampled at that edge.
//
// The ID and the debounce window are parameters; their defaults (the example
// ID A00123456 and a 20 ms window) are this design's choices.
module lab2
  import lab2_pkg::*;
#(
  parameter id_t         ID            = 32'h0012_3456,
  parameter int unsigned STABLE_CYCLES = 1_000_000
) (
  input  logic clock50,   // 50 MHz board oscillator
  input  logic clock_in,  // pushbutton that advances the display
  input  logic reset_n,   // pushbutton, low = go back to the first digit
  output logic a, b, c, d, e, f, g  // active-low LED segments
);

  // An even last digit restarts the sequence, an odd one holds it.
  localparam bit WRAP_TO_FIRST = (ID[0] == 1'b0);

  logic clock;
  pos_t pos, pos_next;
  seg_t seg;

  debounce #(.STABLE_CYCLES(STABLE_CYCLES)) debounce0 (
    .sw_in (clock_in),
    .clk   (clock50),
    .sw    (clock)
  );

  next_position #(.WRAP_TO_FIRST(WRAP_TO_FIRST)) u_next (
    .pos      (pos),
    .reset_n  (reset_n),
    .pos_next (pos_next)
  );

  position_register #(.POS_W(POS_W)) u_pos (
    .clock (clock),
    .d     (pos_next),
    .q     (pos)
  );

  digit_segments #(.ID(ID)) u_segs (
    .pos (pos),
    .seg (seg)
  );

  assign {a, b, c, d, e, f, g} = seg;

endmodule

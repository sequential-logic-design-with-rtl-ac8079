// next_position: combinational next-digit-position logic.
//
// Given the position now on the display and the active-low reset_n button,
// it returns the position to load at the next rising edge of the debounced
// clock:
//   reset_n low              -> 0 (first digit)
//   position below 7         -> position + 1
//   position 7, even ID end  -> 0 (start over)      WRAP_TO_FIRST = 1
//   position 7, odd ID end   -> 7 (stay on last)    WRAP_TO_FIRST = 0
// The structure follows the specified circuit: an incrementer, a compare with
// the last position selecting the wrap value, then a reset mux in front of the
// register. Purely combinational, no clock. Whether the ID ends in an even or
// odd digit is fixed when the design is built, so it is a parameter here; the
// top derives it from the ID.
module next_position
  import lab2_pkg::*;
#(
  parameter bit WRAP_TO_FIRST = 1'b1
) (
  input  pos_t pos,
  input  logic reset_n,
  output pos_t pos_next
);

  localparam pos_t LAST_POS  = pos_t'(NUM_DIGITS - 1);
  localparam pos_t WRAP_POS  = WRAP_TO_FIRST ? '0 : LAST_POS;

  pos_t advanced;

  always_comb begin
    advanced = (pos == LAST_POS) ? WRAP_POS : pos_t'(pos + 1'b1);
    pos_next = reset_n ? advanced : '0;
  end

endmodule

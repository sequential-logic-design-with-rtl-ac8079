// position_register: the register holding the digit position on display.
//
// A plain POS_W-bit D register (3 bits for positions 0..7) loaded on every
// rising edge of `clock`, which in the design is the debounced pushbutton, so
// the position moves once each time the button is released. It has no reset
// of its own: resetting is done synchronously by the next-position logic,
// which presents 0 while reset_n is held. Its power-up value is therefore
// undefined until the first clock; every 3-bit value is a legal position.
module position_register #(
  parameter int unsigned POS_W = 3
) (
  input  logic             clock,
  input  logic [POS_W-1:0] d,
  output logic [POS_W-1:0] q
);

  always_ff @(posedge clock)
    q <= d;

endmodule

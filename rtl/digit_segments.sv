// digit_segments: position -> ID digit -> active-low segment pattern.
//
// Combinational lookup for the seven-segment outputs. The ID is a parameter
// of eight BCD digits with the first digit in the top nibble (32'h00123456 for
// the ID A00123456). The digit at the given position is picked out of it and
// translated with the standard active-low table (bit 6 = segment a, bit 0 =
// segment g, a cleared bit lights the segment). A synthesis tool folds both
// steps into one 8-entry, 7-bit constant table. The default ID is one of the
// two example IDs the display is specified with.
module digit_segments
  import lab2_pkg::*;
#(
  parameter id_t ID = 32'h0012_3456
) (
  input  pos_t pos,
  output seg_t seg
);

  always_comb seg = seg7(id_digit(ID, pos));

endmodule

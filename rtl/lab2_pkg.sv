// lab2_pkg: types and constants shared by the ID-digit display.
//
// The display steps through the eight digits of an ID number, one digit per
// press of a pushbutton. A digit position is 3 bits (positions 0..7); the ID
// is held as eight packed BCD digits, first digit in the top nibble. Segment
// patterns are active low and ordered a..g from bit 6 down to bit 0, so a
// cleared bit lights a segment.
//
// The segment codes for 0..9 are the ones the design is specified with. The
// blank pattern for codes 10..15 is this design's own choice: an ID never holds
// them, so the decoder turns every segment off.
package lab2_pkg;

  localparam int unsigned NUM_DIGITS = 8;
  localparam int unsigned POS_W      = 3;

  typedef logic [POS_W-1:0] pos_t;   // digit position, 0 = first digit
  typedef logic [3:0]       bcd_t;   // one decimal digit
  typedef logic [6:0]       seg_t;   // active-low a..g, a = bit 6
  typedef logic [4*NUM_DIGITS-1:0] id_t;  // eight BCD digits, first in [31:28]

  localparam seg_t SEG_BLANK = 7'h7f;

  // Active-low seven-segment pattern for one decimal digit.
  function automatic seg_t seg7(input bcd_t digit);
    unique case (digit)
      4'd0:    return 7'h01;
      4'd1:    return 7'h4f;
      4'd2:    return 7'h12;
      4'd3:    return 7'h06;
      4'd4:    return 7'h4c;
      4'd5:    return 7'h24;
      4'd6:    return 7'h20;
      4'd7:    return 7'h0f;
      4'd8:    return 7'h00;
      4'd9:    return 7'h04;
      default: return SEG_BLANK;
    endcase
  endfunction

  // Digit of the ID at a position; position 0 is the most significant nibble.
  function automatic bcd_t id_digit(input id_t id, input pos_t pos);
    return id[4*(NUM_DIGITS-1-int'(pos)) +: 4];
  endfunction

endpackage

// display_driver: six-digit seven-segment decoder for HEX5..HEX0.
//
// Each 4-bit code is decoded on its own: 0-9 give the decimal digit, 10 gives
// a minus sign and 11-15 blank the digit. Segments are active low, with
// segment a in bit 6 down to segment g in bit 0, the order the unit characters
// of the multimeter use. The minus and blank codes are this design's
// additions; they let the top show the sign of the reading on HEX5.
// Purely combinational, no clock.
module display_driver
  import dmm_pkg::*;
(
  input  logic [NDIG-1:0][3:0] digit,
  output seg_t [NDIG-1:0]      seg
);

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      seg[i] = seg_of(digit[i]);
    end
  end

endmodule

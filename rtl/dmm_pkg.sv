// dmm_pkg: types and constants shared by the multimeter logic.
//
// The controller steps through three states whose two-bit codes are fixed
// (ACQUIRE = 00, TIMING = 01, CONVERSION = 10). Each meter has a three-bit
// mode code; voltmeter (000) and ammeter (001) codes and their unit
// characters are the ones the multimeter's firmware used, the ohmmeter, beta
// meter and "no meter" codes are this design's choice.
//
// Seven-segment patterns are active low and packed with segment a in bit 6
// down to segment g in bit 0. That order is the one under which the unit
// codes 10000101110010 ("dc") and 11010100001000 ("nA") spell their letters.
package dmm_pkg;

  // ADC result width (AD976: 16-bit two's complement)
  localparam int unsigned ADC_W   = 16;
  // Width of a displayed reading (unsigned magnitude)
  localparam int unsigned VALUE_W = 16;
  // Number of numeric display digits (BCD5..BCD0)
  localparam int unsigned NDIG    = 6;

  typedef enum logic [1:0] {
    ST_ACQUIRE    = 2'b00,
    ST_TIMING     = 2'b01,
    ST_CONVERSION = 2'b10
  } state_e;

  typedef enum logic [2:0] {
    MODE_VOLT = 3'b000,
    MODE_AMP  = 3'b001,
    MODE_OHM  = 3'b010,
    MODE_BETA = 3'b011,
    MODE_NONE = 3'b111
  } mode_e;

  // Meter select switches, one per meter
  typedef struct packed {
    logic beta;
    logic ohm;
    logic amp;
    logic volt;
  } meter_sel_t;

  // Reed relay drive, two bits per meter: 01 = meter connected, 00 = open
  typedef struct packed {
    logic [1:0] b;
    logic [1:0] o;
    logic [1:0] a;
    logic [1:0] v;
  } relay_t;

  localparam logic [1:0] RELAY_ON  = 2'b01;
  localparam logic [1:0] RELAY_OFF = 2'b00;

  typedef logic [6:0] seg_t;

  // Characters, active low, bit 6 = a ... bit 0 = g
  localparam seg_t SEG_BLANK = 7'b1111111;
  localparam seg_t SEG_MINUS = 7'b1111110;
  localparam seg_t SEG_d     = 7'b1000010;
  localparam seg_t SEG_c     = 7'b1110010;
  localparam seg_t SEG_n     = 7'b1101010;
  localparam seg_t SEG_A     = 7'b0001000;
  localparam seg_t SEG_o     = 7'b1100010;
  localparam seg_t SEG_h     = 7'b1101000;
  localparam seg_t SEG_b     = 7'b1100000;
  localparam seg_t SEG_E     = 7'b0110000;

  // Unit shown on the two leftmost digits
  localparam logic [13:0] UNIT_VOLT  = {SEG_d, SEG_c};       // "dc"
  localparam logic [13:0] UNIT_AMP   = {SEG_n, SEG_A};       // "nA" (mA)
  localparam logic [13:0] UNIT_OHM   = {SEG_o, SEG_h};       // "oh"
  localparam logic [13:0] UNIT_BETA  = {SEG_b, SEG_E};       // "bE"
  localparam logic [13:0] UNIT_BLANK = {SEG_BLANK, SEG_BLANK};

  // Digit codes understood by the display driver besides 0..9
  localparam logic [3:0] DIG_MINUS = 4'd10;
  localparam logic [3:0] DIG_BLANK = 4'd15;

  // Segment pattern of a digit code: 0-9, minus, anything else blank
  function automatic seg_t seg_of(input logic [3:0] d);
    case (d)
      4'd0:    return 7'b0000001;
      4'd1:    return 7'b1001111;
      4'd2:    return 7'b0010010;
      4'd3:    return 7'b0000110;
      4'd4:    return 7'b1001100;
      4'd5:    return 7'b0100100;
      4'd6:    return 7'b0100000;
      4'd7:    return 7'b0001111;
      4'd8:    return 7'b0000000;
      4'd9:    return 7'b0000100;
      4'd10:   return SEG_MINUS;
      default: return SEG_BLANK;
    endcase
  endfunction

endpackage

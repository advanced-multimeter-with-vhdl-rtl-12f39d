// meter_convert: turns a signed ADC code into the reading of the selected meter.
//
// For the meter picked by the switches, the two's complement code is
// multiplied by a per-meter factor, divided by 100 (truncating toward zero),
// and a per-meter offset is subtracted: reading = code*INC/100 - OFFSET.
// The result is split into a negative flag and a magnitude, which is an
// integer in the meter's display unit; the decimal point is placed later by
// the BCD stage. The same lookup also gives the mode code, the two unit
// characters and the reed relay drive (01 for the selected meter, 00 for the
// rest). This multiply / divide-by-100 / subtract-offset scheme and the
// voltmeter and ammeter codes are those of the original firmware.
//
// The factors are this design's derivation, since only their role is known:
//   voltmeter  mV:     220/220 ohm divider, 20 V / 2^15 = 0.61035 mV/code  -> 61
//   ammeter    10 uA:  10 V / 2^15 / 50 ohm = 6.1035 uA/code, divided by the
//                      measured slope 0.8164 -> 0.7476 units/code -> 75; the
//                      measured intercept 0.127 mA / 0.8164 = 15.6 units -> 16
//   ohmmeter   100 ohm: 10 V / 2^15 / 5 uA = 61.035 ohm/code -> 61
//   beta meter 1:      assumed 50 ohm emitter sense and 10 uA base current -> 61
// With no meter or several meters selected, all relays open, the mode is
// MODE_NONE, the unit is blank and the reading is 0.
//
// Purely combinational; the controller registers the outputs.
module meter_convert
  import dmm_pkg::*;
#(
  parameter int INC_VOLT    = 61,
  parameter int OFFSET_V    = 0,
  parameter int INC_AMP     = 75,
  parameter int OFFSET_AMP  = 16,
  parameter int INC_OHM     = 61,
  parameter int OFFSET_OHM  = 0,
  parameter int INC_BETA    = 61,
  parameter int OFFSET_BETA = 0
) (
  input  meter_sel_t           sel,
  input  logic [ADC_W-1:0]     code,
  output logic [VALUE_W-1:0]   value,
  output logic                 neg,
  output mode_e                mode,
  output logic [13:0]          unit,
  output relay_t               relay
);

  int inc, offset;
  int scaled;

  always_comb begin
    relay  = '{default: RELAY_OFF};
    mode   = MODE_NONE;
    unit   = UNIT_BLANK;
    inc    = 0;
    offset = 0;
    unique case (sel)
      4'b0001: begin
        mode = MODE_VOLT; unit = UNIT_VOLT; relay.v = RELAY_ON;
        inc = INC_VOLT;   offset = OFFSET_V;
      end
      4'b0010: begin
        mode = MODE_AMP;  unit = UNIT_AMP;  relay.a = RELAY_ON;
        inc = INC_AMP;    offset = OFFSET_AMP;
      end
      4'b0100: begin
        mode = MODE_OHM;  unit = UNIT_OHM;  relay.o = RELAY_ON;
        inc = INC_OHM;    offset = OFFSET_OHM;
      end
      4'b1000: begin
        mode = MODE_BETA; unit = UNIT_BETA; relay.b = RELAY_ON;
        inc = INC_BETA;   offset = OFFSET_BETA;
      end
      default: ;
    endcase

    // signed arithmetic, '/' truncates toward zero
    scaled = (int'(signed'(code)) * inc) / 100 - offset;
    if (scaled < 0) begin
      neg    = 1'b1;
      scaled = -scaled;
    end else begin
      neg    = 1'b0;
    end
    // saturate to the display width
    if (scaled > int'({VALUE_W{1'b1}}))
      value = '1;
    else
      value = VALUE_W'(scaled);
  end

endmodule

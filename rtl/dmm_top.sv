// dmm_top: FPGA logic of a switch-selected digital multimeter.
//
// Every quantity (voltage, current, resistance, transistor beta) is turned
// into a voltage by an analog front end outside the FPGA, routed by reed
// relays to one AD976 16-bit ADC (+-10 V), and read here. The chain is:
//   meter_fsm       starts ADC conversions with R/C, waits for BUSY, scales
//                   the code for the meter selected by the switches, drives
//                   the relays and yields sign, magnitude, mode and unit;
//   bin2bcd         splits the magnitude into six BCD digits and sets the
//                   decimal point for the mode, refreshing every HOLD_CYCLES;
//   display_driver  decodes the digits to seven-segment patterns.
// This three-block chain and its signals follow the original design.
// hex[7:6] show the two unit characters ("dc", "nA", ...). hex[5] shows a minus
// sign for negative readings and is blank otherwise while digit 5 is 0 (it
// always is for a 16-bit magnitude). hex[4:0] show the five low digits. Using
// hex[5] for the sign is this design's choice. The sign shown is the one
// captured at the last display refresh.
//
// Segments are active low with segment a in bit 6 down to g in bit 0.
// hex_dp[3:0] are the decimal points of hex[5:2], active low. fsm_state and
// sample_valid (one cycle per new ADC sample) are for status LEDs. Clock 50 MHz.
// Reset is asynchronous and active low.
module dmm_top
  import dmm_pkg::*;
#(
  parameter int unsigned TIMER_LIMIT = 8,
  parameter int unsigned HOLD_CYCLES = 12_500_000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sw_voltmeter,
  input  logic              sw_ammeter,
  input  logic              sw_ohmmeter,
  input  logic              sw_betameter,
  input  logic [ADC_W-1:0]  adc_data,
  input  logic              adc_busy,
  output logic              adc_rc,
  output logic [1:0]        relay_v,
  output logic [1:0]        relay_a,
  output logic [1:0]        relay_o,
  output logic [1:0]        relay_b,
  output logic [2:0]        mode,
  output logic              neg_led,
  output seg_t [7:0]        hex,
  output logic [3:0]        hex_dp,
  output logic [1:0]        fsm_state,
  output logic              sample_valid
);

  meter_sel_t           sel;
  logic [VALUE_W-1:0]   value;
  logic                 neg;
  logic                 value_valid;
  mode_e                fsm_mode;
  logic [13:0]          unit;
  relay_t               relay;
  state_e               state;

  logic [NDIG-1:0][3:0] bcd;
  logic [NDIG-1:0][3:0] shown;
  logic [3:0]           dp_n;
  logic                 update;
  logic                 neg_shown;
  seg_t [NDIG-1:0]      seg;

  assign sel = '{beta: sw_betameter, ohm: sw_ohmmeter, amp: sw_ammeter, volt: sw_voltmeter};

  meter_fsm #(
    .TIMER_LIMIT (TIMER_LIMIT)
  ) u_fsm (
    .clk         (clk),
    .rst_n       (rst_n),
    .sel         (sel),
    .adc_data    (adc_data),
    .adc_busy    (adc_busy),
    .adc_rc      (adc_rc),
    .value       (value),
    .neg         (neg),
    .value_valid (value_valid),
    .mode        (fsm_mode),
    .unit        (unit),
    .relay       (relay),
    .state       (state)
  );

  bin2bcd #(
    .IN_W        (VALUE_W),
    .HOLD_CYCLES (HOLD_CYCLES)
  ) u_bcd (
    .clk    (clk),
    .rst_n  (rst_n),
    .value  (value),
    .mode   (fsm_mode),
    .bcd    (bcd),
    .dp_n   (dp_n),
    .update (update)
  );

  // sign captured with the digits so that both change together
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      neg_shown <= 1'b0;
    else if (update) neg_shown <= neg;
  end

  always_comb begin
    shown = bcd;
    if (bcd[5] == 4'd0)
      shown[5] = neg_shown ? DIG_MINUS : DIG_BLANK;
  end

  display_driver u_disp (
    .digit (shown),
    .seg   (seg)
  );

  assign hex[7]  = unit[13:7];
  assign hex[6]  = unit[6:0];
  assign hex[5:0] = seg;
  assign hex_dp  = dp_n;
  assign neg_led = neg;
  assign mode    = fsm_mode;
  assign relay_v = relay.v;
  assign relay_a = relay.a;
  assign relay_o = relay.o;
  assign relay_b = relay.b;
  assign fsm_state    = state;
  assign sample_valid = value_valid;

endmodule

// tb_dmm_top: end-to-end test of the multimeter logic.
//
// The testbench stands in for everything outside the FPGA: an analog front
// end turns the quantity under test into the ADC input for the meter whose
// relay is closed (voltmeter: 220/220 ohm divider; ammeter: 50 mV per mA with
// the measured gain error 0.8164 and offset 0.127 mA; ohmmeter: 5 uA through
// the resistor; beta meter: 10 uA base current, 50 ohm emitter sense), and
// the AD976 model converts it. The test walks through every meter, positive
// and negative inputs, no meter and two meters selected, and reads the
// result back from the segment outputs only: unit characters, digits, sign
// and decimal point. Each displayed number must equal the reference scaling
// of the ADC code exactly and lie within 0.3 % of full scale of the physical
// input. Mechanisms counted (each must occur): ADC conversions, sample
// pushes, display refreshes, every meter mode, a negative reading shown with
// a minus sign, the blank "no meter" display, and relay changes.
// TIMER_LIMIT stays at its default; HOLD_CYCLES is cut to 500 cycles.
`timescale 1ns/1ps
module tb_dmm_top;
  import dmm_pkg::*;
  import dmm_tb_pkg::*;

  localparam int HOLD = 500;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        sw_v, sw_a, sw_o, sw_b;
  logic [15:0] adc_data;
  logic        adc_busy, adc_rc;
  logic [1:0]  relay_v, relay_a, relay_o, relay_b;
  logic [2:0]  mode;
  logic        neg_led;
  logic [7:0][6:0] hex;
  logic [3:0]  hex_dp;
  logic [1:0]  fsm_state;
  logic        sample_valid;
  real         vin;
  int          conversions, violations;
  logic [15:0] last_code;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  dmm_top #(.HOLD_CYCLES(HOLD)) dut (
    .clk(clk), .rst_n(rst_n),
    .sw_voltmeter(sw_v), .sw_ammeter(sw_a), .sw_ohmmeter(sw_o), .sw_betameter(sw_b),
    .adc_data(adc_data), .adc_busy(adc_busy), .adc_rc(adc_rc),
    .relay_v(relay_v), .relay_a(relay_a), .relay_o(relay_o), .relay_b(relay_b),
    .mode(mode), .neg_led(neg_led), .hex(hex), .hex_dp(hex_dp),
    .fsm_state(fsm_state), .sample_valid(sample_valid));

  ad976_model #(.T_CONV_NS(2000)) adc (
    .rc(adc_rc), .vin(vin), .busy(adc_busy), .data(adc_data),
    .conversions(conversions), .violations(violations), .last_code(last_code));

  // quantity under test: V, mA, ohm or beta, depending on the meter
  real quantity;

  // analog front end, switched by the relay outputs
  always @* begin
    if (relay_v == 2'b01)      vin = quantity / 2.0;
    else if (relay_a == 2'b01) vin = (0.8164 * quantity + 0.127) * 0.050;
    else if (relay_o == 2'b01) vin = quantity * 5.0e-6;
    else if (relay_b == 2'b01) vin = quantity * 10.0e-6 * 50.0;
    else                       vin = 0.0;
  end

  // mechanism counters
  int n_push = 0, n_refresh = 0, n_relay_change = 0, n_minus = 0, n_blank = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  logic [7:0] prev_relays = '0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (sample_valid) n_push++;
      if (dut.u_bcd.update) n_refresh++;
      if ({relay_b, relay_o, relay_a, relay_v} != prev_relays) n_relay_change++;
      prev_relays = {relay_b, relay_o, relay_a, relay_v};
    end
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // wait until readings of the new input have reached the display
  task automatic settle();
    int p0, r0;
    p0 = n_push;
    wait (n_push >= p0 + 2);
    r0 = n_refresh;
    wait (n_refresh >= r0 + 1);
    @(negedge clk);
  endtask

  // read the display and compare with the references
  task automatic measure(input logic [3:0] sel, input real q, input real full_scale,
                         input real unit_size, input string name);
    int  d [6];
    int  shown;
    bit  minus, bad;
    int  exp_mag;
    bit  exp_neg;
    int  dp_pos;
    real phys;
    sw_v = sel[0]; sw_a = sel[1]; sw_o = sel[2]; sw_b = sel[3];
    quantity = q;
    settle();
    bad = 0;
    for (int k = 0; k < 6; k++) d[k] = digit_of(hex[k]);
    for (int k = 0; k < 5; k++) if (d[k] < 0 || d[k] > 9) bad = 1;
    minus = (d[5] == 10);
    if (d[5] != 10 && d[5] != 15) bad = 1;
    shown = 0;
    for (int k = 4; k >= 0; k--) shown = shown * 10 + d[k];
    ref_reading(sel, last_code, exp_mag, exp_neg);
    dp_pos = -1;
    for (int k = 0; k < 4; k++) if (!hex_dp[k]) dp_pos = k + 2;
    checks++;
    if (bad) fail($sformatf("%s: unreadable digits", name));
    checks++;
    if (shown != exp_mag || minus != exp_neg || neg_led != exp_neg)
      fail($sformatf("%s: display %s%0d, expected %s%0d", name, minus ? "-" : "", shown,
                     exp_neg ? "-" : "", exp_mag));
    checks++;
    if ({hex[7], hex[6]} != ref_unit(sel))
      fail($sformatf("%s: unit %b", name, {hex[7], hex[6]}));
    checks++;
    if (mode != ref_mode(sel)) fail($sformatf("%s: mode %b", name, mode));
    // within 0.3 % of full scale of the true value
    if (unit_size > 0.0) begin
      phys = (minus ? -1.0 : 1.0) * shown * unit_size;
      checks++;
      if ((phys - q > 0.003 * full_scale) || (q - phys > 0.003 * full_scale))
        fail($sformatf("%s: shows %f, input %f", name, phys, q));
    end
    if (minus) n_minus++;
    if (d[5] == 15 && hex[7] == 7'h7F && hex[6] == 7'h7F) n_blank++;
    case (sel)
      4'b0001: begin n_mode[0]++; checks++; if (dp_pos != 3) fail("voltmeter point"); end
      4'b0010: begin n_mode[1]++; checks++; if (dp_pos != 2) fail("ammeter point"); end
      4'b0100: begin n_mode[2]++; checks++; if (dp_pos != 4) fail("ohmmeter point"); end
      4'b1000: begin n_mode[3]++; checks++; if (dp_pos != -1) fail("beta point"); end
      default: begin checks++; if (dp_pos != -1) fail("no-meter point"); end
    endcase
    $display("%-22s switches %4b: display %s %s%0d (point on HEX%0d)", name, sel,
             (sel == 4'b0001) ? "dc" : (sel == 4'b0010) ? "nA" : (sel == 4'b0100) ? "oh" :
             (sel == 4'b1000) ? "bE" : "  ", minus ? "-" : " ", shown, dp_pos);
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {sw_b, sw_o, sw_a, sw_v} = 4'b0001;
    quantity = 0.0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    measure(4'b0001, 19.753,   20.0,    0.001,  "voltmeter 19.753 V");
    measure(4'b0001, 1.5,      20.0,    0.001,  "voltmeter 1.5 V");
    measure(4'b0001, -7.25,    20.0,    0.001,  "voltmeter -7.25 V");
    measure(4'b0001, 0.0,      20.0,    0.001,  "voltmeter 0 V");
    measure(4'b0010, 10.0,     200.0,   0.01,   "ammeter 10 mA");
    measure(4'b0010, 18.0,     200.0,   0.01,   "ammeter 18 mA");
    measure(4'b0010, -50.0,    200.0,   0.01,   "ammeter -50 mA");
    measure(4'b0100, 1.0e6,    2.0e6,   100.0,  "ohmmeter 1 Mohm");
    measure(4'b0100, 47.0e3,   2.0e6,   100.0,  "ohmmeter 47 kohm");
    measure(4'b1000, 150.0,    20000.0, 1.0,    "beta meter 150");
    measure(4'b0000, 0.0,      1.0,     0.0,    "no meter");
    measure(4'b0011, 0.0,      1.0,     0.0,    "two meters");
    measure(4'b0001, -19.9,    20.0,    0.001,  "voltmeter -19.9 V");

    checks++; if (violations != 0) fail($sformatf("%0d ADC protocol violations", violations));
    checks++; if (conversions == 0) fail("no ADC conversion");
    checks++; if (n_push == 0) fail("no sample pushed");
    checks++; if (n_refresh == 0) fail("no display refresh");
    for (int m = 0; m < 4; m++) begin
      checks++; if (n_mode[m] == 0) fail($sformatf("meter %0d never used", m));
    end
    checks++; if (n_minus == 0) fail("no negative reading shown");
    checks++; if (n_blank == 0) fail("blank display never shown");
    checks++; if (n_relay_change < 5) fail("relays did not switch");
    $display("conversions=%0d pushes=%0d refreshes=%0d relay_changes=%0d minus=%0d blank=%0d modes=%0d/%0d/%0d/%0d",
             conversions, n_push, n_refresh, n_relay_change, n_minus, n_blank,
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

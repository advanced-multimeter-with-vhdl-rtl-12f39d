// tb_dmm_full: the multimeter at its default sizes, one complete measurement.
//
// dmm_top runs with every parameter at its default (8-cycle R/C timer,
// 12,500,000-cycle display hold, i.e. 0.25 s at 50 MHz) against the AD976
// model at its nominal 8 us conversion time. A 19.753 V input on the
// voltmeter (through the 220/220 ohm divider) must appear as "dc 19.741"
// after the first display refresh, then -5 V as "dc -4.997", and display
// refreshes must come exactly 12,500,000 cycles apart. Simulates about
// 0.5 s of board time.
`timescale 1ns/1ps
module tb_dmm_full;
  import dmm_pkg::*;
  import dmm_tb_pkg::*;

  localparam int HOLD = 12_500_000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
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
  real         volts;
  int          conversions, violations;
  logic [15:0] last_code;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  dmm_top dut (
    .clk(clk), .rst_n(rst_n),
    .sw_voltmeter(1'b1), .sw_ammeter(1'b0), .sw_ohmmeter(1'b0), .sw_betameter(1'b0),
    .adc_data(adc_data), .adc_busy(adc_busy), .adc_rc(adc_rc),
    .relay_v(relay_v), .relay_a(relay_a), .relay_o(relay_o), .relay_b(relay_b),
    .mode(mode), .neg_led(neg_led), .hex(hex), .hex_dp(hex_dp),
    .fsm_state(fsm_state), .sample_valid(sample_valid));

  ad976_model adc (
    .rc(adc_rc), .vin(vin), .busy(adc_busy), .data(adc_data),
    .conversions(conversions), .violations(violations), .last_code(last_code));

  always @* vin = (relay_v == 2'b01) ? volts / 2.0 : 0.0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // count cycles between changes of the display
  longint cyc = 0;
  longint last_change = -1;
  logic [5:0][6:0] prev_digits;
  int n_changes = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && hex[5:0] != prev_digits) begin
      if (last_change >= 0) begin
        checks++;
        if ((cyc - last_change) % HOLD != 0)
          fail($sformatf("display changed %0d cycles after the last change", cyc - last_change));
      end
      last_change = cyc;
      n_changes++;
    end
    prev_digits = hex[5:0];
  end

  task automatic expect_display(input int sign_digit, input int value, input string what);
    int d [6];
    for (int k = 0; k < 6; k++) d[k] = digit_of(hex[k]);
    checks++;
    if (d[5] != sign_digit || d[4] != value / 10000 || d[3] != value / 1000 % 10 ||
        d[2] != value / 100 % 10 || d[1] != value / 10 % 10 || d[0] != value % 10)
      fail($sformatf("%s: digits %0d %0d %0d %0d %0d %0d", what, d[5], d[4], d[3], d[2], d[1], d[0]));
    checks++;
    if ({hex[7], hex[6]} != 14'b10000101110010) fail($sformatf("%s: unit is not dc", what));
    checks++;
    if (hex_dp != 4'b1101) fail($sformatf("%s: decimal point %b", what, hex_dp));
    $display("%s: HEX5..0 = %0d %0d %0d %0d %0d %0d", what, d[5], d[4], d[3], d[2], d[1], d[0]);
  endtask

  initial begin
    #800ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    volts = 19.753;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // first refresh 0.25 s after reset: 19.753 V -> code 32363 -> 19741 mV
    repeat (HOLD + 2) @(posedge clk);
    #1;
    expect_display(15, 19741, "19.753 V");
    // -5 V -> code -8192 -> -4997.12 truncated to -4997 mV
    volts = -5.0;
    repeat (HOLD) @(posedge clk);
    #1;
    expect_display(10, 4997, "-5 V");
    checks++; if (!neg_led) fail("negative flag not set");
    checks++; if (violations != 0) fail($sformatf("%0d ADC protocol violations", violations));
    checks++; if (n_changes < 2) fail("display did not refresh");
    $display("conversions=%0d display_changes=%0d", conversions, n_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

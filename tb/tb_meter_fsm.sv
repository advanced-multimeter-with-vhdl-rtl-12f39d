// tb_meter_fsm: self-checking test of the ADC sequencing controller.
//
// The controller drives the behavioural AD976 model, whose input voltage is
// changed at random between conversions, while the meter switches are moved
// through every meter and some invalid combinations. Checked:
//   - every pushed reading equals the reference scaling of the code the ADC
//     really converted, for the meter selected when it was taken;
//   - nothing is pushed before the first conversion has finished;
//   - R/C stays low exactly TIMER_LIMIT cycles and the ADC sees no protocol
//     violation (R/C pulse under 50 ns, or restart during a conversion);
//   - the sample period is 1 + TIMER_LIMIT cycles plus the conversion time
//     rounded up to cycles, plus at most 3 cycles of BUSY synchronisation;
//   - only the transitions 00->01, 01->01/10 and 10->10/00 occur;
//   - mode, unit and relays take the switch setting seen in ACQUIRE and hold
//     it until the next ACQUIRE.
`timescale 1ns/1ps
module tb_meter_fsm;
  import dmm_pkg::*;
  import dmm_tb_pkg::*;

  localparam int TIMER_LIMIT = 8;      // the controller's default
  localparam int T_BUSY_NS   = 83;
  localparam int T_CONV_NS   = 2000;
  localparam int CLK_NS      = 20;
  localparam int NSAMPLES    = 200;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  meter_sel_t  sel;
  logic [15:0] adc_data;
  logic        adc_busy;
  logic        adc_rc;
  logic [15:0] value;
  logic        neg;
  logic        value_valid;
  mode_e       mode;
  logic [13:0] unit;
  relay_t      relay;
  state_e      state;
  real         vin;
  int          conversions, violations;
  logic [15:0] last_code;

  int checks = 0, failures = 0;

  always #(CLK_NS / 2) clk = ~clk;

  meter_fsm dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .adc_data(adc_data), .adc_busy(adc_busy),
    .adc_rc(adc_rc), .value(value), .neg(neg), .value_valid(value_valid),
    .mode(mode), .unit(unit), .relay(relay), .state(state));

  ad976_model #(.T_BUSY_NS(T_BUSY_NS), .T_CONV_NS(T_CONV_NS)) adc (
    .rc(adc_rc), .vin(vin), .busy(adc_busy), .data(adc_data),
    .conversions(conversions), .violations(violations), .last_code(last_code));

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // expected reading, captured on the ACQUIRE edge that pushes it
  int   exp_mag;
  bit   exp_neg;
  bit   exp_pending = 0;
  int   pushes = 0;
  int   cyc = 0, last_push_cyc = -1;
  int   rc_low_cycles = 0;
  state_e prev_state;
  logic [3:0] prev_sel;
  logic [3:0] out_sel = 4'b0000;   // switch setting the outputs must show

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // reading that the ACQUIRE on this edge must push
      if (state == ST_ACQUIRE && conversions > 0) begin
        ref_reading(sel, last_code, exp_mag, exp_neg);
        exp_pending = 1;
      end
      // transition legality (state as seen before this edge)
      if (cyc > 1) begin
        checks++;
        case (prev_state)
          ST_ACQUIRE:    if (state != ST_TIMING) fail("ACQUIRE not followed by TIMING");
          ST_TIMING:     if (state == ST_ACQUIRE) fail("TIMING went to ACQUIRE");
          ST_CONVERSION: if (state == ST_TIMING) fail("CONVERSION went to TIMING");
          default:       fail("illegal state");
        endcase
        // outputs load the switches seen in ACQUIRE and hold them
        if (prev_state == ST_ACQUIRE) out_sel = prev_sel;
        checks++;
        if (mode != ref_mode(out_sel) || unit != ref_unit(out_sel))
          fail($sformatf("mode/unit %b/%b for switches %b", mode, unit, out_sel));
        checks++;
        if ((out_sel == 4'b0001 && relay.v != 2'b01) || (out_sel != 4'b0001 && relay.v != 2'b00) ||
            (out_sel == 4'b0010 && relay.a != 2'b01) || (out_sel != 4'b0010 && relay.a != 2'b00) ||
            (out_sel == 4'b0100 && relay.o != 2'b01) || (out_sel != 4'b0100 && relay.o != 2'b00) ||
            (out_sel == 4'b1000 && relay.b != 2'b01) || (out_sel != 4'b1000 && relay.b != 2'b00))
          fail($sformatf("relays %b for switches %b", relay, out_sel));
      end
      prev_state = state;
      prev_sel   = sel;
      // R/C low time in cycles
      if (!adc_rc) rc_low_cycles++;
    end
  end

  always @(posedge adc_rc) begin
    if (rst_n && rc_low_cycles > 0) begin
      checks++;
      if (rc_low_cycles != TIMER_LIMIT)
        fail($sformatf("R/C low for %0d cycles, expected %0d", rc_low_cycles, TIMER_LIMIT));
    end
    rc_low_cycles = 0;
  end

  always @(negedge clk) begin
    if (rst_n && value_valid) begin
      pushes++;
      checks++;
      if (!exp_pending) fail("reading pushed before any conversion finished");
      else if (int'(value) != exp_mag || neg != exp_neg)
        fail($sformatf("reading %0d neg %0b, expected %0d neg %0b (code %0d, switches %b)",
                       value, neg, exp_mag, exp_neg, $signed(last_code), sel));
      exp_pending = 0;
      if (last_push_cyc >= 0) begin
        int period, conv, lo, hi;
        period = cyc - last_push_cyc;
        conv   = (T_BUSY_NS + T_CONV_NS + CLK_NS - 1) / CLK_NS;
        lo     = 1 + TIMER_LIMIT + (conv - TIMER_LIMIT);
        hi     = 1 + TIMER_LIMIT + conv + 3;
        checks++;
        if (period < lo || period > hi)
          fail($sformatf("sample period %0d cycles, expected %0d..%0d", period, lo, hi));
      end
      last_push_cyc = cyc;
      // new input and sometimes new switches for the next sample
      vin = ($urandom_range(0, 24000) - 12000) / 1000.0;
      if ($urandom_range(0, 9) == 0) begin
        case ($urandom_range(0, 5))
          0: sel = meter_sel_t'(4'b0001);
          1: sel = meter_sel_t'(4'b0010);
          2: sel = meter_sel_t'(4'b0100);
          3: sel = meter_sel_t'(4'b1000);
          4: sel = meter_sel_t'(4'b0000);
          default: sel = meter_sel_t'(4'b0011);
        endcase
      end
    end
  end

  initial begin
    #(CLK_NS * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = meter_sel_t'(4'b0001);
    vin = 3.3;
    prev_state = ST_ACQUIRE;
    prev_sel   = 4'b0001;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (pushes >= NSAMPLES);
    repeat (5) @(posedge clk);
    checks++;
    if (violations != 0) fail($sformatf("%0d ADC protocol violations", violations));
    checks++;
    if (conversions < NSAMPLES) fail("too few conversions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

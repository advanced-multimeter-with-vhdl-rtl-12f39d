// tb_meter_convert: self-checking test of the per-meter scaling.
//
// For every switch combination (the four one-hot meters and the invalid
// ones) it applies the extreme ADC codes, codes around zero and random codes,
// and compares magnitude, sign, mode, unit characters and relay drive with
// the reference model of dmm_tb_pkg.
`timescale 1ns/1ps
module tb_meter_convert;
  import dmm_pkg::*;
  import dmm_tb_pkg::*;

  meter_sel_t   sel;
  logic [15:0]  code;
  logic [15:0]  value;
  logic         neg;
  mode_e        mode;
  logic [13:0]  unit;
  relay_t       relay;

  int checks = 0, failures = 0;

  meter_convert dut (.sel(sel), .code(code), .value(value), .neg(neg),
                     .mode(mode), .unit(unit), .relay(relay));

  task automatic check(input logic [3:0] s, input logic [15:0] c);
    int mag; bit n;
    logic [7:0] exp_relay;
    sel  = meter_sel_t'(s);
    code = c;
    #1;
    ref_reading(s, c, mag, n);
    exp_relay = 8'h00;
    case (s)
      4'b0001: exp_relay = 8'b00_00_00_01;
      4'b0010: exp_relay = 8'b00_00_01_00;
      4'b0100: exp_relay = 8'b00_01_00_00;
      4'b1000: exp_relay = 8'b01_00_00_00;
      default: ;
    endcase
    checks++;
    if (int'(value) != mag || neg != n || mode != ref_mode(s) || unit != ref_unit(s)
        || relay != exp_relay) begin
      failures++;
      if (failures < 10)
        $display("FAIL sel=%b code=%0d: value=%0d neg=%0b mode=%b unit=%b relay=%b, expected %0d %0b %b %b %b",
                 s, $signed(c), value, neg, mode, unit, relay, mag, n, ref_mode(s), ref_unit(s), exp_relay);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      check(4'(s), 16'h7FFF);
      check(4'(s), 16'h8000);
      for (int c = -300; c <= 300; c += 7) check(4'(s), 16'(c));
      for (int k = 0; k < 200; k++) check(4'(s), 16'($urandom));
    end
    // a few hand-worked points
    check(4'b0001, 16'd32768 / 2);  // 16384 * 61 / 100 = 9994 mV
    if (value != 16'd9994) begin failures++; $display("FAIL 10 V point"); end
    checks++;
    check(4'b0010, 16'd13376);      // 13376 * 75 / 100 - 16 = 10016 (100.16 mA)
    if (value != 16'd10016) begin failures++; $display("FAIL 100 mA point"); end
    checks++;
    check(4'b0001, -16'sd1000);     // -610 mV
    if (value != 16'd610 || !neg) begin failures++; $display("FAIL negative point"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

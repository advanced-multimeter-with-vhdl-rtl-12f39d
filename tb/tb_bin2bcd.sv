// tb_bin2bcd: self-checking test of the binary-to-BCD stage.
//
// With a short hold time (HOLD = 5 cycles) it feeds boundary and random
// values in every mode and checks, at each update, that the six digits equal
// the decimal text of the value held at the loading edge and that the decimal
// point matches the mode. It also checks the digits stay frozen between
// updates, updates come exactly every HOLD cycles and reset clears the
// digits and turns the points off.
`timescale 1ns/1ps
module tb_bin2bcd;
  import dmm_pkg::*;
  import dmm_tb_pkg::*;

  localparam int HOLD = 5;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic [15:0] value;
  mode_e       mode;
  logic [5:0][3:0] bcd;
  logic [3:0]  dp_n;
  logic        update;

  int checks = 0, failures = 0;
  int cyc = 0, last_upd = -1, nupd = 0;
  int loaded_value;
  mode_e loaded_mode;
  logic [5:0][3:0] held;

  always #10 clk = ~clk;

  bin2bcd #(.IN_W(16), .HOLD_CYCLES(HOLD)) dut (
    .clk(clk), .rst_n(rst_n), .value(value), .mode(mode),
    .bcd(bcd), .dp_n(dp_n), .update(update));

  function automatic logic [3:0] exp_dp(input mode_e m);
    case (m)
      MODE_VOLT: return 4'b1101;
      MODE_AMP:  return 4'b1110;
      MODE_OHM:  return 4'b1011;
      default:   return 4'b1111;
    endcase
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // inputs change on the falling edge; 'update' marks the loading rising edge
  logic load_next = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (update) begin
        loaded_value = int'(value);
        loaded_mode  = mode;
        load_next    = 1;
        checks++;
        if (last_upd >= 0 && cyc - last_upd != HOLD)
          fail($sformatf("update after %0d cycles, expected %0d", cyc - last_upd, HOLD));
        last_upd = cyc;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (load_next) begin
        load_next = 0;
        nupd++;
        for (int k = 0; k < 6; k++) begin
          checks++;
          if (int'(bcd[k]) != dec_digit(loaded_value, k))
            fail($sformatf("value %0d digit %0d = %0d", loaded_value, k, bcd[k]));
        end
        checks++;
        if (dp_n != exp_dp(loaded_mode))
          fail($sformatf("mode %b point %b", loaded_mode, dp_n));
        held = bcd;
      end else if (nupd > 0) begin
        checks++;
        if (bcd != held) fail("digits changed between updates");
      end
      // new stimulus every cycle
      case ($urandom_range(0, 5))
        0: value = 16'hFFFF;
        1: value = 16'(($urandom_range(0, 9)) * 10000 + $urandom_range(0, 9) * 1000);
        default: value = 16'($urandom);
      endcase
      case ($urandom_range(0, 4))
        0: mode = MODE_VOLT;
        1: mode = MODE_AMP;
        2: mode = MODE_OHM;
        3: mode = MODE_BETA;
        default: mode = MODE_NONE;
      endcase
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    value = 16'd12345;
    mode  = MODE_VOLT;
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (bcd != '0 || dp_n != 4'b1111) fail("reset state");
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (nupd >= 1000);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_display_driver: self-checking test of the seven-segment decoder.
//
// Every one of the 16 codes is applied to every digit position, with random
// codes on the other positions, and each pattern is compared with one built
// from the names of the segments that should light (dmm_tb_pkg).
`timescale 1ns/1ps
module tb_display_driver;
  import dmm_pkg::*;
  import dmm_tb_pkg::*;

  logic [5:0][3:0] digit;
  seg_t [5:0]      seg;

  int checks = 0, failures = 0;

  display_driver dut (.digit(digit), .seg(seg));

  function automatic logic [6:0] expected(input logic [3:0] d);
    if (d < 10)  return digit_pattern(int'(d));
    if (d == 10) return seg_lit("g");
    return 7'b1111111;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int pos = 0; pos < 6; pos++) begin
        for (int d = 0; d < 16; d++) begin
          for (int k = 0; k < 6; k++) digit[k] = 4'($urandom);
          digit[pos] = 4'(d);
          #1;
          for (int k = 0; k < 6; k++) begin
            checks++;
            if (seg[k] != expected(digit[k])) begin
              failures++;
              if (failures < 10)
                $display("FAIL position %0d code %0d: %b, expected %b", k, digit[k], seg[k], expected(digit[k]));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

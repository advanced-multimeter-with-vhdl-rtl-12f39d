// bin2bcd: binary reading to six BCD digits, refreshed at a readable rate.
//
// The unsigned reading is split into decimal digits by successive division
// and remainder: d5 = v / 100000, v = v rem 100000, d4 = v / 10000, and so on
// down to d0 = v rem 10. This follows the multimeter firmware's algorithm;
// here it is combinational division by constants. The digits are registered
// only when a hold timer of HOLD_CYCLES expires, so the last digits do not
// flicker while the input changes every few microseconds. 'update' is high
// during the one cycle whose clock edge loads the new digits, so a caller can
// capture related data (the sign) on the same edge.
//
// The decimal points of HEX5..HEX2 (dp_n[3]..dp_n[0], active low) are set from
// the meter mode in the same register: voltmeter readings (mV) show as 20.000
// (point on HEX3), ammeter readings (10 uA) as 200.00 mA (HEX2), ohmmeter
// readings (100 ohm) as 2.0000 MOhm (HEX4), beta readings without a point.
// Which point each meter uses and the 0.25 s hold time are this design's
// choices. Reset (asynchronous, active low) clears the digits to 0 and turns
// all points off.
module bin2bcd
  import dmm_pkg::*;
#(
  parameter int unsigned IN_W        = 16,
  parameter int unsigned HOLD_CYCLES = 12_500_000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [IN_W-1:0]     value,
  input  mode_e               mode,
  output logic [NDIG-1:0][3:0] bcd,
  output logic [3:0]          dp_n,
  output logic                update
);

  localparam int unsigned HW = (HOLD_CYCLES > 1) ? $clog2(HOLD_CYCLES) : 1;

  logic [HW-1:0]        hold;
  logic [NDIG-1:0][3:0] digits;
  logic [3:0]           dp_next;

  // successive division by powers of ten, most significant digit first
  always_comb begin
    logic [31:0] rest;
    logic [31:0] pow;
    rest = 32'(value);
    pow  = 32'd100000;
    for (int i = NDIG - 1; i >= 0; i--) begin
      digits[i] = 4'(rest / pow);
      rest      = rest % pow;
      pow       = pow / 10;
    end
  end

  always_comb begin
    unique case (mode)
      MODE_VOLT: dp_next = 4'b1101;   // HEX3
      MODE_AMP:  dp_next = 4'b1110;   // HEX2
      MODE_OHM:  dp_next = 4'b1011;   // HEX4
      default:   dp_next = 4'b1111;
    endcase
  end

  assign update = (hold >= HW'(HOLD_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0;
      bcd  <= '0;
      dp_n <= 4'b1111;
    end else if (update) begin
      hold <= '0;
      bcd  <= digits;
      dp_n <= dp_next;
    end else begin
      hold <= hold + 1'b1;
    end
  end

endmodule

// meter_fsm: sequencing controller for the AD976 ADC and meter conversion.
//
// The controller cycles through three states, as the multimeter firmware did:
//   ACQUIRE (00)    one cycle. R/C is driven low, and the falling edge starts a
//                   conversion. The result of the previous conversion (valid
//                   because BUSY is high) is sampled, scaled by meter_convert
//                   for the selected meter and registered with a one-cycle
//                   value_valid strobe. The first ACQUIRE after reset pushes
//                   nothing, because no conversion has run yet.
//   TIMING (01)     R/C is held low while a timer counts TIMER_LIMIT cycles.
//                   R/C then goes high again.
//   CONVERSION (10) wait until BUSY reads 1 (conversion finished), then go
//                   back to ACQUIRE.
// BUSY passes through a two-flop synchroniser (this design's addition). The
// R/C low time must be at least 50 ns (3 cycles at 50 MHz). The default
// TIMER_LIMIT of 8 cycles (160 ns) also lets BUSY fall, which takes up to
// 83 ns on the AD976, and cross the synchroniser before CONVERSION starts
// looking for BUSY high. The value 8 is this design's choice.
//
// One sample takes 1 + TIMER_LIMIT cycles plus the time until synchronised
// BUSY is seen high in CONVERSION, that is about the ADC conversion time.
// Mode, unit and relay outputs are loaded from the switches in ACQUIRE only,
// as in the original firmware, so they hold still while a conversion runs.
// After a meter change the first pushed reading still comes from the
// conversion started as the relays switched; later ones are clean.
// Reset is asynchronous, active low, and enters ACQUIRE with R/C high.
module meter_fsm
  import dmm_pkg::*;
#(
  parameter int unsigned TIMER_LIMIT = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  meter_sel_t          sel,
  input  logic [ADC_W-1:0]    adc_data,
  input  logic                adc_busy,
  output logic                adc_rc,
  output logic [VALUE_W-1:0]  value,
  output logic                neg,
  output logic                value_valid,
  output mode_e               mode,
  output logic [13:0]         unit,
  output relay_t              relay,
  output state_e              state
);

  localparam int unsigned TW = (TIMER_LIMIT > 1) ? $clog2(TIMER_LIMIT + 1) : 1;

  logic [1:0]          busy_sync;
  logic                busy;
  logic [TW-1:0]       timer;
  logic                have_result;

  logic [VALUE_W-1:0]  cv_value;
  logic                cv_neg;
  mode_e               cv_mode;
  logic [13:0]         cv_unit;
  relay_t              cv_relay;

  meter_convert u_convert (
    .sel   (sel),
    .code  (adc_data),
    .value (cv_value),
    .neg   (cv_neg),
    .mode  (cv_mode),
    .unit  (cv_unit),
    .relay (cv_relay)
  );

  assign busy = busy_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_sync <= '0;
    end else begin
      busy_sync <= {busy_sync[0], adc_busy};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_ACQUIRE;
      adc_rc      <= 1'b1;
      timer       <= '0;
      have_result <= 1'b0;
      value       <= '0;
      neg         <= 1'b0;
      value_valid <= 1'b0;
      mode        <= MODE_NONE;
      unit        <= UNIT_BLANK;
      relay       <= '{default: RELAY_OFF};
    end else begin
      value_valid <= 1'b0;
      unique case (state)
        ST_ACQUIRE: begin
          adc_rc <= 1'b0;
          timer  <= '0;
          mode   <= cv_mode;
          unit   <= cv_unit;
          relay  <= cv_relay;
          if (have_result) begin
            value       <= cv_value;
            neg         <= cv_neg;
            value_valid <= 1'b1;
          end
          state <= ST_TIMING;
        end
        ST_TIMING: begin
          if (timer >= TW'(TIMER_LIMIT - 1)) begin
            adc_rc <= 1'b1;
            state  <= ST_CONVERSION;
          end else begin
            timer  <= timer + 1'b1;
          end
        end
        ST_CONVERSION: begin
          if (busy) begin
            have_result <= 1'b1;
            state       <= ST_ACQUIRE;
          end
        end
        default: state <= ST_ACQUIRE;
      endcase
    end
  end

  // R/C is low in ACQUIRE's successor state and only there
  a_rc_low_in_timing: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_TIMING) |-> !adc_rc);
  a_rc_high_in_conversion: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_CONVERSION) |-> adc_rc);

endmodule

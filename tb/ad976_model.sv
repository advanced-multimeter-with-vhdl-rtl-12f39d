// ad976_model: behavioural model of the AD976 16-bit +-10 V sampling ADC.
//
// Behavioural model only, not synthesizable. It models the pins the multimeter
// uses: R/C in, BUSY out and the D15..D0 output bus. A falling edge on rc
// samples vin and, T_BUSY_NS later, pulls busy low. After T_CONV_NS more the
// new two's complement code appears on data and busy goes high. While busy is
// low the bus carries an arbitrary value, standing in for the high-impedance
// and not-valid windows of the real part, so a reader that samples too early
// gets a wrong number. The code is round(vin / 10 V * 32768), clamped to the
// 16-bit range. Protocol errors are counted in 'violations': an R/C low pulse
// shorter than T_RCLOW_MIN_NS, or a falling edge of R/C during a conversion.
// Times in ns; the defaults are the part's nominal 50 ns minimum R/C low time,
// 83 ns BUSY delay and about 8 us conversion time.
`timescale 1ns/1ps
module ad976_model #(
  parameter int T_BUSY_NS      = 83,
  parameter int T_CONV_NS      = 8000,
  parameter int T_RCLOW_MIN_NS = 50
) (
  input  logic        rc,
  input  real         vin,
  output logic        busy,
  output logic [15:0] data,
  output int          conversions,
  output int          violations,
  output logic [15:0] last_code
);

  realtime t_fall;
  logic    converting;
  logic    seen_fall;

  function automatic logic [15:0] code_of(input real v);
    real c;
    c = v / 10.0 * 32768.0;
    if (c >= 32767.0)  return 16'h7FFF;
    if (c <= -32768.0) return 16'h8000;
    if (c >= 0.0) return 16'($rtoi(c + 0.5));
    return 16'(-$rtoi(-c + 0.5));
  endfunction

  initial begin
    busy        = 1'b1;
    data        = 16'h0000;
    last_code   = 16'h0000;
    conversions = 0;
    violations  = 0;
    converting  = 1'b0;
    seen_fall   = 1'b0;
    t_fall      = 0;
  end

  always @(negedge rc) begin
    if (converting) begin
      violations = violations + 1;
    end else begin
      t_fall     = $realtime;
      seen_fall  = 1'b1;
      converting = 1'b1;
      convert(code_of(vin));
    end
  end

  task automatic convert(input logic [15:0] code);
    fork
      begin
        #(T_BUSY_NS);
        busy = 1'b0;
        data = 16'($urandom);
        #(T_CONV_NS);
        data        = code;
        last_code   = code;
        busy        = 1'b1;
        converting  = 1'b0;
        conversions = conversions + 1;
      end
    join_none
  endtask

  always @(posedge rc) begin
    if (seen_fall && ($realtime - t_fall < real'(T_RCLOW_MIN_NS)))
      violations = violations + 1;
  end

endmodule

// refresh_timer: decides how often the displayed and checked voltages
// change.
//
// A counter runs from 0 to REFRESH_COUNT and wraps; in the wrap cycle the
// four latest ADC results are copied into the registers that feed the
// BCD conversion, the controls and the displays. With the default of
// 20,000,000 at 50 MHz the values move every 0.4 s, which keeps the
// seven-segment digits readable. The counter and period follow the
// original design; clearing the output registers on reset is this
// design's choice (the original left them uninitialised).
// Timing: first copy REFRESH_COUNT+1 clocks after reset, then every
// REFRESH_COUNT+1 clocks; `update` pulses in the cycle the copy lands.
module refresh_timer
  import greenhouse_pkg::*;
#(
  parameter int unsigned COUNT = REFRESH_COUNT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  adc_code_t [NUM_SENSORS-1:0] adcin,
  output adc_code_t [NUM_SENSORS-1:0] ad,
  output logic      update
);

  localparam int CW = $clog2(COUNT + 1) < 1 ? 1 : $clog2(COUNT + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      ad     <= '0;
      update <= 1'b0;
    end else if (cnt < CW'(COUNT)) begin
      cnt    <= cnt + 1'b1;
      update <= 1'b0;
    end else begin
      cnt    <= '0;
      ad     <= adcin;
      update <= 1'b1;
    end
  end

endmodule

// buzzer_driver: sounds the buzzer while the visible-light voltage is at or
// above its upper critical value.
//
// While `enable` is high a phase counter runs from 0 to 2*HALF and wraps;
// the buzzer bit is 1 while the phase is 0..HALF and 0 for the rest, so at
// the default HALF of 50,000,000 and a 50 MHz clock the buzzer beeps about
// one second on, one second off. The on/off pattern and its lengths follow
// the original design. What happens while `enable` is low is this
// design's choice: the original froze the buzzer and counter in whatever
// state they were in; here the buzzer is silenced and the phase cleared,
// so every alarm starts with a beep.
// Timing: the buzzer output is registered; it goes high one clock after
// `enable` rises and stays high for HALF+1 clocks, low for HALF clocks.
module buzzer_driver
  import greenhouse_pkg::*;
#(
  parameter int unsigned HALF = BUZZ_HALF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic buzzer
);

  localparam int PW = $clog2(2 * 64'(HALF) + 1);
  logic [PW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      buzzer <= 1'b0;
    end else if (!enable) begin
      phase  <= '0;
      buzzer <= 1'b0;
    end else begin
      buzzer <= (phase <= PW'(HALF));
      phase  <= (phase == PW'(2 * 64'(HALF))) ? '0 : phase + 1'b1;
    end
  end

endmodule

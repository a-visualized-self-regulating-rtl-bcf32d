// stepper_controller: moves the curtain motor so that visible light
// returns into range.
//
// Every WAIT+1 clocks the controller takes one half-step: forward (step
// position +1, clockwise, opening the curtains) while `too_low` is set,
// backward (-1, counter-clockwise, closing them) while `too_high` is set,
// and none when the light is in range. The coil outputs always show the
// half-step pattern of the current position (see half_step_coils), so the
// motor holds its place between moves. The period, direction rule and
// eight-position half-step sequence follow the original design. The
// active-high reset clears the coils and arranges a step in the first
// clock after reset, as the original did; restarting the position at 7 on
// reset is this design's choice (the original only set it at power-up).
// If both requests are set, forward wins.
// Timing: the coil pattern changes one clock after the step tick.
module stepper_controller
  import greenhouse_pkg::*;
#(
  parameter int unsigned WAIT = STEP_WAIT
) (
  input  logic       clk,
  input  logic       rst,       // active high
  input  logic       too_low,
  input  logic       too_high,
  output logic [3:0] coils,
  output logic [2:0] position
);

  localparam int CW = $clog2(WAIT + 1) < 1 ? 1 : $clog2(WAIT + 1);
  logic [CW-1:0] count;
  logic [2:0]    next_pos;

  always_comb begin
    if (too_low)       next_pos = position + 3'd1;
    else if (too_high) next_pos = position - 3'd1;
    else               next_pos = position;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      coils    <= 4'b0000;
      count    <= CW'(WAIT);
      position <= 3'd7;
    end else if (count < CW'(WAIT)) begin
      count <= count + 1'b1;
    end else begin
      count    <= '0;
      position <= next_pos;
      coils    <= half_step_coils(next_pos);
    end
  end

endmodule

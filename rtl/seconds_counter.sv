// seconds_counter: elapsed time in whole seconds, the "time input" that
// every sensor's time-duration control compares against.
//
// A tick counter divides the clock by CLK_FREQ_HZ; each time it wraps the
// seconds count goes up by one. A synchronous active-low reset (a board
// switch) clears both, restarting the measured duration. This follows the
// original design; the 32-bit width of the seconds count is this design's
// choice (the original used an integer), and it wraps after 2^32 s.
// Timing: `seconds` becomes N exactly N*CLK_FREQ_HZ clocks after reset is
// released.
module seconds_counter
  import greenhouse_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = CLK_HZ
) (
  input  logic        clk,
  input  logic        n_rst,    // synchronous, active low
  output logic [31:0] seconds
);

  localparam int TW = $clog2(CLK_FREQ_HZ) < 1 ? 1 : $clog2(CLK_FREQ_HZ);
  logic [TW-1:0] ticks;

  always_ff @(posedge clk) begin
    if (!n_rst) begin
      ticks   <= '0;
      seconds <= '0;
    end else if (ticks == TW'(CLK_FREQ_HZ - 1)) begin
      ticks   <= '0;
      seconds <= seconds + 1'b1;
    end else begin
      ticks   <= ticks + 1'b1;
    end
  end

endmodule

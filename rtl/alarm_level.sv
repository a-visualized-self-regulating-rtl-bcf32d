// alarm_level: shows how many sensors are out of range at the same time.
//
// The number of set `out_of_range` bits, 0 to 4, lights exactly one LED:
// green for none, then blue, white, yellow and red for four. The level
// falls again as soon as a sensor returns into range. The colour order is
// the original design's. The original wrote the five cases out as sum-of-
// products terms, one of which omitted a sensor; this design counts the
// bits instead, which is what the specification of the level states.
// Purely combinational.
module alarm_level
  import greenhouse_pkg::*;
(
  input  logic [NUM_SENSORS-1:0] out_of_range,
  output alarm_t                 leds,
  output logic [2:0]             level
);

  always_comb begin
    level = '0;
    for (int i = 0; i < NUM_SENSORS; i++) level += 3'(out_of_range[i]);
    leds        = '0;
    leds.green  = (level == 3'd0);
    leds.blue   = (level == 3'd1);
    leds.white  = (level == 3'd2);
    leds.yellow = (level == 3'd3);
    leds.red    = (level == 3'd4);
  end

endmodule

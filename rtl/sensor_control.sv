// sensor_control: the three controls of one sensor.
//
//   blue   (control system 1) is 1 while the voltage is at or below LOW_LIMIT
//   red    (control system 2) is 1 while the voltage is at or above HIGH_LIMIT
//   yellow (control system 3) is 1 once the elapsed time reaches TIME_LIMIT
//
// Between the limits both blue and red are 0. `out_of_range` (blue or
// red) feeds the alarm level. The comparisons, the limits (0.20 V, 1.00 V,
// 60 s) and the use of one shared elapsed-seconds count for all sensors
// follow the original design; each instance may be given its own limits
// through the parameters. Purely combinational: outputs follow the
// refreshed voltage and the seconds count in the same cycle.
module sensor_control
  import greenhouse_pkg::*;
#(
  parameter int unsigned LOW_LIMIT  = LOW_CV,
  parameter int unsigned HIGH_LIMIT = HIGH_CV,
  parameter int unsigned TIME_LIMIT = TIME_LIMIT_S
) (
  input  centivolt_t  cv,
  input  logic [31:0] seconds,
  output ctrl_t       ctrl,
  output logic        out_of_range
);

  always_comb begin
    ctrl.blue    = (32'(cv) <= LOW_LIMIT);
    ctrl.red     = (32'(cv) >= HIGH_LIMIT);
    ctrl.yellow  = (seconds >= TIME_LIMIT);
    out_of_range = ctrl.blue | ctrl.red;
  end

endmodule

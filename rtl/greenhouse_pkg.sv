// greenhouse_pkg: types and constants shared by the greenhouse monitor.
//
// The monitor reads four analog sensors through a 12-bit ADC, shows their
// voltages in hundredths of a volt and drives three control outputs per
// sensor plus a five-LED alarm level. Voltages are carried as unsigned
// centivolts (0..499 for a 0..5 V full scale), which is the unit the
// thresholds below are given in. The numeric defaults are the ones the
// design was specified with: a 50 MHz clock, lower and upper critical
// voltages of 0.20 V and 1.00 V, a 60 s time limit, a display refresh every
// 20,000,001 clocks, a stepper half-step every 1,250,001 clocks and a
// buzzer that is on for about one second out of two.
package greenhouse_pkg;

  localparam int NUM_SENSORS = 4;
  localparam int ADC_BITS    = 12;
  localparam int CV_BITS     = 9;    // centivolts, 0..499

  // Sensor slots, in the order the ADC results are kept and displayed.
  // Slot 0 is shown on the left display half with SW0 low, slot 1 on the
  // right half; slots 2 and 3 are shown with SW0 high.
  typedef enum logic [1:0] {
    S_INFRARED = 2'd0,
    S_VISIBLE  = 2'd1,
    S_TEMP     = 2'd2,
    S_HUMIDITY = 2'd3
  } sensor_e;

  typedef logic [ADC_BITS-1:0] adc_code_t;
  typedef logic [CV_BITS-1:0]  centivolt_t;
  typedef logic [3:0]          bcd_t;

  // Three decimal digits of a voltage: volts, tenths, hundredths.
  typedef struct packed {
    bcd_t d2;
    bcd_t d1;
    bcd_t d0;
  } bcd3_t;

  // The three control-system outputs of one sensor.
  typedef struct packed {
    logic blue;    // at or below the lower critical value
    logic red;     // at or above the upper critical value
    logic yellow;  // time limit reached
  } ctrl_t;

  // Alarm-level LEDs; exactly one is lit.
  typedef struct packed {
    logic red;     // four sensors out of range
    logic yellow;  // three
    logic white;   // two
    logic blue;    // one
    logic green;   // none
  } alarm_t;

  localparam int unsigned CLK_HZ          = 50_000_000;
  localparam int unsigned LOW_CV          = 20;          // 0.20 V
  localparam int unsigned HIGH_CV         = 100;         // 1.00 V
  localparam int unsigned TIME_LIMIT_S    = 60;
  localparam int unsigned REFRESH_COUNT   = 20_000_000;
  localparam int unsigned STEP_WAIT       = 1_250_000;
  localparam int unsigned BUZZ_HALF       = 50_000_000;

  // Half-step coil pattern for step position s (0..7): even positions
  // energise coil s/2 alone, odd positions coils s/2 and s/2+1 (mod 4).
  function automatic logic [3:0] half_step_coils(input logic [2:0] s);
    logic [3:0] one;
    one = 4'b0001 << s[2:1];
    return s[0] ? (one | {one[2:0], one[3]}) : one;
  endfunction

endpackage

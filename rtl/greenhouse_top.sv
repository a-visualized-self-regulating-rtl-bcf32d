// greenhouse_top: FPGA logic of a four-sensor greenhouse monitor and
// controller.
//
// Four sensor voltages (infrared, visible light, temperature, humidity)
// reach the FPGA's on-chip ADC, which sits outside this module: its
// command/response interface is brought out as ports. The design
//   - sequences the ADC over its four channels (adc_sequencer),
//   - copies the latest results every REFRESH_COUNT+1 clocks
//     (refresh_timer) and converts each to centivolts and BCD
//     (volt_to_bcd),
//   - counts elapsed seconds (seconds_counter),
//   - runs the twelve sensor controls (sensor_control: blue when at or
//     below 0.20 V, red when at or above 1.00 V, yellow after 60 s),
//   - runs the thirteenth control, the alarm level (alarm_level),
//   - for visible light only, drives the curtain stepper
//     (stepper_controller), the buzzer (buzzer_driver) and all ten board
//     LEDs, which light while the light is too bright,
//   - shows a pair of voltages on six seven-segment digits selected by
//     SW0 (display_mux).
// Everything above follows the original design. All sensors share the
// same limits by default, as in the original; each sensor's lower and upper
// voltage and time limit can be set separately through the array
// parameters, which the original describes as a small change. Three resets are kept as
// in the original: rst_n (push button) for the ADC path, refresh and
// buzzer, n_rst_seconds (switch) for the time count and rst_step (switch,
// active high) for the motor. Giving the buzzer a reset is this design's
// choice.
// Timing: a new ADC value affects the controls, LEDs and displays after
// the next refresh, then combinationally; the stepper moves at most one
// half-step per STEP_WAIT+1 clocks.
module greenhouse_top
  import greenhouse_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = CLK_HZ,
  parameter int unsigned REFRESH     = REFRESH_COUNT,
  parameter int unsigned STEP_PERIOD = STEP_WAIT,
  parameter int unsigned BUZZ_PERIOD = BUZZ_HALF,
  // Per-sensor limits, indexed by sensor slot (see sensor_e).
  parameter int unsigned LOW_LIMIT  [NUM_SENSORS] = '{default: LOW_CV},
  parameter int unsigned HIGH_LIMIT [NUM_SENSORS] = '{default: HIGH_CV},
  parameter int unsigned TIME_LIMIT [NUM_SENSORS] = '{default: TIME_LIMIT_S}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        n_rst_seconds,
  input  logic        rst_step,
  input  logic        sw0,
  // On-chip ADC, command side
  output logic        adc_cmd_valid,
  output logic [4:0]  adc_cmd_channel,
  output logic        adc_cmd_sop,
  output logic        adc_cmd_eop,
  input  logic        adc_cmd_ready,
  // On-chip ADC, response side
  input  logic        adc_rsp_valid,
  input  logic [4:0]  adc_rsp_channel,
  input  adc_code_t   adc_rsp_data,
  input  logic        adc_rsp_sop,
  input  logic        adc_rsp_eop,
  // Outputs to the board and the external circuits
  output ctrl_t      [NUM_SENSORS-1:0] ctrl,      // per-sensor blue/red/yellow
  output alarm_t                       alarm,     // alarm-level LEDs
  output logic [3:0]                   coils,     // stepper driver IN4..IN1
  output logic                         buzzer,
  output logic [9:0]                   board_leds,
  output logic [5:0][7:0]              hex,       // HEX5..HEX0, active low
  output centivolt_t [NUM_SENSORS-1:0] cv,        // displayed voltages
  output logic [31:0]                  seconds
);

  adc_code_t [NUM_SENSORS-1:0] adcin, ad;
  bcd3_t     [NUM_SENSORS-1:0] digits;
  logic      [NUM_SENSORS-1:0] out_of_range;
  logic                        refresh_pulse;
  logic [2:0]                  alarm_count;
  logic [2:0]                  step_pos;
  logic                        light_low, light_high;

  adc_sequencer u_seq (
    .clk, .rst_n,
    .cmd_valid  (adc_cmd_valid),
    .cmd_channel(adc_cmd_channel),
    .cmd_sop    (adc_cmd_sop),
    .cmd_eop    (adc_cmd_eop),
    .cmd_ready  (adc_cmd_ready),
    .rsp_valid  (adc_rsp_valid),
    .rsp_channel(adc_rsp_channel),
    .rsp_data   (adc_rsp_data),
    .rsp_sop    (adc_rsp_sop),
    .rsp_eop    (adc_rsp_eop),
    .adcin
  );

  refresh_timer #(.COUNT(REFRESH)) u_refresh (
    .clk, .rst_n, .adcin, .ad, .update(refresh_pulse)
  );

  seconds_counter #(.CLK_FREQ_HZ(CLK_FREQ_HZ)) u_seconds (
    .clk, .n_rst(n_rst_seconds), .seconds
  );

  for (genvar s = 0; s < NUM_SENSORS; s++) begin : g_sensor
    volt_to_bcd u_bcd (.code(ad[s]), .cv(cv[s]), .digits(digits[s]));

    sensor_control #(
      .LOW_LIMIT (LOW_LIMIT[s]),
      .HIGH_LIMIT(HIGH_LIMIT[s]),
      .TIME_LIMIT(TIME_LIMIT[s])
    ) u_ctrl (
      .cv(cv[s]), .seconds, .ctrl(ctrl[s]), .out_of_range(out_of_range[s])
    );
  end

  alarm_level u_alarm (.out_of_range, .leds(alarm), .level(alarm_count));

  assign light_low  = ctrl[S_VISIBLE].blue;
  assign light_high = ctrl[S_VISIBLE].red;
  assign board_leds = {10{light_high}};

  buzzer_driver #(.HALF(BUZZ_PERIOD)) u_buzzer (
    .clk, .rst_n, .enable(light_high), .buzzer
  );

  stepper_controller #(.WAIT(STEP_PERIOD)) u_step (
    .clk, .rst(rst_step), .too_low(light_low), .too_high(light_high),
    .coils, .position(step_pos)
  );

  display_mux u_disp (.sw0, .digits, .hex);

  // Internal status kept for observation in simulation.
  logic unused;
  assign unused = ^{refresh_pulse, alarm_count, step_pos};

endmodule

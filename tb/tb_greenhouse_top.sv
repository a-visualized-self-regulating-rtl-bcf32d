// tb_greenhouse_top: end-to-end test of the greenhouse monitor at reduced
// timing (1 "second" = 40 clocks, refresh every 31 clocks, a half-step
// every 4 clocks, buzzer 6 on / 5 off, time limit 60 "seconds").
//
// The ADC is the behavioural model, channels 1..4 = infrared, visible,
// temperature, humidity. The test replays the board situations the design
// was demonstrated with (all four out of range with dark or bright
// visible light, then three, two, one and none out of range), checks
// every control LED, alarm LED, board LED, the displayed digits on both
// SW0 settings, the stepper direction and the buzzer pattern, and finally
// lets the time limit pass so all four yellow outputs light. A second
// instance with a different voltage and time limit per sensor runs on the
// same ADC responses and is checked against those limits. Each
// mechanism is counted; one that never occurred is a failure.
`timescale 1ns/1ps
module tb_greenhouse_top;
  import greenhouse_pkg::*;

  localparam int HZ = 40, REF = 30, STEPW = 3, BUZZ = 5, TLIM = 60;

  logic clk = 0, rst_n = 0, n_rst_seconds = 0, rst_step = 1, sw0 = 0;
  always #5 clk = ~clk;

  logic [4:0][11:0] chan_code;
  logic cmd_valid, cmd_sop, cmd_eop, cmd_ready, rsp_valid, rsp_sop, rsp_eop;
  logic [4:0] cmd_channel, rsp_channel;
  logic [11:0] rsp_data;
  int unsigned accepted;
  ctrl_t [NUM_SENSORS-1:0] ctrl;
  alarm_t alarm;
  logic [3:0] coils;
  logic buzzer;
  logic [9:0] board_leds;
  logic [5:0][7:0] hex;
  centivolt_t [NUM_SENSORS-1:0] cv;
  logic [31:0] seconds;

  greenhouse_top #(.CLK_FREQ_HZ(HZ), .REFRESH(REF), .STEP_PERIOD(STEPW),
                   .BUZZ_PERIOD(BUZZ), .TIME_LIMIT('{default: TLIM})) dut (
    .clk, .rst_n, .n_rst_seconds, .rst_step, .sw0,
    .adc_cmd_valid(cmd_valid), .adc_cmd_channel(cmd_channel), .adc_cmd_sop(cmd_sop),
    .adc_cmd_eop(cmd_eop), .adc_cmd_ready(cmd_ready), .adc_rsp_valid(rsp_valid),
    .adc_rsp_channel(rsp_channel), .adc_rsp_data(rsp_data), .adc_rsp_sop(rsp_sop),
    .adc_rsp_eop(rsp_eop), .ctrl, .alarm, .coils, .buzzer, .board_leds, .hex, .cv, .seconds);

  // Second instance with a different limit per sensor, fed by the same ADC
  // responses (its sequencer runs in step with the first one).
  localparam int unsigned LOW2  [4] = '{10, 25, 40, 55};
  localparam int unsigned HIGH2 [4] = '{60, 150, 300, 460};
  localparam int unsigned TIME2 [4] = '{20, 40, 60, 80};
  ctrl_t [NUM_SENSORS-1:0] ctrl2;
  logic [31:0] seconds2;
  greenhouse_top #(.CLK_FREQ_HZ(HZ), .REFRESH(REF), .STEP_PERIOD(STEPW),
                   .BUZZ_PERIOD(BUZZ), .LOW_LIMIT(LOW2), .HIGH_LIMIT(HIGH2),
                   .TIME_LIMIT(TIME2)) dut2 (
    .clk, .rst_n, .n_rst_seconds, .rst_step, .sw0,
    .adc_cmd_valid(), .adc_cmd_channel(), .adc_cmd_sop(), .adc_cmd_eop(),
    .adc_cmd_ready(cmd_ready), .adc_rsp_valid(rsp_valid), .adc_rsp_channel(rsp_channel),
    .adc_rsp_data(rsp_data), .adc_rsp_sop(rsp_sop), .adc_rsp_eop(rsp_eop),
    .ctrl(ctrl2), .alarm(), .coils(), .buzzer(), .board_leds(), .hex(), .cv(), .seconds(seconds2));
  int n_per_sensor = 0;

  adc_model #(.LATENCY(3)) adc (.clk, .rst_n, .chan_code, .cmd_valid, .cmd_channel,
    .cmd_sop, .cmd_eop, .cmd_ready, .rsp_valid, .rsp_channel, .rsp_data, .rsp_sop,
    .rsp_eop, .accepted);

  int checks = 0, failures = 0;
  int n_level[5];
  int n_cw = 0, n_ccw = 0, n_hold = 0, n_buzz = 0, n_board = 0, n_yellow = 0,
      n_sw0 = 0, n_refresh = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [6:0] GLYPH [10] = '{7'b1000000, 7'b1111001, 7'b0100100, 7'b0110000,
                                        7'b0011001, 7'b0010010, 7'b0000011, 7'b1111000,
                                        7'b0000000, 7'b0011000};
  function automatic logic [23:0] show(input int v);
    return {1'b0, GLYPH[v / 100], 1'b1, GLYPH[(v / 10) % 10], 1'b1, GLYPH[v % 10]};
  endfunction

  // Voltage in centivolts -> smallest ADC code that reads as that voltage.
  function automatic logic [11:0] code_for(input int centivolts);
    return 12'((centivolts * 4096 + 499) / 500);
  endfunction

  // Count refreshes and buzzer rising edges.
  logic buzz_q = 0;
  always @(posedge clk) begin
    if (dut.refresh_pulse) n_refresh++;
    if (buzzer && !buzz_q) n_buzz++;
    buzz_q <= buzzer;
  end

  // Apply four voltages (IR, visible, temperature, humidity), wait for
  // them to reach the controls and check every output.
  task automatic scenario(input string name, input int ir, input int vis, input int tmp, input int hum);
    int v[4], n_out;
    alarm_t want;
    logic [2:0] p0;
    v = '{ir, vis, tmp, hum};
    for (int s = 0; s < 4; s++) chan_code[s + 1] = code_for(v[s]);
    // Two full refresh periods cover the ADC round and the refresh copy.
    repeat (2 * (REF + 1) + 40) @(posedge clk);
    #1;
    n_out = 0;
    for (int s = 0; s < 4; s++) begin
      check(int'(cv[s]) == v[s], $sformatf("%s: sensor %0d reads %0d cV, expected %0d", name, s, cv[s], v[s]));
      check(ctrl[s].blue == (v[s] <= 20) && ctrl[s].red == (v[s] >= 100),
            $sformatf("%s: sensor %0d blue/red %b%b", name, s, ctrl[s].blue, ctrl[s].red));
      if (v[s] <= 20 || v[s] >= 100) n_out++;
    end
    want = '0;
    case (n_out)
      0: want.green = 1; 1: want.blue = 1; 2: want.white = 1; 3: want.yellow = 1; default: want.red = 1;
    endcase
    check(alarm == want, $sformatf("%s: alarm %b expected %b", name, alarm, want));
    n_level[n_out]++;
    check(board_leds == {10{vis >= 100}}, $sformatf("%s: board LEDs", name));
    if (vis >= 100) n_board++;
    // Displays: both switch settings.
    sw0 = 0; #1;
    check(hex == {show(ir), show(vis)}, $sformatf("%s: display SW0=0", name));
    sw0 = 1; #1;
    check(hex == {show(tmp), show(hum)}, $sformatf("%s: display SW0=1", name));
    n_sw0++;
    sw0 = 0;
    // Stepper: watch 4 step periods.
    p0 = dut.step_pos;
    repeat (4 * (STEPW + 1)) @(posedge clk);
    #1;
    if (vis <= 20) begin
      check(dut.step_pos == p0 + 3'd4, $sformatf("%s: stepper forward", name)); n_cw++;
    end else if (vis >= 100) begin
      check(dut.step_pos == p0 - 3'd4, $sformatf("%s: stepper backward", name)); n_ccw++;
    end else begin
      check(dut.step_pos == p0, $sformatf("%s: stepper holds", name)); n_hold++;
    end
    // Buzzer: on for BUZZ+1, off for BUZZ while bright, silent otherwise.
    if (vis >= 100) begin
      int on_cnt = 0;
      for (int k = 0; k < 2 * BUZZ + 1; k++) begin @(posedge clk); #1 on_cnt += buzzer; end
      check(on_cnt == BUZZ + 1, $sformatf("%s: buzzer on %0d of %0d clocks", name, on_cnt, 2 * BUZZ + 1));
    end else begin
      check(!buzzer, $sformatf("%s: buzzer silent", name));
    end
    for (int s = 0; s < 4; s++) begin
      check(ctrl[s].yellow == (seconds >= TLIM), $sformatf("%s: yellow %0d", name, s));
      check(ctrl2[s].blue == (v[s] <= LOW2[s]) && ctrl2[s].red == (v[s] >= HIGH2[s])
            && ctrl2[s].yellow == (seconds2 >= TIME2[s]),
            $sformatf("%s: per-sensor limits, sensor %0d", name, s));
      if (ctrl2[s] != ctrl[s]) n_per_sensor++;
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chan_code = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; n_rst_seconds = 1; rst_step = 0;
    // All four out: IR 0.04 V, visible 0.18 V, temperature low, humidity high.
    scenario("red, dark", 4, 18, 12, 450);
    // Visible light now too bright: 1.83 V.
    scenario("red, bright", 4, 183, 12, 450);
    // Visible back in range (0.23 V): three out.
    scenario("yellow", 4, 23, 12, 450);
    // Infrared in range too (0.50 V, visible 0.29 V): two out.
    scenario("white", 50, 29, 12, 450);
    scenario("blue", 50, 29, 60, 450);
    scenario("green", 50, 29, 60, 99);
    scenario("boundary", 21, 99, 20, 100);
    // Let the time limit pass.
    wait (seconds == TLIM);
    @(posedge clk); #1;
    check(&{ctrl[0].yellow, ctrl[1].yellow, ctrl[2].yellow, ctrl[3].yellow}, "all yellow after time limit");
    n_yellow++;
    scenario("after time limit", 4, 18, 60, 99);
    // Seconds reset clears the yellow outputs.
    n_rst_seconds = 0; @(posedge clk); #1;
    check(ctrl[0].yellow == 0 && seconds == 0, "seconds reset clears yellow");
    n_rst_seconds = 1;

    $display("mechanisms: levels %0d %0d %0d %0d %0d, cw %0d ccw %0d hold %0d, buzzer %0d, board %0d, yellow %0d, sw0 %0d, refresh %0d, per-sensor %0d",
             n_level[0], n_level[1], n_level[2], n_level[3], n_level[4], n_cw, n_ccw, n_hold, n_buzz,
             n_board, n_yellow, n_sw0, n_refresh, n_per_sensor);
    for (int i = 0; i < 5; i++) check(n_level[i] > 0, $sformatf("alarm level %0d seen", i));
    check(n_cw > 0 && n_ccw > 0 && n_hold > 0, "stepper forward, backward and hold seen");
    check(n_buzz > 0 && n_board > 0, "buzzer and board LEDs seen");
    check(n_yellow > 0 && n_sw0 > 0 && n_refresh > 0, "time limit, display switch, refresh seen");
    check(n_per_sensor > 0, "per-sensor limits changed an output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

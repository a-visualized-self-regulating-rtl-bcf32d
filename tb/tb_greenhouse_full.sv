// tb_greenhouse_full: the greenhouse monitor with every parameter at its
// default (50 MHz clock, refresh every 20,000,001 clocks, half-step every
// 1,250,001 clocks, buzzer 50,000,001 on / 50,000,000 off, 1 s = 50,000,000
// clocks).
//
// One complete operation: the ADC model supplies infrared 0.04 V, visible
// 1.83 V, temperature 0.12 V and humidity 4.50 V (all four out of range,
// light too bright). The test checks that nothing shows before the first
// refresh and that the values, controls, red alarm, board LEDs and display
// appear exactly on it; that the curtain motor takes a half-step every
// 1,250,001 clocks, forward while the light still reads 0 V before the
// first refresh and backward after it; that the buzzer sounds for exactly 50,000,001
// clocks and then falls silent; and that the seconds count reaches 1 after
// 50,000,000 clocks. The 60 s time limit (3e9 clocks) is left to the
// reduced-size test.
`timescale 1ns/1ps
module tb_greenhouse_full;
  import greenhouse_pkg::*;

  logic clk = 0, rst_n = 0, n_rst_seconds = 0, rst_step = 1, sw0 = 0;
  always #10 clk = ~clk;

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

  greenhouse_top dut (
    .clk, .rst_n, .n_rst_seconds, .rst_step, .sw0,
    .adc_cmd_valid(cmd_valid), .adc_cmd_channel(cmd_channel), .adc_cmd_sop(cmd_sop),
    .adc_cmd_eop(cmd_eop), .adc_cmd_ready(cmd_ready), .adc_rsp_valid(rsp_valid),
    .adc_rsp_channel(rsp_channel), .adc_rsp_data(rsp_data), .adc_rsp_sop(rsp_sop),
    .adc_rsp_eop(rsp_eop), .ctrl, .alarm, .coils, .buzzer, .board_leds, .hex, .cv, .seconds);

  adc_model #(.LATENCY(50)) adc (.clk, .rst_n, .chan_code, .cmd_valid, .cmd_channel,
    .cmd_sop, .cmd_eop, .cmd_ready, .rsp_valid, .rsp_channel, .rsp_data, .rsp_sop,
    .rsp_eop, .accepted);

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  longint unsigned t_refresh = 0, t_buzz_on = 0, t_buzz_off = 0, t_sec = 0;
  int n_steps = 0, n_fwd = 0, n_step_gap_bad = 0;
  logic [2:0] last_pos;
  logic buzz_q = 1'b0;

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
  function automatic logic [11:0] code_for(input int centivolts);
    return 12'((centivolts * 4096 + 499) / 500);
  endfunction

  // Clock edge k (k = 1 is the first edge after reset release) and the
  // values the design shows just after it.
  localparam longint unsigned STEP_T = 1_250_001;
  localparam longint unsigned REFRESH_EDGE = 20_000_001;
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      #1;
      cyc++;
      if (dut.refresh_pulse && t_refresh == 0) t_refresh = cyc;
      if (buzzer && !buzz_q) t_buzz_on = cyc;
      if (!buzzer && buzz_q && t_buzz_off == 0) t_buzz_off = cyc;
      if (seconds == 1 && t_sec == 0) t_sec = cyc;
      buzz_q = buzzer;
      // A half-step is due on edges 1, 1+STEP_T, 1+2*STEP_T, ...; forward
      // while the light still reads 0 V (before the first refresh),
      // backward once 1.83 V has been copied in.
      if ((cyc - 1) % STEP_T == 0) begin
        logic [2:0] want;
        want = (cyc <= REFRESH_EDGE) ? last_pos + 3'd1 : last_pos - 3'd1;
        if (dut.step_pos != want) n_step_gap_bad++;
        if (cyc <= REFRESH_EDGE) n_fwd++; else n_steps++;
      end else if (dut.step_pos != last_pos) n_step_gap_bad++;
      last_pos = dut.step_pos;
    end
  end

  initial begin
    // Watchdog: 80,000,000 clocks.
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chan_code = '0;
    chan_code[1] = code_for(4);
    chan_code[2] = code_for(183);
    chan_code[3] = code_for(12);
    chan_code[4] = code_for(450);
    last_pos = 3'd7;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; n_rst_seconds = 1; rst_step = 0;
    // Just before the first refresh nothing has been copied yet.
    repeat (20_000_000) @(posedge clk);
    #1;
    check(cv == '0 && alarm.red && !buzzer && board_leds == '0, "before first refresh: zero volts, all low");
    @(posedge clk); #2;   // after the edge monitor has logged this edge
    check(t_refresh == 20_000_001, $sformatf("first refresh at clock %0d", t_refresh));
    check(cv[0] == 9'd4 && cv[1] == 9'd183 && cv[2] == 9'd12 && cv[3] == 9'd450, "voltages after refresh");
    check(ctrl[0].blue && ctrl[1].red && ctrl[2].blue && ctrl[3].red, "control outputs");
    check(alarm == alarm_t'(5'b10000), "red alarm");
    check(board_leds == '1, "board LEDs on");
    check(hex == {show(4), show(183)}, "display infrared / visible");
    sw0 = 1; #1;
    check(hex == {show(12), show(450)}, "display temperature / humidity");
    sw0 = 0;
    wait (t_buzz_off != 0);
    @(posedge clk); #1;
    check(t_buzz_off - t_buzz_on == 50_000_001, $sformatf("buzzer on for %0d clocks", t_buzz_off - t_buzz_on));
    check(t_buzz_on == 20_000_002, $sformatf("buzzer starts at clock %0d", t_buzz_on));
    check(t_sec == 50_000_000, $sformatf("one second at clock %0d", t_sec));
    check(seconds == 1 && !ctrl[0].yellow, "one second elapsed, time limit not reached");
    check(n_fwd == 16 && n_steps == 40 && n_step_gap_bad == 0,
          $sformatf("%0d forward, %0d backward half-steps, %0d irregular", n_fwd, n_steps, n_step_gap_bad));
    check(!buzzer, "buzzer off phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

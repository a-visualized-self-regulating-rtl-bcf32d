// tb_adc_sequencer: checks the ADC channel sequencer against the
// behavioural ADC model. The converter takes channel 1 twice at start-up
// (the command stays valid while the sequencer moves on), then 2,3,4,1,...
// After that each result lands in slot channel-1; new input values are
// picked up within six conversions; one conversion takes LATENCY+1
// clocks (accept, then LATENCY clocks to the response) with the next
// command accepted in the response cycle.
`timescale 1ns/1ps
module tb_adc_sequencer;
  import greenhouse_pkg::*;
  localparam int LAT = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0][11:0] chan_code;
  logic cmd_valid, cmd_sop, cmd_eop, cmd_ready;
  logic [4:0] cmd_channel, rsp_channel;
  logic rsp_valid, rsp_sop, rsp_eop;
  logic [11:0] rsp_data;
  int unsigned accepted;
  adc_code_t [NUM_SENSORS-1:0] adcin;

  int checks = 0, failures = 0;

  adc_sequencer dut (.clk, .rst_n, .cmd_valid, .cmd_channel, .cmd_sop, .cmd_eop,
    .cmd_ready, .rsp_valid, .rsp_channel, .rsp_data, .rsp_sop, .rsp_eop, .adcin);
  adc_model #(.LATENCY(LAT)) adc (.clk, .rst_n, .chan_code, .cmd_valid, .cmd_channel,
    .cmd_sop, .cmd_eop, .cmd_ready, .rsp_valid, .rsp_channel, .rsp_data, .rsp_sop,
    .rsp_eop, .accepted);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected order of accepted command channels.
  int unsigned n_acc = 0;
  always @(posedge clk) if (rst_n && cmd_valid && cmd_ready) begin
    int unsigned want;
    want = (n_acc < 2) ? 1 : ((n_acc - 1) % 4) + 1;
    check(cmd_channel == 5'(want), $sformatf("command %0d: channel %0d, expected %0d", n_acc, cmd_channel, want));
    n_acc++;
  end

  function automatic int slot_of(input int ch);
    return ch - 1;
  endfunction

  task automatic check_slots(input string tag);
    for (int ch = 1; ch <= 4; ch++)
      check(adcin[slot_of(ch)] == chan_code[ch],
            $sformatf("%s: slot %0d = %h, expected ch%0d code %h", tag, slot_of(ch), adcin[slot_of(ch)], ch, chan_code[ch]));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned t0, n0;
    chan_code = '0;
    for (int ch = 1; ch <= 4; ch++) chan_code[ch] = 12'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // First result goes to slot 3, the start-up quirk of the sequence.
    @(posedge clk iff rsp_valid);
    @(posedge clk);
    check(adcin[3] == chan_code[1] && adcin[2:0] == '0, "first result in slot 3");
    // After one more full round every slot holds its channel.
    repeat (4) @(posedge clk iff rsp_valid);
    @(posedge clk);
    check_slots("round 1");
    // Rate: conversions per clock once running.
    t0 = 0; n0 = accepted;
    repeat (40 * (LAT + 1)) begin @(posedge clk); t0++; end
    check(accepted - n0 == 40, $sformatf("40 conversions in %0d clocks, saw %0d", t0, accepted - n0));
    // New values must appear within one further round.
    for (int r = 0; r < 5; r++) begin
      for (int ch = 1; ch <= 4; ch++) chan_code[ch] = 12'($urandom);
      repeat (6) @(posedge clk iff rsp_valid);
      @(posedge clk);
      check_slots($sformatf("update %0d", r));
    end
    // Reset clears command valid and results.
    rst_n = 0;
    #1;
    check(!cmd_valid && adcin == '0, "reset clears sequencer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_refresh_timer: with COUNT = 9 the outputs must copy the inputs first
// 10 clocks after reset and then every 10 clocks, and hold in between.
`timescale 1ns/1ps
module tb_refresh_timer;
  import greenhouse_pkg::*;
  localparam int N = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  adc_code_t [NUM_SENSORS-1:0] adcin, ad, held;
  logic update;
  int checks = 0, failures = 0;

  refresh_timer #(.COUNT(N)) dut (.clk, .rst_n, .adcin, .ad, .update);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adcin = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(ad == '0 && !update, "outputs clear after reset");
    held = '0;
    for (int cyc = 1; cyc <= 10 * (N + 1); cyc++) begin
      adcin = {12'($urandom), 12'($urandom), 12'($urandom), 12'($urandom)};
      @(posedge clk);
      #1;
      if (cyc % (N + 1) == 0) begin
        check(update, $sformatf("update at clock %0d", cyc));
        check(ad == adcin, $sformatf("copy at clock %0d", cyc));
        held = ad;
      end else begin
        check(!update, $sformatf("no update at clock %0d", cyc));
        check(ad == held, $sformatf("hold at clock %0d", cyc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

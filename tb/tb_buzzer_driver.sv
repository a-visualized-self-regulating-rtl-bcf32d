// tb_buzzer_driver: with HALF = 4 the buzzer, once enabled, must be on for
// 5 clocks and off for 4, repeating; disabling silences it at once and the
// next alarm starts with the on phase. Reset silences it too.
`timescale 1ns/1ps
module tb_buzzer_driver;
  localparam int HALF = 4;
  logic clk = 0, rst_n = 0, enable = 0, buzzer;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  buzzer_driver #(.HALF(HALF)) dut (.clk, .rst_n, .enable, .buzzer);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected output for the k-th clock (k = 1, 2, ...) after enable rose.
  function automatic logic want(input int k);
    return ((k - 1) % (2 * HALF + 1)) <= HALF;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) begin @(posedge clk); #1 check(!buzzer, "silent while disabled"); end
    for (int burst = 0; burst < 3; burst++) begin
      int len;
      len = (burst == 0) ? 4 * (2 * HALF + 1) : 3 + burst;
      enable = 1;
      for (int k = 1; k <= len; k++) begin
        @(posedge clk); #1;
        check(buzzer == want(k), $sformatf("burst %0d clock %0d: buzzer %0b", burst, k, buzzer));
      end
      enable = 0;
      @(posedge clk); #1 check(!buzzer, "silenced when disabled");
      @(posedge clk); #1 check(!buzzer, "stays silent");
    end
    enable = 1;
    @(posedge clk); #1 check(buzzer, "on again");
    rst_n = 0;
    #1 check(!buzzer, "reset silences");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

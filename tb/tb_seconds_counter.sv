// tb_seconds_counter: with a 5-clock "second" the count must advance
// exactly every 5 clocks and clear on the synchronous reset.
`timescale 1ns/1ps
module tb_seconds_counter;
  localparam int HZ = 5;
  logic clk = 0, n_rst = 0;
  always #5 clk = ~clk;
  logic [31:0] seconds;
  int checks = 0, failures = 0;

  seconds_counter #(.CLK_FREQ_HZ(HZ)) dut (.clk, .n_rst, .seconds);

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
    repeat (2) @(posedge clk);
    #1;
    check(seconds == 0, "clear in reset");
    n_rst = 1;
    for (int cyc = 1; cyc <= 12 * HZ; cyc++) begin
      @(posedge clk); #1;
      check(seconds == 32'(cyc / HZ), $sformatf("clock %0d: seconds %0d", cyc, seconds));
    end
    n_rst = 0;
    @(posedge clk); #1;
    check(seconds == 0, "synchronous reset clears");
    n_rst = 1;
    repeat (HZ - 1) @(posedge clk);
    #1 check(seconds == 0, "restart: not yet one second");
    @(posedge clk); #1;
    check(seconds == 1, "restart: one second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

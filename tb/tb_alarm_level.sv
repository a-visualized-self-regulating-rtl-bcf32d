// tb_alarm_level: all sixteen out-of-range patterns; exactly one LED lit,
// its colour set by the number of sensors out of range.
`timescale 1ns/1ps
module tb_alarm_level;
  import greenhouse_pkg::*;

  logic [NUM_SENSORS-1:0] out_of_range;
  alarm_t     leds;
  logic [2:0] level;
  int checks = 0, failures = 0;

  alarm_level dut (.out_of_range, .leds, .level);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    alarm_t want;
    for (int p = 0; p < 16; p++) begin
      out_of_range = 4'(p);
      #1;
      n = 0;
      for (int i = 0; i < 4; i++) n += (p >> i) & 1;
      want = '0;
      case (n)
        0: want.green  = 1'b1;
        1: want.blue   = 1'b1;
        2: want.white  = 1'b1;
        3: want.yellow = 1'b1;
        default: want.red = 1'b1;
      endcase
      checks++;
      if (leds != want || int'(level) != n) begin
        failures++;
        $display("FAIL pattern %b: leds %b level %0d, expected %b %0d", out_of_range, leds, level, want, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_volt_to_bcd: every 12-bit code against centivolts = code*500/4096
// (integer division) and its three decimal digits, plus the voltages
// quoted for the original board (0.04, 0.18, 0.23, 0.29, 0.50, 1.83 V).
`timescale 1ns/1ps
module tb_volt_to_bcd;
  import greenhouse_pkg::*;

  adc_code_t  code;
  centivolt_t cv;
  bcd3_t      digits;
  int checks = 0, failures = 0;

  volt_to_bcd dut (.code, .cv, .digits);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, quoted[6];
    quoted = '{4, 18, 23, 29, 50, 183};
    for (int c = 0; c < 4096; c++) begin
      code = 12'(c);
      #1;
      v = (c * 500) / 4096;
      check(int'(cv) == v, $sformatf("code %0d: cv %0d expected %0d", c, cv, v));
      check(digits.d2 == 4'(v / 100) && digits.d1 == 4'((v / 10) % 10) && digits.d0 == 4'(v % 10),
            $sformatf("code %0d: digits %0d%0d%0d expected %0d", c, digits.d2, digits.d1, digits.d0, v));
    end
    foreach (quoted[i]) begin
      code = 12'((quoted[i] * 4096 + 499) / 500);
      #1;
      check(int'(cv) == quoted[i], $sformatf("quoted %0d cV", quoted[i]));
    end
    code = 12'hFFF;
    #1;
    check(cv == 9'd499 && digits == {4'd4, 4'd9, 4'd9}, "full scale 4.99 V");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

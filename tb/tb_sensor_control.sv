// tb_sensor_control: boundary and random checks of the three controls
// with the default limits (0.20 V, 1.00 V, 60 s) and with other limits.
`timescale 1ns/1ps
module tb_sensor_control;
  import greenhouse_pkg::*;

  centivolt_t  cv;
  logic [31:0] seconds;
  ctrl_t       c_def, c_alt;
  logic        oor_def, oor_alt;
  int checks = 0, failures = 0;

  sensor_control dut (.cv, .seconds, .ctrl(c_def), .out_of_range(oor_def));
  sensor_control #(.LOW_LIMIT(50), .HIGH_LIMIT(300), .TIME_LIMIT(5)) dut_alt
    (.cv, .seconds, .ctrl(c_alt), .out_of_range(oor_alt));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input int v, input int s);
    cv = 9'(v); seconds = 32'(s);
    #1;
    check(c_def.blue == (v <= 20) && c_def.red == (v >= 100) && c_def.yellow == (s >= 60)
          && oor_def == (v <= 20 || v >= 100), $sformatf("default limits cv=%0d s=%0d", v, s));
    check(c_alt.blue == (v <= 50) && c_alt.red == (v >= 300) && c_alt.yellow == (s >= 5)
          && oor_alt == (v <= 50 || v >= 300), $sformatf("other limits cv=%0d s=%0d", v, s));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges[10];
    edges = '{0, 19, 20, 21, 50, 51, 99, 100, 101, 499};
    foreach (edges[i]) apply(edges[i], 0);
    apply(50, 59); apply(50, 60); apply(50, 61); apply(50, 4); apply(50, 5);
    repeat (300) apply($urandom_range(499), $urandom_range(120));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

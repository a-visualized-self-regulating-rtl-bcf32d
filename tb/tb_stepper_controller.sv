// tb_stepper_controller: with WAIT = 3 the motor may move once every 4
// clocks, the first time in the clock after reset. Position goes +1 for
// too_low, -1 for too_high and holds otherwise; the coil outputs must be
// the half-step sequence 0001 0011 0010 0110 0100 1100 1000 1001 indexed by
// position. The reference below is written independently of the design.
`timescale 1ns/1ps
module tb_stepper_controller;
  localparam int WAIT = 3;
  logic clk = 0, rst = 1, too_low = 0, too_high = 0;
  always #5 clk = ~clk;
  logic [3:0] coils;
  logic [2:0] position;
  int checks = 0, failures = 0;

  stepper_controller #(.WAIT(WAIT)) dut (.clk, .rst, .too_low, .too_high, .coils, .position);

  localparam logic [3:0] SEQ [8] = '{4'b0001, 4'b0011, 4'b0010, 4'b0110,
                                     4'b0100, 4'b1100, 4'b1000, 4'b1001};

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
    int pos, cyc, moves_cw, moves_ccw;
    logic [3:0] want_coils;
    moves_cw = 0; moves_ccw = 0;
    repeat (2) @(posedge clk);
    #1 check(coils == 4'b0000, "coils off in reset");
    rst = 0;
    pos = 7; want_coils = 4'b0000; cyc = 0;
    for (int phase = 0; phase < 6; phase++) begin
      // phases: low, high, in range, both, low, high
      too_low  = (phase == 0 || phase == 3 || phase == 4);
      too_high = (phase == 1 || phase == 3 || phase == 5);
      for (int k = 0; k < 11 * (WAIT + 1); k++) begin
        @(posedge clk); #1;
        if (cyc % (WAIT + 1) == 0) begin
          if (too_low) begin pos = (pos + 1) % 8; moves_cw++; end
          else if (too_high) begin pos = (pos + 7) % 8; moves_ccw++; end
          want_coils = SEQ[pos];
        end
        cyc++;
        check(coils == want_coils && int'(position) == pos,
              $sformatf("clock %0d: coils %b pos %0d, expected %b %0d", cyc, coils, position, want_coils, pos));
      end
    end
    check(moves_cw > 20 && moves_ccw > 20, "both directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

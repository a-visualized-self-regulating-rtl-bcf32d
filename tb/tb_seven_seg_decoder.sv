// tb_seven_seg_decoder: all 16 codes with the point on and off, against
// the active-low glyph table {dp, g..a}. Codes above 9 blank the digit.
`timescale 1ns/1ps
module tb_seven_seg_decoder;
  logic [3:0] digit;
  logic       dp;
  logic [7:0] hex;
  int checks = 0, failures = 0;

  seven_seg_decoder dut (.digit, .dp, .hex);

  localparam logic [6:0] GLYPH [10] = '{7'b1000000, 7'b1111001, 7'b0100100, 7'b0110000,
                                        7'b0011001, 7'b0010010, 7'b0000011, 7'b1111000,
                                        7'b0000000, 7'b0011000};

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] want;
    for (int d = 0; d < 16; d++) for (int p = 0; p < 2; p++) begin
      digit = 4'(d); dp = p[0];
      #1;
      want = {~dp, (d < 10) ? GLYPH[d] : 7'b1111111};
      checks++;
      if (hex !== want) begin
        failures++;
        $display("FAIL digit %0d dp %0d: %b expected %b", d, p, hex, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_display_mux: random digit sets; with SW0 low HEX5..3 must show the
// infrared voltage and HEX2..0 the visible one, with SW0 high temperature
// and humidity, each with the point after its first digit.
`timescale 1ns/1ps
module tb_display_mux;
  import greenhouse_pkg::*;
  logic sw0;
  bcd3_t [NUM_SENSORS-1:0] digits;
  logic [5:0][7:0] hex;
  int checks = 0, failures = 0;

  display_mux dut (.sw0, .digits, .hex);

  localparam logic [6:0] GLYPH [10] = '{7'b1000000, 7'b1111001, 7'b0100100, 7'b0110000,
                                        7'b0011001, 7'b0010010, 7'b0000011, 7'b1111000,
                                        7'b0000000, 7'b0011000};

  function automatic logic [7:0] seg(input int d, input bit point);
    return {~point, GLYPH[d]};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[4];
    int l, r;
    logic [5:0][7:0] want;
    for (int n = 0; n < 200; n++) begin
      for (int s = 0; s < 4; s++) begin
        v[s] = $urandom_range(499);
        digits[s] = {4'(v[s] / 100), 4'((v[s] / 10) % 10), 4'(v[s] % 10)};
      end
      sw0 = n[0];
      #1;
      l = sw0 ? v[2] : v[0];
      r = sw0 ? v[3] : v[1];
      want = {seg(l / 100, 1), seg((l / 10) % 10, 0), seg(l % 10, 0),
              seg(r / 100, 1), seg((r / 10) % 10, 0), seg(r % 10, 0)};
      checks++;
      if (hex != want) begin
        failures++;
        $display("FAIL sw0=%0b values %0d %0d", sw0, l, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

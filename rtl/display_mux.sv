// display_mux: chooses which two voltages the six seven-segment digits
// show and decodes them.
//
// With `sw0` low the left three digits (HEX5..HEX3) show the infrared
// voltage and the right three (HEX2..HEX0) the visible-light voltage; with
// `sw0` high they show temperature and humidity. Each voltage is shown as
// X.YZ volts: the first digit of each half has its decimal point lit. The
// pairing and the switch follow the original design; the decoding of the
// two rightmost digits matches the other undotted digits.
// Combinational.
module display_mux
  import greenhouse_pkg::*;
(
  input  logic                   sw0,
  input  bcd3_t [NUM_SENSORS-1:0] digits,
  output logic [5:0][7:0]        hex     // hex[5] is the leftmost digit
);

  bcd3_t left, right;

  always_comb begin
    if (sw0) begin
      left  = digits[S_TEMP];
      right = digits[S_HUMIDITY];
    end else begin
      left  = digits[S_INFRARED];
      right = digits[S_VISIBLE];
    end
  end

  seven_seg_decoder u_hex5 (.digit(left.d2),  .dp(1'b1), .hex(hex[5]));
  seven_seg_decoder u_hex4 (.digit(left.d1),  .dp(1'b0), .hex(hex[4]));
  seven_seg_decoder u_hex3 (.digit(left.d0),  .dp(1'b0), .hex(hex[3]));
  seven_seg_decoder u_hex2 (.digit(right.d2), .dp(1'b1), .hex(hex[2]));
  seven_seg_decoder u_hex1 (.digit(right.d1), .dp(1'b0), .hex(hex[1]));
  seven_seg_decoder u_hex0 (.digit(right.d0), .dp(1'b0), .hex(hex[0]));

endmodule

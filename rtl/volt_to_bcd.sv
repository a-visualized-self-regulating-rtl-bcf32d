// volt_to_bcd: turns one 12-bit ADC code into a voltage in hundredths of
// a volt and into the three decimal digits shown on the display.
//
// The ADC spans 0..5 V, so the voltage in centivolts is
// floor(code * 500 / 4096), 0..499; the divide by 4096 is a shift. The
// digits are volts = cv / 100, tenths = (cv mod 100) / 10 and
// hundredths = cv mod 10. This scaling and digit split are the original
// design's; it is purely combinational.
module volt_to_bcd
  import greenhouse_pkg::*;
(
  input  adc_code_t  code,
  output centivolt_t cv,
  output bcd3_t      digits
);

  logic [ADC_BITS+8:0] scaled;   // code * 500 needs 21 bits

  always_comb begin
    scaled    = (ADC_BITS+9)'(code) * (ADC_BITS+9)'(500);
    cv        = centivolt_t'(scaled >> ADC_BITS);
    digits.d2 = bcd_t'(cv / 9'd100);
    digits.d1 = bcd_t'((cv % 9'd100) / 9'd10);
    digits.d0 = bcd_t'(cv % 9'd10);
  end

endmodule

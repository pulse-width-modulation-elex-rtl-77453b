// seg7_decoder: digit to 7-segment pattern by array lookup.
//
// The digit indexes pwm_pkg::SEG_PATTERN, which holds one bit per segment,
// 1 = lit. A common-anode display lights a segment when its cathode is
// pulled low, so the outputs are the inverted pattern: a..g are active low.
// The decimal point is not used and is held high (off). Codes above 9 blank
// the display. The array-lookup form follows the document; the glyph shapes,
// the blanking and the output polarity are this design's choice.
//
// Interface: digit (0..9), seg_n (active-low {g,f,e,d,c,b,a}), dp_n.
// Purely combinational.
module seg7_decoder
  import pwm_pkg::*;
(
  input  digit_t digit,
  output segs_t  seg_n,
  output logic   dp_n
);

  always_comb begin
    seg_n = (digit <= 4'd9) ? ~SEG_PATTERN[digit] : segs_t'('1);
    dp_n  = 1'b1;
  end

endmodule

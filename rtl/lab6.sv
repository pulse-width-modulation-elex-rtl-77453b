// lab6: a decimal digit on a common-anode 7-segment display whose common
// anode is pulse-width modulated so that every digit is equally bright.
//
// Without one resistor per cathode, a digit that lights few segments looks
// brighter than one that lights many. Here the anode is on for n/7 of each
// PWM period, where n is the number of segments the digit lights, so the
// light per segment is the same for every digit.
//
// Data path (all in the divided clock domain `clk` except the divider):
//   clk50 -> clock_divider -> clk = 7 * PWM_HZ (1169 Hz for PWM_HZ = 167)
//   up_in -> sync_pulse -> one pulse per press -> decimal_counter (0..9)
//   digit -> seg7_decoder -> cathodes a..g, dp (active low)
//   digit -> pwm_gen -> com (anode, active high), PWM at PWM_HZ
// The board has no reset input. A two-stage power-on reset in the clk domain
// (flip-flops that power up at 0) holds the other blocks in reset for the
// first two edges of clk (lint notes its declared power-up value; that is
// intended). The decimal point is unused and held dark. `test` carries the divided clock so its frequency
// can be measured on the test pin.
//
// The block structure, the clock and PWM frequencies and the pin names
// follow the document; the power-on reset, the output polarities and the use
// of the test pin are this design's choices.
module lab6 #(
  parameter int unsigned CLK_IN_HZ = 50_000_000,
  parameter int unsigned PWM_HZ    = 167,
  parameter int unsigned STABLE    = 4
) (
  input  logic clk50,
  input  logic up_in,
  output logic a, b, c, d, e, f, g,
  output logic dp,
  output logic com,
  output logic test
);

  import pwm_pkg::*;

  logic   clk;
  logic   up_pulse;
  digit_t digit;
  segs_t  seg_n;
  logic   [1:0] por_q = 2'b00;
  logic   rst;

  clock_divider #(.CLK_IN_HZ(CLK_IN_HZ), .PWM_HZ(PWM_HZ)) u_div (
    .clk_in(clk50), .clk(clk)
  );

  always_ff @(posedge clk) por_q <= {por_q[0], 1'b1};
  assign rst = ~por_q[1];

  sync_pulse #(.STABLE(STABLE)) u_sync (
    .clk(clk), .rst(rst), .btn(up_in), .pulse(up_pulse)
  );

  decimal_counter u_cnt (
    .clk(clk), .rst(rst), .up(up_pulse), .digit(digit)
  );

  seg7_decoder u_dec (
    .digit(digit), .seg_n(seg_n), .dp_n(dp)
  );

  pwm_gen u_pwm (
    .clk(clk), .rst(rst), .digit(digit), .pwm(com)
  );

  assign {g, f, e, d, c, b, a} = seg_n;
  assign test = clk;

endmodule

// decimal_counter: the digit shown on the display, counting 0..9 and
// wrapping back to 0.
//
// A 4-bit register holds the digit. On each clock edge where `up` is high
// (the one-cycle pulse from the pushbutton) it loads digit+1, or 0 when the
// digit is 9; otherwise it holds. Counting 0..9 with wrap-around follows the
// document; the synchronous active-high reset to 0 is this design's choice.
//
// Interface: clk, rst, up (count enable), digit (0..9).
// Timing: `digit` changes on the edge that samples `up` high.
module decimal_counter
  import pwm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   up,
  output digit_t digit
);

  digit_t digit_q;

  always_ff @(posedge clk) begin
    if (rst)
      digit_q <= '0;
    else if (up)
      digit_q <= (digit_q == 4'd9) ? 4'd0 : digit_q + 4'd1;
  end

  assign digit = digit_q;

  a_bcd: assert property (@(posedge clk) disable iff (rst) digit_q <= 4'd9);

endmodule

// pwm_gen: pulse-width modulator for the display's common anode.
//
// A slot counter runs 0,1,...,6,0,... so one PWM period is seven clock
// cycles. The "segments lit per digit" table (pwm_pkg::SEGS_LIT) gives the
// number of lit segments n for the digit shown, and the output is on in the
// slots whose count is below n: duty cycle n/7, from 2/7 (digit 1) to 7/7
// (digit 8, always on). The comparison result passes through a flip-flop
// before leaving the chip so that the pin never glitches. All of this
// follows the document; the reset to slot 0 with the output off is this
// design's choice.
//
// Interface: clk, rst, digit (0..9), pwm (active high: anode powered).
// Timing: pwm is the registered compare of the current slot, so it lags the
// slot counter by one cycle; a new digit takes effect at the next slot.
module pwm_gen
  import pwm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  digit_t digit,
  output logic   pwm
);

  slot_t     slot_q;
  segcount_t lit;
  logic      pwm_q;

  // Digits above 9 never occur; they map to "off".
  always_comb lit = (digit <= 4'd9) ? SEGS_LIT[digit] : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot_q <= '0;
      pwm_q  <= 1'b0;
    end else begin
      slot_q <= (slot_q == slot_t'(PWM_SLOTS - 1)) ? '0 : slot_q + 3'd1;
      pwm_q  <= ({1'b0, slot_q} < {1'b0, lit});
    end
  end

  assign pwm = pwm_q;

  a_slot_range: assert property (@(posedge clk) disable iff (rst) slot_q < slot_t'(PWM_SLOTS));

endmodule

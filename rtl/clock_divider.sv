// clock_divider: derives the slow system clock `clk` from the 50 MHz board
// clock.
//
// The PWM period is seven slots long, so `clk` must run at seven times the
// PWM frequency: F_CLK = 7 * PWM_HZ. With the reference choice PWM_HZ = 167
// (100 Hz plus the example ID digits 67) that is 1169 Hz. The divider counts
// input cycles and toggles `clk` every HALF_PERIOD of them, giving a 50 %
// duty square wave of period 2*HALF_PERIOD input cycles:
//   HALF_PERIOD = round(CLK_IN_HZ / (2 * 7 * PWM_HZ)) = 21386
//   -> F_CLK = 50e6 / 42772 = 1168.99 Hz, PWM = 166.998 Hz.
// The frequencies follow the document; the toggle-counter structure and the
// rounding are this design's own choice.
//
// Interface: clk_in (50 MHz), clk (divided clock, output).
// There is no reset pin on the board: the count and the output start from
// their declared power-up value of zero, which the target's registers
// provide at configuration. Lint notes that these registers have both an
// initial value and a clocked assignment; that is intended, since the
// initial value is the power-up state and there is nothing to reset from.
module clock_divider #(
  parameter int unsigned CLK_IN_HZ   = 50_000_000,
  parameter int unsigned PWM_HZ      = 167,
  parameter int unsigned CLK_OUT_HZ  = pwm_pkg::PWM_SLOTS * PWM_HZ,
  parameter int unsigned HALF_PERIOD = (CLK_IN_HZ + CLK_OUT_HZ) / (2 * CLK_OUT_HZ)
) (
  input  logic clk_in,
  output logic clk
);

  localparam int unsigned CW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;

  logic [CW-1:0] count = '0;
  logic          clk_q = 1'b0;

  always_ff @(posedge clk_in) begin
    if (count == CW'(HALF_PERIOD - 1)) begin
      count <= '0;
      clk_q <= ~clk_q;
    end else begin
      count <= count + 1'b1;
    end
  end

  assign clk = clk_q;

  initial assert (HALF_PERIOD >= 1) else $error("HALF_PERIOD must be at least 1");

endmodule

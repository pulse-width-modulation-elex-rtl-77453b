// tb_lab6: end-to-end test of the PWM display at full size.
//
// The top runs with its default parameters: 50 MHz board clock, 167 Hz PWM,
// so the system clock (brought out on `test`) runs at 1169 Hz. The
// testbench presses the button eleven times, taking the digit through
// 0..9 and back to 0, and for every digit checks
//   * the cathode pattern a..g (active low) and the dark decimal point,
//   * the anode duty cycle: high in exactly n of every 7 system-clock slots,
//     n being the lit-segment count 6 2 5 5 4 5 6 3 7 6,
//   * the PWM period, 7 * 42772 board-clock cycles (about 167 Hz), and the
//     system clock period, 42772 board-clock cycles.
// Mechanisms it counts, each of which must occur: a clean press, a press
// with contact bounce (one step only), a glitch too short to count (no
// step), a held button (one step only), the 9 -> 0 wrap, a digit at 100 %
// duty (no PWM edges) and a digit below 100 %.
// All expected values are written out here, not taken from the design.
module tb_lab6;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned SYS_DIV  = 42772;          // board cycles per system clock
  localparam int unsigned PWM_DIV  = 7 * SYS_DIV;    // board cycles per PWM period
  localparam int          EXP_LIT [10] = '{6, 2, 5, 5, 4, 5, 6, 3, 7, 6};
  // active-low {g,f,e,d,c,b,a}
  localparam logic [6:0]  EXP_N   [10] = '{
    7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10
  };

  logic clk50 = 1'b0, up_in = 1'b0;
  logic a, b, c, d, e, f, g, dp, com, test;
  int   checks = 0, failures = 0;
  int   n_clean = 0, n_bounce = 0, n_glitch = 0, n_held = 0, n_wrap = 0,
        n_full = 0, n_partial = 0;

  lab6 dut (.clk50(clk50), .up_in(up_in), .a(a), .b(b), .c(c), .d(d), .e(e),
            .f(f), .g(g), .dp(dp), .com(com), .test(test));

  always #10 clk50 = ~clk50;   // 50 MHz

  // board-cycle counter used for period measurements
  longint unsigned n50 = 0;
  always @(posedge clk50) n50++;

  initial begin
    #2_000_000_000;   // 2 s of simulated time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // wait n system-clock cycles, changing inputs away from the rising edge
  task automatic sys_cycles(input int n);
    repeat (n) @(negedge test);
  endtask

  task automatic press_clean(input int hold);
    up_in = 1'b1; sys_cycles(hold);
    up_in = 1'b0; sys_cycles(12);
  endtask

  task automatic press_bouncy();
    for (int i = 0; i < 4; i++) begin
      up_in = 1'b1; sys_cycles(2);
      up_in = 1'b0; sys_cycles(1);
    end
    up_in = 1'b1; sys_cycles(10);
    for (int i = 0; i < 3; i++) begin
      up_in = 1'b0; sys_cycles(1);
      up_in = 1'b1; sys_cycles(1);
    end
    up_in = 1'b0; sys_cycles(12);
  endtask

  function automatic logic [6:0] cathodes();
    return {g, f, e, d, c, b, a};
  endfunction

  // check the displayed digit, duty cycle and periods
  task automatic check_digit(input int dg);
    int high;
    longint unsigned t0, t1;
    expect_true(cathodes() == EXP_N[dg],
                $sformatf("digit %0d: cathodes %b expected %b", dg, cathodes(), EXP_N[dg]));
    expect_true(dp == 1'b1, "decimal point lit");
    // 14 consecutive slots: exactly 2n high (periodic waveform)
    high = 0;
    for (int s = 0; s < 14; s++) begin
      @(negedge test);
      if (com) high++;
    end
    expect_true(high == 2 * EXP_LIT[dg],
                $sformatf("digit %0d: anode high %0d of 14 slots, expected %0d",
                          dg, high, 2 * EXP_LIT[dg]));
    // system clock period
    @(posedge test); t0 = n50;
    @(posedge test); t1 = n50;
    expect_true(t1 - t0 == SYS_DIV,
                $sformatf("system clock period %0d board cycles, expected %0d", t1 - t0, SYS_DIV));
    if (EXP_LIT[dg] == 7) begin
      n_full++;
      t0 = n50;
      sys_cycles(14);
      expect_true(com == 1'b1, "anode not on at 100 % duty");
    end else begin
      n_partial++;
      @(posedge com); t0 = n50;
      @(posedge com); t1 = n50;
      expect_true(t1 - t0 == PWM_DIV,
                  $sformatf("PWM period %0d board cycles, expected %0d", t1 - t0, PWM_DIV));
      // pulse width: n slots
      @(posedge com); t0 = n50;
      @(negedge com); t1 = n50;
      expect_true(t1 - t0 == longint'(EXP_LIT[dg]) * SYS_DIV,
                  $sformatf("digit %0d: pulse %0d board cycles, expected %0d",
                            dg, t1 - t0, EXP_LIT[dg] * SYS_DIV));
    end
  endtask

  initial begin
    int exp_digit = 0;
    // power-up: allow the power-on reset to finish
    sys_cycles(4);
    check_digit(0);

    for (int step = 1; step <= 11; step++) begin
      case (step % 4)
        0: begin press_clean(30); n_held++; end    // long hold: one step only
        1: begin press_clean(8);  n_clean++; end
        2: begin press_bouncy();  n_bounce++; end
        default: begin
          // glitch shorter than the debounce window: must not count
          up_in = 1'b1; sys_cycles(2); up_in = 1'b0; sys_cycles(12);
          expect_true(cathodes() == EXP_N[exp_digit], "glitch changed the digit");
          n_glitch++;
          press_clean(8); n_clean++;
        end
      endcase
      if (exp_digit == 9) n_wrap++;
      exp_digit = (exp_digit + 1) % 10;
      check_digit(exp_digit);
    end

    expect_true(n_clean   > 0, "no clean press");
    expect_true(n_bounce  > 0, "no bouncing press");
    expect_true(n_glitch  > 0, "no rejected glitch");
    expect_true(n_held    > 0, "no held press");
    expect_true(n_wrap    > 0, "no 9 -> 0 wrap");
    expect_true(n_full    > 0, "no digit at 100 % duty");
    expect_true(n_partial > 0, "no digit below 100 % duty");
    $display("clean=%0d bounce=%0d glitch=%0d held=%0d wrap=%0d full=%0d partial=%0d",
             n_clean, n_bounce, n_glitch, n_held, n_wrap, n_full, n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

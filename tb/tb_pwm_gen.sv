// tb_pwm_gen: checks period, duty cycle and slot alignment of the PWM output.
//
// For every digit 0..9 it records the output over four 7-cycle periods and
// checks that the output is high exactly in the first n slots of each period,
// where n is the segment count from a table written out in this testbench
// (6 2 5 5 4 5 6 3 7 6). The period is checked implicitly: the pattern must
// repeat every 7 cycles.
module tb_pwm_gen;

  timeunit 1ns;
  timeprecision 1ps;

  import pwm_pkg::*;

  localparam int EXP_LIT [10] = '{6, 2, 5, 5, 4, 5, 6, 3, 7, 6};

  logic   clk = 1'b0, rst = 1'b1;
  digit_t digit = '0;
  logic   pwm;
  int     checks = 0, failures = 0;

  pwm_gen dut (.clk(clk), .rst(rst), .digit(digit), .pwm(pwm));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int high;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // after reset the slot counter is 0; the registered output for slot k
    // appears after edge k+1. Keep the digit changes aligned with periods.
    for (int dg = 0; dg < 10; dg++) begin
      digit <= digit_t'(dg);
      // edge 1 of the period registers slot 0 with the new digit
      for (int per = 0; per < 4; per++) begin
        high = 0;
        for (int s = 0; s < 7; s++) begin
          @(posedge clk);
          #1;
          checks++;
          if (pwm !== (s < EXP_LIT[dg])) begin
            failures++;
            $display("digit %0d period %0d slot %0d: pwm=%b expected %b",
                     dg, per, s, pwm, s < EXP_LIT[dg]);
          end
          if (pwm) high++;
        end
        checks++;
        if (high != EXP_LIT[dg]) begin
          failures++;
          $display("digit %0d: %0d of 7 slots high, expected %0d", dg, high, EXP_LIT[dg]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

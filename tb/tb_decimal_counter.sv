// tb_decimal_counter: checks the 0..9 wrap-around count.
//
// Drives random `up` pulses and gaps over several full cycles and compares
// the digit with a reference count modulo 10 after every clock edge. Also
// checks that reset returns the digit to 0.
module tb_decimal_counter;

  timeunit 1ns;
  timeprecision 1ps;

  import pwm_pkg::*;

  logic   clk = 1'b0, rst = 1'b1, up = 1'b0;
  digit_t digit;
  int     checks = 0, failures = 0, wraps = 0;
  int     ref_cnt = 0;

  decimal_counter dut (.clk(clk), .rst(rst), .up(up), .digit(digit));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (int'(digit) != ref_cnt) begin
      failures++;
      $display("%s: digit=%0d expected %0d", what, digit, ref_cnt);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check("reset");
    rst <= 1'b0;
    for (int i = 0; i < 500; i++) begin
      up <= ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (up) begin
        if (ref_cnt == 9) wraps++;
        ref_cnt = (ref_cnt + 1) % 10;
      end
      #1 check("count");
    end
    up  <= 1'b0;
    rst <= 1'b1;
    @(posedge clk);
    ref_cnt = 0;
    #1 check("reset again");
    checks++;
    if (wraps < 3) begin failures++; $display("only %0d wraps", wraps); end
    $display("wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_clock_divider: checks the divided clock's period and duty cycle.
//
// Three dividers run side by side from one 50 MHz input: the default
// setting (PWM_HZ = 167) and the two ends of the 100..199 Hz range the
// frequency is chosen from. For each, the testbench counts input cycles
// between successive output edges over four periods. The expected half
// periods are worked out here from the frequencies:
//   167 Hz: 50e6 / (2 * 7 * 167) = 21385.8 -> 21386
//   100 Hz: 50e6 / (2 * 7 * 100) = 35714.3 -> 35714
//   199 Hz: 50e6 / (2 * 7 * 199) = 17946.9 -> 17947
module tb_clock_divider;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NDUT = 3;
  localparam int unsigned PWM_HZ   [NDUT] = '{167, 100, 199};
  localparam int unsigned EXP_HALF [NDUT] = '{21386, 35714, 17947};

  logic clk_in = 1'b0;
  logic [NDUT-1:0] clk;
  int   checks = 0, failures = 0;
  int unsigned n_in = 0;
  int   done = 0;

  clock_divider dut0 (.clk_in(clk_in), .clk(clk[0]));
  clock_divider #(.PWM_HZ(PWM_HZ[1])) dut1 (.clk_in(clk_in), .clk(clk[1]));
  clock_divider #(.PWM_HZ(PWM_HZ[2])) dut2 (.clk_in(clk_in), .clk(clk[2]));

  always #10 clk_in = ~clk_in;
  always @(posedge clk_in) n_in++;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NDUT; k++) begin : g_meas
    initial begin
      int unsigned last, now;
      logic prev;
      @(posedge clk_in);
      prev = clk[k];
      last = 0;
      for (int i = 0; i < 8; i++) begin
        @(clk[k]);
        now = n_in;
        checks++;
        if (now - last != EXP_HALF[k]) begin
          failures++;
          $display("%0d Hz edge %0d: half period %0d input cycles, expected %0d",
                   PWM_HZ[k], i, now - last, EXP_HALF[k]);
        end
        checks++;
        if (clk[k] == prev) begin
          failures++;
          $display("%0d Hz edge %0d: output did not toggle", PWM_HZ[k], i);
        end
        prev = clk[k];
        last = now;
      end
      done++;
    end
  end

  initial begin
    wait (done == NDUT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_seg7_decoder: checks every digit's cathode pattern.
//
// The expected active-low patterns for a common-anode display are written
// out here segment by segment; the testbench also checks that the number of
// lit segments matches the per-digit counts 6 2 5 5 4 5 6 3 7 6, that the
// decimal point is off and that codes 10..15 blank the display.
module tb_seg7_decoder;

  timeunit 1ns;
  timeprecision 1ps;

  import pwm_pkg::*;

  // active-low {g,f,e,d,c,b,a}
  localparam logic [6:0] EXP_N [10] = '{
    7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10
  };
  localparam int EXP_LIT [10] = '{6, 2, 5, 5, 4, 5, 6, 3, 7, 6};

  digit_t digit;
  segs_t  seg_n;
  logic   dp_n;
  int     checks = 0, failures = 0;

  seg7_decoder dut (.digit(digit), .seg_n(seg_n), .dp_n(dp_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      digit = digit_t'(i);
      #1;
      if (i < 10) begin
        checks++;
        if (seg_n !== EXP_N[i]) begin
          failures++;
          $display("digit %0d: seg_n=%b expected %b", i, seg_n, EXP_N[i]);
        end
        checks++;
        if ($countones(~seg_n) != EXP_LIT[i]) begin
          failures++;
          $display("digit %0d: %0d segments lit, expected %0d", i, $countones(~seg_n), EXP_LIT[i]);
        end
      end else begin
        checks++;
        if (seg_n !== 7'h7f) begin failures++; $display("code %0d not blank", i); end
      end
      checks++;
      if (dp_n !== 1'b1) begin failures++; $display("dp lit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

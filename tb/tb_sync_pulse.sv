// tb_sync_pulse: checks debouncing, synchronisation delay and the
// one-pulse-per-press rule.
//
// Stimulus: clean presses held for various lengths, bounces shorter than
// STABLE samples (must give no pulse), a bouncing press that settles (one
// pulse), and random press/release sequences checked against a reference
// model written here (a per-cycle shift-register model of the same rule).
module tb_sync_pulse;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STABLE = 4;

  logic clk = 1'b0, rst = 1'b1, btn = 1'b0;
  logic pulse;
  int   checks = 0, failures = 0, pulses = 0;

  sync_pulse #(.STABLE(STABLE)) dut (.clk(clk), .rst(rst), .btn(btn), .pulse(pulse));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: btn sampled at each edge; pulse expected STABLE+3 edges after
  // the button has been seen high for STABLE consecutive samples following a
  // period in which it was seen low for STABLE consecutive samples.
  logic [63:0] samp = '0;     // btn history, bit 0 = most recent sample
  logic        ref_level = 1'b0;
  logic [7:0]  ref_pipe = '0;

  always @(posedge clk) begin
    if (rst) begin
      samp = '0; ref_level = 1'b0; ref_pipe = '0;
    end else begin
      logic exp_p;
      samp = {samp[62:0], btn};
      // samples reach the history register after 2 synchronizer stages and are used one edge later
      exp_p = 1'b0;
      if (&samp[3 +: STABLE] && !ref_level) begin ref_level = 1'b1; exp_p = 1'b1; end
      else if (~|samp[3 +: STABLE]) ref_level = 1'b0;
      ref_pipe = {ref_pipe[6:0], exp_p};
    end
  end

  // compare the registered DUT output with the reference one cycle later
  always @(negedge clk) if (!rst) begin
    checks++;
    if (pulse !== ref_pipe[0]) begin
      failures++;
      $display("%0t: pulse=%b expected %b", $time, pulse, ref_pipe[0]);
    end
    if (pulse) pulses++;
  end

  task automatic hold(input logic v, input int n);
    btn <= v;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    int p0, lat;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // clean press: measure latency in edges from btn high to pulse high
    p0 = pulses;
    btn <= 1'b1;
    lat = 0;
    @(posedge clk);
    while (!pulse && lat < 40) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != STABLE + 2) begin
      failures++;
      $display("latency %0d edges after first sampling edge, expected %0d", lat, STABLE + 2);
    end
    hold(1'b1, 30);
    checks++;
    if (pulses - p0 != 1) begin failures++; $display("held press gave %0d pulses", pulses - p0); end
    hold(1'b0, 20);

    // bounce: short high glitches never reach STABLE samples
    p0 = pulses;
    for (int i = 0; i < 10; i++) begin hold(1'b1, STABLE - 1); hold(1'b0, 2); end
    hold(1'b0, 20);
    checks++;
    if (pulses != p0) begin failures++; $display("glitches produced %0d pulses", pulses - p0); end

    // bouncing press that settles high: exactly one pulse
    p0 = pulses;
    for (int i = 0; i < 5; i++) begin hold(1'b1, 2); hold(1'b0, 1); end
    hold(1'b1, 20);
    // release with bounce on the way down: no pulse
    for (int i = 0; i < 5; i++) begin hold(1'b0, 2); hold(1'b1, 1); end
    hold(1'b0, 20);
    checks++;
    if (pulses - p0 != 1) begin failures++; $display("bouncy press gave %0d pulses", pulses - p0); end

    // random stimulus against the reference model
    for (int i = 0; i < 400; i++) hold(1'($urandom_range(0, 1)), $urandom_range(1, 8));
    hold(1'b0, 20);

    $display("pulses seen: %0d", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

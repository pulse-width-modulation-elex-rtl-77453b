// sync_pulse: pushbutton synchronizer, debouncer and one-cycle pulse
// generator.
//
// The raw, asynchronous button level `btn` passes through two flip-flops
// (synchronizer), then into a shift register of the last STABLE samples.
// The debounced level changes only when all STABLE samples agree, so contact
// bounce shorter than STABLE clock periods is ignored. A rising edge of the
// debounced level produces `pulse` high for exactly one clock cycle; holding
// the button down gives one pulse only.
//
// The document only names this part and what it does (it is supplied
// ready-made); this structure and STABLE = 4 are this design's choice. With
// the 1169 Hz system clock four samples span about 3.4 ms, longer than
// typical contact bounce.
//
// Timing: `pulse` rises 2 (synchronizer) + STABLE clock edges after the
// button goes high, plus one for the output register: STABLE + 3 edges.
// Interface: clk, rst (synchronous, active high), btn (active high), pulse.
module sync_pulse #(
  parameter int unsigned STABLE = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic pulse
);

  logic [1:0]        sync_q;
  logic [STABLE-1:0] hist_q;
  logic              level_q;
  logic              pulse_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q  <= '0;
      hist_q  <= '0;
      level_q <= 1'b0;
      pulse_q <= 1'b0;
    end else begin
      sync_q  <= {sync_q[0], btn};
      hist_q  <= {hist_q[STABLE-2:0], sync_q[1]};
      pulse_q <= 1'b0;
      if (&hist_q && !level_q) begin
        level_q <= 1'b1;
        pulse_q <= 1'b1;
      end else if (~|hist_q) begin
        level_q <= 1'b0;
      end
    end
  end

  assign pulse = pulse_q;

  initial assert (STABLE >= 2) else $error("STABLE must be at least 2");

  // A pulse never lasts more than one cycle.
  a_one_cycle: assert property (@(posedge clk) disable iff (rst) pulse |=> !pulse);

endmodule

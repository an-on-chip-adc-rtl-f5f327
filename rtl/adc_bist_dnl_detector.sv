// adc_bist_dnl_detector: flags pairs of adjacent transitions that are
// certainly too close together or too far apart.
//
// Each counter step is 1/2 LSB of the ramp and each half of the counter clock
// period is 1/4 LSB. If the INL check accepts transition k at counter value
// 2k or 2k+1, the distance to transition k+1 is known well enough from two
// bits of each transition: the counter's LSB C0 and the counter clock level.
// A transition in (C0 = 0, clock = 1), the first quarter of the INL window,
// followed by one in (C0 = 1, clock = 0), the last quarter of the next
// window, is more than 3/2 LSB away (DNL > 1/2 LSB). The reverse pair,
// (C0 = 1, clock = 0) then (C0 = 0, clock = 1), is less than 1/2 LSB away.
// At each Tran pulse the detector evaluates these two patterns against the
// position stored at the previous transition (the paper's flip-flops
// Q1, Q2) and then stores the new position. ti = 0 flags a DNL fault.
// The two patterns follow the paper; storing ti in a flip-flop so it holds
// until the next transition, and resetting the stored position to
// (C0 = 0, clock = 0), which matches neither pattern so that the first
// transition is never judged, are this design's choices.
// Timing: ti changes one clk tick after a tick with tran_pulse = 1.
module adc_bist_dnl_detector
  import adc_bist_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic tran_pulse,
  input  logic clk_state,   // counter clock level at this tick
  input  logic c0,          // counter LSB at this tick
  output logic ti
);

  tran_pos_t prev, cur;
  logic      too_far, too_near;

  assign cur      = '{clk_state: clk_state, c0: c0};
  assign too_far  = (prev == POS_EARLY) && (cur == POS_LATE);
  assign too_near = (prev == POS_LATE)  && (cur == POS_EARLY);

  always_ff @(posedge clk) begin
    if (rst) begin
      prev <= POS_NONE;
      ti   <= 1'b1;
    end else if (tran_pulse) begin
      prev <= cur;
      ti   <= ~(too_far | too_near);
    end
  end

endmodule

// adc_bist_clk_phase: generates the counter clock as a state signal.
//
// The whole digital part of the test structure runs on one clock, clk, that
// is TICKS_PER_CLOCK times faster than the counter clock of the paper
// (f = 2 * f_oper). This block counts clk ticks modulo TICKS_PER_CLOCK and
// gives:
//   clk_state  level of the counter clock: 1 in the first half of each
//              counter clock period, 0 in the second half
//   rise       one-tick strobe in the last tick of each period; the clk edge
//              that ends this tick is the rising edge of the counter clock,
//              where the reference counter steps
// The paper samples the level of the counter clock at each ADC
// transition; running the logic on a faster clock and deriving the counter
// clock here is this design's way of doing that synchronously. The default
// of 2 ticks per period is the least that still shows both clock halves.
// Timing: reset forces phase 0, the first tick of a period (clk_state = 1);
// rise is high in the tick whose phase is TICKS_PER_CLOCK - 1.
module adc_bist_clk_phase #(
  parameter int unsigned TICKS_PER_CLOCK = 2
) (
  input  logic clk,
  input  logic rst,
  output logic clk_state,
  output logic rise
);

  localparam int unsigned PW = (TICKS_PER_CLOCK > 1) ? $clog2(TICKS_PER_CLOCK) : 1;

  logic [PW-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst || phase == PW'(TICKS_PER_CLOCK - 1)) phase <= '0;
    else                                          phase <= phase + 1'b1;
  end

  assign clk_state = (phase < PW'(TICKS_PER_CLOCK / 2));
  assign rise      = (phase == PW'(TICKS_PER_CLOCK - 1));

  initial begin
    assert (TICKS_PER_CLOCK >= 2 && TICKS_PER_CLOCK % 2 == 0)
      else $error("TICKS_PER_CLOCK must be even and at least 2");
  end

endmodule

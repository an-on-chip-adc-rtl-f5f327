// adc_bist_pkg: constants and types shared by the ADC built-in self-test.
//
// The test structure compares the code of an n-bit ADC with an (n+1)-bit
// reference counter that runs in step with a linear ramp. ADC_BITS is the
// n of the paper's main example (an 11-bit ADC with a 12-bit counter).
// COUNTER_INIT is the counter's preset value, 2, which makes the counter's
// upper n bits equal to the ADC code that is expected right after each
// transition. The DNL detector records, for each transition, the state of
// the counter clock and the counter's least significant bit; the struct
// below holds that pair.
package adc_bist_pkg;

  // Number of ADC bits, n (document's example: 11-bit ADC).
  localparam int unsigned ADC_BITS_DEFAULT = 11;

  // Preset value of the (n+1)-bit reference counter.
  localparam int unsigned COUNTER_INIT = 2;

  // Position of a transition inside one counter step: which half of the
  // counter clock period (clk_state = 1 in the first half) and the counter's
  // least significant bit C0.
  typedef struct packed {
    logic clk_state;
    logic c0;
  } tran_pos_t;

  // First quarter of an INL window: counter even (C0 = 0), clock high.
  localparam tran_pos_t POS_EARLY = '{clk_state: 1'b1, c0: 1'b0};
  // Last quarter of an INL window: counter odd (C0 = 1), clock low.
  localparam tran_pos_t POS_LATE  = '{clk_state: 1'b0, c0: 1'b1};
  // A position that takes part in neither DNL pattern (reset value).
  localparam tran_pos_t POS_NONE  = '{clk_state: 1'b0, c0: 1'b0};

endpackage

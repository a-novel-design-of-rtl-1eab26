// prescaler_pkg: types shared by the dual-modulus prescaler modules.
//
// counter_impl_e selects how the synchronous divide-by-4/5 stage of the
// 32/33 prescaler is built:
//   DFF_COUNTER   - three full-rate flip-flops and two gates (the default).
//   HALF_RATE_FSM - a 3-bit state machine that advances at half the clock
//                   rate and shows one of two signals (A, B) in each half of
//                   its period.
package prescaler_pkg;

  typedef enum logic {
    DFF_COUNTER   = 1'b0,
    HALF_RATE_FSM = 1'b1
  } counter_impl_e;

  // Division ratios of the two prescalers (low / high modulus).
  localparam int unsigned RATIO_32_33_LOW  = 32;
  localparam int unsigned RATIO_32_33_HIGH = 33;
  localparam int unsigned RATIO_16_17_LOW  = 16;
  localparam int unsigned RATIO_16_17_HIGH = 17;

endpackage

// prescaler_top: the two TSPC dual-modulus prescalers driven by one input
// clock, giving four division ratios: 32/33 (sm) and 16/17 (mc).
//
// The 32/33 prescaler is a divide-by-4/5 synchronous counter followed by a
// ripple divide-by-8; the 16/17 prescaler is a pseudo divide-by-2/3 stage
// followed by a ripple divide-by-8 clocked from inverted outputs. Both are
// described in their own files. Sharing the input clock is this design's
// choice; the two have separate controls and outputs.
//
// Interface: fin (input clock), rst_n (asynchronous, active low, for
// simulation and test; both prescalers also start by themselves), sm, mc,
// fout_32_33, fout_16_17, and the internal moduli controls div8 and mc1 for
// observation.
// Timing: fout_32_33 has a period of 32 or 33 fin periods, fout_16_17 of 16
// or 17.
module prescaler_top
  import prescaler_pkg::*;
#(
  parameter counter_impl_e COUNTER_IMPL = DFF_COUNTER
) (
  input  logic fin,
  input  logic rst_n,
  input  logic sm,
  input  logic mc,
  output logic div8,
  output logic mc1,
  output logic fout_32_33,
  output logic fout_16_17
);

  prescaler_32_33 #(.COUNTER_IMPL(COUNTER_IMPL)) u_p3233 (
    .clock(fin), .rst_n, .sm, .div8, .out(fout_32_33)
  );

  prescaler_16_17 u_p1617 (
    .fin, .rst_n, .mc, .mc1, .fout(fout_16_17)
  );

endmodule

// prescaler_32_33: TSPC divide-by-32/33 dual-modulus prescaler.
//
// A synchronous divide-by-4/5 counter runs on the input clock and clocks a
// ripple divide-by-8 (three toggle flip-flops, each clocked by the Q of the
// one before). The modulus control
//   div8 = NAND(sm, QN_a, QN_b, QN_c)
// is low only when sm = 1 and the ripple counter is in one of its eight
// states, so the 4/5 counter divides by 5 for one of every eight of its
// periods: 7 x 4 + 5 = 33. With sm = 0, div8 stays high: 8 x 4 = 32.
// Only the 4/5 counter works at the full input rate; the ripple stages run
// at a quarter of it and below.
//
// COUNTER_IMPL picks the 4/5 counter: DFF_COUNTER (default, three full-rate
// flip-flops) or HALF_RATE_FSM (state machine clocked at half rate). The
// block structure, the NAND and the sm polarity follow the published design;
// which ripple outputs feed the NAND (their inverted outputs) is read from
// its schematic.
//
// Interface: clock, rst_n (asynchronous, active low), sm, div8
// (observation), out = Q of the last ripple stage.
// Timing: out period is 32 (sm = 0) or 33 (sm = 1) clock periods, high for
// half of the 4/5 periods; sm acts through div8 when the ripple counter
// reaches its all-QN-high state.
module prescaler_32_33
  import prescaler_pkg::*;
#(
  parameter counter_impl_e COUNTER_IMPL = DFF_COUNTER
) (
  input  logic clock,
  input  logic rst_n,
  input  logic sm,
  output logic div8,
  output logic out
);

  logic       div45_out;
  logic [2:0] rq, rqn;

  if (COUNTER_IMPL == HALF_RATE_FSM) begin : g_fsm
    fsm_div45_counter u_div45 (.clock, .rst_n, .div8, .out(div45_out));
  end else begin : g_dff
    div45_counter u_div45 (.clock, .rst_n, .div8, .out(div45_out));
  end

  async_div8 #(.STAGES(3), .CHAIN_FROM_QN(1'b0)) u_div8 (
    .clk_in(div45_out), .rst_n, .q(rq), .qn(rqn)
  );

  assign div8 = ~(sm & (&rqn));
  assign out  = rq[2];

endmodule

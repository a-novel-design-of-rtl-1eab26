// async_div8: ripple (asynchronous) divide-by-2^STAGES counter.
//
// Each stage is a flip-flop whose D is tied to its own qn, so it toggles on
// every rising edge of its clock. Stage 0 is clocked by clk_in; stage k>0 is
// clocked by the q of stage k-1 (CHAIN_FROM_QN = 0, as in the 32/33
// prescaler) or by its qn (CHAIN_FROM_QN = 1, as in the 16/17 prescaler,
// where taking qn saves the clock-to-q inverter delay of each stage).
// With three stages (the default) the last stage's q is clk_in divided by 8.
//
// Interface: clk_in, rst_n (asynchronous, active low, all q = 0), q and qn
// of every stage. Timing: stage k changes one ripple delay after stage k-1;
// in zero-delay simulation all stages settle in the same time step.
// With CHAIN_FROM_QN = 0 the states count down (q goes 0,7,6,...,1 read as a
// number); with CHAIN_FROM_QN = 1 they count up.
module async_div8 #(
  parameter int unsigned STAGES        = 3,
  parameter bit          CHAIN_FROM_QN = 1'b0
) (
  input  logic              clk_in,
  input  logic              rst_n,
  output logic [STAGES-1:0] q,
  output logic [STAGES-1:0] qn
);

  logic [STAGES-1:0] stage_clk;

  assign stage_clk[0] = clk_in;

  for (genvar k = 1; k < STAGES; k++) begin : g_chain
    assign stage_clk[k] = CHAIN_FROM_QN ? qn[k-1] : q[k-1];
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    tspc_dff u_ff (.clk(stage_clk[k]), .rst_n, .d(qn[k]), .q(q[k]), .qn(qn[k]));
  end

endmodule

// prescaler_16_17: TSPC divide-by-16/17 dual-modulus prescaler.
//
// A pseudo divide-by-2/3 stage (DFF0, DFF1) feeds a ripple divide-by-8
// (DFF2-DFF4). Each ripple stage is clocked by the QN of the stage before it
// (QN1 -> DFF2, QN2 -> DFF3, QN3 -> DFF4), which takes one inverter delay off
// every stage compared with clocking from Q.
//   MC1 = MC AND QN2 AND QN3 AND QN4
// With MC = 1, MC1 goes high for one of the eight ripple states, i.e. for two
// Fin periods, and the 2/3 stage divides by 3 once: 7 x 2 + 3 = 17.
// With MC = 0, MC1 stays low and every period is 2: 8 x 2 = 16.
// Fout is the Q of DFF4.
//
// The structure, the QN clocking and the MC1 behaviour follow the published
// description. The gate that makes MC1 is not given for this circuit; the
// AND of MC with the three QN outputs is this design's choice (any single
// state of the three would do).
//
// MC1 decodes the ripple counter, which counts up; on its way from 3 to 4 it
// passes through the MC1 state for the settling time of the ripple. The
// short pulse this gives on MC1 follows a QN1 edge and is over long before
// the next Fin edge samples MC1 (zero width in simulation).
//
// Start-up: from reset, or from any power-up state with MC = 0, the
// prescaler falls into the counting loop. One power-up state cannot be left
// while MC = 1: DFF0 set, DFF1 clear and the ripple counter in its MC1
// state. There QN0 = 0 holds D1 low, so QN1 never rises, the ripple counter
// never advances and MC1 stays high. A reset, or MC low for one Fin edge,
// clears it; in normal running MC1 is high for only two Fin periods and the
// state is never reached.
//
// Interface: fin, rst_n (asynchronous, active low), mc (sampled through MC1
// once per output period), mc1 (observation), fout.
// Timing: fout period is 16 or 17 Fin periods; a change of mc takes effect
// in the output period in which the ripple counter next reaches its MC1 state.
module prescaler_16_17 (
  input  logic fin,
  input  logic rst_n,
  input  logic mc,
  output logic mc1,
  output logic fout
);

  logic       qn0, qn1;
  logic [2:0] rq, rqn;   // DFF2..DFF4

  pseudo_div23 u_div23 (
    .fin, .rst_n, .mc1, .qn0, .qn1
  );

  async_div8 #(.STAGES(3), .CHAIN_FROM_QN(1'b1)) u_div8 (
    .clk_in(qn1), .rst_n, .q(rq), .qn(rqn)
  );

  assign mc1  = mc & (&rqn);
  assign fout = rq[2];

endmodule

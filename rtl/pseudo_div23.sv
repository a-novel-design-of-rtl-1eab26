// pseudo_div23: pseudo divide-by-2/3 stage of the 16/17 prescaler.
//
// Two flip-flops on the input clock Fin:
//   DFF0: D0 = MC1
//   DFF1: D1 = QN0 AND QN1       output QN1
// With MC1 low, QN0 stays high and DFF1 toggles: QN1 is Fin divided by 2.
// When MC1 is high for two Fin periods (as the 16/17 prescaler makes it),
// QN0 goes low at the next two edges; that holds D1 low one period longer,
// so QN1 stays high for two periods and one divide-by-3 period is produced.
// It does a single divide-by-3, not a continuous one, which is all a 16/17
// prescaler needs. Compared with a full 2/3 stage it saves the OR gate that
// would sit in the critical feedback loop.
//
// The D1 gate and the waveform follow the published description; the only
// gate input the description leaves open (the second input of the AND in
// front of DFF0) is dropped here, so D0 is MC1 itself.
//
// Interface: fin, rst_n (asynchronous, active low), mc1, qn0, qn1.
// An assertion flags mc1 held high for more than two Fin periods.
// Timing: qn0 follows mc1 one Fin edge later; qn1 toggles on every Fin edge
// except the one following a low qn0.
module pseudo_div23 (
  input  logic fin,
  input  logic rst_n,
  input  logic mc1,
  output logic qn0,
  output logic qn1
);

  logic q0, q1, d1;

  assign d1 = qn0 & qn1;

  tspc_dff u_dff0 (.clk(fin), .rst_n, .d(mc1), .q(q0), .qn(qn0));
  tspc_dff u_dff1 (.clk(fin), .rst_n, .d(d1),  .q(q1), .qn(qn1));

  // Usage rule: one divide-by-3 at a time. A request longer than two Fin
  // periods has no defined result.
  a_single_div3 : assert property (
    @(posedge fin) disable iff (!rst_n)
      !(mc1 && $past(mc1) && $past(mc1, 2))
  ) else $error("pseudo_div23: mc1 high for more than two Fin periods");

endmodule

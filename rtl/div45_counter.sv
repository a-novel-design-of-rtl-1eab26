// div45_counter: synchronous divide-by-4/5 counter, the full-rate front end
// of the 32/33 prescaler.
//
// Three flip-flops (FF1, FF2, FF3) all run on the input clock. With qnK the
// inverted output of FFk:
//   D1 = NAND(qn2, qn3)      FF2 takes qn1      D3 = NOR(qn2, div8)
// While div8 is high, D3 = 0 so qn3 stays 1 and FF1/FF2 form a two-stage
// twisted ring: qn1 repeats 1,1,0,0 (divide by 4). While div8 is low, FF3
// joins the ring and qn1 repeats 1,1,0,0,0 (divide by 5). Every one of the
// eight states enters the active loop within two clocks, so the counter
// starts by itself.
//
// The connections (which flip-flop output feeds which gate or flip-flop, and
// that qn1 is the output) follow the published schematic of the counter; the
// gate types are this design's reading, chosen as the only AND/OR/NAND/NOR
// pair on those connections that divides by 4 for div8 = 1 and by 5 for
// div8 = 0.
//
// Interface: clock, rst_n (asynchronous, active low), div8 (sampled on every
// rising clock edge), out = qn1. Timing: out rises once every 4 or 5 clocks;
// div8 is sampled into FF3, so a change of div8 takes effect on the out
// period that begins after it has been sampled.
module div45_counter (
  input  logic clock,
  input  logic rst_n,
  input  logic div8,
  output logic out
);

  logic d1, d3;
  logic q1, q2, q3;
  logic qn1, qn2, qn3;

  assign d1 = ~(qn2 & qn3);
  assign d3 = ~(qn2 | div8);

  tspc_dff u_ff1 (.clk(clock), .rst_n, .d(d1),  .q(q1), .qn(qn1));
  tspc_dff u_ff2 (.clk(clock), .rst_n, .d(qn1), .q(q2), .qn(qn2));
  tspc_dff u_ff3 (.clk(clock), .rst_n, .d(d3),  .q(q3), .qn(qn3));

  assign out = qn1;

endmodule

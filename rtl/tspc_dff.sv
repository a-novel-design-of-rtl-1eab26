// tspc_dff: positive-edge D flip-flop with true (q) and inverted (qn) outputs.
//
// In the silicon every stage of the prescalers is a true-single-phase-clock
// (TSPC) flip-flop: one clock phase, dynamic internal nodes, and the small
// AND gates of the first stages merged into its input stage. Only its logic
// function is modelled here: q takes d on the rising edge of clk, qn is its
// complement. Both outputs exist because the prescalers clock later stages
// from qn as well as q.
//
// Interface: clk (rising edge), rst_n (asynchronous, active low, clears q to
// 0 and sets qn to 1), d. Timing: q/qn change one clock edge after d.
// The reset is this design's own addition, so that simulation starts from a
// known phase; the TSPC cell has none, and every divider built from this cell
// reaches its counting loop from any state without it.
module tspc_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qn
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  assign qn = ~q;

endmodule

// tb_async_div8: self-checking test of the ripple divide-by-8.
// Two instances share one input clock: one chained from Q (counts down),
// one chained from QN (counts up). After every rising input edge the count
// kept by the testbench is compared with both, the qn outputs with the
// complements, and the period of the last stage with 8 input periods.
module tb_async_div8;

  logic clk_in = 1'b0, rst_n = 1'b0;
  logic [2:0] q_d, qn_d, q_u, qn_u;
  int   checks = 0, failures = 0;
  int   unsigned edges = 0, last_rise = 0, rises = 0;

  async_div8 #(.STAGES(3), .CHAIN_FROM_QN(1'b0)) dut_down (.clk_in, .rst_n, .q(q_d), .qn(qn_d));
  async_div8 #(.STAGES(3), .CHAIN_FROM_QN(1'b1)) dut_up   (.clk_in, .rst_n, .q(q_u), .qn(qn_u));

  always #5 clk_in = ~clk_in;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: edges=%0d q_down=%0d q_up=%0d", what, $time, edges, q_d, q_u);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk_in);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge q_d[2]) begin
    if (rst_n) begin
      if (rises > 0) check(edges - last_rise == 8, "output period 8");
      rises++;
      last_rise = edges;
    end
  end

  initial begin
    #17 rst_n = 1'b1;
    check(q_d == 3'd0 && q_u == 3'd0, "reset value");
    for (int i = 0; i < 400; i++) begin
      @(posedge clk_in);
      edges++;
      #1;
      check(q_u == 3'(edges), "QN chain counts up");
      check(q_d == 3'(-edges), "Q chain counts down");
      check(qn_u == ~q_u && qn_d == ~q_d, "qn complement");
    end
    check(rises >= 45, "enough output periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_tspc_dff: self-checking test of the D flip-flop.
// Drives random data on every clock, checks that q equals the value d had
// before the rising edge and that qn is its complement, checks that q does
// not move at the falling edge when d changes, and checks the asynchronous
// reset in the middle of a clock period.
module tb_tspc_dff;

  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0;
  logic q, qn;
  int   checks = 0, failures = 0;

  tspc_dff dut (.clk, .rst_n, .d, .q, .qn);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: d=%0b q=%0b qn=%0b", what, $time, d, q, qn);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    #12;
    check(q == 1'b0 && qn == 1'b1, "reset");
    rst_n = 1'b1;
    expected = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = ~expected ^ 1'($urandom % 4 == 0);
      #1 check(q == expected, "q holds between rising edges");
      expected = d;
      @(posedge clk);
      #1;
      check(q == expected, "q after edge");
      check(qn == ~expected, "qn complement");
    end
    // Asynchronous reset between edges.
    @(negedge clk);
    d = 1'b1;
    @(posedge clk);
    #1 check(q == 1'b1, "set before reset");
    #2 rst_n = 1'b0;
    #1 check(q == 1'b0 && qn == 1'b1, "async reset");
    @(posedge clk);
    #1 check(q == 1'b0, "held in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

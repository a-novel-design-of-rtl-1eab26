// tb_div45_counter: self-checking test of the full-rate divide-by-4/5 counter.
// 1. div8 held high: every output period is 4 clocks, high for 2.
// 2. div8 held low: every output period is 5 clocks, high for 2.
// 3. div8 driven as in the 32/33 prescaler: a divide-by-8 model in the
//    testbench counts output rising edges and pulls div8 low for one of its
//    eight states; each group of eight periods must then total 33 clocks
//    with exactly one period of 5.
// 4. Reset in mid-count, then divide by 4 again.
module tb_div45_counter;

  logic clock = 1'b0, rst_n = 1'b0, div8 = 1'b1;
  logic out;
  int   checks = 0, failures = 0;
  int   unsigned cyc = 0, last_rise = 0, period = 0, last_fall = 0, high_time = 0;
  int   unsigned fives = 0;

  div45_counter dut (.clock, .rst_n, .div8, .out);

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: period=%0d high=%0d", what, $time, period, high_time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clock) cyc++;
  always @(posedge out) begin
    period    = cyc - last_rise;
    last_rise = cyc;
  end
  always @(negedge out) begin
    high_time = cyc - last_rise;
    last_fall = cyc;
  end

  // Divide-by-8 model for part 3.
  bit          ripple_mode = 1'b0;
  logic [2:0]  model_cnt = '0;
  always @(posedge out) begin
    if (ripple_mode) begin
      model_cnt <= model_cnt + 3'd1;
      div8      <= (model_cnt + 3'd1 != 3'd0);
    end
  end

  task automatic run_const(input logic mode, input int unsigned expect_period);
    div8 = mode;
    repeat (3) @(posedge out);
    for (int i = 0; i < 40; i++) begin
      @(negedge out);
      #1 check(high_time == 2, "high for 2 clocks");
      @(posedge out);
      #1 check(period == expect_period, "constant-mode period");
    end
  endtask

  initial begin
    #17 rst_n = 1'b1;
    run_const(1'b1, 4);
    run_const(1'b0, 5);
    run_const(1'b1, 4);
    // Ripple-controlled mode.
    @(posedge out);
    ripple_mode = 1'b1;
    repeat (16) @(posedge out);
    @(posedge out iff model_cnt == 3'd0);
    for (int g = 0; g < 30; g++) begin
      int unsigned start, nfive;
      start = cyc;
      nfive = 0;
      for (int i = 0; i < 8; i++) begin
        @(posedge out);
        #1;
        check(period == 4 || period == 5, "period 4 or 5");
        if (period == 5) nfive++;
      end
      check(cyc - start == 33, "eight periods total 33");
      check(nfive == 1, "one divide-by-5 per eight periods");
      fives += nfive;
    end
    ripple_mode = 1'b0;
    // Reset in mid-count.
    @(negedge clock);
    rst_n = 1'b0;
    div8  = 1'b1;
    #13 rst_n = 1'b1;
    repeat (2) @(posedge out);
    for (int i = 0; i < 10; i++) begin
      @(posedge out);
      #1 check(period == 4, "divide by 4 after reset");
    end
    $display("divide-by-5 periods under ripple control: %0d", fives);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

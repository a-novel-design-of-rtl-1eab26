// tb_pseudo_div23: self-checking test of the pseudo divide-by-2/3 stage.
// With mc1 low every qn1 period must be 2 Fin periods. Then, repeatedly,
// the testbench raises mc1 just after a rising edge of qn1 and holds it for
// two Fin periods, as the 16/17 prescaler does; exactly one of the
// following qn1 periods must be 3 and the rest 2. The D1 gate is checked
// directly too: qn0 low forces the next qn1 high.
module tb_pseudo_div23;

  logic fin = 1'b0, rst_n = 1'b0, mc1 = 1'b0;
  logic qn0, qn1;
  int   checks = 0, failures = 0;
  int   unsigned cyc = 0, last_rise = 0, period = 0;
  int   unsigned p2 = 0, p3 = 0;

  pseudo_div23 dut (.fin, .rst_n, .mc1, .qn0, .qn1);

  always #5 fin = ~fin;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: cyc=%0d period=%0d", what, $time, cyc, period);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge fin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge fin) cyc++;

  always @(posedge qn1) begin
    period    = cyc - last_rise;
    last_rise = cyc;
  end

  // D1 = QN0 & QN1: after an edge that saw qn0 low, qn1 must be high.
  logic qn0_before;
  always @(posedge fin) begin
    qn0_before = qn0;
    #1;
    if (rst_n && cyc > 2 && !qn0_before) check(qn1 == 1'b1, "qn0 low holds qn1 high");
  end

  initial begin
    #17 rst_n = 1'b1;
    // Divide by 2 only.
    repeat (2) @(posedge qn1);
    for (int i = 0; i < 50; i++) begin
      @(posedge qn1);
      #1 check(period == 2, "divide by 2 with mc1 low");
    end
    // Single divide-by-3 operations.
    for (int n = 0; n < 40; n++) begin
      int unsigned base;
      int unsigned gap;
      gap = 1 + ($urandom % 4);
      repeat (gap) @(posedge qn1);
      base = cyc;
      #2 mc1 = 1'b1;
      repeat (2) @(posedge fin);
      #2 mc1 = 1'b0;
      // qn1 rises again 2 periods after base, then 3 periods later.
      @(posedge qn1);
      #1 check(period == 3 && cyc - base == 5, "single divide by 3");
      if (period == 3) p3++;
      @(posedge qn1);
      #1 check(period == 2, "back to divide by 2");
      if (period == 2) p2++;
    end
    check(p3 == 40, "every request gave one divide-by-3");
    $display("divide-by-3 operations: %0d", p3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

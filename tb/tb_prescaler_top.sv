// tb_prescaler_top: end-to-end test of both prescalers at default settings.
// The run starts without reset, from whatever state the flip-flops power up
// in (with mc low), and checks that both prescalers fall into correct division after a few
// output periods. It then resets them in mid-run and keeps checking. Two
// threads change sm and mc at random just after rising edges of their own
// output; every following period must be 32/33 and 16/17 as selected, with
// div8 low for 5 input periods (one divide-by-5) in every 33 period and MC1
// high for 2 (one divide-by-3) in every 17 period. Each mechanism is counted
// and a mechanism that never occurred counts as a failure.
module tb_prescaler_top;
  import prescaler_pkg::*;

  logic fin = 1'b0, rst_n = 1'b1, sm = 1'b0, mc = 1'b0;
  logic div8, mc1, fout_32_33, fout_16_17;
  int   checks = 0, failures = 0;
  int   unsigned cyc = 0;
  bit   checking = 1'b0;

  // Mechanism counters.
  int unsigned n32 = 0, n33 = 0, n16 = 0, n17 = 0;
  int unsigned n_div5 = 0, n_div3 = 0, n_sm_switch = 0, n_mc_switch = 0;
  int unsigned n_selfstart = 0, n_reset = 0;

  prescaler_top dut (.fin, .rst_n, .sm, .mc, .div8, .mc1, .fout_32_33, .fout_16_17);

  always #5 fin = ~fin;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (cycle %0d): sm=%0b mc=%0b", what, $time, cyc, sm, mc);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge fin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input-period counts of each output and of the modulus controls.
  int unsigned rise_a = 0, per_a = 0, low8 = 0, low8_per = 0;
  int unsigned rise_b = 0, per_b = 0, mc1n = 0, mc1_per = 0;

  always @(posedge fin) begin
    cyc++;
    if (!div8) low8++;
    if (mc1)   mc1n++;
  end
  always @(posedge fout_32_33) begin
    per_a = cyc - rise_a; rise_a = cyc; low8_per = low8; low8 = 0;
  end
  always @(posedge fout_16_17) begin
    per_b = cyc - rise_b; rise_b = cyc; mc1_per = mc1n; mc1n = 0;
  end

  task automatic run_32_33(input int unsigned periods);
    for (int i = 0; i < periods; i++) begin
      logic m;
      m = 1'($urandom);
      #1;
      if (m != sm) n_sm_switch++;
      sm = m;
      @(posedge fout_32_33);
      #1;
      check(per_a == (m ? RATIO_32_33_HIGH : RATIO_32_33_LOW), "32/33 period");
      check(low8_per == (m ? 5 : 0), "one divide-by-5 per 33 period");
      if (m) begin n33++; n_div5 += (low8_per == 5); end
      else   n32++;
    end
  endtask

  task automatic run_16_17(input int unsigned periods);
    for (int i = 0; i < periods; i++) begin
      logic m;
      m = 1'($urandom);
      #1;
      if (m != mc) n_mc_switch++;
      mc = m;
      @(posedge fout_16_17);
      #1;
      check(per_b == (m ? RATIO_16_17_HIGH : RATIO_16_17_LOW), "16/17 period");
      check(mc1_per == (m ? 2 : 0), "one divide-by-3 per 17 period");
      if (m) begin n17++; n_div3 += (mc1_per == 2); end
      else   n16++;
    end
  endtask

  initial begin
    // No reset: let both prescalers start from their power-up state. mc is
    // held low at first: with mc = 1 the 16/17 prescaler has one power-up
    // state it cannot leave (DFF0 set, DFF1 clear, ripple counter in its MC1
    // state), which mc = 0 for one Fin edge or a reset clears.
    sm = 1'b1;
    mc = 1'b0;
    repeat (3) @(posedge fout_32_33);
    repeat (3) @(posedge fout_16_17);
    fork
      run_32_33(60);
      run_16_17(120);
    join
    n_selfstart++;
    // Reset in mid-run.
    @(negedge fin);
    rst_n = 1'b0;
    n_reset++;
    #23 rst_n = 1'b1;
    @(posedge fout_32_33);
    @(posedge fout_16_17);
    fork
      run_32_33(100);
      run_16_17(200);
    join
    check(n32 > 0, "divide by 32 occurred");
    check(n33 > 0, "divide by 33 occurred");
    check(n16 > 0, "divide by 16 occurred");
    check(n17 > 0, "divide by 17 occurred");
    check(n_div5 > 0, "divide-by-5 insertion occurred");
    check(n_div3 > 0, "divide-by-3 insertion occurred");
    check(n_sm_switch > 0, "sm switch occurred");
    check(n_mc_switch > 0, "mc switch occurred");
    check(n_selfstart > 0 && n_reset > 0, "start without reset and reset occurred");
    $display("periods: /32=%0d /33=%0d /16=%0d /17=%0d", n32, n33, n16, n17);
    $display("divide-by-5 insertions=%0d divide-by-3 insertions=%0d", n_div5, n_div3);
    $display("sm switches=%0d mc switches=%0d", n_sm_switch, n_mc_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

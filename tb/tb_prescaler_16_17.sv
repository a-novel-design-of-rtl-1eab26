// tb_prescaler_16_17: self-checking test of the 16/17 prescaler.
// Every fout period must be 16 Fin periods while mc = 0 and 17 while
// mc = 1, fout must be high for 8 Fin periods, and MC1 must be high for
// exactly 2 Fin periods of each output period with mc = 1 (the one
// divide-by-3) and never with mc = 0. mc is changed just after a rising
// edge of fout; the period that follows must already have the new ratio.
// Every divide-by-3 operation is also compared, edge by edge, with the
// expected MC1, QN0 and QN1 waveform.
module tb_prescaler_16_17;
  import prescaler_pkg::*;

  logic fin = 1'b0, rst_n = 1'b0, mc = 1'b0;
  logic mc1, fout;
  int   checks = 0, failures = 0;
  int   unsigned cyc = 0, last_rise = 0, period = 0, high_time = 0;
  int   unsigned mc1_cnt = 0, mc1_in_period = 0, n16 = 0, n17 = 0;

  prescaler_16_17 dut (.fin, .rst_n, .mc, .mc1, .fout);

  always #5 fin = ~fin;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: mc=%0b period=%0d high=%0d mc1high=%0d",
               what, $time, mc, period, high_time, mc1_in_period);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge fin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge fin) begin
    cyc++;
    if (mc1) mc1_cnt++;
  end
  always @(posedge fout) begin
    period        = cyc - last_rise;
    last_rise     = cyc;
    mc1_in_period = mc1_cnt;
    mc1_cnt       = 0;
  end
  always @(negedge fout) high_time = cyc - last_rise;

  // Cycle-by-cycle waveform of one divide-by-3 operation. Edge t1 is the
  // Fin edge at which QN1 rises and MC1 follows; values just after edges
  // t1..t6:          t1 t2 t3 t4 t5 t6
  localparam bit [5:0] EXP_MC1 = 6'b000011;   // 1  1  0  0  0  0 (bit 0 = t1)
  localparam bit [5:0] EXP_QN0 = 6'b111001;   // 1  0  0  1  1  1
  localparam bit [5:0] EXP_QN1 = 6'b101101;   // 1  0  1  1  0  1
  int unsigned n_wave = 0;
  int          wave_e = -1;
  logic        mc1_s  = 1'b0;
  // Sampled 1 time unit after each Fin edge: MC1 decodes the ripple counter
  // and shows zero-width pulses while it settles, which DFF0 never samples.
  always @(posedge fin) begin
    #1;
    if (rst_n) begin
      if (wave_e < 0 && mc1 && !mc1_s) begin
        wave_e = 0;
        checks++;
        if (!dut.qn1) begin
          failures++;
          $display("FAIL MC1 rose while QN1 low at %0t", $time);
        end
      end
      if (wave_e >= 0) begin
        checks++;
        if (mc1 != EXP_MC1[wave_e] || dut.qn0 != EXP_QN0[wave_e] || dut.qn1 != EXP_QN1[wave_e]) begin
          failures++;
          $display("FAIL divide-by-3 waveform at t%0d: mc1=%0b qn0=%0b qn1=%0b",
                   wave_e + 1, mc1, dut.qn0, dut.qn1);
        end
        wave_e++;
        if (wave_e == 6) begin
          wave_e = -1;
          n_wave++;
        end
      end
    end
    mc1_s = mc1;
  end

  task automatic check_period(input logic m);
    @(posedge fout);
    #1;
    check(period == (m ? RATIO_16_17_HIGH : RATIO_16_17_LOW), "period");
    check(high_time == 8, "high time");
    check(mc1_in_period == (m ? 2 : 0), "MC1 high time");
    if (m) n17++; else n16++;
  endtask

  initial begin
    #17 rst_n = 1'b1;
    repeat (2) @(posedge fout);
    repeat (10) check_period(1'b0);
    mc = 1'b1;
    repeat (10) check_period(1'b1);
    for (int i = 0; i < 150; i++) begin
      #1 mc = 1'($urandom);
      check_period(mc);
    end
    check(n16 > 20 && n17 > 20, "both ratios exercised");
    check(n_wave == n17, "waveform checked for every divide-by-3");
    $display("periods of 16: %0d, periods of 17: %0d", n16, n17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

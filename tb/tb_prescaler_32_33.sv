// tb_prescaler_32_33: self-checking test of the 32/33 prescaler, with both
// choices of divide-by-4/5 counter running side by side on one clock.
// For each instance: every output period must be 32 clocks while sm = 0 and
// 33 while sm = 1, the output must be high for 16 clocks of each period,
// and div8 must be low for exactly 5 clocks per period with sm = 1 (the one
// divide-by-5) and never with sm = 0. sm is changed just after an output
// rising edge, and the period that follows must already have the new ratio.
module tb_prescaler_32_33;
  import prescaler_pkg::*;

  localparam int NDUT = 2;

  logic clock = 1'b0, rst_n = 1'b0, sm = 1'b0;
  logic [NDUT-1:0] out, div8;
  int   checks = 0, failures = 0;
  int   unsigned cyc = 0;
  int   unsigned last_rise [NDUT], period [NDUT], high_time [NDUT];
  int   unsigned low_cnt [NDUT], low_in_period [NDUT];
  int   unsigned n32 = 0, n33 = 0;

  prescaler_32_33 #(.COUNTER_IMPL(DFF_COUNTER)) dut_dff (
    .clock, .rst_n, .sm, .div8(div8[0]), .out(out[0])
  );
  prescaler_32_33 #(.COUNTER_IMPL(HALF_RATE_FSM)) dut_fsm (
    .clock, .rst_n, .sm, .div8(div8[1]), .out(out[1])
  );

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string what, input int k);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s dut%0d at %0t: sm=%0b period=%0d high=%0d div8low=%0d",
               what, k, $time, sm, period[k], high_time[k], low_in_period[k]);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clock) begin
    cyc++;
    for (int k = 0; k < NDUT; k++) if (!div8[k]) low_cnt[k]++;
  end

  for (genvar k = 0; k < NDUT; k++) begin : g_mon
    always @(posedge out[k]) begin
      period[k]        = cyc - last_rise[k];
      last_rise[k]     = cyc;
      low_in_period[k] = low_cnt[k];
      low_cnt[k]       = 0;
    end
    always @(negedge out[k]) high_time[k] = cyc - last_rise[k];
  end

  // Waits for one output period of instance 0 and checks both instances
  // (they run in step after reset).
  task automatic check_period(input logic m);
    int unsigned exp_p;
    exp_p = m ? RATIO_32_33_HIGH : RATIO_32_33_LOW;
    @(posedge out[0]);
    #1;
    for (int k = 0; k < NDUT; k++) begin
      check(period[k] == exp_p, "period", k);
      check(high_time[k] == 16, "high time", k);
      check(low_in_period[k] == (m ? 5 : 0), "div8 low time", k);
    end
    if (m) n33++; else n32++;
  endtask

  initial begin
    for (int k = 0; k < NDUT; k++) begin
      last_rise[k] = 0; period[k] = 0; high_time[k] = 0;
      low_cnt[k] = 0; low_in_period[k] = 0;
    end
    #17 rst_n = 1'b1;
    repeat (2) @(posedge out[0]);
    check(out[1] == out[0], "instances in step", 1);
    repeat (10) check_period(1'b0);
    sm = 1'b1;
    repeat (10) check_period(1'b1);
    for (int i = 0; i < 120; i++) begin
      #1 sm = 1'($urandom);   // just after the last output rising edge
      check_period(sm);
    end
    check(n32 > 20 && n33 > 20, "both ratios exercised", 0);
    $display("periods of 32: %0d, periods of 33: %0d", n32, n33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

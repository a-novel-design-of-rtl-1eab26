// fsm_div45_counter: divide-by-4/5 counter built as a half-rate state machine.
//
// A toggle flip-flop makes Clk/2. A 3-bit state register S advances once per
// Clk/2 period (on the clock edges where Clk/2 rises), so the state logic has
// two input-clock periods to settle. Each state drives two signals, A = S[2]
// and B = S[1]; the output shows A during the half of the Clk/2 period where
// Clk/2 is high and B during the half where it is low, so the output still
// changes at the full clock rate.
//   div8 = 1:  000 <-> 110  (output 00 11, divide by 4)
//              100 <-> 010  (output 10 01, divide by 4, shifted half a period)
//   div8 = 0:  000 -> 110 -> 001 -> 010 -> 101 -> 000
//              (output 00 11 00 01 10 = two periods of 5 clocks)
// div8 is looked at only in states 110 and 010. Leaving the /5 sequence from
// 010 with div8 high lands in the shifted /4 loop, which is how a single /5
// period (an odd number of half periods) is inserted between /4 periods.
//
// The state sequences and the A/B output scheme follow the published
// description of this counter. The moves it does not give are this design's
// choice: 001 -> 010 and 101 -> 000 whatever div8 is, 100 -> 010, and the
// unused states 011 and 111 go to 000. The A/B selection is made by a
// flip-flop on the full-rate clock instead of a multiplexer switched by
// Clk/2, which gives the same waveform without glitches at the switch.
//
// Interface: clock, rst_n (asynchronous, active low; state 000, Clk/2 low),
// div8 (1 -> /4, 0 -> /5), out. Timing: out is registered; a div8 change is
// acted on at the next decision state.
module fsm_div45_counter (
  input  logic clock,
  input  logic rst_n,
  input  logic div8,
  output logic out
);

  typedef enum logic [2:0] {
    S000 = 3'b000,
    S001 = 3'b001,
    S010 = 3'b010,
    S011 = 3'b011,
    S100 = 3'b100,
    S101 = 3'b101,
    S110 = 3'b110,
    S111 = 3'b111
  } state_e;

  logic   clk_half;         // Clk/2
  state_e state, state_next;

  always_comb begin
    unique case (state)
      S000:    state_next = S110;
      S110:    state_next = div8 ? S000 : S001;
      S001:    state_next = S010;
      S010:    state_next = div8 ? S100 : S101;
      S101:    state_next = S000;
      S100:    state_next = S010;
      default: state_next = S000;   // S011, S111: unused
    endcase
  end

  always_ff @(posedge clock or negedge rst_n) begin
    if (!rst_n) begin
      clk_half <= 1'b0;
      state    <= S000;
      out      <= 1'b0;
    end else begin
      clk_half <= ~clk_half;
      if (!clk_half) begin
        // Clk/2 rises: new state, show its A for this half period.
        state <= state_next;
        out   <= state_next[2];
      end else begin
        // Clk/2 falls: show B of the current state.
        out   <= state[1];
      end
    end
  end

  // Once reset, the machine never enters the two unused states.
  a_legal_state : assert property (
    @(posedge clock) disable iff (!rst_n)
      !(state inside {S011, S111})
  ) else $error("fsm_div45_counter: unused state %b", state);

endmodule

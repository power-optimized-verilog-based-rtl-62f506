// flipflop_based_clk: flip-flop based clock gate.
//
// The enable is captured by a D flip-flop on the rising edge of the raw
// clock, and the flip-flop output is ANDed with the raw clock to form
// gated_clk. While the registered enable is low, gated_clk stays low, so
// every register clocked by it holds its state and does not toggle.
// q_out brings the registered enable out.
//
// Timing: en is sampled at a rising edge of clk; gated_clk carries the clock
// pulses from that edge on. Because the flip-flop changes while clk is high,
// the first pulse after enabling starts a clock-to-q delay late, and the
// rising edge at which the enable is sampled low still produces a narrow
// pulse. Capturing the enable on the falling edge (or with a latch) would
// give clean pulses; the rising-edge flip-flop and AND gate are kept here
// because that is the structure this design specifies. In simulation the
// clock pulse at the disabling edge is seen by downstream registers, so the
// gated domain receives the edges from the one where en is first sampled
// high up to and including the one where it is first sampled low.
//
// The flip-flop has no reset: it reloads en on every rising edge of clk.
module flipflop_based_clk (
  input  logic clk,        // raw clock
  input  logic en,         // clock enable
  output logic gated_clk,  // clk AND registered enable
  output logic q_out       // registered enable
);

  always_ff @(posedge clk) begin
    q_out <= en;
  end

  assign gated_clk = clk & q_out;

endmodule

// rupees_calculation: counts inserted coins and keeps the deposited total.
//
// ten_in and five_in are coin-sensor pulses, one clock cycle per coin,
// sampled on the rising edge of clk (the gated clock in the full system).
// Each accepted coin increments its own 4-bit counter (ten_out, five_out)
// and adds its value to the 6-bit running total total_out, so that
// total_out = 10 * ten_out + 5 * five_out at every cycle.
//
// A coin that would take the total past 63 rupees, or its counter past 15,
// is ignored rather than wrapping (an overflow guard chosen for this
// implementation; the design specifies only the widths). If both sensors
// pulse in the same cycle both coins are counted. reset (synchronous,
// active high) clears the counters and the total.
module rupees_calculation
  import ticket_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 ten_in,
  input  logic                 five_in,
  output logic [COINCNT_W-1:0] ten_out,
  output logic [COINCNT_W-1:0] five_out,
  output logic [MONEY_W-1:0]   total_out,
  output logic                 overflow   // a coin was refused this cycle
);

  localparam int unsigned CNT_MAX = (1 << COINCNT_W) - 1;

  logic       take_ten, take_five;
  logic [7:0] sum_both, sum_ten, sum_five;

  always_comb begin
    sum_ten  = 8'(total_out) + 8'(COIN_TEN);
    sum_five = 8'(total_out) + 8'(COIN_FIVE);
    sum_both = 8'(total_out) + 8'(COIN_TEN + COIN_FIVE);
    take_ten  = 1'b0;
    take_five = 1'b0;
    if (ten_in && five_in && sum_both <= 8'(MONEY_MAX) &&
        ten_out != COINCNT_W'(CNT_MAX) && five_out != COINCNT_W'(CNT_MAX)) begin
      take_ten  = 1'b1;
      take_five = 1'b1;
    end else begin
      // Only one of two simultaneous coins fits: the ten is taken first.
      if (ten_in && sum_ten <= 8'(MONEY_MAX) && ten_out != COINCNT_W'(CNT_MAX))
        take_ten = 1'b1;
      else if (five_in && sum_five <= 8'(MONEY_MAX) && five_out != COINCNT_W'(CNT_MAX))
        take_five = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      ten_out   <= '0;
      five_out  <= '0;
      total_out <= '0;
      overflow  <= 1'b0;
    end else begin
      if (take_ten)  ten_out  <= ten_out + 1'b1;
      if (take_five) five_out <= five_out + 1'b1;
      total_out <= MONEY_W'(total_out
                   + (take_ten  ? MONEY_W'(COIN_TEN)  : '0)
                   + (take_five ? MONEY_W'(COIN_FIVE) : '0));
      overflow  <= (ten_in && !take_ten) || (five_in && !take_five);
    end
  end

endmodule

// display_interface: six-digit multiplexed seven-segment display driver.
//
// A mod-6 counter (counter_mod6) steps the digit address digit_select
// through 0..5, one position per rising edge of clk (the gated clock in the
// full system). A 6-to-1 selector (selector_6to1) picks the 4-bit value of
// that position and a BCD decoder (decoder_7seg) turns it into the segment
// pattern, so a single decoder serves all six digits. Position contents:
//   0: route      {00, path}
//   1: fare       price
//   2: quantity   {00, quantity}
//   3: cost       cost[3:0]
//   4: money      money_in[3:0]
//   5: change     change[3:0]
// Each value is shown through its low four bits; a value that is not a
// decimal digit there (e.g. a cost of 10) leaves that digit blank.
//
// Timing: segments belongs to the position on digit_select in the same
// cycle (the selector and decoder are combinational after the counter).
// reset (synchronous, active high) returns the scan to position 0.
// The three sub-blocks, the zero-extension of route and quantity and the
// order of positions 0..3 follow the design's schematic and waveform; the
// order of positions 4 and 5 and the use of the low four bits of the wider
// values are this implementation's choice.
module display_interface
  import ticket_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic [PATH_W-1:0]   path,
  input  logic [PRICE_W-1:0]  price,
  input  logic [QTY_W-1:0]    quantity,
  input  logic [COST_W-1:0]   cost,
  input  logic [MONEY_W-1:0]  money_in,
  input  logic [CHANGE_W-1:0] change,
  output logic [SEL_W-1:0]    digit_select,
  output logic [SEG_W-1:0]    segments
);

  logic [BCD_W-1:0] digit;
  logic             scan_carry;  // end of a scan; not used outside

  counter_mod6 u_counter (
    .clk   (clk),
    .reset (reset),
    .count (digit_select),
    .carry (scan_carry)
  );

  selector_6to1 u_selector (
    .sel   (digit_select),
    .data0 (BCD_W'(path)),
    .data1 (price),
    .data2 (BCD_W'(quantity)),
    .data3 (cost[BCD_W-1:0]),
    .data4 (money_in[BCD_W-1:0]),
    .data5 (change[BCD_W-1:0]),
    .out   (digit)
  );

  decoder_7seg u_decoder (
    .bcd      (digit),
    .segments (segments)
  );

endmodule

// ticket_selection: records the passenger's route, fare and ticket count.
//
// Seven push-button inputs, each a pulse sampled on the rising edge of clk
// (the gated clock in the full system), load three registers:
//   path_1 / path_2       -> PATH = 01 / 10          (route)
//   pri3 / pri4 / pri5    -> PRI  = 3 / 4 / 5        (fare of one ticket)
//   qua_1 / qua_2         -> PIN  = 1 / 2            (number of tickets)
// A fourth register holds the total fare COST = PRI * PIN. It is computed
// from the values being loaded, so COST is consistent with PATH/PIN/PRI in
// the same cycle in which a button is registered. A later press overwrites
// an earlier one; if two buttons of the same group are pressed in one
// cycle, the lower-numbered one wins. reset (synchronous, active high)
// clears all four registers to zero.
//
// The ports and widths, the 13 registers (2+2+4+5) and the encodings of the
// route, quantity and fare codes follow the design's block diagram and
// waveforms; the priority between simultaneous presses is this
// implementation's choice.
module ticket_selection
  import ticket_pkg::*;
(
  input  logic               clk,
  input  logic               reset,
  input  logic               path_1,
  input  logic               path_2,
  input  logic               pri3,
  input  logic               pri4,
  input  logic               pri5,
  input  logic               qua_1,
  input  logic               qua_2,
  output logic [PATH_W-1:0]  PATH,
  output logic [QTY_W-1:0]   PIN,
  output logic [PRICE_W-1:0] PRI,
  output logic [COST_W-1:0]  COST
);

  logic [PATH_W-1:0]  path_d;
  logic [QTY_W-1:0]   pin_d;
  logic [PRICE_W-1:0] pri_d;
  logic [COST_W-1:0]  cost_d;

  always_comb begin
    path_d = PATH;
    if (path_1)      path_d = PATH_1;
    else if (path_2) path_d = PATH_2;

    pri_d = PRI;
    if (pri3)        pri_d = FARE_3;
    else if (pri4)   pri_d = FARE_4;
    else if (pri5)   pri_d = FARE_5;

    pin_d = PIN;
    if (qua_1)       pin_d = QTY_1;
    else if (qua_2)  pin_d = QTY_2;

    // 4-bit fare (at most 5) times 2-bit count (at most 2) fits in 5 bits.
    cost_d = COST_W'(pri_d * pin_d);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      PATH <= '0;
      PIN  <= '0;
      PRI  <= '0;
      COST <= '0;
    end else begin
      PATH <= path_d;
      PIN  <= pin_d;
      PRI  <= pri_d;
      COST <= cost_d;
    end
  end

endmodule

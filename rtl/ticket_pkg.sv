// ticket_pkg: widths and constants shared by the bus ticketing modules.
//
// The machine sells tickets on two routes, at a per-ticket fare of 3, 4 or
// 5 rupees, one or two tickets per purchase, and accepts 10- and 5-rupee
// coins. The widths below are those printed on the block diagrams of the
// design (route 2 bits, quantity 2 bits, fare 4 bits, cost 5 bits, money,
// change and ticket LEDs 6 bits, digit select 3 bits, segments 7 bits).
// The route and quantity codes (01 = route/quantity 1, 10 = route/quantity 2)
// and the fare values follow the published simulation waveforms.
package ticket_pkg;

  localparam int unsigned PATH_W   = 2;  // route code
  localparam int unsigned QTY_W    = 2;  // number of tickets
  localparam int unsigned PRICE_W  = 4;  // fare of one ticket, rupees
  localparam int unsigned COST_W   = 5;  // fare * quantity, rupees
  localparam int unsigned MONEY_W  = 6;  // deposited amount, rupees
  localparam int unsigned CHANGE_W = 6;  // returned change, rupees
  localparam int unsigned LED_W    = 6;  // ticket LEDs
  localparam int unsigned COINCNT_W = 4; // per-denomination coin counters
  localparam int unsigned DIGITS   = 6;  // display positions
  localparam int unsigned SEL_W    = 3;  // digit select
  localparam int unsigned BCD_W    = 4;
  localparam int unsigned SEG_W    = 7;

  // Route codes.
  localparam logic [PATH_W-1:0] PATH_NONE = 2'b00;
  localparam logic [PATH_W-1:0] PATH_1    = 2'b01;
  localparam logic [PATH_W-1:0] PATH_2    = 2'b10;

  // Quantity codes (binary ticket count).
  localparam logic [QTY_W-1:0] QTY_NONE = 2'd0;
  localparam logic [QTY_W-1:0] QTY_1    = 2'd1;
  localparam logic [QTY_W-1:0] QTY_2    = 2'd2;

  // Per-ticket fares selected by the pri3 / pri4 / pri5 buttons.
  localparam logic [PRICE_W-1:0] FARE_3 = 4'd3;
  localparam logic [PRICE_W-1:0] FARE_4 = 4'd4;
  localparam logic [PRICE_W-1:0] FARE_5 = 4'd5;

  // Coin values.
  localparam int unsigned COIN_TEN  = 10;
  localparam int unsigned COIN_FIVE = 5;

  // Largest deposit the money register can hold.
  localparam int unsigned MONEY_MAX = (1 << MONEY_W) - 1;

endpackage

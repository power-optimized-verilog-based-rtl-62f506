// bus_ticketing_system_top: coin-operated bus ticket machine with a gated
// clock.
//
// A passenger presses a route button (path_1/path_2), a fare button
// (pri3/pri4/pri5) and a quantity button (qua_1/qua_2), inserts 10- and
// 5-rupee coins (ten_in/five_in) and presses finish. If the money covers
// fare * quantity, ticket_issued rises, ticket_leds shows the fare paid
// and the change is shown on the display; otherwise nothing is issued.
// A six-digit multiplexed display (digit_select, segments) shows route,
// fare, quantity, cost, money and change. reset (synchronous, active high)
// starts the next transaction.
//
// Structure: flipflop_based_clk turns clk and en into gated_clk, which is
// the only clock of the four functional modules (ticket_selection,
// rupees_calculation, return_processing, display_interface). With en low
// the whole datapath, display scan included, stops and holds its state;
// reset acts only while the gated clock runs. Inputs are sampled on rising
// edges of gated_clk; every button or coin pulse is one clock cycle long
// (a longer pulse of a coin input counts one coin per cycle).
// The port list is that of the design's top-level schematic.
module bus_ticketing_system_top
  import ticket_pkg::*;
(
  input  logic             clk,
  input  logic             en,
  input  logic             reset,
  input  logic             path_1,
  input  logic             path_2,
  input  logic             pri3,
  input  logic             pri4,
  input  logic             pri5,
  input  logic             qua_1,
  input  logic             qua_2,
  input  logic             ten_in,
  input  logic             five_in,
  input  logic             finish,
  output logic [SEL_W-1:0] digit_select,
  output logic [SEG_W-1:0] segments,
  output logic [LED_W-1:0] ticket_leds,
  output logic             ticket_issued
);

  logic                 gated_clk;
  logic                 en_q;           // registered enable, not used further
  logic [PATH_W-1:0]    path;
  logic [QTY_W-1:0]     quantity;
  logic [PRICE_W-1:0]   price;
  logic [COST_W-1:0]    cost;
  logic [MONEY_W-1:0]   money;
  logic [CHANGE_W-1:0]  change;
  logic [COINCNT_W-1:0] ten_count, five_count;
  logic                 coin_refused;

  flipflop_based_clk s1 (
    .clk       (clk),
    .en        (en),
    .gated_clk (gated_clk),
    .q_out     (en_q)
  );

  ticket_selection u_selection (
    .clk    (gated_clk),
    .reset  (reset),
    .path_1 (path_1),
    .path_2 (path_2),
    .pri3   (pri3),
    .pri4   (pri4),
    .pri5   (pri5),
    .qua_1  (qua_1),
    .qua_2  (qua_2),
    .PATH   (path),
    .PIN    (quantity),
    .PRI    (price),
    .COST   (cost)
  );

  rupees_calculation u_calculation (
    .clk       (gated_clk),
    .reset     (reset),
    .ten_in    (ten_in),
    .five_in   (five_in),
    .ten_out   (ten_count),
    .five_out  (five_count),
    .total_out (money),
    .overflow  (coin_refused)
  );

  return_processing u_return (
    .clk       (gated_clk),
    .reset     (reset),
    .finish    (finish),
    .path_in   (path),
    .pri_in    (price),
    .cost_in   (cost),
    .coin_in   (money),
    .change    (change),
    .valid_tic (ticket_leds),
    .disp_tic  (ticket_issued)
  );

  display_interface u_display (
    .clk          (gated_clk),
    .reset        (reset),
    .path         (path),
    .price        (price),
    .quantity     (quantity),
    .cost         (cost),
    .money_in     (money),
    .change       (change),
    .digit_select (digit_select),
    .segments     (segments)
  );

endmodule

// return_processing: payment check, ticket issue and change.
//
// When the passenger presses finish, the module compares the deposited
// amount coin_in with the total fare cost_in at the next rising edge of clk
// (the gated clock in the full system):
//   * coin_in >= cost_in, with a route and a fare chosen: the ticket is
//     issued. disp_tic goes high, change = coin_in - cost_in, and valid_tic
//     shows the fare paid (cost_in, zero-extended to 6 bits) on the ticket
//     LEDs.
//   * otherwise (money short, or nothing selected): issue is withheld;
//     disp_tic, change and valid_tic are cleared.
// The outputs are registered and hold their value until the next finish or
// a reset (synchronous, active high), so the result stays on the display
// and LEDs after the button is released.
//
// The comparison, the outputs and their widths follow the design. Sampling
// the comparison on finish, the contents of valid_tic (the fare paid) and
// the refusal of a ticket with no route or fare selected are this
// implementation's reading of the published waveforms.
module return_processing
  import ticket_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                finish,
  input  logic [PATH_W-1:0]   path_in,
  input  logic [PRICE_W-1:0]  pri_in,
  input  logic [COST_W-1:0]   cost_in,
  input  logic [MONEY_W-1:0]  coin_in,
  output logic [CHANGE_W-1:0] change,
  output logic [LED_W-1:0]    valid_tic,
  output logic                disp_tic
);

  logic selected, paid;

  assign selected = (path_in != PATH_NONE) && (pri_in != '0) && (cost_in != '0);
  assign paid     = coin_in >= MONEY_W'(cost_in);

  always_ff @(posedge clk) begin
    if (reset) begin
      change    <= '0;
      valid_tic <= '0;
      disp_tic  <= 1'b0;
    end else if (finish) begin
      if (selected && paid) begin
        change    <= CHANGE_W'(coin_in - MONEY_W'(cost_in));
        valid_tic <= LED_W'(cost_in);
        disp_tic  <= 1'b1;
      end else begin
        change    <= '0;
        valid_tic <= '0;
        disp_tic  <= 1'b0;
      end
    end
  end

  // A ticket is never shown as issued together with an empty LED word.
  a_issue_has_fare: assert property (@(posedge clk) disable iff (reset)
                                     disp_tic |-> valid_tic != '0);

endmodule

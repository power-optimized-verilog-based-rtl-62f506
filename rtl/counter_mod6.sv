// counter_mod6: synchronous 3-bit modulo-6 counter for digit scanning.
//
// count advances by one on every rising edge of clk, through 000..101, and
// returns to 000 on the edge after 101. carry is high while count is 101,
// marking the last digit position of a scan. reset is synchronous and
// active high and sets count to 000. All of this follows the design; only
// the combinational (rather than registered) carry is this
// implementation's choice.
module counter_mod6
  import ticket_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  output logic [SEL_W-1:0] count,
  output logic             carry
);

  localparam logic [SEL_W-1:0] LAST = SEL_W'(DIGITS - 1);

  always_ff @(posedge clk) begin
    if (reset)              count <= '0;
    else if (count >= LAST) count <= '0;
    else                    count <= count + 1'b1;
  end

  assign carry = (count == LAST);

  a_in_range: assert property (@(posedge clk) disable iff (reset) count <= LAST);

endmodule

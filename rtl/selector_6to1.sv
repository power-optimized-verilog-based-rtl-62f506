// selector_6to1: six-input, 4-bit wide multiplexer for the display path.
//
// out = data<sel> for sel = 0..5. The two unused codes 110 and 111 give
// 4'hF, a code the segment decoder blanks (the design leaves them
// unspecified). Purely combinational.
module selector_6to1
  import ticket_pkg::*;
(
  input  logic [SEL_W-1:0] sel,
  input  logic [BCD_W-1:0] data0,
  input  logic [BCD_W-1:0] data1,
  input  logic [BCD_W-1:0] data2,
  input  logic [BCD_W-1:0] data3,
  input  logic [BCD_W-1:0] data4,
  input  logic [BCD_W-1:0] data5,
  output logic [BCD_W-1:0] out
);

  always_comb begin
    unique case (sel)
      3'd0:    out = data0;
      3'd1:    out = data1;
      3'd2:    out = data2;
      3'd3:    out = data3;
      3'd4:    out = data4;
      3'd5:    out = data5;
      default: out = 4'hF;
    endcase
  end

endmodule

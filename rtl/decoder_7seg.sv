// decoder_7seg: BCD to seven-segment decoder.
//
// segments = {a, b, c, d, e, f, g}, active high (a segment is lit when its
// bit is 1), as in the design's decoder waveform: 0 -> 1111110,
// 1 -> 0110000, ..., 9 -> 1111011. Codes 1010..1111 are not decimal digits
// and blank the digit (0000000). Purely combinational.
module decoder_7seg
  import ticket_pkg::*;
(
  input  logic [BCD_W-1:0] bcd,
  output logic [SEG_W-1:0] segments
);

  always_comb begin
    case (bcd)
      4'd0:    segments = 7'b1111110;
      4'd1:    segments = 7'b0110000;
      4'd2:    segments = 7'b1101101;
      4'd3:    segments = 7'b1111001;
      4'd4:    segments = 7'b0110011;
      4'd5:    segments = 7'b1011011;
      4'd6:    segments = 7'b1011111;
      4'd7:    segments = 7'b1110000;
      4'd8:    segments = 7'b1111111;
      4'd9:    segments = 7'b1111011;
      default: segments = 7'b0000000;
    endcase
  end

endmodule

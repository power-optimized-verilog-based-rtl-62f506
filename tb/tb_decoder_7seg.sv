// tb_decoder_7seg: self-checking test of the BCD to seven-segment decoder.
//
// The expected pattern of each digit is built here from the lit segments
// (a..g) of the usual seven-segment glyphs, not copied from a table: each
// digit lists which segments it uses. Codes 10..15 must give all segments
// off.
module tb_decoder_7seg;
  logic [3:0] bcd;
  logic [6:0] segments;
  int checks = 0, failures = 0;

  decoder_7seg dut (.*);

  // Segment letters, in the order of segments[6:0] = {a,b,c,d,e,f,g}.
  function automatic logic [6:0] glyph(input string lit);
    logic [6:0] s = '0;
    for (int i = 0; i < lit.len(); i++)
      s[6 - (lit[i] - "a")] = 1'b1;
    return s;
  endfunction

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++)
      for (int v = 0; v < 16; v++) begin
        logic [6:0] exp;
        bcd = 4'(v);
        #1;
        exp = (v < 10) ? glyph(lit[v]) : 7'b0;
        checks++;
        if (segments !== exp) begin
          failures++;
          $display("FAIL bcd=%0d segments=%b expected %b", v, segments, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

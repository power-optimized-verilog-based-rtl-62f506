// tb_display_interface: self-checking test of the multiplexed display.
//
// Holds the design's example transaction on the inputs (route 1, fare 5,
// two tickets, cost 10, money 15, change 5), which must show
// "1", "5", "2", blank, blank, "5" on positions 0..5, then random input
// values. After every clock edge digit_select must be the next position of
// the 0..5 scan and segments the glyph of that position's value, built in
// the testbench from the lit segments of each digit.
module tb_display_interface;
  logic clk = 1'b0;
  logic reset;
  logic [1:0] path, quantity;
  logic [3:0] price;
  logic [4:0] cost;
  logic [5:0] money_in, change;
  logic [2:0] digit_select;
  logic [6:0] segments;
  int checks = 0, failures = 0, blanks = 0;
  int pos;

  display_interface dut (.*);

  always #5 clk = ~clk;

  function automatic logic [6:0] glyph(input int v);
    string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                        "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    logic [6:0] s = '0;
    if (v > 9) return '0;
    for (int i = 0; i < lit[v].len(); i++)
      s[6 - (lit[v][i] - "a")] = 1'b1;
    return s;
  endfunction

  function automatic int value_at(input int p);
    case (p)
      0: return path;
      1: return price;
      2: return quantity;
      3: return cost % 16;
      4: return money_in % 16;
      default: return change % 16;
    endcase
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    if (reset) pos = 0; else pos = (pos + 1) % 6;
    @(posedge clk); #1;
    checks++;
    if (digit_select !== 3'(pos) || segments !== glyph(value_at(pos))) begin
      failures++;
      $display("FAIL t=%0t pos=%0d/%0d segments=%b expected %b", $time, digit_select, pos,
               segments, glyph(value_at(pos)));
    end
    if (segments == 0) blanks++;
    @(negedge clk);
    reset = 0;
  endtask

  initial begin
    logic [6:0] shown [6];
    path = 1; price = 5; quantity = 2; cost = 10; money_in = 15; change = 5;
    reset = 1;
    pos = 0;
    @(negedge clk);
    step();
    shown[0] = segments;
    for (int k = 1; k < 6; k++) begin step(); shown[k] = segments; end
    checks++;
    if (shown[0] != glyph(1) || shown[1] != glyph(5) || shown[2] != glyph(2) ||
        shown[3] != 0 || shown[4] != 0 || shown[5] != glyph(5)) begin
      failures++;
      $display("FAIL example display");
    end
    for (int i = 0; i < 3000; i++) begin
      if (i % 7 == 0) begin
        path = 2'($urandom_range(0, 2)); price = 4'($urandom_range(0, 5));
        quantity = 2'($urandom_range(0, 2)); cost = 5'(price * quantity);
        money_in = 6'(5 * $urandom_range(0, 12));
        change = (money_in >= 6'(cost)) ? money_in - 6'(cost) : 6'd0;
      end
      reset = ($urandom_range(0, 99) == 0);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

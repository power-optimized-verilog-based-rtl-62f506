// tb_counter_mod6: self-checking test of the mod-6 digit counter.
//
// After reset, count must run 0,1,2,3,4,5,0,... advancing on every rising
// clock edge, carry must be high exactly in state 5, and a reset in the
// middle of a scan must return count to 0 at the next edge.
module tb_counter_mod6;
  logic clk = 1'b0;
  logic reset;
  logic [2:0] count;
  logic carry;
  int checks = 0, failures = 0, wraps = 0;
  int m;

  counter_mod6 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      if (reset) m = 0;
      else if (m == 5) begin m = 0; wraps++; end
      else m++;
      @(posedge clk); #1;
      checks++;
      if (count !== 3'(m) || carry !== (m == 5)) begin
        failures++;
        $display("FAIL t=%0t count=%0d/%0d carry=%0b", $time, count, m, carry);
      end
      @(negedge clk);
      reset = (i > 10) && ($urandom_range(0, 49) == 0);
    end
    checks++;
    if (wraps < 10) begin failures++; $display("FAIL too few wraps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flipflop_based_clk: self-checking test of the flip-flop clock gate.
//
// Drives a free-running clk and a random enable pattern (changed on falling
// edges). Checks that q_out equals the enable sampled at the previous rising
// edge, that gated_clk is never high while clk is low, that it is high
// during a clk-high phase exactly when q_out is high, and that a counter in
// the gated domain advances once for every rising edge at which the enable
// was seen high, plus the one narrow pulse at the edge that turns it off.
module tb_flipflop_based_clk;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gated_clk, q_out;
  int   checks = 0, failures = 0;
  int   gated_edges = 0, expected_edges = 0;
  logic q_model = 1'b0;

  flipflop_based_clk dut (.clk(clk), .en(en), .gated_clk(gated_clk), .q_out(q_out));

  always #5 clk = ~clk;

  always @(posedge gated_clk) gated_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Settle the gate flip-flop with enable low.
    @(negedge clk); en = 1'b0;
    @(posedge clk); @(negedge clk);
    gated_edges = 0;
    q_model = 1'b0;
    for (int i = 0; i < 400; i++) begin
      // rising edge: model register, count expected pulses
      @(posedge clk);
      // A pulse appears at this edge if the enable register was already
      // high before it (old q) or becomes high at it (new q).
      if (q_model || en) expected_edges++;
      q_model = en;
      #1;
      check(q_out == q_model, "q_out follows en one edge later");
      check(gated_clk == q_model, "gated_clk during clk high");
      @(negedge clk);
      #1;
      check(gated_clk == 1'b0, "gated_clk low while clk low");
      en = (i % 37 < 20) ? 1'b1 : ($urandom_range(0, 3) == 0);
    end
    check(gated_edges == expected_edges, "gated edge count");
    $display("gated edges %0d expected %0d", gated_edges, expected_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

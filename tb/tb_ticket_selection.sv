// tb_ticket_selection: self-checking test of the route/fare/quantity
// registers.
//
// Replays the button sequence of a typical purchase, then presses random
// single buttons (and random simultaneous ones) for many cycles, comparing
// PATH, PIN, PRI and COST after every clock edge with a reference model
// kept in the testbench. COST must always equal PRI * PIN in the same cycle
// as the button that changed them (no extra latency).
module tb_ticket_selection;
  import ticket_pkg::*;
  logic clk = 1'b0;
  logic reset, path_1, path_2, pri3, pri4, pri5, qua_1, qua_2;
  logic [1:0] PATH, PIN;
  logic [3:0] PRI;
  logic [4:0] COST;
  int checks = 0, failures = 0;
  int m_path, m_pin, m_pri;

  ticket_selection dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    {reset, path_1, path_2, pri3, pri4, pri5, qua_1, qua_2} = '0;
  endtask

  // Update the model with the buttons currently driven, then clock.
  task automatic step();
    if (reset) begin
      m_path = 0; m_pin = 0; m_pri = 0;
    end else begin
      if (path_1) m_path = 1; else if (path_2) m_path = 2;
      if (pri3) m_pri = 3; else if (pri4) m_pri = 4; else if (pri5) m_pri = 5;
      if (qua_1) m_pin = 1; else if (qua_2) m_pin = 2;
    end
    @(posedge clk); #1;
    checks++;
    if (PATH !== 2'(m_path) || PIN !== 2'(m_pin) || PRI !== 4'(m_pri) ||
        COST !== 5'(m_pri * m_pin)) begin
      failures++;
      $display("FAIL t=%0t PATH=%0d/%0d PIN=%0d/%0d PRI=%0d/%0d COST=%0d/%0d", $time,
               PATH, m_path, PIN, m_pin, PRI, m_pri, COST, m_pri * m_pin);
    end
    @(negedge clk);
    idle();
  endtask

  initial begin
    idle();
    @(negedge clk);
    reset = 1; step();
    // Route 1, fare 3, one ticket: COST = 3.
    path_1 = 1; step();
    pri3 = 1;   step();
    qua_1 = 1;  step();
    if (COST !== 5'd3) begin failures++; $display("FAIL cost 3"); end
    checks++;
    // Route 2, fare 5, two tickets: COST = 10.
    path_2 = 1; step();
    pri5 = 1;   step();
    qua_2 = 1;  step();
    if (COST !== 5'd10 || PATH !== 2'b10) begin failures++; $display("FAIL cost 10"); end
    checks++;
    // Fare 4 alone.
    pri4 = 1; step();
    if (COST !== 5'd8) begin failures++; $display("FAIL cost 8"); end
    checks++;
    // Idle cycles hold the values.
    repeat (3) step();
    reset = 1; step();
    // Random buttons, occasionally several at once and occasional reset.
    for (int i = 0; i < 3000; i++) begin
      {path_1, path_2, pri3, pri4, pri5, qua_1, qua_2} = 7'($urandom) & 7'($urandom) & 7'($urandom);
      reset = ($urandom_range(0, 99) == 0);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rupees_calculation: self-checking test of the coin counters.
//
// First replays the coin sequence of the design's example (three 5-rupee
// coins, then two 10-rupee coins: totals 5, 10, 15, 25, 35), then inserts
// random coins, single and simultaneous, until the 63-rupee limit is hit
// several times. After every edge ten_out, five_out, total_out and the
// overflow flag are compared with a model; each coin must be counted at the
// first clock edge after its pulse (one cycle of latency).
module tb_rupees_calculation;
  import ticket_pkg::*;
  logic clk = 1'b0;
  logic reset, ten_in, five_in;
  logic [3:0] ten_out, five_out;
  logic [5:0] total_out;
  logic overflow;
  int checks = 0, failures = 0, refusals = 0;
  int m_ten, m_five, m_total;
  bit m_ovf;

  rupees_calculation dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    bit tt, tf;
    if (reset) begin
      m_ten = 0; m_five = 0; m_total = 0; m_ovf = 0;
    end else begin
      tt = 0; tf = 0;
      if (ten_in && five_in && m_total + 15 <= 63 && m_ten < 15 && m_five < 15) begin
        tt = 1; tf = 1;
      end else if (ten_in && m_total + 10 <= 63 && m_ten < 15) tt = 1;
      else if (five_in && m_total + 5 <= 63 && m_five < 15) tf = 1;
      m_ten += tt; m_five += tf;
      m_total += 10 * tt + 5 * tf;
      m_ovf = (ten_in && !tt) || (five_in && !tf);
      if (m_ovf) refusals++;
    end
    @(posedge clk); #1;
    checks++;
    if (ten_out !== 4'(m_ten) || five_out !== 4'(m_five) || total_out !== 6'(m_total) ||
        overflow !== m_ovf) begin
      failures++;
      $display("FAIL t=%0t ten=%0d/%0d five=%0d/%0d total=%0d/%0d ovf=%0b/%0b", $time,
               ten_out, m_ten, five_out, m_five, total_out, m_total, overflow, m_ovf);
    end
    @(negedge clk);
    {reset, ten_in, five_in} = '0;
  endtask

  task automatic expect_total(input int v);
    checks++;
    if (total_out !== 6'(v)) begin
      failures++;
      $display("FAIL expected total %0d got %0d", v, total_out);
    end
  endtask

  initial begin
    {reset, ten_in, five_in} = '0;
    @(negedge clk);
    reset = 1; step();
    five_in = 1; step(); expect_total(5);
    step();
    five_in = 1; step(); expect_total(10);
    five_in = 1; step(); expect_total(15);
    ten_in = 1;  step(); expect_total(25);
    ten_in = 1;  step(); expect_total(35);
    for (int i = 0; i < 4000; i++) begin
      reset   = ($urandom_range(0, 59) == 0);
      ten_in  = ($urandom_range(0, 2) == 0);
      five_in = ($urandom_range(0, 2) == 0);
      step();
    end
    checks++;
    if (refusals == 0) begin failures++; $display("FAIL overflow never exercised"); end
    $display("coins refused at the limit: %0d", refusals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

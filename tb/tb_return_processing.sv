// tb_return_processing: self-checking test of payment check and change.
//
// Runs the four cases of the design's example (fare 3 paid with 3; fare 10
// paid with 15, change 5; fare 5 with only 3, ticket withheld; fare 5 paid
// with 5, change 0), then random fares, routes and deposits with random
// finish pulses. After every edge change, valid_tic and disp_tic are
// compared with a model: outputs change only on finish (one cycle after it)
// and hold otherwise. Both issued and withheld outcomes must occur.
module tb_return_processing;
  import ticket_pkg::*;
  logic clk = 1'b0;
  logic reset, finish;
  logic [1:0] path_in;
  logic [3:0] pri_in;
  logic [4:0] cost_in;
  logic [5:0] coin_in;
  logic [5:0] change, valid_tic;
  logic disp_tic;
  int checks = 0, failures = 0, issued = 0, withheld = 0;
  int m_change, m_valid;
  bit m_disp;

  return_processing dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    if (reset) begin
      m_change = 0; m_valid = 0; m_disp = 0;
    end else if (finish) begin
      if (path_in != 0 && pri_in != 0 && cost_in != 0 && int'(coin_in) >= int'(cost_in)) begin
        m_change = coin_in - cost_in; m_valid = cost_in; m_disp = 1; issued++;
      end else begin
        m_change = 0; m_valid = 0; m_disp = 0; withheld++;
      end
    end
    @(posedge clk); #1;
    checks++;
    if (change !== 6'(m_change) || valid_tic !== 6'(m_valid) || disp_tic !== m_disp) begin
      failures++;
      $display("FAIL t=%0t cost=%0d coin=%0d change=%0d/%0d valid=%0d/%0d disp=%0b/%0b",
               $time, cost_in, coin_in, change, m_change, valid_tic, m_valid, disp_tic, m_disp);
    end
    @(negedge clk);
    reset = 0; finish = 0;
  endtask

  task automatic txn(input int p, input int pr, input int q, input int coins);
    path_in = 2'(p); pri_in = 4'(pr); cost_in = 5'(pr * q); coin_in = 6'(coins);
    step();
    finish = 1; step();
    step();
  endtask

  initial begin
    reset = 1; finish = 0; path_in = 0; pri_in = 0; cost_in = 0; coin_in = 0;
    @(negedge clk);
    reset = 1; step();
    txn(1, 3, 1, 3);
    checks++; if (!(disp_tic && change == 0 && valid_tic == 3)) begin failures++; $display("FAIL case 1"); end
    txn(2, 5, 2, 15);
    checks++; if (!(disp_tic && change == 5 && valid_tic == 10)) begin failures++; $display("FAIL case 2"); end
    txn(1, 5, 1, 3);
    checks++; if (disp_tic || change != 0 || valid_tic != 0) begin failures++; $display("FAIL case 3"); end
    txn(1, 5, 1, 5);
    checks++; if (!(disp_tic && change == 0 && valid_tic == 5)) begin failures++; $display("FAIL case 4"); end
    for (int i = 0; i < 3000; i++) begin
      int pr, q;
      pr = $urandom_range(3, 5); q = $urandom_range(1, 2);
      path_in = 2'($urandom_range(0, 2));
      pri_in  = ($urandom_range(0, 15) == 0) ? 4'd0 : 4'(pr);
      cost_in = 5'(pr * q);
      coin_in = 6'(5 * $urandom_range(0, 4));
      finish  = ($urandom_range(0, 2) == 0);
      reset   = ($urandom_range(0, 99) == 0);
      step();
    end
    checks++;
    if (issued == 0 || withheld == 0) begin failures++; $display("FAIL outcome not exercised"); end
    $display("issued %0d withheld %0d", issued, withheld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

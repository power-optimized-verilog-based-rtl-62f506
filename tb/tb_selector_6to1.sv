// tb_selector_6to1: self-checking test of the 6-to-1 digit selector.
//
// Applies the design's example (data0..data5 = 1..6, sel 0..5 gives 1..6),
// then random data words for every select code, including the unused codes
// 6 and 7, which must give 4'hF (a blank digit).
module tb_selector_6to1;
  logic [2:0] sel;
  logic [3:0] data0, data1, data2, data3, data4, data5, out;
  logic [3:0] d [6];
  int checks = 0, failures = 0;

  selector_6to1 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    logic [3:0] exp;
    {data0, data1, data2, data3, data4, data5} = {d[0], d[1], d[2], d[3], d[4], d[5]};
    #1;
    exp = (sel < 6) ? d[sel] : 4'hF;
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL sel=%0d out=%h expected %h", sel, out, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) d[k] = 4'(k + 1);
    for (int s = 0; s < 6; s++) begin
      sel = 3'(s); apply_and_check();
    end
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 6; k++) d[k] = 4'($urandom);
      sel = 3'($urandom);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

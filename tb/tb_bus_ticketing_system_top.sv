// tb_bus_ticketing_system_top: end-to-end test of the ticket machine.
//
// Runs the top level at its only configuration. A cycle model of the whole
// machine is kept in the testbench: the clock gate (which clock edges reach
// the datapath), the three selection registers, the coin total, the payment
// decision and the display scan. After every rising edge of the raw clock
// the outputs digit_select, segments, ticket_leds and ticket_issued are
// compared with the model.
//
// Directed part: the example purchase (route 1, fare 5, two tickets, two
// 10-rupee coins: ticket issued, fare 10 on the LEDs, change 10), then a
// purchase that is first refused for lack of money and then completed after
// one more coin, then a pause of the clock enable in the middle of a
// purchase, during which nothing may move. Random part: many sessions with
// random buttons, coins, finish presses, resets and enable pauses.
//
// Each mechanism must occur at least once: ticket issued, ticket withheld,
// a coin refused at the 63-rupee limit, an enable pause, a display wrap from
// position 5 to 0, a blanked digit, and a synchronous reset; and a ticket
// must have been sold for each of the 12 route / fare / quantity
// combinations. The testbench also counts the raw clock edges and the edges
// that pass the gate; the latter must match the clock-gate model.
module tb_bus_ticketing_system_top;
  logic clk = 1'b0;
  logic en, reset, path_1, path_2, pri3, pri4, pri5, qua_1, qua_2, ten_in, five_in, finish;
  logic [2:0] digit_select;
  logic [6:0] segments;
  logic [5:0] ticket_leds;
  logic ticket_issued;

  int checks = 0, failures = 0;
  int combo_issued [3][6][3];  // [route][fare][quantity] tickets issued
  int n_issued = 0, n_withheld = 0, n_refused = 0, n_paused = 0, n_wraps = 0,
      n_blank = 0, n_reset = 0;

  // Model state.
  bit q_m;
  int path_m, pin_m, pri_m, cost_m, money_m, change_m, leds_m, pos_m;
  bit issued_m;

  bus_ticketing_system_top dut (.*);

  // Clock activity: edges of the raw clock against edges that reach the
  // datapath through the gate.
  int raw_edges = 0, gated_edges = 0, model_edges = 0;
  bit counting = 0;
  always @(posedge clk)           if (counting) raw_edges++;
  always @(posedge dut.gated_clk) if (counting) gated_edges++;

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
      0: return path_m;
      1: return pri_m;
      2: return pin_m;
      3: return cost_m % 16;
      4: return money_m % 16;
      default: return change_m % 16;
    endcase
  endfunction

  task automatic release_all();
    {reset, path_1, path_2, pri3, pri4, pri5, qua_1, qua_2, ten_in, five_in, finish} = '0;
  endtask

  // One raw clock cycle: update the model from the inputs now driven,
  // clock, compare, then release the one-cycle pulses.
  task automatic step();
    bit edge_seen;
    // The gated domain sees this edge if the enable register was high
    // before it or is loaded high by it.
    edge_seen = q_m || en;
    q_m = en;
    if (!edge_seen) n_paused++;
    if (counting && edge_seen) model_edges++;
    if (edge_seen) begin
      if (reset) begin
        path_m = 0; pin_m = 0; pri_m = 0; cost_m = 0; money_m = 0;
        change_m = 0; leds_m = 0; issued_m = 0; pos_m = 0;
        n_reset++;
      end else begin
        int t, f;
        // Payment decision uses the registers before this edge.
        if (finish) begin
          if (path_m != 0 && pri_m != 0 && cost_m != 0 && money_m >= cost_m) begin
            change_m = money_m - cost_m; leds_m = cost_m; issued_m = 1; n_issued++;
            combo_issued[path_m][pri_m][pin_m]++;
          end else begin
            change_m = 0; leds_m = 0; issued_m = 0; n_withheld++;
          end
        end
        if (path_1) path_m = 1; else if (path_2) path_m = 2;
        if (pri3) pri_m = 3; else if (pri4) pri_m = 4; else if (pri5) pri_m = 5;
        if (qua_1) pin_m = 1; else if (qua_2) pin_m = 2;
        cost_m = pri_m * pin_m;
        t = ten_in && (money_m + 10 <= 63);
        f = five_in && (money_m + 10 * t + 5 <= 63);
        if ((ten_in && !t) || (five_in && !f)) n_refused++;
        money_m += 10 * t + 5 * f;
        if (pos_m == 5) begin pos_m = 0; n_wraps++; end else pos_m++;
      end
    end
    @(posedge clk); #1;
    checks++;
    if (digit_select !== 3'(pos_m) || segments !== glyph(value_at(pos_m)) ||
        ticket_leds !== 6'(leds_m) || ticket_issued !== issued_m) begin
      failures++;
      $display("FAIL t=%0t sel=%0d/%0d seg=%b/%b leds=%0d/%0d issued=%0b/%0b", $time,
               digit_select, pos_m, segments, glyph(value_at(pos_m)), ticket_leds, leds_m,
               ticket_issued, issued_m);
    end
    if (segments == 0) n_blank++;
    @(negedge clk);
    release_all();
  endtask

  task automatic expect_ticket(input bit issued, input int leds, input int change, input string what);
    checks++;
    if (ticket_issued !== issued || ticket_leds !== 6'(leds) || change_m != change) begin
      failures++;
      $display("FAIL %s: issued=%0b leds=%0d", what, ticket_issued, ticket_leds);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin

    release_all();
    reset = 1;
    en = 1;
    // Bring the machine to a known state: the enable register loads on the
    // first edge, the reset is applied while the clock runs.
    @(negedge clk);
    @(posedge clk); @(negedge clk);
    q_m = 1;
    pos_m = 0;
    reset = 1; step();
    reset = 1; step();
    counting = 1;

    // Example purchase: route 1, fare 5, two tickets, two 10-rupee coins.
    path_1 = 1; pri5 = 1; qua_2 = 1; step();
    step();
    ten_in = 1; step();
    step();
    ten_in = 1; step();
    finish = 1; step();
    expect_ticket(1, 10, 10, "example purchase");
    repeat (12) step();
    reset = 1; step();

    // Route 2, fare 4, two tickets (8): 5 rupees is short, 10 is enough.
    path_2 = 1; pri4 = 1; qua_2 = 1; step();
    five_in = 1; step();
    finish = 1; step();
    expect_ticket(0, 0, 0, "short payment withheld");
    five_in = 1; step();
    // Pause the clock in the middle: the display and registers freeze.
    en = 0;
    repeat (9) step();
    en = 1;
    step();
    finish = 1; step();
    expect_ticket(1, 8, 2, "payment after top-up");
    repeat (6) step();
    reset = 1; step();

    // Fill the coin register to its limit.
    path_1 = 1; pri3 = 1; qua_1 = 1; step();
    for (int i = 0; i < 8; i++) begin ten_in = 1; step(); end
    five_in = 1; step();
    finish = 1; step();
    expect_ticket(1, 3, 57, "full coin register");
    reset = 1; step();

    // One purchase of every route / fare / quantity, paid with 10-rupee
    // coins: the fare rounded up to a multiple of 10.
    for (int p = 1; p <= 2; p++)
      for (int f = 3; f <= 5; f++)
        for (int q = 1; q <= 2; q++) begin
          path_1 = (p == 1); path_2 = (p == 2);
          pri3 = (f == 3); pri4 = (f == 4); pri5 = (f == 5);
          qua_1 = (q == 1); qua_2 = (q == 2);
          step();
          for (int c = 0; c < (f * q + 9) / 10; c++) begin ten_in = 1; step(); end
          finish = 1; step();
          expect_ticket(1, f * q, 10 * ((f * q + 9) / 10) - f * q, "fare table purchase");
          reset = 1; step();
        end

    // Random sessions.
    for (int s = 0; s < 300; s++) begin
      int len = $urandom_range(5, 40);
      for (int c = 0; c < len; c++) begin
        int r = $urandom_range(0, 99);
        if (r < 4) path_1 = 1; else if (r < 8) path_2 = 1;
        r = $urandom_range(0, 99);
        if (r < 3) pri3 = 1; else if (r < 6) pri4 = 1; else if (r < 9) pri5 = 1;
        r = $urandom_range(0, 99);
        if (r < 4) qua_1 = 1; else if (r < 8) qua_2 = 1;
        ten_in  = ($urandom_range(0, 9) == 0);
        five_in = ($urandom_range(0, 9) == 0);
        finish  = ($urandom_range(0, 14) == 0);
        if ($urandom_range(0, 19) == 0) en = ~en;
        step();
      end
      en = 1;
      step();
      reset = 1; step();
    end

    if (n_issued   == 0) begin failures++; $display("FAIL no ticket issued"); end
    if (n_withheld == 0) begin failures++; $display("FAIL no ticket withheld"); end
    if (n_refused  == 0) begin failures++; $display("FAIL no coin refused at the limit"); end
    if (n_paused   == 0) begin failures++; $display("FAIL clock never gated off"); end
    if (n_wraps    == 0) begin failures++; $display("FAIL display never wrapped"); end
    if (n_blank    == 0) begin failures++; $display("FAIL no blanked digit"); end
    if (n_reset    == 0) begin failures++; $display("FAIL no reset"); end
    checks += 7;
    counting = 0;
    checks++;
    if (gated_edges != model_edges) begin
      failures++;
      $display("FAIL gated clock edges %0d, expected %0d", gated_edges, model_edges);
    end
    $display("clock edges: raw %0d, gated %0d (%0d%% of the raw clock reached the datapath)",
             raw_edges, gated_edges, 100 * gated_edges / raw_edges);
    // Every route / fare / quantity combination must have been sold.
    for (int p = 1; p <= 2; p++)
      for (int f = 3; f <= 5; f++)
        for (int q = 1; q <= 2; q++) begin
          checks++;
          if (combo_issued[p][f][q] == 0) begin
            failures++;
            $display("FAIL no ticket sold for route %0d fare %0d quantity %0d", p, f, q);
          end
        end
    $display("issued=%0d withheld=%0d refused=%0d paused=%0d wraps=%0d blank=%0d resets=%0d",
             n_issued, n_withheld, n_refused, n_paused, n_wraps, n_blank, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

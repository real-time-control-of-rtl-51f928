// Testbench for reservation_controller, scaled to one tick per two clocks.
// Instance "spor" uses the four-flow budgets/periods (5/8, 9/72 x3) in ticks:
//  - at every cycle block must equal the fixed-priority grant of READY and
//    at most one flow may be unblocked;
//  - with all four flows permanently backlogged the bus is fully used and
//    each hyperperiod of 72 ticks gives 45 ticks to flow 0 and 9 to each
//    other flow (the reserved budgets, total utilisation 1);
//  - flow 0 alone gets exactly 5 of every 8 ticks.
// Instance "per" has no sporadic servers: block must follow the static
// priority chain of the data_rdy inputs directly, for random inputs.
module tb_reservation_controller;
  import rtio_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge

  logic [3:0] rdy_s = '0, blk_s, ready_s;
  logic [3:0] rdy_p = '0, blk_p, ready_p;
  budget_t bud_s [4], bud_p [4];
  logic tick_s, tick_p;
  time_us_t now_s, now_p;

  reservation_controller #(.N(4), .CLK_HZ(2), .TICK_HZ(1), .SPORADIC(4'b1111),
    .BUDGET('{5, 9, 9, 9}), .PERIOD('{8, 72, 72, 72})) spor (
    .clk, .rst_n, .data_rdy(rdy_s), .block(blk_s), .ready(ready_s),
    .budget(bud_s), .tick(tick_s), .now_us(now_s));

  reservation_controller #(.N(4), .CLK_HZ(2), .TICK_HZ(1), .SPORADIC(4'b0000)) per (
    .clk, .rst_n, .data_rdy(rdy_p), .block(blk_p), .ready(ready_p),
    .budget(bud_p), .tick(tick_p), .now_us(now_p));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [3:0] fp(logic [3:0] r);
    for (int i = 0; i < 4; i++) if (r[i]) return ~(4'b1 << i);
    return 4'b1111;
  endfunction

  always @(negedge clk) if (rst_n) begin
    check(blk_s == fp(ready_s), "sporadic: block is not the fixed-priority grant");
    check($countones(~blk_s) <= 1, "two flows unblocked");
    check(blk_p == fp(rdy_p), "periodic: block is not the priority chain of data_rdy");
  end

  int grant [4];
  int idle;
  always @(posedge clk) if (tick_s) begin
    for (int i = 0; i < 4; i++) if (!blk_s[i] && rdy_s[i]) grant[i]++;
    if (blk_s == 4'b1111) idle++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // flow 0 alone
    @(negedge clk) rdy_s = 4'b0001;
    repeat (2 * 8 * 2) @(posedge clk);
    for (int w = 0; w < 3; w++) begin
      grant = '{0, 0, 0, 0};
      repeat (8 * 2) @(posedge clk);
      check(grant[0] == 5, $sformatf("flow 0 alone got %0d of 8 ticks", grant[0]));
    end
    // everybody backlogged
    @(negedge clk) rdy_s = 4'b1111;
    repeat (72 * 2 * 2) @(posedge clk);
    grant = '{0, 0, 0, 0}; idle = 0;
    repeat (3 * 72 * 2) @(posedge clk);
    check(grant[0] == 135, $sformatf("flow 0 got %0d ticks in 3 hyperperiods", grant[0]));
    for (int i = 1; i < 4; i++)
      check(grant[i] == 27, $sformatf("flow %0d got %0d ticks in 3 hyperperiods", i, grant[i]));
    check(idle == 0, $sformatf("bus idle for %0d ticks with all flows backlogged", idle));
    // random data_rdy on both instances
    repeat (4000) begin
      @(negedge clk);
      rdy_p = 4'($urandom);
      if ($urandom_range(0, 9) == 0) rdy_s = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

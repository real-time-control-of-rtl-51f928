// Testbench for sporadic_server with a small budget (3) and period (10),
// one tick per clock.
//  1. Directed: a request that consumes 2 units and finishes must get those
//     2 units back exactly PERIOD ticks after its activation, not earlier.
//  2. Continuously backlogged and granted: READY must give exactly BUDGET
//     ticks in every PERIOD ticks once in steady state.
//  3. Random data_rdy and grant: READY and the budget must match, cycle by
//     cycle, a reference model written from the server rules.
module tb_sporadic_server;
  import rtio_pkg::*;
  localparam int BUDGET = 3, PERIOD = 10;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, tick = 1;
  time_us_t now_us = 0;
  logic data_rdy = 0, granted = 0, ready, active;
  budget_t budget;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge
  always_ff @(posedge clk) if (rst_n) now_us <= now_us + 1;

  sporadic_server #(.BUDGET(BUDGET), .PERIOD(PERIOD), .REPL_DEPTH(4)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Reference model of the server rules, evaluated once per clock:
  // ready = open period & request & budget; consume on tick when granted;
  // open when idle with request, budget and queue room (replenish at now+P);
  // close when the request drops or the budget is empty, queueing what was
  // consumed; add back the oldest queued amount once its time is reached.
  int  m_budget = BUDGET, m_consumed = 0, m_at = 0;
  bit  m_active = 0;
  int  mq_at [$], mq_amt [$];
  bit  model_on = 0;
  always @(posedge clk) if (model_on) begin
    bit r, open_p, close_p, pop;
    int add;
    r       = m_active && data_rdy && m_budget > 0;
    check(ready == r, $sformatf("ready %0b, model %0b", ready, r));
    check(budget == budget_t'(m_budget), $sformatf("budget %0d, model %0d", budget, m_budget));
    check(budget <= BUDGET, "budget above maximum");
    open_p  = !m_active && data_rdy && m_budget > 0 && mq_at.size() < 4;
    close_p = m_active && (!data_rdy || m_budget == 0);
    pop     = mq_at.size() > 0 && int'(now_us) >= mq_at[0];
    add     = pop ? mq_amt[0] : 0;
    if (pop) begin void'(mq_at.pop_front()); void'(mq_amt.pop_front()); end
    if (close_p && m_consumed > 0) begin mq_at.push_back(m_at); mq_amt.push_back(m_consumed); end
    if (r && granted && tick) begin m_budget--; if (!open_p && !close_p) m_consumed++; end
    m_budget += add;
    if (open_p) begin m_active = 1; m_at = int'(now_us) + PERIOD; m_consumed = 0; end
    else if (close_p) m_active = 0;
  end

  time_us_t t_act;
  int n_ready;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // ---- 1. directed replenishment
    check(budget == BUDGET, "budget full after reset");
    granted <= 1;
    @(negedge clk); data_rdy = 1; t_act = now_us;
    @(posedge clk); #1 check(active && ready, "active and ready one clock after request");
    @(posedge clk); #1; @(posedge clk); #1;       // two ticks consumed
    check(budget == BUDGET - 2, "two units consumed");
    @(negedge clk); data_rdy = 0;
    @(posedge clk); #1 check(!active, "period closes when the task finishes");
    while (budget != BUDGET) begin
      @(posedge clk); #1;
      if (budget == BUDGET) check(now_us == t_act + PERIOD + 1, $sformatf(
        "replenished at now=%0d, activation %0d", now_us, t_act));
      else check(now_us <= t_act + PERIOD, "replenishment late");
    end
    repeat (PERIOD) @(posedge clk);
    // ---- 2. backlogged: BUDGET per PERIOD
    @(negedge clk); data_rdy = 1;
    repeat (3 * PERIOD) @(posedge clk);
    for (int w = 0; w < 4; w++) begin
      n_ready = 0;
      repeat (PERIOD) begin @(posedge clk); #1 n_ready += ready; end
      check(n_ready == BUDGET, $sformatf("backlogged window got %0d ticks", n_ready));
    end
    // ---- 3. random activity
    @(negedge clk) data_rdy = 0;
    wait (budget == BUDGET && !active);
    @(negedge clk);
    m_budget = BUDGET; m_active = 0; model_on = 1;
    repeat (3000) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) data_rdy = !data_rdy;
      granted = ($urandom_range(0, 3) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

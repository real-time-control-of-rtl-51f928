// Sporadic server: budget-based scheduling server for one aperiodic I/O flow.
//
// The server sees only whether its task is active (the bridge's data_rdy) and
// whether the global scheduler lets it run (granted = !block). From these it
// produces the READY parameter for the fixed-priority scheduler:
//   - READY = task active and budget left (and an active period is open).
//   - Budget is consumed one unit per microsecond tick while READY and granted.
//   - An active period opens when the task becomes active while budget is
//     available; its replenishment time is fixed then as now + PERIOD.
//   - The active period closes when the task finishes (data_rdy falls) or the
//     budget is exhausted; the time consumed during it is then queued as a
//     replenishment amount for the time fixed at opening.
//   - When a queued replenishment time is reached the amount is added back.
// These rules follow the document. Its own choices: budget starts full at
// reset; replenishments wait in a FIFO of REPL_DEPTH entries (they come out
// in time order because the period is constant), and while that FIFO is full
// no new active period is opened, so the server stays idle rather than lose a
// replenishment; a period in which nothing was consumed queues nothing.
//
// Timing: READY is combinational from registered state and data_rdy; an
// active period opens the cycle after data_rdy rises with budget left, so
// READY first rises one clock after data_rdy. Times are in ticks of now_us.
module sporadic_server
  import rtio_pkg::*;
#(
  parameter int unsigned BUDGET     = 5000,   // e_s, ticks
  parameter int unsigned PERIOD     = 8000,   // p_s, ticks
  parameter int unsigned REPL_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tick,
  input  time_us_t now_us,
  input  logic     data_rdy,
  input  logic     granted,
  output logic     ready,
  output budget_t  budget,     // remaining budget, for observation
  output logic     active
);
  localparam int unsigned RW = $bits(repl_t);

  budget_t  consumed;
  time_us_t repl_at;
  repl_t    q_head;
  logic     q_empty, q_full, q_push, q_pop;
  logic [$clog2(REPL_DEPTH+1)-1:0] q_count;

  logic open_period, close_period, consume;

  always_comb begin
    ready        = active && data_rdy && (budget != '0);
    consume      = tick && ready && granted;
    open_period  = !active && data_rdy && (budget != '0) && !q_full;
    close_period = active && (!data_rdy || budget == '0);
    q_push       = close_period && (consumed != '0);
    q_pop        = !q_empty && time_reached(now_us, q_head.at);
  end

  sync_fifo #(.WIDTH(RW), .DEPTH(REPL_DEPTH)) u_repl_q (
    .clk, .rst_n,
    .push (q_push),
    .din  (repl_t'{at: repl_at, amount: consumed}),
    .pop  (q_pop),
    .dout (q_head),
    .empty(q_empty),
    .full (q_full),
    .count(q_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      budget   <= budget_t'(BUDGET);
      consumed <= '0;
      repl_at  <= '0;
      active   <= 1'b0;
    end else begin
      budget <= budget - budget_t'(consume) + (q_pop ? q_head.amount : '0);
      if (open_period) begin
        active   <= 1'b1;
        repl_at  <= now_us + time_us_t'(PERIOD);
        consumed <= '0;
      end else if (close_period) begin
        active <= 1'b0;
      end else if (consume) begin
        consumed <= consumed + 1'b1;
      end
    end
  end

  // The budget can never exceed its initial value.
  assert property (@(posedge clk) disable iff (!rst_n) budget <= budget_t'(BUDGET));
endmodule

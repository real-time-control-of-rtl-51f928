// Reservation controller: the system-wide bus access policy.
//
// One scheduling server per real-time bridge turns that bridge's data_rdy
// into a READY parameter, and the global fixed-priority logic turns the READY
// vector into the block wires, so only one bridge at a time may use the bus.
// A flow marked sporadic in SPORADIC gets a sporadic server with its own
// budget and period; an unmarked flow is served as a strictly periodic task,
// whose READY is its data_rdy. Bridges are wired in priority order, index 0
// highest, which gives rate-monotonic scheduling when the indices follow the
// periods. block is fed back to the servers as the "granted" information for
// budget accounting. All servers share one microsecond time base.
//
// Structure, wiring and the default budgets/periods follow the document; the
// clock frequency and the replenishment queue depth are this design's choice.
//
// Timing: block is combinational from server state and data_rdy (through the
// servers' READY); a bridge raising data_rdy sees block fall one clock later
// if it wins.
module reservation_controller
  import rtio_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned TICK_HZ    = 1_000_000,
  parameter logic [N-1:0] SPORADIC  = '1,
  parameter int unsigned BUDGET [N] = '{5000, 9000, 9000, 9000},
  parameter int unsigned PERIOD [N] = '{8000, 72000, 72000, 72000},
  parameter int unsigned REPL_DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  data_rdy,
  output logic [N-1:0]  block,
  output logic [N-1:0]  ready,
  output budget_t       budget [N],
  output logic          tick,
  output time_us_t      now_us
);
  tick_gen #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ)) u_tick (
    .clk, .rst_n, .tick, .now_us
  );

  for (genvar i = 0; i < N; i++) begin : g_srv
    if (SPORADIC[i]) begin : g_sporadic
      logic active;
      sporadic_server #(
        .BUDGET(BUDGET[i]), .PERIOD(PERIOD[i]), .REPL_DEPTH(REPL_DEPTH)
      ) u_srv (
        .clk, .rst_n, .tick, .now_us,
        .data_rdy(data_rdy[i]),
        .granted (!block[i]),
        .ready   (ready[i]),
        .budget  (budget[i]),
        .active  (active)
      );
    end else begin : g_periodic
      assign ready[i]  = data_rdy[i];
      assign budget[i] = '0;
    end
  end

  fp_scheduler #(.N(N)) u_sched (.ready, .block);
endmodule

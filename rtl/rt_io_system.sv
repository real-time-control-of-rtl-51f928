// Real-time I/O management system, top level.
//
// A COTS embedded node gains predictable I/O by interposing a real-time
// bridge between each peripheral and the COTS bus and adding one reservation
// controller that decides which bridge may use the bus. Each bridge i drives
// data_rdy[i] (data buffered for the bus) and obeys block[i]; the controller
// runs one scheduling server per bridge (sporadic servers by default) under
// fixed priority, index 0 highest, so at most one bridge transmits at a time
// and each flow gets its reserved bandwidth. A trace unit samples data_rdy and
// block every microsecond and reports changes over a serial line.
//
// Everything the bridges need from outside is brought out per bridge in the
// bi/bo struct arrays: the drivers' queue accesses (host CPU and the bridge's
// soft CPU) and the transaction port to the bus interface (PCIe endpoint),
// which are external parts.
//
// Default parameters reproduce the four-flow experiment: flow 0 is the 8-lane
// board (4.0 MB every 8 ms, sporadic server 5 ms / 8 ms), flows 1-3 are 1-lane
// boards (1.1 MB every 72 ms, sporadic server 9 ms / 72 ms). The 100 MHz
// clock, the serial baud rate and queue depths are this design's choices.
module rt_io_system
  import rtio_pkg::*;
#(
  parameter int unsigned N_FLOWS     = 4,
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned TICK_HZ     = 1_000_000,
  parameter int unsigned BAUD        = 115_200,
  parameter logic [N_FLOWS-1:0] SPORADIC = '1,
  parameter int unsigned BUDGET_US [N_FLOWS]          = '{5000, 9000, 9000, 9000},
  parameter int unsigned PERIOD_US [N_FLOWS]          = '{8000, 72000, 72000, 72000},
  parameter int unsigned GEN_JOB_BYTES [N_FLOWS]      = '{4_000_000, 1_100_000, 1_100_000, 1_100_000},
  parameter int unsigned GEN_BYTES_PER_TICK [N_FLOWS] = '{910, 147, 147, 147},
  parameter int unsigned GEN_PERIOD_US [N_FLOWS]      = '{8000, 72000, 72000, 72000},
  parameter int unsigned GEN_OFFSET_US [N_FLOWS]      = '{0, 0, 0, 0},
  parameter int unsigned TXN_BYTES   = 4096,
  parameter int unsigned Q_DEPTH     = 16,
  parameter int unsigned IRQ_LIMIT   = 8,
  parameter int unsigned REPL_DEPTH  = 4,
  parameter int unsigned TRACE_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_FLOWS-1:0] synth_mode,
  input  bridge_in_t         bi [N_FLOWS],
  output bridge_out_t        bo [N_FLOWS],
  output logic [N_FLOWS-1:0] data_rdy,
  output logic [N_FLOWS-1:0] block,
  output logic [N_FLOWS-1:0] ready,
  output budget_t            budget [N_FLOWS],
  output logic               tick,
  output time_us_t           now_us,
  output logic [N_FLOWS-1:0] gen_sending,
  output logic [N_FLOWS-1:0] gen_release,
  output logic [31:0]        gen_jobs_done [N_FLOWS],
  output logic [31:0]        gen_misses [N_FLOWS],
  output logic               uart_txd,
  output logic [15:0]        trace_dropped,
  output logic               trace_rec
);
  reservation_controller #(
    .N(N_FLOWS), .CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ), .SPORADIC(SPORADIC),
    .BUDGET(BUDGET_US), .PERIOD(PERIOD_US), .REPL_DEPTH(REPL_DEPTH)
  ) u_rc (
    .clk, .rst_n, .data_rdy, .block, .ready, .budget, .tick, .now_us
  );

  for (genvar i = 0; i < N_FLOWS; i++) begin : g_bridge
    real_time_bridge #(
      .TXN_BYTES(TXN_BYTES), .Q_DEPTH(Q_DEPTH), .IRQ_LIMIT(IRQ_LIMIT),
      .GEN_JOB_BYTES(GEN_JOB_BYTES[i]), .GEN_BYTES_PER_TICK(GEN_BYTES_PER_TICK[i]),
      .GEN_PERIOD(GEN_PERIOD_US[i]), .GEN_OFFSET(GEN_OFFSET_US[i])
    ) u_bridge (
      .clk, .rst_n, .tick,
      .synth_mode   (synth_mode[i]),
      .block        (block[i]),
      .data_rdy     (data_rdy[i]),
      .bi           (bi[i]),
      .bo           (bo[i]),
      .gen_sending  (gen_sending[i]),
      .gen_release  (gen_release[i]),
      .gen_jobs_done(gen_jobs_done[i]),
      .gen_misses   (gen_misses[i])
    );
  end

  trace_acquisition #(
    .N(N_FLOWS), .CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(TRACE_DEPTH)
  ) u_trace (
    .clk, .rst_n, .tick, .now_us, .data_rdy, .block,
    .txd(uart_txd), .dropped(trace_dropped), .rec_push(trace_rec)
  );
endmodule

// Synthetic periodic traffic source of a real-time bridge.
//
// Every PERIOD ticks a new job of JOB_BYTES bytes is released into a pending
// byte count. While bytes are pending the generator raises data_rdy; on each
// tick in which it is not blocked it sends BYTES_PER_TICK bytes (the last
// transfer of a job may be shorter). The transfer time of a job is therefore
// ceil(JOB_BYTES / BYTES_PER_TICK) unblocked ticks. If a job is still pending
// when the next one is released, a deadline miss is counted (implicit
// deadline = period) and the new job's bytes are added to the backlog.
// jobs_done counts the ticks at which the backlog empties (one per job when
// no deadline is missed).
//
// A constant amount of data per period that obeys the block command follows
// the document's traffic generators. The byte-rate model of the bus and the
// miss counter are this design's own choices; the defaults are the 8-lane
// board's flow (4.0 MB every 8 ms in 4.4 ms).
//
// Timing: releases occur at ticks 0, PERIOD, 2*PERIOD, ... after reset (the
// first tick after reset releases the first job, with OFFSET added).
// data_rdy rises in the cycle after a release.
module traffic_generator #(
  parameter int unsigned JOB_BYTES      = 4_000_000,
  parameter int unsigned BYTES_PER_TICK = 910,
  parameter int unsigned PERIOD         = 8000,
  parameter int unsigned OFFSET         = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        tick,
  input  logic        block,
  output logic        data_rdy,
  output logic        sending,      // bytes are moved in this tick
  output logic        release_p,    // a job is released in this tick
  output logic [31:0] jobs_done,    // times the backlog was cleared
  output logic [31:0] misses
);
  localparam int unsigned PER_W = $clog2(PERIOD + OFFSET + 1);

  logic [31:0]      pending;
  logic [PER_W-1:0] until_release;
  logic [31:0]      sent_now;

  assign data_rdy  = (pending != '0);
  assign release_p = enable && tick && (until_release == '0);
  assign sending   = tick && data_rdy && !block;
  assign sent_now  = (pending < BYTES_PER_TICK) ? pending : BYTES_PER_TICK;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending       <= '0;
      until_release <= PER_W'(OFFSET);
      jobs_done     <= '0;
      misses        <= '0;
    end else begin
      if (enable && tick)
        until_release <= (until_release == '0) ? PER_W'(PERIOD - 1) : until_release - 1'b1;
      pending <= pending - (sending ? sent_now : '0) + (release_p ? JOB_BYTES : '0);
      if (sending && sent_now == pending) jobs_done <= jobs_done + 1'b1;
      if (release_p && data_rdy && !(sending && sent_now == pending)) misses <= misses + 1'b1;
    end
  end
endmodule

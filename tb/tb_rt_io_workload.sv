// Workload testbench: the four-flow task set (flow 0: 4.0 MB every 8 ms;
// flows 1-3: 1.1 MB every 72 ms) at the real time scale (100 MHz clock,
// 1 us ticks) for three 72 ms hyperperiods, in two configurations side by
// side:
//   "spor": sporadic servers 5/8 ms and 9/72 ms, flows released at
//           near-critical instants, up to 0.8 ms apart (offsets 0, 800, 400,
//           200 us);
//   "rm":   no servers, plain rate-monotonic priority on the periodic
//           flows, all released together at time 0.
// For each: at most one bridge unblocked at any time, no deadline miss,
// 27 flow-0 jobs and 3 jobs of every other flow completed, and every
// flow-0 job takes ceil(4000000/910) = 4396 us (flow 0 always has the
// highest priority and its budget covers a whole job).
module tb_rt_io_workload;
  import rtio_pkg::*;
  localparam int N = 4, CPT = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  bridge_in_t  bi [N];
  always_comb for (int i = 0; i < N; i++) bi[i] = '0;

  // ---- sporadic-server configuration, staggered releases
  bridge_out_t  s_bo [N];
  logic [N-1:0] s_rdy, s_blk, s_ready, s_send, s_rel;
  budget_t      s_bud [N];
  logic         s_tick, s_txd, s_rec;
  time_us_t     s_now;
  logic [31:0]  s_done [N], s_miss [N];
  logic [15:0]  s_drop;
  rt_io_system #(.GEN_OFFSET_US('{0, 800, 400, 200})) spor (
    .clk, .rst_n, .synth_mode(4'b1111), .bi, .bo(s_bo), .data_rdy(s_rdy), .block(s_blk),
    .ready(s_ready), .budget(s_bud), .tick(s_tick), .now_us(s_now), .gen_sending(s_send),
    .gen_release(s_rel), .gen_jobs_done(s_done), .gen_misses(s_miss), .uart_txd(s_txd),
    .trace_dropped(s_drop), .trace_rec(s_rec));

  // ---- rate-monotonic configuration without servers
  bridge_out_t  r_bo [N];
  logic [N-1:0] r_rdy, r_blk, r_ready, r_send, r_rel;
  budget_t      r_bud [N];
  logic         r_tick, r_txd, r_rec;
  time_us_t     r_now;
  logic [31:0]  r_done [N], r_miss [N];
  logic [15:0]  r_drop;
  rt_io_system #(.SPORADIC(4'b0000)) rm (
    .clk, .rst_n, .synth_mode(4'b1111), .bi, .bo(r_bo), .data_rdy(r_rdy), .block(r_blk),
    .ready(r_ready), .budget(r_bud), .tick(r_tick), .now_us(r_now), .gen_sending(r_send),
    .gen_release(r_rel), .gen_jobs_done(r_done), .gen_misses(r_miss), .uart_txd(r_txd),
    .trace_dropped(r_drop), .trace_rec(r_rec));

  int excl_s = 0, excl_r = 0, len_s = 0, len_r = 0, jobs0_s = 0, jobs0_r = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(~s_blk) > 1) excl_s++;
    if ($countones(~r_blk) > 1) excl_r++;
    if (s_tick) begin
      if (s_rdy[0]) len_s++;
      else if (len_s != 0) begin
        check(len_s == 4396, $sformatf("spor: flow 0 job took %0d us", len_s)); jobs0_s++; len_s = 0;
      end
      if (r_rdy[0]) len_r++;
      else if (len_r != 0) begin
        check(len_r == 4396, $sformatf("rm: flow 0 job took %0d us", len_r)); jobs0_r++; len_r = 0;
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    wait (s_now == 3 * 72_000 - 1);
    check(excl_s == 0 && excl_r == 0, "two bridges unblocked");
    for (int i = 0; i < N; i++) begin
      check(s_miss[i] == 0, $sformatf("spor: flow %0d missed %0d deadlines", i, s_miss[i]));
      check(r_miss[i] == 0, $sformatf("rm: flow %0d missed %0d deadlines", i, r_miss[i]));
    end
    check(jobs0_s == 27 && jobs0_r == 27, $sformatf("flow-0 jobs: spor %0d, rm %0d", jobs0_s, jobs0_r));
    for (int i = 1; i < N; i++)
      check(s_done[i] == 3 && r_done[i] == 3,
            $sformatf("flow %0d jobs: spor %0d, rm %0d", i, s_done[i], r_done[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (220_000 * CPT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

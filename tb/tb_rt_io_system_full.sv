// Full-size testbench for rt_io_system with every parameter at its default:
// 100 MHz clock, 1 us ticks, the four-flow workload (flow 0: 4.0 MB every
// 8 ms, sporadic server 5 ms / 8 ms; flows 1-3: 1.1 MB every 72 ms, servers
// 9 ms / 72 ms; total reserved utilisation 5/8 + 3 * 9/72 = 1), all four
// bridges in synthetic mode, all jobs released together at time 0 (the
// critical instant). It runs one 72 ms hyperperiod plus 1 ms.
// Checked: at most one bridge unblocked at any time; every flow-0 job takes
// ceil(4000000 / 910) = 4396 us; no deadline miss; by 73 ms flow 0 has
// completed 9 jobs and flows 1-3 one job each, each needing
// ceil(1100000 / 147) = 7483 us of bus time; the first two trace records
// on the serial line are the reset state at 0 us and the release at 1 us.
module tb_rt_io_system_full;
  import rtio_pkg::*;
  localparam int N = 4, CPT = 100, BIT = 100_000_000 / 115_200;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge

  logic [N-1:0] synth_mode = '1;
  bridge_in_t   bi [N];
  bridge_out_t  bo [N];
  logic [N-1:0] data_rdy, block, ready, gen_sending, gen_release;
  budget_t      budget [N];
  logic         tick, uart_txd, trace_rec;
  time_us_t     now_us;
  logic [31:0]  gen_jobs_done [N], gen_misses [N];
  logic [15:0]  trace_dropped;

  always_comb for (int i = 0; i < N; i++) bi[i] = '0;

  rt_io_system dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int excl_fail = 0;
  int f0_len = 0, f0_jobs = 0, sent [N];
  always @(posedge clk) if (rst_n) begin
    if ($countones(~block) > 1) excl_fail++;
    if (tick) begin
      for (int i = 0; i < N; i++) if (gen_sending[i]) sent[i]++;
      if (data_rdy[0]) f0_len++;
      else if (f0_len != 0) begin
        check(f0_len == 4396, $sformatf("flow 0 job took %0d us, 4396 expected", f0_len));
        f0_jobs++; f0_len = 0;
      end
    end
  end

  // trace receiver: keep the first two records
  logic [7:0] rx [$];
  initial forever begin
    logic [7:0] b;
    @(negedge uart_txd);
    repeat (BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = uart_txd; end
    repeat (BIT) @(posedge clk);
    if (rx.size() < 12) rx.push_back(b);
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    wait (now_us == 73_000);
    check(excl_fail == 0, $sformatf("%0d cycles with two bridges unblocked", excl_fail));
    for (int i = 0; i < N; i++)
      check(gen_misses[i] == 0, $sformatf("flow %0d missed %0d deadlines", i, gen_misses[i]));
    check(f0_jobs == 9, $sformatf("flow 0 completed %0d jobs by 73 ms", f0_jobs));
    for (int i = 1; i < N; i++) begin
      check(gen_jobs_done[i] == 1, $sformatf("flow %0d completed %0d jobs", i, gen_jobs_done[i]));
      check(sent[i] == 7483, $sformatf("flow %0d used %0d us of bus time", i, sent[i]));
    end
    check(trace_dropped == 0, "trace records dropped");
    check(rx.size() == 12, $sformatf("%0d trace bytes received", rx.size()));
    if (rx.size() == 12) begin
      check(rx[0] == TRACE_SYNC && {rx[4], rx[3], rx[2], rx[1]} == 0 && rx[5] == 8'hF0,
            $sformatf("first record %p", rx[0:5]));
      check(rx[6] == TRACE_SYNC && {rx[10], rx[9], rx[8], rx[7]} == 1 && rx[11] == 8'hEF,
            $sformatf("second record %p", rx[6:11]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (75_000 * CPT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

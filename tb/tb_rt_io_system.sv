// End-to-end testbench for rt_io_system at a reduced time scale: one tick per
// 4 clocks, budgets/periods and job sizes of the four-flow workload divided
// by 100 (flow 0: 40000 bytes every 80 ticks at 910 bytes/tick = 44 ticks,
// server 50/80; flows 1-3: 11000 bytes every 720 ticks at 147 bytes/tick =
// 75 ticks, servers 90/720), and a 4-clock serial bit.
// Flows 0-2 run synthetic traffic throughout. Flow 3 starts synthetic and is
// switched to its DMA engine after the first hyperperiod; from then on the
// testbench queues 10 received packets of 1500 bytes every hyperperiod and a
// bus model moves them at 147 bytes per tick, more than the flow's budget
// covers in one period.
// Checked: at most one bridge unblocked; flow 0 (highest priority) finishes
// each job 44 ticks after release; no deadline miss on any synthetic flow;
// every DMA packet completes with all its bytes; the trace line carries
// well-formed records with non-decreasing time stamps.
// Mechanisms that must each occur at least once: preemption of a lower
// priority flow, budget exhaustion, replenishment, a bus transaction
// finishing after block rose, an interrupt, the mode switch, a trace record.
module tb_rt_io_system;
  import rtio_pkg::*;
  localparam int N = 4, CPT = 4;   // clocks per tick
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge

  logic [N-1:0] synth_mode = 4'b1111;
  bridge_in_t   bi [N];
  bridge_out_t  bo [N];
  logic [N-1:0] data_rdy, block, ready, gen_sending, gen_release;
  budget_t      budget [N];
  logic         tick, uart_txd, trace_rec;
  time_us_t     now_us;
  logic [31:0]  gen_jobs_done [N], gen_misses [N];
  logic [15:0]  trace_dropped;

  rt_io_system #(
    .CLK_HZ(CPT), .TICK_HZ(1), .BAUD(1),
    .BUDGET_US('{50, 90, 90, 90}), .PERIOD_US('{80, 720, 720, 720}),
    .GEN_JOB_BYTES('{40000, 11000, 11000, 11000}), .GEN_BYTES_PER_TICK('{910, 147, 147, 147}),
    .GEN_PERIOD_US('{80, 720, 720, 720}), .GEN_OFFSET_US('{0, 0, 0, 0})
  ) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- mechanism counters and per-cycle checks
  int n_preempt = 0, n_exhaust = 0, n_repl = 0, n_txn_over_block = 0, n_irq = 0;
  int n_switch = 0, n_rec = 0;
  logic [N-1:0] blk_q = '1, rdy_q = '0;
  budget_t bud_q [N];
  always @(posedge clk) if (rst_n) begin
    check($countones(~block) <= 1, "two bridges unblocked");
    for (int i = 0; i < N; i++) begin
      if (block[i] && !blk_q[i] && data_rdy[i] && rdy_q[i] && budget[i] != 0) n_preempt++;
      if (ready[i] == 0 && data_rdy[i] && budget[i] == 0 && (bud_q[i] != 0)) n_exhaust++;
      if (budget[i] > bud_q[i]) n_repl++;
      bud_q[i] = budget[i];
    end
    if (bi[3].dma_ack && block[3]) n_txn_over_block++;
    if (bo[3].irq) n_irq++;
    if (trace_rec) n_rec++;
    blk_q = block; rdy_q = data_rdy;
  end

  // flow 0 job length in ticks
  int f0_len = 0, f0_jobs = 0;
  always @(posedge clk) if (tick && rst_n && synth_mode[0]) begin
    if (data_rdy[0]) f0_len++;
    else if (f0_len != 0) begin
      check(f0_len == 44, $sformatf("flow 0 job took %0d ticks, 44 expected", f0_len));
      f0_jobs++; f0_len = 0;
    end
  end

  // ---------------- drivers' side of bridge 3 and the bus model
  int pkts_pushed = 0, pkts_done = 0, bytes_moved = 0;
  logic ack3 = 0, push3 = 0;
  pkt_desc_t desc3 = '0;
  addr_t host3 = '0;
  always_comb for (int i = 0; i < N; i++) begin
    bi[i] = '0;
    bi[i].hdone_pop = bo[i].hdone_valid;
    bi[i].fdone_pop = bo[i].fdone_valid;
    if (i == 3) begin
      bi[3].dma_ack    = ack3;
      bi[3].in_push    = push3;
      bi[3].in_desc    = desc3;
      bi[3].avail_push = push3;
      bi[3].avail_addr = host3;
    end
  end
  always @(posedge clk) if (rst_n && bo[3].hdone_valid) begin
    pkts_done++;
    check(bo[3].hdone_desc.len == 16'd1500, "DMA packet length");
  end
  initial forever begin
    @(posedge clk);
    if (bo[3].dma_req) begin
      bytes_moved += int'(bo[3].dma_len);
      repeat ((int'(bo[3].dma_len) * CPT + 146) / 147) @(posedge clk);
      ack3 <= 1; @(posedge clk); ack3 <= 0; @(posedge clk);
    end
  end

  // ---------------- trace receiver
  logic [7:0] rx [$];
  time_us_t   last_ts = 0;
  int         recs_rx = 0;
  initial forever begin
    logic [7:0] b;
    @(negedge uart_txd);
    repeat (CPT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPT) @(posedge clk); b[i] = uart_txd; end
    repeat (CPT) @(posedge clk);
    rx.push_back(b);
    if (rx.size() == 6) begin
      time_us_t ts;
      check(rx[0] == TRACE_SYNC, "trace sync byte");
      ts = {rx[4], rx[3], rx[2], rx[1]};
      check(ts >= last_ts, "trace time stamps go backwards");
      last_ts = ts; recs_rx++;
      rx.delete();
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    // first hyperperiod: all synthetic
    repeat (720 * CPT + 10) @(posedge clk);
    // switch bridge 3 to DMA once its generator is idle
    wait (!data_rdy[3]);
    @(negedge clk) synth_mode[3] = 0; n_switch++;
    repeat (3) begin
      for (int k = 0; k < 10; k++) begin
        @(negedge clk);
        push3 = 1; desc3 = '{32'h0010_0000 + pkts_pushed * 2048, 16'd1500};
        host3 = 32'h8000_0000 + pkts_pushed * 4096;
        pkts_pushed++;
      end
      @(negedge clk) push3 = 0;
      repeat (720 * CPT - 11) @(posedge clk);
    end
    repeat (720 * CPT) @(posedge clk);
    for (int i = 0; i < 3; i++) check(gen_misses[i] == 0, $sformatf("flow %0d missed %0d deadlines", i, gen_misses[i]));
    check(f0_jobs >= 40, $sformatf("only %0d flow-0 jobs measured", f0_jobs));
    check(gen_jobs_done[1] >= 5 && gen_jobs_done[2] >= 5, "flows 1 and 2 completed their jobs");
    check(pkts_done == pkts_pushed, $sformatf("%0d of %0d DMA packets done", pkts_done, pkts_pushed));
    check(bytes_moved == pkts_pushed * 1500, $sformatf("%0d bytes moved", bytes_moved));
    check(recs_rx > 10 && recs_rx <= n_rec, $sformatf("%0d trace records decoded", recs_rx));
    $display("preempt=%0d exhaust=%0d repl=%0d txn_over_block=%0d irq=%0d switch=%0d trace_rec=%0d dropped=%0d",
             n_preempt, n_exhaust, n_repl, n_txn_over_block, n_irq, n_switch, n_rec, trace_dropped);
    check(n_preempt > 0,        "no preemption happened");
    check(n_exhaust > 0,        "no budget exhaustion happened");
    check(n_repl > 0,           "no replenishment happened");
    check(n_txn_over_block > 0, "no transaction finished after block rose");
    check(n_irq > 0,            "no interrupt");
    check(n_switch > 0,         "no mode switch");
    check(n_rec > 0,            "no trace record");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * 720 * CPT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

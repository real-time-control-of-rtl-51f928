// Testbench for real_time_bridge: the mode switch between the synthetic
// traffic generator and the Bridge DMA Engine.
//  - synth_mode = 1: data_rdy is the generator's (200-byte jobs every 20
//    ticks at 50 bytes per tick, so 4 unblocked ticks per job); a packet
//    queued in the DMA engine meanwhile causes no bus transaction;
//  - synth_mode = 0: the generator releases nothing, data_rdy comes from the
//    queued packet, which is moved in 64-byte transactions once unblocked
//    and then completed; block = 1 holds the engine back.
module tb_real_time_bridge;
  import rtio_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, tick = 0, synth_mode = 1, block = 0, data_rdy;
  bridge_in_t bi = '0;
  bridge_out_t bo;
  logic gen_sending, gen_release;
  logic [31:0] gen_jobs_done, gen_misses;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge
  always_ff @(posedge clk) tick <= !tick;

  real_time_bridge #(.TXN_BYTES(64), .Q_DEPTH(4), .IRQ_LIMIT(4),
    .GEN_JOB_BYTES(200), .GEN_BYTES_PER_TICK(50), .GEN_PERIOD(20), .GEN_OFFSET(0)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  time t0;
  int rdy_ticks = 0, reqs = 0, releases = 0, bytes = 0;
  always @(posedge clk) if (tick && data_rdy) rdy_ticks++;
  always @(posedge clk) if (gen_release) releases++;

  // bus model: acknowledge after 3 clocks
  initial forever begin
    @(posedge clk);
    if (bo.dma_req) begin
      reqs++; bytes += int'(bo.dma_len);
      repeat (3) @(posedge clk);
      bi.dma_ack <= 1; @(posedge clk); bi.dma_ack <= 0; @(posedge clk);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // queue one received packet of 200 bytes in the DMA engine
    @(negedge clk);
    bi.in_push = 1; bi.in_desc = '{32'h0001_0000, 16'd200};
    bi.avail_push = 1; bi.avail_addr = 32'h8000_0000;
    @(negedge clk); bi.in_push = 0; bi.avail_push = 0;
    // synthetic mode for 3 generator periods
    do @(posedge clk); while (!gen_release);
    rdy_ticks = 0; t0 = $time;
    repeat (3) begin do @(posedge clk); while (!gen_release); end
    check(rdy_ticks == 3 * 4, $sformatf("synthetic data_rdy for %0d ticks, 12 expected", rdy_ticks));
    check($time - t0 == 3 * 20 * 2 * 10, $sformatf("3 periods took %0t", $time - t0));
    check(reqs == 0, "DMA engine used the bus in synthetic mode");
    check(gen_misses == 0, "generator missed a deadline");
    // switch to DMA mode between jobs, blocked first
    wait (!data_rdy);
    @(negedge clk) synth_mode = 0; block = 1;
    @(negedge clk);
    check(data_rdy, "data_rdy from the queued packet in DMA mode");
    releases = 0;
    repeat (60) @(posedge clk);
    check(reqs == 0, "transaction while blocked");
    @(negedge clk) block = 0;
    wait (bo.hdone_valid);
    check(bo.hdone_desc.addr == 32'h8000_0000 && bo.hdone_desc.len == 16'd200, "completion descriptor");
    check(reqs == 4 && bytes == 200, $sformatf("%0d transactions, %0d bytes", reqs, bytes));
    @(negedge clk) bi.hdone_pop = 1; bi.fdone_pop = 1;
    @(negedge clk) bi.hdone_pop = 0; bi.fdone_pop = 0;
    repeat (100) @(posedge clk);
    check(!data_rdy, "data_rdy low once the packet is done");
    check(releases == 0, "generator released a job in DMA mode");
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

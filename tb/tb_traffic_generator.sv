// Testbench for traffic_generator: 100-byte jobs every 10 ticks at 30 bytes
// per tick, so a job needs ceil(100/30) = 4 unblocked ticks.
//  - unblocked: data_rdy lasts exactly 4 ticks per period, releases come
//    every 10 ticks, no deadline misses;
//  - blocked for 3 ticks after a release: the job ends 3 ticks later;
//  - blocked for a whole period: one miss is counted and the backlog
//    (200 bytes) then takes 7 more ticks, a busy stretch of 10 + 7 ticks.
module tb_traffic_generator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, tick = 0, block = 1, enable = 0;
  logic data_rdy, sending, release_p;
  logic [31:0] jobs_done, misses;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge
  always_ff @(posedge clk) tick <= !tick;      // one tick every 2 clocks

  traffic_generator #(.JOB_BYTES(100), .BYTES_PER_TICK(30), .PERIOD(10), .OFFSET(0)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // measure data_rdy length (in ticks) of each busy stretch, and release spacing
  int busy_len, last_len, tick_no, last_rel, rel_gap;
  always @(posedge clk) if (tick) begin
    tick_no++;
    if (data_rdy) busy_len++;
    else if (busy_len != 0) begin last_len = busy_len; busy_len = 0; end
    if (release_p) begin rel_gap = tick_no - last_rel; last_rel = tick_no; end
  end

  task automatic wait_release();
    do @(posedge clk); while (!release_p);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1; enable <= 1; block <= 0;
    wait_release(); wait_release();
    repeat (3) begin
      wait_release();
      check(rel_gap == 10, $sformatf("release spacing %0d ticks", rel_gap));
      check(last_len == 4, $sformatf("unblocked job took %0d ticks", last_len));
    end
    check(misses == 0, "miss while unblocked");
    // blocked for 3 ticks after a release
    @(negedge clk) block = 1;
    repeat (6) @(posedge clk);
    @(negedge clk) block = 0;
    wait_release();
    check(last_len == 7, $sformatf("job delayed by 3 ticks took %0d ticks", last_len));
    // blocked for a whole period
    @(negedge clk) block = 1;
    wait_release();
    @(negedge clk);
    check(misses == 1, $sformatf("misses = %0d after a blocked period", misses));
    block = 0;
    wait_release();
    check(last_len == 10 + 7, $sformatf("backlogged stretch %0d ticks", last_len));
    check(jobs_done >= 5, "jobs completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

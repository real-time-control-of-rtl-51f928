// Testbench for trace_acquisition with a fast serial line (4 clocks per bit)
// and one tick every 8 clocks. A serial receiver in the testbench decodes
// the byte stream; each record (0xA5 + 5 bytes) must match, in order, the
// changes of {block, data_rdy} that the testbench applied, stamped with the
// tick at which they were applied. The first tick after reset is recorded.
// A final burst of a change on every tick overfills the 4-entry FIFO: the
// dropped counter must rise and the records that do arrive must still be
// applied changes, in order.
module tb_trace_acquisition;
  import rtio_pkg::*;
  localparam int BIT = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, tick;
  time_us_t now_us = 0;
  logic [3:0] data_rdy = '0, block = '1;
  logic txd, rec_push;
  logic [15:0] dropped;
  int cyc = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign tick = rst_n && (cyc % 8 == 7);
  always_ff @(posedge clk) if (tick) now_us <= now_us + 1;

  trace_acquisition #(.N(4), .CLK_HZ(40), .BAUD(10), .FIFO_DEPTH(4)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // expected records, taken at every tick where the inputs changed
  logic [39:0] expq [$];
  logic [7:0]  last = 8'hxx;
  bit          first = 1;
  always @(posedge clk) if (tick) begin
    if (first || {block, data_rdy} != last) expq.push_back({block, data_rdy, now_us});
    last = {block, data_rdy}; first = 0;
  end

  // serial receiver
  logic [7:0] rx_bytes [$];
  initial forever begin
    logic [7:0] b;
    @(negedge txd);
    repeat (BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = txd; end
    repeat (BIT) @(posedge clk);
    check(txd == 1'b1, "stop bit");
    rx_bytes.push_back(b);
  end

  // record assembly and comparison
  int  got = 0;
  bit  burst = 0;
  always @(posedge clk) if (rx_bytes.size() >= 6) begin
    logic [39:0] rec;
    check(rx_bytes[0] == 8'hA5, $sformatf("sync byte %h", rx_bytes[0]));
    for (int i = 0; i < 5; i++) rec[8*i +: 8] = rx_bytes[1+i];
    repeat (6) void'(rx_bytes.pop_front());
    got++;
    if (!burst) begin
      check(expq.size() > 0 && rec == expq[0], $sformatf("record %h, expected %h", rec,
            expq.size() > 0 ? expq[0] : 40'h0));
      if (expq.size() > 0) void'(expq.pop_front());
    end else begin
      while (expq.size() > 0 && expq[0] != rec) void'(expq.pop_front());
      check(expq.size() > 0, $sformatf("burst record %h was never applied", rec));
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (20) begin
      repeat ($urandom_range(40, 60) * 8) @(posedge clk);
      @(negedge clk);
      data_rdy = 4'($urandom); block = 4'($urandom);
    end
    repeat (80 * 8) @(posedge clk);
    check(got == 21, $sformatf("%0d records received, 21 expected", got));
    check(dropped == 0, "records dropped at low change rate");
    burst = 1;
    repeat (40) begin
      @(negedge clk); while (!tick) @(negedge clk);
      @(negedge clk); data_rdy = data_rdy + 1;
    end
    repeat (400 * 8) @(posedge clk);
    check(dropped > 0, "no record dropped in the burst");
    check(got > 21 + 4, "too few burst records arrived");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

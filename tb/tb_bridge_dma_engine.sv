// Testbench for bridge_dma_engine with 64-byte bus transactions, 4-entry
// queues and an interrupt after at most 3 packets.
// A bus model acknowledges each transaction after a delay that grows with
// its length and checks every transaction against the packet it belongs to
// (source, destination, length <= 64, contiguous). The testbench checks:
//  - while blocked, data_rdy is raised for queued work but no transaction
//    starts; a queue accepts 4 entries and then reports full;
//  - once unblocked, the first transaction is requested within 3 clocks;
//  - a transaction is only ever started when block was low, and one in
//    flight is completed even if block rises;
//  - each packet appears once in each completion queue with the expected
//    direction, addresses and length, in order per direction;
//  - all three interrupt conditions (idle, block rising, packet limit) occur.
module tb_bridge_dma_engine;
  import rtio_pkg::*;
  localparam int TXN = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;     // reset edge before the first clock edge

  logic block = 1, data_rdy;
  logic avail_push = 0, out_push = 0, in_push = 0, ffree_push = 0;
  addr_t avail_addr = 0, ffree_addr = 0;
  pkt_desc_t out_desc = '0, in_desc = '0;
  logic avail_full, out_full, in_full, ffree_full;
  logic hdone_valid, fdone_valid, hdone_pop, fdone_pop;
  dma_dir_e hdone_dir, fdone_dir;
  pkt_desc_t hdone_desc, fdone_desc;
  logic irq; logic [2:0] irq_cause;
  logic dma_req, dma_ack = 0, txn_start;
  dma_dir_e dma_dir; addr_t dma_src, dma_dst; len_t dma_len;

  bridge_dma_engine #(.TXN_BYTES(TXN), .Q_DEPTH(4), .IRQ_LIMIT(3)) dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // expected packets per direction: {src, dst, len}
  typedef struct { addr_t src; addr_t dst; int len; } pkt_t;
  pkt_t rx_exp [$], tx_exp [$];          // for the bus model
  addr_t rx_host [$], rx_fpga [$], tx_host [$], tx_fpga [$];
  int    rx_len [$], tx_len [$];
  pkt_t hd_exp [$], fd_exp [$];           // completions: {dir as src, addr, len}

  // pending (unpaired) halves, kept by the testbench
  addr_t avail_q [$], ffree_q [$];
  pkt_desc_t in_q [$], out_q [$];

  task automatic pair();
    while (avail_q.size() > 0 && in_q.size() > 0) begin
      pkt_desc_t d = in_q.pop_front(); addr_t h = avail_q.pop_front();
      rx_exp.push_back('{d.addr, h, int'(d.len)});
      rx_host.push_back(h); rx_fpga.push_back(d.addr); rx_len.push_back(int'(d.len));
    end
    while (ffree_q.size() > 0 && out_q.size() > 0) begin
      pkt_desc_t d = out_q.pop_front(); addr_t f = ffree_q.pop_front();
      tx_exp.push_back('{d.addr, f, int'(d.len)});
      tx_host.push_back(d.addr); tx_fpga.push_back(f); tx_len.push_back(int'(d.len));
    end
  endtask

  task automatic push_rx(addr_t fpga, int len, addr_t host);
    @(negedge clk);
    in_push = !in_full; in_desc = '{fpga, len_t'(len)};
    avail_push = !avail_full; avail_addr = host;
    if (!in_full) in_q.push_back('{fpga, len_t'(len)});
    if (!avail_full) avail_q.push_back(host);
    @(negedge clk); in_push = 0; avail_push = 0;
    pair();
  endtask

  task automatic push_tx(addr_t host, int len, addr_t fpga);
    @(negedge clk);
    out_push = !out_full; out_desc = '{host, len_t'(len)};
    ffree_push = !ffree_full; ffree_addr = fpga;
    if (!out_full) out_q.push_back('{host, len_t'(len)});
    if (!ffree_full) ffree_q.push_back(fpga);
    @(negedge clk); out_push = 0; ffree_push = 0;
    pair();
  endtask

  // ---- bus model
  addr_t cur_src [2], cur_dst [2];
  int    cur_rem [2];
  int    txns = 0, txn_under_block = 0;
  logic  block_q = 1;
  always @(posedge clk) block_q <= block;
  logic  req_q = 0;
  always @(posedge clk) req_q <= dma_req;

  initial forever begin
    int d;
    @(posedge clk);
    if (dma_req && !req_q) begin
      d = int'(dma_dir);
      check(!block_q, "transaction started while blocked");
      if (cur_rem[d] == 0) begin
        pkt_t p;
        check((d == 0 ? rx_exp.size() : tx_exp.size()) > 0, "transaction for no packet");
        p = (d == 0) ? rx_exp.pop_front() : tx_exp.pop_front();
        cur_src[d] = p.src; cur_dst[d] = p.dst; cur_rem[d] = p.len;
      end
      check(dma_src == cur_src[d] && dma_dst == cur_dst[d],
            $sformatf("dir %0d src %h dst %h, expected %h %h", d, dma_src, dma_dst, cur_src[d], cur_dst[d]));
      check(int'(dma_len) == ((cur_rem[d] > TXN) ? TXN : cur_rem[d]),
            $sformatf("transaction length %0d with %0d left", dma_len, cur_rem[d]));
      cur_src[d] += dma_len; cur_dst[d] += dma_len; cur_rem[d] -= int'(dma_len);
      repeat (2 + int'(dma_len) / 16) @(posedge clk);
      if (block) txn_under_block++;
      dma_ack <= 1; @(posedge clk); dma_ack <= 0;
      txns++;
    end
  end

  // ---- completion consumers
  int done_rx = 0, done_tx = 0;
  assign hdone_pop = hdone_valid;
  assign fdone_pop = fdone_valid;
  always @(posedge clk) if (rst_n) begin
    if (hdone_valid) begin
      if (hdone_dir == DIR_TO_HOST) begin
        check(rx_host.size() > 0 && hdone_desc.addr == rx_host[0] && int'(hdone_desc.len) == rx_len[0],
              "host completion of a received packet");
        if (rx_host.size() > 0) begin void'(rx_host.pop_front()); void'(rx_len.pop_front()); end
        done_rx++;
      end else begin
        check(tx_host.size() > 0 && hdone_desc.addr == tx_host[0] && int'(hdone_desc.len) == tx_len[0],
              "host completion of an outgoing packet");
        if (tx_host.size() > 0) void'(tx_host.pop_front());
        done_tx++;
      end
    end
    if (fdone_valid) begin
      if (fdone_dir == DIR_TO_HOST) begin
        check(rx_fpga.size() > 0 && fdone_desc.addr == rx_fpga[0], "local completion of a received packet");
        if (rx_fpga.size() > 0) void'(rx_fpga.pop_front());
      end else begin
        check(tx_fpga.size() > 0 && fdone_desc.addr == tx_fpga[0] && int'(fdone_desc.len) == tx_len[0],
              "local completion of an outgoing packet");
        if (tx_fpga.size() > 0) begin void'(tx_fpga.pop_front()); void'(tx_len.pop_front()); end
      end
    end
  end

  int cause_cnt [3];
  always @(posedge clk) if (rst_n && irq) for (int i = 0; i < 3; i++) if (irq_cause[i]) cause_cnt[i]++;

  int n_rx = 0, n_tx = 0, lat;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // ---- blocked: queue fills, data_rdy raised, no transaction
    for (int i = 0; i < 5; i++) push_rx(32'h1000_0000 + i * 32'h1000, 100 + 37 * i, 32'h8000_0000 + i * 32'h1_0000);
    n_rx = 4;
    check(in_full && avail_full, "queues full after 4 entries");
    check(data_rdy, "data_rdy with work queued");
    repeat (50) @(posedge clk);
    check(txns == 0 && !dma_req, "no bus transaction while blocked");
    // ---- unblock, measure request latency
    @(negedge clk) block = 0; lat = 0;
    while (!dma_req) begin @(posedge clk); lat++; end
    check(lat <= 3, $sformatf("first request %0d clocks after unblock", lat));
    wait (done_rx == 4);
    repeat (5) @(posedge clk);
    check(!data_rdy, "data_rdy low when all work is done");
    // ---- many small packets of both kinds, unblocked: packet limit
    for (int i = 0; i < 4; i++) begin
      push_rx(32'h2000_0000 + i * 32'h100, 8 + i, 32'h9000_0000 + i * 32'h100);
      push_tx(32'hA000_0000 + i * 32'h100, 16 + i, 32'h3000_0000 + i * 32'h100);
    end
    n_rx += 4; n_tx += 4;
    wait (done_rx == n_rx && done_tx == n_tx);
    // ---- random traffic with random blocking
    fork
      begin
        repeat (30) begin
          if ($urandom_range(0, 1)) begin push_rx(32'h4000_0000 + n_rx * 32'h1_0000, $urandom_range(1, 300), 32'hC000_0000 + n_rx * 32'h1_0000); end
          else begin push_tx(32'hD000_0000 + n_tx * 32'h1_0000, $urandom_range(1, 300), 32'h5000_0000 + n_tx * 32'h1_0000); end
          n_rx = done_rx + rx_host.size(); n_tx = done_tx + tx_host.size();
          repeat ($urandom_range(0, 40)) @(posedge clk);
        end
      end
      begin
        repeat (400) begin
          @(negedge clk) block = ($urandom_range(0, 2) == 0);
          repeat ($urandom_range(1, 30)) @(posedge clk);
        end
        @(negedge clk) block = 0;
      end
    join
    repeat (2000) @(posedge clk);
    check(rx_host.size() == 0 && tx_host.size() == 0 && rx_fpga.size() == 0 && tx_fpga.size() == 0,
          "packets never completed");
    for (int i = 0; i < 3; i++) check(cause_cnt[i] > 0, $sformatf("interrupt condition %0d never occurred", i));
    check(txn_under_block > 0, "no transaction ran to completion across a block");
    $display("transactions=%0d irq idle=%0d block=%0d limit=%0d", txns, cause_cnt[0], cause_cnt[1], cause_cnt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

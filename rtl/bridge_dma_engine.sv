// Bridge DMA Engine of a real-time bridge.
//
// The engine moves packet data between the bridge's local DRAM ("FPGA side")
// and host DRAM over the COTS bus, and it is the only part of the bridge that
// talks to the reservation controller. It keeps hardware queues of packet
// descriptors filled by the two drivers:
//   avail  (host side)  host buffer addresses for received packets
//   out    (host side)  outgoing packets: host address and length
//   in     (FPGA side)  received packets waiting in local DRAM: address, length
//   ffree  (FPGA side)  local buffer addresses for outgoing packets
// and reports finished packets in two completion queues:
//   hdone  to the host  {direction, host address, length}
//   fdone  to the FPGA  {direction, local address, length}
// A received packet pairs the head of "in" with the head of "avail"; an
// outgoing packet pairs "out" with "ffree". data_rdy is raised while such a
// pair exists or a packet is in progress. Only while block is low does the
// engine take a packet and start bus transactions; a packet is cut into
// transactions of at most TXN_BYTES, and block is obeyed at transaction
// boundaries (a started transaction always runs to completion, as COTS buses
// do not preempt transactions). When both directions have work they alternate
// packet by packet. Finished packets drive the interrupt coalescer.
//
// From the document: the queue names and roles, data_rdy/block behaviour,
// 4 KB bus transactions, the three interrupt conditions. This design's own
// choices: the completion queues and the free local-buffer queue, queue
// depths, alternating directions, one interrupt line shared by both drivers,
// and the request/acknowledge transaction port towards the bus interface
// (the PCIe endpoint and PCI/PLB bridge that actually move the data are not
// part of this block).
//
// Transaction port: dma_req stays high with dma_dir/src/dst/len stable until
// the bus interface answers dma_ack for one cycle, when all bytes of that
// transaction have been written.
module bridge_dma_engine
  import rtio_pkg::*;
#(
  parameter int unsigned TXN_BYTES = 4096,
  parameter int unsigned Q_DEPTH   = 16,
  parameter int unsigned IRQ_LIMIT = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // scheduling wires
  input  logic      block,
  output logic      data_rdy,
  // host-side queues
  input  logic      avail_push,
  input  addr_t     avail_addr,
  output logic      avail_full,
  input  logic      out_push,
  input  pkt_desc_t out_desc,
  output logic      out_full,
  output logic      hdone_valid,
  output dma_dir_e  hdone_dir,
  output pkt_desc_t hdone_desc,
  input  logic      hdone_pop,
  // FPGA-side queues
  input  logic      in_push,
  input  pkt_desc_t in_desc,
  output logic      in_full,
  input  logic      ffree_push,
  input  addr_t     ffree_addr,
  output logic      ffree_full,
  output logic      fdone_valid,
  output dma_dir_e  fdone_dir,
  output pkt_desc_t fdone_desc,
  input  logic      fdone_pop,
  // interrupt to the drivers
  output logic      irq,
  output logic [2:0] irq_cause,
  // bus-master transaction port
  output logic      dma_req,
  output dma_dir_e  dma_dir,
  output addr_t     dma_src,
  output addr_t     dma_dst,
  output len_t      dma_len,
  input  logic      dma_ack,
  output logic      txn_start    // a transaction is issued this cycle (observation)
);
  localparam int unsigned DW = 1 + $bits(pkt_desc_t);
  localparam int unsigned CW = $clog2(Q_DEPTH + 1);

  // ---------------- queues
  addr_t     avail_head, ffree_head;
  pkt_desc_t out_head, in_head;
  logic avail_empty, out_empty, in_empty, ffree_empty;
  logic hdone_empty, hdone_full, fdone_empty, fdone_full;
  logic take_rx, take_tx, finish;
  logic [CW-1:0] c0, c1, c2, c3, c4, c5;
  logic [DW-1:0] hdone_in, fdone_in, hdone_out, fdone_out;

  sync_fifo #(.WIDTH(ADDR_W), .DEPTH(Q_DEPTH)) u_avail (.clk, .rst_n,
    .push(avail_push), .din(avail_addr), .pop(take_rx), .dout(avail_head),
    .empty(avail_empty), .full(avail_full), .count(c0));
  sync_fifo #(.WIDTH($bits(pkt_desc_t)), .DEPTH(Q_DEPTH)) u_out (.clk, .rst_n,
    .push(out_push), .din(out_desc), .pop(take_tx), .dout(out_head),
    .empty(out_empty), .full(out_full), .count(c1));
  sync_fifo #(.WIDTH($bits(pkt_desc_t)), .DEPTH(Q_DEPTH)) u_in (.clk, .rst_n,
    .push(in_push), .din(in_desc), .pop(take_rx), .dout(in_head),
    .empty(in_empty), .full(in_full), .count(c2));
  sync_fifo #(.WIDTH(ADDR_W), .DEPTH(Q_DEPTH)) u_ffree (.clk, .rst_n,
    .push(ffree_push), .din(ffree_addr), .pop(take_tx), .dout(ffree_head),
    .empty(ffree_empty), .full(ffree_full), .count(c3));
  sync_fifo #(.WIDTH(DW), .DEPTH(Q_DEPTH)) u_hdone (.clk, .rst_n,
    .push(finish), .din(hdone_in), .pop(hdone_pop), .dout(hdone_out),
    .empty(hdone_empty), .full(hdone_full), .count(c4));
  sync_fifo #(.WIDTH(DW), .DEPTH(Q_DEPTH)) u_fdone (.clk, .rst_n,
    .push(finish), .din(fdone_in), .pop(fdone_pop), .dout(fdone_out),
    .empty(fdone_empty), .full(fdone_full), .count(c5));

  assign hdone_valid = !hdone_empty;
  assign fdone_valid = !fdone_empty;
  assign {hdone_dir, hdone_desc} = hdone_out;
  assign {fdone_dir, fdone_desc} = fdone_out;

  // ---------------- packet state
  typedef enum logic [1:0] {E_IDLE, E_NEXT, E_WAIT, E_DONE} eng_state_e;
  eng_state_e state;
  dma_dir_e   cur_dir, last_dir;
  addr_t      cur_host, cur_fpga, src, dst;
  len_t       cur_len, remaining;

  logic rx_avail, tx_avail, done_room;

  always_comb begin
    done_room = !hdone_full && !fdone_full;
    rx_avail  = !in_empty  && !avail_empty && done_room;
    tx_avail  = !out_empty && !ffree_empty && done_room;
    take_rx   = 1'b0;
    take_tx   = 1'b0;
    if (state == E_IDLE && !block) begin
      if (rx_avail && (!tx_avail || last_dir == DIR_FROM_HOST)) take_rx = 1'b1;
      else if (tx_avail) take_tx = 1'b1;
    end
    finish   = (state == E_DONE);
    data_rdy = rx_avail || tx_avail || (state != E_IDLE);
    hdone_in = {cur_dir, cur_host, cur_len};
    fdone_in = {cur_dir, cur_fpga, cur_len};
  end

  // Transaction request.
  assign dma_req   = (state == E_WAIT);
  assign dma_dir   = cur_dir;
  assign dma_src   = src;
  assign dma_dst   = dst;
  assign dma_len   = (remaining > len_t'(TXN_BYTES)) ? len_t'(TXN_BYTES) : remaining;
  assign txn_start = (state == E_NEXT) && !block && (remaining != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= E_IDLE;
      cur_dir   <= DIR_TO_HOST;
      last_dir  <= DIR_FROM_HOST;
      cur_host  <= '0;
      cur_fpga  <= '0;
      cur_len   <= '0;
      src       <= '0;
      dst       <= '0;
      remaining <= '0;
    end else begin
      unique case (state)
        E_IDLE: begin
          if (take_rx) begin
            cur_dir   <= DIR_TO_HOST;
            cur_host  <= avail_head;
            cur_fpga  <= in_head.addr;
            cur_len   <= in_head.len;
            src       <= in_head.addr;
            dst       <= avail_head;
            remaining <= in_head.len;
            state     <= E_NEXT;
          end else if (take_tx) begin
            cur_dir   <= DIR_FROM_HOST;
            cur_host  <= out_head.addr;
            cur_fpga  <= ffree_head;
            cur_len   <= out_head.len;
            src       <= out_head.addr;
            dst       <= ffree_head;
            remaining <= out_head.len;
            state     <= E_NEXT;
          end
        end
        // Between transactions: stop here while blocked.
        E_NEXT: begin
          if (remaining == '0) state <= E_DONE;
          else if (!block)     state <= E_WAIT;
        end
        E_WAIT: if (dma_ack) begin
          src       <= src + addr_t'(dma_len);
          dst       <= dst + addr_t'(dma_len);
          remaining <= remaining - dma_len;
          state     <= E_NEXT;
        end
        E_DONE: begin
          last_dir <= cur_dir;
          state    <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  irq_coalescer #(.PKT_LIMIT(IRQ_LIMIT)) u_irq (
    .clk, .rst_n,
    .done_pulse(finish),
    .idle      (!data_rdy),
    .block     (block),
    .irq       (irq),
    .cause     (irq_cause)
  );

  // Request fields must stay stable until acknowledged.
  assert property (@(posedge clk) disable iff (!rst_n)
    dma_req && !dma_ack |=> dma_req && $stable(dma_src) && $stable(dma_len));
endmodule

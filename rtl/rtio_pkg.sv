// Shared constants and types of the real-time I/O management system.
//
// The system puts COTS bus traffic under fixed-priority real-time scheduling.
// Each real-time bridge raises data_rdy when it holds data for the bus; the
// reservation controller answers with block. Time inside the controller is
// counted in ticks of one microsecond (the resolution used for the trace
// unit); budgets and periods are expressed in these ticks.
//
// The four-flow default and the budget/period pairs follow the four-flow
// experiment (one 8-lane board with budget 5 ms / period 8 ms, three 1-lane
// boards with 9 ms / 72 ms). The clock frequency, time-stamp width and the
// record layout of the trace are this design's own choices.
package rtio_pkg;

  // Width of the free-running microsecond time base and of all time stamps.
  localparam int unsigned TIME_W = 32;
  typedef logic [TIME_W-1:0] time_us_t;

  // Width of budget and consumed-time counters (enough for 2^24 us = 16.7 s).
  localparam int unsigned BUDGET_W = 24;
  typedef logic [BUDGET_W-1:0] budget_t;

  // One pending sporadic-server replenishment: when, and how much.
  typedef struct packed {
    time_us_t at;
    budget_t  amount;
  } repl_t;

  // Packet descriptor as kept in the Bridge DMA Engine queues.
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned LEN_W  = 16;   // up to 64 KiB packets
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LEN_W-1:0]  len_t;
  typedef struct packed {
    addr_t addr;
    len_t  len;
  } pkt_desc_t;

  // Direction of one bus-master transaction issued by a bridge.
  typedef enum logic {
    DIR_TO_HOST   = 1'b0,   // FPGA DRAM -> host DRAM (received traffic)
    DIR_FROM_HOST = 1'b1    // host DRAM -> FPGA DRAM (traffic to send)
  } dma_dir_e;

  // Per-bridge signals between a real-time bridge and its drivers and bus
  // interface, bundled for the arrays of the top level.
  typedef struct packed {
    logic      avail_push;   // host: add a free host buffer address
    addr_t     avail_addr;
    logic      out_push;     // host: add an outgoing packet
    pkt_desc_t out_desc;
    logic      hdone_pop;    // host: consume a completion
    logic      in_push;      // FPGA: add a received packet in local DRAM
    pkt_desc_t in_desc;
    logic      ffree_push;   // FPGA: add a free local buffer address
    addr_t     ffree_addr;
    logic      fdone_pop;    // FPGA: consume a completion
    logic      dma_ack;      // bus interface: transaction finished
  } bridge_in_t;

  typedef struct packed {
    logic      avail_full;
    logic      out_full;
    logic      hdone_valid;
    dma_dir_e  hdone_dir;
    pkt_desc_t hdone_desc;
    logic      in_full;
    logic      ffree_full;
    logic      fdone_valid;
    dma_dir_e  fdone_dir;
    pkt_desc_t fdone_desc;
    logic      irq;
    logic [2:0] irq_cause;
    logic      dma_req;
    dma_dir_e  dma_dir;
    addr_t     dma_src;
    addr_t     dma_dst;
    len_t      dma_len;
    logic      txn_start;
  } bridge_out_t;

  // Synchronisation byte that opens every trace record on the serial line.
  localparam logic [7:0] TRACE_SYNC = 8'hA5;

  // "time a is at or after time b" on a wrapping time base.
  function automatic logic time_reached(time_us_t a, time_us_t b);
    time_us_t d;
    d = a - b;
    return !d[TIME_W-1];
  endfunction

endpackage

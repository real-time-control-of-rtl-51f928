// Real-time bridge: the actuator that puts one COTS peripheral under the
// reservation controller's schedule.
//
// The bridge sits between the peripheral and the COTS bus. It tells the
// controller through data_rdy that it holds data for the bus, and starts bus
// transactions only while the controller's block is low. Two traffic sources
// are selectable with synth_mode:
//   synth_mode = 0  the Bridge DMA Engine forwards packets between the
//                   bridge's local DRAM and host DRAM (normal operation),
//   synth_mode = 1  a periodic synthetic traffic generator replaces the
//                   peripheral's traffic (used for repeatable measurements).
// The source not selected is held blocked and does not drive data_rdy. Change
// synth_mode only while both sources are idle.
//
// The bridge's role, the DMA engine and the synthetic mode follow the
// document; the selection mechanism is this design's own choice.
//
// Timing: data_rdy and the block seen by the sources are combinational
// through the selection; see the two sub-blocks for their own timing.
module real_time_bridge
  import rtio_pkg::*;
#(
  parameter int unsigned TXN_BYTES          = 4096,
  parameter int unsigned Q_DEPTH            = 16,
  parameter int unsigned IRQ_LIMIT          = 8,
  parameter int unsigned GEN_JOB_BYTES      = 4_000_000,
  parameter int unsigned GEN_BYTES_PER_TICK = 910,
  parameter int unsigned GEN_PERIOD         = 8000,
  parameter int unsigned GEN_OFFSET         = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        synth_mode,
  input  logic        block,
  output logic        data_rdy,
  input  bridge_in_t  bi,
  output bridge_out_t bo,
  output logic        gen_sending,
  output logic        gen_release,
  output logic [31:0] gen_jobs_done,
  output logic [31:0] gen_misses
);
  logic dma_rdy, gen_rdy;

  assign data_rdy = synth_mode ? gen_rdy : dma_rdy;

  bridge_dma_engine #(
    .TXN_BYTES(TXN_BYTES), .Q_DEPTH(Q_DEPTH), .IRQ_LIMIT(IRQ_LIMIT)
  ) u_dma (
    .clk, .rst_n,
    .block      (block || synth_mode),
    .data_rdy   (dma_rdy),
    .avail_push (bi.avail_push), .avail_addr(bi.avail_addr), .avail_full(bo.avail_full),
    .out_push   (bi.out_push),   .out_desc  (bi.out_desc),   .out_full  (bo.out_full),
    .hdone_valid(bo.hdone_valid), .hdone_dir(bo.hdone_dir), .hdone_desc(bo.hdone_desc),
    .hdone_pop  (bi.hdone_pop),
    .in_push    (bi.in_push),    .in_desc   (bi.in_desc),    .in_full   (bo.in_full),
    .ffree_push (bi.ffree_push), .ffree_addr(bi.ffree_addr), .ffree_full(bo.ffree_full),
    .fdone_valid(bo.fdone_valid), .fdone_dir(bo.fdone_dir), .fdone_desc(bo.fdone_desc),
    .fdone_pop  (bi.fdone_pop),
    .irq        (bo.irq),        .irq_cause (bo.irq_cause),
    .dma_req    (bo.dma_req),    .dma_dir   (bo.dma_dir),
    .dma_src    (bo.dma_src),    .dma_dst   (bo.dma_dst),    .dma_len   (bo.dma_len),
    .dma_ack    (bi.dma_ack),    .txn_start (bo.txn_start)
  );

  traffic_generator #(
    .JOB_BYTES(GEN_JOB_BYTES), .BYTES_PER_TICK(GEN_BYTES_PER_TICK),
    .PERIOD(GEN_PERIOD), .OFFSET(GEN_OFFSET)
  ) u_gen (
    .clk, .rst_n,
    .enable   (synth_mode),
    .tick,
    .block    (block || !synth_mode),
    .data_rdy (gen_rdy),
    .sending  (gen_sending),
    .release_p(gen_release),
    .jobs_done(gen_jobs_done),
    .misses   (gen_misses)
  );
endmodule

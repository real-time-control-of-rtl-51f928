// Interrupt coalescing for the Bridge DMA Engine.
//
// An interrupt is not raised for every transferred packet. irq pulses for one
// cycle when packets have been transferred since the last interrupt and one
// of three conditions holds:
//   1. the engine has no more packets ready to transfer (idle),
//   2. the block line from the reservation controller becomes asserted,
//   3. the count of packets since the last interrupt reaches PKT_LIMIT.
// The three conditions follow the bridge's description; PKT_LIMIT is a
// design-time parameter whose value is this design's own choice. cause tells
// which condition fired (bit 0, 1, 2 as numbered above) for observation.
//
// Timing: done_pulse in cycle t is counted at the edge ending t; irq is
// raised combinationally from the registered count, so the earliest
// interrupt for a packet is in cycle t+1.
module irq_coalescer #(
  parameter int unsigned PKT_LIMIT = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       done_pulse,   // one packet finished
  input  logic       idle,         // nothing more ready to transfer
  input  logic       block,
  output logic       irq,
  output logic [2:0] cause
);
  localparam int unsigned CNT_W = $clog2(PKT_LIMIT + 1);

  logic [CNT_W-1:0] pending;
  logic             block_q;

  always_comb begin
    cause[0] = (pending != '0) && idle;
    cause[1] = (pending != '0) && block && !block_q;
    cause[2] = (pending >= CNT_W'(PKT_LIMIT));
    irq      = |cause;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      block_q <= 1'b1;
    end else begin
      block_q <= block;
      if (irq) pending <= CNT_W'(done_pulse);
      else if (done_pulse) pending <= pending + 1'b1;
    end
  end
endmodule

// Trace acquisition unit of the reservation controller.
//
// Polls the data_rdy and block wires of all bridges once per microsecond tick.
// Whenever the sampled vector differs from the previous sample, a record
// {time stamp, data_rdy, block} is written into a record FIFO; a serializer
// sends each record over a serial line to an external computer. This lets the
// bus schedule be reconstructed without probing the bus itself.
//
// Polling at 1 us and reporting only changes with a time stamp follow the
// document. The record layout, the FIFO depth and the serial format are this
// design's own choices. Byte stream of one record:
//   0xA5, then the record word LSB-first in REC_BYTES bytes, where the record
//   word is {pad, block[N-1:0], data_rdy[N-1:0], timestamp[31:0]}
//   (time stamp in bits 31:0, data_rdy from bit 32, block above it).
// If the FIFO is full when a change is seen, the record is dropped and
// dropped counts it (saturating). The first sample after reset is always
// recorded, so the receiver learns the initial state.
//
// Timing: a change present at tick k is stamped with the now_us value of that
// tick and enters the FIFO at the end of that cycle.
module trace_acquisition
  import rtio_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  time_us_t      now_us,
  input  logic [N-1:0]  data_rdy,
  input  logic [N-1:0]  block,
  output logic          txd,
  output logic [15:0]   dropped,
  output logic          rec_push     // a record was accepted (observation)
);
  localparam int unsigned REC_W     = TIME_W + 2 * N;
  localparam int unsigned REC_BYTES = (REC_W + 7) / 8;
  localparam int unsigned PAD_W     = REC_BYTES * 8;

  logic [2*N-1:0]   last;
  logic             first;
  logic             change;
  logic [REC_W-1:0] rec_in, rec_out;
  logic             f_empty, f_full, f_pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;

  assign change   = tick && (first || ({block, data_rdy} != last));
  assign rec_push = change && !f_full;
  assign rec_in   = {block, data_rdy, now_us};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last    <= '0;
      first   <= 1'b1;
      dropped <= '0;
    end else if (tick) begin
      last  <= {block, data_rdy};
      first <= 1'b0;
      if (change && f_full && dropped != '1) dropped <= dropped + 1'b1;
    end
  end

  sync_fifo #(.WIDTH(REC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (rec_push), .din(rec_in),
    .pop  (f_pop),    .dout(rec_out),
    .empty(f_empty),  .full(f_full), .count(f_count)
  );

  // Serializer: sync byte, then REC_BYTES bytes of the record, LSB first.
  typedef enum logic [1:0] {S_IDLE, S_SYNC, S_DATA} ser_state_e;
  ser_state_e        state;
  logic [PAD_W-1:0]  shreg;
  logic [$clog2(REC_BYTES+1)-1:0] bytes_left;
  logic              u_valid, u_ready;
  logic [7:0]        u_data;

  assign f_pop = (state == S_IDLE) && !f_empty;

  always_comb begin
    u_valid = (state != S_IDLE);
    u_data  = (state == S_SYNC) ? TRACE_SYNC : shreg[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      shreg      <= '0;
      bytes_left <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!f_empty) begin
          shreg      <= PAD_W'(rec_out);
          bytes_left <= ($bits(bytes_left))'(REC_BYTES);
          state      <= S_SYNC;
        end
        S_SYNC: if (u_ready) state <= S_DATA;
        S_DATA: if (u_ready) begin
          shreg      <= shreg >> 8;
          bytes_left <= bytes_left - 1'b1;
          if (bytes_left == 1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .valid(u_valid), .data(u_data), .ready(u_ready), .txd
  );
endmodule

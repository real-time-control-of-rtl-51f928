// Serial transmitter, 8 data bits, no parity, one stop bit, LSB first.
//
// Carries the trace records of the reservation controller to an external
// computer. The line idles high. A byte offered with valid while ready is
// accepted in that cycle and then shifted out: start bit (0), bits 0..7,
// stop bit (1), each CLK_HZ/BAUD clock cycles long. ready returns high after
// the stop bit. The frame format and baud rate are this design's own choice.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned BIT_CYC = (CLK_HZ / BAUD > 0) ? CLK_HZ / BAUD : 1;
  localparam int unsigned CYC_W   = (BIT_CYC > 1) ? $clog2(BIT_CYC) : 1;

  logic [9:0]       shreg;      // {stop, data[7:0], start}
  logic [3:0]       bits_left;
  logic [CYC_W-1:0] cyc;

  assign ready = (bits_left == '0);
  assign txd   = ready ? 1'b1 : shreg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      cyc       <= '0;
    end else if (ready) begin
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cyc       <= '0;
      end
    end else if (cyc == CYC_W'(BIT_CYC - 1)) begin
      cyc       <= '0;
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end
endmodule

// Microsecond tick generator and time base.
//
// Divides the system clock down to a one-cycle pulse every 1/TICK_HZ seconds
// and counts those pulses in a free-running, wrapping time stamp. All
// scheduling servers of the reservation controller and the trace unit share
// this one time base, so budgets and replenishment times are computed without
// clock skew between them.
//
// Timing: tick is high for one clock cycle every CLK_HZ/TICK_HZ cycles; now_us
// increments in the cycle after each tick. CLK_HZ must be a multiple of
// TICK_HZ. The clock frequency is this design's own choice; the 1 us
// resolution follows the trace unit's polling rate.
module tick_gen
  import rtio_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned TICK_HZ = 1_000_000
) (
  input  logic     clk,
  input  logic     rst_n,
  output logic     tick,
  output time_us_t now_us
);
  localparam int unsigned DIV   = CLK_HZ / TICK_HZ;
  localparam int unsigned DIV_W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [DIV_W-1:0] cnt;

  initial assert (DIV >= 1 && DIV * TICK_HZ == CLK_HZ)
    else $error("tick_gen: CLK_HZ must be a multiple of TICK_HZ");

  assign tick = (cnt == DIV_W'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      now_us <= '0;
    end else begin
      cnt <= tick ? '0 : cnt + 1'b1;
      if (tick) now_us <= now_us + 1'b1;
    end
  end
endmodule

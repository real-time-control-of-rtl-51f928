// Global fixed-priority scheduling logic of the reservation controller.
//
// Input i is the READY parameter of scheduling server i; inputs are wired in
// priority order, index 0 highest (rate-monotonic order for periodic flows).
// Bridge i is let onto the bus (block[i] = 0) exactly when it is ready and
// every higher-priority bridge is blocked; all others are blocked, so at most
// one bridge transmits at any time. The static priorities are absorbed into
// the wiring order, as the document describes for fixed priority.
//
// Purely combinational: block follows ready within the same cycle.
module fp_scheduler #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] ready,
  output logic [N-1:0] block
);
  always_comb begin
    logic higher_all_blocked;
    higher_all_blocked = 1'b1;
    for (int i = 0; i < N; i++) begin
      block[i]           = !(higher_all_blocked && ready[i]);
      higher_all_blocked = higher_all_blocked && block[i];
    end
  end

  // At most one bridge may be unblocked.
  always_comb assert ($countones(~block) <= 1);
endmodule

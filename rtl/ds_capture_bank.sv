// Bank of sampling flip-flops on the delay-chain taps.
//
// All N_FF flip-flops share the sensor clock, so each rising edge takes one
// snapshot of the edge travelling down the chain.  q[0] is the first sampled
// flip-flop (output of buffer 32) and q[N_FF-1] the last (output of buffer
// 64).  Like the published sensor, the flip-flops have no reset: the first
// snapshots after power-up are meaningless and the checkers must wait for the
// chain to fill.  The snapshot is the sensor outcome.
//
// Interface: clk, taps (chain outputs), q (registered snapshot).
// Timing: q holds the taps as they were just before the last rising edge.
module ds_capture_bank #(
  parameter int unsigned N_FF = ds_pkg::N_FF
) (
  input  logic            clk,
  input  logic [N_FF-1:0] taps,
  output logic [N_FF-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk) q <= taps;
endmodule

// Delay-chain digital sensor: toggle flip-flop, buffer chain, sampling bank.
//
// The toggle flip-flop launches a square wave at half the clock rate into a
// chain of N_BUF buffers; the last N_FF buffer outputs are sampled on every
// rising clock edge.  With the clock set for the nominal condition, the
// snapshot q shows the first phase change at flip-flop 18: flip-flops 1..17
// agree, 18..33 hold the opposite value.  A slower chain (heat, low supply,
// aging) moves the change to a lower index, a faster one to a higher index;
// a very slow chain shows several changes.  The structure follows the
// published sensor.  The chain is a behavioural delay model; everything else
// is ordinary logic.
//
// Interface: clk, rst (holds the toggle flip-flop, and so the whole chain,
// quiet), a0 (launched wave), q (snapshot, q[0] = flip-flop 1).
// Timing: after rst is released, q is meaningful once the edge has crossed
// the chain, three clock cycles at the default delays.
module ds_sensor #(
  parameter int unsigned N_BUF        = ds_pkg::N_BUF,
  parameter int unsigned N_FF         = ds_pkg::N_FF,
  parameter int unsigned BUF_DELAY_PS = 10
) (
  input  logic            clk,
  input  logic            rst,
  output logic            a0,
  output logic [N_FF-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_FF-1:0] taps;

  ds_toggle_ff u_tff (
    .clk (clk),
    .rst (rst),
    .a0  (a0)
  );

  ds_delay_chain #(
    .N_BUF        (N_BUF),
    .N_TAP        (N_FF),
    .BUF_DELAY_PS (BUF_DELAY_PS)
  ) u_chain (
    .a_in (a0),
    .taps (taps)
  );

  ds_capture_bank #(
    .N_FF (N_FF)
  ) u_bank (
    .clk  (clk),
    .taps (taps),
    .q    (q)
  );
endmodule

// Toggle flip-flop that launches the test edge into the sensor's delay chain.
//
// Its D input is its own inverted output, so a0 flips on every rising clock
// edge and is a square wave at half the clock frequency.  Every buffer in the
// chain therefore switches once per cycle and the sampled taps alternate
// between the two phases.  The flip-flop and its reset follow the sensor
// circuit as published; making the reset asynchronous and active high, with
// a0 = 0 while in reset, is this design's choice.
//
// Interface: clk (sensor clock F), rst (asynchronous, active high), a0 (F/2).
// Timing: a0 changes right after each rising edge of clk.
module ds_toggle_ff (
  input  logic clk,
  input  logic rst,
  output logic a0
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) a0 <= 1'b0;
    else     a0 <= ~a0;
  end
endmodule

// Shared constants of the aging-aware delay-chain sensor.
//
// The sensor is a chain of 64 buffers whose last 33 buffer outputs are
// sampled by 33 flip-flops.  The clock is tuned so that, for a fresh part at
// nominal voltage and temperature, the first phase change along the sampled
// taps sits at flip-flop 18 (17 flip-flops in one phase, 16 in the other).
// The two checkers (difference-based and average-based) and the calibrator
// share the numbers below.  The chain length, tap count, middle flip-flop
// 17, nominal index 18 and the +/-5 acceptance band follow the sensor as
// published; the averaging window length is this design's own choice.
package ds_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_BUF       = 64;  // buffers in the delay chain
  localparam int unsigned N_FF        = 33;  // sampled taps (last 33 buffers)
  localparam int unsigned MID_FF      = 17;  // DBM compares flip-flop 1 with this one
  localparam int unsigned NOMINAL_AFN = 18;  // expected first-change index, fresh part
  localparam int unsigned AFN_TOL     = 5;   // acceptance band is NOMINAL_AFN +/- AFN_TOL
  localparam int unsigned WINDOW      = 16;  // cycles averaged per characterization
  localparam int unsigned FN_W        = 6;   // width of a flip-flop index (0..33)

  // Result of the per-cycle first-change search.
  typedef struct packed {
    logic [FN_W-1:0] fn;     // 1-based index of the first flip-flop that differs from its predecessor, 0 if none
    logic            multi;  // more than one phase change in this snapshot
    logic            none;   // no phase change at all in this snapshot
  } fn_result_t;
endpackage

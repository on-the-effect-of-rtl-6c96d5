// Behavioural model (not synthesizable logic) of the sensor's buffer chain.
//
// In silicon this is a string of N_BUF identical buffers; the outputs of the
// last N_TAP buffers go to the sampling flip-flops.  Its whole purpose is its
// propagation delay, which a logic simulator and a synthesis tool do not
// model, so it is described here as a transport delay with a per-buffer delay
// that can change during simulation to stand for temperature, supply voltage
// or aging (a slower buffer moves the first phase change to a lower tap).
//
// The model keeps the input's history on a fixed STEP_PS time grid in a
// shift register; tap k (0-based) is the output of buffer N_BUF-N_TAP+1+k and
// shows the input as it was (N_BUF-N_TAP+1+k)*buf_delay_ps ago.  The delay is
// the variable buf_delay_ps, initialised from BUF_DELAY_PS; a testbench may
// assign it hierarchically to emulate a change of operating condition.
// HIST_LEN*STEP_PS must exceed N_BUF*buf_delay_ps, otherwise the deepest taps
// saturate at the oldest stored value.
//
// The chain length and the number of taps follow the published sensor; the
// buffer delay and time step are this model's own numbers (the source gives
// no delay values).  Rising and falling edges take the same delay, and there
// is no metastability.
//
// Interface: a_in (driven by the toggle flip-flop), taps[N_TAP-1:0].
module ds_delay_chain #(
  parameter int unsigned N_BUF        = ds_pkg::N_BUF,
  parameter int unsigned N_TAP        = ds_pkg::N_FF,
  parameter int unsigned BUF_DELAY_PS = 10,
  parameter int unsigned STEP_PS      = 1,
  parameter int unsigned HIST_LEN     = 4096
) (
  input  logic             a_in,
  output logic [N_TAP-1:0] taps
);
  timeunit 1ps;
  timeprecision 1ps;

  // Per-buffer propagation delay in ps; may be changed at run time.
  int unsigned buf_delay_ps = BUF_DELAY_PS;

  // hist[j] is a_in as it was j+1 time steps ago.
  logic [HIST_LEN-1:0] hist;

  initial hist = '0;

  always begin
    #(STEP_PS);
    hist <= {hist[HIST_LEN-2:0], a_in};
  end

  always_comb begin
    for (int unsigned k = 0; k < N_TAP; k++) begin
      int unsigned steps;
      steps = ((N_BUF - N_TAP + 1 + k) * buf_delay_ps) / STEP_PS;
      if (steps == 0)             taps[k] = a_in;
      else if (steps > HIST_LEN)  taps[k] = hist[HIST_LEN-1];
      else                        taps[k] = hist[steps-1];
    end
  end
endmodule

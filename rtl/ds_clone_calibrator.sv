// In-field aging calibration with a cloned, normally idle sensor.
//
// A second copy of the sensor is kept asleep (its toggle flip-flop held in
// reset, so no edge ever travels down its chain) and therefore ages much less
// than the working sensor.  On cal_start the calibrator wakes the clone,
// waits WARMUP cycles for its chain to fill, then starts an average-based
// measurement on both sensors in the same cycle.  Both see the same voltage
// and temperature, so the difference of their averages is the drift caused
// by aging:  correction = AFN(clone) - AFN(working).  The checker of the
// working sensor is then given the moved expectation
//     afn_nominal = NOMINAL_AFN - correction   (clamped at 0),
// and the clone goes back to sleep.  A measurement whose snapshots showed
// several changes or none (abm alarm_multi / alarm_none) cannot be trusted:
// the old correction is kept and cal_error is set.
// Using a rarely-active clone and the difference of the two outputs follows
// the calibration proposed with the published sensor; the sequence, warm-up
// time, fixed-point format and error rule are this design's own.
//
// Interface: clk, rst (synchronous, active high), cal_start (pulse),
// main_busy, main_done/clone_done, afn_main/afn_clone and their
// multi/none flags from the two ABM checkers; outputs clone_rst (1 keeps the
// clone asleep), abm_start (one-cycle pulse to both checkers), cal_busy,
// cal_done (pulse), cal_error, correction (signed, FRAC fraction bits) and
// afn_nominal (unsigned, FRAC fraction bits).
// Timing: cal_done rises WARMUP + WINDOW + 4 clock edges after the edge that
// samples cal_start when the working checker is idle (warm-up, one cycle to
// issue abm_start, the window, one cycle to collect both results, one to
// apply them); each cycle the working checker is still busy after the
// warm-up adds one.  cal_start while busy is ignored.
module ds_clone_calibrator #(
  parameter int unsigned WINDOW      = ds_pkg::WINDOW,
  parameter int unsigned NOMINAL_AFN = ds_pkg::NOMINAL_AFN,
  parameter int unsigned WARMUP      = 4,
  localparam int unsigned FRAC  = $clog2(WINDOW),
  localparam int unsigned AFN_W = ds_pkg::FN_W + FRAC
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   cal_start,
  input  logic                   main_busy,
  input  logic                   main_done,
  input  logic                   clone_done,
  input  logic [AFN_W-1:0]       afn_main,
  input  logic [AFN_W-1:0]       afn_clone,
  input  logic                   main_bad,
  input  logic                   clone_bad,
  output logic                   clone_rst,
  output logic                   abm_start,
  output logic                   cal_busy,
  output logic                   cal_done,
  output logic                   cal_error,
  output logic signed [AFN_W:0]  correction,
  output logic [AFN_W-1:0]       afn_nominal
);
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [1:0] {S_SLEEP, S_WAKE, S_MEASURE, S_APPLY} state_t;

  localparam int unsigned WCW = $clog2(WARMUP + 2);
  localparam logic signed [AFN_W+1:0] NOM_FX = (AFN_W+2)'(NOMINAL_AFN << FRAC);

  state_t          state;
  logic [WCW-1:0]  wait_cnt;
  logic            got_main, got_clone;
  logic            bad_seen;

  logic signed [AFN_W:0]   diff;
  logic signed [AFN_W+1:0] nom_new;

  always_comb begin
    diff    = $signed({1'b0, afn_clone}) - $signed({1'b0, afn_main});
    nom_new = NOM_FX - (AFN_W+2)'(diff);
  end

  assign cal_busy = (state != S_SLEEP);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_SLEEP;
      wait_cnt    <= '0;
      got_main    <= 1'b0;
      got_clone   <= 1'b0;
      bad_seen    <= 1'b0;
      clone_rst   <= 1'b1;
      abm_start   <= 1'b0;
      cal_done    <= 1'b0;
      cal_error   <= 1'b0;
      correction  <= '0;
      afn_nominal <= AFN_W'(NOMINAL_AFN << FRAC);
    end else begin
      abm_start <= 1'b0;
      cal_done  <= 1'b0;
      unique case (state)
        S_SLEEP: begin
          if (cal_start) begin
            clone_rst <= 1'b0;
            wait_cnt  <= '0;
            state     <= S_WAKE;
          end
        end
        S_WAKE: begin
          if (wait_cnt < WCW'(WARMUP)) wait_cnt <= wait_cnt + 1'b1;
          else if (!main_busy) begin
            abm_start <= 1'b1;
            got_main  <= 1'b0;
            got_clone <= 1'b0;
            bad_seen  <= 1'b0;
            state     <= S_MEASURE;
          end
        end
        S_MEASURE: begin
          if (main_done)  begin got_main  <= 1'b1; bad_seen <= bad_seen | main_bad;  end
          if (clone_done) begin got_clone <= 1'b1; bad_seen <= bad_seen | clone_bad | (main_done & main_bad); end
          if ((got_main | main_done) && (got_clone | clone_done)) state <= S_APPLY;
        end
        S_APPLY: begin
          // Both results are held by the checkers until their next start.
          clone_rst <= 1'b1;
          cal_done  <= 1'b1;
          cal_error <= bad_seen;
          if (!bad_seen) begin
            correction  <= diff;
            afn_nominal <= (nom_new < 0) ? '0 : AFN_W'(nom_new);
          end
          state <= S_SLEEP;
        end
        default: state <= S_SLEEP;
      endcase
    end
  end
endmodule

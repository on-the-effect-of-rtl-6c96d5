// Aging-aware delay-chain sensor: working sensor, idle clone, DBM and ABM
// checkers and clone-based calibration.
//
// The working sensor runs all the time and its 33-bit snapshot is checked in
// two ways.  The difference-based checker (DBM) raises an alarm when
// flip-flops 1 and 17 disagree in any cycle of a window: it only catches a
// chain that is slower than nominal.  The average-based checker (ABM)
// averages the first-change index over the window and raises an alarm when
// the average leaves the band afn_nominal +/- afn_tol, or when a snapshot
// shows several changes or none; it catches a chain that is too slow or too
// fast.  afn_tol is an input so that the band can be set to +/-5 or, more
// leniently, +/-8.
//
// Because aging slows the working sensor, its nominal average drifts down
// over the years.  A clone of the sensor is kept asleep and is woken only by
// cal_start; the calibrator then measures both and moves the ABM's expected
// average by their difference (see ds_clone_calibrator).  The structure of
// the sensor, the two checking methods and the clone calibration follow the
// published work; the handshakes, window and fixed-point formats are this
// design's own.
//
// Interface: clk (sensor clock, its period sets the nominal index together
// with the chain delay), rst (synchronous for the checkers, asynchronous for
// the toggle flip-flop, active high), meas_start (pulse: one DBM and one ABM
// window; ignored during calibration), cal_start (pulse), afn_tol (whole
// flip-flops), and the results below.  FRAC = log2(WINDOW) fraction bits in
// every AFN value.
// Timing: after rst, wait three cycles before the first meas_start so that the
// chain has filled.  Results are valid from the *_done pulse, WINDOW cycles
// after the start, until the next start.
//
// Lint notes: rst resets the toggle flip-flops asynchronously (the chain
// falls quiet at once) and the checkers synchronously, so the same net is
// used both ways on purpose; the clone's toggle reset is the OR of rst and a
// registered sleep signal, both glitch-free.  The clone checker's band
// alarms, the busy flags and the a0 outputs of the sensors are left
// unconnected because only the clone's average and its multiple/no-change
// flags are needed.
module ds_top #(
  parameter int unsigned N_BUF        = ds_pkg::N_BUF,
  parameter int unsigned N_FF         = ds_pkg::N_FF,
  parameter int unsigned MID_FF       = ds_pkg::MID_FF,
  parameter int unsigned WINDOW       = ds_pkg::WINDOW,
  parameter int unsigned NOMINAL_AFN  = ds_pkg::NOMINAL_AFN,
  parameter int unsigned BUF_DELAY_PS = 10,
  parameter int unsigned WARMUP       = 4,
  localparam int unsigned FRAC  = $clog2(WINDOW),
  localparam int unsigned AFN_W = ds_pkg::FN_W + FRAC
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    meas_start,
  input  logic                    cal_start,
  input  logic [ds_pkg::FN_W-1:0] afn_tol,
  // working sensor
  output logic [N_FF-1:0]         snapshot,
  output ds_pkg::fn_result_t      fn_now,
  // difference-based method
  output logic                    dbm_mismatch,
  output logic                    dbm_done,
  output logic                    dbm_alarm,
  // average-based method
  output logic                    abm_done,
  output logic [AFN_W-1:0]        afn,
  output logic [AFN_W-1:0]        afn_nominal,
  output logic                    abm_alarm,
  output logic                    abm_alarm_low,
  output logic                    abm_alarm_high,
  output logic                    abm_alarm_multi,
  output logic                    abm_alarm_none,
  // calibration
  output logic                    clone_awake,
  output logic                    cal_busy,
  output logic                    cal_done,
  output logic                    cal_error,
  output logic signed [AFN_W:0]   correction,
  output logic [AFN_W-1:0]        afn_clone
);
  timeunit 1ps;
  timeprecision 1ps;

  import ds_pkg::*;

  logic            a0_main, a0_clone;
  logic [N_FF-1:0] snap_clone;
  logic            clone_rst, clone_tff_rst;
  logic            cal_abm_start, main_start;
  logic            main_busy, dbm_busy;
  logic            clone_done, clone_busy;
  logic            clone_alarm, clone_low, clone_high, clone_multi, clone_none;
  fn_result_t      fn_clone;

  // ---------------------------------------------------------------- sensors
  ds_sensor #(
    .N_BUF (N_BUF), .N_FF (N_FF), .BUF_DELAY_PS (BUF_DELAY_PS)
  ) u_main (
    .clk (clk), .rst (rst), .a0 (a0_main), .q (snapshot)
  );

  // The clone's toggle flip-flop is held in reset while it sleeps.
  assign clone_tff_rst = rst | clone_rst;
  assign clone_awake   = ~clone_rst;

  ds_sensor #(
    .N_BUF (N_BUF), .N_FF (N_FF), .BUF_DELAY_PS (BUF_DELAY_PS)
  ) u_clone (
    .clk (clk), .rst (clone_tff_rst), .a0 (a0_clone), .q (snap_clone)
  );

  // --------------------------------------------------------------- checkers
  assign main_start = cal_abm_start | (meas_start & ~cal_busy);

  ds_dbm #(
    .N_FF (N_FF), .MID_FF (MID_FF), .WINDOW (WINDOW)
  ) u_dbm (
    .clk (clk), .rst (rst), .start (meas_start & ~cal_busy), .q (snapshot),
    .mismatch (dbm_mismatch), .busy (dbm_busy), .done (dbm_done), .alarm (dbm_alarm)
  );

  ds_abm #(
    .N_FF (N_FF), .WINDOW (WINDOW)
  ) u_abm_main (
    .clk (clk), .rst (rst), .start (main_start), .q (snapshot),
    .afn_nominal (afn_nominal), .afn_tol (afn_tol),
    .fn_now (fn_now), .busy (main_busy), .done (abm_done), .afn (afn),
    .alarm (abm_alarm), .alarm_low (abm_alarm_low), .alarm_high (abm_alarm_high),
    .alarm_multi (abm_alarm_multi), .alarm_none (abm_alarm_none)
  );

  ds_abm #(
    .N_FF (N_FF), .WINDOW (WINDOW)
  ) u_abm_clone (
    .clk (clk), .rst (rst), .start (cal_abm_start), .q (snap_clone),
    .afn_nominal (afn_nominal), .afn_tol (afn_tol),
    .fn_now (fn_clone), .busy (clone_busy), .done (clone_done), .afn (afn_clone),
    .alarm (clone_alarm), .alarm_low (clone_low), .alarm_high (clone_high),
    .alarm_multi (clone_multi), .alarm_none (clone_none)
  );

  // ------------------------------------------------------------ calibration
  ds_clone_calibrator #(
    .WINDOW (WINDOW), .NOMINAL_AFN (NOMINAL_AFN), .WARMUP (WARMUP)
  ) u_cal (
    .clk (clk), .rst (rst), .cal_start (cal_start),
    .main_busy (main_busy), .main_done (abm_done), .clone_done (clone_done),
    .afn_main (afn), .afn_clone (afn_clone),
    .main_bad (abm_alarm_multi | abm_alarm_none),
    .clone_bad (clone_multi | clone_none),
    .clone_rst (clone_rst), .abm_start (cal_abm_start),
    .cal_busy (cal_busy), .cal_done (cal_done), .cal_error (cal_error),
    .correction (correction), .afn_nominal (afn_nominal)
  );
endmodule

// Average-based method (ABM) checker.
//
// Every cycle of a measurement window the first-change index FN of the
// current snapshot is found (see ds_fn_extractor) and added up.  The
// average over the window, AFN, is compared with the expected value
// afn_nominal: AFN below afn_nominal - afn_tol means the chain is slower than
// expected (alarm_low), above afn_nominal + afn_tol faster (alarm_high); both
// ends of the band are accepted.  A snapshot with more than one phase change
// raises alarm_multi, one without any change alarm_none.  alarm is the OR of
// the four.  Averaging FN, the acceptance band around the nominal index and
// the alarm on multiple changes follow the published method; the window,
// the fixed-point format and the alarm for a snapshot without change are this
// design's choices.
//
// Fixed point: WINDOW is a power of two, so the sum of WINDOW indices is
// already AFN with FRAC = log2(WINDOW) fraction bits.  afn and afn_nominal
// use that format (AFN 18 with WINDOW 16 is 18*16 = 288); afn_tol is a whole
// number of flip-flops.  afn_nominal comes from outside so that a calibrator
// can move it as the sensor ages.
//
// Interface: clk, rst (synchronous, active high), start (pulse), q, fn_now
// (this cycle's search result), busy, done (pulse), afn and the alarms
// (valid from done until the next start).
// Timing: done rises WINDOW cycles after start; a start while busy is ignored.
module ds_abm #(
  parameter int unsigned N_FF   = ds_pkg::N_FF,
  parameter int unsigned WINDOW = ds_pkg::WINDOW,
  localparam int unsigned FRAC  = $clog2(WINDOW),
  localparam int unsigned AFN_W = ds_pkg::FN_W + FRAC
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [N_FF-1:0]    q,
  input  logic [AFN_W-1:0]   afn_nominal,
  input  logic [ds_pkg::FN_W-1:0] afn_tol,
  output ds_pkg::fn_result_t fn_now,
  output logic               busy,
  output logic               done,
  output logic [AFN_W-1:0]   afn,
  output logic               alarm,
  output logic               alarm_low,
  output logic               alarm_high,
  output logic               alarm_multi,
  output logic               alarm_none
);
  timeunit 1ps;
  timeprecision 1ps;

  import ds_pkg::*;

  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [CW-1:0]    left;
  logic [AFN_W-1:0] sum;
  logic             multi_seen, none_seen;
  logic [AFN_W-1:0] sum_next;

  ds_fn_extractor #(.N_FF(N_FF)) u_fn (
    .q   (q),
    .res (fn_now)
  );

  assign busy     = (left != '0);
  assign sum_next = sum + AFN_W'(fn_now.fn);

  // Band limits, signed and one bit wider so that nominal - tol may go below 0.
  logic signed [AFN_W+1:0] lo_lim, hi_lim, afn_s;
  always_comb begin
    lo_lim = $signed({2'b00, afn_nominal}) - $signed({2'b00, AFN_W'(afn_tol) << FRAC});
    hi_lim = $signed({2'b00, afn_nominal}) + $signed({2'b00, AFN_W'(afn_tol) << FRAC});
    afn_s  = $signed({2'b00, sum_next});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      left        <= '0;
      sum         <= '0;
      multi_seen  <= 1'b0;
      none_seen   <= 1'b0;
      done        <= 1'b0;
      afn         <= '0;
      alarm       <= 1'b0;
      alarm_low   <= 1'b0;
      alarm_high  <= 1'b0;
      alarm_multi <= 1'b0;
      alarm_none  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        left        <= CW'(WINDOW);
        sum         <= '0;
        multi_seen  <= 1'b0;
        none_seen   <= 1'b0;
        alarm       <= 1'b0;
        alarm_low   <= 1'b0;
        alarm_high  <= 1'b0;
        alarm_multi <= 1'b0;
        alarm_none  <= 1'b0;
      end else if (busy) begin
        left       <= left - 1'b1;
        sum        <= sum_next;
        multi_seen <= multi_seen | fn_now.multi;
        none_seen  <= none_seen  | fn_now.none;
        if (left == CW'(1)) begin
          done        <= 1'b1;
          afn         <= sum_next;
          alarm_low   <= afn_s < lo_lim;
          alarm_high  <= afn_s > hi_lim;
          alarm_multi <= multi_seen | fn_now.multi;
          alarm_none  <= none_seen  | fn_now.none;
          alarm       <= (afn_s < lo_lim) || (afn_s > hi_lim) ||
                         multi_seen || fn_now.multi || none_seen || fn_now.none;
        end
      end
    end
  end

  initial assert (WINDOW == (1 << FRAC)) else $error("WINDOW must be a power of two");
endmodule

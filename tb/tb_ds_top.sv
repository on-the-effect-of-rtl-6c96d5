// End-to-end testbench for ds_top at its default sizes (64 buffers, 33
// flip-flops, 16-cycle window, nominal index 18).  The clock runs at 485 ps
// and the buffers start at 10 ps, which puts the first change of a fresh
// sensor at flip-flop 18.  Changing a chain's buffer delay stands for a
// change of temperature, supply or age: the working sensor and the clone are
// set independently, which is how a clone that has aged less is modelled.
//
// For every measurement the expected first-change index is derived here
// from the delays alone (the first tap k whose delay (31 + k) * d spans a
// different number of clock periods than its predecessor's), and from it the
// expected average, the DBM decision (flip-flops 1 and 17 differ when the
// change lies at 17 or below, or when 17 sits beyond a second change) and
// the ABM alarms.  Each mechanism is counted and must occur at least once:
// DBM alarm, ABM slow / fast / multiple-change / no-change alarms, the wider
// +/-8 band, a calibration that removes an aging false alarm, a calibration
// rejected as untrustworthy, and a measurement request ignored during
// calibration.
module tb_ds_top;
  timeunit 1ps;
  timeprecision 1ps;

  import ds_pkg::*;

  localparam int unsigned NB = 64, NF = 33, W = 16;
  localparam int unsigned T_HI = 242, T_LO = 243, T = T_HI + T_LO;

  logic clk = 1'b0, rst = 1'b1, meas_start = 1'b0, cal_start = 1'b0;
  logic [FN_W-1:0] afn_tol = 6'd5;
  logic [NF-1:0] snapshot;
  fn_result_t fn_now;
  logic dbm_mismatch, dbm_done, dbm_alarm, abm_done;
  logic [9:0] afn, afn_nominal, afn_clone;
  logic abm_alarm, abm_alarm_low, abm_alarm_high, abm_alarm_multi, abm_alarm_none;
  logic clone_awake, cal_busy, cal_done, cal_error;
  logic signed [10:0] correction;

  int checks = 0, failures = 0;
  int n_dbm_alarm = 0, n_low = 0, n_high = 0, n_multi = 0, n_none = 0, n_wide = 0;
  int n_cal_fix = 0, n_cal_err = 0, n_ignored = 0, n_clean = 0;

  ds_top dut (
    .clk(clk), .rst(rst), .meas_start(meas_start), .cal_start(cal_start), .afn_tol(afn_tol),
    .snapshot(snapshot), .fn_now(fn_now), .dbm_mismatch(dbm_mismatch), .dbm_done(dbm_done),
    .dbm_alarm(dbm_alarm), .abm_done(abm_done), .afn(afn), .afn_nominal(afn_nominal),
    .abm_alarm(abm_alarm), .abm_alarm_low(abm_alarm_low), .abm_alarm_high(abm_alarm_high),
    .abm_alarm_multi(abm_alarm_multi), .abm_alarm_none(abm_alarm_none),
    .clone_awake(clone_awake), .cal_busy(cal_busy), .cal_done(cal_done), .cal_error(cal_error),
    .correction(correction), .afn_clone(afn_clone));

  always begin
    clk = 1'b1; #(T_HI);
    clk = 1'b0; #(T_LO);
  end

  initial begin
    #(T * 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase of tap k (1-based): number of whole clock periods in its delay.
  function automatic int span(input int d, input int k);
    return ((NB - NF + k) * d) / T;
  endfunction

  // Expected first-change index and number of changes for buffer delay d.
  function automatic void predict(input int d, output int fn, output int changes);
    fn = 0; changes = 0;
    for (int k = 2; k <= NF; k++)
      if (span(d, k) != span(d, k - 1)) begin
        if (changes == 0) fn = k;
        changes++;
      end
  endfunction

  task automatic set_delays(input int d_main, input int d_clone);
    dut.u_main.u_chain.buf_delay_ps  = d_main;
    dut.u_clone.u_chain.buf_delay_ps = d_clone;
    repeat (4) @(negedge clk);
  endtask

  // One DBM + ABM measurement of the working sensor at buffer delay d.
  task automatic measure(input int d, input int tol);
    int fn, ch, lo, hi, cyc;
    logic e_dbm, e_lo, e_hi, e_multi, e_none;
    afn_tol = FN_W'(tol);
    predict(d, fn, ch);
    e_multi = ch > 1;
    e_none  = ch == 0;
    e_dbm   = (span(d, 1) % 2) != (span(d, MID_FF) % 2);
    lo = int'(afn_nominal) - tol * W;
    hi = int'(afn_nominal) + tol * W;
    e_lo = fn * W < lo;
    e_hi = fn * W > hi;
    @(negedge clk);
    meas_start = 1'b1;
    @(negedge clk);
    meas_start = 1'b0;
    cyc = 1;
    while (!abm_done && cyc < 4 * W) begin @(negedge clk); cyc++; end
    checks++;
    // done rises with the W-th edge after the one that samples meas_start,
    // i.e. it is seen at the (W+1)-th falling edge counted here.
    if (cyc != W + 1) begin failures++; $display("FAIL d=%0d: result after %0d cycles, expected %0d", d, cyc, W + 1); end
    checks++;
    if (!dbm_done || dbm_alarm != e_dbm) begin
      failures++;
      $display("FAIL d=%0d: dbm done=%b alarm=%b expected %b", d, dbm_done, dbm_alarm, e_dbm);
    end
    checks++;
    if (afn != 10'(fn * W) || abm_alarm_low != e_lo || abm_alarm_high != e_hi ||
        abm_alarm_multi != e_multi || abm_alarm_none != e_none ||
        abm_alarm != (e_lo | e_hi | e_multi | e_none)) begin
      failures++;
      $display("FAIL d=%0d tol=%0d: afn=%0d exp %0d, lo %b/%b hi %b/%b multi %b/%b none %b/%b",
               d, tol, afn, fn * W, abm_alarm_low, e_lo, abm_alarm_high, e_hi,
               abm_alarm_multi, e_multi, abm_alarm_none, e_none);
    end
    if (dbm_alarm)       n_dbm_alarm++;
    if (abm_alarm_low)   n_low++;
    if (abm_alarm_high)  n_high++;
    if (abm_alarm_multi) n_multi++;
    if (abm_alarm_none)  n_none++;
    if (!abm_alarm && !dbm_alarm) n_clean++;
    if (tol == 8 && !abm_alarm && fn * W < int'(afn_nominal) - 5 * W) n_wide++;
  endtask

  // Calibration with the working chain at d_main and the clone at d_clone.
  // A measurement request in the middle must be ignored.
  task automatic calibrate(input int d_main, input int d_clone);
    int fm, fc, ch_m, ch_c, cyc, old_nom;
    logic bad;
    predict(d_main, fm, ch_m);
    predict(d_clone, fc, ch_c);
    bad = (ch_m != 1) || (ch_c != 1);
    old_nom = int'(afn_nominal);
    checks++;
    if (clone_awake) begin failures++; $display("FAIL clone awake before calibration"); end
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    cyc = 1;
    while (!cal_done && cyc < 100) begin
      if (cyc == 10) begin
        meas_start = 1'b1;           // must be ignored: no extra DBM window
        @(negedge clk);
        meas_start = 1'b0;
        cyc++;
        checks++;
        if (dut.u_dbm.busy) begin failures++; $display("FAIL measurement accepted during calibration"); end
        else n_ignored++;
      end else begin
        @(negedge clk);
        cyc++;
      end
    end
    checks++;
    // WARMUP + WINDOW + 4 edges, seen one falling edge later.
    if (cyc != 4 + W + 5) begin failures++; $display("FAIL calibration took %0d cycles", cyc); end
    checks++;
    if (bad) begin
      if (!cal_error || int'(afn_nominal) != old_nom) begin
        failures++;
        $display("FAIL untrustworthy calibration not rejected");
      end else n_cal_err++;
    end else if (cal_error || afn_clone != 10'(fc * W) || correction != 11'((fc - fm) * W) ||
                 afn_nominal != 10'((18 - (fc - fm)) * W)) begin
      failures++;
      $display("FAIL calibration: clone %0d/%0d correction %0d/%0d nominal %0d",
               afn_clone, fc * W, correction, (fc - fm) * W, afn_nominal);
    end
    @(negedge clk);
    checks++;
    if (clone_awake) begin failures++; $display("FAIL clone still awake"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    set_delays(10, 10);
    // Fresh sensor at the nominal condition: index 18, no alarm.
    measure(10, 5);
    // Colder / higher supply: faster buffers.
    set_delays(9, 10);  measure(9, 5);   // 23: still accepted
    set_delays(8, 10);  measure(8, 5);   // 30: fast alarm (ABM only)
    // Hotter / lower supply / aged: slower buffers.
    set_delays(11, 10); measure(11, 5);  // 14: DBM alarm, ABM accepts
    set_delays(12, 10); measure(12, 5);  // 10: both alarm
    measure(12, 8);                      // the +/-8 band accepts 10
    set_delays(30, 10); measure(30, 5);  // changes at 2 and 18
    set_delays(5, 10);  measure(5, 5);   // no change within the taps
    // Aged working sensor (12 ps) against a fresh clone (10 ps): the
    // nominal-condition false alarm disappears after calibration.
    set_delays(12, 10);
    calibrate(12, 10);
    measure(12, 5);
    if (!abm_alarm) n_cal_fix++;
    // Even older sensor in a hot spot is still caught against the new value.
    set_delays(15, 10); measure(15, 5);
    // Calibrating while the working chain shows two changes is refused.
    set_delays(30, 10);
    calibrate(30, 10);
    set_delays(12, 10); measure(12, 5);

    checks++; if (n_dbm_alarm == 0) begin failures++; $display("FAIL no DBM alarm seen"); end
    checks++; if (n_low == 0)       begin failures++; $display("FAIL no slow ABM alarm seen"); end
    checks++; if (n_high == 0)      begin failures++; $display("FAIL no fast ABM alarm seen"); end
    checks++; if (n_multi == 0)     begin failures++; $display("FAIL no multiple-change alarm seen"); end
    checks++; if (n_none == 0)      begin failures++; $display("FAIL no no-change alarm seen"); end
    checks++; if (n_wide == 0)      begin failures++; $display("FAIL wider band never used"); end
    checks++; if (n_cal_fix == 0)   begin failures++; $display("FAIL calibration never removed an alarm"); end
    checks++; if (n_cal_err == 0)   begin failures++; $display("FAIL calibration never rejected"); end
    checks++; if (n_ignored == 0)   begin failures++; $display("FAIL no request ignored during calibration"); end
    checks++; if (n_clean == 0)     begin failures++; $display("FAIL no clean measurement"); end
    $display("mechanisms: dbm=%0d low=%0d high=%0d multi=%0d none=%0d wide=%0d cal_fix=%0d cal_err=%0d ignored=%0d clean=%0d",
             n_dbm_alarm, n_low, n_high, n_multi, n_none, n_wide, n_cal_fix, n_cal_err, n_ignored, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Workload testbench: alarms of a fresh and an aged sensor over a grid of
// operating conditions, and the miss and false alarms that aging causes.
//
// An operating condition is represented by the buffer delay of a fresh
// chain (7 ps = cold / high supply ... 14 ps = hot / low supply, clock 485 ps,
// 10 ps is the nominal condition).  Aging adds a further delay of 1, 2 or
// 3 ps to every buffer of the working sensor.  For every age the design is
// reset (expected average back to 18) and each condition is measured with
// the +/-5 and the +/-8 band; then the working sensor is calibrated against
// the fresh clone at the nominal condition and every condition is measured
// again with +/-5.  A *miss alarm* is a condition where the fresh sensor
// alarms and the aged one does not; a *false alarm* the opposite.
//
// The DBM alarm of every measurement is recorded and checked as well, and
// its miss and false alarms are counted the same way.
//
// Every measured alarm is compared with the one predicted here from the
// delays alone, so the miss/false counts printed are those of the RTL and
// are checked.  The run must show at least one miss alarm and one false
// alarm, and calibration must bring the aged sensor closer to the fresh one
// (fewer disagreements) at some age.
module tb_ds_aging_sweep;
  timeunit 1ps;
  timeprecision 1ps;

  import ds_pkg::*;

  localparam int unsigned NB = 64, NF = 33, W = 16;
  localparam int unsigned T_HI = 242, T_LO = 243, T = T_HI + T_LO;
  localparam int D_MIN = 7, D_MAX = 14, D_NOM = 10;

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
  int total_miss = 0, total_false = 0, n_cal_better = 0;

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
    #(T * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int span(input int d, input int k);
    return ((NB - NF + k) * d) / T;
  endfunction

  function automatic void predict(input int d, output int fn, output int changes);
    fn = 0; changes = 0;
    for (int k = 2; k <= NF; k++)
      if (span(d, k) != span(d, k - 1)) begin
        if (changes == 0) fn = k;
        changes++;
      end
  endfunction

  // Predicted ABM alarm for chain delay d against nominal nom_x16 +/- tol.
  function automatic logic predict_alarm(input int d, input int nom_x16, input int tol);
    int fn, ch;
    predict(d, fn, ch);
    return (ch != 1) || (fn * W < nom_x16 - tol * W) || (fn * W > nom_x16 + tol * W);
  endfunction

  task automatic restart();
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic set_main(input int d);
    dut.u_main.u_chain.buf_delay_ps = d;
    repeat (4) @(negedge clk);
  endtask

  // One ABM measurement of the working sensor; returns its alarm and checks
  // it against the prediction.
  task automatic measure(input int d, input int tol, output logic alarm, output logic dalarm);
    logic exp, exp_dbm;
    exp = predict_alarm(d, int'(afn_nominal), tol);
    exp_dbm = (span(d, 1) % 2) != (span(d, MID_FF) % 2);
    afn_tol = FN_W'(tol);
    set_main(d);
    @(negedge clk);
    meas_start = 1'b1;
    @(negedge clk);
    meas_start = 1'b0;
    while (!abm_done) @(negedge clk);
    alarm  = abm_alarm;
    dalarm = dbm_alarm;
    checks++;
    if (dbm_alarm !== exp_dbm) begin
      failures++;
      $display("FAIL d=%0d: DBM alarm %b expected %b", d, dbm_alarm, exp_dbm);
    end
    checks++;
    if (abm_alarm !== exp) begin
      failures++;
      $display("FAIL d=%0d tol=%0d nominal=%0d: alarm %b expected %b (afn %0d)",
               d, tol, afn_nominal, abm_alarm, exp, afn);
    end
  endtask

  initial begin
    logic fresh5 [D_MIN:D_MAX];
    logic fresh8 [D_MIN:D_MAX];
    logic freshd [D_MIN:D_MAX];
    logic a, da;
    dut.u_clone.u_chain.buf_delay_ps = D_NOM;
    restart();
    // Fresh sensor over all conditions.
    for (int d = D_MIN; d <= D_MAX; d++) begin
      measure(d, 5, a, da); fresh5[d] = a; freshd[d] = da;
      measure(d, 8, a, da); fresh8[d] = a;
    end
    for (int age = 1; age <= 3; age++) begin
      int miss5 = 0, false5 = 0, miss8 = 0, false8 = 0, missc = 0, falsec = 0, missd = 0, falsed = 0;
      restart();
      for (int d = D_MIN; d <= D_MAX; d++) begin
        measure(d + age, 5, a, da);
        if (fresh5[d] && !a) miss5++;
        if (!fresh5[d] && a) false5++;
        if (freshd[d] && !da) missd++;
        if (!freshd[d] && da) falsed++;
        measure(d + age, 8, a, da);
        if (fresh8[d] && !a) miss8++;
        if (!fresh8[d] && a) false8++;
      end
      // Calibrate at the nominal condition against the fresh clone.
      set_main(D_NOM + age);
      @(negedge clk);
      cal_start = 1'b1;
      @(negedge clk);
      cal_start = 1'b0;
      while (!cal_done) @(negedge clk);
      begin
        int fm, fc, ch;
        predict(D_NOM + age, fm, ch);
        predict(D_NOM, fc, ch);
        checks++;
        if (cal_error || afn_nominal != 10'((18 - (fc - fm)) * W)) begin
          failures++;
          $display("FAIL age +%0d ps: calibrated nominal %0d expected %0d", age, afn_nominal, (18 - (fc - fm)) * W);
        end
      end
      for (int d = D_MIN; d <= D_MAX; d++) begin
        measure(d + age, 5, a, da);
        if (fresh5[d] && !a) missc++;
        if (!fresh5[d] && a) falsec++;
      end
      $display("aging +%0d ps/buffer: DBM miss=%0d false=%0d | ABM +/-5 miss=%0d false=%0d | +/-8 miss=%0d false=%0d | calibrated +/-5 miss=%0d false=%0d (nominal now %0d/16)",
               age, missd, falsed, miss5, false5, miss8, false8, missc, falsec, afn_nominal);
      total_miss  += miss5 + miss8;
      total_false += false5 + false8;
      if (missc + falsec < miss5 + false5) n_cal_better++;
    end
    checks++; if (total_miss == 0)   begin failures++; $display("FAIL no miss alarm in the sweep"); end
    checks++; if (total_false == 0)  begin failures++; $display("FAIL no false alarm in the sweep"); end
    checks++; if (n_cal_better == 0) begin failures++; $display("FAIL calibration never helped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

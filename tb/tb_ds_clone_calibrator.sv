// Self-checking testbench for ds_clone_calibrator.  The two average-based
// checkers are replaced by a small responder that answers every abm_start
// with done after 16 cycles and preset averages.  Checked: the clone sleeps
// outside calibration and is awake during it, the start pulse comes after
// the warm-up and only once the working checker is idle, the correction is
// clone minus working average, the expected average moves by it (and is
// clamped at zero), an untrustworthy measurement leaves the old values, and
// cal_done rises WARMUP + WINDOW + 4 edges after cal_start is sampled.
module tb_ds_clone_calibrator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 16, WARM = 4;
  logic clk = 1'b0, rst = 1'b1, cal_start = 1'b0;
  logic main_busy = 1'b0, main_done = 1'b0, clone_done = 1'b0;
  logic main_bad = 1'b0, clone_bad = 1'b0;
  logic [9:0] afn_main = '0, afn_clone = '0, afn_nominal;
  logic clone_rst, abm_start, cal_busy, cal_done, cal_error;
  logic signed [10:0] correction;
  int checks = 0, failures = 0;
  int resp_main, resp_clone;
  logic resp_bad;

  ds_clone_calibrator dut (
    .clk(clk), .rst(rst), .cal_start(cal_start), .main_busy(main_busy),
    .main_done(main_done), .clone_done(clone_done), .afn_main(afn_main),
    .afn_clone(afn_clone), .main_bad(main_bad), .clone_bad(clone_bad),
    .clone_rst(clone_rst), .abm_start(abm_start), .cal_busy(cal_busy),
    .cal_done(cal_done), .cal_error(cal_error), .correction(correction),
    .afn_nominal(afn_nominal));

  always #5 clk = ~clk;

  // Stand-in for the two checkers.
  always @(posedge clk) begin
    if (abm_start) begin
      checks++;
      if (clone_rst) begin failures++; $display("FAIL measurement started with clone asleep"); end
      repeat (W) @(posedge clk);       // a real checker's done comes W edges after it samples start
      main_done  <= 1'b1;
      clone_done <= 1'b1;
      afn_main   <= 10'(resp_main);
      afn_clone  <= 10'(resp_clone);
      main_bad   <= resp_bad;
      @(posedge clk);
      main_done  <= 1'b0;
      clone_done <= 1'b0;
    end
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic calibrate(input int m, input int c, input logic bad, input int busy_cycles,
                           input int exp_corr, input int exp_nom, input logic exp_err);
    int cyc;
    resp_main = m; resp_clone = c; resp_bad = bad;
    main_busy = (busy_cycles > 0);
    @(negedge clk);
    checks++;
    if (!clone_rst) begin failures++; $display("FAIL clone awake while idle"); end
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    cyc = 1;
    while (!cal_done && cyc < 100) begin
      if (cyc == busy_cycles) main_busy = 1'b0;
      checks++;
      if (clone_rst !== 1'b0 || !cal_busy) begin failures++; $display("FAIL clone not awake during calibration"); end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != WARM + W + 5 + (busy_cycles > WARM + 1 ? busy_cycles - WARM - 1 : 0)) begin
      failures++;
      $display("FAIL calibration took %0d cycles", cyc);
    end
    checks++;
    if (correction != exp_corr || afn_nominal != 10'(exp_nom) || cal_error != exp_err) begin
      failures++;
      $display("FAIL correction=%0d/%0d nominal=%0d/%0d error=%b/%b",
               correction, exp_corr, afn_nominal, exp_nom, cal_error, exp_err);
    end
    @(negedge clk);
    checks++;
    if (!clone_rst || cal_busy) begin failures++; $display("FAIL clone not back asleep"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    checks++;
    if (afn_nominal != 10'(18 * 16) || correction != 0) begin failures++; $display("FAIL reset values"); end
    // Aged working sensor averages 15, clone 18: expect 15 from now on.
    calibrate(15 * 16, 18 * 16, 1'b0, 0, 3 * 16, 15 * 16, 1'b0);
    // Partly recovered: 16.5 against 18.25.
    calibrate(16 * 16 + 8, 18 * 16 + 4, 1'b0, 0, 28, 18 * 16 - 28, 1'b0);
    // Working checker busy for 12 cycles: the start waits for it.
    calibrate(14 * 16, 18 * 16, 1'b0, 12, 4 * 16, 14 * 16, 1'b0);
    // Untrustworthy result: values kept, error flagged.
    calibrate(5 * 16, 18 * 16, 1'b1, 0, 4 * 16, 14 * 16, 1'b1);
    // Faster working sensor than clone: expectation moves up.
    calibrate(20 * 16, 18 * 16, 1'b0, 0, -2 * 16, 20 * 16, 1'b0);
    // Difference larger than the nominal value: clamped at 0.
    calibrate(0, 33 * 16, 1'b0, 0, 33 * 16, 0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

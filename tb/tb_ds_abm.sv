// Self-checking testbench for ds_abm with a 16-cycle window (4 fraction
// bits).  Each window feeds a chosen sequence of first-change indices; the
// expected average is the plain sum of those indices, and the alarms follow
// from comparing it with nominal +/- tolerance worked out here in integers.
// Covered: nominal 18, both edges of the +/-5 band (13 and 23 accepted, 12
// and 24 not), a fractional average just outside the band, multiple changes,
// no change, a +/-8 band and a moved nominal value.
module tb_ds_abm;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NF = 33, W = 16, FRAC = 4;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [NF-1:0] q;
  logic [9:0] afn_nominal, afn;
  logic [5:0] afn_tol;
  ds_pkg::fn_result_t fn_now;
  logic busy, done, alarm, a_lo, a_hi, a_mu, a_no;
  int checks = 0, failures = 0;

  ds_abm dut (.clk(clk), .rst(rst), .start(start), .q(q), .afn_nominal(afn_nominal),
              .afn_tol(afn_tol), .fn_now(fn_now), .busy(busy), .done(done), .afn(afn),
              .alarm(alarm), .alarm_low(a_lo), .alarm_high(a_hi),
              .alarm_multi(a_mu), .alarm_none(a_no));

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fn = 0: no change; fn < 0: changes at -fn and at 30 (two changes).
  function automatic logic [NF-1:0] snap(input int fn, input logic ph);
    logic [NF-1:0] v;
    for (int k = 1; k <= NF; k++) begin
      if (fn == 0)     v[k-1] = ph;
      else if (fn > 0) v[k-1] = (k < fn) ? ph : ~ph;
      else             v[k-1] = (k < -fn || k >= 30) ? ph : ~ph;
    end
    return v;
  endfunction

  task automatic window(input int fns[W], input int nom_x16, input int tol);
    int sum, cyc, lo, hi;
    logic multi, none, e_lo, e_hi;
    afn_nominal = 10'(nom_x16);
    afn_tol     = 6'(tol);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sum = 0; multi = 0; none = 0;
    for (int i = 0; i < W; i++) begin
      q = snap(fns[i], i[0]);
      if (fns[i] > 0) sum += fns[i];
      if (fns[i] < 0) begin sum += -fns[i]; multi = 1; end
      if (fns[i] == 0) none = 1;
      @(negedge clk);
    end
    cyc = W;
    checks++;
    if (!done) begin failures++; $display("FAIL done not after %0d cycles", cyc); end
    lo = nom_x16 - tol * W;
    hi = nom_x16 + tol * W;
    e_lo = sum < lo;
    e_hi = sum > hi;
    checks++;
    if (afn != 10'(sum) || a_lo != e_lo || a_hi != e_hi || a_mu != multi || a_no != none ||
        alarm != (e_lo | e_hi | multi | none)) begin
      failures++;
      $display("FAIL afn=%0d/%0d lo=%b/%b hi=%b/%b multi=%b/%b none=%b/%b alarm=%b",
               afn, sum, a_lo, e_lo, a_hi, e_hi, a_mu, multi, a_no, none, alarm);
    end
  endtask

  function automatic void fill(ref int a[W], input int v);
    for (int i = 0; i < W; i++) a[i] = v;
  endfunction

  initial begin
    int f[W];
    q = '0;
    afn_nominal = 10'(18 * 16);
    afn_tol = 6'd5;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    fill(f, 18); window(f, 18 * 16, 5);
    fill(f, 13); window(f, 18 * 16, 5);    // lower edge accepted
    fill(f, 12); window(f, 18 * 16, 5);    // below: slow alarm
    fill(f, 23); window(f, 18 * 16, 5);    // upper edge accepted
    fill(f, 24); window(f, 18 * 16, 5);    // above: fast alarm
    fill(f, 13); f[3] = 12; window(f, 18 * 16, 5);   // 12.9375: alarm
    fill(f, 23); f[9] = 24; window(f, 18 * 16, 5);   // 23.0625: alarm
    fill(f, 18); f[5] = -11; window(f, 18 * 16, 5);  // two changes in one cycle
    fill(f, 18); f[15] = 0; window(f, 18 * 16, 5);   // no change in one cycle
    fill(f, 11); window(f, 18 * 16, 8);    // wider band accepts 11
    fill(f, 9);  window(f, 18 * 16, 8);    // ... but not 9
    fill(f, 15); window(f, 15 * 16 + 8, 5); // calibrated nominal 15.5
    fill(f, 10); window(f, 15 * 16 + 8, 5); // 10 < 10.5: alarm
    for (int r = 0; r < 10; r++) begin
      for (int i = 0; i < W; i++) f[i] = 2 + int'($urandom_range(31));
      window(f, 18 * 16, 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

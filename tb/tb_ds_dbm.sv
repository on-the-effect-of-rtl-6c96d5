// Self-checking testbench for ds_dbm with a 16-cycle window.  Snapshots are
// written directly: windows without any mismatch between flip-flops 1 and
// 17 must stay quiet, a single mismatch anywhere in the window (first, middle
// or last cycle) must raise the alarm, and done must come exactly WINDOW
// cycles after start.
module tb_ds_dbm;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NF = 33, W = 16;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [NF-1:0] q;
  logic mismatch, busy, done, alarm;
  int checks = 0, failures = 0;

  ds_dbm dut (.clk(clk), .rst(rst), .start(start), .q(q),
              .mismatch(mismatch), .busy(busy), .done(done), .alarm(alarm));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Snapshot with its first phase change at flip-flop fn (1-based), phase ph.
  function automatic logic [NF-1:0] snap(input int fn, input logic ph);
    logic [NF-1:0] v;
    for (int k = 1; k <= NF; k++) v[k-1] = (k < fn) ? ph : ~ph;
    return v;
  endfunction

  // One window; bad_cycle >= 0 puts a snapshot with the change at flip-flop
  // 12 (1 and 17 disagree) into that cycle of the window.
  task automatic window(input int bad_cycle, input logic exp_alarm);
    int cyc;
    @(negedge clk);
    q = snap(18, 1'b0);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    for (int i = 0; i < W; i++) begin
      q = snap(i == bad_cycle ? 12 : 18, i[0]);
      #1;
      checks++;
      if (mismatch !== (i == bad_cycle)) begin failures++; $display("FAIL mismatch flag cycle %0d", i); end
      @(negedge clk);
      cyc++;
      if (done) break;
    end
    while (!done && cyc < 3 * W) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != W) begin failures++; $display("FAIL done after %0d cycles, expected %0d", cyc, W); end
    checks++;
    if (alarm !== exp_alarm) begin failures++; $display("FAIL alarm=%b expected %b (bad cycle %0d)", alarm, exp_alarm, bad_cycle); end
  endtask

  initial begin
    q = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    window(-1, 1'b0);
    window(0, 1'b1);
    window(-1, 1'b0);        // alarm clears with the next window
    window(7, 1'b1);
    window(W - 1, 1'b1);
    // A change at flip-flop 18 and beyond keeps 1 and 17 equal: no alarm.
    window(-1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

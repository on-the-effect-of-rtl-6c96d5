// Self-checking testbench for ds_toggle_ff: the output must be 0 in reset,
// flip on every rising clock edge afterwards (half the clock rate), and
// return to 0 at once on an asynchronous reset in the middle of a cycle.
module tb_ds_toggle_ff;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, rst = 1'b1, a0;
  int checks = 0, failures = 0;

  ds_toggle_ff dut (.clk(clk), .rst(rst), .a0(a0));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    repeat (3) @(posedge clk);
    #1 check(a0, 1'b0, "held in reset");
    rst = 1'b0;
    exp = 1'b0;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk);
      exp = ~exp;
      #1 check(a0, exp, "toggle");
    end
    // Count rising edges of a0 over 20 clock cycles: must be 10 (F/2).
    begin
      int rises = 0;
      logic prev = a0;
      for (int i = 0; i < 20; i++) begin
        @(posedge clk); #1;
        if (a0 && !prev) rises++;
        prev = a0;
      end
      checks++;
      if (rises != 10) begin failures++; $display("FAIL rate: %0d rises in 20 cycles", rises); end
    end
    // Asynchronous reset while a0 is high.
    if (!a0) @(posedge clk);
    #2 rst = 1'b1;
    #1 check(a0, 1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

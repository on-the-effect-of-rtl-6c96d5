// Self-checking testbench for ds_capture_bank: random tap values must appear
// on q after the next rising edge and hold until the one after.
module tb_ds_capture_bank;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 33;
  logic clk = 1'b0;
  logic [N-1:0] taps, q, exp;
  int checks = 0, failures = 0;

  ds_capture_bank dut (.clk(clk), .taps(taps), .q(q));

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      exp  = {$urandom, $urandom};
      taps = exp;
      @(posedge clk);
      #2 taps = ~exp;                // changes after the edge must not show
      #2;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL q=%h exp=%h", q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

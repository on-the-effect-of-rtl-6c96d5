// Self-checking testbench for the ds_delay_chain model: after a step on the
// input, tap k must change exactly (32 + k) buffer delays later, for the
// default delay and after the delay has been changed at run time.
module tb_ds_delay_chain;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NB = 64, NT = 33;

  logic          a_in = 1'b0;
  logic [NT-1:0] taps;
  int checks = 0, failures = 0;

  ds_delay_chain dut (.a_in(a_in), .taps(taps));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply a step to value v at the current time, then check every tap just
  // before and just after its expected arrival time.
  task automatic step_and_check(input logic v, input int unsigned d);
    int unsigned t0;
    a_in = v;
    t0 = int'($time);
    for (int unsigned k = 0; k < NT; k++) begin
      int unsigned arrive;
      arrive = t0 + (NB - NT + 1 + k) * d;
      wait ($time >= arrive - 2);
      checks++;
      if (taps[k] !== ~v) begin
        failures++;
        $display("FAIL tap %0d changed early (d=%0d) at %0t", k, d, $time);
      end
      wait ($time >= arrive + 1);
      checks++;
      if (taps[k] !== v) begin
        failures++;
        $display("FAIL tap %0d late (d=%0d) at %0t", k, d, $time);
      end
    end
  endtask

  initial begin
    #1000;                           // chain settles at 0
    checks++;
    if (taps !== '0) begin failures++; $display("FAIL initial taps %h", taps); end
    step_and_check(1'b1, 10);
    #1000;
    dut.buf_delay_ps = 7;
    #1000;
    step_and_check(1'b0, 7);
    #1000;
    dut.buf_delay_ps = 13;
    #1000;
    step_and_check(1'b1, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

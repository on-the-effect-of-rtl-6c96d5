// Self-checking testbench for ds_sensor (toggle flip-flop, chain, sampling
// bank) run at a clock period of 485 ps with 10 ps buffers, which places the
// first phase change at flip-flop 18.  Every snapshot is compared with the
// pattern predicted from the delays alone: tap k (1-based) sits behind
// (31 + k) buffers, and a tap whose delay spans m whole clock periods shows
// the value a0 had m cycles earlier.  The buffer delay is then changed to
// stand for a colder, a hotter and a much slower (several changes) chain.
module tb_ds_sensor;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NB = 64, NF = 33;
  localparam int unsigned T_HI = 242, T_LO = 243, T = T_HI + T_LO;

  logic          clk = 1'b0, rst = 1'b1, a0;
  logic [NF-1:0] q;
  int checks = 0, failures = 0;

  ds_sensor dut (.clk(clk), .rst(rst), .a0(a0), .q(q));

  always begin
    clk = 1'b1; #(T_HI);
    clk = 1'b0; #(T_LO);
  end

  initial begin
    #(T * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected snapshot when the current a0 (after the last edge) is a_now.
  function automatic logic [NF-1:0] predict(input int unsigned d, input logic a_now);
    logic [NF-1:0] p;
    for (int unsigned k = 1; k <= NF; k++) begin
      int unsigned m;
      m = ((NB - NF + k) * d) / T;   // whole periods spanned by the tap delay
      // m = 0: a0 after the previous edge, which is ~a_now; each further
      // period flips it once more.
      p[k-1] = (m % 2 == 0) ? ~a_now : a_now;
    end
    return p;
  endfunction

  function automatic int first_change(input logic [NF-1:0] v);
    for (int k = 1; k < NF; k++) if (v[k] != v[k-1]) return k + 1;
    return 0;
  endfunction

  task automatic run(input int unsigned d, input int cycles, input int exp_fn);
    dut.u_chain.buf_delay_ps = d;
    repeat (4) @(negedge clk);       // let the chain settle at the new speed
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      checks++;
      if (q !== predict(d, a0)) begin
        failures++;
        $display("FAIL d=%0d snapshot %b expected %b", d, q, predict(d, a0));
      end
      checks++;
      if (first_change(q) != exp_fn) begin
        failures++;
        $display("FAIL d=%0d first change at %0d expected %0d", d, first_change(q), exp_fn);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(10, 20, 18);   // nominal: flip-flops 1..17 in one phase, 18..33 in the other
    run(9, 20, 23);    // faster chain (cold): change moves up
    run(11, 20, 14);   // slower chain (hot, low supply or aged): change moves down
    run(30, 20, 2);    // far too slow: changes at 2 and 18
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

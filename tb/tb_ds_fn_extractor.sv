// Self-checking testbench for ds_fn_extractor: directed snapshots (single
// change at every position, no change, two changes) and random snapshots,
// each compared with a reference built from the XOR of neighbouring bits.
module tb_ds_fn_extractor;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NF = 33;
  logic [NF-1:0]      q;
  ds_pkg::fn_result_t res;
  int checks = 0, failures = 0;

  ds_fn_extractor dut (.q(q), .res(res));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [NF-1:0] v);
    logic [NF-1:0] edges;
    int exp_fn, n;
    edges  = (v ^ (v << 1)) & ~NF'(1);   // bit k set when flip-flop k+1 differs from flip-flop k
    n      = $countones(edges);
    exp_fn = 0;
    for (int k = NF - 1; k >= 1; k--) if (edges[k]) exp_fn = k + 1;
    q = v;
    #1;
    checks++;
    if (res.fn != exp_fn || res.multi != (n > 1) || res.none != (n == 0)) begin
      failures++;
      $display("FAIL q=%b fn=%0d/%0d multi=%b none=%b", v, res.fn, exp_fn, res.multi, res.none);
    end
  endtask

  initial begin
    logic [NF-1:0] v;
    for (int p = 1; p < NF; p++) begin
      v = '0;
      for (int k = p; k < NF; k++) v[k] = 1'b1;
      check(v);        // 0s then 1s, change at flip-flop p+1
      check(~v);
    end
    check('0);
    check('1);
    // Exactly two changes, as a very slow chain produces.
    for (int p = 1; p < NF - 5; p++) begin
      v = '0;
      for (int k = p; k < p + 5; k++) v[k] = 1'b1;
      check(v);
      check(~v);
    end
    check(33'h1_0000_ffff ^ 33'h0_0000_0f00);  // three changes
    for (int i = 0; i < 500; i++) check({$urandom, $urandom});
    // Nominal pattern of the published sensor: change at flip-flop 18.
    q = {{16{1'b1}}, {17{1'b0}}};
    #1;
    checks++;
    if (res.fn != 18 || res.multi || res.none) begin failures++; $display("FAIL nominal pattern fn=%0d", res.fn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

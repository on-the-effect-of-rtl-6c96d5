// First-change search over one sensor snapshot (the flip-flop number FN).
//
// For each flip-flop k = 2..N_FF the extractor compares its output with that
// of flip-flop k-1.  FN is the 1-based index of the first flip-flop that
// differs from its predecessor; for the nominal condition this is 18.  The
// extractor also counts the changes: more than one (a very slow chain or a
// metastable sample) sets multi, none at all sets none and makes fn = 0.
// Finding FN follows the average-based method as published; counting the
// changes and the fn = 0 code for "no change" are this design's own choices.
//
// Interface: q (snapshot, q[0] = flip-flop 1), res (fn, multi, none).
// Timing: purely combinational.
module ds_fn_extractor #(
  parameter int unsigned N_FF = ds_pkg::N_FF
) (
  input  logic [N_FF-1:0]  q,
  output ds_pkg::fn_result_t res
);
  timeunit 1ps;
  timeprecision 1ps;

  import ds_pkg::*;

  always_comb begin
    int unsigned changes;
    changes = 0;
    res.fn  = '0;
    for (int unsigned k = 1; k < N_FF; k++) begin
      if (q[k] != q[k-1]) begin
        if (changes == 0) res.fn = FN_W'(k + 1);
        changes++;
      end
    end
    res.multi = (changes > 1);
    res.none  = (changes == 0);
  end
endmodule

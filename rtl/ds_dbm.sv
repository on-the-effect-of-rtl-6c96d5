// Difference-based method (DBM) checker.
//
// The first sampled flip-flop and the middle one (flip-flop MID_FF, 17 by
// default) are in the same phase when the chain runs at nominal speed or
// faster.  When the chain slows down (heat, low supply, aging) the first
// phase change moves to an index at or below MID_FF and the two disagree.
// The per-cycle test is a single XOR (mismatch).  A measurement starts with a
// one-cycle start pulse, looks at WINDOW consecutive snapshots and raises
// alarm if any of them mismatched.  The XOR of flip-flops 1 and 17 and the
// "any mismatch over several cycles" rule follow the published method; the
// window length, the start/done handshake and holding the alarm until the
// next start are this design's choices.
//
// Interface: clk, rst (synchronous, active high), start (pulse), q
// (snapshot), mismatch (combinational, this cycle), busy, done (one-cycle
// pulse after the last window cycle), alarm (valid from done until the next
// start).
// Timing: the window covers the WINDOW snapshots present on q in the cycles
// after start; done rises WINDOW cycles after start.  A start while busy is
// ignored.
module ds_dbm #(
  parameter int unsigned N_FF   = ds_pkg::N_FF,
  parameter int unsigned MID_FF = ds_pkg::MID_FF,
  parameter int unsigned WINDOW = ds_pkg::WINDOW
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [N_FF-1:0] q,
  output logic            mismatch,
  output logic            busy,
  output logic            done,
  output logic            alarm
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [CW-1:0] left;   // snapshots still to examine
  logic          seen;   // a mismatch was seen in the current window

  assign mismatch = q[0] ^ q[MID_FF-1];
  assign busy     = (left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      left  <= '0;
      seen  <= 1'b0;
      done  <= 1'b0;
      alarm <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        left  <= CW'(WINDOW);
        seen  <= 1'b0;
        alarm <= 1'b0;
      end else if (busy) begin
        left <= left - 1'b1;
        seen <= seen | mismatch;
        if (left == CW'(1)) begin
          done  <= 1'b1;
          alarm <= seen | mismatch;
        end
      end
    end
  end

  initial assert (MID_FF >= 2 && MID_FF <= N_FF) else $error("MID_FF out of range");
endmodule

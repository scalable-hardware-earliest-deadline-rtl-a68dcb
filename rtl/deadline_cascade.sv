// deadline_cascade - the comparator stage that lets a link scheduler release
// its head cell only when it is due, and that chains several link schedulers.
//
// The stage subtracts the incoming deadline bound DI from the head deadline A
// and uses the most significant bit of A - DI (deadline folding) as A < B.
// DO passes the smaller of the two on to the next stage (the multiplexer).
// EI/EO travel the other way: the last stage of a chain gets EI = 1; a stage
// whose head is earlier than everything above it (A < B) and that still has
// EI = 1 is selected (sel, which enables its cell-address output and its
// dequeue), otherwise it passes EO = EI & !(A < B) on. With DI of the first
// stage set to current-time + H, only cells with deadline < current-time + H
// can be selected (early-traffic handling). An empty scheduler never wins.
// Purely combinational. The use of the MSB, the MUX and the EI/EO gating
// follow the design; ties between stages go to the stage nearer the start of
// the DI chain because the comparison is strict.
module deadline_cascade #(
  parameter int DL_W = 15
) (
  input  logic            head_valid,
  input  logic [DL_W-1:0] head_dl,
  input  logic [DL_W-1:0] di,
  input  logic            ei,
  output logic [DL_W-1:0] do_dl,
  output logic            eo,
  output logic            a_lt_b,
  output logic            sel
);

  logic [DL_W-1:0] diff;

  always_comb begin
    diff   = head_dl - di;
    a_lt_b = head_valid && diff[DL_W-1];
    do_dl  = a_lt_b ? head_dl : di;
    sel    = ei && a_lt_b;
    eo     = ei && !a_lt_b;
  end

endmodule

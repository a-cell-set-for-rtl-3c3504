// qsel_init: first Q-select of a ring, with an init input that starts the
// ring. It behaves as qsel, and in addition a transition on init is merged
// into both the sample command for the next element and the Select input.
//
// How it works: snext = req xor init, so init makes the next element sample
// its probe. init, delayed by one buffer, is XORed with the twice-delayed
// request into the Select. After clear the second latch holds 0, so that
// first transition leaves on fout and becomes the next element's request:
// checking starts with the element after this one.
//
// Interface: req, probe, smpl, init, clr_n in; tout, fout, snext out.
// Timing: fout follows init after DLY, tout/fout follow req after 2*DLY.
//
// Structure (latches, Delay-1, Delay-2, two XORs, Select) follows the
// library cell.
//
// Tool note: As for qsel, the Select latches close a loop that lint
// reports as circular logic (UNOPTFLAT), and synthesis drops the bundling
// delays.
module qsel_init #(
  parameter int unsigned DLY = 1
) (
  input  logic req,
  input  logic probe,
  input  logic smpl,
  input  logic init,
  input  logic clr_n,
  output logic tout,
  output logic fout,
  output logic snext
);
  logic dreq, dinit, s1, s2;

  delay_n #(.N(2), .UNIT(DLY)) u_dly2 (.din(req),  .dout(dreq));
  delay_n #(.N(1), .UNIT(DLY)) u_dly1 (.din(init), .dout(dinit));

  tlatch #(.WIDTH(1), .OPAQUE(1'b0), .HAS_CLR(1'b0)) u_l1 (
    .d(probe), .c(smpl), .p(dreq), .clr_n(1'b1), .q(s1));
  tlatch #(.WIDTH(1), .OPAQUE(1'b1), .HAS_CLR(1'b1)) u_l2 (
    .d(s1), .c(dreq), .p(req), .clr_n(clr_n), .q(s2));

  tselect u_sel (.tin(dreq ^ dinit), .sel(s2), .clr_n(clr_n), .outt(tout), .outf(fout));

  assign snext = req ^ init;
endmodule

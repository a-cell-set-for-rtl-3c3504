// qsel: Q-select ring element. It tests an unbundled guard, probe, that may
// change at any time, and steers its request to tout (probe was true) or
// fout (false, passed on to the next element of the ring).
//
// How it works: the probe is sampled in two steps so that the first latch
// has time to settle before its value is used.
//  1. A transition on smpl (the previous element's request, arriving on its
//     snext) closes the normally transparent first latch on the probe.
//  2. A transition on req opens the normally opaque second latch, which
//     copies the first latch; snext = req tells the next element to sample.
//  3. Two buffer delays later the delayed request closes the second latch,
//     reopens the first, and enters a Select whose sel is the second latch.
// The delay is the bundling delay that keeps sel stable ahead of the Select.
//
// Interface: req, probe, smpl, clr_n in; tout, fout, snext out. Clear resets
// the second latch and the Select (outputs low). Timing: tout / fout follow
// req after 2*DLY time units; snext follows req at once.
//
// Structure (latches, Delay-2, Select) follows the library cell. A real
// first latch can go metastable; a two-state model samples a clean value.
//
// Tool note: The ring's request returns through the Select latches, so
// lint reports circular logic (UNOPTFLAT); that loop is the ring itself.
// Synthesis drops the Delay-2 bundling delay, which must then come from
// real buffer cells.
module qsel #(
  parameter int unsigned DLY = 1
) (
  input  logic req,
  input  logic probe,
  input  logic smpl,
  input  logic clr_n,
  output logic tout,
  output logic fout,
  output logic snext
);
  logic dreq, s1, s2;

  delay_n #(.N(2), .UNIT(DLY)) u_dly (.din(req), .dout(dreq));

  tlatch #(.WIDTH(1), .OPAQUE(1'b0), .HAS_CLR(1'b0)) u_l1 (
    .d(probe), .c(smpl), .p(dreq), .clr_n(1'b1), .q(s1));
  tlatch #(.WIDTH(1), .OPAQUE(1'b1), .HAS_CLR(1'b1)) u_l2 (
    .d(s1), .c(dreq), .p(req), .clr_n(clr_n), .q(s2));

  tselect u_sel (.tin(dreq), .sel(s2), .clr_n(clr_n), .outt(tout), .outf(fout));

  assign snext = req;
endmodule

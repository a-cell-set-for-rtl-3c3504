// ccs_decr_bit: one bit of a carry-completion decrementer. It adds a 1 bit
// (the all-ones word is minus one) to one input bit and the incoming carry,
// and reports its carry on a carry / don't-carry pair.
//   sum  = (in xnor cin)
//   cout = (cin + in) and en
//   dout = in' and din and en
// A bit holding 1 decides carry at once; a bit holding 0 passes on
// whichever of cin / din arrives. To subtract one from a word, start the
// chain with din = 1 (no carry into the all-ones addend).
//
// Interface: din_v (the input bit), cin, din, en in; sum, cout, dout out.
// Timing: combinational, zero-delay; four-phase use as for cca_bit.
//
// Gates (XNOR, OA1, AND3A) follow the library cell.
module ccs_decr_bit (
  input  logic din_v,
  input  logic cin,
  input  logic din,
  input  logic en,
  output logic sum,
  output logic cout,
  output logic dout
);
  assign sum  = ~(din_v ^ cin);
  assign cout = (cin | din_v) & en;
  assign dout = ~din_v & din & en;
endmodule

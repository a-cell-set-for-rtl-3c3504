// ccs_incr_bit: one bit of a carry-completion incrementer, the adder bit
// with its second operand removed. It adds the incoming carry to one input
// bit and reports its own carry on a carry / don't-carry pair.
//   sum  = in xor cin
//   cout = in and cin and en
//   dout = (in' + din) and en
// A bit holding 0 decides don't-carry at once; a bit holding 1 passes on
// whichever of cin / din arrives.
//
// Interface: din_v (the input bit), cin, din, en in; sum, cout, dout out.
// Timing: combinational, zero-delay; four-phase use as for cca_bit.
//
// Gates (XOR, AND3, OA1A) follow the library cell.
module ccs_incr_bit (
  input  logic din_v,
  input  logic cin,
  input  logic din,
  input  logic en,
  output logic sum,
  output logic cout,
  output logic dout
);
  assign sum  = din_v ^ cin;
  assign cout = din_v & cin & en;
  assign dout = (~din_v | din) & en;
endmodule

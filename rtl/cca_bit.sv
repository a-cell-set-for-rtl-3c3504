// cca_bit: one bit of a carry-completion-sensing (CCS) adder. Besides the
// sum it produces two carry wires, carry (cout) and don't-carry (dout), which
// are both low while en is low and one of which goes high once the bit knows
// its carry. The pair therefore tells when the carry chain has settled.
//
// How it works (four-phase): with en low both carry wires are low. When en
// rises, a bit whose operands are equal decides its carry at once (both 1:
// carry; both 0: don't-carry); a bit with unequal operands passes on
// whichever of cin / din arrives. sum is valid once cin or din is high.
//   sum  = ((a xor b) and en) xor cin
//   cout = en and (a.cin + b.cin + a.b)
//   dout = en and (a'.din + b'.din + a'.b')
//
// Interface: a, b, cin, din, en in; sum, cout, dout out. Timing:
// combinational, zero-delay. cin and din must not both be high.
//
// Equations follow the library cell.
module cca_bit (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic din,
  input  logic en,
  output logic sum,
  output logic cout,
  output logic dout
);
  assign sum  = ((a ^ b) & en) ^ cin;
  assign cout = en & ((a & cin) | (b & cin) | (a & b));
  assign dout = en & ((~a & din) | (~b & din) | (~a & ~b));
endmodule

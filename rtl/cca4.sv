// cca4: four-bit carry-completion-sensing adder with a four-phase en / ack
// interface. Four cca_bit cells are chained carry pair to carry pair; en
// drives every bit.
//
// How it works: raising en starts the addition; ack rises once the carry
// pairs after bit 1 and after bit 3 (the most significant) both show carry
// or don't-carry. Lowering en pulls every carry wire low, and ack falls
// once both watched pairs are low again. The two ORs are joined by a
// C-element, so ack rises only when both pairs have resolved and falls only
// when both have reset.
// Only two of the four carry pairs are watched, a cell-count compromise: a
// bit with equal operands decides its own carry at once, so when bit 1 or 3
// does so, a carry still rippling through bit 0 or 2 is not covered by ack
// and must settle within the time the completion logic itself takes.
//
// Interface: a[3:0], b[3:0], cin, din, en in; sum[3:0], cout, dout, ack out.
// Bit 0 is next to cin. To add without an incoming carry, assert din; to
// add one, assert cin. Stacking: cout/dout feed cin/din of the next cca4.
// Timing: the data path is combinational and zero-delay; ack follows the
// later of the two watched carry pairs after one C-element delay. In
// hardware the carry chain is short on average.
//
// The chain, and completion on bits 1 and 3 with two ORs joined into one
// acknowledge, follow the library cell. Joining them with a C-element rather
// than a plain AND is this design's reading of the described "tree of Join,
// or C-element, modules" whose falling output shows that the bits are reset.
module cca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  input  logic       din,
  input  logic       en,
  output logic [3:0] sum,
  output logic       cout,
  output logic       dout,
  output logic       ack
);
  logic [4:0] c, d;

  assign c[0] = cin;
  assign d[0] = din;
  for (genvar i = 0; i < 4; i++) begin : g_bit
    cca_bit u_bit (.a(a[i]), .b(b[i]), .cin(c[i]), .din(d[i]), .en(en),
                   .sum(sum[i]), .cout(c[i+1]), .dout(d[i+1]));
  end
  assign cout = c[4];
  assign dout = d[4];
  logic done_lo, done_hi;
  assign done_lo = c[2] | d[2];
  assign done_hi = c[4] | d[4];
  c_elem u_join (.a(done_lo), .b(done_hi), .clr_n(1'b1), .q(ack));
endmodule

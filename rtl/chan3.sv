// chan3: input side of a two-phase bundled-data channel that the router
// control reads at three different points of its program ("three-way"
// channel).
//
// How it works: a three-client Call merges the three read requests r1..r3.
// A C-element with clear joins the merged request with the channel's own
// request in_req, so a read waits until the sender has offered a word. The
// join drives rvar, the write request of the word register; the register's
// acknowledge avar is the channel acknowledge and is routed back to the
// reader that asked. probe = in_req xor in_ack is high while a word is
// waiting, which is the guard the Q-select ring polls.
//
// Interface: in_req / in_ack (channel), r1..r3 / a1..a3 (reads), rvar /
// avar (register write), probe, clr_n. Timing: rvar follows the later of
// the read and in_req after one C-element delay.
//
// The role of the block follows the router's control schematic; its inside
// (Call plus join) is this design's construction from the library cells.
module chan3 (
  input  logic clr_n,
  input  logic in_req,
  output logic in_ack,
  output logic probe,
  input  logic r1,
  output logic a1,
  input  logic r2,
  output logic a2,
  input  logic r3,
  output logic a3,
  output logic rvar,
  input  logic avar
);
  logic rs;

  call3 u_call (.r1(r1), .a1(a1), .r2(r2), .a2(a2), .r3(r3), .a3(a3), .rs(rs), .as_i(avar));

  c_elem #(.INV_A(1'b0), .INV_B(1'b0), .HAS_CLR(1'b1)) u_join (
    .a(rs), .b(in_req), .clr_n(clr_n), .q(rvar));

  assign in_ack = avar;
  assign probe  = in_req ^ in_ack;
endmodule

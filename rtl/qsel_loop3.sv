// qsel_loop3: a ring of three Q-selects that polls three guards in round
// robin and runs the process whose guard it first finds true.
//
// How it works: element 1 (qsel_init) takes the start transition on init.
// Each element's fout is the next element's req, element 3's fout returns
// to element 1, and each snext is the next element's smpl. An element whose
// probe is false passes the request on; one whose probe is true sends it to
// its process on preq[i]. Checking starts with element 2. If no guard is
// true, the request keeps circulating until one becomes true. The
// acknowledge is the XOR of the three process acknowledges.
//
// Interface: req (start), probe[2:0] (guards, unbundled), clr_n in;
// preq[2:0] out / pack[2:0] in to the processes; ack out. Timing: each
// element takes 2*DLY time units to test its guard.
//
// Structure follows the library's three-element loop example; the
// processes are outside the module.
//
// Tool note: The three elements form a ring, which lint reports as
// circular logic (UNOPTFLAT); the ring is the circuit's purpose.
module qsel_loop3 #(
  parameter int unsigned DLY = 1
) (
  input  logic       req,
  input  logic [2:0] probe,
  input  logic       clr_n,
  output logic [2:0] preq,
  input  logic [2:0] pack,
  output logic       ack
);
  logic [2:0] fout, snext;

  qsel_init #(.DLY(DLY)) u_q1 (
    .req(fout[2]), .probe(probe[0]), .smpl(snext[2]), .init(req), .clr_n(clr_n),
    .tout(preq[0]), .fout(fout[0]), .snext(snext[0]));
  qsel #(.DLY(DLY)) u_q2 (
    .req(fout[0]), .probe(probe[1]), .smpl(snext[0]), .clr_n(clr_n),
    .tout(preq[1]), .fout(fout[1]), .snext(snext[1]));
  qsel #(.DLY(DLY)) u_q3 (
    .req(fout[1]), .probe(probe[2]), .smpl(snext[1]), .clr_n(clr_n),
    .tout(preq[2]), .fout(fout[2]), .snext(snext[2]));

  assign ack = ^pack;
endmodule

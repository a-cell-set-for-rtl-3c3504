// mesh_element: the routing element attached to one processor of a
// two-dimensional mesh. Packets are routed first along X, then along Y,
// then delivered to the processor; an X and a Y router work in parallel,
// so the element can move one packet along X and another along Y at once.
//
// How it works: the X router takes packets from the processor (pin) and
// from the X input (xin). It decrements the first word (the X hop count):
// non-zero -> the packet continues on xout; zero -> the word is dropped and
// the rest of the packet turns into the Y router. The Y router takes that
// internal channel and the Y input (yin) and does the same with the Y hop
// count: non-zero -> yout, zero -> the rest (the payload) goes to the
// processor on pout. A hop count of n+1 therefore moves a packet n steps;
// the four-bit field limits a packet to 15 steps per dimension.
//
// Interface: clr_n, init (one transition starts both polling rings), and
// five two-phase bundled-data channels of five-bit words (four-bit field
// plus end-of-packet tag): pin, xin, yin in; xout, yout, pout out.
// Timing: asynchronous; DLY scales the modelled cell delays.
//
// The two-router structure and the X-then-Y rule follow the routing chip
// example; the routers' internal control is this design's reconstruction.
//
// Tool note: The two routers share data buses that are fed back through
// the word registers; lint reports circular logic (UNOPTFLAT) on x_word
// and pout. The loops are closed only through latches that are never open
// at the same time in operation.
module mesh_element
  import router_pkg::*;
#(
  parameter int unsigned DLY = 1
) (
  input  logic  clr_n,
  input  logic  init,
  input  logic  pin_req,
  output logic  pin_ack,
  input  word_t pin,
  input  logic  xin_req,
  output logic  xin_ack,
  input  word_t xin,
  input  logic  yin_req,
  output logic  yin_ack,
  input  word_t yin,
  output logic  xout_req,
  input  logic  xout_ack,
  output word_t xout,
  output logic  yout_req,
  input  logic  yout_ack,
  output word_t yout,
  output logic  pout_req,
  input  logic  pout_ack,
  output word_t pout
);
  logic  xy_req, xy_ack;
  word_t x_word;

  router_macro #(.DLY(DLY)) u_xr (
    .clr_n(clr_n), .init(init),
    .ina_req(pin_req), .ina_ack(pin_ack), .ina(pin),
    .inb_req(xin_req), .inb_ack(xin_ack), .inb(xin),
    .outs_req(xout_req), .outs_ack(xout_ack),
    .outp_req(xy_req),   .outp_ack(xy_ack),
    .out(x_word));
  assign xout = x_word;

  router_macro #(.DLY(DLY)) u_yr (
    .clr_n(clr_n), .init(init),
    .ina_req(xy_req),  .ina_ack(xy_ack), .ina(x_word),
    .inb_req(yin_req), .inb_ack(yin_ack), .inb(yin),
    .outs_req(yout_req), .outs_ack(yout_ack),
    .outp_req(pout_req), .outp_ack(pout_ack),
    .out(pout));
  assign yout = pout;
endmodule

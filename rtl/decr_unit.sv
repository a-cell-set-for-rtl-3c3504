// decr_unit: two-phase carry-completion decrement unit of the router. A
// request transition on r computes v - 1 with the four-bit carry-completion
// decrementer, holds the result on mid, and answers with a transition on a.
//
// How it works (two-phase to four-phase conversion):
//  - en_raw = r xor cap is high while a request is outstanding; en, the
//    decrementer's four-phase request, is en_raw one buffer delay later.
//  - done = cout or dout of the last bit: the carry chain has finished.
//  - The result latch is open while a request is outstanding and closes
//    when cap takes the value of r, which happens as done rises; en then
//    falls and the carry wires reset.
//  - The acknowledge latch is open while done is low, so a takes the new
//    value of cap once the decrementer has reset: the four-phase cycle is
//    complete before the two-phase acknowledge.
// Clear forces cap, a and mid low (r must be low).
//
// Interface: r / a (two-phase), v (value), mid (result), clr_n. Timing: a
// follows r after 2*DLY plus the carry chain. mid is stable from a until
// the next request.
//
// The decrementer follows the library cell; the converter is this design's
// own (the library mentions only that such a converter can be used).
//
// Tool note: The request/capture latches and the carry chain form a
// deliberate loop (cap feeds the enable that produces done, which loads
// cap); lint reports it as circular logic (UNOPTFLAT). Synthesis drops
// the one-buffer enable delay, which a real implementation must build
// from a buffer cell.
module decr_unit
  import router_pkg::*;
#(
  parameter int unsigned DLY = 1
) (
  input  logic               r,
  output logic               a,
  input  logic [FIELD_W-1:0] v,
  output logic [FIELD_W-1:0] mid,
  input  logic               clr_n
);
  logic               cap, en_raw, en, cout, dout, done;
  logic [FIELD_W-1:0] sum;

  assign en_raw = r ^ cap;
  delay_n #(.N(1), .UNIT(DLY)) u_dly (.din(en_raw), .dout(en));

  // din = 1, cin = 0: add the all-ones word with no carry in, i.e. v - 1.
  ccs_decr4 u_dec (.din_v(v), .cin(1'b0), .din(1'b1), .en(en),
                   .sum(sum), .cout(cout), .dout(dout));
  assign done = cout | dout;

  always_latch begin
    if (!clr_n)    cap = 1'b0;
    else if (done) cap = r;
  end

  // Cleared as well: the result feeds the word register, whose output is
  // this unit's input, so an uncleared start-up state could form a
  // free-running loop through two open latches.
  always_latch begin
    if (!clr_n)        mid = '0;
    else if (r != cap) mid = sum;
  end

  always_latch begin
    if (!clr_n)     a = 1'b0;
    else if (!done) a = cap;
  end
endmodule

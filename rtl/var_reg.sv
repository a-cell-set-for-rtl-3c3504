// var_reg: the router's word register ("VAR"), a five-bit transition
// register with three two-phase write ports: port 0 and port 1 load a word
// from one of the two input channels, port 2 loads the decremented address
// field while keeping the register's own tag bit.
//
// How it works: a three-client Call merges the write requests onto the
// pass input of a normally opaque transition register; the same transition
// delayed by DLY_N buffers closes it again (capture) and is the Call's
// acknowledge, which returns to the writing port. The input multiplexer
// chooses the port whose request and acknowledge differ (the one writing);
// that choice is settled before the register opens, as both follow the
// same request wire, and stays until after it closes.
//
// Interface: r0/a0/in0, r1/a1/in1 (word writes), r2/a2/in2 (field write),
// q (register contents). Rules: one write at a time; write data stable
// from the request until the acknowledge. Timing: a write is acknowledged
// DLY_N*DLY time units plus the Call's C-element delays after its request.
// The register is data path and is not cleared.
//
// The three ports, the field/tag split and the role follow the router's
// data path schematic; the inside is this design's construction from the
// library cells (Call, Delay, TLNO register).
//
// Tool note: The register output feeds back through the decrement path to
// write port 2, a loop lint reports as circular logic (UNOPTFLAT).
// Synthesis drops the matched write delay, so a zero-delay netlist would
// never open the register; in silicon it must be a real buffer chain.
module var_reg
  import router_pkg::*;
#(
  parameter int unsigned DLY_N = 2,
  parameter int unsigned DLY   = 1
) (
  input  logic               r0,
  output logic               a0,
  input  word_t              in0,
  input  logic               r1,
  output logic               a1,
  input  word_t              in1,
  input  logic               r2,
  output logic               a2,
  input  logic [FIELD_W-1:0] in2,
  output word_t              q
);
  logic  wr, wdone;
  word_t dmux;

  call3 u_call (.r1(r0), .a1(a0), .r2(r1), .a2(a1), .r3(r2), .a3(a2), .rs(wr), .as_i(wdone));

  delay_n #(.N(DLY_N), .UNIT(DLY)) u_dly (.din(wr), .dout(wdone));

  always_comb begin
    if (r0 ^ a0)      dmux = in0;
    else if (r1 ^ a1) dmux = in1;
    else              dmux = {q[TAG_BIT], in2};
  end

  tlatch #(.WIDTH(WORD_W), .OPAQUE(1'b1), .HAS_CLR(1'b0)) u_reg (
    .d(dmux), .c(wdone), .p(wr), .clr_n(1'b1), .q(q));
endmodule

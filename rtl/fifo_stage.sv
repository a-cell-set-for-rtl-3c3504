// fifo_stage: one word of a self-timed first-in first-out buffer with a
// two-phase bundled-data channel on each side.
//
// How it works: a C-element with clear takes rin and the inverted aout. It
// fires when a new word has been offered (rin toggled) and the stage is
// empty (the last word was taken: aout has caught up with the stage's own
// output). Its output closes the normally transparent WIDTH-bit transition
// register on the word (capture) and is at once the acknowledge to the
// sender and the request to the receiver. The receiver's acknowledge on
// aout reopens the register (pass), emptying the stage.
//
// Interface: rin / ain_rout / aout (ain and rout are one wire), d[WIDTH]
// in, q[WIDTH] out, clr_n. Rules: d stable before rin toggles; after clear
// all control wires are low. Timing: zero-delay; ain_rout follows rin at
// once when the stage is empty. The register is transparent while empty,
// so q follows d then.
//
// Structure follows the library example (inverted-A C-element with clear,
// eight-bit TLNT register).
module fifo_stage #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             rin,
  output logic             ain_rout,
  input  logic             aout,
  input  logic             clr_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  c_elem #(.INV_A(1'b1), .INV_B(1'b0), .HAS_CLR(1'b1)) u_c (
    .a(aout), .b(rin), .clr_n(clr_n), .q(ain_rout));

  tlatch #(.WIDTH(WIDTH), .OPAQUE(1'b0), .HAS_CLR(1'b0)) u_reg (
    .d(d), .c(ain_rout), .p(aout), .clr_n(1'b1), .q(q));
endmodule

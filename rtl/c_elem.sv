// c_elem: two-input Muller C-element, the "AND of transitions" of two-phase
// signalling. The output takes the common value of the inputs when they
// agree and holds its last value when they differ.
//
// How it works: the library cell is one multiplexer module whose data inputs
// are ground, the fed-back output twice, and supply, selected by A and B.
// That is a level latch that is open while the (optionally inverted) inputs
// agree and loads their common value; it is written here as such.
// Parameters select the six library variants: INV_A / INV_B invert one
// input (c-elem-a, c-elem-b), HAS_CLR adds the active-low clear
// (c-elem-mc, -mca, -mcb), which forces the output low. With HAS_CLR = 0 the
// clr_n pin is unused, as that cell has no clear pin.
//
// Interface: a, b, clr_n in; q out. Timing: q changes DLY time units after
// the input that makes the inputs agree (the cell's propagation delay; a
// synthesis tool ignores it). Circuits built from these cells rely on that
// delay: in the FIFO stage, the receiver's acknowledge must open the
// register before the C-element's own output closes it again.
//
// The gate function and variants follow the library; writing the cell as an
// always_latch (rather than a mux with a combinational feedback wire) is this
// design's choice, as is modelling its delay (DLY = 1) for simulation. The
// latch the tools report is the intended state element.
//
// Tool note: The state is held by feedback through the always_latch; lint
// tools report this as a combinational loop (UNOPTFLAT) when the cell
// sits inside a larger self-timed loop, which is intended.
module c_elem #(
  parameter bit INV_A   = 1'b0,
  parameter bit INV_B   = 1'b0,
  parameter bit HAS_CLR = 1'b0,
  parameter int unsigned DLY = 1
) (
  input  logic a,
  input  logic b,
  input  logic clr_n,
  output logic q
);
  logic ai, bi, clear, state;

  assign ai    = a ^ INV_A;
  assign bi    = b ^ INV_B;
  assign clear = HAS_CLR && !clr_n;

  always_latch begin
    if (clear)         state = 1'b0;
    else if (ai == bi) state = ai;
  end

  assign #(DLY) q = state;
endmodule

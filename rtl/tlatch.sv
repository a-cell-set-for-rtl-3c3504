// tlatch: transition latch / transition register for bundled data.
// C ("capture") and P ("pass") are two-phase control wires.
//
// Normally transparent (OPAQUE = 0, library tlnt): the latch passes D to Q
// while C and P are at the same level and holds while they differ, so the
// first event after reset must be on C (capture), the next on P (pass).
// Normally opaque (OPAQUE = 1, library tlno): it passes while C and P differ,
// so the first event must be on P (pass), then C (capture).
// HAS_CLR = 1 (library tlno-mc) adds an active-low clear that forces Q low.
// WIDTH latches sharing C and P form a transition register, such as the
// eight-bit register of the FIFO stage.
//
// Interface: d[WIDTH], c, p, clr_n in; q[WIDTH] out. Timing: zero-delay; the
// latch is level sensitive to (c xor p). Data must be stable at D before the
// capturing transition (bundling constraint, kept by the environment).
//
// The open/hold rule of each variant is the library's multiplexer cell
// written as an always_latch; the clear being unused unless HAS_CLR is set is
// this design's choice. The latch the tools report is the intended storage.
//
// Tool note: Lint may report 'no latches detected' (NOLATCH) because the
// enable is an XOR of two inputs it cannot prove to hold; the block is an
// intended level latch.
module tlatch #(
  parameter int unsigned WIDTH   = 1,
  parameter bit          OPAQUE  = 1'b0,
  parameter bit          HAS_CLR = 1'b0
) (
  input  logic [WIDTH-1:0] d,
  input  logic             c,
  input  logic             p,
  input  logic             clr_n,
  output logic [WIDTH-1:0] q
);
  logic open_l, clear;

  assign open_l = (c ^ p) == OPAQUE;
  assign clear  = HAS_CLR && !clr_n;

  always_latch begin
    if (clear)       q = '0;
    else if (open_l) q = d;
  end
endmodule

// tselect: two-way transition Select. A transition on tin leaves on outt
// when the bundled Boolean sel is 1 and on outf when it is 0.
//
// How it works: two level latches, one per output. The outt latch is open
// while sel = 1 and loads tin xor outf; the outf latch is open while
// sel = 0 and loads tin xor outt. The invariant tin = outt xor outf therefore
// holds after every event, and a tin transition toggles the output whose
// latch is open. Clear forces both outputs low (tin must then be low).
//
// Interface: tin, sel, clr_n in; outt, outf out. Rules (bundling constraint
// on the environment): sel must be valid before a tin transition and stay
// valid until the output transition has happened. Timing: zero-delay.
//
// Structure follows the library cell (two XORs, two latches with clear).
// The tools may report the two cross-coupled latches as a loop: only one
// latch is open at a time, so the loop never conducts.
//
// Tool note: Each output latch loads from the other output, so lint
// reports circular logic (UNOPTFLAT); it also reports 'no latches
// detected' (NOLATCH) because it cannot prove that the enables ever hold.
// Both latches are intended level latches.
module tselect (
  input  logic tin,
  input  logic sel,
  input  logic clr_n,
  output logic outt,
  output logic outf
);
  always_latch begin
    if (!clr_n)    outt = 1'b0;
    else if (sel)  outt = tin ^ outf;
  end

  always_latch begin
    if (!clr_n)    outf = 1'b0;
    else if (!sel) outf = tin ^ outt;
  end

  // Bundling rule: sel may not change while a tin transition is pending.
  property p_sel_stable;
    @(sel) disable iff (!clr_n) (tin == (outt ^ outf));
  endproperty
  a_sel_stable: assert property (p_sel_stable)
    else $error("tselect: sel changed while a transition was pending");
endmodule

// toggle: transition Toggle. Input transitions leave alternately on out0 and
// out1, the first one after clear on out0.
//
// How it works: two level latches in a ring. The out0 latch is open while
// tin is high and loads NOT out1; the out1 latch is open while tin is low
// and loads out0. A rising tin toggles out0, the following falling tin
// copies it to out1, so the outputs take turns. Clear forces both low
// (tin must be low at clear).
//
// Interface: tin, clr_n in; out0, out1 out. Timing: zero-delay.
//
// Structure follows the library cell (two latches with clear, inversion at
// the out0 latch input).
//
// Tool note: The two latches feed each other; lint reports the pair as
// circular logic (UNOPTFLAT), which is how the cell holds its state.
module toggle (
  input  logic tin,
  input  logic clr_n,
  output logic out0,
  output logic out1
);
  always_latch begin
    if (!clr_n)   out0 = 1'b0;
    else if (tin) out0 = ~out1;
  end

  always_latch begin
    if (!clr_n)    out1 = 1'b0;
    else if (!tin) out1 = out0;
  end
endmodule

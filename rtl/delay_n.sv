// delay_n: behavioural model of the N-module delay line, a chain of N
// non-inverting buffer macros used to add delay to a control wire so that
// bundled data, or a value being latched, settles before the transition
// arrives.
//
// How it works: N buffer stages in series, each modelled with a delay of
// UNIT time units. A synthesis tool ignores the delays and sees N buffers
// (a keep attribute or placement constraint is needed in a real part to stop
// them being optimised away); the delay itself is a physical property of the
// buffers, which is why this is a behavioural model.
//
// Interface: din in, dout out. Timing: dout follows din after N*UNIT time
// units (inertial: pulses shorter than UNIT are filtered).
//
// The chain of buffers follows the library; UNIT = 1 is this design's choice.
//
// Tool note: The delay is the whole function of this block and exists
// only in simulation; synthesis reduces it to a wire, so a real
// implementation must use placed buffer cells of known delay.
module delay_n #(
  parameter int unsigned N    = 2,
  parameter int unsigned UNIT = 1
) (
  input  logic din,
  output logic dout
);
  logic [N:0] stage;

  assign stage[0] = din;
  for (genvar i = 0; i < N; i++) begin : g_buf
    assign #(UNIT) stage[i+1] = stage[i];
  end
  assign dout = stage[N];
endmodule

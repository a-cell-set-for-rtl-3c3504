// fifo4: DEPTH-word deep, WIDTH-bit wide self-timed FIFO made by stacking
// fifo_stage cells. Each stage's combined acknowledge/request wire is the
// request of the next stage and the acknowledge (aout) of the previous one.
// Words ripple forward on their own until they reach the last full stage,
// so the FIFO holds up to DEPTH words with no clock.
//
// Interface: input channel rin / ain / d[WIDTH], output channel rout /
// aout / q[WIDTH], both two-phase bundled data; clr_n clears the control.
// Timing: zero-delay; a word offered to an empty FIFO appears on the output
// channel within the same time step.
//
// Structure follows the library example (four stacked eight-bit words).
module fifo4 #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             rin,
  output logic             ain,
  input  logic [WIDTH-1:0] d,
  output logic             rout,
  input  logic             aout,
  input  logic             clr_n,
  output logic [WIDTH-1:0] q
);
  logic [DEPTH:0]            req;
  logic [DEPTH:0][WIDTH-1:0] data;
  logic [DEPTH-1:0]          ack;

  assign req[0]  = rin;
  assign data[0] = d;
  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    fifo_stage #(.WIDTH(WIDTH)) u_stage (
      .rin(req[k]), .ain_rout(req[k+1]), .aout(ack[k]), .clr_n(clr_n),
      .d(data[k]), .q(data[k+1]));
    if (k < DEPTH - 1) begin : g_link
      assign ack[k] = req[k+2];
    end else begin : g_last
      assign ack[k] = aout;
    end
  end

  assign ain  = req[1];
  assign rout = req[DEPTH];
  assign q    = data[DEPTH];
endmodule

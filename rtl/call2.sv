// call2: two-client transition Call, the hardware form of a subroutine call.
// A transition on R1 or R2 starts the shared subroutine with a transition on
// RS; the subroutine's acknowledge AS is routed back to the client that
// called, on A1 or A2.
//
// How it works: RS = R1 xor R2 merges the two request wires. A1 is a
// C-element of R1 and (R2 xor AS): once client 1 has requested and the
// subroutine has answered, both inputs agree and A1 follows. A2 is the mirror
// image. No clear: all requests are held low at initialisation, which drives
// every internal wire and both acknowledges low.
//
// Interface: r1/a1 and r2/a2 are the client channels, rs/as_i the
// subroutine channel. Rules: requests are mutually exclusive and a full
// request/acknowledge cycle must finish before the next request.
// Timing: zero-delay; rs follows a request at once and the acknowledge
// follows as_i at once.
//
// Structure follows the library cell (three XORs, two C-elements without
// clear).
module call2 (
  input  logic r1,
  output logic a1,
  input  logic r2,
  output logic a2,
  output logic rs,
  input  logic as_i
);
  logic x1, x2;

  assign rs = r1 ^ r2;
  assign x1 = r2 ^ as_i;
  assign x2 = r1 ^ as_i;

  c_elem u_c1 (.a(x1), .b(r1), .clr_n(1'b1), .q(a1));
  c_elem u_c2 (.a(x2), .b(r2), .clr_n(1'b1), .q(a2));
endmodule

// call3: three-client transition Call built from two cascaded two-client
// Calls. Clients 1 and 2 share the first call2, whose subroutine channel is
// client 1 of the second call2; client 3 is the second call2's client 2.
//
// Interface: r1..r3 / a1..a3 client channels, rs / as_i subroutine channel.
// Same rules as call2: mutually exclusive requests, no clear, all requests
// low at initialisation. Timing: zero-delay.
//
// The cascade follows the library.
//
// Tool note: The cascade's inner request and acknowledge form a loop
// through the C-elements of both stages; lint reports it as circular
// logic (UNOPTFLAT). It is the intended self-timed feedback.
module call3 (
  input  logic r1,
  output logic a1,
  input  logic r2,
  output logic a2,
  input  logic r3,
  output logic a3,
  output logic rs,
  input  logic as_i
);
  logic rs12, as12;

  call2 u_c12 (.r1(r1),   .a1(a1),   .r2(r2), .a2(a2), .rs(rs12), .as_i(as12));
  call2 u_c3  (.r1(rs12), .a1(as12), .r2(r3), .a2(a3), .rs(rs),   .as_i(as_i));
endmodule

// call4: four-client transition Call, a chain of two-client Calls in the
// same way as the three-client Call: clients 0-2 share a call3, whose
// subroutine channel is client 1 of a final call2; client 3 is that call2's
// client 2.
//
// Interface: r[3:0] client requests, a[3:0] client acknowledges, rs / as_i
// subroutine channel. Rules as call2 (mutually exclusive requests, all low
// at initialisation, no clear). Timing: zero-delay.
//
// The library says the four-client Call is "constructed similarly" to the
// three-client cascade; the chain written here uses three call2 cells,
// matching the library's cell count.
module call4 (
  input  logic [3:0] r,
  output logic [3:0] a,
  output logic       rs,
  input  logic       as_i
);
  logic rs012, as012;

  call3 u_c012 (.r1(r[0]), .a1(a[0]), .r2(r[1]), .a2(a[1]), .r3(r[2]), .a3(a[2]),
                .rs(rs012), .as_i(as012));
  call2 u_c3   (.r1(rs012), .a1(as012), .r2(r[3]), .a2(a[3]), .rs(rs), .as_i(as_i));
endmodule

// call3a: three-client transition Call written directly rather than as a
// cascade: fewer cells, more fan-in on each request.
//
// How it works: RS is the parity of the three requests. Client n is
// acknowledged by a C-element of Rn and (AS xor the other two requests):
// the second input reaches Rn's level exactly when the subroutine has
// answered a request made by client n. This is the two-client rule extended
// to three clients.
//
// Interface and rules as call3. Timing: zero-delay.
//
// The library builds this from three-input XOR-type gates and C-elements;
// the gate-level wiring is not copied, only the function, which is this
// design's reading of the cell.
module call3a (
  input  logic r1,
  output logic a1,
  input  logic r2,
  output logic a2,
  input  logic r3,
  output logic a3,
  output logic rs,
  input  logic as_i
);
  logic x1, x2, x3;

  assign rs = r1 ^ r2 ^ r3;
  assign x1 = as_i ^ r2 ^ r3;
  assign x2 = as_i ^ r1 ^ r3;
  assign x3 = as_i ^ r1 ^ r2;

  c_elem u_c1 (.a(x1), .b(r1), .clr_n(1'b1), .q(a1));
  c_elem u_c2 (.a(x2), .b(r2), .clr_n(1'b1), .q(a2));
  c_elem u_c3 (.a(x3), .b(r3), .clr_n(1'b1), .q(a3));
endmodule

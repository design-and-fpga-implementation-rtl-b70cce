// Reversible 2x1 multiplexer used as a switch: one Fredkin gate with its first data input
// grounded.
//
// Fredkin(E, 0, X): when E is 1 the data X is steered to Q, when E is 0 Q carries the
// grounded 0 and X leaves on the garbage line G1. So Q = E & X, G1 = ~E & X, and E passes
// through. This is the structure of the published reversible multiplexer; naming the garbage
// line g1 follows its drawing. Purely combinational.
// Interface: e, x -> e_out, q, g1.
module rev_mux (
  input  logic e,
  input  logic x,
  output logic e_out,
  output logic q,
  output logic g1
);
  fredkin_gate u_fredkin (
    .a(e), .b(1'b0), .c(x),
    .p(e_out), .q(q), .r(g1)
  );
endmodule

// Reversible fuse: the programmable connection of a reversible PROM.
//
// A Feynman gate with a constant-0 target copies the row signal A: one copy (P) continues
// along the row to the next fuse, the other (X) feeds a reversible multiplexer (rev_mux)
// whose other data input is grounded. The enable E therefore acts as the fuse: E = 1 connects
// the row to the output column (Q = A), E = 0 leaves it open (Q = 0). Unlike a burnt fuse the
// connection can be changed by changing E. Quantum cost 1 + 5 = 6 with two garbage lines
// (e_out and g1), as published. Purely combinational.
// Interface: a (row in), e (enable) -> p (row out), q (to the OR column), e_out, g1 (garbage).
module rev_fuse (
  input  logic a,
  input  logic e,
  output logic p,
  output logic q,
  output logic e_out,
  output logic g1
);
  logic x;

  feynman_gate u_copy (
    .a(a), .b(1'b0),
    .p(p), .q(x)
  );

  rev_mux u_mux (
    .e(e), .x(x),
    .e_out(e_out), .q(q), .g1(g1)
  );
endmodule

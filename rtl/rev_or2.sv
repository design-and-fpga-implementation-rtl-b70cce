// Two-input reversible OR gate.
//
// A Peres gate with its third input at 0 gives A ^ B and A & B on separate lines; a CNOT
// controlled by A ^ B then turns A & B into A ^ B ^ AB = A | B. Quantum cost 4 + 1 = 5 with two
// garbage lines (A and A ^ B), which matches the published cost of the reversible OR gate;
// the published text does not show its gates, so this structure is this design's choice.
// Purely combinational.
// Interface: a, b -> y (a | b), g_a, g_x (garbage).
module rev_or2 (
  input  logic a,
  input  logic b,
  output logic y,
  output logic g_a,
  output logic g_x
);
  logic x, ab;

  peres_gate u_peres (
    .a(a), .b(b), .c(1'b0),
    .p(g_a), .q(x), .r(ab)
  );

  feynman_gate u_merge (
    .a(x), .b(ab),
    .p(g_x), .q(y)
  );
endmodule

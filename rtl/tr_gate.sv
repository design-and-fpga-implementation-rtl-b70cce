// TR gate (3x3): P = A, Q = A ^ B, R = AB' ^ C.
//
// Like the Peres gate but the AND term uses the complement of B, so with C tied to 0 it
// produces A & ~B. Purely combinational; reversible (the mapping is a permutation of the
// eight input patterns).
// Interface: a, b, c -> p, q, r.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule

// Reversible 2:4 decoder (the fixed AND array of the smallest PROM).
//
// Inputs A = i[1], B = i[0]; out[m] is 1 for minterm m = {A,B}: out[0] = A'B', out[1] = A'B,
// out[2] = AB', out[3] = AB. Built, as published, from a Peres gate, a TR gate, a NOT gate and
// CNOT gates, here wired so that no line fans out and no garbage is left:
//   Peres(A, B, 0)      -> A, A^B, AB          (AB is out[3])
//   TR(A^B, A, 0)       -> A^B, B, A'B         (A'B is out[1]; (A^B)&~A = A'B)
//   CNOT(A'B -> A^B)    -> AB'                 (out[2])
//   NOT(B)              -> B'
//   CNOT(AB' -> B')     -> B' ^ AB' = A'B'     (out[0])
// Two constant-0 inputs, quantum cost 4 + 4 + 1 + 1 (+ NOT). The exact published wiring is not
// reproduced; this is an equivalent reversible network from the same gate types.
// Purely combinational.
// Interface: i[1:0] -> out[3:0] (one-hot).
module rev_dec2to4 (
  input  logic [1:0] i,
  output logic [3:0] out
);
  logic a_pass, axb, b_copy, axb2, a_n_b, ab_n, b_n;

  peres_gate u_peres (
    .a(i[1]), .b(i[0]), .c(1'b0),
    .p(a_pass), .q(axb), .r(out[3])
  );

  tr_gate u_tr (
    .a(axb), .b(a_pass), .c(1'b0),
    .p(axb2), .q(b_copy), .r(a_n_b)
  );

  feynman_gate u_cnot_ab_n (
    .a(a_n_b),  .b(axb2),
    .p(out[1]), .q(ab_n)
  );

  not_gate u_not (
    .a(b_copy), .p(b_n)
  );

  feynman_gate u_cnot_a_nb_n (
    .a(ab_n), .b(b_n),
    .p(out[2]), .q(out[0])
  );
endmodule

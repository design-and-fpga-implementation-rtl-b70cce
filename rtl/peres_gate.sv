// Peres gate (3x3): P = A, Q = A ^ B, R = AB ^ C.
//
// A Toffoli gate followed by a CNOT, merged into one gate of quantum cost 4. With C tied to 0
// it produces A ^ B and A & B at once, which the decoder and the reversible OR gate use.
// Purely combinational.
// Interface: a, b, c -> p, q, r.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule

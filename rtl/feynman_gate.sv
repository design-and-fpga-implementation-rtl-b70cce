// Feynman (controlled-NOT, CNOT) gate (2x2): P = A, Q = A ^ B.
//
// A is the control and passes through; B is inverted when A is 1. With B tied to 0 the gate
// copies A onto two lines, which is how reversible circuits replace fan-out. Applying the gate
// twice restores the inputs. Purely combinational.
// Interface: a (control), b (target) -> p, q.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule

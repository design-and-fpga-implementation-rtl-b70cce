// Fredkin (controlled-swap) gate (3x3): P = A, Q = A'B ^ AC, R = A'C ^ AB.
//
// A is the control and passes through. When A is 0 the lines B and C go straight through;
// when A is 1 they are swapped. With B tied to 0 it is a reversible 2:1 multiplexer /
// AND gate: Q = A & C and R = ~A & C. Purely combinational; the gate is its own inverse.
// Interface: a (control), b, c -> p, q, r.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule

// Reversible NOT gate (1x1): P = ~A.
//
// The only 1x1 reversible gate; it is its own inverse. Purely combinational, no clock.
// Interface: a -> p.
module not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule

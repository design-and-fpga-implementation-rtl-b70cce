// N-input reversible OR gate, the output column of a reversible PROM.
//
// A chain of N-1 two-input reversible OR gates (rev_or2): stage i ORs the running result with
// input i+1. Each stage leaves two garbage lines, collected in g (2*(N-1) bits). A fuse that is
// not programmed drives 0 into its input, which leaves the OR unchanged. The chain form is
// this design's choice; only the gate's function is published. N defaults to 8 (one column
// of an 8-word PROM). Purely combinational, delay grows linearly with N.
// Interface: x[N-1:0] -> y = |x, g[2N-3:0] (garbage).
module rev_or #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]     x,
  output logic             y,
  output logic [2*N-3:0]   g
);
  logic [N-1:0] acc;

  assign acc[0] = x[0];

  for (genvar i = 1; i < N; i++) begin : g_stage
    rev_or2 u_or2 (
      .a  (acc[i-1]),
      .b  (x[i]),
      .y  (acc[i]),
      .g_a(g[2*(i-1)]),
      .g_x(g[2*(i-1)+1])
    );
  end

  assign y = acc[N-1];

  initial assert (N >= 2) else $error("rev_or: N must be at least 2");
endmodule

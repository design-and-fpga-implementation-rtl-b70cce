// Doubling stage of the reversible decoder tree.
//
// Takes the M one-hot outputs of a smaller decoder and one more input bit c (the new least
// significant address bit) and produces 2M one-hot outputs. Each line goes through a Fredkin
// gate Fredkin(c, 0, line): Q = c & line becomes out[2k+1] and R = ~c & line becomes out[2k].
// The control c passes from gate to gate (top line first) instead of fanning out, and leaves
// the chain on c_out as a garbage line. This follows the published 3:8 and 4:16 decoders.
// Purely combinational.
// Interface: lines[M-1:0], c -> out[2M-1:0], c_out.
module rev_dec_stage #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0]   lines,
  input  logic           c,
  output logic [2*M-1:0] out,
  output logic           c_out
);
  logic [M:0] ctrl;

  // The chain starts at the highest line, as drawn, and ends at line 0.
  assign ctrl[M] = c;

  for (genvar k = 0; k < M; k++) begin : g_fredkin
    fredkin_gate u_fg (
      .a(ctrl[k+1]), .b(1'b0), .c(lines[k]),
      .p(ctrl[k]), .q(out[2*k+1]), .r(out[2*k])
    );
  end

  assign c_out = ctrl[0];
endmodule

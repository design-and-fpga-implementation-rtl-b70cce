// Reversible 4:16 decoder.
//
// A reversible 3:8 decoder decodes i[3:1]; a doubling stage of eight Fredkin gates splits each
// of its lines by i[0]. out[m] is 1 for minterm m = i (A = i[3] most significant). The
// structure (3:8 decoder plus eight Fredkin gates with constant-0 inputs) is the published one.
// Purely combinational.
// Interface: i[3:0] -> out[15:0] (one-hot), g[1:0] (i[1] and i[0] passed through, garbage).
module rev_dec4to16 (
  input  logic [3:0]  i,
  output logic [15:0] out,
  output logic [1:0]  g
);
  logic [7:0] d8;

  rev_dec3to8 u_dec3to8 (
    .i(i[3:1]), .out(d8), .g(g[1])
  );

  rev_dec_stage #(.M(8)) u_stage (
    .lines(d8), .c(i[0]), .out(out), .c_out(g[0])
  );
endmodule

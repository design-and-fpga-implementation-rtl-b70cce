// Reversible 3:8 decoder.
//
// A reversible 2:4 decoder decodes i[2:1]; a doubling stage of four Fredkin gates splits each
// of its lines by i[0]. out[m] is 1 for minterm m = i, so out[0] = A'B'C' ... out[7] = ABC with
// A = i[2]. The structure (2:4 decoder plus four Fredkin gates with constant-0 inputs) is the
// published one. Purely combinational.
// Interface: i[2:0] -> out[7:0] (one-hot), g (i[0] passed through, garbage).
module rev_dec3to8 (
  input  logic [2:0] i,
  output logic [7:0] out,
  output logic       g
);
  logic [3:0] d4;

  rev_dec2to4 u_dec2to4 (
    .i(i[2:1]), .out(d4)
  );

  rev_dec_stage #(.M(4)) u_stage (
    .lines(d4), .c(i[0]), .out(out), .c_out(g)
  );
endmodule

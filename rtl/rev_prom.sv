// Reversible programmable read-only memory (PROM) with N_IN inputs and N_OUT outputs.
//
// Three parts, as in a conventional PROM but built from reversible gates:
//  - a fixed AND array: the reversible decoder (rev_dec2to4, rev_dec3to8 or rev_dec4to16)
//    turns the input into one active line per minterm;
//  - a programmable connection array: a reversible fuse (rev_fuse) at every crossing of a
//    decoder line m and an output column k. Each decoder line runs through the fuses of its
//    row, copied onward by each fuse's Feynman gate; the fuse passes the line into column k
//    when fuse_en[k][m] is 1 and drives 0 otherwise;
//  - one reversible N-input OR gate (rev_or) per output column.
// So out[k] = OR over m of (fuse_en[k][m] & (in == m)), i.e. bit `in` of the fuse map of k.
// The published design fixes the fuse enables per circuit; bringing them out as an input port,
// so that one module serves every program, is this design's choice. row_out returns the
// decoder lines after the last fuse of each row (the reversible pass-through lines).
// Decoders exist for N_IN = 2, 3 and 4 only. The garbage lines of the decoder, fuses and OR
// gates are kept as named but unused signals, which lint reports as unused; that is intended.
// Purely combinational.
// Interface: in[N_IN-1:0], fuse_en[N_OUT-1:0][2**N_IN-1:0] -> out[N_OUT-1:0],
//            row_out[2**N_IN-1:0].
module rev_prom #(
  parameter int unsigned N_IN  = 3,
  parameter int unsigned N_OUT = 3
) (
  input  logic [N_IN-1:0]                  in,
  input  logic [N_OUT-1:0][2**N_IN-1:0]    fuse_en,
  output logic [N_OUT-1:0]                 out,
  output logic [2**N_IN-1:0]               row_out
);
  localparam int unsigned ROWS = 2**N_IN;

  logic [ROWS-1:0] dec;

  // Fixed AND array.
  if (N_IN == 2) begin : g_dec
    rev_dec2to4 u_dec (.i(in), .out(dec));
  end else if (N_IN == 3) begin : g_dec
    logic g;
    rev_dec3to8 u_dec (.i(in), .out(dec), .g(g));
  end else if (N_IN == 4) begin : g_dec
    logic [1:0] g;
    rev_dec4to16 u_dec (.i(in), .out(dec), .g(g));
  end else begin : g_dec_bad
    $error("rev_prom: N_IN must be 2, 3 or 4");
  end

  // Programmable fuse array: row[m][k] is the decoder line m entering fuse (m, k).
  logic [ROWS-1:0][N_OUT:0]   row;
  logic [N_OUT-1:0][ROWS-1:0] col;
  logic [ROWS-1:0][N_OUT-1:0] fuse_e_out, fuse_g1;

  for (genvar m = 0; m < ROWS; m++) begin : g_row
    assign row[m][0] = dec[m];
    for (genvar k = 0; k < N_OUT; k++) begin : g_col
      rev_fuse u_fuse (
        .a    (row[m][k]),
        .e    (fuse_en[k][m]),
        .p    (row[m][k+1]),
        .q    (col[k][m]),
        .e_out(fuse_e_out[m][k]),
        .g1   (fuse_g1[m][k])
      );
    end
    assign row_out[m] = row[m][N_OUT];
  end

  // OR array.
  for (genvar k = 0; k < N_OUT; k++) begin : g_or
    logic [2*ROWS-3:0] g;
    rev_or #(.N(ROWS)) u_or (.x(col[k]), .y(out[k]), .g(g));
  end
endmodule

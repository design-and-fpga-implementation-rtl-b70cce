// Five Boolean functions of four variables built as a programmed 16x5 reversible PROM.
//
// A 4:16 reversible decoder feeds a 16x5 fuse array programmed with
//   F1 = m(0,1,10,11)   F2 = m(9,11,12,13)   F3 = m(0,2,14,15)
//   F4 = m(3,5,6,7)     F5 = m(5,6,8,10)
// with in[3] the most significant minterm bit. f[0] is F1 ... f[4] is F5. The functions and
// the structure are the published ones; the fuse map lives in rev_pkg. Purely combinational.
// Interface: in[3:0] -> f[4:0].
module rev_bool_prom
  import rev_pkg::*;
(
  input  logic [3:0] in,
  output logic [4:0] f
);
  logic [15:0] row_out;

  rev_prom #(.N_IN(4), .N_OUT(5)) u_prom (
    .in     (in),
    .fuse_en({BF_F5, BF_F4, BF_F3, BF_F2, BF_F1}),
    .out    (f),
    .row_out(row_out)
  );
endmodule

// Reversible full adder / full subtracter built as a programmed 8x3 reversible PROM.
//
// A 3:8 reversible decoder feeds an 8x3 fuse array programmed with the minterm lists
// Sum/Difference = m(1,2,4,7), Carry = m(3,5,6,7), Borrow = m(1,2,3,7), with in[2] = A,
// in[1] = B and in[0] = the carry-in (when adding) or borrow-in (when subtracting A - B - in[0]).
// Sum and difference are both the three-input XOR, so they share an output. The programming
// is the published one; the fuse map lives in rev_pkg. Purely combinational.
// Interface: in[2:0] -> sumdiff, carry, borrow.
module rev_full_addsub
  import rev_pkg::*;
(
  input  logic [2:0] in,
  output logic       sumdiff,
  output logic       carry,
  output logic       borrow
);
  logic [2:0] out;
  logic [7:0] row_out;

  rev_prom #(.N_IN(3), .N_OUT(3)) u_prom (
    .in     (in),
    .fuse_en({FA_BORROW, FA_CARRY, FA_SUMDIFF}),
    .out    (out),
    .row_out(row_out)
  );

  assign sumdiff = out[0];
  assign carry   = out[1];
  assign borrow  = out[2];
endmodule

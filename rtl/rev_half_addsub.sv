// Reversible half adder / half subtracter built as a programmed 4x3 reversible PROM.
//
// A 2:4 reversible decoder feeds a 4x3 fuse array programmed with the minterm lists
// Sum/Difference = m(1,2), Carry = m(3), Borrow = m(1), with in[1] = A (minuend) and
// in[0] = B. So sumdiff = A ^ B, carry = A & B and borrow = ~A & B: one circuit adds and
// subtracts at once, the difference being the same XOR as the sum. The programming is the
// published one; the fuse map lives in rev_pkg. Purely combinational.
// Interface: in[1:0] -> sumdiff, carry, borrow.
module rev_half_addsub
  import rev_pkg::*;
(
  input  logic [1:0] in,
  output logic       sumdiff,
  output logic       carry,
  output logic       borrow
);
  logic [2:0]      out;
  logic [3:0]      row_out;

  rev_prom #(.N_IN(2), .N_OUT(3)) u_prom (
    .in     (in),
    .fuse_en({HA_BORROW, HA_CARRY, HA_SUMDIFF}),
    .out    (out),
    .row_out(row_out)
  );

  assign sumdiff = out[0];
  assign carry   = out[1];
  assign borrow  = out[2];
endmodule

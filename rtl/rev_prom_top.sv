// Reversible PROM family: the three programmed reversible PROM circuits side by side.
//
// Each circuit is a reversible decoder (fixed AND array), a reversible fuse array and
// reversible OR gates, programmed for one job:
//   ha_* : 4x3 PROM, half adder / half subtracter of A = ha_in[1], B = ha_in[0];
//   fa_* : 8x3 PROM, full adder / full subtracter of fa_in[2] (A), fa_in[1] (B), fa_in[0] (Cin);
//   bf_f : 16x5 PROM, five Boolean functions of bf_in (bit 0 = F1).
// The circuits share no signal; each keeps its own ports. Purely combinational, no clock.
module rev_prom_top (
  input  logic [1:0] ha_in,
  output logic       ha_sumdiff,
  output logic       ha_carry,
  output logic       ha_borrow,
  input  logic [2:0] fa_in,
  output logic       fa_sumdiff,
  output logic       fa_carry,
  output logic       fa_borrow,
  input  logic [3:0] bf_in,
  output logic [4:0] bf_f
);
  rev_half_addsub u_half (
    .in(ha_in), .sumdiff(ha_sumdiff), .carry(ha_carry), .borrow(ha_borrow)
  );

  rev_full_addsub u_full (
    .in(fa_in), .sumdiff(fa_sumdiff), .carry(fa_carry), .borrow(fa_borrow)
  );

  rev_bool_prom u_bool (
    .in(bf_in), .f(bf_f)
  );
endmodule

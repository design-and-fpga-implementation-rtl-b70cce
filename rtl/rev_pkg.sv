// Shared definitions for the reversible PROM family.
//
// A reversible PROM is programmed by one enable bit per crossing of a decoder line (minterm m)
// and an output column k. The package holds the fuse maps of the three programmed circuits as
// 1-bit-per-minterm masks: bit m of a mask is 1 when minterm m belongs to that output's
// sum-of-minterms. The minterm lists are those of the published circuits (half adder/subtracter,
// full adder/subtracter and five Boolean functions of four variables); packing them as masks is
// this design's own choice.
package rev_pkg;

  // Half adder/subtracter, inputs {A,B}: Sum/Diff = m(1,2), Carry = m(3), Borrow = m(1).
  localparam logic [3:0] HA_SUMDIFF = 4'b0110;
  localparam logic [3:0] HA_CARRY   = 4'b1000;
  localparam logic [3:0] HA_BORROW  = 4'b0010;

  // Full adder/subtracter, inputs {A,B,Cin}: Sum/Diff = m(1,2,4,7), Carry = m(3,5,6,7),
  // Borrow = m(1,2,3,7).
  localparam logic [7:0] FA_SUMDIFF = 8'b1001_0110;
  localparam logic [7:0] FA_CARRY   = 8'b1110_1000;
  localparam logic [7:0] FA_BORROW  = 8'b1000_1110;

  // 16x5 Boolean function PROM, inputs in[3:0].
  localparam logic [15:0] BF_F1 = 16'h0C03;  // m(0,1,10,11)
  localparam logic [15:0] BF_F2 = 16'h3A00;  // m(9,11,12,13)
  localparam logic [15:0] BF_F3 = 16'hC005;  // m(0,2,14,15)
  localparam logic [15:0] BF_F4 = 16'h00E8;  // m(3,5,6,7)
  localparam logic [15:0] BF_F5 = 16'h0560;  // m(5,6,8,10)

endpackage

// fsop_cascade: single-output factorized SOP cascade.
//
// Realizes the symmetric function "at least two of four"
//     F = x1x2 + x1x3 + x1x4 + x2x3 + x2x4 + x3x4
// in its factorized form F = (x1 + x2)(x3 + x4) + x1x2 + x3x4 with four
// 6*6 gates of the new family. The first two gates use a sum as f_{k-2}:
//   g1  f = x1+x2, controls 00: P_{k-1} = 0,             P_k = x1+x2
//   g2  f = x3+x4, controls G0 (G = g1 P_k, 0 = g1 P_{k-1}):
//                              P_{k-1} = (x1+x2)(x3+x4), P_k garbage
//   g3  f = x1x2,  controls 0G: P_{k-1} garbage,         P_k = G + x1x2
//   g4  f = x3x4,  controls 0G: P_{k-1} garbage,         P_k = F
// The constant 0 left on g1's P_{k-1} serves as g2's A_k. Four gates, four
// input constants and three garbage outputs, as the method gives. All ten
// lines are ports, so the module is a bijection; in use zero_in is 0.
// Purely combinational.
module fsop_cascade
  import rev_pkg::*;
(
  input  logic [3:0] x,        // x[i-1] is x_i
  input  logic [3:0] zero_in,  // constant lines, 0 in normal use
  output logic [3:0] x_o,      // x passed through
  output logic [2:0] garbage,  // unused outputs
  output logic       f         // (x1+x2)(x3+x4) + x1x2 + x3x4
);

  logic [3:0] thru [5];
  logic [3:0] pkm1, pk;

  assign thru[0] = x;

  newgate_kk #(.K(6), .KIND(F_OR),  .CARE(4'b0011), .INV(4'b0000)) g1 (
    .a_thru(thru[0]), .a_km1(zero_in[0]), .a_k(zero_in[1]),
    .p_thru(thru[1]), .p_km1(pkm1[0]),    .p_k(pk[0]));
  newgate_kk #(.K(6), .KIND(F_OR),  .CARE(4'b1100), .INV(4'b0000)) g2 (
    .a_thru(thru[1]), .a_km1(pk[0]),      .a_k(pkm1[0]),
    .p_thru(thru[2]), .p_km1(pkm1[1]),    .p_k(pk[1]));
  newgate_kk #(.K(6), .KIND(F_AND), .CARE(4'b0011), .INV(4'b0000)) g3 (
    .a_thru(thru[2]), .a_km1(zero_in[2]), .a_k(pkm1[1]),
    .p_thru(thru[3]), .p_km1(pkm1[2]),    .p_k(pk[2]));
  newgate_kk #(.K(6), .KIND(F_AND), .CARE(4'b1100), .INV(4'b0000)) g4 (
    .a_thru(thru[3]), .a_km1(zero_in[3]), .a_k(pk[2]),
    .p_thru(thru[4]), .p_km1(pkm1[3]),    .p_k(pk[3]));

  assign x_o     = thru[4];
  assign garbage = {pkm1[3], pkm1[2], pk[1]};
  assign f       = pk[3];

endmodule

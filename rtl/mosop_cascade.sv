// mosop_cascade: multi-output SOP cascade of the new reversible gates.
//
// Realizes the three SOPs
//     F1 = BC' + AB' + A'B'C
//     F2 = BC' + AB' + A'BC
//     F3 = AB' + A'BC + AC'
// with six 5*5 gates of the new family, each computing one product as its
// f_{k-2} from the primary lines A, B, C. The gates are placed from a
// connectivity tree of the products: AB', shared by all three outputs,
// comes first; BC' follows it; A'B'C and one copy of A'BC finish F1 and F2;
// a second copy of A'BC and AC' finish F3. Each gate works in the "0G" mode
// (A_{k-1} = 0, signal G on A_k): P_k = f + G accumulates the OR, and
// P_{k-1} = G is a copy of the incoming sum. That copy is how one partial
// sum feeds two branches, since a reversible signal has a fan-out of one.
// The first gate has 0 on both control lines (P_k = AB'); its P_{k-1}, a
// constant 0, is reused as the A_{k-1} of the second gate.
//
//   gate  product  A_{k-1}        A_k              P_{k-1}          P_k
//   g1    AB'      zero_in[0]     zero_in[1]       -> g2 A_{k-1}    AB'
//   g2    BC'      g1 P_{k-1}     g1 P_k           AB' -> g5        BC'+AB'
//   g3    A'B'C    zero_in[2]     g2 P_k           copy -> g4       F1
//   g4    A'BC     zero_in[3]     g3 P_{k-1}       garbage[0]       F2
//   g5    A'BC     zero_in[4]     g2 P_{k-1}       garbage[1]       AB'+A'BC
//   g6    AC'      zero_in[5]     g5 P_k           garbage[2]       F3
//
// Six gates, six input constants and three garbage outputs, as the method
// gives for this example. All nine lines are ports, so the module is a
// bijection on 9 bits; in use zero_in is tied to 0. The gate order along
// the primary lines and the folding of the line inverters into each gate's
// literal polarity are this design's choices. Purely combinational.
module mosop_cascade
  import rev_pkg::*;
(
  input  logic       a,         // primary line A
  input  logic       b,         // primary line B
  input  logic       c,         // primary line C
  input  logic [5:0] zero_in,   // constant lines, 0 in normal use
  output logic       a_o,       // A passed through
  output logic       b_o,       // B passed through
  output logic       c_o,       // C passed through
  output logic [2:0] garbage,   // unused outputs
  output logic       f1,        // BC' + AB' + A'B'C
  output logic       f2,        // BC' + AB' + A'BC
  output logic       f3         // AB' + A'BC + AC'
);

  localparam int unsigned NG = 6;  // gates in the cascade

  // Primary lines between gates: thru[0] enters g1, thru[NG] leaves g6.
  // Bit 0 is A, bit 1 is B, bit 2 is C.
  logic [2:0] thru [NG+1];
  logic [NG-1:0] pkm1, pk;

  assign thru[0] = {c, b, a};

  // g1: AB'
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b011), .INV(3'b010)) g1 (
    .a_thru(thru[0]), .a_km1(zero_in[0]), .a_k(zero_in[1]),
    .p_thru(thru[1]), .p_km1(pkm1[0]),    .p_k(pk[0]));
  // g2: BC'
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b110), .INV(3'b100)) g2 (
    .a_thru(thru[1]), .a_km1(pkm1[0]),    .a_k(pk[0]),
    .p_thru(thru[2]), .p_km1(pkm1[1]),    .p_k(pk[1]));
  // g3: A'B'C
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b111), .INV(3'b011)) g3 (
    .a_thru(thru[2]), .a_km1(zero_in[2]), .a_k(pk[1]),
    .p_thru(thru[3]), .p_km1(pkm1[2]),    .p_k(pk[2]));
  // g4: A'BC, closes F2
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b111), .INV(3'b001)) g4 (
    .a_thru(thru[3]), .a_km1(zero_in[3]), .a_k(pkm1[2]),
    .p_thru(thru[4]), .p_km1(pkm1[3]),    .p_k(pk[3]));
  // g5: A'BC, second copy, on the F3 branch
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b111), .INV(3'b001)) g5 (
    .a_thru(thru[4]), .a_km1(zero_in[4]), .a_k(pkm1[1]),
    .p_thru(thru[5]), .p_km1(pkm1[4]),    .p_k(pk[4]));
  // g6: AC', closes F3
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b101), .INV(3'b100)) g6 (
    .a_thru(thru[5]), .a_km1(zero_in[5]), .a_k(pk[4]),
    .p_thru(thru[6]), .p_km1(pkm1[5]),    .p_k(pk[5]));

  assign {c_o, b_o, a_o} = thru[NG];
  assign garbage = {pkm1[5], pkm1[4], pkm1[3]};
  assign f1 = pk[2];
  assign f2 = pk[3];
  assign f3 = pk[5];

endmodule

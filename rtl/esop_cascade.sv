// esop_cascade: single-output ESOP cascade with reuse of a known-zero line.
//
// Realizes F = BC' ^ AB' ^ A'B'C with three 5*5 gates of the new family,
// one per product, all in the "G0" mode: the running EXOR travels on
// A_{k-1} and leaves on P_k = f ^ G, while P_{k-1} = f G is the product of
// the gate's term with the running sum.
//   g1  f = BC',   controls 00:  P_{k-1} = 0,               P_k = BC'
//   g2  f = AB',   A_{k-1} = BC', A_k = g1 P_{k-1}:
//                               P_{k-1} = BC' AB' = 0,     P_k = BC' ^ AB'
//   g3  f = A'B'C, A_{k-1} = g2 P_k, A_k = g2 P_{k-1}:
//                               P_{k-1} garbage,           P_k = F
// Because BC' and AB' can never both be 1, g2's P_{k-1} is always 0 and is
// used as g3's constant, which saves one constant and one garbage line:
// three gates, two input constants, one garbage output. An assertion checks
// that reused line whenever the constant inputs are 0. All five lines are
// ports, so the module is a bijection. Purely combinational.
module esop_cascade
  import rev_pkg::*;
(
  input  logic       a,        // primary line A
  input  logic       b,        // primary line B
  input  logic       c,        // primary line C
  input  logic [1:0] zero_in,  // constant lines, 0 in normal use
  output logic       a_o,      // A passed through
  output logic       b_o,      // B passed through
  output logic       c_o,      // C passed through
  output logic       garbage,  // unused output
  output logic       f         // BC' ^ AB' ^ A'B'C
);

  logic [2:0] thru [4];
  logic [2:0] pkm1, pk;

  assign thru[0] = {c, b, a};

  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b110), .INV(3'b100)) g1 (
    .a_thru(thru[0]), .a_km1(zero_in[0]), .a_k(zero_in[1]),
    .p_thru(thru[1]), .p_km1(pkm1[0]),    .p_k(pk[0]));
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b011), .INV(3'b010)) g2 (
    .a_thru(thru[1]), .a_km1(pk[0]),      .a_k(pkm1[0]),
    .p_thru(thru[2]), .p_km1(pkm1[1]),    .p_k(pk[1]));
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b111), .INV(3'b011)) g3 (
    .a_thru(thru[2]), .a_km1(pk[1]),      .a_k(pkm1[1]),
    .p_thru(thru[3]), .p_km1(pkm1[2]),    .p_k(pk[2]));

  assign {c_o, b_o, a_o} = thru[3];
  assign garbage = pkm1[2];
  assign f       = pk[2];

  // The product line reused as a constant must be 0 when the cascade is
  // fed its constants.
  always_comb begin
    if (zero_in == '0)
      assert (pkm1[1] == 1'b0)
        else $error("esop_cascade: reused product line is not 0");
  end

endmodule

// rev_full_adder: reversible full adder from two new gates and one Feynman gate.
//
// S = A ^ B ^ Ci and Co = (A ^ B) Ci ^ AB, built as
//   g1  3*3 new gate, f = B,  A_{k-1} = A,       A_k = 0 (mode "G0"):
//         P_{k-1} = AB,            P_k = A ^ B
//   g2  3*3 new gate, f = Ci, A_{k-1} = A ^ B,   A_k = 0 (mode "G0"):
//         P_{k-1} = (A ^ B) Ci,    P_k = S
//   g3  2*2 Feynman gate on the two products:
//         P_1 = AB (garbage), P_2 = Co
// Three gates, two input constants, one garbage output; B and Ci pass
// through. AB takes the Feynman gate's pass-through line, read from the
// side on which its edge enters the gate in the implementation graph. All
// five lines are ports, so the module is a bijection; in use zero_in is 0.
// Purely combinational.
module rev_full_adder
  import rev_pkg::*;
(
  input  logic       a,        // addend A (consumed as g1's A_{k-1})
  input  logic       b,        // addend B
  input  logic       ci,       // carry in
  input  logic [1:0] zero_in,  // constant lines, 0 in normal use
  output logic       b_o,      // B passed through
  output logic       ci_o,     // Ci passed through
  output logic       s,        // sum
  output logic       co,       // carry out
  output logic       garbage   // unused output
);

  logic ab, axb, axb_ci;
  logic [1:0] fy_out;

  newgate_kk #(.K(3), .KIND(F_AND), .CARE(1'b1), .INV(1'b0)) g1 (
    .a_thru(b),  .a_km1(a),   .a_k(zero_in[0]),
    .p_thru(b_o), .p_km1(ab), .p_k(axb));
  newgate_kk #(.K(3), .KIND(F_AND), .CARE(1'b1), .INV(1'b0)) g2 (
    .a_thru(ci),  .a_km1(axb),    .a_k(zero_in[1]),
    .p_thru(ci_o), .p_km1(axb_ci), .p_k(s));
  feynman_kk #(.K(2)) g3 (
    .a({axb_ci, ab}),
    .p(fy_out));

  assign garbage = fy_out[0];
  assign co      = fy_out[1];

endmodule

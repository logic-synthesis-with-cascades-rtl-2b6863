// feynman_kk: the k*k generalized Feynman gate.
//
// The first k-1 lines pass through unchanged and the last output is the
// EXOR of all k inputs: P_i = A_i for i < k, P_k = A_1 ^ ... ^ A_k. With
// k = 2 it is the ordinary controlled-NOT; the cascades use it to EXOR-sum
// several SOP outputs on one line (A_k = 0), or as the final EXOR of the
// full adder. The map is reversible: A_k = P_k ^ P_1 ^ ... ^ P_{k-1}.
//
// Interface: a[i-1] is A_i and p[i-1] is P_i. Purely combinational.
module feynman_kk #(
  parameter int unsigned K = 3  // number of lines, k >= 2
) (
  input  logic [K-1:0] a,  // A_1 .. A_k
  output logic [K-1:0] p   // P_1 .. P_k
);

  always_comb begin
    p        = a;
    p[K-1]   = ^a;
  end

endmodule

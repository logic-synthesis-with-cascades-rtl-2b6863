// newgate_core: the two controlled lines of the new k*k reversible gate.
//
// Every gate of the new family ends in this 3-input, 2-output cell (the
// dotted box of the gate symbol). It takes the control function f = f_{k-2}
// and the two control lines A_{k-1}, A_k and produces
//     P_{k-1} = f & A_{k-1} ^ A_k
//     P_k     = ~f & ~A_k ^ ~A_{k-1}
// For either value of f the map (A_{k-1},A_k) -> (P_{k-1},P_k) is a
// permutation of the four values, which is what makes the whole gate
// reversible. With constants or one signal G on the control lines it
// gives the operating modes the cascades use:
//     00 -> P_{k-1}=0,       P_k=f          0G -> P_{k-1}=G,        P_k=f|G
//     01 -> P_{k-1}=1,       P_k=1          1G -> P_{k-1}=f^G,      P_k=~(f|G)
//     10 -> P_{k-1}=f,       P_k=~f         G0 -> P_{k-1}=f&G,      P_k=f^G
//     11 -> P_{k-1}=~f,      P_k=0          G1 -> P_{k-1}=~(f&G),   P_k=~G
// The equations are those of the gate family; the cell is purely
// combinational, with no clock and no state.
module newgate_core (
  input  logic f,      // control function f_{k-2}
  input  logic a_km1,  // control line A_{k-1}
  input  logic a_k,    // control line A_k
  output logic p_km1,  // output P_{k-1}
  output logic p_k     // output P_k
);

  always_comb begin
    p_km1 = (f & a_km1) ^ a_k;
    p_k   = (~f & ~a_k) ^ ~a_km1;
  end

endmodule

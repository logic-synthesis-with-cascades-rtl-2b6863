// newgate_kk: one k*k gate of the new reversible gate family.
//
// Lines A_1..A_{k-2} pass straight through (P_i = A_i). A control function
// f_{k-2} of those lines drives newgate_core, which maps the two control
// lines A_{k-1}, A_k to P_{k-1} = f A_{k-1} ^ A_k and P_k = f' A_k' ^ A_{k-1}'.
// The family allows any f_{k-2}; this module builds the three forms the
// synthesis methods use: a product, a sum or an EXOR of literals, chosen by
// KIND. CARE picks the lines that enter f and INV the ones that enter
// complemented. A cascade drawing places 1*1 NOT gates on the primary lines
// to present a complemented literal to a gate; here that inversion is
// folded into INV, so the pass-through lines always leave unchanged.
//
// Interface: a_thru[i-1] is line A_i, i = 1..K-2; a_km1 and a_k are A_{k-1}
// and A_k. Purely combinational.
module newgate_kk
  import rev_pkg::*;
#(
  parameter int                unsigned K    = 5,      // gate size k (k >= 3)
  parameter f_kind_e                    KIND = F_AND,  // form of f_{k-2}
  parameter logic [K-3:0]               CARE = '1,     // lines used by f_{k-2}
  parameter logic [K-3:0]               INV  = '0      // lines complemented in f_{k-2}
) (
  input  logic [K-3:0] a_thru,  // A_1 .. A_{k-2}
  input  logic         a_km1,   // A_{k-1}
  input  logic         a_k,     // A_k
  output logic [K-3:0] p_thru,  // P_1 .. P_{k-2} = A_1 .. A_{k-2}
  output logic         p_km1,   // P_{k-1}
  output logic         p_k      // P_k
);

  logic [K-3:0] lit;  // the lines with the chosen polarity
  logic         f;    // f_{k-2}

  always_comb begin
    lit = a_thru ^ INV;
    unique case (KIND)
      F_AND:   f = &(lit | ~CARE);
      F_OR:    f = |(lit & CARE);
      F_XOR:   f = ^(lit & CARE);
      default: f = 1'b0;
    endcase
  end

  assign p_thru = a_thru;

  newgate_core u_core (
    .f     (f),
    .a_km1 (a_km1),
    .a_k   (a_k),
    .p_km1 (p_km1),
    .p_k   (p_k)
  );

endmodule

// sop_chain: single-output SOP cascade of N_PROD new reversible gates.
//
// Realizes F = p_0 + p_1 + ... + p_{N_PROD-1} for products p_i of the
// N_VARS primary lines, one (N_VARS+2)*(N_VARS+2) gate of the new family
// per product, which is the general single-output case of the multi-output
// SOP method. Gate 0 has 0 on both control lines and puts p_0 on P_k.
// Every later gate works in the "0G" mode: the running sum G arrives on
// A_k, P_k = p_i + G passes it on, and P_{k-1} = G is a copy that is not
// needed further (garbage). Gate 0's P_{k-1} is a constant 0 and becomes
// gate 1's A_{k-1}. So the cascade has N_PROD gates, N_PROD input
// constants and N_PROD-1 garbage outputs. N_PROD must be at least 2.
//
// Product i is given by CARE[i] (lines that take part) and INV[i] (lines
// taken complemented). The defaults describe F = AB' + BC' + A'B'C on the
// lines A (bit 0), B, C. All lines are ports, so the module is a bijection
// on N_VARS + N_PROD bits; in use zero_in is 0. Purely combinational.
//
// Constant lines: zero_in[0], zero_in[1] feed gate 0, zero_in[i] feeds the
// A_{k-1} of gate i >= 2. Garbage line garbage[i-1] is gate i's P_{k-1}.
module sop_chain
  import rev_pkg::*;
#(
  parameter int unsigned                         N_VARS = 3,
  parameter int unsigned                         N_PROD = 3,
  parameter logic [N_PROD-1:0][N_VARS-1:0]       CARE   = {3'b111, 3'b110, 3'b011},
  parameter logic [N_PROD-1:0][N_VARS-1:0]       INV    = {3'b011, 3'b100, 3'b010}
) (
  input  logic [N_VARS-1:0] x,        // primary lines
  input  logic [N_PROD-1:0] zero_in,  // constant lines, 0 in normal use
  output logic [N_VARS-1:0] x_o,      // primary lines passed through
  output logic [N_PROD-2:0] garbage,  // unused outputs
  output logic              f         // OR of all products
);

  if (N_PROD < 2) begin : g_check
    $error("sop_chain needs N_PROD >= 2");
  end

  logic [N_VARS-1:0] thru [N_PROD+1];
  logic [N_PROD-1:0] pkm1, pk;

  assign thru[0] = x;

  for (genvar i = 0; i < N_PROD; i++) begin : g_gate
    logic a_km1, a_k;
    if (i == 0) begin : g_first
      assign a_km1 = zero_in[0];
      assign a_k   = zero_in[1];
    end else if (i == 1) begin : g_second
      assign a_km1 = pkm1[0];
      assign a_k   = pk[0];
    end else begin : g_rest
      assign a_km1 = zero_in[i];
      assign a_k   = pk[i-1];
    end
    newgate_kk #(.K(N_VARS + 2), .KIND(F_AND), .CARE(CARE[i]), .INV(INV[i])) u_gate (
      .a_thru(thru[i]),   .a_km1(a_km1),  .a_k(a_k),
      .p_thru(thru[i+1]), .p_km1(pkm1[i]), .p_k(pk[i]));
  end

  assign x_o     = thru[N_PROD];
  assign garbage = pkm1[N_PROD-1:1];
  assign f       = pk[N_PROD-1];

endmodule

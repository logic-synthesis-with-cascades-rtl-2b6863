// esop_chain: single-output ESOP cascade of N_PROD new reversible gates.
//
// Realizes F = p_0 ^ p_1 ^ ... ^ p_{N_PROD-1} for products p_i of the
// N_VARS primary lines, one (N_VARS+2)*(N_VARS+2) gate of the new family
// per product. Gate 0 has 0 on both control lines and puts p_0 on P_k;
// its P_{k-1} is a constant 0. Every later gate works in the "G0" mode: the
// running EXOR G arrives on A_{k-1}, P_k = p_i ^ G passes it on and
// P_{k-1} = p_i G is the product of the new term with the running sum.
//
// When that product is 0 for every input (for example when p_i and all
// earlier terms are disjoint), its line is a constant 0 and serves as the
// next gate's A_k instead of a fresh constant. ZREUSE[i] marks such gates
// (i = 1 .. N_PROD-2); gate 0's zero is always reused and bit N_PROD-1 is
// ignored. Every reuse saves one input constant and one garbage output, so
// with R reuses the cascade has N_PROD gates, N_PROD - R input constants
// and N_PROD - 1 - R garbage outputs. Whether a product is identically 0
// is a property of the function, so ZREUSE is set by whoever orders the
// products; an assertion checks each reused line while the constants are 0.
//
// Product i is given by CARE[i] and INV[i] as in sop_chain. The defaults
// describe F = BC' ^ AB' ^ A'B'C, where BC' AB' = 0 lets gate 1's product
// line be reused. All lines are ports, so the module is a bijection; in use
// zero_in is 0. Purely combinational.
module esop_chain
  import rev_pkg::*;
#(
  parameter int unsigned                   N_VARS = 3,
  parameter int unsigned                   N_PROD = 3,
  parameter logic [N_PROD-1:0][N_VARS-1:0] CARE   = {3'b111, 3'b011, 3'b110},
  parameter logic [N_PROD-1:0][N_VARS-1:0] INV    = {3'b011, 3'b010, 3'b100},
  parameter logic [N_PROD-1:0]             ZREUSE = 3'b010,
  // Derived sizes; not meant to be overridden.
  parameter int unsigned                   N_CONST = n_const(ZREUSE),
  parameter int unsigned                   N_GARB  = N_CONST - 1
) (
  input  logic [N_VARS-1:0]  x,        // primary lines
  input  logic [N_CONST-1:0] zero_in,  // constant lines, 0 in normal use
  output logic [N_VARS-1:0]  x_o,      // primary lines passed through
  output logic [N_GARB-1:0]  garbage,  // unused outputs
  output logic               f         // EXOR of all products
);

  // Is gate i's P_{k-1} reused as gate i+1's A_k?
  function automatic bit reused(logic [N_PROD-1:0] zr, int unsigned i);
    return (i == 0) || (i < N_PROD - 1 && zr[i]);
  endfunction

  // Constant lines used by gates 0 .. n-1.
  function automatic int unsigned consts_before(logic [N_PROD-1:0] zr, int unsigned n);
    int unsigned cnt = 0;
    for (int unsigned g = 0; g < n; g++)
      cnt += (g == 0) ? 2 : (reused(zr, g - 1) ? 0 : 1);
    return cnt;
  endfunction

  // Garbage lines produced by gates 0 .. n-1.
  function automatic int unsigned garb_before(logic [N_PROD-1:0] zr, int unsigned n);
    int unsigned cnt = 0;
    for (int unsigned g = 0; g < n; g++)
      cnt += reused(zr, g) ? 0 : 1;
    return cnt;
  endfunction

  function automatic int unsigned n_const(logic [N_PROD-1:0] zr);
    return consts_before(zr, N_PROD);
  endfunction

  if (N_PROD < 2) begin : g_check
    $error("esop_chain needs N_PROD >= 2");
  end

  logic [N_VARS-1:0] thru [N_PROD+1];
  logic [N_PROD-1:0] pkm1, pk;

  assign thru[0] = x;

  for (genvar i = 0; i < N_PROD; i++) begin : g_gate
    localparam int unsigned CI = consts_before(ZREUSE, i);
    localparam int unsigned GI = garb_before(ZREUSE, i);
    logic a_km1, a_k;
    if (i == 0) begin : g_first
      assign a_km1 = zero_in[0];
      assign a_k   = zero_in[1];
    end else begin : g_next
      assign a_km1 = pk[i-1];
      if (reused(ZREUSE, i - 1)) begin : g_reuse
        assign a_k = pkm1[i-1];
      end else begin : g_const
        assign a_k = zero_in[CI];
      end
    end
    if (!reused(ZREUSE, i)) begin : g_garb
      assign garbage[GI] = pkm1[i];
    end
    newgate_kk #(.K(N_VARS + 2), .KIND(F_AND), .CARE(CARE[i]), .INV(INV[i])) u_gate (
      .a_thru(thru[i]),   .a_km1(a_km1),  .a_k(a_k),
      .p_thru(thru[i+1]), .p_km1(pkm1[i]), .p_k(pk[i]));
  end

  assign x_o = thru[N_PROD];
  assign f   = pk[N_PROD-1];

  // Every product line used as a constant must be 0 while the cascade is
  // fed its constants.
  always_comb begin
    if (zero_in == '0)
      for (int unsigned i = 1; i + 1 < N_PROD; i++)
        if (ZREUSE[i])
          assert (pkm1[i] == 1'b0)
            else $error("esop_chain: reused product line of gate %0d is not 0", i);
  end

endmodule

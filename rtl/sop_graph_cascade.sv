// sop_graph_cascade: multi-output SOP cascade described by its implementation graph.
//
// This is the general form of the multi-output SOP method. Each of the
// N_GATES gates is an (N_VARS+2)*(N_VARS+2) gate of the new family whose
// control function is one product (CARE[g], INV[g]). The gates are listed
// in cascade order and form a forest:
//   SRC[g] < 0   gate g is a root: both control lines are constant 0, so it
//                puts its product on P_k (mode 00);
//   SRC[g] = p   gate g hangs below gate p (p < g) in mode 0G: A_{k-1} is 0
//                and A_k takes gate p's P_k (SIDE[g] = 1, the running sum)
//                or gate p's P_{k-1} (SIDE[g] = 0, the copy of the sum that
//                entered gate p). The copy is how one partial sum reaches
//                two branches, since no line may fan out.
// Output o is the P_k of gate OUT_GATE[o]. The constant 0 that a root leaves
// on its P_{k-1} is reused as the A_{k-1} of the next gate in cascade order.
// Every gate output that nothing reads is a garbage line. Each output may be
// read once; elaboration stops with an error if a graph breaks that rule or
// lists a parent after its child.
//
// Line counts follow from the graph: N_CONST constant inputs (equal to
// N_GATES whenever each root is followed by another gate) and N_GARB garbage
// outputs, both derived parameters. Constant lines are numbered in cascade
// order (a gate's A_{k-1} before its A_k); garbage lines likewise (a gate's
// P_{k-1} before its P_k).
//
// The defaults are the three-function example F1 = BC'+AB'+A'B'C,
// F2 = BC'+AB'+A'BC, F3 = AB'+A'BC+AC' (six gates, six constants, three
// garbage lines), with A on bit 0, B on bit 1, C on bit 2. Building the
// graph from a set of SOPs (the connectivity tree) is done outside the
// hardware. All lines are ports, so the module is a bijection; in use
// zero_in is 0. Purely combinational.
module sop_graph_cascade
  import rev_pkg::*;
#(
  parameter int unsigned                    N_VARS  = 3,
  parameter int unsigned                    N_GATES = 6,
  parameter int unsigned                    N_OUT   = 3,
  parameter logic [N_GATES-1:0][N_VARS-1:0] CARE    = {3'b101, 3'b111, 3'b111, 3'b111, 3'b110, 3'b011},
  parameter logic [N_GATES-1:0][N_VARS-1:0] INV     = {3'b100, 3'b001, 3'b001, 3'b011, 3'b100, 3'b010},
  parameter int                             SRC      [N_GATES] = '{-1, 0, 1, 2, 1, 4},
  parameter logic [N_GATES-1:0]             SIDE    = 6'b100110,
  parameter int                             OUT_GATE [N_OUT]   = '{2, 3, 5},
  // Derived sizes; not meant to be overridden.
  parameter int unsigned                    N_CONST = consts_before(N_GATES),
  parameter int unsigned                    N_GARB  = garb_before(N_GATES)
) (
  input  logic [N_VARS-1:0]  x,        // primary lines
  input  logic [N_CONST-1:0] zero_in,  // constant lines, 0 in normal use
  output logic [N_VARS-1:0]  x_o,      // primary lines passed through
  output logic [N_GARB-1:0]  garbage,  // unused gate outputs
  output logic [N_OUT-1:0]   f         // f[o] is output o
);

  function automatic bit is_root(int g);
    bit r = 1'b0;
    for (int c = 0; c < N_GATES; c++)
      if (c == g) r = SRC[c] < 0;
    return r;
  endfunction

  // Readers of gate g's P_{k-1} (side 0) or P_k (side 1).
  function automatic int unsigned readers(int unsigned g, bit side);
    int unsigned n = 0;
    for (int unsigned c = 0; c < N_GATES; c++)
      if (SRC[c] == int'(g) && SIDE[c] == side) n++;
    if (side)
      for (int unsigned o = 0; o < N_OUT; o++)
        if (OUT_GATE[o] == int'(g)) n++;
    if (!side && is_root(int'(g)) && g + 1 < N_GATES) n++;  // reused zero
    return n;
  endfunction

  // Gate g's A_{k-1} comes from the zero of root g-1.
  function automatic bit zero_fed(int unsigned g);
    return g > 0 && is_root(int'(g) - 1);
  endfunction

  function automatic int unsigned consts_of(int unsigned g);
    return (zero_fed(g) ? 0 : 1) + (is_root(int'(g)) ? 1 : 0);
  endfunction

  function automatic int unsigned consts_before(int unsigned n);
    int unsigned cnt = 0;
    for (int unsigned g = 0; g < n; g++) cnt += consts_of(g);
    return cnt;
  endfunction

  function automatic int unsigned garb_before(int unsigned n);
    int unsigned cnt = 0;
    for (int unsigned g = 0; g < n; g++)
      cnt += (readers(g, 1'b0) == 0 ? 1 : 0) + (readers(g, 1'b1) == 0 ? 1 : 0);
    return cnt;
  endfunction

  logic [N_VARS-1:0]  thru [N_GATES+1];
  logic [N_GATES-1:0] pkm1, pk;

  assign thru[0] = x;

  for (genvar g = 0; g < N_GATES; g++) begin : g_gate
    localparam int unsigned CI = consts_before(g);
    localparam int unsigned GI = garb_before(g);
    logic a_km1, a_k;

    if (SRC[g] >= g) begin : g_order_err
      $error("sop_graph_cascade: gate %0d is fed by a later gate", g);
    end
    if (readers(g, 1'b0) > 1 || readers(g, 1'b1) > 1) begin : g_fanout_err
      $error("sop_graph_cascade: an output of gate %0d is read more than once", g);
    end

    if (zero_fed(g)) begin : g_zero
      assign a_km1 = pkm1[g-1];
    end else begin : g_const_km1
      assign a_km1 = zero_in[CI];
    end

    if (is_root(g)) begin : g_root
      assign a_k = zero_in[CI + (zero_fed(g) ? 0 : 1)];
    end else if (SIDE[g]) begin : g_sum
      assign a_k = pk[SRC[g]];
    end else begin : g_copy
      assign a_k = pkm1[SRC[g]];
    end

    if (readers(g, 1'b0) == 0) begin : g_garb_km1
      assign garbage[GI] = pkm1[g];
    end
    if (readers(g, 1'b1) == 0) begin : g_garb_k
      assign garbage[GI + (readers(g, 1'b0) == 0 ? 1 : 0)] = pk[g];
    end

    newgate_kk #(.K(N_VARS + 2), .KIND(F_AND), .CARE(CARE[g]), .INV(INV[g])) u_gate (
      .a_thru(thru[g]),   .a_km1(a_km1),  .a_k(a_k),
      .p_thru(thru[g+1]), .p_km1(pkm1[g]), .p_k(pk[g]));
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    assign f[o] = pk[OUT_GATE[o]];
  end

  assign x_o = thru[N_GATES];

endmodule

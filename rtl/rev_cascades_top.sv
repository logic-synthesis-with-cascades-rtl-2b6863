// rev_cascades_top: the example reversible cascades, side by side.
//
// The design is a set of independent combinational cascades built from two
// reversible gate families: the k*k generalized Feynman gate (k-1 lines pass
// through, the last becomes the EXOR of all inputs) and the new k*k gate
// family (k-2 lines pass through and drive a control function f; two control
// lines give P_{k-1} = f A_{k-1} ^ A_k and P_k = f' A_k' ^ A_{k-1}'). Each
// cascade below is one worked synthesis example; none shares a line with
// another, so each has its own ports:
//   mo_*   multi-output SOP (three functions of A, B, C), 6 gates
//   fs_*   factorized SOP of "two or more of x1..x4", 4 gates
//   xs_*   EXOR of the three SOPs of mo_*, 6 gates + 3*3 Feynman gate
//   es_*   ESOP BC' ^ AB' ^ A'B'C with a reused zero product line, 3 gates
//   fe_*   factorized ESOP of the pairwise EXOR of x1..x4, 4 gates
//   fa_*   full adder, two new gates + 2*2 Feynman gate
//   sc_*   generic single-output SOP cascade at its default products
//   ec_*   generic single-output ESOP cascade at its default products
//   sg_*   multi-output SOP cascade described by its implementation graph,
//          at its default graph (the same three functions as mo_*)
// Every cascade keeps all its lines: the *_zero inputs are the constant
// lines (0 in normal use) and the *_garbage outputs the lines the function
// does not need. Purely combinational: outputs follow inputs with no clock.
module rev_cascades_top (
  // multi-output SOP
  input  logic       mo_a, mo_b, mo_c,
  input  logic [5:0] mo_zero,
  output logic       mo_a_o, mo_b_o, mo_c_o,
  output logic [2:0] mo_garbage,
  output logic       mo_f1, mo_f2, mo_f3,
  // factorized SOP
  input  logic [3:0] fs_x,
  input  logic [3:0] fs_zero,
  output logic [3:0] fs_x_o,
  output logic [2:0] fs_garbage,
  output logic       fs_f,
  // EXOR of SOPs
  input  logic       xs_a, xs_b, xs_c,
  input  logic [5:0] xs_zero,
  output logic       xs_a_o, xs_b_o, xs_c_o,
  output logic [4:0] xs_garbage,
  output logic       xs_f,
  // ESOP
  input  logic       es_a, es_b, es_c,
  input  logic [1:0] es_zero,
  output logic       es_a_o, es_b_o, es_c_o,
  output logic       es_garbage,
  output logic       es_f,
  // factorized ESOP
  input  logic [3:0] fe_x,
  input  logic [3:0] fe_zero,
  output logic [3:0] fe_x_o,
  output logic [2:0] fe_garbage,
  output logic       fe_e,
  // full adder
  input  logic       fa_a, fa_b, fa_ci,
  input  logic [1:0] fa_zero,
  output logic       fa_b_o, fa_ci_o,
  output logic       fa_s, fa_co,
  output logic       fa_garbage,
  // generic SOP cascade (default products)
  input  logic [2:0] sc_x,
  input  logic [2:0] sc_zero,
  output logic [2:0] sc_x_o,
  output logic [1:0] sc_garbage,
  output logic       sc_f,
  // generic ESOP cascade (default products)
  input  logic [2:0] ec_x,
  input  logic [1:0] ec_zero,
  output logic [2:0] ec_x_o,
  output logic [0:0] ec_garbage,
  output logic       ec_f,
  // graph-described multi-output SOP cascade (default graph)
  input  logic [2:0] sg_x,
  input  logic [5:0] sg_zero,
  output logic [2:0] sg_x_o,
  output logic [2:0] sg_garbage,
  output logic [2:0] sg_f
);

  mosop_cascade u_mosop (
    .a(mo_a), .b(mo_b), .c(mo_c), .zero_in(mo_zero),
    .a_o(mo_a_o), .b_o(mo_b_o), .c_o(mo_c_o),
    .garbage(mo_garbage), .f1(mo_f1), .f2(mo_f2), .f3(mo_f3));

  fsop_cascade u_fsop (
    .x(fs_x), .zero_in(fs_zero),
    .x_o(fs_x_o), .garbage(fs_garbage), .f(fs_f));

  exor_sops_cascade u_exor_sops (
    .a(xs_a), .b(xs_b), .c(xs_c), .zero_in(xs_zero),
    .a_o(xs_a_o), .b_o(xs_b_o), .c_o(xs_c_o),
    .garbage(xs_garbage), .f(xs_f));

  esop_cascade u_esop (
    .a(es_a), .b(es_b), .c(es_c), .zero_in(es_zero),
    .a_o(es_a_o), .b_o(es_b_o), .c_o(es_c_o),
    .garbage(es_garbage), .f(es_f));

  fesop_cascade u_fesop (
    .x(fe_x), .zero_in(fe_zero),
    .x_o(fe_x_o), .garbage(fe_garbage), .e(fe_e));

  rev_full_adder u_fa (
    .a(fa_a), .b(fa_b), .ci(fa_ci), .zero_in(fa_zero),
    .b_o(fa_b_o), .ci_o(fa_ci_o), .s(fa_s), .co(fa_co),
    .garbage(fa_garbage));

  sop_chain u_sop_chain (
    .x(sc_x), .zero_in(sc_zero),
    .x_o(sc_x_o), .garbage(sc_garbage), .f(sc_f));

  esop_chain u_esop_chain (
    .x(ec_x), .zero_in(ec_zero),
    .x_o(ec_x_o), .garbage(ec_garbage), .f(ec_f));

  sop_graph_cascade u_sop_graph (
    .x(sg_x), .zero_in(sg_zero),
    .x_o(sg_x_o), .garbage(sg_garbage), .f(sg_f));

endmodule

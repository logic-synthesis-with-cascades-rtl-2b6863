// exor_sops_cascade: EXOR of three SOPs.
//
// Realizes F = F1 ^ F2 ^ F3 for the three SOPs of mosop_cascade
//     F1 = BC' + AB' + A'B'C, F2 = BC' + AB' + A'BC, F3 = AB' + A'BC + AC'
// The SOPs are built by the six-gate multi-output SOP cascade and then
// EXOR-summed by one 3*3 generalized Feynman gate: F1 and F2 pass through
// it (and become garbage) and its last line carries F1 ^ F2 ^ F3. The
// Feynman gate's fan-in grows with the number of SOPs, so any number of
// them can be summed this way. Seven gates, six input constants, five
// garbage outputs. All nine lines are ports, so the module is a
// bijection; in use zero_in is 0. Which SOP takes the Feynman gate's last
// line is this design's choice. Purely combinational.
module exor_sops_cascade (
  input  logic       a,        // primary line A
  input  logic       b,        // primary line B
  input  logic       c,        // primary line C
  input  logic [5:0] zero_in,  // constant lines, 0 in normal use
  output logic       a_o,      // A passed through
  output logic       b_o,      // B passed through
  output logic       c_o,      // C passed through
  output logic [4:0] garbage,  // unused outputs
  output logic       f         // F1 ^ F2 ^ F3
);

  logic [2:0] sop_garbage;
  logic       f1, f2, f3;
  logic [2:0] fy_out;

  mosop_cascade u_sops (
    .a(a), .b(b), .c(c), .zero_in(zero_in),
    .a_o(a_o), .b_o(b_o), .c_o(c_o),
    .garbage(sop_garbage), .f1(f1), .f2(f2), .f3(f3));

  feynman_kk #(.K(3)) u_sum (
    .a({f3, f2, f1}),
    .p(fy_out));

  assign garbage = {fy_out[1:0], sop_garbage};
  assign f       = fy_out[2];

endmodule

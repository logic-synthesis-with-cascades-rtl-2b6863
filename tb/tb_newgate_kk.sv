// tb_newgate_kk: exhaustive check of gates of the new k*k family.
//
// Four instances cover the three forms of f_{k-2}: the default 5*5 gate
// (f = A_1 A_2 A_3), a 5*5 product with complemented literals
// (f = A_1' A_3), a 6*6 sum (f = A_2 + A_4') and a 6*6 EXOR
// (f = A_1 ^ A_3 ^ A_4). For every input vector the reference f is worked
// out literal by literal in the testbench, the pass-through lines are
// compared with the inputs and the two control outputs with the gate
// equations P_{k-1} = f A_{k-1} ^ A_k, P_k = f' A_k' ^ A_{k-1}'. Every
// instance must map its inputs to all-different outputs.
module tb_newgate_kk;
  import rev_pkg::*;

  int checks = 0, failures = 0;

  logic [5:0] in6;
  logic [4:0] in5;
  logic [2:0] t_and, t_lit;
  logic [3:0] t_or, t_xor;
  logic [1:0] c_and, c_lit, c_or, c_xor;

  newgate_kk dut_and (
    .a_thru(in5[2:0]), .a_km1(in5[3]), .a_k(in5[4]),
    .p_thru(t_and), .p_km1(c_and[0]), .p_k(c_and[1]));
  newgate_kk #(.K(5), .KIND(F_AND), .CARE(3'b101), .INV(3'b001)) dut_lit (
    .a_thru(in5[2:0]), .a_km1(in5[3]), .a_k(in5[4]),
    .p_thru(t_lit), .p_km1(c_lit[0]), .p_k(c_lit[1]));
  newgate_kk #(.K(6), .KIND(F_OR), .CARE(4'b1010), .INV(4'b1000)) dut_or (
    .a_thru(in6[3:0]), .a_km1(in6[4]), .a_k(in6[5]),
    .p_thru(t_or), .p_km1(c_or[0]), .p_k(c_or[1]));
  newgate_kk #(.K(6), .KIND(F_XOR), .CARE(4'b1101), .INV(4'b0000)) dut_xor (
    .a_thru(in6[3:0]), .a_km1(in6[4]), .a_k(in6[5]),
    .p_thru(t_xor), .p_km1(c_xor[0]), .p_k(c_xor[1]));

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: inputs %b got %0h expected %0h", what, in6, got, exp);
    end
  endtask

  // Gate equations for one gate, given the reference f.
  function automatic logic [1:0] ctrl_out(input logic f, input logic akm1, input logic ak);
    logic pkm1, pk;
    pkm1 = (f && akm1) != ak;
    pk   = (!f && !ak) != !akm1;
    return {pk, pkm1};
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen_and [32], seen_lit [32], seen_or [64], seen_xor [64];
    int n;
    for (int v = 0; v < 64; v++) begin
      logic f_and, f_lit, f_or, f_xor;
      in6 = v[5:0];
      in5 = v[4:0];
      #1;
      f_and = in5[0] && in5[1] && in5[2];
      f_lit = !in5[0] && in5[2];
      f_or  = in6[1] || !in6[3];
      f_xor = (in6[0] + in6[2] + in6[3]) % 2 == 1;
      if (v < 32) begin
        check("AND pass-through", 8'(t_and), 8'(in5[2:0]));
        check("AND control",      8'(c_and), 8'(ctrl_out(f_and, in5[3], in5[4])));
        check("literal pass-through", 8'(t_lit), 8'(in5[2:0]));
        check("literal control",  8'(c_lit), 8'(ctrl_out(f_lit, in5[3], in5[4])));
        seen_and[{c_and, t_and}] = 1'b1;
        seen_lit[{c_lit, t_lit}] = 1'b1;
      end
      check("OR pass-through",  8'(t_or),  8'(in6[3:0]));
      check("OR control",       8'(c_or),  8'(ctrl_out(f_or, in6[4], in6[5])));
      check("XOR pass-through", 8'(t_xor), 8'(in6[3:0]));
      check("XOR control",      8'(c_xor), 8'(ctrl_out(f_xor, in6[4], in6[5])));
      seen_or[{c_or, t_or}]    = 1'b1;
      seen_xor[{c_xor, t_xor}] = 1'b1;
    end
    n = 0; foreach (seen_and[i]) n += int'(seen_and[i]);
    check("AND gate reversible", 8'(n), 8'd32);
    n = 0; foreach (seen_lit[i]) n += int'(seen_lit[i]);
    check("literal gate reversible", 8'(n), 8'd32);
    n = 0; foreach (seen_or[i]) n += int'(seen_or[i]);
    check("OR gate reversible", 8'(n), 8'd64);
    n = 0; foreach (seen_xor[i]) n += int'(seen_xor[i]);
    check("XOR gate reversible", 8'(n), 8'd64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_newgate_core: exhaustive check of the two-line core of the new gate.
//
// Compares the eight input combinations with the gate's truth table for
// f = 0 and f = 1 (typed in as a table, not computed from the equations),
// checks the eight operating modes with 0, 1 or a signal G on the control
// lines, and checks that for each f the two control lines are permuted.
module tb_newgate_core;

  logic f, a_km1, a_k, p_km1, p_k;
  int checks = 0, failures = 0;

  newgate_core dut (.f(f), .a_km1(a_km1), .a_k(a_k), .p_km1(p_km1), .p_k(p_k));

  // {P_{k-1},P_k} for {A_{k-1},A_k} = 00, 01, 10, 11
  localparam logic [1:0] TT_F0 [4] = '{2'b00, 2'b11, 2'b01, 2'b10};
  localparam logic [1:0] TT_F1 [4] = '{2'b01, 2'b11, 2'b10, 2'b00};

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: f=%0b A_{k-1}=%0b A_k=%0b got %0b expected %0b",
               what, f, a_km1, a_k, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] seen;
    // Truth table
    for (int fv = 0; fv < 2; fv++) begin
      seen = '0;
      for (int in = 0; in < 4; in++) begin
        f = fv[0]; {a_km1, a_k} = in[1:0];
        #1;
        check("table P_{k-1}", p_km1, fv[0] ? TT_F1[in][1] : TT_F0[in][1]);
        check("table P_k",     p_k,   fv[0] ? TT_F1[in][0] : TT_F0[in][0]);
        seen[{p_km1, p_k}] = 1'b1;
      end
      check("control lines permuted", &seen, 1'b1);
    end
    // Operating modes with signal G
    for (int fv = 0; fv < 2; fv++) begin
      for (int gv = 0; gv < 2; gv++) begin
        logic g;
        g = gv[0]; f = fv[0];
        a_km1 = 0; a_k = 0; #1;
        check("mode 00 P_{k-1}", p_km1, 1'b0);  check("mode 00 P_k", p_k, f);
        a_km1 = 0; a_k = 1; #1;
        check("mode 01 P_{k-1}", p_km1, 1'b1);  check("mode 01 P_k", p_k, 1'b1);
        a_km1 = 1; a_k = 0; #1;
        check("mode 10 P_{k-1}", p_km1, f);     check("mode 10 P_k", p_k, !f);
        a_km1 = 1; a_k = 1; #1;
        check("mode 11 P_{k-1}", p_km1, !f);    check("mode 11 P_k", p_k, 1'b0);
        a_km1 = 0; a_k = g; #1;
        check("mode 0G P_{k-1}", p_km1, g);     check("mode 0G P_k", p_k, f | g);
        a_km1 = 1; a_k = g; #1;
        check("mode 1G P_{k-1}", p_km1, f ^ g); check("mode 1G P_k", p_k, !(f | g));
        a_km1 = g; a_k = 0; #1;
        check("mode G0 P_{k-1}", p_km1, f & g); check("mode G0 P_k", p_k, f ^ g);
        a_km1 = g; a_k = 1; #1;
        check("mode G1 P_{k-1}", p_km1, !(f & g)); check("mode G1 P_k", p_k, !g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

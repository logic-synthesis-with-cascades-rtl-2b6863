// tb_mosop_cascade: checks the multi-output SOP cascade.
//
// With the constant lines at 0, all eight values of A, B, C are applied and
// F1, F2, F3 are compared with the SOPs evaluated directly in the testbench;
// the primary lines must pass through, and the three garbage lines must
// carry the copied partial sums (BC'+AB', AB', AB'+A'BC) that the fan-out
// scheme leaves behind. The port widths must give six input constants and
// three garbage outputs. Finally all 512 values of the nine input lines
// are applied and the 512 output vectors must all differ (reversibility).
module tb_mosop_cascade;

  int checks = 0, failures = 0;

  logic       a, b, c, a_o, b_o, c_o, f1, f2, f3;
  logic [5:0] zero_in;
  logic [2:0] garbage;

  mosop_cascade dut (.*);

  task automatic check(input string what, input logic [9:0] got, input logic [9:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: abc=%b%b%b zero_in=%b got %0h expected %0h",
               what, a, b, c, zero_in, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [512];
    int n;
    check("input constants", 10'($bits(zero_in)), 10'd6);
    check("garbage outputs", 10'($bits(garbage)), 10'd3);
    zero_in = '0;
    for (int v = 0; v < 8; v++) begin
      logic bc_, ab_, a_b_c, a_bc, ac_;
      {a, b, c} = v[2:0];
      #1;
      bc_   = b && !c;
      ab_   = a && !b;
      a_b_c = !a && !b && c;
      a_bc  = !a && b && c;
      ac_   = a && !c;
      check("F1", 10'(f1), 10'(bc_ || ab_ || a_b_c));
      check("F2", 10'(f2), 10'(bc_ || ab_ || a_bc));
      check("F3", 10'(f3), 10'(ab_ || a_bc || ac_));
      check("pass-through", 10'({a_o, b_o, c_o}), 10'({a, b, c}));
      check("garbage 0 (copy of BC'+AB')", 10'(garbage[0]), 10'(bc_ || ab_));
      check("garbage 1 (copy of AB')",     10'(garbage[1]), 10'(ab_));
      check("garbage 2 (copy of AB'+A'BC)", 10'(garbage[2]), 10'(ab_ || a_bc));
    end
    for (int v = 0; v < 512; v++) begin
      {zero_in, a, b, c} = v[8:0];
      #1;
      seen[{f3, f2, f1, garbage, a_o, b_o, c_o}] = 1'b1;
    end
    n = 0; foreach (seen[i]) n += int'(seen[i]);
    check("reversible (distinct outputs of 512)", 10'(n), 10'd512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

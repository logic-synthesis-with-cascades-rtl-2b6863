// tb_exor_sops_cascade: checks the EXOR of three SOPs.
//
// With the constant lines at 0, all eight values of A, B, C are applied and
// F is compared with the EXOR of the three SOPs evaluated in the testbench.
// The two SOPs that pass through the Feynman gate appear on garbage[3] and
// garbage[4]. The port widths must give six input constants and five garbage
// outputs, and all 512 values of the nine input lines must give distinct
// outputs.
module tb_exor_sops_cascade;

  int checks = 0, failures = 0;

  logic       a, b, c, a_o, b_o, c_o, f;
  logic [5:0] zero_in;
  logic [4:0] garbage;

  exor_sops_cascade dut (.*);

  task automatic check(input string what, input logic [9:0] got, input logic [9:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: abc=%b%b%b got %0h expected %0h", what, a, b, c, got, exp);
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
    int n, ones;
    check("input constants", 10'($bits(zero_in)), 10'd6);
    check("garbage outputs", 10'($bits(garbage)), 10'd5);
    zero_in = '0;
    for (int v = 0; v < 8; v++) begin
      logic s1, s2, s3;
      {a, b, c} = v[2:0];
      #1;
      s1 = (b && !c) || (a && !b) || (!a && !b && c);
      s2 = (b && !c) || (a && !b) || (!a && b && c);
      s3 = (a && !b) || (!a && b && c) || (a && !c);
      ones = int'(s1) + int'(s2) + int'(s3);
      check("F = F1^F2^F3", 10'(f), 10'(ones % 2));
      check("F1 passed through", 10'(garbage[3]), 10'(s1));
      check("F2 passed through", 10'(garbage[4]), 10'(s2));
      check("pass-through", 10'({a_o, b_o, c_o}), 10'({a, b, c}));
    end
    for (int v = 0; v < 512; v++) begin
      {zero_in, a, b, c} = v[8:0];
      #1;
      seen[{f, garbage, a_o, b_o, c_o}] = 1'b1;
    end
    n = 0; foreach (seen[i]) n += int'(seen[i]);
    check("reversible (distinct outputs of 512)", 10'(n), 10'd512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

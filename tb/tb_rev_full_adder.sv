// tb_rev_full_adder: checks the reversible full adder.
//
// With the constant lines at 0, all eight values of A, B, Ci are applied and
// {Co, S} must equal A + B + Ci computed as an integer sum. B and Ci must
// pass through, and the garbage line must carry AB. The port widths must give two input constants and one
// garbage output, and all 32 values of the five input lines must give
// distinct outputs.
module tb_rev_full_adder;

  int checks = 0, failures = 0;

  logic       a, b, ci, b_o, ci_o, s, co, garbage;
  logic [1:0] zero_in;

  rev_full_adder dut (.*);

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b ci=%b got %0h expected %0h", what, a, b, ci, got, exp);
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
    bit seen [32];
    int n;
    check("input constants", 8'($bits(zero_in)), 8'd2);
    check("garbage outputs", 8'($bits(garbage)), 8'd1);
    zero_in = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = v[2:0];
      #1;
      check("sum {Co,S}", 8'({co, s}), 8'(int'(a) + int'(b) + int'(ci)));
      check("pass-through", 8'({b_o, ci_o}), 8'({b, ci}));
      check("garbage AB", 8'(garbage), 8'(a && b));
    end
    for (int v = 0; v < 32; v++) begin
      {zero_in, a, b, ci} = v[4:0];
      #1;
      seen[{co, s, garbage, b_o, ci_o}] = 1'b1;
    end
    n = 0; foreach (seen[i]) n += int'(seen[i]);
    check("reversible (distinct outputs of 32)", 8'(n), 8'd32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

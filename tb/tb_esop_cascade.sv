// tb_esop_cascade: checks the single-output ESOP cascade.
//
// With the constant lines at 0, all eight values of A, B, C are applied and
// F is compared with BC' ^ AB' ^ A'B'C evaluated in the testbench. The one
// garbage line must carry the product A'B'C (BC' ^ AB'). The port widths
// must give two input constants and one garbage output, and all 32 values
// of the five input lines must give distinct outputs.
module tb_esop_cascade;

  int checks = 0, failures = 0;

  logic       a, b, c, a_o, b_o, c_o, f, garbage;
  logic [1:0] zero_in;

  esop_cascade dut (.*);

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
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
    bit seen [32];
    int n;
    check("input constants", 8'($bits(zero_in)), 8'd2);
    check("garbage outputs", 8'($bits(garbage)), 8'd1);
    zero_in = '0;
    for (int v = 0; v < 8; v++) begin
      logic t1, t2, t3;
      {a, b, c} = v[2:0];
      #1;
      t1 = b && !c;
      t2 = a && !b;
      t3 = !a && !b && c;
      check("F", 8'(f), 8'((int'(t1) + int'(t2) + int'(t3)) % 2));
      check("garbage", 8'(garbage), 8'(t3 && (t1 != t2)));
      check("pass-through", 8'({a_o, b_o, c_o}), 8'({a, b, c}));
    end
    for (int v = 0; v < 32; v++) begin
      {zero_in, a, b, c} = v[4:0];
      #1;
      seen[{f, garbage, a_o, b_o, c_o}] = 1'b1;
    end
    n = 0; foreach (seen[i]) n += int'(seen[i]);
    check("reversible (distinct outputs of 32)", 8'(n), 8'd32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

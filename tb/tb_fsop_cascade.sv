// tb_fsop_cascade: checks the factorized SOP cascade.
//
// With the constant lines at 0, all sixteen values of x1..x4 are applied and
// F must be 1 exactly when at least two inputs are 1 (counted in the
// testbench). The port widths must give four input constants and three
// garbage outputs, and all 256 values of the eight input lines must give
// distinct outputs.
module tb_fsop_cascade;

  int checks = 0, failures = 0;

  logic [3:0] x, x_o, zero_in;
  logic [2:0] garbage;
  logic       f;

  fsop_cascade dut (.*);

  task automatic check(input string what, input logic [9:0] got, input logic [9:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: x=%b got %0h expected %0h", what, x, got, exp);
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
    bit seen [256];
    int n, ones;
    check("input constants", 10'($bits(zero_in)), 10'd4);
    check("garbage outputs", 10'($bits(garbage)), 10'd3);
    zero_in = '0;
    for (int v = 0; v < 16; v++) begin
      x = v[3:0];
      #1;
      ones = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]);
      check("F (two or more ones)", 10'(f), 10'(ones >= 2));
      check("pass-through", 10'(x_o), 10'(x));
    end
    for (int v = 0; v < 256; v++) begin
      {zero_in, x} = v[7:0];
      #1;
      seen[{f, garbage, x_o}] = 1'b1;
    end
    n = 0; foreach (seen[i]) n += int'(seen[i]);
    check("reversible (distinct outputs of 256)", 10'(n), 10'd256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

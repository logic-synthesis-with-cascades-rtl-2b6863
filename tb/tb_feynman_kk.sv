// tb_feynman_kk: exhaustive check of the k*k generalized Feynman gate.
//
// Runs the default 3*3 gate, a 2*2 gate (controlled-NOT) and a 5*5 gate
// through all input vectors. The pass-through lines must equal the inputs,
// the last line must be the parity of the inputs (counted bit by bit), and
// the outputs of each gate must all differ (the gate is reversible).
module tb_feynman_kk;

  int checks = 0, failures = 0;

  logic [2:0] a3, p3;
  logic [1:0] a2, p2;
  logic [4:0] a5, p5;

  feynman_kk          dut3 (.a(a3), .p(p3));
  feynman_kk #(.K(2)) dut2 (.a(a2), .p(p2));
  feynman_kk #(.K(5)) dut5 (.a(a5), .p(p5));

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic parity(input logic [7:0] v, input int n);
    int ones = 0;
    for (int i = 0; i < n; i++) if (v[i]) ones++;
    return logic'(ones % 2);
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen3 [8];
    bit seen2 [4];
    bit seen5 [32];
    int distinct;
    for (int v = 0; v < 32; v++) begin
      a3 = v[2:0]; a2 = v[1:0]; a5 = v[4:0];
      #1;
      if (v < 8) begin
        check("3*3 pass-through", 8'(p3[1:0]), 8'(a3[1:0]));
        check("3*3 EXOR line",    8'(p3[2]),   8'(parity(8'(a3), 3)));
        seen3[p3] = 1'b1;
      end
      if (v < 4) begin
        check("2*2 pass-through", 8'(p2[0]), 8'(a2[0]));
        check("2*2 EXOR line",    8'(p2[1]), 8'(a2[0] ^ a2[1]));
        seen2[p2] = 1'b1;
      end
      check("5*5 pass-through", 8'(p5[3:0]), 8'(a5[3:0]));
      check("5*5 EXOR line",    8'(p5[4]),   8'(parity(8'(a5), 5)));
      seen5[p5] = 1'b1;
    end
    distinct = 0; foreach (seen3[i]) distinct += int'(seen3[i]);
    check("3*3 reversible", 8'(distinct), 8'd8);
    distinct = 0; foreach (seen2[i]) distinct += int'(seen2[i]);
    check("2*2 reversible", 8'(distinct), 8'd4);
    distinct = 0; foreach (seen5[i]) distinct += int'(seen5[i]);
    check("5*5 reversible", 8'(distinct), 8'd32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

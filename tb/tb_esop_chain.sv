// tb_esop_chain: checks the parameterized single-output ESOP cascade.
//
// Three instances:
//   dut_def  the defaults, F = BC' ^ AB' ^ A'B'C with gate 1's product line
//            reused as a constant (two constants, one garbage output);
//   dut_mix  four lines, four overlapping products and no reuse (four
//            constants, three garbage outputs);
//   dut_x5   the five-input parity function as the EXOR of its sixteen
//            odd-weight minterms; the minterms are disjoint, so every
//            product line is 0 and all are reused (two constants, one
//            garbage output).
// With the constant lines at 0 every primary input value is applied and F
// is compared with a reference computed in the testbench (the expression,
// the products evaluated literal by literal, or the input parity). The
// widths must follow N_PROD - R constants and N_PROD - 1 - R garbage
// outputs for R reuses. The first two instances are also checked to map all
// values of all their lines to distinct outputs.
module tb_esop_chain;

  int checks = 0, failures = 0;

  function automatic logic [15:0][4:0] x5_inv();
    logic [15:0][4:0] r;
    int k = 0;
    for (int m = 0; m < 32; m++)
      if ($countones(m[4:0]) % 2 == 1) begin
        r[k] = ~m[4:0];
        k++;
      end
    return r;
  endfunction

  localparam logic [3:0][3:0] MIX_CARE = {4'b1001, 4'b0110, 4'b0011, 4'b1100};
  localparam logic [3:0][3:0] MIX_INV  = {4'b0001, 4'b0100, 4'b0010, 4'b0000};
  localparam logic [15:0][4:0] X5_CARE = '1;
  localparam logic [15:0][4:0] X5_INV  = x5_inv();

  logic [2:0] d_x, d_xo;
  logic [1:0] d_zero;
  logic [0:0] d_garb;
  logic       d_f;
  logic [3:0] m_x, m_xo, m_zero;
  logic [2:0] m_garb;
  logic       m_f;
  logic [4:0] p_x, p_xo;
  logic [1:0] p_zero;
  logic [0:0] p_garb;
  logic       p_f;

  esop_chain dut_def (.x(d_x), .zero_in(d_zero), .x_o(d_xo), .garbage(d_garb), .f(d_f));
  esop_chain #(.N_VARS(4), .N_PROD(4), .CARE(MIX_CARE), .INV(MIX_INV), .ZREUSE(4'b0000)) dut_mix (
    .x(m_x), .zero_in(m_zero), .x_o(m_xo), .garbage(m_garb), .f(m_f));
  esop_chain #(.N_VARS(5), .N_PROD(16), .CARE(X5_CARE), .INV(X5_INV), .ZREUSE('1)) dut_x5 (
    .x(p_x), .zero_in(p_zero), .x_o(p_xo), .garbage(p_garb), .f(p_f));

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic product(input logic [4:0] x, input logic [4:0] care,
                                   input logic [4:0] inv, input int n);
    for (int i = 0; i < n; i++)
      if (care[i] && (x[i] == inv[i])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen_d [32];
    bit seen_m [256];
    int n;
    logic acc;
    check("default constants", 16'($bits(d_zero)), 16'd2);
    check("default garbage",   16'($bits(d_garb)), 16'd1);
    check("mixed constants",   16'($bits(m_zero)), 16'd4);
    check("mixed garbage",     16'($bits(m_garb)), 16'd3);
    check("parity constants",  16'($bits(p_zero)), 16'd2);
    check("parity garbage",    16'($bits(p_garb)), 16'd1);
    d_zero = '0; m_zero = '0; p_zero = '0;
    for (int v = 0; v < 32; v++) begin
      d_x = v[2:0]; m_x = v[3:0]; p_x = v[4:0];
      #1;
      if (v < 8) begin
        logic a, b, c;
        {c, b, a} = d_x;
        acc = logic'(b && !c) ^ logic'(a && !b) ^ logic'(!a && !b && c);
        check("default F", 16'(d_f), 16'(acc));
        check("default pass-through", 16'(d_xo), 16'(d_x));
      end
      if (v < 16) begin
        acc = 1'b0;
        for (int i = 0; i < 4; i++)
          acc = acc ^ product(5'(m_x), 5'(MIX_CARE[i]), 5'(MIX_INV[i]), 4);
        check("mixed F", 16'(m_f), 16'(acc));
        check("mixed pass-through", 16'(m_xo), 16'(m_x));
      end
      check("parity F", 16'(p_f), 16'($countones(p_x) % 2));
      check("parity pass-through", 16'(p_xo), 16'(p_x));
      check("parity garbage (disjoint terms)", 16'(p_garb), 16'd0);
    end
    for (int v = 0; v < 256; v++) begin
      {m_zero, m_x} = v[7:0];
      {d_zero, d_x} = v[4:0];
      #1;
      seen_m[{m_f, m_garb, m_xo}] = 1'b1;
      if (v < 32) seen_d[{d_f, d_garb, d_xo}] = 1'b1;
    end
    n = 0; foreach (seen_d[i]) n += int'(seen_d[i]);
    check("default reversible", 16'(n), 16'd32);
    n = 0; foreach (seen_m[i]) n += int'(seen_m[i]);
    check("mixed reversible", 16'(n), 16'd256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

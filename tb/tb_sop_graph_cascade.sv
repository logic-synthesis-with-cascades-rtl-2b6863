// tb_sop_graph_cascade: checks the graph-described multi-output SOP cascade.
//
// Two instances:
//   dut_def  the default graph, the three-function example
//            F1 = BC'+AB'+A'B'C, F2 = BC'+AB'+A'BC, F3 = AB'+A'BC+AC';
//            six gates, six constants, three garbage lines;
//   dut_add  a 2-bit adder {s2,s1,s0} = {a1,a0} + {b1,b0} (the adr2
//            benchmark function) written as 11 products, 2 for s0, 6 for
//            s1 and 3 for s2, one chain per output: 11 gates, 11 constants
//            and 8 garbage lines.
// With the constant lines at 0 every primary input value is applied; the
// SOP outputs are compared with the expressions, the adder outputs with
// an integer sum and the rd53 outputs with a count of ones. The line counts are checked through the port widths, and
// the first two instances are driven on all their lines to check that all outputs
// differ (2^9 and 2^15 vectors).
module tb_sop_graph_cascade;

  int checks = 0, failures = 0;

  // Adder products, gate order: s0 (2), s1 (6), s2 (3).
  // Lines: bit 0 a0, bit 1 a1, bit 2 b0, bit 3 b1.
  localparam logic [10:0][3:0] ADD_CARE = {
    4'b1101, 4'b0111, 4'b1010,                                // s2
    4'b1111, 4'b1111, 4'b1110, 4'b1011, 4'b1110, 4'b1011,     // s1
    4'b0101, 4'b0101};                                        // s0
  localparam logic [10:0][3:0] ADD_INV = {
    4'b0000, 4'b0000, 4'b0000,
    4'b1010, 4'b0000, 4'b0110, 4'b0011, 4'b1100, 4'b1001,
    4'b0001, 4'b0100};
  localparam int ADD_SRC [11] = '{-1, 0, -1, 2, 3, 4, 5, 6, -1, 8, 9};
  localparam int ADD_OUT [3]  = '{1, 7, 10};

  // rd53 cover. Bit 1 (two or three ones) pairs each 2-set P of the five
  // inputs with a 3-set T containing it: the product is 1 on P, 0 outside
  // T and free on T\P, so it covers one minterm of weight 2 and one of
  // weight 3. With indices mod 5, P = {i,i+1} goes with T = {i,i+1,i+2} and
  // P = {i,i+2} with T = {i-1,i,i+2}; the ten 3-sets are all different, so
  // the ten products cover the twenty minterms exactly once.
  function automatic logic [30:0][4:0] rd_care();
    logic [30:0][4:0] r;
    for (int g = 0; g < 16; g++) r[g] = '1;
    for (int i = 0; i < 5; i++) begin
      r[16 + i]      = ~(5'b1 << ((i + 2) % 5));
      r[16 + 5 + i]  = ~(5'b1 << ((i + 4) % 5));
      r[26 + i]      = ~(5'b1 << i);
    end
    return r;
  endfunction

  function automatic logic [30:0][4:0] rd_inv();
    logic [30:0][4:0] r;
    int k = 0;
    for (int m = 0; m < 32; m++)
      if ($countones(m[4:0]) % 2 == 1) begin
        r[k] = ~m[4:0];
        k++;
      end
    for (int i = 0; i < 5; i++) begin
      r[16 + i]     = (5'b1 << ((i + 3) % 5)) | (5'b1 << ((i + 4) % 5));
      r[16 + 5 + i] = (5'b1 << ((i + 1) % 5)) | (5'b1 << ((i + 3) % 5));
      r[26 + i]     = '0;
    end
    return r;
  endfunction

  function automatic int rd_src(int g);
    return (g == 0 || g == 16 || g == 26) ? -1 : g - 1;
  endfunction

  localparam logic [30:0][4:0] RD_CARE = rd_care();
  localparam logic [30:0][4:0] RD_INV  = rd_inv();
  localparam int RD_SRC [31] = '{
    rd_src(0),  rd_src(1),  rd_src(2),  rd_src(3),  rd_src(4),  rd_src(5),  rd_src(6),
    rd_src(7),  rd_src(8),  rd_src(9),  rd_src(10), rd_src(11), rd_src(12), rd_src(13),
    rd_src(14), rd_src(15), rd_src(16), rd_src(17), rd_src(18), rd_src(19), rd_src(20),
    rd_src(21), rd_src(22), rd_src(23), rd_src(24), rd_src(25), rd_src(26), rd_src(27),
    rd_src(28), rd_src(29), rd_src(30)};
  localparam int RD_OUT [3] = '{15, 25, 30};

  logic [2:0]  d_x, d_xo;
  logic [5:0]  d_zero;
  logic [2:0]  d_garb;
  logic [2:0]  d_f;
  logic [3:0]  s_x, s_xo;
  logic [10:0] s_zero;
  logic [7:0]  s_garb;
  logic [2:0]  s_f;
  logic [4:0]  r_x, r_xo;
  logic [30:0] r_zero;
  logic [27:0] r_garb;
  logic [2:0]  r_f;

  sop_graph_cascade dut_def (.x(d_x), .zero_in(d_zero), .x_o(d_xo), .garbage(d_garb), .f(d_f));
  sop_graph_cascade #(
    .N_VARS(4), .N_GATES(11), .N_OUT(3), .CARE(ADD_CARE), .INV(ADD_INV),
    .SRC(ADD_SRC), .SIDE(11'b11011111110), .OUT_GATE(ADD_OUT)
  ) dut_add (.x(s_x), .zero_in(s_zero), .x_o(s_xo), .garbage(s_garb), .f(s_f));
  sop_graph_cascade #(
    .N_VARS(5), .N_GATES(31), .N_OUT(3), .CARE(RD_CARE), .INV(RD_INV),
    .SRC(RD_SRC), .SIDE('1), .OUT_GATE(RD_OUT)
  ) dut_rd (.x(r_x), .zero_in(r_zero), .x_o(r_xo), .garbage(r_garb), .f(r_f));

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen_d [512];
    bit seen_s [32768];
    int n;
    check("example constants", 16'($bits(d_zero)), 16'd6);
    check("example garbage",   16'($bits(d_garb)), 16'd3);
    check("adder constants",   16'($bits(s_zero)), 16'd11);
    check("adder garbage",     16'($bits(s_garb)), 16'd8);
    check("rd53 constants",    16'($bits(r_zero)), 16'd31);
    check("rd53 garbage",      16'($bits(r_garb)), 16'd28);
    d_zero = '0; s_zero = '0; r_zero = '0;
    for (int v = 0; v < 32; v++) begin
      r_x = v[4:0];
      #1;
      check("rd53 count", 16'(r_f), 16'($countones(r_x)));
      check("rd53 pass-through", 16'(r_xo), 16'(r_x));
    end
    for (int v = 0; v < 16; v++) begin
      logic a, b, c;
      d_x = v[2:0]; s_x = v[3:0];
      #1;
      {c, b, a} = d_x;
      if (v < 8) begin
        check("F1", 16'(d_f[0]), 16'((b && !c) || (a && !b) || (!a && !b && c)));
        check("F2", 16'(d_f[1]), 16'((b && !c) || (a && !b) || (!a && b && c)));
        check("F3", 16'(d_f[2]), 16'((a && !b) || (!a && b && c) || (a && !c)));
        check("example pass-through", 16'(d_xo), 16'(d_x));
      end
      check("adder sum", 16'(s_f), 16'(s_x[1:0]) + 16'(s_x[3:2]));
      check("adder pass-through", 16'(s_xo), 16'(s_x));
    end
    for (int v = 0; v < 32768; v++) begin
      {s_zero, s_x} = v[14:0];
      {d_zero, d_x} = v[8:0];
      #1;
      seen_s[{s_f, s_garb, s_xo}] = 1'b1;
      if (v < 512) seen_d[{d_f, d_garb, d_xo}] = 1'b1;
    end
    n = 0; foreach (seen_d[i]) n += int'(seen_d[i]);
    check("example reversible", 16'(n), 16'd512);
    n = 0; foreach (seen_s[i]) n += int'(seen_s[i]);
    check("adder reversible", 16'(n), 16'd32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rev_cascades_top: end-to-end test of all example cascades at once.
//
// The top is used at its defaults. With every constant line at 0, all
// 256 values of an 8-bit counter are spread over the primary inputs of the
// eight cascades (each takes the low bits it needs, rotated so that the
// cascades see different values), and every function output is compared
// with a reference computed in the testbench. The full adder is also used
// to add two 8-bit numbers bit by bit, feeding each carry out into the next
// carry in. Then the constant lines of the full adder and of the ESOP
// cascade are driven with all values too, and each of the two must still
// give distinct outputs for distinct inputs.
//
// Each mechanism the cascades rely on is counted, and one that never
// happens counts as a failure: a product shared by all three SOPs setting
// all of them, a copied partial sum (fan-out line) carrying a 1, the sum
// factor (x1+x2)(x3+x4) being 1, the EXOR of three SOPs that are all 1,
// two products cancelling in the factorized ESOP, a carry rippling through
// the full adder, and a reused zero product line while some term is 1.
module tb_rev_cascades_top;

  int checks = 0, failures = 0;

  logic       mo_a, mo_b, mo_c, mo_a_o, mo_b_o, mo_c_o, mo_f1, mo_f2, mo_f3;
  logic [5:0] mo_zero;
  logic [2:0] mo_garbage;
  logic [3:0] fs_x, fs_zero, fs_x_o;
  logic [2:0] fs_garbage;
  logic       fs_f;
  logic       xs_a, xs_b, xs_c, xs_a_o, xs_b_o, xs_c_o, xs_f;
  logic [5:0] xs_zero;
  logic [4:0] xs_garbage;
  logic       es_a, es_b, es_c, es_a_o, es_b_o, es_c_o, es_garbage, es_f;
  logic [1:0] es_zero;
  logic [3:0] fe_x, fe_zero, fe_x_o;
  logic [2:0] fe_garbage;
  logic       fe_e;
  logic       fa_a, fa_b, fa_ci, fa_b_o, fa_ci_o, fa_s, fa_co, fa_garbage;
  logic [1:0] fa_zero;
  logic [2:0] sc_x, sc_zero, sc_x_o;
  logic [1:0] sc_garbage;
  logic       sc_f;
  logic [2:0] ec_x, ec_x_o;
  logic [1:0] ec_zero;
  logic [0:0] ec_garbage;
  logic       ec_f;
  logic [2:0] sg_x, sg_x_o, sg_garbage, sg_f;
  logic [5:0] sg_zero;

  rev_cascades_top dut (.*);

  // Mechanism counters
  int n_shared, n_copy, n_sumfactor, n_exor3, n_cancel, n_carry, n_zero_reuse;

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic need(input string what, input int count);
    $display("mechanism %-28s happened %0d times", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  function automatic logic [2:0] sops(input logic a, input logic b, input logic c);
    logic s1, s2, s3;
    s1 = (b && !c) || (a && !b) || (!a && !b && c);
    s2 = (b && !c) || (a && !b) || (!a && b && c);
    s3 = (a && !b) || (!a && b && c) || (a && !c);
    return {s3, s2, s1};
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r;
    logic [2:0] s;
    int ones;
    bit seen_fa [32];
    bit seen_es [32];
    int n;
    n_shared = 0; n_copy = 0; n_sumfactor = 0; n_exor3 = 0;
    n_cancel = 0; n_carry = 0; n_zero_reuse = 0;

    mo_zero = '0; fs_zero = '0; xs_zero = '0; es_zero = '0;
    fe_zero = '0; fa_zero = '0; sc_zero = '0; ec_zero = '0; sg_zero = '0;

    for (int v = 0; v < 256; v++) begin
      r = v[7:0];
      {mo_a, mo_b, mo_c} = r[2:0];
      fs_x               = r[3:0];
      {xs_a, xs_b, xs_c} = r[5:3];
      {es_a, es_b, es_c} = r[4:2];
      fe_x               = r[7:4];
      {fa_a, fa_b, fa_ci} = r[7:5];
      sc_x               = r[6:4];
      ec_x               = r[3:1];
      sg_x               = r[7:5];
      #1;
      // multi-output SOP
      s = sops(mo_a, mo_b, mo_c);
      check("mo F1", 16'(mo_f1), 16'(s[0]));
      check("mo F2", 16'(mo_f2), 16'(s[1]));
      check("mo F3", 16'(mo_f3), 16'(s[2]));
      check("mo pass-through", 16'({mo_a_o, mo_b_o, mo_c_o}), 16'({mo_a, mo_b, mo_c}));
      if (mo_a && !mo_b && mo_f1 && mo_f2 && mo_f3) n_shared++;
      if (mo_garbage[0] || mo_garbage[1] || mo_garbage[2]) n_copy++;
      // factorized SOP
      ones = $countones(fs_x);
      check("fs F", 16'(fs_f), 16'(ones >= 2));
      check("fs pass-through", 16'(fs_x_o), 16'(fs_x));
      if ((fs_x[0] || fs_x[1]) && (fs_x[2] || fs_x[3])) n_sumfactor++;
      // EXOR of SOPs
      s = sops(xs_a, xs_b, xs_c);
      check("xs F", 16'(xs_f), 16'(^s));
      if (s == 3'b111) n_exor3++;
      // ESOP
      check("es F", 16'(es_f),
            16'({logic'(es_b && !es_c) ^ logic'(es_a && !es_b) ^ logic'(!es_a && !es_b && es_c)}));
      if ((es_b && !es_c) || (es_a && !es_b)) n_zero_reuse++;
      // factorized ESOP
      ones = $countones(fe_x);
      check("fe E", 16'(fe_e), 16'(((ones * (ones - 1)) / 2) % 2));
      if (fe_e == 1'b0 && fe_x[0] && fe_x[1]) n_cancel++;
      // full adder
      check("fa sum", 16'({fa_co, fa_s}), 16'(int'(fa_a) + int'(fa_b) + int'(fa_ci)));
      // generic cascades at their defaults
      check("sc F", 16'(sc_f),
            16'((sc_x[0] && !sc_x[1]) || (sc_x[1] && !sc_x[2]) || (!sc_x[0] && !sc_x[1] && sc_x[2])));
      check("ec F", 16'(ec_f),
            16'({logic'(ec_x[1] && !ec_x[2]) ^ logic'(ec_x[0] && !ec_x[1]) ^
                 logic'(!ec_x[0] && !ec_x[1] && ec_x[2])}));
      check("xs pass-through", 16'({xs_a_o, xs_b_o, xs_c_o}), 16'({xs_a, xs_b, xs_c}));
      check("fe pass-through", 16'(fe_x_o), 16'(fe_x));
      check("sc pass-through", 16'(sc_x_o), 16'(sc_x));
      check("ec pass-through", 16'(ec_x_o), 16'(ec_x));
      // graph-described SOP cascade, default graph (A on bit 0)
      s = sops(sg_x[0], sg_x[1], sg_x[2]);
      check("sg F", 16'(sg_f), 16'(s));
      check("sg pass-through", 16'(sg_x_o), 16'(sg_x));
      if (sg_garbage != 3'b000) n_copy++;
    end

    // 8-bit addition through the full adder, one bit at a time
    for (int t = 0; t < 64; t++) begin
      logic [7:0] x, y;
      logic [8:0] sum;
      x = 8'($urandom);
      y = 8'($urandom);
      if (t == 0) begin x = 8'hFF; y = 8'h01; end
      fa_ci = 1'b0;
      for (int i = 0; i < 8; i++) begin
        fa_a = x[i];
        fa_b = y[i];
        #1;
        sum[i] = fa_s;
        if (fa_ci && fa_co) n_carry++;
        fa_ci = fa_co;
      end
      sum[8] = fa_ci;
      check("8-bit ripple sum", 16'(sum), 16'(x) + 16'(y));
    end

    // reversibility with the constant lines driven
    for (int v = 0; v < 32; v++) begin
      {fa_zero, fa_a, fa_b, fa_ci} = v[4:0];
      {es_zero, es_a, es_b, es_c}  = v[4:0];
      #1;
      seen_fa[{fa_co, fa_s, fa_garbage, fa_b_o, fa_ci_o}] = 1'b1;
      seen_es[{es_f, es_garbage, es_a_o, es_b_o, es_c_o}] = 1'b1;
    end
    n = 0; foreach (seen_fa[i]) n += int'(seen_fa[i]);
    check("full adder reversible", 16'(n), 16'd32);
    n = 0; foreach (seen_es[i]) n += int'(seen_es[i]);
    check("ESOP cascade reversible", 16'(n), 16'd32);

    need("shared product AB'",          n_shared);
    need("fan-out copy carrying 1",     n_copy);
    need("sum factor (x1+x2)(x3+x4)",   n_sumfactor);
    need("EXOR of three true SOPs",     n_exor3);
    need("ESOP terms cancelling",       n_cancel);
    need("carry ripple",                n_carry);
    need("zero product line reused",    n_zero_reuse);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

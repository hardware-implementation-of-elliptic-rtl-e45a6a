// tb_ecc_proc: checks the ECC processor against the affine double-and-add
// reference: k*G for small k, random 20-bit and one random full-width scalar,
// k = 0 (infinity) and k = n-1 (= -G, the ladder's Z2 = 0 case); and point
// additions P+Q, P+P (doubling), P+(-P) (infinity) and additions where one
// operand is the point at infinity. Results are also checked to lie on the
// curve. Counts how often each special path was taken.
module tb_ecc_proc;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, ld_en = 0, start = 0, p_inf = 0, q_inf = 0;
  ecc_ld_e ld_sel = LD_KEY;
  ecc_op_e op = ECC_SMUL;
  elem_t ld_data = '0, xo, yo;
  logic busy, done, inf;
  int checks = 0, failures = 0;
  longint cyc = 0, t0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  ecc_proc #(.M(M)) dut (.clk, .rst_n, .ld_en, .ld_sel, .ld_data, .start, .op, .p_inf, .q_inf,
                         .busy, .done, .xo, .yo, .inf);

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(ecc_ld_e s, elem_t v);
    @(posedge clk); ld_en <= 1; ld_sel <= s; ld_data <= v;
    @(posedge clk); ld_en <= 0;
  endtask

  task automatic run(ecc_op_e o, logic pi, logic qi);
    @(posedge clk); start <= 1; op <= o; p_inf <= pi; q_inf <= qi;
    @(posedge clk); start <= 0;
    t0 = cyc;
    while (!done) @(posedge clk);
    #1;
  endtask

  function automatic bit on_curve(elem_t x, elem_t y);
    return (rgf_mul(y, y) ^ rgf_mul(x, y)) == (rgf_mul(rgf_mul(x, x), x) ^ rgf_mul(x, x) ^ CURVE_B);
  endfunction

  task automatic check_pt(string what, point_t e);
    checks++;
    if (inf !== e.inf || (!e.inf && (xo !== e.x || yo !== e.y))) begin
      failures++;
      $display("%s: mismatch (inf %0d/%0d)", what, inf, e.inf);
    end
    if (!e.inf) begin
      checks++;
      if (!on_curve(xo, yo)) begin failures++; $display("%s: result not on curve", what); end
    end
  endtask

  task automatic smul(elem_t k, point_t p, point_t e, string what);
    load(LD_KEY, k); load(LD_PX, p.x); load(LD_PY, p.y);
    run(ECC_SMUL, 0, 0);
    $display("%s: %0d cycles", what, cyc - t0);
    check_pt(what, e);
  endtask

  task automatic padd(point_t p, point_t q, point_t e, string what);
    load(LD_PX, p.x); load(LD_PY, p.y); load(LD_QX, q.x); load(LD_QY, q.y);
    run(ECC_PADD, p.inf, q.inf);
    check_pt(what, e);
  endtask

  point_t g, p2, p3, pr, q, negq, o;
  elem_t k;
  int n_inf = 0;
  initial begin
    g = gen_point();
    o.inf = 1; o.x = '0; o.y = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    checks++; if (!on_curve(GX, GY)) failures++;
    p2 = rpt_add(g, g);
    p3 = rpt_add(p2, g);
    smul(elem_t'(1), g, g, "1*G");
    smul(elem_t'(2), g, p2, "2*G");
    smul(elem_t'(3), g, p3, "3*G");
    smul(elem_t'(0), g, o, "0*G"); n_inf++;
    for (int i = 0; i < 3; i++) begin
      k = elem_t'($urandom_range(1, (1 << 20) - 1));
      smul(k, g, rpt_mul(k, g), "random 20-bit k*G");
    end
    // k*P with P != G
    k = elem_t'($urandom_range(1, 4095));
    smul(k, p3, rpt_mul(k, p3), "k*(3G)");
    // n-1: result -G
    pr.inf = 0; pr.x = GX; pr.y = GX ^ GY;
    smul(N_ORDER - elem_t'(1), g, pr, "(n-1)*G");
    // full-width random scalar
    for (int i = 0; i < M; i += 32) k[i +: 32] = $urandom;
    k[M-1] = 1'b0;
    smul(k, g, rpt_mul(k, g), "random full-width k*G");
    // point additions
    padd(g, p2, p3, "G+2G");
    padd(p2, p2, rpt_add(p2, p2), "2G+2G (doubling)");
    negq.inf = 0; negq.x = p3.x; negq.y = p3.x ^ p3.y;
    padd(p3, negq, o, "3G+(-3G)"); n_inf++;
    padd(o, p3, p3, "O+3G");
    padd(p3, o, p3, "3G+O");
    padd(o, o, o, "O+O");
    $display("infinity results checked: %0d", n_inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

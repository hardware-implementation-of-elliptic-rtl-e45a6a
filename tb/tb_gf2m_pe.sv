// tb_gf2m_pe: checks one processing element against the reference
// x1_out = x1_in * x mod f and x2_out = x2_in ^ (y_in ? x1_in : 0), using
// random operands and the corner cases a[M-1] = 1 and y_in = 0/1.
module tb_gf2m_pe;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  elem_t x1, x2, o1, o2;
  logic  yb;
  int checks = 0, failures = 0;
  gf2m_pe #(.M(M), .K(K)) dut (.x1_in(x1), .x2_in(x2), .y_in(yb), .x1_out(o1), .x2_out(o2));
  function automatic elem_t rnd();
    elem_t v;
    for (int i = 0; i < M; i += 32) v[i +: 32] = $urandom;   // top slice truncated by the width
    return v;
  endfunction
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      x1 = rnd(); x2 = rnd(); yb = n[0];
      if (n == 0) x1 = {1'b1, {(M-1){1'b0}}};
      if (n == 1) x1 = '1;
      #1;
      checks++;
      if (o1 !== rgf_mul(x1, elem_t'(2))) begin failures++; $display("x1_out mismatch n=%0d", n); end
      checks++;
      if (o2 !== (x2 ^ (yb ? x1 : '0))) begin failures++; $display("x2_out mismatch n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

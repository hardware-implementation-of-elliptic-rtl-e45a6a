// tb_gf2m_sqr: checks the combinational squarer against the reference
// multiplier (a * a) on random and corner-case inputs (0, 1, x^(M-1), all ones).
module tb_gf2m_sqr;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  elem_t a, y;
  int checks = 0, failures = 0;
  gf2m_sqr #(.M(M), .K(K)) dut (.a, .y);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 100; n++) begin
      for (int i = 0; i < M; i += 32) a[i +: 32] = $urandom;
      if (n == 0) a = '0;
      if (n == 1) a = elem_t'(1);
      if (n == 2) a = {1'b1, {(M-1){1'b0}}};
      if (n == 3) a = '1;
      #1;
      checks++;
      if (y !== rgf_mul(a, a)) begin failures++; $display("square mismatch n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

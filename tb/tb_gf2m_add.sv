// tb_gf2m_add: checks the GF(2^m) adder: a + b equals the reference
// product-free identity (a + b) * 1, that a + a = 0 and a + 0 = a, on random data.
module tb_gf2m_add;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  elem_t a, b, y;
  int checks = 0, failures = 0;
  gf2m_add #(.M(M)) dut (.a, .b, .y);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 100; n++) begin
      for (int i = 0; i < M; i += 32) begin a[i +: 32] = $urandom; b[i +: 32] = $urandom; end
      if (n == 1) b = a;
      if (n == 2) b = '0;
      #1;
      checks++;
      // bitwise: each coefficient is the sum mod 2
      for (int i = 0; i < M; i++) if (y[i] != ((a[i] + b[i]) % 2)) begin failures++; break; end
      if (n == 1) begin checks++; if (y != '0) failures++; end
      if (n == 2) begin checks++; if (y != a) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gf2m_inv: checks the Itoh-Tsujii inverter against Fermat inversion and
// that a * a^-1 = 1, for 1, x, all-ones and random elements.
module tb_gf2m_inv;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  elem_t a, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gf2m_inv #(.M(M), .K(K)) dut (.clk, .rst_n, .start, .a, .busy, .done, .y);
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 6; n++) begin
      for (int i = 0; i < M; i += 32) a[i +: 32] = $urandom;
      if (n == 0) a = elem_t'(1);
      if (n == 1) a = elem_t'(2);
      if (n == 2) a = '1;
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      while (!done) @(posedge clk);
      checks++;
      if (y !== rgf_inv(a)) begin failures++; $display("inverse mismatch n=%0d", n); end
      checks++;
      if (rgf_mul(a, y) !== elem_t'(1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

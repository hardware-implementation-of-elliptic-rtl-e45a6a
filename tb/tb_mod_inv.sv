// tb_mod_inv: checks the modular inverse against Fermat's a^(n-2) mod n and
// that a * y = 1 mod n, for 1, 2, n-1, random values, and a = 0 -> 0.
module tb_mod_inv;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  elem_t a, y;
  int checks = 0, failures = 0, cycles, maxc = 0;
  always #5 clk = ~clk;
  mod_inv #(.M(M)) dut (.clk, .rst_n, .start, .a, .done, .y);
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < M; i += 32) a[i +: 32] = $urandom;
      a = rmod_red(a);
      if (n == 0) a = elem_t'(1);
      if (n == 1) a = elem_t'(2);
      if (n == 2) a = N_ORDER - 1;
      if (n == 3) a = '0;
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      cycles = 1;
      while (!done) begin @(posedge clk); #1; cycles++; end
      if (cycles > maxc) maxc = cycles;
      checks++;
      if (a == '0) begin
        if (y !== '0) failures++;
      end else begin
        if (y !== rmod_inv(a)) begin failures++; $display("inverse mismatch n=%0d", n); end
        checks++;
        if (rmod_mul(a, y) !== elem_t'(1)) failures++;
      end
      checks++;
      if (cycles > 4 * M + 8) begin failures++; $display("too slow: %0d", cycles); end
    end
    $display("longest inversion: %0d cycles", maxc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mod_mont_mult: checks y = a*b*2^-M mod n through the identity
// y * 2^M = a * b (mod n) with wide integer arithmetic, that y < n, and the
// M+2 cycle latency.
module tb_mod_mont_mult;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  elem_t a, b, y;
  int checks = 0, failures = 0, cycles;
  always #5 clk = ~clk;
  mod_mont_mult #(.M(M)) dut (.clk, .rst_n, .start, .a, .b, .done, .y);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 30; n++) begin
      for (int i = 0; i < M; i += 32) begin a[i +: 32] = $urandom; b[i +: 32] = $urandom; end
      a = rmod_red(a); b = rmod_red(b);
      if (n == 0) begin a = N_ORDER - 1; b = N_ORDER - 1; end
      if (n == 1) b = elem_t'(1);
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      cycles = 1;
      while (!done) begin @(posedge clk); #1; cycles++; end
      checks++;
      if (elem_t'((wide_t'(y) << M) % wide_t'(N_ORDER)) !== rmod_mul(a, b)) begin
        failures++; $display("product mismatch n=%0d", n);
      end
      checks++;
      if (y >= N_ORDER) failures++;
      checks++;
      if (cycles != M + 2) begin failures++; $display("latency %0d", cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

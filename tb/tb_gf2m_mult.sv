// tb_gf2m_mult: checks the sequential multiplier against the MSB-first
// reference multiplication, and that 'done' comes exactly M+1 cycles after
// 'start' (one load cycle plus M PE cycles).
module tb_gf2m_mult;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  elem_t a, b, c;
  int checks = 0, failures = 0;
  int cycles;
  always #5 clk = ~clk;
  gf2m_mult #(.M(M), .K(K)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .c);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < M; i += 32) begin a[i +: 32] = $urandom; b[i +: 32] = $urandom; end
      if (n == 0) b = elem_t'(1);
      if (n == 1) begin a = '1; b = '1; end
      if (n == 2) b = '0;
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      cycles = 1;
      while (!done) begin @(posedge clk); #1; cycles++; end
      checks++;
      if (c !== rgf_mul(a, b)) begin failures++; $display("product mismatch n=%0d", n); end
      checks++;
      if (cycles != M + 1) begin failures++; $display("latency %0d, expected %0d", cycles, M + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

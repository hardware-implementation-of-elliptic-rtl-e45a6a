// tb_param_buffer: shifts random 409-bit values in as 7 64-bit words, most
// significant first, and checks the assembled value; also checks that
// nothing moves without in_valid.
module tb_param_buffer;
  import ecdsa_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [63:0] in_data = '0;
  elem_t value, v;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  param_buffer #(.M(M), .W(64)) dut (.clk, .rst_n, .in_valid, .in_data, .value);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [447:0] x;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < M; i += 32) v[i +: 32] = $urandom;
      x = 448'(v);
      for (int i = 6; i >= 0; i--) begin
        @(posedge clk); in_valid <= 1; in_data <= x[64*i +: 64];
      end
      @(posedge clk); in_valid <= 0; in_data <= '1;
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (value !== v) begin failures++; $display("value mismatch n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

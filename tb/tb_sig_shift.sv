// tb_sig_shift: loads 409-bit values and checks the 7 output words (top 25
// bits zero-extended first, then 64-bit words in descending order) and the
// word count; includes the value printed on the paper's signature trace,
// whose first three words are 0x0BEB6C9, 0x23E655C6549454CE, 0xCBACB2893402FF34.
module tb_sig_shift;
  import ecdsa_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  elem_t din = '0, v;
  logic [63:0] dout;
  logic [2:0] words_left;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sig_shift #(.M(M), .W(64)) dut (.clk, .rst_n, .load, .din, .shift, .dout, .words_left);
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
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < M; i += 32) v[i +: 32] = $urandom;
      if (n == 0) v = 409'h0BEB6C923E655C6549454CECBACB2893402FF343D47CD4053DB928D32A40CCA7DF3787B8A4546B34BD6676B3E4C004B04441641;
      x = 448'(v);
      @(posedge clk); load <= 1; din <= v;
      @(posedge clk); load <= 0;
      #1;
      checks++;
      if (words_left != 3'd7) failures++;
      for (int i = 6; i >= 0; i--) begin
        checks++;
        if (dout !== x[64*i +: 64]) begin failures++; $display("word %0d mismatch n=%0d", 6-i, n); end
        if (n == 0 && i == 6) begin checks++; if (dout !== 64'h0000000000BEB6C9) failures++; end
        if (n == 0 && i == 5) begin checks++; if (dout !== 64'h23E655C6549454CE) failures++; end
        if (n == 0 && i == 4) begin checks++; if (dout !== 64'hCBACB2893402FF34) failures++; end
        shift <= 1; @(posedge clk); shift <= 0; #1;
      end
      checks++;
      if (words_left != 3'd0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ecdsa_ram: writes all 16 words, reads them back in random order with
// the one-cycle read latency, and checks that a write to one address leaves
// the others unchanged.
module tb_ecdsa_ram;
  import ecdsa_pkg::*;
  logic clk = 0, we = 0;
  logic [3:0] waddr = '0, raddr = '0;
  elem_t wdata = '0, rdata;
  elem_t model [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ecdsa_ram #(.M(M), .DEPTH(16)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int i = 0; i < M; i += 32) model[a][i +: 32] = $urandom;
      @(posedge clk); we <= 1; waddr <= 4'(a); wdata <= model[a];
    end
    @(posedge clk); we <= 0;
    for (int n = 0; n < 64; n++) begin
      int a;
      a = $urandom_range(0, 15);
      if (n % 8 == 7) begin            // overwrite one word
        for (int i = 0; i < M; i += 32) model[a][i +: 32] = $urandom;
        @(posedge clk); we <= 1; waddr <= 4'(a); wdata <= model[a];
        @(posedge clk); we <= 0;
        a = (a + 1) % 16;
      end
      @(posedge clk); raddr <= 4'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("read mismatch at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sha3_512: hashes messages of 0, 1, 2, 3, 70..74, 143, 144 and 200 bytes
// and compares with the reference SHA3-512; checks the FIPS 202 test digest
// of the empty message and of "abc"; checks that one block takes 24 cycles of
// permutation, and counts how often the separate padding block was needed.
module tb_sha3_512;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, in_last = 0, in_ready, digest_valid;
  logic [15:0] in_data = '0;
  logic [1:0]  in_bytes = '0;
  logic [511:0] digest;
  int checks = 0, failures = 0, n_extra = 0;
  longint cyc = 0, t0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  sha3_512 dut (.clk, .rst_n, .init, .in_valid, .in_data, .in_last, .in_bytes, .in_ready,
                .digest_valid, .digest);
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hash(byte unsigned msg [], int len);
    int w;
    @(posedge clk); init <= 1;
    @(posedge clk); init <= 0;
    w = 0;
    while (1) begin
      int rem;
      rem = len - 2*w;
      in_valid <= 1;
      in_data  <= {(rem > 1) ? msg[2*w+1] : 8'h00, (rem > 0) ? msg[2*w] : 8'h00};
      in_last  <= (rem <= 2);
      in_bytes <= (rem >= 2) ? 2'd2 : 2'(rem);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (rem <= 2) break;
      w++;
    end
    in_valid <= 0; in_last <= 0;
    t0 = cyc;
    while (!digest_valid) @(posedge clk);
  endtask

  byte unsigned m [];
  logic [511:0] exp_d;
  function automatic logic [511:0] hex_be(logic [511:0] v);
    logic [511:0] o;
    for (int i = 0; i < 64; i++) o[8*i +: 8] = v[8*(63-i) +: 8];
    return o;
  endfunction
  initial begin
    int lens [13] = '{0, 1, 2, 3, 70, 71, 72, 73, 74, 143, 144, 200, 5};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (lens[j]) begin
      m = new[lens[j] + 1];
      for (int i = 0; i < lens[j]; i++) m[i] = 8'($urandom);
      hash(m, lens[j]);
      if (lens[j] % 72 == 71 || lens[j] % 72 == 0 && lens[j] > 0) ;
      if (lens[j] > 0 && lens[j] % 72 == 0) n_extra++;
      checks++;
      if (digest !== rsha3_512(m, lens[j])) begin failures++; $display("len %0d mismatch", lens[j]); end
      if (lens[j] == 3) begin
        checks++;
        if (cyc - t0 != 24 + 1) begin failures++; $display("single block took %0d cycles", cyc - t0); end
      end
    end
    // FIPS 202 examples
    m = new[4];
    hash(m, 0);
    exp_d = hex_be(512'ha69f73cca23a9ac5c8b567dc185a756e97c982164fe25859e0d1dcc1475c80a615b2123af1f5f94c11e3e9402c3ac558f500199d95b6d3e301758586281dcd26);
    checks++; if (digest !== exp_d) begin failures++; $display("empty message digest wrong"); end
    m[0] = "a"; m[1] = "b"; m[2] = "c";
    hash(m, 3);
    exp_d = hex_be(512'hb751850b1a57168a5693cd924b6b096e08f621827444f70d884f5d0240d2712e10e116e9192af3c91a7ec57647e3934057340b4cf408d5a56592f8274eec53f0);
    checks++; if (digest !== exp_d) begin failures++; $display("abc digest wrong"); end
    $display("messages needing a separate padding block: %0d", n_extra);
    checks++; if (n_extra == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_keccak_round: checks one Keccak-f[1600] round, for every round index,
// against the reference whose rotation offsets and round constants are
// generated from their defining recurrences; also checks the 24-round
// permutation of the zero state against the published first lane
// 0xF1258F7940E1DDE7.
module tb_keccak_round;
  import tb_ref_pkg::*;
  logic [1599:0] s_in, s_out;
  logic [4:0] rnd;
  int checks = 0, failures = 0;
  keccak_round dut (.s_in, .rnd, .s_out);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int r = 0; r < 24; r++) begin
      for (int i = 0; i < 1600; i += 32) s_in[i +: 32] = $urandom;
      rnd = 5'(r);
      #1;
      checks++;
      if (s_out !== rkeccak_flat(s_in, r)) begin failures++; $display("round %0d mismatch", r); end
    end
    s_in = '0;
    for (int r = 0; r < 24; r++) begin
      rnd = 5'(r); #1; s_in = s_out;
    end
    checks++;
    if (s_in[63:0] !== 64'hF1258F7940E1DDE7) begin failures++; $display("Keccak-f(0) lane 0 %h", s_in[63:0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

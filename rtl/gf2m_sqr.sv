// gf2m_sqr: combinational GF(2^M) squarer, y = a^2 mod (x^M + x^K + 1).
// Squaring in polynomial basis spreads coefficient a_i to position 2i (the
// cross terms cancel in characteristic 2); the 2M-1 bit result is then folded
// from the top down: each set bit at position j >= M is removed and added at
// j-M and j-M+K, since x^M = x^K + 1. The paper names the two squarer units
// of the ECC processor but not their insides; this fold is the plain
// textbook construction. All XORs are fixed wiring after unrolling; the
// low even-numbered result bits that no reduction term reaches are plain
// wires from the input.
module gf2m_sqr #(
  parameter int unsigned M = 409,
  parameter int unsigned K = 87
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);
  logic [2*M-2:0] t;
  always_comb begin
    t = '0;
    for (int i = 0; i < M; i++) t[2*i] = a[i];
    for (int j = 2*M-2; j >= M; j--) begin
      if (t[j]) begin
        t[j]       = 1'b0;
        t[j-M]     = ~t[j-M];
        t[j-M+K]   = ~t[j-M+K];
      end
    end
    y = t[M-1:0];
  end
endmodule

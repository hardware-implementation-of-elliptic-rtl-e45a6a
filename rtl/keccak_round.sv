// keccak_round: one round of the Keccak-f[1600] permutation (FIPS 202):
// theta, rho, pi, chi and iota applied to a 1600-bit state, combinational.
// Lane (x, y) occupies bits 64*(x+5y) +: 64, bit z of a lane at offset z.
// The round index 'rnd' (0..23, the round counter) selects the iota round
// constant. The paper uses the standard permutation with 24 rounds and
// one round per clock; the lane layout is the usual FIPS 202 one.
module keccak_round (
  input  logic [1599:0] s_in,
  input  logic [4:0]    rnd,
  output logic [1599:0] s_out
);
  typedef logic [63:0] lane_t;

  // rotation offsets r[x + 5y]
  localparam int RHO [25] = '{ 0,  1, 62, 28, 27,
                              36, 44,  6, 55, 20,
                               3, 10, 43, 25, 39,
                              41, 45, 15, 21,  8,
                              18,  2, 61, 56, 14};
  localparam lane_t RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  lane_t a [25];
  lane_t b [25];
  lane_t c [5];
  lane_t d [5];
  lane_t rc;

  assign rc = (rnd < 5'd24) ? RC[rnd] : '0;

  always_comb begin
    for (int i = 0; i < 25; i++) a[i] = s_in[64*i +: 64];
    // theta
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ {c[(x+1)%5][62:0], c[(x+1)%5][63]};
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    // rho and pi: B[y, 2x+3y] = rot(A[x, y], r[x, y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = (RHO[x + 5*y] == 0) ? a[x + 5*y]
            : ((a[x + 5*y] << RHO[x + 5*y]) | (a[x + 5*y] >> (64 - RHO[x + 5*y])));
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    a[0] = a[0] ^ rc;
    for (int i = 0; i < 25; i++) s_out[64*i +: 64] = a[i];
  end
endmodule

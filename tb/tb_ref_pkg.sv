// tb_ref_pkg: reference models for the testbenches, written independently
// of the RTL: MSB-first GF(2^409) multiplication, Fermat inversion, mod-n
// arithmetic with wide integer operators, affine B-409 point arithmetic
// (double-and-add), a lane-oriented Keccak-f[1600] whose rotation offsets and
// round constants are generated from their defining recurrences, and a
// SHA3-512 built on it.
package tb_ref_pkg;
  import ecdsa_pkg::*;

  typedef logic [2*M-1:0] wide_t;

  // ---------------- GF(2^409) ----------------
  function automatic elem_t rgf_mul(elem_t a, elem_t b);
    logic [M:0] acc;
    acc = '0;
    for (int i = M-1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc[M]) acc = acc ^ ((M+1)'(1) << M) ^ ((M+1)'(1) << K) ^ (M+1)'(1);
      if (b[i]) acc = acc ^ {1'b0, a};
    end
    return acc[M-1:0];
  endfunction

  function automatic elem_t rgf_inv(elem_t a);
    elem_t r, base;
    r = elem_t'(1); base = a;
    // exponent 2^M - 2: bits 1..M-1 set
    for (int i = 1; i < M; i++) begin
      base = rgf_mul(base, base);
      r    = rgf_mul(r, base);
    end
    return r;
  endfunction

  // ---------------- mod n ----------------
  function automatic elem_t rmod_mul(elem_t a, elem_t b);
    wide_t p;
    p = wide_t'(a) * wide_t'(b);
    return elem_t'(p % wide_t'(N_ORDER));
  endfunction
  function automatic elem_t rmod_add(elem_t a, elem_t b);
    wide_t s;
    s = wide_t'(a) + wide_t'(b);
    return elem_t'(s % wide_t'(N_ORDER));
  endfunction
  function automatic elem_t rmod_red(elem_t a);
    return elem_t'(wide_t'(a) % wide_t'(N_ORDER));
  endfunction
  function automatic elem_t rmod_inv(elem_t a);
    elem_t r, base, e;
    r = elem_t'(1); base = a; e = N_ORDER - elem_t'(2);
    for (int i = 0; i < M; i++) begin
      if (e[i]) r = rmod_mul(r, base);
      base = rmod_mul(base, base);
    end
    return r;
  endfunction

  // ---------------- affine points ----------------
  typedef struct { elem_t x; elem_t y; bit inf; } point_t;

  function automatic point_t rpt_add(point_t p, point_t q);
    point_t r;
    elem_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    r.inf = 0;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == '0) begin r.inf = 1; r.x = '0; r.y = '0; return r; end
      l   = p.x ^ rgf_mul(p.y, rgf_inv(p.x));
      r.x = rgf_mul(l, l) ^ l ^ elem_t'(1);
      r.y = rgf_mul(p.x, p.x) ^ rgf_mul(l ^ elem_t'(1), r.x);
      return r;
    end
    l   = rgf_mul(p.y ^ q.y, rgf_inv(p.x ^ q.x));
    r.x = rgf_mul(l, l) ^ l ^ p.x ^ q.x ^ elem_t'(1);
    r.y = rgf_mul(l, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic point_t rpt_mul(elem_t k, point_t p);
    point_t r;
    r.inf = 1; r.x = '0; r.y = '0;
    for (int i = M-1; i >= 0; i--) begin
      if (!r.inf) r = rpt_add(r, r);
      if (k[i]) r = rpt_add(r, p);
    end
    return r;
  endfunction

  function automatic point_t gen_point();
    point_t g;
    g.x = GX; g.y = GY; g.inf = 0;
    return g;
  endfunction

  // ---------------- Keccak / SHA3-512 ----------------
  typedef logic [63:0] lane_t;
  typedef lane_t state_t [25];           // lane (x,y) at index x + 5y

  function automatic lane_t rrot(lane_t v, int n);
    n = n % 64;
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic void rkeccak_rounds(ref state_t s, input int r0, input int nr);
    lane_t c [5];
    lane_t d [5];
    lane_t b [25];
    int    rho [25];
    lane_t rc [24];
    int x, y, nx;
    logic [7:0] lfsr;
    // rho offsets: (t+1)(t+2)/2 along the walk (x,y) -> (y, 2x+3y)
    rho[0] = 0; x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      rho[x + 5*y] = ((t + 1) * (t + 2) / 2) % 64;
      nx = y; y = (2*x + 3*y) % 5; x = nx;
    end
    // round constants from the degree-8 LFSR x^8+x^6+x^5+x^4+1
    lfsr = 8'h01;
    for (int r = 0; r < 24; r++) begin
      rc[r] = '0;
      for (int j = 0; j < 7; j++) begin
        rc[r][(1 << j) - 1] = lfsr[0];
        lfsr = lfsr[7] ? ((lfsr << 1) ^ 8'h71) : (lfsr << 1);
      end
    end
    for (int r = r0; r < r0 + nr; r++) begin
      for (int i = 0; i < 5; i++) c[i] = s[i] ^ s[i+5] ^ s[i+10] ^ s[i+15] ^ s[i+20];
      for (int i = 0; i < 5; i++) d[i] = c[(i+4)%5] ^ rrot(c[(i+1)%5], 1);
      for (int i = 0; i < 25; i++) s[i] = s[i] ^ d[i%5];
      for (int xx = 0; xx < 5; xx++)
        for (int yy = 0; yy < 5; yy++)
          b[yy + 5*((2*xx + 3*yy) % 5)] = rrot(s[xx + 5*yy], rho[xx + 5*yy]);
      for (int xx = 0; xx < 5; xx++)
        for (int yy = 0; yy < 5; yy++)
          s[xx + 5*yy] = b[xx + 5*yy] ^ (~b[(xx+1)%5 + 5*yy] & b[(xx+2)%5 + 5*yy]);
      s[0] = s[0] ^ rc[r];
    end
  endfunction

  function automatic void rkeccak_f(ref state_t s);
    rkeccak_rounds(s, 0, 24);
  endfunction

  // one Keccak-f round on a flat 1600-bit state (for the round unit test)
  function automatic logic [1599:0] rkeccak_flat(logic [1599:0] v, int rnd);
    state_t s;
    for (int i = 0; i < 25; i++) s[i] = v[64*i +: 64];
    rkeccak_rounds(s, rnd, 1);
    for (int i = 0; i < 25; i++) v[64*i +: 64] = s[i];
    return v;
  endfunction

  // SHA3-512 of msg[0..len-1]; digest byte i in bits 8i+7:8i
  function automatic logic [511:0] rsha3_512(byte unsigned msg [], int len);
    state_t s;
    byte unsigned blk [72];
    int pos;
    logic [511:0] dg;
    for (int i = 0; i < 25; i++) s[i] = '0;
    pos = 0;
    while (1) begin
      for (int i = 0; i < 72; i++) blk[i] = 0;
      if (len - pos >= 72) begin
        for (int i = 0; i < 72; i++) blk[i] = msg[pos + i];
      end else begin
        for (int i = 0; i < len - pos; i++) blk[i] = msg[pos + i];
        blk[len - pos] = blk[len - pos] ^ 8'h06;
        blk[71] = blk[71] ^ 8'h80;
      end
      for (int i = 0; i < 72; i++) s[i/8][8*(i%8) +: 8] = s[i/8][8*(i%8) +: 8] ^ blk[i];
      rkeccak_f(s);
      if (len - pos < 72) break;
      pos += 72;
    end
    for (int i = 0; i < 8; i++) dg[64*i +: 64] = s[i];
    return dg;
  endfunction

  // leftmost 409 bits of the digest read as a big-endian integer (FIPS 186-4)
  function automatic elem_t digest_to_e(logic [511:0] dg);
    logic [511:0] be;
    for (int i = 0; i < 64; i++) be[8*(63-i) +: 8] = dg[8*i +: 8];
    return elem_t'(be >> (512 - M));
  endfunction
endpackage

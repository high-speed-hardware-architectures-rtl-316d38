// aria_ref_pkg: behavioural reference model of ARIA for the testbenches.
//
// Written straight from the cipher's definition and independent of the RTL
// structure: S-boxes by exponentiation in GF(2^8) (x^254 and x^247) and
// their affine maps, inverse S-boxes by search, the diffusion layer as the
// plain seven-term XOR of each output byte, the key schedule and the round
// sequence as specified.  Not synthesizable in spirit; simulation only.
package aria_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef blk_t keys_t [18];

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] pw(logic [7:0] a, int e);
    logic [7:0] r;
    r = 1;
    for (int i = 0; i < e; i++) r = mul(r, a);
    return r;
  endfunction

  // S1: AES affine map on x^-1.
  function automatic logic [7:0] s1(logic [7:0] x);
    logic [7:0] v, y;
    v = pw(x, 254);
    for (int i = 0; i < 8; i++)
      y[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  // S2: matrix B on x^247, then 0xE2.  Row i lists the input bits of output bit i.
  function automatic logic [7:0] s2(logic [7:0] x);
    logic [7:0] v, y;
    logic [7:0] b [8];
    b[0] = 8'b01111010; b[1] = 8'b10111100; b[2] = 8'b11101011; b[3] = 8'b10111001;
    b[4] = 8'b00110100; b[5] = 8'b10000001; b[6] = 8'b10111010; b[7] = 8'b11001011;
    v = pw(x, 247);
    for (int i = 0; i < 8; i++) y[i] = ^(b[i] & v);
    return y ^ 8'he2;
  endfunction

  function automatic logic [7:0] inv_of(int kind, logic [7:0] y);
    for (int x = 0; x < 256; x++)
      if ((kind == 0 ? s1(8'(x)) : s2(8'(x))) == y) return 8'(x);
    return 0;
  endfunction

  // kind: 0 = S1, 1 = S2, 2 = S1^-1, 3 = S2^-1 (cached tables)
  logic [7:0] tbl [4][256];
  bit         tbl_ok = 0;

  function automatic void build();
    if (tbl_ok) return;
    for (int x = 0; x < 256; x++) begin
      tbl[0][x] = s1(8'(x));
      tbl[1][x] = s2(8'(x));
    end
    for (int x = 0; x < 256; x++) begin
      tbl[2][tbl[0][x]] = 8'(x);
      tbl[3][tbl[1][x]] = 8'(x);
    end
    tbl_ok = 1;
  endfunction

  function automatic logic [7:0] sb(int kind, logic [7:0] x);
    build();
    return tbl[kind][x];
  endfunction

  function automatic logic [7:0] byte_of(blk_t b, int i);
    return b[127-8*i -: 8];
  endfunction

  // Substitution layer: odd rounds (S1,S2,S1^-1,S2^-1), even rounds swapped.
  function automatic blk_t sl(bit odd, blk_t x);
    blk_t y;
    int   kinds_odd [4] = '{0, 1, 2, 3};
    int   kinds_even [4] = '{2, 3, 0, 1};
    for (int i = 0; i < 16; i++)
      y[127-8*i -: 8] = sb(odd ? kinds_odd[i%4] : kinds_even[i%4], byte_of(x, i));
    return y;
  endfunction

  // Diffusion: each output byte XORs the seven listed input bytes.
  function automatic blk_t dl(blk_t x);
    int m [16][7] = '{
      '{3,4,6,8,9,13,14},   '{2,5,7,8,9,12,15},   '{1,4,6,10,11,12,15}, '{0,5,7,10,11,13,14},
      '{0,2,5,8,11,14,15},  '{1,3,4,9,10,14,15},  '{0,2,7,9,10,12,13},  '{1,3,6,8,11,12,13},
      '{0,1,4,7,10,13,15},  '{0,1,5,6,11,12,14},  '{2,3,5,6,8,13,15},   '{2,3,4,7,9,12,14},
      '{1,2,6,7,9,11,12},   '{0,3,6,7,8,10,13},   '{0,3,4,5,9,11,14},   '{1,2,4,5,8,10,15}};
    blk_t y;
    for (int i = 0; i < 16; i++) begin
      logic [7:0] acc;
      acc = 0;
      for (int k = 0; k < 7; k++) acc ^= byte_of(x, m[i][k]);
      y[127-8*i -: 8] = acc;
    end
    return y;
  endfunction

  function automatic blk_t fo(blk_t d, blk_t k); return dl(sl(1, d ^ k)); endfunction
  function automatic blk_t fe(blk_t d, blk_t k); return dl(sl(0, d ^ k)); endfunction

  function automatic blk_t rr(blk_t x, int n);
    n = n % 128;
    return (x >> n) | (x << (128 - n));
  endfunction

  function automatic int nrounds(int kl); return 12 + 2*kl; endfunction

  // W0..W3 for a left-aligned master key of key length code kl (0/1/2).
  function automatic void winit(logic [255:0] key, int kl, output blk_t w [4]);
    blk_t c [3];
    blk_t kr;
    c[0] = 128'h517cc1b727220a94fe13abe8fa9a6ee0;
    c[1] = 128'h6db14acc9e21c820ff28b1d5ef5de2b0;
    c[2] = 128'hdb92371d2126e9700324977504e8c90e;
    kr = (kl == 0) ? 128'h0 : (kl == 1) ? {key[127:64], 64'h0} : key[127:0];
    w[0] = key[255:128];
    w[1] = fo(w[0], c[kl % 3]) ^ kr;
    w[2] = fe(w[1], c[(kl+1) % 3]) ^ w[0];
    w[3] = fo(w[2], c[(kl+2) % 3]) ^ w[1];
  endfunction

  // Round keys 1..n+1 (index 0 unused, beyond n+1 zero).
  function automatic void keys_from_w(blk_t w [4], int kl, bit dec, output keys_t k);
    blk_t e [18];
    int   n;
    n = nrounds(kl);
    e[1]  = w[0] ^ rr(w[1], 19);   e[2]  = w[1] ^ rr(w[2], 19);
    e[3]  = w[2] ^ rr(w[3], 19);   e[4]  = rr(w[0], 19) ^ w[3];
    e[5]  = w[0] ^ rr(w[1], 31);   e[6]  = w[1] ^ rr(w[2], 31);
    e[7]  = w[2] ^ rr(w[3], 31);   e[8]  = rr(w[0], 31) ^ w[3];
    e[9]  = w[0] ^ rr(w[1], 128-61); e[10] = w[1] ^ rr(w[2], 128-61);
    e[11] = w[2] ^ rr(w[3], 128-61); e[12] = rr(w[0], 128-61) ^ w[3];
    e[13] = w[0] ^ rr(w[1], 128-31); e[14] = w[1] ^ rr(w[2], 128-31);
    e[15] = w[2] ^ rr(w[3], 128-31); e[16] = rr(w[0], 128-31) ^ w[3];
    e[17] = w[0] ^ rr(w[1], 128-19);
    for (int i = 0; i < 18; i++) k[i] = 0;
    for (int i = 1; i <= n + 1; i++) begin
      if (!dec)              k[i] = e[i];
      else if (i == 1)       k[i] = e[n+1];
      else if (i == n + 1)   k[i] = e[1];
      else                   k[i] = dl(e[n+2-i]);
    end
  endfunction

  function automatic void round_keys(logic [255:0] key, int kl, bit dec, output keys_t k);
    blk_t w [4];
    winit(key, kl, w);
    keys_from_w(w, kl, dec, k);
  endfunction

  function automatic blk_t crypt(logic [255:0] key, int kl, bit dec, blk_t p);
    keys_t k;
    int    n;
    n = nrounds(kl);
    round_keys(key, kl, dec, k);
    for (int i = 1; i < n; i++)
      p = (i % 2) ? fo(p, k[i]) : fe(p, k[i]);
    return sl(0, p ^ k[n]) ^ k[n+1];
  endfunction

endpackage

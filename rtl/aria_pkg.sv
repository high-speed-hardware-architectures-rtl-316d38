// aria_pkg: types, constants and field arithmetic shared by the ARIA cores.
//
// ARIA is a 128-bit substitution-permutation block cipher with 128/192/256-bit
// keys and 12/14/16 rounds.  Byte 0 of a block is its most significant byte
// (bits 127:120), as in the cipher's specification.
//
// The package holds:
//  * the key-length encoding and round counts,
//  * the key-initialization constants C1..C3,
//  * GF(2^4) arithmetic with p(z) = z^4 + z + 1 (the ground field of the
//    composite field GF(2^4)^2 with n(x) = x^2 + x + {e}),
//  * the 8x8 binary matrices of the composite-field S-boxes: the isomorphic
//    map M, its inverse, and the merged map/affine matrices delta1, delta2 and
//    their inverses (rows are output bits, row i bit j = input bit j),
//  * GF(2^8) arithmetic (m(x) = x^8+x^4+x^3+x+1) used only to compute the
//    256-entry ROM contents of the look-up-table S-boxes at elaboration time.
//    S1(x) = A*x^-1 + 0x63 (the AES S-box) and S2(x) = B*x^247 + 0xE2.
// Everything here is combinational and synthesizable.
package aria_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   nib_t;
  typedef logic [7:0][7:0] mat8_t;   // mat[i] = row i (output bit i), bit j = input bit j

  // Key length: the number of rounds is 12 + 2*keylen.
  typedef enum logic [1:0] {KL128 = 2'd0, KL192 = 2'd1, KL256 = 2'd2} keylen_e;

  // S-box kinds of ARIA.
  typedef enum logic [1:0] {S1 = 2'd0, S2 = 2'd1, S1INV = 2'd2, S2INV = 2'd3} sbox_kind_e;

  // S-box realization: ROM look-up table or composite-field logic.
  typedef enum logic {SBOX_LUT = 1'b0, SBOX_COMP = 1'b1} sbox_impl_e;

  localparam int unsigned MAX_ROUNDS = 16;

  function automatic int unsigned num_rounds(keylen_e kl);
    return 12 + 2 * int'(kl);
  endfunction

  // Key-initialization constants.
  localparam block_t C1 = 128'h517cc1b727220a94fe13abe8fa9a6ee0;
  localparam block_t C2 = 128'h6db14acc9e21c820ff28b1d5ef5de2b0;
  localparam block_t C3 = 128'hdb92371d2126e9700324977504e8c90e;

  // CK1..CK3 for the key length (k = 1..3).
  function automatic block_t ck(keylen_e kl, int unsigned k);
    block_t c [3];
    c[0] = C1; c[1] = C2; c[2] = C3;
    return c[(int'(kl) + k - 1) % 3];
  endfunction

  // Master key, left aligned in 256 bits: KL = key[255:128]; KR is
  // key[127:0] with the bits beyond the key length zeroed.
  function automatic block_t key_right(block_t key_lo, keylen_e kl);
    case (kl)
      KL128:   return '0;
      KL192:   return {key_lo[127:64], 64'h0};
      default: return key_lo;
    endcase
  endfunction

  function automatic block_t rotr128(block_t x, int unsigned n);
    return (x >> n) | (x << (128 - n));
  endfunction

  // ---------------------------------------------------------------- GF(2^4)
  function automatic nib_t gf4_mul(nib_t a, nib_t b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--)
      if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  // Squaring is linear over GF(2).
  function automatic nib_t gf4_sq(nib_t a);
    return {a[3], a[1] ^ a[3], a[2], a[0] ^ a[2]};
  endfunction

  // Multiplication by the constant {e} = z^3+z^2+z.
  function automatic nib_t gf4_mul_e(nib_t a);
    return gf4_mul(a, 4'he);
  endfunction

  // Inversion: a^-1 = a^14 = a^2 * a^4 * a^8 (0 maps to 0).
  function automatic nib_t gf4_inv(nib_t a);
    nib_t a2, a4, a8;
    a2 = gf4_sq(a);
    a4 = gf4_sq(a2);
    a8 = gf4_sq(a4);
    return gf4_mul(gf4_mul(a2, a4), a8);
  endfunction

  // ---------------------------------------------------------- 8x8 matrices
  function automatic byte_t lin8(mat8_t m, byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++) y[i] = ^(m[i] & x);
    return y;
  endfunction

  // Isomorphic map GF(2^8) -> GF(2^4)^2 (bits 7:4 = high coefficient) and inverse.
  localparam mat8_t MAP_M    = {8'ha0, 8'hac, 8'hd2, 8'h70, 8'h14, 8'h82, 8'h06, 8'h71};
  localparam mat8_t MAP_MINV = {8'hb4, 8'h9e, 8'h34, 8'hba, 8'h72, 8'hb2, 8'hb0, 8'h11};
  // delta1 = A * M^-1, delta2 = D * M^-1 with D = B * C (C: x -> x^8).
  localparam mat8_t DELTA1   = {8'hd6, 8'hd0, 8'hfe, 8'hdb, 8'hd5, 8'h39, 8'hbf, 8'hb5};
  localparam mat8_t DELTA2   = {8'hcb, 8'h28, 8'hb1, 8'h9a, 8'h8b, 8'h29, 8'h64, 8'hdc};
  // delta^-1 = M * A^-1 (resp. M * D^-1); their constants are M*A^-1*0x63 and M*D^-1*0xE2.
  localparam mat8_t DELTA1I  = {8'hc6, 8'h71, 8'h78, 8'hf7, 8'hd8, 8'h1b, 8'hdb, 8'h53};
  localparam mat8_t DELTA2I  = {8'h1f, 8'h88, 8'h27, 8'h5c, 8'h67, 8'had, 8'h34, 8'h44};
  localparam byte_t AFF1_C   = 8'h63;
  localparam byte_t AFF2_C   = 8'he2;
  localparam byte_t AFF1I_C  = 8'h4b;
  localparam byte_t AFF2I_C  = 8'hdb;
  // Affine matrix B of S2.
  localparam mat8_t AFF_B    = {8'hcb, 8'hba, 8'h81, 8'h34, 8'hb9, 8'heb, 8'hbc, 8'h7a};

  // ---------------------------------------------------------------- GF(2^8)
  function automatic byte_t gf8_mul(byte_t a, byte_t b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++)
      if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--)
      if (p[i]) p ^= 15'(9'h11b) << (i - 8);
    return p[7:0];
  endfunction

  function automatic byte_t gf8_pow(byte_t a, int unsigned e);
    byte_t r, s;
    r = 8'h01;
    s = a;
    for (int i = 0; i < 8; i++) begin
      if (e[i]) r = gf8_mul(r, s);
      s = gf8_mul(s, s);
    end
    return r;
  endfunction

  function automatic byte_t s1_fn(byte_t x);
    byte_t v;
    v = gf8_pow(x, 254);
    return v ^ {v[6:0], v[7]} ^ {v[5:0], v[7:6]} ^ {v[4:0], v[7:5]} ^ {v[3:0], v[7:4]} ^ AFF1_C;
  endfunction

  function automatic byte_t s2_fn(byte_t x);
    return lin8(AFF_B, gf8_pow(x, 247)) ^ AFF2_C;
  endfunction

  // Full ROM contents for one S-box kind; entry x is tbl[x].
  function automatic logic [255:0][7:0] sbox_table(sbox_kind_e kind);
    logic [255:0][7:0] t;
    for (int x = 0; x < 256; x++) begin
      case (kind)
        S1:      t[x] = s1_fn(byte_t'(x));
        S2:      t[x] = s2_fn(byte_t'(x));
        S1INV:   t[s1_fn(byte_t'(x))] = byte_t'(x);
        default: t[s2_fn(byte_t'(x))] = byte_t'(x);
      endcase
    end
    return t;
  endfunction

endpackage

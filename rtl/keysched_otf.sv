// keysched_otf: on-the-fly ARIA round-key generator for the loop core.
//
// Encryption round key k (1..17) is
//     ek_k = W[j] ^ (W[(j+1) mod 4] rotated right by R[g]),
//     g = (k-1) div 4, j = (k-1) mod 4,  R = {19, 31, -61, -31, -19}
// (negative = rotate left).  The rotation is a combinational barrel shifter
// selected by g.  For decryption with n rounds, dk_1 = ek_{n+1},
// dk_{n+1} = ek_1 and dk_i = DL(ek_{n+2-i}) otherwise, so the generator has
// one diffusion circuit behind the shifter.  Both directions start from the
// initialization values W0..W3 directly, so decryption needs no extra cycles.
//
// Interface: `idx` names the key to produce; `key_comb` is that key,
// combinationally.  When `load` is high the key is captured in the single
// 128-bit round-key register, whose output is `rk` (the key of the round in
// progress).  The loop core also uses `key_comb` directly for the second key
// of the final round.  The register has an asynchronous active-low reset.
module keysched_otf
  import aria_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      w [4],
  input  keylen_e     keylen,
  input  logic        decrypt,
  input  logic [4:0]  idx,
  input  logic        load,
  output block_t      key_comb,
  output block_t      rk
);

  // Index of the encryption key that is needed.
  logic [4:0] nr, eidx;
  logic       use_dl;
  always_comb begin
    nr     = 5'(num_rounds(keylen));
    eidx   = idx;
    use_dl = 1'b0;
    if (decrypt) begin
      if (idx == 5'd1)           eidx = nr + 5'd1;
      else if (idx == nr + 5'd1) eidx = 5'd1;
      else begin
        eidx   = nr + 5'd2 - idx;
        use_dl = 1'b1;
      end
    end
  end

  // Barrel-shifted XOR.
  logic [2:0] grp;
  logic [1:0] j;
  logic [6:0] amt;
  block_t     ek, ek_dl;
  always_comb begin
    grp = 3'((eidx - 5'd1) >> 2);
    j   = 2'(eidx - 5'd1);
    case (grp)
      3'd0:    amt = 7'd19;
      3'd1:    amt = 7'd31;
      3'd2:    amt = 7'd67;   // rotate left by 61
      3'd3:    amt = 7'd97;   // rotate left by 31
      default: amt = 7'd109;  // rotate left by 19
    endcase
    ek = w[j] ^ rotr128(w[j + 2'd1], int'(amt));
  end

  diffusion u_dl (.din(ek), .dout(ek_dl));

  assign key_comb = use_dl ? ek_dl : ek;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rk <= '0;
    else if (load) rk <= key_comb;
  end

endmodule

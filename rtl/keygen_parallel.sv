// keygen_parallel: fully parallel ARIA round-key generator.
//
// From the initialization values W0..W3 it forms all seventeen encryption
// keys at once, ek_k = W[j] ^ rot(W[j+1], R[g]) (see keysched_otf; the
// rotations are fixed wiring here), and the decryption keys
// dk_1 = ek_{n+1}, dk_i = DL(ek_{n+2-i}) (i = 2..n), dk_{n+1} = ek_1, using
// fifteen diffusion circuits on ek_2..ek_16.  A multiplexer chooses the set
// for the direction and key length, and `load` writes it into seventeen
// 128-bit round-key registers in one clock.  This is the document's
// generator for the unrolled pipeline.
//
// Outputs: rk[1..17] (rk[0] is unused and reads zero) and `valid`, set by
// `load` and cleared by `clear`.  For a key of n rounds, rk[n+1] is the
// final round's second key and rk[n+2..17] are zero.  Asynchronous
// active-low reset.
module keygen_parallel
  import aria_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  logic    clear,
  input  logic    decrypt,
  input  keylen_e keylen,
  input  block_t  w [4],
  output logic    valid,
  output block_t  rk [18]
);

  localparam int unsigned ROT [5] = '{19, 31, 67, 97, 109};

  block_t ek [18];
  block_t ek_dl [18];
  block_t nxt [18];

  for (genvar k = 1; k <= 17; k++) begin : g_ek
    assign ek[k] = w[(k-1) % 4] ^ rotr128(w[k % 4], ROT[(k-1) / 4]);
  end
  assign ek[0] = '0;

  for (genvar k = 2; k <= 16; k++) begin : g_dl
    diffusion u_dl (.din(ek[k]), .dout(ek_dl[k]));
  end
  assign ek_dl[0]  = '0;
  assign ek_dl[1]  = '0;
  assign ek_dl[17] = '0;

  always_comb begin
    int n;
    n = int'(num_rounds(keylen));
    nxt = '{default: '0};
    for (int i = 1; i <= 17; i++) begin
      if (i <= n + 1) begin
        if (!decrypt)      nxt[i] = ek[i];
        else if (i == 1)   nxt[i] = ek[n + 1];
        else if (i == n+1) nxt[i] = ek[1];
        else               nxt[i] = ek_dl[n + 2 - i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk    <= '{default: '0};
      valid <= 1'b0;
    end else if (load) begin
      rk    <= nxt;
      valid <= 1'b1;
    end else if (clear) begin
      valid <= 1'b0;
    end
  end

endmodule

// aria_loop: iterative ARIA encryption/decryption core (loop architecture)
// for feedback modes of operation.
//
// One round unit (XOR(1) AddRoundKey, a shared odd/even substitution layer,
// diffusion) is reused once per clock.  The same unit also computes the key
// initialization: with the constant CK1..CK3 as its round key and the extra
// XOR(2) array on its output it produces
//     W1 = Fo(W0, CK1) ^ KR,  W2 = Fe(W1, CK2) ^ W0,  W3 = Fo(W2, CK3) ^ W1
// (W0 = KL) in three cycles into the W registers.  Round keys come from the
// on-the-fly generator (keysched_otf) one round ahead into its single key
// register.  In the final round the XOR(3) array adds the last round key
// instead of the diffusion.  This organization follows the document.
//
// Timing: a block is accepted when `start` is high and the core is idle
// (busy low).  Key initialization takes 3 cycles and the rounds 12/14/16,
// so `done` pulses with the result on `dout` 15/17/19 clock edges after the
// accepting edge.  `start` may be asserted in the cycle `done` is high, so
// a new block can begin every 15/17/19 cycles.  Key initialization is
// repeated for every block, matching the document's latency figures; `dout`
// holds its value until the next block finishes.
//
// Interface choices of this design: the master key is left aligned in
// `key` (bits beyond the key length are ignored), byte 0 of a block is bits
// 127:120, and reset is asynchronous and active low.
module aria_loop
  import aria_pkg::*;
#(
  parameter sbox_impl_e IMPL = SBOX_LUT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  keylen_e      keylen,
  input  logic [255:0] key,
  input  block_t       din,
  output logic         busy,
  output logic         done,
  output block_t       dout
);

  typedef enum logic [1:0] {ST_IDLE, ST_INIT, ST_ROUND} state_e;

  state_e     state;
  logic [4:0] cnt;          // INIT: step 1..3, ROUND: round 1..n
  keylen_e    kl_q;
  logic       dec_q;
  block_t     d_q;
  block_t     w_q [4];

  logic [4:0] nr;
  logic       last_round;
  assign nr         = 5'(num_rounds(kl_q));
  assign last_round = (state == ST_ROUND) && (cnt == nr);

  // Round unit operands.
  block_t ru_in, ru_rk, ru_rkfin, ru_dl, ru_fin, xor2, w_new;
  logic   ru_odd;
  block_t ks_key, ks_rk;
  logic [4:0] ks_idx;
  logic       ks_load;
  block_t     ks_w [4];

  always_comb begin
    ru_in  = d_q;
    ru_rk  = ks_rk;
    ru_odd = cnt[0];
    xor2   = w_q[1];
    if (state == ST_INIT) begin
      ru_in = w_q[2'(cnt - 5'd1)];
      ru_rk = ck(kl_q, int'(cnt));
      case (cnt)
        5'd1:    xor2 = w_q[1];   // holds KR until W1 is written
        5'd2:    xor2 = w_q[0];
        default: xor2 = w_q[1];
      endcase
    end
  end

  aria_round #(.IMPL(IMPL), .SUB_STAGES(1)) u_round (
    .clk, .odd(ru_odd), .din(ru_in), .rk(ru_rk), .rk_fin(ru_rkfin),
    .dl_out(ru_dl), .fin_out(ru_fin)
  );

  assign w_new    = ru_dl ^ xor2;   // XOR(2)
  assign ru_rkfin = ks_key;         // key n+1 while the final round runs

  // Key generator: during the last init step W3 is taken straight from
  // XOR(2) so that the first round key is ready for round 1.
  always_comb begin
    ks_w[0] = w_q[0];
    ks_w[1] = w_q[1];
    ks_w[2] = w_q[2];
    ks_w[3] = (state == ST_INIT) ? w_new : w_q[3];
    ks_idx  = (state == ST_INIT) ? 5'd1 : cnt + 5'd1;
    ks_load = ((state == ST_INIT) && (cnt == 5'd3)) || ((state == ST_ROUND) && !last_round);
  end

  keysched_otf u_ks (
    .clk, .rst_n, .w(ks_w), .keylen(kl_q), .decrypt(dec_q), .idx(ks_idx),
    .load(ks_load), .key_comb(ks_key), .rk(ks_rk)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      kl_q  <= KL128;
      dec_q <= 1'b0;
      d_q   <= '0;
      w_q   <= '{default: '0};
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        ST_IDLE: begin
          if (start) begin
            state  <= ST_INIT;
            cnt    <= 5'd1;
            kl_q   <= keylen;
            dec_q  <= decrypt;
            d_q    <= din;
            w_q[0] <= key[255:128];
            w_q[1] <= key_right(key[127:0], keylen);
          end
        end
        ST_INIT: begin
          w_q[2'(cnt)] <= w_new;
          if (cnt == 5'd3) begin
            state <= ST_ROUND;
            cnt   <= 5'd1;
          end else begin
            cnt <= cnt + 5'd1;
          end
        end
        default: begin
          if (last_round) begin
            d_q   <= ru_fin;
            done  <= 1'b1;
            state <= ST_IDLE;
            cnt   <= '0;
          end else begin
            d_q <= ru_dl;
            cnt <= cnt + 5'd1;
          end
        end
      endcase
    end
  end

  assign busy = (state != ST_IDLE);
  assign dout = d_q;

  // A round count never passes the number of rounds of the key length.
  a_round_bound : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_ROUND) |-> (cnt >= 5'd1 && cnt <= nr));
  // The init step count stays within the three Feistel rounds.
  a_init_bound : assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_INIT) |-> (cnt >= 5'd1 && cnt <= 5'd3));

endmodule

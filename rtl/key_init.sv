// key_init: ARIA key initialization for the pipelined core.
//
// Computes the four 128-bit initialization values from the master key with
// the three-round 256-bit Feistel network of the cipher:
//     W0 = KL, W1 = Fo(W0, CK1) ^ KR, W2 = Fe(W1, CK2) ^ W0,
//     W3 = Fo(W2, CK3) ^ W1,
// where Fo/Fe are the odd/even round functions (AddRoundKey, substitution,
// diffusion) and CK1..CK3 are the key-length dependent constants.  One round
// function and one extra 128-bit XOR array are reused for the three steps,
// the resource sharing the document describes for key initialization.  The
// pipelined core's round units are all busy with data, so this design gives
// key initialization its own round function (composite-field S-boxes).
//
// Timing: `start` (while idle) captures key and key length; `done` pulses
// 3 clock edges later, when w[0..3] are all valid.  w holds its value until
// the next start.  Asynchronous active-low reset.
module key_init
  import aria_pkg::*;
#(
  parameter sbox_impl_e IMPL = SBOX_COMP
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  keylen_e      keylen,
  input  logic [255:0] key,
  output logic         busy,
  output logic         done,
  output block_t       w [4]
);

  logic [1:0] step;         // 0 = idle, 1..3 = Feistel round in progress
  keylen_e    kl_q;
  block_t     f_in, f_out, xor2;

  always_comb begin
    f_in = w[2'(step - 2'd1)];
    xor2 = (step == 2'd2) ? w[0] : w[1];
  end

  aria_round #(.IMPL(IMPL), .SUB_STAGES(1)) u_round (
    .clk, .odd(step[0]), .din(f_in), .rk(ck(kl_q, int'(step))), .rk_fin('0),
    .dl_out(f_out), .fin_out()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0;
      kl_q <= KL128;
      w    <= '{default: '0};
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (step == 2'd0) begin
        if (start) begin
          step <= 2'd1;
          kl_q <= keylen;
          w[0] <= key[255:128];
          w[1] <= key_right(key[127:0], keylen);  // KR until W1 is written
        end
      end else begin
        w[step] <= f_out ^ xor2;
        step    <= (step == 2'd3) ? 2'd0 : step + 2'd1;
        done    <= (step == 2'd3);
      end
    end
  end

  assign busy = (step != 2'd0);

endmodule

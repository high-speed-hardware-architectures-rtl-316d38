// aria_pipeline: loop-unrolled, sub-pipelined ARIA core for non-feedback
// modes (ECB, CTR), accepting one 128-bit block per clock.
//
// Sixteen round units are laid out in a row, each ended by an outer
// pipeline register; inside each unit SUB_STAGES-1 further registers split
// the composite-field S-boxes (see aria_round for where the cuts go), so a
// block advances one sub-stage per clock.  Units 12, 14 and 16 can act as
// the final round (second AddRoundKey instead of diffusion); the unit that
// is final for the loaded key length writes that result into its register,
// and the output is taken there.  All round keys sit in the seventeen
// registers of the fully parallel key generator.  This is the document's
// architecture; the tap-based handling of the three key lengths and the
// valid/handshake signals are this design's.
//
// Key setup: a `key_start` pulse (pipeline empty) captures key, length and
// direction; key_init computes W0..W3 in 3 cycles and keygen_parallel loads
// the 17 round keys one cycle later, after which `key_ready` is high.  A
// block offered with `in_valid` while key_ready is low is dropped (and
// flagged by an assertion).
// Timing: a block offered in clock cycle c (in_valid high, sampled by the
// first round register at the end of c) leaves in cycle c + nr*SUB_STAGES
// (out_valid high; nr = 12/14/16), in order, one result per clock.
module aria_pipeline
  import aria_pkg::*;
#(
  parameter int unsigned SUB_STAGES = 4,
  parameter sbox_impl_e  IMPL       = SBOX_COMP
) (
  input  logic         clk,
  input  logic         rst_n,
  // key setup
  input  logic         key_start,
  input  logic         decrypt,
  input  keylen_e      keylen,
  input  logic [255:0] key,
  output logic         key_ready,
  // data stream
  input  logic         in_valid,
  input  block_t       din,
  output logic         out_valid,
  output block_t       dout,
  output logic         busy
);

  localparam int unsigned DEPTH = MAX_ROUNDS * SUB_STAGES;

  // ------------------------------------------------------------ key path
  keylen_e kl_q;
  logic    dec_q;
  logic    ki_busy, ki_done;
  block_t  w [4];
  block_t  rk [18];
  logic    rk_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kl_q  <= KL128;
      dec_q <= 1'b0;
    end else if (key_start && !ki_busy) begin
      kl_q  <= keylen;
      dec_q <= decrypt;
    end
  end

  key_init #(.IMPL(SBOX_COMP)) u_ki (
    .clk, .rst_n, .start(key_start && !ki_busy), .keylen, .key,
    .busy(ki_busy), .done(ki_done), .w
  );

  keygen_parallel u_kg (
    .clk, .rst_n, .load(ki_done), .clear(key_start), .decrypt(dec_q),
    .keylen(kl_q), .w, .valid(rk_valid), .rk
  );

  assign key_ready = rk_valid && !ki_busy;

  // ------------------------------------------------------------ data path
  logic [DEPTH:0] vs;        // vs[k]: a block sits after sub-stage k
  block_t         stage_q [MAX_ROUNDS+1];
  logic [4:0]     nr;

  assign nr         = 5'(num_rounds(kl_q));
  assign vs[0]      = in_valid && key_ready;
  assign stage_q[0] = din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vs[DEPTH:1] <= '0;
    else        vs[DEPTH:1] <= vs[DEPTH-1:0];
  end

  for (genvar r = 1; r <= MAX_ROUNDS; r++) begin : g_round
    block_t dl, fin;
    aria_round #(.IMPL(IMPL), .SUB_STAGES(SUB_STAGES)) u_round (
      .clk, .odd(1'(r % 2)), .din(stage_q[r-1]), .rk(rk[r]), .rk_fin(rk[r+1]),
      .dl_out(dl), .fin_out(fin)
    );
    // outer round register
    always_ff @(posedge clk) begin
      if ((r % 2 == 0) && (r >= 12) && (5'(r) == nr)) stage_q[r] <= fin;
      else                                          stage_q[r] <= dl;
    end
  end

  always_comb begin
    out_valid = 1'b0;
    dout      = stage_q[MAX_ROUNDS];
    case (kl_q)
      KL128: begin out_valid = vs[12*SUB_STAGES]; dout = stage_q[12]; end
      KL192: begin out_valid = vs[14*SUB_STAGES]; dout = stage_q[14]; end
      default: begin out_valid = vs[16*SUB_STAGES]; dout = stage_q[16]; end
    endcase
  end

  assign busy = |vs[DEPTH:1];

  // Round keys may only change while no block is in flight.
  a_key_change_idle : assert property (@(posedge clk) disable iff (!rst_n)
    key_start |-> !busy);
  // Blocks are only offered once the round keys are loaded.
  a_in_needs_key : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> key_ready);

endmodule

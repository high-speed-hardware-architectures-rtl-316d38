// aria_top: the two ARIA processors side by side.
//
//  * loop_*  - aria_loop, the iterative core for feedback modes (CBC, CFB,
//              OFB): one round per clock, 15/17/19 cycles per block for
//              128/192/256-bit keys, on-the-fly round keys.  Its S-boxes
//              are ROM tables by default (LOOP_IMPL), the faster of the two
//              variants the document evaluates for this core.
//  * pipe_*  - aria_pipeline, the unrolled sub-pipelined core for
//              non-feedback modes (ECB, CTR): one block per clock after a
//              latency of nr*PIPE_SUB_STAGES cycles, composite-field S-boxes,
//              fully parallel round keys; 4 sub-stages per round by default.
// The two share nothing but clock and reset (asynchronous, active low).
// Port meanings and timing are those of the two cores.
module aria_top
  import aria_pkg::*;
#(
  parameter sbox_impl_e  LOOP_IMPL       = SBOX_LUT,
  parameter int unsigned PIPE_SUB_STAGES = 4,
  parameter sbox_impl_e  PIPE_IMPL       = SBOX_COMP
) (
  input  logic         clk,
  input  logic         rst_n,
  // loop core
  input  logic         loop_start,
  input  logic         loop_decrypt,
  input  keylen_e      loop_keylen,
  input  logic [255:0] loop_key,
  input  block_t       loop_din,
  output logic         loop_busy,
  output logic         loop_done,
  output block_t       loop_dout,
  // pipelined core
  input  logic         pipe_key_start,
  input  logic         pipe_decrypt,
  input  keylen_e      pipe_keylen,
  input  logic [255:0] pipe_key,
  output logic         pipe_key_ready,
  input  logic         pipe_in_valid,
  input  block_t       pipe_din,
  output logic         pipe_out_valid,
  output block_t       pipe_dout,
  output logic         pipe_busy
);

  aria_loop #(.IMPL(LOOP_IMPL)) u_loop (
    .clk, .rst_n, .start(loop_start), .decrypt(loop_decrypt), .keylen(loop_keylen),
    .key(loop_key), .din(loop_din), .busy(loop_busy), .done(loop_done), .dout(loop_dout)
  );

  aria_pipeline #(.SUB_STAGES(PIPE_SUB_STAGES), .IMPL(PIPE_IMPL)) u_pipe (
    .clk, .rst_n, .key_start(pipe_key_start), .decrypt(pipe_decrypt), .keylen(pipe_keylen),
    .key(pipe_key), .key_ready(pipe_key_ready), .in_valid(pipe_in_valid), .din(pipe_din),
    .out_valid(pipe_out_valid), .dout(pipe_dout), .busy(pipe_busy)
  );

endmodule

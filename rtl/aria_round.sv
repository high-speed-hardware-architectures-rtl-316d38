// aria_round: one ARIA round unit, optionally split into sub-pipeline stages.
//
//   s       = SL(din ^ rk)          AddRoundKey (XOR(1)) and substitution
//   dl_out  = DL(s)                 ordinary round
//   fin_out = s ^ rk_fin            final round: the diffusion is replaced by
//                                   a second AddRoundKey (XOR(3))
// `odd` selects the odd-round (SL1) or even-round (SL2) substitution.
//
// SUB_STAGES places the inner pipeline cuts inside the S-boxes as the
// document describes for its sub-pipelined round unit:
//   1 - none (combinational round)
//   2 - after the GF(2^4) inversion
//   3 - before the GF(2^4) inversion and before the output map/affine
//   4 - all three of the above
// The outer register that ends a pipelined round is not in this module; the
// unit's latency is SUB_STAGES-1 cycles.  rk_fin is used after the last cut
// and must be held for that latency (it is static in the pipelined core).
// With IMPL = SBOX_LUT only SUB_STAGES = 1 is possible.
module aria_round
  import aria_pkg::*;
#(
  parameter sbox_impl_e  IMPL       = SBOX_COMP,
  parameter int unsigned SUB_STAGES = 1
) (
  input  logic   clk,
  input  logic   odd,
  input  block_t din,
  input  block_t rk,
  input  block_t rk_fin,
  output block_t dl_out,
  output block_t fin_out
);

  localparam bit CUT_PRE_INV  = (SUB_STAGES == 3) || (SUB_STAGES == 4);
  localparam bit CUT_POST_INV = (SUB_STAGES == 2) || (SUB_STAGES == 4);
  localparam bit CUT_PRE_OUT  = (SUB_STAGES == 3) || (SUB_STAGES == 4);

  if (SUB_STAGES < 1 || SUB_STAGES > 4) begin : g_bad_stages
    $error("aria_round: SUB_STAGES must be 1..4");
  end

  block_t s;

  subst_layer #(
    .IMPL(IMPL), .CUT_PRE_INV(CUT_PRE_INV), .CUT_POST_INV(CUT_POST_INV),
    .CUT_PRE_OUT(CUT_PRE_OUT)
  ) u_sl (
    .clk, .odd, .din(din ^ rk), .dout(s)
  );

  diffusion u_dl (.din(s), .dout(dl_out));

  assign fin_out = s ^ rk_fin;

endmodule

// subst_layer: ARIA substitution layer with S-boxes shared between odd and
// even rounds.
//
// In each 4-byte group the odd-round layer applies (S1, S2, S1^-1, S2^-1)
// and the even-round layer (S1^-1, S2^-1, S1, S2).  As the document
// proposes, one layer of 16 boxes serves both: per group there is one S1,
// one S1^-1, one S2 and one S2^-1, and multiplexers swap bytes 0<->2 and
// 1<->3 in front of them and back behind them when `odd` is low.
//
// IMPL selects the box realization (ROM table or composite field).  With the
// composite field, the CUT_* parameters insert the sub-pipeline registers of
// sbox_comp; the output swap select is delayed by the same number of cycles
// so a new (din, odd) pair may enter every clock.  LUT boxes cannot be cut.
// Latency: 0 cycles (combinational) with no cuts, else the number of cuts.
module subst_layer
  import aria_pkg::*;
#(
  parameter sbox_impl_e IMPL         = SBOX_COMP,
  parameter bit         CUT_PRE_INV  = 1'b0,
  parameter bit         CUT_POST_INV = 1'b0,
  parameter bit         CUT_PRE_OUT  = 1'b0
) (
  input  logic   clk,
  input  logic   odd,
  input  block_t din,
  output block_t dout
);

  localparam int unsigned LAT = int'(CUT_PRE_INV) + int'(CUT_POST_INV) + int'(CUT_PRE_OUT);

  if (IMPL == SBOX_LUT && LAT != 0) begin : g_bad_cut
    $error("subst_layer: a table S-box cannot be sub-pipelined");
  end

  // Output swap select, aligned with the box latency.
  logic odd_q [LAT+1];
  assign odd_q[0] = odd;
  for (genvar k = 0; k < LAT; k++) begin : g_odd_dly
    always_ff @(posedge clk) odd_q[k+1] <= odd_q[k];
  end

  for (genvar g = 0; g < 4; g++) begin : g_grp
    byte_t b0, b1, b2, b3;
    byte_t s1_in, s1i_in, s2_in, s2i_in;
    byte_t s1_out, s1i_out, s2_out, s2i_out;

    assign b0 = din[127 - 32*g      -: 8];
    assign b1 = din[127 - 32*g - 8  -: 8];
    assign b2 = din[127 - 32*g - 16 -: 8];
    assign b3 = din[127 - 32*g - 24 -: 8];

    assign s1_in  = odd ? b0 : b2;
    assign s1i_in = odd ? b2 : b0;
    assign s2_in  = odd ? b1 : b3;
    assign s2i_in = odd ? b3 : b1;

    if (IMPL == SBOX_LUT) begin : g_lut
      sbox_lut #(.KIND(S1))    u_s1  (.x(s1_in),  .y(s1_out));
      sbox_lut #(.KIND(S1INV)) u_s1i (.x(s1i_in), .y(s1i_out));
      sbox_lut #(.KIND(S2))    u_s2  (.x(s2_in),  .y(s2_out));
      sbox_lut #(.KIND(S2INV)) u_s2i (.x(s2i_in), .y(s2i_out));
    end else begin : g_comp
      sbox_comp #(.KIND(S1),    .CUT_PRE_INV(CUT_PRE_INV), .CUT_POST_INV(CUT_POST_INV),
                  .CUT_PRE_OUT(CUT_PRE_OUT)) u_s1  (.clk, .x(s1_in),  .y(s1_out));
      sbox_comp #(.KIND(S1INV), .CUT_PRE_INV(CUT_PRE_INV), .CUT_POST_INV(CUT_POST_INV),
                  .CUT_PRE_OUT(CUT_PRE_OUT)) u_s1i (.clk, .x(s1i_in), .y(s1i_out));
      sbox_comp #(.KIND(S2),    .CUT_PRE_INV(CUT_PRE_INV), .CUT_POST_INV(CUT_POST_INV),
                  .CUT_PRE_OUT(CUT_PRE_OUT)) u_s2  (.clk, .x(s2_in),  .y(s2_out));
      sbox_comp #(.KIND(S2INV), .CUT_PRE_INV(CUT_PRE_INV), .CUT_POST_INV(CUT_POST_INV),
                  .CUT_PRE_OUT(CUT_PRE_OUT)) u_s2i (.clk, .x(s2i_in), .y(s2i_out));
    end

    assign dout[127 - 32*g      -: 8] = odd_q[LAT] ? s1_out  : s1i_out;
    assign dout[127 - 32*g - 8  -: 8] = odd_q[LAT] ? s2_out  : s2i_out;
    assign dout[127 - 32*g - 16 -: 8] = odd_q[LAT] ? s1i_out : s1_out;
    assign dout[127 - 32*g - 24 -: 8] = odd_q[LAT] ? s2i_out : s2_out;
  end

endmodule

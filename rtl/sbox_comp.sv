// sbox_comp: one ARIA S-box (S1, S2, S1^-1 or S2^-1) computed with composite
// field arithmetic over GF(2^4)^2 instead of a table.
//
// Forward boxes: y = delta(inv(Map(x))), where Map is the isomorphism into
// GF(2^4)^2 and delta merges the inverse map with the S-box's affine
// transformation (delta1 for S1, delta2 for S2; S2's x^247 is folded into
// its matrix since x^247 = (x^-1)^8 and the Frobenius map is linear).
// Inverse boxes: y = Map^-1(inv(delta^-1(x))), delta^-1 merging the inverse
// affine transformation (with its constant) and Map.
// The inversion of a = ah*x + al (n(x) = x^2 + x + {e}) is
//   d = (ah^2*{e} + ah*al + al^2)^-1,  a^-1 = (ah*d)*x + (ah+al)*d.
// This structure and all matrices follow the document's S-box description.
//
// Three optional register cuts split the box for the sub-pipelined round:
//   CUT_PRE_INV  - before the GF(2^4) inversion
//   CUT_POST_INV - after the GF(2^4) inversion
//   CUT_PRE_OUT  - before the output matrix (delta or Map^-1)
// With all cuts 0 the box is purely combinational and clk is unused.
// Latency = number of cuts set, one new input per cycle.  Cut registers are
// plain data registers without reset or enable (validity is tracked by the
// enclosing pipeline).
module sbox_comp
  import aria_pkg::*;
#(
  parameter sbox_kind_e KIND         = S1,
  parameter bit         CUT_PRE_INV  = 1'b0,
  parameter bit         CUT_POST_INV = 1'b0,
  parameter bit         CUT_PRE_OUT  = 1'b0
) (
  input  logic  clk,
  input  byte_t x,
  output byte_t y
);

  // Input linear map into the composite field.
  byte_t a;
  always_comb begin
    case (KIND)
      S1INV:   a = lin8(DELTA1I, x) ^ AFF1I_C;
      S2INV:   a = lin8(DELTA2I, x) ^ AFF2I_C;
      default: a = lin8(MAP_M, x);
    endcase
  end

  // Stage A: the argument of the GF(2^4) inversion.
  nib_t ah_a, al_a, t_a;
  always_comb begin
    ah_a = a[7:4];
    al_a = a[3:0];
    t_a  = gf4_mul_e(gf4_sq(ah_a)) ^ gf4_mul(ah_a, al_a) ^ gf4_sq(al_a);
  end

  nib_t ah_b, al_b, t_b;
  if (CUT_PRE_INV) begin : g_cut1
    always_ff @(posedge clk) {ah_b, al_b, t_b} <= {ah_a, al_a, t_a};
  end else begin : g_nocut1
    assign {ah_b, al_b, t_b} = {ah_a, al_a, t_a};
  end

  // Stage B: GF(2^4) inversion.
  nib_t d_b;
  assign d_b = gf4_inv(t_b);

  nib_t ah_c, al_c, d_c;
  if (CUT_POST_INV) begin : g_cut2
    always_ff @(posedge clk) {ah_c, al_c, d_c} <= {ah_b, al_b, d_b};
  end else begin : g_nocut2
    assign {ah_c, al_c, d_c} = {ah_b, al_b, d_b};
  end

  // Stage C: the two output multiplications.
  byte_t inv_c;
  assign inv_c = {gf4_mul(ah_c, d_c), gf4_mul(ah_c ^ al_c, d_c)};

  byte_t inv_d;
  if (CUT_PRE_OUT) begin : g_cut3
    always_ff @(posedge clk) inv_d <= inv_c;
  end else begin : g_nocut3
    assign inv_d = inv_c;
  end

  // Output linear map back to GF(2^8), merged with the affine step.
  always_comb begin
    case (KIND)
      S1:      y = lin8(DELTA1, inv_d) ^ AFF1_C;
      S2:      y = lin8(DELTA2, inv_d) ^ AFF2_C;
      default: y = lin8(MAP_MINV, inv_d);
    endcase
  end

endmodule

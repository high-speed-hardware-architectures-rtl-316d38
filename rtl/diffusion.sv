// diffusion: ARIA diffusion layer, the involutional 16x16 byte binary matrix.
//
// Each output byte is the XOR of seven input bytes.  Following the document,
// four shared temporaries T0..T3 (each the XOR of four bytes) let every
// output reuse one of them, which brings the cost from 768 to 480 two-input
// XOR gates.  Byte 0 is bits 127:120.  Purely combinational; the layer is
// its own inverse, so the same circuit serves encryption, decryption and the
// decryption round-key transform.
module diffusion
  import aria_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  byte_t x [16];
  byte_t y [16];
  byte_t t0, t1, t2, t3;

  always_comb begin
    for (int i = 0; i < 16; i++) x[i] = din[127 - 8*i -: 8];

    t0 = x[3] ^ x[4] ^ x[9]  ^ x[14];
    t1 = x[2] ^ x[5] ^ x[8]  ^ x[15];
    t2 = x[1] ^ x[6] ^ x[11] ^ x[12];
    t3 = x[0] ^ x[7] ^ x[10] ^ x[13];

    y[0]  = x[6] ^ x[8]  ^ x[13] ^ t0;
    y[5]  = x[1] ^ x[10] ^ x[15] ^ t0;
    y[11] = x[2] ^ x[7]  ^ x[12] ^ t0;
    y[14] = x[0] ^ x[5]  ^ x[11] ^ t0;

    y[1]  = x[7] ^ x[9]  ^ x[12] ^ t1;
    y[4]  = x[0] ^ x[11] ^ x[14] ^ t1;
    y[10] = x[3] ^ x[6]  ^ x[13] ^ t1;
    y[15] = x[1] ^ x[4]  ^ x[10] ^ t1;

    y[2]  = x[4] ^ x[10] ^ x[15] ^ t2;
    y[7]  = x[3] ^ x[8]  ^ x[13] ^ t2;
    y[9]  = x[0] ^ x[5]  ^ x[14] ^ t2;
    y[12] = x[2] ^ x[7]  ^ x[9]  ^ t2;

    y[3]  = x[5] ^ x[11] ^ x[14] ^ t3;
    y[6]  = x[2] ^ x[9]  ^ x[12] ^ t3;
    y[8]  = x[1] ^ x[4]  ^ x[15] ^ t3;
    y[13] = x[3] ^ x[6]  ^ x[8]  ^ t3;

    for (int i = 0; i < 16; i++) dout[127 - 8*i -: 8] = y[i];
  end

endmodule

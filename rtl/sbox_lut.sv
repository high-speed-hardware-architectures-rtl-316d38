// sbox_lut: one ARIA S-box (S1, S2, S1^-1 or S2^-1) as a 256 x 8-bit ROM.
//
// This is the look-up-table realization the document compares against the
// composite-field one: a single undivided table access, so it cannot be
// split by pipeline registers.  The ROM contents are computed at elaboration
// from the S-box definitions (S1(x) = A*x^-1 + 0x63, S2(x) = B*x^247 + 0xE2,
// inverses by inverting the table); no data file is needed.  The read is
// asynchronous (combinational) so that a whole round fits in one clock, as
// the loop architecture requires; that choice is this design's.
module sbox_lut
  import aria_pkg::*;
#(
  parameter sbox_kind_e KIND = S1
) (
  input  byte_t x,
  output byte_t y
);

  localparam logic [255:0][7:0] ROM = sbox_table(KIND);

  assign y = ROM[x];

endmodule

// aes_sbox: the AES byte substitution for one byte, forward (SubBytes) or
// inverse (InvSubBytes), chosen by the INVERSE parameter.
//
// The table is a constant built at elaboration by aes_pkg::sbox_table() from
// the S-box definition (GF(2^8) inverse, then the affine map), and the byte
// indexes it, so synthesis sees a 256 x 8 ROM or its logic. The S-box as
// such is named in the design's round diagram ("SubBytes / S-box",
// "InvSubBytes / S-box"); building it as a look-up table is this design's
// choice. Purely combinational: out follows in in the same cycle.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t in,
  output byte_t out
);

  localparam logic [2047:0] TABLE = sbox_table(INVERSE);

  assign out = TABLE[8*in +: 8];

endmodule

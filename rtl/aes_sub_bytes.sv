// aes_sub_bytes: SubBytes (INVERSE = 0) or InvSubBytes (INVERSE = 1) on a
// whole 128-bit state: each of the 16 bytes goes through its own S-box.
//
// Sixteen aes_sbox instances work in parallel, as in the round diagram where
// one "SubBytes / S-box" unit handles the state. Combinational; the register
// that follows it belongs to aes_round.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t in,
  output block_t out
);

  for (genvar k = 0; k < 16; k++) begin : g_byte
    aes_sbox #(.INVERSE(INVERSE)) u_sbox (
      .in (in [8*k +: 8]),
      .out(out[8*k +: 8])
    );
  end

endmodule

// aes_mix_columns: MixColumn (INVERSE = 0) or InvMixColumn (INVERSE = 1) on
// the four columns of the state.
//
// Each column (a0..a3, a0 the top row) is multiplied in GF(2^8) by the
// circulant matrix with first row {02 03 01 01} (forward) or
// {0e 0b 0d 09} (inverse). The forward products use xtime only; the inverse
// uses the shift-and-add product of aes_pkg with constant operands, which
// synthesis reduces to XOR networks. Combinational.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t in,
  output block_t out
);

  function automatic word_t mix_column(word_t col);
    byte_t a [4];
    byte_t b [4];
    for (int r = 0; r < 4; r++) a[r] = col[31 - 8*r -: 8];
    for (int r = 0; r < 4; r++) begin
      if (INVERSE)
        b[r] = gf_mul(a[r], 8'h0e) ^ gf_mul(a[(r+1)%4], 8'h0b)
             ^ gf_mul(a[(r+2)%4], 8'h0d) ^ gf_mul(a[(r+3)%4], 8'h09);
      else
        b[r] = xtime(a[r]) ^ (xtime(a[(r+1)%4]) ^ a[(r+1)%4])
             ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    return {b[0], b[1], b[2], b[3]};
  endfunction

  for (genvar c = 0; c < 4; c++) begin : g_col
    assign out[127 - 32*c -: 32] = mix_column(in[127 - 32*c -: 32]);
  end

endmodule

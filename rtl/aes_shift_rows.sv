// aes_shift_rows: ShiftRows (INVERSE = 0) or InvShiftRows (INVERSE = 1).
//
// Row r of the state (bytes r, 4+r, 8+r, 12+r) is rotated by r byte
// positions: to the left for ShiftRows, to the right for the inverse. Pure
// wiring: out byte (column c, row r) takes in byte (column c+r mod 4, row r)
// for ShiftRows and (column c-r mod 4, row r) for the inverse. Bytes are
// numbered from the most significant end (see aes_pkg).
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t in,
  output block_t out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        if (INVERSE)
          out[127 - 8*(4*c + r) -: 8] = in[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8];
        else
          out[127 - 8*(4*c + r) -: 8] = in[127 - 8*(4*((c + r) % 4) + r) -: 8];
      end
    end
  end

endmodule

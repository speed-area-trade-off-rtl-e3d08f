// aes_shift_rows: the shift-row phase of an AES round.
//
// Row r of the 4x4 byte state is rotated left by r positions: the byte in row
// r of output column c is taken from column (c + r) mod 4 of the input. In
// hardware this is pure wiring with no logic and no delay.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_o[127-8*(4*c+r) -: 8] = state_i[127-8*(4*((c+r)%4)+r) -: 8];
  end

endmodule

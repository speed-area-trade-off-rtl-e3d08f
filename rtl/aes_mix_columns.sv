// aes_mix_columns: the mix-column phase of an AES round.
//
// Four independent column mixers, each multiplying one 32-bit column by the
// fixed AES polynomial in GF(2^8) (xtime and XOR only). Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    always_comb state_o[127-32*c -: 32] = mix_column(state_i[127-32*c -: 32]);
  end

endmodule

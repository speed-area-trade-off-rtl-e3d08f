// aes_sub_bytes: the substitution phase of an AES round.
//
// Sixteen parallel lookup-table S-boxes, one per state byte, so the whole
// 128-bit state is substituted in one combinational pass.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_i,
  output block_t state_o
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in_i  (state_i[127-8*i -: 8]),
      .sub_o (state_o[127-8*i -: 8])
    );
  end

endmodule

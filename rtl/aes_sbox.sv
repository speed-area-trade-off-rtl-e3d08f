// aes_sbox: the AES byte substitution as a direct lookup table.
//
// All 256 substitution values are pre-computed (see aes_pkg::SBOX_TABLE) and
// the input byte simply addresses the table. This is the direct
// implementation preferred over computing the inverse on line with GF(2^4)
// arithmetic, because it gives the shorter critical path. Purely
// combinational: sub_o follows in_i in the same cycle.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_i,
  output byte_t sub_o
);

  always_comb sub_o = SBOX_TABLE[8*in_i +: 8];

endmodule

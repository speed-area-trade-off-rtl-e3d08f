// aes_key_sched: one step of the AES-128 key expansion, computed on the fly.
//
// From the previous round key (words w0..w3) it forms the next one in the
// three phases of the key-scheduling datapath: substitution (the last word,
// rotated by one byte, goes through four S-boxes), r-table (the round constant
// rcon_i is XORed into its first byte) and XOR (w0' = w0 ^ t, w1' = w1 ^ w0',
// w2' = w2 ^ w1', w3' = w3 ^ w2'). Combinational; the caller supplies the
// round constant, so the same block serves a fixed round or a round selected
// at run time.
module aes_key_sched
  import aes_pkg::*;
(
  input  block_t key_i,
  input  byte_t  rcon_i,
  output block_t key_o
);

  word_t w0, w1, w2, w3, rot, sub, t;
  word_t n0, n1, n2, n3;

  assign {w0, w1, w2, w3} = key_i;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (.in_i(rot[31-8*i -: 8]), .sub_o(sub[31-8*i -: 8]));
  end

  always_comb begin
    t  = sub ^ {rcon_i, 24'h0};
    n0 = w0 ^ t;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    key_o = {n0, n1, n2, n3};
  end

endmodule

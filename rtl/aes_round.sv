// aes_round: one complete AES-128 round as a single combinational block.
//
// Encryption datapath: substitution, shift row, mix column, key addition.
// Key datapath: aes_key_sched turns the previous round key into this round's
// key, which is both added to the data and passed on to the next round.
// In the last round (last_i = 1) mix column is bypassed, as the AES
// definition requires. rcon_i and last_i are inputs so that a fixed round
// (tie them to constants) and a round chosen at run time both use this block.
// The whole round is one critical path; registers belong to the caller.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t key_i,
  input  byte_t  rcon_i,
  input  logic   last_i,
  output block_t state_o,
  output block_t key_o
);

  block_t sb, sr, mc;

  aes_sub_bytes   u_sub (.state_i(state_i), .state_o(sb));
  aes_shift_rows  u_sr  (.state_i(sb),      .state_o(sr));
  aes_mix_columns u_mc  (.state_i(sr),      .state_o(mc));
  aes_key_sched   u_ks  (.key_i(key_i), .rcon_i(rcon_i), .key_o(key_o));

  always_comb state_o = (last_i ? sr : mc) ^ key_o;

endmodule

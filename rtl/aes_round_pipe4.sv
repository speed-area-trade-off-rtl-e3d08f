// aes_round_pipe4: one AES-128 round split into four pipeline stages.
//
// Both datapaths advance one phase per clock, with a register after each:
//   stage 1  data: substitution (16 S-boxes)
//            key : the last key word, rotated by one byte, through 4 S-boxes,
//                  XORed into the first key word
//   stage 2  data: shift row
//            key : round constant (r-table) XORed into the first key byte
//   stage 3  data: mix column (bypassed in round NR)
//            key : XOR chain w1 ^= w0, w2 ^= w1, w3 ^= w2
//   stage 4  data: key addition with the finished round key
//            key : passed on unchanged
// A new block can enter every cycle; it leaves four cycles later together
// with its round key. ROUND (1..NR) fixes the round constant and whether mix
// column is skipped. Only the valid bits are reset.
module aes_round_pipe4
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pipe_t pipe_i,
  output pipe_t pipe_o
);

  localparam byte_t RCON = rcon(ROUND);
  localparam bit    LAST = (ROUND == NR);

  // ---- stage 1: substitution ------------------------------------------
  block_t sb, d1, k1, d2, k2, d3, k3, d4, k4;
  word_t  rot, ksub;
  logic [4:1] v;

  aes_sub_bytes u_sub (.state_i(pipe_i.state), .state_o(sb));

  assign rot = {pipe_i.key[23:0], pipe_i.key[31:24]};
  for (genvar i = 0; i < 4; i++) begin : g_ksbox
    aes_sbox u_sbox (.in_i(rot[31-8*i -: 8]), .sub_o(ksub[31-8*i -: 8]));
  end

  always_ff @(posedge clk) begin
    d1 <= sb;
    k1 <= {pipe_i.key[127:96] ^ ksub, pipe_i.key[95:0]};
  end

  // ---- stage 2: shift row / r-table -----------------------------------
  block_t sr;
  aes_shift_rows u_sr (.state_i(d1), .state_o(sr));

  always_ff @(posedge clk) begin
    d2 <= sr;
    k2 <= {k1[127:120] ^ RCON, k1[119:0]};
  end

  // ---- stage 3: mix column / key XOR chain ----------------------------
  block_t mc;
  word_t  n0, n1, n2, n3;
  aes_mix_columns u_mc (.state_i(d2), .state_o(mc));

  always_comb begin
    n0 = k2[127:96];
    n1 = k2[95:64] ^ n0;
    n2 = k2[63:32] ^ n1;
    n3 = k2[31:0]  ^ n2;
  end

  always_ff @(posedge clk) begin
    d3 <= LAST ? d2 : mc;
    k3 <= {n0, n1, n2, n3};
  end

  // ---- stage 4: key addition ------------------------------------------
  always_ff @(posedge clk) begin
    d4 <= d3 ^ k3;
    k4 <= k3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[3:1], pipe_i.valid};
  end

  assign pipe_o = '{valid: v[4], state: d4, key: k4};

endmodule

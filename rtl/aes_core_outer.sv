// aes_core_outer: AES-128 encryption with outer-round pipelining only.
//
// The initial key addition and each of the ten rounds are one pipeline stage
// apiece (11 stages); a whole round, with its key-schedule step, is one
// combinational path (aes_round) between two registers. A block enters every
// cycle when in_valid_i is high (in_ready_o is always 1) and its ciphertext
// appears on data_o with out_valid_o 11 cycles later. Each block carries its
// own key. No stalls. Only the valid bits are reset.
module aes_core_outer
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid_i,
  output logic   in_ready_o,
  input  block_t data_i,
  input  block_t key_i,
  output logic   out_valid_o,
  output block_t data_o
);


  pipe_t p [NR+1];

  assign in_ready_o = 1'b1;

  aes_add_key_stage u_ak (
    .clk, .rst_n, .en_i(1'b1), .valid_i(in_valid_i),
    .data_i, .key_i, .pipe_o(p[0])
  );

  for (genvar r = 1; r <= NR; r++) begin : g_round
    block_t st, ky;
    logic   vq;
    block_t sq, kq;

    aes_round u_round (
      .state_i(p[r-1].state), .key_i(p[r-1].key),
      .rcon_i(rcon(r)), .last_i(r == NR),
      .state_o(st), .key_o(ky)
    );

    always_ff @(posedge clk) begin
      sq <= st;
      kq <= ky;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vq <= 1'b0;
      else        vq <= p[r-1].valid;
    end

    assign p[r] = '{valid: vq, state: sq, key: kq};
  end

  assign out_valid_o = p[NR].valid;
  assign data_o      = p[NR].state;

endmodule

// aes_add_key_stage: the first pipeline stage of every AES unit here.
//
// The input block is XORed with the cipher key (the initial key addition)
// and registered together with the key itself, which the on-the-fly key
// schedule of the following rounds expands. en_i = 1 loads a new block; with
// en_i = 0 the register holds, which the multi-round unit uses to keep its
// input stable while its first stage iterates. Latency one clock. Only the
// valid bit is reset; data and key are qualified by it.
module aes_add_key_stage
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en_i,
  input  logic   valid_i,
  input  block_t data_i,
  input  block_t key_i,
  output pipe_t  pipe_o
);

  logic   valid_q;
  block_t state_q, key_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
    end else if (en_i) begin
      valid_q <= valid_i;
    end
  end

  always_ff @(posedge clk) begin
    if (en_i) begin
      state_q <= data_i ^ key_i;
      key_q   <= key_i;
    end
  end

  assign pipe_o = '{valid: valid_q, state: state_q, key: key_q};

endmodule

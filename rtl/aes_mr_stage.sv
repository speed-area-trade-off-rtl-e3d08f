// aes_mr_stage: one stage of the multi-round pipeline, two AES rounds on one
// round datapath.
//
// A data mux and a key mux, both steered by the round counter cnt_i, feed a
// single aes_round whose result is registered. With cnt_i = 0 the stage takes
// the block and key from the previous stage and computes round FIRST_ROUND;
// with cnt_i = 1 it takes its own register and computes round FIRST_ROUND+1.
// The round constant and the mix-column bypass of round NR follow the round
// being computed. So a block spends two cycles in the stage and the stage
// accepts one block every two cycles. The valid bit travels with the block
// (it is loaded when cnt_i = 0 and held otherwise) and is the only reset
// state.
module aes_mr_stage
  import aes_pkg::*;
#(
  parameter int unsigned FIRST_ROUND = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cnt_i,
  input  pipe_t pipe_i,
  output pipe_t pipe_o
);

  pipe_t       src;
  int unsigned round_num;
  byte_t       rc;
  logic        last;
  block_t      st, ky, sq, kq;
  logic        vq;

  always_comb begin
    src       = cnt_i ? pipe_o : pipe_i;
    round_num = FIRST_ROUND + 32'(cnt_i);
    rc        = rcon(round_num);
    last      = (round_num == NR);
  end

  aes_round u_round (
    .state_i(src.state), .key_i(src.key), .rcon_i(rc), .last_i(last),
    .state_o(st), .key_o(ky)
  );

  always_ff @(posedge clk) begin
    sq <= st;
    kq <= ky;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vq <= 1'b0;
    else        vq <= src.valid;
  end

  assign pipe_o = '{valid: vq, state: sq, key: kq};

endmodule

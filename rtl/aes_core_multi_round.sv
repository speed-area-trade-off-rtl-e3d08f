// aes_core_multi_round: AES-128 encryption with multi-round pipelining, the
// smallest of the three organisations.
//
// After the initial key-addition stage come five aes_mr_stage stages, each
// computing two consecutive rounds on one round datapath (rounds 1&2, 3&4,
// ..., 9&10). A free-running one-bit counter cnt, cleared by reset, steers all
// stages together: on a cycle with cnt = 0 every stage takes the block from
// the stage before it, on a cycle with cnt = 1 every stage iterates on its
// own block. The key-addition register loads only on cnt = 1 cycles, so a new
// block is accepted every second cycle, signalled by in_ready_o (= cnt). A
// block sampled with in_valid_i & in_ready_o leaves 11 cycles later:
// out_valid_o is high for the one cycle in two in which the last stage holds
// a finished round 10, and data_o is only meaningful then.
// An assertion checks that outputs are never in consecutive cycles. Its
// disable-iff on rst_n makes lint report rst_n as used both synchronously and
// asynchronously; that use is in the assertion only, not in the logic.
module aes_core_multi_round
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

  localparam int unsigned ROUNDS_PER_STAGE = 2;
  localparam int unsigned STAGES           = NR / ROUNDS_PER_STAGE;

  logic  cnt;
  pipe_t p [STAGES+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= 1'b0;
    else        cnt <= ~cnt;
  end

  assign in_ready_o = cnt;

  aes_add_key_stage u_ak (
    .clk, .rst_n, .en_i(cnt), .valid_i(in_valid_i),
    .data_i, .key_i, .pipe_o(p[0])
  );

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    aes_mr_stage #(.FIRST_ROUND(ROUNDS_PER_STAGE * s - 1)) u_stage (
      .clk, .rst_n, .cnt_i(cnt), .pipe_i(p[s-1]), .pipe_o(p[s])
    );
  end

  assign out_valid_o = p[STAGES].valid & ~cnt;

  // A finished block can leave at most every second cycle.
  a_out_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                  out_valid_o |=> !out_valid_o);
  assign data_o      = p[STAGES].state;

endmodule

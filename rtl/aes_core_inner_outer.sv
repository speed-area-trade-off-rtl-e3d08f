// aes_core_inner_outer: AES-128 encryption with inner- and outer-round
// pipelining, the fastest of the three organisations.
//
// The initial key addition is one pipeline stage and each of the ten rounds
// is four more (aes_round_pipe4), 41 stages in all. The key schedule runs
// alongside the data, so every block carries its own key and the key may
// change from one block to the next. A block enters every cycle when
// in_valid_i is high (in_ready_o is always 1) and its ciphertext appears on
// data_o with out_valid_o exactly 41 cycles later. There is no back-pressure:
// the pipeline never stalls.
module aes_core_inner_outer
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
    aes_round_pipe4 #(.ROUND(r)) u_round (
      .clk, .rst_n, .pipe_i(p[r-1]), .pipe_o(p[r])
    );
  end

  assign out_valid_o = p[NR].valid;
  assign data_o      = p[NR].state;

endmodule

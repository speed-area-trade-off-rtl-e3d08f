// aes_prng_top: the three AES counter-mode random number generators side by
// side, one for each pipelined organisation of the AES unit:
//   index 0  inner- and outer-round pipelining (41 stages, 1 number/cycle)
//   index 1  outer-round pipelining only      (11 stages, 1 number/cycle)
//   index 2  multi-round pipelining           (5 two-round stages,
//                                              1 number every 2 cycles)
// They trade area against throughput; a system would normally keep one. Each
// generator has its own seed, key and control inputs and its own key-stream
// output, indexed as above; they share only clock and reset. See
// aes_ctr_prng for the protocol.
module aes_prng_top
  import aes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic   [2:0]     seed_load_i,
  input  block_t [2:0]     seed_i,
  input  logic   [2:0]     start_i,
  input  logic   [2:0]     run_i,
  input  block_t [2:0]     key_i,
  output logic   [2:0]     ks_valid_o,
  output block_t [2:0]     ks_o
);

  localparam aes_arch_e ARCHS [3] = '{ARCH_INNER_OUTER, ARCH_OUTER, ARCH_MULTI_ROUND};

  for (genvar g = 0; g < 3; g++) begin : g_gen
    aes_ctr_prng #(.ARCH(ARCHS[g])) u_prng (
      .clk, .rst_n,
      .seed_load_i(seed_load_i[g]), .seed_i(seed_i[g]),
      .start_i(start_i[g]), .run_i(run_i[g]), .key_i(key_i[g]),
      .ks_valid_o(ks_valid_o[g]), .ks_o(ks_o[g])
    );
  end

endmodule

// aes_ctr_prng: AES-128 in counter mode as a pseudo-random number generator.
//
// A seed register takes the initial 128-bit seed (seed_load_i). start_i
// steers the counter mux to copy the seed register into the counter
// register; from then on, whenever run_i is high and the AES unit can take a
// block, the counter value is encrypted and the counter advances by one
// (modulo 2^128). The ciphertext of each counter value is the next 128-bit
// random number; it is captured in an output register and presented on ks_o
// with ks_valid_o for one cycle. With the outer- or inner-and-outer-round
// units a number comes out every cycle, with the multi-round unit every second
// cycle.
//
// ARCH selects the AES unit; key_i is sampled with each counter value, so a
// new key takes effect from the next block on. Timing from start_i: the
// counter holds the seed one cycle later, and a number leaves ks_o LATENCY+1
// cycles after its counter value entered the unit (LATENCY = 41, 11, 11).
module aes_ctr_prng
  import aes_pkg::*;
#(
  parameter aes_arch_e ARCH = ARCH_INNER_OUTER
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   seed_load_i,
  input  block_t seed_i,
  input  logic   start_i,
  input  logic   run_i,
  input  block_t key_i,
  output logic   ks_valid_o,
  output block_t ks_o
);

  block_t seed_q, ctr_q, core_out;
  logic   ctr_ok_q, core_in_valid, core_ready, core_out_valid;
  logic   ks_valid_q;
  block_t ks_q;

  always_ff @(posedge clk) begin
    if (seed_load_i) seed_q <= seed_i;
  end

  // Counter register with its seed / increment mux.
  always_ff @(posedge clk) begin
    if (start_i)                          ctr_q <= seed_q;
    else if (core_in_valid && core_ready) ctr_q <= ctr_q + block_t'(1);
  end

  // The counter is meaningful once it has been seeded.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ctr_ok_q <= 1'b0;
    else if (start_i) ctr_ok_q <= 1'b1;
  end

  assign core_in_valid = run_i && ctr_ok_q && !start_i;

  if (ARCH == ARCH_INNER_OUTER) begin : g_inner_outer
    aes_core_inner_outer u_aes (
      .clk, .rst_n, .in_valid_i(core_in_valid), .in_ready_o(core_ready),
      .data_i(ctr_q), .key_i, .out_valid_o(core_out_valid), .data_o(core_out)
    );
  end else if (ARCH == ARCH_OUTER) begin : g_outer
    aes_core_outer u_aes (
      .clk, .rst_n, .in_valid_i(core_in_valid), .in_ready_o(core_ready),
      .data_i(ctr_q), .key_i, .out_valid_o(core_out_valid), .data_o(core_out)
    );
  end else begin : g_multi_round
    aes_core_multi_round u_aes (
      .clk, .rst_n, .in_valid_i(core_in_valid), .in_ready_o(core_ready),
      .data_i(ctr_q), .key_i, .out_valid_o(core_out_valid), .data_o(core_out)
    );
  end

  // Output (key-stream) register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ks_valid_q <= 1'b0;
    else        ks_valid_q <= core_out_valid;
  end

  always_ff @(posedge clk) begin
    if (core_out_valid) ks_q <= core_out;
  end

  assign ks_valid_o = ks_valid_q;
  assign ks_o       = ks_q;

endmodule

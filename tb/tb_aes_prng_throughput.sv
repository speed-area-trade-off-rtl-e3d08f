// tb_aes_prng_throughput: sustained key-stream rate of the three generators.
//
// All three generators of aes_prng_top (default sizes) are seeded and run
// continuously for a long window. Every number is checked against the
// reference AES model, and the number of outputs in a steady window of W
// cycles must be W (inner+outer and outer-only units) or W/2 (multi-round
// unit). The measured bits per cycle are then converted to Gbit/s at each of
// the five clock rates of the published 0.18 um synthesis results and compared
// with the throughput published for that clock (within 0.1 Gbit/s).
module tb_aes_prng_throughput;
  import aes_ref_pkg::*;

  localparam int W = 3000;         // measurement window, cycles
  localparam int WARMUP = 60;      // longer than the deepest pipeline

  // published clock (MHz) and throughput (Gbit/s x 10), five timing targets each
  localparam int MHZ [3][5] = '{'{606, 591, 558, 526, 467},
                                '{377, 346, 325, 277, 246},
                                '{362, 339, 322, 280, 245}};
  localparam int GBPS10 [3][5] = '{'{776, 756, 714, 673, 597},
                                   '{482, 443, 416, 354, 315},
                                   '{231, 217, 206, 179, 157}};
  localparam int CPS [3] = '{1, 1, 2};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic   [2:0]        seed_load, start, run, ks_valid;
  logic   [2:0][127:0] seed, key, ks;
  bit     [127:0]      model_ctr [3];
  int cyc = 0, win_lo = 0, win_hi = 0;
  int in_window [3];

  aes_prng_top dut (.clk, .rst_n, .seed_load_i(seed_load), .seed_i(seed), .start_i(start),
                    .run_i(run), .key_i(key), .ks_valid_o(ks_valid), .ks_o(ks));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (W + 1000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_mon
    always @(negedge clk) if (rst_n && ks_valid[g]) begin
      checks++;
      if (ks[g] !== encrypt(key[g], model_ctr[g])) begin
        failures++; $display("FAIL gen %0d ctr %032h", g, model_ctr[g]);
      end
      model_ctr[g] = model_ctr[g] + 1;
      if (cyc >= win_lo && cyc < win_hi) in_window[g]++;
    end
  end

  initial begin
    seed_load = '0; start = '0; run = '0;
    for (int g = 0; g < 3; g++) begin
      seed[g] = rand128(); key[g] = rand128(); model_ctr[g] = seed[g]; in_window[g] = 0;
    end
    win_lo = 1 << 30; win_hi = 1 << 30;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); seed_load = '1;
    @(negedge clk); seed_load = '0; start = '1; run = '1;
    @(negedge clk); start = '0;
    repeat (WARMUP) @(negedge clk);
    win_lo = cyc; win_hi = cyc + W;
    repeat (W + 5) @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (in_window[g] != W / CPS[g]) begin
        failures++; $display("FAIL gen %0d: %0d numbers in %0d cycles", g, in_window[g], W);
      end
      for (int c = 0; c < 5; c++) begin
        real gbps;
        gbps = 128.0 * in_window[g] / W * MHZ[g][c] / 1000.0;
        $display("gen %0d at %0d MHz: %0.2f Gbit/s (published %0.1f)", g, MHZ[g][c], gbps,
                 GBPS10[g][c] / 10.0);
        checks++;
        if (gbps - GBPS10[g][c] / 10.0 > 0.1 || GBPS10[g][c] / 10.0 - gbps > 0.1) begin
          failures++; $display("FAIL gen %0d throughput differs from the published figure", g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_ctr_prng: end-to-end test of aes_ctr_prng, one instance per AES unit
// organisation (ARCH).
//
// Generator 0 uses the inner- and outer-round pipelined AES unit, 1 the
// outer-round one and 2 the multi-round one; each gets its own random seed
// and key. The sequence, applied to all three at once:
//   1. load a seed, start, run: numbers must be AES_key(seed), AES_key(seed+1),
//      ..., the first one LATENCY+2 cycles after start (one more for the
//      multi-round unit if it was not ready), then one every cycle
//      (generators 0, 1) or every second cycle (generator 2);
//   2. pause run and resume: the sequence continues where it stopped;
//   3. drain, change the key, run again: the new key applies;
//   4. drain, load the seed 2^128-5 and restart: the counter wraps to 0.
// Every number is compared with the reference AES model. Each mechanism
// (seed load, start, pause/resume, key change, counter wrap-around and the
// multi-round unit's two-cycle iteration) is counted and must occur.
module tb_aes_ctr_prng;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  localparam int LATS [3] = '{LAT_INNER_OUTER, LAT_OUTER, LAT_MULTI_ROUND};
  localparam int CPSS [3] = '{1, 1, CPS_MULTI_ROUND};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic   [2:0]       seed_load, start, run, ks_valid;
  logic   [2:0][127:0] seed, key, ks;
  int cyc = 0;

  bit [127:0] model_ctr [3];
  int last_out [3], first_out [3], outs [3], start_cyc [3];
  bit  seg_open [3];
  int n_seed_load = 0, n_start = 0, n_pause = 0, n_key_change = 0, n_wrap = 0, n_mr_iter = 0;

  localparam aes_arch_e ARCHS [3] = '{ARCH_INNER_OUTER, ARCH_OUTER, ARCH_MULTI_ROUND};
  for (genvar g = 0; g < 3; g++) begin : g_dut
    aes_ctr_prng #(.ARCH(ARCHS[g])) dut (
      .clk, .rst_n, .seed_load_i(seed_load[g]), .seed_i(seed[g]), .start_i(start[g]),
      .run_i(run[g]), .key_i(key[g]), .ks_valid_o(ks_valid[g]), .ks_o(ks[g]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitors.
  for (genvar g = 0; g < 3; g++) begin : g_mon
    always @(negedge clk) if (rst_n && ks_valid[g]) begin
      bit [127:0] exp;
      exp = encrypt(key[g], model_ctr[g]);
      checks++;
      if (ks[g] !== exp) begin
        failures++;
        $display("FAIL gen %0d ctr %032h: got %032h expected %032h", g, model_ctr[g], ks[g], exp);
      end
      if (first_out[g] < 0) begin
        first_out[g] = cyc;
        checks++;
        if (!(cyc - start_cyc[g] == LATS[g] + 2 ||
              (CPSS[g] == 2 && cyc - start_cyc[g] == LATS[g] + 3))) begin
          failures++;
          $display("FAIL gen %0d first number %0d cycles after start", g, cyc - start_cyc[g]);
        end
      end else if (seg_open[g]) begin
        checks++;
        if (cyc - last_out[g] != CPSS[g]) begin
          failures++; $display("FAIL gen %0d numbers %0d cycles apart", g, cyc - last_out[g]);
        end
        if (g == 2 && cyc - last_out[g] == 2) n_mr_iter++;
      end
      if (model_ctr[g] == '1) n_wrap++;
      model_ctr[g] = model_ctr[g] + 1;
      last_out[g] = cyc;
      seg_open[g] = 1'b1;
      outs[g]++;
    end
  end

  task automatic cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  // Stop running and wait until every pipeline is empty.
  task automatic drain_all();
    run = '0;
    cycles(60);
    for (int g = 0; g < 3; g++) seg_open[g] = 1'b0;
  endtask

  task automatic seed_and_start(bit [127:0] s [3]);
    for (int g = 0; g < 3; g++) seed[g] = s[g];
    seed_load = '1;
    cycles(1);
    seed_load = '0;
    seed = '0;               // the seed register must keep the loaded value
    n_seed_load++;
    cycles(1);
    start = '1; run = '1;
    for (int g = 0; g < 3; g++) begin
      model_ctr[g] = s[g]; start_cyc[g] = cyc; first_out[g] = -1; seg_open[g] = 1'b0;
    end
    cycles(1);
    start = '0;
    n_start++;
  endtask

  initial begin
    bit [127:0] s [3];
    int outs_before [3];
    seed_load = '0; start = '0; run = '0; seed = '0;
    for (int g = 0; g < 3; g++) begin
      key[g] = rand128(); outs[g] = 0; first_out[g] = 0; seg_open[g] = 1'b0; last_out[g] = 0;
    end
    cycles(3);
    rst_n = 1'b1;
    cycles(2);

    // 1. seed, start, run
    for (int g = 0; g < 3; g++) s[g] = rand128();
    seed_and_start(s);
    cycles(80);

    // 2. pause and resume
    run = '0;
    cycles(70);
    for (int g = 0; g < 3; g++) seg_open[g] = 1'b0;
    for (int g = 0; g < 3; g++) outs_before[g] = outs[g];
    run = '1;
    n_pause++;
    cycles(40);
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (outs[g] - outs_before[g] < 40 / CPSS[g] - LATS[g] - 3) begin
        failures++; $display("FAIL gen %0d produced only %0d numbers after resume", g, outs[g] - outs_before[g]);
      end
    end

    // 3. key change
    drain_all();
    for (int g = 0; g < 3; g++) key[g] = rand128();
    run = '1;
    n_key_change++;
    cycles(50);

    // 4. restart near the top of the counter range: wrap-around
    drain_all();
    for (int g = 0; g < 3; g++) s[g] = {128{1'b1}} - 128'd4;
    seed_and_start(s);
    cycles(70);
    drain_all();

    checks++;
    if (n_seed_load < 2 || n_start < 2 || n_pause < 1 || n_key_change < 1) begin
      failures++; $display("FAIL control mechanisms not all exercised");
    end
    checks++;
    if (n_wrap != 3) begin
      failures++; $display("FAIL counter wrapped %0d times, expected once per generator", n_wrap);
    end
    checks++;
    if (n_mr_iter == 0) begin
      failures++; $display("FAIL multi-round two-cycle iteration never seen");
    end
    $display("numbers: %0d %0d %0d; seed loads %0d starts %0d pauses %0d key changes %0d wraps %0d multi-round iterations %0d",
             outs[0], outs[1], outs[2], n_seed_load, n_start, n_pause, n_key_change, n_wrap, n_mr_iter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

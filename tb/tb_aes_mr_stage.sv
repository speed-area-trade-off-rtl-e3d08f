// tb_aes_mr_stage: drives the round counter as the multi-round unit does
// (toggling every cycle) into a rounds-1&2 and a rounds-9&10 stage. A random
// block and key are offered on every cnt = 0 cycle; after the following two
// clocks each stage must hold the reference result of its two rounds, and
// after the first clock the result of its first round.
module tb_aes_mr_stage;
  import aes_ref_pkg::*;
  import aes_pkg::pipe_t;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, cnt;
  pipe_t pi, po1, po9;

  aes_mr_stage               dut1 (.clk, .rst_n, .cnt_i(cnt), .pipe_i(pi), .pipe_o(po1));
  aes_mr_stage #(.FIRST_ROUND(9)) dut9 (.clk, .rst_n, .cnt_i(cnt), .pipe_i(pi), .pipe_o(po9));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(pipe_t got, bit v, bit [127:0] es, bit [127:0] ek, string what);
    checks++;
    if (got.valid !== v || (v && (got.state !== es || got.key !== ek))) begin
      failures++; $display("FAIL %s: got %0b %032h", what, got.valid, got.state);
    end
  endtask

  initial begin
    pipe_t src;
    bit [127:0] s1, k1, s2, k2, t9s, t9k, t10s, t10k;
    pi = '0; cnt = 1'b0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      cnt = 1'b0;
      src = '{valid: ($urandom % 4) != 0, state: rand128(), key: rand128()};
      pi = src;
      @(negedge clk);
      round(src.state, src.key, 1, s1, k1);
      round(src.state, src.key, 9, t9s, t9k);
      cmp(po1, src.valid, s1, k1, "round 1");
      cmp(po9, src.valid, t9s, t9k, "round 9");
      cnt = 1'b1;
      pi = '{valid: $urandom, state: rand128(), key: rand128()};  // must be ignored
      @(negedge clk);
      round(s1, k1, 2, s2, k2);
      round(t9s, t9k, 10, t10s, t10k);
      cmp(po1, src.valid, s2, k2, "round 2");
      cmp(po9, src.valid, t10s, t10k, "round 10");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_round_pipe4: a new random block and key enter every cycle (with
// random valid bits) into a round-1 and a round-10 instance; four cycles
// later each must deliver the reference round result and round key, with the
// valid bit delayed by exactly four cycles.
module tb_aes_round_pipe4;
  import aes_ref_pkg::*;
  import aes_pkg::pipe_t;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  pipe_t pi, po1, po10;
  pipe_t hist [$];

  aes_round_pipe4                dut1  (.clk, .rst_n, .pipe_i(pi), .pipe_o(po1));
  aes_round_pipe4 #(.ROUND(10))  dut10 (.clk, .rst_n, .pipe_i(pi), .pipe_o(po10));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(pipe_t got, pipe_t src, int r);
    bit [127:0] es, ek;
    round(src.state, src.key, r, es, ek);
    checks++;
    if (got.valid !== src.valid || (src.valid && (got.state !== es || got.key !== ek))) begin
      failures++;
      $display("FAIL round %0d: got %0b %032h exp %0b %032h", r, got.valid, got.state, src.valid, es);
    end
  endtask

  initial begin
    pi = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (hist.size() == 4) begin
        cmp(po1, hist[0], 1);
        cmp(po10, hist[0], 10);
        void'(hist.pop_front());
      end
      pi = '{valid: ($urandom % 5) != 0, state: rand128(), key: rand128()};
      hist.push_back(pi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

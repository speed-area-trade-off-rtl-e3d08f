// tb_aes_round: the combinational round on random states, keys and round
// numbers, with and without the last-round mix-column bypass, against the
// reference round.
module tb_aes_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0, last_seen = 0;
  logic [127:0] si, ki, so, ko;
  logic [7:0]   rc;
  logic         last;

  aes_round dut (.state_i(si), .key_i(ki), .rcon_i(rc), .last_i(last),
                 .state_o(so), .key_o(ko));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [127:0] es, ek;
    for (int n = 0; n < 400; n++) begin
      int r;
      r = 1 + int'($urandom % 10);
      si = rand128(); ki = rand128(); rc = rcon(r); last = (r == 10); #1;
      round(si, ki, r, es, ek);
      if (last) last_seen++;
      checks++;
      if (so !== es || ko !== ek) begin
        failures++; $display("FAIL r=%0d state %032h key %032h", r, so, ko);
      end
    end
    checks++;
    if (last_seen == 0) begin
      failures++; $display("FAIL last round never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_key_sched: walks the ten key-expansion steps of the FIPS-197
// Appendix A.1 key, checking round keys 1 and 10 against the published
// values and every step against the reference model; then random keys and
// round constants.
module tb_aes_key_sched;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] ki, ko;
  logic [7:0]   rc;

  aes_key_sched dut (.key_i(ki), .rcon_i(rc), .key_o(ko));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [127:0] k;
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      ki = k; rc = rcon(r); #1;
      checks++;
      if (ko !== next_key(k, r)) begin
        failures++; $display("FAIL round %0d: %032h", r, ko);
      end
      if (r == 1) begin
        checks++;
        if (ko !== 128'ha0fafe1788542cb123a339392a6c7605) begin
          failures++; $display("FAIL FIPS round key 1: %032h", ko);
        end
      end
      if (r == 10) begin
        checks++;
        if (ko !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
          failures++; $display("FAIL FIPS round key 10: %032h", ko);
        end
      end
      k = ko;
    end
    for (int n = 0; n < 300; n++) begin
      int r;
      r = 1 + int'($urandom % 10);
      ki = rand128(); rc = rcon(r); #1;
      checks++;
      if (ko !== next_key(ki, r)) begin
        failures++; $display("FAIL random %032h r=%0d", ki, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_sub_bytes: random states through the 16-S-box substitution layer,
// compared with the reference model byte by byte.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] si, so;

  aes_sub_bytes dut (.state_i(si), .state_o(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 Appendix B, round 1 start -> after SubBytes
    si = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    checks++;
    if (so !== 128'hd42711aee0bf98f1b8b45de51e415230) begin
      failures++; $display("FAIL FIPS vector: %032h", so);
    end
    for (int n = 0; n < 500; n++) begin
      si = rand128(); #1;
      checks++;
      if (so !== sub_bytes(si)) begin
        failures++; $display("FAIL %032h -> %032h", si, so);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

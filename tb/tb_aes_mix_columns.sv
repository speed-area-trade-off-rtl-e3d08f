// tb_aes_mix_columns: the four column mixers checked against the FIPS-197
// example and against the reference model (general GF multiplier).
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] si, so;

  aes_mix_columns dut (.state_i(si), .state_o(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    si = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    checks++;
    if (so !== 128'h046681e5e0cb199a48f8d37a2806264c) begin
      failures++; $display("FAIL FIPS vector: %032h", so);
    end
    for (int n = 0; n < 500; n++) begin
      si = rand128(); #1;
      checks++;
      if (so !== mix_columns(si)) begin
        failures++; $display("FAIL %032h -> %032h", si, so);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

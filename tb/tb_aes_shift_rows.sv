// tb_aes_shift_rows: the row rotation checked against the FIPS-197 example
// and against the reference model on random states.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] si, so;

  aes_shift_rows dut (.state_i(si), .state_o(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    si = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    checks++;
    if (so !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin
      failures++; $display("FAIL FIPS vector: %032h", so);
    end
    // byte-index pattern: output byte 4c+r must come from input byte 4((c+r)%4)+r
    for (int i = 0; i < 16; i++) si[127-8*i -: 8] = 8'(i);
    #1;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (so[127-8*(4*c+r) -: 8] !== 8'(4*((c+r)%4)+r)) begin
          failures++; $display("FAIL byte %0d", 4*c+r);
        end
      end
    for (int n = 0; n < 200; n++) begin
      si = rand128(); #1;
      checks++;
      if (so !== shift_rows(si)) begin
        failures++; $display("FAIL %032h -> %032h", si, so);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

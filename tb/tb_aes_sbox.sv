// tb_aes_sbox: exhaustive check of the lookup-table S-box against the
// reference model, plus published FIPS-197 entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] in_b, sub_b;

  aes_sbox dut (.in_i(in_b), .sub_o(sub_b));

  task automatic check(bit [7:0] x, bit [7:0] exp);
    in_b = x; #1;
    checks++;
    if (sub_b !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", x, sub_b, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'h00, 8'h63); check(8'h01, 8'h7c); check(8'h53, 8'hed);
    check(8'hff, 8'h16); check(8'hc9, 8'hdd);
    for (int x = 0; x < 256; x++) check(8'(x), sbox(8'(x)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

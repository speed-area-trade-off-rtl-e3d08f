// tb_aes_add_key_stage: random blocks and keys with a random load enable;
// after each clock the register must hold data ^ key and key of the last
// enabled cycle, and the valid bit must follow valid_i only when enabled.
module tb_aes_add_key_stage;
  import aes_ref_pkg::*;
  import aes_pkg::pipe_t;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en, vin;
  logic [127:0] d, k;
  pipe_t po;
  bit [127:0] es, ek;
  bit ev;

  aes_add_key_stage dut (.clk, .rst_n, .en_i(en), .valid_i(vin), .data_i(d), .key_i(k), .pipe_o(po));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; vin = 0; d = '0; k = '0;
    #12;
    checks++;
    if (po.valid !== 1'b0) begin failures++; $display("FAIL valid not reset"); end
    rst_n = 1'b1;
    ev = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0; vin = $urandom; d = rand128(); k = rand128();
      if (en) begin es = d ^ k; ek = k; ev = vin; end
      @(posedge clk); #1;
      if (n > 0 || en) begin
        checks++;
        if (po.valid !== ev || (ev && (po.state !== es || po.key !== ek))) begin
          failures++; $display("FAIL cycle %0d: %0b %032h %032h", n, po.valid, po.state, po.key);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

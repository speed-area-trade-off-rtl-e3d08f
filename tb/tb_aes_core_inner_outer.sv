// tb_aes_core_inner_outer: end-to-end check of the inner- and outer-round pipelined AES-128 unit.
//
// Blocks are offered on the falling clock edge whenever the unit is ready:
// first the two FIPS-197 example vectors, then random keys and plaintexts,
// with the key changing on every block, in a continuous burst (to check the
// rate of one block per cycle) and then with random gaps. Every ciphertext is compared
// with the reference model, and the number of cycles from the one in which a
// block is presented at the input to the one in which its ciphertext is on
// the output (the number of pipeline registers) must be 41.
module tb_aes_core_inner_outer;
  import aes_ref_pkg::*;
  import aes_pkg::LAT_INNER_OUTER;

  localparam int LAT = LAT_INNER_OUTER;
  localparam int CPS = 1;
  localparam int N_BLOCKS = 400;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid;
  logic [127:0] data_i, key_i, data_o;
  int cyc = 0, sent = 0, recv = 0, burst_out = 0, last_out_cyc = -100;
  int gap_min = 1000;

  typedef struct { bit [127:0] ct; int t; } exp_t;
  exp_t q[$];

  aes_core_inner_outer dut (.clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready),
             .data_i, .key_i, .out_valid_o(out_valid), .data_o);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (N_BLOCKS * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side.
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL unexpected output %032h", data_o);
    end else begin
      e = q.pop_front();
      if (data_o !== e.ct) begin
        failures++; $display("FAIL block %0d: got %032h expected %032h", recv, data_o, e.ct);
      end
      checks++;
      if (cyc - e.t != LAT) begin
        failures++; $display("FAIL block %0d latency %0d, expected %0d", recv, cyc - e.t, LAT);
      end
    end
    if (recv > 0 && cyc - last_out_cyc < gap_min) gap_min = cyc - last_out_cyc;
    last_out_cyc = cyc;
    recv++;
  end

  task automatic offer(bit [127:0] k, bit [127:0] p);
    // wait on falling edges until the unit is ready, then present the block
    while (1) begin
      in_valid = 1'b1; key_i = k; data_i = p;
      if (in_ready) break;
      @(negedge clk);
    end
    q.push_back('{ct: encrypt(k, p), t: cyc});
    sent++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 1'b0; data_i = '0; key_i = '0;
    // the reference itself against FIPS-197
    checks += 2;
    if (encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL reference C.1"); end
    if (encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734)
        !== 128'h3925841d02dc09fbdc118597196a0b32) begin failures++; $display("FAIL reference B"); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    offer(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff);
    offer(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734);
    // continuous burst
    for (int n = 0; n < N_BLOCKS / 2; n++) offer(rand128(), rand128());
    // random gaps
    for (int n = 0; n < N_BLOCKS / 2; n++) begin
      repeat ($urandom % 3) @(negedge clk);
      offer(rand128(), rand128());
    end
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (recv != sent || q.size() != 0) begin
      failures++; $display("FAIL sent %0d received %0d", sent, recv);
    end
    // back-to-back results in the burst are CPS cycles apart
    checks++;
    if (gap_min != CPS) begin
      failures++; $display("FAIL closest outputs %0d cycles apart, expected %0d", gap_min, CPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

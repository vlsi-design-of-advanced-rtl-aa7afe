// tb_aes_core: checks the iterative AES core against FIPS-197 Appendix C vectors and an
// independent reference model on random keys and blocks, for AES-128 and AES-256, both
// directions, and checks the latency: Nr cycles to encrypt, 2*Nr+1 cycles to decrypt.
module tb_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, start = 0, decrypt = 0, key256 = 0;
  key_t key;
  block_t din, dout;
  logic busy, valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_core dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit dec, input bit k256, input key_t k, input block_t d,
                     input block_t expect_out);
    int cyc;
    @(negedge clk);
    decrypt = dec; key256 = k256; key = k; din = d; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!valid) begin @(negedge clk); cyc++; end
    checks++;
    if (dout !== expect_out) begin
      failures++;
      $display("FAIL dec=%0d k256=%0d got %h exp %h", dec, k256, dout, expect_out);
    end
    checks++;
    if (cyc != (dec ? (k256 ? 29 : 21) : (k256 ? 14 : 10))) begin
      failures++;
      $display("FAIL latency dec=%0d k256=%0d cycles=%0d", dec, k256, cyc);
    end
  endtask

  initial begin
    key = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 C.1 / C.3
    run(0, 0, {128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(1, 0, {128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    run(0, 1, 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089);
    run(1, 1, 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h8ea2b7ca516745bfeafc49904b496089, 128'h00112233445566778899aabbccddeeff);
    // SP 800-38A F.1.1 first block
    run(0, 0, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, 128'h6bc1bee22e409f96e93d7e117393172a,
        128'h3ad77bb40d7a3660a89ecaf32466ef97);
    for (int i = 0; i < 40; i++) begin
      key_t k;
      block_t p;
      bit k256, dec;
      k = {ref_rand_blk(), ref_rand_blk()};
      p = ref_rand_blk();
      k256 = i[0];
      dec = i[1];
      if (!k256) k[127:0] = '0;
      run(dec, k256, k, p, ref_aes(k, k256, dec, p));
    end
    // clear wipes the result
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (valid || dout != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ghash_engine: checks the GHASH multiply-accumulate unit against the GCM test-case-2
// hash value and against the bit-serial reference product on random inputs, including
// init (load of a saved accumulator) and clear.
module tb_ghash_engine;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, init = 0, step = 0;
  block_t init_val = 0, x = 0, h = 0, acc;
  block_t model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ghash_engine dut (.*);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // GCM test case 2: H = 66e94bd4..., C = 0388dace..., len block 0^64 || 128
    h = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
    init = 1; init_val = 0; @(negedge clk); init = 0;
    step = 1; x = 128'h0388dace60b6a392f328c2b971b2fe78; @(negedge clk);
    x = 128'h00000000000000000000000000000080; @(negedge clk);
    step = 0;
    checks++;
    if (acc !== 128'hf38cbb1ad69223dcc3457ae5b6b0f885) begin
      failures++; $display("FAIL TC2 GHASH %h", acc);
    end
    model = ref_rand_blk();
    init = 1; init_val = model; @(negedge clk); init = 0;
    for (int i = 0; i < 50; i++) begin
      h = ref_rand_blk(); x = ref_rand_blk();
      step = 1; @(negedge clk); step = 0;
      model = ref_ghash_mul(model ^ x, h);
      checks++;
      if (acc !== model) begin failures++; $display("FAIL step %0d", i); end
      @(negedge clk);
      checks++;
      if (acc !== model) begin failures++; $display("FAIL hold %0d", i); end
    end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (acc !== 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

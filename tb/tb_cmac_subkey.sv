// tb_cmac_subkey: checks K1/K2 against SP 800-38B (AES-128 example: L = 7df76b0c...,
// K1 = fbeed618..., K2 = f7ddac30...) and against shift-and-reduce arithmetic on random L
// with both values of the top bit; also load hold and clear.
module tb_cmac_subkey;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, load = 0;
  block_t l = 0, k1, k2, e1, e2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cmac_subkey dut (.*);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic block_t shl_red(block_t v);
    logic msb = v[127];
    v = v << 1;
    if (msb) v[7:0] = v[7:0] ^ 8'b1000_0111;
    return v;
  endfunction
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    l = 128'h7df76b0c1ab899b33e42f047b91b546f; load = 1; @(negedge clk); load = 0;
    checks += 2;
    if (k1 !== 128'hfbeed618357133667c85e08f7236a8de) begin failures++; $display("FAIL K1 %h", k1); end
    if (k2 !== 128'hf7ddac306ae266ccf90bc11ee46d513b) begin failures++; $display("FAIL K2 %h", k2); end
    for (int i = 0; i < 40; i++) begin
      l = ref_rand_blk();
      l[127] = i[0];
      l[126] = i[1];
      load = 1; @(negedge clk); load = 0;
      e1 = shl_red(l); e2 = shl_red(e1);
      l = ref_rand_blk(); @(negedge clk);    // no load: must hold
      checks += 2;
      if (k1 !== e1) begin failures++; $display("FAIL K1 rand %0d", i); end
      if (k2 !== e2) begin failures++; $display("FAIL K2 rand %0d", i); end
    end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (k1 !== 0 || k2 !== 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

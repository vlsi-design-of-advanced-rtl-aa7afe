// tb_xts_tweak: checks the XTS tweak update (multiplication by alpha, little-endian byte
// order) against IEEE 1619 vector 1 (T0 = E_0(0) = 66e94bd4..., T1 = ccd297a8...) and against
// a byte-wise carry-chain model on random tweaks, plus load priority, hold and clear.
module tb_xts_tweak;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, step = 0;
  block_t t_in = 0, t, m;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  xts_tweak dut (.*);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic block_t alpha(block_t v);
    logic [7:0] b [16];
    logic c = 0, n;
    for (int i = 0; i < 16; i++) b[i] = v[127-8*i -: 8];
    for (int i = 0; i < 16; i++) begin n = b[i][7]; b[i] = {b[i][6:0], c}; c = n; end
    if (c) b[0] ^= 8'h87;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = b[i];
    return v;
  endfunction
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    t_in = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e; load = 1; @(negedge clk); load = 0;
    step = 1; @(negedge clk); step = 0;
    checks++;
    if (t !== 128'hccd297a8df1559761099f4b39469565c) begin failures++; $display("FAIL T1 %h", t); end
    m = ref_rand_blk();
    t_in = m; load = 1; step = 1; @(negedge clk); load = 0;
    checks++;
    if (t !== m) begin failures++; $display("FAIL load priority"); end
    for (int i = 0; i < 64; i++) begin
      step = 1; @(negedge clk); step = 0;
      m = alpha(m);
      checks++;
      if (t !== m) begin failures++; $display("FAIL step %0d %h %h", i, t, m); end
      if (i % 8 == 0) @(negedge clk);
    end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (t !== 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_clk_rand: checks the clock source multiplexer and the divide-by-1/2/4/8 stage by
// counting output edges against the source, then the random cycle skipping: with
// randomization on, the number of masked cycles over many windows must equal the number of
// windows whose LFSR value falls inside the window (predicted by an independent LFSR model
// after a known reseed), and with randomization off no cycle may be masked.
module tb_clk_rand;
  logic pll_clk = 0, osc_clk = 0, rst_n = 0, src_sel = 0, rand_en = 0, seed_load = 0;
  logic [1:0] div_sel = 0;
  logic [7:0] total_cc = 8'd15;
  logic [15:0] seed = 0;
  logic clk_div_x_gmux, clk_div_x_grand;
  logic [31:0] skipped;
  int checks = 0, failures = 0;
  int n_mux = 0, n_rand = 0;
  always #2 pll_clk = ~pll_clk;     // 4 ns
  always #3 osc_clk = ~osc_clk;     // 6 ns
  clk_rand dut (.*);
  always @(posedge clk_div_x_gmux) n_mux++;
  always @(posedge clk_div_x_grand) n_rand++;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic measure(input bit src, input int dsel, input int period_ns);
    int expect_n;
    src_sel = src; div_sel = 2'(dsel);
    #200;
    n_mux = 0;
    #(period_ns * 100);
    expect_n = 100 >> dsel;
    checks++;
    if (n_mux < expect_n - 1 || n_mux > expect_n + 1) begin
      failures++; $display("FAIL src=%0d div=%0d: %0d edges, expected %0d", src, dsel, n_mux, expect_n);
    end
  endtask
  initial begin
    logic [15:0] l;
    int cnt, exp_skip, d0, d1;
    #10 rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int d = 0; d < 4; d++) measure(s[0], d, s ? 6 : 4);
    // no randomization: gated clock equals the multiplexed clock
    src_sel = 0; div_sel = 0; rand_en = 0;
    #100;
    n_mux = 0; n_rand = 0;
    #4000;
    checks++;
    if (n_mux != n_rand) begin failures++; $display("FAIL masked without rand_en"); end
    // randomization: reseed, then count skips over 200 windows of 16 cycles
    @(negedge clk_div_x_gmux);
    seed = 16'h1234; seed_load = 1;
    @(negedge clk_div_x_gmux);
    seed_load = 0;
    // the counter keeps running; wait for the start of a window
    while (dut.cc_cnt != 0) @(negedge clk_div_x_gmux);
    rand_en = 1;
    d0 = skipped;
    l = dut.lfsr;
    exp_skip = 0;
    for (int w = 0; w < 200; w++) begin
      if ((l[7:0] & total_cc) <= total_cc) exp_skip++;
      l = {l[14:0], l[15] ^ l[13] ^ l[12] ^ l[10]};
    end
    n_mux = 0; n_rand = 0;
    repeat (200 * 16) @(negedge clk_div_x_gmux);
    rand_en = 0;
    d1 = skipped;
    checks++;
    if (d1 - d0 != exp_skip) begin
      failures++; $display("FAIL skips %0d, expected %0d", d1 - d0, exp_skip);
    end
    checks++;
    if (n_mux - n_rand < exp_skip - 1 || n_mux - n_rand > exp_skip + 1) begin
      failures++; $display("FAIL gated clock lost %0d edges, expected %0d", n_mux - n_rand, exp_skip);
    end
    checks++;
    if (exp_skip == 0) begin failures++; $display("FAIL no skip exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// clk_rand: clock division and randomization circuit feeding the AES engine.
//
// Structure follows the circuit diagram: a source multiplexer (PLL clock or internal
// oscillator), a division stage giving the selected clock divided by 1, 2, 4 or 8 (a chain
// of toggle flip-flops), a second multiplexer choosing the division (clk_div_x_gmux), and a
// random clock-gating stage. In that stage a clock-cycle counter (cc_cnt) counts up to a
// configured total; when it reaches it, the update flag clears the counter and steps a
// 16-bit Fibonacci LFSR (x^16+x^14+x^13+x^11+1, this design's choice). Its low byte, ANDed
// with total_cc so that it always falls inside the window (also this design's choice), is
// the random number rnd_num. When cc_cnt equals rnd_num, skip_cc masks one cycle of the clock.
// The gate enable is sampled on the falling edge so the gated clock never glitches.
// The LFSR is reseeded from outside (seed_load), e.g. from a TRNG; a zero seed is mapped
// to a non-zero state. Source and divider selection are meant to change only while the
// engine is idle: the multiplexers are plain combinational selectors.
// Configuration inputs are quasi-static and may come from another clock domain.
module clk_rand #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             pll_clk,
  input  logic             osc_clk,
  input  logic             rst_n,
  input  logic             src_sel,      // 0: pll_clk, 1: osc_clk
  input  logic [1:0]       div_sel,      // 0: /1, 1: /2, 2: /4, 3: /8
  input  logic             rand_en,
  input  logic [CNT_W-1:0] total_cc,     // cycles per randomization window, minus one
  input  logic             seed_load,
  input  logic [15:0]      seed,
  output logic             clk_div_x_gmux,
  output logic             clk_div_x_grand,
  output logic [31:0]      skipped       // number of masked cycles (observability)
);
  logic clk_src, clk_div_2, clk_div_4, clk_div_8;

  assign clk_src = src_sel ? osc_clk : pll_clk;

  always_ff @(posedge clk_src or negedge rst_n)
    if (!rst_n) clk_div_2 <= 1'b0; else clk_div_2 <= ~clk_div_2;
  always_ff @(posedge clk_div_2 or negedge rst_n)
    if (!rst_n) clk_div_4 <= 1'b0; else clk_div_4 <= ~clk_div_4;
  always_ff @(posedge clk_div_4 or negedge rst_n)
    if (!rst_n) clk_div_8 <= 1'b0; else clk_div_8 <= ~clk_div_8;

  always_comb begin
    unique case (div_sel)
      2'd0: clk_div_x_gmux = clk_src;
      2'd1: clk_div_x_gmux = clk_div_2;
      2'd2: clk_div_x_gmux = clk_div_4;
      default: clk_div_x_gmux = clk_div_8;
    endcase
  end

  // random clock-gating logic
  logic [15:0]      lfsr;
  logic [CNT_W-1:0] cc_cnt, rnd_num;
  logic             update, skip_cc, gate_en;

  assign rnd_num = lfsr[CNT_W-1:0] & total_cc;   // always inside the window
  assign update  = (cc_cnt == total_cc);
  assign skip_cc = rand_en && (cc_cnt == rnd_num);

  always_ff @(posedge clk_div_x_gmux or negedge rst_n) begin
    if (!rst_n) begin
      cc_cnt  <= '0;
      lfsr    <= 16'hACE1;
      skipped <= '0;
    end else begin
      cc_cnt <= update ? '0 : cc_cnt + 1'b1;
      if (seed_load)   lfsr <= (seed == 16'h0) ? 16'hACE1 : seed;
      else if (update) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (skip_cc) skipped <= skipped + 32'd1;
    end
  end

  always_ff @(negedge clk_div_x_gmux or negedge rst_n) begin
    if (!rst_n) gate_en <= 1'b1;
    else        gate_en <= ~skip_cc;
  end

  assign clk_div_x_grand = clk_div_x_gmux & gate_en;
endmodule

// ghash_engine: GHASH multiply-and-accumulate unit of the GCM core.
//
// Holds the accumulator Y and, on each step, computes Y <= (Y xor X) * H in GF(2^128)
// with the reduction polynomial x^128 + x^7 + x^2 + x + 1 (bit-reflected convention of
// SP 800-38D). The product is one combinational multiplier, so one 128-bit block is
// absorbed per clock cycle; the multiplier style is this design's choice.
// Interface: init loads Y from init_val (0 for a new message, saved context on resume),
// step absorbs x; acc is the registered result, valid the cycle after step.
module ghash_engine
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   init,
  input  block_t init_val,
  input  logic   step,
  input  block_t x,
  input  block_t h,
  output block_t acc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clear) acc <= '0;
    else if (init)  acc <= init_val;
    else if (step)  acc <= gf128_mul(acc ^ x, h);
  end
endmodule

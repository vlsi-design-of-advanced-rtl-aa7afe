// xts_tweak: IV (tweak) generation engine of the XTS core (SP 800-38E / IEEE 1619).
//
// load stores T = AES_K2(i), the encrypted sector number computed by the shared AES core.
// Each step multiplies T by alpha in GF(2^128) (polynomial x^128 + x^7 + x^2 + x + 1, the
// tweak read as a little-endian 16-byte integer), giving the tweak of the next data block
// of the sector. One step per cycle, result registered.
module xts_tweak
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   load,
  input  block_t t_in,
  input  logic   step,
  output block_t t
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     t <= '0;
    else if (clear) t <= '0;
    else if (load)  t <= t_in;
    else if (step)  t <= xts_mul_alpha(t);
  end
endmodule

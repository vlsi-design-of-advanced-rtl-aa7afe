// cmac_subkey: sub-key generation engine of the CMAC core (SP 800-38B).
//
// From L = AES_K(0^128), delivered by the shared AES core, it derives K1 = dbl(L) and
// K2 = dbl(K1), where dbl is a one-bit left shift with a conditional XOR of 0x87, and
// keeps both in registers for the rest of the message. load samples l; k1/k2 are valid
// from the next cycle. clear wipes them (panic).
module cmac_subkey
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   load,
  input  block_t l,
  output block_t k1,
  output block_t k2
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k1 <= '0;
      k2 <= '0;
    end else if (clear) begin
      k1 <= '0;
      k2 <= '0;
    end else if (load) begin
      k1 <= cmac_dbl(l);
      k2 <= cmac_dbl(cmac_dbl(l));
    end
  end
endmodule

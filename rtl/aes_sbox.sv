// aes_sbox: merged AES S-box for one byte.
//
// One GF(2^8) multiplicative inverter is shared by both directions: encryption applies the
// inverter and then the affine transform, decryption applies the inverse affine transform
// first and then the same inverter. Sharing the inverter between SubBytes and InvSubBytes
// is the merged S-box approach the AES core is built on; the inverter itself is written
// as a^254 (this design's choice of inverter). Purely combinational.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] din,
  input  logic       inv,   // 1: inverse S-box (decryption)
  output logic [7:0] dout
);
  logic [7:0] pre, invd;

  always_comb begin
    pre  = inv ? inv_affine(din) : din;
    invd = gf8_inv(pre);
    dout = inv ? invd : affine(invd);
  end
endmodule

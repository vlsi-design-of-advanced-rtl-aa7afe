// ccm_formatter: input formatting and encoding network of the CCM core (SP 800-38C).
//
// Combinational. From the nonce N (left-aligned, nlen = 7..13 bytes, q = 15 - nlen), the tag
// length t and the payload length it builds
//   b0   = flags | N | Q          flags = 64*Adata + 8*(t-2)/2 + (q-1), Q = payload length
//   ctr0 = (q-1) | N | 0...0      the first counter block,
// increments a counter block in its last q bytes (ctr_next), and encodes associated data:
// the first encoded block starts with the 2-byte length a (a < 2^16 - 2^8 is supported),
// every later block starts with the 2 bytes carried over from the previous raw block, and
// bytes past the end of the data are zeroed. The caller keeps the 2-byte carry register.
module ccm_formatter
  import aes_pkg::*;
(
  input  block_t      nonce,
  input  logic [3:0]  nlen,
  input  logic [4:0]  tlen,
  input  logic [31:0] aad_len,
  input  logic [31:0] msg_len,
  input  block_t      ctr_in,
  input  logic        aad_first,
  input  logic [15:0] aad_carry,
  input  block_t      aad_raw,
  input  logic [4:0]  aad_nvalid,
  output block_t      b0,
  output block_t      ctr0,
  output block_t      ctr_next,
  output block_t      aad_enc
);
  logic [3:0] q;
  logic [2:0] tfield;
  block_t     qmask;

  always_comb begin
    q      = 4'd15 - nlen;
    tfield = 3'((tlen - 5'd2) >> 1);
    b0     = '0;
    ctr0   = '0;
    qmask  = '0;
    b0[127:120]   = {1'b0, (aad_len != 0), tfield, 3'(q - 4'd1)};
    ctr0[127:120] = {5'b0, 3'(q - 4'd1)};
    for (int i = 1; i < 16; i++) begin
      if (i <= int'(nlen)) begin
        b0[127-8*i -: 8]   = nonce[127-8*(i-1) -: 8];
        ctr0[127-8*i -: 8] = nonce[127-8*(i-1) -: 8];
      end else begin
        qmask[127-8*i -: 8] = 8'hff;
        if (15 - i < 4) b0[127-8*i -: 8] = msg_len[8*(15-i) +: 8];
      end
    end
    ctr_next = (ctr_in & ~qmask) | ((ctr_in + 128'd1) & qmask);
    aad_enc  = keep_bytes({aad_first ? aad_len[15:0] : aad_carry, aad_raw[127:16]}, aad_nvalid);
  end
endmodule

// aes_pkg: types, constants and pure functions shared by the AES cryptoprocessor.
//
// Holds the block-cipher mode encoding used on every interface, the GF(2^8) arithmetic
// behind the merged S-box, the AES round transformations (ShiftRows, MixColumns and their
// inverses), the on-the-fly key-schedule steps for AES-128 and AES-256 in both directions,
// and the GF(2^128) helpers used by GCM (GHASH product), CMAC (sub-key doubling) and XTS
// (multiplication by alpha). All functions are combinational and synthesizable.
//
// Bit and byte order: a 128-bit block is a big-endian byte string, byte 0 in bits
// [127:120]. The AES state column c holds bytes 4c..4c+3 (row 0 first), as in FIPS-197.
// A 256-bit key port carries the key left-aligned: AES-128 uses bits [255:128].
package aes_pkg;

  // Supported modes (the nine modes of the document's mode table).
  typedef enum logic [3:0] {
    MODE_ECB  = 4'd0,
    MODE_CBC  = 4'd1,
    MODE_OFB  = 4'd2,
    MODE_CFB  = 4'd3,
    MODE_CTR  = 4'd4,
    MODE_CMAC = 4'd5,
    MODE_GCM  = 4'd6,
    MODE_CCM  = 4'd7,
    MODE_XTS  = 4'd8
  } aes_mode_e;


  typedef logic [127:0] block_t;
  typedef logic [255:0] key_t;

  // Operation configuration handed from the register block to the engine.
  typedef struct packed {
    aes_mode_e    mode;
    logic         decrypt;    // 1: decryption / decryption-verification
    logic         key256;     // 1: AES-256, 0: AES-128
    logic [31:0]  aad_len;    // bytes of associated data (GCM, CCM)
    logic [31:0]  msg_len;    // bytes of payload / message
    logic [3:0]   ccm_nlen;   // CCM nonce length in bytes, 7..13
    logic [4:0]   ccm_tlen;   // CCM tag length in bytes, 4..16 even
    block_t       iv;         // IV, initial counter, GCM IV (96 bits, left), CCM nonce (left), XTS tweak
  } op_cfg_t;

  // Engine context saved on preemption and restored on resume.
  typedef enum logic [2:0] {
    PH_PREP0 = 3'd0,   // first preparation cipher call (L, H, B0 or XTS tweak)
    PH_PREP1 = 3'd1,   // second preparation call (GCM E(J0), CCM E(Ctr0))
    PH_AAD   = 3'd2,
    PH_MSG   = 3'd3,
    PH_FIN   = 3'd4,   // GCM length block
    PH_TAG   = 3'd5,
    PH_DONE  = 3'd6
  } phase_e;

  typedef struct packed {
    phase_e       phase;
    logic [27:0]  aad_blk;    // AAD blocks already absorbed
    logic [27:0]  msg_blk;    // payload blocks already processed
    block_t       fb;         // chaining value / counter / XTS tweak
    block_t       acc;        // CBC-MAC or GHASH accumulator
    block_t       aux;        // GCM E(J0), CCM S0
    block_t       hk;         // GHASH key H, CMAC L
    logic [15:0]  ccm_carry;  // CCM AAD encoding carry bytes
  } eng_ctx_t;

  // Key slot configuration, error flags and commands.
  typedef struct packed {
    logic       reserved;    // only the configuring privilege level may use the slot
    logic       lock;        // configuration and value frozen until reset
    logic       panic_sens;  // wiped by a partial panic
    logic       key256;      // slot holds an AES-256 key
    logic       ext_load;    // may be written from the engine output (key derivation)
    logic       allow_dec;
    logic       allow_enc;
    logic [8:0] modes;       // allowed modes, bit i = aes_mode_e value i
  } ks_cfg_t;

  typedef struct packed {
    logic bad_mode;   // use with a mode or direction not allowed
    logic empty;      // use of a slot without a key
    logic bad_tag;    // unseal with a wrong tag
    logic denied;     // privilege, seal or lock violation
  } ks_err_t;

  typedef enum logic [3:0] {
    KS_NOP, KS_CFG, KS_SEAL, KS_SETVAL, KS_UNSEAL, KS_KEYW, KS_CLEAR, KS_ERRCLR, KS_USE
  } ks_cmd_e;

  // Commands and events crossing between the register block and the engine.
  typedef enum logic [1:0] {CMD_START, CMD_RESUME, CMD_HALT, CMD_CLEAR} eng_cmd_kind_e;

  typedef struct packed {
    eng_cmd_kind_e kind;
    op_cfg_t       cfg;
    key_t          key1;
    key_t          key2;
    eng_ctx_t      ctx;
  } eng_cmd_t;

  typedef struct packed {
    logic     halted;   // 1: halted (preempted), 0: done
    eng_ctx_t ctx;
  } eng_evt_t;

  typedef struct packed {
    block_t data;
    logic   tag;
    logic   last;
  } eng_out_t;

  // Operation state machine of the cryptoprocessor.
  typedef enum logic [2:0] {
    ST_IDLE, ST_CONFIG, ST_RUN, ST_HALTING, ST_SUSPENDED, ST_DONE, ST_ERROR
  } cp_state_e;

  // Per-privilege-level error register bits.
  typedef struct packed {
    logic panic;       // operation stopped by a panic
    logic aborted;     // user operation aborted by the supervisor
    logic data_twice;  // sensitive data written or read twice
    logic key;         // key slot refused the operation
    logic seq_err;     // command not allowed in the current state
    logic privilege;   // access not allowed for this privilege level
  } cp_err_t;

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf8_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] gf8_inv(input logic [7:0] a);
    logic [7:0] a2, a3, a6, a12, a15, a30, a60, a120, a126, a252, a254;
    a2   = gf8_mul(a, a);
    a3   = gf8_mul(a2, a);
    a6   = gf8_mul(a3, a3);
    a12  = gf8_mul(a6, a6);
    a15  = gf8_mul(a12, a3);
    a30  = gf8_mul(a15, a15);
    a60  = gf8_mul(a30, a30);
    a120 = gf8_mul(a60, a60);
    a126 = gf8_mul(a120, a6);
    a252 = gf8_mul(a126, a126);
    a254 = gf8_mul(a252, a2);
    return a254;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_affine(input logic [7:0] b);
    return rotl8(b, 1) ^ rotl8(b, 3) ^ rotl8(b, 6) ^ 8'h05;
  endfunction

  // Merged S-box: both directions share the inverter.
  function automatic logic [7:0] sbox_merged(input logic [7:0] a, input logic inv);
    logic [7:0] pre;
    pre = inv ? inv_affine(a) : a;
    return inv ? gf8_inv(pre) : affine(gf8_inv(pre));
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox_merged(w[31:24], 1'b0), sbox_merged(w[23:16], 1'b0),
            sbox_merged(w[15:8], 1'b0),  sbox_merged(w[7:0], 1'b0)};
  endfunction

  // ---------------------------------------------------------------- round functions
  function automatic logic [7:0] byte_of(input block_t s, input int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = byte_of(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = byte_of(s, 4*((c + 4 - r) % 4) + r);
    return o;
  endfunction

  function automatic logic [31:0] mix_col(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic logic [31:0] inv_mix_col(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {gf8_mul(a0, 8'h0e) ^ gf8_mul(a1, 8'h0b) ^ gf8_mul(a2, 8'h0d) ^ gf8_mul(a3, 8'h09),
            gf8_mul(a0, 8'h09) ^ gf8_mul(a1, 8'h0e) ^ gf8_mul(a2, 8'h0b) ^ gf8_mul(a3, 8'h0d),
            gf8_mul(a0, 8'h0d) ^ gf8_mul(a1, 8'h09) ^ gf8_mul(a2, 8'h0e) ^ gf8_mul(a3, 8'h0b),
            gf8_mul(a0, 8'h0b) ^ gf8_mul(a1, 8'h0d) ^ gf8_mul(a2, 8'h09) ^ gf8_mul(a3, 8'h0e)};
  endfunction

  function automatic block_t mix_columns(input block_t s);
    return {mix_col(s[127:96]), mix_col(s[95:64]), mix_col(s[63:32]), mix_col(s[31:0])};
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    return {inv_mix_col(s[127:96]), inv_mix_col(s[95:64]), inv_mix_col(s[63:32]), inv_mix_col(s[31:0])};
  endfunction

  // ---------------------------------------------------------------- key schedule
  function automatic logic [7:0] rcon(input logic [3:0] i);  // i >= 1
    logic [7:0] r;
    r = 8'h01;
    for (int k = 1; k < 10; k++) if (4'(k) < i) r = xtime(r);
    return r;
  endfunction

  // Round key idx (idx >= 1) from the two previous round keys prev = rk[idx-2],
  // cur = rk[idx-1]. AES-128 ignores prev.
  function automatic block_t rk_next(input block_t prev, input block_t cur,
                                     input logic [3:0] idx, input logic k256);
    logic [31:0] t, w0, w1, w2, w3;
    block_t base;
    if (!k256) begin
      t    = sub_word({cur[23:0], cur[31:24]}) ^ {rcon(idx), 24'h0};
      base = cur;
    end else begin
      t    = idx[0] ? sub_word(cur[31:0])
                    : sub_word({cur[23:0], cur[31:24]}) ^ {rcon(idx >> 1), 24'h0};
      base = prev;
    end
    w0 = base[127:96] ^ t;
    w1 = base[95:64] ^ w0;
    w2 = base[63:32] ^ w1;
    w3 = base[31:0] ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // Inverse step: given prev = rk[idx-1] and cur = rk[idx], return rk[idx-2]
  // (AES-256) or rk[idx-2] from prev alone (AES-128, where rk[idx-1] = next(rk[idx-2])).
  function automatic block_t rk_prev(input block_t prev, input block_t cur,
                                     input logic [3:0] idx, input logic k256);
    logic [31:0] t, w0, w1, w2, w3;
    block_t src;
    // src is the key that was produced from the one we want.
    src = k256 ? cur : prev;
    w1 = src[95:64] ^ src[127:96];
    w2 = src[63:32] ^ src[95:64];
    w3 = src[31:0]  ^ src[63:32];
    if (!k256) begin
      t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon(idx - 4'd1), 24'h0};
    end else begin
      t  = idx[0] ? sub_word(prev[31:0])
                  : sub_word({prev[23:0], prev[31:24]}) ^ {rcon(idx >> 1), 24'h0};
    end
    w0 = src[127:96] ^ t;
    return {w0, w1, w2, w3};
  endfunction

  // ---------------------------------------------------------------- GF(2^128)
  // GHASH product X*Y in the bit-reflected field of SP 800-38D,
  // reduction polynomial x^128 + x^7 + x^2 + x + 1.
  function automatic block_t gf128_mul(input block_t x, input block_t y);
    block_t z, v;
    z = '0;
    v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'h0}) : (v >> 1);
    end
    return z;
  endfunction

  // CMAC doubling: left shift, conditional XOR of R128 = 0x87.
  function automatic block_t cmac_dbl(input block_t l);
    return {l[126:0], 1'b0} ^ (l[127] ? 128'h87 : 128'h0);
  endfunction

  // XTS multiply-by-alpha on a tweak stored as 16 bytes, byte 0 least significant.
  function automatic block_t xts_mul_alpha(input block_t t);
    block_t le, res;
    for (int i = 0; i < 16; i++) le[8*i +: 8] = t[127-8*i -: 8];
    le = {le[126:0], 1'b0} ^ (le[127] ? 128'h87 : 128'h0);
    for (int i = 0; i < 16; i++) res[127-8*i -: 8] = le[8*i +: 8];
    return res;
  endfunction

  // Keep the first n bytes of a block, clear the rest (n >= 16 keeps all).
  function automatic block_t keep_bytes(input block_t b, input logic [4:0] n);
    block_t m;
    for (int i = 0; i < 16; i++) m[127-8*i -: 8] = (i < int'(n)) ? 8'hff : 8'h00;
    return b & m;
  endfunction

endpackage

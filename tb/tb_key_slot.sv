// tb_key_slot: walks one key slot through its life cycle and checks every rule: configuration
// only before the key is written, key words and the populated flag, use with allowed and
// forbidden modes and directions (error flags, usage counter), seal and unseal with right and
// wrong tags, reservation to the configuring privilege level, lock, key derivation from the
// engine output, and wiping by a partial panic (only when panic-sensitive) and a full panic.
module tb_key_slot;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, panic_partial = 0, panic_full = 0, priv = 1;
  ks_cmd_e cmd = KS_NOP;
  logic [31:0] wdata = 0;
  logic [2:0] widx = 0;
  aes_mode_e use_mode = MODE_ECB;
  logic use_dec = 0, use_ok, ext_load = 0, ext_half = 0, sealed, populated;
  block_t ext_data = 0;
  ks_cfg_t cfg;
  ks_err_t err;
  logic [31:0] usage;
  key_t key;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  key_slot dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic op(ks_cmd_e c, logic [31:0] d = 0, logic [2:0] i = 0);
    @(negedge clk);
    cmd = c; wdata = d; widx = i;
    @(negedge clk);
    cmd = KS_NOP;
  endtask
  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [31:0] mkcfg(bit res, bit lck, bit ps, bit k256, bit ext, bit dec, bit enc, logic [8:0] m);
    ks_cfg_t c;
    c = '{reserved: res, lock: lck, panic_sens: ps, key256: k256, ext_load: ext,
          allow_dec: dec, allow_enc: enc, modes: m};
    return 32'(c);
  endfunction
  key_t k;
  initial begin
    #12 rst_n = 1;
    k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    chk("empty after reset", !populated && err == 0 && usage == 0);
    // use of an empty slot
    op(KS_USE);
    chk("use empty -> error", err.empty && !populated);
    op(KS_ERRCLR);
    chk("error clear", err == 0);
    // configure AES-128, ECB+GCM, encryption only, panic-sensitive
    op(KS_CFG, mkcfg(0, 0, 1, 0, 0, 0, 1, 9'b001000001));
    chk("cfg stored", cfg.modes == 9'b001000001 && cfg.allow_enc && !cfg.allow_dec);
    for (int w = 0; w < 4; w++) begin
      chk("not populated before last word", !populated);
      op(KS_KEYW, k[255-32*w -: 32], 3'(w));
    end
    chk("populated after 4 words", populated && key[255:128] == k[255:128]);
    op(KS_CFG, mkcfg(0, 0, 1, 0, 0, 1, 1, 9'h1ff));
    chk("cfg refused once populated", err.denied && !cfg.allow_dec);
    op(KS_ERRCLR);
    use_mode = MODE_ECB; use_dec = 0;
    #1 chk("use_ok ECB enc", use_ok);
    op(KS_USE); op(KS_USE);
    chk("usage counted", usage == 2 && err == 0);
    use_mode = MODE_CBC;
    op(KS_USE);
    chk("bad mode flagged", err.bad_mode && usage == 2);
    op(KS_ERRCLR);
    use_mode = MODE_GCM; use_dec = 1;
    op(KS_USE);
    chk("decryption not allowed", err.bad_mode);
    op(KS_ERRCLR);
    use_dec = 0;
    // seal with a tag; wrong tag gives no access
    op(KS_SEAL, 32'hC0FFEE01);
    op(KS_SETVAL, 32'h12345678);
    #1 chk("sealed blocks use", sealed && !use_ok);
    op(KS_USE);
    chk("use while sealed -> denied", err.denied && usage == 2);
    op(KS_UNSEAL);
    chk("unseal wrong tag -> bad_tag", err.bad_tag && sealed);
    op(KS_SETVAL, 32'hC0FFEE01);
    op(KS_ERRCLR);
    op(KS_USE);
    chk("sealed with right value usable", usage == 3 && err == 0);
    op(KS_UNSEAL);
    chk("unsealed", !sealed && err == 0);
    // partial panic wipes this panic-sensitive slot
    @(negedge clk) panic_partial = 1;
    @(negedge clk) panic_partial = 0;
    chk("partial panic wipe", !populated && key == 0 && cfg == 0 && usage == 0);
    // reserved AES-256 slot for supervisor, not panic-sensitive, derivation allowed
    priv = 1;
    op(KS_CFG, mkcfg(1, 0, 0, 1, 1, 1, 1, 9'h1ff));
    for (int w = 0; w < 8; w++) op(KS_KEYW, k[255-32*w -: 32], 3'(w));
    chk("AES-256 populated", populated && key == k);
    priv = 0;
    op(KS_USE);
    chk("user denied on reserved slot", err.denied && usage == 0);
    op(KS_KEYW, 32'hdead, 0);
    chk("user cannot overwrite", key == k);
    priv = 1;
    op(KS_ERRCLR);
    op(KS_USE);
    chk("supervisor may use", usage == 1 && err == 0);
    @(negedge clk) panic_partial = 1;
    @(negedge clk) panic_partial = 0;
    chk("partial panic spares insensitive slot", populated && key == k);
    // key derivation: engine output written into the slot
    @(negedge clk); ext_load = 1; ext_half = 0; ext_data = ~k[255:128];
    @(negedge clk); ext_half = 1; ext_data = ~k[127:0];
    @(negedge clk); ext_load = 0;
    chk("derived key loaded", key == ~k && populated);
    // lock: no more modification
    op(KS_CLEAR);
    chk("clear", !populated && key == 0);
    op(KS_CFG, mkcfg(0, 1, 0, 0, 0, 0, 1, 9'h001));
    for (int w = 0; w < 4; w++) op(KS_KEYW, k[255-32*w -: 32], 3'(w));
    chk("locked slot not writable", !populated && err.denied);
    op(KS_ERRCLR);
    @(negedge clk); ext_load = 1; ext_half = 0; ext_data = 1;
    @(negedge clk); ext_load = 0;
    chk("derivation refused without permission", err.denied && key == 0);
    op(KS_CLEAR);
    chk("locked slot not clearable", cfg.lock);
    @(negedge clk) panic_full = 1;
    @(negedge clk) panic_full = 0;
    chk("full panic wipes everything", cfg == 0 && err == 0 && !populated && !sealed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

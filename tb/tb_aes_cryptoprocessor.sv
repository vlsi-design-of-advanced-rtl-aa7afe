// tb_aes_cryptoprocessor: end-to-end test of the cryptoprocessor at its full default size,
// driven only through its AXI4-Lite register port and its AXI-Stream data ports, with the
// engine on its own randomizable clock (main clock 10 ns, PLL 4 ns, oscillator 6 ns).
// It makes each mechanism happen and counts it:
//   key loading into slots, stream operations (ECB and GCM with tag checked against an
//   independent model), register (bus_io) CBC operation by the User, a second read of a DOUT
//   word (error), privilege violations, a start with an empty key slot (key error),
//   preemption (User CTR operation suspended, its context saved and later restored around a
//   Supervisor ECB operation), key derivation into a slot (output never visible), partial
//   and full panic, Supervisor abort of a User operation, and random clock-cycle skipping
//   with a TRNG reseed while an operation runs.
// All handshakes are driven on the falling edge of clk and sampled 1 ns after it.
module tb_aes_cryptoprocessor;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  typedef logic [127:0] bq_t[$];

  logic clk = 0, rst_n = 0, pll_clk = 0, osc_clk = 0;
  logic [11:0] s_awaddr = 0, s_araddr = 0;
  logic [2:0] s_awprot = 0, s_arprot = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 1, s_arvalid = 0, s_rready = 1;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [1:0] s_bresp, s_rresp;
  logic s_axis_tvalid = 0, s_axis_tready, m_axis_tvalid, m_axis_tready = 1, m_axis_tlast, m_axis_tuser;
  block_t s_axis_tdata = 0, m_axis_tdata;
  logic trng_valid = 0;
  logic [15:0] trng_seed = 0;
  cp_state_e state;
  logic panic_active, eng_clk;
  logic [31:0] clk_skipped;

  always #5 clk = ~clk;
  always #2 pll_clk = ~pll_clk;
  always #3 osc_clk = ~osc_clk;

  aes_cryptoprocessor dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_keyload = 0, n_stream = 0, n_gcm_tag = 0, n_busio = 0, n_twice = 0, n_priv = 0;
  int n_keyerr = 0, n_preempt = 0, n_derive = 0, n_panic_p = 0, n_panic_f = 0, n_abort = 0;
  int n_skip = 0, n_reseed = 0;

  initial begin
    #3000000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------------ AXI4-Lite master
  logic [1:0] resp = 0;
  logic [31:0] rdata = 0;
  task automatic wr(logic [11:0] a, logic [31:0] d, logic p);
    @(negedge clk);
    s_awaddr = a; s_awprot = {2'b0, p}; s_wdata = d; s_awvalid = 1; s_wvalid = 1;
    #1;
    while (!s_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    resp = s_bresp;
  endtask
  task automatic rd(logic [11:0] a, logic p);
    @(negedge clk);
    s_araddr = a; s_arprot = {2'b0, p}; s_arvalid = 1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 0;
    rdata = s_rdata; resp = s_rresp;
  endtask

  // ------------------------------------------------------------ AXI-Stream source and sink
  block_t in_q[$], out_q[$];
  bit out_tag[$];
  always @(negedge clk) begin
    s_axis_tvalid = in_q.size() > 0;
    s_axis_tdata = (in_q.size() > 0) ? in_q[0] : '0;
    m_axis_tready = ($urandom_range(0, 3) != 0);
    #1;
    if (s_axis_tvalid && s_axis_tready) void'(in_q.pop_front());
    if (m_axis_tvalid && m_axis_tready) begin
      out_q.push_back(m_axis_tdata);
      out_tag.push_back(m_axis_tuser);
    end
  end

  task automatic wait_out(int n);
    int t = 0;
    while (out_q.size() < n && t < 20000) begin @(negedge clk); t++; end
    chk($sformatf("%0d output blocks arrived", n), out_q.size() >= n);
  endtask
  task automatic wait_state(cp_state_e s);
    int t = 0;
    while (state != s && t < 20000) begin @(negedge clk); t++; end
    chk($sformatf("reached state %s", s.name()), state == s);
  endtask

  // ------------------------------------------------------------ helpers
  function automatic logic [31:0] kcfg(bit res, bit lck, bit ps, bit k256, bit ext,
                                       logic [8:0] modes);
    ks_cfg_t c;
    c = '{reserved: res, lock: lck, panic_sens: ps, key256: k256, ext_load: ext,
          allow_dec: 1'b1, allow_enc: 1'b1, modes: modes};
    return 32'(c);
  endfunction
  function automatic logic [31:0] opcfg(aes_mode_e m, bit dec, int slot, bit bus_io,
                                        bit to_key = 0, int dst = 0);
    return {7'b0, 5'd16, 4'd12, 3'(dst), to_key, bus_io, 3'd0, 3'(slot), dec, 4'(m)};
  endfunction
  task automatic load_key(int slot, logic [255:0] k, logic [31:0] cfg, bit k256);
    wr(12'(32'h100 + 64*slot), cfg, 1);
    for (int w = 0; w < (k256 ? 8 : 4); w++) wr(12'(32'h120 + 64*slot + 4*w), k[255-32*w -: 32], 1);
    rd(12'(32'h110 + 64*slot), 1);
    chk($sformatf("slot %0d populated", slot), rdata[5] == 1'b1);
    n_keyload++;
  endtask
  task automatic setup(logic p, logic [31:0] cfg, int alen, int mlen, block_t iv);
    wr(12'h000, 32'h1, p);                // INIT
    chk("INIT accepted", resp == 2'b00 && state == ST_CONFIG);
    wr(12'h004, cfg, p);
    wr(12'h008, alen, p);
    wr(12'h00c, mlen, p);
    for (int w = 0; w < 4; w++) wr(12'(16 + 4*w), iv[127-32*w -: 32], p);
  endtask

  // ------------------------------------------------------------ test
  logic [255:0] k0 = {128'h000102030405060708090a0b0c0d0e0f, 128'h0};
  logic [255:0] k1, kd;
  block_t iv, x, h, y, blk;
  bq_t msg, exp, ctx_save_in;
  logic [31:0] ctx_words [32];
  int nctx;

  initial begin
    k1 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 32; i++) ctx_words[i] = 0;
    #33 rst_n = 1;
    repeat (10) @(negedge clk);

    // key slots: 0 AES-128 (FIPS-197 key), 1 AES-256 random, 2 derivation target,
    // 3 panic-sensitive AES-128
    load_key(0, k0, kcfg(0, 0, 0, 0, 0, 9'h1ff), 0);
    load_key(1, k1, kcfg(0, 0, 0, 1, 0, 9'h1ff), 1);
    wr(12'h180, kcfg(0, 0, 0, 0, 1, 9'h1ff), 1);
    load_key(3, k1, kcfg(0, 0, 1, 0, 0, 9'h1ff), 0);

    // ---- ECB over the stream, FIPS-197 C.1 plus random blocks (Supervisor)
    setup(1, opcfg(MODE_ECB, 0, 0, 0), 0, 64, 0);
    msg = {128'h00112233445566778899aabbccddeeff, ref_rand_blk(), ref_rand_blk(), ref_rand_blk()};
    wr(12'h000, 32'h2, 1);                // START
    foreach (msg[i]) in_q.push_back(msg[i]);
    wait_out(4);
    chk("ECB FIPS-197 C.1", out_q[0] == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    foreach (msg[i]) chk("ECB block", out_q[i] == ref_aes(k0, 0, 0, msg[i]));
    wait_state(ST_DONE);
    wr(12'h000, 32'h40, 1);               // ACK
    chk("ACK to IDLE", state == ST_IDLE);
    out_q.delete(); out_tag.delete();
    n_stream++;

    // ---- GCM AES-256 with AAD, tag on the stream marked by tuser (User)
    iv = {$urandom, $urandom, $urandom, 32'h0};
    setup(0, opcfg(MODE_GCM, 0, 1, 0), 20, 40, iv);
    msg = {ref_rand_blk(), ref_rand_blk(), ref_rand_blk(), ref_rand_blk(), ref_rand_blk()};
    msg[1][95:0] = 0;                      // AAD is 20 bytes: second block zero-padded
    msg[4][63:0] = 0;                      // message is 40 bytes
    wr(12'h000, 32'h2, 0);
    foreach (msg[i]) in_q.push_back(msg[i]);
    wait_out(4);
    h = ref_aes(k1, 1, 0, 0);
    y = ref_ghash_mul(ref_ghash_mul(msg[0], h) ^ msg[1], h);
    for (int i = 0; i < 3; i++) begin
      x = ref_aes(k1, 1, 0, {iv[127:32], 32'(i + 2)}) ^ msg[2+i];
      if (i == 2) x[63:0] = 0;
      chk("GCM ciphertext", out_q[i] == x && !out_tag[i]);
      y = ref_ghash_mul(y ^ x, h);
    end
    y = ref_ghash_mul(y ^ {32'd0, 32'd160, 32'd0, 32'd320}, h);
    chk("GCM tag", out_q[3] == (y ^ ref_aes(k1, 1, 0, {iv[127:32], 32'd1})) && out_tag[3]);
    n_gcm_tag++;
    wait_state(ST_DONE);
    wr(12'h000, 32'h40, 0);
    out_q.delete(); out_tag.delete();
    n_stream++;

    // ---- CBC through the data registers by the User, with a second read of a DOUT word
    iv = ref_rand_blk();
    setup(0, opcfg(MODE_CBC, 0, 0, 1), 0, 32, iv);
    wr(12'h000, 32'h2, 0);
    x = iv;
    for (int b = 0; b < 2; b++) begin
      blk = ref_rand_blk();
      for (int w = 0; w < 4; w++) wr(12'(32'h40 + 4*w), blk[127-32*w -: 32], 0);
      chk("DIN write ok", resp == 2'b00);
      x = ref_aes(k0, 0, 0, blk ^ x);
      do rd(12'h020, 0); while (!rdata[5]);
      y = 0;
      for (int w = 0; w < 4; w++) begin
        rd(12'(32'h50 + 4*w), 0);
        y[127-32*w -: 32] = rdata;
        if (b == 1 && w == 1) begin
          rd(12'h054, 0);                  // second read of the same word
          chk("double read refused", resp == 2'b10 && state == ST_ERROR);
          rd(12'h028, 0);
          chk("double read flagged", rdata[3] == 1'b1);
          n_twice++;
          break;
        end
      end
      if (b == 0) chk("CBC through registers", y == x);
    end
    n_busio++;
    wr(12'h000, 32'h20, 0);                // ERRCLR
    chk("error cleared", state == ST_IDLE);

    // ---- privilege violations
    rd(12'h024, 0);
    chk("User cannot read Supervisor errors", resp == 2'b10);
    wr(12'h030, 32'h1, 0);
    chk("User cannot panic", resp == 2'b10 && !panic_active);
    rd(12'h028, 0);
    chk("privilege error recorded", rdata[0] == 1'b1);
    wr(12'h2c, 32'h3ff | (32'h1 << 14), 1); // slot 4 reserved for the Supervisor
    wr(12'h200, kcfg(0, 0, 0, 0, 0, 9'h1ff), 0);
    chk("User refused on a Supervisor slot", resp == 2'b10);
    wr(12'h2c, 32'h3ff, 1);
    wr(12'h000, 32'h20, 0);
    n_priv++;

    // ---- start with an empty key slot
    setup(0, opcfg(MODE_ECB, 0, 5, 0), 0, 16, 0);
    wr(12'h000, 32'h2, 0);
    chk("empty slot refused", resp == 2'b10 && state == ST_ERROR);
    rd(12'h028, 0);
    chk("key error flagged", rdata[2] == 1'b1);
    wr(12'h000, 32'h20, 0);
    n_keyerr++;

    // ---- preemption: User CTR (6 blocks) suspended after 2, Supervisor ECB in between
    iv = ref_rand_blk();
    msg.delete();
    for (int i = 0; i < 6; i++) msg.push_back(ref_rand_blk());
    exp.delete();
    for (int i = 0; i < 6; i++) exp.push_back(ref_aes(k1, 1, 0, iv + 128'(i)) ^ msg[i]);
    setup(0, opcfg(MODE_CTR, 0, 1, 0), 0, 96, iv);
    wr(12'h000, 32'h2, 0);
    in_q.push_back(msg[0]); in_q.push_back(msg[1]);
    wait_out(2);
    wr(12'h000, 32'h8, 0);                 // SUSPEND
    wait_state(ST_SUSPENDED);
    nctx = ($bits(eng_ctx_t) + 31) / 32;
    for (int w = 0; w < nctx; w++) begin
      wr(12'h060, w, 0);
      rd(12'h064, 0);
      ctx_words[w] = rdata;
    end
    rd(12'h064, 1);
    chk("Supervisor cannot read the User context", resp == 2'b10);
    wr(12'h000, 32'h20, 1);
    // Supervisor takes the engine
    setup(1, opcfg(MODE_ECB, 1, 0, 0), 0, 16, 0);
    wr(12'h000, 32'h2, 1);
    in_q.push_back(128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    wait_out(3);
    chk("interleaved ECB decryption", out_q[2] == 128'h00112233445566778899aabbccddeeff);
    wait_state(ST_DONE);
    wr(12'h000, 32'h40, 1);
    // User restores its context and resumes
    setup(0, opcfg(MODE_CTR, 0, 1, 0), 0, 96, iv);
    for (int w = 0; w < nctx; w++) begin
      wr(12'h060, w, 0);
      wr(12'h064, ctx_words[w], 0);
    end
    wr(12'h000, 32'h10, 0);                // RESUME
    chk("resume accepted", resp == 2'b00);
    for (int i = 2; i < 6; i++) in_q.push_back(msg[i]);
    wait_out(7);
    out_q.delete(2);
    foreach (exp[i]) chk($sformatf("CTR block %0d across preemption", i), out_q[i] == exp[i]);
    wait_state(ST_DONE);
    wr(12'h000, 32'h40, 0);
    out_q.delete(); out_tag.delete();
    n_preempt++;

    // ---- key derivation: E_k0(seed) written into slot 2, then used
    blk = ref_rand_blk();
    kd = {ref_aes(k0, 0, 0, blk), 128'h0};
    setup(1, opcfg(MODE_ECB, 0, 0, 0, 1, 2), 0, 16, 0);
    wr(12'h000, 32'h2, 1);
    in_q.push_back(blk);
    wait_state(ST_DONE);
    chk("derived key never on the stream", out_q.size() == 0);
    wr(12'h000, 32'h40, 1);
    rd(12'h190, 1);
    chk("derived slot populated", rdata[5] == 1'b1);
    blk = ref_rand_blk();
    setup(1, opcfg(MODE_ECB, 0, 2, 0), 0, 16, 0);
    wr(12'h000, 32'h2, 1);
    in_q.push_back(blk);
    wait_out(1);
    chk("derived key in use", out_q[0] == ref_aes(kd, 0, 0, blk));
    wait_state(ST_DONE);
    wr(12'h000, 32'h40, 1);
    out_q.delete(); out_tag.delete();
    n_derive++;

    // ---- random clock skipping with a TRNG reseed, while an AES-256 ECB operation runs
    @(negedge clk); trng_seed = 16'h5a5a; trng_valid = 1;
    @(negedge clk); trng_valid = 0;
    n_reseed++;
    wr(12'h034, {16'h0, 8'd7, 4'h0, 1'b1, 2'd1, 1'b0}, 1); // randomize, /2, window of 8
    y = clk_skipped;
    msg.delete();
    for (int i = 0; i < 8; i++) msg.push_back(ref_rand_blk());
    setup(1, opcfg(MODE_ECB, 0, 1, 0), 0, 128, 0);
    wr(12'h000, 32'h2, 1);
    foreach (msg[i]) in_q.push_back(msg[i]);
    wait_out(8);
    foreach (msg[i]) chk("ECB under clock randomization", out_q[i] == ref_aes(k1, 1, 0, msg[i]));
    wait_state(ST_DONE);
    wr(12'h000, 32'h40, 1);
    chk("engine cycles were skipped", clk_skipped > y[31:0]);
    n_skip = clk_skipped - y[31:0];
    wr(12'h034, {16'h0, 8'd15, 8'h0}, 1);
    out_q.delete(); out_tag.delete();

    // ---- Supervisor abort of a User operation
    setup(0, opcfg(MODE_ECB, 0, 0, 0), 0, 64, 0);
    wr(12'h000, 32'h2, 0);
    wr(12'h000, 32'h4, 1);                 // ABORT by the Supervisor
    chk("abort to IDLE", state == ST_IDLE);
    rd(12'h028, 0);
    chk("User sees aborted", rdata[4] == 1'b1);
    wr(12'h000, 32'h20, 0);
    n_abort++;
    repeat (50) @(negedge clk);

    // ---- partial panic during a User operation
    setup(0, opcfg(MODE_ECB, 0, 3, 0), 0, 64, 0);
    wr(12'h000, 32'h2, 0);
    in_q.push_back(ref_rand_blk());
    wr(12'h030, 32'h1, 1);
    chk("partial panic stops the operation", state == ST_IDLE);
    rd(12'h028, 0);
    chk("panic flagged to the User", rdata[5] == 1'b1);
    rd(12'h1d0, 1);
    chk("panic-sensitive slot wiped", rdata[5] == 1'b0);
    rd(12'h110, 1);
    chk("other slot kept", rdata[5] == 1'b1);
    wr(12'h000, 32'h20, 0);
    n_panic_p++;
    repeat (50) @(negedge clk);
    in_q.delete(); out_q.delete(); out_tag.delete();

    // the engine still works after the panic
    setup(1, opcfg(MODE_ECB, 0, 0, 0), 0, 16, 0);
    wr(12'h000, 32'h2, 1);
    in_q.push_back(128'h00112233445566778899aabbccddeeff);
    wait_out(1);
    chk("engine usable after panic", out_q[0] == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    wait_state(ST_DONE);
    wr(12'h000, 32'h40, 1);

    // ---- full panic wipes every slot
    wr(12'h030, 32'h2, 1);
    chk("panic pulse", resp == 2'b00);
    for (int s = 0; s < 6; s++) begin
      rd(12'(32'h110 + 64*s), 1);
      chk($sformatf("slot %0d wiped by full panic", s), rdata[5] == 1'b0);
    end
    n_panic_f++;

    $display("mechanisms: keyload=%0d stream=%0d gcm_tag=%0d busio=%0d twice=%0d priv=%0d keyerr=%0d",
             n_keyload, n_stream, n_gcm_tag, n_busio, n_twice, n_priv, n_keyerr);
    $display("mechanisms: preempt=%0d derive=%0d panic_partial=%0d panic_full=%0d abort=%0d skipped_cycles=%0d reseed=%0d",
             n_preempt, n_derive, n_panic_p, n_panic_f, n_abort, n_skip, n_reseed);
    chk("every mechanism exercised", n_keyload > 0 && n_stream > 0 && n_gcm_tag > 0 && n_busio > 0 &&
        n_twice > 0 && n_priv > 0 && n_keyerr > 0 && n_preempt > 0 && n_derive > 0 &&
        n_panic_p > 0 && n_panic_f > 0 && n_abort > 0 && n_skip > 0 && n_reseed > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

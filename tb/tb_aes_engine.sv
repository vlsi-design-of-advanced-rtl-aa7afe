// tb_aes_engine: end-to-end check of all nine modes of the AES engine.
//
// Published vectors (SP 800-38A ECB/CBC/CFB/OFB/CTR first blocks, SP 800-38B CMAC, the
// McGrew-Viega GCM test cases 1-2, SP 800-38C CCM example 1, IEEE 1619 XTS vector 1) are
// checked first, then random messages in every mode, key size and direction against a
// byte-level reference model built on aes_ref_pkg. Also checks the steady-state cycles per
// block (Nr, Nr+1 or 2*Nr+1 by mode and direction; for CMAC the growth of the tag latency
// with message length) and that an operation halted after some
// blocks and resumed from its saved context gives the same result as an uninterrupted one.
module tb_aes_engine;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, start = 0, resume = 0, halt_req = 0;
  op_cfg_t cfg;
  key_t key1, key2;
  eng_ctx_t ctx_in, ctx_out;
  logic halted, done, busy, in_valid = 0, in_ready, out_valid, out_ready = 1, out_tag, out_last;
  block_t in_data = 0, out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_engine dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef block_t bq_t[$];

  // ------------------------------------------------------------ reference modes
  function automatic block_t keep(block_t b, int n);
    block_t m = 0;
    for (int i = 0; i < 16; i++) if (i < n) m[127-8*i -: 8] = 8'hff;
    return b & m;
  endfunction

  function automatic block_t alpha(block_t t);
    logic [7:0] b [16];
    logic cin = 0, cout;
    for (int i = 0; i < 16; i++) b[i] = t[127-8*i -: 8];
    for (int i = 0; i < 16; i++) begin
      cout = b[i][7];
      b[i] = {b[i][6:0], cin};
      cin = cout;
    end
    if (cin) b[0] ^= 8'h87;
    for (int i = 0; i < 16; i++) t[127-8*i -: 8] = b[i];
    return t;
  endfunction

  function automatic block_t dbl(block_t l);
    return (l << 1) ^ (l[127] ? 128'h87 : 0);
  endfunction

  function automatic bq_t ref_mode(op_cfg_t f, key_t ka, key_t kb, bq_t aad, bq_t msg);
    bq_t o;
    block_t prev, x, y, h, s, t, b;
    int n = msg.size();
    bit k = f.key256, d = f.decrypt;
    int last_n = f.msg_len - 16*(n-1);
    prev = f.iv;
    case (f.mode)
      MODE_ECB: foreach (msg[i]) o.push_back(ref_aes(ka, k, d, msg[i]));
      MODE_CBC: foreach (msg[i]) begin
        if (!d) begin prev = ref_aes(ka, k, 0, msg[i] ^ prev); o.push_back(prev); end
        else begin o.push_back(ref_aes(ka, k, 1, msg[i]) ^ prev); prev = msg[i]; end
      end
      MODE_CFB: foreach (msg[i]) begin
        x = ref_aes(ka, k, 0, prev) ^ msg[i];
        o.push_back(keep(x, i == n-1 ? last_n : 16));
        prev = d ? msg[i] : x;
      end
      MODE_OFB: foreach (msg[i]) begin
        prev = ref_aes(ka, k, 0, prev);
        o.push_back(keep(prev ^ msg[i], i == n-1 ? last_n : 16));
      end
      MODE_CTR: foreach (msg[i]) begin
        o.push_back(keep(ref_aes(ka, k, 0, prev) ^ msg[i], i == n-1 ? last_n : 16));
        prev = prev + 1;
      end
      MODE_XTS: begin
        t = ref_aes(kb, k, 0, f.iv);
        foreach (msg[i]) begin
          o.push_back(ref_aes(ka, k, d, msg[i] ^ t) ^ t);
          t = alpha(t);
        end
      end
      MODE_CMAC: begin
        h = ref_aes(ka, k, 0, 0);
        y = 0;
        if (n == 0) begin
          msg.push_back(0); n = 1; last_n = 0;
        end
        foreach (msg[i]) begin
          b = msg[i];
          if (i == n-1) begin
            if (last_n == 16) b ^= dbl(h);
            else begin
              b = keep(b, last_n);
              b[127-8*last_n -: 8] = 8'h80;
              b ^= dbl(dbl(h));
            end
          end
          y = ref_aes(ka, k, 0, y ^ b);
        end
        o.push_back(y);
      end
      MODE_GCM: begin
        h = ref_aes(ka, k, 0, 0);
        y = 0;
        foreach (aad[i]) y = ref_ghash_mul(y ^ keep(aad[i], f.aad_len - 16*i), h);
        prev = {f.iv[127:32], 32'd2};
        foreach (msg[i]) begin
          x = keep(ref_aes(ka, k, 0, prev) ^ msg[i], i == n-1 ? last_n : 16);
          o.push_back(x);
          y = ref_ghash_mul(y ^ (d ? keep(msg[i], i == n-1 ? last_n : 16) : x), h);
          prev[31:0] = prev[31:0] + 1;
        end
        y = ref_ghash_mul(y ^ {32'd0, f.aad_len * 8, 32'd0, f.msg_len * 8}, h);
        o.push_back(y ^ ref_aes(ka, k, 0, {f.iv[127:32], 32'd1}));
      end
      MODE_CCM: begin
        logic [7:0] abytes [$];
        int q = 15 - f.ccm_nlen;
        // B0
        b = 0;
        b[127:120] = ((f.aad_len > 0) << 6) | (((f.ccm_tlen - 2) / 2) << 3) | (q - 1);
        for (int i = 0; i < f.ccm_nlen; i++) b[119-8*i -: 8] = f.iv[127-8*i -: 8];
        for (int j = 0; j < q; j++) b[8*j +: 8] = (j < 4) ? f.msg_len[8*j +: 8] : 8'h0;
        y = ref_aes(ka, k, 0, b);
        if (f.aad_len > 0) begin
          abytes.push_back(f.aad_len[15:8]);
          abytes.push_back(f.aad_len[7:0]);
          for (int i = 0; i < f.aad_len; i++) abytes.push_back(aad[i/16][127-8*(i%16) -: 8]);
          while (abytes.size() % 16 != 0) abytes.push_back(0);
          for (int i = 0; i < abytes.size(); i += 16) begin
            for (int j = 0; j < 16; j++) b[127-8*j -: 8] = abytes[i+j];
            y = ref_aes(ka, k, 0, y ^ b);
          end
        end
        prev = 0;
        prev[127:120] = q - 1;
        for (int i = 0; i < f.ccm_nlen; i++) prev[119-8*i -: 8] = f.iv[127-8*i -: 8];
        s = ref_aes(ka, k, 0, prev);
        foreach (msg[i]) begin
          prev = prev + 1;
          x = keep(ref_aes(ka, k, 0, prev) ^ msg[i], i == n-1 ? last_n : 16);
          o.push_back(x);
          y = ref_aes(ka, k, 0, y ^ (d ? x : keep(msg[i], i == n-1 ? last_n : 16)));
        end
        o.push_back(keep(y ^ s, f.ccm_tlen));
      end
      default: ;
    endcase
    return o;
  endfunction

  // ------------------------------------------------------------ driver
  int cyc_q[$];
  int cmac_lat [2] = '{0, 0};   // CMAC tag latency for 3 and 6 message blocks

  bq_t got_g;
  bit stop;

  task automatic drive(bq_t aad, bq_t msg, input bit do_resume, input int halt_after);
    bq_t inq;
    int cyc = 0;
    stop = 0;
    got_g.delete();
    cyc_q.delete();
    inq = aad;
    foreach (msg[i]) inq.push_back(msg[i]);
    @(negedge clk);
    if (do_resume) resume = 1; else start = 1;
    fork
      begin
        @(negedge clk); start = 0; resume = 0;
      end
      begin
        while (inq.size() > 0 && !stop) begin
          in_valid = 1;
          in_data = inq[0];
          @(posedge clk);
          if (in_ready) void'(inq.pop_front());
          #1;
        end
        in_valid = 0;
      end
      begin
        bit fin = 0;
        while (!fin) begin
          @(posedge clk);
          cyc++;
          if (out_valid && out_ready) begin
            got_g.push_back(out_data);
            cyc_q.push_back(cyc);
            if (halt_after > 0 && got_g.size() == halt_after) halt_req = 1;
            if (out_last) fin = 1;
          end
          if (halted) begin fin = 1; halt_req = 0; end
        end
        stop = 1;
      end
    join
    wait (!busy);
    in_valid = 0;
    disable fork;
    @(negedge clk);
  endtask

  task automatic check_op(string name, op_cfg_t f, key_t ka, key_t kb, bq_t aad, bq_t msg,
                          bq_t expect_q, int per_block = 0);
    bq_t got;
    cfg = f; key1 = ka; key2 = kb;
    drive(aad, msg, 0, 0);
    got = got_g;
    checks++;
    if (got.size() != expect_q.size()) begin
      failures++;
      $display("FAIL %s: %0d outputs, expected %0d", name, got.size(), expect_q.size());
    end else foreach (got[i]) begin
      checks++;
      if (got[i] !== expect_q[i]) begin
        failures++;
        $display("FAIL %s block %0d: got %h exp %h", name, i, got[i], expect_q[i]);
      end
    end
    if (f.mode == MODE_CMAC && per_block > 0) cmac_lat[msg.size() == 6] = cyc_q[0];
    if (per_block > 0 && msg.size() > 2 && f.mode != MODE_CMAC) begin
      checks++;
      if ((cyc_q[msg.size()-1] - cyc_q[0]) != per_block * (msg.size() - 1)) begin
        failures++;
        $display("FAIL %s: %0d cycles for %0d blocks, expected %0d per block", name,
                 cyc_q[msg.size()-1] - cyc_q[0], msg.size() - 1, per_block);
      end
    end
  endtask

  function automatic op_cfg_t mk(aes_mode_e m, bit d, bit k, int alen, int mlen, block_t iv,
                                 int nlen = 12, int tlen = 16);
    op_cfg_t f;
    f = '0;
    f.mode = m; f.decrypt = d; f.key256 = k; f.aad_len = alen; f.msg_len = mlen; f.iv = iv;
    f.ccm_nlen = 4'(nlen); f.ccm_tlen = 5'(tlen);
    return f;
  endfunction

  function automatic bq_t rnd_q(int n);
    bq_t q;
    for (int i = 0; i < n; i++) q.push_back(ref_rand_blk());
    return q;
  endfunction

  localparam key_t K38A = {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0};
  localparam block_t P1 = 128'h6bc1bee22e409f96e93d7e117393172a;
  localparam block_t IV = 128'h000102030405060708090a0b0c0d0e0f;

  localparam int NUM_MODES_TB = 9;
  bq_t none;
  int mode_seen [NUM_MODES_TB];

  class test_c;
    string   name;
    op_cfg_t f;
    key_t    ka, kb;
    bq_t     a, m, e;
    int      per_block;
    bit      use_ref;
  endclass

  test_c tests[$];

  function automatic void add(string name, op_cfg_t f, key_t ka, key_t kb, bq_t a, bq_t m,
                              bq_t e, bit use_ref, int per_block = 0);
    test_c t = new;
    t.name = name; t.f = f; t.ka = ka; t.kb = kb; t.a = a; t.m = m; t.e = e;
    t.use_ref = use_ref; t.per_block = per_block;
    tests.push_back(t);
  endfunction

  function automatic bq_t one(block_t b);
    bq_t q;
    q.push_back(b);
    return q;
  endfunction

  function automatic bq_t two(block_t b0, block_t b1);
    bq_t q;
    q.push_back(b0);
    q.push_back(b1);
    return q;
  endfunction

  initial begin
    bq_t e, m, a, got, got2;
    op_cfg_t f;
    key_t ka, kb;
    cfg = '0; key1 = '0; key2 = '0; ctx_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- published vectors
    add("ECB-38A", mk(MODE_ECB, 0, 0, 0, 16, 0), K38A, 0, none, one(P1), one(128'h3ad77bb40d7a3660a89ecaf32466ef97), 0);
    add("CBC-38A", mk(MODE_CBC, 0, 0, 0, 16, IV), K38A, 0, none, one(P1), one(128'h7649abac8119b246cee98e9b12e9197d), 0);
    add("CFB-38A", mk(MODE_CFB, 0, 0, 0, 16, IV), K38A, 0, none, one(P1), one(128'h3b3fd92eb72dad20333449f8e83cfb4a), 0);
    add("OFB-38A", mk(MODE_OFB, 0, 0, 0, 16, IV), K38A, 0, none, one(P1), one(128'h3b3fd92eb72dad20333449f8e83cfb4a), 0);
    add("CTR-38A", mk(MODE_CTR, 0, 0, 0, 16, 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff), K38A, 0, none, one(P1),
        one(128'h874d6191b620e3261bef6864990db6ce), 0);
    add("CMAC-38B-empty", mk(MODE_CMAC, 0, 0, 0, 0, 0), K38A, 0, none, none, one(128'hbb1d6929e95937287fa37d129b756746), 0);
    add("CMAC-38B-16", mk(MODE_CMAC, 0, 0, 0, 16, 0), K38A, 0, none, one(P1), one(128'h070a16b46b4d4144f79bdd9dd04a287c), 0);
    add("GCM-TC1", mk(MODE_GCM, 0, 0, 0, 0, 0), 0, 0, none, none, one(128'h58e2fccefa7e3061367f1d57a4e7455a), 0);
    add("GCM-TC2", mk(MODE_GCM, 0, 0, 0, 16, 0), 0, 0, none, one(128'h0),
        two(128'h0388dace60b6a392f328c2b971b2fe78, 128'hab6e47d42cec13bdf53a67b21257bddf), 0);
    add("CCM-38C-ex1", mk(MODE_CCM, 0, 0, 8, 4, {56'h10111213141516, 72'h0}, 7, 4),
        {128'h404142434445464748494a4b4c4d4e4f, 128'h0}, 0, one({64'h0001020304050607, 64'h0}),
        one({32'h20212223, 96'h0}), two({32'h7162015b, 96'h0}, {32'h4dac255d, 96'h0}), 0);
    add("XTS-1619-v1", mk(MODE_XTS, 0, 0, 0, 32, 0), 0, 0, none, two(128'h0, 128'h0),
        two(128'h917cf69ebd68b2ec9b9fe9a3eadda692, 128'hcd43d2f59598ed858c02c2652fbf922e), 0);

    // ---- random messages, every mode, both key sizes and directions
    for (int it = 0; it < 72; it++) begin
      aes_mode_e md;
      int alen, mlen, nl, tl;
      bit d, k;
      md = aes_mode_e'(it % 9);
      d = 1'((it / 9) % 2);
      k = 1'((it / 18) % 2);
      ka = {ref_rand_blk(), k ? ref_rand_blk() : 128'h0};
      kb = {ref_rand_blk(), k ? ref_rand_blk() : 128'h0};
      alen = (md inside {MODE_GCM, MODE_CCM}) ? $urandom_range(0, 50) : 0;
      if (md inside {MODE_ECB, MODE_CBC, MODE_XTS}) mlen = 16 * $urandom_range(1, 5);
      else mlen = $urandom_range(md == MODE_CMAC ? 0 : 1, 80);
      nl = $urandom_range(7, 13);
      tl = 2 * $urandom_range(2, 8);
      f = mk(md, d, k, alen, mlen, ref_rand_blk(), nl, tl);
      if (md == MODE_CCM) f.iv = f.iv & ~(128'hffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff >> (8*nl));
      if (md == MODE_CMAC) f.decrypt = 0;
      a = rnd_q((alen + 15) / 16);
      m = rnd_q((mlen + 15) / 16);
      // zero bytes past the end of the last block, as a DMA would deliver them
      if (a.size() > 0) a[a.size()-1] = keep(a[a.size()-1], alen - 16*(a.size()-1));
      if (m.size() > 0) m[m.size()-1] = keep(m[m.size()-1], mlen - 16*(m.size()-1));
      add($sformatf("rand %s d=%0d k256=%0d a=%0d m=%0d", md.name(), d, k, alen, mlen), f, ka, kb, a, m, none, 1);
      mode_seen[md]++;
    end

    // ---- cycles per block in steady state (Nr, Nr+1, 2*Nr+1)
    ka = {ref_rand_blk(), ref_rand_blk()};
    m = rnd_q(6);
    for (int k = 0; k < 2; k++) begin
      aes_mode_e rm [10] = '{MODE_ECB, MODE_ECB, MODE_CBC, MODE_CBC, MODE_CFB, MODE_CFB, MODE_OFB, MODE_CTR, MODE_XTS, MODE_GCM};
      bit        rd [10] = '{0, 1, 0, 1, 0, 1, 1, 0, 0, 0};
      int        rc [10];
      int        nr;
      nr = k ? 14 : 10;
      rc = '{nr, 2*nr+1, nr+1, 2*nr+1, nr+1, nr, nr+1, nr, nr, nr};
      for (int i = 0; i < 10; i++)
        add($sformatf("rate %s dec=%0d k256=%0d", rm[i].name(), rd[i], k), mk(rm[i], rd[i], 1'(k), 0, 96, IV),
            ka, ka, none, m, none, 1, rc[i]);
    end

    // CMAC chains on its own result: 3 more blocks must cost exactly 3*Nr cycles
    add("rate CMAC 3 blocks", mk(MODE_CMAC, 0, 0, 0, 48, IV), ka, ka, none, rnd_q(3), none, 1, 10);
    add("rate CMAC 6 blocks", mk(MODE_CMAC, 0, 0, 0, 96, IV), ka, ka, none, rnd_q(6), none, 1, 10);

    foreach (tests[i]) begin
      test_c t;
      t = tests[i];
      if (t.use_ref) t.e = ref_mode(t.f, t.ka, t.kb, t.a, t.m);
      check_op(t.name, t.f, t.ka, t.kb, t.a, t.m, t.e, t.per_block);
    end
    checks++;
    if (cmac_lat[1] - cmac_lat[0] != 3 * 10) begin
      failures++;
      $display("FAIL CMAC: 3 extra blocks took %0d cycles, expected %0d", cmac_lat[1] - cmac_lat[0], 30);
    end

    // ---- preemption: halt after 2 outputs, run another operation, resume from the context
    for (int j = 0; j < 5; j++) begin
      aes_mode_e md;
      eng_ctx_t saved;
      bq_t rest;
      md = j == 0 ? MODE_CBC : j == 1 ? MODE_GCM : j == 2 ? MODE_CCM : j == 3 ? MODE_XTS : MODE_CTR;
      ka = {ref_rand_blk(), 128'h0};
      f = mk(md, 0, 0, md == MODE_GCM || md == MODE_CCM ? 20 : 0, 80, ref_rand_blk() & ~(128'hffffffff), 12, 16);
      a = rnd_q((f.aad_len + 15) / 16);
      if (a.size() > 0) a[1] = keep(a[1], 4);
      m = rnd_q(5);
      e = ref_mode(f, ka, ka, a, m);
      cfg = f; key1 = ka; key2 = ka;
      drive(a, m, 0, 2);
      got = got_g;
      saved = ctx_out;
      checks++;
      if (got.size() != int'(saved.msg_blk) || got.size() < 2 || got.size() >= 5 || busy) begin failures++; $display("FAIL halt %s: %0d outputs", md.name(), got.size()); end
      // another operation in between
      cfg = mk(MODE_ECB, 0, 1, 0, 16, 0); key1 = {256{1'b1}};
      drive(none, one(P1), 0, 0);
      checks++;
      if (got_g.size() != 1 || got_g[0] != ref_aes({256{1'b1}}, 1, 0, P1)) begin
        failures++; $display("FAIL preempting op");
      end
      ctx_in = saved;
      cfg = f; key1 = ka; key2 = ka;
      rest = m[int'(saved.msg_blk):$];
      drive(none, rest, 1, 0);
      got2 = got_g;
      foreach (got2[i]) got.push_back(got2[i]);
      checks++;
      if (got != e) begin failures++; $display("FAIL resume %s", md.name()); end
    end

    // ---- clear (panic) during an operation
    cfg = mk(MODE_CBC, 0, 1, 0, 64, IV); key1 = ka;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (busy || out_valid || ctx_out.fb != 0) begin failures++; $display("FAIL clear"); end

    foreach (mode_seen[i]) begin
      checks++;
      if (mode_seen[i] == 0) begin failures++; $display("FAIL mode %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

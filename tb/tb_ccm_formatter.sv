// tb_ccm_formatter: checks the CCM formatting network against SP 800-38C example 1
// (B0 = 4f101112..04, Ctr0 = 07101112..00, first AAD block 0008 0001..07) and against a
// byte-array model of the formatting rules on random nonce lengths, tag lengths and AAD.
module tb_ccm_formatter;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  block_t nonce = 0, ctr_in = 0, aad_raw = 0, b0, ctr0, ctr_next, aad_enc;
  logic [3:0] nlen = 7;
  logic [4:0] tlen = 4, aad_nvalid = 16;
  logic [31:0] aad_len = 8, msg_len = 4;
  logic aad_first = 1;
  logic [15:0] aad_carry = 0;
  int checks = 0, failures = 0;
  ccm_formatter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [7:0] by [16];
    int q;
    block_t e;
    nonce = {56'h10111213141516, 72'h0};
    aad_raw = {64'h0001020304050607, 64'h0};
    aad_nvalid = 10;
    #1;
    chk("B0 ex1", b0, 128'h4f101112131415160000000000000004);
    chk("Ctr0 ex1", ctr0, 128'h07101112131415160000000000000000);
    chk("AAD ex1", aad_enc, 128'h00080001020304050607000000000000);
    for (int it = 0; it < 200; it++) begin
      nlen = 4'($urandom_range(7, 13));
      tlen = 5'(2 * $urandom_range(2, 8));
      aad_len = (it % 8 == 0) ? 0 : $urandom_range(1, 300);
      msg_len = $urandom;
      nonce = ref_rand_blk();
      ctr_in = ref_rand_blk();
      aad_raw = ref_rand_blk();
      aad_first = it[0];
      aad_carry = 16'($urandom);
      aad_nvalid = 5'($urandom_range(1, 16));
      #1;
      q = 15 - nlen;
      // B0
      by[0] = {1'b0, aad_len != 0, 3'((tlen - 2) / 2), 3'(q - 1)};
      for (int i = 0; i < nlen; i++) by[1+i] = nonce[127-8*i -: 8];
      for (int j = 0; j < q; j++) by[15-j] = (j < 4) ? msg_len[8*j +: 8] : 8'h00;
      foreach (by[i]) e[127-8*i -: 8] = by[i];
      chk("B0", b0, e);
      by[0] = 8'(q - 1);
      for (int j = 0; j < q; j++) by[15-j] = 0;
      foreach (by[i]) e[127-8*i -: 8] = by[i];
      chk("Ctr0", ctr0, e);
      // counter increment in the last q bytes only
      e = ctr_in;
      begin
        logic [127:0] lo;
        lo = (ctr_in + 1);
        for (int i = 16 - q; i < 16; i++) e[127-8*i -: 8] = lo[127-8*i -: 8];
      end
      chk("ctr_next", ctr_next, e);
      // AAD encoding
      by[0] = aad_first ? aad_len[15:8] : aad_carry[15:8];
      by[1] = aad_first ? aad_len[7:0] : aad_carry[7:0];
      for (int i = 2; i < 16; i++) by[i] = aad_raw[127-8*(i-2) -: 8];
      for (int i = 0; i < 16; i++) if (i >= aad_nvalid) by[i] = 0;
      foreach (by[i]) e[127-8*i -: 8] = by[i];
      chk("aad_enc", aad_enc, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

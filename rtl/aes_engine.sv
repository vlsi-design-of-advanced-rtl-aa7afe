// aes_engine: block-cipher mode engine around a single shared AES core.
//
// One aes_core is shared by all nine modes, so one mode runs at a time. The engine reshapes
// the data flow around it with multiplexers, XORs and registers, as in the mode data-flow
// diagrams: an input-side XOR (with the IV, the chaining value or a CMAC sub-key), an
// output-side XOR (with the chaining value, the delayed input block din_d or the XTS tweak)
// and a feedback register fb (IV, chaining value or counter). Mode-specific units:
//   CMAC  cmac_subkey  (K1, K2 from L = E(0))
//   GCM   ghash_engine (H = E(0), tag = E(J0) xor GHASH(A, C, lengths)); 96-bit IV only
//   CCM   ccm_formatter (B0, counter blocks, AAD length encoding); two cipher calls per block
//   XTS   xts_tweak    (T = E_K2(i), T *= alpha per block); whole blocks only
//
// Sequencing: an operation runs through phases PREP0 (L, H, E(B0) or the XTS tweak), PREP1
// (GCM E(J0), CCM E(Ctr0)), AAD, MSG, FIN (GCM length block) and TAG. Cipher calls are issued
// as soon as the core is free; a call whose input does not depend on the previous result
// (ECB, CBC/ECB decryption, CFB decryption, CTR, GCM, XTS) is issued in the very cycle the
// previous result is taken, one that does (CBC/CFB encryption, OFB, CCM) one cycle later,
// through the feedback register. CMAC forwards the result into the next input in the same
// cycle. Cycles per block therefore are Nr, Nr+1 or 2*Nr+1 (decryption), matching the
// document's throughput table for ECB, CBC, CFB, OFB, CTR, CMAC, GCM and XTS encryption;
// CCM takes 2*(Nr+1) and XTS decryption 2*Nr+1 here (the table gives Nr for both).
//
// Interface: start (or resume with ctx_in) while idle samples cfg and the keys. Input blocks
// arrive on in_valid/in_ready: AAD blocks first, then the payload, ceil(len/16) blocks each;
// CMAC with an empty message takes none. Results leave on out_valid/out_ready; out_tag marks
// the tag block (CMAC, GCM, CCM; CCM tag truncated to t bytes), out_last the last output.
// Partial final blocks are zero-padded on output. halt_req stops the operation after the
// block in progress; halted pulses and ctx_out then holds everything needed to resume.
// clear (panic) wipes all state in one cycle.
module aes_engine
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     start,
  input  logic     resume,
  input  op_cfg_t  cfg,
  input  key_t     key1,
  input  key_t     key2,
  input  eng_ctx_t ctx_in,
  input  logic     halt_req,
  output logic     halted,
  output logic     done,
  output logic     busy,
  output eng_ctx_t ctx_out,
  input  logic     in_valid,
  output logic     in_ready,
  input  block_t   in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output block_t   out_data,
  output logic     out_tag,
  output logic     out_last
);
  typedef enum logic [2:0] {OP_PREP0, OP_PREP1, OP_AAD, OP_MSG, OP_MAC} op_e;

  op_cfg_t     c;
  logic        run;
  phase_e      phase;
  logic [27:0] aad_blk, msg_blk;
  block_t      fb, acc, aux, hk, din_d, tw_d;
  logic [15:0] carry;
  logic        ccm_sub;          // CCM: CBC-MAC call of the current block still to issue
  logic        inflight;
  op_e         pend_op;
  logic        pend_chain, pend_out, pend_last;
  logic [4:0]  nb_d;

  // shared core
  logic   core_start, core_dec, core_k256, core_busy, core_valid;
  key_t   core_key;
  block_t core_din, core_dout;

  aes_core u_core (
    .clk, .rst_n, .clear, .start(core_start), .decrypt(core_dec), .key256(core_k256),
    .key(core_key), .din(core_din), .busy(core_busy), .valid(core_valid), .dout(core_dout)
  );

  // mode units
  logic   sk_load, tw_load, tw_step, gh_init, gh_step;
  block_t k1, k2, tweak, gh_acc, gh_x, tw_in;
  block_t b0, ctr0, ctr_nx, aad_enc;

  cmac_subkey u_subkey (.clk, .rst_n, .clear, .load(sk_load), .l(resume ? ctx_in.hk : core_dout),
                        .k1, .k2);
  xts_tweak u_tweak (.clk, .rst_n, .clear, .load(tw_load), .t_in(tw_in), .step(tw_step), .t(tweak));
  ghash_engine u_ghash (.clk, .rst_n, .clear, .init(gh_init), .init_val(resume ? ctx_in.acc : '0),
                        .step(gh_step), .x(gh_x), .h(hk), .acc(gh_acc));

  // block bookkeeping
  logic [27:0] n_aad, n_raw, n_msg, k_aad;
  logic [31:0] aad_rem, msg_rem;
  logic [4:0]  nb_aad, nb_msg;
  logic        msg_last, need_in_aad, need_in_msg;

  always_comb begin
    n_raw   = 28'((c.aad_len + 32'd15) >> 4);
    n_aad   = (c.mode == MODE_CCM) ? ((c.aad_len == 0) ? 28'd0 : 28'((c.aad_len + 32'd17) >> 4)) : n_raw;
    n_msg   = 28'((c.msg_len + 32'd15) >> 4);
    if (c.mode == MODE_CMAC && c.msg_len == 0) n_msg = 28'd1;
    k_aad   = aad_blk;
    aad_rem = ((c.mode == MODE_CCM) ? c.aad_len + 32'd2 : c.aad_len) - {k_aad, 4'b0};
    nb_aad  = (aad_rem >= 32'd16) ? 5'd16 : aad_rem[4:0];
    msg_rem = c.msg_len - {msg_blk, 4'b0};
    nb_msg  = (msg_rem >= 32'd16) ? 5'd16 : msg_rem[4:0];
    msg_last    = (msg_blk + 28'd1 == n_msg);
    need_in_aad = (c.mode != MODE_CCM) || (aad_blk < n_raw);
    need_in_msg = !(c.mode == MODE_CMAC && c.msg_len == 0);
  end

  ccm_formatter u_fmt (
    .nonce(c.iv), .nlen(c.ccm_nlen), .tlen(c.ccm_tlen), .aad_len(c.aad_len), .msg_len(c.msg_len),
    .ctr_in(fb), .aad_first(aad_blk == 0), .aad_carry(carry),
    .aad_raw(need_in_aad ? in_data : '0), .aad_nvalid(nb_aad),
    .b0, .ctr0, .ctr_next(ctr_nx), .aad_enc
  );

  // ------------------------------------------------------------ issue / completion
  logic   out_free, comp, slot_free, can_issue, cmac_fwd, issue, need_in, iss_chain, iss_out, iss_last;
  op_e    iss_op;
  block_t cmac_m, r, res, gcm_c;

  assign out_free  = !out_valid || out_ready;
  assign comp      = inflight && core_valid && (!pend_out || out_free);
  assign slot_free = !inflight || comp;
  // CMAC forwards the core result straight into the next input (no extra feedback cycle)
  assign cmac_fwd  = comp && pend_op == OP_MSG && c.mode == MODE_CMAC;
  assign can_issue = run && slot_free && !(comp && pend_chain && !cmac_fwd);
  assign r         = core_dout;

  // CMAC last-block formatting: complete block xor K1, padded block xor K2.
  always_comb begin
    block_t pad;
    pad = keep_bytes(in_data, nb_msg);
    if (nb_msg != 5'd16) pad[127 - 8*nb_msg -: 8] = 8'h80;
    if (!msg_last)            cmac_m = in_data;
    else if (nb_msg == 5'd16) cmac_m = in_data ^ k1;
    else                      cmac_m = (need_in_msg ? pad : {8'h80, 120'h0}) ^ k2;
  end

  always_comb begin
    issue     = 1'b0;
    need_in   = 1'b0;
    iss_op    = OP_MSG;
    iss_chain = 1'b1;
    iss_out   = 1'b0;
    iss_last  = 1'b0;
    core_din  = '0;
    core_dec  = 1'b0;
    core_key  = key1;
    if (can_issue) begin
      unique case (phase)
        PH_PREP0: if (!inflight) begin
          issue  = 1'b1;
          iss_op = OP_PREP0;
          unique case (c.mode)
            MODE_CCM: core_din = b0;
            MODE_XTS: begin core_din = c.iv; core_key = key2; end
            default:  core_din = '0;
          endcase
        end
        PH_PREP1: if (!inflight) begin
          issue    = 1'b1;
          iss_op   = OP_PREP1;
          core_din = fb;
        end
        PH_AAD: if (c.mode == MODE_CCM && aad_blk < n_aad && !halt_req) begin
          need_in  = need_in_aad;
          issue    = !need_in || in_valid;
          iss_op   = OP_AAD;
          core_din = acc ^ aad_enc;
        end
        PH_MSG: begin
          if (c.mode == MODE_CCM && ccm_sub) begin
            issue    = 1'b1;
            iss_op   = OP_MAC;
            core_din = acc ^ din_d;
          end else if (msg_blk < n_msg && !halt_req) begin
            need_in   = need_in_msg;
            issue     = !need_in || in_valid;
            iss_op    = OP_MSG;
            iss_out   = (c.mode != MODE_CMAC) || msg_last;
            iss_last  = msg_last;
            unique case (c.mode)
              MODE_ECB: begin core_din = in_data; core_dec = c.decrypt; iss_chain = 1'b0; end
              MODE_CBC: begin
                core_din  = c.decrypt ? in_data : in_data ^ fb;
                core_dec  = c.decrypt;
                iss_chain = !c.decrypt;
              end
              MODE_CFB: begin core_din = fb; iss_chain = !c.decrypt; end
              MODE_OFB: core_din = fb;
              MODE_CTR, MODE_GCM: begin core_din = fb; iss_chain = 1'b0; end
              MODE_XTS: begin core_din = in_data ^ tweak; core_dec = c.decrypt; iss_chain = 1'b0; end
              MODE_CMAC: core_din = (cmac_fwd ? r : acc) ^ cmac_m;
              MODE_CCM:  core_din = fb;
              default: ;
            endcase
          end
        end
        default: ;
      endcase
    end
  end

  assign core_start = issue;
  assign core_k256  = c.key256;

  // results of the completing call
  always_comb begin
    gcm_c = keep_bytes(r ^ din_d, nb_d);
    unique case (c.mode)
      MODE_ECB:           res = r;
      MODE_CBC:           res = c.decrypt ? r ^ fb : r;
      MODE_XTS:           res = r ^ tw_d;
      MODE_CMAC:          res = r;
      default:            res = gcm_c;
    endcase
  end

  // GHASH feed: AAD blocks, ciphertext blocks, then the length block.
  logic gcm_aad_take;
  assign gcm_aad_take = run && phase == PH_AAD && c.mode == MODE_GCM && aad_blk < n_aad &&
                        in_valid && !halt_req;
  always_comb begin
    gh_step = 1'b0;
    gh_x    = '0;
    if (gcm_aad_take) begin
      gh_step = 1'b1;
      gh_x    = keep_bytes(in_data, nb_aad);
    end else if (comp && pend_op == OP_MSG && c.mode == MODE_GCM) begin
      gh_step = 1'b1;
      gh_x    = c.decrypt ? keep_bytes(din_d, nb_d) : gcm_c;
    end else if (run && phase == PH_FIN) begin
      gh_step = 1'b1;
      gh_x    = {29'b0, c.aad_len, 3'b0, 29'b0, c.msg_len, 3'b0};
    end
  end

  assign in_ready = (issue && need_in) || gcm_aad_take;

  logic idle_start;
  assign idle_start = !run && (start || resume);
  assign gh_init    = idle_start;
  assign sk_load    = (idle_start && resume) ||
                      (comp && pend_op == OP_PREP0 && c.mode == MODE_CMAC);
  assign tw_load    = (idle_start && resume) ||
                      (comp && pend_op == OP_PREP0 && c.mode == MODE_XTS);
  assign tw_in      = resume && !run ? ctx_in.fb : r;
  assign tw_step    = issue && iss_op == OP_MSG && c.mode == MODE_XTS;

  logic can_halt;
  assign can_halt = run && halt_req && !inflight && !out_valid && !ccm_sub &&
                    phase inside {PH_AAD, PH_MSG};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; run <= 1'b0; phase <= PH_DONE; aad_blk <= '0; msg_blk <= '0;
      fb <= '0; acc <= '0; aux <= '0; hk <= '0; din_d <= '0; tw_d <= '0; carry <= '0;
      ccm_sub <= 1'b0; inflight <= 1'b0; pend_op <= OP_MSG; pend_chain <= 1'b0;
      pend_out <= 1'b0; pend_last <= 1'b0; nb_d <= '0;
      out_valid <= 1'b0; out_data <= '0; out_tag <= 1'b0; out_last <= 1'b0;
      halted <= 1'b0; done <= 1'b0;
    end else if (clear) begin
      c <= '0; run <= 1'b0; phase <= PH_DONE; aad_blk <= '0; msg_blk <= '0;
      fb <= '0; acc <= '0; aux <= '0; hk <= '0; din_d <= '0; tw_d <= '0; carry <= '0;
      ccm_sub <= 1'b0; inflight <= 1'b0; pend_chain <= 1'b0; pend_out <= 1'b0;
      out_valid <= 1'b0; out_data <= '0; out_tag <= 1'b0; out_last <= 1'b0;
      halted <= 1'b0; done <= 1'b0;
    end else begin
      halted <= 1'b0;
      done   <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;

      if (idle_start) begin
        run     <= 1'b1;
        c       <= cfg;
        ccm_sub <= 1'b0;
        if (resume) begin
          phase   <= ctx_in.phase;
          aad_blk <= ctx_in.aad_blk;
          msg_blk <= ctx_in.msg_blk;
          fb      <= ctx_in.fb;
          acc     <= ctx_in.acc;
          aux     <= ctx_in.aux;
          hk      <= ctx_in.hk;
          carry   <= ctx_in.ccm_carry;
        end else begin
          aad_blk <= '0;
          msg_blk <= '0;
          acc     <= '0;
          aux     <= '0;
          carry   <= '0;
          unique case (cfg.mode)
            MODE_CMAC, MODE_GCM, MODE_CCM, MODE_XTS: phase <= PH_PREP0;
            default: phase <= PH_MSG;
          endcase
          // GCM: J0 = IV || 0^31 || 1 ; CCM: Ctr0 from the formatter (computed on cfg).
          unique case (cfg.mode)
            MODE_GCM: fb <= {cfg.iv[127:32], 32'd1};
            default:  fb <= cfg.iv;
          endcase
        end
      end

      // CCM counter 0 depends on the latched configuration: set it in the cycle after start.
      if (run && phase == PH_PREP0 && !inflight && c.mode == MODE_CCM) fb <= ctr0;

      // issue side effects
      if (issue) begin
        inflight   <= 1'b1;
        pend_op    <= iss_op;
        pend_chain <= iss_chain;
        pend_out   <= iss_out;
        pend_last  <= iss_last;
        if (iss_op == OP_AAD) begin
          aad_blk <= aad_blk + 28'd1;
          if (need_in) carry <= in_data[15:0];
        end
        if (iss_op == OP_MAC) ccm_sub <= 1'b0;
        if (iss_op == OP_MSG) begin
          msg_blk <= msg_blk + 28'd1;
          din_d   <= in_data;
          nb_d    <= nb_msg;
          tw_d    <= tweak;
          unique case (c.mode)
            MODE_CTR: fb <= fb + 128'd1;
            MODE_GCM: fb <= {fb[127:32], fb[31:0] + 32'd1};
            MODE_CCM: fb <= ctr_nx;
            MODE_CFB: if (c.decrypt) fb <= in_data;
            default: ;
          endcase
        end
      end else if (comp) begin
        inflight <= 1'b0;
      end

      // completion side effects
      if (comp) begin
        if (pend_out) begin
          out_valid <= 1'b1;
          out_data  <= res;
          out_tag   <= (c.mode == MODE_CMAC);
          out_last  <= pend_last && !(c.mode inside {MODE_GCM, MODE_CCM});
        end
        unique case (pend_op)
          OP_PREP0: begin
            unique case (c.mode)
              MODE_CMAC: begin hk <= r; phase <= PH_MSG; end
              MODE_GCM:  begin hk <= r; phase <= PH_PREP1; end
              MODE_CCM:  begin acc <= r; phase <= PH_PREP1; end
              default:   phase <= PH_MSG;   // XTS: tweak loaded by u_tweak
            endcase
          end
          OP_PREP1: begin
            aux   <= r;
            fb    <= (c.mode == MODE_GCM) ? {fb[127:32], fb[31:0] + 32'd1} : ctr_nx;
            phase <= PH_AAD;
          end
          OP_AAD: acc <= r;
          OP_MAC: acc <= r;
          OP_MSG: begin
            unique case (c.mode)
              MODE_CBC:  fb <= c.decrypt ? din_d : r;
              MODE_CFB:  if (!c.decrypt) fb <= r ^ din_d;
              MODE_OFB:  fb <= r;
              MODE_CMAC: acc <= r;
              MODE_CCM: begin
                din_d   <= c.decrypt ? gcm_c : keep_bytes(din_d, nb_d);
                ccm_sub <= 1'b1;
              end
              default: ;
            endcase
          end
          default: ;
        endcase
      end

      // phase progress without cipher calls
      if (run) begin
        unique case (phase)
          PH_AAD: begin
            if (gcm_aad_take) aad_blk <= aad_blk + 28'd1;
            if (aad_blk == n_aad && !inflight) phase <= PH_MSG;
          end
          PH_MSG:
            if (msg_blk == n_msg && !inflight && !ccm_sub && !issue)
              phase <= (c.mode == MODE_GCM) ? PH_FIN : (c.mode == MODE_CCM) ? PH_TAG : PH_DONE;
          PH_FIN: phase <= PH_TAG;
          PH_TAG: if (out_free) begin
            out_valid <= 1'b1;
            out_tag   <= 1'b1;
            out_last  <= 1'b1;
            out_data  <= (c.mode == MODE_GCM) ? (gh_acc ^ aux) : keep_bytes(acc ^ aux, c.ccm_tlen);
            phase     <= PH_DONE;
          end
          PH_DONE: begin
            run  <= 1'b0;
            done <= 1'b1;
          end
          default: ;
        endcase
      end

      if (can_halt) begin
        run    <= 1'b0;
        halted <= 1'b1;
      end
    end
  end

  always_comb begin
    ctx_out           = '0;
    ctx_out.phase     = phase;
    ctx_out.aad_blk   = aad_blk;
    ctx_out.msg_blk   = msg_blk;
    ctx_out.fb        = (c.mode == MODE_XTS) ? tweak : fb;
    ctx_out.acc       = (c.mode == MODE_GCM) ? gh_acc : acc;
    ctx_out.aux       = aux;
    ctx_out.hk        = hk;
    ctx_out.ccm_carry = carry;
  end

  assign busy = run;

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n || clear)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule

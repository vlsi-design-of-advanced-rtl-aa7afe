// aes_cp_ctrl: interface registers, operation state machine, data registers and key store of
// the AES cryptoprocessor (main clock domain).
//
// Software talks to it over a 32-bit AXI4-Lite slave. The privilege level of each access is
// AxPROT[0] (1: Supervisor, 0: User). Data blocks move either over 128-bit AXI-Stream ports
// (DMA) or through the DIN/DOUT data registers (bus_io). Toward the engine it exchanges
// commands, input blocks, output blocks and completion events over valid/ready channels,
// which the top carries across the clock-domain boundary.
//
// Operation flow (state machine): IDLE -INIT-> CONFIG (the initiating level becomes owner)
// -START-> RUN -engine done-> DONE -ACK-> IDLE. SUSPEND in RUN halts the engine after the
// current block (HALTING -> SUSPENDED) and captures the engine context into the auxiliary
// context registers, readable and writable by the owner only through CTX_IDX/CTX_DATA;
// RESUME from SUSPENDED or CONFIG restarts the engine from them (preemption). Any violation
// moves to ERROR, left with ERRCLR. Only the owner may configure, run, read results or abort
// an operation; the Supervisor may also abort a User operation, which flags "aborted" in the
// User error register. Errors are kept per privilege level. Each DIN word may be written
// and each DOUT word read once per block; a second access is an error.
// Panic (Supervisor only): partial stops the operation, clears the data registers and wipes
// key slots configured as panic-sensitive; full also wipes every key slot and the context.
// The six key slots (key_slot) are checked and their usage counters stepped on START and
// RESUME. With out_to_key the engine output is written into a key slot instead of DOUT,
// so a derived key never leaves the cryptoprocessor.
//
// Register map (byte offsets): 0x00 CTRL (W: 0 INIT, 1 START, 2 ABORT, 3 SUSPEND, 4 RESUME,
// 5 ERRCLR, 6 ACK), 0x04 CFG (3:0 mode, 4 decrypt, 7:5 key slot, 10:8 XTS key2 slot, 11 bus_io,
// 12 out_to_key, 15:13 destination slot, 19:16 CCM nonce bytes, 24:20 CCM tag bytes),
// 0x08 AAD_LEN, 0x0C MSG_LEN, 0x10-0x1C IV (0x10 = IV[127:96]), 0x20 STATUS (2:0 state,
// 3 owner, 4 DIN full, 5 DOUT full, 6 DOUT is tag, 7 DOUT is last), 0x24 ERR_SUP, 0x28 ERR_USR,
// 0x2C SUPCFG (8:0 enabled modes, 9 user enable, 15:10 supervisor-reserved slots),
// 0x30 PANIC (0 partial, 1 full), 0x34 CLKCFG (0 oscillator, 2:1 divider, 3 randomize,
// 15:8 window), 0x40-0x4C DIN, 0x50-0x5C DOUT, 0x60 CTX_IDX, 0x64 CTX_DATA,
// 0x100 + 0x40*slot: +0 KCFG, +4 SEAL, +8 SEALVAL, +C UNSEAL, +10 KERR (write clears),
// +14 USAGE, +18 KCLR, +20..+3C key words. The register map and all encodings are this
// design's choice; the document names the register groups and the rules, not the layout.
module aes_cp_ctrl
  import aes_pkg::*;
#(
  parameter int unsigned NUM_SLOTS = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [11:0] s_awaddr,
  input  logic [2:0]  s_awprot,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [11:0] s_araddr,
  input  logic [2:0]  s_arprot,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // AXI-Stream data in (from DMA) and out (to DMA)
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  block_t      s_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output block_t      m_axis_tdata,
  output logic        m_axis_tlast,
  output logic        m_axis_tuser,   // 1: tag block
  // engine channels
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output eng_cmd_t    cmd,
  output logic        din_valid,
  input  logic        din_ready,
  output block_t      din_data,
  input  logic        dout_valid,
  output logic        dout_ready,
  input  eng_out_t    dout,
  input  logic        evt_valid,
  output logic        evt_ready,
  input  eng_evt_t    evt,
  // clock randomization configuration
  output logic        clk_src_sel,
  output logic [1:0]  clk_div_sel,
  output logic        clk_rand_en,
  output logic [7:0]  clk_total_cc,
  // status
  output cp_state_e   state,
  output logic        panic_active
);
  localparam int unsigned CTX_BITS  = $bits(eng_ctx_t);
  localparam int unsigned CTX_WORDS = (CTX_BITS + 31) / 32;

  // ------------------------------------------------------------ registers
  logic        owner;
  aes_mode_e   c_mode;
  logic        c_dec, c_bus_io, c_out_to_key;
  logic [2:0]  c_slot, c_slot2, c_dst;
  logic [3:0]  c_nlen;
  logic [4:0]  c_tlen;
  logic [31:0] c_aad_len, c_msg_len;
  block_t      c_iv;
  cp_err_t     err_sup, err_usr;
  logic [8:0]  mode_en;
  logic        user_en;
  logic [NUM_SLOTS-1:0] sup_slots;
  logic [CTX_WORDS*32-1:0] ctx_q;
  logic [4:0]  ctx_idx;
  block_t      din_q, dout_q;
  logic [3:0]  din_wr, dout_rd;
  logic        din_full, dout_full, dout_tag, dout_last;
  logic        dst_half;

  // ------------------------------------------------------------ AXI4-Lite handshakes
  logic        wr_en, rd_en, wpriv, rpriv;
  logic [11:0] waddr, raddr;
  logic        rd_err;
  logic [31:0] rd_val;

  assign wr_en     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_en;
  assign s_wready  = wr_en;
  assign waddr     = s_awaddr;
  assign wpriv     = s_awprot[0];
  assign rd_en     = s_arvalid && !s_rvalid;
  assign s_arready = rd_en;
  assign raddr     = s_araddr;
  assign rpriv     = s_arprot[0];

  // ------------------------------------------------------------ key store
  ks_cmd_e              ks_cmd   [NUM_SLOTS];
  ks_cfg_t              ks_cfg   [NUM_SLOTS];
  ks_err_t              ks_err   [NUM_SLOTS];
  logic [31:0]          ks_usage [NUM_SLOTS];
  key_t                 ks_key   [NUM_SLOTS];
  logic [NUM_SLOTS-1:0] ks_use_ok, ks_sealed, ks_pop, ks_ext;
  logic                 ks_priv, panic_p, panic_f;
  logic [31:0]          ks_wdata;
  logic [2:0]           ks_widx;
  aes_mode_e            ks_use_mode;
  logic                 ks_use_dec;
  block_t               ks_ext_data;

  for (genvar i = 0; i < NUM_SLOTS; i++) begin : g_slot
    key_slot u_slot (
      .clk, .rst_n, .panic_partial(panic_p), .panic_full(panic_f), .cmd(ks_cmd[i]),
      .priv(ks_priv), .wdata(ks_wdata), .widx(ks_widx), .use_mode(ks_use_mode),
      .use_dec(ks_use_dec), .use_ok(ks_use_ok[i]), .ext_load(ks_ext[i]), .ext_half(dst_half),
      .ext_data(ks_ext_data), .cfg(ks_cfg[i]), .err(ks_err[i]), .usage(ks_usage[i]),
      .sealed(ks_sealed[i]), .populated(ks_pop[i]), .key(ks_key[i])
    );
  end

  // ------------------------------------------------------------ write decode
  logic is_owner_w, is_owner_r, slot_w_ok, slot_r_ok;
  logic cmd_init, cmd_start, cmd_abort, cmd_susp, cmd_resume, cmd_errclr, cmd_ack;
  logic [2:0] wslot, rslot;
  logic start_ok, start_req, resume_req;

  assign is_owner_w = (wpriv == owner);
  assign is_owner_r = (rpriv == owner);
  assign wslot      = 3'(waddr[8:6] - 3'd4);   // 0x100 -> slot 0
  assign rslot      = 3'(raddr[8:6] - 3'd4);
  assign slot_w_ok  = waddr[11:8] != 0 && int'(wslot) < NUM_SLOTS && (wpriv || !sup_slots[wslot]);
  assign slot_r_ok  = raddr[11:8] != 0 && int'(rslot) < NUM_SLOTS && (rpriv || !sup_slots[rslot]);

  always_comb begin
    cmd_init = 1'b0; cmd_start = 1'b0; cmd_abort = 1'b0; cmd_susp = 1'b0;
    cmd_resume = 1'b0; cmd_errclr = 1'b0; cmd_ack = 1'b0;
    if (wr_en && waddr == 12'h000) begin
      cmd_init   = s_wdata[0];
      cmd_start  = s_wdata[1];
      cmd_abort  = s_wdata[2];
      cmd_susp   = s_wdata[3];
      cmd_resume = s_wdata[4];
      cmd_errclr = s_wdata[5];
      cmd_ack    = s_wdata[6];
    end
  end

  // key-slot commands from the bus, and the use request at start/resume
  always_comb begin
    for (int i = 0; i < NUM_SLOTS; i++) ks_cmd[i] = KS_NOP;
    ks_priv     = wpriv;
    ks_wdata    = s_wdata;
    ks_widx     = waddr[4:2];
    ks_use_mode = c_mode;
    ks_use_dec  = c_dec;
    if (start_req || resume_req) begin
      ks_priv = owner;
      if (start_ok) begin
        ks_cmd[c_slot] = KS_USE;
        if (c_mode == MODE_XTS) ks_cmd[c_slot2] = KS_USE;
      end else begin
        // let the slot flag the refusal in its own error register
        ks_cmd[c_slot] = KS_USE;
      end
    end else if (wr_en && slot_w_ok) begin
      unique case (waddr[5:2])
        4'h0: ks_cmd[wslot] = KS_CFG;
        4'h1: ks_cmd[wslot] = KS_SEAL;
        4'h2: ks_cmd[wslot] = KS_SETVAL;
        4'h3: ks_cmd[wslot] = KS_UNSEAL;
        4'h4: ks_cmd[wslot] = KS_ERRCLR;
        4'h6: ks_cmd[wslot] = KS_CLEAR;
        4'h8, 4'h9, 4'ha, 4'hb, 4'hc, 4'hd, 4'he, 4'hf: ks_cmd[wslot] = KS_KEYW;
        default: ;
      endcase
    end
  end

  // start/resume admission
  logic in_cfg_state;
  assign in_cfg_state = (state == ST_CONFIG) || (state == ST_SUSPENDED && cmd_resume);
  assign start_req  = cmd_start && is_owner_w && state == ST_CONFIG && !cmd_valid;
  assign resume_req = cmd_resume && is_owner_w && in_cfg_state && !cmd_valid;
  assign start_ok   = mode_en[c_mode] && ks_use_ok[c_slot] &&
                      (owner || !sup_slots[c_slot]) &&
                      (c_mode != MODE_XTS || (ks_use_ok[c_slot2] && (owner || !sup_slots[c_slot2]))) &&
                      ks_cfg[c_slot].key256 == ((c_mode == MODE_XTS) ? ks_cfg[c_slot2].key256
                                                                      : ks_cfg[c_slot].key256);

  // ------------------------------------------------------------ read mux
  always_comb begin
    rd_val = '0;
    rd_err = 1'b0;
    if (raddr[11:8] == 4'h0) begin
      unique case (raddr[7:0])
        8'h04: if (is_owner_r) rd_val = {7'b0, c_tlen, c_nlen, c_dst, c_out_to_key, c_bus_io,
                                         c_slot2, c_slot, c_dec, c_mode}; else rd_err = 1'b1;
        8'h08: if (is_owner_r) rd_val = c_aad_len; else rd_err = 1'b1;
        8'h0c: if (is_owner_r) rd_val = c_msg_len; else rd_err = 1'b1;
        8'h10, 8'h14, 8'h18, 8'h1c:
               if (is_owner_r) rd_val = c_iv[127-32*raddr[3:2] -: 32]; else rd_err = 1'b1;
        8'h20: rd_val = {24'b0, dout_last, dout_tag, dout_full, din_full, owner, 3'(state)};
        8'h24: if (rpriv) rd_val = 32'(err_sup); else rd_err = 1'b1;
        8'h28: if (!rpriv) rd_val = 32'(err_usr); else rd_err = 1'b1;
        8'h2c: rd_val = 32'({sup_slots, user_en, mode_en});
        8'h34: rd_val = {16'b0, clk_total_cc, 4'b0, clk_rand_en, clk_div_sel, clk_src_sel};
        8'h50, 8'h54, 8'h58, 8'h5c:
               if (is_owner_r && dout_full && c_bus_io && !dout_rd[raddr[3:2]])
                 rd_val = dout_q[127-32*raddr[3:2] -: 32];
               else rd_err = 1'b1;
        8'h60: rd_val = 32'(ctx_idx);
        8'h64: if (is_owner_r && (state == ST_SUSPENDED || state == ST_CONFIG) &&
                   int'(ctx_idx) < CTX_WORDS)
                 rd_val = ctx_q[32*ctx_idx +: 32];
               else rd_err = 1'b1;
        default: ;
      endcase
    end else if (slot_r_ok) begin
      unique case (raddr[5:2])
        4'h0: rd_val = 32'(ks_cfg[rslot]);
        4'h4: rd_val = {26'b0, ks_pop[rslot], ks_sealed[rslot], ks_err[rslot]};
        4'h5: rd_val = ks_usage[rslot];
        default: ;
      endcase
    end else rd_err = 1'b1;
  end

  // ------------------------------------------------------------ engine channels
  logic   redirect;
  assign redirect = c_out_to_key;

  // input blocks: stream or DIN register
  assign s_axis_tready = (state == ST_RUN) && !c_bus_io && din_ready;
  assign din_valid     = (state == ST_RUN) && (c_bus_io ? din_full : s_axis_tvalid);
  assign din_data      = c_bus_io ? din_q : s_axis_tdata;

  // output blocks: stream, DOUT register or key slot
  logic out_take;
  assign m_axis_tvalid = dout_valid && !c_bus_io && !redirect;
  assign m_axis_tdata  = dout.data;
  assign m_axis_tlast  = dout.last;
  assign m_axis_tuser  = dout.tag;
  assign dout_ready    = redirect ? 1'b1 : c_bus_io ? !dout_full : m_axis_tready;
  assign out_take      = dout_valid && dout_ready;
  assign ks_ext_data   = dout.data;
  always_comb begin
    ks_ext = '0;
    if (out_take && redirect && !dout.tag) ks_ext[c_dst] = 1'b1;
  end

  assign evt_ready = 1'b1;

  // ------------------------------------------------------------ state and registers
  cp_err_t werr;     // error raised by this write, reported to the writer's level
  logic    do_panic_p, do_panic_f;

  assign do_panic_p = wr_en && waddr == 12'h030 && wpriv && s_wdata[0];
  assign do_panic_f = wr_en && waddr == 12'h030 && wpriv && s_wdata[1];
  assign panic_p    = do_panic_p;
  assign panic_f    = do_panic_f;

  always_comb begin
    werr = '0;
    if (wr_en) begin
      if (waddr == 12'h000) begin
        if ((cmd_init && !(state inside {ST_IDLE, ST_DONE, ST_SUSPENDED})) ||
            (cmd_start && state != ST_CONFIG) ||
            (cmd_resume && !(state inside {ST_CONFIG, ST_SUSPENDED})) ||
            (cmd_susp && state != ST_RUN))
          werr.seq_err = 1'b1;
        if ((cmd_init && !wpriv && !user_en) ||
            ((cmd_start || cmd_resume || cmd_susp || cmd_ack) && state != ST_IDLE && !is_owner_w) ||
            (cmd_abort && state != ST_IDLE && !is_owner_w && !wpriv))
          werr.privilege = 1'b1;
        if ((start_req || resume_req) && !start_ok) werr.key = 1'b1;
      end else if (waddr[11:8] == 4'h0 && waddr[7:0] inside {8'h04, 8'h08, 8'h0c, 8'h10, 8'h14, 8'h18, 8'h1c}) begin
        if (!is_owner_w) werr.privilege = 1'b1;
        else if (state != ST_CONFIG) werr.seq_err = 1'b1;
      end else if (waddr[11:8] == 4'h0 && waddr[7:0] inside {8'h2c, 8'h30, 8'h34}) begin
        if (!wpriv) werr.privilege = 1'b1;
      end else if (waddr[11:8] == 4'h0 && waddr[7:0] inside {8'h40, 8'h44, 8'h48, 8'h4c}) begin
        if (!is_owner_w) werr.privilege = 1'b1;
        else if (state != ST_RUN || !c_bus_io || din_full) werr.seq_err = 1'b1;
        else if (din_wr[waddr[3:2]]) werr.data_twice = 1'b1;
      end else if (waddr[11:8] == 4'h0 && waddr[7:0] == 8'h64) begin
        if (!is_owner_w) werr.privilege = 1'b1;
        else if (!(state inside {ST_CONFIG, ST_SUSPENDED})) werr.seq_err = 1'b1;
      end else if (waddr[11:8] != 4'h0 && !slot_w_ok) werr.privilege = 1'b1;
    end
  end

  logic rd_twice;
  assign rd_twice = rd_en && raddr[11:4] == 8'h05 && is_owner_r && dout_full && c_bus_io &&
                    dout_rd[raddr[3:2]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE; owner <= 1'b0;
      c_mode <= MODE_ECB; c_dec <= 1'b0; c_bus_io <= 1'b0; c_out_to_key <= 1'b0;
      c_slot <= '0; c_slot2 <= '0; c_dst <= '0; c_nlen <= 4'd12; c_tlen <= 5'd16;
      c_aad_len <= '0; c_msg_len <= '0; c_iv <= '0;
      err_sup <= '0; err_usr <= '0; mode_en <= '1; user_en <= 1'b1; sup_slots <= '0;
      ctx_q <= '0; ctx_idx <= '0;
      din_q <= '0; dout_q <= '0; din_wr <= '0; dout_rd <= '0;
      din_full <= 1'b0; dout_full <= 1'b0; dout_tag <= 1'b0; dout_last <= 1'b0; dst_half <= 1'b0;
      cmd_valid <= 1'b0; cmd <= '0;
      s_bvalid <= 1'b0; s_bresp <= 2'b00; s_rvalid <= 1'b0; s_rdata <= '0; s_rresp <= 2'b00;
      clk_src_sel <= 1'b0; clk_div_sel <= 2'd0; clk_rand_en <= 1'b0; clk_total_cc <= 8'd15;
      panic_active <= 1'b0;
    end else begin
      panic_active <= 1'b0;
      // AXI responses
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (wr_en) begin
        s_bvalid <= 1'b1;
        s_bresp  <= (werr != '0) ? 2'b10 : 2'b00;
        if (wpriv) err_sup <= err_sup | werr; else err_usr <= err_usr | werr;
      end
      if (rd_en) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_err ? 32'h0 : rd_val;
        s_rresp  <= (rd_err || rd_twice) ? 2'b10 : 2'b00;
        if (rd_twice) begin
          if (rpriv) err_sup.data_twice <= 1'b1; else err_usr.data_twice <= 1'b1;
          state <= ST_ERROR;
        end else if (rd_err && raddr[11:8] == 4'h0) begin
          if (rpriv) err_sup.privilege <= 1'b1; else err_usr.privilege <= 1'b1;
        end
        if (!rd_err && raddr[11:4] == 8'h05) begin
          dout_rd[raddr[3:2]] <= 1'b1;
          if ((dout_rd | (4'b1 << raddr[3:2])) == 4'hf) begin
            dout_full <= 1'b0;
            dout_rd   <= '0;
          end
        end
      end

      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;

      // configuration writes
      if (wr_en && werr == '0) begin
        unique case (waddr)
          12'h004: begin
            c_mode       <= aes_mode_e'(s_wdata[3:0]);
            c_dec        <= s_wdata[4];
            c_slot       <= s_wdata[7:5];
            c_slot2      <= s_wdata[10:8];
            c_bus_io     <= s_wdata[11];
            c_out_to_key <= s_wdata[12];
            c_dst        <= s_wdata[15:13];
            c_nlen       <= s_wdata[19:16];
            c_tlen       <= s_wdata[24:20];
          end
          12'h008: c_aad_len <= s_wdata;
          12'h00c: c_msg_len <= s_wdata;
          12'h010, 12'h014, 12'h018, 12'h01c: c_iv[127-32*waddr[3:2] -: 32] <= s_wdata;
          12'h02c: begin
            mode_en   <= s_wdata[8:0];
            user_en   <= s_wdata[9];
            sup_slots <= s_wdata[10 +: NUM_SLOTS];
          end
          12'h034: begin
            clk_src_sel  <= s_wdata[0];
            clk_div_sel  <= s_wdata[2:1];
            clk_rand_en  <= s_wdata[3];
            clk_total_cc <= s_wdata[15:8];
          end
          12'h040, 12'h044, 12'h048, 12'h04c: begin
            din_q[127-32*waddr[3:2] -: 32] <= s_wdata;
            din_wr[waddr[3:2]] <= 1'b1;
            if ((din_wr | (4'b1 << waddr[3:2])) == 4'hf) begin
              din_full <= 1'b1;
              din_wr   <= '0;
            end
          end
          12'h060: ctx_idx <= s_wdata[4:0];
          12'h064: if (int'(ctx_idx) < CTX_WORDS) ctx_q[32*ctx_idx +: 32] <= s_wdata;
          default: ;
        endcase
      end

      if (din_valid && din_ready && c_bus_io) din_full <= 1'b0;

      if (out_take) begin
        if (c_bus_io && !redirect) begin
          dout_q    <= dout.data;
          dout_full <= 1'b1;
          dout_rd   <= '0;
          dout_tag  <= dout.tag;
          dout_last <= dout.last;
        end
        if (redirect && !dout.tag) dst_half <= ~dst_half;
      end

      // operation state machine
      unique case (state)
        ST_IDLE, ST_DONE, ST_SUSPENDED: begin
          if (cmd_init && werr == '0) begin
            owner    <= wpriv;
            state    <= ST_CONFIG;
            dst_half <= 1'b0;
          end else if (cmd_ack && state == ST_DONE && is_owner_w) begin
            state <= ST_IDLE;
          end
          if (state == ST_SUSPENDED && resume_req) begin
            if (start_ok) begin
              cmd_valid <= 1'b1;
              cmd       <= make_cmd(CMD_RESUME);
              state     <= ST_RUN;
            end else state <= ST_ERROR;
          end
        end
        ST_CONFIG: begin
          if (start_req || resume_req) begin
            if (start_ok) begin
              cmd_valid <= 1'b1;
              cmd       <= make_cmd(start_req ? CMD_START : CMD_RESUME);
              state     <= ST_RUN;
              din_full  <= 1'b0;
              din_wr    <= '0;
              dout_full <= 1'b0;
            end else state <= ST_ERROR;
          end
        end
        ST_RUN: begin
          if (evt_valid && !evt.halted) state <= ST_DONE;
          else if (cmd_susp && is_owner_w && !cmd_valid) begin
            cmd_valid  <= 1'b1;
            cmd.kind   <= CMD_HALT;
            state      <= ST_HALTING;
          end
        end
        ST_HALTING: begin
          if (evt_valid) begin
            if (evt.halted) begin
              ctx_q <= (CTX_WORDS*32)'(evt.ctx);
              state <= ST_SUSPENDED;
            end else state <= ST_DONE;
          end
        end
        ST_ERROR: if (cmd_errclr && (is_owner_w || wpriv)) begin
          state <= ST_IDLE;
          if (wpriv) err_sup <= '0; else err_usr <= '0;
        end
        default: state <= ST_IDLE;
      endcase

      // error clear outside the error state
      if (cmd_errclr && state != ST_ERROR) begin
        if (wpriv) err_sup <= '0; else err_usr <= '0;
      end

      // abort: owner, or the supervisor over a user operation
      if (cmd_abort && state != ST_IDLE && (is_owner_w || wpriv)) begin
        state     <= ST_IDLE;
        cmd_valid <= 1'b1;
        cmd.kind  <= CMD_CLEAR;
        din_full  <= 1'b0;
        dout_full <= 1'b0;
        if (!is_owner_w) err_usr.aborted <= 1'b1;
      end

      // panic
      if (do_panic_p || do_panic_f) begin
        panic_active <= 1'b1;
        state     <= ST_IDLE;
        cmd_valid <= 1'b1;
        cmd       <= '0;
        cmd.kind  <= CMD_CLEAR;
        din_q <= '0; dout_q <= '0; din_wr <= '0; dout_rd <= '0;
        din_full <= 1'b0; dout_full <= 1'b0;
        c_iv <= '0;
        if (state != ST_IDLE) begin
          if (owner) err_sup.panic <= 1'b1; else err_usr.panic <= 1'b1;
        end
        if (do_panic_f) ctx_q <= '0;
      end
    end
  end

  function automatic eng_cmd_t make_cmd(input eng_cmd_kind_e kind);
    eng_cmd_t m;
    m             = '0;
    m.kind        = kind;
    m.cfg.mode    = c_mode;
    m.cfg.decrypt = c_dec;
    m.cfg.key256  = ks_cfg[c_slot].key256;
    m.cfg.aad_len = c_aad_len;
    m.cfg.msg_len = c_msg_len;
    m.cfg.ccm_nlen = c_nlen;
    m.cfg.ccm_tlen = c_tlen;
    m.cfg.iv      = c_iv;
    m.key1        = ks_key[c_slot];
    m.key2        = ks_key[c_slot2];
    m.ctx         = eng_ctx_t'(ctx_q[CTX_BITS-1:0]);
    return m;
  endfunction

  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule

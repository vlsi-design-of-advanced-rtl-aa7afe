// key_slot: one slot of the secure key store.
//
// Each slot holds, as in the key-management register set, a seal/unseal reference tag and
// the last seal/unseal value written, a configuration register, an error register, a usage
// counter and the key value (128 or 256 bits). Rules enforced here:
//  * Seal: writing the reference (SEAL) seals the slot. While sealed, every access needs the
//    value register to equal the reference; UNSEAL with the right value releases the seal.
//  * Reservation: with cfg.reserved set only the owner privilege level may use or modify it.
//  * Lock: with cfg.lock set, configuration and key value are frozen until the next reset.
//  * Usage rules: a use request must match an allowed mode and direction, and the slot must
//    hold a key and have no pending error; each granted use increments the usage counter.
//  * Errors: every refused request sets a bit in err; a slot with errors is unusable until
//    the errors are cleared.
//  * Panic: a partial panic wipes the slot only if cfg.panic_sens; a full panic always does.
//  * The key value can also be written from the engine output (key derivation) when
//    cfg.ext_load is set; the key value itself is never readable.
// Commands arrive on cmd (one per cycle); results are visible the next cycle. The use check
// (use_ok) is combinational so the caller can decide in the same cycle. The tag width and
// the encoding of configuration and error bits are this design's choice.
module key_slot
  import aes_pkg::*;
#(
  parameter int unsigned TAG_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             panic_partial,
  input  logic             panic_full,
  input  ks_cmd_e          cmd,
  input  logic             priv,        // 1: supervisor, 0: user
  input  logic [31:0]      wdata,
  input  logic [2:0]       widx,        // key word index for KS_KEYW (word 0 = key[255:224])
  // use request
  input  aes_mode_e        use_mode,
  input  logic             use_dec,
  output logic             use_ok,
  // key derivation from the engine output
  input  logic             ext_load,
  input  logic             ext_half,    // 0: key[255:128], 1: key[127:0]
  input  block_t           ext_data,
  // state
  output ks_cfg_t          cfg,
  output ks_err_t          err,
  output logic [31:0]      usage,
  output logic             sealed,
  output logic             populated,
  output key_t             key
);
  logic [TAG_W-1:0] seal_ref, seal_val;
  logic             owner;     // privilege level that configured the slot

  logic access_ok, may_modify, mode_ok;
  assign access_ok  = (!sealed || seal_val == seal_ref) && (!cfg.reserved || priv == owner);
  assign may_modify = access_ok && !cfg.lock;
  assign mode_ok    = cfg.modes[use_mode] && (use_dec ? cfg.allow_dec : cfg.allow_enc);
  assign use_ok     = access_ok && populated && mode_ok && (err == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seal_ref <= '0; seal_val <= '0; sealed <= 1'b0; owner <= 1'b0;
      cfg <= '0; err <= '0; usage <= '0; populated <= 1'b0; key <= '0;
    end else if (panic_full || (panic_partial && cfg.panic_sens)) begin
      seal_ref <= '0; seal_val <= '0; sealed <= 1'b0; owner <= 1'b0;
      cfg <= '0; err <= '0; usage <= '0; populated <= 1'b0; key <= '0;
    end else begin
      unique case (cmd)
        KS_CFG:
          // configuration is set before the slot is populated
          if (may_modify && !populated) begin
            cfg   <= ks_cfg_t'(wdata[$bits(ks_cfg_t)-1:0]);
            owner <= priv;
          end else err.denied <= 1'b1;
        KS_SEAL:
          if (!sealed && access_ok) begin
            seal_ref <= wdata[TAG_W-1:0];
            sealed   <= 1'b1;
          end else err.denied <= 1'b1;
        KS_SETVAL: seal_val <= wdata[TAG_W-1:0];
        KS_UNSEAL:
          if (sealed && seal_val == seal_ref && (!cfg.reserved || priv == owner)) sealed <= 1'b0;
          else err.bad_tag <= 1'b1;
        KS_KEYW:
          if (may_modify) begin
            key[255-32*widx -: 32] <= wdata;
            if (widx == (cfg.key256 ? 3'd7 : 3'd3)) populated <= 1'b1;
          end else err.denied <= 1'b1;
        KS_CLEAR:
          if (may_modify) begin
            key <= '0; populated <= 1'b0; usage <= '0; cfg <= '0;
            sealed <= 1'b0; seal_ref <= '0;
          end else err.denied <= 1'b1;
        KS_ERRCLR:
          if (access_ok) err <= '0;
        KS_USE:
          if (use_ok) usage <= usage + 32'd1;
          else begin
            if (!access_ok)      err.denied   <= 1'b1;
            else if (!populated) err.empty    <= 1'b1;
            else if (!mode_ok)   err.bad_mode <= 1'b1;
          end
        default: ;
      endcase
      if (ext_load) begin
        if (cfg.ext_load && !cfg.lock) begin
          if (ext_half) begin
            key[127:0] <= ext_data;
            populated  <= 1'b1;
          end else begin
            key[255:128] <= ext_data;
            if (!cfg.key256) populated <= 1'b1;
          end
        end else err.denied <= 1'b1;
      end
    end
  end
endmodule

// aes_core: iterative AES-128/AES-256 cipher, one round per clock cycle.
//
// Only the logic of one round is built (16 merged S-boxes, ShiftRows/MixColumns and their
// inverses) and it is reused for the 10 or 14 rounds. Round keys are produced on the fly
// from a two-round-key window (kp = rk[r-1], kc = rk[r]); no key-expansion memory exists.
//
// Timing (cycles from the clock edge that samples start to valid):
//   encryption  Nr      (initial AddRoundKey is merged with round 1)
//   decryption  2*Nr+1  (Nr cycles run the schedule forward to the last round key,
//                        1 cycle adds it, Nr inverse rounds step the schedule backwards)
// These are the counts implied by the document's throughput table at 2.55 GHz
// (32.64/23.31 Gbps ECB encryption, 15.54/11.26 Gbps ECB decryption); the on-the-fly
// backward schedule is this design's reading of that figure.
//
// Interface: start is honoured when busy is low; din/key/decrypt/key256 are sampled with
// it. valid rises when dout holds the result and stays high until the next start. clear
// wipes state and key registers in one cycle (panic flush). Key: AES-128 in key[255:128].
module aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   start,
  input  logic   decrypt,
  input  logic   key256,
  input  key_t   key,
  input  block_t din,
  output logic   busy,
  output logic   valid,
  output block_t dout
);
  typedef enum logic [2:0] {C_IDLE, C_ENC, C_KEXP, C_DLOAD, C_DEC} cstate_e;

  cstate_e     st;
  block_t      state, kp, kc;
  logic [3:0]  rnd;
  logic        k256_q;

  logic [3:0]  nr;
  block_t      rk0, rk1, nk, pk, sb_in, sb_out, rnd_out;
  logic        sb_inv, last;

  assign nr   = k256_q ? 4'd14 : 4'd10;
  assign rk0  = key[255:128];
  assign rk1  = key256 ? key[127:0] : rk_next('0, key[255:128], 4'd1, 1'b0);
  assign nk   = rk_next(kp, kc, rnd + 4'd1, k256_q);
  assign pk   = rk_prev(kp, kc, rnd, k256_q);

  // S-box bank shared by encryption and decryption.
  assign sb_inv = (st == C_DEC);
  always_comb begin
    if (st == C_DEC)      sb_in = inv_shift_rows(state);
    else if (st == C_ENC) sb_in = state;
    else                  sb_in = din ^ rk0;
  end

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.din(sb_in[127-8*i -: 8]), .inv(sb_inv), .dout(sb_out[127-8*i -: 8]));
  end

  always_comb begin
    last = 1'b0;
    rnd_out = '0;
    unique case (st)
      C_ENC: begin
        last    = (rnd + 4'd1 == nr);
        rnd_out = last ? (shift_rows(sb_out) ^ nk) : (mix_columns(shift_rows(sb_out)) ^ nk);
      end
      C_DEC: begin
        last    = (rnd == 4'd1);
        rnd_out = last ? (sb_out ^ kp) : inv_mix_columns(sb_out ^ kp);
      end
      default: rnd_out = mix_columns(shift_rows(sb_out)) ^ rk1;  // round 1 at start
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; state <= '0; kp <= '0; kc <= '0; rnd <= '0;
      k256_q <= 1'b0; valid <= 1'b0;
    end else if (clear) begin
      st <= C_IDLE; state <= '0; kp <= '0; kc <= '0; rnd <= '0; valid <= 1'b0;
    end else begin
      unique case (st)
        C_IDLE: if (start) begin
          valid  <= 1'b0;
          k256_q <= key256;
          kp     <= rk0;
          kc     <= rk1;
          rnd    <= 4'd1;
          if (decrypt) begin
            state <= din;
            st    <= C_KEXP;
          end else begin
            state <= rnd_out;
            st    <= C_ENC;
          end
        end
        C_ENC: begin
          state <= rnd_out;
          kp    <= kc;
          kc    <= nk;
          rnd   <= rnd + 4'd1;
          if (last) begin st <= C_IDLE; valid <= 1'b1; end
        end
        C_KEXP: begin
          if (rnd == nr) st <= C_DLOAD;
          else begin
            kp  <= kc;
            kc  <= nk;
            rnd <= rnd + 4'd1;
            if (rnd + 4'd1 == nr) st <= C_DLOAD;
          end
        end
        C_DLOAD: begin
          state <= state ^ kc;
          st    <= C_DEC;
        end
        C_DEC: begin
          state <= rnd_out;
          kp    <= pk;
          kc    <= kp;
          rnd   <= rnd - 4'd1;
          if (last) begin st <= C_IDLE; valid <= 1'b1; end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign busy = (st != C_IDLE);
  assign dout = state;

  // A start request while busy would be lost.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy));
endmodule

// aes_cryptoprocessor: AES cryptoprocessor with key store, access control, preemption,
// panic and a randomized engine clock.
//
// Two clock domains. The register block (aes_cp_ctrl: AXI4-Lite registers, state machine,
// data registers, six key slots) runs on the main clock clk. The AES engine (aes_engine: one
// AES core shared by ECB, CBC, OFB, CFB, CTR, CMAC, CCM, GCM and XTS) runs on the clock made
// by clk_rand from pll_clk or osc_clk: selectable, divided by 1/2/4/8, and with cycles
// randomly masked to blur the power and EM signature of the cipher. Four cdc_handshake
// channels cross between the domains: commands (start/resume/halt/clear with configuration,
// keys and saved context), input blocks, output blocks and completion events. The engine-
// side command adapter below holds the configuration and keys for the operation in
// progress, turns commands into engine pulses and reports done/halted with the context.
// The PRNG of the clock randomizer is reseeded whenever trng_valid presents a seed.
//
// Interfaces: 32-bit AXI4-Lite slave (privilege from AxPROT[0]); 128-bit AXI-Stream in and out
// (tuser marks a tag block, tlast the last block of an operation). Ports that the document
// connects to components outside the cryptoprocessor (DMA, MCU, TRNG, PLL) are brought out.
module aes_cryptoprocessor
  import aes_pkg::*;
#(
  parameter int unsigned NUM_SLOTS = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pll_clk,
  input  logic        osc_clk,
  // AXI4-Lite slave (configuration and control)
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
  // AXI-Stream data
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  block_t      s_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output block_t      m_axis_tdata,
  output logic        m_axis_tlast,
  output logic        m_axis_tuser,
  // TRNG seed for the clock-randomization PRNG (main clock domain)
  input  logic        trng_valid,
  input  logic [15:0] trng_seed,
  // status
  output cp_state_e   state,
  output logic        panic_active,
  output logic        eng_clk,
  output logic [31:0] clk_skipped
);
  // ------------------------------------------------------------ register block
  logic     cmd_valid, cmd_ready, din_valid, din_ready, dout_valid, dout_ready, evt_valid, evt_ready;
  eng_cmd_t cmd;
  block_t   din_data;
  eng_out_t dout;
  eng_evt_t evt;
  logic       clk_src_sel, clk_rand_en;
  logic [1:0] clk_div_sel;
  logic [7:0] clk_total_cc;

  aes_cp_ctrl #(.NUM_SLOTS(NUM_SLOTS)) u_ctrl (
    .clk, .rst_n,
    .s_awaddr, .s_awprot, .s_awvalid, .s_awready, .s_wdata, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arprot, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .s_axis_tvalid, .s_axis_tready, .s_axis_tdata,
    .m_axis_tvalid, .m_axis_tready, .m_axis_tdata, .m_axis_tlast, .m_axis_tuser,
    .cmd_valid, .cmd_ready, .cmd, .din_valid, .din_ready, .din_data,
    .dout_valid, .dout_ready, .dout, .evt_valid, .evt_ready, .evt,
    .clk_src_sel, .clk_div_sel, .clk_rand_en, .clk_total_cc,
    .state, .panic_active
  );

  // ------------------------------------------------------------ engine clock
  logic        gmux_clk, seed_load;
  logic [15:0] seed_q;
  logic        seed_t;
  logic [2:0]  seed_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seed_q <= '0;
      seed_t <= 1'b0;
    end else if (trng_valid) begin
      seed_q <= trng_seed;
      seed_t <= ~seed_t;
    end
  end

  always_ff @(posedge gmux_clk or negedge rst_n) begin
    if (!rst_n) seed_sync <= '0;
    else        seed_sync <= {seed_sync[1:0], seed_t};
  end
  assign seed_load = seed_sync[2] ^ seed_sync[1];

  clk_rand u_clk_rand (
    .pll_clk, .osc_clk, .rst_n, .src_sel(clk_src_sel), .div_sel(clk_div_sel),
    .rand_en(clk_rand_en), .total_cc(clk_total_cc), .seed_load, .seed(seed_q),
    .clk_div_x_gmux(gmux_clk), .clk_div_x_grand(eng_clk), .skipped(clk_skipped)
  );

  // engine reset: asynchronous assertion, synchronous release
  logic [1:0] erst_sync;
  logic       erst_n;
  always_ff @(posedge eng_clk or negedge rst_n) begin
    if (!rst_n) erst_sync <= '0;
    else        erst_sync <= {erst_sync[0], 1'b1};
  end
  assign erst_n = erst_sync[1];

  // ------------------------------------------------------------ clock-domain crossing
  logic     e_cmd_valid, e_cmd_ready, e_din_valid, e_din_ready, e_out_valid, e_out_ready;
  logic     e_evt_valid, e_evt_ready;
  eng_cmd_t e_cmd;
  block_t   e_din;
  eng_out_t e_out;
  eng_evt_t e_evt;

  cdc_handshake #(.W($bits(eng_cmd_t))) u_cdc_cmd (
    .src_clk(clk), .src_rst_n(rst_n), .src_valid(cmd_valid), .src_ready(cmd_ready), .src_data(cmd),
    .dst_clk(eng_clk), .dst_rst_n(erst_n), .dst_valid(e_cmd_valid), .dst_ready(e_cmd_ready), .dst_data(e_cmd)
  );
  cdc_handshake #(.W(128)) u_cdc_din (
    .src_clk(clk), .src_rst_n(rst_n), .src_valid(din_valid), .src_ready(din_ready), .src_data(din_data),
    .dst_clk(eng_clk), .dst_rst_n(erst_n), .dst_valid(e_din_valid), .dst_ready(e_din_ready), .dst_data(e_din)
  );
  cdc_handshake #(.W($bits(eng_out_t))) u_cdc_dout (
    .src_clk(eng_clk), .src_rst_n(erst_n), .src_valid(e_out_valid), .src_ready(e_out_ready), .src_data(e_out),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_valid(dout_valid), .dst_ready(dout_ready), .dst_data(dout)
  );
  cdc_handshake #(.W($bits(eng_evt_t))) u_cdc_evt (
    .src_clk(eng_clk), .src_rst_n(erst_n), .src_valid(e_evt_valid), .src_ready(e_evt_ready), .src_data(e_evt),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_valid(evt_valid), .dst_ready(evt_ready), .dst_data(evt)
  );

  // ------------------------------------------------------------ engine-side command adapter
  op_cfg_t  a_cfg;
  key_t     a_key1, a_key2;
  eng_ctx_t a_ctx;
  logic     a_start, a_resume, a_halt, a_clear;
  logic     e_halted, e_done, e_busy;
  eng_ctx_t e_ctx;

  assign e_cmd_ready = 1'b1;

  always_ff @(posedge eng_clk or negedge erst_n) begin
    if (!erst_n) begin
      a_cfg <= '0; a_key1 <= '0; a_key2 <= '0; a_ctx <= '0;
      a_start <= 1'b0; a_resume <= 1'b0; a_halt <= 1'b0; a_clear <= 1'b0;
      e_evt_valid <= 1'b0; e_evt <= '0;
    end else begin
      a_start  <= 1'b0;
      a_resume <= 1'b0;
      a_clear  <= 1'b0;
      if (e_cmd_valid) begin
        unique case (e_cmd.kind)
          CMD_START, CMD_RESUME: begin
            a_cfg    <= e_cmd.cfg;
            a_key1   <= e_cmd.key1;
            a_key2   <= e_cmd.key2;
            a_ctx    <= e_cmd.ctx;
            a_start  <= (e_cmd.kind == CMD_START);
            a_resume <= (e_cmd.kind == CMD_RESUME);
          end
          CMD_HALT: a_halt <= 1'b1;
          default: begin  // CMD_CLEAR: wipe keys, configuration and context
            a_clear <= 1'b1;
            a_halt  <= 1'b0;
            a_cfg   <= '0; a_key1 <= '0; a_key2 <= '0; a_ctx <= '0;
          end
        endcase
      end
      if (e_halted || e_done) begin
        a_halt      <= 1'b0;
        e_evt_valid <= 1'b1;
        e_evt       <= '{halted: e_halted, ctx: e_ctx};
      end else if (e_evt_valid && e_evt_ready) begin
        e_evt_valid <= 1'b0;
      end
      if (a_clear) begin
        e_evt_valid <= 1'b0;
      end
    end
  end

  aes_engine u_engine (
    .clk(eng_clk), .rst_n(erst_n), .clear(a_clear), .start(a_start), .resume(a_resume),
    .cfg(a_cfg), .key1(a_key1), .key2(a_key2), .ctx_in(a_ctx), .halt_req(a_halt),
    .halted(e_halted), .done(e_done), .busy(e_busy), .ctx_out(e_ctx),
    .in_valid(e_din_valid), .in_ready(e_din_ready), .in_data(e_din),
    .out_valid(e_out_valid), .out_ready(e_out_ready), .out_data(e_out.data),
    .out_tag(e_out.tag), .out_last(e_out.last)
  );
endmodule

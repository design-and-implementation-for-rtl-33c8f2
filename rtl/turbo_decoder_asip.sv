// Multi-standard turbo decoder ASIP - top level.
//
// A small pipelined processor (control_unit + program_memory) runs a decoding
// program; its ParSISO instructions drive P identical SISO decoders in
// lock-step (SIMD). Each SISO processes one window of W symbols per step with
// sliding-window max-log-MAP, so P windows are decoded in parallel. The block
// of K symbols is cut into windows of W; window g goes to SISO g mod P in
// round g div P. Window borders are exchanged between neighbouring SISOs and
// kept in border memories for the next iteration. Extrinsic LLRs are written
// through the data alignment block, which buffers the writes that collide on
// a memory bank because of the interleaver. The same hardware decodes single
// binary codes (LTE, HSPA, CDMA2000: one clock per bit) and duo-binary codes
// (WiMAX, DVB-RCS: two clocks per couple); the trellis is loaded by Config
// instructions.
//
// Host interface (this design's choice): the program and the two interleaver
// tables are written through load ports before `start`; the channel soft
// values are presented on ch_in while the program executes StrData
// instructions (one position per StrData); decoded bits are read in natural
// order through dec_raddr/dec_rdata (one clock latency) after `done`.
module turbo_decoder_asip
  import tdec_pkg::*;
#(
  parameter int P        = 16,
  parameter int W        = 64,
  parameter int K_MAX    = 6144,
  parameter int PM_DEPTH = 512,
  parameter int LB_DEPTH = 8,
  localparam int W_LOG = $clog2(W),
  localparam int P_LOG = $clog2(P),
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W),
  localparam int RD_W  = (R_MAX > 1) ? $clog2(R_MAX) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // program load and start
  input  logic                        pm_we,
  input  logic [$clog2(PM_DEPTH)-1:0] pm_waddr,
  input  logic [IW-1:0]               pm_wdata,
  input  logic                        start,
  // channel values for StrData
  input  ch_word_t                    ch_in,
  // interleaver tables
  input  logic                        il_we,
  input  logic                        il_sel,
  input  logic [AW-1:0]               il_addr,
  input  logic [AW:0]                 il_data,
  // decoded bits
  input  logic [AW-1:0]               dec_raddr,
  output logic [1:0]                  dec_rdata,
  // status
  output logic                        running,
  output logic                        done,
  output logic                        overflow
);
  // ---------------- processor ----------------
  logic [PC_W-1:0] pm_raddr;
  logic [IW-1:0]   pm_rdata;
  ctrl_t           ctrl;
  mode_t           mode;
  logic            empty_fifo;

  program_memory #(.DEPTH(PM_DEPTH)) u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pm_raddr[$clog2(PM_DEPTH)-1:0]), .rdata(pm_rdata)
  );

  control_unit u_cu (
    .clk, .rst_n, .start, .pm_raddr, .pm_rdata, .empty_fifo,
    .ctrl, .mode, .running, .done
  );

  // ---------------- configuration and StrData address ----------------
  tr_cfg_t       cfg_a, cfg_b;
  logic [AW-1:0] ch_waddr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_a    <= '0;
      cfg_b    <= '0;
      ch_waddr <= '0;
    end else begin
      if (ctrl.config_en && ctrl.config_m[5:3] == CFG_ALPHA) cfg_a[ctrl.config_m[2:0]] <= ctrl.config_val;
      if (ctrl.config_en && ctrl.config_m[5:3] == CFG_BETA)  cfg_b[ctrl.config_m[2:0]] <= ctrl.config_val;
      if (ctrl.mov)          ch_waddr <= ctrl.addval;
      else if (ctrl.strdata) ch_waddr <= ch_waddr + AW'(1);
    end
  end

  // ---------------- SISO enables ----------------
  logic [P-1:0] f_act, b_act;
  sim_decoder #(.P(P)) u_sd_f (.en(ctrl.fwd_cntr[1]), .ind(ctrl.fwd_cntr[0]),
                               .value(ctrl.fr_active[P_LOG-1:0]), .q(f_act));
  sim_decoder #(.P(P)) u_sd_b (.en(ctrl.bwd_cntr[1]), .ind(ctrl.bwd_cntr[0]),
                               .value(ctrl.bk_active[P_LOG-1:0]), .q(b_act));

  // ---------------- SISO array ----------------
  logic [RD_W-1:0]  f_round [P], b_round [P];
  logic [W_LOG-1:0] f_off [P], b_off [P];
  ch_word_t         ch_f [P], ch_b [P];
  llr_word_t        apr_f [P], apr_b [P];
  logic [AW:0]      il_f [P];
  logic             xfer_f [P], xfer_b [P];
  logic [RD_W-1:0]  xf_round [P], xb_round [P], rf_round [P], rb_round [P];
  smv_t             alpha_end [P], beta_start [P], init_alpha [P], init_beta [P];
  llr_wr_t          llr_out [P];
  logic [P-1:0]     busy;

  for (genvar i = 0; i < P; i++) begin : g_siso
    siso #(.P(P), .W(W), .K_MAX(K_MAX), .ID(i)) u_siso (
      .clk, .rst_n, .ctrl, .mode,
      .f_act(f_act[i]), .b_act(b_act[i]), .cfg_a, .cfg_b,
      .f_round(f_round[i]), .f_off(f_off[i]), .b_round(b_round[i]), .b_off(b_off[i]),
      .ch_f(ch_f[i]), .ch_b(ch_b[i]), .apr_f(apr_f[i]), .apr_b(apr_b[i]), .il_f(il_f[i]),
      .xfer_f(xfer_f[i]), .xf_round(xf_round[i]), .alpha_end(alpha_end[i]),
      .xfer_b(xfer_b[i]), .xb_round(xb_round[i]), .beta_start(beta_start[i]),
      .rf_round(rf_round[i]), .rb_round(rb_round[i]),
      .init_alpha(init_alpha[i]), .init_beta(init_beta[i]),
      .llr_out(llr_out[i]), .busy(busy[i])
    );
  end

  // ---------------- memories ----------------
  channel_memory #(.P(P), .W(W), .K_MAX(K_MAX)) u_chm (
    .clk, .we(ctrl.strdata), .waddr(ch_waddr), .wen(ctrl.endec), .wdata(ch_in),
    .f_round, .f_off, .b_round, .b_off, .f_data(ch_f), .b_data(ch_b)
  );

  interleaver_memory #(.P(P), .W(W), .K_MAX(K_MAX)) u_ilm (
    .clk, .we(il_we), .wsel(il_sel), .waddr(il_addr), .wdata(il_data),
    .rsel(mode.sel_map), .r_round(f_round), .r_off(f_off), .r_data(il_f)
  );

  logic          da_valid [P];
  logic [AW-1:0] da_addr  [P];
  llr_word_t     da_data  [P];
  logic          da_empty, da_conflict;

  llr_memory #(.P(P), .W(W), .K_MAX(K_MAX)) u_llrm (
    .clk, .rsel(mode.sel_map),
    .f_round, .f_off, .b_round, .b_off, .f_data(apr_f), .b_data(apr_b),
    .wsel(!mode.sel_map), .w_valid(da_valid), .w_addr(da_addr), .w_data(da_data),
    .dec_raddr, .dec_rdata
  );

  border_interface #(.P(P), .W(W), .K_MAX(K_MAX)) u_bif (
    .clk, .rst_n, .sel_map(mode.sel_map),
    .clr(ctrl.init && ctrl.addinit4), .clr_sel(ctrl.sel_map), .circular(mode.circular), .k_len(mode.k_len),
    .xfer_f, .xf_round, .alpha_end, .xfer_b, .xb_round, .beta_start,
    .rf_round, .rb_round, .init_alpha, .init_beta
  );

  data_alignment #(.P(P), .W(W), .LB_DEPTH(LB_DEPTH)) u_da (
    .clk, .rst_n, .in(llr_out),
    .w_valid(da_valid), .w_addr(da_addr), .w_data(da_data),
    .empty(da_empty), .overflow, .conflict(da_conflict)
  );

  assign empty_fifo = da_empty && (busy == '0);
endmodule

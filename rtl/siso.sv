// One soft-in/soft-out (SISO) decoder of the parallel array.
//
// Sliding-window max-log-MAP, first parallel scheme: in each step of W
// symbols the SISO runs the backward recursion over its next window (round
// r+1, bottom to top, storing the betas in the state metric memory) while the
// forward recursion walks its current window (round r, top to bottom),
// reads the stored betas and produces one extrinsic word per symbol. The
// first step is backward only and the last forward only. Duo-binary symbols
// take two clocks (phases); single-binary bits one.
//
// Pipeline (all driven by the ParSISO control of the execute stage):
//   AG  : address generation - channel, a-priori and interleaver reads for the
//         forward position k and the backward position W-1-k
//   BM  : memory data arrives; forward and backward branch metric units
//   SM  : forward/backward state metric units update; state memory write
//         (backward) and read data (forward); border vectors leave here
//   LLR1-3, WB : LLR unit, then the extrinsic word with its target address
// Control fields: ParSISO advances k and toggles the phase; a ParSISO with a
// border field ends a step (k back to 0, rounds advance, state memory
// direction flips) and hands alpha/beta borders to the neighbours;
// Initialize(AddInit1) rewinds the address generators, addInit2 resets the
// state memory direction, InitAlpha/InitBeta load the border values.
// Positions at or beyond the block length read as zero and produce no write.
module siso
  import tdec_pkg::*;
#(
  parameter int P     = 16,
  parameter int W     = 64,
  parameter int K_MAX = 6144,
  parameter int ID    = 0,
  localparam int W_LOG = $clog2(W),
  localparam int P_LOG = $clog2(P),
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W),
  localparam int RD_W  = (R_MAX > 1) ? $clog2(R_MAX) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctrl_t            ctrl,
  input  mode_t            mode,
  input  logic             f_act,
  input  logic             b_act,
  input  tr_cfg_t          cfg_a,
  input  tr_cfg_t          cfg_b,
  // memory read addresses (AG stage) and data (BM stage)
  output logic [RD_W-1:0]  f_round,
  output logic [W_LOG-1:0] f_off,
  output logic [RD_W-1:0]  b_round,
  output logic [W_LOG-1:0] b_off,
  input  ch_word_t         ch_f,
  input  ch_word_t         ch_b,
  input  llr_word_t        apr_f,
  input  llr_word_t        apr_b,
  input  logic [AW:0]      il_f,
  // borders (SM stage)
  output logic             xfer_f,
  output logic [RD_W-1:0]  xf_round,
  output smv_t             alpha_end,
  output logic             xfer_b,
  output logic [RD_W-1:0]  xb_round,
  output smv_t             beta_start,
  output logic [RD_W-1:0]  rf_round,
  output logic [RD_W-1:0]  rb_round,
  input  smv_t             init_alpha,
  input  smv_t             init_beta,
  // extrinsic output (WB stage)
  output llr_wr_t          llr_out,
  output logic             busy
);
  // ---------------- AG stage ----------------
  logic [W_LOG-1:0] k;
  logic             ph, dir, f_used, b_used;
  logic             go_f, go_b, adv, step_end;

  assign go_f     = ctrl.par && f_act;
  assign go_b     = ctrl.par && b_act;
  assign adv      = ((go_f && ctrl.addgen[0]) || (go_b && ctrl.addgen[1])) && (!ctrl.pmode || ph);
  assign step_end = ctrl.par && (ctrl.border != 2'b00);

  assign f_off = k;
  assign b_off = W_LOG'(W - 1) - k;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k <= '0; ph <= 1'b0; dir <= 1'b0; f_used <= 1'b0; b_used <= 1'b0;
      f_round <= '0; b_round <= '0;
    end else if (ctrl.init && ctrl.addinit1) begin
      k <= '0; ph <= 1'b0; f_used <= 1'b0; b_used <= 1'b0;
      f_round <= '0; b_round <= '0;
      if (ctrl.addinit2) dir <= 1'b0;
    end else if (ctrl.init && ctrl.addinit2) begin
      dir <= 1'b0;
    end else if (step_end) begin
      k <= '0; ph <= 1'b0; dir <= !dir;
      f_used <= 1'b0; b_used <= 1'b0;
      if (f_used) f_round <= f_round + RD_W'(1);
      if (b_used) b_round <= b_round + RD_W'(1);
    end else begin
      if (go_f) f_used <= 1'b1;
      if (go_b) b_used <= 1'b1;
      if ((go_f || go_b) && ctrl.pmode) ph <= !ph;
      if (adv) k <= k + W_LOG'(1);
    end
  end

  function automatic logic in_block(input logic [RD_W-1:0] r, input logic [W_LOG-1:0] o,
                                    input logic [AW-1:0] klen);
    return (int'(r) * P + ID) * W + int'(o) < int'(klen);
  endfunction

  // ---------------- BM stage ----------------
  logic             s1_f, s1_b, s1_ph, s1_duo, s1_llr, s1_fin, s1_bin;
  logic             s1_bf, s1_bb, s1_ia, s1_ib;
  logic [W_LOG-1:0] s1_sma;
  logic [RD_W-1:0]  s1_xfr, s1_xbr, s1_rfr, s1_rbr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_f <= 1'b0; s1_b <= 1'b0; s1_llr <= 1'b0;
      s1_bf <= 1'b0; s1_bb <= 1'b0; s1_ia <= 1'b0; s1_ib <= 1'b0;
    end else begin
      s1_f   <= go_f && !step_end;
      s1_b   <= go_b && !step_end;
      s1_llr <= go_f && ctrl.llr_en && !step_end;
      s1_bf  <= step_end && ctrl.border[0] && f_used;
      s1_bb  <= step_end && ctrl.border[1] && b_used;
      s1_ia  <= ctrl.init && ctrl.init_alpha;
      s1_ib  <= ctrl.init && ctrl.init_beta;
    end
    s1_ph  <= ph;
    s1_duo <= ctrl.pmode;
    s1_fin <= in_block(f_round, f_off, mode.k_len);
    s1_bin <= in_block(b_round, b_off, mode.k_len);
    s1_sma <= dir ? (W_LOG'(W - 1) - k) : k;
    s1_xfr <= f_round;
    s1_xbr <= b_round;
    s1_rfr <= f_round;
    s1_rbr <= b_round;
  end

  // select natural / interleaved streams, mask padding and first iteration
  ch_t  fa, fb, fy, fw, ba, bb_, by, bw;
  llr_t fa01, fa10, fa11, ba01, ba10, ba11;
  always_comb begin
    int o;
    o    = mode.sel_map ? 4 : 0;
    fa   = s1_fin ? ch_f[o]     : '0;
    fb   = s1_fin ? ch_f[o + 1] : '0;
    fy   = s1_fin ? ch_f[o + 2] : '0;
    fw   = s1_fin ? ch_f[o + 3] : '0;
    ba   = s1_bin ? ch_b[o]     : '0;
    bb_  = s1_bin ? ch_b[o + 1] : '0;
    by   = s1_bin ? ch_b[o + 2] : '0;
    bw   = s1_bin ? ch_b[o + 3] : '0;
    fa01 = (s1_fin && !mode.iter1) ? apr_f.e01 : '0;
    fa10 = (s1_fin && !mode.iter1) ? apr_f.e10 : '0;
    fa11 = (s1_fin && !mode.iter1) ? apr_f.e11 : '0;
    ba01 = (s1_bin && !mode.iter1) ? apr_b.e01 : '0;
    ba10 = (s1_bin && !mode.iter1) ? apr_b.e10 : '0;
    ba11 = (s1_bin && !mode.iter1) ? apr_b.e11 : '0;
  end

  gamv_t g_f, g_b;
  branch_metric_unit u_bmu_f (.a(fa), .b(fb), .y(fy), .w(fw), .apr01(fa01), .apr10(fa10), .apr11(fa11),
                              .duo(s1_duo), .phase(s1_ph), .use_w(mode.use_w), .gamma(g_f));
  branch_metric_unit u_bmu_b (.a(ba), .b(bb_), .y(by), .w(bw), .apr01(ba01), .apr10(ba10), .apr11(ba11),
                              .duo(s1_duo), .phase(s1_ph), .use_w(mode.use_w), .gamma(g_b));

  // ---------------- SM stage ----------------
  logic             s2_f, s2_b, s2_ph, s2_duo, s2_llr, s2_fin;
  logic             s2_bf, s2_bb, s2_ia, s2_ib;
  logic [W_LOG-1:0] s2_sma;
  logic [RD_W-1:0]  s2_xfr, s2_xbr;
  gamv_t            s2_gf, s2_gb;
  llr_t             s2_a01, s2_a10, s2_a11;
  ch_t              s2_sa, s2_sb;
  logic [AW:0]      s2_il;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_f <= 1'b0; s2_b <= 1'b0; s2_llr <= 1'b0;
      s2_bf <= 1'b0; s2_bb <= 1'b0; s2_ia <= 1'b0; s2_ib <= 1'b0;
    end else begin
      s2_f <= s1_f; s2_b <= s1_b; s2_llr <= s1_llr;
      s2_bf <= s1_bf; s2_bb <= s1_bb; s2_ia <= s1_ia; s2_ib <= s1_ib;
    end
    s2_ph <= s1_ph; s2_duo <= s1_duo; s2_fin <= s1_fin; s2_sma <= s1_sma;
    s2_xfr <= s1_xfr; s2_xbr <= s1_xbr;
    rf_round <= s1_rfr; rb_round <= s1_rbr;
    s2_gf <= g_f; s2_gb <= g_b;
    s2_a01 <= fa01; s2_a10 <= fa10; s2_a11 <= fa11;
    s2_sa <= fa; s2_sb <= fb;
    s2_il <= il_f;
  end

  smv_t alpha, beta, beta_mem;

  state_metric_unit u_smu_f (.clk, .rst_n, .cfg(cfg_a), .gamma(s2_gf), .en(s2_f), .duo(s2_duo),
                             .phase(s2_ph), .init(s2_ia), .init_val(init_alpha), .sm(alpha));
  state_metric_unit u_smu_b (.clk, .rst_n, .cfg(cfg_b), .gamma(s2_gb), .en(s2_b), .duo(s2_duo),
                             .phase(s2_ph), .init(s2_ib), .init_val(init_beta), .sm(beta));

  state_metric_memory #(.W(W)) u_smm (
    .clk,
    .we    (s2_b && (!s2_duo || s2_ph)),
    .waddr (s2_sma),
    .wdata (beta),
    .raddr (s1_sma),
    .rdata (beta_mem)
  );

  assign xfer_f     = s2_bf;
  assign xf_round   = s2_xfr;
  assign alpha_end  = alpha;
  assign xfer_b     = s2_bb;
  assign xb_round   = s2_xbr;
  assign beta_start = beta;

  // ---------------- LLR and WB stages ----------------
  logic      l_valid;
  llr_word_t l_out;
  logic      l_in_valid;

  assign l_in_valid = s2_llr && s2_f;

  llr_unit u_llr (
    .clk, .rst_n,
    .in_valid (l_in_valid),
    .duo      (s2_duo),
    .phase    (s2_ph),
    .cfg      (cfg_b),
    .alpha    (alpha),
    .beta     (beta_mem),
    .gamma    (s2_gf),
    .apr01    (s2_a01), .apr10(s2_a10), .apr11(s2_a11),
    .sys_a    (s2_sa),  .sys_b(s2_sb),
    .out_valid(l_valid),
    .out      (l_out)
  );

  // target address and in-block flag travel alongside the LLR unit
  logic [AW:0] il_d [3];
  logic        in_d [3];
  logic [2:0]  fly;
  always_ff @(posedge clk) begin
    il_d[0] <= s2_il;  in_d[0] <= s2_fin;
    il_d[1] <= il_d[0]; in_d[1] <= in_d[0];
    il_d[2] <= il_d[1]; in_d[2] <= in_d[1];
    if (!rst_n) fly <= '0;
    else        fly <= {fly[1:0], l_in_valid};
  end

  always_comb begin
    llr_word_t d;
    d = l_out;
    if (il_d[2][AW]) begin
      d.e01  = l_out.e10;
      d.e10  = l_out.e01;
      d.hard = {l_out.hard[0], l_out.hard[1]};
    end
    if (!mode.decode_phase) d.hard = 2'b00;
    llr_out.valid = l_valid && in_d[2];
    llr_out.addr  = il_d[2][AW-1:0];
    llr_out.data  = d;
  end

  assign busy = s1_llr || s2_llr || (|fly) || l_valid;
endmodule

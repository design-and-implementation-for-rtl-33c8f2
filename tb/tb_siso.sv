// Testbench of one SISO decoder (windows of 8, SISO 0 of 2, one window
// block): the testbench plays the role of the control unit and the memories.
// It issues the first parallel-scheme sequence for a single window: clear the
// address generators, load the backward start, W backward cycles, border
// step, load the forward start, W forward + LLR cycles, border step. Channel
// values come from a reference single-binary (LTE) encoder with random
// information and noise. The extrinsic outputs are compared with a reference
// max-log-MAP computed here (forward start in state 0, equiprobable backward
// start), including the 0.75 scaling and the saturation, and their target
// addresses with the interleaver entries. The forward metric handed to the
// next window at the border step is compared with the reference too.
module tb_siso;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;
  localparam int P = 2, W = 8, K_MAX = 16;
  localparam int RD_W = 1, W_LOG = 3;
  logic             clk = 1'b0, rst_n = 1'b0;
  ctrl_t            ctrl;
  mode_t            mode;
  logic             f_act = 1'b0, b_act = 1'b0;
  tr_cfg_t          cfg_a, cfg_b;
  logic [RD_W-1:0]  f_round, b_round, xf_round, xb_round, rf_round, rb_round;
  logic [W_LOG-1:0] f_off, b_off;
  ch_word_t         ch_f = '0, ch_b = '0;
  llr_word_t        apr_f = '0, apr_b = '0;
  logic [AW:0]      il_f = '0;
  logic             xfer_f, xfer_b;
  smv_t             alpha_end, beta_start, init_alpha, init_beta;
  llr_wr_t          llr_out;
  logic             busy;
  ch_word_t         chan [K_MAX];
  int checks = 0, failures = 0;

  siso #(.P(P), .W(W), .K_MAX(K_MAX), .ID(0)) dut (
    .clk, .rst_n, .ctrl, .mode, .f_act, .b_act, .cfg_a, .cfg_b,
    .f_round, .f_off, .b_round, .b_off, .ch_f, .ch_b, .apr_f, .apr_b, .il_f,
    .xfer_f, .xf_round, .alpha_end, .xfer_b, .xb_round, .beta_start,
    .rf_round, .rb_round, .init_alpha, .init_beta, .llr_out, .busy);

  always #5 clk = !clk;

  // memory models: one clock read latency
  always_ff @(posedge clk) begin
    ch_f <= chan[(int'(f_round) * P) * W + int'(f_off)];
    ch_b <= chan[(int'(b_round) * P) * W + int'(b_off)];
    il_f <= (AW+1)'(((int'(f_round) * P) * W + int'(f_off)) * 3 + 7);
  end

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // outputs
  int got_e [W], got_a [W], n_out;
  always @(posedge clk) if (rst_n && llr_out.valid) begin
    if (n_out < W) begin
      got_e[n_out] = int'(llr_out.data.e01);
      got_a[n_out] = int'(llr_out.addr);
    end
    n_out++;
  end

  task automatic step(input bit par, input bit fwd, input bit bwd, input bit llr, input bit border);
    @(negedge clk);
    ctrl = '0;
    ctrl.par = par;
    ctrl.addgen = {bwd, fwd};
    ctrl.llr_en = llr;
    ctrl.border = border ? 2'b11 : 2'b00;
    f_act = fwd || border;
    b_act = bwd || border;
  endtask

  task automatic do_init(input bit i1, input bit ia, input bit ib);
    @(negedge clk);
    ctrl = '0;
    ctrl.init = 1'b1;
    ctrl.addinit1 = i1;
    ctrl.addinit2 = i1;
    ctrl.init_alpha = ia;
    ctrl.init_beta = ib;
    f_act = 1'b0; b_act = 1'b0;
  endtask

  function automatic int sc(input int x);
    int v;
    v = x - (x >>> 2);
    return (v > 31) ? 31 : (v < -32) ? -32 : v;
  endfunction

  initial begin
    ctrl = '0;
    mode = '0;
    mode.k_len = AW'(W);
    mode.iter1 = 1'b1;
    for (int s = 0; s < 8; s++) begin
      cfg_a[s] = st_cfg_t'(cfg_word(0, 1, s));
      cfg_b[s] = st_cfg_t'(cfg_word(0, 0, s));
      init_alpha[s] = (s == 0) ? sm_t'(0) : sm_t'(-64);
      init_beta[s]  = '0;
    end
    for (int i = 0; i < K_MAX; i++) chan[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      int u [W], par_b [W], A [W], Y [W];
      int al [W + 1][8], be [W + 1][8];
      int st;
      st = 0;
      for (int i = 0; i < W; i++) begin
        u[i] = int'($urandom % 2);
        par_b[i] = sb_par(st, u[i]);
        st = sb_next(st, u[i]);
        A[i] = (u[i] ? 2 : -2) + int'($urandom % 3) - 1;
        Y[i] = (par_b[i] ? 2 : -2) + int'($urandom % 3) - 1;
        chan[i] = '0;
        chan[i][0] = ch_t'(A[i]);
        chan[i][2] = ch_t'(Y[i]);
      end
      // reference max-log-MAP with per-step normalisation to state 0
      for (int s = 0; s < 8; s++) begin
        al[0][s] = int'(init_alpha[s]);
        be[W][s] = 0;
      end
      for (int i = 0; i < W; i++) begin
        for (int s = 0; s < 8; s++) al[i + 1][s] = -100000;
        for (int s = 0; s < 8; s++)
          for (int b = 0; b < 2; b++) begin
            int v;
            v = al[i][s] + b * A[i] + sb_par(s, b) * Y[i];
            if (v > al[i + 1][sb_next(s, b)]) al[i + 1][sb_next(s, b)] = v;
          end
        begin
          int n0;
          n0 = al[i + 1][0];
          for (int s = 0; s < 8; s++) al[i + 1][s] -= n0;
        end
      end
      for (int i = W - 1; i >= 0; i--) begin
        int n0;
        for (int s = 0; s < 8; s++) begin
          int v0, v1;
          v0 = be[i + 1][sb_next(s, 0)] + sb_par(s, 0) * Y[i];
          v1 = be[i + 1][sb_next(s, 1)] + A[i] + sb_par(s, 1) * Y[i];
          be[i][s] = (v0 > v1) ? v0 : v1;
        end
        n0 = be[i][0];
        for (int s = 0; s < 8; s++) be[i][s] -= n0;
      end
      // run the SISO
      n_out = 0;
      do_init(1, 0, 1);
      repeat (W) step(1, 0, 1, 0, 0);
      step(1, 0, 0, 0, 1);
      do_init(0, 1, 0);
      repeat (W) step(1, 1, 0, 1, 0);
      step(1, 0, 0, 0, 1);
      @(negedge clk);
      ctrl = '0; f_act = 1'b0; b_act = 1'b0;
      // the backward border leaves at the end of the backward step, so it
      // was captured earlier; check the forward border here
      repeat (6) @(negedge clk);
      checks++;
      if (n_out != W) begin
        failures++;
        $display("FAIL block %0d: %0d outputs, expected %0d", t, n_out, W);
      end
      for (int i = 0; i < W && i < n_out; i++) begin
        int m0, m1, e;
        m0 = -100000; m1 = -100000;
        for (int s = 0; s < 8; s++) begin
          int v0, v1;
          v0 = al[i][s] + sb_par(s, 0) * Y[i] + be[i + 1][sb_next(s, 0)];
          v1 = al[i][s] + A[i] + sb_par(s, 1) * Y[i] + be[i + 1][sb_next(s, 1)];
          if (v0 > m0) m0 = v0;
          if (v1 > m1) m1 = v1;
        end
        e = sc(m1 - m0 - A[i]);
        checks++;
        if (got_e[i] != e || got_a[i] != i * 3 + 7) begin
          failures++;
          $display("FAIL block %0d symbol %0d: ext %0d addr %0d, expected %0d at %0d",
                   t, i, got_e[i], got_a[i], e, i * 3 + 7);
        end
      end
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (int'(alpha_end[s]) != al[W][s]) begin
          failures++;
          $display("FAIL block %0d: window-end alpha state %0d = %0d expected %0d",
                   t, s, alpha_end[s], al[W][s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Common body of the end-to-end testbenches of the turbo decoder ASIP.
//
// Included by tb_turbo_decoder_asip (reduced size) and
// tb_turbo_decoder_asip_full (default size). The including module declares
// TP, TW and TK_MAX (the hardware's P, W and K_MAX) and instantiates the
// design as `dut` on the signals declared here.
//
// A test case encodes random information with the reference encoders, adds
// noise, quantises to the 4-bit channel format, loads the generated program
// and the two interleaver tables, starts the processor, supplies one channel
// word per StrData, waits for the halt and compares the hard decisions with
// the information bits. While the program runs, monitors count the
// mechanisms the test is meant to exercise.

  import tdec_pkg::*;
  import tb_tdec_pkg::*;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 pm_we = 1'b0;
  logic [8:0]           pm_waddr = '0;
  logic [IW-1:0]        pm_wdata = '0;
  logic                 start = 1'b0;
  ch_word_t             ch_in;
  logic                 il_we = 1'b0;
  logic                 il_sel = 1'b0;
  logic [AW-1:0]        il_addr = '0;
  logic [AW:0]          il_data = '0;
  logic [AW-1:0]        dec_raddr = '0;
  logic [1:0]           dec_rdata;
  logic                 running, done, overflow;

  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;

  // channel data of the current case, indexed by position
  ch_word_t chan [TK_MAX];
  int       info_a [TK_MAX];
  int       info_b [TK_MAX];

  assign ch_in = chan[int'(dut.ch_waddr) % TK_MAX];

  // ---------------- mechanism monitors ----------------
  longint n_stall = 0, n_loopne = 0, n_conflict = 0, n_duo = 0, n_circ = 0;
  longint n_call = 0, n_ret = 0, n_zol = 0, n_zol_nested = 0, n_pad = 0;
  int     cur_k = 1;

  always @(posedge clk) if (rst_n) begin
    // a write waits in an alignment buffer while its bank is busy
    if (!dut.da_empty) n_stall++;
    if (dut.u_cu.lp_redirect[3]) n_loopne++;
    if (dut.da_conflict) n_conflict++;
    if (dut.mode.duo && dut.ctrl.par && dut.ctrl.pmode) n_duo++;
    for (int i = 0; i < TP; i++) begin
      if (dut.mode.circular && dut.xfer_f[i] &&
          int'(dut.xf_round[i]) * TP + i == (cur_k - 1) / TW) n_circ++;
      if (dut.ctrl.par && dut.ctrl.llr_en && dut.f_act[i] &&
          int'(dut.f_round[i]) * TP * TW + i * TW + int'(dut.f_off[i]) >= cur_k) n_pad++;
    end
    if (dut.u_cu.e_valid && dut.u_cu.e_op == OP_CALL) n_call++;
    if (dut.u_cu.e_valid && dut.u_cu.e_op == OP_RET)  n_ret++;
    for (int g = 0; g < 3; g++) if (dut.u_cu.lp_redirect[g]) n_zol++;
    if (dut.u_cu.lp_redirect[2] && dut.u_cu.lp_active[1]) n_zol_nested++;
  end

  // ---------------- helpers ----------------
  function automatic ch_t quant(input int v);
    if (v > 7)  return 4'sd7;
    if (v < -8) return -4'sd8;
    return ch_t'(v);
  endfunction

  // soft value of a coded bit: +amp for 1, -amp for 0, plus noise
  function automatic ch_t tx(input int bit_v, input int amp, input int nz);
    int v;
    v = bit_v ? amp : -amp;
    for (int t = 0; t < 3; t++) v += int'($urandom % (2 * nz + 1)) - nz;
    return quant(v);
  endfunction

  task automatic load_program(input instr_t prog [], input int n);
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      pm_we = 1'b1; pm_waddr = 9'(a); pm_wdata = prog[a];
    end
    @(negedge clk) pm_we = 1'b0;
  endtask

  task automatic load_il(input int sel, input int a, input int addr, input bit swap);
    @(negedge clk);
    il_we = 1'b1; il_sel = 1'(sel); il_addr = AW'(a); il_data = {swap, AW'(addr)};
  endtask

  // Run one decoding case and compare the decisions.
  //   std: 0 = LTE (QPP f1/f2), 1 = WiMAX duo-binary (ARP p0..p3, circular)
  task automatic run_case(input string name, input int std, input int k, input int q1,
                          input int q2, input int q3, input int q4, input int iters,
                          input int amp, input int nz);
    instr_t prog [];
    int     n, perm [], s1, s2, sc1, sc2, cyc, raw_err, dec_err, r, ph;
    bit     duo;
    duo    = (std == 1);
    cur_k  = k;
    perm   = new[k];
    for (int i = 0; i < TK_MAX; i++) begin
      chan[i] = '0; info_a[i] = 0; info_b[i] = 0;
    end
    // permutation: interleaved position i takes natural position perm[i]
    for (int i = 0; i < k; i++)
      perm[i] = duo ? arp(i, k, q1, q2, q3, q4) : qpp(i, k, q1, q2);
    for (int i = 0; i < k; i++) begin
      info_a[i] = int'($urandom % 2);
      info_b[i] = duo ? int'($urandom % 2) : 0;
    end
    // circulation states (duo-binary): the start state that the block returns to
    sc1 = 0; sc2 = 0;
    if (duo) begin
      for (int c = 0; c < 8; c++) begin
        s1 = c; s2 = c;
        for (int i = 0; i < k; i++) begin
          int j1, j2, pn;
          j1 = info_a[i] * 2 + info_b[i];
          pn = perm[i];
          j2 = (pn % 2 == 0) ? info_b[pn] * 2 + info_a[pn] : info_a[pn] * 2 + info_b[pn];
          s1 = db_next(s1, j1);
          s2 = db_next(s2, j2);
        end
        if (s1 == c) sc1 = c;
        if (s2 == c) sc2 = c;
      end
    end
    // encode and transmit
    s1 = sc1; s2 = sc2; raw_err = 0;
    for (int i = 0; i < k; i++) begin
      int j1, j2, pn, a2, b2;
      pn = perm[i];
      if (duo) begin
        j1 = info_a[i] * 2 + info_b[i];
        a2 = (pn % 2 == 0) ? info_b[pn] : info_a[pn];
        b2 = (pn % 2 == 0) ? info_a[pn] : info_b[pn];
        j2 = a2 * 2 + b2;
        chan[i][0] = tx(info_a[i], amp, nz);
        chan[i][1] = tx(info_b[i], amp, nz);
        chan[i][2] = tx(db_y(s1, j1), amp, nz);
        chan[i][3] = tx(db_w(s1, j1), amp, nz);
        chan[i][6] = tx(db_y(s2, j2), amp, nz);
        chan[i][7] = tx(db_w(s2, j2), amp, nz);
        s1 = db_next(s1, j1);
        s2 = db_next(s2, j2);
      end else begin
        chan[i][0] = tx(info_a[i], amp, nz);
        chan[i][2] = tx(sb_par(s1, info_a[i]), amp, nz);
        chan[i][6] = tx(sb_par(s2, info_a[pn]), amp, nz);
        s1 = sb_next(s1, info_a[i]);
        s2 = sb_next(s2, info_a[pn]);
      end
      if ((chan[i][0] > 0) != (info_a[i] != 0)) raw_err++;
    end
    // systematic part of the second decoder: the same soft values, permuted
    for (int i = 0; i < k; i++) begin
      int pn;
      pn = perm[i];
      if (duo && pn % 2 == 0) begin
        chan[i][4] = chan[pn][1];
        chan[i][5] = chan[pn][0];
      end else begin
        chan[i][4] = chan[pn][0];
        chan[i][5] = chan[pn][1];
      end
    end
    // reset, program, tables
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n = gen_program(prog, k, TP, TW, duo, duo, iters);
    load_program(prog, n);
    for (int i = 0; i < k; i++) begin
      // table 0: MAP1 writes natural position perm[i] to interleaved i
      load_il(0, perm[i], i, duo && (perm[i] % 2 == 0));
      // table 1: MAP2 writes interleaved i to natural perm[i]
      load_il(1, i, perm[i], duo && (perm[i] % 2 == 0));
    end
    @(negedge clk) il_we = 1'b0;
    // run
    cyc = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (overflow) begin
      failures++;
      $display("FAIL %s: alignment buffer overflow", name);
    end
    // compare the decisions
    dec_err = 0;
    for (int i = 0; i < k; i++) begin
      dec_raddr = AW'(i);
      @(negedge clk);
      if (int'(dec_rdata[0]) != info_a[i]) dec_err++;
      if (duo && int'(dec_rdata[1]) != info_b[i]) dec_err++;
    end
    checks++;
    if (dec_err != 0) begin
      failures++;
      $display("FAIL %s: %0d decision errors (channel had %0d systematic errors)",
               name, dec_err, raw_err);
    end
    // run time against the schedule: (rounds + 1) steps of W (2W for couples)
    // per half iteration, plus the channel store and a small overhead
    r  = (k + TP * TW - 1) / (TP * TW);
    ph = duo ? 2 : 1;
    checks++;
    if (cyc < 2 * iters * (r + 1) * TW * ph + k ||
        cyc > 2 * iters * ((r + 1) * (TW * ph + 3) + 40) + k + 40) begin
      failures++;
      $display("FAIL %s: %0d cycles outside the expected range", name, cyc);
    end
    $display("%s: K=%0d iters=%0d cycles=%0d raw_errors=%0d decision_errors=%0d",
             name, k, iters, cyc, raw_err, dec_err);
  endtask

  // every mechanism must have occurred at least once
  task automatic check_mechanism(input string what, input longint cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("mechanism %-14s : %0d", what, cnt);
    end
  endtask

  task automatic check_all_mechanisms();
    check_mechanism("stall", n_stall);
    check_mechanism("loopne_wait", n_loopne);
    check_mechanism("conflict", n_conflict);
    check_mechanism("duo_mode", n_duo);
    check_mechanism("circular", n_circ);
    check_mechanism("call", n_call);
    check_mechanism("ret", n_ret);
    check_mechanism("zol", n_zol);
    check_mechanism("zol_nested", n_zol_nested);
    check_mechanism("padding", n_pad);
  endtask

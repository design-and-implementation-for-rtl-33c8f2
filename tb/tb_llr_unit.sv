// Testbench of llr_unit: random forward metrics, backward metrics, branch
// metrics and trellis configurations. The reference computes, for every input
// symbol j, T(j) = max over states s of alpha(s) + gamma(j) + beta(succ_j(s)),
// then the extrinsic value T(j) - T(0) - La(j) - systematic part, scaled by
// 0.75 (x - floor(x/4)) and saturated to six bits, and the hard decisions.
// The output is expected three clocks after the last phase of a symbol.
module tb_llr_unit;
  import tdec_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0;
  logic      in_valid = 1'b0, duo = 1'b0, phase = 1'b0;
  tr_cfg_t   cfg = '0;
  smv_t      alpha = '0, beta = '0;
  gamv_t     gamma = '0;
  llr_t      apr01 = '0, apr10 = '0, apr11 = '0;
  ch_t       sys_a = '0, sys_b = '0;
  logic      out_valid;
  llr_word_t out;
  int checks = 0, failures = 0;

  llr_unit dut (.clk, .rst_n, .in_valid, .duo, .phase, .cfg, .alpha, .beta, .gamma,
                .apr01, .apr10, .apr11, .sys_a, .sys_b, .out_valid, .out);

  always #5 clk = !clk;

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int sc(input int x);
    int v;
    v = x - (x >>> 2);
    return (v > 31) ? 31 : (v < -32) ? -32 : v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int T [4];
      int e01, e10, e11, ha, hb;
      duo = 1'(t % 3 == 0);
      for (int s = 0; s < NST; s++)
        for (int k = 0; k < 4; k++) begin
          cfg[s][k].st = 3'($urandom);
          cfg[s][k].y  = 1'($urandom);
          cfg[s][k].w  = 1'($urandom);
        end
      for (int s = 0; s < NST; s++) begin
        alpha[s] = sm_t'(int'($urandom % 101) - 50);
        beta[s]  = sm_t'(int'($urandom % 101) - 50);
      end
      apr01 = llr_t'($urandom); apr10 = llr_t'($urandom); apr11 = llr_t'($urandom);
      sys_a = ch_t'($urandom);  sys_b = ch_t'($urandom);
      for (int p = 0; p < (duo ? 2 : 1); p++) begin
        phase = 1'(p);
        for (int g = 0; g < 8; g++) gamma[g] = gam_t'(int'($urandom % 81) - 40);
        for (int k = 0; k < 2; k++) begin
          int m;
          br_cfg_t bc;
          m = -100000;
          for (int s = 0; s < NST; s++) begin
            int v;
            bc = cfg[s][p * 2 + k];
            v = int'(alpha[s]) + int'(gamma[{1'(k), bc.y, bc.w}]) + int'(beta[bc.st]);
            if (v > m) m = v;
          end
          T[p * 2 + k] = m;
        end
        in_valid = 1'b1;
        @(negedge clk);
      end
      in_valid = 1'b0;
      if (duo) begin
        e01 = sc(T[1] - T[0] - int'(apr01) - int'(sys_b));
        e10 = sc(T[2] - T[0] - int'(apr10) - int'(sys_a));
        e11 = sc(T[3] - T[0] - int'(apr11) - int'(sys_a) - int'(sys_b));
        ha  = int'(((T[2] > T[3]) ? T[2] : T[3]) > ((T[0] > T[1]) ? T[0] : T[1]));
        hb  = int'(((T[1] > T[3]) ? T[1] : T[3]) > ((T[2] > T[0]) ? T[2] : T[0]));
      end else begin
        e01 = sc(T[1] - T[0] - int'(apr01) - int'(sys_a));
        e10 = 0; e11 = 0;
        ha  = int'(T[1] > T[0]); hb = 0;
      end
      // output three clocks after the last phase
      repeat (2) begin
        checks++;
        if (out_valid) begin
          failures++;
          $display("FAIL early output at symbol %0d", t);
        end
        @(negedge clk);
      end
      checks++;
      if (!out_valid || int'(out.e01) != e01 || int'(out.e10) != e10 || int'(out.e11) != e11 ||
          int'(out.hard[0]) != ha || int'(out.hard[1]) != hb) begin
        failures++;
        $display("FAIL symbol %0d duo=%0d: v=%0d e=%0d/%0d/%0d h=%b expected %0d/%0d/%0d h=%0d%0d",
                 t, duo, out_valid, out.e01, out.e10, out.e11, out.hard, e01, e10, e11, hb, ha);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of state_metric_unit: random trellis configurations and branch
// metrics, single-binary (one update per clock) and duo-binary (two phases
// per couple). A reference keeps its own metric vector and applies
//   new(s) = max over branches k of  sm(pred_k(s)) + gamma(k, y_k, w_k),
// then subtracts new(0) and saturates to eight bits. Initial loads are checked
// as well.
module tb_state_metric_unit;
  import tdec_pkg::*;
  logic    clk = 1'b0, rst_n = 1'b0;
  tr_cfg_t cfg = '0;
  gamv_t   gamma = '0;
  logic    en = 1'b0, duo = 1'b0, phase = 1'b0, init = 1'b0;
  smv_t    init_val = '0, sm;
  int      ref_sm [NST];
  int      tmp [NST];
  int checks = 0, failures = 0;

  state_metric_unit dut (.clk, .rst_n, .cfg, .gamma, .en, .duo, .phase, .init, .init_val, .sm);

  always #5 clk = !clk;

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int sat8(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  task automatic compare(input string what);
    checks++;
    for (int s = 0; s < NST; s++)
      if (int'(sm[s]) != ref_sm[s]) begin
        failures++;
        $display("FAIL %s state %0d: %0d expected %0d", what, s, sm[s], ref_sm[s]);
        break;
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 40; blk++) begin
      for (int s = 0; s < NST; s++)
        for (int k = 0; k < 4; k++) begin
          cfg[s][k].st = 3'($urandom);
          cfg[s][k].y  = 1'($urandom);
          cfg[s][k].w  = 1'($urandom);
        end
      duo = 1'(blk % 2);
      // initial load
      @(negedge clk);
      for (int s = 0; s < NST; s++) begin
        init_val[s] = sm_t'($urandom % 64);
        ref_sm[s]   = int'(init_val[s]);
      end
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      compare("init");
      for (int t = 0; t < 100; t++) begin
        for (int p = 0; p < (duo ? 2 : 1); p++) begin
          int acs [NST];
          phase = 1'(p);
          for (int g = 0; g < 8; g++) gamma[g] = gam_t'(int'($urandom % 81) - 40);
          en = 1'b1;
          for (int s = 0; s < NST; s++) begin
            int c0, c1;
            c0 = ref_sm[cfg[s][p * 2].st] + int'(gamma[{1'b0, cfg[s][p * 2].y, cfg[s][p * 2].w}]);
            c1 = ref_sm[cfg[s][p * 2 + 1].st] + int'(gamma[{1'b1, cfg[s][p * 2 + 1].y, cfg[s][p * 2 + 1].w}]);
            acs[s] = (c0 > c1) ? c0 : c1;
          end
          @(negedge clk);
          if (duo && p == 0) begin
            for (int s = 0; s < NST; s++) tmp[s] = acs[s];
          end else begin
            int n0;
            if (duo) for (int s = 0; s < NST; s++) if (tmp[s] > acs[s]) acs[s] = tmp[s];
            n0 = acs[0];
            for (int s = 0; s < NST; s++) ref_sm[s] = sat8(acs[s] - n0);
            compare(duo ? "duo" : "single");
          end
        end
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of border_interface (4 SISOs, windows of 16, blocks up to 512).
// Random block lengths, decoder selections and circular / non-circular modes;
// random forward and backward transfers from random SISOs and rounds, random
// clears. A reference keeps one forward and one backward entry per window and
// decoder with a valid flag and applies the routing rules: forward metric of
// window g initialises window g+1 (window 0 after the last one when circular),
// backward metric of window g initialises window g-1 (the last one after
// window 0 when circular); window 0 starts in state 0 and the last window
// equiprobable in non-circular mode; entries not written since the clear read
// as zero. Every SISO's read outputs are compared after each clock.
module tb_border_interface;
  import tdec_pkg::*;
  localparam int P = 4, W = 16, K_MAX = 512;
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W);
  localparam int RD_W = $clog2(R_MAX), NW = P * R_MAX;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic            sel_map = 1'b0, clr = 1'b0, clr_sel = 1'b0, circular = 1'b0;
  logic [AW-1:0]   k_len = AW'(K_MAX);
  logic            xfer_f [P], xfer_b [P];
  logic [RD_W-1:0] xf_round [P], xb_round [P], rf_round [P], rb_round [P];
  smv_t            alpha_end [P], beta_start [P], init_alpha [P], init_beta [P];
  smv_t            rf [2][NW], rb [2][NW];
  bit              vf [2][NW], vb [2][NW];
  int checks = 0, failures = 0;

  border_interface #(.P(P), .W(W), .K_MAX(K_MAX)) dut (.clk, .rst_n, .sel_map, .clr, .clr_sel,
    .circular, .k_len, .xfer_f, .xf_round, .alpha_end, .xfer_b, .xb_round, .beta_start,
    .rf_round, .rb_round, .init_alpha, .init_beta);

  always #5 clk = !clk;

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    smv_t s0;
    for (int s = 0; s < NST; s++) s0[s] = (s == 0) ? sm_t'(0) : sm_t'(-64);
    for (int m = 0; m < 2; m++)
      for (int g = 0; g < NW; g++) begin
        rf[m][g] = '0; rb[m][g] = '0; vf[m][g] = 0; vb[m][g] = 0;
      end
    for (int i = 0; i < P; i++) begin
      xfer_f[i] = 1'b0; xfer_b[i] = 1'b0; xf_round[i] = '0; xb_round[i] = '0;
      rf_round[i] = '0; rb_round[i] = '0; alpha_end[i] = '0; beta_start[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 30; blk++) begin
      int gl;
      k_len = AW'(1 + $urandom % K_MAX);
      circular = 1'($urandom);
      gl = (int'(k_len) - 1) / W;
      for (int t = 0; t < 200; t++) begin
        @(negedge clk);
        sel_map = 1'($urandom);
        clr = ($urandom % 50) == 0;
        clr_sel = 1'($urandom);
        for (int i = 0; i < P; i++) begin
          xfer_f[i] = 1'($urandom); xf_round[i] = RD_W'($urandom);
          xfer_b[i] = 1'($urandom); xb_round[i] = RD_W'($urandom);
          alpha_end[i] = {$urandom, $urandom}; beta_start[i] = {$urandom, $urandom};
        end
        // reference update at the clock edge
        if (clr) begin
          for (int g = 0; g < NW; g++) begin vf[clr_sel][g] = 0; vb[clr_sel][g] = 0; end
        end else begin
          for (int i = 0; i < P; i++) begin
            int g;
            g = int'(xf_round[i]) * P + i;
            if (xfer_f[i]) begin
              if (g == gl) begin
                if (circular) begin rf[sel_map][0] = alpha_end[i]; vf[sel_map][0] = 1; end
              end else if (g < gl) begin
                rf[sel_map][g + 1] = alpha_end[i]; vf[sel_map][g + 1] = 1;
              end
            end
            g = int'(xb_round[i]) * P + i;
            if (xfer_b[i]) begin
              if (g == 0) begin
                if (circular) begin rb[sel_map][gl] = beta_start[i]; vb[sel_map][gl] = 1; end
              end else if (g <= gl) begin
                rb[sel_map][g - 1] = beta_start[i]; vb[sel_map][g - 1] = 1;
              end
            end
          end
        end
        @(negedge clk);
        clr = 1'b0;
        for (int i = 0; i < P; i++) begin xfer_f[i] = 1'b0; xfer_b[i] = 1'b0; end
        // check reads for random rounds
        for (int i = 0; i < P; i++) begin
          rf_round[i] = RD_W'($urandom);
          rb_round[i] = RD_W'($urandom);
        end
        #1;
        for (int i = 0; i < P; i++) begin
          int gf, gb;
          smv_t ea, eb;
          gf = int'(rf_round[i]) * P + i;
          gb = int'(rb_round[i]) * P + i;
          if (gf == 0 && !circular) ea = s0;
          else if (!vf[sel_map][gf]) ea = '0;
          else ea = rf[sel_map][gf];
          if (gb == gl && !circular) eb = '0;
          else if (!vb[sel_map][gb]) eb = '0;
          else eb = rb[sel_map][gb];
          checks++;
          if (init_alpha[i] !== ea || init_beta[i] !== eb) begin
            failures++;
            $display("FAIL block %0d siso %0d windows %0d/%0d (last %0d, circ %0d)",
                     blk, i, gf, gb, gl, circular);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// LLR calculation unit: extrinsic LLRs and hard decisions of one symbol.
//
// Three pipeline stages:
//   1. for each state s and each input slot k of the current phase:
//      alpha(s) + gamma(branch) + beta(successor), using the successor
//      (backward) trellis configuration;
//   2. T(k) = maximum over the eight states;
//   3. relative LLR L = T(j) - T(0), extrinsic = L - apriori - systematic part,
//      scaled by 0.75 (x - x/4) and saturated to LLR_W bits.
// Single binary: one phase; e01 carries the LLR of bit 1, hard[0] = (L > 0).
// Duo-binary: phase 0 gives T(00), T(01) and keeps them; phase 1 gives T(10),
// T(11); the three extrinsics leave together after phase 1 with
// hard A = max(T10,T11) > max(T00,T01), hard B = max(T01,T11) > max(T10,T00).
// Latency: out_valid rises three clocks after the in_valid of the last phase.
// The 0.75 scaling follows the enhanced max-log-MAP choice of the decoder.
module llr_unit
  import tdec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  logic      duo,
  input  logic      phase,
  input  tr_cfg_t   cfg,
  input  smv_t      alpha,
  input  smv_t      beta,
  input  gamv_t     gamma,
  input  llr_t      apr01, apr10, apr11,
  input  ch_t       sys_a, sys_b,
  output logic      out_valid,
  output llr_word_t out
);
  typedef logic signed [SM_W+3:0] sum_t;   // alpha + gamma + beta
  typedef logic signed [15:0]     w16_t;

  // stage 1
  sum_t sum1 [NST][2];
  logic v1, duo1, ph1;
  llr_t a01_1, a10_1, a11_1;
  ch_t  sa1, sb1;
  // stage 2
  sum_t t2 [2];
  logic v2, duo2, ph2;
  llr_t a01_2, a10_2, a11_2;
  ch_t  sa2, sb2;
  // phase-0 results kept for phase 1
  sum_t t00_h, t01_h;
  llr_t e01_h;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
    end else begin
      v1 <= in_valid;
    end
    duo1 <= duo; ph1 <= phase;
    a01_1 <= apr01; a10_1 <= apr10; a11_1 <= apr11;
    sa1 <= sys_a; sb1 <= sys_b;
    for (int s = 0; s < NST; s++) begin
      for (int k = 0; k < 2; k++) begin
        br_cfg_t bc;
        bc = cfg[s][{phase & duo, k[0]}];
        sum1[s][k] <= sum_t'(alpha[s]) + sum_t'(gamma[{k[0], bc.y, bc.w}]) + sum_t'(beta[bc.st]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    duo2 <= duo1; ph2 <= ph1;
    a01_2 <= a01_1; a10_2 <= a10_1; a11_2 <= a11_1;
    sa2 <= sa1; sb2 <= sb1;
    for (int k = 0; k < 2; k++) begin
      sum_t m;
      m = sum1[0][k];
      for (int s = 1; s < NST; s++) if (sum1[s][k] > m) m = sum1[s][k];
      t2[k] <= m;
    end
  end

  function automatic llr_t scale_sat(input w16_t x);
    return sat_llr(x - (x >>> 2));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      t00_h     <= '0;
      t01_h     <= '0;
      e01_h     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (v2) begin
        if (!duo2) begin
          out.e01   <= scale_sat(w16_t'(t2[1]) - w16_t'(t2[0]) - w16_t'(a01_2) - w16_t'(sa2));
          out.e10   <= '0;
          out.e11   <= '0;
          out.hard  <= {1'b0, t2[1] > t2[0]};
          out_valid <= 1'b1;
        end else if (!ph2) begin
          t00_h <= t2[0];
          t01_h <= t2[1];
          e01_h <= scale_sat(w16_t'(t2[1]) - w16_t'(t2[0]) - w16_t'(a01_2) - w16_t'(sb2));
        end else begin
          sum_t m10_11, m00_01, m01_11, m10_00;
          m10_11 = (t2[0] > t2[1]) ? t2[0] : t2[1];
          m00_01 = (t00_h > t01_h) ? t00_h : t01_h;
          m01_11 = (t01_h > t2[1]) ? t01_h : t2[1];
          m10_00 = (t2[0] > t00_h) ? t2[0] : t00_h;
          out.e01   <= e01_h;
          out.e10   <= scale_sat(w16_t'(t2[0]) - w16_t'(t00_h) - w16_t'(a10_2) - w16_t'(sa2));
          out.e11   <= scale_sat(w16_t'(t2[1]) - w16_t'(t00_h) - w16_t'(a11_2) - w16_t'(sa2) - w16_t'(sb2));
          out.hard  <= {m01_11 > m10_00, m10_11 > m00_01};
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule

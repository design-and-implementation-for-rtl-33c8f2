// State metric unit (second configuration): eight configurable radix-2
// add-compare-select units that run either recursion direction.
//
// For every state s the configuration names, per branch k, the neighbouring
// state and the parity bits of that branch. Forward (alpha) units are
// configured with predecessors, backward (beta) units with successors, so the
// same hardware computes
//   m'(s) = max_k ( m(cfg[s][k].st) + gamma[{k[0], cfg[s][k].y, cfg[s][k].w}] ).
// Single binary: branches 0 and 1, one result per clock.
// Duo-binary: four branches over two clocks; phase 0 keeps the ACS of
// branches 0/1 in a temporary register, phase 1 compares branches 2/3 with it
// and updates the metrics (one result every two clocks).
// After each update the metrics are normalised by subtracting the new metric
// of state 0 and saturated to SM_W bits (normalisation is this design's
// choice). `init` loads init_val and has priority over `en`.
module state_metric_unit
  import tdec_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  tr_cfg_t cfg,
  input  gamv_t   gamma,
  input  logic    en,
  input  logic    duo,
  input  logic    phase,
  input  logic    init,
  input  smv_t    init_val,
  output smv_t    sm
);
  typedef logic signed [SM_W+1:0] wide_t;

  wide_t acs   [NST];
  wide_t tmp   [NST];
  wide_t nxt   [NST];

  always_comb begin
    for (int s = 0; s < NST; s++) begin
      wide_t c0, c1;
      br_cfg_t b0, b1;
      b0 = cfg[s][{phase & duo, 1'b0}];
      b1 = cfg[s][{phase & duo, 1'b1}];
      c0 = wide_t'(sm[b0.st]) + wide_t'(gamma[{1'b0, b0.y, b0.w}]);
      c1 = wide_t'(sm[b1.st]) + wide_t'(gamma[{1'b1, b1.y, b1.w}]);
      acs[s] = (c0 > c1) ? c0 : c1;
      if (duo && phase && tmp[s] > acs[s]) nxt[s] = tmp[s];
      else                                 nxt[s] = acs[s];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sm <= '0;
      for (int s = 0; s < NST; s++) tmp[s] <= '0;
    end else if (init) begin
      sm <= init_val;
    end else if (en) begin
      if (duo && !phase) begin
        for (int s = 0; s < NST; s++) tmp[s] <= acs[s];
      end else begin
        for (int s = 0; s < NST; s++)
          sm[s] <= sat_sm(16'(nxt[s]) - 16'(nxt[0]));
      end
    end
  end
endmodule

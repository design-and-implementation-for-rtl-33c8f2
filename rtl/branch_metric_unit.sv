// Branch metric unit: the eight branch metrics of one trellis phase.
//
// A branch metric is the correlation of the hypothesised code bits with the
// received soft values plus the a-priori LLR of the input symbol:
//   gamma = a*A + b*B + y*Y + w*W + apr(a,b)      (bits a,b,y,w in {0,1})
// so the all-zero branch has metric 0 and only relative values matter.
// Output index is {j_lsb, y, w}.
//   single binary : j_lsb is the information bit u (a = u, no B), one phase;
//                   W enters only when use_w is set (8 metrics, e.g. two
//                   parities per constituent code) otherwise 4 distinct ones.
//   duo-binary    : two phases; phase 0 gives symbols 00/01 (a=0, b=j_lsb),
//                   phase 1 gives 10/11 (a=1, b=j_lsb), 8 metrics each.
// Purely combinational; the SISO registers the result (branch metric stage).
module branch_metric_unit
  import tdec_pkg::*;
(
  input  ch_t   a, b, y, w,
  input  llr_t  apr01, apr10, apr11,
  input  logic  duo,
  input  logic  phase,
  input  logic  use_w,
  output gamv_t gamma
);
  always_comb begin
    for (int idx = 0; idx < 8; idx++) begin
      logic jl, yb, wb;
      logic signed [G_W+1:0] acc;
      jl  = idx[2];
      yb  = idx[1];
      wb  = idx[0];
      acc = '0;
      if (yb) acc += (G_W+2)'(y);
      if (wb && (duo || use_w)) acc += (G_W+2)'(w);
      if (!duo) begin
        if (jl) acc += (G_W+2)'(a) + (G_W+2)'(apr01);
      end else begin
        if (phase) acc += (G_W+2)'(a);
        if (jl)    acc += (G_W+2)'(b);
        case ({phase, jl})
          2'b01:   acc += (G_W+2)'(apr01);
          2'b10:   acc += (G_W+2)'(apr10);
          2'b11:   acc += (G_W+2)'(apr11);
          default: ;
        endcase
      end
      gamma[idx] = gam_t'(acc);
    end
  end
endmodule

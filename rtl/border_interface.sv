// Border memories and SISO-to-SISO interfacing (next-iteration
// initialisation).
//
// Window g of the block is handled by SISO g mod P in round g div P. When a
// SISO finishes the forward pass of window g it hands the final alpha vector
// to the SISO of window g+1 (its successor, or SISO 0 of the next round);
// when it finishes the backward pass of window g it hands beta at the window
// start to the SISO of window g-1 (its predecessor). The receiver stores the
// vector in its forward or backward border memory, one entry per round and
// one memory pair per MAP decoder, and loads it when that window starts in a
// later step or iteration. In circular (tail-biting) mode the last window's
// alpha goes to window 0 and window 0's beta goes to the last window, whose
// SISO depends on the block length.
// Initialize with AddInit4 clears the valid bits of the selected decoder's
// border memories; an entry not written since then reads as all zero
// (equiprobable), which is what the first iteration sees. Exceptions:
//   window 0 forward, non-circular    : state 0 favoured (trellis starts in 0)
//   last window backward, non-circular: all zero
// Writes are clocked; the initial-value read is combinational.
module border_interface
  import tdec_pkg::*;
#(
  parameter int P     = 16,
  parameter int W     = 64,
  parameter int K_MAX = 6144,
  localparam int W_LOG = $clog2(W),
  localparam int P_LOG = $clog2(P),
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W),
  localparam int RD_W  = (R_MAX > 1) ? $clog2(R_MAX) : 1,
  localparam int G_WID = AW - W_LOG
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sel_map,
  input  logic            clr,
  input  logic            clr_sel,
  input  logic            circular,
  input  logic [AW-1:0]   k_len,
  input  logic            xfer_f     [P],
  input  logic [RD_W-1:0] xf_round   [P],
  input  smv_t            alpha_end  [P],
  input  logic            xfer_b     [P],
  input  logic [RD_W-1:0] xb_round   [P],
  input  smv_t            beta_start [P],
  input  logic [RD_W-1:0] rf_round   [P],
  input  logic [RD_W-1:0] rb_round   [P],
  output smv_t            init_alpha [P],
  output smv_t            init_beta  [P]
);
  smv_t bf [2][P][R_MAX];
  smv_t bb [2][P][R_MAX];
  logic [R_MAX-1:0] vf [2][P];   // entry written since the last clear
  logic [R_MAX-1:0] vb [2][P];

  logic [G_WID-1:0] g_last;
  assign g_last = G_WID'((k_len - AW'(1)) >> W_LOG);

  function automatic logic [G_WID-1:0] win(input logic [RD_W-1:0] r, input int i);
    return G_WID'(int'(r) * P + i);
  endfunction

  smv_t s0_vec;
  always_comb begin
    for (int s = 0; s < NST; s++) s0_vec[s] = (s == 0) ? sm_t'(0) : sm_t'(-64);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < 2; m++)
        for (int i = 0; i < P; i++) begin
          vf[m][i] <= '0;
          vb[m][i] <= '0;
        end
    end else if (clr) begin
      for (int i = 0; i < P; i++) begin
        vf[clr_sel][i] <= '0;
        vb[clr_sel][i] <= '0;
      end
    end else begin
      for (int i = 0; i < P; i++) begin
        if (xfer_f[i]) begin
          if (win(xf_round[i], i) == g_last) begin
            if (circular) begin
              bf[sel_map][0][0] <= alpha_end[i];
              vf[sel_map][0][0] <= 1'b1;
            end
          end else if (win(xf_round[i], i) < g_last) begin
            if (i == P - 1) begin
              bf[sel_map][0][int'(xf_round[i]) + 1] <= alpha_end[i];
              vf[sel_map][0][int'(xf_round[i]) + 1] <= 1'b1;
            end else begin
              bf[sel_map][i + 1][int'(xf_round[i])] <= alpha_end[i];
              vf[sel_map][i + 1][int'(xf_round[i])] <= 1'b1;
            end
          end
        end
        if (xfer_b[i]) begin
          if (win(xb_round[i], i) == '0) begin
            if (circular) begin
              bb[sel_map][int'(g_last) % P][int'(g_last) / P] <= beta_start[i];
              vb[sel_map][int'(g_last) % P][int'(g_last) / P] <= 1'b1;
            end
          end else if (win(xb_round[i], i) <= g_last) begin
            if (i == 0) begin
              bb[sel_map][P - 1][int'(xb_round[i]) - 1] <= beta_start[i];
              vb[sel_map][P - 1][int'(xb_round[i]) - 1] <= 1'b1;
            end else begin
              bb[sel_map][i - 1][int'(xb_round[i])] <= beta_start[i];
              vb[sel_map][i - 1][int'(xb_round[i])] <= 1'b1;
            end
          end
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      if (win(rf_round[i], i) == '0 && !circular) init_alpha[i] = s0_vec;
      else if (!vf[sel_map][i][rf_round[i]])       init_alpha[i] = '0;
      else                                         init_alpha[i] = bf[sel_map][i][rf_round[i]];
      if (win(rb_round[i], i) == g_last && !circular) init_beta[i] = '0;
      else if (!vb[sel_map][i][rb_round[i]])           init_beta[i]  = '0;
      else                                             init_beta[i]  = bb[sel_map][i][rb_round[i]];
    end
  end
endmodule

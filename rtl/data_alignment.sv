// Data alignment block: resolves the memory conflicts of the parallel
// extrinsic writes.
//
// Every clock each of the P SISOs may emit one extrinsic word for an
// interleaved (or de-interleaved) block position, and several of them may
// target the same single-port LLR bank. Each source owns a two-dimensional
// line buffer with one FIFO row per target bank; an incoming word enters the
// row of its bank. For every bank a controller (bank_selector, lowest source
// first) picks one non-empty row per clock and sends its oldest word to the
// bank; the output is registered. `empty` (EmptyFIFO) is high when no word is
// buffered or on its way out; the LOOPNE instruction waits on it before the
// other MAP decoder may start. The row depth LB_DEPTH is this design's
// choice; `overflow` is a sticky flag (and an assertion) for a word that
// arrived at a full row and was lost.
module data_alignment
  import tdec_pkg::*;
#(
  parameter int P        = 16,
  parameter int W        = 64,
  parameter int LB_DEPTH = 8,
  localparam int W_LOG = $clog2(W),
  localparam int P_LOG = $clog2(P),
  localparam int L_LOG = $clog2(LB_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  llr_wr_t       in      [P],
  output logic          w_valid [P],
  output logic [AW-1:0] w_addr  [P],
  output llr_word_t     w_data  [P],
  output logic          empty,
  output logic          overflow,
  output logic          conflict
);
  typedef struct packed {
    logic [AW-1:0] addr;
    llr_word_t     data;
  } entry_t;

  entry_t         buf_q [P][P][LB_DEPTH];   // [source][bank][slot]
  logic [L_LOG:0] cnt   [P][P];
  logic [L_LOG-1:0] rp  [P][P];
  logic [L_LOG-1:0] wp  [P][P];

  logic [P-1:0]     req   [P];               // per bank: rows holding data
  logic             sel_v [P];
  logic [P_LOG-1:0] sel   [P];

  for (genvar b = 0; b < P; b++) begin : g_ctl
    always_comb begin
      for (int s = 0; s < P; s++) req[b][s] = (cnt[s][b] != '0);
    end
    bank_selector #(.N(P)) u_sel (.req(req[b]), .valid(sel_v[b]), .sel(sel[b]));
  end

  function automatic logic [P_LOG-1:0] bank_of(input logic [AW-1:0] a);
    return a[W_LOG +: P_LOG];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < P; s++)
        for (int b = 0; b < P; b++) begin
          cnt[s][b] <= '0;
          rp[s][b]  <= '0;
          wp[s][b]  <= '0;
        end
      for (int b = 0; b < P; b++) begin
        w_valid[b] <= 1'b0;
        w_addr[b]  <= '0;
        w_data[b]  <= '0;
      end
      overflow <= 1'b0;
    end else begin
      for (int s = 0; s < P; s++) begin
        for (int b = 0; b < P; b++) begin
          logic push, pop;
          push = in[s].valid && bank_of(in[s].addr) == P_LOG'(b)
                 && cnt[s][b] != (L_LOG+1)'(LB_DEPTH);
          pop  = sel_v[b] && sel[b] == P_LOG'(s);
          if (push) begin
            buf_q[s][b][wp[s][b]] <= '{addr: in[s].addr, data: in[s].data};
            wp[s][b] <= wp[s][b] + L_LOG'(1);
          end
          if (pop) rp[s][b] <= rp[s][b] + L_LOG'(1);
          cnt[s][b] <= cnt[s][b] + (L_LOG+1)'(push) - (L_LOG+1)'(pop);
          if (in[s].valid && bank_of(in[s].addr) == P_LOG'(b)) begin
            assert (cnt[s][b] != (L_LOG+1)'(LB_DEPTH)) else $error("line buffer overflow");
            if (cnt[s][b] == (L_LOG+1)'(LB_DEPTH)) overflow <= 1'b1;
          end
        end
      end
      for (int b = 0; b < P; b++) begin
        w_valid[b] <= sel_v[b];
        w_addr[b]  <= buf_q[sel[b]][b][rp[sel[b]][b]].addr;
        w_data[b]  <= buf_q[sel[b]][b][rp[sel[b]][b]].data;
      end
    end
  end

  // empty: nothing buffered and nothing in the output register
  always_comb begin
    empty = 1'b1;
    for (int s = 0; s < P; s++)
      for (int b = 0; b < P; b++)
        if (cnt[s][b] != '0) empty = 1'b0;
    for (int b = 0; b < P; b++) if (w_valid[b]) empty = 1'b0;
  end

  // conflict: two or more sources address the same bank in one clock
  always_comb begin
    conflict = 1'b0;
    for (int b = 0; b < P; b++) begin
      int n;
      n = 0;
      for (int s = 0; s < P; s++)
        if (in[s].valid && bank_of(in[s].addr) == P_LOG'(b)) n++;
      if (n > 1) conflict = 1'b1;
    end
  end
endmodule

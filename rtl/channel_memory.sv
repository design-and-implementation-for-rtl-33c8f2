// Channel value memory: the received soft values of the eight streams
// A, B, Y, W (natural order) and AInt, BInt, YInt, WInt (interleaved order).
//
// Position p of the block lies in window p/W; window g belongs to SISO g mod P
// and is processed in round g div P. The memory is therefore split into one
// bank per SISO, and each bank into an even-round and an odd-round sub-bank:
// in every step a SISO reads its forward window (round r, top to bottom) and
// its backward window (round r+1, bottom to top), which always sit in
// different sub-banks, so two single-port sub-banks serve both reads.
// Writes come from the StrData instruction: one position, any subset of the
// eight streams (wen). Reads are registered: data one clock after the address.
module channel_memory
  import tdec_pkg::*;
#(
  parameter int P     = 16,
  parameter int W     = 64,
  parameter int K_MAX = 6144,
  localparam int W_LOG = $clog2(W),
  localparam int P_LOG = $clog2(P),
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W),
  localparam int RD_W  = (R_MAX > 1) ? $clog2(R_MAX) : 1,
  localparam int D2    = ((R_MAX + 1) / 2) * W
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [7:0]       wen,
  input  ch_word_t         wdata,
  input  logic [RD_W-1:0]  f_round [P],
  input  logic [W_LOG-1:0] f_off   [P],
  input  logic [RD_W-1:0]  b_round [P],
  input  logic [W_LOG-1:0] b_off   [P],
  output ch_word_t         f_data  [P],
  output ch_word_t         b_data  [P]
);
  logic [W_LOG-1:0] w_off;
  logic [P_LOG-1:0] w_bank;
  logic [RD_W-1:0]  w_round;

  assign w_off   = waddr[W_LOG-1:0];
  assign w_bank  = waddr[W_LOG +: P_LOG];
  assign w_round = RD_W'(waddr >> (W_LOG + P_LOG));

  function automatic int loc(input logic [RD_W-1:0] r, input logic [W_LOG-1:0] o);
    return int'(r) / 2 * W + int'(o);
  endfunction

  for (genvar i = 0; i < P; i++) begin : g_bank
    ch_word_t mem_e [D2];
    ch_word_t mem_o [D2];

    always_ff @(posedge clk) begin
      if (we && w_bank == P_LOG'(i)) begin
        for (int s = 0; s < 8; s++) begin
          if (wen[s]) begin
            if (w_round[0]) mem_o[loc(w_round, w_off)][s] <= wdata[s];
            else            mem_e[loc(w_round, w_off)][s] <= wdata[s];
          end
        end
      end
      f_data[i] <= f_round[i][0] ? mem_o[loc(f_round[i], f_off[i])] : mem_e[loc(f_round[i], f_off[i])];
      b_data[i] <= b_round[i][0] ? mem_o[loc(b_round[i], b_off[i])] : mem_e[loc(b_round[i], b_off[i])];
    end
  end
endmodule

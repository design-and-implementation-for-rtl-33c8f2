// Extrinsic LLR memory: two memories, one per MAP decoder direction.
//
// Memory 0 is indexed by natural position and read by the first MAP decoder
// (it holds what the second decoder wrote); memory 1 is indexed by interleaved
// position and read by the second decoder. Each word holds the extrinsics of
// symbols 01, 10 and 11 (single binary uses the first) and two decoded bits.
// Banking is the same as the channel memory (one bank per SISO, even/odd
// round sub-banks) so that each SISO's forward and backward reads never
// collide. Writes arrive from the data alignment block, at most one per bank
// and clock (single-port banks). The decoded bits of memory 0 can be read in
// natural order through dec_raddr/dec_rdata. All reads are registered.
module llr_memory
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
  input  logic             rsel,
  input  logic [RD_W-1:0]  f_round [P],
  input  logic [W_LOG-1:0] f_off   [P],
  input  logic [RD_W-1:0]  b_round [P],
  input  logic [W_LOG-1:0] b_off   [P],
  output llr_word_t        f_data  [P],
  output llr_word_t        b_data  [P],
  input  logic             wsel,
  input  logic             w_valid [P],
  input  logic [AW-1:0]    w_addr  [P],
  input  llr_word_t        w_data  [P],
  input  logic [AW-1:0]    dec_raddr,
  output logic [1:0]       dec_rdata
);
  function automatic int loc(input logic [RD_W-1:0] r, input logic [W_LOG-1:0] o);
    return int'(r) / 2 * W + int'(o);
  endfunction

  logic [RD_W-1:0]  d_round;
  logic [W_LOG-1:0] d_off;
  logic [P_LOG-1:0] d_bank, d_bank_q;
  logic [1:0]       d_bits [P];

  assign d_off   = dec_raddr[W_LOG-1:0];
  assign d_bank  = dec_raddr[W_LOG +: P_LOG];
  assign d_round = RD_W'(dec_raddr >> (W_LOG + P_LOG));

  always_ff @(posedge clk) d_bank_q <= d_bank;
  assign dec_rdata = d_bits[d_bank_q];

  for (genvar i = 0; i < P; i++) begin : g_bank
    // [memory][round parity]
    llr_word_t m0e [D2];
    llr_word_t m0o [D2];
    llr_word_t m1e [D2];
    llr_word_t m1o [D2];
    logic [RD_W-1:0]  wr_round;
    logic [W_LOG-1:0] wr_off;

    assign wr_off   = w_addr[i][W_LOG-1:0];
    assign wr_round = RD_W'(w_addr[i] >> (W_LOG + P_LOG));

    always_ff @(posedge clk) begin
      if (w_valid[i]) begin
        case ({wsel, wr_round[0]})
          2'b00: m0e[loc(wr_round, wr_off)] <= w_data[i];
          2'b01: m0o[loc(wr_round, wr_off)] <= w_data[i];
          2'b10: m1e[loc(wr_round, wr_off)] <= w_data[i];
          default: m1o[loc(wr_round, wr_off)] <= w_data[i];
        endcase
      end
      case ({rsel, f_round[i][0]})
        2'b00: f_data[i] <= m0e[loc(f_round[i], f_off[i])];
        2'b01: f_data[i] <= m0o[loc(f_round[i], f_off[i])];
        2'b10: f_data[i] <= m1e[loc(f_round[i], f_off[i])];
        default: f_data[i] <= m1o[loc(f_round[i], f_off[i])];
      endcase
      case ({rsel, b_round[i][0]})
        2'b00: b_data[i] <= m0e[loc(b_round[i], b_off[i])];
        2'b01: b_data[i] <= m0o[loc(b_round[i], b_off[i])];
        2'b10: b_data[i] <= m1e[loc(b_round[i], b_off[i])];
        default: b_data[i] <= m1o[loc(b_round[i], b_off[i])];
      endcase
      d_bits[i] <= d_round[0] ? m0o[loc(d_round, d_off)].hard : m0e[loc(d_round, d_off)].hard;
    end
  end
endmodule

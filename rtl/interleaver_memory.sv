// Interleaver address memory: two loadable tables, banked per SISO.
//
// Table 0 holds, for every natural position, the position in interleaved
// order (used when the first MAP decoder writes its extrinsics); table 1
// holds, for every interleaved position, the natural position (used by the
// second MAP decoder). Each entry is {swap, address}: `swap` marks a
// duo-binary couple whose A and B were exchanged by the interleaver, so
// the LLRs of symbols 01 and 10 must change places on the way.
// Banking follows the channel memory: SISO i reads only positions of its own
// windows, in order, one per clock through its forward pass. The host loads
// the tables through the write port. Reads are registered.
module interleaver_memory
  import tdec_pkg::*;
#(
  parameter int P     = 16,
  parameter int W     = 64,
  parameter int K_MAX = 6144,
  localparam int W_LOG = $clog2(W),
  localparam int P_LOG = $clog2(P),
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W),
  localparam int RD_W  = (R_MAX > 1) ? $clog2(R_MAX) : 1,
  localparam int D     = R_MAX * W
) (
  input  logic             clk,
  input  logic             we,
  input  logic             wsel,
  input  logic [AW-1:0]    waddr,
  input  logic [AW:0]      wdata,
  input  logic             rsel,
  input  logic [RD_W-1:0]  r_round [P],
  input  logic [W_LOG-1:0] r_off   [P],
  output logic [AW:0]      r_data  [P]
);
  logic [W_LOG-1:0] w_off;
  logic [P_LOG-1:0] w_bank;
  logic [RD_W-1:0]  w_round;

  assign w_off   = waddr[W_LOG-1:0];
  assign w_bank  = waddr[W_LOG +: P_LOG];
  assign w_round = RD_W'(waddr >> (W_LOG + P_LOG));

  for (genvar i = 0; i < P; i++) begin : g_bank
    logic [AW:0] tbl0 [D];
    logic [AW:0] tbl1 [D];

    always_ff @(posedge clk) begin
      if (we && w_bank == P_LOG'(i)) begin
        if (wsel) tbl1[int'(w_round) * W + int'(w_off)] <= wdata;
        else      tbl0[int'(w_round) * W + int'(w_off)] <= wdata;
      end
      r_data[i] <= rsel ? tbl1[int'(r_round[i]) * W + int'(r_off[i])]
                        : tbl0[int'(r_round[i]) * W + int'(r_off[i])];
    end
  end
endmodule

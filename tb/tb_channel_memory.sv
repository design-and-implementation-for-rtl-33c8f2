// Testbench of channel_memory (4 SISOs, windows of 16, blocks up to 512):
// every position is written with random soft values under random stream
// enables, then all SISO read ports fetch random (round, offset) pairs. The
// data read (one clock latency) must match a reference array indexed by the
// global position (round*P + siso)*W + offset.
module tb_channel_memory;
  import tdec_pkg::*;
  localparam int P = 4, W = 16, K_MAX = 512;
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W);
  localparam int RD_W = $clog2(R_MAX), W_LOG = $clog2(W);
  logic             clk = 1'b0, we = 1'b0;
  logic [AW-1:0]    waddr = '0;
  logic [7:0]       wen = '0;
  ch_word_t         wdata = '0;
  logic [RD_W-1:0]  f_round [P], b_round [P];
  logic [W_LOG-1:0] f_off [P], b_off [P];
  ch_word_t         f_data [P], b_data [P];
  ch_word_t         ref_m [K_MAX];
  int checks = 0, failures = 0;

  channel_memory #(.P(P), .W(W), .K_MAX(K_MAX)) dut (.clk, .we, .waddr, .wen, .wdata,
    .f_round, .f_off, .b_round, .b_off, .f_data, .b_data);

  always #5 clk = !clk;

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < P; i++) begin
      f_round[i] = '0; b_round[i] = '0; f_off[i] = '0; b_off[i] = '0;
    end
    for (int a = 0; a < K_MAX; a++) ref_m[a] = '0;
    for (int pass = 0; pass < 3; pass++)
      for (int a = 0; a < K_MAX; a++) begin
        @(negedge clk);
        we = 1'b1; waddr = AW'(a); wdata = {$urandom, $urandom};
        wen = (pass == 0) ? 8'hFF : 8'($urandom);
        for (int s = 0; s < 8; s++) if (wen[s]) ref_m[a][s] = wdata[s];
      end
    @(negedge clk) we = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      int pf [P], pb [P];
      for (int i = 0; i < P; i++) begin
        f_round[i] = RD_W'($urandom); f_off[i] = W_LOG'($urandom);
        b_round[i] = RD_W'($urandom); b_off[i] = W_LOG'($urandom);
        pf[i] = (int'(f_round[i]) * P + i) * W + int'(f_off[i]);
        pb[i] = (int'(b_round[i]) * P + i) * W + int'(b_off[i]);
      end
      @(negedge clk);
      for (int i = 0; i < P; i++) begin
        checks++;
        if (f_data[i] !== ref_m[pf[i]] || b_data[i] !== ref_m[pb[i]]) begin
          failures++;
          $display("FAIL siso %0d positions %0d/%0d", i, pf[i], pb[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

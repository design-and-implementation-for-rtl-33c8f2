// Testbench of interleaver_memory (4 SISOs, windows of 16, blocks up to 512):
// both tables are filled with random entries (address plus swap flag), then
// every SISO reads random positions from a randomly selected table; the
// entries (one clock latency) must match reference arrays.
module tb_interleaver_memory;
  import tdec_pkg::*;
  localparam int P = 4, W = 16, K_MAX = 512;
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W);
  localparam int RD_W = $clog2(R_MAX), W_LOG = $clog2(W);
  logic             clk = 1'b0, we = 1'b0, wsel = 1'b0, rsel = 1'b0;
  logic [AW-1:0]    waddr = '0;
  logic [AW:0]      wdata = '0;
  logic [RD_W-1:0]  r_round [P];
  logic [W_LOG-1:0] r_off [P];
  logic [AW:0]      r_data [P];
  logic [AW:0]      ref_m [2][K_MAX];
  int checks = 0, failures = 0;

  interleaver_memory #(.P(P), .W(W), .K_MAX(K_MAX)) dut (.clk, .we, .wsel, .waddr, .wdata,
    .rsel, .r_round, .r_off, .r_data);

  always #5 clk = !clk;

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < P; i++) begin r_round[i] = '0; r_off[i] = '0; end
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < K_MAX; a++) begin
        @(negedge clk);
        we = 1'b1; wsel = 1'(m); waddr = AW'(a); wdata = (AW+1)'($urandom);
        ref_m[m][a] = wdata;
      end
    @(negedge clk) we = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      int pos [P];
      rsel = 1'($urandom);
      for (int i = 0; i < P; i++) begin
        r_round[i] = RD_W'($urandom); r_off[i] = W_LOG'($urandom);
        pos[i] = (int'(r_round[i]) * P + i) * W + int'(r_off[i]);
      end
      @(negedge clk);
      for (int i = 0; i < P; i++) begin
        checks++;
        if (r_data[i] !== ref_m[rsel][pos[i]]) begin
          failures++;
          $display("FAIL table %0d siso %0d position %0d: %h expected %h", rsel, i, pos[i],
                   r_data[i], ref_m[rsel][pos[i]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

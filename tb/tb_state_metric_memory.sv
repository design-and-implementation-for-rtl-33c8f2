// Testbench of state_metric_memory: random simultaneous writes and reads at
// different addresses; each read (one clock latency) is compared with a
// reference array, so both ports and the full depth are exercised.
module tb_state_metric_memory;
  import tdec_pkg::*;
  localparam int W = 64;
  logic                 clk = 1'b0, we = 1'b0;
  logic [$clog2(W)-1:0] waddr = '0, raddr = '0;
  smv_t                 wdata = '0, rdata;
  smv_t                 ref_m [W];
  int checks = 0, failures = 0;

  state_metric_memory #(.W(W)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = !clk;

  initial begin
    #1_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int a = 0; a < W; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = $clog2(W)'(a); wdata = {$urandom, $urandom};
      ref_m[a] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      smv_t expv;
      @(negedge clk);
      raddr = $clog2(W)'($urandom);
      expv  = ref_m[raddr];
      we    = 1'($urandom);
      waddr = raddr + $clog2(W)'(1 + $urandom % (W - 1));
      wdata = {$urandom, $urandom};
      if (we) ref_m[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", raddr, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

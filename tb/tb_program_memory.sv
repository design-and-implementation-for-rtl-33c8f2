// Testbench of program_memory: random words are written to random addresses,
// then every address is read back (one clock latency) and compared with a
// reference array.
module tb_program_memory;
  import tdec_pkg::*;
  localparam int DEPTH = 512;
  logic                     clk = 1'b0, we = 1'b0;
  logic [$clog2(DEPTH)-1:0] waddr = '0, raddr = '0;
  logic [IW-1:0]            wdata = '0, rdata;
  logic [IW-1:0]            ref_m [DEPTH];
  int checks = 0, failures = 0;

  program_memory #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = !clk;

  initial begin
    #1_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = $clog2(DEPTH)'(a); wdata = {$urandom, $urandom};
      ref_m[a] = wdata;
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      waddr = $clog2(DEPTH)'($urandom); wdata = {$urandom, $urandom};
      ref_m[waddr] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = $clog2(DEPTH)'(a);
      @(negedge clk);
      checks++;
      if (rdata !== ref_m[a]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", a, rdata, ref_m[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of sim_decoder: every combination of enable, mode and value is
// applied and the SISO activity mask compared with a reference (one-hot for
// the individual mode, SISOs 0..value for the range mode, none when disabled).
module tb_sim_decoder;
  localparam int P = 16;
  logic                 en = 1'b0, ind = 1'b0;
  logic [$clog2(P)-1:0] value = '0;
  logic [P-1:0]         q;
  int checks = 0, failures = 0;

  sim_decoder #(.P(P)) dut (.en, .ind, .value, .q);

  initial begin
    #1_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int m = 0; m < 2; m++)
        for (int v = 0; v < P; v++) begin
          logic [P-1:0] exp_q;
          en = 1'(e); ind = 1'(m); value = $clog2(P)'(v);
          #1;
          exp_q = '0;
          if (e != 0) begin
            if (m != 0) exp_q[v] = 1'b1;
            else for (int i = 0; i <= v; i++) exp_q[i] = 1'b1;
          end
          checks++;
          if (q !== exp_q) begin
            failures++;
            $display("FAIL en=%0d ind=%0d value=%0d q=%h expected %h", e, m, v, q, exp_q);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

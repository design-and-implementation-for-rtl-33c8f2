// Testbench of branch_metric_unit: random channel values and a-priori LLRs in
// single-binary and both duo-binary phases. The reference computes the
// correlation of each branch label {input, Y, W} with the received values:
//   single binary: u*(A + La(1)) + y*Y + w*W (W only when enabled);
//   duo-binary, couple (a,b) with a = phase: a*A + b*B + La(ab) + y*Y + w*W.
module tb_branch_metric_unit;
  import tdec_pkg::*;
  ch_t   a = '0, b = '0, y = '0, w = '0;
  llr_t  apr01 = '0, apr10 = '0, apr11 = '0;
  logic  duo = 1'b0, phase = 1'b0, use_w = 1'b0;
  gamv_t gamma;
  int checks = 0, failures = 0;

  branch_metric_unit dut (.a, .b, .y, .w, .apr01, .apr10, .apr11, .duo, .phase, .use_w, .gamma);

  initial begin
    #1_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = ch_t'($urandom); b = ch_t'($urandom); y = ch_t'($urandom); w = ch_t'($urandom);
      apr01 = llr_t'($urandom); apr10 = llr_t'($urandom); apr11 = llr_t'($urandom);
      duo = 1'($urandom); phase = 1'($urandom); use_w = 1'($urandom);
      #1;
      for (int idx = 0; idx < 8; idx++) begin
        int u, yb, wb, e, j;
        u = idx >> 2; yb = (idx >> 1) & 1; wb = idx & 1;
        e = yb * int'(y);
        if (duo) begin
          j = int'(phase) * 2 + u;
          e += wb * int'(w) + int'(phase) * int'(a) + u * int'(b);
          e += (j == 1) ? int'(apr01) : (j == 2) ? int'(apr10) : (j == 3) ? int'(apr11) : 0;
        end else begin
          e += (use_w ? wb * int'(w) : 0) + u * (int'(a) + int'(apr01));
        end
        checks++;
        if (int'(gamma[idx]) != e) begin
          failures++;
          $display("FAIL duo=%0d ph=%0d idx=%0d gamma=%0d expected %0d", duo, phase, idx, gamma[idx], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

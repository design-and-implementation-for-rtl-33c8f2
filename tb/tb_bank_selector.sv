// Testbench of bank_selector: random and corner request vectors; the grant
// must be the lowest-numbered requester and valid must equal "any request".
module tb_bank_selector;
  localparam int N = 16;
  logic [N-1:0]         req = '0;
  logic                 valid;
  logic [$clog2(N)-1:0] sel;
  int checks = 0, failures = 0;

  bank_selector #(.N(N)) dut (.req, .valid, .sel);

  initial begin
    #1_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(input logic [N-1:0] r);
    int lo;
    req = r;
    #1;
    lo = -1;
    for (int i = N - 1; i >= 0; i--) if (r[i]) lo = i;
    checks++;
    if (valid !== (lo >= 0) || (lo >= 0 && int'(sel) != lo)) begin
      failures++;
      $display("FAIL req=%h valid=%0d sel=%0d expected %0d", r, valid, sel, lo);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < N; i++) check(N'(1) << i);
    check('1);
    for (int t = 0; t < 2000; t++) check(N'($urandom) & N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

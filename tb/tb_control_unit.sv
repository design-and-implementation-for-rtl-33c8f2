// Testbench of control_unit with a behavioural program memory (one clock read
// latency). The program sets the decoding mode, runs a counted loop, a
// single-instruction loop, calls a subroutine that waits on LOOPNE for the
// (testbench-driven) empty flag, returns and halts. Mov instructions carry
// markers; the sequence of executed markers is compared with the expected
// one, and the mode register, the halt and the wait are checked.
module tb_control_unit;
  import tdec_pkg::*;
  import tb_tdec_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [PC_W-1:0] pm_raddr;
  logic [IW-1:0]   pm_rdata = '0;
  logic            empty_fifo = 1'b1;
  ctrl_t           ctrl;
  mode_t           mode;
  logic            running, done;
  instr_t          pm [512];
  int              seen [$];
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst_n, .start, .pm_raddr, .pm_rdata, .empty_fifo,
                    .ctrl, .mode, .running, .done);

  always #5 clk = !clk;
  always_ff @(posedge clk) pm_rdata <= pm[pm_raddr];

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n && ctrl.mov) seen.push_back(int'(ctrl.addval));

  task automatic expect_eq(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int n, sub, call_at, wait_cycles, n7, idx;
    int exp_seq [$];
    for (int t = 0; t < 3; t++) begin
      for (int a = 0; a < 512; a++) pm[a] = i_nop();
      n = 0;
      pm[n++] = i_init(11'b100_0000_1011);          // AddInit1, duo, SelMAP, circular
      pm[n++] = i_config(CFG_KLEN, 3'd0, 20'd100 + 20'(t));
      pm[n++] = i_config(CFG_GAMMA, 3'd0, 20'd1);
      pm[n++] = i_decode();
      pm[n++] = i_mov(1);
      pm[n++] = i_zol(1, 3 + t, 1);
      pm[n++] = i_nop();
      pm[n++] = i_mov(2);
      pm[n++] = i_mov(3);
      pm[n++] = i_zol(2, 2, 0);
      pm[n++] = i_nop();
      pm[n++] = i_mov(4);
      call_at = n;
      pm[n++] = i_call(0);
      pm[n++] = i_nop();
      pm[n++] = i_nop();
      pm[n++] = i_mov(6);
      pm[n++] = i_goto(0);
      pm[n++] = i_nop();
      pm[n++] = i_nop();
      sub = n;
      pm[call_at] = i_call(sub - call_at);
      pm[n++] = i_mov(5);
      pm[n++] = i_loopne(0);
      pm[n++] = i_nop();
      pm[n++] = i_mov(7);
      pm[n++] = i_ret();
      pm[n++] = i_nop();
      pm[n++] = i_nop();
      seen.delete();
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      // the buffers stay busy for a random time after the subroutine starts
      wait_cycles = 5 + int'($urandom % 20);
      wait (seen.size() > 0 && seen[seen.size() - 1] == 5);
      empty_fifo = 1'b0;
      repeat (wait_cycles) @(negedge clk);
      empty_fifo = 1'b1;
      for (int c = 0; c < 200 && !done; c++) @(negedge clk);
      expect_eq("done", int'(done), 1);
      // expected markers
      exp_seq.delete();
      exp_seq.push_back(1);
      for (int k = 0; k < 3 + t; k++) begin exp_seq.push_back(2); exp_seq.push_back(3); end
      for (int k = 0; k < 3; k++) exp_seq.push_back(4);
      exp_seq.push_back(5);
      idx = 0;
      for (int k = 0; k < exp_seq.size(); k++) begin
        expect_eq($sformatf("marker %0d", k), (idx < seen.size()) ? seen[idx] : -1, exp_seq[k]);
        idx++;
      end
      n7 = 0;
      while (idx < seen.size() && seen[idx] == 7) begin n7++; idx++; end
      checks++;
      if (n7 < wait_cycles - 2 || n7 > wait_cycles + 3) begin
        failures++;
        $display("FAIL LOOPNE body ran %0d times for a wait of %0d cycles", n7, wait_cycles);
      end
      expect_eq("marker after return", (idx < seen.size()) ? seen[idx] : -1, 6);
      expect_eq("markers total", seen.size(), idx + 1);
      expect_eq("mode.duo", int'(mode.duo), 1);
      expect_eq("mode.sel_map", int'(mode.sel_map), 1);
      expect_eq("mode.circular", int'(mode.circular), 1);
      expect_eq("mode.use_w", int'(mode.use_w), 1);
      expect_eq("mode.decode_phase", int'(mode.decode_phase), 1);
      expect_eq("mode.k_len", int'(mode.k_len), 100 + t);
      expect_eq("running after halt", int'(running), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

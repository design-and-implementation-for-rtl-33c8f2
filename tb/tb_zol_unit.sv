// Testbench of zol_unit, both as a zero-overhead loop and as the LOOPNE
// variant. A small fetch model advances the program counter (or takes the
// loop unit's redirect / hold) with random fetch stalls. For a counted loop
// the last body instruction must be fetched NTR times (NTR + 1 when the body
// is a single instruction, NRI = 0); for LOOPNE the body repeats once per
// cycle in which the buffers were not empty at the loop end, plus once.
module tb_zol_unit;
  import tdec_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic            load = 1'b0;
  logic [3:0]      nri = '0;
  logic [14:0]     ntr = '0;
  logic [PC_W-1:0] fetch_pc = '0;
  logic            fetch_en = 1'b0, empty = 1'b1;
  logic            redirect [2], hold [2], active [2];
  logic [PC_W-1:0] spc [2];
  int checks = 0, failures = 0;

  zol_unit #(.LOOPNE(1'b0)) u_zol (.clk, .rst_n, .load, .nri, .ntr, .fetch_pc, .fetch_en, .empty,
                                   .redirect(redirect[0]), .hold(hold[0]), .spc(spc[0]), .active(active[0]));
  zol_unit #(.LOOPNE(1'b1)) u_lne (.clk, .rst_n, .load, .nri, .ntr, .fetch_pc, .fetch_en, .empty,
                                   .redirect(redirect[1]), .hold(hold[1]), .spc(spc[1]), .active(active[1]));

  always #5 clk = !clk;

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // run one loop on unit u; returns how often the loop end was fetched and
  // how many fetches at the loop end saw non-empty buffers
  task automatic run(input int u, input int s, input int n_ri, input int n_tr,
                     output int end_fetches, output int busy_hits);
    int e;
    end_fetches = 0; busy_hits = 0;
    e = s + n_ri;
    @(negedge clk);
    fetch_pc = PC_W'(s); fetch_en = 1'b1; load = 1'b1;
    nri = 4'(n_ri); ntr = 15'(n_tr);
    empty = (u == 1) ? 1'b0 : 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      logic [PC_W-1:0] nxt;
      #1;
      if (int'(fetch_pc) == e && fetch_en) begin
        end_fetches++;
        if (!empty) busy_hits++;
      end
      nxt = fetch_pc + PC_W'(1);
      if (!fetch_en) nxt = fetch_pc;
      else if (redirect[u]) nxt = spc[u];
      else if (hold[u]) nxt = fetch_pc;
      @(negedge clk);
      load = 1'b0;
      fetch_pc = nxt;
      fetch_en = ($urandom % 4) != 0;
      if (u == 1 && busy_hits > n_tr % 5) empty = 1'b1;
      if (int'(fetch_pc) > e) break;
    end
    fetch_en = 1'b0;
    @(negedge clk);
    checks++;
    if (active[u]) begin
      failures++;
      $display("FAIL unit %0d still active after the loop", u);
    end
  endtask

  initial begin
    int ef, bh;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int s, r, n;
      s = 10 + int'($urandom % 400);
      r = int'($urandom % 6);
      n = 1 + int'($urandom % 20);
      run(0, s, r, n, ef, bh);
      checks++;
      if (ef != ((r == 0) ? n + 1 : n)) begin
        failures++;
        $display("FAIL zol nri=%0d ntr=%0d: loop end fetched %0d times", r, n, ef);
      end
      run(1, s, r, n, ef, bh);
      checks++;
      if (ef != bh + 1 || bh == 0) begin
        failures++;
        $display("FAIL loopne nri=%0d: loop end fetched %0d times, %0d busy", r, ef, bh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

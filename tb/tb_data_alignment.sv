// Testbench of data_alignment (4 SISOs, windows of 16, line buffers of 8).
// Every SISO offers a write with random probability to a random
// position each clock; each write carries a unique tag. Every tag must leave
// exactly once, on the port of the bank that owns its position, with its
// address; the conflict flag must equal "two or more writes to one bank in
// this clock"; no overflow; empty must return at the end. (Overfilling a
// buffer is a program error caught by the module's assertion, so it is not
// provoked here.)
module tb_data_alignment;
  import tdec_pkg::*;
  localparam int P = 4, W = 16, LB_DEPTH = 8;
  localparam int W_LOG = $clog2(W), P_LOG = $clog2(P);
  logic          clk = 1'b0, rst_n = 1'b0;
  llr_wr_t       in [P];
  logic          w_valid [P];
  logic [AW-1:0] w_addr [P];
  llr_word_t     w_data [P];
  logic          empty, overflow, conflict;
  int            tag_addr [int];
  int            tag_seen [int];
  int checks = 0, failures = 0;

  data_alignment #(.P(P), .W(W), .LB_DEPTH(LB_DEPTH)) dut (.clk, .rst_n, .in,
    .w_valid, .w_addr, .w_data, .empty, .overflow, .conflict);

  always #5 clk = !clk;

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n)
    for (int b = 0; b < P; b++) if (w_valid[b]) begin
      int tg;
      tg = int'(w_data[b]);
      checks++;
      if (!tag_addr.exists(tg) || tag_seen.exists(tg) || tag_addr[tg] != int'(w_addr[b]) ||
          int'(w_addr[b][W_LOG +: P_LOG]) != b) begin
        failures++;
        $display("FAIL bank %0d wrote tag %0d at %0d", b, tg, w_addr[b]);
      end
      tag_seen[tg] = 1;
    end

  initial begin
    int tag;
    tag = 1;
    for (int i = 0; i < P; i++) in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int per_bank [P];
      bit exp_c;
      @(negedge clk);
      for (int b = 0; b < P; b++) per_bank[b] = 0;
      for (int i = 0; i < P; i++) begin
        in[i].valid = ($urandom % 3) == 0;
        in[i].addr  = AW'($urandom % 1024);
        in[i].data  = llr_word_t'(tag);
        if (in[i].valid) begin
          tag_addr[tag] = int'(in[i].addr);
          per_bank[int'(in[i].addr[W_LOG +: P_LOG])]++;
          tag++;
        end
      end
      exp_c = 0;
      for (int b = 0; b < P; b++) if (per_bank[b] > 1) exp_c = 1;
      #1;
      checks++;
      if (conflict !== exp_c) begin
        failures++;
        $display("FAIL conflict flag %0d expected %0d", conflict, exp_c);
      end
    end
    @(negedge clk);
    for (int i = 0; i < P; i++) in[i] = '0;
    repeat (40) @(negedge clk);
    checks++;
    if (!empty || overflow || tag_seen.num() != tag_addr.num()) begin
      failures++;
      $display("FAIL after drain: empty=%0d overflow=%0d written %0d of %0d",
               empty, overflow, tag_seen.num(), tag_addr.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

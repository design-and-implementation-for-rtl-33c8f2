// Testbench of llr_memory (4 SISOs, windows of 16, blocks up to 512): each
// bank's write port stores random LLR words at random positions of its own
// bank into a randomly selected memory while the SISO read ports fetch from
// the other; reads (one clock latency) are compared with two reference
// arrays. Finally the decoded-bit port is read for every position of
// memory 0 and compared with the stored hard decisions.
module tb_llr_memory;
  import tdec_pkg::*;
  localparam int P = 4, W = 16, K_MAX = 512;
  localparam int R_MAX = (K_MAX + P * W - 1) / (P * W);
  localparam int RD_W = $clog2(R_MAX), W_LOG = $clog2(W), P_LOG = $clog2(P);
  logic             clk = 1'b0, rsel = 1'b0, wsel = 1'b0;
  logic [RD_W-1:0]  f_round [P], b_round [P];
  logic [W_LOG-1:0] f_off [P], b_off [P];
  llr_word_t        f_data [P], b_data [P];
  logic             w_valid [P];
  logic [AW-1:0]    w_addr [P];
  llr_word_t        w_data [P];
  logic [AW-1:0]    dec_raddr = '0;
  logic [1:0]       dec_rdata;
  llr_word_t        ref_m [2][K_MAX];
  int checks = 0, failures = 0;

  llr_memory #(.P(P), .W(W), .K_MAX(K_MAX)) dut (.clk, .rsel, .f_round, .f_off, .b_round, .b_off,
    .f_data, .b_data, .wsel, .w_valid, .w_addr, .w_data, .dec_raddr, .dec_rdata);

  always #5 clk = !clk;

  initial begin
    #10_000_000 $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int pos_of(input int r, input int i, input int o);
    return (r * P + i) * W + o;
  endfunction

  initial begin
    for (int i = 0; i < P; i++) begin
      f_round[i] = '0; b_round[i] = '0; f_off[i] = '0; b_off[i] = '0;
      w_valid[i] = 1'b0; w_addr[i] = '0; w_data[i] = '0;
    end
    // fill both memories completely
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < R_MAX; r++)
        for (int o = 0; o < W; o++) begin
          @(negedge clk);
          wsel = 1'(m);
          for (int i = 0; i < P; i++) begin
            w_valid[i] = 1'b1;
            w_addr[i]  = AW'(pos_of(r, i, o));
            w_data[i]  = llr_word_t'($urandom);
            ref_m[m][pos_of(r, i, o)] = w_data[i];
          end
        end
    // random traffic: writes to one memory, reads from the other
    for (int t = 0; t < 2000; t++) begin
      int pf [P], pb [P];
      @(negedge clk);
      rsel = 1'($urandom);
      wsel = !rsel;
      for (int i = 0; i < P; i++) begin
        f_round[i] = RD_W'($urandom); f_off[i] = W_LOG'($urandom);
        b_round[i] = RD_W'($urandom); b_off[i] = W_LOG'($urandom);
        pf[i] = pos_of(int'(f_round[i]), i, int'(f_off[i]));
        pb[i] = pos_of(int'(b_round[i]), i, int'(b_off[i]));
        w_valid[i] = 1'($urandom);
        w_addr[i]  = AW'(pos_of(int'($urandom % R_MAX), i, int'($urandom % W)));
        w_data[i]  = llr_word_t'($urandom);
      end
      @(posedge clk); #1;
      for (int i = 0; i < P; i++) begin
        checks++;
        if (f_data[i] !== ref_m[rsel][pf[i]] || b_data[i] !== ref_m[rsel][pb[i]]) begin
          failures++;
          $display("FAIL read siso %0d memory %0d positions %0d/%0d", i, rsel, pf[i], pb[i]);
        end
        if (w_valid[i]) ref_m[wsel][w_addr[i]] = w_data[i];
      end
    end
    @(negedge clk);
    for (int i = 0; i < P; i++) w_valid[i] = 1'b0;
    // decoded bits from memory 0
    for (int a = 0; a < K_MAX; a++) begin
      dec_raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (dec_rdata !== ref_m[0][a].hard) begin
        failures++;
        $display("FAIL decoded bits at %0d: %b expected %b", a, dec_rdata, ref_m[0][a].hard);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

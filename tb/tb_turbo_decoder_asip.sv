// End-to-end testbench of the turbo decoder ASIP at reduced size
// (4 SISOs, windows of 16, blocks up to 512).
//
// Cases: LTE-style single-binary blocks with QPP interleaving (the last
// round only partly filled, so padding is exercised; several rounds, so the
// nested zero-overhead loop runs) and WiMAX-style duo-binary circular blocks
// with the two-step interleaver. Each case checks that the decoded bits match
// the information, that the alignment buffers never overflow and that the
// run time follows the window schedule. At the end every mechanism (stall,
// LOOPNE wait, bank conflict, duo mode, circular wrap, call/return,
// zero-overhead loop, nested loop, padding) must have been seen at least once.
module tb_turbo_decoder_asip;
  localparam int TP     = 4;
  localparam int TW     = 16;
  localparam int TK_MAX = 512;

`include "tb_top_body.svh"

  turbo_decoder_asip #(.P(TP), .W(TW), .K_MAX(TK_MAX), .PM_DEPTH(512), .LB_DEPTH(8)) dut (
    .clk, .rst_n, .pm_we, .pm_waddr, .pm_wdata, .start, .ch_in,
    .il_we, .il_sel, .il_addr, .il_data, .dec_raddr, .dec_rdata,
    .running, .done, .overflow
  );

  initial begin
    #(10 * 2_000_000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    run_case("lte_k40",   0, 40,  3,   10, 0,  0,   4, 4, 1);
    run_case("lte_k200",  0, 200, 13,  50, 0,  0,   5, 4, 2);
    run_case("lte_k400",  0, 400, 151, 40, 0,  0,   5, 4, 2);
    run_case("wimax_n24", 1, 24,  5,   0,  0,  0,   5, 4, 1);
    run_case("wimax_n48", 1, 48,  13,  24, 0,  24,  5, 4, 1);
    run_case("wimax_n96", 1, 96,  7,   48, 24, 72,  5, 4, 2);
    run_case("wimax_n480", 1, 480, 13, 240, 120, 360, 5, 4, 2);
    check_all_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

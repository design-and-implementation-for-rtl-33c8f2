// Full-size end-to-end testbench of the turbo decoder ASIP: the design with
// its default parameters (16 SISOs, windows of 64, blocks up to 6144).
//
// Cases: the largest LTE block (K = 6144, six rounds of sixteen windows, QPP
// f1 = 263, f2 = 480), an LTE block of 1024 (f1 = 31, f2 = 64) and WiMAX duo-binary circular
// blocks of 240 and 480 couples. The same checks as the reduced testbench: decisions
// equal the information, no alignment buffer overflow, run time within the
// window schedule, and every mechanism seen at least once.
module tb_turbo_decoder_asip_full;
  localparam int TP     = 16;
  localparam int TW     = 64;
  localparam int TK_MAX = 6144;

`include "tb_top_body.svh"

  turbo_decoder_asip dut (
    .clk, .rst_n, .pm_we, .pm_waddr, .pm_wdata, .start, .ch_in,
    .il_we, .il_sel, .il_addr, .il_data, .dec_raddr, .dec_rdata,
    .running, .done, .overflow
  );

  initial begin
    #(10 * 5_000_000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    run_case("lte_k6144", 0, 6144, 263, 480, 0,  0,   4, 4, 2);
    run_case("lte_k1024", 0, 1024, 31,  64,  0,  0,   4, 4, 2);
    run_case("wimax_n240", 1, 240, 13,  120, 60, 180, 4, 4, 2);
    run_case("wimax_n480", 1, 480, 13,  240, 120, 360, 4, 4, 2);
    check_all_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

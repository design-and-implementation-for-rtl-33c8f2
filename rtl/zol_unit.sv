// Zero-overhead loop unit: the SPC, EPC, NT and flag registers of one ZOL
// (or, with LOOPNE=1, of the LOOPNE loop).
//
// When the loop instruction executes (`load`), SPC takes the address being
// fetched in that clock (the instruction after the mandatory Nop), EPC takes
// SPC + NRI, NT takes NTR and the flag is set. From then on, whenever the
// fetch stage fetches EPC while the flag is set, the unit decides the next
// fetch address in the same clock, so the loop costs no cycles:
//   ZOL   : NT > 1 -> redirect to SPC and NT <= NT-1; else leave the loop.
//   LOOPNE: buffers not empty -> redirect to SPC; else leave the loop.
// With NRI = 0 the control unit holds the PC for one clock when the loop
// instruction executes (`hold`), so the single body instruction runs once
// before the checks start: NTR+1 passes for NRI = 0 and NTR passes otherwise,
// as the instruction set defines. `fetch_en` is low for a fetch that is being
// squashed by a taken branch, so such a fetch does not count.
module zol_unit
  import tdec_pkg::*;
#(
  parameter bit LOOPNE = 1'b0,
  parameter int NT_W   = 15
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [3:0]      nri,
  input  logic [NT_W-1:0] ntr,
  input  logic [PC_W-1:0] fetch_pc,
  input  logic            fetch_en,
  input  logic            empty,
  output logic            redirect,
  output logic            hold,
  output logic [PC_W-1:0] spc,
  output logic            active
);
  logic [PC_W-1:0] epc;
  logic [NT_W-1:0] nt;
  logic            hit;

  logic            active_q;

  assign active   = active_q;
  assign hit      = active_q && fetch_en && (fetch_pc == epc);
  assign redirect = hit && (LOOPNE ? !empty : (nt > NT_W'(1)));
  assign hold     = load && (nri == 4'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      spc      <= '0;
      epc      <= '0;
      nt       <= '0;
    end else if (load) begin
      active_q <= 1'b1;
      spc      <= fetch_pc;
      epc      <= fetch_pc + PC_W'(nri);
      nt       <= ntr;
    end else if (hit) begin
      if (redirect) begin
        if (!LOOPNE) nt <= nt - NT_W'(1);
      end else begin
        active_q <= 1'b0;
        nt       <= '0;
      end
    end
  end
endmodule

// Control unit of the turbo decoder ASIP.
//
// A three-stage pipeline: fetch (T0) presents the PC to the program memory,
// decode (T1) takes the instruction word from the memory's registered output,
// execute (T2) acts on it. A two-bit sequence counter SC records how far the
// pipeline is filled: after reset, start or a taken branch it restarts at 0,
// so Call, Ret and Goto cost three clocks (the two instructions behind them
// are squashed). In normal operation SC stays at T2 and one instruction
// executes per clock.
//
// Loops cost nothing: three ZOL units (ZOL1..ZOL3, nestable, loop ends must
// differ) and one LOOPNE unit watch the fetch address and steer the next
// fetch. LOOPNE repeats its body while the data alignment block is not
// empty. Call pushes the return address (Call address + 1) on a two-entry
// stack; Ret pops it. Branch offsets are relative to the branch instruction.
// A Goto with offset 0 (a jump to itself) halts the processor and raises
// `done` - this halt convention is this design's own.
//
// Outputs: `ctrl` is the decoded execute-stage control (all zero when no
// instruction executes) and `mode` holds the registers written by
// Initialize, Decode and Config. Initialize writes the mode only when its
// AddInit1 bit is set (the start of a MAP pass), so an Initialize that only
// loads initial metrics leaves the mode alone - this design's choice.
// Instruction field positions are listed in tdec_pkg; opcodes follow the
// instruction set of the document, field positions are this design's.
module control_unit
  import tdec_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic [PC_W-1:0] pm_raddr,
  input  logic [IW-1:0]   pm_rdata,
  input  logic            empty_fifo,
  output ctrl_t           ctrl,
  output mode_t           mode,
  output logic            running,
  output logic            done
);
  logic [PC_W-1:0] pc, d_pc, e_pc;
  logic [1:0]      sc;
  logic [IW-1:0]   e_ir;
  logic            e_valid;
  opcode_e         e_op;
  logic [PC_W-1:0] stack [2];
  logic [1:0]      sp;

  logic            flush;
  logic [PC_W-1:0] flush_target;
  logic            fetch_en;
  logic [PC_W-1:0] next_pc;

  // loop units: 0..2 = ZOL1..ZOL3, 3 = LOOPNE
  logic [3:0]      lp_load, lp_redirect, lp_hold;
  logic [PC_W-1:0] lp_spc [4];
  logic [3:0]      lp_active;

  assign pm_raddr = pc;
  assign e_valid  = running && (sc == 2'd2);
  assign e_op     = opcode_e'(e_ir[IW-1 -: 4]);
  assign fetch_en = running && !flush;

  always_comb begin
    lp_load = '0;
    if (e_valid) begin
      lp_load[0] = (e_op == OP_ZOL1);
      lp_load[1] = (e_op == OP_ZOL2);
      lp_load[2] = (e_op == OP_ZOL3);
      lp_load[3] = (e_op == OP_LOOPNE);
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_loop
    zol_unit #(.LOOPNE(g == 3)) u_zol (
      .clk, .rst_n,
      .load     (lp_load[g]),
      .nri      (e_ir[3:0]),
      .ntr      (e_ir[18:4]),
      .fetch_pc (pc),
      .fetch_en (fetch_en),
      .empty    (empty_fifo),
      .redirect (lp_redirect[g]),
      .hold     (lp_hold[g]),
      .spc      (lp_spc[g]),
      .active   (lp_active[g])
    );
  end

  // taken branches of the execute stage
  always_comb begin
    logic [PC_W-1:0] rel;
    rel          = e_pc + PC_W'(signed'(e_ir[6:0]));
    flush        = 1'b0;
    flush_target = rel;
    if (e_valid) begin
      unique case (e_op)
        OP_CALL: flush = 1'b1;
        OP_GOTO: flush = (e_ir[6:0] != 7'd0);
        OP_RET: begin
          flush        = 1'b1;
          flush_target = stack[sp == 2'd2 ? 1 : 0];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    next_pc = pc + PC_W'(1);
    for (int g = 0; g < 4; g++) if (lp_redirect[g]) next_pc = lp_spc[g];
    if (|lp_hold) next_pc = pc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      pc      <= '0;
      d_pc    <= '0;
      e_pc    <= '0;
      e_ir    <= '0;
      sc      <= '0;
      sp      <= '0;
      stack[0] <= '0;
      stack[1] <= '0;
    end else if (start) begin
      running <= 1'b1;
      done    <= 1'b0;
      pc      <= '0;
      sc      <= '0;
      sp      <= '0;
    end else if (running) begin
      if (e_valid && e_op == OP_GOTO && e_ir[6:0] == 7'd0) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
      if (flush) begin
        pc <= flush_target;
        sc <= '0;
      end else begin
        pc <= next_pc;
        if (sc != 2'd2) sc <= sc + 2'd1;
      end
      d_pc <= pc;
      e_pc <= d_pc;
      e_ir <= pm_rdata;
      if (e_valid && e_op == OP_CALL && sp != 2'd2) begin
        stack[sp[0]] <= e_pc + PC_W'(1);
        sp           <= sp + 2'd1;
      end
      if (e_valid && e_op == OP_RET && sp != 2'd0) sp <= sp - 2'd1;
    end
  end

  // mode registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode <= '0;
    end else if (start) begin
      mode.decode_phase <= 1'b0;
    end else if (e_valid) begin
      case (e_op)
        OP_INIT: if (e_ir[0]) begin
          mode.duo      <= e_ir[1];
          mode.sel_map  <= e_ir[3];
          mode.iter1    <= e_ir[5];
          mode.circular <= e_ir[10];
        end
        OP_DECODE: mode.decode_phase <= 1'b1;
        OP_CONFIG: begin
          if (e_ir[5:3] == CFG_GAMMA) mode.use_w <= e_ir[6];
          if (e_ir[5:3] == CFG_KLEN)  mode.k_len <= e_ir[6 +: AW];
        end
        default: ;
      endcase
    end
  end

  // decoded control of the execute stage
  always_comb begin
    ctrl = '0;
    if (e_valid) begin
      case (e_op)
        OP_PARSISO: begin
          ctrl.par       = 1'b1;
          ctrl.addgen    = e_ir[1:0];
          ctrl.pmode     = e_ir[4];
          ctrl.bwd_cntr  = e_ir[8:7];
          ctrl.bk_active = e_ir[12:9];
          ctrl.fwd_cntr  = e_ir[14:13];
          ctrl.fr_active = e_ir[18:15];
          ctrl.llr_en    = e_ir[19];
          ctrl.border    = e_ir[21:20];
        end
        OP_INIT: begin
          ctrl.init       = 1'b1;
          ctrl.addinit1   = e_ir[0];
          ctrl.decode_duo = e_ir[1];
          ctrl.addinit2   = e_ir[2];
          ctrl.sel_map    = e_ir[3];
          ctrl.addinit3   = e_ir[4];
          ctrl.iter1      = e_ir[5];
          ctrl.strab      = e_ir[6];
          ctrl.addinit4   = e_ir[7];
          ctrl.init_alpha = e_ir[8];
          ctrl.init_beta  = e_ir[9];
          ctrl.circular   = e_ir[10];
        end
        OP_MOV: begin
          ctrl.mov    = 1'b1;
          ctrl.addval = e_ir[AW-1:0];
        end
        OP_STRDATA: begin
          ctrl.strdata = 1'b1;
          ctrl.endec   = e_ir[7:0];
        end
        OP_DECODE: ctrl.decode = 1'b1;
        OP_CONFIG: begin
          ctrl.config_en  = 1'b1;
          ctrl.config_m   = e_ir[5:0];
          ctrl.config_val = e_ir[25:6];
        end
        default: ;
      endcase
    end
  end

  // A Call may not overflow the two-entry stack, a Ret may not underflow it
  always_ff @(posedge clk) begin
    if (rst_n && e_valid && e_op == OP_CALL) assert (sp != 2'd2) else $error("call stack overflow");
    if (rst_n && e_valid && e_op == OP_RET)  assert (sp != 2'd0) else $error("call stack underflow");
  end
endmodule

// Testbench support package for the turbo decoder ASIP.
//
// What it holds:
//   * instruction encoders that build 58-bit program words in the field layout
//     the control unit decodes (opcode in the top four bits);
//   * reference encoders for the two constituent codes used in the tests
//     (3GPP LTE / HSPA 8-state single-binary RSC, and an 8-state duo-binary
//     circular RSC of the WiMAX / DVB-RCS kind) and the trellis configuration
//     words derived from them;
//   * the LTE QPP interleaver and the WiMAX two-step (ARP) interleaver;
//   * a program generator that writes the whole decoding program (load the
//     trellis, store the channel data, iterate MAP1/MAP2 through a
//     subroutine, wait for the alignment buffers, halt).
// The encoders are written independently of the RTL; the configuration words
// are computed from them, so a wrong trellis in the hardware shows up as a
// decoding failure.
package tb_tdec_pkg;
  import tdec_pkg::*;

  typedef logic [IW-1:0] instr_t;

  function automatic instr_t op(input opcode_e o, input logic [53:0] f);
    return {o, f};
  endfunction

  function automatic instr_t i_nop();
    return op(OP_NOP, '0);
  endfunction
  // ZOL / LOOPNE: NRI = number of further instructions in the body, NTR = count
  function automatic instr_t i_zol(input int unit, input int ntr, input int nri);
    opcode_e o;
    o = (unit == 1) ? OP_ZOL1 : (unit == 2) ? OP_ZOL2 : OP_ZOL3;
    return op(o, 54'({15'(ntr), 4'(nri)}));
  endfunction
  function automatic instr_t i_loopne(input int nri);
    return op(OP_LOOPNE, 54'(4'(nri)));
  endfunction
  function automatic instr_t i_call(input int off);
    return op(OP_CALL, 54'(7'(off)));
  endfunction
  function automatic instr_t i_goto(input int off);
    return op(OP_GOTO, 54'(7'(off)));
  endfunction
  function automatic instr_t i_ret();
    return op(OP_RET, '0);
  endfunction
  function automatic instr_t i_mov(input int a);
    return op(OP_MOV, 54'(13'(a)));
  endfunction
  function automatic instr_t i_strdata(input logic [7:0] en);
    return op(OP_STRDATA, 54'(en));
  endfunction
  function automatic instr_t i_decode();
    return op(OP_DECODE, '0);
  endfunction
  function automatic instr_t i_config(input logic [2:0] tgt, input logic [2:0] idx,
                                      input logic [19:0] val);
    return op(OP_CONFIG, 54'({val, tgt, idx}));
  endfunction

  // Initialize flags
  localparam int IN_ADDINIT1 = 0, IN_DUO = 1, IN_ADDINIT2 = 2, IN_SELMAP = 3,
                 IN_ITER1 = 5, IN_ADDINIT4 = 7, IN_ALPHA = 8, IN_BETA = 9, IN_CIRC = 10;
  function automatic instr_t i_init(input logic [10:0] flags);
    return op(OP_INIT, 54'(flags));
  endfunction

  // ParSISO: all P SISOs, forward/backward/LLR enables, border transfer
  function automatic instr_t i_par(input int p, input bit fwd, input bit bwd, input bit llr,
                                   input bit border, input bit duo);
    logic [21:0] f;
    f = '0;
    f[0]     = fwd;
    f[1]     = bwd;
    f[4]     = duo;
    f[8:7]   = bwd ? 2'b10 : 2'b00;   // thermometer: SISOs 0..value
    f[12:9]  = 4'(p - 1);
    f[14:13] = fwd ? 2'b10 : 2'b00;
    f[18:15] = 4'(p - 1);
    f[19]    = llr;
    f[21:20] = border ? 2'b11 : 2'b00;
    if (border) begin
      f[14:13] = 2'b10;
      f[8:7]   = 2'b10;
    end
    return op(OP_PARSISO, 54'(f));
  endfunction

  // ---------------- constituent codes ----------------
  // single binary 3GPP: feedback 1+D^2+D^3, parity 1+D+D^3; state {d1,d2,d3}
  function automatic int sb_next(input int s, input int u);
    int d1, d2, d3, f;
    d1 = (s >> 2) & 1; d2 = (s >> 1) & 1; d3 = s & 1;
    f  = u ^ d2 ^ d3;
    return (f << 2) | (d1 << 1) | d2;
  endfunction
  function automatic int sb_par(input int s, input int u);
    int d1, d2, d3, f;
    d1 = (s >> 2) & 1; d2 = (s >> 1) & 1; d3 = s & 1;
    f  = u ^ d2 ^ d3;
    return f ^ d1 ^ d3;
  endfunction

  // duo-binary: input couple j = {A,B}; state {s1,s2,s3}
  function automatic int db_next(input int s, input int j);
    int s1, s2, s3, a, b, n1;
    s1 = (s >> 2) & 1; s2 = (s >> 1) & 1; s3 = s & 1;
    a  = (j >> 1) & 1; b = j & 1;
    n1 = a ^ b ^ s1 ^ s3;
    return (n1 << 2) | ((s1 ^ b) << 1) | (s2 ^ b);
  endfunction
  function automatic int db_y(input int s, input int j);
    int n;
    n = db_next(s, j);
    return ((n >> 2) ^ (s >> 1) ^ s) & 1;
  endfunction
  function automatic int db_w(input int s, input int j);
    int n;
    n = db_next(s, j);
    return ((n >> 2) ^ s) & 1;
  endfunction

  // trellis configuration words: forward = predecessors, backward = successors
  function automatic logic [19:0] cfg_word(input bit duo, input bit fwd, input int s);
    br_cfg_t b [4];
    for (int k = 0; k < 4; k++) b[k] = '0;
    for (int k = 0; k < (duo ? 4 : 2); k++) begin
      if (fwd) begin
        for (int p = 0; p < 8; p++)
          if ((duo ? db_next(p, k) : sb_next(p, k)) == s) begin
            b[k].st = 3'(p);
            b[k].y  = duo ? 1'(db_y(p, k)) : 1'(sb_par(p, k));
            b[k].w  = duo ? 1'(db_w(p, k)) : 1'b0;
          end
      end else begin
        b[k].st = duo ? 3'(db_next(s, k)) : 3'(sb_next(s, k));
        b[k].y  = duo ? 1'(db_y(s, k)) : 1'(sb_par(s, k));
        b[k].w  = duo ? 1'(db_w(s, k)) : 1'b0;
      end
    end
    return {b[3], b[2], b[1], b[0]};
  endfunction

  // LTE QPP interleaver: pi(i) = (f1*i + f2*i^2) mod K
  function automatic int qpp(input int i, input int k, input int f1, input int f2);
    longint v;
    v = (longint'(f1) * i + longint'(f2) * i * i) % k;
    return int'(v);
  endfunction

  // WiMAX interleaver step 2: P(j) for couple j of N
  function automatic int arp(input int j, input int n, input int p0, input int p1,
                             input int p2, input int p3);
    int v;
    case (j % 4)
      0: v = (p0 * j + 1) % n;
      1: v = (p0 * j + 1 + n / 2 + p1) % n;
      2: v = (p0 * j + 1 + p2) % n;
      default: v = (p0 * j + 1 + n / 2 + p3) % n;
    endcase
    return v;
  endfunction

  // ---------------- program generator ----------------
  // Builds the decoding program into prog[]; returns its length.
  //   k     : block length (bits, or couples for duo-binary)
  //   p, w  : SISO count and window length of the hardware
  //   iters : full iterations (>= 2)
  function automatic int gen_program(ref instr_t prog [], input int k, input int p,
                                     input int w, input bit duo, input bit circ,
                                     input int iters);
    int n, r, ph, sub, lp_body, call_at;
    logic [10:0] base;
    n  = 0;
    r  = (k + p * w - 1) / (p * w);
    ph = duo ? 2 : 1;
    prog = new[256];
    for (int i = 0; i < 256; i++) prog[i] = i_nop();
    base = '0;
    base[IN_ADDINIT1] = 1'b1;
    base[IN_ADDINIT2] = 1'b1;
    base[IN_DUO]      = duo;
    base[IN_CIRC]     = circ;
    // configuration
    prog[n++] = i_config(CFG_GAMMA, 3'd0, 20'(duo));
    for (int s = 0; s < 8; s++) prog[n++] = i_config(CFG_ALPHA, 3'(s), cfg_word(duo, 1, s));
    for (int s = 0; s < 8; s++) prog[n++] = i_config(CFG_BETA, 3'(s), cfg_word(duo, 0, s));
    prog[n++] = i_config(CFG_KLEN, 3'd0, 20'(k));
    // store the channel data: k StrData (NRI = 0 runs NTR + 1 times)
    prog[n++] = i_mov(0);
    prog[n++] = i_zol(1, k - 1, 0);
    prog[n++] = i_nop();
    prog[n++] = i_strdata(8'hFF);
    // first iteration: MAP1 with zero a-priori, MAP2; borders cleared
    prog[n++] = i_init(base | (11'd1 << IN_ITER1) | (11'd1 << IN_ADDINIT4));
    call_at = n; prog[n++] = i_call(0);   // patched below
    prog[n++] = i_nop(); prog[n++] = i_nop();
    prog[n++] = i_init(base | (11'd1 << IN_SELMAP) | (11'd1 << IN_ADDINIT4));
    prog[n++] = i_call(0);
    prog[n++] = i_nop(); prog[n++] = i_nop();
    // middle iterations in a zero-overhead loop
    if (iters > 2) begin
      lp_body = 8;
      prog[n++] = i_zol(1, iters - 2, lp_body - 1);
      prog[n++] = i_nop();
      prog[n++] = i_init(base);
      prog[n++] = i_call(0);
      prog[n++] = i_nop(); prog[n++] = i_nop();
      prog[n++] = i_init(base | (11'd1 << IN_SELMAP));
      prog[n++] = i_call(0);
      prog[n++] = i_nop(); prog[n++] = i_nop();
    end
    // last iteration: hard decisions are written by the final MAP2
    prog[n++] = i_init(base);
    prog[n++] = i_call(0);
    prog[n++] = i_nop(); prog[n++] = i_nop();
    prog[n++] = i_decode();
    prog[n++] = i_init(base | (11'd1 << IN_SELMAP));
    prog[n++] = i_call(0);
    prog[n++] = i_nop(); prog[n++] = i_nop();
    prog[n++] = i_goto(0);                // halt
    prog[n++] = i_nop(); prog[n++] = i_nop();
    // MAP subroutine (first parallel scheme)
    sub = n;
    prog[n++] = i_init(11'd1 << IN_BETA);
    prog[n++] = i_zol(2, w * ph - 1, 0);
    prog[n++] = i_nop();
    prog[n++] = i_par(p, 0, 1, 0, 0, duo);
    prog[n++] = i_par(p, 0, 0, 0, 1, duo);
    if (r > 1) begin
      prog[n++] = i_zol(2, r - 1, 4);
      prog[n++] = i_nop();
      prog[n++] = i_init((11'd1 << IN_ALPHA) | (11'd1 << IN_BETA));
      prog[n++] = i_zol(3, w * ph - 1, 0);
      prog[n++] = i_nop();
      prog[n++] = i_par(p, 1, 1, 1, 0, duo);
      prog[n++] = i_par(p, 0, 0, 0, 1, duo);
    end
    prog[n++] = i_init(11'd1 << IN_ALPHA);
    prog[n++] = i_zol(3, w * ph - 1, 0);
    prog[n++] = i_nop();
    prog[n++] = i_par(p, 1, 0, 1, 0, duo);
    prog[n++] = i_par(p, 0, 0, 0, 1, duo);
    prog[n++] = i_loopne(0);
    prog[n++] = i_nop();
    prog[n++] = i_nop();
    prog[n++] = i_ret();
    prog[n++] = i_nop(); prog[n++] = i_nop();
    // patch the call offsets
    for (int a = call_at; a < sub; a++)
      if (prog[a][IW-1 -: 4] == OP_CALL) prog[a] = i_call(sub - a);
    return n;
  endfunction
endpackage

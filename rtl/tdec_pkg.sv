// Shared types and constants of the multi-standard turbo decoder ASIP.
//
// Fixed-point widths follow the decoder's quantisation: 4-bit channel soft
// values, 6-bit extrinsic LLRs and 8-bit state metrics. Branch metrics are
// 8 bits wide (this design's choice: the largest branch metric, four channel
// values plus one a-priori LLR, fits in 8 signed bits). A trellis is held as a
// configuration table: for each of the 8 states and each of up to 4 branches,
// the neighbouring state and the two parity bits of that branch.
//
// The instruction word is 50 + 2*log2(P) = 58 bits for up to 16 SISOs; the
// opcode sits in the top four bits with the encodings of the instruction set.
// Field positions below the opcode are this design's own layout.
package tdec_pkg;

  localparam int CH_W   = 4;   // channel soft value
  localparam int LLR_W  = 6;   // extrinsic LLR
  localparam int SM_W   = 8;   // state metric
  localparam int G_W    = 8;   // branch metric
  localparam int NST    = 8;   // trellis states
  localparam int AW     = 13;  // block address (positions up to 8191)
  localparam int SIDX_W = 4;   // log2 of the largest SISO count
  localparam int IW     = 50 + 2 * SIDX_W;  // instruction width
  localparam int PC_W   = 9;   // 512-word program memory

  typedef logic signed [CH_W-1:0]  ch_t;
  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [SM_W-1:0]  sm_t;
  typedef logic signed [G_W-1:0]   gam_t;

  typedef sm_t  [NST-1:0] smv_t;     // metrics of all states
  typedef gam_t [7:0]     gamv_t;    // 8 branch metrics of one phase, index {j_lsb,y,w}

  // Channel word: stream 0..7 = A, B, Y, W, AInt, BInt, YInt, WInt
  typedef ch_t [7:0] ch_word_t;

  // Trellis configuration of one branch: neighbour state and its parity bits
  typedef struct packed {
    logic [2:0] st;
    logic       y;
    logic       w;
  } br_cfg_t;
  typedef br_cfg_t [3:0]     st_cfg_t;   // branches 0..3 (input symbol j = branch)
  typedef st_cfg_t [NST-1:0] tr_cfg_t;   // whole trellis, 160 bits

  // Extrinsic word kept per position: LLRs of symbols 01, 10, 11 plus decisions
  typedef struct packed {
    logic [1:0] hard;   // [0] = A (or the single-binary bit), [1] = B
    llr_t       e11;
    llr_t       e10;
    llr_t       e01;    // single-binary LLR lives here
  } llr_word_t;

  // A write request of one extrinsic word to a block position
  typedef struct packed {
    logic            valid;
    logic [AW-1:0]   addr;
    llr_word_t       data;
  } llr_wr_t;

  // Opcodes
  typedef enum logic [3:0] {
    OP_NOP     = 4'b0000,
    OP_ZOL1    = 4'b0001,
    OP_STRDATA = 4'b0010,
    OP_ZOL2    = 4'b0011,
    OP_INIT    = 4'b0100,
    OP_PARSISO = 4'b0101,
    OP_CALL    = 4'b0110,
    OP_RET     = 4'b0111,
    OP_MOV     = 4'b1000,
    OP_ZOL3    = 4'b1001,
    OP_LOOPNE  = 4'b1010,
    OP_GOTO    = 4'b1011,
    OP_DECODE  = 4'b1100,
    OP_CONFIG  = 4'b1101
  } opcode_e;

  // Config instruction targets (ConfigM[5:3]); ConfigM[2:0] selects a state
  localparam logic [2:0] CFG_GAMMA = 3'd0;  // ConfigVal[0] = use second parity W
  localparam logic [2:0] CFG_ALPHA = 3'd1;  // ConfigVal[19:0] = st_cfg_t of a state
  localparam logic [2:0] CFG_BETA  = 3'd2;
  localparam logic [2:0] CFG_KLEN  = 3'd3;  // ConfigVal[12:0] = block length

  // Decoded execute-stage control
  typedef struct packed {
    // ParSISO
    logic              par;
    logic [1:0]        border;      // [0] forward, [1] backward border transfer
    logic              llr_en;
    logic [SIDX_W-1:0] fr_active;
    logic [1:0]        fwd_cntr;    // {enable, ind}
    logic [SIDX_W-1:0] bk_active;
    logic [1:0]        bwd_cntr;    // {enable, ind}
    logic              pmode;       // two-phase (duo-binary) operation
    logic [1:0]        addgen;      // [0] forward, [1] backward address advance
    // Initialize
    logic              init;
    logic              addinit1, decode_duo, addinit2, sel_map, addinit3, iter1;
    logic              strab, addinit4, init_alpha, init_beta, circular;
    // Mov / StrData / Decode / Config
    logic              mov;
    logic [AW-1:0]     addval;
    logic              strdata;
    logic [7:0]        endec;
    logic              decode;
    logic              config_en;
    logic [5:0]        config_m;
    logic [19:0]       config_val;
  } ctrl_t;

  // Mode registers written by Initialize, Decode and Config
  typedef struct packed {
    logic          duo;
    logic          use_w;
    logic          circular;
    logic          iter1;
    logic          sel_map;
    logic          decode_phase;
    logic [AW-1:0] k_len;
  } mode_t;

  // Saturate a wide signed value to LLR_W bits
  function automatic llr_t sat_llr(input logic signed [15:0] v);
    if (v > 16'sd31) return llr_t'(31);
    if (v < -16'sd32) return llr_t'(-32);
    return llr_t'(v);
  endfunction

  function automatic sm_t sat_sm(input logic signed [15:0] v);
    if (v > 16'sd127) return sm_t'(127);
    if (v < -16'sd128) return sm_t'(-128);
    return sm_t'(v);
  endfunction

endpackage

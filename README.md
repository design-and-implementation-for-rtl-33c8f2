# Multi-standard turbo decoder ASIP (SystemVerilog)

This is a turbo decoder built as a small application-specific processor. A
program in an on-chip program memory drives an array of P soft-in/soft-out
(SISO) decoders in lock-step. The same hardware decodes two kinds of code:

- single-binary turbo codes (LTE, HSPA, CDMA2000 style) at one bit per clock
  per SISO;
- duo-binary circular turbo codes (WiMAX, DVB-RCS style) at one couple per
  two clocks per SISO.

The trellis is not fixed in hardware: the program loads it with `Config`
instructions.

The default configuration is the decoder's main operating point:

| parameter | value |
|---|---|
| SISOs `P` | 16 |
| window `W` | 64 |
| largest block `K_MAX` | 6144 |
| channel values | 4 bits |
| extrinsic LLRs | 6 bits |
| state metrics | 8 bits |
| program memory | 512 x 58 bits |
| algorithm | max-log-MAP with the extrinsic scaled by 0.75 |

## Architecture

```
 program_memory -> control_unit --ctrl/mode--> siso[0..P-1] (SIMD)
                    |  3 x ZOL, LOOPNE                |  |  ^
                    |  call stack                     |  |  | channel, a-priori,
                    +-- sim_decoder x2 (SISO enables) |  |  | interleaver reads
                                                      |  |  |
 channel_memory  -------------------------------------+--|--+
 interleaver_memory ---------------------------------------+
 llr_memory (2 x) <-- data_alignment <-- extrinsic writes --+
 border_interface <--> window-border metrics of all SISOs
```

### Control unit (`control_unit`, `zol_unit`, `program_memory`, `sim_decoder`)

- **Pipeline.** Three stages: fetch, decode and execute. A sequence counter
  tracks how full the pipeline is.
- **Branches.** `Call`, `Ret` and a taken `Goto` flush the two younger
  stages, so each costs three clocks.
- **Loops.** Three zero-overhead loop units (`ZOL1..3`, nestable) and one
  `LOOPNE` unit compare the fetch address with their loop-end register. They
  redirect the next fetch without any cycle of overhead.
- **LOOPNE.** This loop repeats while the extrinsic write path is still busy:
  alignment buffers not empty, or LLR pipelines still in flight.
- **Halt.** A `Goto` with offset 0 halts the processor and raises `done`.
- **SISO selection.** `ParSISO` selects the SISOs that run the forward and
  backward recursions through two SimDecoders. Each decoder has two modes:
  one SISO (one-hot), or SISOs 0..n.

Opcodes (top four bits of the 58-bit word):

| opcode | name | opcode | name |
|---|---|---|---|
| 0000 | NOP | 0111 | Ret |
| 0001 | ZOL1 | 1000 | Mov |
| 0010 | StrData | 1001 | ZOL3 |
| 0011 | ZOL2 | 1010 | LOOPNE |
| 0100 | Initialize | 1011 | Goto |
| 0101 | ParSISO | 1100 | Decode |
| 0110 | Call | 1101 | Config |

Field positions are this design's own. They are listed in `rtl/tdec_pkg.sv`
and built by the encoder functions in `tb/tb_tdec_pkg.sv`.

Program rules:

- One NOP follows a ZOL or LOOPNE.
- Two NOPs follow `Call`, `Ret` and `Goto`.
- A loop end must not sit directly behind a control transfer.
- A loop with `NRI = 0` (single-instruction body) runs `NTR + 1` times.
- Any other loop runs `NTR` times.

### SISO (`siso`, `branch_metric_unit`, `state_metric_unit`, `state_metric_memory`, `llr_unit`)

The SISOs use the first parallel scheme. In each step of W cycles, the
backward recursion of window r+1 runs beside the forward recursion and the
LLR output of window r. A SISO therefore writes at most one extrinsic value
per clock. The stages are:

| stage | what happens |
|---|---|
| AG | address generation |
| BM | registered memory data; two branch metric units (forward and backward) |
| SM | two state metric units of eight configurable radix-2 ACS each; the backward metrics go into the state metric memory |
| LLR1..3 | sums, maximum, then extrinsic / scale / saturate |
| WB | write request with the interleaved target address |

- **Duo-binary.** A couple takes two clocks. A temporary register in the ACS
  units keeps the first half of the radix-4 compare.
- **State metric memory.** Its address direction alternates from window to
  window. This lets the write of one window and the read of the previous one
  share a simple dual-port memory.
- **Normalisation.** The state metrics subtract state 0's value on every
  update and saturate to 8 bits.

### Memories and interconnect

- **Window mapping.** Window g of a block goes to SISO g mod P in round
  g div P, so a position is {round, SISO, offset}. All memories are banked
  per SISO.
- **Read ports.** Every bank is split into even-round and odd-round halves.
  The forward and backward reads of a SISO then always hit different halves.
- **`channel_memory`.** Holds the eight soft-value streams A, B, Y, W, AInt,
  BInt, YInt and WInt. It is written one position per `StrData`.
- **`llr_memory`.** Has two memories. MAP1 reads memory 0 and writes memory 1
  in interleaved order. MAP2 reads memory 1 and writes memory 0 in natural
  order. Memory 0 also holds the hard decisions, which are read out through
  `dec_raddr`/`dec_rdata`.
- **`interleaver_memory`.** Holds two loadable tables: de-interleave for MAP1
  and interleave for MAP2. Each entry has a swap flag that exchanges the A
  and B extrinsics of a couple (the WiMAX couple swap).
- **`data_alignment`.** The interleaver makes several SISOs address the same
  bank in one clock. The block keeps one FIFO per (source SISO, target bank)
  pair, 8 entries deep. Each bank's `bank_selector` drains the lowest
  non-empty source ("selector from low"), one word per clock. The block also
  provides the empty flag for `LOOPNE`, a conflict flag and a sticky overflow
  flag.
- **`border_interface`.** Holds the border memories of the NII (next
  iteration initialisation) scheme. At the end of a step:
  - the final forward metrics of window g go to window g+1;
  - the backward metrics at the start of window g go to window g-1;
  - in circular mode, the last window and window 0 exchange metrics.

  `Initialize` with AddInit4 clears the valid bits of one decoder's entries.
  An entry that has not been written since reads as equiprobable.
  Window 0 of a non-circular code starts in state 0.

### Decoding program

`tb/tb_tdec_pkg.sv::gen_program` writes the program used in the tests. In
order, it:

1. loads the trellis and the block length (`Config`);
2. stores K channel words with one `StrData` in a ZOL;
3. runs iteration 1 as MAP1 then MAP2, each an `Initialize` plus a `Call` of
   the MAP subroutine;
4. runs the middle iterations in a ZOL;
5. runs the last iteration, with `Decode` before its final MAP2;
6. halts.

The MAP subroutine runs in this order:

1. a backward-only step;
2. (rounds - 1) full steps in an outer ZOL, with the ParSISO of each step in
   an inner ZOL;
3. a forward-only step;
4. a `LOOPNE` that waits for the last extrinsic writes;
5. `Ret`.

## Interface of the top (`turbo_decoder_asip`)

| port | dir | meaning |
|---|---|---|
| `pm_we/pm_waddr/pm_wdata` | in | load the program |
| `il_we/il_sel/il_addr/il_data` | in | load interleaver table `il_sel` (13-bit address + swap bit) |
| `start` | in | run the program from address 0 |
| `ch_in` | in | eight 4-bit soft values, taken by each `StrData` at the address set by `Mov` (the address then increments) |
| `dec_raddr/dec_rdata` | in/out | hard decisions in natural order, one clock latency (`[0]` = bit or A, `[1]` = B) |
| `running/done` | out | status; `done` after the halt |
| `overflow` | out | an alignment buffer overflowed (program or sizing error) |

Soft values are positive for a 1.

## What follows the document and what is this design's choice

**Taken from the document:**

- the ASIP structure;
- the instruction set, its opcodes, the loop semantics (including the
  NTR+1 case) and the LOOPNE/EmptyFIFO wait;
- the two-entry call stack and the SimDecoder modes;
- the sliding-window schedule of the first parallel scheme;
- the data alignment with line buffers and per-bank "selector from low";
- the NII border memories;
- radix-2 state metric units that take two clocks per duo-binary couple;
- the three-stage LLR unit;
- the quantisation, P, W, K_MAX and program memory size.

**This design's own choices:**

- the instruction field positions;
- the halt convention;
- `Initialize` changing the mode only with AddInit1;
- the per-branch trellis configuration word: 3-bit neighbour state plus
  2 parity-select bits;
- normalisation to state 0;
- line buffer depth 8;
- the round-robin window-to-SISO mapping;
- the even/odd bank split;
- the host load ports;
- K given by `Config`;
- padding of the last window;
- the swap bit in the interleaver entries.

**Test codes.** The LTE test code uses the 3GPP constituent encoder: feedback
1+D^2+D^3, parity 1+D+D^3. The duo-binary test code is an 8-state circular
recursive code with feedback 1+D+D^3 in WiMAX form. Both trellises are
loaded by the program, so other codes of 8 states need no hardware change.

## Not implemented

- **Second parallel scheme.** The delay buffers and double-speed memory clock
  belong to this scheme, which the decoder does not use.
- **LTE trellis termination (tail bits).** The last window starts from
  equiprobable states instead.
- **Blocks above 6144 positions.** DVB-SH 12282 and the long CDMA2000 blocks
  do not fit the default K_MAX.

## Verification

Every block has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_branch_metric_unit`, `tb_state_metric_unit`, `tb_llr_unit` | against arithmetic reference models |
| `tb_siso` | one window against a reference max-log-MAP |
| `tb_zol_unit`, `tb_control_unit` | loop counts, call/return, LOOPNE wait, mode registers |
| memory testbenches | against reference arrays |
| `tb_border_interface` | against a routing model |
| `tb_data_alignment` | every write delivered once to the right bank; conflict flag |

The end-to-end testbenches encode random blocks, add noise, decode them and
require error-free decisions:

- `tb_turbo_decoder_asip` runs at reduced size (P=4, W=16): LTE K=40/200/400
  and WiMAX N=24/48/96/480.
- `tb_turbo_decoder_asip_full` runs at the default parameters: LTE K=6144 and
  K=1024, and WiMAX N=240 and N=480 circular.

Both also check the run time against the window schedule. They count each
mechanism and fail if one never happened:

- alignment stalls;
- LOOPNE waits;
- bank conflicts;
- duo-binary mode;
- circular wrap;
- call/return;
- ZOL and nested ZOL;
- padding.

At full size, K=6144 decodes (4 iterations) in 3995 clocks after the channel
store. That is 154 Mbit/s at 100 MHz, against 171 Mbit/s from the schedule
formula without overhead.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/tdec_pkg.sv tb/tb_tdec_pkg.sv \
  tb/tb_turbo_decoder_asip.sv -y rtl --top-module tb_turbo_decoder_asip
./obj_dir/Vtb_turbo_decoder_asip
```

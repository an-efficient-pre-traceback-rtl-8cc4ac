# Viterbi decoder with a pre-traceback survivor memory

Most of the area and energy of a Viterbi decoder with a large constraint
length goes into the survivor-path memory unit (SMU): the store of one
decision bit per trellis state per step, and the reads that trace the
survivor path back through it. A conventional two-pointer traceback SMU reads
every stored bit twice: once in a *traceback* pass whose only purpose is to
find a reliable starting state, and once in the *decode* pass that actually
produces output bits. It needs four memory blocks of L columns and has a
latency of 4L steps.

This design removes the traceback pass. A bank of *pointer registers*, one
per trellis state, follows the survivor paths **forward** while the decision
bits are being written, so that when a block of L columns is finished the
starting state of the decode is already known. Only writes and decode reads
touch the memory; the memory shrinks to three blocks (3L columns) and the
latency to 3L steps.

The RTL is a complete rate-1/2, 3-bit soft-decision decoder: branch metric
unit, add-compare-select array, path metric registers and the pre-traceback
SMU. The default size is constraint length K = 7 (64 states, 133/171 octal
generators as in IEEE 802.11a) with decoding depth L = 64. Everything is
parameterised by K and L.

## The pointer registers

States are K-1 bits wide with the newest input bit in the LSB. Going back one
step from state `s` along decision bit `d` gives the predecessor
`{d, s >> 1}`; the ACS stores, for each state, the `d` of its surviving
predecessor.

Pointer register `P[i]` (K-1 bits) holds "the state at the start of the
current block from which state `i`'s survivor path comes". It is updated on
every write step `n` together with the memory write:

```
P_n[i] = {d_n[i], i >> 1}               on the first step of a block
P_n[i] = P_{n-1}[ {d_n[i], i >> 1} ]    on every other step
```

In hardware this is, per state, an N-to-1 multiplexer over the previous
register values, selected by the state's predecessor index, feeding a
flip-flop (`ptb_pointer_reg`). The first-step rule is the same update with
the previous registers replaced by the identity (`P[j] = j`), which lets one
register array serve consecutive blocks without a separate initialisation
step.

After the last step of a block, every `P[i]` is the state at the start of the
block reached by tracing back from `i`. Once the survivor paths have merged
(which is what a decoding depth of about 5K or more ensures), all registers
hold the same state. The decoder takes `P[0]`; the end-to-end test counts how
often all registers actually agree (at K = 7, L = 64 they agreed at every
block boundary).

Four-state example (K = 3). With these decision bits for states 00, 01, 10,
11 over five steps,

| step | d(00) d(01) d(10) d(11) | P after the step |
|------|--------------------------|------------------|
| 1    | 0 1 0 1                  | 0 2 1 3          |
| 2    | 0 1 1 0                  | 0 1 3 2          |
| 3    | 1 0 1 1                  | 3 0 2 2          |
| 4    | 1 0 0 1                  | 2 3 0 2          |
| 5    | 0 1 0 1                  | 2 0 3 2          |

`P[2] = 3` after step 5 says that state 10 at the end goes back to state 11
at the start; a step-by-step traceback gives the same: 10 → 01 → 00 → 10 →
11 → 11. `tb_ptb_pointer_reg` replays this example.

## The three-bank schedule

The survivor memory (`survivor_mem`) is 3L columns of N = 2^(K-1) bits,
seen as banks 0, 1, 2 of L columns each. Blocks of L steps rotate through the
banks (`smu_ctrl`); block k is written into bank k mod 3.

| while block k is written into bank | the pointer registers | the decoder reads bank |
|---|---|---|
| k mod 3, columns 0 → L-1 | follow block k | (k-2) mod 3, columns L-1 → 0 |

The bank not written or read in a block holds block k-1: its decisions have
been written, but the start state for decoding it only becomes known when
block k is complete. On the first step of block k+1, `P[0]` (the state at the
end of block k-1) is copied into the DC start register and the decode of
block k-1 begins; the pointer registers restart on the same step.

## Decode and bit reversal

`dc_unit` reads one column per step, from the last column of the bank to the
first. For the column of step n and the state S_n on the survivor path, it
outputs S_n[0] (the input bit of step n) and steps back to
`{column[S_n], S_n >> 1}`. The first state comes from the DC start register,
later ones from a running state register; because these are separate, a new
decode can start on the same step the previous one consumes its last column,
and decodes run back to back.

The memory read is registered, so each column is used one step after its
address is issued. The decoded bits come out newest first. `lifo` has two
L-bit stacks: one is filled by the decoder while the other, holding the
previous block, is popped at one bit per step, so the output is a continuous
stream in transmission order.

### Latency

For the column written at SMU step n, the decoded bit leaves at SMU step
n + 3L + 1, the same for every bit. The 3L is the schedule (one block of
waiting for its pointer result, one block of decoding, one block in the
LIFO), and the extra step is the registered memory read. At the top level one
more cycle is added by the register between the ACS and the SMU. The
published figure for this architecture is 3L; the +1 is this
implementation's.

## The datapath in front of the SMU

* `bmu` — Symbols are 3-bit offset binary (0 = confident '0', 7 = confident
  '1'). For each of the four code-bit pairs the metric is the sum of the two
  per-symbol distances (r for a '0', 7 - r for a '1').
* `acs` — One add-compare-select per state, all states in one clock. Path
  metrics are 10-bit modulo numbers compared through the sign of their
  difference, so no normalisation is needed while the metric spread stays
  below 512 (it is at most (K-1)·14 plus the reset bias). Ties take the
  predecessor with top bit 0.
* `pmu` — The path metric registers. Reset puts state 0 at 0 and all others
  at 64, matching an encoder that starts in state 0.
* `vd_pkg` — Trellis helpers (predecessor, branch code bits) and default
  generators for K = 3..9 (7/5, 17/15, 23/35, 53/75, 133/171, 247/371,
  561/753 octal).

The soft-value coding, distance measure, metric width, tie rule, reset values
and generator polynomials are choices of this implementation. The
pre-traceback architecture needs only a decision vector per step; any
ACS that supplies `dec[i]` = top bit of state i's surviving predecessor works
with the SMU unchanged.

## Interface (`vd_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | a symbol pair is present this cycle |
| `in_sym` | in | 2 × SOFT_W | `in_sym[0]`, `in_sym[1]`: soft values of code bits 0 and 1 |
| `out_valid` | out | 1 | `out_bit` carries a decoded bit |
| `out_bit` | out | 1 | decoded bits in transmission order |

There is no back-pressure. Every accepted pair advances the whole decoder by
one step; with `in_valid` low everything holds, so the input may have gaps.
The bit of pair n appears in the cycle after pair n + 3L + 1 is accepted.
To flush a message, follow it with 3L + 1 more pairs (for example the
encoding of zero bits). Code bit 0 uses generator G0, code bit 1 uses G1; the
generator's MSB taps the newest input bit.

Parameters: `K` (7), `L` (64), `SOFT_W` (3), `PM_W` (10), `G0`, `G1`
(defaults per K from `vd_pkg`). L should be a power of two of at least 5K for
the paths to merge; the RTL itself accepts any L ≥ 2. With K = 9 the metric
width of 10 bits is still sufficient.

At the default size the design has 64 ACS units, 64 × 10 path-metric bits,
64 × 6 pointer-register bits and a 192 × 64-bit survivor memory.

## Module hierarchy

```
vd_top
├── bmu
├── acs
├── pmu
└── smu_pretb
    ├── smu_ctrl          write pointer, bank rotation, block flags
    ├── survivor_mem      3L x N decision memory, 1 write + 1 read port
    ├── ptb_pointer_reg   forward pre-traceback registers
    ├── dc_unit           DC start register + backward decode read
    └── lifo              two-stack bit reversal
```

`survivor_mem` is written as an array with a registered read port; it maps to
a simple dual-port RAM or to flip-flops.

## Not included

* The variants with a faster read pointer (read pointer k times the write
  speed, memory (2 + 1/k)·L) and the sliding-window form with two pointer
  register sets restarting half a block apart (memory 2L). Only the
  equal-speed, three-bank form is built.
* The conventional traceback and register-exchange SMUs that the
  architecture is usually compared with.
* Area and energy: the savings claimed for this architecture (about 22% of
  decoder area and 12% of energy at K = 7 in a 0.18 µm standard-cell flow)
  cannot be checked from RTL simulation.

## Verification

Every module has a self-checking testbench in `tb/`; each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_vd_pkg` | predecessor rule and branch code bits against a textbook shift-register encoder, K = 3..9 |
| `tb_bmu` | all 64 symbol pairs × 4 code pairs |
| `tb_acs` | 400 random metric sets, 64 states, decisions and survivor metrics |
| `tb_pmu` | reset values, load and hold |
| `tb_survivor_mem` | fill and random read-back with concurrent writes, read hold |
| `tb_smu_ctrl` | addresses, bank rotation and block flags over seven blocks with gaps |
| `tb_ptb_pointer_reg` | the four-state example above, and K = 7 against a brute-force traceback after every step |
| `tb_dc_unit` | five back-to-back decodes against a software traceback, with step timing |
| `tb_lifo` | six blocks reversed with exact timing |
| `tb_smu_pretb` | random (never merging) decision columns against a conventional two-pass traceback; every bit and its 3L+1 latency |
| `tb_vd_top` | 10,000 random bits at the default size through soft noise, isolated symbol errors and input gaps; every bit and its latency; also counts pointer restarts, start-register loads, writes to each bank, LIFO swaps, stalls and corrected errors, failing if any never happens; checks the 3L memory depth and one memory read per decoded bit |
| `tb_vd_workloads` | 2,000 bits each at K/L = 3/16, 4/32, 5/32, 6/32, 7/64, 9/64 |

`tb_vd_top` and `tb_vd_workloads` share the stimulus/checker `vd_stim_check`,
which has its own encoder. All tests run in well under a second.

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/vd_pkg.sv tb/tb_vd_top.sv --top-module tb_vd_top -o sim
./obj_dir/sim
```

The design uses SystemVerilog 2017 (packages, `always_ff`/`always_comb`,
packed arrays, concurrent assertions in `dc_unit` and `lifo`). Lint with
`verilator --lint-only -Wall` reports only two unused-signal warnings in
`smu_pretb`, explained in its header.

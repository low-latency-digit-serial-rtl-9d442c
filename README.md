# Digit-serial, in-circuit configurable Montgomery multiplier over GF(2^m)

This design multiplies two elements of a binary field GF(2^m) in Montgomery
form. It computes

    P = A(x) * B(x) * x^-k  mod G(x)      (optionally + C)

for two kinds of modulus:

* **trinomials** G = x^m + x^k + 1, where the Montgomery factor is R = x^k, and
* **binomials** G = x^m + 1, the ring in which fields built on an all-one
  polynomial of degree m-1 are embedded.

The field size m and the middle term k are **not** fixed in the circuit. A
single build handles any m up to `S*L` bits and any k. The operand B enters
as data: the multiplier only sees a matrix description of B, cut into L-bit
digits, and the digit count N = ceil(m/L). Changing the field means loading
different data, not rebuilding the hardware.

## The main idea: a Montgomery product is a Toeplitz matrix times a vector

Write A*B = T1 + T2*x^k + T3*x^(m+k), where T1 holds the k low coefficients
and T2 the next m. Then:

* modulo x^m + 1: `A*B*x^-k = T1*x^(m-k) + T2 + T3`;
* modulo x^m + x^k + 1: the same value plus the correction `T1 + T3*x^k`.

No division and no trial reduction are needed. Every output coefficient is a
GF(2) inner product of the bits of A with a rearrangement of the bits of B.
Order the outputs as p_k, p_(k+1), ..., p_(m-1), p_0, ..., p_(k-1), so row r
gives coefficient (k + r) mod m. In that order the m x m matrix W_Mk is
Toeplitz: entry (r, c) depends only on d = r - c. Call that value t[d]. Then:

    t[d] = b[(2k + d) mod m]                     (binomial part)
         + b[m + k + d]   if d <= -(k+1)         (trinomial correction,
         + b[d - (m - k)] if d >= m - k           zero in binomial mode)

A Toeplitz matrix is fully described by its first row (t[0], t[-1], ...,
t[-(m-1)]) and its first column (t[0], t[1], ..., t[m-1]). That is all the
hardware stores about B.

### Operand streams

The operand supplier sends four L-bit digit streams, plus A and C. Bit r of
digit u describes matrix index j = u*L + r. Every bit with j >= m is zero.

| stream | bit for index j (j < m) | meaning |
|---|---|---|
| `v0` | b[(2k - j) mod m] | first row of the binomial matrix |
| `v1` | b[m + k - j] if j >= k+1, else 0 | first row of the correction |
| `h0` | b[(2k + j) mod m] | first column of the binomial matrix |
| `h1` | b[j - m + k] if j >= m-k, else 0 | first column of the correction |
| `dia` | a[j] | multiplier A |
| `dip` | c[(k + j) mod m] | addend C, in output order (0 for a plain product) |

The precompute stage adds the streams into `v0^v1` (row) and `h0^h1`
(column). In binomial mode (`binomial = 1`) it ignores `v1` and `h1`.

Output digit i, bit r, is coefficient p[(k + i*L + r) mod m]. It is
meaningful only while i*L + r < m; the higher bits of the last digit carry
no information.

## Cutting the matrix into L x L blocks

With N = ceil(m/L), the padded matrix is an N x N grid of L x L blocks
W(i, j). Product digit i is the sum over j of W(i, j) * A(j). Three facts
drive the whole architecture:

1. **The block grid is Toeplitz too.** W(i, j+1) = W(i-1, j). Block (i, j)
   is fixed by the offset D = (i - j)*L: its first column is
   t[D .. D+L-1] and its first row is t[D], t[D-1], ..., t[D-L+1].
2. **Neighbouring blocks share bits, reversed.** Going from block (i-1) to
   block i in the same column, the new first row is the old first column
   read backwards: row[c] = col_prev[L-c] for c = 1..L-1. Going one block to
   the right, the new first column is the old first row read backwards, plus
   one new corner bit.
3. **Blocks on or below the diagonal (D >= 0)** get their column straight
   from the first-column memory M_H. **Blocks above it (D < 0)** build their
   column from first-row digits held in M_V, bit-reversed (block BR).

## Processing elements and passes

The core is a chain of N_PE processing elements. Each PE is an L x L AND/XOR
array with one register stage. The critical path is an L-input XOR tree.
In pass c, PE j keeps A digit c*N_PE + j stationary. Rows i = 0..N-1 enter
PE 0 one per cycle, and PE j sees row i j cycles after PE 0. The last PE
therefore delivers

    sum over j < N_PE of  W(i, c*N_PE + j) * A(c*N_PE + j)

for each row. N_c = ceil(N/N_PE) passes cover all columns. A digits with
index >= N are forced to zero, which pads the last pass.

Where each PE gets its block:

* **PE 0** gets the first column on `h`. On row 0 of a pass, its first row
  is the V digit from M_V port 1 (control `c1 = 0`). On later rows it
  bit-reverses its own previous column. Row 0 also takes its corner bit from
  V.
* **PE j > 0** reuses, on rows i >= 1, the block PE j-1 used two cycles
  earlier, since W(i, j) = W(i-1, j-1). On row 0 it takes the row from the V
  bus and builds the column from PE j-1's previous row, bit-reversed, with
  V[0] as the corner. The controller puts V digit c*N_PE + j and A digit
  c*N_PE + j on the shared buses in exactly the cycle PE j starts the pass.

## Memory systems

All four memories hold S words of L bits, with digit u at address u. Every
memory loads in the same N cycles. Reads are synchronous: data appears one
cycle after the read strobe, so the controller issues every read one cycle
before its row enters the core.

* **M_A, M_H** (`mem_ha`): a single-port RAM and a d-bit address counter,
  with d = log2 S. The counter reloads from `value` or advances after each
  access. M_A is read once per PE per pass, so its address runs straight
  through 0, 1, 2, ... M_H is read on the rows with D >= 0 and restarts at
  address 0 in every pass.
* **M_V** (`mem_v`): in pass c, port 1 reads upward from c*N_PE (the V
  digits of the PEs). In the same cycles, port 2 reads downward from
  c*N_PE - 1 (columns of blocks above the diagonal). The two addresses
  always differ in parity. So M_V is two RAMs of S/2 words, interleaved by
  address LSB, with an up-counter for port 1 and a down-counter for port 2.
  The down-counter loads from the up-counter on the last row of each pass.
* **M_P** (`mem_p`): the accumulator. Digit i is read N_PE cycles after its
  row was issued, and written back one cycle later as `old ^ core output`,
  while digit i+1 is being read. It is also split into two LSB-interleaved
  banks. The write strobe is the delayed read strobe. Before execution M_P
  is loaded with 0, or with C for `MM(A,B) + C`. The XOR of its output with
  the core output is the product output `p`.

When N is odd and another pass follows, the controller puts one idle cycle
between passes. Without it, the write-back of digit N-1 and the read of
digit 0 would hit the same M_P bank.

## Control signals

The controller (`icmm_ctrl`) drives the strobes named c1..c9, c3n, c61 and
c81, bundled in the struct `icmm_pkg::ctrl_t`:

| signal | role |
|---|---|
| c4 | load one digit into all memories |
| c8 | clear the address counters of M_V, M_A, M_P (before loading and execution) |
| c7 | reload M_H's address to 0 (before loading and execution, and at the end of each pass) |
| c6 | read M_H (rows with D >= 0) |
| c3n | read M_V port 2 (rows with D < 0) |
| c2, c3 | select M_H (1) or the M_V port-2 path (0) for H[0] and H[1:L-1]; c6 delayed one cycle |
| c5 | read M_A and M_V port 1 (PE start cycles) |
| c9 | load the M_V down-counter |
| c1 | 0 on the first row of a pass |
| c61 | M_P input multiplexer: accumulate (1) or external data (0) |
| c81 | clear M_P's address with the last read of each pass |
| mp_rd | M_P read strobe |

## Interface and timing of `icmm_top`

Parameters: `L` (digit width, 32), `S` (words per memory, a power of two
of at least 4, default 8), `NPE` (processing elements, 3). These defaults
hold any m <= 256, for example GF(2^159) in N = 5 digits and 2 passes.

1. Pulse `load_start` for one cycle.
2. For N cycles, hold `load_valid` and present digit u of `v0 v1 h0 h1 dia
   dip` (u = 0 first). Set `binomial` to select the modulus.
3. Pulse `exec_start` with `n_dig = N`.
4. During the last pass, `p_valid` marks the final product digits on `p`,
   with `p_idx` = 0..N-1 in order. `done` pulses one cycle after the last
   digit. `busy` is high during execution.

Latency: N load cycles, then `N*N_c + N_PE + 2` cycles from `exec_start` to
the last product digit, plus N_c - 1 idle cycles when N is odd and
N_c > 1. Drive inputs away from the rising edge; reset `rst_n` is
active-low and asynchronous. It resets only control state; memories and
data registers are not reset.

## What follows the original architecture, and what is this design's own

The following come from the published architecture, as is:

* the Toeplitz formulation;
* the precompute stage;
* the N_PE-stage pipeline with stationary A digits and pass-wise
  accumulation;
* the four memory systems and their address-generator structure:
  interleaved banks, up/down counters, write strobe = delayed read;
* the BR block, the H multiplexers and the output XOR;
* the list of control signals.

These are this design's own choices, filling gaps the description leaves
open:

* the internal block derivation between PEs (a two-deep block history per
  PE) and the register holding the corner bit of above-diagonal blocks;
* synchronous RAM reads, and the controller's exact cycle placement of
  every strobe. The original control table is not reproduced cycle by
  cycle; each signal keeps its role;
* the down-counter loads one below the up-counter, on the last row of a
  pass, rather than with the up-counter's value;
* the idle cycle between passes for odd N;
* the split of the M_P read strobe (`mp_rd`) from the multiplexer select
  (`c61`);
* banks of S/2 words each;
* handshake outputs (`p_valid`, `p_idx`, `busy`, `done`) and the reset
  scheme;
* a separate port for each of the six input streams. That gives 7L + 17
  pins at S = 8. The published FPGA pin counts grow as 5L + 14, so the
  original evidently shares some of these buses.

The latency matches the published `N + N*N_c + N_PE + 2` when N is even.
For odd N with more than one pass, the idle cycles add N_c - 1 cycles.
Arranging B into the four streams is the operand supplier's job, as in the
original. Conversion into and out of Montgomery form, and reduction from the
x^m + 1 ring down to an all-one-polynomial field, are outside the design.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_icmm_top`: L=3, S=8, N_PE=2. This is the 3-bit-digit, two-PE
  configuration of the 9-bit worked example. It runs every m from 2 to 24
  with random k, in both modes, with and without C. Every coefficient is
  compared with a bit-serial Montgomery reference (A*B, then k times: add G
  if bit 0 is set, shift right). It checks the latency, and counts that each
  mechanism occurred: several passes, above-diagonal blocks, zero-padded A
  digits, idle cycles, N < N_PE, binomial and trinomial mode, the C addend.
* `tb_icmm_full`: the top at its default parameters. It runs GF(2^159) with
  x^159 + x^31 + 1, with and without C; m = 9 (x^9 + x^4 + 1); m = 256 (full
  memories); the ring x^160 + 1; and m = 33.
* `tb_icmm_m159`: GF(2^159) on every synthesis-table build that can hold a
  159-bit operand: L=32, S=8 with N_PE = 3, 9 and 27; L=16 with S=16 and
  S=32; L=8 with S=32 (20 digits, 7 passes), all with N_PE = 3 unless given.
  None of the table's memory depths holds 40 four-bit digits. For the 4-bit
  column it therefore also runs L=4 with S=64 (14 passes).
* `tb_icmm_sweep`: further builds: 2-bit digits with N_PE=3 and 16-word
  memories, a single PE, N_PE larger than the digit count, and L=3 with
  N_PE=4, each in both modes.
* `tb/icmm_runner.sv` is the shared driver of the last two. It is one top
  instance with a random-operand loop, the same reference, and a latency
  check.
* Unit testbenches: `tb_precompute`, `tb_tmm_pe`, `tb_tmm_core` (feeds the
  core from a random Toeplitz matrix and checks every pass),
  `tb_mem_ha`, `tb_mem_v` (simultaneous opposite-direction reads),
  `tb_mem_p` (read/write-back accumulation), and `tb_icmm_ctrl` (strobe
  counts and latency for every N = 1..16).

Assertions in the memories flag two ports meeting in one bank. An assertion
in the top flags a write-back without a valid core result. They are
not gated by reset, so drive `rst_n` low with a real falling edge before the
first clock, as the testbenches do; until then the flops hold random values.

Simulating one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/icmm_pkg.sv \
        tb/tb_icmm_top.sv --top-module tb_icmm_top -o sim
    ./obj_dir/sim

Each testbench finishes in well under a second. No synthesis or timing
results are part of this repository.

## Files

* `rtl/icmm_pkg.sv`: control bundle type
* `rtl/precompute.sv`: row/column stream adder
* `rtl/tmm_pe.sv`: one processing element
* `rtl/tmm_core.sv`: PE chain
* `rtl/mem_ha.sv`, `rtl/mem_v.sv`, `rtl/mem_p.sv`: memory systems
* `rtl/icmm_ctrl.sv`: controller
* `rtl/icmm_top.sv`: integration
* `tb/`: testbenches, one per module plus the end-to-end, workload and
  sweep benches described above

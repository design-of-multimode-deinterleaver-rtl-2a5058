# Multimode OFDM block deinterleaver with table-free address generation

OFDM receivers for WLAN (802.11a/g/n) and WiMAX must undo a two-step bit
interleaver before the Viterbi decoder. The permutation depends on the
modulation (BPSK, QPSK, 16-QAM, 64-QAM). A conventional design stores one
address table per modulation and standard. This design computes the
addresses on the fly instead. A small accumulator adds a step of 3, 6,
13/11 or 20/17/17 and is preset at the start of every row of the block. A
small state machine keeps track of rows, columns and the modulation. One
generator thus covers all four modulations with a few multiplexers, a 9-bit
adder and a handful of registers.

Around the generator, the RTL forms a complete streaming deinterleaver (and
interleaver) with a ping-pong block memory. There is also an 802.11n
per-stream frequency-rotation stage, and, as a separate unit, a row-write /
column-read matrix interleaver.

## The permutation and why a step generator can produce it

The interleaver has d = 16 columns. A block of N coded bits (one OFDM
symbol) has R = N/16 rows. For bit k of the block:

    m_k = R * (k mod 16) + floor(k / 16)                           (1) first permutation
    j_k = s * floor(m_k / s) + (m_k + N - floor(16 m_k / N)) mod s (2) second permutation

Here s = max(N_BPSC / 2, 1), with N_BPSC = 1, 2, 4 or 6 coded bits per
subcarrier. The block sizes are those of 802.11a:

| modulation | N   | R  | s | address step within a row |
|------------|-----|----|---|---------------------------|
| BPSK       | 48  | 3  | 1 | 3                         |
| QPSK       | 96  | 6  | 1 | 6                         |
| 16-QAM     | 192 | 12 | 2 | 13, 11 alternating        |
| 64-QAM     | 288 | 18 | 3 | 20, 17, 17 rotating       |

Split k into a row r = floor(k/16) and a column c = k mod 16. Then:

* The first address of every row is j = r, in every mode. So at the end of
  a row the accumulator is simply loaded with the next row index.
* Within a row, m grows by R per column. The second permutation adds a
  correction in -1..+2 that depends only on (r - c) mod s:
  * 16-QAM: the step is 13 when (r - c) is even and 11 when it is odd.
  * 64-QAM: the step is 20 when (r - c) mod 3 = 0 and 17 otherwise.

So row 0 of 64-QAM runs 0, 20, 37, 54, 74 … and row 1 runs 1, 18, 38, 55 …
The two select blocks (`qam16_sel`, `qam64_sel`) track exactly this
phase. A load at each row start sets it from the row index, and each step
advances it. The first 32 addresses per mode are:

    BPSK   0 3 6 9 … 45 | 1 4 7 … 46
    QPSK   0 6 12 … 90  | 1 7 13 … 91
    16QAM  0 13 24 37 48 61 72 85 96 … | 1 12 25 36 49 …
    64QAM  0 20 37 54 74 91 108 128 145 … | 1 18 38 55 72 92 …

### The deinterleaver direction

For received bit j, the inverse permutation is

    m_j = s * floor(j / s) + (j + floor(16 j / N)) mod s            (3)
    k_j = 16 * m_j - (N - 1) * floor(16 m_j / N)                   (4)

Write j = R*a + b, with a = 0..15 and b = 0..R-1. This reduces to
k_j = 16 * X + a with X = s*floor(b/s) + ((b + a) mod s). `kaddr_gen`
builds it literally. A column counter b (inner) and a row counter a
(outer) feed one tiny function per modulation. A 4:1 mux picks X, which is
shifted left by 4 (× d) and added to a.

Note the "+" inside the modulo. Some statements of this equation print
"−". That gives the same result for s = 1 and s = 2, but for 64-QAM it
does not invert the interleaver. The RTL uses the true inverse, and the
testbenches check k_{j_k} = k for every mode.

## Address generator (`addr_gen`)

    mux-1: 13 / 11  <- qam16_sel
    mux-2: 20 / 17 / 17 <- qam64_sel
    mux-3: 3, 6, mux-1, mux-2 <- mode      (6 bits, zero-padded to 9)
    adder: accumulator + step
    accumulator: <- row start from preset_logic, else <- adder
    read_counter: 0..N-1 (9 bits)
    sel_generator: bank select, flips at every block end

`preset_logic` is the controlling state machine. Its states are ST_PRE
(pre-computation) and ST_BPSK / ST_QPSK / ST_QAM16 / ST_QAM64
(execution, one per modulation). clr, and every change of modulation,
pass through ST_PRE for one cycle. That cycle latches the modulation,
loads the row limit and clears the counters and the accumulator. In an
execution state, each enabled cycle advances the column counter 0..15.
After column 15 the row counter advances and the accumulator loads the
new row index. After the last row the next block starts at 0. A requested
modulation is only taken up there, at a block boundary.

Timing: all outputs are registers (or decoded from them) and describe the
same block position. With `en` held high they produce one address per
clock. The only extra cycle is the pre-computation cycle.

`kaddr_gen` has the same control behaviour, so with the same `clr`, `en`
and `mod_typ` it runs in lockstep with `addr_gen`. The top level asserts
this.

## Streaming (de)interleaver (`multimode_deinterleaver`)

* **Memory.** `deint_memory` has two banks of 512 entries × `DW` bits. One
  bank takes the incoming block while the other, holding the previous
  block, is read out. The banks swap at every block end (`sel`).
* **Addressing.** With `deint = 1`, received bit j is written at k_j and
  the bank is read in order 0..N-1. With `deint = 0`, bit k is written at
  j_k and read in order. In both cases, output bit t of a block appears
  exactly one cycle after the step at position t of the following block.
  The latency is therefore one block plus one clock, counted in accepted
  input bits.
* **Handshake.** Input moves when `in_valid && in_ready`. While
  `in_valid` is low everything stalls: no write, no read, no address step.
  Output is a plain `out_valid` pulse with no back-pressure.
* **Mode and direction changes.** `mod_typ` and `deint` are sampled at
  block boundaries. If either differs from the current setting when a
  block ends, that block still has to be read out with its own size and
  permutation. The top then runs one *drain* block: `in_ready` is low,
  `draining` is high, the generators keep the old mode and the stored
  block streams out. After that the new setting starts, plus one
  pre-computation cycle if the modulation changed.
* **Observation outputs.** `gen_j_addr` and `gen_k_addr` are the two
  generator addresses of the current position. `gen_valid` is low during
  pre-computation.

### Top-level ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `clr` | in | 1 | clock; synchronous active-high clear |
| `mod_typ` | in | 2 | requested modulation: 0 BPSK, 1 QPSK, 2 16-QAM, 3 64-QAM |
| `deint` | in | 1 | 1 deinterleave, 0 interleave |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/DW | input stream |
| `out_valid`, `out_data` | out | 1/DW | output stream, one block + 1 clock later |
| `cur_mode`, `draining` | out | 2/1 | modulation in use; drain block running |
| `gen_valid`, `gen_j_addr`, `gen_k_addr` | out | 1/9/9 | generator state and addresses |
| `iss`, `bw40`, `stream_addr` | in/in/out | 2/1/10 | 802.11n stream index, 40 MHz, rotated address |
| `mi_mode`, `mi_rows`, `mi_cols` | in | 2/4/4 | matrix interleaver scheme and active size |
| `mi_we`, `mi_re`, `mi_addr`, `mi_din`, `mi_dout` | in/in/in/in/out | 1/1/3/8/8 | matrix row write, column read |

### 802.11n stream rotation (`freq_rotation`)

With several spatial streams, 802.11n rotates stream i_ss by

    r = (J - F(i_ss) * N_ROT * N_BPSCS) mod N,  F = 0, 2, 1, 3,  N_ROT = 11 (20 MHz) / 29 (40 MHz)

The offset is constant per stream. So a small table gives
LUT = (N − offset mod N) mod N, and the datapath is an adder (J + LUT), a
subtractor (− N) and a 2:1 mux steered by the sign of the difference. The
unit is combinational, with 10-bit addresses, enough for 648 (40 MHz,
64-QAM). In the top it rotates `gen_j_addr` for the stream given by `iss`
/ `bw40` and shows the result on `stream_addr`. This is an observation
output next to the main address. The 802.11n permutation itself, with 13
or 18 columns, is not part of this design, so `stream_addr` is not a
complete 802.11n stream address.

## Matrix interleaver (`matrix_interleaver`)

This is a different way to interleave, aimed at a processor-attached
accelerator that looks like an ordinary memory. A bit matrix of up to 8×8
is written one row per clock through an intra-row permutation and read one
column per clock through an intra-column permutation. A block of R rows and
C columns thus takes R + C clocks instead of 2·R·C bit accesses.

The block size is set with `n_rows` / `n_cols` (1..8). Rows and columns
beyond it are switched off: writes to such rows are ignored, and such
columns are stored as 0 and read as 0. A control table holds one entry per
row and per column for each of four modes. In this RTL an entry is a
rotation within the active width: the C active bits of row r rotate left by
(m·r) mod C, and the R active bits of column c rotate left by (m·(c+1))
mod R. Mode 0 is a plain transpose. These rotation schemes are
placeholders for whatever permutations a standard needs: replace
`ctrl_lut` to change them. The unit sits beside the rest of the top level
on its own `mi_*` ports.

## How far it can be trusted, and where it departs

* Verified in simulation against the equations above, and against the
  published address table of the first 32 addresses per mode.
* The block sizes 48/96/192/288 (802.11a, d = 16) are built in. They are
  the sizes that produce the step patterns above. Other sizes, such as
  WiMAX with a different number of subchannels or d = 12, would need other
  steps and are not supported.
* The code rate has no effect on these block sizes, so there is no
  code-rate input.
* A change of modulation takes effect at the next block boundary, never
  mid-block. The drain block and the ping-pong memory are choices of this
  design.
* The rotation constants of `freq_rotation` are those of the 802.11n
  standard.
* The matrix interleaver's permutation table is a placeholder, as noted
  above, and its size inputs are a choice of this design.
* The RTL was linted with Verilator (`-Wall`) and elaborated with Yosys/slang.
  It has not been placed on an FPGA or compared with measured area or power.

## Files

| file | content |
|------|---------|
| `rtl/deint_pkg.sv` | modulation enum, block sizes, widths |
| `rtl/qam16_sel.sv`, `rtl/qam64_sel.sv` | step-select phase trackers |
| `rtl/preset_logic.sv` | state machine, row/column counters, row presets |
| `rtl/read_counter.sv`, `rtl/sel_generator.sv` | sequential address, bank select |
| `rtl/addr_gen.sv` | accumulator generator of j_k |
| `rtl/kaddr_gen.sv` | counter/multiply generator of k_j |
| `rtl/freq_rotation.sv` | 802.11n stream rotation |
| `rtl/deint_memory.sv` | two-bank block memory |
| `rtl/matrix_interleaver.sv` | 8×8 row/column matrix interleaver |
| `rtl/multimode_deinterleaver.sv` | top level |
| `tb/tb_ref_pkg.sv` | reference model: the equations evaluated directly |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters of the top: `DW` (bits per stored sample, default 1; set it
higher for soft bits) and `MN` (matrix size, default 8, a power of two).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. Each one has a watchdog. Example, from the repository root:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_multimode_deinterleaver \
        -y rtl -y tb +libext+.sv rtl/deint_pkg.sv tb/tb_ref_pkg.sv \
        tb/tb_multimode_deinterleaver.sv -o sim
    ./obj_dir/sim

Replace the testbench name to run any other. `tb_multimode_deinterleaver`
runs the top at its default parameters. It streams about 50 blocks through
all eight (modulation, direction) pairs with random input gaps. It checks
every output bit and its timing, the generator and stream addresses in
every cycle, and the matrix interleaver. It also counts stalls, drain
blocks, mode and direction switches and rotated streams at both
bandwidths, and fails if any of them never occurs. It runs in well under a
second.

# FrodoKEM-640 accelerator for a processor + FPGA SoC

FrodoKEM is a post-quantum key encapsulation mechanism built on the Learning With
Errors problem. Its cost on a small embedded processor is dominated by three kernels.
Measured on a Cortex-A9, they take these shares of the running time:

| kernel                                   | share of run time |
|------------------------------------------|-------------------|
| SHAKE128 (hashing and seed expansion)    | 53.9 %            |
| B' = S'A + E' (encapsulation, decapsulation) | 30.9 %        |
| B = AS + E (key generation)              | 8.2 %             |

This RTL is the programmable-logic half of a hardware/software split. It targets a
smart-meter class device: a Zynq-7000 style SoC with an ARM core and an FPGA fabric.
The processor keeps the FrodoKEM software, but three kernels move into the fabric:

- the matrix product **AS = A x S**;
- the matrix product **S'A = S' x A**;
- the **SHAKE128** extendable-output hash.

The additions of E and E' are cheap, so they stay in software. The processor reaches
everything through one AXI4-Lite slave port.

The matrix A (640 x 640 for FrodoKEM-640) is never stored whole. The software
generates it four rows at a time and pushes each batch of four rows into the fabric.
The engines multiply that batch and wait for the next one. This keeps the fabric
memory small (about 536 kbit of block RAM in total), but it costs bus traffic.

## Block structure

```
                       AXI4-Lite (32-bit)
                              |
                      axi_lite_slave --- local word bus --- registers, pl_timer
                              |
        +---------------------+------------------------------+
        |                     |                              |
     as_unit               sa_unit                      shake_unit
  A rows 4x320x32       A rows 4x320x32              sys_bram 2583x64
  S      2560x32        S' half 2x640x32                   |
  as_multiplier         sa_multiplier               shake128_core <-> keccak_round
   (5 D, 8 x, 4 Sum)     (4 x, 1 Sum)                 (absorb/squeeze)   (1 round/clock)
  AS   4x1280x16        S'A    5120x16
```

All entries are 16 bits wide. Two entries travel together in each 32-bit bus word:
the entry with the lower index sits in bits 15:0, the next one in bits 31:16. All
matrix arithmetic wraps modulo 2^16. FrodoKEM-640 uses q = 2^15, so software reduces
the results (or adds E and then reduces) exactly as it would after a software
product.

## AS = A x S (`as_unit`, `as_multiplier`, `word_split`)

One run of the engine computes four full rows of AS, for the four rows of A that are
loaded.

- **A buffers.** There are four 320 x 32 buffers. Buffer r holds row 4g+r of A
  (640 entries, two per word).
- **S buffer.** One 2560 x 32 buffer holds all of S. S is stored column by column,
  so word `320*j + m` holds the pair `{S[2m+1][j], S[2m][j]}`. This makes word m of
  an A row and word m of column j of S carry matching indices.
- **Datapath.** Five "D" blocks split words into entries: one for each A buffer and
  one for S. D is a registered 32-to-2x16 split. Eight multipliers form
  `A[r][2m]*S[2m][j]` and `A[r][2m+1]*S[2m+1][j]` for the four rows. Four adders add
  each row's two products into a running sum.
- **Order of work.** For each column j = 0..7, the controller sweeps m = 0..319.
  When the sweep ends, the four sums `AS[4g+r][j]` are written to result buffer r at
  address `8g + j`.
- **Result buffers.** There are four 1280 x 16 buffers. Together they hold the whole
  640 x 8 AS, so the software can read everything back after the last batch.

Timing: one batch takes 8 x 320 = 2560 issue clocks plus 3 clocks of pipeline. The
pipeline stages are the RAM read, D, and the accumulator. A whole FrodoKEM-640
product takes 160 batches, which is 409,600 compute clocks, not counting the bus
traffic for A.

## S'A = S' x A (`sa_unit`, `sa_multiplier`)

Here A enters from the right, so a batch of four rows of A contributes only a partial
sum to every output. That partial sum is
`sum over p = 0..3 of S'[i][4g+p] * A[4g+p][j]`. The engine therefore keeps S'A in
the fabric and adds to it batch after batch.

Only **half of S'** (four of its eight rows) is stored at a time. This trades speed
for block RAM: the whole of A has to be streamed twice, once per half.

- **S' buffers.** There are two 640 x 32 buffers, each read as two 16-bit halves.
  Buffer b at address `160*i + g` holds `S'[i][4g+2b]` (low half) and
  `S'[i][4g+2b+1]` (high half), where i is a row within the loaded half. One read
  at `160*i + g` therefore returns the four S' entries that meet the four A rows of
  batch g. Software writes S' in its natural row-major order, two entries per word,
  alternating between buffer 0 and buffer 1.
- **A buffers.** These are four 320 x 32 buffers, laid out as in the AS engine. The
  16-bit half of each word is selected by bit 0 of the column index, so there is no
  D stage.
- **Datapath.** Four multipliers feed one adder. The adder sums the four products
  and, for every batch except batch 0, the partial result read back from S'A.
  Batch 0 overwrites, so no clear pass is needed.
- **Read-modify-write.** The S'A buffer (5120 x 16) is read in the issue clock and
  written two clocks later. Consecutive accesses go to different columns, so there
  is no read-after-write hazard inside a run.

One run covers i = 0..3 (the loaded half) and j = 0..639. That is 4 x 640 = 2560
issue clocks plus 2. A full product needs 2 halves x 160 batches = 320 runs, which is
819,200 compute clocks.

Software flow for one product:

```
for half in 0, 1:
    write S' rows 4*half .. 4*half+3 into region 5
    for g in 0 .. 159:
        write A rows 4g .. 4g+3 into region 4
        SA_BLK = (half << 8) | g ; CTRL = 2 ; poll STATUS
read S'A from region 6, then add E' in software
```

## SHAKE128 (`shake_unit`, `sys_bram`, `shake128_core`, `keccak_round`)

The **system BRAM** is 2583 x 64 bits. It first holds the message and afterwards the
output, so no second buffer is needed.

- **Host side.** The host sees the BRAM as 5166 32-bit words. Host word 2w is the
  low half of memory word w. Bytes are little-endian: message byte k is bits
  `8*(k%8)+7 : 8*(k%8)` of word k/8. This is the Keccak lane order, so a memory word
  is XORed into a lane unchanged.
- **Absorb.** For each 168-byte block (21 lanes), the core reads the 21 words and
  XORs them into the 1600-bit state. In the last block it masks bytes past
  `msg_len` to zero and applies the SHAKE padding: 0x1F at byte `msg_len`, 0x80 at
  byte 167. If `msg_len` is a multiple of 168, the padding fills a block of its own.
  The state then goes through Keccak-f[1600].
- **Permutation.** `keccak_round` is combinational and applies theta, rho, pi, chi
  and iota. The controller applies it once per clock, so Keccak-f[1600] takes 24
  clocks.
- **Squeeze.** The first 21 lanes of the state are written back from word 0 on, one
  block at a time, with a permutation between blocks. The core stops once at least
  `out_len` bytes have been written. Output is always written in **whole blocks**,
  so `ceil(out_len/168)*21` words are overwritten.

The depth of 2583 words is 123 blocks of 21 lanes. That is exactly enough for the
largest FrodoKEM-640 expansion: the 20,608 bytes of S, E and E'' in encapsulation.

Timing:

- each absorbed block takes 21 + 1 + 24 = 46 clocks;
- the first squeezed block takes 21 clocks;
- each further squeezed block takes 24 + 21 clocks.

For example, hashing the 9,616-byte public key to 16 bytes takes 58 x 46 + 21 =
2,689 clocks. Expanding a 17-byte seed to 20,608 bytes takes 46 + 123 x 21 + 122 x 24
= 5,557 clocks.

## Register and memory map

The slave uses a 19-bit byte address. Word address bits 16:13 select a region, and
bits 12:0 give the word offset inside it.

| region | contents | offset |
|---|---|---|
| 0 | registers | see below |
| 1 | AS engine, A rows (write) | `512*row + word`, row 0..3, word 0..319 |
| 2 | AS engine, S (write) | `320*column + word` |
| 3 | AS result (read) | `8*row + column`, row 0..639 |
| 4 | S'A engine, A rows (write) | `512*row + word` |
| 5 | S'A engine, S' half (write) | `1024*buffer + 160*i + g` |
| 6 | S'A result (read) | `640*row + column` |
| 7 | SHAKE system BRAM (read/write) | 32-bit word 0..5165 |

| reg | name | meaning |
|---|---|---|
| 0 | CTRL | write 1 to bit 0, 1 or 2 to start AS, S'A or SHAKE |
| 1 | STATUS | bits 2:0 = busy (AS, S'A, SHAKE); bits 10:8 = done since the unit was last started |
| 2 | AS_BLK | batch index g (0..159) of the loaded A rows |
| 3 | SA_BLK | bits 7:0 = batch g, bit 8 = which half of S' is loaded |
| 4 | SHAKE_MSG_LEN | message length in bytes |
| 5 | SHAKE_OUT_LEN | output length in bytes |
| 6 | TIMER_CTRL | bit 0 = run, bit 1 = clear (self-clearing) |
| 7 | TIMER | 32-bit cycle count |

Reads return two clocks after the local read strobe. The AXI slave handles that
latency, and it handles one transfer at a time. Write strobes are ignored.

Software must not touch a unit's memories while that unit is busy. Nothing in the
hardware prevents it. The PL timer counts clocks while `run` is set, so software can
bracket any operation with it.

## Where this RTL fixes details the architecture leaves open

The following points follow the original architecture:

- the split into the three engines and the timer;
- all A, S, S' and system-BRAM sizes;
- four-row batches of A generated by software;
- two entries per bus word;
- the D blocks and the multiplier and adder counts;
- half of S' at a time;
- the 168-byte, 64-bit absorb path;
- one Keccak-f evaluation per state hand-over;
- the output written over the input.

The following are choices made in this RTL:

- **Bus and control.** The bus is AXI4-Lite. The register map and the
  start/busy/done handshake are new. Software polls STATUS; there are no
  interrupts.
- **Memory layout.** The layout of S (by column) and of S' (four-entry groups split
  across the two buffers) is new, as is the little-endian byte order of the system
  BRAM.
- **Result buffers.** The AS buffers are 4 x 1280 x 16 and the S'A buffer is
  5120 x 16. Both are sized to hold the whole result.
- **Accumulation.** S'A is accumulated by read-modify-write inside the fabric.
  Batch 0 overwrites.
- **Keccak schedule.** Keccak-f runs one round per clock (24 clocks per permutation).
  The original states only that the five steps are done "in a single clock".
- **Squeeze output.** The squeeze always writes whole 168-byte blocks.
- **Arithmetic.** All arithmetic is modulo 2^16.
- **Reset.** Control registers use an asynchronous active-low reset. Memories are
  not reset.

Not part of this RTL:

- the processor and the vendor AXI interconnect;
- the software that generates A (from a seed) and adds E and E'.

The fabric clock frequency is not specified anywhere. The original reports
end-to-end times of about 1700 ms for software only and under 560 ms with the
accelerator, but those depend on the processor software, the bus and the clock, so
they cannot be checked here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference models in
`tb/keccak_ref_pkg.sv` are written independently of the RTL. They generate the rho
offsets from the (x,y) walk and the round constants from the LFSR instead of using
tables. The testbenches also check the published SHAKE128("") prefix and the first
lane of Keccak-f applied to the zero state.

| testbench | what it covers |
|---|---|
| `tb_frodo_pl_top` | End to end at full FrodoKEM-640 size, only through AXI. The complete AS (160 batches), the complete S'A (both halves, 320 runs), and SHAKE128 of the 9,616-byte public key and of the 20,608-byte expansion, all compared with models. It also uses the timer and counts every mechanism: overwrite and accumulate batches, half switch, multi-block absorb and squeeze, padding-only block, busy polling. About 3.2 M clocks, a few seconds. |
| `tb_frodo640_matrix_workload` | The FrodoKEM-640 matrix work as software would drive it. Every row of A is regenerated from a seed on the SHAKE128 engine (row i = SHAKE128(i as 2 little-endian bytes, seed; 1280 bytes)) and copied into the row buffers of both engines. The AS and S'A engines run together on the first pass over A. B = AS + E and B' = S'A + E' (mod 2^15) are checked with small signed S, S', E and E'. About 5.7 M clocks. |
| `tb_as_unit`, `tb_sa_unit` | Engines at default size, exact cycle counts per batch, results of several batches. |
| `tb_as_multiplier`, `tb_sa_multiplier`, `tb_word_split` | Datapaths, with idle cycles and accumulate control. |
| `tb_shake_unit`, `tb_shake128_core` | Messages around block boundaries, multi-block output, exact cycle count, number of words written and read. |
| `tb_keccak_round` | Every round index on random states, plus the zero-state permutation. |
| `tb_sys_bram`, `tb_bram_sdp`, `tb_pl_timer`, `tb_axi_lite_slave` | Memories, timer, AXI handshakes with random stalls. |

To run a testbench with Verilator 5, list the package files first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/frodo_pkg.sv tb/keccak_ref_pkg.sv tb/tb_frodo_pl_top.sv \
    --top-module tb_frodo_pl_top -Mdir obj && ./obj/Vtb_frodo_pl_top
```

Verilator finds the other modules through `-Irtl`, because each module lives in a
file of its own name. The sizes are parameters with FrodoKEM-640 defaults:

- `as_unit`: `A_DEPTH`, `NCOL`, `NBLK`;
- `sa_unit`: `NCOLS`, `NBLK`, `NROW`;
- `shake_unit`: `DEPTH`.

The top level uses the defaults.

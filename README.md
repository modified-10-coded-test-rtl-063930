# Modified 10C test-data decompressor

Scan testing of a system-on-chip needs very large test sets, and tester memory
and test time grow with them. In this scheme the test set is compressed off-line.
A small decoder on the chip expands it again, one bit at a time, on its way from
the tester into a scan chain.

The code used is a *modified 10C* code, a block code for 8-bit blocks. Each
block is cut into two 4-bit halves, and each half is classed as all-0, all-1 or
mixed (`U`). The code extends this with variable-length runs: a run of 9 to 16
equal bits is sent as a single 5-bit codeword. Test cubes whose don't-care bits
were filled to keep neighbouring bits equal (after a Hamming-distance
reordering of the vectors) are full of such runs. So the run codewords do most
of the compression, and the 8-bit block codewords handle the rest.

This repository holds synthesizable SystemVerilog for that decoder,
self-checking testbenches, and a reference encoder written as a testbench
package. The vector reordering and the compression itself are off-line software
steps. They are not part of the hardware.

## The code

Every codeword starts with a **detect bit**. Bits are listed in the order they
arrive.

**Detect = 1: run of 9..16 equal bits.** A 4-bit field `r` follows.

| `r[3]` | `r[2:0]`   | decoded                                    |
|--------|------------|--------------------------------------------|
| value  | length − 9 | `length` copies of `value` (9 ≤ length ≤ 16) |

For example, `1 0 111` is sixteen 0s, and `1 1 000` is nine 1s.

**Detect = 0: one 8-bit block.** A prefix follows, and then the literal bits of
every mixed half, in scan order. The first letter of a class names the half
that is scanned out first.

| class | halves          | prefix | literal bits | codeword length |
|-------|-----------------|--------|--------------|-----------------|
| `00`  | 0000 0000       | `000`  | –            | 4               |
| `11`  | 1111 1111       | `001`  | –            | 4               |
| `01`  | 0000 1111       | `0110` | –            | 5               |
| `10`  | 1111 0000       | `0111` | –            | 5               |
| `1U`  | 1111 uuuu       | `100`  | 4            | 8               |
| `U1`  | uuuu 1111       | `101`  | 4            | 8               |
| `0U`  | 0000 uuuu       | `110`  | 4            | 8               |
| `U0`  | uuuu 0000       | `111`  | 4            | 8               |
| `UU`  | uuuu uuuu       | `010`  | 8            | 12              |

**Where this departs from the source.** The run codewords, the block size, the
run range of 9..16, and the five mixed-class prefixes (`100`, `101`, `110`,
`111`, `010`) follow the published code table. That table gives the four
uniform classes the 2-bit codewords `00`, `11`, `01` and `10`. Three of those
are prefixes of mixed-class codewords: `10` of `100…`, `11` of `110…`, and
`01` of `010…`. A serial decoder therefore cannot separate them. No prefix-free
code matches all the published lengths either. This design keeps every
published mixed-class codeword and moves the four uniform classes into the code
space that is left: `000`, `001`, `0110` and `0111`. Any encoder for this
decoder must use the table above. The published worked example does not decode
under the published table, so it is not reproduced. The same 56 example bits
take 54 code bits with this code.

**Encoder rule.** At each position, measure the run of equal bits, up to 16
long. If the run is 9 or longer, send a run codeword. Otherwise send the next 8
bits as one block. The last block is padded with 0s. This rule is implemented
in `tb/m10c_ref_pkg.sv`.

## Decoder structure

```
            ate_bit/valid                 +-------------+
 tester ───────────────┬───────────────► |  m10c_fsm   |◄── enable
        ◄── ate_ready  │   (C_ia)        |  8 states   |
                       │                  +-------------+
                       ▼                   │  │   │  │ Block_size, doc_dc / reg_dc
              +----------------+ rst_data  │  │   ▼  ▲
              | m10c_code_reg  |◄──────────┘  │  m10c_counter_dc
              | (n-bit reg)    |              │
              +----------------+              │ h1_src / h2_src, sel_h2
                       │ peek                 ▼
              +----------------+        +-----------+   +-----------+
              | m10c_code_dec  |        | bit_mux h1|   | bit_mux h2|◄── ate_bit
              | (n-bit Dec)    |        +-----------+   +-----------+
              +----------------+               └─────┬─────┘
                                                      ▼ wr_bit
                                             +------------------+  scan_out/valid
                                             | m10c_out_buffer  |────────────────► scan chain
                                             | (b-bit buffer)   |◄── scan_ready (T_clk)
                                             +------------------+
           m10c_code_stats: counts decoded codewords (n_blk8, n_run, n_cls, n_len)
```

| module             | role |
|--------------------|------|
| `m10c_pkg`         | Code constants, the `src_t` half-source type and the `state_t` state type. |
| `m10c_code_reg`    | Shift register for the bits after the detect bit. Its look-ahead output `peek` shows the contents with the incoming bit already added. |
| `m10c_code_dec`    | Combinational. Reports when a codeword is complete, and gives its size (8 or 9..16) and each half's source: constant 0, constant 1, or literal. |
| `m10c_counter_dc`  | Counts down the decoded bits left in the block. Flags the last bit of the block (`last`) and of the first half (`half_last`). |
| `m10c_bit_mux`     | Picks 0, 1 or the tester bit for one half. There are two instances, one per half. |
| `m10c_out_buffer`  | A 16-entry bit FIFO to the scan chain. It drives 0 when empty. |
| `m10c_code_stats`  | Saturating 32-bit counters of decoded codewords: totals for pattern length 8 and above 8, plus one counter per block class (9) and per run length 9..16 (8). |
| `m10c_fsm`         | The controller, described below. |
| `m10c_decoder`     | The top level, which wires the blocks together. |

## Controller

There are eight states.

- **`S_IDLE`**: the decoder is off. It moves to `S_DETECT` when `enable` is high.
- **`S_DETECT`**: takes the detect bit and clears the codeword register.
  - A 1 moves to `S_RUNCODE`.
  - A 0 moves to `S_PREFIX`.
  - If `enable` is low, it returns to `S_IDLE`.
- **`S_RUNCODE` and `S_PREFIX`**: take codeword bits until `m10c_code_dec`
  reports a complete codeword. On that last bit the controller:
  - loads the block size into the counter;
  - latches the two half sources;
  - pulses one occurrence event.
- **`S_H1_CONST` and `S_H1_LIT`**: write the first half, or the whole run.
- **`S_H2_CONST` and `S_H2_LIT`**: write the second half.

The `*_CONST` states write constant bits and hold the tester off by keeping
`ate_ready` low. The `*_LIT` states take one tester bit per clock and write it
straight into the buffer. Any writing state waits while the buffer is full.
After the last bit of a block, the controller returns to `S_DETECT`.

## Interface and timing

Single clock `clk`. Reset `rst_n` is asynchronous and active low.

| port | dir | meaning |
|------|-----|---------|
| `enable` | in | Decoder on. |
| `ate_bit`, `ate_valid`, `ate_ready` | in/in/out | Compressed stream from the tester. A bit is taken in each clock where `ate_valid && ate_ready`. |
| `scan_out`, `scan_valid`, `scan_ready` | out/out/in | Decoded stream to the scan chain. A bit is taken in each clock where `scan_valid && scan_ready`. |
| `stats_clr` | in | Clears all occurrence counters. |
| `n_blk8`, `n_run` | out | Block and run codewords decoded so far. |
| `n_cls[8:0]`, `n_len[7:0]` | out | Codewords per block class (index order `00 11 01 10 1U U1 0U U0 UU`, type `blk_cls_t`) and per run length (index = length − 9). |
| `busy` | out | A codeword is in progress, or bits wait in the buffer. |

Throughput, when neither side stalls:
- every codeword bit that is not a literal takes one clock;
- every decoded bit takes one clock;
- a literal bit is taken and written in the same clock.

So a codeword with `c` non-literal bits that decodes to `s` bits takes `c + s`
clocks. A 16-bit run takes 5 + 16 = 21 clocks, and a `UU` block takes 4 + 8 = 12.
A written bit appears at `scan_out` one clock later. The source diagram shows
separate tester and scan clocks. Here both are clock enables (`ate_valid` and
`scan_ready`) in one clock domain.

Parameters of `m10c_decoder`:

| parameter | default | meaning |
|-----------|---------|---------|
| `B` | 16 | Buffer depth in bits. One longest run fits. |
| `STATS_W` | 32 | Width of the occurrence counters. |

The code constants `K = 8`, `RUN_MIN = 9` and `RUN_MAX = 16` are in `m10c_pkg`.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_m10c_code_reg` | Random shift and clear sequences against a model. |
| `tb_m10c_code_dec` | Every input pattern, against the code table written out as strings. |
| `tb_m10c_counter_dc` | Every block size, random gaps, load priority, and holding at zero. |
| `tb_m10c_bit_mux` | Every input. |
| `tb_m10c_out_buffer` | Random traffic against a queue model, including fill to full and drain to empty. |
| `tb_m10c_code_stats` | Random events, classes, run lengths and clears against a model, and saturation at a 4-bit width. |
| `tb_m10c_fsm` | The controller alone, with the other blocks replaced by models. Checks the decoded stream, the tester hold during constant bits, the buffer-full stall, and the clock count. |
| `tb_m10c_decoder` | End to end: the 56-bit example with an exact clock count, a directed stream with every class and every run length, and random run-rich streams with random tester gaps and scan-side stalls. Also disable/idle and clearing the counters. Each mechanism must occur at least once. |
| `tb_m10c_workloads` | Default parameters. Five streams of 122,532, 139,283, 1,165,200, 176,993 and 183,462 bits, the test-data sizes the source lists for its five ISCAS'89 circuits. Every bit, both counters and the exact clock count are checked. It runs in a few seconds. |

The workload streams are synthetic, run-rich data. The real benchmark test
cubes are not reproduced, so the compression seen there (about 41 %) says
nothing about the real circuits.

To run a testbench with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/m10c_pkg.sv tb/m10c_ref_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/tb_m10c_decoder.sv \
  --top-module tb_m10c_decoder -o sim
./obj_dir/sim
```

To run another testbench, swap the last file and the top module name.

## How far to trust it

- **Taken from the source:** the detect-bit scheme, the run codewords, the 8-bit
  blocks with 4-bit halves, the mixed-class prefixes, the eight-state
  controller, and the block list of the decoder diagram. That list is the
  codeword register and decoder, the block counter, two multiplexers, the
  output buffer, and counters of length-8 and longer codewords and of each
  codeword.
- **This design's own choices:**
  - the uniform-class codewords;
  - how the halves are ordered;
  - the valid/ready handshakes;
  - the single clock;
  - the buffer depth and the FIFO structure;
  - the meaning given to each diagram block and signal (`C_ia` as
    `ate_ready`, `rst_data` as register clear, `Block_size`/`doc_dc`/`reg_dc` on
    the block counter);
  - the counter widths.

  The source gives no HDL, no gate-level detail and no decoder timing.
- **Not built:**
  - any use of the occurrence counters beyond reading them out. The source does
    not say what they drive, and it names seven run counters (C9–C15) for eight
    run lengths, so there is one counter per length here;
  - the scan-power and area evaluations, which are off-line analyses.
  - a feedback line from the output selector back into the buffer, which the
    source diagram draws without explaining it.
- Assertions in the RTL check:
  - the buffer is never written when full;
  - the tester is held during constant bits;
  - a run has no second half;
  - a literal state always uses a literal source;
  - a 4-bit block prefix is always a valid one.

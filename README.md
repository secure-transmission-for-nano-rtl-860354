# Fault-tolerant nano-memory with fault-secure encoder and corrector

Memories usually protect only their storage cells with an error-correcting
code. The encoder and the corrector around the array are assumed to be
fault-free. In nanoscale technologies the logic is about as likely to take a
transient fault as the cells are, so that assumption fails. This design
protects the whole path:

* the data is stored in a code whose parity-check matrix can be checked by a
  very simple *fault-secure detector* (FSD);
* one FSD watches the encoder's output and another watches the corrector's
  output;
* when a detector raises its flag, the unit that produced the word runs again
  (retry).

A transient fault in the encoder, the corrector or a detector therefore costs
a few cycles, not wrong data. Faults that pile up in the array are removed by
periodic scrubbing.

The code is the (15,7,5) Euclidean-Geometry LDPC code. Each 7-bit
information vector becomes a 15-bit codeword. Any 2 bit errors are corrected,
and heavier error patterns are detected.

## The code

The parity-check matrix H is 15 x 15 and cyclic. Syndrome bit j checks
codeword bits j, j+8, j+9 and j+11 (mod 15). Every row and every column has
weight 4. H has rank 8, so 15 - 8 = 7 information bits remain. All 15 rows are
built, not just 8 independent ones. That redundancy is what makes the detector
fault-secure: an error pattern of up to 4 bits, plus faults in the syndrome
trees, always leaves some syndrome bit set. The minimum distance is 5.

The code is used in systematic form, `C = I G` with `G = [I : X]`.
Information bits are codeword bits 6:0 and parity bits are 14:7, so a read
needs no decoder to recover the data. X is not written as a table anywhere.
`eg_ldpc_pkg::parity_matrix()` derives it while the design is elaborated, by
Gaussian elimination of H over GF(2) with the pivots on columns 7..14. This
works because any 7 consecutive positions of a cyclic code form an
information set. The result is 8 parity equations, each an XOR of some
information bits.

| parameter | value |
|---|---|
| code length n | 15 |
| information bits k | 7 |
| minimum distance | 5 (corrects 2, detects 4) |
| syndrome bits | 15, each a 4-input parity |
| row / column weight of H | 4 |

The code family has members for every t >= 2: n = 2^(2t) - 1,
k = 2^(2t) - 3^t, weight 2^t. Only t = 2 is built, because larger members
need the incidence vector of a line in a larger geometry.

## Units

```
 req_info ─► fsd_encoder ─► codeword reg ─► fault_secure_detector ──(clean)──► nano_memory
                 ▲                               │ flag: encode again              │ column read
                 └───────────────────────────────┘                                 ▼
                                                                              nano_demux
                                                                                   │ suspected codeword
  rsp_info ◄── bits 6:0 ◄── fault_secure_detector ◄── mlg_corrector (2 stages) ◄──┘
                               │ flag: read and correct again
                               └── during scrubbing: clean word written back to nano_memory
```

* **`fsd_encoder`**: combinational. Each of the 8 parity bits has its own
  XOR tree and no term is shared between digits. A single fault inside the
  encoder can then corrupt at most one codeword digit, which the detector is
  sure to see. A synthesis tool that merges common terms would break this
  property, so keep sharing off if the property matters for your
  implementation.
* **`fault_secure_detector`**: 15 independent 4-input parities and one OR.
  The OR is the only gate that must be built reliably. The `syn_flip` input
  lets a testbench flip a syndrome bit to model a fault in the detector.
  Tie it to zero in use.
* **`mlg_corrector`**: the parallel, pipelined corrector. For every bit it
  evaluates the 4 checks that contain that bit. These 4 checks have no other
  bit in common, so:
  * with at most 2 errors, a wrong bit fails at least 3 of its checks;
  * a correct bit fails at most 2.

  The bit is flipped when 3 or more fail (one-step majority logic). Each bit
  has private check logic, for the same single-digit reason as the encoder.
  Stage 1 registers the 60 check results and stage 2 the corrected word. The
  latency is 2 cycles and it accepts a word every cycle. `out_fixed` reports
  that a bit was flipped.
* **`nano_memory`**: the array of R = 15 x GROUP row nanowires by COLS
  columns.
  * A read selects a column, and every row then carries its bit of that
    column, one cycle later.
  * Codeword bit o of the word in slot s lives in row o*GROUP + s.
  * An `upset_*` port flips one stored bit, to model a cell upset. A write
    to the same cell in the same cycle wins over the upset.
* **`nano_demux`**: the row-select demultiplexer built from gate-able
  nanowires. Output nanowire o can be gated only by the GROUP rows of group o.
  The select lines enable the same position in every group, so
  `out[o] = rows[o*GROUP + sel]`. With 15 outputs, one read delivers one
  codeword. The small example this structure comes from uses 3 outputs and
  12 rows. The testbench also runs that size.
* **`fsd_mem_ctrl`**: the sequencer. It handles the request handshake, the
  encode/check/retry and read/correct/check/retry loops, the retry limit and
  scrubbing.
* **`fsd_memory_top`**: wires these together. It adds fault-injection inputs
  for testing.

## Retry and scrubbing (`fsd_mem_ctrl`)

States: `S_IDLE`, `S_ENC`, `S_ENC_CHK`, `S_RD`, `S_COR`.

* **Write**: `S_ENC` latches the encoder output. `S_ENC_CHK` looks at the
  detector flag: a clean word is written and the response is sent, a flagged
  word goes back to `S_ENC`.
* **Read**: `S_RD` issues the column read. `S_COR` waits for the corrected
  word, which arrives 3 cycles after the read (1 cycle in the memory, 2 in
  the corrector). A clean word ends the read with its bits 6:0. A flagged
  word goes back to `S_RD`, so both the read and the correction are
  repeated.
* **Retry limit**: after `MAX_RETRY` (4) consecutive flags the request ends
  with `rsp_fail`. A failed write stores nothing. This limit only matters for
  faults that do not go away. A transient fault is gone by the next try.
* **Scrubbing**: a timer counts `SCRUB_PERIOD` (4096) cycles. The
  controller then finishes the request it is serving, lowers `req_ready` and
  walks through all words in order: read, correct, check, write back the
  clean word. Requests resume when the pass ends. A word whose corrected
  form is still flagged after the retries is left untouched. The timer
  restarts when the pass ends.
* **Guarantee**: nothing a detector has flagged is ever written to the
  array.

Timing of a clean request: the accepting clock edge is edge 0, and
`rsp_valid` is high for one cycle after edge 2 (write) or edge 4 (read). Each
retry adds 2 edges for a write or 4 for a read.

## Top-level interface (`fsd_memory_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset (clears the array to the all-zero codeword) |
| `req_valid` / `req_ready` | in / out | 1 | request handshake; accepted on a clock edge where both are high |
| `req_write`, `req_addr`, `req_info` | in | 1, 6, 7 | write (1) or read (0), word address {column, slot}, data to write |
| `rsp_valid`, `rsp_write`, `rsp_info`, `rsp_fail` | out | 1, 1, 7, 1 | one-cycle completion, read data, retry limit reached |
| `enc_fault`, `cor_fault` | in | 15 | XORed onto the encoder / corrector output (transient fault model) |
| `enc_det_fault`, `cor_det_fault` | in | 15 | flip syndrome bits in the encoder / corrector detector |
| `upset_en`, `upset_row`, `upset_col` | in | 1, 6, 4 | flip one memory bit |
| `scrub_busy` | out | 1 | a scrub pass is running |
| `ev_enc_retry`, `ev_cor_retry`, `ev_corrected`, `ev_scrub_done` | out | 1 | event pulses |

Tie all fault inputs to zero in normal use. Parameters: `COLS` (16),
`GROUP` (4), `SCRUB_PERIOD` (4096), `MAX_RETRY` (4). The number of words is
COLS x GROUP = 64.

## What follows the published design and what is chosen here

Taken from the published design:

* the code and its 15-row parity-check matrix;
* the systematic encoder;
* the detector structure: 4-input syndromes and one OR per detector;
* the detector-driven retry of the encoder and of the corrector;
* scrubbing with normal access stopped;
* the grouping of the row nanowires behind the demultiplexer;
* the arrangement of units.

Chosen here, because the published design leaves them open:

* the corrector's algorithm (one-step majority logic) and its 2-stage
  pipeline;
* the memory size (64 words);
* the write path into the array;
* read latency and reset behaviour;
* the request/response handshake;
* the retry limit and what happens when it is reached;
* the scrub period, and scrubbing the whole array in one pass;
* the fault-injection ports.

Not modelled:

* the physical nanowire structures (the stochastically assembled address
  decoder and the self-assembled demultiplexer);
* a combined scheme for permanent defects, which is mentioned as an
  extension but not specified;
* code sizes other than t = 2.

Column selection in `nano_memory` stands in for the address decoder. The
single-digit fault-containment property of the encoder and the corrector is
respected in the RTL structure but depends on synthesis not sharing logic.

## Verification

Each unit has a self-checking testbench in `tb/`. The testbenches compare the
units with `tb_eg_ref_pkg`, an independent model of H built from its
defining line.

| testbench | what it shows |
|---|---|
| `tb_fsd_encoder` | all 128 information vectors: systematic, zero syndrome, minimum weight 5 |
| `tb_fault_secure_detector` | all 2^15 words: exact syndrome and flag; every 1-4 bit error flagged; every single detector fault flagged |
| `tb_mlg_corrector` | every codeword with 0/1/2 random errors and all 105 double-error patterns, streamed back to back; exact 2-cycle latency |
| `tb_nano_demux` | 15-output default and 3-output/12-row example; one-hot routing |
| `tb_nano_memory` | row interleaving, upsets, write-over-upset, 1-cycle read |
| `tb_fsd_mem_ctrl` | controller on a mock data path (16 words, period 300, 2 retries): retries, give-up, scrub order and write-back, no requests during scrub |
| `tb_fsd_memory_top` | whole design at default parameters (see below) |

`tb_fsd_memory_top` works through these steps:

1. Fills and reads back all 64 words, checking the write and read latency.
2. Makes each mechanism happen and checks that it did: encoder-output fault,
   encoder-detector fault, 1- and 2-bit upsets corrected, corrector-output
   fault, corrector-detector fault, a stuck detector fault that exhausts the
   retries, the first scrub pass starting 4096 cycles after reset, and a
   request held off during a scrub.
3. Runs a word through 2 upsets, a scrub pass and 2 more upsets. The word
   still reads back correctly, which 4 accumulated errors would not allow.

The full run takes about 18,000 cycles.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fsd_memory_top \
    rtl/eg_ldpc_pkg.sv rtl/*.sv tb/tb_eg_ref_pkg.sv tb/tb_fsd_memory_top.sv
./obj_dir/Vtb_fsd_memory_top
```

Each testbench prints `TB_RESULT checks=N failures=M` at the end.

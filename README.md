# Fully parallel min-sum LDPC decoder, (576, 288) code

Reads from NAND flash come back with bit errors, and the error rate grows as
cells shrink and store more bits each. A solid-state drive therefore protects
each page with an error-correcting code, and the decoder sits on the read path:
how fast it decodes caps how fast the drive can read. This design is a
low-density parity-check (LDPC) decoder built for speed by full parallelism.
Every one of the 576 code bits has its own variable-node unit, and every one of
the 288 parity checks has its own check-node unit. The 1824 edges between them
are fixed wires. All nodes update at once. A codeword is decoded in at most
6 iterations of two clock cycles each, and decoding stops as soon as the
hard decisions satisfy every parity check.

The design follows a thesis on an error-control decoder for SSDs ("Development
of a Non-Binary Error Control Decoder for Solid State Drives", 2021). That work
gives the decoder's size, message width, iteration limit, stop rule, node
structure and part of its wiring. Everything else is this design's own choice,
and the sections below mark which is which. Despite the thesis title, the
decoder the thesis actually builds is binary: its messages are scalar LLRs,
its decisions are single bits and its check equations are XORs. This RTL is
binary as well. No GF(8) symbol arithmetic is present, because none is defined.

## The code

The parity-check matrix H has 288 rows (checks) and 576 columns (code bits),
so the code has rate 1/2. It is quasi-cyclic. H is a 12 x 24 grid of 24 x 24
blocks. Each block is either zero or a rotated identity matrix with shift s. In
a block at block row `br` and block column `bc`, check `24*br + r` contains bit
`24*bc + ((r + s) mod 24)`. The table of shifts, `BASE` in `rtl/ldpc_pkg.sv`,
is the whole definition of the code.

The shifts are those of the IEEE 802.16e rate-1/2 base matrix, scaled to
24 x 24 blocks (`s24 = floor(s96 * 24 / 96)`). The thesis does not name this
matrix. It does list the decoder's check equations for checks 261–287 and the
wiring of its first code bits. Both agree exactly with this matrix, and the
testbenches check them (`tb_syndrome_check`, `tb_edge_router`). A further
cross-check is the thesis's flip-flop count of 14,598. That is exactly
2 × 1824 × 4 + 6: two 4-bit message registers per edge of this matrix, plus a
5-bit counter and a done flag. The rows and columns the thesis does not list
are taken from the standard.

Node degrees follow from the matrix:

| nodes | degree | count |
|---|---|---|
| variable nodes, block columns 13–23 | 2 | 264 |
| variable nodes, block columns 0, 1, 3, 4, 6, 8, 10, 12 | 3 | 192 |
| variable nodes, block columns 2, 5, 7, 9, 11 | 6 | 120 |
| check nodes, block rows 0, 3, 4, 6, 7, 9, 10, 11 | 6 | 192 |
| check nodes, block rows 1, 2, 5, 8 | 7 | 96 |

## Message passing and its schedule

Messages are 4-bit two's-complement log-likelihood ratios (LLRs). A positive
value means "this bit is probably 0", and the magnitude is the confidence. All
messages are clamped to the symmetric range −7…+7, so a message and its
negation are always both representable. The code −8 never appears.

The decoder uses the min-sum algorithm with a flooding schedule. In each
iteration, all variable nodes update, and then all check nodes update.

**Variable-node update** (`var_node`). The node adds its channel LLR and its
incoming check messages `r[j]` into a total. The accumulator is wide enough
that this sum never overflows. To each check j, the node sends the extrinsic
message `clamp(total − r[j])`, so a check never hears its own opinion echoed
back. The node also outputs `x = (total < 0)` as its hard decision and
`clamp(total)` as its posterior LLR.

**Check-node update** (`check_node`). To each edge k, the check sends the
product of the signs of the other incoming messages, times the smallest
magnitude among them. A chain of comparators finds the smallest magnitude, its
position and the second-smallest magnitude in a single pass. Edge k then
receives the second-smallest if it holds the minimum, and the smallest
otherwise. No scaling or offset is applied.

**Registers and cycles.** The variable-node outputs (`q`, `x`, posterior) and
the check-node outputs (`r`) are registered. One iteration is therefore two
clock cycles, which matches the thesis's two pipeline stages. The
`iteration_controller` alternates the two phases:

```
start ─► [load] ─► VN ─► CN ─► VN ─► CN ─► ... ─► DONE
           │        │     │
           │        │     └─ syndrome of x == 0, or 6 CN updates made? → stop
           │        │        otherwise: check nodes update, count += 1
           │        └─ variable nodes update (q, x, posterior)
           └─ LLRs captured, all check messages cleared to 0
```

The first VN phase sees only the channel LLRs, so its hard decision is the
plain sign of the input. A clean codeword stops after that phase, with 0
iterations. `done` rises 2 + 2k clock edges after the edge that samples
`start`, where k = `iterations` (0…6). Worst-case latency is therefore
14 cycles per codeword.

**Stopping.** The `syndrome_check` block XORs the hard decisions of each
check's bits. It is evaluated in every CN phase on the decisions just
registered. A zero syndrome, or a completed 6th check-node update, ends the
decode. `success` reports which of the two happened. When the limit is reached
without success, `x` is the last hard decision and is not a codeword.

## Blocks

| module | role |
|---|---|
| `ldpc_decoder` | top: instantiates everything below and wires it |
| `ldpc_pkg` | code dimensions, the `BASE` shift table, elaboration-time helpers |
| `llr_buffer` | one 4-bit register per code bit; holds the channel LLRs for the decode |
| `var_node` | variable-node unit (degree 2, 3 or 6); adds with `qadd`, forms extrinsic messages with `qsub` |
| `qadd`, `qsub` | saturating two's-complement adder and subtractor |
| `check_node` | min-sum check-node unit (degree 6 or 7), built from `comparator`s |
| `comparator` | compare-select of two magnitudes (min, max, which is smaller) |
| `edge_router` | the fixed interconnect: each variable-node slot to its check-node slot and back |
| `syndrome_check` | 288 XOR check equations and an all-zero flag |
| `iteration_controller` | load / VN / CN / done sequencing, iteration count, limit |

Edge order: variable node v keeps its edges in increasing check order (slot j).
Check node c keeps its edges in increasing bit order (slot k). The router, the
syndrome logic and the node instances are all generated block by block from
`BASE`, not listed by hand. A non-zero block always lands in the same slot for
all 24 of its rows, so to change the code you change the table (and `VDMAX`,
`CDMAX` if the degrees change).

## Interface (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active-high reset |
| `start` | in | 1 | one-cycle pulse: capture `llr_in` and decode; ignored while `busy` |
| `llr_in` | in | 576 × 4, signed | channel LLR of each code bit |
| `busy` | out | 1 | a decode is running |
| `done` | out | 1 | the decode has finished; outputs hold until the next `start` |
| `success` | out | 1 | with `done`: all 288 checks are satisfied |
| `iterations` | out | 3 | check-node updates made (0…6) |
| `x` | out | 576 | hard decisions (the corrected codeword on success) |
| `llr_out` | out | 576 × 4, signed | posterior LLRs, clamped |
| `syndrome` | out | 288 | check-equation outputs |

Parameters: `PREC` (message width, default 4) and `IMAX` (iteration limit,
default 6). The code itself is fixed by `ldpc_pkg`. `llr_in` may change while a
decode runs. A new `start` can be given in the cycle after `done` rises.

## Where this design departs from the thesis

- **Start handshake and input buffer.** The thesis decoder starts after reset
  and reads its LLR port directly. Here, a `start` pulse captures the LLRs, so
  codewords can be decoded back to back. This adds 2304 flip-flops.
- **Registered decisions.** `x` and the posterior LLRs are registered in the
  variable nodes (2880 flip-flops). The syndrome is therefore always checked on
  a stable word. With these additions, the design has about 19,800 flip-flops
  against the thesis's 14,598.
- **Iteration counting.** The thesis counter advances every clock cycle up to
  6. Here it counts two-cycle iterations, so the limit is 6 full iterations,
  as the thesis's throughput numbers assume.
- **Number format.** The thesis names its adder, subtractor and comparator
  units but gives no format. Symmetric saturation, the wide variable-node
  accumulator, the "negative means 1" decision and plain (unscaled) min-sum
  are this design's choices.
- **Not built.** The thesis also describes constructing a different code from
  a GF(64) base matrix (9 × 29, masked, 58 × 58 circulants). That procedure
  does not produce the 576 × 288 matrix its decoder uses, and it is an offline
  step, not hardware. It is not part of this design.

## Throughput

At the thesis's 125 MHz clock, a worst-case codeword (6 iterations, 14 cycles)
takes 112 ns. That is 576 bits / 112 ns ≈ 5.1 Gbit/s of code bits, or about
2.6 Gbit/s of data at rate 1/2. A clean codeword takes 2 cycles. The thesis
quotes 2.34 Gbit/s from its own throughput formula. Clock speed has not been
checked here: there has been no timing analysis. The critical path runs from
the message registers through the router, a 6-input adder chain and a clamp,
or through a 7-stage comparator chain.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `tb_qadd`, `tb_qsub`, `tb_comparator`: exhaustive at the decoder's widths.
- `tb_check_node`, `tb_var_node`: random messages at every degree used,
  compared with brute-force integer references. They also cover clear, hold,
  ties and the −8 input.
- `tb_edge_router`: every edge is traced with a unique tag. The
  per-edge reference is derived independently of the router's block-wise
  wiring. Includes the wiring the thesis lists for bits 0, 3 and 9.
- `tb_syndrome_check`: random words against a per-edge reference, plus the 27
  check equations the thesis lists.
- `tb_iteration_controller`: done timing (2 + 2k), counts, enables, limit and
  ignoring `start` while busy.
- `tb_ldpc_decoder`: the full-size decoder at default parameters. It encodes
  random codewords (by Gaussian elimination of H) and decodes clean,
  lightly corrupted, heavily corrupted and random inputs. Every decode is
  compared bit-exactly with a min-sum reference model in the testbench: `x`,
  posterior LLRs, iteration count, success and latency. It also checks that
  each mechanism happens at least once: the zero-iteration stop, the stop after
  correction, the iteration limit, message saturation and back-to-back starts.
  It builds and runs in about a minute.

Not verified: error-rate performance over a channel model, timing closure and
behaviour at other `PREC` values beyond compilation.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv \
          --top-module tb_ldpc_decoder
./obj_dir/Vtb_ldpc_decoder
```

Replace the testbench name to run any other block's test. The package file must
come first, and `-Irtl` lets Verilator find the modules by name.

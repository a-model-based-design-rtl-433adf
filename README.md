# Streaming floating-point accumulation for an SVM polynomial kernel

A pipelined floating-point adder can start a new addition every cycle, but
its result only comes back `p` cycles later. A plain accumulator that feeds
the output back into the adder must wait `p` cycles between elements. With
p = 11 it runs at 1/11 of the adder's rate. This RTL avoids the wait with a
**multi-set delayed-buffering (DB) accumulator**. Every element is tagged
with the number of the vector it belongs to, its *set identifier* (SID).
Each cycle a control block looks for two operands with the same tag and
issues them to the adder. Operands without a partner wait in one of two
small buffers. The adder pipeline thus holds up to `p` partial sums at once,
possibly of different vectors. A new element can enter every cycle, and a
new vector can start the cycle after the previous one ends.

The accumulator is used in a **cubic polynomial kernel** for a support
vector machine (SVM):

    k(x, x') = ( sum_i x_i * x'_i + 1 )^3

A feature vector `x` and a support vector `x'` are streamed in element by
element. Everything is IEEE-754 single precision.

The architecture follows a published model-based (Simulink) design built on
the delayed-buffering method of Tai et al. That design gives the block
structure, the buffer sizes, the latencies (adder p = 11, multiplier q = 6)
and the timing results. Its cycle-by-cycle control algorithm is not
available in detail. The control here is this design's own, and it
reproduces the published timing figures listed under "Timing".

## The kernel datapath (`svm_poly_kernel`)

```
 data ─────────┐
               ├─► multiplier (q) ─► DB accumulator ─┬─► adder +1.0 (p) ─► cubic power (2q) ─► result
 support_vec ──┘                     ▲   ▲           │
 data_valid ─► z^-q ─────────────────┘   │           └─► accumulator_ready ─► z^-p ─► z^-2q ─► result_ready
 data_last  ─► z^-q ─────────────────────┘
```

- One element pair is accepted per cycle. `data_valid` marks valid pairs.
  `data_last` marks the last pair of a dot product.
- The multiplier's product enters the accumulator `q` = 6 cycles later, so
  `data_valid` and `data_last` are delayed by `q` to stay beside it.
- Each dot product leaves the accumulator with `accumulator_ready`. It then
  has 1.0 added (adder latency `p`) and is cubed. The cube is two multipliers
  in cascade, `(t*t)*t`, with latency `2q`. `result_ready` is
  `accumulator_ready` delayed by `p + 2q` = 23 cycles.
- `result_sid` carries the vector's number (0, 1, 2, … modulo 32) with each
  result. Vectors of equal length sent back to back (the normal kernel use)
  come out in order. A much shorter vector can overtake a longer one sent
  just before it. The tag tells them apart.
- `busy` is high from the first element of a vector until the kernel result
  of the last vector that has entered. It counts vectors started minus
  results produced.
- `dot_product` (the accumulator output) and `overflow` (sticky, see below)
  are also brought out.

## How the accumulator works (`db_accumulator`)

### Parts

| part | module | role |
|---|---|---|
| SID generator | `sid_generator` | tags each element with a 5-bit counter; the counter advances after an element that has both `data_valid` and `data_last` |
| adder with latency | `adder_with_latency` | FP32 adder followed by a `p`-stage delay |
| SID supervisor | `sid_supervisor` | a `p`-stage shift register of {valid, SID} beside the adder; reports the SID of the sum leaving the adder, whether that set still has operations inside the pipeline, whether it matches the input, and which SIDs are in the pipeline |
| input buffer (IBUF) | `ibuf` | 8 cells of {value, SID} for input elements waiting for a partner; reads one cell to port A (mode 1), a same-set pair to A and B (mode 2), or one cell to port B (mode 3) |
| result buffer (RBUF) | `rbuf` | 8 cells for adder outputs waiting for a partner; one read port (A) |
| A / B switches | inside `db_accumulator` | A ← input, IBUF A, RBUF A; B ← adder output, IBUF B, constant 0 |
| main control logic | `main_control` | purely combinational; picks the addition of the cycle and where unused operands go |

The tag always refers to the *open* vector, the one currently being
received. A set whose SID differs from the counter is *closed*: all of its
elements have arrived. The counter has 32 values. The delayed-buffering
method holds at most ceil(5p/3) = 19 vectors at once, so the counter has
margin. With this control, a tag could only be reused while still in use if
about 30 very short vectors were inside at once. No test comes close to
that.

### The scheduling rule

Each cycle the adder receives at most one pair of operands with the same
tag. There are two sources of new operands, the input element and the adder
output, plus whatever waits in the two buffers. The main control logic tries
these cases in order and takes the first that applies (`op_t` names them):

1. `OP_IN_SUM`: adder output plus an input element of the same vector.
   This is the steady state: `p` partial sums circulate while elements
   stream in.
2. `OP_SUM_RBUF` / `OP_SUM_IBUF`: adder output plus a waiting operand of its
   vector. RBUF is tried first.
3. `OP_IN_IBUF`: input element plus a waiting input of its vector. This is
   how a vector starts: elements 0 and 1 are paired, 2 and 3 are paired, and
   so on, until sums come back.
4. `OP_IN_ZERO`: the input is the last element of its vector, and no other
   operand of that vector exists anywhere. It is added to 0. This covers
   one-element vectors.
5. Otherwise the adder slot is free. It goes to the *oldest* vector in the
   buffers that can make progress:
   - `OP_IB_PAIR`: two waiting inputs;
   - `OP_RB_IB`: a waiting sum and a waiting input;
   - `OP_IB_ZERO`: a lone waiting input of a closed vector with nothing left
     in the pipeline, added to 0.

   Age is the distance of a vector's SID from the open SID, modulo 32.

An input element that is not used goes into IBUF. An adder output that is
not used goes into RBUF, unless it is the *finished* sum of its vector. A
sum is finished when:

- its vector is closed;
- no operation of the vector is still in the adder pipeline;
- no operand of the vector waits in either buffer;
- the input is not of that vector.

The finished sum is then presented on `result` with a one-cycle
`result_rdy` and its `result_sid`.

Three invariants keep this small and correct:

- Sums are always matched against RBUF first, so RBUF never holds two sums
  of one vector. It therefore needs only one read port.
- A sum is only stored while its vector is still open, or while the vector
  has more operations in the pipeline. A stored sum therefore always gets a
  partner later.
- Every addition turns two operands into one, or one into one when adding 0.
  Once a vector is closed, its operand count only falls, so every vector
  ends as a single finished sum.

### Buffer sizes

There is no back-pressure, so the buffers must be large enough for any
input stream. The published sizes are ceil(p/2) = 6 for IBUF and
ceil(2p/3) = 8 for RBUF. Those bounds belong to the original control
algorithm, not to this one. A write may take a cell that is being read in
the same cycle, so a buffer holding N operands can accept one while giving
one up.

With this control, RBUF never held more than 5 operands in testing, so it
keeps 8 cells. IBUF is different. Long random streams of very short vectors
(1 to 3 elements mixed with longer ones) sometimes need 7 IBUF cells, so
IBUF defaults to ceil(p/2) + 2 = 8 cells, one more than the worst case
seen. `tb_acc_stress` runs 60,000 such vectors and fails with a 6-cell
IBUF. No proof of a bound exists for this control. A write
that finds no free cell is dropped and raises the sticky `overflow`
output, and an assertion flags it in simulation.

### Timing (p = 11, measured in simulation)

| situation | this RTL | published |
|---|---|---|
| 50-term series, first element to result | 99 cycles | 99 cycles |
| 200-term series right behind it, result after the previous result | 200 cycles | 200 cycles |
| 100-element vectors in a continuous stream, last element to result | 49 cycles | 49 cycles (accumulator latency) |
| kernel, 81-element vectors, first element to first kernel result | 159 cycles | 161 cycles |
| kernel, 207 × 81 stream, first element to last result | 16,845 cycles (168.45 µs at 100 MHz) | 161 + 206 × 81 cycles (168.5 µs) |

The 2-cycle difference in kernel latency comes from outside the accumulator,
which matches the published latency. The published kernel has 2 more cycles
of latency; where they sit is not known. Once the stream is full, the kernel
produces one result per vector length (81 cycles), as published.

`result_rdy` and the main control decisions depend combinationally on
`data_valid` / `data_last` of the same cycle. That is the price of making a
decision every cycle with a single-cycle control block.

## Arithmetic

`db_pkg` holds `fp32_add` and `fp32_mul`, the combinational cores of the
adder and multiplier. Each unit is written as the core followed by a delay
line, so `p` and `q` are plain parameters; a synthesis tool can retime the
registers into the logic. Rounding is to nearest even. Subnormal inputs and
results are flushed to signed zero. Infinities propagate, and invalid
operations or NaN inputs give the quiet NaN `0x7FC00000`. Exact cancellation
gives +0. These number-format details are this design's choice.

The accumulator adds a vector's elements in a data-dependent tree order, not
left to right. A result can therefore differ from a sequential sum by
ordinary floating-point rounding. Integer-valued data sums exactly.

## Files

`rtl/` (one module or package per file):

- `db_pkg.sv`: widths, the {value, SID} item type, switch/mode/operation
  enums, FP32 add and multiply functions.
- `svm_poly_kernel.sv`: top, the cubic kernel.
- `db_accumulator.sv`: the accumulator, including the A/B switches.
- `main_control.sv`, `sid_generator.sv`, `sid_supervisor.sv`, `ibuf.sv`,
  `rbuf.sv`: the accumulator's parts.
- `adder_with_latency.sv`, `multiplier_with_latency.sv`, `cubic_power.sv`,
  `delay_line.sv`: arithmetic units and delays.

`tb/`:

- `tb_fp_pkg.sv`: float ↔ real conversion used to compute reference values
  independently of the design.
- One self-checking testbench per module (`tb_<module>.sv`). Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
- `tb_db_accumulator.sv`: the e and π series back to back, with exact
  timing checks. It also runs 600 random integer vectors that must match
  bit for bit, and requires every scheduling case (`op_t`) to occur.
- `tb_acc_stream.sv`: 200 vectors × 100 elements, continuous.
- `tb_acc_stress.sv`: 60,000 vectors of random length (1 to 40 elements,
  mostly short), with and without idle cycles. Every sum is exact, results
  are matched by tag, and no buffer may overflow. It prints the peak buffer
  occupancy.
- `tb_svm_poly_kernel.sv`: 12 × 81 stream plus 300 short vectors with gaps;
  checks kernel values bit for bit, the 23-cycle ready alignment, busy, and
  every accumulator case.
- `tb_svm_kernel_full.sv`: the full 207 × 81 kernel workload at default
  parameters. It checks every result, the order, the latency and `busy`.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/db_pkg.sv tb/tb_fp_pkg.sv tb/tb_svm_kernel_full.sv \
    --top-module tb_svm_kernel_full -o sim
./obj_dir/sim
```

Modules are found through `-Irtl -Itb`. Add `tb/tb_fp_pkg.sv` for
testbenches that import it. Every run takes well under a second.

## Changing it

- `P` (adder latency) and `Q` (multiplier latency) are parameters of the
  kernel and of the units. The buffer sizes default to `(P+1)/2 + 2` and
  `(2P+2)/3`.
- The SID width is a package constant derived from the default `P` = 11
  (`SID_W` = 5). For a much deeper adder, raise `P_DEF` in `db_pkg` so the
  tag can still tell apart all vectors in flight.
- Buffer overflow is the thing to watch when changing `P` or the buffer
  sizes. Run `tb_acc_stress`, `tb_db_accumulator` and `tb_acc_stream`,
  which fail on any overflow.

## Where this departs from the original design and what is not included

- **Control algorithm.** The priorities above are this design's own. In the
  original, the IBUF read controller itself picks the oldest same-set pair.
  Here the main control chooses the set and hands its SID to the buffer as a
  read key. The main control also sees the buffers' cell tags and a
  pipeline SID bitmap, not only summary flags. IBUF's `internal_compare`
  flag is provided but not used by this control.
- **IBUF size.** 8 cells instead of the published 6, for the reason given
  under "Buffer sizes".
- **Numbers.** FP32 rounding, flush-to-zero and NaN handling are own
  choices. The original used vendor floating-point library blocks.
- **Added ports.** `result_sid`, `dot_product`, `overflow` and the
  accumulator's `op` are additions. Reset (synchronous, active high, clears
  all state) is this design's own.
- **Kernel latency.** 159 cycles against the published 161, as explained
  under "Timing".
- **Not included.** The rest of an SVM classifier: support-vector storage,
  weighting of kernel values, and the decision for the 36 binary problems of
  the original application. Support vectors enter as a stream on
  `support_vectors`.

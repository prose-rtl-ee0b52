# ProSE: heterogeneous streaming systolic arrays for protein language models

ProSE is an inference engine for BERT-style transformer models run on long
inputs, such as protein sequences of 300 to 2000 tokens. At these lengths a
large share of the time goes into element-wise work: matrix additions,
scaling, GELU, and the exponentials of softmax. This work sits between
matrix multiplications that are smaller than a 128x128 systolic array
handles well.

The engine makes three choices to handle this:

* **Many small systolic arrays of three kinds instead of one big one.**
  Small arrays waste less time filling and draining on small matrices. They
  also carry more SIMD lanes per processing element: an n x n array has n
  lanes for n² PEs.
* **No scratchpad.** The arrays are *output-stationary*: each processing
  element (PE) keeps its output in a 32-bit accumulator. Those accumulators
  are the only on-card storage for intermediate results. Operands stream in
  from the host and results stream back out.
* **Left rotation.** After a matrix multiply, the array can shift its
  accumulators one column to the left per cycle. The left-most column passes
  through a column of SIMD ALUs, and the results re-enter at the right-most
  column. So a MatMul followed by a MulAdd, a scaling, GELU or exp runs
  without moving the intermediate matrix anywhere else.

This repository holds synthesizable SystemVerilog for the accelerator card:
the processing element, the bfloat16/fp32 arithmetic, the GELU and exp
lookup tables, the SIMD ALU, the streaming buffers, the input partial buffer,
one complete systolic array with its controller, the per-type host ports and
the top level. The host CPU and the host link are not part of the RTL.

## Configuration

`prose_top` defaults to a 16384-PE configuration, the same PE count as one
128x128 array:

| type   | count | size  | special function | used for |
|--------|-------|-------|------------------|----------|
| M-Type | 2     | 64x64 | none             | Dataflow 1: large MatMuls of attention projections and the output layer, followed by MulAdd |
| G-Type | 3     | 32x32 | GELU             | Dataflow 2: intermediate layer, MatMul, MulAdd, GELU |
| E-Type | 20    | 16x16 | Exp              | Dataflow 3: attention scores Q·Kᵀ, scaling (MatDiv), exp for softmax |

Every type also supports MatMul and the SIMD ALU operations. The sum and the
division of softmax are left to the host. Counts and sizes are parameters
(`M_N`, `M_COUNT`, `G_N`, …). Other mixes of the same three types, such as
2 x 64x64 M, 10 x 16x16 G and 22 x 16x16 E, are parameter changes only.

## One systolic array (`systolic_array`)

```
            top stream (B rows) -> 8-deep buffer -> delay slot (skew)
                                                   |  |  |  |
 left stream -> 8-deep buffer -+-> delay slot -> [ PE PE PE PE ]
 (A columns /                   |    (skew)       [ PE PE PE PE ]   accumulators
  vector reg)     input partial +                 [ PE PE PE PE ]   rotate left
                  buffer (A)                      [ PE PE PE PE ]   in simd mode
                                                   ^ left column
                          SIMD ALU column (N lanes, + GELU/Exp tables)
                          results -> right-most column, and to out_data
```

### matmul mode

A MATMUL command with `count = K` computes, for every PE(i,j) of the N x N
tile:

    acc[i][j] += sum over k < K of A[i][k] * B[k][j]

Each step takes one column of A from the left (`a_data[i] = A[i][k]`) and one
row of B from the top (`b_data[j] = B[k][j]`). The delay slots delay lane i
by i steps, so A[i][k] and B[k][j] meet in PE(i,j) at step k + i + j. After
the K feed steps the array runs 2N − 2 more steps with zero operands, so the
last products reach the far corner. A MATMUL therefore occupies
**K + 2N − 2 cycles** when both streams keep up.

Accumulators are not cleared by MATMUL. A large inner dimension can be split
over several MATMULs, and CLEAR starts a new tile. If either input buffer runs
empty during a feed step, the whole array freezes for that cycle (a stall),
delay slots included, so the data in flight stays aligned.

### simd mode

A SIMD command with `count = R` performs R left rotations. In each rotation:

* every accumulator takes the value of its right-hand neighbour;
* the left-most column leaves the array through the N SIMD ALU lanes;
* the N results go into the right-most column;
* if `emit` is set, the results also go to the host as one bfloat16 column
  on `out_data`. Column 0 comes first, and the rotation waits for
  `out_ready`.

After R = N rotations every element of the tile has been replaced by op(C) in
place. The ALU operations are:

| op       | result              | use |
|----------|---------------------|-----|
| `PASS`   | x                   | read the tile out (the tile is unchanged after N rotations) |
| `MUL`    | alpha · x           | scaling; MatDiv C = A / a uses alpha = 1/a |
| `ADD`    | x + v               | matrix addition (bias) |
| `MULADD` | alpha · x + beta · v| MulAdd C = αA + βB |
| `GELU`   | GELU(x)             | G-Type only |
| `EXP`    | exp(x)              | E-Type only |

`alpha` and `beta` are the two scalar registers and are loaded from the SIMD
command. `v` is the vector register, one bfloat16 per lane. For `ADD` and
`MULADD` it is refilled from the left stream, one beat per rotation, so the
host sends matrix B column by column. On an array without the hardware for
it, `GELU` or `EXP` acts as `PASS`.

A typical chain keeps the data in place between steps. For example, Dataflow
3 on an E-Type array is:

    CLEAR; MATMUL K=64; SIMD MUL alpha=1/8 emit=0; SIMD EXP emit=1

Only the exponentials travel to the host.

### Input partial buffer

When a MatMul is tiled, the same block of A rows (one *step*) is needed again
for every column block of B. A MATMUL with `abuf = RECORD` stores the A
columns it streams. A later MATMUL with `abuf = REPLAY` reads them back
instead of the left stream, so only B crosses the host link. The depth
(`INBUF_DEPTH`) is the largest K one step may have: 3072 for M-Type, 768 for
G-Type and 64 for E-Type, the inner dimensions of the model's matrix
products. The buffer holds inputs only, never intermediate results.

### Command interface

`sa_cmd_t` (in `prose_pkg`):

| field    | meaning |
|----------|---------|
| `op`     | `CMD_CLEAR`, `CMD_MATMUL`, `CMD_SIMD` |
| `alu_op` | SIMD operation |
| `abuf`   | `ABUF_STREAM`, `ABUF_RECORD`, `ABUF_REPLAY` (MATMUL) |
| `emit`   | send SIMD results to the host |
| `count`  | K for MATMUL, number of rotations for SIMD |
| `alpha`, `beta` | scalar registers (SIMD) |

A command is accepted (`cmd_valid && cmd_ready`) only when the array is
idle. `busy` is high until it completes. CLEAR takes effect in the accept
cycle. All streams use valid/ready: a beat transfers on a rising edge where
both are high.

Stream data may be sent ahead of its command. Each stream buffer holds 8
beats, and a beat waits while its buffer is full.

## Processing element (`pe`)

Each PE contains:

* a bfloat16 multiplier: operands from above (`in_a`) and from the left
  (`in_b`), exact 32-bit product;
* an fp32 adder into the 32-bit accumulator;
* two operand registers that pass the inputs down and to the right;
* a multiplexer in front of the accumulator that selects the adder (matmul)
  or the right neighbour's accumulator (rotation).

`result` is the upper half of the accumulator, which is its bfloat16 value
rounded toward zero. In the array, `in_a` carries B and `in_b` carries A.

## Number formats and special functions

* Operands are bfloat16 (1 sign, 8 exponent, 7 mantissa bits). Accumulators
  and ALU results are IEEE fp32.
* `bf16_mul` is exact.
* `fp32_add` rounds to nearest even.
* Denormals count as zero, overflow gives infinity, and NaN is the canonical
  quiet NaN.
* The SIMD ALU multiplies and looks up the bfloat16 view of x (its upper 16
  bits). `ADD` uses full fp32.

GELU and exp are **two-level lookup tables**, one copy per SIMD lane.
Level 1 decodes sign and exponent into a 128-entry segment. Level 2 indexes
that segment with the 7 mantissa bits. A lookup takes one cycle. Only a
window of exponents is tabulated:

| table | exponents | entries | size | outside the window |
|-------|-----------|---------|------|--------------------|
| GELU  | −4 … 3    | 2 x 8 x 128  | 4 KB | \|x\| < 1/16 → 0; x ≥ 16 → x; x ≤ −16 → 0 |
| exp   | −6 … 5    | 2 x 12 x 128 | 6 KB | \|x\| < 1/64 → 1; x ≥ 64 → +inf; x ≤ −64 → 0 |

Table entries are computed during elaboration from the exact functions,
GELU(x) = 0.5·x·(1 + tanh(√(2/π)·(x + 0.044715·x³))) and exp(x), rounded to
nearest even bfloat16. No data files are needed.

## Host ports (`type_io_buffer`, `prose_top`)

Each type has one host port, prefixed `m_`, `g_` or `e_`. It stands in for
that type's share of the host link's lanes. A port has:

* a command channel;
* a left stream and a top stream, each beat N lanes wide;
* a result stream.

Host-to-card beats carry a destination array index and are steered to that
array. Result beats from the arrays of a type are merged round robin and
tagged with their source index. A granted array keeps the port until its
beat is taken. A beat for an array whose buffer is full blocks its channel
(head-of-line), so the host should not send more than 8 beats ahead of an
array's commands.

## How far the RTL follows the design, and where it departs

Taken from the design:

* the three array types, their sizes and counts;
* output-stationary PEs with 16-bit multipliers and 32-bit accumulators used
  as intermediate storage;
* the matmul and simd modes with left rotation through a column of N SIMD
  ALUs fed by a vector register and scalar registers;
* 8-deep register streaming buffers and delay slots;
* the input partial buffer;
* the two-level GELU and exp tables with their exponent windows and sizes;
* one I/O port per type.

Choices of this implementation, where the design gives no detail:

* the command format and all handshakes;
* the stall of the whole array, the zero-operand drain, and read-out by a
  `PASS` rotation;
* the ALU's internal structure: two multipliers and an adder, with MulAdd in
  one pass;
* rounding and special-value handling;
* the exact values used outside the GELU and exp windows (the design says
  only that small GELU inputs give 0 and large ones follow a line);
* round-robin merging of results;
* the input partial buffer depths.

Departures and omissions:

* The design runs MatMul at twice the SIMD clock (about 1.6 GHz and
  800 MHz). Here everything runs on one clock.
* A SIMD command starts only after the preceding MATMUL has fully drained.
  The design lets the SIMD column start as soon as the left-most column is
  complete. That overlap is not built.
* The input partial buffer is a register array with combinational read. A
  real implementation would use SRAM with a registered read.
* The host CPU (softmax sum and division, 32 scheduling threads with mutex
  locks) and the NVLink link are not included. The testbenches play the
  host.
* A GELU or EXP request on an array without that table passes x through
  instead of flagging an error.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=<n> failures=<m>`. Expected values are computed in the
testbench with real arithmetic and explicit rounding (`tb_fp_pkg`). Results
are compared bit for bit.

| testbench | what it covers |
|-----------|----------------|
| `tb_bf16_mul`, `tb_fp32_add` | random operands against real arithmetic; special values |
| `tb_gelu_lut`, `tb_exp_lut` | every input inside the window (all 2048 / 3072 entries), plus out-of-window cases |
| `tb_simd_alu` | every ALU operation, with and without tables |
| `tb_pe` | MAC sequence, operand forwarding, hold, rotation, clear |
| `tb_stream_buffer`, `tb_delay_slot`, `tb_input_partial_buffer` | order, depth 8, latency, skew, record/replay |
| `tb_type_io_buffer` | routing, source tags, per-source order, stable held beats, round robin |
| `tb_systolic_array` | N = 4: MATMUL latency K + 2N − 2, accumulation over two MATMULs, replay, stalls, back-pressure, all SIMD ops |
| `tb_prose_top` | reduced card (all arrays 4x4; 2 M, 2 G, 3 E), see below |

`tb_prose_top` runs seven host threads at once, one per array:

* Dataflow 1 on the M arrays: MatMul then MulAdd, then a replayed MatMul;
* bias ADD and GELU on the G arrays;
* MatMul, scaling and exp on the E arrays, with host-side softmax
  normalisation.

It counts stalls, result back-pressure, contention for a type's result port,
partial-buffer replays and each SIMD operation. It fails if any of them
never happened.

The largest configuration simulated is the reduced card of `tb_prose_top`:
seven 4x4 arrays with 16-entry partial buffers. The single-array testbench
was also run with N raised to 16 and 32 (the E-Type and G-Type sizes), and
it passed with 1796 and 7172 checks. The default card (16384 PEs) passes Verilator lint
and Yosys elaboration. It has not been simulated, because building it with
Verilator takes more than 20 minutes. Sizes are parameters throughout, and no
module assumes N = 4. However, the default sizes have not been exercised in
simulation.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_systolic_array \
    -y rtl -y tb +libext+.sv rtl/prose_pkg.sv tb/tb_fp_pkg.sv tb/tb_systolic_array.sv
./obj_dir/Vtb_systolic_array
```

The modules are found through `-y`. Only the packages need listing. Each
testbench builds in seconds. A model of the default card, with 16384 PEs and
416 lookup-table copies, needs about 8 GB of memory in Verilator.

## Files

* `rtl/prose_pkg.sv`: types, command and op encodings, table-building
  functions
* `rtl/bf16_mul.sv`, `rtl/fp32_add.sv`: arithmetic
* `rtl/pe.sv`: processing element
* `rtl/gelu_lut.sv`, `rtl/exp_lut.sv`: special-function tables
* `rtl/simd_alu.sv`: one SIMD lane
* `rtl/stream_buffer.sv`, `rtl/delay_slot.sv`,
  `rtl/input_partial_buffer.sv`: input path
* `rtl/systolic_array.sv`: one array with its controller
* `rtl/type_io_buffer.sv`, `rtl/prose_type_group.sv`: per-type port and group
* `rtl/prose_top.sv`: the card
* `tb/`: testbenches and `tb_fp_pkg.sv` (reference conversions)

# Three machine-learning engines: GeneSys, TABLA and Axiline

This repository holds synthesizable SystemVerilog for three hardware engines
that run machine-learning workloads. Each one trades flexibility for
efficiency in a different way:

- **GeneSys** runs deep neural networks. It is a programmable accelerator
  built around a 32 × 32 weight-stationary systolic array and a 1 × 32 SIMD
  vector unit. A small instruction set sequences it, and strided tile
  transfers feed it from four memory channels.
- **TABLA** runs "classical" learning algorithms such as linear and logistic
  regression and SVMs. It is a programmable dataflow fabric of 8 processing
  units (PUs), each holding 8 processing engines (PEs). The engines
  communicate over neighbour links and over arbitrated buses.
- **Axiline** hard-wires one small algorithm into a three-stage training
  pipeline: inner product, loss function, then stochastic gradient descent.
  Nothing in it is programmable. The algorithm and the feature count are
  fixed when the design is elaborated.

The three come from one automated flow. That flow compiles a model either
into a program for one of the two platforms (GeneSys or TABLA) or directly
into dedicated hardware (Axiline). The engines do not depend on each other.
`verigood_top` puts them side by side: they share clock and reset, and each
keeps its own ports, prefixed `gs_`, `tb_` and `ax_`.

Every engine follows the published block structure, meaning its units,
buffers, buses and pipeline stages. Most details inside those blocks are this
implementation's own choices. That includes every instruction encoding, the
number formats, FIFO depths, handshakes and the control schedules. The last
section of this README lists where the implementation departs from the
original and what is missing.

---

## GeneSys

### Data path of one matrix product

```
 memory ch0 ──► IBUFF (M banks, 2 halves) ──► row m, skewed by m cycles ──┐
 memory ch1 ──► WBUFF slots in every PE, BBUFF biases                      │
                                                                           ▼
                 ┌──────────── M × N systolic array ─────────────┐
  activations ──►│ PE ─► PE ─► ... ─► PE   (activation, weight   │
  flow right     │ │     │            │     read request and     │
                 │ ▼     ▼            ▼     address move right)  │
  partial sums   │ PE ─► PE ─► ... ─► PE                         │
  flow down      │ ...                                           │
                 └─┬─────┬────────────┬──────────────────────────┘
                   + bias + bias       + bias   (registered, one per column)
                   ▼     ▼            ▼
                 OBUFF bank 0 ... bank N-1 (overwrite or accumulate) ──► ch2
                   │
                   ▼
                 SIMD unit (N lanes, vector memory) ◄──► ch3
```

The matrix product works as follows:

- **Weights stay in place.** Before a product, the weights are loaded into a
  small scratchpad inside each PE. Each PE has `WMEM_DEPTH` = 16 slots, and
  the configuration register `R_WSLOT` selects the slot a product uses.
- **Inputs enter row by row.** The IBUFF has one bank per array row. A GEMM
  command reads one IBUFF row per cycle: element m of the row enters array
  row m, delayed by m cycles.
- **Partial sums move down.** Each PE multiplies its activation by the weight
  at the shared read address. It adds the product to the partial sum from
  the PE above and registers the result.
- **PE registers.** Each PE has four registers:
  - the output (partial sum);
  - the forwarded activation;
  - the weight-read request;
  - the weight-read address.

  The request and address travel right together with the activation, so
  every column sees them in step with its data.
- **Bias.** A registered adder below each column can add the bias from
  BBUFF.
- **Timing.** Column n delivers the result of input row r `M + n + 1` cycles
  after that row entered. A command of R rows ends when the last column has
  delivered its R-th result.
- **OBUFF.** The OBUFF has one bank per column. Each bank has its own write
  pointer, so the diagonal wavefront of results needs no realignment. In
  accumulate mode (`GEMM_ACC`) a bank adds the new partial sums to the stored
  ones. This is how a reduction deeper than M is split into tiles.

The GEMM therefore computes
`OBUFF[r][n] (+)= Σ_m IBUFF[r][m] · W[slot][m][n] (+ bias[n])` for rows
`r = 0 … R-1`.

### Memory interfaces and double buffering

Each of the four channels has a `gs_mem_if` tile engine:

| channel | unit  | direction    | fills / drains                                   |
|---------|-------|--------------|--------------------------------------------------|
| 0       | IBUFF | load         | IBUFF banks; element e goes to bank e mod M      |
| 1       | params| load         | WBUFF slot `R_WSLOT` (one row per array row), BBUFF |
| 2       | OBUFF | load / store | OBUFF; element e is bank e mod N, row e / N      |
| 3       | SIMD  | load / store | vector memory; element e is lane e mod N, row e / N |

Each engine holds a two-loop strided address generator (`gs_addr_gen`):

- Loop k has an iteration count and an address stride.
- The innermost loop that has not finished steps, and every loop inside it
  restarts from the new address.
- A transfer of `CNT1` rows of `CNT0` words is therefore
  `base + i1·STR1 + i0·STR0`.

Words arrive in order and are written to consecutive on-chip addresses
starting at `R_BUF_BASE`.

The IBUFF channel is built with `DBUF = 1`:

- Its buffer is split into two halves.
- A tag bit picks the half a load fills, and the tag flips when the load
  completes.
- The GEMM reads the half filled last. The next tile can therefore load into
  the other half while the array works.

Channels 0 and 1 never store, so their `mem_we`/`mem_wdata` outputs stay at 0.

The memory protocol on each channel is:

- a request (`mem_req`, `mem_we`, `mem_addr`, `mem_wdata`) is accepted in a
  cycle where `mem_gnt` is high;
- read data comes back in order on `mem_rvalid`/`mem_rdata`, after any
  number of cycles.

### SIMD unit

`gs_simd` is N lanes wide, one per array column. It has no register file. An
operation works as follows:

- It reads its first operand row from OBUFF or vector memory, and its second
  operand row from vector memory or an immediate.
- It computes the result and writes it back into vector memory.
- It does this for `R_ROWS` rows, in a three-stage pipeline: read, execute,
  write.
- A command of r rows occupies the unit for r + 2 cycles.

| class      | operations                                       |
|------------|--------------------------------------------------|
| ALU        | ADD, SUB, MUL, MAX, MIN, MOV                     |
| calculus   | RELU, ABS                                        |
| comparison | GT, EQ (result 1 or 0)                           |
| cast       | CAST: arithmetic shift right by `R_SHIFT`, saturate to 8 bits |

Pooling is a MAX over rows of vector memory.

### Instruction set

The controller fetches 32-bit instructions from a 256-entry instruction
memory. The host writes that memory through `imem_*`, then pulses `start`.
Each command runs to completion before the next instruction is fetched,
with one exception: a LOAD with bit 23 set runs in the background. The
controller moves on at once, so the next IBUFF tile can stream into one half
while a GEMM reads the other. Only one background load can be in flight. SYNC
waits for it to finish, and so does any later LOAD, STORE or END. A GEMM
reads the IBUFF half that was filled last when the GEMM starts. So start
the GEMM while the prefetch is still running, and put a SYNC before the GEMM
that uses the prefetched tile. A CFG instruction takes 3 cycles.

| [31:28]   | name  | [27:24]                         | [23:0]                                |
|-----------|-------|---------------------------------|---------------------------------------|
| 0         | END   | –                               | –  (raises `done`, returns to idle)   |
| 1         | CFG   | register index                  | value                                 |
| 2         | LOAD  | target: IBUF 0, WBUF 1, BBUF 2, VMEM 3, OBUF 4 | bit 23 background load |
| 3         | STORE | bit 24: 1 = OBUFF, 0 = vector memory | –                                |
| 4         | GEMM  | –                               | bit 0 accumulate, bit 1 add bias      |
| 5         | SIMD  | operation (`simd_op_e`)         | bit 0 source 1 is OBUFF, bit 1 source 2 is the immediate |
| 6         | SYNC  | –                               | –  (waits for the background load)    |

The configuration registers are:

- for transfers: `EXT_BASE`, `CNT0`, `STR0`, `CNT1`, `STR1` and `BUF_BASE`;
- for GEMM and SIMD: `ROWS`, `WSLOT`, `SRC1`, `SRC2`, `DST`, `IMM` and
  `SHIFT`.

`gs_pkg.sv` gives the numbers. The test program in
`tb/tb_genesys_driver.sv` is a full example. It computes two K = 2M tiles,
with loads into alternating IBUFF halves, a bias GEMM and then an
accumulating GEMM. The second input tile is prefetched in the background
while the first GEMM runs, and the testbench checks that the two overlap for
at least one full GEMM. It then applies ReLU into vector memory, loads an addend,
runs ADD and CAST, and finishes with two stores.

### Data formats

- Activations and weights are 8-bit signed.
- Partial sums, biases and SIMD data are 32-bit signed.
- Memory words are 32 bits, and a narrow value sits in the low bits of its
  word.
- The activation and weight widths are parameters (`ACT_W`, `WGT_W`). The
  4-bit design points can be built by setting them to 4.

---

## TABLA

### Structure

```
          global bus (tabla_bus: 1 leader, 1 follower per PU)
     ┌──────────┬──────────┬─── ... ───┐
   PU 0 ──►   PU 1 ──►   PU 2 ──► ... PU 7 ──► (back to PU 0)   neighbour ring
     │
     ├─ PE bus (tabla_bus: 1 leader, 1 follower per PE)
     └─ PE 0 ──► PE 1 ──► ... ──► PE 7 ──► (back to PE 0)         neighbour ring
```

The same two mechanisms appear at both levels:

- **Shared bus (`tabla_bus`).**
  - Each node has a *follower* with one write FIFO of `{destination, data}`
    and one read FIFO per possible source.
  - The *leader* grants one node per cycle, round-robin starting after the
    last node granted.
  - In that cycle one word moves from the node's write FIFO into the
    destination's read FIFO for that source.
  - A node is only granted when that read FIFO has room.
  - Because every source has its own read FIFO, a receiver can wait for a
    word from a particular sender.
- **Neighbour links.** These are FIFOs from each node to the next, used for
  traffic between adjacent nodes so that it stays off the shared bus.

PE 0 of each PU is the PU's gateway: only it sees the global bus and the
inter-PU ring.

### Processing engine

Each PE runs its own program from a 64-entry instruction memory, with one
instruction per cycle and a 16-entry register file. An instruction:

- reads operands A and B;
- applies one operation: `ADD SUB MUL MAX MIN PASS GT`;
- writes result D.

Each operand or result names a place:

| kind | place                                              | index means   |
|------|----------------------------------------------------|---------------|
| 0    | register                                           | register      |
| 1    | neighbour link (in from previous PE, out to next)  | –             |
| 2    | PE bus                                             | source / destination PE |
| 3    | global bus (PE 0 only)                             | source / destination PU |
| 4    | inter-PU link (PE 0 only)                          | –             |

Encoding: `[31:28] op`, `[27:25] A kind`, `[24:21] A index`, `[20:18] B kind`,
`[17:14] B index`, `[13:11] D kind`, `[10:7] D index`.

- **Stall rule.** An instruction waits until every FIFO it reads holds data
  and the place it writes has room. It then pops, computes and pushes in one
  cycle.
- **HALT.** This instruction stops the PE. `halted` is high once every PE
  has stopped.
- **Data format.** Data are 16-bit fixed point with 8 fraction bits. `MUL`
  rescales its result, and `GT` yields 1.0 or 0.

The host loads each PE's instructions and registers through `host_pu`,
`host_pe`, `imem_*` and `reg_*`, and reads registers back through
`reg_rd_*`.

The test program (`tb/tb_tabla_prog_pkg.sv`) computes a distributed dot
product, which is the core of regression and SVM inference. It runs in four
steps:

1. Each PE multiplies its feature by its weight.
2. The products are summed along the PE ring.
3. The PU totals travel over the PE bus and the inter-PU links.
4. The global bus delivers the chip total to PU 0, PE 0, which also computes
   the decision `total > threshold`.

---

## Axiline

```
 x, w chunk ──► inner product ──► + ──► acc ──┐               Stage 1 (ena[1])
 (LANES wide)     mux(Sel: 0 / acc) ──┘       │
                                              ▼
 y ─────────────────────────────► loss / prediction  ──► g    Stage 2 (ena[2])
                                              │
 x, w ─► DLY = C+1 register chain ───────────►│
                                              ▼
                      w' = decay·w − g·x  (per lane)          Stage 3 (ena[3])
                                              │
 weight store ◄───────────────────────────────┘  (write back, feeds the next sample)
```

A sample of F features arrives as C = ⌈F / LANES⌉ chunks of LANES features,
one chunk per cycle (F = 54 and LANES = 8 give C = 7).

- **Stage 1** accumulates the inner product. `Sel` starts a new sum on the
  first chunk.
- **Stage 2** runs one cycle after the last chunk. It forms the prediction
  and the gradient scale g:
  - linear regression: `h = s`, `g = lr·(s − y)`;
  - logistic regression: `h = σ(s)` using a piecewise-linear sigmoid,
    `g = lr·(h − y)`;
  - SVM with labels ±1: `h = s`, `g = −lr·y` if `y·s < 1`, else 0.
- **Stage 3** runs the SGD step on each chunk, two multipliers and one adder
  per lane. The x and w of chunk k reach it through a chain of C + 1
  registers. They therefore arrive in the same cycle as g of their own
  sample, and the updated chunk is written back to the weight store.

Timing, with C chunks per sample:

- The prediction appears on `pred` with `pred_valid` C + 1 cycles after the
  sample's first chunk is accepted.
- In training (`train = 1`) the next sample is accepted C + 3 cycles after
  the previous one. By then, every chunk it will read has been updated.
- In inference (`train = 0`) a sample is accepted every C cycles and nothing
  is written back.
- The C chunks of a sample must arrive back to back. An assertion checks
  this.

Numbers are 16-bit fixed point with 8 fraction bits and saturate. The
learning rate (1/16) and the decay factor (1.0) are parameters.

---

## Interfaces of the top level

| prefix | engine  | ports |
|--------|---------|-------|
| `gs_`  | GeneSys | instruction-memory write port, start/busy/done, four memory channels (arrays of 4) |
| `tb_`  | TABLA   | start, halted, bus-activity and stall flags, host port for programs and registers |
| `ax_`  | Axiline | train, weight write/read port, sample stream (valid/ready, LANES features, label), prediction, busy, write-back count |

The top-level parameters are:

- `GS_M`, `GS_N` for the GeneSys array size;
- `TB_NPU`, `TB_NPE` for the TABLA size;
- `AX_ALG`, `AX_FEATURES`, `AX_LANES` for Axiline.

At the defaults (32 × 32, 8 × 8, logistic regression over 54 features), a
generic yosys synthesis gives about 43,800 cells, 70,700 flip-flop bits and
464,000 memory bits.

---

## Simulating

Everything is plain SystemVerilog for verilator 5. Packages must come first
on the command line. For example, the full-size end-to-end test is:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gs_pkg.sv rtl/tabla_pkg.sv rtl/axl_pkg.sv \
    tb/tb_tabla_prog_pkg.sv tb/tb_axl_ref_pkg.sv \
    tb/tb_verigood_top.sv --top-module tb_verigood_top
./obj_dir/Vtb_verigood_top
```

Building takes about a minute and the run takes under a second. Each
testbench ends by printing `TB_RESULT checks=<n> failures=<n>`. Each one has
a watchdog that counts a failure if the test hangs.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_gs_pe`              | PE multiply-accumulate, forwarding, scratchpad reads |
| `tb_gs_systolic_array`  | 4 × 3 array against a matrix model, bias, latency M + n + 1 |
| `tb_gs_obuf`            | skewed column writes, accumulate mode, load/store port |
| `tb_gs_addr_gen`        | random three-loop address sequences against a model |
| `tb_gs_mem_if`          | loads and stores through a stalling memory, double-buffer tag |
| `tb_gs_simd`            | every SIMD operation against a model, r + 3 cycle completion |
| `tb_gs_controller`      | command order, config registers, 3-cycle CFG |
| `tb_genesys`            | 8 × 8 GeneSys running the two-tile GEMM, ReLU, ADD, CAST program |
| `tb_tabla_bus`          | random traffic: every word delivered once, in order per source |
| `tb_tabla_pe`           | every operand and destination kind with delayed inputs and blocked outputs, stalls, HALT |
| `tb_tabla_pu`, `tb_tabla` | distributed dot product and decision on 4 PEs / 4 × 4 PEs |
| `tb_axl_pipeline`       | all three algorithms against a reference model, stage timing |
| `tb_axiline`            | training then inference for all three algorithms, C + 1 latency, C + 3 / C sample periods, trained weights |
| `tb_tabla_svm`          | SVM inference at the 143-feature benchmark size on the full 8 × 8 TABLA, 3 features per PE: score, class, cycles |
| `tb_axiline_benchmarks` | Axiline built at the three benchmark sizes (logistic regression 54, SVM 200, linear regression 784 features), training and inference |
| `tb_verigood_top`       | all engines at full default size at once, with counts of each mechanism |

The full-size test runs several things at once:

- GeneSys at 32 × 32 computes a 32-row product with K = 64 through
  stalling memory models.
- TABLA at 8 × 8 runs the 64-PE dot product twice.
- Axiline, with 54 features, trains on 6 samples and then infers 4.

It fails if any of these mechanisms never happened:

- a memory stall;
- an IBUFF half swap;
- a bias GEMM and an accumulating GEMM;
- each SIMD operation used;
- global- and PE-bus transfers;
- a PE stall;
- a weight write-back;
- the switch from training to inference.

Helper files in `tb/` are `tb_mem_model` (a memory channel with random grant
stalls and fixed read latency), `tb_genesys_driver`, `tb_tabla_driver`,
`tb_axiline_run`, `tb_tabla_prog_pkg` and `tb_axl_ref_pkg`.

---

## How far this follows the original design

**Taken from the original design:**

- GeneSys:
  - two compute arrays, with the buffer set IBUFF, WBUFF, BBUFF, OBUFF and
    instruction memory;
  - a multibanked IBUFF with one bank per row, and an OBUFF with one bank per
    column;
  - PEs with a weight scratchpad and four pipeline registers, and bias adders
    below the array;
  - load-only and load/store channels, strided tile transfers and a
    double-buffer tag;
  - a SIMD unit without a register file that reads scratchpads directly, with
    ALU, calculus, comparison and cast instructions;
  - the 32 × 32, 8-bit configuration.
- TABLA:
  - the PU/PE hierarchy;
  - the neighbour and global buses at both levels;
  - a leader/follower arbiter with a write buffer and per-source read
    buffers, moving one word per cycle;
  - 8 PUs of 8 PEs.
- Axiline:
  - the three stages (inner product with a zero/accumulate mux, an
    algorithm-specific combinational stage, SGD with two multipliers and an
    adder);
  - the `Sel` and `ena[1..3]` controls;
  - the x/w register chain, and the weight loop-back;
  - logistic regression with 54 features as the default.

**This implementation's own choices:**

- every instruction encoding and configuration register;
- number formats, buffer depths and FIFO depths;
- the memory-channel protocol;
- the SVM loss (hinge) and the sigmoid approximation;
- the Axiline control schedule (C + 3 training period);
- the TABLA PE instruction set and stall rule;
- neighbour buses built as FIFO rings.

**Not included:**

- Off-chip memory (DRAM/HBM2). Its channels are ports of the top.
- TABLA's memory interface and AXI ports. TABLA data goes through the host
  register port instead.
- GeneSys's on-chip global buffer in front of memory. The channels go
  straight to the ports.
- Foundry register-file macros, which are modelled as register arrays.
- The mixed-signal clock sources.

**Further simplifications in GeneSys:**

- The SIMD ISA's separate setup instructions (datatype configuration,
  iterator configuration, loop) are folded into CFG register writes and a
  per-command row count.
- Only two address loops are built, so convolutions must be presented as
  matrix products (im2col layout) by whoever writes the tiles to memory.
- Only IBUFF prefetch overlaps computation, one background load at a
  time. Weight loads and stores still run one after another with the
  other commands.

### Capacity against the published workloads

- **TABLA, SVM inference and training.** A 143-feature model fits the 8 × 8
  TABLA with room to spare: about three features per PE against 16
  registers. Samples must be written in by the host. `tb_tabla_svm`
  classifies at this size in 27 cycles once a sample is loaded; SVM training
  on TABLA is not simulated here.
- **GeneSys, ResNet-50.** ResNet-50 (about 25.6 M weights) needs tiling on
  GeneSys, and the tiling is supported. However, the weights exceed the
  2^24-word address space of one channel at the default `AW = 24`, so `AW`
  must be widened.
- **Axiline, larger benchmarks.** The SVM (200 features) and linear
  regression (784 features) benchmarks are separate Axiline builds: set
  `FEATURES` and `ALG` accordingly. At 8 lanes they take 25 and 98 chunks per
  sample. `tb_axiline_benchmarks` trains and infers with all three sizes.

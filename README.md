# Stream-driven PE-array accelerator

This is a loosely coupled accelerator for a RISC-V SoC. It runs the inner loops of
data-intensive kernels as a dataflow graph on a 4x4 array of floating-point
processing elements (PEs). It does no instruction fetch and computes no addresses inside the array.

Every array operand arrives through a **stream**, and every result leaves through one. A stream
is a memory access pattern described once, up front. A **Streaming Engine (SE)** walks those
patterns on its own. It turns them into cache-line requests, puts the returned words back in
program order, and queues them in FIFO **stream registers**. Two **stream re-mappers**, built
from permutation networks, connect the stream registers to the edges of the PE array. There,
values move one PE per cycle through statically scheduled, time-multiplexed PEs. A small
**controller** takes the host's configuration and starts and monitors a run.

The stream model follows the RISC-V Unlimited Vector Extension (UVE) idea of describing a loop
nest's accesses as chained one-dimensional patterns. This RTL implements affine patterns of up to
three dimensions.

```
 host bus ──► accel_controller ──► PE configuration / stream commands / re-mapper setup / go
                                   │
   ┌──────────────────── streaming_engine ───────────────────────────────┐
   │ stream_configurator ─► stream_table ─► stream_state_selector ─► agu │
   │                                              ▲ bypass  │           │
   │                             load addresses ◄─┴─────────┴► store addr│
   │  load_mmu (request queue, line buffer, load FIFO)   store_mmu       │
   │        │  in-order elements                    ▲ data + addresses  │
   │  load stream_registers (4)            store stream_registers (4)    │
   └────────┼───────────────────────────────────────┼────────────────────┘
       remapper_load (Benes 16)              remapper_store (Benes 16)
            │ 8 input buffers                       ▲ 8 output buffers
            ▼ west (rows) / north (columns)         │ east (rows) / south (columns)
                          pe_array (4x4 pe, rings)
```

The top module is `stream_accel_top`. It has the following ports:

- a 64-bit host register bus (`host_we`, `host_addr[11:0]`, `host_wdata`, `host_rdata`);
- a line read port with request IDs, whose responses may come back in any order;
- a masked line write port;
- `busy` and `done`;
- an 8-bit event vector for performance counting.

## Streams and their descriptors

A stream descriptor (`stream_state_t` in `accel_pkg`) contains:

- a byte base address;
- up to three dimensions, each with a 16-bit element count and a signed 16-bit stride counted in 32-bit elements (dimension 0 is the innermost);
- state flags;
- the iteration counters.

Element *i,j,k* is read from or written to this address:

`base + 4·(i·stride0 + j·stride1 + k·stride2)`

There are 8 streams. Numbers 0–3 are load streams and 4–7 are store streams.

The host builds a descriptor with commands (`stream_cmd_t`). The **stream configurator** applies
them as a read-modify-write on the **stream table**:

| Command | Effect |
|---|---|
| `LD_START` / `ST_START` | Opens a stream with its base and its first dimension. |
| `APPEND` | Chains one more dimension. A fourth dimension is refused and raises `cfg_error`. |
| `CLEAR` | Empties the entry. |

The `last` bit marks the descriptor as complete. Only complete descriptors are activated when a
run starts.

## Address generation: selector, bypass and AGU

The engine has a single **AGU** (address generation unit), shared by all streams. In one
combinational step it produces the current address and the next iteration state, i.e. the
counters advanced with carries and a `done` flag set when the outermost counter wraps.

The **stream state selector** picks one eligible stream per cycle, round-robin. It registers the
stream's state for the AGU. In the next cycle the AGU result is written back to the table.

If the selector picks the same stream twice in a row, the table still holds the old counters at
the moment they would be read. In that case the selector forwards the AGU's next state straight
into its own register and skips the write-back. This is the **bypass**, and it keeps a single
busy stream at one address per cycle.

A stream whose next state is already `done` is excluded in the same cycle, so it never issues an
extra address.

Eligibility also carries the engine's flow control:

- A **load stream** is picked only while its stream register has an unreserved slot. A per-stream credit counter (`resv`) is incremented when an address is issued and decremented when elements leave the register. Every element that enters the in-order load FIFO is therefore guaranteed a place, and the FIFO can never block behind a full stream register.
- A **store stream** is picked only while its address queue in the store MMU has room for two more addresses. One address may still be in the AGU stage.

## Load MMU: coalescing, line buffer and reordering

The load MMU takes at most one load address per cycle. It works with 64-byte lines (16 words).
It looks for the addressed line in the following order:

1. **A response arriving in this cycle.** The word is taken from it.
2. **The load line buffer.** This is a 4-row, fully associative L0 of recently returned lines with round-robin replacement. On a hit the word is known at once.
3. **The load request queue.** This has 32 entries, and the entry index is the 5-bit memory request ID. If an entry already waits for the line, the access is **coalesced** onto that entry.
4. **Otherwise** a new entry is allocated. It is sent to memory when `mem_req_ready` allows.

Each access is recorded in the 16-entry **load FIFO** together with its stream number, the ID it
waits for and the word offset. Accesses answered in steps 1 or 2 are recorded as already complete.

Memory returns whole lines tagged with their ID, in any order. A returned line does three things:

- it fills every waiting FIFO entry with that ID, wherever it sits in the FIFO;
- it is written into the line buffer;
- it frees its request queue entry.

The FIFO head leaves only when it is complete, so elements reach the stream registers in program
order even when lines return out of order. A fill for an entry behind the head is counted as an
out-of-order event.

`ready` means two more addresses can be taken: the request queue and the FIFO each have two free
entries. This covers the address that is already in the AGU stage.

## Store MMU: address queues and line merging

Each store stream has an 8-entry address queue, filled by the AGU. An address waits until the
stream's next data element appears in its store stream register, which is fed by the array.
Each cycle one stream that has both an address and data is served, lowest number first.

The served word is merged into a one-line write buffer with a 16-bit word mask. The buffer is
written to memory as one masked line write in either of these cases:

- the next word belongs to another line;
- no word is ready.

As a result, consecutive stores to the same line cost a single write.

## Stream registers and the re-mappers

A **stream register** is a FIFO of 8 elements. It takes up to 4 elements and gives up to 4 in a
cycle, and shows its first 4 elements (`head`).

Each stream has an unroll width *u* (0 to 4, where 0 means unused), set through the controller.

**Load re-mapper.** Load stream *s* owns lanes 4s..4s+3 of a 16-lane **Benes network**. Each
stream holding at least *u* elements puts its first *u* elements on its lanes, and the network
carries them to the input buffers. A stream moves only when every buffer that one of its used
lanes reaches has room. To find those buffers, a second copy of the network, with the same
settings, carries lane numbers instead of data. The check is per stream on purpose. A single
"all buffers have room" rule deadlocks when two streams feed one PE chain and one of them runs
ahead: its buffers fill, and the late stream can then never deliver the operand the array is
waiting for. A
stream's elements are therefore spread over up to *u* array inputs: a stream becomes *u*
interleaved micro-streams.

**Store re-mapper.** This is the reverse. Output buffer *p* drives lane *p* with its value, a
valid bit and its own port number as a tag. After the network, store stream *s* takes lanes
4s..4s+u−1 when all *u* of them are valid and its register has room. The tags tell the re-mapper
which output buffers to pop.

Port numbering:

- Ports 0–3 are the rows: west inputs and east outputs.
- Ports 4–7 are the columns: north inputs and south outputs.

Each port buffer holds 4 values.

**Benes network** (`benes_network`). It has 7 stages of 8 two-by-two switches. Stage *i* pairs
the lanes that differ in bit *b*, with *b* = 0, 1, 2, 3, 2, 1, 0. Switch *k* of a stage joins lane
*j* and lane *j*+2^b, where:

`k = ((j >> (b+1)) << b) | (j & (2^b − 1))`

When its setting bit `sw[i][k]` is 1, the switch swaps the two lanes. The 56 setting bits come
from the host; the hardware does not compute a routing. Any permutation of the 16 lanes can be
set up.

## PE array

### The PE

Each `pe` contains:

- a 16-context configuration memory;
- an 8-word data memory (3 read ports and 1 write port), used for constants and delayed values;
- a control unit;
- a combinational single-precision **FPU**, which performs one fused multiply-add datapath plus min/max, compares, sign injection and move (16 operations).

The four outputs are registers. A value produced or routed in one cycle is seen by the neighbour
in the next cycle.

### Instruction word

The instruction word (`pe_instr_t`) is 35 bits. From the most significant bit down:

| Field | Bits | Meaning |
|---|---|---|
| `ring_n`, `ring_w` | 1 + 1 | An edge PE reads its north/west input from the column/row ring instead of the stream buffer |
| `dm_we`, `dm_waddr` | 1 + 3 | Write the FPU result to a data-memory word |
| `res_we` | 1 | Load the result register |
| `out_sel[W,S,E,N]` | 4 × 3 | What each output register loads: nothing, the FPU result, or one of the inputs (route-through) |
| `src_c`, `src_b`, `src_a` | 3 × 4 | Operand source: 0–3 the N/E/S/W input, 4 the result register, 5 zero, 8–15 a data-memory word |
| `op` | 4 | FADD, FSUB, FMUL, FMADD, FMSUB, FNMADD, FNMSUB, FMIN, FMAX, FEQ, FLT, FLE, FSGNJ, FSGNJN, FSGNJX, FMV |

`FMADD` computes a·b + c. `FADD` and `FSUB` use a and b. The compares return 1.0f or 0.0f as a
float, so they can feed arithmetic directly.

### Hardware loop

Each PE's loop register is `{SKEW[15:0], ITERS[15:0], LEN[7:0]}`. After `go`:

- contexts 0..LEN−1 repeat SKEW+ITERS times;
- during the first SKEW repetitions the PE is idle;
- the PE is done after the last repetition.

With LEN = 1, SKEW is simply a delay in cycles. It lines a PE up with the wave-front of data
arriving from upstream, in the same way as a modulo schedule with a pipeline prologue.

### Lockstep execution and stalls

All PEs advance together under one signal, `run`. `run` drops (a **stall**) when either of these
holds:

- an edge PE reads a stream input whose buffer is empty in this cycle;
- an output buffer lacks room for two more values. The edge push trails the production by one cycle.

Stalls freeze every register, so the static schedule is never disturbed.

### Valid bits and draining

Every value carries a valid bit. An operation that reads an invalid neighbour value writes
nothing, and its outputs are marked invalid. This lets the pipeline fill and drain without any
extra control.

When all load streams are exhausted and the input buffers are empty (`in_drained`), reading an
empty stream input yields an invalid bubble instead of a stall. A PE whose loop window is longer
than its own stream can therefore finish.

East outputs of the last column and south outputs of the last row are pushed into the output
buffers when they are valid.

### Rings

The north output of a first-row PE feeds the south input of the last-row PE in the same column.
In the other direction, the last row's south output can replace the first row's north stream
input. West and east along each row work the same way.

## Controller and register map

`accel_controller` decodes the host bus. Addresses are in 64-bit words.

| Address | Register |
|---|---|
| `0x000 \| pe<<4 \| ctx` | PE instruction (`pe` = row·4 + column) |
| `0x400 \| pe<<3 \| a` | PE data-memory word |
| `0x800 \| pe` | PE loop register {SKEW, ITERS, LEN} |
| `0xC00` | Base address for the next stream command |
| `0xC01` | Stream command {sid[37:35], kind[34:33], last[32], size[31:16], stride[15:0]} |
| `0xC02` / `0xC03` | Load / store unroll widths, 3 bits per stream |
| `0xC04` / `0xC05` | Load / store Benes switch bits (56) |
| `0xC08` | Write bit 0 = start. Read {busy, done} |
| `0xC09` / `0xC0A` | Cycles / stall cycles of the last run |

Starting a run produces a one-cycle `go`, which does the following:

- activates the complete stream descriptors;
- rewinds the stream counters;
- clears the stream registers and the re-mapper buffers;
- starts every PE loop.

The controller then counts cycles. It returns to idle when three conditions hold together:

- every PE loop has finished;
- every stream has issued all its addresses and every load and store has completed;
- the store re-mapper is empty.

Writes to the configuration registers are ignored while a run is in progress.

A typical program has four steps:

1. Write the instructions, constants and loop registers.
2. For each stream, write the base and then one command per dimension, with `last` set on the final one.
3. Write the widths and switch bits.
4. Start the run and poll `0xC08`.

## Memory side

The read port carries:

- requests `{line[25:0], id[4:0]}` with a valid/ready handshake;
- responses `{id, 512-bit line}`, one per cycle, in any order.

Every request is answered exactly once. The write port carries a line, 512 bits of data and a
16-bit word mask, with valid/ready.

In an SoC these ports go to the L2 or the system bus through an adapter. That adapter is not part
of this RTL.

## Simulating

Each block has a self-checking testbench `tb/<block>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/accel_pkg.sv tb/tb_fp_pkg.sv tb/pe_array_tb.sv --top-module pe_array_tb
./obj_dir/Vpe_array_tb
```

`tb/tb_check.svh` holds the check and watchdog macros. `tb/tb_fp_pkg.sv` holds real↔float
helpers (round to nearest even, flush to zero) and an instruction builder.

`tb/stream_accel_top_tb.sv` runs the whole accelerator at its default size (4x4 array, 32-entry
request queue, 4-row line buffer). It programs everything through the host bus. A memory model
with random readiness and random, out-of-order response delays serves the memory ports.

The testbench runs two kernels side by side in one run.

- **First kernel.** Y[i] = 2·A[i] + 1 on rows 0–1. A is a 1-D load stream of 128 elements with unroll width 2, and Y is a store stream of width 2.
- **Second kernel.** Z[j] = 0.5·B[j] − 3 on rows 2–3. B is a 2-D stream of 8 rows of 4 elements with a 16-word row pitch, and Z is 1-D. The Benes switches route B's lanes to rows 2–3 and rows 2–3 back to Z's lanes.

The testbench checks every stored word against a floating-point reference. It also checks that
each of these mechanisms occurred at least once:

- array runs and stalls;
- AGU addresses and selector bypasses;
- line-buffer hits and coalesced requests;
- out-of-order returns;
- store merges.

### Kernel testbenches

Four more testbenches run small versions of typical stream kernels on the whole accelerator,
with the same memory model. The sizes are chosen to keep each run short. Each checks every
output word against a reference that rounds once per operation. Each also checks that the words next to the output
array are left alone, and that stalls, line-buffer hits and coalesced requests occurred.

| Testbench | Kernel | Mapping |
|---|---|---|
| `jacobi1d_tb` | y[i] = (x[i]+x[i+1]+x[i+2])/3, 96 points | Three load streams read X at offsets 0, 1 and 2 into rows 0–2. Column 0 adds the values as they move south. PE(2,1) multiplies by 1/3, and two PEs route the result to the east edge. |
| `jacobi2d_tb` | 5-point stencil ×0.2 on a 12×10 grid | A 3-D stream of width 3 gives the west, centre and east neighbours. A 3-D stream of width 2 gives the north and south neighbours. Eight PEs add the five values and scale the sum. |
| `fir_tb` | 4-tap FIR, 120 outputs | One 2-D stream of width 4 gives each output's window. A multiply/FMA chain runs down column 0, with the taps in the PE data memories. |
| `gemm_tb` | C = A·B with A 24×4 and B 4×4 | One column of C per run, four runs in a row. B's column sits in the data memories of column 0. A is a 2-D stream, and C is stored with a stride of 4. |

In all four, each PE's loop skew delays it by one cycle per step along the dataflow path. The
testbench finds the Benes settings from the wanted lane-to-port mapping, using a reference
model of the network.

## Departures and own choices

The published design fixes only a few things:

- the block structure;
- the 4x4 array;
- the 32-entry load request queue and the 4-row line buffer;
- the 16-operation FPU with FMA;
- the PE interconnect with rings;
- the behaviour of the selector bypass, the load MMU's coalescing and reordering, and the store address queues.

Everything below is this design's own choice.

- **FPU.** The operation list is the RISC-V F set without divide and square root. Rounding is to nearest-even only. Subnormals are flushed to zero, and NaNs are returned as canonical. Kernels that need divide, square root, exp or log (Blackscholes) cannot be mapped as built.
- **Streams.**
  - Only affine patterns are supported, with at most three dimensions and 16-bit sizes and strides.
  - Indirect and other non-affine UVE patterns are not built.
  - Streams 0–3 are always loads and 4–7 always stores.
- **Buffer sizes.** The load FIFO has 16 entries, each store address queue 8, each stream register 8 and each array port buffer 4. Lines are 64 bytes.
- **Lockstep control.**
  - The array runs under one global run/stall signal.
  - Values carry valid bits, and exhausted streams give bubbles once drained.
  - A PE loop is described by a per-PE loop register (LEN, ITERS, SKEW).
  - A mapping tool must produce the instructions, skews and Benes settings; the testbench shows hand-made examples.
- **Interfaces.** The host interface is a plain register bus rather than a custom-instruction or MMIO port of a particular core. The memory interface is line based with IDs.
- **Not included.** The host CPU, the L2 cache and DRAM, and the SoC bus adapter are not part of the RTL.
- **Address rate.** The SE generates at most one address per cycle. The single AGU is shared by all streams, so the address rate is the throughput limit. This is the same limit the original design reports.

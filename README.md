# A 32-bit SIMT GPU in SystemVerilog

This is a small GPU for data-parallel kernels. One instruction stream runs over up to
2048 data elements at once. Eight streaming multiprocessors (SMs) each take a block of
256 elements. Each SM runs its block as eight *warps* of 32 threads. A warp runs in
lock step on the SM's 32 ALU cores: one `ADD` adds 32 pairs of registers in a single
clock. Memory traffic is the slow part. A load or store moves one word per clock, so
it takes 32 clocks per warp. While one warp waits on memory, or on the multi-cycle
square-root unit, the SM's warp scheduler keeps the cores busy with the other warps.

Everything is 32 bits wide: data words, registers and the launch word. Instructions
are 20 bits.

## Launching a kernel

The host (a CPU, not part of this design) does four things:

1. It writes the kernel into the instruction caches through `ic_we/ic_addr/ic_wdata`.
   Each word is written into every SM's I-cache, because all SMs run the same kernel.
2. It writes each SM's operands into that SM's D-cache through
   `dc_we/dc_sm/dc_addr/dc_wdata`.
3. It starts the kernel with one 32-bit word on `data_in`, strobed by `data_in_valid`:

   | bits    | meaning                                                  |
   |---------|----------------------------------------------------------|
   | [31:16] | `n`, the number of data elements                         |
   | [15:0]  | I-cache address of the kernel's first instruction        |

4. It waits for `done`, then reads the results back through `dc_sm/dc_addr/dc_rdata`.

The launch decoder computes `blocks_num = ceil(n/256)` and, for a full block,
`warps_num = min(ceil(n/32), 8)`. Block *b* goes to SM *b*, which gets
`clamp(n − 256·b, 0, 256)` elements. If `n` needs more than 8 blocks,
`launch_overflow` rises and only the first 2048 elements are processed. SMs with no
elements are not started.

`busy` rises in the cycle after `data_in_valid` and falls once every warp of every SM
has executed `HALT`. `done` is the inverse of `busy`. Use the cache host ports only
while `done` is high.

## Instruction set

Field positions:

```
 19   18..14   13..9   8..4    3..0
 x    rd       rs2     rs1     opcode     ADD SUB AND OR SQRT
 x    rd       xxxxx   xxxxx   opcode     INC   (rd = rd + 1)
 x    reg      addr[9:0]       opcode     LOAD  (reg <- mem) / STORE (mem <- reg)
```

| opcode | mnemonic | operation per thread *t* of warp *w*                       |
|--------|----------|------------------------------------------------------------|
| 0      | ADD      | rd = rs1 + rs2                                             |
| 1      | SUB      | rd = rs1 − rs2                                             |
| 2      | AND      | rd = rs1 & rs2                                             |
| 3      | OR       | rd = rs1 \| rs2                                            |
| 4      | INC      | rd = rd + 1                                                |
| 5      | LOAD     | reg = D-cache[addr + 32·w + t]                             |
| 6      | STORE    | D-cache[addr + 32·w + t] = reg (only for threads with an element) |
| 7      | SQRT     | rd = floor(sqrt(rs1)), unsigned                            |
| 15     | HALT     | the warp has finished                                      |
| others | —        | no operation                                               |

The field layout is fixed by the architecture. The opcode numbers are this
implementation's own assignment, and so are SQRT and HALT. Arithmetic wraps modulo
2³² and produces no flags. There are no branches.

Each thread has 32 registers. `r0` is an ordinary register.

## Memory layout and addressing

Each SM has a 1024-word D-cache, addressed by the 10-bit `addr` field. Elements of an
array sit in consecutive words. Thread *t* of warp *w* uses the word at
`addr + 32·w + t`, so an array of one block takes 256 words. The intended layout is:

| words    | contents                |
|----------|-------------------------|
| 0..255   | operand array A         |
| 256..511 | operand array B         |
| 512..767 | result array            |
| 768..1023| free (a second result)  |

Addresses wrap at 1024. The last warp of a block may be only partly filled (50
elements give 2 warps, the second with 18 threads). All 32 threads of that warp
compute, but STORE skips the threads that hold no element. Memory past the block's
end is therefore left unchanged. LOAD reads all 32 words regardless.

## How an SM issues instructions

This is the part that decides performance, and the part most likely to surprise.

**Warp state.** Each warp has its own program counter and a state: READY, WAIT or
DONE. A launch sets warps `0 .. ceil(elems/32)−1` to READY at the start address and
the rest to DONE.

**Selection.** Every clock, the warp scheduler offers one READY warp. It searches
round-robin, starting from the warp after the one it offered last. The I-cache read is
asynchronous, so the offered warp's instruction is available in the same clock. The
dispatch unit then decides whether that instruction issues:

| instruction    | issues when                                        | on issue                                  |
|----------------|----------------------------------------------------|-------------------------------------------|
| ADD..INC       | no LOAD/SQRT writeback is pending this clock       | all 32 cores execute and write `rd`; PC+1 |
| LOAD, STORE    | the load/store unit is idle                        | warp → WAIT                               |
| SQRT           | the special function unit is idle                  | warp → WAIT                               |
| HALT           | always                                             | warp → DONE                               |

If the instruction cannot issue, the warp stays READY with its PC unchanged. The next
clock offers a different warp, so a warp stuck on a busy unit never holds the issue
slot. When a unit finishes a warp, that warp's PC advances and it returns to READY.

**Latency hiding.** While warp 3 is loading, warps that already have their data keep
issuing ALU instructions. At most one instruction issues per clock, from one warp.

**One register write port.** Every core's register file has two read ports and one
write port. Three sources share the write port: the ALU result, the LOAD data (the
"MemtoReg" path) and the SQRT results.

- A LOAD collects all 32 words in a buffer and writes them into the 32 cores in one
  clock at the end.
- A SQRT does the same with its roots.
- A pending writeback takes the port. LOAD has priority over SQRT. An ALU instruction
  offered in that clock waits.
- A STORE or SQRT reads its source register at issue, through read port 1, into the
  unit's own buffer. No read port is needed afterwards.

**Hazards.** A warp's instructions run in order, and the warp waits for its own
LOAD/STORE/SQRT to finish, so there are no hazards within a warp. Warps have separate
register sets. The single load/store unit serialises memory operations in issue
order.

### Timing

Cycle 0 is the issue clock. All counts are minimums, with no contention.

| operation | clocks until the warp can issue again                                 |
|-----------|------------------------------------------------------------------------|
| ALU op    | 1                                                                      |
| LOAD      | 34: issue, 32 transfers (one word per clock), 1 register writeback     |
| STORE     | 33: issue, 32 writes                                                   |
| SQRT      | 514: issue, 32 threads × 16 clocks, 1 register writeback               |
| HALT      | 1                                                                      |

`gpu_top` adds 2 clocks of launch overhead: one in the launch decoder and one to
register `done`. One warp running `LOAD, LOAD, ADD, STORE, HALT` is therefore done
2 + 34 + 34 + 1 + 33 + 1 = 105 clocks after `data_in_valid`.

## Special function unit

Each SM has one SFU. It computes an unsigned integer square root with the
digit-by-digit method, one result bit per clock:

```
rem = (rem << 2) | next two bits of x ;  trial = (root << 2) | 1
if rem >= trial: rem -= trial ; root = 2·root + 1   else root = 2·root
```

It handles the 32 threads of a warp one after another. It has its own operand and
result buffer, so the cores keep running other warps for the ~512 clocks it takes. A
second SQRT from another warp waits until the unit is free.

## Hierarchy

```
gpu_top
├── launch_decoder            launch word → address, n, blocks, warps, elements per SM
└── streaming_multiprocessor × 8
    ├── icache                1024 × 20-bit register array, async read
    ├── warp_scheduler        per-warp PC and state, round-robin offer
    ├── dispatch_unit         issue rules, register selects, write-port arbitration
    │   └── control_logic     opcode → RegWrite, MemtoReg, MemWrite, ALUControl, PCWrite, Done
    ├── register_file × 32    8 warps × 32 regs × 32 bit, 2R1W
    ├── alu_core × 32         ADD SUB AND OR INC
    ├── load_store_unit       address counter, gather/scatter buffers
    ├── sfu                   serial integer square root
    └── dcache                1024 × 32-bit register array, LSU port + host port
```

Shared types and constants live in `rtl/gpu_pkg.sv`: the opcode enum, the two
instruction-word structs, the control word `ctrl_t` and the event vector
`sm_events_t`.

Size at the defaults is 65 536 32-bit registers (8 SMs × 32 cores × 8 warps × 32) and
8 × 4 KB of D-cache. All storage is flip-flop arrays; there are no SRAM macros.

The register files and caches are not reset. A kernel must write a register (by
LOAD or an ALU op) before it reads it. Control state uses an asynchronous active-low
reset, `rst_n`.

### Parameters

`gpu_top`:

| parameter  | default | meaning                                              |
|------------|---------|------------------------------------------------------|
| NSM        | 8       | streaming multiprocessors                            |
| LANES      | 32      | threads per warp = cores per SM                      |
| NUM_WARPS  | 8       | warps per block (power of two); block = LANES·NUM_WARPS |
| IC_DEPTH   | 1024    | I-cache words; the 16-bit PC is taken modulo this    |
| DC_DEPTH   | 1024    | D-cache words                                        |

### Performance events

`events[b]` carries one pulse per clock for each of the following in SM *b*:

- ALU issue, LSU issue, SFU issue and HALT;
- a stall on a busy unit (`unit_stall`);
- an ALU instruction held off by a writeback (`wb_stall`);
- an issue while another warp waits on the LSU or SFU (`hide_issue`, the latency
  hiding);
- a store thread skipped because it holds no element (`lane_masked`).

Counting these pulses gives utilisation figures.

## Where this implementation makes its own choices

These are interpretations of an architecture that leaves the points open:

- Opcode numbers, the SQRT and HALT instructions, and no-operation for unused opcodes.
- The warp-offset addressing `addr + 32·w + t`.
- Round-robin warp selection.
- One write port per register file, with LSU > SFU > ALU priority.
- Gathering LOAD data and writing all 32 lanes at once.
- Capturing STORE and SQRT sources at issue.
- The SFU provides only the square root; there is no sine or cosine.
- Host write ports on both caches. These stand in for the external DRAM and the CPU
  interface, which are not modelled.
- I-cache depth of 1024 words, and an asynchronous fetch. A clocked fetch is the
  more conventional reading; it would add one clock to every issue.
- Overflow handling: blocks beyond the eighth are dropped and flagged, not queued.
- The `busy`/`done` protocol.
- One warp scheduler and one dispatch unit per SM; larger GPUs of this style pair two.
- A 4 KB D-cache per SM instead of a 64 KB shared memory / L1 cache with tags.
- No jump instruction: no encoding for one is defined.

## Simulating

Each file holds one module and is found by name. The package must come first. A
testbench is built and run with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv rtl/gpu_pkg.sv tb/tb_gpu_top.sv --top-module tb_gpu_top
./obj_dir/Vtb_gpu_top
```

Every testbench checks its results itself. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog that counts a failure if it hangs.

| testbench                        | what it covers                                                        |
|----------------------------------|-----------------------------------------------------------------------|
| `tb_gpu_top`                     | Full size (8 SMs × 32 cores); see below                               |
| `tb_workload_vector_add`         | r1 = 1, r2 = 2 → r3 = 3 on 32 cores; C = A + B over a 256-element block and over 50 elements |
| `tb_streaming_multiprocessor`    | One SM: single-warp cycle count; a 200-element block using every instruction; event counts |
| `tb_launch_decoder`              | Field decoding, block/warp arithmetic, overflow, one-clock launch pulse |
| `tb_warp_scheduler`              | Round-robin order, WAIT skipping, completion, HALT, `all_done`        |
| `tb_dispatch_unit`               | Issue and stall rules for every combination of busy/writeback inputs; register selects |
| `tb_load_store_unit`             | Address sequence, gather, delayed grant, masked partial-warp store, wrap-around, cycle counts |
| `tb_sfu`                         | Roots of random values, perfect squares and edge values; 512-clock latency; delayed grant |
| `tb_alu_core`, `tb_register_file`, `tb_control_logic`, `tb_icache`, `tb_dcache` | The leaf blocks |

`tb_gpu_top` uses the design at its default size, with no parameter overrides. It
makes five launches:

1. A one-warp kernel, checking the exact latency.
2. 1948 elements over all 8 SMs, with a partial warp on SM 7.
3. 2100 elements, which must raise overflow.
4. A switch back to the first kernel's address.
5. A LOAD followed by forty INCs, which forces a writeback stall.

It checks every result word and requires each mechanism to happen at least once:
issue to each unit, stall on a busy unit, writeback stall, latency hiding, masked
threads and overflow. It runs in about ten seconds.

The RTL carries SystemVerilog assertions for its internal handshakes, checked when
simulating with `--assert`:

- the load/store unit and the SFU accept an operation only when idle;
- a unit is granted the write port only when it asks for it;
- a unit completes only a warp that is waiting for it;
- at most one source writes the register files in a clock.

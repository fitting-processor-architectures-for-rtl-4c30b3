# A time-randomised in-order core for measurement-based probabilistic timing analysis

This is an in-order processor core whose execution time can be *measured* instead of
modelled. It is meant for the kind of timing analysis that first measures, then extrapolates.
Critical real-time software needs a worst-case execution time bound. Measurement-based
probabilistic timing analysis (MBPTA) gets one in three steps:

1. Run the program many times, typically about a thousand.
2. Fit an extreme-value distribution to the measured run times.
3. Read off a time that is exceeded only with a tiny probability, for example 10^-15 per run.

This only works if every source of timing variation in the hardware is one of three kinds:

* **Fixed latency.** The resource always takes the same time. Examples are decode, register
  read and integer execute.
* **Randomised.** The resource's latency really is random, with a probability that does not
  depend on what ran before. The caches and TLBs are made this way: random placement picks the
  set, and random replacement picks the victim.
* **Upper-bounded.** The resource's latency depends on data or on history, which no number of
  measurements can cover. In a special *analysis mode* it is forced to its worst case. The
  divide and square-root unit and the memory controller are treated this way.

With those properties, each dynamic instruction has a latency distribution of its own. The run
times of independent runs are then independent and identically distributed, which is what
extreme-value statistics needs. Run times taken in analysis mode upper-bound the run times in
normal operation.

The core follows the structure of a LEON3-class SPARC pipeline:

```
                 DRAM  (outside: dram_* ports)
                   |
            memory controller    (upper-bounded latency in analysis mode)
                   |
           memory request buffer (one FIFO for all misses, walks, stores)
            /                 \
   IL1 + ITLB + walker    DL1 + DTLB + walker
        |                      |      \
        |                      |     write buffer
        F -> D -> RA -> Exe -> M -> Exc -> WB
                        (FDIVD/FSQRTD unit in Exe)
```

## Files

| file | what it is |
|---|---|
| `rtl/mbpta_pkg.sv` | shared memory-request struct, exception codes, SPARC opcode constants |
| `rtl/mbpta_core.sv` | top level: wires everything below together |
| `rtl/iu_pipeline.sv` | 7-stage pipeline, register files, branch handling, FPU hookup |
| `rtl/fpu_divsqrt.sv` | IEEE double divide / square root with operation and analysis latencies |
| `rtl/rand_cache.sv` | L1 cache with random placement and replacement (IL1 and DL1) |
| `rtl/rand_placement.sv` | seed-dependent set-index function |
| `rtl/prng.sv` | 32-bit LFSR random number generator |
| `rtl/rand_tlb.sv` | 8-entry fully associative TLB with random replacement |
| `rtl/page_walker.sv` | hardware page-table walker |
| `rtl/write_buffer.sv` | store buffer with load forwarding |
| `rtl/mem_req_buffer.sv` | FIFO that serialises all requests towards the memory controller |
| `rtl/mem_ctrl.sv` | memory controller with an upper-bounded latency |
| `tb/dram_model.sv` | behavioural DRAM with history-dependent latency (testbench only) |
| `tb/sparc_asm_pkg.sv` | instruction encoders used to build test programs |
| `tb/*_tb.sv` | one self-checking testbench per module; `mbpta_core_tb` runs the whole core |

## Where the time randomness comes from

### Random placement

In a conventional cache, the set a line goes to is fixed by its address bits. The conflicts a
program suffers then depend on where its code and data happen to be linked. One measurement
campaign would see only one memory layout, and a later relink could be much slower.

Here the set index is computed by `rand_placement` from two inputs: the line address, and a
**placement seed** that is redrawn for every run. This happens in one combinational step:

* The address bits above the index field are XORed with the seed.
* That value is mixed by a 32-bit avalanche hash: xor-shift, multiply, xor-shift, multiply,
  xor-shift, the finaliser of MurmurHash3.
* The top index bits of the hash are XORed onto the low index bits of the line address.

Two properties follow:

* Lines inside one cache-way-sized window of memory always land in different sets, as with
  modulo placement. Sequential code and arrays therefore do not thrash against themselves.
* Whether two lines from different windows collide changes from seed to seed. The probability
  is about 1 / (number of sets).

Because any set can hold any line, the cache stores the whole line address as its tag.
`rand_placement_tb` checks both properties. The exact hash is this design's choice: the
original hardware's placement function is not spelled out.

### Random replacement and the random generators

On a miss, an empty way is filled if there is one. Otherwise the victim way is
`rnd mod WAYS`, where `rnd` comes from a 32-bit Galois LFSR (`prng`, polynomial
x^32+x^22+x^2+x+1). The TLBs do the same with `rnd mod 8`.

There are four generators, one each for IL1, DL1, ITLB and DTLB. Each one advances only when
its random number is actually consumed. On `flush` all four are reloaded from `repl_seed`, each
XORed with its own constant. A run is therefore fully reproducible from
(`place_seed`, `repl_seed`), while different seeds give independent cache behaviour.

### Caches and TLBs (`rand_cache`, `rand_tlb`, `page_walker`)

The cache parameters:

* IL1: 16 KB, 4-way, 16-byte lines.
* DL1: 16 KB, 4-way, 32-byte lines, write-through and no-write-allocate.
* Both TLBs: 8 entries, fully associative, 4 KB pages.

The caches are virtually indexed and tagged, so the TLB is needed only on a cache miss and for
the memory write of a store. A cache access works like this:

* **Hit.** The answer comes 2 cycles after the request: one cycle to accept, one to look up.
* **Miss.** One cycle to consult the TLB. On a TLB miss, the page walker reads one page-table
  entry through the memory path. Then the line is read word by word from word 0, and the
  requested word is returned when the line is complete.
* **Store in the DL1.** The line is updated if it is present. The word is always written to
  memory, and a store miss allocates nothing.

The page table has one level. The entry for virtual page *v* is the word at `PT_BASE + 4*v`.
Bits 31:12 of the entry hold the physical page and bit 0 the valid flag; a clear valid flag is
a page fault. This table format is this design's own simplification, not the SPARC reference MMU
format.

## Where the bounds come from

### FDIVD / FSQRTD (`fpu_divsqrt`)

The divide and square-root latencies depend on the operand values. That dependence cannot be
turned into a probability, so analysis mode removes it:

| operation | operation mode | analysis mode |
|---|---|---|
| FDIVD | 15 cycles if the result is exact, 18 otherwise | always 18 |
| FSQRTD | 23 cycles if the result is exact, 26 otherwise | always 26 |

The arithmetic is a radix-16 restoring recurrence: 4 quotient or root bits per cycle, 56 bits
in 14 cycles. It is followed by round-to-nearest-even and then a wait until the target cycle.
The intermediate latencies (16, 17, 24, 25) are never produced.

Several choices here are this design's own:

* The rule that exact results are fast. It agrees with reference input/latency pairs:
  -1/2 takes 15 cycles, sqrt(16) 23, sqrt(3) 26, and an inexact quotient 18.
* Reading subnormal inputs as zero and flushing underflow to zero.

Infinities, NaNs, zeros and negative square-root operands follow IEEE 754 and count as fast
cases.

### Memory controller (`mem_ctrl`)

DRAM latency depends on history: `dram_model` adds a turnaround penalty when a read follows a
write. The controller handles this differently in each mode:

* **Analysis mode.** Every access is answered exactly `LAT_MAX` = 20 cycles after it is
  accepted. If the DRAM is ever slower than that, `bound_violation` pulses, because the
  measurement would no longer be an upper bound.
* **Operation mode.** The DRAM's answer is passed on in the next cycle.

The value 20 is this design's choice. It must be set to the real worst case of the DRAM
attached.

### The buffers

The pipeline registers and the buffers add fixed delays, or delays caused only by older
instructions.

**Write buffer.** It has 4 entries and sits between the memory stage and the DL1:

* When it is full, a store blocks the memory stage, and with it the pipeline.
* Every load also looks it up. If a buffered store matches the load's word, the youngest such
  store supplies the data.
* Stores drain into the DL1 whenever no load is using the DL1 port.

**Memory request buffer** (`mem_req_buffer`). It has 4 entries and is the single FIFO in front
of the memory controller. It has four requester ports: IL1, ITLB walker, DL1 and DTLB walker.
Instruction-side and data-side misses are serialised here. A data miss can therefore wait
behind an instruction miss caused by a younger instruction, the one place where a younger
instruction delays an older one. This delay is not fixed, but it too is driven by the random
cache outcomes.

## The pipeline (`iu_pipeline`)

The seven stages are fetch, decode, register access, execute, memory, exception and write-back.
Each stage hands its instruction to the next through a register; a stalled stage holds its
instruction.

* **Fetch.** Fetch reads the IL1. Branches are predicted taken: decode redirects fetch to the
  target at once. Execute evaluates the condition; if the branch falls through, decode and
  register access are squashed and fetch restarts at the next instruction.
* **Hazards.** Data hazards are handled by interlock only. An instruction waits in register
  access until no older instruction still in flight writes one of its source registers. There
  is no forwarding, so integer execute has a fixed one-cycle latency.
* **FDIVD/FSQRTD.** These hold the execute stage for their whole latency.
* **Loads and stores.** Loads wait in the memory stage for the DL1 or the write buffer. Stores
  go into the write buffer.
* **Exceptions.** Exceptions are taken in the exception stage: illegal instruction, page fault
  on fetch or load, and `Ticc`, which serves as the halt instruction. Younger instructions are
  squashed, and the core stops with `halted`, `exc_cause` and `exc_pc`.

The instruction set is a SPARC V8 subset with the standard encodings:

* `SETHI`.
* `ADD`, `ADDcc`, `SUB`, `SUBcc`, `AND`, `OR`, `XOR`, `SLL`, `SRL`, `SRA`, with a register or
  a 13-bit immediate operand.
* `LD`, `ST`, `LDF`, `STF`.
* `Bicc` with all 16 conditions.
* `FDIVD`, `FSQRTD`.
* `Ticc`.

Registers: 32 flat integer registers, where `r0` reads as zero, and 32 single-precision FP
registers, where an even/odd pair forms a double.

**Not implemented** from a full SPARC V8 / LEON3:

* register windows (`SAVE`/`RESTORE`) and branch delay slots;
* integer multiply and divide;
* the other FP operations;
* the trap table, supervisor state and ASIs.

Compiled SPARC programs therefore do not run unmodified; test programs are built with
`tb/sparc_asm_pkg.sv`.

## Using the top level (`mbpta_core`)

A run is one measurement:

1. Set `analysis_mode`, `place_seed` and `repl_seed`.
2. Pulse `flush` for one cycle. This invalidates all caches and TLBs and reseeds the generators.
3. Release the core; it runs from `RESET_PC`.
4. Count cycles until `halted`.

The DRAM is external: connect `dram_req_valid`/`dram_req` and `dram_resp_valid`/`dram_rdata`
to a memory. The page table must be in that memory at `PT_BASE`.

The other outputs are for observation:

* `dbg_addr`/`dbg_data` read any register: 0-31 integer, 32-63 FP.
* `store_fault` is a sticky flag for a buffered store that hit an invalid page.
* The `ev_*` outputs are one-cycle event pulses for counting: cache and TLB hits and misses,
  stalls, mispredictions, forwarding and queuing.

Top-level parameters and their defaults:

| parameter | default | |
|---|---|---|
| `IL1_BYTES`, `DL1_BYTES` | 16384 | cache sizes |
| `L1_WAYS` | 4 | |
| `IL1_LINE`, `DL1_LINE` | 16, 32 | line sizes in bytes |
| `TLB_ENTRIES` | 8 | |
| `WBUF_DEPTH`, `MEMBUF_DEPTH` | 4, 4 | own choice |
| `MEM_LAT_MAX` | 20 | own choice; set it to the DRAM's worst case |
| `RESET_PC`, `PT_BASE` | 0, 0x10000 | own choice |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>`, has a watchdog, and needs only
Verilator 5. The package must come first. For example, the whole core:

```
verilator --binary --timing --top-module mbpta_core_tb \
  rtl/mbpta_pkg.sv tb/sparc_asm_pkg.sv rtl/prng.sv rtl/rand_placement.sv rtl/rand_tlb.sv \
  rtl/page_walker.sv rtl/write_buffer.sv rtl/mem_req_buffer.sv rtl/mem_ctrl.sv \
  rtl/rand_cache.sv rtl/fpu_divsqrt.sv rtl/iu_pipeline.sv rtl/mbpta_core.sv \
  tb/dram_model.sv tb/mbpta_core_tb.sv
./obj_dir/Vmbpta_core_tb
```

For a single module, list the package, the module, and anything it instantiates:
`rand_cache` needs `rand_placement`, `iu_pipeline` needs `fpu_divsqrt`, and `mem_ctrl_tb` needs
`tb/dram_model.sv`.

`mbpta_core_tb` runs the core at its default parameters. Its test program contains:

* a store/load loop and a burst of stores that fills the write buffer;
* access through a remapped page;
* FDIVD and FSQRTD;
* logic, shifts and all branch outcomes;
* two passes over 520 cache lines (16.6 KB, more than the DL1 holds), so the DL1 hit count
  depends on the placement and replacement seeds.

It runs with four seed pairs in both modes. It checks the registers and memory against values
worked out independently. It also checks that analysis mode is never faster than operation mode
and that the run time changes with the seed. A second program must stop with a data page fault.

Every mechanism listed above must occur at least once. A typical result is about 117,000-118,000
cycles per run in analysis mode and 72,800-73,300 in operation mode; the exact value depends on
the seed. The whole testbench takes under a second.

## How far to trust it

**Tested:**

* Each module has its own randomised self-checking testbench, with a reference model where one
  makes sense:
  * the FPU against the simulator's own IEEE double arithmetic;
  * the caches against a flat memory;
  * the buffers against queue models.
* Each testbench was also shown to fail on a deliberately broken copy of its module.
* Latencies are checked where they are specified: FPU 15/18/23/26, memory controller 20, cache
  hit 2.

**Known simplifications:**

* The ISA subset and the page-table format described above.
* The placement hash and the random generator are this design's own choices.
* Only the fastest and slowest FPU latencies are produced.
* The cache refill starts at word 0 of the line.
* Mode selection is one input pin: `analysis_mode` switches the FPU and the memory controller
  together.
* There is no model of the multicore case or of a shared bus.
* Nothing technology-specific is included: the original prototype ran on an FPGA at 80 MHz,
  and this RTL is generic.

The randomness of the timing has been checked only as far as the testbenches go. Statistical
i.i.d. tests over a thousand runs of real benchmarks, as done for the original hardware, have
not been repeated: that needs the full instruction set.

# Wannabee Larrabee: RISC-V vector cores for an FPGA

This is a many-core floating-point accelerator for an FPGA, built along the lines of Intel's
Larrabee but with the RISC-V instruction set. Twenty-two small in-order cores sit on one chip.
Each core has a 16-lane single-precision vector unit and its own instruction and data scratchpads.
A host processor, the *supervisor*, runs the show: it writes programs into the cores, often into
many at once, puts data into their memories and starts them. It then learns what they did by
reading their memories and by taking an interrupt when one stops.

The design makes two trades throughout. The integer pipeline gives up some instructions per
clock to keep the logic between stages short, because on an FPGA routing delay dominates. The
memory system drops caches and coherence in favour of private dual-port scratchpads that the
supervisor fills directly.

```
             supervisor (host CPU, not included)
   instruction bus           data ports          reset / interrupt registers
        |                    (one per core)                |
  +-----v-------------------------------------------------v------------------+
  | vector_unit  (x NUNITS)                                                 |
  |  insn_replicator --mask--> imem port B of every selected core            |
  |  reset_controller -> core_rst[i]     interrupt_controller <- exc[i]      |
  |  +-------------------------------------------------------------------+  |
  |  | vector_core (x NCORES)                                            |  |
  |  |   imem scratchpad  <--A-- gecko_core --A-->  dmem scratchpad     |  |
  |  |   (port B: supervisor)                      (port B: supervisor) |  |
  |  +-------------------------------------------------------------------+  |
  +-------------------------------------------------------------------------+
```

## Sizes

| Parameter | Default | Where |
|---|---|---|
| vector units × cores per unit | 2 × 11 = 22 cores | `wannabee_top` `NUNITS`, `NCORES` |
| vector lanes | 16 single-precision (512-bit registers, 32 of them) | `vpu_pkg::LANES` |
| multiply-adders per vector unit | 16, one per lane | `vpu` `DATAPATHS` |
| instruction scratchpad | 1024 words (4 KiB) per core | `IMEM_WORDS` |
| data scratchpad | 4096 words (16 KiB) per core | `DMEM_WORDS` |

The 22-core count comes from the FPGA budget of the target board: about 360 fused multiply-adders,
divided by 16 lanes. The split into two groups of 11 and the memory sizes are this design's own
choices.

## The integer pipeline (`gecko_*`)

Each core is a five-stage RV32I pipeline: Fetch, Decode, Execute, Memory and Writeback. Three
more units hang off Decode: a CSR unit (`gecko_system`), the scalar FPU (`basilisk_fpu`) and the
vector unit (`vpu`). Its unusual part is how it handles hazards without a full forwarding
network.

**Valid bits instead of forwarding.** Decode owns the register file and a valid bit for each of
the 32 registers. Issuing an instruction that writes `rd` clears `rd`'s valid bit. The bit is
set again when Writeback writes that register. An instruction waits in Decode until these hold:
- every source it reads is valid;
- its destination is valid, so there is no write-after-write.

The destination rule is what lets results come back out of order without a younger result
overwriting an older one.

**The saved last result.** Execute keeps the result of its most recent register-to-register
operation until the next one replaces it. Suppose an instruction reads the register that the
instruction just before it in Execute is writing. Decode then does not wait for Writeback. It
sets `a_saved`, `b_saved` or `s_saved` in the Execute command, and Execute uses its saved value
in place of that operand. This is the only bypass in the core, and it removes the stall from the
common `addi x9,x9,1; bne x9,...` pattern.

**Many streams, one write port.** Register-to-register results skip the Memory stage and go
straight from Execute to Writeback. Load data comes from Memory, and integer results come from
the CSR unit, the FPU (moves, compares, conversions) and the VPU (`vmv.x.s`). `gecko_writeback`
takes up to five streams with fixed priority: Memory, then Execute, CSR, FPU, VPU. It performs
one register-file write per cycle, so the register file needs only one write port and fits in
distributed RAM. Streams that lose wait on their ready signal.

**Branches.** Fetch always predicts not taken. Branches and jumps resolve in Execute. A taken one:
- redirects Fetch;
- advances a 2-bit *epoch*;
- drops the instruction Fetch was holding.

Every instruction carries the epoch it was fetched in. Instructions that were already in Execute
with an old epoch are killed there. A killed instruction sends a release (a Writeback entry with
`write=0`), which makes its destination valid again without changing the register. So
register-to-register instructions may run on past an unresolved branch. CSR, FPU, vector and
exception-raising instructions have effects that cannot be undone, so they wait in Decode until
no branch is pending. This is the price of skipping a branch predictor, which would need a block
RAM.

**Exceptions.** Three things halt the core until it is reset:
- an undefined instruction (`EXC_ILLEGAL`, info = pc);
- a load or store outside the data scratchpad or misaligned (`EXC_MEMORY`, info = address);
- `ecall`/`ebreak` (`EXC_ECALL`, info = pc).

A program uses `ecall` to say "finished".

**CSRs** (`gecko_system`): `cycle`/`cycleh` (0xC00/0xC80), `mcycle` (0xB00), `mhartid` (0xF14)
and `mscratch` (0x340). There are also two custom read-only counters: completed FP operations
(0xCC0) and completed vector operations (0xCC1).

## Floating point (`basilisk_pkg`, `basilisk_fpu`, `basilisk_divsqrt`)

Everything is IEEE-754 single precision. The arithmetic lives in `basilisk_pkg` as functions, so
the scalar FPU and the vector lanes use the same code.

- Every operation is exactly rounded in four modes: nearest-even, toward zero, down and up (the
  `rm` field; dynamic rounding is taken as nearest-even). Subnormal inputs and outputs are flushed
  to zero. Every NaN result is the canonical `0x7fc00000`.
- The 24×24 significand product is formed as two partial products: the top 6 bits of one operand
  times the other (shifted left 18), plus the low 18 bits times the other. Each fits one 27×18
  FPGA DSP multiplier.
- `fp_fma` computes `a*b ± c` with a single rounding. It keeps the exact product and aligns the
  addend against it with a sticky bit. `fp_add` and `fp_mul` are separate, cheaper paths.
- Division and square root go to `basilisk_divsqrt`, which produces one quotient or root bit per
  cycle. It uses restoring division and digit-by-digit square root, and returns 27 bits plus a
  sticky bit so the shared rounding step can round correctly. The square-root radicand is
  pre-shifted by the exponent's parity.

The FPU has its own 32-entry FP register file. One operation is in flight at a time. From accept
to result:

| Operation | Execute cycles |
|---|---|
| add, multiply, sign-inject, min/max, compare, convert | 1 |
| fused multiply-add variants | 2 |
| divide, square root | about 30 |

Integer results (compares, `fcvt.w.s`, `fmv.x.w`) go to Writeback. `fmv.w.x` and `fcvt.s.w` bring
integer values in.

There is no `flw`/`fsw`. FP data moves through the integer registers with `fmv.w.x`/`fmv.x.w`.

## The vector unit (`vpu`)

The vector unit has 32 vector registers of 512 bits, each holding 16 floats. Each lane has one
fused multiply-adder, and every arithmetic instruction is mapped onto it:

| Instruction | Computed as | Cycles |
|---|---|---|
| `vfmul.vv` | `a*b + (-0)` | 1 |
| `vfadd.vv` | `a*1.0 + b` | 1 |
| `vfsub.vv` | `a*1.0 - b` | 1 |
| `vfmacc.vv` | `vd + vs1*vs2`, fused | 2 |

The rounding hardware is therefore shared, and rounding is to nearest-even. Data enters vector
registers through `vmv.v.x` (broadcast) and `vslide1down.vx` (shift in a scalar at the top). It
leaves through `vmv.x.s` (element 0). `vsetvli` always returns 16.

`DATAPATHS` can be lowered to 8, 4, 2 or 1 to save area. The 16 elements then go through the
multiply-adders in 16/`DATAPATHS` beats, and the architectural result is unchanged.

Not built: vector loads and stores, masking, register grouping, `.vf` forms, and vector divide
and square root.

## Supervisor interface (`vector_unit`, `wannabee_top`)

All supervisor-side ports are simple request/response buses. Each has `en`, byte write enables
`we` (zero means read), a byte address and write data. Read data comes back on the next cycle.
The host is meant to reach them through an AXI interconnect, which is not part of this RTL.

- **Instruction bus, one per unit** (`i_*`): a write goes to every core whose bit is set in
  `i_mask`, so one bus cycle loads the same word into many cores (`insn_replicator`). A read
  returns the word of the lowest core in the mask.
- **Data ports, one per core** (`d_*`): port B of the core's data scratchpad. It works while the
  core runs, which is how the supervisor polls status words.
- **Reset register** (`rst_we`, `rst_wdata`, `rst_mask`): one bit per core, set means held in
  reset. After system reset every bit is set. A released core starts at address 0 of its
  instruction memory. Memories keep their contents across a core reset.
- **Interrupts** (`irq_*`): a core's exception sets its pending bit and latches a cause and an
  info word. `irq` is the OR of the enabled pending bits. Writing `irq_clr_en` with a mask clears
  bits, and an exception in the same cycle wins over the clear.

A typical run:
1. Load the program with an all-ones mask.
2. Write each core's data.
3. Clear the reset bits.
4. Poll a done word in each data memory, or wait for the `ecall` interrupts.
5. Read the results back.

To recover a faulted core, set its reset bit, fix its memory, clear its pending interrupt and
release it.

## Files

All files are SystemVerilog (IEEE 1800-2017) in `rtl/`, one module or package per file:

| Module or package | What it is |
|---|---|
| `gecko_pkg`, `basilisk_pkg`, `vpu_pkg` | shared types, opcodes and FP arithmetic |
| `gecko_fetch`, `gecko_decode`, `gecko_execute`, `gecko_memory`, `gecko_writeback`, `gecko_system` | the integer pipeline stages and CSR unit |
| `gecko_core` | the pipeline wired together |
| `basilisk_fpu`, `basilisk_divsqrt` | scalar FPU and its divide/square-root iterator |
| `vpu` | vector unit |
| `scratchpad` | dual-port byte-writable RAM |
| `vector_core` | core plus its two scratchpads |
| `insn_replicator`, `reset_controller`, `interrupt_controller` | per-unit control blocks |
| `vector_unit` | a group of cores with its control blocks |
| `wannabee_top` | all the units |

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. The helper packages are:
- `rv_asm_pkg`: RISC-V instruction encoders;
- `fp_ref_pkg`: a double-precision reference for single-precision rounding;
- `mandel_pkg`: a Mandelbrot program and its reference iteration counts.

For example:

```
verilator --binary --timing -Irtl -Itb --top-module tb_wannabee_top \
  rtl/gecko_pkg.sv rtl/basilisk_pkg.sv rtl/vpu_pkg.sv \
  tb/rv_asm_pkg.sv tb/fp_ref_pkg.sv tb/mandel_pkg.sv tb/tb_wannabee_top.sv
./obj_dir/Vtb_wannabee_top
```

Verilator finds the other modules in `rtl/` by name through `-Irtl`.

`tb_wannabee_top` runs the full default configuration: 22 cores with 16-lane vector units. It
takes about a minute to build and a second to run, and goes through these steps:
1. Replicates the Mandelbrot program into all 22 cores and gives each core 8 pixels.
2. Checks every iteration count, plus a divide, a square root and a vector multiply-accumulate
   result.
3. Checks the `ecall` interrupts.
4. Plants a misaligned load in a single core and checks the memory-fault interrupt and its
   address.
5. Recovers that core and runs it again.

The testbench also counts, and requires at least once:
- decode stalls;
- saved-result bypasses;
- wrong-path kills;
- writeback conflicts;
- FP, vector and divide/square-root operations;
- replicated writes;
- interrupts;
- core resets.

## Departures and limits

- The host processor, the AXI interconnect and the per-group DMA engines are not included. Their
  places are the plain buses described above.
- Integer ISA: RV32I without `fence`. FP: no `flw`/`fsw`, `fclass` or `fcsr`. Subnormals are
  flushed. Vector: only the subset listed above.
- Branches that were issued past are killed with an epoch tag. The alternative would be a
  separate "no writeback until resolved" flag; the observable behaviour is the same.
- Memory sizes, the 2 × 11 grouping, CSR numbers, latencies, exception encodings and the
  supervisor register layout are this design's own choices.
- Only the Mandelbrot workload has been run. A ray tracer would need more software; a deferred
  renderer would also need vector memory instructions and DMA.

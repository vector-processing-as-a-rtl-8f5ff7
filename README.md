# A soft vector co-processor for FPGA scalar cores

Data-parallel embedded kernels such as image filters, block-matching motion
estimation and table-driven ciphers spend most of their time applying one
operation to many data items. This design gives a small scalar soft processor
a vector unit built out of FPGA resources. It reads the vector registers from
block RAM, does reductions in the DSP blocks and keeps lookup tables in
per-lane memories. The scalar core fetches every instruction and hands the
vector ones, with one scalar operand each, to the vector unit, so a single
vector instruction does the work of a whole loop.

The vector unit has `NLANE` identical **lanes**. A vector register holds up
to `MVL` elements. Element `e` lives in lane `e % NLANE`, at slot
`e / NLANE`, so each lane keeps only its own slice of all 64 registers
(element partitioning). An instruction with vector length `VL` runs as
`ceil(VL/NLANE)` **element groups**, one per cycle. In every group each lane
works on one element of the same slot. With the defaults (16 lanes, MVL 64),
a full-length instruction takes four cycles.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017). The
defaults describe the full-feature sixteen-lane configuration. The scalar
core is not included. Its interfaces are the ports of `vipers_top`.

## Block map

```
 scalar core ──instr+scalar──► instruction queue ──► vector controller (vipers_vctrl)
     ▲                                                  │ micro-ops u_r/u_o/u_x/u_w
     └──── scalar result queue ◄── vmcts / vext.vs      ▼
                                       ┌──────── lane 0 … lane NLANE-1 (vipers_lane) ───────┐
                                       │ VRF slice, 2 flag slices, ALU+mul, shifter,        │
                                       │ local memory, load buffer, store buffer            │
                                       └──┬─────────────┬──────────────┬────────────────────┘
                                  shift chain     MAC chains      load/store buffers
                                (vupshift)      (vmac/vcczacc)          │
 scalar data port ──────────────────────────────► memory unit (vipers_memunit)
 command queue (vector memory cmds) ───────────►   address generation, read/write crossbars
                                                        │  MEMW bits
                                                  main memory (vipers_mainmem)
```

| Module | Role |
|---|---|
| `vipers_pkg` | Opcodes, function codes, control register numbers, `uop_t` micro-op and `memcmd_t` memory command types |
| `vipers_top` | Wires everything together. Holds the instruction, scalar-result and memory-command queues |
| `vipers_vctrl` | Decode, element-group issue, RAW interlock, memory command generation, load write-back insertion |
| `vipers_ctrl_regs` | VL, VINDEX, MASKSEL, vbase0-7, vinc0-7, vstride0-7 |
| `vipers_lane` | One lane and its four pipeline stages |
| `vipers_vrf` | Register-file slice: 64 registers x `EPL` elements, two copies for two read ports |
| `vipers_vflags` | Slices of the two flag registers |
| `vipers_alu` | ALU and multiplier |
| `vipers_shifter` | Barrel shifter (log2(VPW) levels) |
| `vipers_lmem` | Lane local memory, split into per-slot sections or shared |
| `vipers_fifo` | Load and store buffers (and the queues in the top) |
| `vipers_mac`, `vipers_mac_chain` | Four-lane MAC units with distributed accumulators, linked into chains |
| `vipers_shift_chain` | Neighbour path for `vupshift` |
| `vipers_memunit` | Vector and scalar memory accesses, address generation |
| `vipers_rd_xbar`, `vipers_wr_xbar` | Alignment crossbars between memory lines and elements |
| `vipers_mainmem` | Single-bank on-chip memory with byte enables |

## Instruction formats

Vector instructions use the three opcodes `0x3D` (arithmetic), `0x3E`
(memory) and `0x3F` (control) in bits [5:0], with the function code in bits
[11:6]. The field layout inside the word is specific to this design, and
`vipers_pkg.sv` documents it:

* **Arithmetic**: `[31]` masked, `[30]` operand B is the scalar, `[29:24]` vd,
  `[23:18]` va, `[17:12]` vb.
  * ALU: add, sub, and, or, xor, nor, max, min, maxu, minu, abs, absdiff,
    absdiffu, merge (`vd = flag ? va : vb`), mov.
  * Compares (eq, ne, lt, le, ltu, leu) write flag register `vd[0]`.
  * Shifts: sll, srl, sra, rotate right. Multiply: low half, signed high
    half, unsigned high half.
  * `vmac`, `vcczacc`, `vupshift`, and the local-memory operations `vldl`
    (`vd[i] = lmem[va[i]]`) and `vstl` (`lmem[va[i]] = vb[i]` or the scalar).
* **Memory**: `[31:30]` size (byte, half, word), `[29:24]` data register,
  `[23:18]` index register, `[17:15]` vbase register, `[14:12]` vinc register.
  * Strided forms take the vstride register number from the low three bits
    of the index field.
  * Loads are signed or unsigned.
  * Modes: unit stride, constant stride (in elements) and indexed (address =
    vbase + index register element, in bytes).
  * Every memory instruction adds `vinc[inc]` to `vbase[base]` when it
    issues. vinc = 0 leaves vbase unchanged.
* **Control**:
  * `vmstc` writes a control register from the scalar.
  * `vmcts` returns a control register to the scalar core.
  * `vext.vs` returns element VINDEX of a register.
  * `vins.vs` writes the scalar into element VINDEX.

`tb/vipers_asm_pkg.sv` has encoder functions for all three formats.

## Execution pipeline and the interlock

All lanes execute the same micro-op. The controller keeps one copy of the
four stage registers and every lane decodes them:

| Stage | Work |
|---|---|
| R | Register-file addresses presented (the block RAM reads synchronously) |
| O | Operands arrive. Flag read. Scalar broadcast or shift-chain neighbour selected |
| X | ALU, shifter or multiplier. Local memory access. Load-buffer pop, store-buffer push. MAC operands out |
| W | Result written to the register file, or compare result to the flag register |

There is no forwarding. Before a group leaves R, the controller checks each
(register, slot) pair it reads against the groups in O, X and W. Masked
instructions and merge also check their flag. A group that reads something
still in flight waits. So a dependent group issues four cycles after its
producer group:

* Behind a producer of four groups (VL = 64), a dependent instruction issues
  the very next cycle.
* Behind a two-group producer (VL = 32), it loses two cycles.
* Behind a single-group producer, it loses three.

Software hides this by interleaving independent instructions.

Registers that are the destination of an outstanding vector load are
interlocked separately. No instruction may read or write them until the
load's data have been written back.

Per-instruction costs at the defaults:

* Vector-vector, vector-scalar and local-memory instructions: one cycle per
  element group.
* `vmstc`/`vmcts`: one cycle.
* `vext.vs`/`vins.vs`: one group.
* A store: one cycle per group to copy its data register into the store
  buffers, then its command is queued.
* A unit-stride or strided load: one issue cycle.

## Memory system

Vector memory instructions are decoupled from the arithmetic lanes by three
mechanisms:

* **Command queue.** The controller queues a `memcmd_t` (mode, size, sign
  extension, base, stride, VL) and continues with the next instruction.
* **Store buffers.** A store first copies its data register (plus its index
  register, for indexed stores) into the lanes' store buffers, one group per
  cycle. The lanes are then free. An indexed load likewise copies its index
  register there first.
* **Load buffers and write-back.** The memory unit fills the lanes' load
  buffers and pulses `ld_done` after the last element. The controller then
  inserts write-back micro-ops, one per group, ahead of the next instruction.
  These move the data into the register file. A new load starts only when
  every load buffer is empty, so loads and stores complete in program order.

Each cycle, the memory unit takes the next run of consecutive elements that
fall in one memory line (single bank) and moves them in a single access. How
many it can take per cycle:

* **Loads**, unit or constant stride: up to `min(NLANE, MEMW/size)`. That is
  16 bytes, 8 halfwords or 4 words per cycle on the 128-bit memory.
* **Stores**, unit or constant stride: up to `min(NLANE, MEMW/size, MEMW/VPW)`.
  That is 4 elements of any size.
* **Indexed accesses**: one element per cycle.

A unit-stride word access of 64 elements therefore takes 16 memory cycles, a
stride-2 one 32, and an indexed one 64.

The read crossbar aligns each element from its byte offset in the line and
extends it. The write crossbar places each element at its byte offset and
raises the byte enables.

The scalar core's loads and stores use the same memory unit through the
`smem_*` port. They are served in cycles when no vector command is pending
or active, so a scalar access after a vector store sees the stored data.

## Reductions, shifts and tables

* **MAC chains.** Each group of four lanes shares one MAC unit with its own
  accumulator. `vmac` adds the four signed products of every active element
  to that accumulator. MAC units are linked into chains of `MACL` units, each
  chain covering `4*MACL` lanes. `vcczacc vd` writes chain `c`'s total
  (accumulators plus chain adders) to element `c` of `vd`, clears the
  accumulators and sets VL to the number of chains. With the defaults that is
  one chain, so the whole reduction arrives in element 0 and VL becomes 1.
* **Shift chain.** `vupshift vd, va` rotates a vector down by one element:
  `vd[i] = va[i+1]` for `i < VL-1`, and `vd[VL-1] = va[0]`. Each lane takes
  its right neighbour's element from the same slot. The last lane takes lane
  0's next slot, which it reads through the register file's second port.
  Element 0 is captured in the first group so that the wrap-around works for
  any VL.
* **Local memory.** Every lane has `LMEMN` words addressed by the element
  values of `va` (`vldl`, `vstl`). With `LMEMSHARE = 1` all elements of a lane
  see one table, which suits a shared table such as a 256-entry cipher table.
  With `LMEMSHARE = 0` the memory is split into one section per slot.

## Top-level interface (`vipers_top`)

| Port | Dir | Meaning |
|---|---|---|
| `instr_valid/ready`, `instr[31:0]`, `instr_scalar[31:0]` | in | Vector instruction with its scalar operand (valid/ready) |
| `sres_valid/ready`, `sres_data[31:0]` | out | Results of `vmcts` and `vext.vs`, in program order |
| `smem_req/we/size/addr/wdata` | in | Scalar data access. Hold `smem_req` until `smem_gnt` |
| `smem_gnt`, `smem_rvalid`, `smem_rdata` | out | Grant, then load data one cycle later |
| `idle` | out | No vector work queued or in flight |

Reset (`rst_n`) is asynchronous and active low. On reset, VL = MVL and both
flag registers are all ones.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NLANE` | 16 | Lanes (4 and 8 are the smaller configurations) |
| `MVL` | 64 | Maximum vector length (4 x NLANE for 32-bit lanes) |
| `VPW` | 32 | Lane data width |
| `MEMW` / `MEMMINW` | 128 / 8 | Memory width and smallest accessible unit |
| `NVREG` | 64 | Vector registers |
| `MACL` | 4 | MAC units per chain (0 removes the MAC chain) |
| `LMEMN` / `LMEMSHARE` | 256 / 1 | Local memory words per lane, shared mode |
| `VMULT` | 1 | Lane multipliers |
| `MEMDEPTH` | 6144 | Main memory lines (96 kB at 128 bits) |
| `IQDEPTH`, `SQDEPTH`, `CQDEPTH` | 8, 4, 4 | Instruction, scalar-result and memory-command queue depths |

## Where this design departs from the architecture it follows

* **Vector memory timing.** The architecture adds a fixed overhead of about
  four cycles to every vector memory instruction. Here a queued command
  starts in the next cycle. Vector-scalar instructions do not pay two extra
  cycles, because the scalar arrives with the instruction.
* **Insert and extract.** `vext.vs`/`vins.vs` are done directly by the lane
  that holds element VINDEX. The architecture routes them through a bypass
  register in the memory unit. Vector-vector insert/extract is not provided.
* **Store path.** The architecture's store path selects lane data with a
  multiplexer, compresses it and aligns it through a selectable delay
  network. Here a direct crossbar places each element at its own byte
  offset. The per-cycle element counts are kept.
* **Missing instructions and options.**
  * There are no flag-logic instructions and no strided local-memory forms.
  * The options that remove vector insert/extract or `vupshift` are not
    parameters. Both features are always present.
* **Own choices.** The instruction field layout, the R/O/X/W stage split,
  byte offsets for indexed accesses, MASKSEL, the buffer and queue depths,
  and 64-bit accumulators are this design's own choices.
* **Scalar core.** The core is not included. Any core that can send an
  instruction word plus one operand, and accept results from a queue, can
  drive the top.

## Workloads

With the default parameters the design holds the three kernels the
architecture was built for, plus the FIR example:

* **5x5 median filter.** 25 row registers plus temporaries, at most 64
  registers, one 64-pixel row per register.
* **Block-matching motion estimation.** VL 16 or 32. The fully unrolled form
  uses 41 registers. It relies on `vabsdiff`, masking, `vmac` and `vcczacc`.
* **AES round.** A 256 x 32-bit table in each lane's shared local memory,
  stride-4 word loads, 64 blocks per pass.
* **FIR filter.** Up to 64 taps per `vmac`/`vcczacc`/`vupshift` step.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against values it computes itself, prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_vipers_top` | End to end at the default parameters. See below |
| `tb_vipers_vctrl` | Group splitting. Interlock timing (0, 2, 3 lost cycles). Command contents and vbase increment. Load write-back and load interlock. Store-buffer and result-queue back-pressure. vext/vins element selection. MAC enable and clear. VL after vcczacc |
| `tb_vipers_lane` | All micro-op kinds through a 4-lane lane instance, against a register and flag model |
| `tb_vipers_memunit` | All modes and sizes. Memory-cycle counts (VL/4, VL/2, one per indexed element, four store elements per cycle). Load waits for empty buffers. Scalar port. Whole memory against a byte model |
| `tb_vipers_alu`, `tb_vipers_shifter`, `tb_vipers_vrf`, `tb_vipers_vflags`, `tb_vipers_lmem`, `tb_vipers_fifo`, `tb_vipers_mac`, `tb_vipers_mac_chain`, `tb_vipers_shift_chain`, `tb_vipers_rd_xbar`, `tb_vipers_wr_xbar`, `tb_vipers_mainmem`, `tb_vipers_ctrl_regs` | Each unit against a behavioural reference, random and corner cases |

`tb_vipers_top` runs programs through the instruction port, with the scalar
port loading the data and reading the results back. It covers:

* Loads, ALU operations and stores.
* Auto-increment, extract, insert and vector-scalar operations.
* Shifts, compares, masks and merge.
* `vmac`/`vcczacc` and `vupshift` at VL 64 and 40.
* A local-memory table built with `vstl` and read with `vldl`.
* Strided, indexed and byte/halfword accesses.

It also checks cycle counts:

* Four cycles per full-length instruction.
* Two lost cycles behind a two-group producer.
* VL/4 and VL/2 memory cycles.

It counts each mechanism and fails if one never happens: RAW stall, load
interlock, load write-back, MAC, vcczacc, shift chain, local memory, indexed
and strided accesses, masking, extract, scalar port, multi-element memory
cycles and structural stalls.

### Kernel testbenches

Four more benches run the evaluated kernels on `vipers_top` at the default
parameters. They share the scalar-side tasks in `tb/vipers_host.svh`. Each
one compares every result with a reference computed in the bench and prints
its cycle count. The scalar core is not modelled, so these counts leave out
scalar instruction time.

| Testbench | Kernel | Size run | Cycles seen |
|---|---|---|---|
| `tb_vipers_median` | 5x5 median, partial bubble sort. Unrolled form (all 25 rows in registers, vmax/vmin/vmov) and loop form (rows kept in memory, load/vmax/vmin/store) | 2 rows of 64 pixels | unrolled about 3020 per row (47 per pixel); loop form about 8780 per row |
| `tb_vipers_sad` | Motion estimation SAD at VL 16. Plain loop (vabsdiff/vadd, then vmac with ones and vcczacc), software-pipelined loop, and fully unrolled form sliding down a column with rows kept in registers | 24 random positions; 3 columns of 16 positions unrolled | plain about 339, pipelined 265, unrolled 78 per position |
| `tb_vipers_aes` | One AES round by T-table: table copied into each lane's local memory, stride-4 word loads, vsrl/vldl/vrot/vxor | 64 blocks | about 580 for all 64 |
| `tb_vipers_fir` | FIR by vmac, vcczacc, vext.vs and vupshift | 16 taps, 64 outputs | 18 per output |

The unrolled forms must beat the plain forms: at least twice as fast for
the median and for motion estimation. The ratios seen are about 2.9 and
4.3. The architecture reports about three and up to five times.

The VL 32 form of motion estimation is not run. It matches two copies of
the block, one row apart, in the two halves of each vector and masks the
first and last rows. With the default single MAC chain, one `vcczacc` would
add both windows into one sum, and the way the two sums are kept apart is
not specified, so the benches stay at VL 16.

The AES T-table is the real one, built from the S-box computed in the bench.
The bench also checks three known S-box entries. In this design the AES
round is bound by the strided accesses. At stride 4 words each element lies
in its own 128-bit line, so every strided load or store moves one element
per cycle.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/vipers_pkg.sv tb/vipers_asm_pkg.sv \
          -y rtl -y tb tb/tb_vipers_top.sv --top-module tb_vipers_top
./obj_dir/Vtb_vipers_top
```

Substitute any other `tb_*` name for the unit benches.

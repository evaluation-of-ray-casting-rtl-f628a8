# A processor-like reconfigurable core for ray casting

Ray casting renders a 3D volume (CT or MRI data, for example) by sending one ray per
screen pixel through the volume. At every sample point along a ray it fetches the
2 x 2 x 2 neighbouring voxels and interpolates between them. These two steps, *voxel
fetch* and *resampling*, set the pace of the whole algorithm. Voxel fetch is limited by
memory bandwidth. Resampling needs the most arithmetic.

This RTL implements a coarse-grained reconfigurable array for those two steps. It
follows the architecture proposed in the study "Evaluation of Ray Casting on
Processor-Like Reconfigurable Architectures". The array is a grid of identical
processing elements (PEs). Each PE has a hardwired 32-bit functional unit and a small
*context memory*. A context is one complete configuration of the PE. A per-PE
state machine selects the active context, and it can pick a different one in every
clock cycle. That is the "processor-like" part. Alternative algorithm branches can
stay resident on chip and swap in when the data calls for them, for example
trilinear versus nearest-neighbour interpolation, or the handling of a pipeline
stall. No reconfiguration is needed to switch.

## Two instances of one design

`crc_top` is parameterised. Two parameter sets correspond to the two architectures of
the study:

| | high throughput (default) | low area |
|---|---|---|
| PE array (`ROWS` x `COLS`) | 4 x 15 (5 columns voxel fetch, 10 resampling) | 4 x 2 (1 column each) |
| contexts per PE (`NCTX`) | 4 | 24 |
| memory blocks (`2*NMEM_SIDE`) | 8 (4 above, 4 below) | 2 (1 above, 1 below) |
| samples per clock | 1 (super-pipelined across columns) | 1/15 (stages spread over contexts) |

In the high-throughput mapping, the voxel fetch is split into super-pipeline stages,
one per array column. Resampling uses one context for trilinear and one for
nearest-neighbour interpolation, and two further contexts are reserved for stalls.
In the low-area mapping, the same work is spread over up to 15 consecutive contexts
of a single column. The hardware is the same in both cases. Only the configuration
and the parameters differ.

## The processing element (`pe`)

```
            N in/out (2 x 32-bit data, 1 status)
                  |
 W in/out ---[ routing muxes ]--- E in/out        + left-to-right channel  W -> E
 LR in   ---[  FU  | 7 data regs | 3 status regs ]--- LR out
                  |
            S in/out
   context memory[NCTX]  <-- state --  FSM (tests a status bit, and stall)
```

* **FU** (`pe_fu`): the C operators except `/` and `%` on 32-bit operands. It also has
  a signed and an unsigned 16 x 16 -> 32 multiply, comparisons that give 0/1 plus a
  status bit, and `SEL` (`c ? a : b`), which maps an if-else into one context.
* **Registers** (`pe_regfile`, used twice): 7 x 32-bit data registers and 3 x 1-bit
  status registers. All of them can be read at once, and one of each can be written
  per cycle.
* **Ports** (`pe_port`): each of N, E, S and W has two 32-bit data channels and one
  status channel in each direction. The second data channel is the refinement that
  made the voxel fetch mappable. Each outgoing channel has a multiplexer and an
  **output register**. The multiplexer can pick any neighbour input, the FU result, a
  register, the left-to-right input or the immediate.
* **Left-to-right channel**: one cheap 32-bit register chain from W to E. It carries
  values past columns that do not use them, with a latency that matches the
  pipeline.
* **Context memory** (`pe_ctx_mem`): `NCTX` words, read asynchronously by the FSM
  state.
* **FSM** (`pe_fsm`): a Medvedev machine, so the state *is* the context number. Each
  state has one table entry. It names a status bit to test (one of the four port
  status inputs, a status register or the FU status) and gives four next states,
  for `{stall, bit}` = 00, 01, 10 and 11.
* **Configuration port** (`pe_cfg`): a decoder on the configuration bus shared by the
  whole array.

### The context word (`crc_pkg::ctx_t`)

| field | meaning |
|---|---|
| `op` | FU operation (`fu_op_e`) |
| `a_sel`, `b_sel` | FU data operands (`dsrc_e`: `DS_N0..DS_W1` neighbour channels, `DS_LR`, `DS_IMM`, `DS_R0..DS_R6`) |
| `c_sel` | FU status operand for `SEL` (`ssrc_e`) |
| `imm` | 16-bit immediate, sign-extended |
| `dreg_we`, `dreg_idx` | write the FU result into a data register |
| `sreg_we`, `sreg_idx` | write the FU status into a status register |
| `port[dir].d0/.d1/.s` | for each output channel: `en` (load the output register) and `sel` (source; `DS_FU`/`SS_FU` for the FU result) |
| `lr` | the same for the left-to-right output |

The all-zero word is the idle context: no operation, and no register loads. Reset
clears every context to it.

## Timing: what happens in which cycle

This is the part to get right when writing a configuration.

1. **One hop is one cycle.** Every PE output is registered. A value that a PE
   computes or routes in cycle *t* is seen by its neighbour in cycle *t+1*. Data that
   crosses *k* PEs arrives *k* cycles later. Two values that meet at a PE must have
   taken paths of equal length. The registered hops also rule out combinational loops
   through the mesh.
2. **The FSM decides one cycle ahead.** The status bit tested in cycle *t* selects the
   context of cycle *t+1*. A PE that must switch contexts per data item therefore
   needs the control bit one cycle *before* the data. The end-to-end test sends the
   mode bit along a neighbouring row that runs one cycle ahead.
3. **Holding is free.** A context that enables nothing freezes the PE. The output,
   data and status registers keep their values.
4. **Memory reads take one cycle.** An address on the bus in cycle *t* gives its voxel
   at the border PE's input in cycle *t+1*.

### Stalls

A cache controller that cannot supply a voxel raises the global `stall` input. Every
PE's FSM takes its stall branch, which should lead to a context that enables nothing.
The array is then frozen **from the next cycle on**, for as long as `stall` stays
high, plus one cycle. Two details make the restart exact:

* The memory read registers are pipeline registers too. `crc_top` holds them in
  exactly the frozen cycles (`stall` registered once). The controller can still
  reload one through its override port (`cc_ovr_en`, `cc_ovr_addr`) to deliver a
  voxel it has just refilled.
* The status bit that an FSM tested in the cycle the stall began will have moved on
  by the end of the stall. So the stall branch depends on that bit. There are two
  stall contexts: context 2 means "resume at 0" and context 3 means "resume at 1".
  This is why the stall reserves two contexts per PE.

The cache controller protocol that goes with this is:

1. In a cycle where the array is not frozen, check the addresses on `mem_addr`.
2. On a miss, raise `stall` in the same cycle.
3. Refill the line through `cc_we`, `cc_waddr` and `cc_wdata`.
4. In the last stall cycle, pulse `cc_ovr_en` with the missed address.
5. Drop `stall`.

The testbench `tb_crc_top` contains a model of such a controller.

## Memory system

* `voxel_mem`: one block of `MEM_DEPTH` = 16^3 voxels of 16 bits, with a synchronous
  read. All blocks hold the same sub-cube, so the eight blocks can supply a whole
  2 x 2 x 2 neighbourhood per cycle. The write port belongs to the cache controller.
* `mem_bus`: one bus above and one below the array. Its routing is set at
  configuration time:
  * which border PE and channel drives each memory's address (`CFG_BUS_A`);
  * which memory feeds each border PE's outward input channel (`CFG_BUS_R`).
  An unrouted channel reads 0.

## Configuration bus (`crc_pkg::cfg_req_t`)

One write per cycle while `we` is high. `id` selects a PE (`row*COLS + col`) or a bus
(0 = top, 1 = bottom), and `addr` selects the entry.

| `tgt` | `id` | `addr` | `data` |
|---|---|---|---|
| `CFG_CTX` | PE | context | `ctx_t` |
| `CFG_FSM` | PE | state | `fsm_entry_t` in the low bits |
| `CFG_BUS_A` | bus | memory | `{valid, channel, column[7:0]}` |
| `CFG_BUS_R` | bus | `2*column + channel` | `{valid, memory[3:0]}` |

Keep `run` low while configuring. The PEs then execute the idle context and stay in
state 0.

## Files

| file | content |
|---|---|
| `rtl/crc_pkg.sv` | widths, enums, context/FSM/configuration formats |
| `rtl/crc_top.sv` | array + two memory buses + memory blocks |
| `rtl/pe_array.sv` | mesh of PEs |
| `rtl/pe.sv`, `pe_fu.sv`, `pe_regfile.sv`, `pe_ctx_mem.sv`, `pe_fsm.sv`, `pe_port.sv`, `pe_cfg.sv` | processing element and its parts |
| `rtl/mem_bus.sv`, `rtl/voxel_mem.sv` | memory system |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

`tb/tb_crc_top.sv` is the end-to-end test. It runs at the default (full) size and
configures a reduced voxel fetch plus resampling in super-pipelined form:

* addresses `z*256 + y*16 + (x>>4)` and `+1` go to two memory blocks;
* a per-sample mode bit chooses linear interpolation (context 0) or nearest
  neighbour via `SEL` (context 1).

The testbench checks 400 samples against a reference. It also checks the rate of one
sample per clock outside stalls, and that mode switches, cache misses, refills and
stalls all occur.

`tb/tb_crc_top_low_area.sv` runs the same computation on the low-area parameter set
(`ROWS=4, COLS=2, NCTX=24, NMEM_SIDE=1`). Here each stage occupies one PE, which
steps through its contexts once per sample:

* PE (0,0) computes both addresses in contexts 0-6 and sends them one cycle apart
  to the single memory block above the array.
* PE (0,1) loads the two voxels. It then branches on the mode bit, either to four
  linear-interpolation contexts (8-11) or to two nearest-neighbour contexts (16, 17).
* The nearest-neighbour branch is shorter. It therefore ends in a context (18) that
  decrements a register and loops on itself until the register reaches zero. That
  pads the branch to the same 15-cycle period, so both pipeline stages stay in
  step.

The testbench checks every result at the end of its 15-cycle period. It also checks
that both PEs return to context 0 exactly every 15 cycles. It does not exercise the
stall.

`tb/tb_crc_top_trilinear.sv` runs a full trilinear interpolation on the same low-area
parameter set, at one sample every 15 cycles. The interpolation is seven linear steps
`a + (((b - a) * f) >>> 4)` of four operations each, 28 operations in all, and it
reads eight voxels.

* Column 0 sends four addresses to the memory block above and four, one z plane
  further, to the block below. This is how two memory blocks can stand in for the
  eight of the high-throughput instance.
* PEs (0,1) and (3,1) each interpolate one z plane (two x steps and a y step).
* PE (2,1) relays the lower result.
* PE (1,1) does the z step.

Some operations of a sample run into the next 15-cycle period. This is allowed
because the schedule repeats every period and no register is overwritten before its
last use. The latency is two periods minus one cycle. The testbench checks every
result against a reference model, including samples at the corners of the sub-cube.

## Simulating

Any testbench builds with plain Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/*.sv tb/tb_crc_top.sv --top-module tb_crc_top
./obj_dir/Vtb_crc_top
```

Each testbench prints `TB_RESULT checks=N failures=M`. The full-size top takes a few
minutes to compile with optimisation. `-CFLAGS -O0` builds it in seconds and it still
runs in about two seconds.

## How far it follows the study, and what is this design's own

Taken from the study:
* the PE contents (FU without `/` and `%`, 16 x 16 -> 32 multiply, select function,
  7 data and 3 status registers, context memory, Medvedev FSM, boot-time
  configuration);
* the 32-bit data path;
* the refined interconnect (two data channels plus one status channel per
  neighbour, and the left-to-right channel);
* the array shapes, the context counts (4 and 24) and the two reserved stall
  contexts;
* eight 16^3-voxel memory blocks on top and bottom buses;
* the one-cycle memory latency.

This design's own choices, since the study leaves them open:
* all encodings;
* the immediate operand;
* registered PE outputs;
* the FSM table form (one tested bit, with the stall as a second input);
* a global `stall` wire;
* the `run` input;
* the configuration bus;
* the bus routing tables;
* the 16-bit voxel width;
* the memory `hold` and override ports.

Not included:
* The cache controller and the external memory. They are described elsewhere, so
  their signals are ports of `crc_top`.
* The study's full trilinear mapping (28 operations over 10 x 4 PEs) and its complete
  voxel fetch (15 additions, 2 multiplications). They are software for this hardware,
  and the study does not give them. The high-throughput testbench runs a smaller
  program of the same kind. The full trilinear interpolation is run only in the
  low-area form described above.
* A stall in the low-area (multi-context) form. The study reserves two stall
  contexts there too, but it does not say how a PE resumes in the middle of a
  15-context sequence. Only the high-throughput end-to-end test exercises the stall.
* The area, power and clock figures of the study (130 nm standard cells). They cannot
  be reproduced from RTL alone.

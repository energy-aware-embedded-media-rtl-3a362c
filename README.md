# Xtream-Fit: a cache-less data memory subsystem for streaming media

Media decoders such as MPEG2 read every input byte once. They write every
output byte once and reuse only a small set of constants (quantisation and
IDCT tables and the like). A data cache serves this traffic badly: it spends
energy on tags and reuse that never comes. Its misses also scatter off-chip
DRAM accesses in time, so the DRAM can never sleep for long.

Xtream-Fit replaces the data cache with three parts:

* a **Scratch-Pad** SRAM for the constants and scalars;
* a **Streaming Memory** split into one *region* per stream (input, output,
  intermediates). Each region holds `g` objects, and every object slot can
  be power-gated on its own;
* a **Streaming Memory Controller (SMC)**. It runs small programs called
  *data transfer tasks* that move whole stream segments between SDRAM and
  the regions in page-mode bursts.

The application is cut into a fixed chain of tasks. Processing tasks run on
the processor and touch only on-chip memory. Data transfer tasks (DT) run
on the SMC. All off-chip traffic therefore happens in short, dense bursts
at predictable times, and between bursts the SDRAM is put into its
low-power mode. Each Streaming Memory slot is gated as soon as its data is
dead.

This repository holds synthesizable SystemVerilog for the whole subsystem.
It also holds a cross-application synchronization unit, for several media
applications that run together and must stay in step, such as the audio and
video of a video-phone.

## Block diagram

```
 processor data bus
   |
 xf_bus_decoder ----+-- xf_scratchpad          2 KB, constants
   |   control regs |-- xf_streaming_memory    port A (processor)
   |                +-- xf_smc registers       program, stream pointers
   |
 xf_sync_unit --allow/set size--> xf_task_sched --start/first_obj--> xf_smc
   ^ set_done of every application         |  p_ready, lp_req          |  port B
   |                                       v                            v
 other applications (ports)          processor (STATUS,      xf_streaming_memory
                                     DOORBELL registers)              |
                                                               xf_sdram_ctrl -> SDRAM pins
```

The top module is `xf_top`. All blocks share the types in `xf_pkg`: the
region enumeration, the SMC instruction format and the SDRAM command
encoding.

## Task granularity and the task chain

The key tuning knob is the task granularity `g`, the number of basic data
objects handled per pass through the task chain. For MPEG2 an object is a
macroblock. A larger `g` gives longer SDRAM bursts and longer sleep periods,
but it also needs a larger and leakier Streaming Memory. The hardware is
sized by the parameter `G`, the largest `g` it supports. The default
`G = 2` is the best point reported for MPEG2 on a MIPS R10000-class core.
The Scratch-Pad is 2048 bytes.

The MPEG2 decoder uses four tasks per set of objects:

| task     | runs on   | does |
|----------|-----------|------|
| Task1_DT | SMC       | write back the previous set's decoded macroblocks; prefetch the next `g` compressed macroblocks |
| Task1_P  | processor | variable-length decode, extract DCT data and motion vectors into their regions |
| Task2_DT | SMC       | fetch zero, one or two motion-compensation reference blocks per macroblock, as the motion vectors say |
| Task2_P  | processor | IDCT, average and add the references, write the decoded macroblock |

`xf_task_sched` enforces two scheduling rules:

* **Early start.** `P_j` is released (`p_ready`) as soon as the *first
  object* of `DT_j` is in the Streaming Memory, not when `DT_j` ends. The
  processor then consumes objects in the order the controller delivers
  them. No per-object handshake is used: the processing task is much slower
  than the transfer, so it never overtakes it. If it ever did, a read would
  return data that has not yet arrived.
* **Transfer after processing.** `DT_{j+1}` starts when `P_j` signals
  completion by writing the DOORBELL register. If `DT_j` is still running
  at that point, the start waits. These waits are counted (`dt_stalls`)
  because they mean the overlap assumption broke.

The SDRAM may sleep whenever no transfer task is running (`lp_req`). The
controller wakes it for the next task.

## Streaming Memory layout and power gating

Regions follow the MPEG2 decoder. Sizes are per object, so each region is
`G` slots of this size:

| region | bytes/object | words | base word at G = 2 |
|--------|-------------:|------:|------:|
| input stream (compressed MB, upper bound) | 128 | 32 | 0 |
| output stream (decoded MB) | 384 | 96 | 64 |
| motion vectors / fetch table | 64 | 16 | 256 |
| DCT data (`D_dct_MB`) | 384 | 96 | 288 |
| backward motion compensation | 384 | 96 | 480 |
| forward motion compensation | 384 | 96 | 672 |

That is 1728 B per object, 3456 B (864 words) at `G = 2`. Each object slot
is one power sub-region, `6*G` in all. Sub-region `r*G + s` is slot `s` of
region `r`.

Power-state rules:
* After reset, every sub-region is off.
* Power is switched from two sources, whose requests are ORed:
  * the SMC's `PWR_ON`/`PWR_OFF` instructions, which switch whole regions;
  * the processor's SMPWR register, which switches one slot.
  * If on and off arrive for the same slot in one cycle, off wins.

Access rules:
* An access to a gated slot never changes memory: a write is dropped and a
  read returns 0.
* The access is flagged. On the processor side this becomes a bus error.
  On the controller side it sets the sticky `err` bit.
* `powered_words` reports how many words are powered. It is a stand-in for
  leakage.

Typical policy, as exercised by the top testbench:
* Task1_P gates each input slot as soon as it has decoded it.
* Task2_P gates each DCT and motion-compensation slot after using it.
* Task1_DT gates the output region right after writing it back.
* Each DT powers up the regions it is about to fill.

As a result, output and reference regions stay dark for most of a set.

## The Streaming Memory Controller program

The SMC runs a program of 32-bit instructions from a 64-entry program
store. The processor writes the program over the bus at setup. Each data
transfer task has its own entry point.

```
 31..29 op   28 -   27 rel   26 prev   25..23 region   22..20 sel
 19..10 tab (for PWR_*: region mask in 15..10)   9..0 words per object
```

| op | meaning |
|----|---------|
| `LOAD`   | one burst of `nobj*words` words from stream pointer `sel` into `region`; the pointer advances |
| `STORE`  | one burst from `region` to stream pointer `sel`; the pointer advances |
| `LOADI`  | for each object `o`: read word `tab+o` of region `sel` as an SDRAM word address and fetch `words` words from it into slot `o`; address bit 31 = no object, skip |
| `PWR_ON` / `PWR_OFF` | power up / gate all slots of the masked regions |
| `END`    | task done |
| 6, 7     | undefined: the task ends and the sticky error bit is set |

`nobj` is the set size, normally `g`. Two flags handle the corner cases of
the task chain:

* **`prev`** makes an instruction use the *previous* set's object count.
  Task1_DT begins by writing back the previous set, which may be shorter
  or longer than the current one (see remainder sets below). For the very
  first set this count is 0, so the write-back is skipped. No separate
  start-up program is needed.
* **`rel`** marks the load whose first object releases the next processing
  task. In Task2_DT the backward references are loaded first and then the
  forward ones. The release flag therefore goes on the forward load: only
  then does object 0 have both of its references. A skipped `LOADI` slot
  counts as arrived. A task with no `rel` releases at `END`.

The MPEG2 program used by the testbench, for task pair 0 at entry 0 and
task pair 1 at entry 5:

```
0  STORE  prev  OUT  <- stream 1, 96 w    write back previous decoded MBs
1  PWR_OFF OUT
2  PWR_ON  IN | MV | DCT
3  LOAD   rel   IN   <- stream 0, 32 w    prefetch compressed MBs
4  END
5  PWR_ON  MC_B | MC_F | OUT
6  LOADI        MC_B <- table MV[0..]     backward references
7  LOADI  rel   MC_F <- table MV[8..]     forward references (or skip)
8  END
```

SMC register map (word offsets in the SMC window): `0x000-0x03F` program,
`0x100-0x107` stream pointers (SDRAM word addresses), `0x110-0x113` task
entry points, `0x118` status `{err, busy}`.

## Off-chip SDRAM

`xf_sdram_ctrl` drives a x32 single-data-rate mobile SDRAM, modelled on a
2M x 32 part: 4 banks, 2048 rows, 256 columns. A word address is
`{bank, row, column}`, so a sequential stream walks along a row and then on
to the next row.

* **Bursts.** Every request is one run of consecutive words. The controller:
  1. opens the row with ACTIVE;
  2. issues one READ or WRITE per cycle;
  3. at a row end, precharges and re-activates the next row, then goes on;
  4. closes the row at the end of the run.
* **Timing.** Read data arrive `CL+1` cycles after the READ command. From
  request acceptance to the first word takes 7 cycles, with `T_RCD = 2` and
  `CL = 2`.
* **Low power.** When `lp_req` is high and nothing is pending, CKE goes low
  (power-down). A new request, a refresh that comes due, or `lp_req`
  falling brings CKE back up. The controller then waits `T_XP` cycles.
* **Refresh.** Auto refresh is issued every `T_REFI` cycles, waking the
  device if it is asleep.
* **Reset.** Reset runs the standard power-up sequence: wait, precharge all,
  two refreshes, mode register.

All timing values (`CL`, `T_RCD`, `T_RP`, `T_RFC`, `T_WR`, `T_MRD`, `T_XP`,
`T_REFI`, `T_INIT`) are parameters with defaults for a clock of about
100 MHz. Set them from the datasheet of the actual part.

## Several applications: synchronization blocks

`xf_sync_unit` serves `NAPPS = 3` applications. Application 0 is the one
this subsystem schedules. Applications 1 and 2 report on the `ext_*` ports.

* **Blocks and granularity.** Each application `a` has a synchronization
  granularity `G_a`: the number of objects it must process per
  *synchronization block*. For example, one video frame (396 macroblocks)
  against 1092 audio samples. It works in sets of `g_a` objects.
* **Remainder sets.** When `g_a` does not divide `G_a`, the last set of the
  block is a shorter *remainder* set of `G_a - floor(G_a/g_a)*g_a` objects.
  The unit hands out set sizes as `min(g_a, G_a - done_a)`.
* **Barrier.** No application may start block `i` before every application
  has finished block `i-1`. Once all counters reach their `G_a`, they are
  cleared together and `block_start` pulses.
* **Throughput monitor.** The start time of each block is time-stamped.
  `violation` pulses when `start_i - start_{i-X}` exceeds the BOUND
  register (cycles; 0 disables the check). With `X = 1` this is the hard
  form of the rule; a larger `X` gives a windowed, soft form. The monitor
  counts violations but does not act on them.

## Processor's view

| address | contents |
|---------|----------|
| `0x1000_0000` | Scratch-Pad, 512 words |
| `0x2000_0000` | Streaming Memory, regions back to back, 864 words at G = 2 |
| `0x3000_0000` | SMC registers |
| `0x4000_0000` | control registers, word offsets below |

| offset | register | |
|-------:|----------|--|
| 0x00 | CTRL | `[0]` enable, `[6:4]` task pairs in the chain |
| 0x01 | DOORBELL | write: current processing task finished |
| 0x02 | STATUS | `[7:0]` objects in set, `[9:8]` task, `[12]` processing task released, `[13]` SMC busy, `[14]` SMC error, `[15]` SDRAM asleep, `[16]` SDRAM initialised |
| 0x03 | SMPWR | `[31]` 1 = on / 0 = off, `[7:0]` sub-region |
| 0x04 | PWRSTATE | sub-region power bits |
| 0x05 | BOUND | throughput bound, cycles |
| 0x08+a / 0x0C+a | G_a / g_a | per application |
| 0x10 / 0x11 / 0x12 | STAT0 / STAT1 / STAT2 | `{dt_stalls, sets}` / `{violations, blocks}` / `{remainder sets, transfer tasks done}` |

The bus takes one request per cycle. Read data and `err` come back one
cycle later. Unmapped or misaligned addresses and accesses to gated slots
answer with `err`. The processor can also watch the `p_ready`/`p_id`/`p_objs` pins
instead of polling STATUS.

Setup:
1. Load the program, stream pointers and entry points.
2. Load the Scratch-Pad constants.
3. Write G/g and BOUND.
4. Write CTRL = enable.

After that, the processor loops:
1. Wait for a release.
2. Run processing task `p_id` on `p_objs` objects, gating consumed slots.
3. Write DOORBELL.

## Where this design departs from, or adds to, the source description

* **Design choices.** The source names the Streaming Memory Controller and
  says what it does. It does not define an instruction set, register map,
  bus protocol or address map. Those given here are choices of this design,
  and so are:
  * the `rel`/`prev` flags;
  * the table-driven `LOADI`;
  * per-object sub-regions;
  * the error reporting on gated accesses.
* **Streaming Memory size.** It is the sum of the MPEG2 region sizes,
  1728 B per object. One table of the source gives 2048 B per object for
  MPEG2, which looks like that sum rounded up to a power of two. This
  design builds the region sum.
* **SDRAM model.** The part name and the policy ("sleep as soon as a
  transfer ends, wake right before the next") are from the source. The
  SDRAM geometry and every timing number are standard values for that
  class of part.
* **Dropped waits.** Processing tasks run on the processor, and the source
  argues that no waits are needed between a transfer task and its
  processing task. Nothing in hardware stops the processor from reading a
  slot before it is filled.
* **One application's memories.** When several applications run at once,
  the source partitions both the Streaming Memory and the Scratch-Pad
  between them, each with its own regions. This design builds the memories
  of one application, the MPEG2 decoder. The other applications take part
  only in block synchronization, through the `ext_*` ports. Sharing the
  SDRAM between several controllers would also need an arbiter, which is
  not built.
* **JPEG and G.721.** Only the MPEG2 region layout is built. The source
  gives total Streaming Memory sizes for JPEG (256 B x g) and G.721
  (2 B x g) but not their regions. Such an application would map its
  streams onto the existing regions through the SMC program.
* **Processor and processing tasks.** The processor, its instruction
  cache, the peripherals and the decoding algorithms themselves are not
  hardware of this subsystem. The testbenches replace them with a bus
  model and a toy decoder.

## Files

* `rtl/xf_pkg.sv` — shared types and constants.
* Modules, one per file:
  * `rtl/xf_scratchpad.sv`
  * `rtl/xf_streaming_memory.sv`
  * `rtl/xf_sdram_ctrl.sv`
  * `rtl/xf_smc.sv`
  * `rtl/xf_task_sched.sv`
  * `rtl/xf_sync_unit.sv`
  * `rtl/xf_bus_decoder.sv`
  * `rtl/xf_top.sv`
* `tb/tb_<module>.sv` — one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/sdram_model.sv` — a behavioural SDRAM. It checks protocol timing
  (tRCD, tRP, commands while asleep, access to closed banks, refresh with
  open banks) and counts activations, page hits, refreshes and power-down
  entries.

`tb/tb_xf_top.sv` runs the complete subsystem with every parameter at its
default. The setup:
* a toy MPEG2-style decoder on 15 macroblocks;
* three applications, with `G = 5, 3, 4` and `g = 2, 1, 3`, so remainder
  sets occur;
* one deliberately slow application, so the decoder waits at the barrier.

The decoder's output in the SDRAM model is compared word for word with a
reference computed in the testbench. The testbench also counts each
mechanism and fails if any never occurred:
* SDRAM power-down and wake-up, refresh, page hits and row crossings;
* early start and transfer-task stalls;
* `LOADI` skips and remainder sets;
* barrier waits and throughput violations;
* gating by controller and by processor, and the bus error on a gated slot.

The simulation takes about 30k cycles, most of it the SDRAM power-up wait.

Simulating with Verilator, for example:

```
verilator --binary --assert -Irtl -Itb rtl/xf_pkg.sv tb/tb_xf_top.sv --top-module tb_xf_top
./obj_dir/Vtb_xf_top
```

`tb_xf_sync_unit` also runs two blocks of a video-phone mix: one CIF frame
of 396 macroblocks (`g = 2`) kept in step with 1092 samples each of a speech
decoder and encoder (`g = 128`). Each speech application therefore ends
every block with a 68-sample remainder set.

Concurrent assertions in the RTL check three rules whenever `--assert` is
given:
* the SDRAM sees only NOPs while its clock is disabled, and no request is
  accepted before power-up ends;
* the controller holds a burst request unchanged until it is taken;
* a transfer task is started only on an idle controller.

Other unit testbenches follow the same pattern (`tb_xf_smc`,
`tb_xf_sdram_ctrl`, ...). They override timing parameters such as
`T_INIT` to stay short.

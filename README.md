# Reconfigurable parallel image processor with hierarchical multi-context configuration

This is an image processor that splits a frame into blocks. Each block has its
own coarse-grain processing element (PE) and its own dual-port block memory. A
control RISC processor drives the array. What each PE does is set by
*contexts*: 80-bit configuration words held in a small ring register file
inside the PE. A new context can be selected every clock cycle.

The central idea is how the contexts get into the array:

- An image function is split into loops that run over all pixels of a block.
  Each loop becomes a **context set**.
- The RISC sends only a 16-bit **custom instruction** to start one or more
  sets.
- The hardware expands that instruction in two stages, much like a
  micro-program:
  1. an index gives the address of a set header;
  2. the header gives the length and mode of the configuration words that
     follow.
- The words are streamed into the ring register files while another set is
  still running. Configuration time is therefore mostly hidden behind
  execution.

The default build is a 2x2 array for a 64x64 frame (32x32 pixels per PE) with
32 contexts per ring.

```
            imem load, I/O                         sensor side (port A of every block memory)
                 |                                        |
          +--------------+  config mem / index / ftab     |
          | control_risc |---- writes ---------------+    |
          |  3-stage     |-- custom instr (16b) --+  |    |
          +--------------+<- busy ---+            |  |    |
                                     |   +--------v--v-------------------------------+
                                     |   | rip_core                                  |
                                     |   |  cfg_index -> cfg_memory -> cfg_control   |
                                     |   |                 40-bit bus | FIFO push    |
                                     |   |    +------------+---------+    |         |
                                     |   |    v            v         v    v         |
                                     |   |  branch_ctrl   pe x4   ic_network ctx_fifo|
                                     |   |    ^  | ctx_ptr  ^ |      ^        |      |
                                     |   |    |  +----------+-+------+  exec_control|
                                     |   |    +----start / done---------------+     |
                                     |   |            image_mem x4 (port B = PE)    |
                                     +---+-------------------------------------------+
```

## Files

| file | contents |
|---|---|
| `rtl/rp_pkg.sv` | widths, enums and packed structs of all word formats |
| `rtl/risc_pkg.sv` | the RISC instruction set and its encoders |
| `rtl/rpips_top.sv` | top level: RISC plus image processor |
| `rtl/rip_core.sv` | image processor: PEs, memories, network, configuration pipeline |
| `rtl/pe.sv` | PE, built from `pe_alu`, `pe_mac`, `pe_regfile`, `pe_mem_if` and `ring_cfg_rf` |
| `rtl/branch_ctrl.sv` | context sequencing, jump condition registers, context pointer |
| `rtl/cfg_control.sv`, `cfg_index.sv`, `cfg_memory.sv`, `ctx_fifo.sv`, `exec_control.sv` | configuration pipeline |
| `rtl/ic_network.sv` | neighbour MUX network with its own context ring |
| `rtl/image_mem.sv` | dual-port block memory |
| `rtl/control_risc.sv` | control processor |
| `tb/tb_<module>.sv` | self-checking testbench, one per module |
| `tb/tb_kern_pkg.sv` | context-set builder and the kernels (thresholding, neighbour sum, border fill, 3x3 convolution, optical flow) |

## Contexts and the context pointer

All PEs, the network and the branch control each hold a ring register file
with `N_CTX` entries, all at the same addresses. In every executing cycle the
branch control broadcasts one **context pointer**. Each unit then carries out
its own entry at that address:

- each PE does the operation in its PE word;
- the network sets every PE input MUX from its select word;
- the branch control picks the next context from its branch word.

Because of this, the array is SIMD in time: all PEs step through the same
context numbers. A set that is not in broadcast mode can still give each PE a
different word at the same context (see the neighbour-sum test).

### PE word (80 bits, `pe_cfg_t`)

The PE executes its whole context in one cycle:

- **ALU:** 16 bits wide. Its operations are add and subtract with and without
  carry, logic, shifts, min/max, absolute difference and two compares.
- **MAC:** takes the low 9 bits of each operand as signed numbers and forms
  their product. It can multiply, accumulate, clear or hold a 26-bit
  accumulator. A 0–15 bit arithmetic right shift gives its 16-bit output.
- **Register file:** 16x16 with two read ports and one write port. Write-back
  selects the ALU, the MAC, network port 0 or the immediate.
- **Memory access:** reads or writes `mem[rf[ra] + imm]`. Read data appear
  one cycle later on a network port that selects a memory source.
- **Output register:** the ALU result with its carry, seen by the neighbours
  through the network. A context can also write the ALU result to a jump
  condition register.

Operands come from register ports A/B, the four network ports, the immediate,
or the PE's own output register. The exact layout of the word is listed in
`rp_pkg.sv`.

### Branch word (76 bits, `br_cfg_t`)

| bits | field |
|---|---|
| 75 | End: the set finishes after this context |
| 74..70 | default next context |
| 69..35 | jump condition 0 |
| 34..0 | jump condition 1 |

Each jump condition has the following fields:

| bits | field |
|---|---|
| 34..19 | 16-bit condition value |
| 18..14 | jump context |
| 13..10 | register 0 |
| 9..7 | operation 0 |
| 6..3 | register 1 |
| 2..0 | operation 1 |

A condition holds when both of its terms hold. A term compares jump condition
register `JCR[register]` with the condition value. The operations are:

- always;
- `==`, `!=`, `<`, `>=`, `>`, `<=` (all unsigned);
- never.

The next context is chosen in this priority order: End, then condition 0, then
condition 1, then the default. Context numbers are relative to the first
context of the set and wrap around the ring, so a set runs correctly wherever
it was loaded. There are 16 JCRs, written by the PEs. A write becomes visible
to the branch decision of the next cycle. That is why the kernels update the
loop counter and its JCR copy in the same context.

The context sequence is shared by the whole array. If several PEs write the
same JCR in one cycle, the lowest-numbered PE wins. Branches therefore suit
loop control, which is the same in every block, but not per-pixel decisions.
A per-block choice has to be made without branching. For example, the
optical-flow kernel keeps its best match with `MIN` and a mask:
`mask = -(best > sad)`, then `idx ^= (idx ^ cand) & mask`.

### Network word

Each PE has four input ports. Each port selects one of 18 sources:

- **0–8:** memory read data of the own block and of its eight neighbours, in
  the order self, N, NE, E, SE, S, SW, W, NW;
- **9–17:** the output registers of the same nine PEs.

A neighbour that lies outside the array reads as zero. The 2x2 array needs
4 PEs × 4 ports × 5 bits = 80 bits per context. Only adjacent blocks are
connected, which is what lets the array grow with the image.

## Processing across block borders

A PE can read only its own memory. It sees a neighbour's memory only as the
read data that the neighbour's memory returns. The array is SIMD, so all PEs
issue the same address in the same cycle. A filter whose window crosses a
block edge therefore works in two steps.

1. The block is stored with a one-word border. It occupies 34x34 words, and
   pixel `(x,y)` is at `35 + 34·y + x`.
2. Short context sets (`halo_edge_set`, `halo_corner_set`) fill the border
   first. In each step every PE reads the word that its neighbour needs,
   for example its own last column for the east neighbour. The neighbour then
   takes that word from the network and writes it into its border. On the
   frame edge the network delivers zeros, which gives zero padding.

After that, the filter runs the same code in every block with no special
cases at the edges. For the 3x3 convolution, filling the borders takes about 420
cycles.

## Configuration pipeline

```
custom instr {idx, n} -> cfg_control: for k = 0..n-1
     index[idx+k] -> header address
     header {nctx[5:0], bcast[6], nwords[22:7]}
     wait: ring has nctx free entries and the FIFO is not full   (cfg_stall)
     stream nwords 40-bit words, one per clock, into the rings
     push {start entry, nctx} into the executable FIFO
exec_control: FIFO not empty and branch control idle
     -> start branch control at the head's start entry
     on done: pop, and give the nctx entries back to cfg_control
```

Within a set the words are ordered by context. For each context `c`:

1. branch word, beats 0 and 1;
2. PE word, beats 0 and 1: once in broadcast mode, otherwise once for each
   PE in order;
3. network word, beats 0 and 1.

So a context costs 6 words in broadcast mode and `4 + 2·NPE` words otherwise.
The header's `nwords` must equal `nctx` times that number. Ring entries are
allocated in circular order, so several sets can sit in the ring at once. The
next set is configured while the current one executes, whenever the ring has
room for it.

## Control RISC

The control RISC has the following structure:

- Three pipeline stages: fetch, decode, execute/write-back.
- 16 x 32-bit registers; `r0` reads as zero.
- Forwarding from execute to decode.
- Branches resolve in execute and discard the two younger instructions.
- A private instruction memory, loaded through the `imem_*` port while `run`
  is low.

Instructions are 32 bits: `op[31:26] rd[25:22] rs[21:18] rt[17:14] imm[15:0]`.

| class | instructions |
|---|---|
| arithmetic / control | ADD SUB AND OR XOR SLL SRL ADDI LUI ORI BEQ BNE JMP IN OUT HALT |
| configuration | CFGHI (stage bits 39..32), CFGW (config memory[rs] = {staged, rt}), IDXW (index[rs] = rt), FTW (function table[imm] = rs) |
| image processing | CUST (send function table[imm[7:0]] as the custom instruction; imm[8] = wait), SYNC |

The **function table** (256 entries) is the programmable decode. It maps an
image processing instruction to a 16-bit custom instruction `{index address,
number of sets}`.

Dependencies between the RISC and the array are stated by the program:

- `CUST` without the wait flag lets the RISC carry on in parallel with the
  array.
- `CUST` with the wait flag, or `SYNC`, holds the pipeline until the array is
  idle.
- `CUST` also stalls while the configuration control cannot take a new
  instruction (valid/ready).

## Timing

- **Thresholding:** the 6-context broadcast set (`thr_set` in
  `tb/tb_kern_pkg.sv`) handles one pixel every three cycles. A 32x32 block
  takes 3076 cycles from start to done: 2 setup + 3·1024 + 2. The reference
  implementation this design follows reports about 3100 cycles for a 64x64
  frame on four PEs.
- **3x3 convolution:** the 28-context set `conv_set` handles one pixel every
  12 cycles, plus 2 per row. It needs 12367 cycles per 32x32 block, with all
  four blocks in parallel. The reference implementation reports about
  12000–13000 cycles for this filter on the same frame and array.
- **Optical flow:** 5x5 templates on a 5x5 grid per block, each searched
  over 12x12 displacements by sum of absolute differences. The kernel uses
  three sets: `of_init_set`, `of_match_set` (32 contexts) and `of_next_set`.
  One custom instruction runs them as 51 index entries: init, then a match
  and a next step for each of the 25 templates. The whole frame takes 306315
  cycles, of which each match set takes 11980. The reference reports about
  390000 cycles at 32 contexts. The match set fills the whole ring, so
  configuration cannot overlap execution. This is the switching cost that the
  number of contexts controls.
- **Configuration:** one 40-bit word per clock. A broadcast context takes
  6 cycles; a per-PE context on 4 PEs takes 12 cycles.
- **Start/finish:** branch control starts a set one cycle after
  execution control sees it in the FIFO. The `done` pulse is registered.

## How far to trust it, and where it departs

Taken as specified:

- the system structure;
- the 2x2 array for 64x64 and 32 contexts;
- the 40-bit configuration bus, the 80-bit PE word and the 76-bit branch word
  with its field positions;
- the 16-bit custom instruction;
- 16 jump condition registers;
- the index → header → words hierarchy and what the header contains;
- the executable FIFO and start offset;
- overlapped reconfiguration;
- broadcast mode;
- the PE's building blocks and their widths: 9-bit MAC inputs, 26-bit
  accumulator, shifter, 16-bit ALU, 16x16 register file, four 16-bit
  data-and-carry inputs;
- the RISC's function table, instruction classes and program-stated
  dependencies.

This design's own choices:

- the PE word layout and the ALU/MAC operation sets;
- the meaning of the two-term jump operations;
- the header layout and the word order;
- memory sizes: block memories of 4096 x 16, configuration memory of
  4096 x 40, instruction memory of 4096 x 32;
- FIFO depth 8;
- the whole RISC instruction set and encoding;
- the network source numbering;
- all handshakes;
- asynchronous active-low reset.

Known departures and limits:

- **Jump conditions.** The original description speaks of four jump conditions
  per context. The published branch-word layout has room for two, and this
  design follows the layout.
- **Sensor and I/O.** The image sensor, the A/D converters, the 32-bit I/O
  interface and the vertical (3D stacked) connections are not modelled. Port A
  of every block memory is brought out as `sen_*`, where the sensor would
  write. The RISC's `io_in`/`io_out` stand in for the I/O interface.
- **Network width.** The 80-bit network word holds selects for up to 4 PEs.
  Larger arrays need a wider network ring word.
- **Context numbers.** Context numbers in the branch word are 5 bits, so one
  set can use at most 32 contexts, even if `N_CTX` is raised to 64.
- **Evaluation kernels.** Thresholding, a 3x3 convolution and block-matching
  optical flow are written as kernels. Their context counts are this design's
  own. In the optical-flow kernel, the 5x5 grid of templates and the rule
  that each search stays inside its own block are also this design's own
  choices.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
Example with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb +libext+.sv -y rtl -y tb \
    rtl/rp_pkg.sv rtl/risc_pkg.sv tb/tb_kern_pkg.sv tb/tb_rpips_top.sv \
    --top-module tb_rpips_top -o sim && obj_dir/sim
```

For a unit test, replace the last file and the top module. For example, use
`tb/tb_branch_ctrl.sv` with `--top-module tb_branch_ctrl`. Only `rp_pkg.sv` is
needed before it. The processor-level tests `tb_rip_core`, `tb_conv3x3` and
`tb_optflow` also need `tb/tb_kern_pkg.sv`.

`-Wno-fatal` keeps Verilator's unused-bit lint warnings from stopping the
build.

The tests:

- **`tb_rpips_top`** runs the whole system at default parameters. The RISC
  program writes three context sets into configuration memory:
  - thresholding (broadcast);
  - a neighbour sum, different per PE, that reads the east block through the
    network;
  - a 22-context straight-line set that fills the ring and forces a
    configuration stall.

  The program then issues two custom instructions, one without and one with
  the wait flag. Meanwhile it runs a loop of its own. Finally the test reads
  the frames back through the sensor ports and compares them with a model.

  The test counts each mechanism and fails if one never happened:
  - broadcast and per-PE configuration;
  - ring-full stall;
  - configuration overlapping execution;
  - jumps;
  - the custom-instruction handshake stall;
  - the dependency stall;
  - RISC work done in parallel with the array.
- **`tb_conv3x3`** runs a signed 3x3 convolution of a 64x64 frame on the
  processor. It checks every output, the filled borders and the cycle count.
- **`tb_optflow`** computes block-matching optical flow on two frames. In
  frame 2 each block is moved by a known amount. The test checks every best
  match and SAD against a model, checks that the true motion is found, and
  checks the cycle count of a match set.
- **`tb_rip_core`** runs the same kernels without the RISC. It also checks the
  thresholding cycle count.
- **The unit testbenches** drive random traffic against small reference models
  written in the testbench.

## Changing it

- **Array size:** `GX`/`GY` on `rpips_top`. Beyond 2x2 the network word must
  grow (see above).
- **Ring depth:** `N_CTX`, which must be a power of two; this is the
  area/performance knob.
- **New kernels:** build them with the `cs_builder` class in
  `tb/tb_kern_pkg.sv`. It writes the header and the words in the order
  described above.

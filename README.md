# A virtualized Associative Mesh running Markov motion detection

The Associative Mesh is a SIMD image processor with one processing element per
pixel. Its key idea is the *association*. The pixels are linked by a
reconfigurable graph, and each pixel chooses which of its eight neighbours it
listens to. An association applies an associative, commutative operator (OR,
MAX, a sum) over the values in each connected part of that graph. Sizes of
regions, region maxima and flood fills from seeds are each a single operation.
In silicon the associations run without clocked registers: values ripple from
node to node until the whole net is stable.

A full 256 x 256 array of complete processing elements is too big for one chip.
The design is therefore *virtualized*. The association layer keeps one node
per pixel. The clocked part of the processing elements is folded into 64
synchronous units. Each unit serves a 32 x 32 block of pixels, with a few SIMD
lanes that work through the block row by row.

This RTL implements that machine and programs it for motion detection by
Markov-random-field relaxation:

- Sigma-Delta background estimation gives a first motion estimate.
- Iterated Conditional Modes (ICM) then relaxes the labels spatially and
  temporally.
- A hysteresis step, done with one global association, can follow as
  post-processing.

The programs are in the end-to-end testbenches. They run at the full default
size of 256 x 256 pixels, with 64 units.

## Structure

```
              prog_we/addr/data, run                 scan_in[r] / scan_out[r] (4 bit, one chain per unit row)
                     |                                          |
             +----------------+  instr, start / done   +--------------------------------------------+
             | mesh_controller|----------------------->| sync_unit (uy,ux)  x 64, each 32x32 pixels |
             |  program RAM   |  rin_capture           |  memory_bench  scan_register  LANES x pe_alu|
             |  sequencer     |----------------------->|  per pixel: mgraph, LV, RIN, carry, active  |
             +----------------+                        +--------------------------------------------+
                |  net_start/op   ^ done (stability)        | lv, mgraph (per pixel)   ^ result (per pixel)
                v                 |                         v                          |
             +---------------------------------------------------------------------------------------+
             | assoc_network: one node per pixel, 8-connected, and-gate masks, OR/MAX/PLUS operators, |
             | stability detector                                                                     |
             +---------------------------------------------------------------------------------------+
```

`assoc_mesh` is the top level. Pixel (y, x) belongs to unit (y / BLK_H, x / BLK_W).
Inside its unit it is virtual element v = (y mod BLK_H) * BLK_W + (x mod BLK_W).
A unit handles its elements in rows of LANES, so element v sits in row v / LANES,
lane v mod LANES.

## Associations and mgraphs

Every pixel has an 8-bit **mgraph** register. Bit d set means "I receive from
my neighbour in direction d":

| bit | 0 | 1  | 2 | 3  | 4 | 5  | 6 | 7  |
|-----|---|----|---|----|---|----|---|----|
| dir | N | NE | E | SE | S | SW | W | NW |

A neighbour's value reaches a pixel's operator only through an and-gate mask
that this bit controls. Edges that would leave the image are always closed.
Edges are directed, so pixel p listening to q does not make q listen to p.
Every pixel also presents a 4-bit **local value** (LV) to the layer.

`assoc_network` provides eight associations:

| kind | result at pixel p |
|------|-------------------|
| `AS_OR`, `AS_AND`, `AS_MAX`, `AS_MIN` | OR (AND, MAX, MIN) of LV over p and every pixel that can reach p along open edges |
| `AS_PLUS_STEP` | sum (mod 16) of the LVs of p's open neighbours, p's own value excluded |
| `AS_OR_STEP`, `AS_MAX_STEP`, `AS_MIN_STEP` | OR (MAX, MIN) of the LVs of p's open neighbours; 0 (0, 15) if none is open |

The global kinds need the whole connected part to settle, which the
asynchronous hardware does by rippling. The RTL gets the same fixed point
synchronously:

- The result registers start at the local values.
- On every clock, each node combines its value with its masked neighbours.
- The stability detector ends the association in the first clock in which no
  node changed.

So an association lasts one clock per hop of the longest propagation path,
plus one clock to see that nothing changed.
A broadcast from a corner of an all-open W x H mesh takes max(W, H) + 1 cycles.
Step associations take one cycle.

Read the latency figures below with that in mind. This synchronous model is
the largest departure from the original circuit: it gives the same results
but not the asynchronous timing.

The ICM uses `AS_PLUS_STEP` with every edge open. Each pixel then receives s,
the number of its 8 neighbours labelled "motion". Hysteresis uses `AS_OR`:

- Pixels above the low threshold open all their edges.
- The other pixels close all their edges and present 0.
- The seeds present 1.

After the OR association, every pixel in a seeded region holds 1.

## The synchronous units

A `sync_unit` holds the state of its N = BLK_W x BLK_H virtual processing
elements:

- per pixel, DEPTH 4-bit words in the `memory_bench`;
- the mgraph register;
- LV, the value offered to the association layer;
- RIN, the captured association result;
- a carry/borrow flag;
- the WHERE activity flag and the condition of the last WHERE;
- a 4-bit cell of the `scan_register`.

A broadcast instruction is executed one row of LANES pixels per clock, so it
costs N / LANES cycles. This serialization is the price of virtualization, and
the lanes exist to reduce it. Each lane has a 4-bit `pe_alu`:

- operand a always comes from the memory bench;
- operand b comes through a multiplexer from the memory bench, an immediate,
  RIN or LV;
- the result goes to the memory bench, to LV, or to both.

Numbers wider than 4 bits are handled least significant nibble first, with the
per-pixel carry chained through `ADC`, `SBC`, `CMPC` and `RLC`. An 8-bit compare
is `CMP lo; CMPC hi`, after which the carry is set exactly when a < b.

### Instruction word (`am_pkg::instr_t`, 37 bits)

| field     | meaning |
|-----------|---------|
| `op`      | `NOP`, `ALU`, `WHERE`, `ELSEWHERE`, `ENDWHERE`, `SETMG`, `ASSOC`, `SCAN_RD`, `SCAN_WR`, `HALT` |
| `alu`     | `ADD ADC SUB SBC AND OR XOR PASSB RLC CMP CMPC MAX MIN EQ GETC NOTA` |
| `srcb`    | second operand: `MEM` (word b), `IMM`, `RIN`, `LV` |
| `dst_sel` | `MEM` (word dst), `LV`, `BOTH`, `NONE` |
| `cond`    | WHERE condition: word a `!= 0`, `== 0`, carry set, carry clear |
| `assoc`   | association kind for `ASSOC` |
| `dst, a, b` | 6-bit word addresses |
| `imm`     | 4-bit immediate |

The instructions and their effects:

- **WHERE** sets each pixel's activity flag to the condition and stores the
  condition.
- **ELSEWHERE** activates the other pixels, and **ENDWHERE** activates all.
  WHERE blocks do not nest.
- Inactive pixels keep their memory, LV, mgraph, carry and scan cell.
- **SETMG** loads the mgraph from two words: `{mem[b], mem[a]}`.
- **SCAN_RD** copies each pixel's scan cell into word dst. **SCAN_WR** copies
  word a into the scan cell.
- **ASSOC** is handled by the controller. It starts the association on the
  current LVs, waits for stability, then loads RIN of every pixel in one
  cycle.

## Controller and timing

`mesh_controller` runs straight-line programs from a 256-entry program memory,
which is written through `prog_we/prog_addr/prog_wdata`. A pulse on `run`
starts the program at address 0, and `halted` pulses when it reaches `HALT`.

| instruction | cycles |
|-------------|--------|
| broadcast (ALU, WHERE, SETMG, SCAN_*) | N / LANES + 3 (67 at the defaults) |
| ASSOC, step kind | 3 |
| ASSOC, global kind | hops + 4 |
| NOP, HALT | 1 |

The controller counts the cycles, broadcasts, associations and stability-wait
cycles of each run. The ports are `cnt_*`.

### Scan chains

Image planes move through 4-bit scan chains. There is one chain per row of
units, entering unit (r, 0) and leaving unit (r, UCOLS-1). Inside a unit the
chain visits elements 0 to N-1.

1. Shift UCOLS x N nibbles in with `scan_en`. The first nibble ends up in the
   last element of the last unit.
2. Run `SCAN_RD` to move the plane into memory.

To read a plane out, run `SCAN_WR`, then shift. Shifting is independent of
instruction execution, but `SCAN_RD` and `SCAN_WR` must not run while the
chains shift. At the defaults there are 8 chains of 8192 cells each.

## Motion detection on the mesh

The end-to-end testbenches assemble four programs and check every result
against an integer reference model. All images are 8-bit, held in two
nibbles.

**Sigma-Delta, one frame.** The inputs are frame I, background M, variance V
and the last relaxed label P. This program takes 56 broadcasts, 3,753 cycles
at the defaults.

1. Where P = 0, M moves one step towards I.
2. O = |M - I|.
3. Where O != 0 and P = 0, V moves one step towards 2·O, held in 12 bits.
4. The estimate is F = (O >= V).

**ICM, one image-recursive relaxation** of the label plane C. P is the past
labels, F the future estimate and Q the observation of C's frame. This program
takes 45 broadcasts and one step association, 3,019 cycles.

- s = PLUS step association of C
- Um = (8 − 2s)·βs + (P ? −βp : βp) + (F ? −βf : βf)
- C = 1 where 2·Um < (2αQ − α²) / (4σ²), otherwise 0

The testbench uses βs = 1, βp = βf = 2, α = 4 and σ² = 2, so the right-hand
side is Q − 2. The whole computation runs in 12-bit two's complement, and the
sign nibble decides the label. Four relaxations are run.

**Hysteresis** on a plane K holding the number of colour planes in motion at
each pixel. It runs with (sL, sH) = (1, 3) and (2, 3), taking 12 broadcasts
and one global OR association. At the defaults this takes 1,062 cycles for
(1, 3). In that test an isolated chain crosses the whole 256-pixel row from
a single seed, so the OR needs 256 cycles to settle. For (2, 3) the chain is
broken and the run takes 814 cycles. The rest of the time goes on the 12
broadcasts, each serialized over 64 rows.

The two other post-processings of the colour algorithm, level-k ceiling
and level-k diffusion, compare K with k and keep or clear the colour bits.
They are plain WHERE blocks and are not written out as test programs.

**Region statistics** on the connected sets of K >= 1. Region pixels open
all their edges and present K. The other pixels close their edges and
present the operator's neutral value: 0 for MAX, 15 for MIN and AND. Global
MAX, MIN and AND associations then give every region pixel the maximum,
minimum and AND of K over its region. A MAX step association follows. This
program is not part of motion detection. It exercises the remaining
association kinds in the full machine.

At the defaults, one frame with four ICM relaxations takes 15,829 cycles,
which is 31.7 µs at 500 MHz. Scan I/O is not included, because it overlaps
with computation. The original work reports 40.32 µs, or 24,801 frames/s, for
its asynchronous, virtualized design. The two figures are not strictly
comparable: the instruction set and programs here are this design's own.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `IMG_W`, `IMG_H` | 256 | 256 x 256 mesh of the original design |
| `BLK_W`, `BLK_H` | 32 | 64 units of 32 x 32 pixels in the original design |
| `LANES` | 16 | chosen; the original leaves the SIMD degree open |
| `DEPTH` | 64 words / pixel | chosen; the test programs above use 39 |
| `PROG_DEPTH` | 256 | chosen |
| `WORD_W` (am_pkg) | 4 | 4-bit ALU of the original processing element |

LANES must divide BLK_W x BLK_H, and the blocks must tile the image.

## Departures from the original design

The original describes these parts; this design builds them differently:

- **Association timing.** Global associations are modelled one hop per clock,
  as described above.
- **PLUS association.** The original forms the sum bit-serially. Here it is a
  one-step 4-bit sum.
- **Mgraph loading.** The original loads the mgraph from its arbiters. Here
  `SETMG` loads it from memory.

The original leaves these open; they are this design's choices:

- the lane count and memory depth;
- the instruction set, including the carry flag;
- WHERE semantics without nesting;
- the controller and its program memory;
- the scan-chain order.

## Not built

The following parts are missing:

- **Global PLUS association (region sums).** The original gives only its name
  and timing, not how each pixel is counted once over a connected set.
- **Spanning-tree generation and the arbiters.** The original gives only the
  name and timing, not the arbitration or the choice of tree.

The design still runs everything the motion-detection algorithm needs.

## Simulating

The package must be read first. The other modules are found through `-y rtl`.

```
verilator --binary --timing --assert -y rtl rtl/am_pkg.sv tb/tb_assoc_mesh.sv --top-module tb_assoc_mesh
./obj_dir/Vtb_assoc_mesh
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

| testbench | what it covers | run time |
|-----------|----------------|----------|
| `tb_pe_alu` | every ALU operation, exhaustively | < 1 s |
| `tb_memory_bench` | random lane-masked writes against a shadow copy | < 1 s |
| `tb_scan_register` | chain latency, row read and write, shift-out | < 1 s |
| `tb_assoc_network` | random masks and values against a graph search reference; latencies | ~1 s |
| `tb_sync_unit` | all operand sources, carry chaining, WHERE/ELSEWHERE, SETMG, RIN, scan; N/LANES timing | < 1 s |
| `tb_mesh_controller` | ordering, association handshake, counters | < 1 s |
| `tb_assoc_mesh` | the four programs on a 16 x 8 mesh of 4 units; counts each mechanism used | ~1 s |
| `tb_assoc_mesh_full` | the same at the default 256 x 256, 64-unit size | about 8.5 min: 1.5 to build, 7 to run |

## Files

- `rtl/am_pkg.sv`: types, instruction encoding and direction helpers.
- `rtl/assoc_mesh.sv`: the top level.
- `rtl/assoc_network.sv`: the association layer.
- `rtl/sync_unit.sv`: a synchronous unit, built from:
  - `rtl/memory_bench.sv`
  - `rtl/scan_register.sv`
  - `rtl/pe_alu.sv`
- `rtl/mesh_controller.sv`: the controller.
- `tb/`: one testbench per module, plus the two end-to-end testbenches.

# Focal-plane sensor-processor array (8x8 SIMD processors, 64x64 pixels)

This RTL is a vision chip's digital core. The photodiode array sits in a
separate layer bonded face to face on top of the logic. Each small tile of
pixels has its own readout, multiplexer and SAR ADC. The tile's converted
frame goes to a processor sitting right below it. All the processors of an
array run the same instruction stream (SIMD). Each one works on the pixels of
its own tile. It reads the pixels of nearby tiles as if they were in its own
memory.

With the default parameters the array has 8x8 processors. Each processor
serves an 8x8-pixel tile and has 512 bytes of data memory, so the array senses
and processes 64x64-pixel images. The processors receive decoded
microinstructions and have no program memory. A host streams programs in
over one 32-bit Wishbone bus and moves images over a second one. Sensing,
conversion, processing and image transfer all run at the same time, in four
clock domains.

## Array organisation

```
 program bus ──> wb_prog_bridge ──> async_fifo ──> instr_decoder ──┐ uop (broadcast)
 (clk_prog)     (2 words/instr,     (program buffer)  (clk_core)   │
                 crc16 check)                                      │
                                                                   v
   ┌──────────────── 8 x 8 tiles, each: ─────────────────────────────────────┐
   │ proc_core <── nbr_arbiter (neighbour bytes / 1-bit aligned rows)        │
   │    │  ^                   ^ port A reads of all 64 memories             │
   │    v  │ sens               │                                           │
   │ data_mem (512 B, port A: core, port B: data bus)                        │
   │ sensor_buffer (2 banks) <── sensor_ctrl + sar_adc_ctrl (clk_adc) <── analog
   └─────────────────────────────────────────────────────────────────────────┘
 data bus ──> wb_data_bridge ──> port B of every data_mem (clk_data)
                             └──> test port of every sensor_buffer (read only)
```

| domain     | contents |
|------------|----------|
| `clk_prog` | program bridge, write side of the program FIFO |
| `clk_core` | decoder, arbiter, processors, port A of the memories, read side of the sensor buffers |
| `clk_data` | data bridge, port B of the memories, test port of the sensor buffers |
| `clk_adc`  | tile controllers, SAR logic, write side of the sensor buffers |

The domains meet in a few places only:

- the gray-pointer program FIFO;
- the true dual-port data memories;
- the double-buffered sensor buffers;
- two-flop synchronisers for status bits and the conversion-request toggles.

## Neighbourhood access: the central idea

Pixel `(gx, gy)` of the image lives in processor `(gx/8, gy/8)` at local
pixel `(gx%8, gy%8)`. The processor keeps it at byte `base + 8*ly + lx`.
Every processor executes the same instruction at the same local pixel. So an
access to "the pixel at offset (dx, dy)" gives every processor the same two
things:

- the same local byte address `((ly+dy) mod 8, (lx+dx) mod 8)`;
- the same source processor offset `(sx, sy) = (floor((lx+dx)/8), floor((ly+dy)/8))`.

The decoder therefore reads **all 64 memories at one address**. The arbiter
(`nbr_arbiter`) is a fixed 3x3 routing network: processor `(x, y)` gets the
byte read by processor `(x+sx, y+sy)`. Nothing is ever contended, and the
program needs no special instructions for neighbours. Offsets run from -7 to
+7, which covers kernels up to 15x15.

Beyond the array edge, the boundary modules (inside the arbiter) substitute a
boundary byte. The `SETB` instruction loads it: `imm[7:0]` is the byte,
`imm[8]` the binary boundary bit.

**Bit mode** (`bmode=1`) handles binary images, stored as one byte per tile
row with bit `j` = column `j`. The address then selects row `(ly+dy) mod 8`.
The arbiter joins the row bytes of the left, own and right processors into
24 bits and extracts the 8 bits starting at column offset `dx`. One
instruction thus brings eight pixels shifted by any whole pixel amount.
Outside the array every bit is the boundary bit.

## Instruction word and pipeline

The instruction is the packed struct `instr_t` in `rtl/xenon_pkg.sv`, 46
bits, MSB first:

| field | bits | meaning |
|-------|------|---------|
| `op` | 6 | operation (`opcode_e`) |
| `cond` | 3 | condition: always, Z, NZ, N, LT, GT, EQ, F |
| `srca` | 3 | operand A: memory/arbiter, register, immediate, sensor buffer, morphology register, accumulator low byte |
| `srcb` | 1 | operand B: 9-bit signed immediate, or register 0 |
| `dst` | 1 | result to register `rsel` or to memory |
| `rsel` | 2 | register index (4 registers) |
| `sga`, `sgb` | 2 | operand A / register B treated as signed |
| `bmode` | 1 | binary (bit-aligned) access |
| `use_idx` | 1 | address relative to the current pixel index |
| `dx`, `dy` | 4+4 | signed neighbour offset, -7..7 |
| `addr` | 9 | base address (image slot in the 512-byte memory) |
| `imm` | 9 | immediate / shift amount / byte select / bit field / integration time (`SSTART`) |

The operations fall into five groups:

- **initialisation:** `CLRACC`, `CLRF`, `SETB`, `SETIDX`, `INCIDX`, `SSTART`;
- **data transfer:** `MOV`;
- **arithmetic:** `LDA`, `ADD`, `SUB`, `MUL`, `MACC`, `SHL`, `SHR`, `SAT8`, `SAT16`, `BFX`, `LDAH`, `ADDH`;
- **logic (binary morphology):** `MLD`, `MAND`, `MOR`, `MANDN`, `MORN`, `MXOR`;
- **comparison and control:** `CMP`, `SETF`, `STBY`, `WAKE`, `GOR`, `SRDY`.

`SETIDX` and `INCIDX` change the decoder's pixel index. They never reach the
processors. A program walks over the 64 pixels of the tile by repeating its
body with `INCIDX`.

The decoder has two stages:

1. **Issue.** It computes the read address and `(sx, sy)` from `addr`, the
   pixel index and `(dx, dy)`. All memories read at that address, and the
   sensor buffers read at the pixel index.
2. **Execute.** The microinstruction `uop_t` goes to every processor. Each
   processor takes its operand from the arbiter and executes. It may write
   its own memory at `uop.waddr`, the unshifted pixel address.

Port A of each memory does one access per clock. When the instruction in
execute writes memory and the next one reads memory, issue waits one clock
(the `stall` output). Without stalls the decoder issues one instruction per
core clock.

## The processor (`proc_core`)

A crossbar (`core_xbar`) feeds these units:

- **`arith_unit`:** operand A is extended to 9 bits, signed or unsigned.
  Operand B is always 9-bit signed, so one signed 9x9 multiplier serves
  signed, unsigned and mixed products. The accumulator is 24 bits, and
  `SHL`/`SHR` shift it by `imm[4:0]` with sign extension.
  - `SAT8` and `SAT16` clip the accumulator to the 8- or 16-bit range, signed
    or unsigned according to `sga`, and set V when they clip. `SAT16` returns
    the byte chosen by `imm[0]`.
  - `BFX` returns `(A >> imm[2:0]) & mask(imm[5:3]+1)`.
  - `LDAH` and `ADDH` handle 16-bit operands stored as two bytes. `LDAH`
    puts A in the high byte and keeps the accumulator's low byte, so
    `LDA lo` then `LDAH hi` loads a 16-bit value. `ADDH` adds A shifted
    left by 8, so `ADD lo` then `ADDH hi` adds one.
- **`cmp_unit`:** compares A and B as signed 9-bit values, which covers
  signed, unsigned and mixed comparisons, and sets EQ, LT and GT.
- **`morph_unit`:** eight single-bit processors (`morph_cell`), one per pixel
  of a bit-aligned row word. Each combines its bit register with the incoming
  bit: load, AND, OR, AND-NOT, OR-NOT or XOR.
  - Erosion is `MLD` followed by `MAND` over the structuring element.
  - Dilation uses `MOR`.
  - Hit-and-miss mixes `MAND` and `MANDN`.
- **`reg_bank`:** four byte registers.
- **`flag_standby`:** holds the flags Z, N, V, EQ, LT, GT and the user flag F.

`MOV`, `SAT8`, `SAT16` and `BFX` write their result byte to a register or to
the own memory.

The arithmetic and morphology units are optional (`HAS_ARITH`, `HAS_MORPH`),
so an array built for binary work only, or for grey-level work only, can
leave one out. `xenon_top` can also leave out the data memories (`HAS_MEM`)
for an array that only senses and compares. A left-out unit reads as zero and sets no flags. Moves,
compares, masking, standby and the global OR still work.

### Masking, standby and the global OR

Every ordinary operation is **masked** by its condition. Where the condition
is false the processor does nothing, so image content decides where an
operation takes effect. Some operations use the condition differently:

- **`STBY`** puts a processor to sleep when its condition holds. A sleeping
  processor executes nothing. Its memory keeps serving neighbours and the
  data bus.
- **`WAKE`** runs in every processor, asleep or awake. It wakes those whose
  operand A is non-zero. With `srca=SA_MEM` that is a byte of the
  processor's own data; with an immediate of 1 it wakes all of them.
- **`SETF`** copies the condition into F.
- **`GOR`** ORs the condition over all 64 processors and latches the result
  on the `gor`/`gor_valid` outputs. With the condition "always" it ORs "this
  processor is awake" instead.

## Sensor interface

Each tile has a `sensor_ctrl`. A processor's `SSTART` toggles a request into
the ADC domain. The controller then works in three phases:

1. It holds the pixel readout in reset for `RST_CYC` clocks.
2. It lets all the pixels integrate. `SSTART`'s immediate sets this time in
   ADC clocks; 0 selects the default `INT_CYC`. The value travels with the
   request toggle and is stable when the toggle arrives, so it needs no
   synchroniser of its own.
3. It scans the 64 pixels through the analog multiplexer (`pix_sel`).

`sar_adc_ctrl` converts each pixel with one decision per clock against the
external DAC and comparator. Conversions run back to back at 9 ADC clocks
per pixel. With 8 MS/s (a 72 MHz ADC clock) a 64-pixel tile converts in
8 us, so the 64x64 image converts in well under the 10 us frame time of a
100 kframe/s rate.

Codes go into the writing bank of the two-bank `sensor_buffer`. At the end of
the frame the banks swap, and the tile's `frame_rdy` rises in the core domain.
The processor reads its completed frame with `srca=SA_SENS` at the current
pixel index. `SRDY` copies the tile's `frame_rdy` into the flag F, so a
program can copy only new frames (instructions with condition F). The next
frame can be converted meanwhile. The host can also read every tile's
completed frame directly over the data bus (see below), which makes the chip
a plain camera without any processing.

The analog parts are outside this RTL: photodiode readout, multiplexer,
current-steering DAC and comparator. `xenon_top` brings out their controls
(`pix_rst`, `pix_sel`, `adc_sample`, `adc_dac`) and takes in each tile's
comparator output (`adc_cmp`).

## Host interfaces

**Program bus** (`pwb_*`, classic Wishbone, ACK one clock after STB):

| word | access | meaning |
|------|--------|---------|
| 0 | write/read | instruction bits [31:0] |
| 1 | write | instruction bits [45:32]; pushes the instruction. ACK is held while the program FIFO is full. |
| 2 | read | status: bit0 global-OR result, bit1 decoder busy, bit2 FIFO full, bit3 every tile has a new frame, bit4 last CRC check passed, bit5 a CRC check failed since reset (sticky), bits[15:8] number of global-OR evaluations (mod 256) |
| 3 | read | running CRC-16 of the program words written since the last check |
| 3 | write | expected CRC in bits [15:0]: compare, set bits 4/5 of the status, restart the CRC |

The CRC (`crc16`) protects the instruction stream, which every processor
executes. It folds each word written to word 0 and each pushed word 1, most
significant bit first, with the polynomial x^16+x^12+x^5+1 and initial value
0xFFFF (the common CCITT form: "123456789" as bytes gives 0x29B1). The host
computes the same CRC over a block of instructions and writes it to word 3.

**Data bus** (`dwb_*`): `adr = {region (1 bit), processor y*8+x (6 bits),
word (7 bits)}`, 32-bit words with byte selects. ACK and read data come one
clock after the request.

- Region 0 is the processor's data memory. Byte `a` is lane `a%4` of word
  `a/4`.
- Region 1 is read-only: the processor's last completed sensor frame, pixel
  `p` in lane `p%4` of word `p/4` (words 0 to 15). Writes there are
  acknowledged and ignored.

## Example: vertical Sobel, one pixel position

```
MUL  A=mem[0](dx=-1,dy=-1) B=imm  1     ; acc  = p * 1
MACC A=mem[0](dx= 0,dy=-1) B=imm  2
MACC A=mem[0](dx=+1,dy=-1) B=imm  1
MACC A=mem[0](dx=-1,dy=+1) B=imm -1
MACC A=mem[0](dx= 0,dy=+1) B=imm -2
MACC A=mem[0](dx=+1,dy=+1) B=imm -1
SHR  imm=3                              ; divide by 8 (floor)
SAT8 sga=1 dst=mem[64]                  ; signed 8-bit saturated store
INCIDX                                   ; next pixel of the tile
```

Repeated 64 times, this computes the whole 64x64 image in all 64 processors
at once. `tb/tb_xenon_top.sv` builds exactly this stream with its `mk()`
helper.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `xenon_top` | `NX`, `NY` | 8, 8 | processor array |
| | `TILE` | 8 | pixels per tile side (power of two) |
| | `MEM_DEPTH` | 512 | bytes per processor memory |
| | `FIFO_DEPTH` | 16 | program buffer entries (own choice) |
| | `INT_CYC` | 16 | default integration time in ADC clocks (own choice) |
| | `HAS_ARITH`, `HAS_MORPH` | 1, 1 | include the arithmetic / morphology unit in every processor |
| | `HAS_MEM` | 1 | include the data memory of every processor |
| `sensor_ctrl` | `RST_CYC` | 4 | pixel reset phase (own choice) |
| `arith_unit` | accumulator | 24 bits | `ACC_W` in the package |

## How far this follows the architecture

These parts follow the architecture:

- the array and shell organisation, and the four clock domains;
- SIMD execution with a shared decoder and no program memory in the processors;
- the processor's units;
- the 9x9 signed multiplier and 24-bit accumulator with saturation;
- eight single-bit morphology processors;
- neighbour memories mapped through an arbiter, with 1-bit alignment and boundary modules;
- masking, standby and the global OR;
- 512-byte dual-port memories;
- a buffered program path and Wishbone bridges;
- a per-tile 8-bit SAR ADC, buffered, with 8x8-pixel tiles;
- frame-ready feedback to the processors and external access to the
  converted frames;
- CRC checking on the program bus;
- optional arithmetic and morphology units and data memories.

These are this design's own choices:

- the instruction encoding and opcode set (32 operations, not a
  112-instruction set);
- the two-stage pipeline and its stall rule;
- the pixel-index register;
- the condition codes and the `WAKE` rule;
- the register count;
- bus address maps (including the sensor window) and status word;
- the CRC polynomial, its framing and which bus it covers;
- FIFO depth, sensor phase lengths and two-bank sensor buffering;
- a single asynchronous reset;
- synchronous-read memories written as arrays. Replace them with SRAM macros
  for an ASIC.

These are not included:

- CRC checking of the data bus (only the program bus is covered);
- scan chains;
- clock gating;
- compression of the instruction stream;
- chains of several differently configured arrays (each array here is one
  `xenon_top`);
- the analog front end;
- leaving out the register bank or the standby logic. Only the arithmetic
  unit, the morphology unit and the data memories are optional here.
- a carry flag. Wider sums use the 24-bit accumulator and `LDAH`/`ADDH`
  instead of carry propagation between bytes.

Limits to know:

- The data memory's two ports do not arbitrate a simultaneous write to the
  same byte.
- Results are readable by the second instruction after the writing one. The
  stall handles this automatically.
- `sensor_ctrl` uses a global (all pixels together) integration.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Run one with plain
Verilator, for example:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/xenon_pkg.sv tb/tb_xenon_top.sv --top-module tb_xenon_top
./obj_dir/Vtb_xenon_top
```

`tb_xenon_top` runs the whole array at its default size with four unrelated
clocks and an ideal analog model. It takes a few seconds and does the
following:

- loads images over the data bus;
- runs a Sobel filter, a compare/standby threshold with a global OR per
  pixel, a 3x3 binary erosion and a sensor frame capture (integration time
  set up by the instruction and measured), with the frame
  also read directly through the data bus sensor window;
- reads everything back and compares it with a reference computed in the
  testbench;
- counts stalls, cross-processor and boundary reads, bit-mode accesses,
  masked writes, standby/wake events, global-OR results, FIFO-full cycles
  and frames. Each of these must occur;
- checks the CRC of the whole program through the program bridge.

`tb_workloads` runs further image operators on the full array:

- 3x3 and 9x9 convolution;
- 3x3 local minimum;
- binary dilation;
- one thinning (hit-and-miss) step;
- full skeletonization. Thinning with the eight rotations of the two
  L-shaped hit-and-miss elements repeats until a pass changes nothing. The
  host learns this from the global OR of each processor's changed rows.

It also counts the core clocks each operator takes. With one instruction per
clock and all 64 processors working at once, the 64x64 image costs:

| operator | core clocks | clocks per pixel |
|----------|-------------|------------------|
| 3x3 convolution | 769 | 0.19 |
| 9x9 convolution | 5441 | 1.33 |
| 3x3 local minimum | 1218 | 0.30 |
| 3x3 binary dilation | 89 | 0.02 |
| thinning step | 72 | 0.02 |
| skeletonization, 4 passes | 3424 | 0.84 |

The Sobel filter of `tb_xenon_top` takes 9 clocks per pixel position, or
0.14 clocks per pixel. Binary operators are cheapest because the morphology
unit handles a whole row of eight pixels per instruction.

`tb_xenon_lite` runs a 2x2 array without memories, arithmetic or
morphology. It converts a frame, thresholds every pixel position with a global
OR and reads the frames through the sensor window.

The unit testbenches compare each block with an independent model: integer
arithmetic for the datapath, image coordinates for the arbiter and decoder,
and reference queues for the FIFO and buses.

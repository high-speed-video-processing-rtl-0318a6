# Pixel-parallel bit-serial Laplacian array

This design filters grey-scale video frames with one tiny processor per pixel. A 40 × 40 mesh of processors computes a discrete Laplacian of the whole frame at once:

    L(x,y) = I(x,y) - (I(x-1,y)>>2) - (I(x+1,y)>>2) - (I(x,y-1)>>2) - (I(x,y+1)>>2)

A frame takes 9 clock cycles whatever its size. Each processor uses only a 32-bit shift register, four full adders and four flip-flops, so its arithmetic is bit-serial. The array needs so little speed that it can run at about 0.31 MHz and still reach 10 000 frames per second.

The second idea is how pixels get in and out. A bus reaching 1600 scattered registers would cost a lot of routing. Instead, each pixel register is a LUT in shift-register mode (an SRL32 on a Xilinx Virtex-6). The host writes pixels as **configuration frames**, which partially reconfigures the LUT contents through the internal configuration port (ICAP). After the pass it reads the frames back to collect the results. The RTL here models that path as a frame-addressed port (`cfg_frame_port`), so the arithmetic, the sequencing and the data layout can be simulated and checked end to end.

## Files

| file | what it is |
|---|---|
| `rtl/lap_pkg.sv` | constants, frame-address struct, `pack_pixel` / `unpack_result` |
| `rtl/pixel_processor.sv` | one bit-serial processor |
| `rtl/pixel_array.sv` | the ROWS × COLS mesh |
| `rtl/lut_frame_map.sv` | which LUT entry a given configuration-frame bit sets |
| `rtl/cfg_frame_port.sv` | frame-word read/write access to the pixel registers |
| `rtl/array_ctrl.sv` | AXI4-Lite start register, pass sequencer, interrupt |
| `rtl/lap_array_top.sv` | top: controller, frame port and array |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the size sweep |
| `tb/tb_lap_array_sizes.sv`, `tb/lap_size_run.sv` | the top at several array sizes |
| `tb/lap_tb_pkg.sv` | host-side frame formatting used by the testbenches |

## How one processor works

Every processor holds its pixel in a 32-stage shift register. Stage 0 is the end that shifts out. Before a pass the register holds the pixel in stages [7:0] and zeros above. One pass is 9 ticks of the array clock. On each tick every register shifts one stage towards stage 0, and each processor evaluates one result bit, least significant bit first:

- **FA0** adds the west and north neighbour bits, and **FA1** adds the east and south ones.
- **FA2** adds the two partial sums.
- **FA3** computes centre + NOT(sum) + carry, which is a two's-complement subtraction.
- Each adder keeps its carry in its own flip-flop.
- The FA3 output shifts into stage 31 of the same register.

After 9 ticks, stages [31:23] hold the 9-bit signed result (range −252 … 255).

**The quarter pixels.** Neighbours do not read a register at its output end. They read it at stage 2, while FA3 reads the centre at stage 0. So in cycle *t* the neighbour adders see bit *t*+2 of each neighbour, which is bit *t* of that neighbour divided by four. The division is therefore a truncation of each neighbour separately, at no cost in logic. This sets the design's precision:

- The result is never below the exact Laplacian `I − ΣN/4`.
- It exceeds it by at most 3 (four fractions of 0, ¼, ½ or ¾).
- For random low bits the error follows the distribution (1 + x + x² + x³)⁴ / 256, counted in quarters.

The end-to-end testbench measures this error and checks the histogram with a chi-square test.

**The compute / not-reset net.** One global signal, `compute`, goes to every processor. While it is low, the registers hold their contents and accept configuration writes. The carries of FA0–FA2 reset to 0 and FA3's carry is set to 1 (the "+1" of the subtraction). While it is high, the registers shift on each `tick` and configuration writes are ignored.

**Borders.** A processor at the edge of the array reads 0 for a missing neighbour.

## The mesh and the controller

`pixel_array` wires every processor's stage-2 output to its four neighbours. The configuration side addresses one processor at a time by row and column, using a bit mask for the register stages to write.

`array_ctrl` is an AXI4-Lite slave with a single register:

- Any write starts a pass; the data and address bits are ignored.
- A read returns 0 and does nothing.
- During the pass it holds `compute` high and gives one `tick` every `CLK_DIV` bus clocks.
- After 9 ticks it drops `compute` and raises `irq`, which stays high until the next start. The interrupt controller therefore sees one rising edge per frame.
- A start that arrives during a pass gets an OKAY response but is dropped, and `start_dropped` pulses.

With the default `CLK_DIV = 320` and a 100 MHz bus clock, the array runs at 0.3125 MHz. A pass then takes 2880 bus cycles (28.8 µs), which leaves 71.2 µs of each 100 µs frame period for moving data. The real device would give the array its own slow clock. Here it is a clock enable in a single clock domain.

## Getting pixels in and out: the frame port

On the target FPGA, configuration memory is organised as follows:

- It is divided into **clock regions**, each 40 slices tall.
- One **frame** has 81 32-bit words and covers one slice column of one region.
  - Words 0–39 cover slice rows 0–19, two words per slice.
  - Word 40 holds clock-row and ECC bits.
  - Words 41–80 cover slice rows 20–39.
- Each slice owns 64 bits of a frame, and four consecutive frames (minor 0–3) hold all 256 LUT bits of a slice.

**Where bits land.** Within a slice's 64 bits, bits [16L+15 : 16L] belong to LUT L (A, B, C, D). `lut_frame_map` encodes the fine order:

- For bit index `b` of frame minor `m`, let `q = b[3:2]` and `row = b[1:0]`.
- Then `entry = 16·(3−q) + u`, where `u` is `15−2·row`, `14−2·row`, `7−2·row` or `6−2·row` for minor 1, 0, 2 or 3.
- For example, bit 2 of minor 3 sets entry 50 of LUT A.

**Placement.** `cfg_frame_port` assumes a fixed placement:

- Pixel (r, c) sits in slice column c, region r / 40, slice row r % 40.
- Its register is the SRL32 in LUT D.
- SRL position k is LUT entry k. Position 0 is where data enters and position 31 is the far (Q31) end, so register stage s is entry 31 − s.
- So each pixel's 32 stages are spread over bits 24–31 of the upper word of its slice pair, in all four frames.

**Write and read.** A frame-word write updates exactly the register stages that word covers. A read returns them, with 0 in the bit positions of anything not modelled (other LUTs, entries 32–63, the clock-row word).

### Using the top

`lap_array_top` has parameters `ROWS`, `COLS` (40, 40) and `CLK_DIV` (320). Its ports are:

- an AXI4-Lite slave (`s_axi_*`);
- `irq`;
- the frame port: `cfg_addr` (`frame_addr_t` = {region, column, minor}), `cfg_word`, `cfg_we`, `cfg_wdata`, `cfg_rdata` and `cfg_hit`;
- `busy` and `start_dropped`.

One frame goes like this:

1. For every pixel column and minor 0–3, write the 81 frame words. Format each pixel as `pack_pixel(p)` and place its bits as described above (`tb/lap_tb_pkg.sv` has `slice_word`).
2. Write anything to the AXI4-Lite register.
3. Wait for the rising edge of `irq`.
4. Read the frames back, rebuild each register (`regval_from_words`) and take `unpack_result`.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_pixel_processor`** runs one processor with testbench-modelled neighbours. It covers 300 random and 7 corner-case pixel sets, with random gaps between ticks. It also checks masked writes, and that the register holds and ignores writes during a pass.
- **`tb_pixel_array`** runs a 5 × 7 array with flat, checkerboard and random frames. It checks every pixel, border cases included.
- **`tb_lut_frame_map`** checks all 256 frame bits against the repeating tile of the correspondence. It checks that every LUT bit is reached exactly once, and it checks the A50 example.
- **`tb_cfg_frame_port`** uses a 45 × 3 register file, which spans two regions. It writes complete frames, checks every register, reads every word back, and checks that clock-row words, off-array addresses and non-SRL bits write nothing.
- **`tb_array_ctrl`** uses `CLK_DIV = 4`. It checks write orderings, response back-pressure, pass length and tick spacing, the timing of the `irq` edge, the read, and a dropped start.
- **`tb_lap_array_sizes`** runs the top at the other array sizes of the source's resource table (2 × 2, 4 × 4, 8 × 8, 16 × 16, 32 × 32 and 60 × 60) with `CLK_DIV = 2`, one random frame each through the full frame path. 60 × 60 spans two clock regions. It checks every pixel and the pass length.
- **`tb_lap_array_top`** runs at the default 40 × 40 / `CLK_DIV = 320` size and takes about 2 s. It puts four frames through the whole path: frames in, AXI start, `irq`, frames out. On each it checks every pixel, the pass length, the 0–3 error bound, and the chi-square test of the error distribution. It counts every mechanism (frame writes, skipped clock-row words, read-back, start, irq edge, a write ignored during a pass, a dropped start) and fails if one never happened.

To run a testbench with plain Verilator, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/lap_pkg.sv tb/lap_tb_pkg.sv tb/tb_lap_array_top.sv --top-module tb_lap_array_top
    ./obj_dir/Vtb_lap_array_top

## What follows the source architecture and what is this design's own

These parts follow the architecture this RTL implements:

- the 40 × 40 array of 8-bit pixels and the nearest-neighbour mesh;
- the four-full-adder, four-flip-flop processor with an LSB-first 32-bit shift register that takes its own result back;
- the quarter pixel by truncation, and the resulting 0–3 error and its distribution;
- the compute / not-reset global net;
- the single-register AXI4-Lite start, and the interrupt edge per frame;
- the 0.31 MHz-class array clock;
- the frame geometry (81 words, clock-row word at index 40, 40-slice regions, four frames per LUT column) and the frame-bit-to-LUT-entry correspondence.

These are this design's own choices:

- Reading the neighbours at stage 2 as the way of dropping the two bits.
- The 9-bit result and its place in stages [31:23], and the 9-cycle pass.
- The reset values of the carries.
- Zero at the borders.
- The read value 0, holding `irq` until the next start, and dropping starts during a pass.
- Modelling the slow array clock as a clock enable.
- The placement of pixel (r, c), one pixel per slice, and the choice of LUT D.
- Ignoring configuration writes during a pass.

## Limits

- The ICAP itself, the DMA engine, the DDR3 memory, the Ethernet link and the soft CPU are not part of the RTL; the frame port stands where the ICAP would connect. ICAP command packets (sync word, frame-address and data registers) are not modelled: the port takes a frame address and a word index directly.
- The mapping of SRL32 stages onto LUT entries, and which LUT of a slice holds the register, are assumptions. A real bitstream generator must use the device's actual mapping.
- Bandwidth at this design's placement (one pixel per slice) is a real limit. A full frame is 40 × 4 × 81 = 12 960 words each way. A 32-bit, 100 MHz ICAP would need about 285 µs for both directions, against a 100 µs frame period. Reaching 10 000 frames per second needs denser packing of pixels, or transferring only the frames that hold them. The RTL's compute time (28.8 µs) is not the bottleneck.
- As synthesised here, a processor has 36 flip-flop bits: the 32 register stages plus 4 carries. On the FPGA the 32 stages would be one LUT in shift-register mode, which leaves the 4 flip-flops per pixel of the source's resource count.

# 1 V LCoS backplane with charge-balanced pulse-code drive

This is a SystemVerilog model of the digital part of a liquid-crystal-on-silicon (LCoS) spatial light modulator. The backplane runs entirely from a 1 V core supply. It has a VGA array (480 × 640) of 9-transistor SRAM pixels, and around it sits the FPGA logic that feeds the array with gray-scale images.

Liquid crystal needs about 3 to 5 V to switch fully, and a 1 V pixel cannot give that. The scheme relies on two facts:

- Most of the crystal's optical response lies in a narrow, nearly linear window of cell voltage, roughly 1 V to 2.4 V.
- The voltage across the crystal is the difference between two electrodes. These are the common ITO electrode on the cover glass and the pixel's own bottom electrode.

So the ITO electrode is held at an intermediate voltage V_ITO, and each pixel switches its electrode between 0 and VDD = 1 V:

- Pixel at VDD: the crystal sees V_ITO − VDD, chosen to sit near its switching threshold.
- Pixel at 0 V: the crystal sees V_ITO, its largest drive.

The 1 V pixel swing therefore covers exactly the useful part of the response curve.

Two further mechanisms complete the design:

- **Gray scale by pulse-code modulation (PCM).** Each pixel is only ever on or off. An 8-bit gray level is first mapped through a calibration table to a 12-bit pulse code. The code is then shown as 12 binary-weighted bitplanes: bitplane *b* is loaded into the whole array and displayed for a time proportional to 2^*b*. The total time a pixel is on is therefore proportional to its code.
- **DC balance by an inverted sub-frame.** Liquid crystal degrades under a DC field, so every frame is shown twice. The second sub-frame repeats all 12 bitplanes with every bit inverted, while the ITO electrode moves from +V_ITO to −(V_ITO − VDD). The crystal sees the same |V| with the opposite sign, so its average field is zero. Field inversion must stay between about 50 Hz and 10 kHz. Below that range, ions migrate; above it, the crystal cannot follow. At the default sizes the polarity flips every 5.53 ms.

## Structure

```
                  FPGA side                                     backplane chip (slm_chip)
 pixels ──► pcm_encoder ──► frame_buffer ──► display_bridge ──► slm_controller ──► row_driver ──► word lines
 (8-bit)    └ gray_lut      12 banks x         │  clk,rstn,         │  addr gen,        col_decoder ─► column_mux ─► bit lines
 table wr ──┘               9600 x 32 bit      │  start,re,data     │  data buffers                                  │
                                               │                    └─ Hold ──► hold_driver ──► hold lines ─► pixel_array (480 x pixel_cell rows)
                                               └─► ito_toggle (to the ITO DAC)                                        └─► vp: 307,200 electrodes
```

| module | role |
|---|---|
| `slm_system` | Top. The FPGA-side logic and the chip share one clock. |
| `slm_chip` | The backplane: controller, row driver, column decoder, column mux, pixel array, hold driver. |
| `slm_controller` | Internal address generator, one-word input and output buffers, and the global Hold. |
| `row_driver`, `col_decoder` | Decode the row address and the column-group address. |
| `column_mux` | 20-to-1 mux between the 32 data pins and the 640 bit lines. |
| `pixel_array`, `pixel_cell` | The 9T SRAM pixels. `pixel_cell` models one word line's worth of cells. |
| `hold_driver` | Daisy-chained Hold buffers that stagger the rows. |
| `frame_buffer` | One block RAM per bitplane, with an output mux. |
| `gray_lut` | Calibration table from gray level to 12-bit pulse code. |
| `pcm_encoder` | Maps pixels through the table and packs the codes into bitplane words. |
| `display_bridge` | PCM sequencer: loads, display timing, the inverted sub-frame, ITO polarity and read-back. |
| `slm_pkg` | Default sizes and the controller's operation enum. |

## The chip and its pins

The chip has no address pins. This keeps the pad count low. A `start` pulse begins an operation on the whole array, and an internal generator walks all 480 × 20 = 9600 word addresses, one per clock. The order is row by row, and within a row the 20 column groups in turn. `re`, sampled with `start`, selects a read (1) or a write (0).

Timing, with `start` sampled at rising edge E0:

- **Write.** Word *k* must be on `data_i` before edge E0+1+*k*. It is written into the array at edge E0+2+*k*.
- **Hold.** Hold is low during loading, which puts every electrode at 0 V. It rises at edge E0+1+9600, the edge that writes the last word. From then on every pixel drives its stored bit. Hold stays high until the next `start`.
- **Read.** Word *k* is on `data_o`, with `data_oe` high, from edge E0+2+*k*. A read also drops Hold.
- **Busy.** A `start` while an operation is running is ignored.

**Column mux.** Data pin *i* reaches columns *i*, 32+*i*, 64+*i*, and so on. Word *s* of a row therefore carries the contiguous columns 32*s* … 32*s*+31, and bit *i* of the word is column 32*s*+*i*. The encoder packs pixels the same way.

**Hold daisy chain.** If all 307,200 electrodes switched at once, the supply would see a current spike of hundreds of milliamps. The Hold is therefore passed along a chain of buffers across the rows, which spreads each edge over about 50 ns. In this model each chain stage is one register:

- The rows are split into `HOLD_STG` = 5 equal groups.
- Group *g* follows the global Hold *g*+1 cycles late.
- At 100 MHz the first and last rows switch 40 ns apart, and the whole array within 50 ns.

Both edges are delayed by the same amount, so every row displays for exactly the same number of cycles.

**Pixel cell.** A pixel is a 6T SRAM bit plus an electrode driver. The driver grounds the electrode while Hold is low and passes the stored bit while Hold is high. In the silicon a pull-up transistor is shared by four cells. That saves area and has no logic effect. The model writes on the clock edge at which the word line and the column's bit-line enable are high; the clock stands in for the SRAM write pulse. The cell has no reset, as with real SRAM.

## A frame, cycle by cycle

For each sub-frame *s* (0, then 1) and each bitplane *b* = 0 … 11, `display_bridge` does the following:

1. Raises `chip_start` for one cycle.
2. Streams the 9600 words of bank *b* of the frame buffer. In sub-frame 1 every word is inverted.
3. Waits `T_UNIT << b` cycles. During this wait the chip's Hold is high for exactly that many cycles.

`ito_toggle` equals *s*. It changes at the first load of a sub-frame, and the external DAC uses it to choose +V_ITO or −(V_ITO − VDD).

A frame therefore takes

    2 × (12 × (9600 + 1) + 4095 × T_UNIT) cycles = 1,106,754 cycles with T_UNIT = 107.

At 100 MHz that is 11.07 ms, which meets 90 frames/s (11.11 ms). `T_UNIT` = 107 is the largest display unit that fits this budget. A pixel with code *c* has its electrode high for *c* × T_UNIT cycles in the first sub-frame and (4095 − *c*) × T_UNIT cycles in the second. Bitplanes are sent LSB first.

Note that loading takes about 21% of each frame, and the electrodes are at 0 V (largest drive) throughout loading. That loading time acts as a fixed offset in the light response. This is one reason the code-to-intensity curve is not linear and needs the calibration table.

Host-side behaviour of the bridge:

- **`run`.** While `run` is high, frames follow one another. When `run` falls, the current frame is finished and the bridge idles. The chip then keeps displaying its last bitplane.
- **`rb_req`.** Issued while idle, `rb_req` reads the array back: 9600 words on `rb_valid`/`rb_data`, then `rb_done`.

## Calibration table and encoder

The optical response to the pulse code is not linear, for three reasons: the crystal's response time, the fixed loading time of each bitplane, and the rms relation between pulse width and intensity. `gray_lut` therefore holds, for each of the 256 gray levels, the 12-bit code that gives the intended intensity. Codes below about 1024 give too little on-time to change the light.

The real table comes from measuring a panel and is written through the `lut_*` port. After reset the table holds a straight line:

    code(g) = 1024 + g × 3071 / 255        (integer division; 0 → 1024, 255 → 4095)

`pcm_encoder` works as follows:

1. It takes pixels in raster order on a valid/ready stream. `pix_first` restarts the frame.
2. It looks up each pixel's code.
3. It gathers 32 pixels, then writes their 12 bitplane words to banks 0 … 11 at word address `row*20 + s`, one word per cycle.

With 32-bit words, `pix_ready` never drops. It drops only when the word is narrower than the number of bitplanes, as in the small test configuration.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `ROWS` × `COLS` | 480 × 640 | VGA array of the source design |
| `IO_W` | 32 | data pins of the source design |
| `MUX` | 20 | 20-to-1 column mux, so 9600 cycles per load |
| `N_BP` | 12 | 12 bitplanes / 12-bit pulse code |
| `GRAY_W` | 8 | 8-bit gray scale |
| `HOLD_STG` | 5 | own choice: 50 ns spread at a 10 ns clock |
| `T_UNIT` | 107 | own choice: fills a 90 frames/s frame at 100 MHz |
| `CODE_MIN` (`gray_lut`) | 1024 | lowest useful code in the source design |

`ROWS`, `MUX`, `IO_W` and `HOLD_STG` must each be at least 2, because address and chain widths are derived from them.

## Where this model departs from or goes beyond the source

- **Hold polarity.** At transistor level the cell's Hold is active low for display: Hold = VDD grounds the electrode. At array level the Hold is described as going high after loading. The model uses the array-level polarity throughout (`hold` = 1 means display).
- **`re` pin.** The source chip's pins are `clk`, `rstn`, `start` and a 32-bit data bus. How read and write mode are chosen is not described, so the `re` pin is an addition here. The bidirectional data pad is split into `data_i`, `data_o` and `data_oe`.
- **Own choices.** The following are not specified by the source and were chosen here:
  - the word order of the address generator
  - the pin-to-column assignment
  - the one-cycle data buffers
  - the register-per-stage hold chain
  - the LSB-first bitplane order
  - the display unit
  - dropping Hold during a read
- **FPGA-side logic.** The frame buffer layout (one bank per bitplane), the encoder and its stream interface are this design's own construction. The source test system only shows a soft processor writing block RAMs and a "display bridge" reading them.
- **ITO voltage.** The ITO voltage comes from an off-the-shelf DAC over SPI. Only its polarity (`ito_toggle`) is produced here, not the DAC's serial protocol.
- **Read-back speed.** Read-back runs at the same clock as writing. The silicon was verified reading at 50 MHz.

## Not modelled

The following have no logic function here:

- The analog and physical side of the pixel: transistor sizes, the shared pull-up, noise margins, layout and fill factor.
- Supply current and power.
- The liquid crystal, the cover glass and the optics.
- The DAC and the soft processor. The top's pixel and table ports stand in for the processor.

The `vp` outputs show every electrode level, and `hold_line` shows every row's Hold, so that a panel model or checker can be attached.

## Simulating

Each module's file is named after it. Compile the package first and let Verilator find the rest:

    verilator --binary --timing --assert -Irtl -y rtl rtl/slm_pkg.sv tb/tb_slm_system.sv --top-module tb_slm_system
    ./obj_dir/Vtb_slm_system

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog. Assertions in the RTL check three rules, so build with `--assert`:

- at most one word line is high at a time
- the array is never accessed while Hold is high
- the bridge never issues two start pulses in a row

| testbench | what it checks |
|---|---|
| `tb_pixel_cell`, `tb_pixel_array` | Writes with word and bit lines, read-back, electrodes gated by Hold. |
| `tb_row_driver`, `tb_col_decoder`, `tb_column_mux` | Exhaustive or random decode, and the pin-to-column mapping. |
| `tb_hold_driver` | Per-row delay of both edges over 480 rows; 5-cycle spread. |
| `tb_slm_controller` | Exact write, Hold and read cycle numbers; start ignored while busy. |
| `tb_slm_chip` | 48 × 640 chip: load, electrodes, read-back, return to ground. |
| `tb_frame_buffer`, `tb_gray_lut`, `tb_pcm_encoder` | Memory timing, the table's reset line and writes, bitplane packing with stalls. |
| `tb_display_bridge` | Load order, inverted words, ITO polarity, display spacing `WORDS + 1 + T_UNIT << b`, read-back. |
| `tb_slm_system` | 4 × 16 array, end to end (details below). |
| `tb_code_sweep` | Pulse-code sweep: the table maps gray *g* to 1024 + 12*g*, and each pixel's on-time must equal its code. |
| `tb_slm_full` | The whole system at its default size, one frame (details below). |

`tb_slm_system` counts, for every pixel, how many cycles its electrode is high in each sub-frame. It must be *c* × T_UNIT in the first and (4095 − *c*) × T_UNIT in the second. The test also checks read-back and counts each mechanism: table writes, encoder stalls, the inverted sub-frame, staggered hold lines, frames and read-back.

`tb_slm_full` runs the whole system at its default size for one frame:

- 307,200 pixels through the default table
- all 307,200 electrodes checked in each of the 24 displays
- display times checked
- a frame length of exactly 1,106,754 cycles
- the full read-back

Verilator needs about six minutes to build the full-size model (the 480 × 640 array). The run itself takes under a minute.

# PICNIC camera controller

This is a controller for a Rockwell PICNIC near-infrared detector used as the fringe camera of a long-baseline optical interferometer. It is written as synthesizable SystemVerilog for a CPLD/FPGA. The detector is a 256 × 256 HgCdTe array in four 128 × 128 quadrants. You can read any pixel without destroying its charge, so a pixel can be sampled again and again as it discharges under light. The controller takes all the detector timing away from the host computer. It clocks the array, starts the ADC, does the arithmetic and leaves finished data in an SRAM that the host shares over PCI. Hardware timing keeps the integration time per sample steady. That steadiness is the reason for the design.

The controller has two readout circuits. On the original hardware the host loads one or the other into the programmable device. Here both are present, and the `mode_scan` input selects the one that drives the pins.

| mode | circuit | used for |
|---|---|---|
| `mode_scan = 0` | quadrant readout (`quad_readout`) | Full-quadrant or sub-quadrant images for aligning the star images. Uses correlated double sampling (CDS). |
| `mode_scan = 1` | interferogram or "scan" readout (`scan_readout`) | Reading a handful of pixels very fast and very often while the optical delay is swept. The readout sequence is microcoded. |

## Detector and ADC signals

Both circuits drive the same five detector lines and the same ADC handshake:

* `det_fsync` returns the detector's line register to line 0. `det_lsync` returns its pixel register to pixel 0.
* `det_line` and `det_pixel` are **double-edged** clocks. Every change of level, rising or falling, moves the selected line or pixel by one. A circuit never "pulses" a clock. It toggles it once per step.
* `det_reset` resets the selected line. The PICNIC resets a whole line at a time, and the controller drives RESET only together with LSYNC.
* `adc_soc` is a one-cycle start-of-conversion pulse. The controller then waits for a **rising edge** of `adc_eoc` (active high at this interface) and takes `adc_data` (16 bits).

Every interval is a count of cycles of the 33 MHz PCI clock: the step time Tstep, the settling delay Tdel between a clock change and the sample, and the integration delay Tintdel. The host programs these counts. One presettable down-counter (`prog_timer`) times all of them. Its `done` is seen exactly `count` cycles after `start`.

## Quadrant readout: correlated double sampling in place

A quadrant image is the difference of two frames taken Tintdel apart. The subtraction happens in the SRAM itself, so no frame buffer is needed inside the controller:

1. **Reset frame.** For every line of the window, LSYNC is pulsed with RESET. Each pixel of that line is then converted, and its reset level is written to SRAM at `base + line·NW + pixel`.
2. **Integration.** The controller waits Tintdel.
3. **Image frame.** The same window is clocked again without reset. While each pixel is being converted, the stored reset level is read back into the *subtraction register*. The ALU forms `reset − image`, and the result overwrites the same SRAM word. Light lowers the pixel voltage, so the stored number grows with the light collected.
4. The SRAM bus is released and INTA is raised. INTA stays high until the host writes CTRL bit 1 or starts a new readout.

Five small state machines divide the work. Each one does a single job. They hand work to each other through short start and done signals, the "semaphores":

| module | job |
|---|---|
| `quad_sram_fsm` | Polls the start bit and requests the SRAM bus (held for the whole readout). Owns the reset/image toggle flip-flop, reloads the address counter, starts each frame, times Tintdel, and releases the bus and raises INTA at the end. |
| `quad_line_fsm` | Sends FSYNC (one Tstep). Steps Ny lines down to the window, one Tstep each. For each of NH lines it starts the pixel machine and then steps one line. Drives RESET = reset-frame AND LSYNC. |
| `quad_pixel_fsm` | Sends LSYNC (one Tstep) and steps Nx pixels. For each of NW pixels it waits Tdel, raises `sample_req` until the ADC machine is done, then toggles PIXEL and waits Tstep. |
| `quad_adc_fsm` | Sends SOC. In the image frame it also starts the SRAM read. It waits for EOC, writes one word (raw or difference), and advances the address. |
| `quad_sram_rd_fsm` | Enables the SRAM outputs for `ACCESS_CYC` cycles during the conversion and loads the subtraction register. |

`cds_subtract` holds the subtraction register and the ALU. `quad_addr_counter` gives the address: it is loaded with the base at the start of each frame and advanced once per pixel. `quad_regs` is the register file.

**Timing.** Along a line, consecutive conversions are `Tstep + Tdel + conversion time + 5 cycles` apart. The 5 cycles are the SOC/EOC handshake and the SRAM write. With the test ADC model, whose EOC rises `CONV_CYC + 1` cycles after SOC, the spacing is `Tstep + Tdel + CONV_CYC + 6`, and the testbench checks this exact value. With the reset values (Tstep 1 µs, Tdel 4 µs) and a 10 µs converter, one frame of 128 × 128 pixels takes about 0.25 s.

**Registers** (word addresses on the host port, `mode_scan = 0`):

| addr | name | bits | reset | meaning |
|---|---|---|---|---|
| 0 | CTRL | w: 0 start, 1 clear INTA; r: 0 start, 1 busy, 2 INTA | 0 | |
| 1 | TSTEP | 15:0 | 33 | step time, cycles (1 µs) |
| 2 | TDEL | 15:0 | 132 | clock-to-sample settling, cycles (4 µs) |
| 3 | TINTDEL | 23:0 | 99000 | reset frame to image frame, cycles (3 ms) |
| 4 / 5 | NX / NY | 7:0 | 0 | window corner (pixel, line) |
| 6 / 7 | NW / NH | 8:0 | 128 | window size |
| 8 | ABASE | 17:0 | 0 | SRAM address of the window's first pixel (writing it also loads the counter) |

## Interferogram (scan) readout: a microcoded clock sequencer

During an observation, six outputs of the beam combiner are focused on six pixels. Those pixels must be read as often as possible while a piezo sweeps the path difference, which traces the fringes over time. A scan begins with an array reset. After that the pixels are only sampled, never reset, as they discharge. Consecutive samples are later differenced (Fowler sampling). Noise falls as the square root of the number of reads. So each visit to a pixel reads it **Nreads** times, the group of pixels is visited **Nloops** times, and everything is summed into one data point per pixel.

Which pixels are read, and in what order, comes from a small program in `ucode_ram`. Each word is 12 bits: `{opcode[3:0], n[7:0]}`.

| word | mnemonic | action |
|---|---|---|
| `0nn` | line n | LINE changes level n times (n lines down) |
| `1nn` | pixel n | PIXEL changes level n times, then the pixel reached is read Nreads times |
| `2nn` | fsync+line n | FSYNC (line register to 0), then line n |
| `3nn` | lsync+pixel n | LSYNC (pixel register to 0), then pixel n and read |
| `4nn` | jump n | end of one pass; continue at address n |

For example, `203 302 103 004 302 103 400` reads pixels (line, pixel) (3,2), (3,5), (7,2) and (7,5), then starts again. `pixel 0` reads the same pixel again without moving.

`scan_sequencer` runs the program. It starts with the reset sweep: FSYNC, then LSYNC+RESET and one LINE step for each of the 128 lines. It then executes from address 0. Every sync pulse and every clock change lasts Tstep = Nbase cycles. Fetching an instruction takes 2 cycles. Each read is handed to `scan_adc_fsm` together with the index of the pixel register, which counts reads from the start of the pass. For each of the Nreads reads, `scan_adc_fsm` waits Tdel = Ndel cycles, converts, and adds the word to the 32-bit pixel register. With the test ADC model, consecutive reads of a pixel are `Ndel + CONV_CYC + 2` cycles apart. Every jump ends a pass. After Nloops passes the data point is complete, and after Nsmpl data points the scan stops.

At the end of each data point, `scan_sram_wr` copies the pixel registers into holding registers. This lets the next data point begin at once. It then requests the bus and writes the first Npix sums to SRAM as two 16-bit words each, low half first, at `(sample·Npix + pixel)·2`. Finally it releases the bus and pulses INTA for 33 cycles (1 µs). The host uses INTA both to mark the end of a data point and to step the piezo scanner. If a data point completes while the previous one is still waiting for the bus, it is dropped and `scan_overrun` is set until the next scan.

**Timing.** Suppose the program selects the line once and then loops over the pixels (`jump 1` back to an `lsync+pixel`). One data point then takes

    Nloops × ( Tstep·(1 + Nx + (Npix−1)·Nskip) + Nreads·Npix·(Tdel + conversion) ) + small fetch overhead

Here Nx is the first pixel's column and Nskip the spacing. This is the published integration-time relation for this camera. For such a program the controller adds exactly `101 + 2·Npix·Nreads` cycles per pass on top of the formula: instruction fetches, decode and handshakes, with the conversion time taken as the 10 µs the converter needs. The time per data point is the same to the cycle for every data point of a scan, which is the point of clocking from hardware.

`tb_scan_timing` measures this at Nbase 85, Ndel 506, a 10 µs conversion and six pixels 7 apart:

| Nloops \ Nreads | 1 | 2 | 3 | 4 |
|---|---|---|---|---|
| 1 | 335.7 µs (340) | 488.1 (510) | 640.5 (670) | 792.8 (830) |
| 2 | 671.5 (660) | 976.2 (990) | 1280.9 (1320) | 1585.6 (1640) |
| 3 | 1007.2 (980) | 1464.3 (1470) | 1921.4 (1960) | 2378.5 (2450) |
| 4 | 1342.9 (1300) | 1952.4 (1950) | 2561.8 (2610) | 3171.3 (3270) |

The published values for the camera are in brackets. They are said to match measurement within 6 %, and every entry here is within 4 % of them. At the two gain-measurement settings the camera is reported at 310 µs and 130 µs per data point, with Nloops 1, Nreads 1 and (Tstep, Tdel) = (2.5 µs, 15 µs) and (1 µs, 4 µs). This design takes 329.5 µs and 157.4 µs with the pixel positions above. The positions used for those measurements are not known, and for the fast setting the formula itself already gives 154 µs with a 10 µs conversion.

**Registers** (`mode_scan = 1`):

| addr | name | bits | reset | meaning |
|---|---|---|---|---|
| 0 | CTRL | w: 0 start; r: 0 start, 1 busy, 2 INTA | 0 | |
| 1 | NBASE | 7:0 | 85 | Tstep in cycles (33–255) |
| 2 | NDEL | 8:0 | 506 | Tdel in cycles (85–511) |
| 3 | NLOOPS | 2:0 | 4 | 1–7 (0 is taken as 1) |
| 4 | NREADS | 4:0 | 4 | 1–16 (clamped) |
| 5 | NSMPL | 15:0 | 256 | data points per scan |
| 6 | NPIX | 2:0 | 6 | pixel registers stored per data point (1–6) |
| 7 | UADDR | 7:0 | 0 | microcode write pointer |
| 8 | UDATA | 11:0 | – | writes one microcode word at the pointer and advances it |

## Files

`rtl/` holds one module per file. `picnic_pkg.sv` has the widths, the opcode enum, the `ucode_t` struct and both register maps.

```
picnic_camera_top
├── quad_readout      quad_regs, quad_sram_fsm, quad_line_fsm, quad_pixel_fsm,
│                     quad_adc_fsm, quad_sram_rd_fsm, cds_subtract, quad_addr_counter
└── scan_readout      scan_regs, ucode_ram, scan_sequencer, scan_adc_fsm, scan_sram_wr
prog_timer is used inside the state machines.
```

The top's ports are plain signals:

* a register port (`reg_wr`, `reg_addr`, `reg_wdata`, combinational `reg_rdata`), standing for the local side of the PCI bridge;
* `bus_req`/`bus_gnt`;
* an SRAM port with separate read and write data, asynchronous read and a write on the clock edge;
* the detector lines;
* the ADC handshake;
* `inta` and `scan_overrun`.

## Simulation

The testbenches in `tb/` check themselves and end with a line `TB_RESULT checks=N failures=M`. They use behavioural models:

* `picnic_model` tracks the selected line and pixel from the clocks and lets each pixel discharge linearly from its last line reset.
* `adc_model` samples at SOC and raises EOC a fixed number of cycles later.
* `sram_model` is a 128K × 16 SRAM model.

| testbench | what it covers |
|---|---|
| `tb_picnic_camera_top` | Both modes through the top at the default parameters. A full 128 × 128 quadrant is checked word by word. A 256-sample scan uses Nloops 4, Nreads 4 and six pixels. These are followed by a sub-quadrant with a slow bus grant and the four-pixel example program. It counts each mechanism (reset and image frame, window offset, bus wait, INTA clear, mode switch, array reset, loops, multiple reads, jumps, transfers) and fails on any that never happened. About 20 s. |
| `tb_quad_readout` | Raster order, line resets only in the reset frame, CDS words, untouched SRAM outside the window, exact pixel spacing, Tintdel, bus release before INTA. |
| `tb_scan_readout` | Reset sweep, visited positions, read spacing, one FSYNC per pass, one INTA per data point, SRAM sums, overrun. |
| `tb_scan_timing` | The scan circuit at its defaults: the integration-time grid above (3 data points each), the two gain-measurement settings with 128 data points, and 128-point scans with 1, 2, 4, 8 and 16 reads. Checks the cycle-exact time per data point, that it does not vary, and every stored sum. About 15 s. |
| `tb_prog_timer`, `tb_quad_regs`, `tb_scan_regs`, `tb_ucode_ram`, `tb_cds_subtract`, `tb_quad_addr_counter` | Unit tests of the leaf blocks. |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/picnic_pkg.sv \
          tb/tb_picnic_camera_top.sv --top-module tb_picnic_camera_top -Mdir obj
./obj/Vtb_picnic_camera_top
```

The simulator has only two states, so every register has a reset and the models initialise their memories.

## How far this follows the source description

The following are taken from the published description of the camera:

* the block structure of the quadrant circuit: five state machines, control register, address decoder, subtraction register, ALU and address counter;
* the 16-bit data and 18-bit address buses and the 128K × 16 SRAM;
* the CDS sequence, RESET issued with LSYNC in the reset frame, and the read-back of the reset value during the conversion;
* the microcode opcodes and the example program;
* the meaning of Nbase, Ndel, Nloops, Nreads, Nsmpl and Npix, with their typical values and ranges;
* the transfer of the pixel registers in parallel with the next data point, and INTA per data point.

The following are choices made here, because the description does not fix them:

* the register maps and widths, the host port, and the bus request/grant handshake;
* the sub-quadrant size registers NW/NH and the SRAM base register;
* that `pixel` instructions end with a read and `line` instructions do not;
* how the scan-mode array reset is clocked (a sweep over 128 lines);
* the 256-word microcode RAM;
* 32-bit pixel sums stored as two words, and the SRAM layout of a scan;
* the length of the INTA pulse in scan mode, and how INTA is cleared in quadrant mode;
* the 2-cycle SRAM read access, the edge-detected active-high EOC, and the overrun flag;
* the settling delay defaults. Two typical values are quoted for it: 4 µs and 506 cycles (15 µs). The quadrant circuit uses 4 µs and the scan circuit 506 cycles.

The scan circuit stores raw sums. Differencing consecutive samples is left to the host. The division of the scan circuit into sequencer, ADC machine and SRAM writer is this design's own. Holding both circuits in one device behind a select input stands in for reloading the device.

Not included are the PCI bridge, the SRAM chip, the ADC, the detector and the analog electronics (clock drivers, bias and amplifier cards). These are outside the programmable logic. The testbenches stand in for them with the models above.

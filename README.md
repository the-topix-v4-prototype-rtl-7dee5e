# ToPiX v4 readout logic: a triggerless pixel readout in SystemVerilog

ToPiX is a readout chip for hybrid silicon pixel sensors. It runs with no trigger: every
particle that crosses a pixel is reported, with the pixel's address, its arrival time and
the charge it deposited. The charge is measured as **time over threshold (ToT)**. A
preamplifier with a constant-current discharge turns the charge into a comparator pulse.
The pulse's length grows linearly with the charge. A 12-bit time stamp, counting a
160 MHz clock (6.25 ns per count), runs on a bus past every pixel. The pixel stores the
stamp at the comparator's rising edge, which gives the arrival time. It stores the stamp
again at the falling edge. The difference of the two stamps is the ToT.

This RTL is the digital part of the v4 prototype:

- 640 pixels in four double columns of 2×32, 2×128, 2×128 and 2×32 pixels;
- one column controller and one 32-word FIFO per double column;
- a chip control unit (CCU). The CCU generates the time stamp, takes configuration
  commands on a serial port, and sends hits out on one 320 Mb/s serial link.

The analog front end is not in the RTL: the preamplifier, the comparator and the per-pixel
threshold DAC. The RTL gets each comparator output as a digital input. It gives each
pixel's configuration word out for the DAC.

## Data path of one hit

```
comp[i] ─► pixel_cell ──busy chain──► column_controller ──► column_fifo ──► ccu ──► serializer ─► ser_out[1:0]
              ▲   le/te/addr buses ─────────┘                  (32 words)   round robin   40-bit frames
              └──────────── time stamp bus (Gray code) ◄─── timestamp_gen (in ccu)
```

1. **Pixel** (`pixel_cell`). The comparator output is ANDed with "not masked".
   - At the first clock edge after the comparator rises, the pixel stores the time stamp
     bus in `le_reg`.
   - At the first clock edge after it falls, it stores the bus in `te_reg` and raises
     `busy`.
   - A busy pixel ignores further pulses until it has been read out.
2. **Busy chain and priority** (`double_column`). Each column of a double column has its
   own fast-OR chain.
   - The top pixel's chain input is tied low. The chain runs down to row 0, whose output
     is the column's `busy`.
   - A pixel that is busy while its `busy_in` is low wins: it is the highest busy row of
     its column.
   - While the controller holds `rd` for that column, the winning pixel drives the
     shared buses: its address `{side,row}` on the address bus, and its two stamps on the
     data bus.
   - The chip's shared wires are modelled as an OR of gated outputs. An assertion checks
     that only one pixel drives at a time.
3. **Column controller** (`column_controller`).
   - A read starts when a column is busy and the FIFO has room. The left column goes
     first.
   - The read holds `rd` for `READ_CYCLES` cycles (default 2). It then pulses `rd_ack`,
     which clears the pixel, and writes one 32-bit hit word into the FIFO.
   - The hit word is `{addr[7:0], le[11:0], te[11:0]}`. The stamps are turned from Gray
     code into binary here.
   - One idle cycle lets the busy chain settle. So a column delivers one hit every
     3 cycles.
   - **Stall:** while the FIFO is full, no read starts, and hit pixels wait in the matrix.
4. **CCU** (`ccu`). The CCU serves the four FIFOs round robin, one hit per frame. The
   serializer sends a continuous stream of 40-bit frames, two bits per clock cycle
   (320 Mb/s at 160 MHz). When nothing is waiting, it sends an idle frame.

### Output frames (40 bits, most significant bit first, `ser_out[1]` first)

| header `[39:36]` | payload `[35:0]` |
|---|---|
| `1010` data | `col[1:0]`, `addr[7:0]`, `le[11:0]`, `te[11:0]`, `00` |
| `1100` config read-back | `col[1:0]`, `addr[7:0]`, `0x000`, `cfg[11:0]`, `00` |
| `0101` idle | all zero |

A frame starts every 20 clock cycles, counted from reset. The time stamps in data frames
are binary and wrap modulo 4096. The ToT is `(te - le) mod 4096` counts of 6.25 ns.
Pixel `addr` is `{side, row[6:0]}`: side 0 is the left column of the double column. The
global pixel number is `col_base(col) + side*rows + row`, with `rows` = 32, 128, 128, 32.
Both functions are in `topix_pkg`.

## Time stamp distribution

The time stamp bus is long and slow: it runs the full height of the column, past up to
256 pixels. So it carries the count in **Gray code** (`timestamp_gen`), where only one line
changes per step. A pixel that latches the bus in the middle of a change is then off by
at most one count. The count restarts at 0 when data taking starts, and wraps every
25.6 µs. In the configuration phase the CCU puts configuration data on the same bus.

## Configuration

Each pixel has a 12-bit configuration register:

| bits | use |
|---|---|
| 0 | mask |
| 1 | test-pulse enable |
| 11:2 | threshold fine-tuning code for the pixel DAC |

It is not written from the bus directly. The addressed pixel first stores the bus in its
`te_reg` (`cfg_wr`), then copies `te_reg` into the configuration register (`cfg_load`).
This keeps the load on the time stamp bus low.

Commands come in on `si_en`/`si_data`. They are sampled on the chip clock, 32 bits,
most significant bit first, while `si_en` is high. A frame of any other length is dropped
and counted on `cmd_err`. The fields are `op[31:30] col[29:28] addr[27:20] spare[19:12]
data[11:0]`:

| op | meaning |
|---|---|
| `00` | mode: `data[0]`=1 starts data taking, 0 returns to configuration |
| `01` | write `data` into pixel (`col`,`addr`); accepted only during configuration |
| `10` | read back pixel (`col`,`addr`); the word comes out as a `1100` frame |

A command that arrives while a configuration access is still in progress is dropped.
Commands are 33 cycles long and an access takes at most 3 cycles, so this does not
happen with back-to-back commands.

## Radiation hardening

- **Pixel configuration registers** (`seu_cfg_reg`). Double columns 0 and 1 (pixels
  0–319) use triple modular redundancy: three copies and a bitwise majority vote. Double
  columns 2 and 3 (pixels 320–639) use a Hamming(17,12) code with single-error
  correction. In both schemes the register writes back its corrected value on every
  clock edge, so a single upset is repaired within one cycle and cannot pair up with a
  later one.
- **Column controller state register.** Its five states are encoded at a Hamming
  distance of at least 3 from each other. A state word with one flipped bit is read as
  its state; any other invalid word returns to idle.

## Where this RTL departs from the chip, or chooses for itself

The following come from the chip: the architecture, the sizes, the 12-bit stamps, the
Gray-coded bus, the 32-word FIFOs, the configuration path through `te_reg`, the TMR and
Hamming split, and the 320 Mb/s single output link. These are this design's own choices:

- **Clocked pixels.** The chip's pixel logic is asynchronous, so no clock runs through
  the matrix. Here the pixel logic runs on the 160 MHz clock, and an edge is seen at
  the next clock edge. The stamps land in the same 6.25 ns bins, but the area and
  power are not those of the chip.
- **Not specified by the chip, chosen here:**
  - the pixel address width;
  - the read handshake and `READ_CYCLES`;
  - the order of the two columns of a double column;
  - the FIFO word layout and its first-word-fall-through read;
  - the CCU's round-robin order;
  - the frame format and the idle frames;
  - the serial command protocol;
  - the configuration bit layout;
  - the Hamming code and the scrubbing;
  - the time stamp restarting at 0 when data taking starts.
- **Modelled as plain digital signals:**
  - the sense amplifiers on the column buses;
  - the reduced-swing differential, pre-emphasised bus drivers;
  - the SLVS pads.

  `ser_out` gives two bits per cycle for a double-data-rate output driver.
- **Not modelled.** The folding of the 2×128 columns into 2×32 strips in the layout
  changes wire lengths only, and is not modelled. Neither are bus timing faults.
- **Not built.** The full-size chip has 110×116 pixels, 55 double columns and two
  links. Only the prototype configuration is built. `NCOL`, `col_rows()` and
  `col_base()` in `topix_pkg` define the column layout.

## Rates

The chip is specified for 6.1×10⁶ hits/cm²/s. On the 0.064 cm² prototype that is
3.9×10⁵ hits/s. The output link carries 8×10⁶ frames/s (40 bits at 320 Mb/s). A long
double column (0.0256 cm²) sees 1.6×10⁵ hits/s, and its controller can read
5.3×10⁷ hits/s.

## Files

| file | contents |
|---|---|
| `rtl/topix_pkg.sv` | sizes, hit and frame types, commands, Gray and Hamming functions, column layout |
| `rtl/seu_cfg_reg.sv` | TMR or Hamming protected register |
| `rtl/pixel_cell.sv` | pixel control unit, le/te/cfg registers, busy chain link |
| `rtl/double_column.sv` | 2×ROWS pixels, two busy chains, shared buses |
| `rtl/column_controller.sv` | readout and configuration sequencer of a double column |
| `rtl/column_fifo.sv` | 32-word FIFO |
| `rtl/timestamp_gen.sv` | 12-bit counter with Gray output |
| `rtl/config_interface.sv` | serial command receiver |
| `rtl/serializer.sv` | 40-bit frame serializer, 2 bits per clock |
| `rtl/ccu.sv` | chip control unit |
| `rtl/topix_v4_top.sv` | the 640-pixel prototype |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_topix_hit_rate.sv` | full design at the maximum specified hit rate |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_topix_v4_top \
  -y rtl +libext+.sv -Irtl rtl/topix_pkg.sv tb/tb_topix_v4_top.sv
./obj_dir/Vtb_topix_v4_top
```

`tb_topix_v4_top` runs the full 640-pixel design at its default sizes, end to end:

1. It writes and reads back configuration words, some of them with the mask bit set.
2. It flips a stored bit in a TMR-protected and in a Hamming-protected register.
3. It starts data taking.
4. It sends a spread-out burst of hits.
5. It sends 200 simultaneous hits into one long double column. This overfills its FIFO
   and stalls the controller, and the pulses straddle the time stamp wrap.
6. It reads back a configuration word during data taking.

The testbench decodes the serial stream. It checks every hit's column, address and both
stamps against stamps it works out itself, and counts each of these mechanisms. It runs
in well under a second.

`tb_topix_hit_rate` loads the full design at the chip's specified maximum rate of
6.1×10⁶ hits/cm²/s: random pixels, pulses of 42–416 cycles, 200 000 cycles long (about
500 hits). Every hit must come out with the right stamps, and no FIFO may fill.

The unit testbenches drive each module alone. They use models of the modules' neighbours
where needed, and reduced sizes where that helps (`tb_double_column` uses 2×8 pixels).

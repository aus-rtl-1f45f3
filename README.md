# μAUS: an A-mode ultrasound subsystem in one FPGA

An A-mode ("amplitude mode") ultrasound scan fires one pulse into the body and records
the echo as a single line of samples: the amplitude of the reflection against depth.
In ophthalmology such a line measures the eye. Each tissue boundary (cornea, lens,
retina, sclera) gives a spike, and the distance between two spikes gives a length.

This RTL does the digital part of such an instrument. Once per video frame it:

1. triggers the ultrasound backend;
2. takes the 2048 samples that come back at 50 MHz;
3. turns the RF signal into its envelope (rectifier followed by a 23-tap low-pass filter);
4. sends the result two ways at once:
   - over a USB module to a PC, when the PC has asked for data;
   - to a 1024 × 768, 60 Hz VGA monitor, when a switch enables it. The monitor draws
     the trace, two movable cursors and the cursor distance in samples.

The whole design is synchronous SystemVerilog with two clocks, 50 MHz and 65 MHz. It
also contains a simulated backend, which produces a synthetic eye echo, so the system
works without an analog front end.

```
                 50 MHz domain (clka)                           65 MHz domain (clkb)
 ┌──────────┐ ph/pl ┌─────────┐                               ┌────────────────────┐
 │ sys_cntr │──────▶│ backend │ad_data ┌───────┐              │ vga_draw           │
 │ sc100 +  │       └─────────┘──────▶│ ed100 │──┬──────────▶ │  dpm ─▶ vc100 ──▶ VGA
 │ cntr     │─ bcount (write address) ─────────────────────▶ │  (2048 x 8)        │
 │          │─ dpm_wea ────────────────────────────────────▶ │                    │
 │          │◀──────────────── vs (synchronized) ─────────────│                    │
 │          │─ fifo_wea ─┐                     │              └────────────────────┘
 └──────────┘            ▼                     ▼
      ▲ usb_go_h   ┌───────────────────────────────┐
      └────────────│ usb_int: fifo (2048x8) + dc100 │◀──▶ DLP-2232M USB module ◀──▶ PC
                   └───────────────────────────────┘
```

## Files

| File | Unit |
|---|---|
| `rtl/uaus.sv` | top level: the five units below and their wiring |
| `rtl/sys_cntr.sv`, `rtl/sc100.sv`, `rtl/cntr.sv` | system controller: acquisition state machine and byte counter |
| `rtl/backend.sv` | simulated pulser/receiver and A/D converter |
| `rtl/ed100.sv`, `rtl/fir.sv` | envelope detector: rectifier and filter |
| `rtl/usb_int.sv`, `rtl/dc100.sv`, `rtl/fifo.sv` | USB interface: FIFO, USB-module controller, command flop |
| `rtl/vga_draw.sv`, `rtl/vc100.sv`, `rtl/dpm.sv` | VGA drawing unit: dual-port memory and VGA controller |
| `rtl/sync2.sv`, `rtl/rst_sync.sv` | signal and reset synchronizers |
| `rtl/uaus_pkg.sv` | shared constants: vector length, video timing, cursor limits, digit glyphs |

## One frame, step by step

The 65 MHz VGA controller drives the whole schedule. Its vertical sync (VS) goes high
for 6 lines, about 124 µs, at the start of each vertical retrace. Everything else
follows from that edge.

1. **Trigger.** The system controller is clocked at 50 MHz. It synchronizes VS through
   two flops. On the rising edge, the state machine drives `be_ph` for two clocks, then
   `be_pl` for two clocks (40 ns each). These pulses tell the backend to fire.
2. **Capture.** The byte counter is released and counts 0 … 2047. During those 2048
   clocks the controller raises two write enables:
   - `dpm_wea` when the VGA switch `vga_go_h` is on;
   - `fifo_wea` when the PC has enabled streaming (`usb_go_h`).

   The counter value is the memory write address. The controller then parks in IDLE
   until VS falls, so it acquires exactly one vector per frame.
3. **Envelope.** Samples from the backend pass through the rectifier and the filter in
   the same clock domain, one per clock, with a fixed latency. Only the FIFO and the
   display memory store anything.
4. **Display.** The display memory is written at 50 MHz and read at 65 MHz. It is the
   only data path between the clock domains. Acquisition takes 41 µs, well inside the
   786 µs blanking interval (38 lines), so the memory is never read and written at the
   same time.
5. **USB.** The USB module controller (`dc100`) empties the FIFO into the USB module
   byte by byte. It starts during the retrace and finishes about 2 ms later at the
   module's ~1 MB/s. A frame lasts 16.7 ms, so one vector per frame never fills the FIFO.

### The stored vector is rotated by one address

Both write enables leave the state machine through output flops, so they lag the
state by one clock. The byte counter does not. The 2048 writes therefore see counter
values 1, 2, …, 2047, 0:
- filtered byte k lands at memory address (k + 1) mod 2048;
- the FIFO, which is addressed by its own pointers, sends bytes in order.

The display therefore starts with the last sample of the previous vector in column 0,
and is shifted by one sample (half a pixel). This rotation is inherited from the
original state machine and has been kept. Remove the output flop on `dpm_wea` in
`sc100.sv`, or start the counter one clock later, if it matters.

## Envelope detector (`ed100`, `fir`)

**Rectifier.** The A/D output is offset binary, with 128 as zero. Rectification folds it
around mid-scale without arithmetic:
- bit 7 of the result is 0;
- bits 6:0 are the input bits 6:0 when input bit 7 is 1, and their inverse when it is 0.

So 128…255 maps to 0…127 and 127…0 maps to 0…127.

**Filter.** The filter is a 23-tap symmetric FIR. Symmetry lets it pair taps 1+23,
2+22, …, 11+13 and share one multiplier per pair, so it needs 12 multipliers. The
datapath has four stages:

| Stage | Width | Registered |
|---|---|---|
| sum of the two samples of a pair | 9 bits | yes |
| 8-bit two's-complement coefficient × pair sum | 17 bits | yes |
| adder tree over the 12 products | 21 bits | no |
| rounder | 8 bits out | no |

The coefficients, from the outer taps to the centre, are
−1, −2, −1, 0, 3, 7, 12, 17, 23, 27, 30, 31. All 23 taps add up to 261, about 256. The
rounder therefore divides by 256, taking sum[15:8] and adding sum[7] (round half up).
Negative sums become 0, and results above 255 saturate (these coefficients never get
there).

**Latency.** The filter has three clock edges from its input to the product registers.
Together with the backend's output register and the capture timing, filtered byte k
sent to USB is

    byte[k] = round( Σ_{i=0..22} h[i] · rect(sample[k − 4 − i]) / 256 )

where `h` is the full symmetric 23-tap response and samples before the vector count as
zero. `tb/tb_uaus.sv` checks this formula bit-exactly against all 2048 bytes.

## USB module controller (`dc100`, `usb_int`)

The USB side uses an FTDI FT2232C on a DLP-2232M module in its "245 FIFO" mode.

**Handshake.** The module has two status lines and two strobes:
- `RXF#` low means the host sent a byte; pulse `RD#` low to take it from the bus;
- `TXE#` low means the module can accept a byte; pulse `WR` high to give it one.

**Read-then-read-or-write cycle.** The controller state machine (INIT, READ_0..2, IDLE,
WRITE_0..2) runs it:
- After reset it waits for a host byte and reads it. `RD#` is low for 3 clocks (60 ns).
  `rd_en` loads the bus into a flop, and bit 0 of that byte becomes `usb_go_h`: 0x01
  starts streaming, 0x00 stops it.
- In IDLE, a write wins over a read. While `TXE#` is low and the FIFO is not empty, it
  pops a FIFO word (`fifo_rd_en`) and holds `WR` high for 3 clocks. The bus driver
  (`dlp_oe`) is enabled in the last of those clocks, when the popped word is on the
  FIFO output.
- Otherwise a waiting host byte starts another read.

**Registering and synchronizing.**
- `dlp_rd_l`, `dlp_wr`, `fifo_rd_en` and `dlp_oe` are registered to keep them glitch-free.
  Each appears one clock after the state that requests it.
- `RXF#` and `TXE#` are asynchronous and pass through two flops that reset to the
  inactive level.
- The module's bidirectional data bus appears as three ports: `dlp_din`, `dlp_dout` and
  `dlp_oe`. The tri-state pad belongs at the board level:
  `assign pad = dlp_oe ? dlp_dout : 'z;`.

The FIFO's full flag is not used. One vector is 2048 bytes and the FIFO holds 2048, so
the FIFO can fill only if the host falls more than a whole frame behind. An assertion
in `usb_int` flags such a write. Bytes written to a full FIFO are dropped.

## VGA controller (`vc100`, `vga_draw`)

### Raster

| | Total | Sync high | Counter at reset |
|---|---|---|---|
| Pixel counter (11 bits) | 1344 | counts 1047…1182 (136 pixels) | 1047 |
| Line counter (10 bits) | 806 | lines 770…775 (6 lines) | 770 |

- Both counters are offset so that 0 is the first visible pixel and line.
- The porches are 23 pixels (front) and 161 pixels (back). Vertically they are
  2 lines (front) and 30 lines (back).
- At 65 MHz this gives 48.36 kHz lines and 60.0 Hz frames.
- The line counter steps where HS rises, so VS edges coincide with HS rising edges.
- Both syncs are active high. A high VS means vertical retrace.
- All outputs (HS, VS, R, G, B) are registered and lag the counters by one clock.

### Trace

**Columns.** Column x shows memory byte 2x: 1024 of the 2048 samples, plotted on line
640 − value. The controller lights a pixel as follows:
- it compares the previous column's line y0 with the current column's line y1;
- it lights the pixel when the current line lies between the two, from y1 inclusive
  to y0 inclusive;
- when y0 = y1 it lights line y1 only.

Consecutive samples are therefore joined by vertical strokes and the trace is
continuous.

**Read address.** The read address leaves the controller two pixels early,
`col = 2·((pixel + 2) mod 1344)` taken mod 2048, because the address register and the
memory's registered read each take one clock. The modulo 1344 matters at the end of a
line: the addresses for the first two columns of the next line must be issued while
the counter is still at 1342 and 1343.

**Read enable.** The memory read port is enabled only while both syncs are low, which
approximates the visible region.

### Cursors and distance

- Two cursors are vertical lines on lines 101…649. They start at columns 4 and 1020.
- Four push buttons move them, one column per tick: `btn[3]` left cursor left, `btn[2]`
  left cursor right, `btn[1]` right cursor left, `btn[0]` right cursor right.
- A tick is one clock every 2^CURSOR_DIV_BITS clocks (2^26 by default, about one step
  per second). It is a clock enable, not a divided clock.
- The left cursor stays above column 3 and never passes the right one. The right cursor
  stays below column 1021.
- A 4-digit BCD up/down counter tracks `right − left` (1016 at reset) and never
  converts from binary.
- The digits are 8 × 8 glyphs on lines 50…57, starting at pixels 513, 523, 533 and 543.
- Priority: cursors are drawn over the digits, and the digits over the trace. R, G and B
  are equal, so the picture is white on black.

## Simulated backend (`backend`)

The backend is a stand-in for a pulser, a transducer and an A/D converter. It is armed
by `ph`, and when `pl` falls it emits 2048 samples, one per clock. The waveform:
- an offset-binary carrier with a period of 4 samples (12.5 MHz);
- modulated by eight triangular echoes, placed like the reflections of an eye;
- it rests at 0x80 (zero) otherwise.

Rectification recovers the echo envelope exactly, which makes the end-to-end check
exact. The waveform is invented for testing. Replace this module with the pins of a
real A/D converter for hardware use; its ports are what the rest of the design expects.

## Clocks, resets and crossings

- **Reset.** `rst_l` is asynchronous and active low. Each unit has its own reset
  synchronizer (`rst_sync`): it resets at once and releases on the second clock edge
  of its domain.
- **Asynchronous inputs.** Each of these passes through two flops (`sync2`):
  - VS into the 50 MHz domain;
  - `vga_go_h`;
  - the buttons;
  - `RXF#` and `TXE#`.
- **Data crossing.** The only data that crosses domains is the vector, through the
  dual-port memory, during blanking.

## How far it can be trusted

Every unit has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=… failures=…`. Each one was also run against a copy of its module
broken in one specific way, and each caught the fault.

| Testbench | What it checks |
|---|---|
| `tb_fir` | random, impulse and constant inputs against a reference convolution with the exact rounding |
| `tb_ed100` | rectifier end points and table values, random data and an echo vector through the filter |
| `tb_backend` | waveform sample by sample, vector length, start edge, rest level, PL without PH ignored |
| `tb_fifo` | random traffic against a queue model, full and empty |
| `tb_dpm` | two-clock random writes and reads, read enable |
| `tb_cntr` | clear, count, wrap from 2047 to 0, clear mid-count |
| `tb_dc100` | strobe widths, read before write, in-order delivery, stop on empty, host byte in mid-transfer, against a USB-module model (`dlp_model`) |
| `tb_usb_int` | start and stop bytes, a full 2048-byte vector delivered in order under back-pressure |
| `tb_sc100` | pulse widths and order, 2048-clock write window, switch combinations, one run per frame |
| `tb_sys_cntr` | all 2048 addresses written once per frame, one pulse pair per frame, VGA switch off, FIFO enable |
| `tb_vc100` | three frames with a short cursor prescaler: every pixel against a reference renderer fed from a sync-driven monitor, sync timing, cursor limits and digits |
| `tb_vga_draw` | a vector written at 50 MHz appears pixel for pixel at 65 MHz; a rewrite during blanking shows next frame; writes with the enable low do not |
| `tb_uaus` | the whole system end to end, five frames (below) |
| `tb_uaus_full` | one complete operation at default parameters |

**`tb_uaus`** runs the whole system with a 2^4-clock cursor prescaler:
1. the host sends 0x01;
2. four acquisitions follow, each checked bit-exactly on the USB side against the
   formula above; two of the frames are also checked pixel by pixel;
3. a button moves the right cursor to its limit, and the new distance is checked;
4. the VGA switch turns off: no memory writes, USB continues;
5. the host sends 0x00 while that vector is still being sent. The controller reads
   the byte between two writes and finishes the vector. The next retrace sends
   nothing.

It counts each of these mechanisms (acquisitions, USB vectors, memory vectors, matching
frames, cursor moves, switch-off, start and stop, a host byte read in mid-transfer, USB
back-pressure, command reads) and
fails if any never happened.

**`tb_uaus_full`** uses every parameter at its default. It sends the start byte,
acquires one vector, and checks it on USB and on the screen. It simulates about 33 ms
of time in a few seconds. The cursor prescaler is too slow to see a step at this size,
so cursor movement is tested only at the reduced prescaler.

Not verified: timing closure on any FPGA, and behaviour with a real FT2232C. The USB
model in `tb/dlp_model.sv` follows the 245-mode handshake at clock-cycle resolution,
not the chip's exact nanosecond timing.

## Simulating

Verilator 5 with timing support. The testbenches assume a 1 ns / 1 ps time unit:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/uaus_pkg.sv tb/fir_ref_pkg.sv tb/vga_ref_pkg.sv tb/tb_uaus.sv \
  --top-module tb_uaus -o sim && obj_dir/sim
```

Swap `tb_uaus` for any other testbench name. The reference packages `fir_ref_pkg` and
`vga_ref_pkg` hold the independent models. `vga_monitor` rebuilds the frame from
HS/VS/R/G/B alone, and `dlp_model` plays both the USB module and the host.

## Where this design departs from the original, or chooses

- **Filter scaling.**
  - *Original:* the description scales coefficients by 127 and divides by 128. Its
    datapath takes bits 15:8 and rounds on bit 7, which divides by 256.
  - *Here:* the bit positions and the coefficient values are followed; they sum to 261.
  - *Original:* the description calls the final sum 17 bits.
  - *Here:* the datapath's 21-bit adder is used.
- **Rounder sign.**
  - *Original:* the rounder treats sum bit 15 as the sign.
  - *Here:* the real sign of the 21-bit sum is used, and the result saturates.
  - *Effect:* identical for all sums below 32768.
- **Write condition for USB.**
  - *Original:* one sentence says writes need "FIFO empty high".
  - *Here:* the state machine is followed: write while the FIFO is not empty.
  - *Original:* the prose says writing stops when a new host byte arrives, but the
    state machine lets a write win over a waiting byte.
  - *Here:* the state machine is followed.
- **RD# and WR overlap.**
  - *Original:* the output decode requests RD# in IDLE whenever a host byte waits, even
    in the clock where a write starts.
  - *Here:* RD# is requested only when no write starts, so the two strobes never
    overlap. An assertion checks this.
- **Frame length.** 806 lines, as in the 60 Hz timing diagram, rather than 807.
- **Digit position.** Pixels 513…550, rather than 550…590 as described in prose.
- **Cursor prescaler.** 26 bits, as described in prose. A clock enable replaces the
  divided clock.
- **Digit glyphs.** The bitmaps of 0, 1, 4, 6, 7, 8 and 9 follow the original. Those of
  2, 3 and 5 are drawn here in the same style.
- **Design choices not covered by the original description:**
  - the two-pixel read look-ahead;
  - synchronizers on the switch and the buttons;
  - asynchronous reset assertion;
  - the registered standard-read FIFO and the registered-read dual-port memory (the
    original used vendor-generated blocks);
  - the split data bus for the USB module.
- **Simulated backend.** The waveform is entirely this design's own.
- **Not included:**
  - the USB module and its adapter board (external parts);
  - a real analog front end;
  - the PC application.

# Embedded human action recognition on a two-bus video processing system

This design recognises what a person in front of a camera is doing, for example
a hand moving horizontally, moving vertically, or some other motion. It
does this in real time on an FPGA-sized system clocked at 20 MHz. It uses no
tracking and no floating point. Every new frame updates a **motion history
image** (MHI): a grey image where a pixel is bright if it changed recently
and gets darker the longer it stays still. After a short video, the MHI
summarises the motion. It goes to a bank of **linear SVM classifiers**, one
per action. Each computes the inner product of the MHI with its weight vector
and adds its offset. The largest result names the action. If even the largest
result is below a threshold, the answer is an extra "no motion" class.

The hardware is built as a small system-on-chip rather than one hard-wired
pipeline. It has two Wishbone system buses. Replicable "processing cores" do
the pixel work, and bus masters move data between memories. The per-frame
work is split across several identical cores, each taking one part of the
image. That is how the system keeps up with the camera.

## The algorithm in integer form

For pixel (u,v) at frame k, with current grey value c, previous value p and
motion history h:

    D      = |c - p| > threshold                (binary motion image)
    h'     = 255              if D              (tau = 255)
             max(0, h - 1)    otherwise

Classifier j, with weights w_j (N = width x height words) and offset b_j:

    eta_j  = sum_i w_j[i] * x[i] + b_j          x[i] = MHI byte / 256
    class  = argmax_j eta_j, or NCLS ("no motion") if max_j eta_j < T

Number formats:

- Weights are signed 8.8 fixed point: two bytes, low byte first.
- An MHI byte x enters the multiplier as the 8.8 value 0.x.
- Each 8.8 x 8.8 product is shifted right by 8 and accumulated in signed 24.8 (32 bits).
- The offset b_j and the threshold T are 32-bit 24.8 values too.

## System structure

The system has three parts.

```
 top level processor module         processing module 0 (bus 0)                processing module 1 (bus 1)
 ---------------------------         ------------------------------            -------------------------------
 8-bit processor (outside) -- pb_i   external sync SRAM 2048 KB (port)          external async SRAM 256 KB (port)
   I/O ports, timer, serial port,    camera port + dual 32 KB frame buffer      internal RAM 32 KB  (MHI)
   interrupt handler, de-bounce      DMA engine (4 modes) -> PC parallel port   internal ROM 64 KB  (SVM weights)
   PicoBlaze-to-Wishbone bridge ---> seven segment display                      offset and threshold unit
                                     camera I2C port                            inner product cores x N_IP
                                                                                filter, rotate, edge detector cores
                      host_i ------> sub-sample core
 PC serial link (outside) ---------> Intel hex upload/download engine
                                     difference operator cores x N_DIFF         
                                     Wishbone-to-Wishbone bridge ------------>  (master 0 of bus 1)
```

The camera, difference operators and DMA engine work on bus 0. The
difference operators reach the MHI in the internal RAM on bus 1 through the
bridge. The inner product cores and the classifier sit on bus 1, next to
the MHI and the weights. This keeps the heavy classification traffic off
bus 0.

The top level controller is an 8-bit processor that is not part of the
RTL. Its port bus enters the top as `pb_i`. Its input data and interrupt
leave as `pb_in` and `pb_int`. Its peripherals are all here:

- buttons (de-bounced), DIP switches and an LED output port;
- a 1 ms timer;
- an 8N1 serial transmitter;
- an interrupt handler with eight sources;
- a bridge that lets the processor queue reads and writes on bus 0 without
  waiting states.

A further bus 0 master, the Intel hex engine, lets a PC read and write
anything on bus 0 with text records (see below). A plain Wishbone master
port, `host_i`/`host_o`, gives a host or a testbench direct register
access.

### Frame flow (the virtual pipeline)

Per frame:

1. The camera port captures the frame while the cores work on the previous one.
2. The difference operators (four by default) each update one quadrant of the
   MHI. They read current frame, previous frame and MHI, and write the MHI.
3. The DMA engine copies the frame to external SRAM to serve as the next
   "previous frame".

After the last frame:

1. The inner product cores run at once, one classifier each.
2. The firmware writes the three results into the offset and threshold unit.
3. The unit adds the offsets, picks the class and sends it to the display.

The system is built to hold 12 frames/s at 20 MHz, so 1,600,000 clocks per
frame stage.

## Processing cores

Every processing core has the same shape:

- **coproc_if**: the register window. It holds eight 32-bit parameters at
  0x00-0x1F, four 32-bit results at 0x20-0x2F, control at 0x30 (bit 0 =
  start) and status at 0x31 (bit 0 busy, bit 1 done). `irq` is the done
  flag.
- **pc_wb_bridge**: the core's Wishbone master. The sequencer never sees bus
  timing. It posts requests (read, write, set base, add to offset) against
  four address pointers, and each pointer auto-increments after an access.
  Stride jumps to the next line of a segment are a single `add offset`
  request.
- A **sequencer**: an FSM that does what the processing core's firmware
  would do.
- Optionally a **co-processor**. The inner product core uses **mac_8p8**, a
  registered multiply followed by a 24.8 accumulate.

The cores are:

| core | parameters | results |
|---|---|---|
| `diff_op` (difference operator) | p0 current frame, p1 previous frame, p2 MHI (top-left pixel of the segment), p3 width, p4 height, p5 line stride, p6 threshold | r0 moving pixels, r1 clocks |
| `subsample` | p0 source, p1 destination, p2 source width, p3 source height, p4 bit 0: 1 = 2x2 rounded mean, 0 = pick top-left | r0 pixels, r1 clocks |
| `inner_product` | p0 MHI, p1 weights, p2 N | r0 signed 24.8 sum, r1 clocks |
| `filter_op` | p0 source, p1 destination, p2 W, p3 H, p4 line stride, p5 mode: 0 = 3x3 mean, 1 = 3x3 Gaussian | r0 pixels, r1 clocks |
| `edge_op` | as `filter_op`; p5 mode: 0 = Roberts cross, 1 = Sobel | r0 pixels, r1 clocks |
| `rotate_op` | p0 source, p1 destination, p2 W, p3 H, p4 line stride, p5 cosine, p6 sine (signed 8.8) | r0 pixels, r1 clocks |

Timing:

- A difference operator pixel costs three reads and one write.
- An inner product element costs three reads (pixel, weight low, weight
  high), about 12 clocks. A 100x80 classifier therefore takes about 96,000
  clocks.
- Segments never overlap, so any number of difference operators can run
  together. Bus contention only slows them down.

The filter, rotate and edge detector cores are library cores: the
recognition does not use them, but they sit on bus 1 next to the MHI.

- **Filter and edge detector** share a 3x3 window walker (`win3_core`).
  It keeps a 3x3 window of registers and reads only the new column at each
  step, so a pixel costs three reads and one write. Only interior pixels
  are written; the one-pixel border is left alone.
  - Mean: (sum + 4) / 9.
  - Gaussian: kernel [1 2 1; 2 4 2; 1 2 1], then (sum + 8) >> 4.
  - Roberts cross: gx = p(x,y) - p(x+1,y+1), gy = p(x+1,y) - p(x,y+1).
  - Sobel: the usual 3x3 gradients.
  - The edge output is |gx| + |gy|, saturated to 255.
- **Rotate** turns the image about its centre (W/2, H/2), rounded down.
  - Output pixel (x, y) takes the source pixel at
    (cx + c(x-cx) + s(y-cy), cy - s(x-cx) + c(y-cy)), rounded to nearest.
  - With y pointing down, a positive angle turns the picture clockwise.
  - Source positions outside the image give 0.
  - The rotated coordinates are 8.8 accumulators. They step by c and s
    along a line and from line to line.
  - Firmware supplies c and s, for example from a sine table.

## Camera port

- **Input.** A 640x480 RGGB Bayer stream, one sample per clock with
  `cam_valid`; `cam_sof` marks the first sample.
- **Grey conversion.** Each 2x2 Bayer cell becomes one grey pixel, the
  rounded-down mean of the four samples. A line buffer holds the even
  line's partial sums. The result is 320x240.
- **Output size.** 100x80 or 200x160, chosen by pixel selection. Grey column
  g is kept when floor((g+1)*O/G) != floor(g*O/G), and rows are chosen the
  same way. This spreads the kept pixels evenly.
- **Double buffering.** Frames go alternately into two 32 KB buffers, which
  swap when a frame completes.

Registers (bus 0, 0x400000):

| offset | register |
|---|---|
| 0x00 | control: bit 0 enable, bit 1 = 200x160 (sampled at frame start) |
| 0x01 | status: bit 0 buffer with the last frame, bit 1 frame ready. Write 1 to clear ready. |
| 0x02 | frame count |

The buffers are read at 0x200000 (buffer 0) and 0x208000 (buffer 1).

## Offset and threshold unit

Registers (bus 1, 0x060000):

| offset | register |
|---|---|
| 0x00 + 4j | score j (write) |
| 0x20 + 4j | offset b_j |
| 0x40 | no-motion threshold T (signed; the reset value is the most negative number, which gives plain argmax) |
| 0x50 | control: bit 0 start |
| 0x51 | status: {valid, class[6:0]} |
| 0x54 | winning sum |

`class_o`/`class_valid` appear NCLS+2 clocks after the start write. They
drive the seven segment display directly.

## Buses and address map

`wb_bus` is a shared bus with a round-robin arbiter. A master keeps the bus
while its CYC is high. An address decoder takes the first slave whose
(adr & mask) == base. Unmapped addresses are acknowledged with data 0 so a
master never hangs. Data is 8 bits wide; addresses are 24-bit byte
addresses. Every slave here answers one clock after STB. `bus0_stall` and
`bus1_stall` show which masters are waiting.

Bus 0:

| address | slave |
|---|---|
| 0x000000-0x1FFFFF | external synchronous SRAM (2048 KB, `sram0_*`) |
| 0x200000-0x20FFFF | camera frame buffers |
| 0x300000-0x3FFFFF | window onto bus 1 (bus 1 address = low 20 bits) |
| 0x400000 | camera port registers |
| 0x400100 | DMA engine: SRC 0x00, DST 0x04, LEN 0x08 (32-bit LE), control 0x0C (bits 1:0 mode, bit 7 start), status 0x0D |
| 0x400200 | seven segment display (shows the class, or a written byte) |
| 0x400300 | PC parallel port: 0x00 data in, 0x01 FIFO level |
| 0x400400 | camera I2C port |
| 0x400500 | sub-sample core |
| 0x400800 + 0x100*i | difference operator i |

The DMA engine has four modes:

- 0: memory to memory
- 1: the `fin_*` stream into memory
- 2: memory to the parallel port
- 3: clear a block

Bus 1 (seen from bus 0 at 0x300000 + address):

| address | slave |
|---|---|
| 0x000000-0x03FFFF | external asynchronous SRAM (256 KB, `sram1_*`) |
| 0x040000-0x047FFF | internal RAM, 32 KB (MHI) |
| 0x050000-0x05FFFF | internal ROM, 64 KB (weights; writes are ignored) |
| 0x060000 | offset and threshold unit |
| 0x060100 + 0x100*i | inner product core i |
| 0x060C00 | filter core |
| 0x060D00 | edge detector core |
| 0x060E00 | rotate core |

The W2W bridge forwards a bus 0 access to bus 1. It finishes the bus 1 cycle
before acknowledging on bus 0.

## Top level processor peripherals

Port numbers on the processor's port bus:

| ports | block | use |
|---|---|---|
| 0x00-0x02 | `pb_io` | 0x00 buttons, 0x01 DIP switches, 0x02 LED output |
| 0x08-0x0B | `pb_timer` | 0x00/0x01 reload (16 bits), 0x02 enable (write restarts), 0x03 tick count |
| 0x10-0x11 | `uart_tx` | 0x10 send byte, 0x11 status {full, busy} |
| 0x18-0x1A | `irq_handler` | 0x18 mask, 0x19 pending (write 1 to clear), 0x1A lowest enabled pending source |
| 0x20-0x26 | `pb_wb_bridge` | 0x20-0x22 address, 0x23 queue write, 0x24 queue n reads, 0x25 pop read data, 0x26 status |

All port read data is registered one clock after the port number. The top
ORs the read data together, so each block returns 0 when it is not selected.

The interrupt sources are:

| source | event |
|---|---|
| 0 | button press |
| 1 | timer |
| 2 | serial transmission finished |
| 3 | input port change |
| 4 | camera frame ready |
| 5 | DMA done |
| 6 | class result |
| 7 | any processing core done |

The camera I2C port is a bus 0 slave:

| offset | register |
|---|---|
| 0x00 | device address |
| 0x01 | camera register |
| 0x02 | data |
| 0x03 | control: 1 = write, 2 = read |
| 0x04 | status {nack, busy} |

It runs at 100 kHz. Reads use the SCCB form: the register number, then
STOP, then START and a one-byte read.

## Intel hex upload/download engine

The engine takes ASCII characters on `hex_rx_*` and replies on `hex_tx_*`
(valid/ready streams; the serial line is outside the top). Records have
the usual form `:LLAAAATT<data>CC`, where the checksum makes all bytes sum
to 0 mod 256. Characters between records are ignored.

| type | action |
|---|---|
| 00 | data: the bytes are buffered, and written to `{EXT, AAAA} + i` only if the checksum is correct |
| 01 | end of file: accepted, no action |
| 04 | extended linear address: the low data byte becomes EXT, address bits 23:16 |
| 06 | read request (an extension): one data byte N (1-255); the reply is a type 00 record with N bytes read from `{EXT, AAAA}`, ended by CR LF |

A bad checksum, a non-hex digit or an unknown type gets the reply `?` CR LF,
and the record is dropped. For example, `:020000040040BA` followed by
`:0100020601F6` reads the camera frame counter at 0x400002.

## What is taken from the source design, and where this RTL departs

Taken from the source design:

- the MHI recurrence with tau = 255;
- one-versus-all linear SVM with offsets and an extra no-motion class;
- 8.8 weights with a 24.8 accumulator;
- the two-bus partition and its memories (2048 KB sync SRAM, 256 KB async
  SRAM, 32 KB RAM, 64 KB ROM, 64 KB dual frame buffer);
- the 640x480 Bayer camera producing 100x80 or 200x160 grey frames;
- the DMA modes;
- four difference operator cores on image quadrants, four inner product
  cores with a MAC co-processor, and three classes;
- 20 MHz, 12 frames/s;
- the list of top level peripherals and their interrupt wiring.

Own choices and departures:

- **No processor inside the cores.** In the source design every core runs
  firmware on a small 8-bit processor. Here each core is a hardwired
  sequencer with the same register window, bus bridge and co-processor
  structure. The top level processor itself is outside the RTL; only its
  port bus is brought out.
- **The processor's local bus** is the processor's native port bus. Each
  peripheral decodes its own port numbers. It is not a Wishbone bus with a
  separate address decoder.
- **Offset and threshold** is a hardware unit on bus 1. In the source
  design it is a firmware step.
- **Inventions.** All register layouts, the address map, bus widths
  (8-bit data, 24-bit address), FIFO depths, the difference threshold test
  |c-p| > T, the Bayer cell mean, the selection pattern, the sub-sample
  factor of two, pixel scaling x/256 in the inner product, the timer,
  UART and I2C formats, interrupt priorities and de-bounce time. Also the
  kernels of the filter, the edge magnitude |gx| + |gy|, and the
  nearest-neighbour sampling and angle format of the rotate core.
- **Left out:**
  - the serial line of the Intel hex engine. Its character streams are
    ports of the top;
  - the processor's instruction ROM, scratch pad and look-up tables;
  - the external SRAM chips. They are Wishbone ports of the top; the test
    uses a behavioural model, `tb/wb_sram_model.sv`.
- **Only bus 0 can reach bus 1.** The bridge has no path back.
- **Output size is an FPGA register.** The 100x80 / 200x160 choice is a
  camera port register here. In the source design it is made through the
  camera's own control registers.
- **No block requests.** A processing core's bridge serves only single-byte
  requests. Because its pointers auto-increment, a block is a run of single
  requests; a single request for a whole block is not built.

## Performance

Measured in the end-to-end test at default parameters (four difference
operators, four inner product cores, 640x480 camera, 100x80 frames):

- Difference update of all four quadrants plus the DMA copy of the frame:
  171,789 clocks per frame (8.6 ms). The budget is 1,600,000 clocks (80 ms).
- Output latency from the last frame being ready to the class on the display:
  394,331 clocks (19.7 ms). The source design reports 64 ms for its
  firmware-based pipeline.

Capacity:

- Three classes of 100x80 weights take 48,000 B of the 64 KB ROM.
- Six classes would need 96,000 B and do not fit.
- At 200x160 the MHI (32,000 B) still fits the 32 KB RAM, but three weight
  vectors (192,000 B) do not fit the ROM. That size is therefore supported
  for capture and difference operation only.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops with `$finish`. Each has
a watchdog, and where a rate or latency matters it checks cycle counts. With
verilator 5:

    verilator --binary --timing -Irtl -y rtl -y tb rtl/vw_pkg.sv tb/tb_vw_top.sv --top-module tb_vw_top -o sim
    ./obj_dir/sim

Replace `tb_vw_top` with any other testbench name.

`tb_vw_top` runs the whole system at its default parameters, in about 20 s
of simulation time on a PC:

1. It streams five 640x480 Bayer frames of a synthetic scene, a bright block
   moving right over a textured background.
2. It checks every grey frame, the MHI, each inner product, the offsets and
   the displayed class against a model inside the testbench.
3. It switches to 200x160 and sub-samples one frame.
4. It exercises all four DMA modes and the parallel port.
5. It forces the no-motion class.
6. It drives the processor port bus: bridge accesses, an I2C transfer, a
   serial byte, switches and LEDs, a bouncing button press and a timer
   interrupt.
7. It uploads an Intel hex data record into the external SRAM and reads
   the camera frame counter back with a read request record.
8. It runs the Gaussian filter, the Sobel edge detector and a quarter turn
   of the rotate core together on the final MHI. It checks all three images.

Every mechanism (bus stalls on both buses, bridge transfers, parallel
difference operators, each DMA mode, resolution switch, classification,
no motion, interrupts, Intel hex accesses, library cores) is counted. The test fails if any of them never
happened.

## Files

| file | contents |
|---|---|
| `rtl/vw_pkg.sv` | bus structs, address map, register offsets, port numbers |
| `rtl/vw_top.sv` | the system |
| `rtl/wb_bus.sv`, `rtl/w2w_bridge.sv` | shared bus with arbiter and decoder; bus 0 to bus 1 bridge |
| `rtl/wb_mem.sv` | internal RAM / ROM |
| `rtl/cam_port.sv`, `rtl/i2c_master.sv` | camera data and configuration ports |
| `rtl/ihex_engine.sv` | Intel hex upload/download engine |
| `rtl/dma_engine.sv`, `rtl/par_port.sv`, `rtl/seg7_display.sv` | DMA, PC parallel port, display |
| `rtl/coproc_if.sv`, `rtl/pc_wb_bridge.sv`, `rtl/mac_8p8.sv` | processing core building blocks |
| `rtl/diff_op.sv`, `rtl/subsample.sv`, `rtl/inner_product.sv`, `rtl/offset_threshold.sv` | processing cores and classifier |
| `rtl/win3_core.sv`, `rtl/filter_op.sv`, `rtl/edge_op.sv`, `rtl/rotate_op.sv` | filter, edge detector and rotate cores |
| `rtl/pb_io.sv`, `rtl/pb_timer.sv`, `rtl/uart_tx.sv`, `rtl/irq_handler.sv`, `rtl/debounce.sv`, `rtl/pb_wb_bridge.sv` | top level processor peripherals |
| `tb/tb_*.sv` | testbenches |
| `tb/wb_sram_model.sv` | external SRAM model with wait states |

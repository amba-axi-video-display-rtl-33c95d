# Video display controller for paged frame buffers

This design scans a picture out of shared system memory and sends it to an HDMI transmitter, even
when the operating system has scattered the frame buffer over many unrelated 4 KiB physical pages.
No contiguous buffer and no system MMU are needed. For every plane, the host gives the controller a
short list of the physical page addresses. The controller translates its own addresses with that
list while it streams pixels over a 64-bit AMBA AXI read master.

The picture has two layers:

- a video layer in Y'CbCr 4:4:4, stored as three planes (Y, U and V);
- an RGBa overlay, stored as one plane with 4 bytes per pixel.

Each layer has its own window on the screen. The overlay is alpha-blended on top of the video layer,
and a programmable background colour shows outside both windows.

The design is built to keep the display fed through long bus stalls. Each plane has a pixel FIFO in
on-chip SRAM, and the FIFOs are sized so that the picture survives a pause in memory traffic of
several thousand cycles. Double buffering of whole frames ("jobs") lets the host prepare the next
frame while the current one is being shown.

The design is based on a master's thesis about an AXI display controller with paged memory. Where
this RTL departs from that design, or fills in something the thesis leaves open, the section
"Departures and open points" below says so.

## Top level: `vdc_top`

```
 APB --> apb_host_if --> vdc_controller --start--> buffer_reader x4 (RGBa, Y, U, V)
                |                                     |  AR requests      ^ R data (by RID)
                |                                     v                   |
                |                                 axi_arbiter <----> AXI read master
                |                                     |
                |                 FIFO writes/reads   v
                |                   sram_arbiter <--> sram_sp x2 (28 KiB)
                v                                     |
              dfmt <------- pixel requests / pixels --+
                |
                v  vid_pclk, vid_hsync, vid_vsync, vid_de, vid_r/g/b
```

**Clock.** There is one clock. The pixel clock is exactly half of it: `dfmt` makes a clock enable
that toggles every cycle, and `vid_pclk` is a registered copy of that enable.

**Reset.** `rst_n` is asynchronous and active low.

**AXI.** Only the read channels exist; the controller never writes memory. Fixed address-channel
attributes:

| Signal | Value |
|---|---|
| ARSIZE | 8 bytes |
| ARBURST | INCR |
| ARPROT | 3'b011 |
| ARCACHE | 0 |
| ARID | reader number (0 = RGBa, 1 = Y, 2 = U, 3 = V) |

RREADY is tied to 1: the controller never stalls the data channel. RRESP is ignored.

**Parameters.**

| Parameter | Default | Meaning |
|---|---|---|
| `FIFO_RGBA` | 2048 words (16 KiB) | RGBa FIFO size |
| `FIFO_YUV` | 512 words (4 KiB) | size of each of the three Y'CbCr FIFOs |
| `CREDIT` | 8 | maximum AXI bursts in flight |

The SRAM is two banks of 1792 64-bit words each.

## Paged buffers

A *buffer* is one plane of a layer. It is described by four registers:

- **BPLA**: physical address of the buffer's page list. Entry *n* is a 64-bit word at `BPLA + 8*n`,
  and its low 32 bits hold the physical base of virtual page *n*.
- **BPLS**: number of entries in the page list. Any page index at or above BPLS stops the reader
  and sets the page-list error bit in STATUS.
- **BS**: stride, meaning the bytes from one line to the next.
- **OFFSET**: virtual address of the first displayed pixel, defined as
  `(y_off*stride + x_off)*bytes_per_pixel + offset_of_the_buffer_in_its_first_page`.

The host sizes the page list from the buffer size, `unit*stride*height + first-page offset`,
rounded up to whole pages.

Every displayed line must start on a 64-bit boundary, so stride and OFFSET must be multiples of
8 bytes. A line ends part-way through a word. The reader fetches that whole word, and the bytes
past the window width are dropped at the output.

## Buffer reader (`buffer_reader`)

There is one buffer reader per plane. Each has three parts, described in the subsections below.

### Address walk and bursts (`br_addr_gen`)

`br_addr_gen` steps through the window line by line. For each line it keeps a virtual address and
the number of 64-bit words still to fetch on that line.

**Page translation.** Translation uses a one-entry cache holding the current page base. When the
address enters a page it has not translated yet, the reader:

1. issues a single-beat read of the page-list entry;
2. waits for that beat to come back through the FIFO control;
3. continues with the new page base.

Only the one address that needs the new page waits. Bursts already in flight keep flowing.

**Burst length.** A burst is 16 beats unless one of these makes it shorter:

- the end of the window line;
- the end of the 4 KiB page, since a burst never crosses a page;
- the free space in the FIFO, counting words already requested but not yet arrived.

Because space is reserved when the burst is issued, a full FIFO can never overflow. The reader
simply waits, and resumes when the display drains words.

**Done.** When the last address of the window has been issued, the reader reports done. The
controller uses this to raise the interrupt early.

**Start of a frame.** Before a new frame starts, the reader waits until every burst of the previous
frame has returned. It then empties its FIFO, so a stale word can never reach the screen.

### FIFO control (`br_fifo_ctrl`)

Each reader uses one ARID for all of its bursts, so its data returns in issue order.
`br_fifo_ctrl` keeps a queue with one bit per issued burst, saying whether the burst was a
page-list read or pixel data:

- page-list beats go to the address generator as the new page base;
- pixel beats are written to the reader's region of the SRAM.

Reading works in three steps:

1. A read of the SRAM is requested whenever words are stored and a prefetch register is free.
2. The data arrives 3 cycles after the grant.
3. It lands in one of four prefetch registers, which feed the pixel unpacker.

When two or fewer words are left in the prefetch registers and in flight, the read request is
marked *urgent*.

### Pixel unpacker (`br_pixel_unpack`)

`br_pixel_unpack` hands out one pixel per request:

- 8 pixels per word for Y, U and V;
- 2 pixels per word for RGBa.

The first pixel is in the low bits of the word. The unpacker pops the word after its last pixel, or
at the end of a window line.

A request with no word available returns 0 and raises `underflow`, which is latched in STATUS bit 0.
With correct sizing this never happens.

## Pixel FIFOs in two single-port SRAMs (`sram_arbiter`, `sram_sp`)

The four FIFOs share one 3584-word address space:

| Words | FIFO |
|---|---|
| 0–2047 | RGBa |
| 2048–2559 | Y |
| 2560–3071 | U |
| 3072–3583 | V |

Bit 0 of a word address picks the bank. A FIFO that is written and read sequentially therefore
alternates between the banks, so one write and one read usually proceed in the same cycle without
a dual-port RAM.

Arbitration rules:

- A write is always granted. The AXI data channel cannot be stalled, and at most one beat arrives
  per cycle.
- On each bank not being written, one read is granted.
- Urgent requests are served first, then the other requests in round-robin order.
- A read that is not granted stays pending.

The SRAM inputs are registered. A write therefore completes 2 cycles after the beat arrives, and
read data appears in a per-reader output register 3 cycles after the grant.

**Prefetch depth and urgency.** These are the part of the design that most needs care. With four
readers plus the write stream, the zigzag pattern breaks down whenever several readers want the same
bank. The RGBa reader consumes one word every 8 system cycles at full rate. With only two prefetch
words it was starved in system simulation. Four prefetch words together with the urgent-first rule
fixed it.

## AXI arbiter (`axi_arbiter`)

`axi_arbiter` picks among the readers' requests in round-robin order into one output register,
which is held until ARREADY. A new burst is started only while fewer than `CREDIT` bursts are
outstanding. The count runs from address acceptance to RLAST.

Returned beats are steered to the reader named by RID. Returns from different readers may
interleave and may come out of order.

## Display formatter (`dfmt`, `dfmt_timing`, `ycbcr2rgb`)

**Timing.** `dfmt_timing` counts pixels and lines, advancing on the pixel enable. Each line is
`active`, front porch, sync, back porch, with all widths programmable. Frames have the same
structure in lines. The syncs are active high. `frame_end` pulses at the last pixel period of the
last active line, after its horizontal blanking.

**Pixel requests.** At each active pixel, `dfmt` checks whether the pixel lies inside each layer's
window (X0, Y0, XSIZE, YSIZE, relative to the first active pixel):

- inside the video window, it requests one pixel each from Y, U and V;
- inside the overlay window, it requests one RGBa pixel.

The pixels come back one system cycle later, inside the same pixel period.

**Colour.**

1. `ycbcr2rgb` converts the video pixel with the full-range BT.601 equations. The coefficients
   are 1.402, 0.34414, 0.71414 and 1.772, held with 8 fraction bits as 359, 88, 183 and 454,
   then rounded and clamped.
2. The overlay is blended on top: `out = (A'*rgba + (256-A')*under) / 256`, where `A' = A + A[7]`.
   So A = 255 is opaque and A = 0 is transparent.
3. Outside both windows the background colour shows.

**Prefill.** The first frame after enable does not start until every enabled buffer holds at least
PREFILL words, or has already fetched its whole window. This covers a slow first access.

**Test frame.** CTRL bit 1 shows eight vertical colour bars: white, yellow, cyan, green, magenta,
red, blue, black. It does not use the bus or the readers.

## Jobs and the interrupt (`vdc_controller`, `apb_host_if`)

Two complete register sets, job 0 and job 1, hold the layer enables, windows and four buffer
definitions. One job is *front* (being shown) and the other is *back*.

`vdc_controller` sequences the frames:

1. It starts all readers on the front job.
2. When all readers are done, it sets END_JOB in IRQ_MODE, which drives `irq`. NO_JOB tells which
   job the interrupt belongs to.
3. The host clears END_JOB by writing 0, rewrites the back job, and sets VALID_JOB.
4. At the end of the displayed frame:
   - if VALID_JOB is set, the controller swaps front and back, clears VALID_JOB, and fetches the new
     front job;
   - otherwise it fetches the same job again, so the frame is repeated rather than torn.

Because END_JOB is raised when fetching finishes, not when the frame finishes, the host has about a
whole frame to answer the interrupt.

### Register map (APB, 12-bit address, no wait states)

| Address | Register | Fields |
|---|---|---|
| 0x000 | CTRL | [0] enable, [1] test frame |
| 0x004 | IRQ_MODE | [0] END_JOB (write 0 clears), [1] NO_JOB (read only), [2] VALID_JOB |
| 0x008 | STATUS | [0] FIFO underflow (write 1 clears), [1] page-list range error, [2] front job |
| 0x00C | BG_COLOR | [7:0] R, [15:8] G, [23:16] B |
| 0x010–0x01C | H_ACTIVE, H_FP, H_SYNC, H_BP | pixels |
| 0x020–0x02C | V_ACTIVE, V_FP, V_SYNC, V_BP | lines |
| 0x030 | PREFILL | words per FIFO before the first frame |
| 0x400 + 0x200·j | job j: LAYER_EN | [0] video layer, [1] RGBa layer |
| +0x10 + 0x10·L | layer L: X0, Y0, XSIZE, YSIZE | four words; L = 0 video, 1 RGBa |
| +0x40 + 0x10·b | buffer b: BPLA, BPLS, BS, OFFSET | four words; b = 0 RGBa, 1 Y, 2 U, 3 V |

RGBa pixels hold R in bits 7:0, G in 15:8, B in 23:16 and A in 31:24.

## Sizing

All figures are for the target of 1080p60 with both layers. The memory bus is 64 bits at 300 MHz,
which gives 2400 MB/s.

**Bandwidth.** The display needs 1920·1080·60·7 bytes = 871 MB/s. Assume an average bus latency of
300 cycles and 16-beat bursts. Each burst then returns 2400/300·16 MB/s, so 7 bursts in flight
would be needed. The design allows 8 (`CREDIT`).

**Peak latency.** At 125 Mpixel/s, the RGBa FIFO drains 4 bytes per pixel and each Y'CbCr FIFO
1 byte. The chosen sizes are 16 KiB and 4 KiB, 28 KiB of SRAM in total.

With the system clock at twice the pixel clock, the full RGBa FIFO lasts 2048 / 0.25 = 8192 cycles
of total bus silence. That is the peak latency the design actually covers. The thesis's design goal
of 10,000 cycles would need about 16.5 KB for RGBa, so raise `FIFO_RGBA` (and the SRAM) if that
goal matters.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog. Shared models:

- `axi_mem_model`: a behavioural AXI memory with random latency and out-of-order return across IDs.
  It can switch the bus off for a set number of cycles in every period, which imitates a peak-latency
  event.
- `apb_bfm`: an APB master.

Two system tests use `vdc_tb_env`. It builds scattered page lists and acts as the host: it answers
interrupts, sets VALID_JOB on two of every three frames and reads which job is in front. It checks
every visible pixel against a floating-point reference within 2 LSB. It also counts each mechanism
and fails if one never occurred:

- translations;
- each kind of short burst;
- SRAM read stalls;
- out-of-order returns;
- the credit limit;
- the prefill wait;
- job switches and repeated frames;
- bus-off periods;
- the test frame.

| Testbench | Raster and layers | Bus | Frames |
|---|---|---|---|
| `tb_vdc_top` | 160x64 | latency 50–250 cycles, off 1000 of every 6000 cycles | 6 frames, then the test frame |
| `tb_vdc_full` | 1080p (2200x1125 total), full-screen video layer and a 960x540 overlay | same as above | 3 frames, about 6.2 million pixel checks |

`tb_vdc_full` uses the design at its default parameters and takes under a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/vdc_pkg.sv tb/vdc_tb_pkg.sv tb/tb_vdc_top.sv --top-module tb_vdc_top
obj_dir/Vtb_vdc_top
```

The RTL also elaborates and synthesises with Yosys through the slang front end. Verilator lint
reports only unused bits and constant outputs, which are listed in each module's header comment.

## Departures and open points

- **Clocking.** The thesis runs the formatter in its own pixel-clock domain with a request interface
  between the domains, and notes that only a 2:1 ratio works. Here the 2:1 ratio is built in:
  there is a single clock and the pixel clock is an enable.
- **Prefetch depth.** The thesis uses two registers per reader after the SRAM read register. This
  design uses four registers plus the urgent-first rule (see above).
- **Telling page-list data from pixel data.** The thesis counts bursts per page so that the FIFO
  control can tell the two kinds of data apart. This design keeps a one-bit-per-burst queue instead.
  The effect is the same, but it depends on each reader's data returning in order, which AXI
  guarantees for one ID.
- **Reader structure.** The thesis describes each reader as three address generators: one for
  memory and one each for the SRAM write and read sides. Here a reader is an address generator, a
  FIFO control that handles both SRAM sides, and an unpacker. The thesis also delays
  address generation by one cycle to meet timing; the address generator here spends separate
  cycles on computing and issuing each burst, with the same effect.
- **Register file size.** The thesis mentions a 2 KB register file. This map decodes 12 address
  bits, with the two jobs at 0x400 and 0x600.
- **Invented details.** The register map, bit positions, STATUS register, sync polarity, pixel
  packing, blend rounding, test-frame pattern and prefill rule are not given in the thesis and were
  chosen here.
- **Peak latency.** The covered peak latency is 8192 cycles, not 10,000 (see Sizing).
- **Formats.** Only Y'CbCr 4:4:4 for the video layer and 32-bit RGBa for the overlay are supported.
- **Out of scope.** Not built: the host CPU, its driver, the system memory and interconnect, and the
  HDMI transmitter. Area and timing figures from the thesis have not been reproduced.

# Zero-client display wall

A large-format display built from ordinary monitors usually needs one
powerful controller with one video output per screen. This design avoids that.
Each monitor gets its own small "zero-client" module. The modules are wired in
a daisy chain: the host feeds the first module, the first feeds the second, and
so on. The host cuts the wall picture into small fragments and tags each
fragment with the ID of the screen it belongs to. Each module keeps the
fragments that carry its own ID and passes all others down the chain. The host
needs only one link, however many screens the wall has. Adding a screen means
adding a module at the end of the chain.

In the original system the links are Gigabit-Ethernet hops carrying UDP
packets, and each board has a soft processor, an Ethernet MAC with DMA engines,
SDRAM and an SRAM image buffer. This RTL implements the data path that makes
the scheme work:

- the host's image splitter;
- each module's fragment routing;
- the writing of pixels into the image buffer;
- the shared SRAM with its display-first arbitration;
- the VGA display engine.

The Ethernet hops are modelled as 32-bit valid/ready word streams.

The default configuration is the prototype's: two 640x480 screens with 24-bit
colour, shown at 60 Hz, which together form a 1280x480 wall. Fragments carry
20 pixels. All logic runs on one 100 MHz clock. A PLL makes that clock from a
50 MHz board oscillator.

## Structure

```
lfd_system                  board level: clocks and reset
├── pll_model               50 MHz -> 100 MHz, 100 MHz at -1.5 ns, 125 MHz (behavioural)
├── ddio_out [0..N]         forwarded PHY transmit clocks (behavioural)
└── lfd_top                 the display wall proper (synthesizable)
    ├── image_splitter          host: wall image -> ID-tagged fragments
    └── zero_client [i]     one per screen, module ID = i
        ├── daisy_chain_router  own ID -> local port, other IDs -> forward port
        ├── stream_fifo         32-word transmit buffer towards the next module
        ├── fragment_writer     local fragments -> SRAM writes
        ├── sram_ctrl           one external SRAM, display port has priority
        └── vga_controller
            ├── vga_sync_gen      640x480 raster timing
            └── pixel_buffer_dma  SRAM -> 16-word pixel FIFO -> raster
```

`lfd_top` is the synthesizable design. `lfd_system` adds the clocking around
it: models of the two FPGA parts that cannot be written as logic, the PLL and
the double-data-rate output cells.

`zc_pkg` holds the shared constants and types: the stream beat, the fragment
header and the 20-pixel fragment length.

## Fragments on the chain

A link is a stream of `zc_pkg::beat_t` words `{sop, eop, data[31:0]}`. Two
more signals travel beside it: `valid` and `ready`. A word moves in a cycle in
which both are high. A fragment is 21 words long:

| word | sop | eop | data |
|---|---|---|---|
| header | 1 | 0 | `[31:24]` module ID, `[23:0]` offset of the first pixel on that screen (`y*640 + x`) |
| pixel 0..18 | 0 | 0 | `[23:16]` red, `[15:8]` green, `[7:0]` blue, `[31:24]` zero |
| pixel 19 | 0 | 1 | same |

The ID and offset give the fragment's place on the wall. The fragments
therefore need not arrive in any particular order, and a fragment may also
update only part of a screen. The header layout is this design's own choice.
The original puts the fragment inside a UDP payload, whose layout it does not
publish. Module IDs are 8 bits wide, so a chain can have up to 256 screens.

## How a module handles a fragment

`daisy_chain_router` looks only at the header word. If the ID matches the
`module_id` input, the header and every word up to `eop` go to the local port.
Otherwise they go to the forward port. The choice is stored when the header is
accepted, so pixel words are never read as IDs. The router is purely
combinational: its input `ready` is the `ready` of the output it selected. The
forward port feeds a `stream_fifo`. That FIFO's `ready` depends only on its
fill level, so `ready` never has to pass combinationally through a long chain
of modules.

`fragment_writer` latches the offset from the header. It then writes pixel
`k` to SRAM word `FB_BASE + offset + k`. Its write request comes straight from
the incoming word, and the word is accepted in the cycle in which the SRAM
controller grants the write. A refused write therefore holds the stream back,
first inside the module and then on the upstream link.

## Sharing the SRAM: display first

This is the part that decides whether the picture stays stable while new
fragments arrive. One single-port SRAM (2^20 words of 32 bits, 4 MB, one pixel
per word) serves two masters:

- **Port A** belongs to the pixel buffer DMA and only reads. It is granted in
  every cycle in which it asks. Two assertions in `sram_ctrl` state that port
  A is never refused and that only one port is granted at a time.
- **Port B** belongs to the fragment writer. It is granted only in cycles in
  which port A does not ask.

Timing in `sram_ctrl`:

1. The grant is combinational, in the cycle of the request.
2. In the next cycle the access is on the SRAM pins (`ce_n`, `oe_n`/`we_n`,
   address, and data for a write).
3. Read data is captured at the end of that pin cycle. It appears on
   `a_rdata` with `a_rvalid` two cycles after the request.

Each clock completes one access, which assumes a 10 ns asynchronous SRAM. The
data bus is split into `sram_dq_o`, `sram_dq_i` and `sram_dq_oe`. The
tri-state pad belongs outside the design.

The display takes little of the memory's bandwidth. The pixel clock is
100 MHz / 4 = 25 MHz, so the DMA needs one read every fourth clock. It keeps a
16-word FIFO topped up: it issues a read whenever the words in the FIFO plus
the reads in flight leave room. So it asks "as soon as possible" but not in
every cycle, and at least three of every four SRAM cycles remain for writes.
In the full-size simulation about 78,000 writes had to wait a cycle, and the
display FIFO never ran empty.

The DMA reads the frame in raster order from `BASE`. It rewinds when the sync
generator signals the first line of vertical blanking (`vblank_start`). On
that signal it flushes the FIFO and drops any reads still in flight. Every
frame therefore starts at the top-left pixel, even after a disturbance. If a
visible pixel finds the FIFO empty, the DMA shows black and pulses
`underflow`.

There is one image buffer and no double buffering. A screen shows each
fragment in the next frame after it is written, so a picture that changes
while it is being sent can tear.

## Display timing

`vga_sync_gen` counts pixels and lines. It advances on a pixel enable, so the
whole design stays in the 100 MHz clock domain. It uses the standard 640x480
timing:

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines) | 480 | 10 | 2 | 33 | 525 |

The syncs are active low. With a 25 MHz pixel clock the frame rate is 59.5 Hz.
The standard 25.175 MHz would give exactly 60 Hz, but it cannot be divided
from 100 MHz.

`vga_controller` registers colour, syncs and `blank_n` together once per
pixel, one clock after the counters. It also outputs `vga_clk`, the pixel
clock for the video DAC. That clock rises in the middle of each pixel period,
while the colour outputs are stable.

## Host side

`image_splitter` reads the wall image from host memory. The image is
`NUM_MODULES*640` by 480 pixels, one pixel per word, in raster order. The host
memory port is `src_*`: a request with a grant, then read data some cycles
later, in order.

The splitter walks the image line by line, and within each line screen by
screen. Every 20 pixels become one fragment with ID `x / 640` and offset
`y*640 + x mod 640`. It reads one pixel at a time, so a fragment takes about
4 to 5 clocks per pixel. In simulation it sent the whole 1280x480 image in
2.71 million clocks (27 ms at 100 MHz). `done` pulses after the last fragment.

## Clocks and reset (`lfd_system`)

The board oscillator runs at 50 MHz. The PLL model makes three clocks from
it:

- **c0**, 100 MHz: the system clock for all logic.
- **c1**, 100 MHz shifted by -1.5 ns: it leaves on `sdram_clk` for the
  host's external SDRAM. Its edges come 1.5 ns before those of the system
  clock. This gives the SDRAM margin despite the FPGA's I/O delays.
- **c2**, 125 MHz: the Gigabit transmit clock. Each Ethernet transmitter (the
  host and every module) forwards it to its PHY on `eth_gtx_clk[i]`, through
  a DDR output register driven with 1 on the high half and 0 on the low half.
  The clock then comes out of the same kind of I/O register as the data and
  stays edge-aligned with it.

`locked` rises 16 input edges after reset. After lock, each output starts
with a whole pulse. The wall leaves reset only when `rst_n` is high and the
PLL is locked. The reset is asserted at once and released through two
flip-flops on the system clock.

The 125 MHz frequency and the lock time are this design's assumptions. One
PLL serves all boards here. On real hardware every board has its own, and
the network decouples the clocks.

## Ports of `lfd_top`

| port | meaning |
|---|---|
| `clk`, `rst_n` | 100 MHz clock, asynchronous active-low reset (`lfd_system` instead takes `clk_50` and outputs `sdram_clk` and `eth_gtx_clk[]`) |
| `start`, `busy`, `done` | send the wall image once |
| `src_req/addr/gnt/rvalid/rdata` | host memory read port (2^25 words = 128 MB) |
| `tail_valid/beat/ready` | fragments leaving the last module, i.e. those whose ID no module owns |
| `sram_*[i]` | SRAM pins of module i |
| `vga_*[i]` | monitor outputs of module i |
| `frag_kept[i]`, `frag_fwd[i]`, `write_stall[i]`, `underflow[i]`, `host_stall` | one-cycle status pulses |

Module i has ID i. On real boards the ID would come from switches. In
`zero_client` it is an input port.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_MODULES` | 2 | screens in the chain |
| `H_ACTIVE`, `V_ACTIVE` | 640, 480 | screen size |
| `H_FP`, `H_SYNC`, `H_BP`, `V_FP`, `V_SYNC`, `V_BP` | 16, 96, 48, 10, 2, 33 | raster timing |
| `PIX_DIV` | 4 | system clocks per pixel |
| `AW` | 20 | SRAM word address bits |
| `SRC_AW` | 25 | host memory word address bits |
| `TX_DEPTH` | 32 | transmit FIFO words per module |
| `FB_BASE` (zero_client) | 0 | image buffer start in SRAM |
| `FRAG_PIXELS` (zc_pkg) | 20 | pixels per fragment |

The SRAM holds 1,048,576 pixels, so a 1024x768 image (786,432 pixels) also
fits. Showing it at 60 Hz would need a 65 MHz pixel clock, which the
integer divider cannot make from 100 MHz.

## What is not here, and where the design departs from the original

- **Ethernet.** The MAC, its scatter-gather DMA engines and their descriptor
  memory, and the PHY are vendor parts and are not included. Each hop of
  the chain is a direct stream connection here. The streams have
  backpressure, which a real Ethernet link does not. A real module must
  buffer a whole packet or drop it.
- **UDP framing.** Fragments carry no Ethernet, IP or UDP headers.
- **Processor.** In the original system a soft processor moves the data in
  software. Here `image_splitter` on the host and `fragment_writer` in each
  module do that work in hardware. The processor, the system bus and the JTAG
  debug logic are not included.
- **Clocks.** The PLL and the DDR output cells are behavioural models. On an
  FPGA they are vendor primitives. All modules share one clock.
- **SDRAM.** The host's SDRAM and its controller are outside the design. The
  `src_*` port is where they connect.
- **SRAM width.** The design uses one 32-bit word per pixel. A 16-bit SRAM
  would need two accesses per pixel and a wider arbiter cycle.
- **SRAM write timing.** Back-to-back writes keep `we_n` low while the
  address changes from one cycle to the next. A real asynchronous SRAM wants
  the address stable around each `we_n` pulse. That needs either a write
  strobe on a faster or inverted clock, or a dead cycle between writes.
- **Source image size.** The host sends an image as wide as the whole wall
  (1280x480 by default), so each screen shows its own part of one picture.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_vga_sync_gen` | every output in every cycle against an independent position count, at full 640x480 timing with a gapped pixel enable |
| `tb_pixel_buffer_dma` | pixel order, rewind on restart (also in mid-frame), underflow on an empty FIFO, no reads outside the frame |
| `tb_sram_ctrl` | priority rules and read data and latency against a reference memory, with random traffic on both ports |
| `tb_vga_controller` | two full 640x480 frames sampled on `vga_clk`: colours, blanking, 525 lines, frame period of 1,680,000 clocks |
| `tb_daisy_chain_router` | 400 random fragments under random backpressure; order and contents on both outputs |
| `tb_fragment_writer` | write addresses and data under random grants; stall flag |
| `tb_image_splitter` | exact fragment sequence for a 3-screen wall, sent twice |
| `tb_zero_client` | one module on a small screen: forwarding, buffer contents, displayed frames |
| `tb_lfd_top` | the full default wall on a 100 MHz clock: 1280x480 picture sent, then a whole frame on both screens compared pixel by pixel (614,400 pixels) |
| `tb_lfd_system` | the same at full size through the PLL from a 50 MHz clock, with the host memory model on the phase-shifted SDRAM clock; also checks the 125 MHz PHY clocks (about 15 s of run time) |
| `tb_pll_model` | lock time, periods, duty cycle, the 1.5 ns lead of c1, behaviour under reset |
| `tb_ddio_out` | random data on both clock halves; clock forwarding; clear |
| `tb_lfd_chain` | four modules on small screens: three forwarding hops, fragment counts per module, two pictures in turn |

`tb/sram_model.sv` is a behavioural model of the SRAM used by the testbenches.
It writes at the clock edge that ends a write cycle.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/zc_pkg.sv tb/tb_lfd_top.sv \
  --top-module tb_lfd_top
./obj_dir/Vtb_lfd_top
```

Replace `tb_lfd_top` with any other testbench name. The code is plain
SystemVerilog-2017. Everything under `lfd_top` is synthesizable; `pll_model`
and `ddio_out` are simulation models of FPGA primitives.

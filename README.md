# Arbitration-tree readout for a 64 x 64 pixel detector

A pixel detector has to move one data word out of every pixel in each time
frame, and with thousands of pixels on one output the readout costs power
and frame rate. This design reads the pixels over a shared parallel bus.
Access to the bus is arbitrated by a **synchronized binary-tree priority
encoder (SB-PE)**. At every frame change each pixel that has something to send
raises a request. The tree then works like a commuter switch. A train of
readout pulses (`readOutControl`) comes from the serializer clock and enters
at the root of the tree. Each pulse is steered to exactly one pixel: the
requesting pixel with the highest address. That pulse makes the periphery
latch the pixel's data and makes the pixel drop its request, so the tree
moves on by itself to the next pixel in priority order.

There is no separate strobe network and no clock distributed over the
matrix. Only one pixel and one path through the tree switch per packet.

The same tree can also produce the binary address of the selected pixel.
That allows zero-suppressed readout, where only pixels with data are sent,
each together with its address. The default configuration is the full-frame
chip: 64 x 64 pixels, four outputs of 1024 pixels each, 11-bit packets
(one range bit and ten ADC bits), and no address in the packets.

## Hierarchy

```
pixel_readout_top          4 quadrants, one serial output each (ser_out[q])
└─ quadrant_readout        1024 pixels -> one pin
   ├─ pixel_half  x2       left / right 512-pixel half, own bus, own tree
   │  ├─ pixel_cell x512   double-buffered data, readRequest, bus driver
   │  └─ sbpe_tree         511 x sbpe_node, combinational
   ├─ readout_controller   frame sync, header timing, readOutControl pulses
   └─ output_serializer    two packet registers, one shifting, one loading
sbpe_pkg                   sizes, header pattern, output-source enum
```

All logic runs on the serializer clock (`ser_clk`), at one output bit per
cycle. The user's frame clock (`frame_clk`) is asynchronous. It is
synchronised inside each quadrant.

## The arbitration tree (sbpe_node, sbpe_tree)

Each node has two children: "lo" holds the lower pixel addresses and "hi"
the higher ones.

| direction      | signal                      | rule at the node                                    |
|----------------|-----------------------------|-----------------------------------------------------|
| toward root    | request                     | `req_up = req_lo \| req_hi`                          |
| toward pixels  | selection path, `roc` pulse | go to hi if `req_hi`, otherwise to lo               |
| toward root    | address                     | bit `LEVEL-1` = `req_hi`; lower bits from the winner |

Three properties follow from these rules:

* **Exactly one pixel is selected at all times.** It is the requesting pixel
  with the highest address. If nothing requests, every node steers to its lo
  child, so pixel 0 is selected.
* **Only that pixel sees the readout pulse.** `roc_pix = sel & roc`, routed
  along the same path.
* **The address comes out at the root.** Its upper bits are decided near the
  root and settle before the lower ones.

The tree is purely combinational. A pulse crosses `LEVELS` = 9 nodes from the
root to a pixel. A change of selection can cross up to 2 x 9 nodes: up from
the released pixel, then down to the next one. Over a full frame, pixels are
visited in strictly descending address order within each half.

In silicon, the request OR is built from alternating NOR and NAND levels. In
the RTL it is plain logic, and synthesis chooses the gates. If the address
outputs are left unconnected (the default, `ADDR_OUT = 0`), the address
logic is removed.

## One pixel (pixel_cell)

The pixel holds two data registers, so the front end can record frame *n+1*
while frame *n* is read out:

* The front end (the in-pixel ADC, not part of this RTL) writes the *write*
  register through `fe_we` / `fe_data`, and the register is marked as
  holding data.
* On `frame_swap` the two registers trade roles. The new write register is
  cleared. `read_request` is set if the frame has data, or unconditionally
  when `full_frame = 1`.
* While `sel` is high and `read_request` is still set, the read register
  drives the bus. Otherwise the pixel drives zeros. The bus is a wired OR:
  a tristate bus in silicon, an OR of gated outputs here.
* At the clock edge where the routed pulse `roc` is high, the periphery
  latches the bus and the pixel clears `read_request`.

Once a half has sent all its pixels, its tree rests on pixel 0. That pixel
has already been read and drives zeros, so the half's remaining packets are
all zero until the next frame.

A front-end write in the same cycle as `frame_swap` is dropped. A frame
change has priority over a readout pulse, but the controller never issues
both in the same cycle.

## Ping-pong between the two halves (readout_controller, output_serializer)

Each 1024-pixel quadrant is split into two halves. Each half has its own bus,
which halves the bus load, and its own tree. The serializer has two
`PKT_W`-bit registers, one per half. While one register shifts its packet
out, the other waits, loaded. Each half receives a readout pulse only once
every two packet times, so its bus has two packet times to settle after the
tree switches to a new pixel.

The timing of one frame, in serializer cycles (`PKT_W` = 11, `HDR_W` = 22),
counting from the cycle in which `frame_swap` is high:

| cycle                     | output carries    | pulses                                                 |
|---------------------------|-------------------|--------------------------------------------------------|
| 0                         | header bit 0      | `frame_swap`: pixels swap registers, raise requests   |
| 10                        | header bit 10     | `roc_l`: left bus latched, left pixel released        |
| 21                        | header bit 21     | `roc_r`: right bus latched, right pixel released      |
| 22 .. 32 (slot 0)         | left packet 0     | `roc_l` in cycle 32                                    |
| 33 .. 43 (slot 1)         | right packet 0    | `roc_r` in cycle 43                                    |
| 22+11s .. 32+11s (slot s) | left if s even, right if s odd | pulse of that half in the slot's last cycle |

Each half latches in the last cycle of its own slot. That is the moment its
serializer register has shifted out its last bit and can take the next
packet. The pixel released by that pulse hands the bus to the next pixel,
which has 22 cycles to settle.

Packets are sent MSB first. In full-frame mode a frame holds
22 + 1024 x 11 = **11286 bits**. After that, zero packets follow until the
next rising edge of `frame_clk`. A new frame edge restarts the header at
once and abandons anything not yet sent: the frame clock must be slower than
the readout for deadtimeless operation.

Frame-clock latency: the header's first bit appears in the cycle after the
third rising `ser_clk` edge following the `frame_clk` edge. That delay is
two synchroniser stages plus the edge detector.

The header is `22'b1010101010_000000000000`: five `10` pairs, then twelve
zeros. It is set in `sbpe_pkg::HEADER`. This exact pattern is a choice of
this design.

## Modes and packet format

| `full_frame` input | pixels sent per frame                          |
|--------------------|------------------------------------------------|
| 1                  | all 1024, even those not written (they read 0) |
| 0                  | only pixels written during the previous frame  |

| `ADDR_OUT` parameter | packet                  | `PKT_W`           |
|----------------------|-------------------------|-------------------|
| 0 (default)          | `data[10:0]`            | 11                |
| 1                    | `{addr[8:0], data[10:0]}` | 20              |

Zero-suppressed readout is only useful with `ADDR_OUT = 1`. Without the
address, the receiver cannot tell which pixel a packet belongs to. The
packet layout with an address is this design's choice. The half a packet
comes from is known from its position: even slots are left, odd slots are
right. In zero-suppressed mode an all-zero packet marks the end of a half's
data. This assumes a pixel that was written has non-zero data or a non-zero
address.

## Top-level interface (pixel_readout_top)

| port                            | dir | meaning                                             |
|---------------------------------|-----|-----------------------------------------------------|
| `ser_clk`                       | in  | serializer clock, one output bit per cycle          |
| `rst_n`                         | in  | asynchronous reset, active low                      |
| `frame_clk`                     | in  | frame clock; each rising edge starts a frame        |
| `full_frame`                    | in  | 1 full-frame, 0 zero-suppressed; sampled at the frame change |
| `fe_we[NQ][2]` (`NPIX` bits)    | in  | front-end write strobes, [quadrant][half][pixel]    |
| `fe_data[NQ][2][NPIX]`          | in  | front-end data, `DW` bits per pixel                 |
| `ser_out[NQ]`                   | out | serial output of each quadrant                      |

Half 0 is the left half. The pixel index is the arbitration address:
higher addresses are sent first. The placement of these indices in the
physical 64 x 64 matrix is left to the user. Numbering pixels
column-by-column, or in an H-tree pattern, changes only the layout.

Parameters (defaults): `NQ = 4`, `LEVELS = 9` (512 pixels per half),
`DW = 11`, `ADDR_OUT = 0`. `HDR_W = 22` and the header pattern are in
`sbpe_pkg`. The controller requires `HDR_W >= PKT_W + 2`, and this is
checked at elaboration.

## Rate

A frame occupies 11286 serializer cycles per output:

| serializer clock | frame time | frame rate |
|------------------|------------|------------|
| 400 MHz          | 28.2 us    | 35.4 kfps  |
| 550 MHz          | 20.5 us    | 48.7 kfps  |

Keeping up with a 40 kfps frame clock needs at least 451 MHz. The four
outputs run in parallel, so the chip rate is the same as the quadrant rate.

## What this RTL does not contain

* The in-pixel ADC and other front-end electronics. They are represented only
  by the `fe_we` / `fe_data` write port of each pixel.
* The LVDS output drivers behind `ser_out`.
* Physical design. Clock-tree-free distribution of `readOutControl`, H-tree
  placement of the tree cells, clustering of pixel registers, and per-level
  NOR/NAND cell choice are layout and cell-level matters.
* Gating of the readout after the last pixel. The design keeps sending zero
  packets until the next frame instead.
* A trigger-latency memory for triggered zero-suppressed readout.

The asynchronous, edge-driven behaviour of the silicon is modelled
synchronously. `readOutControl` is a one-cycle pulse, and everything is
clocked by `ser_clk`. In silicon, the pulse's rising edge latches the bus and
releases the pixel, and its falling edge admits the next one. Here both
happen at one clock edge, and the next pixel's data has the following
2 x `PKT_W` cycles to reach the bus.

## Choices made in this design

The tree rules, the double-buffered pixel, the ping-pong between halves, the
11-bit packet, the 22-bit header length, the 11286-bit frame and the
4 x 1024-pixel organisation follow the architecture described above. The
following are choices of this implementation:

* the header bit pattern;
* the cycle at which each readout pulse falls, and its one-cycle width;
* the two-flop frame-clock synchroniser, and the restart of the output on
  every frame edge;
* clearing the write register at the swap;
* the wired-OR bus, with unselected or released pixels driving zeros;
* the `{addr, data}` packet layout for `ADDR_OUT = 1`;
* MSB-first bit order, and left half before right half;
* an idle zero output before the first frame after reset.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                | what it checks                                                                 |
|--------------------------|--------------------------------------------------------------------------------|
| `tb_sbpe_node`           | all input combinations of one node                                             |
| `tb_sbpe_tree`           | 512-pixel tree: random request patterns, then a walk that releases pixels one by one |
| `tb_pixel_cell`          | double buffer, both modes, bus gating, release by pulse                        |
| `tb_pixel_half`          | 16-pixel half: pixel order, data and address before every pulse, idle pixel 0  |
| `tb_readout_controller`  | cycle-exact swap/header/slot/pulse timing, pulse period 22, restart mid-frame  |
| `tb_output_serializer`   | header and packets MSB first with interleaved loading                          |
| `tb_quadrant_readout`    | one quadrant with 8-pixel halves against a reference model                     |
| `tb_pixel_readout_top`   | 4 quadrants with 16-pixel halves and addresses in packets; see below           |
| `tb_pixel_readout_full`  | the same test with every top parameter at its default (4096 pixels)            |
| `tb_worst_case_pattern`  | full-size quadrant; bus-toggling pattern (1 pixel in 8 all ones, the rest range bit only); 8 back-to-back frames |

The top-level tests compare every output bit with a reference model. The
sequence covers:

* full-frame frames;
* zero-suppressed frames, including a half with no data;
* front-end writes during readout, which test the double buffer;
* an early frame change;
* zero packets after the last pixel.

Each of these is counted, and a test fails if one never happened.

`tb_worst_case_pattern` checks the exact frame length of 11286 bits. It also
counts 128 bus swings per half per frame (11'b111_1111_1111 <-> 11'b100_0000_0000).

To simulate with Verilator (5.x), from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/sbpe_pkg.sv tb/tb_pixel_readout_top.sv \
          --top-module tb_pixel_readout_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The full-size testbench
takes several minutes to compile and about 12 s to run.

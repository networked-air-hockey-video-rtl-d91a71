# Air hockey table display for a networked two-player game

Two players, each at their own FPGA board with a PS/2 mouse and a VGA monitor,
play air hockey against each other over a direct Ethernet link. On each board a
soft processor does the game: it reads the mouse, moves the paddle, runs the
puck physics (wall bounces, paddle collisions), counts goals, and swaps puck
and paddle positions with the other board in small UDP packets. What the
processor does *not* do is draw. The hardware in this repository holds eight
small registers (two paddles, the puck, two scores) and paints the whole
640x480 table from them on the fly, pixel by pixel, while the monitor scans.
There is no frame buffer: moving the puck is one 16-bit bus write.

The RTL covers the FPGA logic of one terminal: the bus-programmable VGA
display and the 25 MHz clock the board's Ethernet chip needs. The processor,
its memory, the PS/2 port core, the Ethernet controller chip and all of the
game software sit outside and are not included.

## What is on the screen

The display decides the colour of each pixel from a set of shape tests that
all run in parallel on the current pixel (x, y), then picks the first one that
hits in this priority order:

| priority | shape | where | colour |
|---|---|---|---|
| 1 | goal slot | x = 0 and x = 639, lines 212..252 | red |
| 2 | puck | disc of radius 10 at the puck register | blue |
| 3 | paddles | discs of radius 10 at the local and the remote paddle | white |
| 4 | inside of goal arc | discs of radius 18 around (0,232) and (640,232) | table colour |
| 5 | field lines, goal arc | verticals at x = 140, 320, 500 on lines 0..464; discs of radius 20 around the goal centres | white |
| 6 | inside of centre ring | disc of radius 18 around (320,232) | table colour |
| 7 | centre ring, score text | disc of radius 20 around (320,232); "PLAYER 1:n" at x = 0, "PLAYER 2:n" at x = 500, lines 469..476 | white |
| 8 | table | lines 0..464 | table colour |
| 9 | score tab background | lines 465..479 | black |

Table colour is R = 0, G = 0x3E7, B = 0x3FF on the 10-bit DAC channels (a
cyan-blue); white and the pure colours use 0x3FF.

The rings are made by priority, not by a ring test: a radius-18 disc in the
table colour sits above a radius-20 disc in white, which leaves a 2-pixel
white ring. The goal arcs are centred at x = 0 and x = 640, so only their
right and left halves fall on the screen. The priority also settles overlaps
during play: the puck is drawn over a paddle it touches, and both are drawn
over the lines, rings and text. The quarter lines at x = 140 and x = 500 mark
how far the software lets each paddle move; the hardware draws them but does
not enforce anything.

### Circle test with a table of squares

`circle_hit` decides whether a pixel is inside a disc of radius r:
|dx| <= r and |dy| <= r (the bounding square), and dx^2 + dy^2 <= r^2. No
offset inside the bounding square exceeds 20, so the squares come from
`square_lut`, a 21-entry table of i*i, rather than from multipliers. The
offsets are taken as absolute values, so one test covers all four quadrants.
Each display holds nine such tests (three pieces, four goal discs, two centre
discs); they are combinational and all see the same pixel.

### Score tab

`score_text` renders "PLAYER n:d" in ten 6-pixel character cells: a 5x7 glyph
and one blank column per cell, on 8 lines starting at line 469. The glyphs
come from `glyph_rom`, which holds only the characters needed (digits, P, L,
A, Y, E, R, colon, space). The score register is shown as one decimal digit.
A game ends at 8 goals. A value above 9 shows as an empty cell.

## Register map

The display is a memory-mapped slave with 16-bit data and word addresses
(byte address = 2 x word address). It has no wait states, and readdata
follows the address in the same cycle. Writes take bits 9:0.

| word | register | value after reset |
|---|---|---|
| 0 | local paddle x | 525 |
| 1 | local paddle y | 112 |
| 2 | remote paddle x | 127 |
| 3 | remote paddle y | 127 |
| 4 | puck x | 320 |
| 5 | puck y | 232 |
| 6 | unused (reads 0) | - |
| 7 | player 1 score | 0 |
| 8 | player 2 score | 0 |

Coordinates are the centre of the piece in active-picture pixels (x 0..639
left to right, y 0..479 top to bottom). The software on the master terminal
writes the puck and its own paddle from its physics, and the other paddle
from received packets. The other terminal writes its own paddle and takes the
puck from the network. A register may be written at any time. A write in the
middle of a field takes effect from the next pixel drawn, so software that
wants whole frames writes during vertical sync. An assertion in `vga_regs`
flags a bus master that reads and writes in the same cycle.

## Raster timing

Standard 640x480 timing at a 25 MHz pixel rate (the 50 MHz board clock halved):

| | sync | back porch | active | front porch | total |
|---|---|---|---|---|---|
| pixels per line | 96 | 48 | 640 | 16 | 800 |
| lines per field | 2 | 33 | 480 | 10 | 525 |

This gives 31.25 kHz lines and 59.52 Hz fields, close enough to the nominal
59.94 Hz (25.175 MHz) mode for monitors. Both syncs are active low. The
porches include the 8-pixel and 8-line borders of the nominal mode.

Everything runs on the single 50 MHz clock. `clk_div2` toggles a flip-flop
to make the 25 MHz `VGA_CLK`, and its enable output lets the counters and the
output register step every second cycle. Colour, `VGA_HS`, `VGA_VS` and
`VGA_BLANK` are registered together in the pixel step after the counters
reach a pixel, so the four stay aligned. The picture lags the counters by one
pixel, and that lag is invisible at the connector. The outputs change when
`VGA_CLK` falls, so the DAC can sample on its rising edge. `VGA_BLANK` is low
outside the 640x480 area. `VGA_SYNC` (sync on green) is held low.

## Hierarchy

```
air_hockey_top        one terminal: display + Ethernet chip clock
├── clk_div2          25 MHz ENET_CLK
└── vga_raster        shape tests, priority mixer, output register
    ├── vga_regs      bus register file
    ├── clk_div2      25 MHz VGA_CLK and pixel enable
    ├── vga_timing    counters, sync, active area, x/y
    ├── circle_hit x9 disc tests
    │   └── square_lut x2
    └── score_text x2
        └── glyph_rom
```

`ah_pkg` holds the timing numbers, geometry, colours, reset positions, the
register addresses (`reg_addr_e`), the bus request struct (`bus_req_t`) and
the struct of register values handed to the drawing logic
(`disp_state_t`). The top's bus port is plain signals (`avs_*`). Inside it
they are packed into `bus_req_t`.

## Outside this RTL

- The soft processor, the SRAM controller, the JTAG UART, the generated bus
  fabric and the PS/2 port core are vendor components.
- The Ethernet controller is an external MAC/PHY chip. Its bus adapter is
  only wiring, and its 25 MHz clock is the `ENET_CLK` output here.
- The puck physics runs as software. It treats paddle-puck hits as elastic
  collisions, detected when the centre distance is at most twice the radius.
  The puck leaves with the paddle's speed, split along dx/d and dy/d.
- The mouse packet decoding and the 106-byte UDP position packets are
  software too. A UDP packet is 14 bytes of MAC header, 20 of IP, 8 of UDP
  and 64 of payload.

None of these touch the display except through its registers.

## Simulating

Each testbench is self-checking and prints one line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5, for
example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ah_pkg.sv tb/tb_ref_pkg.sv tb/tb_air_hockey_top.sv \
    --top-module tb_air_hockey_top
./obj_dir/Vtb_air_hockey_top
```

Substitute another `tb/tb_*.sv` for the others; `-Irtl` lets Verilator find
each module in `rtl/<name>.sv`. All run at full size in seconds.

| testbench | what it checks |
|---|---|
| `tb_air_hockey_top` | A scripted rally through the top's bus port: 8 fields, with positions written between fields, a goal and two score changes, and a register read back. Every pixel of every field is compared with a reference model. Each drawing mechanism must occur at least once: puck, both paddles, puck over a paddle, goal slot, goal arc, centre ring, field line, text. The ENET_CLK rate is checked. |
| `tb_vga_raster` | Three register settings (start-up picture, overlapping pieces, puck in the goal mouth with a paddle over the score tab), each checked pixel by pixel over a whole field. Also checks the sync widths (96 pixels, 1600 pixels = 2 lines), the 800-pixel lines, the 420000-pixel field and the blank window. |
| `tb_vga_timing` | The counters over two fields: line and field length, sync widths, 640x480 active area, x/y sequence and the field period of 840000 clock cycles. |
| `tb_vga_regs` | Reset values, and 300 random writes with and without chipselect, all addresses read back after each. |
| `tb_circle_hit` | Radii 10, 18 and 20 against a multiplying reference, over windows around fixed and random centres, including centres on the picture edge. |
| `tb_square_lut` | Every index 0..31. |
| `tb_score_text` | Both entries for scores 0..9 and 12 over the whole score-tab area, against glyphs drawn as text pictures. |
| `tb_clk_div2` | The toggle, and the enable being high with the half clock. |

`tb/tb_ref_pkg.sv` holds the reference picture model. It multiplies instead
of using the table of squares, and it keeps the font as `#`/`.` pictures, so
it shares no code with the RTL.

## Where this design departs from the original game

- **One clock.** The original clocks its raster logic from a toggled 25 MHz
  signal. Here all logic is on 50 MHz with a pixel enable.
- **Alignment.** The original registers every shape test and then the colour,
  so its picture trails the sync by two pixels. Here colour and sync are
  registered in the same step.
- **Blanking.** The original derives the DAC blank input from the sync
  pulses. Here it is low outside the active area. RGB is black there either
  way.
- **Porches.** Shapes are only drawn inside the active area. The original's
  tests also fire in the porches, where nothing is visible.
- **Font.** The score text uses a font and cell layout of this design's own,
  in the original positions: label at x = 0 and x = 500, on lines 469..476.
  The digit lands at x = 54 and x = 554, a couple of pixels left of the
  original's.
- **Score addresses.** The original's address decode for the two scores
  used a less-or-equal compare, so address 6 also wrote player 1's score.
  Here addresses 7 and 8 are decoded exactly, and 6 is unused.
- **Read path.** The original never drove its read data. Here it returns the
  addressed register.
- **Reset.** The original only gives start-up values as power-up
  initialisers, and its board top holds reset inactive. Here a synchronous
  active-low reset loads those values.
- **Goal arc.** The outer goal arc is taken as a radius-20 disc around the
  same centres as the radius-18 inner arc. That matches the original's
  constants and its screen picture, but the exact form of its test was not
  available.
- **Pixel clock.** The pixel rate is 25 MHz rather than the nominal
  25.175 MHz.

## Changing it

- **Geometry and colours** are `localparam`s in `ah_pkg`. A radius above
  `MAX_R` (20) needs `MAX_R` raised, which widens the square table.
- **Timing** numbers are also in `ah_pkg`. `vga_timing` uses them only
  through the package, so another mode means editing those constants and
  supplying the matching pixel rate.
- **New shapes** go in `vga_raster`: add a test next to the others and a line
  in the priority `always_comb`. The reference model in `tb/tb_ref_pkg.sv`
  must then be updated to match.

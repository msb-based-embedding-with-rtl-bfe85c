# Adaptive RGB pixel-indicator steganography engine

This design hides a secret bit stream inside a 24-bit RGB image, then protects
the result with a light integrity code that can say which pixel was changed.
It follows the method of the article "MSB Based Embedding with Integrity: An
Adaptive RGB Stego on FPGA Platform". The article targets a Cyclone II board
with an external 512 KB SRAM, a 50 MHz clock and a VGA output. Here the method
is implemented as synthesizable SystemVerilog:

- an embedding engine that streams the cover image and the message out of the
  SRAM and writes the stego image back;
- a VGA display that shows the cover and stego images side by side;
- a receiver that gets the message back and checks integrity;
- a four-switch key that gates all of it.

The number of bits hidden in a pixel depends on that pixel. The sender and
the receiver both work it out from bits that the embedding never touches, so
no side information travels with the image.

## How one pixel carries message bits

One of the three colour planes is the **indicator**. The other two are the
**data planes**. For every pixel:

1. **K = MSB(R) + MSB(G) + MSB(B) + 1**, so K is between 1 and 4.
2. The two LSBs of the indicator plane choose the data planes:

   | indicator LSBs | message bits go into                         |
   |----------------|----------------------------------------------|
   | `00`           | nothing                                      |
   | `01`           | the K LSBs of the *second* data plane        |
   | `10`           | the K LSBs of the *first* data plane         |
   | `11`           | K LSBs of the first, then K LSBs of the second |

   With red as indicator, the first data plane is green and the second is
   blue.
3. The chosen LSBs are simply overwritten by message bits.

Only bits 0..3 of a data plane ever change (K ≤ 4). The indicator plane and
all three MSBs stay as they were. The receiver therefore recomputes the same
K and reads the same indicator code from the stego pixel. A pixel carries 0 to
8 bits, about 2.5 bits per pixel on natural images.

Example, red indicator, message `1011 0110...`:

| cover pixel (R,G,B) | K | code | stego pixel       | bits used |
|---------------------|---|------|-------------------|-----------|
| 81, F0, FF          | 4 | 01   | 81, F0, **FB**    | 4         |
| 82, F0, FF          | 4 | 10   | 82, **FB**, FF    | 4         |
| 83, F0, FF          | 4 | 11   | 83, **FB**, **F6**| 8         |

**Choosing the indicator** (`method_sw`):

- `0`: red, always.
- `1`: the plane on `ind_sw` (0 R, 1 G, 2 B).
- `2`: cyclic. Red for pixel 0, green for pixel 1, blue for pixel 2, red
  again, and so on in raster order.

For a green or blue indicator, the two data planes keep R,G,B order:
green → (R, B), blue → (R, G).

Message bit order: message words are 16 bits and are consumed from bit 15
down. Within a plane, the oldest bit lands in bit K-1. When both data planes
are used, the first data plane takes the oldest bits.

## Integrity nibbles: locating a changed pixel

The last row and the last column carry no message. Instead, for each of R, G
and B separately:

- each last-column pixel of rows 0..N-2 gets, in its 4 LSBs, the XOR of the
  4 LSBs of the inner pixels in its row;
- each last-row pixel of columns 0..N-2 gets the XOR of the inner pixels in
  its column;
- the corner pixel gets the XOR of all those row and column results.

The upper nibble of each border pixel is kept. On one plane of a 4×4 block:

```
stego (inner)         after row results     after column results + corner
147 142 167 193       147 142 167 202       147 142 167 202
155 138 127 145       155 138 127 158       155 138 127 158
205 151 135 137       205 151 135 141       205 151 135 141
188 135 169 185       188 135 169 185       181 131 175 176
```

At the receiver, each recomputed row and column XOR is compared with the
stored nibble. A change to one inner pixel makes exactly one row and one
column disagree, and the pixel sits where they cross. A change to a border
pixel shows as a lone row or column mismatch, or as a corner mismatch.
Changes that cancel in the XOR, and several changed pixels, cannot be told
apart reliably. That is a limit of the code, not of this implementation.

Note: the corner value is the XOR of two quantities that both equal the XOR
of all inner nibbles, so it always comes out 0. It is kept as specified
because it still detects a change to the corner or to a border nibble.

## Memory layout and the 9-clock pixel-pair schedule

The SRAM is 256K × 16. Pixels are stored as a byte stream R,G,B,R,G,B,...
packed two bytes per word, the earlier byte in bits 7:0. A pair of pixels is
therefore exactly three words:

```
w0 = {G0, R0}   w1 = {R1, B0}   w2 = {B1, G1}
```

An N×N image takes 1.5·N² words: 98,304 for 256×256.

| region | default base | size for N = 256                                       |
|--------|--------------|--------------------------------------------------------|
| cover  | `18'h00000`  | 98,304 words                                           |
| message| `18'h18000`  | 32,768 words = 524,288 bits (worst case needs 8·255² = 520,200) |
| stego  | `18'h20000`  | 98,304 words                                           |

`stego_ctrl` handles one pixel pair in a fixed 9-clock slot. The SRAM does one
access per clock, and a read returns two clocks after it is requested.

| slot | SRAM access                          | datapath                          |
|------|--------------------------------------|-----------------------------------|
| S0   | read one message word, if the buffer holds ≤ 16 bits | |
| S1–S3| read cover words w0, w1, w2          | S2: message word enters the buffer; S3/S4: unpack w0, w1 |
| S4   | –                                    |                                   |
| S5   | –                                    | embed pixel 0, integrity, unpack w2 |
| S6–S8| write stego words w0, w1, w2         | S6: embed pixel 1                 |

`msg_buffer` holds up to 32 bits. A pair uses at most 16, and a word is
fetched whenever 16 or fewer are left. So the embedder never waits, and only
as many message words are read as the image consumes.

That gives 4.5 clocks per pixel: 9·N²/2 clocks from `start` to `done`.

| image   | clocks  | time at 50 MHz |
|---------|---------|----------------|
| 16×16   | 1,152   | 23.04 µs       |
| 32×32   | 4,608   | 92.16 µs       |
| 64×64   | 18,432  | 0.369 ms       |
| 128×128 | 73,728  | 1.475 ms       |
| 256×256 | 294,912 | 5.898 ms       |

These match the embedding times the article reports for its board.

Border pixels need results from the whole image. `integrity_gen` keeps them as
it goes:

- a running XOR for the current row;
- an N-entry array of column XORs (12 bits each: R, G and B nibbles);
- a running corner XOR.

The first row writes the column array instead of XOR-ing into it, so the
array needs no reset. The engine turns embedding off for the pixel that
`integrity_gen` reports as last row or last column.

## Display

`vga_timing` makes a 25 MHz pixel enable from the 50 MHz clock, with
standard 640×480 at 60 Hz timing:

- 800 × 525 pixels in total;
- sync pulses of 96 pixels and 2 lines, both active low.

Once `done` is high (and the key is set), `vga_display` takes the SRAM. At the
start of each line it reads the next line of the cover and then of the
stego image: 3N words, back to back. It stores them in one half of a
2 × 2N-pixel ping-pong line buffer, while the other half goes to the screen.

The layout is:

- the cover at columns 0..N-1;
- the stego image at columns N..2N-1;
- rows 0..N-1;
- black elsewhere.

Colours go to the DAC as 10 bits: the 8-bit value with its top two bits
repeated. Outputs are one pixel clock behind `hcnt`/`vcnt`.

## Receiver

`stego_decoder` is the far end of the channel. It takes a stego image as a
pixel stream in raster order (`rx_valid`, `rx_pix`). It must use the same
method and user indicator as the sender.

- For each inner pixel, `pixel_extractor` applies the rules above in reverse.
  The recovered bits come out the next clock, oldest bit in `rx_bits[7]`,
  with their count in `rx_nbits`.
- `integrity_check` recomputes the row and column XORs. When the image ends,
  `rx_done` rises and these outputs are valid:
  - `rx_ok`;
  - mismatch counts;
  - the first bad row and first bad column;
  - `rx_located`, set when exactly one row and one column disagree.

## Key

`auth_key` passes the four `key_sw` switches through a two-flop synchronizer
and compares them with the parameter `KEY` (default `4'b1011`). Without a
match:

- `start` is ignored;
- the display stays black;
- the receiver accepts no pixels.

## Modules

```
stego_top
├── auth_key          4-switch key
├── stego_ctrl        embedding engine, 9-clock pair schedule
│   ├── indicator_sel   method 1/2/3 indicator choice
│   ├── pixel_embedder  K adder, indicator compare, LSB substitution
│   ├── msg_buffer      32-bit message bit buffer
│   └── integrity_gen   row/column/corner XOR nibbles
├── sram_ctrl         SRAM pins, one access per clock
├── vga_timing        25 MHz enable, 640x480@60 syncs
├── vga_display       line fetch, ping-pong buffer, colour out
└── stego_decoder     receiver
    ├── indicator_sel
    ├── pixel_extractor
    └── integrity_check
stego_pkg             rgb_t, plane_e, method_e, K and plane helpers
```

`stego_top` ports:

- **Controls:** `clk` (50 MHz), `rst_n` (asynchronous, active low),
  `key_sw[3:0]`, `start` (pulse), `method_sw[1:0]`, `ind_sw[1:0]`.
- **Status:** `auth_ok`, `busy`, `done`, `embed_bits` (message bits hidden
  in the last image).
- **SRAM:** `sram_addr`, `sram_dq_o`, `sram_dq_oe`, `sram_dq_i`,
  `sram_we_n`, `sram_oe_n`, `sram_ce_n`, `sram_lb_n`, `sram_ub_n`. The
  bidirectional bus is split into out, enable and in, so the board-level
  tristate goes outside.
- **VGA/DAC:** `vga_clk`, `vga_r/g/b[9:0]`, `vga_hs`, `vga_vs`,
  `vga_blank_n`, `vga_sync_n` (held low).
- **Receiver:** `rx_start`, `rx_valid`, `rx_pix` in; `rx_bits_valid`,
  `rx_bits`, `rx_nbits`, `rx_done`, `rx_ok`, `rx_corner_bad`,
  `rx_bad_rows`, `rx_bad_cols`, `rx_err_row`, `rx_err_col`, `rx_located`
  out.

Parameters: `N` (image side, default 256, even, at least 4), `KEY`,
`COVER_BASE`, `MSG_BASE`, `STEGO_BASE`. The image size is fixed when the
design is built. A 16×16 image needs `N = 16`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog. `tb/tb_ref_pkg.sv` is an independent bit-level model of
embedding, extraction and the integrity code. `tb/sram_model.sv` is a
behavioural 256K × 16 asynchronous SRAM. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/stego_pkg.sv tb/tb_ref_pkg.sv tb/tb_stego_top.sv --top-module tb_stego_top
./obj_dir/Vtb_stego_top
```

Swap the testbench name for any other in `tb/`.

- `tb_stego_top` runs the whole design on 16×16 images, in this order:
  1. a wrong key must block the engine;
  2. all three methods, every stego word checked against the model, with
     exact clock counts;
  3. a full VGA frame compared pixel by pixel;
  4. the receiver recovering the message;
  5. the receiver locating one altered pixel.

  It counts each mechanism: key block, methods, indicator codes 00–11, K = 1–4,
  border nibbles, display, clean and located verdicts. It fails if any of them
  never happened.
- `tb_stego_top_full` does the same at the default 256×256 size with no
  parameter overrides. It runs in a few seconds.
- `tb_table2_sizes` runs the engine at 16, 32, 64 and 128 pixels square and
  checks the clock counts above.
- The remaining testbenches each cover one module.

## Limits and what has not been verified

- **Simulation only.** All testbenches pass in Verilator against a
  behavioural SRAM model, including one complete 256×256 run at the default
  parameters. Nothing has been tried on a board.
- **SRAM write timing.** `sram_ctrl` changes the address and WE on the same
  clock edge. That relies on the SRAM's zero address-setup and address-hold
  times. Check it against the actual part and the board skew, and add a
  turnaround cycle if needed; the schedule has two idle slots (S4, S5) to
  move writes into.
- **Real images.** The published quality and capacity figures depend on
  real photographs, which are not reproduced here. Tests use random images.
  `embed_bits` reports the capacity actually used for any image.

## Choices not fixed by the method

These choices are this design's own and can be changed locally:

- the byte packing and word order in SRAM, and the region addresses;
- the message bit order, and the data-plane order for green and blue
  indicators;
- the Method 3 cycle counts every pixel, border pixels included;
- the 9-clock schedule: its rate matches the published embedding times, but
  the slot contents are not given anywhere;
- the message buffer;
- the key value and its synchronizer;
- the display layout and its line-buffer fetch;
- the VGA porch widths (standard VESA values);
- the receiver's stream interface and report format;
- start/busy/done handshaking and reset behaviour.

Outside the design: the SRAM chip, the ADV7123 video DAC and any PLL are
board parts. The image-quality metrics (MSE, PSNR, capacity) are computed on
a PC. The design does not stop at the end of the message: it keeps reading
the message region until the image is full, so fill the unused part of the
region with padding.

Resource notes: the column array in `integrity_gen` and `integrity_check` is
N × 12 bits, and the line buffer is 2 × 2N × 24 bits. Both are written as
plain arrays that a synthesis tool can map to block RAM. The read of the
column array is asynchronous, so on an FPGA without asynchronous-read RAM it
becomes distributed RAM or registers. The embedding datapath itself
(`stego_ctrl` with its children) is small; most of the area of the full
design is the two column arrays, the display line buffer and the receiver.

Assertions: `msg_buffer` asserts that it never overflows or underflows.
`sram_ctrl` asserts that WE and OE are never active together, that the bus
is driven only during writes, and that CE is low for every access. Build
with `--assert` to enable them.

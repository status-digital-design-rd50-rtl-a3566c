# Digital read-out for a small monolithic pixel matrix

This RTL records particle hits in a matrix of pixels and ships them off-chip over one serial
line. Each pixel stores two timestamps: when its discriminator output went high (leading edge,
LE) and when it went low again (trailing edge, TE). Their difference is the time over threshold.
The logic below each column collects the hits of that column. A control unit gathers the words
of all columns. A 640 MHz serializer packs them into framed, 8b/10b-encoded 40-bit words. A
second, slower path writes and reads an 8-bit configuration memory in every pixel by shifting
bits through the pixels of a column.

The default configuration has 2 columns of 3 pixels each, an 8-entry FIFO per column, a
4-entry TX FIFO, 8-bit timestamps and 8b/10b encoding. It follows the digital periphery of a
monolithic sensor test chip as presented at a design status review. The review showed the
block structure, the state machines, word formats, clock counts and simulation waveforms. It
did not show the logic inside the blocks. Where it left a choice open, this implementation
made one; each is named below under "Own choices".

## Data flow at a glance

```
 hit_in_i ──► pixel_logic ×N_ROWS ──(active-low column bus, HIT_OUT, READ)──► eoc_readout ×N_COLS
                  ▲  ▲                                                         │  8×24 EOC FIFO
   ts_counter ────┘  └──── eoc_config ×N_COLS (config shift chain, LD[7:0])    │  token chain
                                                                               ▼
                             readout_cu ──► async_fifo (TX FIFO, 4×32) ──► tx_serializer ──► data_out_o
                             40 MHz                          │ 640 MHz        (enc_8b10b_word)
```

| Word | Bits | Layout |
|---|---|---|
| hit word (EOC FIFO) | 24 | `{pixel address[7:0], TE[7:0], LE[7:0]}` |
| data word (TX FIFO) | 32 | `{column address[7:0], hit word}`; for example, `0102E7F1` is column 1, pixel 2, TE `E7`, LE `F1` |
| line word | 40 | SOF `EE_EEEEEEEE`, EOF `FF_FFFFFFFF`, IDLE `3C_BC3CBC3C`, or a data word 8b/10b-encoded |

## Pixel: configuration memory and shift chain

Each pixel holds one shift flip-flop and an 8-bit memory (`cfg_o`, which drives the analog
front end). The shift flip-flops of a column form a chain: EOC → pixel 0 → pixel 1 → … → EOC.
Three control signals act on a pixel:

- **Shift.** While `SHIFT_EN` is high and the shift clock is enabled (`CK1`), the flip-flop
  takes the bit from the previous pixel.
- **Write.** `LD[k]` with `SHIFT_EN` high stores the flip-flop into memory bit *k*.
- **Read.** `LD[k]` with `SHIFT_EN` low copies memory bit *k* into the flip-flop, ready to be
  shifted out.

`eoc_config` runs one operation on bit *k* of every pixel of its column. The operation takes
`N_ROWS + 3` clocks, six for three pixels:

| clock | read | write |
|---|---|---|
| 0 | request recognised | request recognised |
| 1 | `LD[k]`, `SHIFT_EN` low: memory → flip-flops | (`SHIFT_EN` goes high) |
| 2 … N_ROWS+1 | shift; the chain output enters the column register | shift; the column register feeds the chain |
| N_ROWS+2 | – | `LD[k]`, `SHIFT_EN` high: flip-flops → memory |

A single `N_ROWS`-bit register serves for both directions. It sends its MSB into the chain and
takes the chain output into its LSB. After the shift clocks, bit *r* of the register belongs to
pixel *r*, both for `wdata_i` and for `rdata_o`. In the chip, `CK1` comes from a gated clock.
Here the gating is a clock enable, which behaves the same and keeps one clock domain.

## Pixel: hit recording and the column read-out

This is the part with the tightest timing.

1. **Edge capture.** The pixel samples `hit_in_i` (gated by the column's `hb_en_col_i`) with
   the 40 MHz clock. The first clock that sees it high stores the current timestamp as LE. The
   first clock that sees it low stores TE.
2. **Waiting.** The pixel then raises its `HIT_OUT`. The column ORs the flags of its pixels.
   A pixel ignores further pulses until it has been read.
3. **Synchronising.** The column `HIT_OUT` is asynchronous to the periphery clock, so
   `eoc_readout` passes it through two flip-flops. READ rises three clocks after `HIT_OUT`.
4. **Reading.** READ toggles: one clock high, one clock low. In the high clock, the waiting
   pixel with the highest address drives `{address, TE, LE}` onto the column bus, inverted
   (active low). The EOC pushes the word into its FIFO at the end of that clock. In the low
   clock, that pixel resets. A column therefore delivers at most one hit every two clocks.
   The reset clock is an architectural limit, not a choice.
5. **Bus wiring.** A pixel that is not driving outputs all ones, so the column bus is the AND
   of its pixels. A separate active-low valid line tells "pixel 0 with timestamps 0" apart
   from an idle bus.
6. **Backpressure.** READ is not raised while the column's FIFO is full. The hits then wait
   in the pixels.

## End of column, token chain and control unit

When the control unit requests data (`eoc_rqt_data`), every EOC with a non-empty FIFO moves its
oldest entry into a 32-bit data register and sets its flag. A token passes down the columns;
it stops at the first column whose flag is set. When the control unit reads (`eoc_rd`), that
column's word appears on its output bus one clock later, and the column's flag drops. In the
following clock the column refills its register from its FIFO. During that clock the token
passes to the next column that holds a word. With words waiting in several columns, the columns
therefore take turns and the control unit still receives one word per clock. A single column
delivers one word every two clocks. Column output buses are zero when idle and are ORed together.

`readout_cu` has four states: `CU_UNINIT` = 0, `CU_IDLE` = 1, `CU_READ_EOCS` = 2 and
`CU_DEBUG` = 3.

- **Normal mode (`CU_READ_EOCS`).** The unit reads every clock in which some column holds a
  word and the TX FIFO has room, counting the word still in flight. Words therefore move at one
  per clock until the TX FIFO is full. It returns to `CU_IDLE` when no column holds a word and
  no read happened in the previous clock; the extra clock covers a column that is refilling.
- **Debug mode (`debug_i`, `CU_DEBUG`).** The unit moves exactly one word and then drops the
  request, so the word stays on the column bus for inspection. It starts the next read-out
  cycle only after the TX FIFO has emptied.

The TX FIFO (`async_fifo`) is a Gray-pointer dual-clock FIFO from the 40 MHz domain to the
640 MHz domain. Its write-side count never understates the occupancy.

## Serial link: frames and encoding

`tx_serializer` sends 40-bit words MSB first, one bit per 640 MHz clock, with no gaps between
words. It has four states, `SER_UNINIT` = 0, `SER_IDLE` = 1, `SER_SEND_DATA` = 2 and
`SER_DEBUG` = 3. The state is chosen at the start of each frame.

| frame | words | when |
|---|---|---|
| idle | SOF, IDLE, EOF | TX FIFO empty at frame start |
| data | SOF, 1 … `MAX_FRAME` data words, EOF | normal mode; ends when the FIFO runs empty or after 4 words (one full TX FIFO) |
| debug | SOF, one data word, EOF | `debug_i` set |

The next word is chosen one clock early, at bit 38 of 0..39, so the flags never cost an extra
clock on the line. In that same clock the FIFO head is encoded into a register. The encoding is
done at every word boundary even when the word is not sent. At bit 39 the chosen word is
loaded, and a data word is popped from the FIFO.

`enc_8b10b_word` is a standard 8b/10b encoder for data characters. It takes bytes
most-significant first, carries the running disparity from byte to byte, and puts bit *a* as
the MSB of each 10-bit symbol. With negative starting disparity, `32'h0001E7F1` becomes
`40'h9D_1D4E3A31`, the value the original design's vendor encoder produced.

Running disparity carries across data words only; SOF, IDLE and EOF are fixed patterns. Set
`USE_8B10B = 0` to send a data word as `CD` followed by its 32 bits. That variant was used
for reading waveforms.

## Own choices (where the source description was silent)

- Discriminator edges are sampled with the 40 MHz clock. The chip latches them directly.
- A pixel offers its hit only after the trailing edge and records nothing until it has been
  read.
- The read-out priority is the highest pixel address first, through a priority chain. The
  column bus has an added valid line.
- The token rule is "first column in chain order whose register holds a word". The control
  unit leaves debug mode's wait when the TX FIFO is empty. The EOC output bus holds its word
  while neither request nor read is active.
- The configuration memory resets to zero. The meaning of its bits is not defined here; they
  are outputs.
- All columns perform the same configuration operation in parallel, with per-column data.
- The TX FIFO uses Gray-pointer synchronisation. The serializer synchronises `en_i` and
  `debug_i` with two flip-flops, and holds the line low until enabled.
- The column count of 2 is inferred from the data words shown, which carry column addresses
  0 and 1 only. The timestamp counter is binary; a Gray-coded counter was only planned.

## Not included

- **Analog front end.** The discriminator outputs enter as `hit_in_i`.
- **Slow-control interface (I2C/Wishbone).** Its outputs are the `cfg_*`, `*_en_i` and
  `debug_i` ports.
- **PDK clock-gating cell.** It is replaced by a clock enable.
- **Planned extensions of the original design.** A read-out mode controlled by a FREEZE
  signal and a Gray-coded timestamp counter were announced but not described.
- **Serialiser for several columns.** The original periphery may feed the column
  configuration registers through such a serialiser. Here they are loaded in parallel.

## Files

| file | contents |
|---|---|
| `rtl/rd50_pkg.sv` | word structs, state enums, frame constants |
| `rtl/pixel_logic.sv`, `rtl/pixel_matrix.sv` | pixel and the array of columns |
| `rtl/ts_counter.sv` | timestamp counter |
| `rtl/eoc_config.sv` | column configuration controller |
| `rtl/eoc_readout.sv`, `rtl/sync_fifo.sv` | end of column and its FIFO |
| `rtl/readout_cu.sv` | control unit |
| `rtl/async_fifo.sv` | TX FIFO |
| `rtl/enc_8b10b_word.sv`, `rtl/tx_serializer.sv` | encoder and serializer |
| `rtl/rd50_digital_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_figure_readout.sv`; `tb_8b10b_pkg.sv` is a reference 8b/10b encoder and decoder |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_rd50_digital_top rtl/rd50_pkg.sv tb/tb_8b10b_pkg.sv tb/tb_rd50_digital_top.sv
obj_dir/Vtb_rd50_digital_top
```

`tb_rd50_digital_top` runs the design at its default parameters and takes well under a second.
It covers the following:

- It writes and reads back all 8 memory bits of every pixel.
- It fires random bursts of hits and decodes the serial line with its own 8b/10b decoder.
- It compares every received word with the pulse that caused it.
- It counts each mechanism and fails if one never happens: configuration write and read,
  several waiting pixels in one column, words from both columns in one burst, back-to-back
  words from alternating columns, a full TX FIFO, idle frames, frames ending at four words,
  frames ending on an empty FIFO, and debug frames.

`tb_figure_readout` replays the read-out example of the original waveforms. All six pixels see
a pulse with LE `F1` and TE `E7`; the TE is taken after the 8-bit counter wraps. The testbench
expects the words in the order `0002E7F1`, `0102E7F1`, `0001E7F1`, `0101E7F1`, `0000E7F1`,
`0100E7F1`. That is the highest pixel first in each column, with the columns taking turns. The
words must arrive as a four-word frame followed by a two-word frame.

The block testbenches check the following:

- the 6-clock configuration cycle and the position of its LD pulse;
- the three-clock synchroniser latency;
- the one-hit-per-two-clocks column rate;
- the one-word-per-clock normal mode;
- the 40-clock word period;
- the 8b/10b code against independent tables.

To change the matrix size, set `N_COLS` and `N_ROWS` on `rd50_digital_top`. Column and pixel
addresses are 8 bits, so up to 256 of each are possible. `N_ROWS` must be at least 2, and both
FIFO depths must be powers of two.

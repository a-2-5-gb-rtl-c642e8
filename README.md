# ATM add-drop multiplexer for a 2.5 Gb/s slotted cell string

Many lower-speed ATM ports (155 or 622 Mb/s) share one 2.5 Gb/s path by hanging off a
string of add-drop nodes. The first node of the string, the *head end*, sends a
continuous flow of empty 53-byte cell slots down the string. Each node passes the flow
on. It **drops** the cells addressed to it onto a local port, leaving the slot empty, and
it **adds** cells from its local port into empty slots. There is no central
multiplexer: a node is added by plugging it into the string. Periodic OAM (operation and
maintenance) slots let every node check the link from its neighbour.

This RTL is the synchronous core of one such node: the high-speed mux/demux chip. The
slow side, with deep buffering, medium access control (MAC) and fine address filtering,
belongs to a companion chip that is not included here. The core follows the
architecture of a published GaAs chip (AMDA, an "ATM Mux Demux ASIC"). All formats the
publication leaves open were chosen here; they are listed under "Choices made in this
design" below.

## The high-speed path

The 2.5 Gb/s path is 8 bits wide at 311.04 MHz. It has three flags next to the data:

| signal | pin polarity | meaning |
|---|---|---|
| `soc` | high | first byte of a cell slot |
| `rs_n` | low | reserved slot: the slot holds an OAM cell |
| `vc_n` | low | valid cell: the slot holds an ATM cell |
| `d[7:0]` | | data; only meaningful in OAM and valid slots |

A slot is 53 clock cycles long: 53 × 3.215 ns = 170 ns. `rs` and `vc` are held for all
53 cycles of their slot. A slot with neither flag set is empty. Inside the chip the
flags are active high and travel as one packed struct, `amda_pkg::hs_beat_t`.

The chip's pipeline, in order along the path:

```
rx pins ──> stari_fifo ──┬──> oam_monitor (link check, status only)
 (rx_clk)   (to clk)     │
                         └──> select ──> demux ──> mux_ctrl ──> oam_inserter ──> tx pins
       slot_generator ───────┘ (head end)  │ drop    ▲ add                      (tx_clk = clk)
                                            ▼         │
                             32-bit downstream port   cell_buffer <── 8-bit upstream port
access_if: serial control/status port        clk_div: upstream and downstream clocks
```

In head-end mode the received stream is ignored and `slot_generator` supplies the
slots. The path from the FIFO output to the pins is three registers long: `demux`,
`mux_ctrl` and `oam_inserter` each add one cycle. The node drops before it adds, so it
can reuse a slot it has just emptied, and it never drops its own cells.

## Retiming at the receiver (`stari_fifo`)

Nodes can sit on different boards, so the link delay is comparable to the 3.2 ns clock
period. The transmitter therefore sends its clock with the data. The receiver takes the
data into a small FIFO on that clock and reads the FIFO on its own system clock. Both
clocks have the same frequency, but their phase is arbitrary and may drift. This scheme
is known as STARI, "self-timed at receiver's input". One beat goes in and one comes out
every cycle. If reading starts when the FIFO is about half full, it can neither
overflow nor underflow, and no skew budget is needed between chips.

The original chip used a self-timed (asynchronous) ripple FIFO. Here it is a clocked
dual-clock FIFO: pointers are Gray-coded and cross each domain through two flops. The
difficult part is the start-up point, because each side sees the other's pointer
about three cycles late:

- The reader starts once the fill it sees reaches `START` = DEPTH/2 − 3. The real fill
  is then about DEPTH/2.
- With `DEPTH` = 16 that leaves about four entries of margin each way. Depth 8 would
  overflow at start-up, because the writer sees the reads late.
- `overflow` (write domain) and `underflow` (read domain) are sticky error flags. The
  chip reports them in its status register, with `overflow` first synchronised to `clk`.

## Frames and link monitoring (`oam_monitor`, `oam_inserter`)

The OAM slots cut the stream into frames. Each OAM cell carries two values about the
frame it closes:

- byte 5: the number of valid cells in the frame;
- byte 6: the BIP-8 of the frame, the XOR of every byte of those valid cells.

Bytes 0 to 4 are left at zero. OAM slots carry no other data.

- **`oam_inserter`** (the Output module) counts the cells leaving the node and XORs
  their bytes. When the next OAM slot passes, it overwrites bytes 5 and 6 with those
  values. It runs after the add and drop stages, so the values describe the stream as it
  leaves this node.
- **`oam_monitor`** (the Input module's check) does the same on the retimed input and
  compares its values with bytes 5 and 6 of each OAM cell. A wrong count counts a count
  error; a wrong BIP-8 counts a parity error. It also checks that `soc` comes every 53
  cycles. A missing or early `soc` counts a slot error; the monitor then re-aligns to
  the `soc` it sees and drops frame sync.
- The first OAM cell after reset or after a slot error only opens a frame and is not
  checked. The status bit `in_sync` shows when frames are being checked.
- The counters are 8 bits wide and saturate. A write to any of the three counter
  registers clears all three. The monitor also keeps the last count and BIP-8 it
  received, for the controller to read.

## Head-end slot generation (`slot_generator`)

The generator sends one OAM slot, then `period` empty slots, then the next OAM slot,
and so on. `period` ranges from 1 to 255; 0 acts as 1. The OAM slot goes out with zero
data, and `oam_inserter` fills it in. The first slot after head-end mode is switched on
is an OAM slot.

## Adding cells (`cell_buffer`, `mux_ctrl`)

One cell is added in four steps:

1. The companion chip writes a cell, one byte per `up_clk` edge, while `up_ready` is
   high. `up_soc` marks byte 0. `up_clk` is `clk/16` for a 155 Mb/s port or `clk/4` for
   622 Mb/s.
2. After byte 52 the cell belongs to the system-clock side.
   - The hand-over uses a toggle: `cell_buffer` flips a bit, and the other domain sees
     the flip through two flops.
   - Only one side uses the 53-byte register file at any time, so the array itself
     needs no synchroniser.
3. `mux_ctrl` waits until a slot starts empty (no `rs`, no `vc`) while the MAC's
   `up_grant` is high. `up_grant` is a level, synchronised by two flops. `mux_ctrl`
   then sets `vc` for the whole slot and sends the cell, one byte per cycle.
4. After the last byte the buffer goes back to the writer, and `up_ready` rises again
   about three `up_clk` cycles later.

This strict one-cell cycle limits how fast a node can add, even with a free slot always
at hand and the grant always on. At 155 Mb/s a cell takes 848 clk to write. Hand-over,
waiting for the next slot and read-out add about 100 clk, and the cycle settles on 18
slots (954 clk): about 138 Mb/s of cells. That is somewhat below a full STM-1 payload
(149.76 Mb/s). At 622 Mb/s the cycle is 6 slots (318 clk): about 415 Mb/s. The companion
chip's buffering and MAC are expected to absorb bursts. `tb/add_rate_tb.sv` measures
both rates.

## Dropping cells (`demux`)

At the first byte of each valid cell, the first header byte is compared with the node
address. The test is `((byte ^ addr) & ~mask) == 0`, so a mask bit of 1 makes that
address bit "don't care".

- **Unicast cell** (bit 7 of the address byte clear): a matching cell is copied to the
  downstream port and removed from the string. Its slot leaves empty, with zero data.
- **Multicast or broadcast cell** (bit 7 set): a matching cell is copied but stays
  valid, so the nodes further down the string see it too.

The downstream port is 32 bits wide:

- Word 0 holds header bytes 0 to 3. Words 1 to 12 hold payload bytes 5 to 52. The first
  byte of each word is in bits 31:24.
- The HEC byte (byte 4) is not passed on; the companion chip can regenerate it.
- A cell is thus 13 words. Consecutive words are at least 4 cycles apart, even when
  every cell of the string is dropped, so a port read at `clk/4` keeps up with a full
  2.5 Gb/s drop.
- `ds_valid` pulses for one `clk` cycle with each word. `ds_data` holds the word until
  the next one. `ds_sop` and `ds_eop` mark words 0 and 12.

## Control port (`access_if`)

A slow serial port (about 2 MHz, oversampled by `clk`) sets up the node and reads its
status. Each frame is 16 bits, MSB first, sent while `scs_n` is low. `sdi` is sampled on
the rising edge of `sclk`.

| bits | content |
|---|---|
| 15 | 1 = read, 0 = write |
| 14:8 | register address |
| 7:0 | write data (ignored in a read) |

In a read, the chip shifts the register out on `sdo`. `sdo` changes on the falling edges
of `sclk`, from the 8th on, and the controller samples it on rising edges 9 to 16. A
frame that is cut short has no effect.

| addr | register | access |
|---|---|---|
| 0 | CTRL: bit 0 head end, bit 1 add enable, bit 2 drop enable, bit 3 155 Mb/s upstream | r/w, reset 0 |
| 1 | ADDR: drop address | r/w, reset 0 |
| 2 | MASK: drop address mask (1 = don't care) | r/w, reset 0 |
| 3 | OAM period | r/w, reset 1 |
| 4 | STATUS: bit 0 FIFO overflow, bit 1 FIFO underflow, bit 2 in frame sync | r |
| 5, 6, 7 | slot, count and parity error counters; a write clears all three | r, w clears |
| 8, 9 | count and BIP-8 from the last OAM cell received | r |

## Clocks and reset

| clock | rate | what runs on it |
|---|---|---|
| `clk` | 311.04 MHz | the system clock; almost everything, including the serial port's oversampling |
| `rx_clk` | same frequency as `clk`, any phase | the write side of the STARI FIFO |
| `up_clk` | `clk/4` or `clk/16` (from `clk_div`) | the write side of the cell buffer |
| `ds_clk` | `clk/4` (from `clk_div`) | offered to the companion chip; the downstream words themselves are timed by `clk` |

`tx_clk` is `clk` itself, forwarded with the data so that the next node can retime it.
A single asynchronous active-low reset, `rst_n`, serves every domain.

## Choices made in this design

Followed from the original design:

- the five-module split: Input, Mux, Demux, Output and Internal Access;
- the 8-bit 311.04 MHz path with SoC, RS and VC flags, and the 53-byte, 170 ns slot;
- receiver-side FIFO retiming, started half full;
- the one-cell upstream buffer with its write, grant, insert and ready cycle;
- the 1/4 and 1/16 upstream clock ratios and the 1/4 downstream ratio;
- the 8-bit address with mask, and multicast cells staying on the path;
- the 32-bit drop port;
- OAM cells carrying the cell count and parity of each frame;
- the 1 to 255 OAM period;
- a serial port for setup and OAM readout.

Chosen here:

- clocked dual-clock logic in place of the self-timed FIFOs;
- the FIFO depth (16) and its start threshold;
- the OAM cell layout (bytes 5 and 6) and BIP-8 as the parity;
- bit 7 of the address byte as the multicast mark;
- the header byte used as the address;
- leaving the HEC byte out of the drop port;
- drop before add;
- the serial protocol and register map;
- counter widths and clear-on-write;
- one shared reset;
- generating `up_clk` and `ds_clk` on chip.

Not in this RTL:

- the ECL/TTL pad circuits and the power supplies, which have no logic function;
- the companion chip (MAC, cell buffering, refined filtering);
- speed and power, which belong to the original full-custom GaAs circuit: it ran above
  500 MHz at 5 W.

## Files

| file | content |
|---|---|
| `rtl/amda_pkg.sv` | beat struct, configuration and status structs, register map, OAM byte positions |
| `rtl/amda_top.sv` | one node (top level) |
| `rtl/stari_fifo.sv` | receiver retiming FIFO |
| `rtl/oam_monitor.sv` | slot and frame check on the input |
| `rtl/slot_generator.sv` | head-end slot source |
| `rtl/demux.sv` | address filter, drop, 32-bit downstream packer |
| `rtl/cell_buffer.sv` | one-cell upstream buffer with clock-domain hand-over |
| `rtl/mux_ctrl.sv` | insertion into empty slots under the MAC grant |
| `rtl/oam_inserter.sv` | count and BIP-8 insertion into outgoing OAM cells |
| `rtl/access_if.sv` | serial control/status port and registers |
| `rtl/clk_div.sv` | upstream and downstream clock divider |

The top's only parameter is `STARI_DEPTH`, 16 by default. The blocks that track byte positions take
`CELL_BYTES_P` (53), and `demux` takes `DS_W` (32). All defaults are the values the node is meant to run
with.

## Testbenches

Each block has a self-checking testbench, `tb/<module>_tb.sv`, that ends with a
`TB_RESULT checks=N failures=M` line. `tb/spi_master.sv` models the serial controller.

The system test is `tb/amda_top_tb.sv`. It runs two nodes at default parameters in a
string, like a two-board test bed:

- **Setup.** Node A is the head end, adding cells at 155 Mb/s. Node B receives A's output
  over a link that delays clock and data by 2.3 ns, and runs its own clock at a
  different phase. B drops address 0x21 with mask 0x80 and adds cells of its own at
  622 Mb/s. The test configures both nodes over their serial ports.
- **Traffic checks.**
  - B's drop port delivers exactly A's cells for B, intact and in order.
  - B's output carries everything else, in order from each source.
  - Slots are 53 cycles apart, and B's outgoing OAM cells carry the right count and BIP-8.
  - B reports no errors, and its FIFO neither overflows nor underflows.
- **Fault injection.** A corrupted BIP byte, a corrupted count byte and a lost `soc` are
  put on the link. B must count each one, and the counters must clear.
- **Coverage.** The test counts how often each mechanism happened: OAM generation, adds
  at both nodes, waits for the grant, unicast drops and multicast copies. It fails if any
  of them never did.

`tb/add_rate_tb.sv` measures the sustained add rate of one node at both upstream rates.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module amda_top_tb \
    -Irtl -y rtl -y tb rtl/amda_pkg.sv tb/amda_top_tb.sv
./obj_dir/Vamda_top_tb
```

Replace `amda_top_tb` with any other testbench name. Each run takes seconds.

The simulation has only two states, so reset must reach every flop through a clock
edge or a falling edge of `rst_n`. The testbenches start with `rst_n` low and hold it
across clock edges; the two tests of whole nodes drive a falling edge of `rst_n`.

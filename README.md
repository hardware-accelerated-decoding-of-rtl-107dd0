# FIX/FAST market-data decoder and order-book builder

Exchanges publish market data as a stream of small UDP packets. Each packet
carries one FAST-encoded message: FIX messages compressed with templates,
presence maps, and operators that re-use values from earlier messages. This
RTL takes those packets straight from two Ethernet ports, one byte per clock.
It decodes the messages in hardware and keeps a price-level order book for
every symbol. Each time a book changes, the whole book (10 levels of bid and
ask) is presented for forwarding to a host.

It implements the architecture of a university project proposal ("Hardware
Accelerated Decoding of FIX/FAST and Book Building of Market Data", course
CSEE E4840, spring 2013). That proposal gives the pipeline structure, the
function of most units and worked examples of book updates. It leaves open
the FAST templates, the widths, the handshakes and most of the timing. Those
are choices made here, and the section "Specified versus chosen" lists them.

## The pipeline

Everything moves as 8-bit *flits*, one per clock, with no back-pressure
towards the network. There are five stages:

| stage | units (module) | cycles |
|---|---|---|
| 1. Ethernet drivers | vendor MAC/driver, not part of this RTL | – |
| 2. Packet processing | `channel_select` (grant + 2:1 mux), `packetizer` | 1 |
| 3. Feed arbitration and flit extraction | `feed_arbitrator`, `flit_counter`, `flit_identifier` | 2 |
| 4. FAST decoding | `ff_decoder` = template-ID register, 3 × `fast_template_fsm`, mux, `field_buffer` | 3 after the last field |
| 5. Book building | `book_builder` = `command_buffer`, `book_control_fsm`, `book_cache`, `book_memory` | 4 per command |

`fixfast_top` wires the stages together. `fixfast_pkg` holds every shared
type and constant.

End-to-end latency is 10 clock cycles, with an empty command buffer. It runs
from the cycle the last payload flit of a packet leaves its driver to the
cycle `snap_vld` presents the updated book. The end-to-end testbench checks
this number.

Without back-pressure, the book builder must keep up with the input. Each frame
carries one message. Even the shortest one takes 46 flits: 42 header flits,
then PMAP, template ID, side and level. The book builder needs 4 cycles per
command, so at a full flit per clock it is busy less than a tenth of the time.
Its 16-entry command buffer absorbs the short bursts where a command arrives
while the previous one is still executing.

### Stage 2: selecting a port and stripping headers

A driver raises `pkt_rdy` while it holds a complete packet that it has not
started to send. `channel_select` grants one driver at a time by raising its
`ack`. The driver streams the packet from the next cycle on, one flit per
clock, and marks the last flit with `end`. The grant covers exactly one
packet. The next grant is given in the same cycle as that `end` flit, so
waiting packets follow each other with no idle cycle, and the pipeline input
runs at a full flit per clock. When both ports wait, the port not served
last goes first.

`packetizer` assumes a plain Ethernet II / IPv4 (no options) / UDP frame.
The headers are flits 1–42, and the payload starts at flit 43. As the frame
goes by, the packetizer:

* adds the ten IP header words (flits 15–34) in one's complement. The sum
  is complete before the first payload flit arrives, so a frame with a bad
  checksum is dropped whole without buffering, and `cksum_err` pulses;
* takes the IP identification field (flits 19–20) as the packet's **serial
  number**. It travels beside the payload as a 16-bit side-band bus;
* takes the UDP length and stops the payload there, so Ethernet padding is
  never passed on.

The output is the UDP payload, with `sop`/`eop` marks, the serial number and
the channel.

### Stage 3: serial numbers and flit roles

`feed_arbitrator` keeps the last serial number seen on each channel. A packet
passes when its number is that value plus one (mod 2^16). The first packet on
a channel after reset also passes. Any other packet is dropped and `seq_err`
pulses. The new number becomes the reference either way, so the check
recovers after a gap.

`flit_counter` numbers the payload flits of each packet. `flit_identifier`
uses that number to tag each flit:

| payload flit | frame flit | role |
|---|---|---|
| 1 | 43 | presence map (PMAP) |
| 2 | 44 | template ID |
| 3 … | 45 … | field data |

So there is one FAST message per packet, at a fixed place.

### Stage 4: FAST decoding

This stage is the least obvious part of the design.

**Stop-bit integers.** Each byte of a field carries 7 value bits, most
significant group first. Bit 7 is set on the last byte of the field.
Unsigned fields start from zero. Signed fields (only the delta operator uses
them) take their sign from bit 6 of the first byte, so the accumulator starts
from all ones for a negative value. Values are 32 bits wide.

**Presence map.** The PMAP flit gives 7 presence bits, bit 6 first. One bit
is used, in field order, by each field whose operator allows it to be left
out (copy and default). Mandatory fields and delta fields are always sent and
use no bit.

**Operators and dictionary.** Each template FSM keeps the last value of each
of its fields:

| operator | in the stream | value used |
|---|---|---|
| none | always | the sent value |
| copy | if its PMAP bit is set | the sent value, otherwise the previous value |
| default | if its PMAP bit is set | the sent value, otherwise the template default |
| delta | always (signed) | previous value + sent value |

The dictionary starts at zero after reset. A message that is cut short, a
message with an unknown template ID and a dropped packet leave it unchanged.

**Templates.** The original description names three template FSMs but does not give
the templates. The ones built here (see `fixfast_pkg`) each produce one book
command:

| ID | command | fields in order (operator) |
|---|---|---|
| 1 | update | book (copy), side (default 0 = bid), level, price (delta), quantity, order count (default 1) |
| 2 | insert | book (copy), side, price (delta), quantity, order count (default 1) |
| 3 | delete | book (copy), side, level |

Example: an insert of 60 at 89.50 (8950 in cents) on the bid side of book 7.
Suppose the previous insert was at 8900 on book 7. Then the book field can be
left out, and the delta is +50:

    PMAP 0xA0 (book absent, count present)   TID 0x82
    side 0x80   price 0xB2   qty 0xBC   count 0x81

The template-ID flit starts the FSM it names. `tid_err` pulses for an ID
that names no template. The FSM's field counter then points at the first
field that is present. Each flit with the stop bit stores one field and
moves the counter to the next present field. After the last field, one cycle
(`EMIT`) resolves the absent fields, updates the dictionary and outputs the
command. If the packet ends first, `dec_err` pulses and nothing is emitted.
Bytes after the last field are ignored.

The mux, steered by the template-ID register, passes the command to the
**field buffer**. This one-entry register hands it to the command buffer
with valid/ready. A command that finds the field buffer still full is
dropped, and `fb_overflow` pulses. Minimum-size frames are 60 flits apart,
so this cannot happen while the book builder keeps up. The book builder
needs 4 cycles per command.

### Stage 5: book building

A command names a book (the symbol's index, used directly as the memory
address), a side, a level, and a price, quantity and order count. A book
holds `BOOK_DEPTH` = 10 levels per side. Level 1 is the best price: bids are
kept in descending price order, asks in ascending. Each level holds a price,
a quantity, an order count and a valid bit.

| command | effect on the side |
|---|---|
| update | level *n* gets the new price, quantity and count |
| delete | level *n* is removed; deeper levels move up one; the deepest becomes empty |
| insert | the new level goes in front of the first level that is empty or has a worse price (an equal price goes behind); deeper levels move down; the deepest falls off a full side; a price worse than all of a full side is ignored |

An update or delete of a level that is empty or outside 1–10 changes nothing,
and `cmd_err` pulses.

For each command, `book_control_fsm` runs four cycles:

1. **IDLE**: pop the command and read the book from `book_memory`.
2. **LOAD**: the book cache takes the fetched book.
3. **EXEC**: the book cache applies the command.
4. **WB**: write the book back and present it on `snap_vld`/`snap_idx`/`snap_book`.

`book_memory` holds 512 books, one 1620-bit book per word. A written flag per
book, cleared by reset, makes books that were never written read as empty.

Worked example (prices in cents), five levels per side:

    bid 8900/100 8850/160 8800/90 8760/150 8720/120   ask 9000/200 9050/150 …
    delete bid level 4    -> bid 8900 8850 8800 8720 (level 5 empty)
    insert bid 8950, 60   -> bid 8950/60 8900 8850 8800 8720
    update ask level 1 to 9000/100

`tb_book_cache` reproduces exactly this sequence.

## Top-level interface (`fixfast_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `d_pkt_rdy` | in | 2 | driver *i* holds a packet |
| `d_flit`, `d_vld`, `d_end` | in | 2×8, 2, 2 | driver flit streams, `d_end` on the last flit |
| `ack` | out | 2 | grant to driver *i*; the driver streams while it is high |
| `snap_vld`, `snap_idx`, `snap_book` | out | 1, 9, `book_t` (1620) | a book was updated: its index and full contents |
| `cksum_err` | out | 1 | frame dropped: bad IP header checksum |
| `seq_err` | out | 1 | packet dropped: serial number out of sequence |
| `tid_err` | out | 1 | unknown template ID |
| `dec_err` | out | 1 | message ended before its last field |
| `fb_overflow` | out | 1 | decoded command dropped (field buffer full) |
| `cmd_err` | out | 1 | command rejected by the book |
| `busy` | out | 1 | commands still in the book builder |

All error outputs are single-cycle pulses. The driver protocol: a driver
with `d_pkt_rdy` high may see its `ack` rise; from the next cycle on it puts
out one flit per clock until its `end` flit. Its `ack` falls in the cycle
the `end` flit is on the bus, unless it is granted again. `ack` is
combinational from `d_pkt_rdy` and the driver's flit signals, so the driver
must register its outputs.

## Not included

* **Ethernet drivers.** They come with the network board. Only their
  required behaviour is modelled, in `tb/eth_driver_model.sv` (simulation
  only): buffer a packet, stream it one flit per clock once selected, mark
  the end.
* **Host link.** Updated books are meant to reach the host as UDP packets
  over the board's own ASIC/PCIe path. No packet format is defined, so the
  design stops at the snapshot port.

## Specified versus chosen

Taken from the original description: two Ethernet ports with an ACK to the
selected driver; 8-bit flits at one per clock; header stripping with checksum
check and dropping; the serial number passed along and compared with
previous + 1 per channel; PMAP then template ID at the start of the payload;
three template FSMs, a template-ID register, a mux and a field buffer; a
command FIFO, a control FSM that fetches, executes and writes back, and a
book cache; the book layout and ordering; the effect of delete, insert and
update in its examples; 10-level books; 1 cycle for packet processing and 2
for feed arbitration and flit extraction.

Chosen here:

* The round-robin grant, and the next grant overlapping the current
  packet's end flit so that waiting packets follow with no idle cycle.
* The IP identification field as the serial number, carried as a side-band
  bus.
* IPv4 header checksum only.
* Padding removal by UDP length.
* Dropping and resynchronising on a serial-number gap.
* Flit roles counted after header removal. The description numbers the PMAP
  and template-ID flits 43 and 44 of the raw frame; that is the same flit.
* All FAST details: the templates, the template IDs, the operators, the
  one-byte PMAP and the 32-bit values.
* The field buffer depth (one) and the command buffer depth (16).
* The four-cycle fetch–load–execute–write-back sequence, without reusing a
  cached book between commands.
* Update overwrites the level. The description's example ("decrease level 1
  from 200 by/to 100") fits both overwrite and subtract.
* Insert by price, with equal prices placed behind.
* Prices as integers in cents.
* 512 books: the host software was meant to track up to 500 symbols.
* The error pulses and the reset behaviour.

## Simulating

Each module has a self-checking testbench, `tb/tb_<module>.sv`, that prints
`TB_RESULT checks=N failures=M`. `tb/fixfast_tb_pkg.sv` builds frames with
correct or broken checksums, FAST-encodes messages and holds a reference book
model written independently of the RTL. `tb_fixfast_top` runs the whole
pipeline at its default sizes. It sends about 1200 frames through both ports
and compares every book snapshot and error pulse with its own model.
`tb_book_examples` sends the worked book examples (the CLH3 delete / insert /
update sequence and a five-deep book with order counts) through the whole
pipeline as FAST frames. It compares the resulting books with the expected
tables. It also
requires each event to occur at least once: both ports waiting, bad
checksum, serial gap, unknown template, short message, padding, copy and
default operators, each command type, a level pushed out of a full side, and
a rejected command.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fixfast_pkg.sv tb/fixfast_tb_pkg.sv tb/tb_fixfast_top.sv \
        --top-module tb_fixfast_top
    ./obj_dir/Vtb_fixfast_top

Replace `fixfast_top` by any module name to run that module's testbench. All
of them finish in a few seconds.

## Changing it

* Book depth, number of books, and field widths: `fixfast_pkg`
  (`BOOK_DEPTH`, `NUM_BOOKS`, `PRICE_W`, `QTY_W`, `CNT_W`).
* Templates: the `TMPL_*` constants in `fixfast_pkg`. Each is a list of up to
  `MAX_FIELDS` fields, each with a destination, an operator and a default.
  Add a template by adding a `fast_template_fsm` instance and its ID in
  `ff_decoder`.
* Command buffer depth: the `CMD_DEPTH` parameter of `book_builder`.

# TGC Read-Out Driver (ROD) — SystemVerilog model

The ROD sits between the Star Switches (SSW) of the ATLAS Thin Gap Chamber
endcap trigger and the ATLAS data acquisition. For every Level-1 Accept
(L1A), each of its twelve Front End (FE) optical links delivers one SSW
fragment. The ROD:

- buffers the fragments;
- checks them against the TTC event identity: L1ID, BCID and trigger type;
- decodes the cell bitmaps into one word per hit;
- builds one ATLAS-format event record per L1A.

That record is sent out on the S-Link to the Read-Out Buffer. Sampled copies
go to a VME-readable pipe and to a pipe for the gigabit-ethernet monitoring
link. Anomalies are reported as exception messages. RODBUSY throttles the
trigger when buffers fill.

This repository holds synthesizable RTL for that data path (`rtl/`) and
self-checking testbenches (`tb/`).

## Architecture

```
 12 FE links ─► 4 × rx_fpga ──(4-bit command/response + 8-bit SelectLink)──► main FPGA
                 3 × fe_link_rx                                               4 × fragment_scheduler
                 cmd_resp_slave                                                   selectlink_rx
                 selectlink_tx                                                    fragment_processor ─► hit / tracklet / raw pipes
 TTC ─► ttc_if ─► EVENT ID + trigger-type FIFOs ─► event_manager ─► header pipe
                                                                  output_formatter ─► output FIFO ─► slink_mgr ─► S-Link
                                                                                   ├► VME event pipe
                                                                                   └► gigabit event pipe
 VME register bus ─► fpga_registers ─► configuration of every block; status and counters read back
 schedulers + processors ─► exception_arb (exception pipe, service request)
 FE buffer busy + EVENT ID FIFO almost full + force ─► rodbusy_ctl ─► RODBUSY
```

| File | Role |
|---|---|
| `rod_pkg.sv` | Word types, framing words, command codes, exception ids, header/record types, FCR1 bits |
| `sync_fifo.sv` | Synchronous FIFO with count and almost-full flag |
| `rod_pipe.sv` | Pipe: a data FIFO plus a control FIFO holding one `{status, word count}` record per fragment or event |
| `fe_link_rx.sv` | One FE link handler: framing, XOR check, word count, flags, buffer, busy |
| `cmd_resp_slave.sv` | RX FPGA end of the command-response channel |
| `selectlink_tx.sv`, `selectlink_rx.sv` | Byte-wide board-to-board link with an XOR check word |
| `rx_fpga.sv` | One RX FPGA: three link handlers, the slave and the transmitter |
| `ttc_if.sv` | BCID / L1ID / EVIDext / ORBIT counters, fake L1A, EVENT ID and trigger-type FIFOs |
| `event_manager.sv` | Takes one event at a time through the schedulers and writes its header record |
| `fragment_scheduler.sv` | Polls one RX FPGA and starts the transfer of each fragment |
| `fragment_processor.sv` | Parses, checks and decodes one fragment; writes hits, tracklets and raw words |
| `exception_arb.sv` | Exception pipe shared by all sources (round-robin) |
| `output_formatter.sv` | Builds the output record and does the sampling |
| `slink_mgr.sv` | S-Link output with XOFF flow control |
| `rodbusy_ctl.sv` | RODBUSY and busy time in microseconds |
| `fpga_registers.sv` | Control, command and status registers on the VME-side register bus |
| `rod_top.sv` | Whole ROD |

### Pipes

All buffering between processes uses the same pipe structure. A producer
writes words to the data FIFO and, at the end of a unit, writes one record to
the control FIFO: a word count plus status flags. A consumer waits for a
control record, so it knows the size of the unit before reading any of its
words. This lets the output formatter write every block's word count in the
block header without buffering the block a second time.

## Formats

### FE link words (16 bits)

Framing uses control-mode words: `0x0B0F` begins a fragment and `0x0E0F`
ends it. The `0x0000` halves of the 32-bit framing words are ignored. Data
words carry a 3-bit type in bits 15:13:

| Type | Meaning |
|---|---|
| 000 | event header (32 bits) |
| 010 | SLB header (32 bits) |
| 011 | SLB header 2 (32 bits) or SLB trailer (16 bits), selected by bit 12 |
| 100 / 101 / 110 | cell data for the current / previous / next bunch crossing (`0xDF00` = pad) |
| 111 | event trailer (32 bits) |

32-bit words arrive high half first.

Field positions used inside the 32-bit words are:

| Word | Bits | Field |
|---|---|---|
| Event header | 28:27 | record type (01) |
| Event header | 26:23 | SSW ID |
| Event header | 22:0 | RX mask |
| SLB header | 28:24 | SLB ID |
| SLB header | 15:12 | low L1ID |
| SLB header 2 | 26:22 | RX ID |
| Event trailer | 31:20 | end marker `0xFCA` |
| Event trailer | 19:16 | T1C / NRC / T2C / G-link flags |

A cell data word is `{type, 5-bit cell address, 8-bit bitmap}`, for cells
0..24. The 16-bit XOR over the whole fragment, checksum word included, must
be zero.

### Hit words (32 bits)

| Bits | Field |
|---|---|
| 31:30 | bunch crossing (0 previous, 1 current, 2 next) |
| 29:26 | FE channel |
| 25:21 | RX ID |
| 20:16 | SLB ID |
| 15:8 | bit number (cell × 8 + bit, 0..199) |
| 7:0 | zero |

Cells 0..19 are wire/strip hits and go to the hit pipe. Cells 20..24 are the
coincidence outputs and go to the tracklet pipe. At most `MAX_HITS` hits are
kept per event.

### Command-response channel

The main FPGA sends a command as two nibbles with `cmd_stb`: the code, then
an argument. The RX FPGA answers with four nibbles and `rsp_ack`.

| Code | Command | Response |
|---|---|---|
| 1 | `get_status` | Per link: `{ready, control FIFO empty, overflow, busy}` |
| 2 | `send_event`, argument = link | `{flags, 12-bit word count}`, then the fragment on the SelectLink |
| 3 | `get_occupancy` | Occupancy |
| 4 | `clear_overflows` | — |
| 5 | `enable_links` | — |

A separate all-links-ready line lets a scheduler skip polling.

The SelectLink sends each 16-bit word as two bytes, high byte first. After
the last word it sends a check word, the XOR of all the words.

### Exception messages

Each message is 32 bits: 2-bit type (info, event error, system error),
6-bit id, 24-bit context. The context identifies the link or processor
concerned; its exact contents depend on the message.

### Output record (32-bit words on the S-Link)

```
0xB0F00000                      begin control word (uctrl = 1)
0xEE1234EE, 9, 0x03010000       header marker, header size, format version
{00, 0x67 | 0x68, 00, RODID}    source ID (side A / C from the RODID side bit)
run number, {EVIDext, L1ID}, BCID, trigger type, ORBIT
per pipe: {kind, processor, 00, word count} + words    (kind 1 hits, 2 tracklets, 3 raw)
{16'h0, error summary}          status word
1, number of data words, 1      trailer
0xE0F00000                      end control word (uctrl = 1)
```

Raw blocks are included only with CR1_INCLUDE_SSW.

The error summary bits are:

| Bit | Meaning |
|---|---|
| 0 | link |
| 1 | format |
| 2 | XOR |
| 3 | timeout |
| 4 | too many hits |
| 5 | L1ID |
| 6 | SSW |

### Registers

The board's VME interface logic presents the FPGA's 1 MB register window
as a local bus: `reg_addr` (byte offset), `reg_wr`, `reg_wdata`, and a
combinational `reg_rdata`.

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x000 | SR1 | R | bit 0 service call pending, 19:16 low L1ID in processing, 20 S-Link LFF, 21 service call waiting, 22 S-Link down, 29 waiting for the links |
| 0x004 | FFR | R | bits 16+n: FE link n overflow; bit n: FE link n buffer busy |
| 0x008 | ERRS | R | error summary of the last event |
| 0x014 | FVER | R | firmware version |
| 0x01C | BTIME | R | accumulated RODBUSY time in microseconds |
| 0x028 | FEOUT | R | bit n: FE link n timed out in the last event |
| 0x108 | L1AP | R | L1ID being processed |
| 0x10C | NGIG | R | events sampled to gigabit ethernet |
| 0x110 | NEVS | R | events built |
| 0x200 | FCR1 | RW | control register 1 (bits below) |
| 0x204 | CMR1 | W | commands: bit 4 clear orbit counter, bit 5 one fake L1A |
| 0x210 | BCOF | RW | bunch-crossing offset loaded on BCR |
| 0x214 | RUN | RW | run number |
| 0x220 | TGCC0 | RW | Star Switch ID expected on FE links 7..0, 4 bits each |
| 0x224 | TGCC1 | RW | Star Switch ID expected on FE links 11..8 |
| 0x234 | RODID | RW | ROD ID, bit 7 = side |
| 0x238 | EMUTE | RW | event error bits that do not trigger CR1_ERRFMT sampling |
| 0x240 | TTACC | RW | trigger-type bits accepted for filtered sampling |

FCR1 bits:

| Bit | Name | Bit | Name |
|---|---|---|---|
| 0 | ALLFMT | 9 | TRIGGER_TYPE_INCLUDE |
| 1 | ERRFMT | 13 | SLINK_FORCE |
| 2 | FLTFMT | 19 | FAKE_L1A |
| 3 | GIGA_SAMPLE | 21 | OUTLENA |
| 4 | FLTFMT_GIGA | 22 | TTCENA |
| 5 | INCLUDE_SSW | | |
| 7 | INFOFF | | |

The other bits are stored but have no effect here.

A link whose TGCC nibble is zero is disabled. When the set of enabled links
changes, each scheduler sends `enable_links` again. An event start that
arrives during that command is held until the command completes.

## Behaviour worth knowing

- **Event flow.** One event is processed at a time. `event_manager` reads
  the EVENT ID FIFO, and with trigger-type inclusion it also waits for the
  trigger type. It then starts the four schedulers. The event closes when all
  of them are done and the pipes have room.
- **Fragment collection.** A scheduler visits its three links in order. If
  the all-links-ready line is high, it issues `send_event` at once.
  Otherwise it polls with `get_status`, and after `TIMEOUT_POLLS` empty polls
  it abandons the link for this event. It raises a timeout exception and
  sets the timeout bit.
- **RX FPGA buffer.** Fragments longer than `MAX_WC` are truncated and
  flagged "too long". A full buffer sets a sticky overflow flag, which
  `clear_overflows` resets. A buffer's almost-full flag drives RODBUSY.
- **Sampling.** Copies to the VME pipe are made under CR1_ALLFMT, or under
  CR1_ERRFMT when an error bit not muted in EMUTE is set, or under
  CR1_FLTFMT when the trigger type matches `ttacc`. Copies to the gigabit
  pipe are made under CR1_GIGA_SAMPLE. A copy is skipped while its pipe is almost full, so the
  S-Link path is not blocked; CR1_ALLFMT forces the VME copy.
- **S-Link.** Output stops while LFF (XOFF) or LDOWN is active, unless
  CR1_SLINK_FORCE is set. The clocks spent waiting on XOFF are counted.
- **Fake triggers.** CR1_FAKE_L1A produces an L1A every 512 clocks, which is
  78 kHz at 40 MHz. A single fake L1A can also be pulsed.

## Departures from the described hardware

- One clock domain. The G-link, SelectLink, TTC and main-FPGA clocks are
  taken to be the same clock.
- The ternary CAM / SRAM look-up and the CAM manager are not modelled. Hits
  are output as decoded bit numbers.
- Sector-logic and HipT fragments are not decoded; their format is not
  available.
- The gigabit-ethernet manager and MAC are not built. The gigabit event pipe
  is a FIFO read port of `rod_top`.
- The register block covers only what this data path uses (table above).
  Not provided:
  - the per-slave-board table (SBINFO);
  - system-error muting (EMUTS);
  - test events;
  - the history buffer;
  - service-call acknowledge;
  - debug registers;
  - the FIFO and memory windows.

  FCR1 and CMR1 bit numbers follow the order in which the bits are listed,
  since no numbers are given. RODBUSY forcing and the clear-overflows
  request come from the board's service logic and are `rod_top` inputs.
  Counters are also brought out as ports.
- Own choices are noted in each file header. They include the numeric
  exception ids, the field positions inside the 32-bit SSW words, the hit
  word layout, the output-record word values, and all FIFO depths.

## Sizing

At the default parameters, each FE link has an 8192 × 16-bit buffer with
512 fragment records: 48 KB per RX FPGA of the 80 KB of block RAM available.

The output path moves one 32-bit word per clock (160 MB/s at 40 MHz),
against about 20 MB/s at 100 kHz with 200-byte events.

## Testbenches

Each testbench checks itself. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Bench | Device | What it checks |
|---|---|---|
| `tb_sync_fifo` | `sync_fifo` | Random traffic against a queue model, flags |
| `tb_rod_pipe` | `rod_pipe` | Records, counts and status against a model |
| `tb_fe_link_rx` | `fe_link_rx` | Framing, XOR, too long, overflow, busy, enable |
| `tb_selectlink` | tx + rx | Words and check word under random back-pressure, corrupted check word |
| `tb_cmd_resp_slave` | `cmd_resp_slave` | Every command and response |
| `tb_rx_fpga` | `rx_fpga` | Fragments on three links read back through commands and the SelectLink |
| `tb_ttc_if` | `ttc_if` | Counters, BCR offset, ECR, ORBIT, fake L1A, FIFOs against a model |
| `tb_event_manager` | `event_manager` | Order, close conditions, header contents, trigger-type wait |
| `tb_fragment_scheduler` | scheduler + real `rx_fpga` | Shortcut, polling, timeout, disabled link, `clear_overflows` |
| `tb_fragment_processor` | `fragment_processor` | Every hit/tracklet/raw word; each error case raises its exception |
| `tb_exception_arb` | `exception_arb` | Arbitration, no loss, `info_off`, service request |
| `tb_output_formatter` | `output_formatter` | Every output word; VME/gigabit sampling rules |
| `tb_slink_mgr` | `slink_mgr` | Flow control, force, enable, counters |
| `tb_rodbusy_ctl` | `rodbusy_ctl` | Busy sources, microsecond counter |
| `tb_fpga_registers` | `fpga_registers` | Read-back, FCR1 decoding, TGCC link IDs/enables, CMR1 pulses, status registers |
| `tb_rod_top` | `rod_top` | See below |

`tb_frag_pkg.sv` builds SSW fragments with a known hit content. The benches
use it to predict the hit and tracklet words.

`tb_rod_top` runs the whole ROD at its default (full) size. It sets up the
ROD through the register bus, then feeds
twelve links and compares every S-Link word of clean events with a model.
BCID and ORBIT are not compared, because they depend on L1A timing. The phases are:

1. Events with and without raw blocks.
2. An XOR error, too many hits, a silent link that times out, and a fake
   L1A.
3. Filling one link's buffer until RODBUSY and overflow, then recovering with
   `clear_overflows`.
4. Forced RODBUSY.

At the end it prints how often each mechanism was exercised: shortcuts,
polls, XOFF clocks, VME and gigabit samples, errors, exceptions and busy
clocks.

## Simulating

With Verilator 5 (`--timing`), for example:

```
verilator --binary --timing -Irtl -y rtl -y tb \
    rtl/rod_pkg.sv tb/tb_frag_pkg.sv tb/tb_rod_top.sv --top-module tb_rod_top
./obj_dir/Vtb_rod_top
```

Replace `tb_rod_top` with any other bench name. The RTL is synthesizable
with Yosys (`read_verilog -sv`, with `rod_pkg.sv` first).

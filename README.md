# Reaching on-chip instruments through a chain of chips

Chips carry many embedded instruments: sensors, trim registers, test and
debug logic. They are connected inside the chip by an IEEE 1687 (IJTAG)
scan network. Once the chip sits on a board, a host often cannot reach that
network directly. It may have to go through another chip, and the links on
the way are functional ports such as UART or SPI, not a JTAG TAP.

This RTL builds such a path with two chips:

```
 host ──UART──► ic_a (level i) ──SPI──► ic_b (level i+1)
                bridge network          N instruments, each behind a SIB
```

Each chip has a small *access controller*. It turns a byte stream arriving
at the chip's functional port into scan operations on the chip's own 1687
network. The two chips use the same byte protocol. Chip A does not need to
understand chip B's commands. It forwards them as opaque payload, through
1687 instruments that are wired to the SPI port. Either chip could therefore
be designed without knowing the other. Read data comes back the same way:
from chip B over SPI into a register in chip A's network, and from there to
the host. Two variants of chip A's controller are provided:

* **interrupt-driven** (`HW_IRQ = 1`): chip A notices returned data by
  itself, reads it and sends it to the host;
* **polling-driven** (`HW_IRQ = 0`): the host must poll a flag instrument and
  then read the data instrument with ordinary commands.

## The byte protocol

Every command starts with two header bytes:

| command | byte 0 | byte 1 | follows |
|---|---|---|---|
| control | `0`, `W`, index[13:8] | index[7:0] | nothing |
| data | `1`, count[14:8] | count[7:0] | `count` payload bytes |

A **control command** selects instrument `index` (1-based; it is also the
number of the SIB in front of it). `W = 1` marks the instrument for writing
and `W = 0` for reading. Control commands accumulate in two registers: the
SIB control register SCR (which instruments to open) and the instrument
control register ICR (read or write per instrument). The first control
command after a data command clears both. One group of control commands
followed by one data command is one *access*. In PDL, the 1687 procedure
language, it corresponds to one `iApply` group.

A **data command** executes the access. Its payload holds the write data:
instruments in scan order (highest index first), each least significant byte
first, each starting on a new byte. For every instrument marked for reading,
the chip answers with its bits, in the same order and packed the same way.
The last byte of each instrument is zero-padded. The answer has no header
and contains nothing else.

Example: write `0x3C` to 8-bit instrument 1 and read 32-bit instrument 3:

```
40 01     control, write, instrument 1
00 03     control, read, instrument 3
80 01     data, one payload byte follows
3C        payload for instrument 1
```

The chip returns the four bytes of instrument 3, least significant byte
first.

### Wrapping for the next chip

To reach chip B, the host wraps chip B's complete command sequence:

```
40 01            control: write iA (instrument 1 of chip A)
80 LL            data: LL bytes follow
<chip B bytes>   LL bytes: chip B's control and data commands and payload
```

Each wrapping level adds exactly 4 bytes. `tb/tb_cmd_pkg.sv` has helpers
(`add_ctrl`, `add_data`, `wrap`) that build these sequences.

## How an access is scanned (`access_ctrl`)

This is the core of the design. The network is a flat chain of segments.
Each segment is an instrument register followed by its SIB:

```
tdi ─► [inst 1] ─► SIB1 ─► [inst 2] ─► SIB2 ─► ... ─► [inst N] ─► SIBN ─► tdo
```

A closed SIB bypasses its instrument. In the reset state the path is just
the N SIB bits. A data command runs two scans. Each scan is a capture
cycle, some shift cycles and an update cycle:

1. **Configuration scan.** N shift cycles move SCR into the closed SIB chain,
   SCR(N) first. The update opens the selected SIBs.
2. **Data scan.** The controller walks the active path from the `tdo` end:
   for k = N down to 1, one SIB bit, then, if SCR(k) is set, the ILM(k)
   bits of instrument k. ILM is the instrument length memory (`ilm_rom`),
   fixed when the design is built. The bit that enters at shift cycle j ends
   at path position j from `tdo`. The bit that leaves at cycle j came from
   that same position. So one walk builds the shift-in sequence and selects
   the useful output bits at once:
   * SIB bits are shifted in as **0**. The update at the end of the scan
     therefore closes every SIB again, and the next access again starts from
     an N-bit path.
   * Bits of a **write** instrument come from the payload, one byte at a
     time from the receive FIFO. The shift stalls while a byte has not
     arrived.
   * Bits of a **read** instrument are fed back from `tdo` in the same cycle.
     The filler the instrument receives is its own captured value, so the
     update leaves it unchanged. The outgoing bits are packed into answer
     bytes. The shift stalls while the previous answer byte has not been
     taken.

Without stalls an access takes `7 + 2·N + (sum of selected lengths)` clocks
after the second header byte. `tb_access_ctrl` checks this.

### Level-i extensions (`EXT = 1`)

In chip A the same controller runs `bridge_net`, and three additions make it
the bridge:

* **Streaming into iA.** When iA is marked for writing, each data scan takes
  one payload byte into iA's 8 data bits. The controller sets iA's ninth bit
  (data available) to 1 by itself. It repeats the configuration and data
  scans until the payload is used up. Before each repeat it waits while iA
  still holds a byte the SPI port has not taken (`stream_busy`).
* **Automatic acknowledge.** Whenever iB is read, the controller adds iD to
  the same scan with a 1. The update of iD tells the port that iB has been
  consumed.
* **Interrupt service** (`HW_IRQ = 1`). The iC flag is also wired to the
  controller. When the controller is idle and no command is being assembled,
  a set flag makes it run an internal access that reads iB (and thus
  acknowledges it). The byte goes to the host.

Payload bytes that no write instrument takes are read and discarded. If the
payload runs out early, zeros are shifted instead.

## The bridge instruments (`bridge_net`)

| # | name | bits | role |
|---|---|---|---|
| 1 | iA | 9 | byte to send + data-available bit; the SPI port clears the bit when it takes the byte |
| 2 | iB | 8 | last byte received from chip B (read-only) |
| 3 | iC | 1 | set when a byte arrived in iB (read-only) |
| 4 | iD | 1 | write 1: iB consumed, clears iC |

The SPI master receives only while iC is clear. iB therefore works as a
one-byte mailbox with back-pressure all the way to chip B's transmit FIFO and
its controller.

With polling, reading one byte from chip B costs two chip-A accesses: read
iC (the answer is one byte, `01` or `00`), then read iB. Each costs 4 bytes
of commands.

## Traffic on the host link

Every bit on the UART is either instrument data or overhead: control
commands, data-command headers, and, when polling, the one-byte flag answers
("dummy" bits). For the benchmark chip (instrument lengths 8, 16, 32
repeating) the two chip-A variants give these overhead totals in bits
(control + data + dummy):

| instruments | access | data bits | interrupt-driven | polling-driven |
|---|---|---|---|---|
| any | read instrument 1 | 8 | 32 + 32 + 0 = 64 | 64 + 64 + 8 = 136 |
| any | write instrument 1 | 8 | 64 | 64 |
| 50 | read all | 920 | 816 + 32 = 848 | 4496 + 3712 + 920 = 9128 |
| 50 | BASTION | 3680 | 4832 + 3264 = 8096 | 12192 + 10624 + 1840 = 24656 |
| 100 | read all | 1856 | 1616 + 32 = 1648 | 9040 + 7456 + 1856 = 18352 |
| 100 | BASTION | 7424 | 9632 + 6464 = 16096 | 24480 + 21312 + 3712 = 49504 |
| 150 | read all | 2800 | 2416 + 32 = 2448 | 13616 + 11232 + 2800 = 27648 |
| 150 | BASTION | 11200 | 14432 + 9664 = 24096 | 36832 + 32064 + 5600 = 74496 |

Writing all instruments costs the same as reading them with the
interrupt-driven chip, and the same in both variants. BASTION here means:
write all, read all, then for each instrument one write access and one read
access. The polling figures assume the best case, where every poll already
finds a byte. With this assumption, BASTION on 50 instruments has 1840 dummy
bits (230 returned bytes, one poll each). The figure usually quoted for that
case is 1848, which is one poll more. All other figures agree with the
published ones. `tb_workloads` measures every one of them on the RTL.

Chip-level area (CLB counts on an FPGA) is not characterised here.

## Functional ports

* `uart_rx` / `uart_tx`: 8N1 UART. `CLKS_PER_BIT` defaults to 868 (115200
  baud at 100 MHz). After a framing error the receiver waits for an idle line.
* `spi_master` / `spi_slave`: SPI mode 0 with **9-bit frames** in both
  directions. Each frame is a valid bit followed by one byte, MSB first, so
  one frame can carry a byte each way, or none. The slave drives `irq` while
  it has bytes to return. The master starts a frame when iB is free and it
  either has a byte to send or sees `irq`. SCLK = clk / (2 · `HALF_PERIOD`),
  default clk/8. The slave oversamples with two-flop synchronisers, so the
  two chips may run on separate clocks as long as SCLK ≤ slave clk / 8.
* `byte_fifo`: 16-byte receive and transmit buffers at each port.

In chip B the SPI slave's `irq` output is simply "transmit FIFO not empty".
It is an output of the slave block rather than a separate module, because it
carries no further logic.

## Files

| file | contents |
|---|---|
| `rtl/ijtag_pkg.sv` | widths, bridge instrument numbers, controller states, length rules |
| `rtl/sys_top.sv` | the two-chip system (top) |
| `rtl/ic_a.sv`, `rtl/ic_b.sv` | the two chips |
| `rtl/access_ctrl.sv` | command translator / scan controller |
| `rtl/ilm_rom.sv` | instrument length memory |
| `rtl/sib.sv`, `rtl/tdr.sv` | segment insertion bit, instrument register |
| `rtl/bench_net.sv`, `rtl/bridge_net.sv` | the two 1687 networks |
| `rtl/uart_*.sv`, `rtl/spi_*.sv`, `rtl/byte_fifo.sv` | ports and buffers |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_sys_full.sv` | one write-and-read-back access at the default size |
| `tb/tb_workloads.sv` | the benchmark access patterns with traffic accounting |

The scan network is synchronous. Capture, shift and update are single-cycle
enables on the system clock, with no TCK and no TAP state machine. The
instrument registers of chip B are loop-back registers: capture reads back
what the last update wrote. A real instrument would connect `cap_val` /
`upd_val` of `tdr` to its own logic.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `sys_top`, `ic_b` | `N_INSTR` | 150 | instruments in chip B (lengths repeat 8, 16, 32 bits) |
| `sys_top`, `ic_a` | `HW_IRQ` | 1 | 1 interrupt-driven, 0 polling-driven |
| `sys_top`, `ic_a` | `UART_CLKS_PER_BIT` | 868 | UART bit time in clocks |
| `sys_top`, `ic_a` | `SPI_HALF_PERIOD` | 4 | clocks per SCLK phase |
| `ic_a`, `ic_b` | `FIFO_DEPTH` | 16 | port buffer depth (power of two) |

The command format allows up to 16383 instruments and 32767 payload bytes
per data command. `ilm_rom` keeps lengths below 64 bits (`LW = 6`).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_sys_top rtl/ijtag_pkg.sv tb/tb_cmd_pkg.sv tb/tb_sys_top.sv
./obj_dir/Vtb_sys_top
```

Replace `tb_sys_top` with any other testbench. What they cover:

* `tb_sys_top`: both chip-A variants side by side (6 instruments), running
  single and all-instrument accesses and the BASTION sequence. It counts
  interrupt services, waits on iA, acknowledges, empty and successful polls,
  SPI return frames and payload stalls, and fails if any of them never occurs.
* `tb_workloads`: every pattern (read/write instrument 1, read/write all,
  BASTION) at 50, 100 and 150 instruments, in both modes. It checks the
  data and sorts the host's UART traffic into useful bits, control overhead,
  data overhead and dummy bits. For the interrupt-driven chip the overhead
  per access is 64 bits for a single instrument, and `16·N + 48` bits for an
  access to all N instruments. The polling chip adds 72 bits for every byte
  read back. Across BASTION at 150 instruments that gives 24096 against
  74496 overhead bits.
* `tb_sys_full`: the default build (150 instruments, 115200-baud UART)
  writes instruments 1, 74 and 150 and reads them back. It runs in a few
  seconds.

## Limits and choices to know about

* **No flow control towards the host.** A UART byte arriving while chip A's
  receive FIFO is full is lost. `uart_overflow` then sets and stays set. The
  SPI link drains bytes faster than the default UART delivers them, so this
  takes a host sending without pause into a stalled chip. Likewise,
  `spi_overflow` flags a full receive FIFO in chip B.
* **Host ordering.** The host should collect the answer of a read access
  before it sends the next data command. While chip A is busy streaming a
  command it does not service iC. If chip B's answers fill iB and chip B's
  FIFO while chip A waits to send, both sides wait on each other.

## What is taken from the published scheme and what is chosen here

Taken from the published scheme: the two command formats and their field
widths; SCR, ICR and ILM and the clearing of SCR/ICR by the first control
command of a new access; the order of the configuration and data scans
(highest SIB first) and the removal of all unused bits from the answer; the
wrapping of a far chip's commands as payload of a write to iA; the four
bridge instruments iA (9 bits), iB (8), iC (1) and iD (1), with iD set by the
controller whenever iB is read; the polling and interrupt-driven variants; a
UART host link and an SPI link between the chips, each moving one byte at a
time; the benchmark chip with 50, 100 or 150 flat instruments of 8, 16 and
32 bits, each behind its own SIB.

Chosen here, because the scheme leaves it open or to make the RTL work on
its own:

* **SIB bits in the data scan.** In the original description the data scan
  shifts each SIB's SCR bit again, so selected SIBs stay open. Here every SIB
  bit is shifted as 0 and the network is closed after each access. Both give
  the same answer bits. Closing makes every access start from the same
  N-bit path, so the configuration scan never has to know the previous state.
* **Read filler.** The dummy bits that push a read instrument out are its own
  bits, fed back from `tdo`, so reads do not disturb instruments.
* **Byte packing.** Each instrument starts on a new byte in both directions,
  least significant byte first, and its last byte is zero-padded.
* **Streaming into iA.** One payload byte per data scan. The controller
  generates iA's ninth bit and waits for the SPI port between bytes.
* **SPI framing and irq.** 9-bit frames with a valid bit, and an interrupt
  line from chip B. The original names SPI but gives no framing, so some way
  for chip B to say it has data was needed.
* **Sizes and rates.** 16-byte FIFOs, a 115200-baud UART at a 100 MHz clock,
  and SCLK = clk/8 are defaults chosen here.
* **Scan interface.** Single-cycle capture/shift/update enables on the
  system clock instead of a TAP.
* **Chip A's interrupt access** opens iB and iD only. Like any access, it
  leaves SCR/ICR to be cleared by the next control command.

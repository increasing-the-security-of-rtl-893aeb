# Two-port stateless FPGA firewall

This firewall sits in an Ethernet link between a protected LAN (port A) and
the outside network (port B). It filters every frame by IPv4 addresses,
protocol and TCP/UDP ports, in both directions, at 1 Gb/s line rate. The
central idea is **store first, decide alongside, send later**:

- Each received frame is written into a packet buffer while it streams in.
- At the same time, a combinational field extractor reads its headers.
- The moment the last byte arrives, a rule checker compares the extracted
  fields with up to 256 rules.
- The verdict is written into a small per-packet descriptor (a *control
  word*). A transmit engine walks those descriptors in arrival order and
  either sends the stored frame on or discards it.

No frame is ever modified. Nothing is kept between frames except counters,
so the firewall is stateless.

A host PC talks to the firewall over a 115,200-baud UART. Through it the PC:

- loads the rules of each direction;
- switches each direction between whitelist and blacklist;
- reads eighteen statistics counters per direction.

The RTL is plain synthesizable SystemVerilog. The Ethernet MACs/PHYs and the
clock generator are outside it. The top level receives two clocks (125 MHz
packet clock, 10 MHz UART clock) and one 8-bit byte stream per port and
direction.

```
             clk_10 domain                       clk_125 domain
  uart_rx --> uart_rx --> uart_controller --+--> fw_port u_ab : port A rx --> port B tx
  uart_tx <-- uart_tx <--        |          |
                   rules, mode,  |          +--> fw_port u_ba : port B rx --> port A tx
                   stats request/ack
fw_port:
  rx_* --> rx_control --+--> data_memory (16 kB) ------------------> tx_control --> tx_*
              |  ^      +--> control_memory (1024 x 40) -----------^   |
              |  |      +--> packet_analysis --> check_rules <-- rules_memory (256 x 224)
              |  +------------ verdict (fw_result, fw_completed) --+
              +--> fw_stats  <-- events from all of the above
```

## Contents

- [1. The control-word queue: how a packet moves](#1-the-control-word-queue-how-a-packet-moves)
- [2. The rule check in 18 cycles: banked rules memory](#2-the-rule-check-in-18-cycles-banked-rules-memory)
- [3. Header extraction and checksum](#3-header-extraction-and-checksum)
- [4. Buffer occupancy and the 12 kB / 5 kB hysteresis](#4-buffer-occupancy-and-the-12-kb--5-kb-hysteresis)
- [5. Latency budget](#5-latency-budget)
- [6. The PC link](#6-the-pc-link)
- [7. Clock domains and reset](#7-clock-domains-and-reset)
- [8. Top-level ports](#8-top-level-ports)
- [9. Where this RTL departs from, or adds to, the reference design](#9-where-this-rtl-departs-from-or-adds-to-the-reference-design)
- [10. Sizes and how far they were exercised](#10-sizes-and-how-far-they-were-exercised)
- [11. Simulating](#11-simulating)
- [12. Changing it](#12-changing-it)

## 1. The control-word queue: how a packet moves

This is the part that ties everything together. Each direction (`fw_port`)
owns three memories:

| memory | size | content |
|---|---|---|
| data memory | 16,384 x 8 bit | raw frame bytes, used as a ring |
| control memory | 1024 x 40 bit | one control word per buffered frame, used as a ring |
| rules memory | 256 x 224 bit | the rules of this direction |

A control word (`fw_pkg::ctrl_word_t`) is `{status[7:0], start[15:0], length[15:0]}`.
The status byte encodes the life of the packet:

| status | meaning |
|---|---|
| `00h` | slot free, or packet stored and still waiting for its verdict |
| `37h` | verdict: pass, transmit it |
| `2Ch` | verdict: blocked by the rules, discard |
| `21h` | verdict: checksum/frame error, discard |

Three pointers drive the queue:

- `i` is the next free byte in the data memory (RX side).
- `j` is the next free control word (RX side).
- `k` is the control word the transmitter is waiting on (TX side).

The receive steps (`rx_control`) are:

1. **Store (R2).** Each byte of an accepted frame goes to data address `i + offset`. The
   same byte, with its position, goes combinationally to `packet_analysis`.
2. **Close (R3–R5).** On the byte flagged `rx_last`:
   - `i` advances by the length `n`, `j` advances by one, and `n` is added to the used-memory count.
   - One cycle later, `FW_OUT` pulses and the control word `{00h, start, n}` is written at the old `j`.
3. **Verdict (R6).** `check_rules` raises `FW_COMPLETED` with `FW_RESULT`. In that same cycle
   `rx_control` rewrites the word at `j_old` with the status byte (`37h`,
   `2Ch` or `21h`) and keeps its start and length.
4. **Release (R9, R10).** When `tx_control` reports a slot as done (`TX_COMPLETED`
   with `TX_CADDR = k` and `TX_PCK_LENGTH`):
   - `rx_control` clears that control word and subtracts the length from the used-memory count.
   - It then answers with `TX_ACK`.
   - The control memory has one write port. The priority order is close (R3), then verdict (R6),
     then release (R9). A release only waits, it is never lost.

The transmit steps (`tx_control`) are:

1. **Poll (T1, T2).** The transmitter reads the word at `k` every cycle until its status is not `00h`.
2. **Send (T3, T4).** If the status is `37h`, it reads `length` bytes starting at `start` from
   the data memory and sends them as an AXI-stream-like byte stream:
   - a byte moves when `tx_dv && tx_ready`;
   - `tx_last` marks the final byte.

   Any other status skips the frame without reading it.
3. **Finish (T5).** It holds `TX_COMPLETED` until `TX_ACK`, then increments `k`.

Frames leave in the order they arrived, whatever their verdicts. A frame is
sent only after its own verdict, and blocked frames never reach the wire.

Because verdicts are written into the queue rather than handed over directly, the
rule checker and the transmitter never need to stall each other. The
transmitter may still be sending a long earlier frame while later verdicts
accumulate.

**Wrap-around.** The data pointer is taken modulo 16,384, so a frame may
straddle the end of the buffer. Addresses are computed modulo the depth on
both sides, and the ring must not be overrun. The occupancy logic (section 4)
guarantees that with a wide margin: the hysteresis stops accepting frames at
12 kB of a 16 kB buffer. A frame is also refused when all 1024 control words
are in use.

## 2. The rule check in 18 cycles: banked rules memory

The reference design has these properties, which pull against each other:

- the rules memory is 256 words of 224 bits with an 8-bit address;
- the rule check takes **18 clock cycles** from `FW_OUT` to `FW_COMPLETED`;
- up to 256 rules per direction.

Reading one rule per cycle would take more than 256 cycles. This RTL resolves
the conflict by **banking** the rules memory. The logical view stays 256 x 224
bits with an 8-bit write address. Physically, rule `r` is stored in bank `r % 16`
at row `r / 16`. All 16 banks are read with the same row address, so one read returns 16
rules (a 3584-bit word). `check_rules` then works like this:

1. On `FW_OUT` it latches the extracted fields, the type and the checksum flag.
2. It issues row addresses 0..15, one per cycle.
3. It evaluates 16 rules in parallel on each returned row, ORing the matches
   into a sticky `hit` flag.
4. It completes in the cycle after the last row's data arrives:
   16 rows + 1 cycle of read latency + 1 cycle to register = 18 cycles.

For `NUM_RULES` and `LANES` in general, the latency is `NUM_RULES / LANES + 2` cycles.

The **rule format** (`fw_pkg::rule_t`, 224 bits, most significant field
first) is this design's own. The reference only names the width.

| bits | field | meaning |
|---|---|---|
| 223:192 | `ip_src_lo` | lowest matching IPv4 source |
| 191:160 | `ip_src_hi` | highest matching IPv4 source |
| 159:128 | `ip_dst_lo` | lowest matching IPv4 destination |
| 127:96  | `ip_dst_hi` | highest matching IPv4 destination |
| 95:80   | `sport_lo`  | lowest source port |
| 79:64   | `sport_hi`  | highest source port |
| 63:48   | `dport_lo`  | lowest destination port |
| 47:32   | `dport_hi`  | highest destination port |
| 31:24   | `proto`     | IPv4 protocol number (6 TCP, 17 UDP, 1 ICMP) |
| 23:16   | `flags`     | bit 0 valid, bit 1 any protocol |
| 15:0    | reserved    | write 0 |

A rule matches when all of these hold:

- it is valid;
- its protocol matches, or it has "any protocol" set;
- each of the four packet fields lies inside its inclusive range.

A fully open rule is `0.0.0.0–255.255.255.255`, ports `0–65535`, flags `03h`.
Fields that a frame does not carry read as 0: ports of ICMP, and everything of ARP/IPv6. So
an ARP frame is matched only by a rule whose ranges include 0 and that allows
any protocol.

The verdict (`FW_RESULT`) is:

| condition | whitelist (`blacklist = 0`) | blacklist (`blacklist = 1`) |
|---|---|---|
| checksum/frame error | 0 (block) | 0 (block) |
| some rule matches | 3 (pass) | 1 (block) |
| no rule matches | 1 (block) | 3 (pass) |

So an empty whitelist blocks everything, and an empty blacklist passes
everything. The memory starts cleared, and the list mode is whitelist after reset.

The rules memory is a true two-clock memory: rules are written on the UART
clock and read on the packet clock. A rule written while a scan is reading
the same row may be seen old or new. Writes are rare and come from the
operator, so this design accepts that. Rewrite the rules while traffic is
stopped if exact switch-over matters.

## 3. Header extraction and checksum

`packet_analysis` adds no latency. Each field register captures its bytes as
they pass, chosen by `BYTE_NUMBER`. The fields are therefore complete at the clock
edge of the last byte, and valid in the `FW_OUT` cycle.

- Byte offsets are standard Ethernet II / IPv4. No VLAN tag is parsed.
  - `MAC_DEST`: bytes 0–5.
  - `MAC_SOURCE`: bytes 6–11.
  - EtherType (`LEV3_PROTOCOL`): bytes 12–13.
  - IPv4 protocol: byte 23.
  - Source address: bytes 26–29. Destination address: bytes 30–33.
- TCP/UDP ports are the first four bytes after the IP header. The header
  length comes from the IHL field, so IP options are handled.
- The type class (`FW_PCK_TYPE`) is 0 ARP, 1 TCP, 2 UDP, 3 ICMP, 4 IPv6, 5 other.
- **Checksum.** A running 16-bit ones'-complement sum is taken over the IPv4
  header. It must fold to `FFFFh`. A wrong sum, or `rx_err` on any byte of the
  frame, gives `FW_RESULT = 0` and status `21h`. Only IPv4 frames have a
  header checksum to check. The Ethernet FCS is the MAC's job and arrives as `rx_err`.

## 4. Buffer occupancy and the 12 kB / 5 kB hysteresis

The transmitter can be slower than the receiver, because the outgoing MAC may
deassert `tx_ready`. Frames therefore pile up in the data memory.
`rx_control` keeps an exact byte count of the frames held, from close (R4) to
release (R10), and applies a hysteresis:

- When the count reaches `HI_MARK` (12,288 bytes), `mem_full` is set. From then on,
  each new frame is **refused whole**: nothing is written and only the drop counters move.
- When the count falls below `LO_MARK` (5,120 bytes), `mem_full` clears and frames are
  accepted again.

The decision is made at the first byte of a frame, so a frame is never cut in
the middle. The marks are tested every cycle.

## 5. Latency budget

All numbers are in 8 ns cycles at 125 MHz, from the last received byte to
the first transmitted byte, with `tx_ready` high and an empty queue:

| stage | cycles |
|---|---|
| last byte to `FW_OUT` (control word written) | 1 |
| `FW_OUT` to `FW_COMPLETED` (16 rows + 2) | 18 |
| verdict written into the control word | 0 (same cycle as `FW_COMPLETED`) |
| control-word read, status check, first data read, `tx_dv` | 4 |
| **total** | **23 = 184 ns** |

The reference design quotes 27 cycles for the same span: 1 + 18 + 1 for the update + 7 for
the transmit decision. This RTL writes the verdict in the `FW_COMPLETED`
cycle and needs 4 cycles for the transmit decision. Adding the MAC/PHY
latencies of a typical 1G Ethernet subsystem (about 200 ns in and 211 ns
out) gives about 595 ns from wire to wire. Throughput is one byte per cycle
in each direction, which is exactly 1 Gb/s. Between frames the transmitter needs a
turnaround of a few cycles, which is less than the 20 byte times of preamble plus
inter-frame gap on the wire.

## 6. The PC link

The serial line runs at 115,200 baud, 8N1, from the 10 MHz clock (`CLKS_PER_BIT = 87`).
`uart_rx` samples each bit in the middle. `uart_tx` sends a start bit, 8 data
bits LSB first, and a stop bit.

`uart_controller` implements this command set (bytes in order):

| command | bytes | effect |
|---|---|---|
| write rule | `52h`, port, index, 28 rule bytes MSB first | writes rule `index` (0–255) of direction `port` (0 = A->B, 1 = B->A) |
| set mode | `4Dh`, port, mode | `mode[0]` = 1 blacklist, 0 whitelist |
| read statistics | `53h`, port | replies with 72 bytes: 18 counters of 32 bits, least significant byte first |

Unknown command bytes are ignored. Only bit 0 of the port byte is used.

**Statistics** (`fw_stats`, index : meaning). All are 32 bits, and counters wrap:

| idx | meaning | idx | meaning |
|---|---|---|---|
| 0 | frames received and buffered | 9 | verdicts on TCP |
| 1 | bytes received and buffered | 10 | verdicts on UDP |
| 2 | frames transmitted | 11 | verdicts on ICMP |
| 3 | bytes transmitted | 12 | verdicts on IPv6 |
| 4 | frames blocked, checksum/frame error | 13 | verdicts on other types |
| 5 | frames blocked by the rules | 14 | bytes in the data memory now |
| 6 | frames dropped, buffer full | 15 | peak bytes in the data memory |
| 7 | bytes dropped, buffer full | 16 | frames queued now |
| 8 | verdicts on ARP | 17 | times the buffer-full state was entered |

## 7. Clock domains and reset

Three things cross between the 10 MHz and the 125 MHz domains:

- **Statistics**: a four-phase handshake.
  1. The controller raises `REQ_STAT[p]` and holds it.
  2. `fw_stats` synchronises it with two flip-flops. On its rising edge, it copies all
     18 counters into the 576-bit `STAT_DATA` register and raises `ACK_STAT`.
  3. The controller synchronises `ACK_STAT`, then reads `STAT_DATA`. The register is
     stable until the next request.
  4. The controller serialises the data and drops the request.
- **List mode**: one bit per direction, passed through a two-flop synchroniser.
- **Rules**: the two-clock memory of section 2.

`rst` is asynchronous to both clocks. It is synchronised into each domain by
two flip-flops, and all logic uses synchronous active-high reset. The
memories are not reset: the control and rules memories start cleared, and the
data memory is only read where it was written. While reset is high, the
receive path ignores input and writes nothing.

## 8. Top-level ports

`firewall_top`, with one parameter, `CLKS_PER_BIT = 87`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk_125`, `clk_10` | in | 1 | packet clock, UART clock |
| `rst` | in | 1 | asynchronous reset, active high |
| `uart_rx` / `uart_tx` | in / out | 1 | serial line to the PC |
| `port_x_rx_data` | in | 8 | received byte, x = a or b |
| `port_x_rx_dv`, `_last`, `_err` | in | 1 | byte valid, last byte of frame, frame error |
| `port_x_tx_data` | out | 8 | byte to transmit |
| `port_x_tx_dv`, `_last`, `_err` | out | 1 | byte valid, last byte; `_err` is always 0 |
| `port_x_tx_ready` | in | 1 | MAC takes the byte when `dv && ready` |

The receive stream has no back-pressure: bytes come from the MAC in
consecutive or gapped cycles with `rx_dv`. A frame must be at least 20 bytes
long, so that one verdict is finished before the next `FW_OUT`. Real Ethernet
frames are at least 60 bytes without FCS. The FCS is assumed stripped by the
MAC.

## 9. Where this RTL departs from, or adds to, the reference design

- **Banked rules memory** (section 2): the reference gives one 224-bit
  read port, which cannot meet its own 18-cycle check for 256 rules. Here there are
  16 lanes.
- **Transmit decision of 4 cycles instead of 7**, and the verdict written in
  the `FW_COMPLETED` cycle. The total is 23 cycles instead of 27.
- **Control word at close.** The control word is written as `{00h, start, n}` when the
  frame closes. The reference's timing diagram hints at a slightly different
  sequence of writes; the written description was followed.
- **Release clears the word.** When a slot is released, its control word is cleared to zero.
- **Occupancy marks tested every cycle.** The reference tests the 12 kB mark after each packet has
  been processed. Here the marks are tested every cycle, and the decision is taken at a frame's first byte.
- **Invented formats.** The rule format, the range-match semantics, the UART command set and
  the statistics set and order are this design's own. The reference only fixes
  their widths (224-bit rules, 576-bit statistics) and their purpose.
- **Checksum.** The "checksum error" verdict is read here as an IPv4 header checksum
  error or a MAC-reported frame error.
- **`tx_err`** is never driven high.
- **Not included.** The MAC/PHY subsystems and the clock generator are not part of this RTL.
  A reference 10 Gb/s variant exists: a 64-bit datapath with byte-keep at 156.25 MHz,
  limited to 32 rules per direction. It is **not** implemented. This RTL is the 1 Gb/s,
  8-bit design.

## 10. Sizes and how far they were exercised

All parameters default to the full sizes:

- 16 kB data memory;
- 1024 control words;
- 256 rules in 16 lanes;
- 12 kB / 5 kB marks;
- 87 clocks per UART bit.

For both directions this is 456,704 bits of memory.

The end-to-end testbench `tb_firewall_top` runs the top **at these defaults**
(22 ms of simulated time, a few seconds of wall time):

- it loads rules over the UART in both list modes;
- it sends a mix of ARP/TCP/UDP/ICMP/IPv6 frames both ways;
- it throttles `tx_ready` to force the buffer-full hysteresis;
- it reads all statistics over the UART.

It checks each frame that comes out against a reference model, and counts
each mechanism: pass, rule block, checksum block, drop while full, both
modes, both directions, statistics readout. A mechanism that never happened
counts as a failure.

Each block has its own self-checking testbench in `tb/` (`tb_<module>.sv`).
Each prints `TB_RESULT checks=N failures=M` and has a watchdog. Timing
checks cover:

- the 18-cycle rule check;
- the 1-cycle `FW_OUT`;
- the 4-cycle transmit decision;
- the 23-cycle total;
- the UART bit timing.

`tb_fw_udp_rate` drives one direction, at its default sizes, with bursts of
back-to-back UDP frames of 100, 250, 500, 750 and 1000 bytes. Frames arrive
at line rate, one byte per cycle plus 20 idle cycles per frame (preamble and
inter-frame gap). The transmitting MAC is modelled with the same 20-cycle gap.
The test checks that:

- every frame is forwarded unchanged;
- none is dropped;
- the buffer never holds more than two frames;
- the output reaches the line-rate bound n / (n + 20).

The measured output rates are:

| frame size | output rate |
|---|---|
| 100 B | 0.831 Gb/s |
| 250 B | 0.927 Gb/s |
| 500 B | 0.962 Gb/s |
| 750 B | 0.975 Gb/s |
| 1000 B | 0.981 Gb/s |

In a second phase the same test stalls the transmitter and keeps sending
100-byte frames:

- the buffer stops at the 12 kB mark;
- later frames are refused and counted;
- once the transmitter runs again, the buffer falls below 5 kB after 69.9 µs,
  which is the line-rate drain time for 7 kB of 96-byte frames;
- after that, frames are accepted again.

`tb/tb_pkt_pkg.sv` builds Ethernet frames (with correct or deliberately wrong
IPv4 checksums) and rule words for all testbenches.

## 11. Simulating

With Verilator 5 (`--timing` is needed for the testbenches' delays):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fw_pkg.sv tb/tb_pkt_pkg.sv tb/tb_firewall_top.sv --top-module tb_firewall_top
./obj_dir/Vtb_firewall_top
```

The testbenches write their clocks in nanoseconds, for example `#4` for the
half period of 125 MHz, so pass `--timescale 1ns/1ps`. Replace
`tb_firewall_top` with any other `tb_<module>` to run one block, or with
`tb_fw_udp_rate` to run the sustained-rate test. To lint
the design alone:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/fw_pkg.sv rtl/firewall_top.sv --top-module firewall_top
```

Lint leaves two warnings, on purpose:

- **`fw_pkg::rule_match`:** the reserved rule bits and the MAC/EtherType fields are not used.
- **`uart_tx`:** the start bit of the shift register is never read back.

## 12. Changing it

- **More or fewer rules.** Set `NUM_RULES` and `LANES` on `fw_port`. The check takes
  `NUM_RULES / LANES + 2` cycles, and `NUM_RULES` must be a multiple of `LANES`.
  The check must finish before the next frame ends, so keep it under the shortest frame length (in cycles).
- **Buffer size and marks.** Set `DDEPTH`, `CDEPTH`, `HI_MARK` and `LO_MARK` on `fw_port`. Keep `HI_MARK`
  at least one maximum frame below `DDEPTH`.
- **Baud rate.** Set `CLKS_PER_BIT` = UART clock / baud.
- **Rule semantics.** Change `rule_t` and `rule_match` in `fw_pkg.sv`. The
  testbench package has a matching `make_rule`.

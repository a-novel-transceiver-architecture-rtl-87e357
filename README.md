# Four-lane parallel Ethernet transceiver

One gigabit serial link moves 8 bits per 125 MHz clock. This design moves a
32-bit word per clock instead. It cuts every word into four bytes and sends
each byte on its own 1 Gb/s lane, so four lanes carry 4 Gb/s between a
transmitting and a receiving FPGA. The lanes run no standard protocol stack.
Each lane wraps its share of a packet in a small frame with one header. The
receiver uses the header to decide whether the frame is meant for that port.
Then it strips the header and puts the words back together in their original
order.

```
 transmitter                                                   receiver
 ┌─────────┐ 32 ┌──────────┐ 8 ┌──────┐ 8 ┌───────────┐ 1 bit ┌─────────┐ 8 ┌──────┐ 8 ┌──────────┐ 32 ┌─────────┐
 │ tx_rom  ├───►│ memory_  ├──►│ FIFO ├──►│ frame_    ├──────►│ frame_  ├──►│ FIFO ├──►│ memory_  ├───►│ rx_ram  │
 │ (ROM)   │    │ splitter │   └──────┘   │ generator │ lane0 │ checker │   └──────┘   │ combiner │    │ (RAM)   │
 └─────────┘    │          ├──► ... lane 1, 2, 3 ...  ├──────►│  ...    ├──► ...      │          │    └─────────┘
                └──────────┘                           lanes   └─────────┘             └──────────┘
   application layer   |   transport layer       serial link      transport layer  |  application layer
```

The top module `pe_top` holds both ends. The four serial lanes leave the top
on `tx_serial[3:0]` and come back in on `rx_serial[3:0]`. The board closes
the link outside the design: lane *i* of the transmitter connects
point-to-point to lane *i* of the receiver. In the simplest case this is a
cable loopback on the same board.

## Splitting a word over four lanes

The splitter reads the transmit ROM one 32-bit word per cycle. It hands byte
*i* (bits `8i+7..8i`) to lane *i*, so lane 0 carries the first byte of every
word and lane 3 the last. Every lane gets the same number of bytes at the same
time. As a result, the four frame generators always send their payloads in
the same cycles. The combiner does the reverse. When every lane FIFO holds at
least one byte, it pops one byte from each and writes
`{lane3, lane2, lane1, lane0}` to the next RAM address.

A packet is 1024 words (4 KiB). Each lane carries a 1024-byte sub-packet of
it, and the four payloads go out in 1024 system cycles. A single lane would
need 4096 cycles. For a 128-bit packet (four words), each lane sends 32 bits
in 4 cycles. One lane would need 16 cycles.

## The frame on each lane

There is no standard protocol on the wire. Each lane sends its bytes least
significant bit first, in the following order:

| bytes | content |
|---|---|
| 7 | preamble `0x55` |
| 1 | start delimiter `0xD5` |
| 18 | header, most significant byte first: destination MAC (6), source MAC (6), destination IP (4), port (2) |
| 1024 | payload: this lane's byte of each of the packet's 1024 words |
| ≥3 | idle `0x00` (4 when packets follow back to back) |

The header type is `pe_pkg::pe_header_t`. A receive port accepts a frame only
if the destination MAC, destination IP and port all equal its own setting
(`pe_rx_cfg_t`, input `rx_cfg[i]`). The source MAC is carried but not
checked. No CRC is sent.

The preamble and delimiter are what let the receiver find byte boundaries in
a bare bit stream. The 16-bit pattern `0x55, 0xD5` (sent LSB first, as
`...1010 1010 1011`) appears at only one bit offset in preamble plus
delimiter. The checker looks for it only between frames, so payload bytes
that happen to contain it do no harm.

## Two clocks per lane

All parallel logic runs on `clk_sys` at 125 MHz. The serial bits run on
`clk_ser` at 1 GHz. The design assumes that both clocks come from one PLL
with their rising edges aligned, so there are exactly 8 serial cycles per
system cycle. This is the most delicate part of the design.

**Generator (system → serial).** The system side presents one new byte per
system cycle in a register. It also flips a toggle flip-flop every cycle. The
serial side passes the toggle through two flip-flops. On every change it loads
the byte register into an 8-bit shift register. That happens 2 to 3 serial
cycles after the byte changed and 5 cycles before it changes again. Between
loads, the register shifts out one bit per serial cycle. Because there is
exactly one load per system cycle, no byte is lost or repeated. This rule
holds only while the two clocks stay locked 8:1.

**Checker (serial → system).** The serial side registers the line and shifts
it into a 16-bit window. After the delimiter, it completes one byte every 8
serial cycles. Each byte goes into a 4-entry ring, with a flag that marks the
first byte of the frame. The ring's write pointer crosses to the system clock
in Gray code through two flip-flops. The system side then reads only entries
that are complete. Bytes arrive at exactly one per system cycle, so the ring
never holds more than two or three entries.

**Store and forward.** The serial line cannot pause in the middle of a frame.
So a generator starts a frame only once its FIFO holds the whole 1024-byte
sub-packet. That is why the transmit FIFOs are one sub-packet deep. While a
frame is on the wire, the splitter refills the FIFOs for the next packet. It
stalls (`tx_stall`) whenever a lane FIFO is almost full. That happens while
the preamble and header of each frame are sent, and on some payload cycles
while it keeps the FIFO topped up.

## Throughput and latency

- Payload: 4 lanes × 8 bits per 125 MHz cycle = 4 Gb/s while payload is being sent.
- Framing overhead: each 1024-cycle payload also needs 1 start cycle, 7 + 1
  preamble and delimiter cycles, 18 header cycles and 2 gap cycles. There is
  also one cycle in which the generator waits for the FIFO to refill
  completely. When packets are sent back to back, a frame leaves every 1054
  system cycles, which is about 3.89 Gb/s of payload sustained. The
  end-to-end testbenches check this period.
- Splitter: one word per cycle after a start pulse, with the ROM read one
  cycle ahead. `tx_done` comes one cycle after the last word is pushed.
- Receiver: a byte goes through the line register, the ring and the
  two-stage pointer synchroniser. It then leaves the checker a few system
  cycles after its last bit arrived. The combiner writes a word in the cycle
  after the slowest lane's byte has entered its FIFO.

## Rejected frames and lane skew

The receive FIFOs absorb skew between lanes. The combiner waits until all
four lanes have a byte, so lanes whose cables differ by a few bits (or bytes)
still reassemble correctly. A frame that fails the header check is dropped
(`rx_frame_drop`). That lane then delivers nothing for that packet. The
combiner keeps waiting, and the other lanes' payload stays in their FIFOs.
If more data arrives, those FIFOs overflow (`rx_overflow`, one pulse per
lost byte). So a packet is reassembled only if all four of its frames are
accepted. After a partial packet, however, the receiver can only
resynchronise through reset. A design that needs this should add a
per-packet flush.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MEM_WORDS` | 4096 | depth of the transmit ROM and the receive RAM, in 32-bit words (a whole number of packets) |
| `PKT_WORDS` | 1024 | words per packet = payload bytes per lane frame |
| `FIFO_DEPTH` | `PKT_WORDS` | depth of each of the eight lane FIFOs (at least `PKT_WORDS` on the transmit side) |
| `pe_pkg::LANES` | 4 | number of lanes (the 32-bit word fixes it at four bytes) |
| `pe_pkg::PREAMBLE_LEN`, `IFG_LEN` | 7, 2 | framing lengths |

The 32-bit word, the four 8-bit lanes, the 1024-word packet and the
125 MHz / 1 GHz clock pair belong to the architecture. The memory depth,
FIFO depth, frame layout, bit order, header field widths and both clock
crossings are choices made here.

The transmit ROM is filled at start-up with `word[a] = a × 0x9E3779B1 +
0x7F4A7C15 (mod 2^32)`. This is a test pattern. For real data, replace the
`initial` loop in `tx_rom.sv`, for example with `$readmemh`, or turn the ROM
into a RAM with a write port fed by the data source.

## Files

| file | module |
|---|---|
| `rtl/pe_pkg.sv` | constants, header and receive-setting types, ROM pattern |
| `rtl/pe_top.sv` | transmitter and receiver side by side |
| `rtl/pe_transmitter.sv` | ROM, splitter, four FIFOs, four generators |
| `rtl/pe_receiver.sv` | four checkers, four FIFOs, combiner, RAM |
| `rtl/tx_rom.sv`, `rtl/rx_ram.sv` | on-chip memories (synchronous read) |
| `rtl/memory_splitter.sv`, `rtl/memory_combiner.sv` | word ↔ four bytes |
| `rtl/byte_fifo.sv` | first-word-fall-through FIFO with overflow flag |
| `rtl/frame_generator.sv` | framing and 8:1 serialiser |
| `rtl/frame_checker.sv` | delimiter search, 1:8 deserialiser, header check |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_lane_monitor.sv` | testbench helper that decodes one serial lane |
| `tb/tb_pe_top.sv` | end to end at 64 words / 16-word packets |
| `tb/tb_pe_top_full.sv` | end to end at the default size (4096 words, 1024-word packets) |
| `tb/tb_pe_128bit.sv` | one 128-bit packet: payload must take 4 cycles per lane |

The end-to-end testbenches loop the lanes back through delay lines of 0, 5,
13 and 29 serial bits. They check that the receive RAM ends up equal to the
ROM, and that each packet's payload is sent by all four lanes together in
exactly `PKT_WORDS` cycles. They then change one lane's expected port and
check the drop and overflow behaviour. Each mechanism (stall, lockstep
payload, accepted frame, absorbed skew, packet completion, drop, overflow) is
counted and must occur. Every testbench prints
`TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/pe_pkg.sv tb/tb_pe_top.sv \
  --top-module tb_pe_top -Mdir obj_tb_pe_top
./obj_tb_pe_top/Vtb_pe_top
```

Replace `tb_pe_top` with any other testbench name. The full-size run takes
well under a second. The testbenches use a 1 ns serial clock and an 8 ns
system clock, with rising edges aligned. Verilator is a two-state simulator,
so every register that is read is reset.

## How far to trust it

- All modules compile under Verilator lint and the slang front end of Yosys.
  All testbenches pass. For each module, a deliberately broken copy was shown
  to fail its testbench.
- Verification is by simulation only. There is no timing closure and no
  hardware run. The clock crossings rely on the 1 GHz and 125 MHz clocks
  being edge-aligned and locked. With independent clocks, both crossings
  would need a proper asynchronous FIFO.
- The FIFOs use an array with an asynchronous read. This maps to distributed
  RAM on an FPGA. For 1024-deep FIFOs, a registered-read block-RAM FIFO would
  be the usual choice.
- Every lane has its own header, so the four lanes could in principle be
  addressed to different receiving applications. The receiver built here
  always recombines all four lanes into one word stream. A receiver that
  hands each lane to a separate consumer would replace the combiner.
- Only the four-lane arrangement is built. A single-lane variant, with one
  lane carrying whole words over four cycles, is not part of this RTL. Nor
  are wider arrangements (more lanes, or 10 Gb/s lanes), although the lane
  count is a package constant.

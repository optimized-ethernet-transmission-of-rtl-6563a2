# FADE: reliable raw-Ethernet data transmission from a small FPGA

A front-end board in a measurement system produces a continuous stream of
data words. They must reach a nearby computer over gigabit Ethernet with
nothing lost, using a few hundred slices and 32 KiB of block RAM. A TCP/IP
stack does not fit that budget. Its window must cover the long acknowledge
latency of a general-purpose network stack, and that needs far more buffer
memory.

This core uses a much smaller protocol on raw Ethernet II frames with
ethertype `0xfade`. There is no IP layer and no MAC core: a state machine
drives the PHY's GMII pins directly. The receiving computer acknowledges each
1024-byte packet from inside its kernel, which keeps the acknowledge latency
to microseconds. The FPGA keeps every packet until it is acknowledged, so 32
packet buffers are enough. Unacknowledged packets are resent in a cycle, and
the pause between frames adapts to the loss rate.

The protocol and architecture follow the FADE core published by
W. M. Zabołotny, "Optimized Ethernet transmission of acquired data from FPGA
to embedded system" (Proc. SPIE 8903, 2013). This RTL is an independent
implementation. Where it departs from that description, the text below says
so.

## The protocol

Frames run between the board (the FEB, front-end board) and the receiving
computer. All of them are Ethernet II frames with ethertype `0xfade`. A
16-bit opcode follows the ethertype.

| frame | direction | after the ethertype |
|-------|-----------|---------------------|
| START | to board   | `0x0001`, padding to 64 bytes |
| STOP  | to board   | `0x0005`, padding to 64 bytes |
| ACK   | to board   | `0x0003`, set number (16 bit), packet number (16 bit), padding |
| DATA  | from board | `0xa5a5`, set number (16 bit), packet number (16 bit), delay (32 bit), 1024 bytes of data |

The data stream is cut into *packets* of 1024 bytes. Packets are grouped into
*sets* of 32 packets, which is exactly what the board can buffer. A packet is
named by (set, packet), where the packet number is also the index of the
buffer that holds it. The receiving computer:

- sends START to begin;
- sends ACK for every DATA frame it has stored;
- acknowledges an already-stored DATA frame again at once, because its first
  ACK was lost or came late;
- sends STOP to end.

The delay field of a DATA frame carries the board's current inter-packet
delay, for monitoring.

All multi-byte fields are sent most significant byte first. Payload words
are 32 bits and are also sent most significant byte first. The frame
checksum (FCS) is the IEEE 802.3 CRC-32.

## Block structure and clock domains

```
           system clock                 transmitter clock
  dta ---> desc_manager ---------------> pkt_buf_mem ---> pkt_sender ---> txd/tx_en (GMII)
  dta_we     |  (nca)                    (dual-clock RAM)     ^
  dta_ready  +-------- cmd_status_sync ----------------------+
             ^
             +-------- ack_cmd_fifo <--- pkt_receiver <--- rxd/rx_dv (GMII)
                                          receiver clock
```

| module | domain | role |
|--------|--------|------|
| `fade_core` | all | top level: instantiates the blocks and a reset synchroniser per domain |
| `desc_manager` | system | Data Writer and Data Sender state machines, descriptors, head/tail/retr pointers, command handling |
| `nca` | system | congestion avoidance: adapts the inter-packet delay |
| `pkt_buf_mem` | system → transmitter | 32 × 1 KiB packet buffers, one write port and one read port on separate clocks |
| `cmd_status_sync` | system ↔ transmitter | carries one send request across and its completion back (toggle handshake) |
| `pkt_sender` | transmitter | waits the delay, then sends one DATA frame with preamble and FCS |
| `pkt_receiver` | receiver | checks incoming frames and extracts START/STOP/ACK |
| `ack_cmd_fifo` | receiver → system | Gray-pointer asynchronous FIFO of received commands |
| `fade_pkg` | – | protocol constants, field widths, the `cmd_t`/`tx_req_t`/`desc_t` types, CRC step function |
| `rst_sync` | each | asynchronous-assert, synchronous-release reset |
| `mii_tx`, `mii_rx` | transmitter, receiver | byte ↔ nibble converters, used only when the core is built for MII |

The three clocks may be completely unrelated. Only three paths cross between
domains:

- the packet buffer RAM;
- one request at a time through `cmd_status_sync`. Its data are held stable
  in a register while the toggle passes two flip-flops.
- the command FIFO.

## The buffer ring

This is the heart of the design, and the part most worth understanding before
changing anything.

The 32 packet buffers form a ring. Each has a descriptor:

- **set number** of the data it holds (16 bits);
- **V** (valid): the buffer has been filled completely;
- **S** (sent): it has been transmitted at least once;
- **C** (confirmed): its ACK has arrived.

Three 5-bit pointers move around the ring.

- **head** is the buffer being filled. When its last word is written, V is
  set and the writer tries to advance head. If `head+1 == tail`, every
  buffer is occupied: `dta_ready` drops (`full_stall` is high) until tail
  moves. Otherwise head advances, and the new head descriptor is cleared
  (V=S=C=0) with its set number incremented. After START all descriptors
  except buffer 0 hold set `0xffff`, so the first pass of the ring produces
  set 0 everywhere, the second set 1, and so on.
- **tail** is the oldest buffer not yet confirmed. Whenever the descriptor at
  tail has C=1 and tail ≠ head, tail advances by one, at one position per
  clock. So one ACK can release several buffers that were confirmed out of
  order. Tail never passes the buffer the sender is transmitting, so a
  buffer cannot be refilled while its frame is on the wire.
- **retr** walks the window [tail, head) one descriptor per clock. When it
  finds V=1 and C=0 and no transmission is in flight, it hands that buffer to
  the sender. The request names the buffer, its set number, the destination
  MAC and the current delay. On completion S is set. When retr reaches head
  it restarts at tail.

  As a result, every unconfirmed buffer is retransmitted cyclically until its
  ACK arrives. This works like a TCP sliding window fixed at 32 packets, with
  the retransmission period set by the window contents instead of a timer.
  When the window holds only one unconfirmed buffer, it may be resent before
  its ACK has had time to return. The receiving computer simply acknowledges
  it again.

An ACK is accepted only if the buffer it names has V=1 and C=0, and the set
number matches the descriptor. This rejects stale ACKs for the previous
occupant of a buffer.

The descriptors are a register array of 32 × 19 bits, not a RAM. This lets
the tail, writer, sender and ACK logic all read and write descriptors in the
same clock.

Commands are taken from the FIFO at one per system clock:

- START while stopped learns the computer's MAC from the frame's source
  address and resets the ring, the set numbering and the delay. If a frame is
  still in flight, START waits for it to finish.
- START while running only updates the MAC.
- STOP clears `running`. No further data are accepted and no further frames
  are requested; a frame already in flight finishes.

Data are accepted only while running.

## Congestion avoidance

`nca` counts completed transmissions, split by the S flag at the moment of
sending:

- first transmissions, `C_sent`;
- retransmissions, `C_rsnt`.

After every `NCA_INTERVAL` transmissions (10000 by default) it compares the
ratio and restarts both counters:

- `C_rsnt / C_sent > 1/8`: the delay is multiplied by 1.25;
- `C_rsnt / C_sent < 1/32`: the delay is multiplied by 0.75.

The thresholds and factors are powers of two, so the hardware needs no
divider or multiplier:

- `C_rsnt·8 > C_sent` and `C_rsnt·32 < C_sent`;
- `d + (d>>2)` and `d − (d>>2)`.

An increase adds at least 1, so a delay of zero can grow. The delay
saturates at 2^24−1. It is counted in byte times (8 ns on GMII, 80 ns on
100 Mb/s MII) and waited before each frame.

## Frame timing and throughput

A DATA frame on GMII is:

- 8 bytes of preamble and start delimiter;
- 24 bytes of header;
- 1024 bytes of payload;
- 4 bytes of FCS.

That is 1060 bytes, followed by a 12-byte gap, which makes 1072 cycles of
`tx_clk`. At 125 MHz the payload limit is 1024/1072 × 1 Gb/s = 955 Mb/s at
zero delay. The full-size simulation measures 946 Mb/s, with the
synchronisers' few cycles per packet accounting for the difference. The
original measurements reached about 921 Mb/s from one board through a real
switch and computer.

Sender timing:

- `tx_en` rises `delay + 2` clocks after the sender sees its start pulse.
- `done` pulses after the 12-byte gap.
- The request crosses to the transmitter domain in 2–3 `tx_clk` cycles.
- The completion crosses back in 2–3 `sys_clk` cycles.

The buffer size follows from the acknowledge latency: it must cover
rate × latency. At 1 Gb/s, 32 KiB covers up to about 260 µs. The
raw-Ethernet kernel handler answers in a few microseconds, so 32 KiB leaves
a wide margin. Routed TCP/IP latencies above 1 ms would need over 120 KiB.

## GMII and MII

By default the core drives a gigabit PHY over GMII, one byte per 125 MHz
clock. With the parameter `MII = 1` it drives a 10/100 PHY instead. The
nibble then travels on `txd[3:0]`/`rxd[3:0]`, the low nibble of each byte
first, with 25 MHz clocks for 100 Mb/s. `txd[7:4]` is driven to 0 and
`rxd[7:4]` is ignored.

The sender and receiver stay byte-oriented and take a byte strobe `ce`.

- On the transmit side, `mii_tx` raises `ce` every second clock and splits
  each byte into two nibbles. The sender's RAM read address names the word
  needed on the *next* clock, so payload fetch stays correct whether a byte
  lasts one clock or two.
- On the receive side, `mii_rx` skips the `0x5` preamble nibbles and aligns
  on the `0xd` nibble of the start delimiter. It hands the receiver a byte
  every second clock. It also gives a strobe with `rx_dv` low every idle
  clock, so the end of a frame is seen.

Over MII the same 1072 byte times per packet give at most 95.5 Mb/s of
payload. The MII end-to-end test measures 95.3 Mb/s; the original
100 Mb/s board reached about 94.5 Mb/s.

## Receiving side

`pkt_receiver` accepts a frame and writes one `cmd_t` entry to the FIFO
only if:

- the frame begins with a `0x55…0xd5` preamble;
- the FCS is correct, checked by running the CRC over the whole frame and
  testing the residue;
- `rx_er` was never asserted;
- it is at least 64 bytes long;
- its destination MAC equals `my_mac`;
- its ethertype is `0xfade`;
- its opcode is START, STOP or ACK.

The entry holds the kind, the source MAC, the set number and the packet
number.

A frame for this board that fails the CRC, length or `rx_er` checks pulses
`rx_bad_frame`. A valid command that finds the FIFO full is dropped
(`rx_dropped`). The protocol recovers from the loss: a lost ACK leads to a
retransmission and a new ACK.

## Top-level interface (`fade_core`)

| port | dir | width | domain | meaning |
|------|-----|-------|--------|---------|
| `rst_n` | in | 1 | async | reset, active low |
| `my_mac` | in | 48 | static | this board's MAC address |
| `sys_clk`, `dta`, `dta_we`, `dta_ready` | | 1, 32, 1, 1 | system | data input: a word is taken in each cycle with `dta_we && dta_ready` |
| `tx_clk`, `txd`, `tx_en`, `tx_er` | | 1, 8, 1, 1 | transmitter | GMII transmit (`tx_er` is always 0) |
| `rx_clk`, `rxd`, `rx_dv`, `rx_er` | | 1, 8, 1, 1 | receiver | GMII receive |
| `running`, `head`, `tail`, `retr`, `full_stall`, `tx_event`, `tx_resent`, `delay`, `nca_up`, `nca_down`, `tx_pending` | out | | system | monitoring |
| `tx_busy` | out | 1 | transmitter | monitoring |
| `rx_cmd_ok`, `rx_bad_frame`, `rx_dropped` | out | 1 each | receiver | monitoring |

The parameters are:

- `NPKT = 32`: buffers, which is also packets per set;
- `WPP = 256`: 32-bit words per packet;
- `DW = 32`;
- `NCA_INTERVAL = 10000`;
- `FIFO_AW = 4`: 16-entry command FIFO;
- `MII = 0`: GMII; 1 selects MII;
- `INIT_DELAY = 0`.

`NPKT` and `WPP` must be powers of two.

## Where this design departs from, or adds to, the original description

- **Address order.** The original frame table lists the source address
  before the target. This core sends Ethernet II order, destination first,
  because switches and network cards require it. The receiver takes the
  first address as the destination.
- **Field widths.** The original does not give them. Set and packet number
  are 16 bits each and the delay is 32 bits.
- **PHY interface.** The original drives the PHY directly but does not say
  over which interface. This core offers GMII (default) and MII. The
  original ran both gigabit boards and a 100 Mb/s board.
- **Synchronisers and FIFO structure.** The original only says that
  dedicated synchronisers, a dual-port memory and a FIFO carry the
  crossings. The toggle handshake, the Gray-pointer FIFO and its depth are
  this design's own choices.
- **START, STOP and data acceptance.** What START does while running, that
  STOP leaves the ring contents in place, and that no data are taken while
  stopped are this design's choices. So is taking the destination MAC from
  the START frame.
- **Command checks.** The ACK set-number check, and the rule that tail never
  passes the buffer in flight, are added for safety.
- **Delay.** The delay unit (transmitter clock cycles), the minimum step of
  1 and the saturation value are not in the original.
- **Monitoring outputs.** The monitoring outputs are additions.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values are
computed independently of the RTL. For example, `tb_eth_pkg` computes the
CRC-32 the textbook MSB-first way and self-tests it against
CRC-32("123456789") = 0xCBF43926.

| testbench | what it covers |
|-----------|----------------|
| `tb_pkt_buf_mem` | every address written and read back across two clocks |
| `tb_ack_cmd_fifo` | ordering, full/empty, random traffic between unrelated clocks |
| `tb_cmd_status_sync` | each request delivered once with its data, completion returned, with randomised spacing |
| `tb_nca` | delay rises above T_high, stays between the thresholds, falls below T_low; counter restart; clear |
| `tb_pkt_sender` | full default-size frames byte by byte: preamble, header, payload from memory, FCS, gap, delay in cycles |
| `tb_pkt_receiver` | valid START/STOP/ACK; rejects wrong MAC, wrong ethertype, bad FCS, short frame, `rx_er`, DATA opcode |
| `tb_desc_manager` | the ring at 8 × 4 words: retransmission, full stall, tail jumping over confirmed buffers, wrong-set ACK, wrap with set increment, delay increase, STOP |
| `tb_fade_core` | whole core against a model of the receiving computer (`host_model`), with an NCA interval of 64 |
| `tb_fade_core_full` | whole core with all parameters at default |
| `tb_fade_multi` | two cores into one gigabit link through a switch model with a 6-frame queue: drops, retransmission, delay increase, at least 800 Mb/s in total |
| `tb_fade_mixed` | a gigabit core and an MII core into one gigabit link through the same switch model: drops, retransmission, at least 800 Mb/s in total, the 100 Mb/s board keeps at least half its rate |
| `tb_fade_core_mii` | whole core built for MII at 25 MHz: 190 packets, payload rate, retransmission after 20 % loss, bad frame, STOP |

`tb_fade_core` runs the following sequence:

1. a START with a bad FCS, which must be ignored;
2. a real START;
3. a lossy phase, in which 30 % of DATA and 20 % of ACK frames are lost;
4. a clean phase;
5. STOP.

It fails if any of these mechanisms never happened: stall, retransmission,
duplicate acknowledgement, rejected bad frame, delay increase, delay
decrease, ring wrap, STOP. It also checks:

- every payload word;
- that no frame appears outside START..STOP;
- that the clean-phase payload rate is at least 900 Mb/s.

`tb_fade_core_full` runs one complete acquisition of 400 packets (12 sets):

- contiguous and correct data;
- no delay change before 10000 transmissions;
- at most 1 % resends on a clean link;
- payload rate at least 940 Mb/s.

`host_model` behaves like the receiving computer's kernel handler. It checks
each DATA frame's FCS and payload, acknowledges new packets after a short
latency, acknowledges repeats at once, and flags a set number outside the
two sets that can be in flight. It can drop frames at a chosen rate.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/10ps -Irtl -Itb \
  rtl/fade_pkg.sv tb/tb_eth_pkg.sv rtl/rst_sync.sv rtl/nca.sv rtl/desc_manager.sv \
  rtl/pkt_buf_mem.sv rtl/cmd_status_sync.sv rtl/pkt_sender.sv rtl/pkt_receiver.sv \
  rtl/ack_cmd_fifo.sv rtl/fade_core.sv tb/host_model.sv tb/tb_fade_core.sv \
  --top-module tb_fade_core
./obj_dir/Vtb_fade_core
```

It takes about 5 s. Unit tests need only `fade_pkg`, `tb_eth_pkg`, the
module and its testbench; `tb_desc_manager` also needs `nca.sv`.

Verilator lint and the slang front end of Yosys accept the RTL without
warnings. One output is constant: `tx_er`, which this core never asserts.

## Limits

- GMII and MII only; no RGMII or SGMII variant, and no 10 Mb/s test.
- No configuration frames; the protocol leaves room for them.
- Bandwidth sharing between boards has been simulated only for two
  identical gigabit boards and one model switch. The two boards reached
  900 Mb/s in total. The shares were not equal: by the end of the run one
  board had delivered 1589 packets and the other 1411. The
  congestion-avoidance rule steadies the total rather than balancing the
  shares. With a gigabit board and a 100 Mb/s board together the run gave
  795 and 90 Mb/s (885 Mb/s in total); the original measured about 711-715
  and 93 Mb/s for this pair. All three boards at once were not simulated.
- Nothing has been run on hardware. The results above come from simulation
  against a behavioural model of the receiving computer.

# Lightweight remote partial reconfiguration over Ethernet

An FPGA that reconfigures part of itself at run time needs the new partial bitstream to arrive from somewhere. Here it comes over a plain Ethernet LAN from a bitstream server. The target is meant to be lightweight: it has very little memory, and it must still keep its configuration port (ICAP) busy at close to the link's full speed. The design rests on two ideas:

* **A small link-layer protocol instead of a TCP/IP stack.** The server and the target exchange raw Ethernet frames. The target states how many packets it can buffer. The server sends bursts of that many packets and waits for an acknowledge after each burst. Any error, anywhere, restarts the whole bitstream from its first byte. Bitstreams are small and the LAN is nearly error free, so this costs little. In exchange, the target needs no retransmission store.
* **A producer/consumer buffer of only 2P+1 packets.** Received packets go into a circular buffer. The ICAP drains it at one byte per clock, while the next burst of P packets is already arriving. With P = 3 the buffer holds 7 packets of 1500 bytes, 10.5 KB in all, and that is enough to keep the link busy.

In the original system the protocol runs as software on an embedded PowerPC. In this RTL it is all hardware: an Ethernet MAC, two protocol state machines, the packet buffer and an ICAP writer. Both ends of the link are built: the target platform and the server node. They sit side by side in the top `rdp_system`, with the LAN between them left outside as ports.

```
            rdp_system
  +-------------------------------+            +---------------------------------------------+
  | rdp_server_node               |  srv_tx_*  | rdp_platform                                |
  |  rdp_server  <-> eth_tx ------+---(LAN)--->+-> eth_rx -> rdp_target -> pkt_ring          |
  |     ^  bs_addr/bs_data        |            |               |   (7 x 1500 B)    |         |
  |     |  (bitstream store)      |            |               v                   v         |
  |     +------ eth_rx <----------+<--(LAN)----+-- eth_tx <----+            icap_writer -> ICAP
  +-------------------------------+  tgt_tx_*  |  trace_uart (one character per event)  -> uart_txd
                                               +---------------------------------------------+
```

## The protocol

There are six message types. Each message travels as the payload of one Ethernet frame with EtherType 0x88B5. The payload starts with a 6-byte header:

| byte | content |
|---|---|
| 0 | type: 1 NAME, 2 N, 3 P, 4 DATA, 5 ACK, 6 NACK |
| 1 | reserved, 0 |
| 2-3 | sequence number, big endian. DATA: packet number 1..N. ACK: last packet accepted. |
| 4-5 | value, big endian. N: packet count. P: burst size. DATA: data bytes that follow. NAME: name length. NACK: error code. |

A DATA packet carries at most 1494 bitstream bytes. That is 1500 payload bytes minus the header, which keeps every frame within the standard 1518 bytes. A transfer goes like this:

1. *(Optional: master mode.)* The target sends NAME with a file name of up to 16 bytes. The server shows it on `srv_req_name` with a one-cycle `srv_req_valid`. The bitstream store answers with `srv_push`. Without a NAME request, the server starts a transfer on its own when `srv_push` is pulsed (slave mode).
2. The server sends **N** = ceil(length / 1494).
3. The target answers with **P** = max(1, (slots − 1) / 2). `tgt_mem_slots` gives the number of slots, so 7 slots give P = 3.
4. The server sends a burst of P DATA packets, numbered from 1.
5. The target checks each packet, then acknowledges after the P-th packet of each burst and after packet N. An ACK names the last packet accepted. The target sends an ACK only once the buffer has room for another full burst (count + P ≤ slots). This is the flow control: a slow ICAP holds back the ACK, and the buffer can never overflow.
6. After the ACK of packet N, both sides return to waiting. The target reports `tgt_done`. The server reports `srv_done`.

**Errors.** The target checks every packet for five errors: a bad FCS, an unexpected message type, a sequence number that is not the next one, a length the frame does not actually carry, and a full buffer. On any of them it:

* drops the packet being received;
* flushes the buffer and the ICAP pipeline;
* sends a NACK with the error code;
* goes back to waiting for N.

A NACK sends the server back to its start state, where it sends N again and re-sends the bitstream from packet 1. `srv_restarts` counts these restarts. Lost frames are also recovered, by timers of `TIMEOUT_CYCLES` (10 ms at 100 MHz):

* A target waiting for a packet sends a NACK with code 6 (timeout).
* A target whose NAME request goes unanswered repeats the request.
* A server waiting for P or for an acknowledge restarts the transfer.

Each timer restarts on every received byte, so a long frame never looks like silence.

Error codes: 1 FCS, 2 type, 3 sequence, 4 length, 5 overflow, 6 timeout.

The bitstream is written to the ICAP as it arrives. A restart therefore means that the ICAP has already taken part of the bitstream once. Making that safe is left to the bitstream and the ICAP, as in any restart-from-the-beginning scheme. `tgt_err` marks the point where it happens.

## Packet buffer and ICAP path

`pkt_ring` holds SLOTS slots of SLOT_BYTES bytes. Only the data bytes of each packet are stored there. `rdp_target` writes a packet's data into the tail slot while the packet arrives. It commits the slot, with its length, only when the frame's FCS is known to be good. A bad packet therefore costs nothing: its slot is simply written over. Reads from the buffer are registered, with one cycle of latency. The pointers wrap at SLOTS, which need not be a power of two.

`icap_writer` drains the head slot through a two-stage pipeline: buffer read, then the ICAP data register. It delivers one byte per clock, across slot boundaries too, which is the ICAP's peak rate. While `icap_busy` is high it holds the byte and stalls without losing data. The ICAP interface follows the 8-bit Virtex-II port: `icap_ce_n` and `icap_write_n` are active low, with `icap_i[7:0]` and `icap_busy`. No bit reordering is done.

## Ethernet side

`eth_rx` and `eth_tx` form a minimal MAC on an 8-bit byte interface in the style of GMII:

* `*_dv` frames the whole frame, preamble to FCS.
* `*_stb` marks each byte.
* `BYTE_CYCLES` = 8 paces the transmitter to 100 Mb/s from a 100 MHz clock.

Frame handling:

* The transmitter sends preamble and SFD, pads the payload to 46 bytes, and appends the FCS and a 12-byte gap.
* The receiver accepts only frames for its own address or the broadcast address, and only with the protocol EtherType.
* It checks the CRC-32 residue and strips the FCS.
* It flags payloads over 1500 bytes as bad.

Addresses: the target is 02:00:00:00:00:01 and the server is 02:00:00:00:00:10. Both are parameters.

`trace_uart` sends one ASCII character per protocol event at 115200 baud, 8N1: `R` name request, `N` session start, `A` ACK, `E` NACK, `D` done, `T` timeout. A 16-entry FIFO buffers the characters and counts any that are dropped.

## Files

| file | module |
|---|---|
| `rtl/rdp_pkg.sv` | message types, header layout, CRC-32 step function |
| `rtl/eth_rx.sv`, `rtl/eth_tx.sv` | MAC receive and transmit |
| `rtl/rdp_hdr_rx.sv` | parses the 6-byte header of a received message |
| `rtl/rdp_target.sv` | target protocol state machine |
| `rtl/rdp_server.sv` | server protocol state machine |
| `rtl/pkt_ring.sv` | circular packet buffer |
| `rtl/icap_writer.sv` | buffer to ICAP pipeline |
| `rtl/trace_uart.sv` | serial trace line |
| `rtl/rdp_platform.sv` | the target: MAC, protocol, buffer, ICAP writer, trace |
| `rtl/rdp_server_node.sv` | the server: protocol and MAC |
| `rtl/rdp_system.sv` | top: both nodes side by side |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, and some shared models:

* `tb_util_pkg` builds frames and checks the CRC with its own bitwise code.
* `rdp_link_bfm` sends and monitors frames.
* `icap_model` is an ICAP that raises busy at random.
* `lan_channel` is a link that can corrupt, drop or cut frames.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

## Simulating

Each testbench is simulated with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb --top-module tb_rdp_system \
  rtl/rdp_pkg.sv tb/tb_util_pkg.sv tb/tb_rdp_system.sv
obj_dir/Vtb_rdp_system
```

Replace `tb_rdp_system` with any other testbench name.

* `tb_rdp_system` runs the whole system with a short timer and a fast UART. Over the course of the test it makes each mechanism happen at least once and counts it:
  * master and slave starts;
  * P = 1 and P = 3;
  * a short last burst;
  * an ACK held back for buffer room;
  * ICAP stalls;
  * a corrupted frame (FCS NACK);
  * a lost frame (sequence NACK);
  * a dead link (timeouts on both sides);
  * restarts after each error.
* `tb_rdp_system_full` uses every default parameter. It sends a 60 KB and a 200 KB bitstream and checks every byte that reaches the ICAP. It runs in a few seconds with Verilator.
* `tb_rdp_speed_vs_p` measures speed against burst size (below).

## Measured performance

At the default parameters, with a 100 MHz clock and a 100 Mb/s link:

| bitstream | N | P | cycles | throughput |
|---|---|---|---|---|
| 60 KB (61 440 B) | 42 | 3 | 514 188 | 95.6 Mb/s |
| 200 KB (204 800 B) | 138 | 3 | 1 710 220 | 95.8 Mb/s |

Each throughput counts bitstream bytes from the server's start until the last byte has reached the ICAP. The link, not the ICAP, sets the limit. The ICAP path could take 800 Mb/s.

`tb_rdp_speed_vs_p` repeats both downloads with the target given 3, 5 and 7 slots, that is with P = 1, 2 and 3. The test requires that speed never falls as P grows, and that P = 3 reaches at least 40 Mb/s.

| P | 60 KB | 200 KB |
|---|---|---|
| 1 | 93.1 Mb/s | 93.3 Mb/s |
| 2 | 95.0 Mb/s | 95.2 Mb/s |
| 3 | 95.6 Mb/s | 95.8 Mb/s |

Each burst costs one ACK round trip, which is why larger bursts are faster. From P = 2 to P = 3 the gain is already below 1%.

The system this design follows reported a sustained 40 Mb/s with its software protocol on a 100 MHz device. Its buffer, 7 packets for P = 3, is kept here unchanged.

## Departures from the original system

* **The protocol is in hardware.** The original system runs it on an embedded PowerPC 405, with on-chip instruction and data memories, PLB and OPB buses and a bridge. It uses vendor Ethernet, UART and ICAP cores, and interrupt handlers that fill the buffer. None of that is reproduced here. The MAC, the buffer and the ICAP writer are connected directly.
* **Not built:** the Ethernet PHY, the JTAG port and the FPGA's own ICAP primitive. Their signals are ports, and a behavioural ICAP model is used in simulation.
* **The server is hardware too**, so that the whole link can be simulated. The original server is a host program. Its file directory is represented by a byte-addressed store (`bs_addr`/`bs_data`, one cycle of read latency).
* **This design's own choices:**
  * the message layout and EtherType;
  * the type and error codes;
  * the formula for P;
  * waiting for buffer room before an ACK;
  * the timer length;
  * the trace characters.
* **Two readings of the state diagrams:**
  * The target also acknowledges packet N when the final burst is shorter than P. Otherwise the transfer could not end.
  * The server goes idle after packet N rather than starting the same bitstream over.
* **Data per packet** is 1494 bytes, not 1500. The 6-byte header shares the 1500-byte Ethernet payload with the data.

# Ethernet media level tester

A box with four Fast Ethernet (100 Mb/s, MII) ports that sits on the cable
between two devices under test. Frames received on port 1 are forwarded to
port 2 and frames received on port 2 to port 1, so the two devices keep
talking. On command from a control PC the tester changes that traffic in
controlled ways. It can:

- rewrite header fields, the payload or the FCS;
- flip a bit or drop frames;
- shorten or lengthen the preamble, or leave out the SFD;
- send two frames with a chosen inter-packet gap;
- swap the order of frames, hold frames back for a number of milliseconds, or
  flood a user frame (a denial-of-service test).

The control PC talks to the tester over UDP on port 3. Ports 3 and 4 also
serve as monitor outputs for the direction under test.

All RTL is SystemVerilog-2017. Every file starts with a comment that explains
the block, its interface and timing, and which parts are this design's own
choices.

## Data path of one direction

`eth_modifier` is one direction. The top holds two of them: port 1 → port 2
and port 2 → port 1. Bytes move through it like this:

1. **Receive front end** (`rx_front` = `mii_rx_bytes` + `async_fifo`). It
   drops the preamble whatever its length, aligns on the SFD nibble and packs
   nibble pairs, low nibble first, into bytes. Each byte crosses into the
   25 MHz core clock. At most one byte leaves every two core clocks, which is
   the real MII byte rate, so every later block can count on a free clock
   between bytes.
2. **Frame state** (`frame_state`). It registers each byte and tags it with
   its field (destination, source, type, payload) and its offset in the frame.
   The FCS gets no tag of its own: a frame's end is known only once it has
   passed.
3. **Test blocks.** All of them see the same stream. Only the block chosen by
   the latest command has its enable raised. A test selector multiplexer
   passes that block's data, its post-processing requests and its memory
   signals onward. With no test running, the unmodified stream passes.
4. **Post-processing** (`postprocess`). It acts on requests the test block
   makes per frame:
   - hold back N bytes (up to 8);
   - compute a new FCS;
   - overwrite the last four held bytes with given data (the FCS test);
   - discard the frame;
   - mark the frame for TX_ER.

   A new FCS replaces the last four held bytes, so FCS fix and swap both need
   a delay of at least four bytes. A discard works only while the frame's
   bytes are still held; the drop test holds six for that reason.
5. **Transmit block** (`tx_double_fifo`). Two asynchronous frame FIFOs of
   2048 entries (a byte plus a last-byte mark) are filled in turn. One can
   fill while the other drains. `mii_tx` then sends the preamble, the SFD
   (both may be changed per frame) and the data nibbles, followed by a
   gap of 24 nibbles (or the IPG test's value while that test runs).

The CRC (`crc32_d8`) runs a reflected CRC-32 LFSR eight steps per clock.

### Test blocks

| Test | Block | Attribute bytes (byte 0 first) |
|---|---|---|
| destination / source MAC | `test_field_replace` FIELD 0/1 | amount, fix-FCS, 6-byte address |
| EtherType | `test_field_replace` FIELD 2 | amount, fix-FCS, 2-byte value |
| payload | `test_field_replace` FIELD 3 | amount, fix-FCS, 6-byte offset, 2-byte size, 6 data bytes |
| FCS | `test_fcs` | amount, (unused), 4-byte FCS in send order |
| drop | `test_drop` | amount |
| bit inversion | `test_invert_bit` | amount, reference (0 frame / 1 source / 2 type / 3 payload), 2-byte bit offset |
| preamble / SFD | `test_preamble` | amount, nibbles (0–38), non-zero to send a preamble nibble instead of the SFD |
| swap order | `test_mem_frames` | amount |
| inter-packet gap | `test_mem_frames` | gap in nibbles |
| delay N frames | `test_mem_frames` | amount, 2-byte ms |
| delay all | `test_mem_frames` | 2-byte ms |
| custom frame | `test_mem_frames` | the frame itself, FCS included (no other attributes) |
| DoS block / allow | `test_mem_frames` | 2-byte ms, then the frame |

Rules that hold across the test blocks:

- An amount of 0 counts as 1.
- Multi-byte values are big-endian.
- Bit 0 of a byte is its first bit on the wire.
- If the conditional address in the command is not zero, the source, type,
  payload, FCS, drop and bit tests act only on frames sent to that address.

### Memory tests

`test_mem_frames` stores whole frames as chunks in the shared memory FIFO and
sends them from there. How each test uses it:

- **Delay N frames:** store N frames, with a millisecond timer (`ms_timer`)
  started by the first. Later frames pass normally. When the timer ends, the
  stored frames are drained in order. Frames that arrive during the drain
  are stored behind them, so order is kept and nothing is lost.
- **Delay all:** store everything until the timer ends, then drain the same
  way.
- **Swap order:** store `amount` frames, forward the next frame, then send
  the stored frames.
- **Inter-packet gap:** store one frame. When the next frame starts, store
  it as well and start the drain. The first frame goes out while the second
  is still arriving. Once the second is complete in memory it is read into
  the other transmit FIFO, so the transmitter sends it right after the
  chosen gap. A stored frame can be read only when it is complete. If the
  second frame is much longer than the first, it is not ready in time and
  the gap grows.
- **Custom frame:** the command decoder has already written the frame to
  memory. The block sends it when the line is idle.
- **DoS:** sends the stored frame back to back, writing it into memory again
  behind itself each time, until the timer ends. The blocking variant drops
  all received frames. The allowing variant forwards frames that arrive
  between DoS frames.

A frame is read from memory only when the transmit FIFO it would go into is
empty. Every memory test ends when the memory has drained empty. Under
steady traffic that can take a while, since new frames keep queueing behind
the stored ones.

## Memory FIFO

`mem_fifos` turns a word-wide external memory into a FIFO of byte chunks
(frames). The writer raises `wr_enable` for one chunk and strobes bytes with
`wr_new_byte`. Bytes are packed into 32-bit words. At the end of the chunk
its byte count is written into a header word in front of the chunk. The
reader asks for one chunk with `rd_enable` and takes bytes with `byte_ack`.
`mem_full` rises while less than one maximum frame of room is left.

The external memory port sits on the top:

- write: `mem_wr_cmd_en` with address and data;
- read: `mem_rd_cmd_en` with address, answered by `mem_rd_data_valid` after
  any latency.

It stands for the user side of a DDR2 controller. `mem_io_mux` gives the FIFO
to the modifier of the current direction. The command decoder takes it over
while it writes a frame from a command. During that time the modifier sees
the memory as full and not empty.

## Command path (port 3)

`udp_arp_rx` parses the received frames byte by byte and finds two kinds of
frame addressed to the tester:

- IPv4/UDP frames;
- ARP requests for its IP address.

UDP broadcast to 255.255.255.255 is accepted on any port. This lets an
unconfigured tester receive its addresses.

`instr_decode` scans the UDP data for commands of this form:

```
"/ETHTEST/" test_id "/" direction "/" cond_mac[6] "/" attributes... [frame...]
```

- Direction 1 means port 1 → 2 and direction 2 means port 2 → 1. It selects
  the modifier and the monitored direction.
- Attribute byte j appears at `cmd_attr[8j +: 8]`.
- The address-setting command (test ID 1) has this shape instead:
  `"/ETHTEST/" 1 "/"` followed by the device IP, PC IP, device port, PC port,
  PC MAC and device MAC.

Test IDs are listed in `eth_pkg` (2 drop, 3 bit, 4 preamble, 5–8 fields,
9 FCS, 10 IPG, 11 custom, 12 swap, 13 delay N, 14 delay all, 15/16 DoS,
17 direction only).

`udp_arp_tx` answers ARP requests from a 64-byte header memory
(`proto_mem`). It can also send UDP frames, through a request-and-pull
interface.

## Monitor outputs

`monitor_selector` merges frame streams onto one transmit block, a whole
frame at a time. A frame that starts while the output is busy is skipped
whole.

- Port 4 TX carries the raw received stream of the direction under test.
- Port 3 TX carries what that direction's modifier sends, with ARP replies
  put in between frames.

## Departures from the tester as originally described

- **IPG test shares the memory-test block.** It has no block of its own.
  The gap value reaches the transmit clock without a synchronizer; it
  changes only between tests. The original reports 18 nibbles as its
  shortest gap. Here a 12-nibble gap was measured, with a 118-byte frame
  followed by a 78-byte one.
- **One core clock.** The memory side also runs on the 25 MHz core clock,
  where the original uses a faster memory clock and switches the memory FIFO
  clock between users. A read of a chunk starts only once the whole chunk
  has been written.
- **Memory port instead of the vendor DDR2 controller.** The PHYs, the DDR2
  chip and its controller are outside the RTL.
- **No UDP monitoring.** Monitor frames are not wrapped in UDP to the PC; the
  UDP sender exists but the top does not drive it.
- **No delayed start.** The original lists a timer that starts any test
  after a set time. No command field for it is given, and it is not built:
  a test starts with its command.
- **Port 3 monitors one direction.** It carries the frames sent by the
  modifier of the direction under test, not every frame the tester sends.
- **DoS with allowing.** Frames that collide with a DoS frame are dropped, not
  buffered.
- **Destination test.** The destination-address test ignores the conditional
  address. The original description says both that this works and that it
  was left undone; the second is followed.
- **Command encoding is this design's own.** That covers the test ID numbers,
  the attribute byte layouts and the 16-byte attribute bus. They were read
  from command tables that are not fully legible.
- **No header checks.** IP header and UDP checksums of received commands are
  not checked. Sent UDP frames carry a zero UDP checksum.

## Simulation

Each block has a self-checking testbench `tb/<block>_tb.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Shared helpers:

- `tb/tb_util.svh`: frame and CRC builders;
- `tb/test_harness.svh`: the common test-block harness;
- `tb/mii_source.sv`, `tb/mii_sink.sv`: MII drivers and monitors;
- `tb/ddr2_mem_model.sv`: a memory with 10-clock read latency.

To run one testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/eth_pkg.sv \
  tb/eth_tester_top_tb.sv --top-module eth_tester_top_tb -Mdir obj -o sim
./obj/sim
```

`eth_tester_top_tb` runs the top at its default parameters and drives a
whole session:

- ARP and address setting;
- forwarding both ways and both monitors;
- every test, including the inter-packet gap and direction change;
- memory traffic.

At the end it checks that each of these happened. It takes about half a
minute.

Synthesis of the top at defaults gives about 3500 flip-flops and 159 kbit of
RAM (mostly the transmit FIFOs).

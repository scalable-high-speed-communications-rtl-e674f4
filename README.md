# A PCIe-to-Aurora communication path for a DANNA neuromorphic array

A DANNA (Dynamic Adaptive Neural Network Array) is a neuromorphic array that runs on an FPGA with a
global network clock of about 1 MHz. In every network cycle the host may send it one
36-byte *input packet* (fire events, configuration, commands), and the array may answer with one
64-byte *output packet* (timestamp, output weights, shift/monitor data, status, configuration ID).
If the link falls behind, output packets are dropped and the host no longer sees what the network did.

This RTL is the logic of a communication path built to remove that bottleneck:

```
 host PC ==PCIe==> [ Xillybus core ] --FIFO ports--> +---------------------+        +----------------------+
                                                     | communication board |  FMC   | DANNA FPGA           |
                                                     |   (comm_board)      |<=====> |  (danna_fpga_link)   |--native FIFO--> DANNA array
                                                     +---------------------+ Aurora +----------------------+
                                                        bus_clk | user_clk          user_clk
```

- A separate **communication board** FPGA talks to the host over PCIe through the Xillybus core.
- The communication board talks to the **DANNA FPGA** over one serial lane per direction with the
  Aurora 8B/10B link-layer core, through an FMC connector.
- On the DANNA FPGA, AXI4-Stream width converters and a buffering wrapper turn the 32-bit Aurora
  stream into whole 288-bit input packets and 512-bit output packets for the array.

The Xillybus core, the Aurora cores, the transceivers and the array are not part of this RTL. They
are vendor IP or earlier work. Their signals are ports of the top module, `danna_comm_system`, and
testbench models stand in for them.

The bandwidth needed is small. At 1 MHz, the array needs 36 MB/s toward it and 64 MB/s back. The
path as built carries:

| Path | Width × clock | Rate |
|---|---|---|
| Host write stream | 32 bit × 100 MHz | 400 MB/s |
| Host read stream | 64 bit × 100 MHz | 800 MB/s |
| Aurora, each direction | 32 bit × 156.25 MHz | 625 MB/s |

So throughput is not the hard part. The hard parts are these:

- The clock crossings.
- Keeping packets aligned, because the packet sizes do not match the bus widths.
- Making sure no word is lost on an Aurora receive interface, which cannot be stalled.

Most of this document is about those three.

## Modules

| Module | Where | Role |
|---|---|---|
| `danna_comm_system` | top | `comm_board` and `danna_fpga_link` side by side; the buffer reset is wired from one to the other |
| `comm_board` | communication board | the two FIFOs, the framer, flow control and reset logic between Xillybus and Aurora |
| `input_packet_fifo` | communication board | host→DANNA dual-clock FIFO: 32 bit, 512 words, first-word-fall-through read with a valid flag |
| `output_packet_fifo` | communication board | DANNA→host dual-clock FIFO: 32-bit writes (1024 words), 64-bit reads (512 words), standard read |
| `tlast_framer` | communication board | drives AXI4-Stream from the fall-through FIFO; TLAST on every 9th word |
| `buffer_reset_logic` | communication board | empties all buffers while neither host file is open |
| `nfc_controller` | both boards | sends Aurora native-flow-control XOFF/XON requests from a buffer level |
| `danna_fpga_link` | DANNA FPGA | upsizer, wrapper, downsizer and flow control |
| `axis_upsizer` | DANNA FPGA | AXI4-Stream 32 → 288 bit (9 beats → one input packet) |
| `axis_downsizer` | DANNA FPGA | AXI4-Stream 512 → 32 bit (one output packet → 16 beats, TLAST on the last) |
| `danna_axis_wrapper` | DANNA FPGA | packet buffers in both directions; AXI4-Stream on the link side, native FIFO ports on the array side |
| `sync_fifo`, `reset_sync` | helpers | single-clock FIFO for the wrapper; reset synchroniser |
| `comm_pkg` | package | packet sizes, the output-packet struct, NFC codes, Gray-code functions |

## Packets and byte order

An input packet is 36 bytes, which is nine 32-bit words. A 64-bit host stream would split every
second packet across a word boundary. So the host writes through a **32-bit** stream and reads
through a **64-bit** stream, where a 64-byte output packet is exactly eight words.

Byte order follows the AXI4-Stream and little-endian convention throughout:

- Host byte *k* of a packet is bits `8k+7:8k` of the wide packet word.
- Each 32-bit word carries four consecutive bytes, lowest address in bits 7:0.
- The upsizer puts its first beat in bits 31:0 of the 288-bit word.
- The downsizer sends bits 31:0 of the 512-bit word first.
- The output FIFO puts the first 32-bit word it receives in bits 31:0 of the 64-bit read word.

With those rules, a little-endian host sees the packet's bytes in order in both directions.

`comm_pkg::out_pkt_t` gives the output-packet layout, from byte 0 upward:

| Bytes | Field |
|---|---|
| 0–7 | timestamp |
| 8–39 | 32 output weights, 8 bits each |
| 40–43 | unused |
| 44–59 | shift data, one bit per array column (128 columns at most) |
| 60 | unused |
| 61 | status flags (bit 0 halt, bit 1 shift) |
| 62–63 | configuration ID |

The link logic never looks inside a packet; the struct is for users of the ports and for the testbench.

## Framing

Aurora is set up in framing mode with CRC, so that one frame carries one packet. A CRC error then
points at one packet, and a frame boundary is always a packet boundary.

- **Host → DANNA.** The Xillybus write stream has no notion of packets. `tlast_framer` counts the
  words it pops from the input FIFO and raises TLAST on the 9th word of every group of nine. The
  count depends only on the order of the words. A host that writes a short or long packet therefore
  shifts every later boundary. The fix is the buffer reset (see below), which restarts the count at
  zero together with emptying the FIFOs.
- **DANNA FPGA.** `axis_upsizer` collects nine beats into one 288-bit beat. A beat with TLAST
  closes the wide beat early, with only the received bytes marked in TKEEP. A mis-framed packet
  therefore stays one packet instead of merging with its neighbour. `danna_axis_wrapper` stores it
  anyway, and `bad_frame_count` counts wide beats that arrive without TLAST.
- **DANNA → host.** `axis_downsizer` sends a 512-bit packet as 16 words, TLAST on the last. The
  communication board drops TLAST and TKEEP on receive, because the Xillybus read stream has no
  framing either. The host reads fixed 64-byte records.

## Clock crossing

The communication board has two clocks:

- `bus_clk`: the PCIe bus clock from the Xillybus core, 100 MHz.
- `user_clk`: the Aurora user clock, 156.25 MHz.

The two FIFOs are the only places data crosses between them. Both are written from scratch in the
usual way:

- The memory is a plain array, which synthesis maps to block RAM.
- Each side keeps a binary pointer with one extra wrap bit, plus its Gray-coded copy in a register.
- The Gray pointer crosses to the other clock through two flip-flops (`SYNC_STAGES = 2`).
- Each side compares its own pointer with the synchronised copy of the other.

So `full` and `empty` are conservative: they can stay asserted a few clocks after the other side
has moved, but they can never be late. The flags are registered.

A few details matter for users of the ports:

- **Input FIFO: fall-through read.** The word at the head sits in an output register with `valid`
  set. `rd_en` pops it, and the next word appears the following clock. Capacity is therefore
  `DEPTH` + 1 words. `prog_full` compares the write-side count with 511; `prog_empty` compares the
  read-side count with 4.
- **Output FIFO: standard read, width conversion.** The write side counts 32-bit words, the read
  side 64-bit words. `dout` changes on the clock edge that samples `rd_en` with the FIFO not empty,
  so data is valid one clock after the request, as the Xillybus read stream expects. A read word
  exists only once both halves have been written. Both thresholds are counted in 32-bit words:
  - `prog_full` is set at 1008 or more, so less than one 16-word packet of room remains.
  - `prog_empty` is set while 15 or fewer words are readable, so less than one packet is there.
- **Reset.** Each FIFO takes one asynchronous reset and synchronises it into both clocks
  (`reset_sync`: asserts at once, releases after two stages and a short hold). During reset `full`
  and `prog_full` read 1, so nothing is written into a FIFO that is still resetting. `dout` reads 0.

On the DANNA FPGA everything runs on that board's Aurora user clock. Its buffers are single-clock.

## Flow control

The Aurora receive user interface has no ready signal. A receiver that cannot take a word loses it.
The only way to slow the sender is Aurora **native flow control (NFC)**. The receiver asks its
channel partner to stop (XOFF, code `4'hF`) or to go on (XON, code `4'h0`). In *completion* mode,
the mode used here, the partner finishes the frame in progress before it stops.

`nfc_controller` does exactly one thing:

- It compares a buffer level with one threshold.
- It sends XOFF when the level reaches the threshold and XON when the level drops below it.
- It sends a request only when its state changes.
- A request is held until the core takes it. A change that happens meanwhile is sent after it.

There is no hysteresis band: one threshold serves both directions. The threshold therefore decides
everything. After XOFF is sent, a receiver must still be able to take:

- the words already on the lane and in the cores, and
- the rest of the frame the partner is sending, up to 16 words for an output packet and 9 for an
  input packet.

The thresholds are chosen as follows:

| Where | Buffer watched | Size | Threshold | Room left after XOFF |
|---|---|---|---|---|
| Communication board | output FIFO write count | 1024 words | 960 words | 64 words: one 16-word frame plus 48 words in flight |
| DANNA FPGA | input buffer, in packets | 16 packets | 12 packets (the upsizer's word counts as one more) | 4 packets = 36 words |

Every lost receive word is counted in `rx_overflow_count` on each side. The testbenches require
these counters to stay at zero.

The sender side needs no logic of its own. The Aurora core drops `tx_tready` while the partner has
asked for XOFF, and `tlast_framer` and `axis_downsizer` simply hold their data. The handshake rule
that data stays stable while not accepted is written as an assertion in both.

Back-pressure therefore runs all the way through in both directions:

- **Array stops reading inputs.** The DANNA input buffer fills and the DANNA FPGA sends XOFF. The
  communication board's transmitter stops, its input FIFO fills, and the host sees `user_w_full`,
  so the Xillybus write call blocks.
- **Host stops reading outputs.** The output FIFO passes 960 words and the communication board
  sends XOFF. The DANNA FPGA's transmitter stops, its output buffer fills, and the array sees
  `out_pkt_full`. The array is then expected to hold its network clock.

## Buffer reset

The communication buffers are reset while **neither** host device file is open:

```
buffer_reset = !user_r_open && !user_w_open
```

The board reset `sys_rst` also resets them.

A host that has lost packet alignment can close both files and open them again. This empties:

- both FIFOs on the communication board,
- the framer's word count, and
- all buffers and converters on the DANNA FPGA, through `buf_rst_user`, which the top wires
  across to `danna_fpga_link`.

It does not reset the array. The host still sends the array its own reset command.

`buffer_reset_logic` registers the request on `bus_clk`, for the FIFOs, which synchronise it
themselves. It also gives a synchronised copy for each clock.

## Parameters

The defaults are the settings of the original design where it gives them. The rest are this
design's own choices.

| Parameter (module) | Default | Origin |
|---|---|---|
| `DEPTH`, `PROG_FULL`, `PROG_EMPTY` (input FIFO) | 512, 511, 4 | original FIFO settings |
| `WR_DEPTH`, `PROG_FULL`, `PROG_EMPTY` (output FIFO) | 1024, 1008, 15 | original FIFO settings |
| `SYNC_STAGES` | 2 | original FIFO settings |
| `WORDS_PER_FRAME` | 9 | original (TLAST on the 9th word) |
| upsizer / downsizer widths | 32↔288, 512↔32 | original |
| `NFC_THRESHOLD` (communication board) | 960 | own choice |
| `IN_DEPTH`, `OUT_DEPTH` (DANNA wrapper) | 16 packets each | own choice |
| `IN_NFC_THRESHOLD` (DANNA side) | 12 packets | own choice |
| `HOLD_CYCLES` (reset release) | 4 | own choice |

## Where this departs from the original design

- **Vendor FIFOs and width converters.** The originals are vendor-generated. Here they are plain
  RTL with the same settings. Corner behaviour may differ from the vendor cores, for example the
  exact clock on which a flag moves, or the capacity added by the fall-through register.
- **DANNA-side flow control.** The original states a threshold rule for NFC only in general terms.
  It describes the DANNA FPGA's input buffers sitting at a full threshold during stress tests. This
  design applies the same NFC rule on the DANNA FPGA, driven by its input buffer. The thresholds
  and the DANNA buffer depths are this design's own.
- **Reset across the boards.** The original resets the DANNA FPGA's buffers too, but does not say
  how the reset crosses. Here it is a direct wire in the top, synchronised on arrival. On real
  hardware it would travel as a sideband signal or a message.
- **Output packet shift field.** It is 16 bytes wide, as the packet's prose description says, so
  the fields add up to 64 bytes. One drawing of the packet labels it 4 bytes.
- **Input FIFO thresholds.** They are the original's numbers (511 and 4). They do not quite follow
  its own rule of "less than a packet / room for less than a packet" for 9-word packets. They are
  status outputs only, and nothing in the path depends on them.
- **Added counters.** The loss counters, the framing-error counter and the frame counter are
  additions for observability.
- **Scope.** One Aurora lane, as in the main configuration. A two-lane link would need a 64-bit user
  interface and different width converters.
- **EOF.** The Xillybus end-of-file flag is tied to 0.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`. The behavioural models used by the testbenches are:

- `aurora_lane_model`: one direction of an Aurora channel. It has latency, random stalls on
  `tx_tready`, completion-mode XOFF/XON and no receive ready.
- `danna_array_model`: a stand-in for the array. It answers every input packet with a
  deterministic output packet, and can be made to stall.

Build and run with plain Verilator 5 from the repository root, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/comm_pkg.sv tb/tb_danna_comm_system.sv \
    --top-module tb_danna_comm_system -Mdir obj_e2e -o sim
./obj_e2e/sim
```

Replace the testbench name to run any other `tb/tb_<module>.sv`.

`tb_danna_comm_system` runs the whole path at the default sizes, with the two Aurora lane models
between the boards. It has five phases:

- **A – streaming.** 300 packets each way through the link with random Aurora stalls. It checks the
  rate: about 9 packets per µs, against the 1 per µs a 1 MHz array needs.
- **B – array stalls.** DANNA-side XOFF, communication-board pause, input FIFO full, `user_w_full`.
- **C – host stops reading.** Board-side XOFF, DANNA-side pause, `out_pkt_full`.
- **D – reset.** The host leaves half a packet behind, closes and reopens both files, and alignment
  must be restored.
- **E – round trip.** One packet on the idle path. The time from the host's first write to its
  last read is printed and must stay under 1 µs. It is about 0.38 µs with 8-clock lane models.
  Host software and PCIe transfer time, which dominate a real round trip, are not modelled.

Every output packet is compared with the expected one, in order. Each mechanism above is counted,
and one that never happens counts as a failure. The test runs in well under a minute.

To change a size, override the parameter on the module. For example, `OUT_FIFO_DEPTH` on the top
sets the output FIFO's depth. Keep each NFC threshold at least one frame plus the link's in-flight
words below the buffer size.

# A generic GBT-SCA driver core

The front-end electronics of a detector often hold many GBT-SCA chips (Slow
Control Adapters). Each one has I2C, SPI, GPIO, JTAG, ADC and DAC interfaces
to the local electronics. The control system cannot reach these chips
directly. It reaches them through an FPGA board, over a GBT optical link.
Each SCA gets two bits in every 40 MHz GBT frame: an "e-link" of 80 Mb/s
each way.

This core is the FPGA firmware between the two. On one side, software writes
a short *ECS command packet* over an Avalon-MM bus, for example "write these
16 bytes to I2C device 0x52 on channel 5 of SCA 12". The core turns that
packet into the sequence of GBT-SCA commands the chip needs. It wraps each
command in an HDLC frame and serialises the frame onto the SCA's bit pair in
the GBT frame. It then waits for each reply, and retransmits a command whose
reply does not come. When everything has been answered, it writes one *ECS
reply* into a memory that software polls.

One core serves one GBT link with 16 + 1 SCAs. Sixteen SCAs sit on the 32-bit
ECS field of the GBT frame, and one sits on the 2-bit EC field. A board with
many links (36 on the board the design was made for) uses one core per link.

```
 Avalon-MM ──► avalon_mm_slave ──► ECS commands FIFO ──┐
    ▲                ▲                                  ▼
    └── ECS reply memory ◄── protocol arbiter ◄──  protocol_layer
                                                   dispatcher + 7 protocol drivers
                                                   + activation/timeout registers
                                                        │ SCA command packets (64 bit)
                                            ┌───────────┴───────── ×17 ──┐
                                            ▼                             ▼
                                  stfc_sca_mac_layer  ...   stfc_sca_mac_layer
                                  22 CMD + 22 RPY FIFOs, channel arbiter,
                                  fpga_elink (HDLC + 2-bit serdes)
                                            │ 2 bits each
                                            ▼
                                   elink_router (runtime matrix)
                                            │
                          GBT frame: gbt_tx_ecs[31:0], gbt_tx_ec[1:0] (and rx)
```

## The layers

**Avalon-MM slave and the ECS buffers.** Software pushes command packets word
by word into a 64-word FIFO, the *ECS commands FIFO*. Replies are read from
the *ECS reply memory*, a 128-word dual-port RAM with 16 slots of 8 words.
A reply goes into slot `tag[3:0]`, where `tag` comes from the command
packet. The header word of a slot is written last and carries a `done` bit.
Software therefore polls the header until `done` is set and the tag matches.

**Protocol layer** (`protocol_layer`). A dispatcher reads one packet from the
FIFO. It then checks in `sca_channel_config` that the addressed SCA and
channel are activated. If they are, it hands the packet to the driver for
that channel's protocol. If not, it answers at once with status INACTIVE.
There is one driver per protocol:

- `sca_controller_protocol_driver`
- `spi_protocol_driver`
- `gpio_protocol_driver`
- `i2c_protocol_driver`
- `jtag_protocol_driver`
- `adc_protocol_driver`
- `dac_protocol_driver`

Each driver holds one ECS command at a time. So up to seven commands of
different protocols run in parallel, and a command for a busy driver waits
in the dispatcher.

Round-robin arbiters then take over in three places:

- They pass driver commands to the MAC layer of the addressed SCA.
- They collect replies from the 17 MAC layers. The reply's channel number
  selects the driver it goes to.
- They write finished ECS replies into the memory.

**MAC layer** (`stfc_sca_mac_layer`, one per SCA). Each MAC layer has one
command FIFO and one reply FIFO for each of the SCA's 22 channels. A command
goes into the FIFO of its channel. A round-robin *channel arbiter* feeds the
e-port one packet at a time. A reply goes back into the FIFO of its channel;
if that FIFO is full, the reply is dropped and reported on `rpy_drop`. The
FIFOs are two entries deep. That is enough because a driver never has more
than one command outstanding on a channel.

**E-port** (`fpga_elink`). This block does the HDLC framing and the 2-bit
serialisation. It is explained in the next section.

**Link layer** (`elink_router`). A routing table holds one entry per e-link
`m`: the number of the bit-pair slot that e-link uses in the GBT frame. Slots
0–15 are ECS bits `2s+1:2s`, and slot 16 is the EC field. Software can
rewrite the table while the core runs, for example to move an SCA to another
slot. Slots that no e-link uses send `11`, the idle line level.

## SCA packets and HDLC frames

An SCA command or reply is a 64-bit payload that moves through the core in
one clock cycle:

| bits  | 63:56 | 55:48   | 47:40                   | 39:32 | 31:0 |
|-------|-------|---------|-------------------------|-------|------|
| field | TR (transaction id) | CH (channel) | CMD (command) / ERR (reply flags) | LEN | DATA |

On the e-link a payload travels in an HDLC frame:

```
 7E | address 00 | control | TR CH CMD LEN D[31:24] D[23:16] D[15:8] D[7:0] | FCS lo FCS hi | 7E
```

- **Bit order.** Bytes go least-significant bit first. Two bits go out per
  clock, `elink_tx[1]` first.
- **Bit stuffing.** After five 1s in a row, a 0 is inserted, so that data
  never looks like the `7E` flag. The receiver removes these 0s. Seven 1s in
  a row abort the frame.
- **FCS.** The frame check sequence is CRC-16-CCITT over the address,
  control and payload bytes. It is computed in reflected form (polynomial
  `0x8408`), starts from `0xFFFF`, and is sent complemented.
- **Length.** An I-frame (a frame that carries a payload) is at least 104
  bits long, or 52 clock cycles. Bit stuffing can add a few more.
- **Control byte of an I-frame.** This is `{N(R), 0, N(S), 0}`. N(S) counts
  the frames sent, and N(R) the frames received.
- **Link commands.** These use U-frames, which have no payload. CONNECT is
  `2F`, RESET `8F` and TEST `E3`. The SCA answers with UA (`63`).
  Software sends a link command by writing register `0x003`.

The receiver finds the flags, removes stuffed bits and checks the FCS. A good
I-frame becomes an SCA reply. A good U-frame raises `link_ack`. A frame with
a wrong FCS or a wrong length raises `fcs_err` and is discarded. The
command that lost its reply is then retransmitted (next section).

At a 40 MHz clock, each e-link carries 80 Mb/s in each direction. The 16 ECS
e-links together carry 1.28 Gb/s, and all e-links run in parallel.

## Sending, waiting and retransmitting

All drivers share one engine, `sca_cmd_sequencer`. A driver is only a
translation table. It takes the ECS command and a step number, and returns
that step's GBT-SCA command (CMD, LEN, DATA), the total number of steps, and
whether the step's reply data belongs in the ECS reply. The sequencer:

1. sends step *k* with a fresh transaction id TR;
2. waits for a reply with the same SCA, channel and TR, and ignores all
   other replies;
3. if the reply's error flags are non-zero, ends the command with status
   SCA_ERR;
4. if no reply arrives within the timeout (register `0x002`, default 2000
   cycles), sends the same command again with a new TR. After `MAX_RETRY`
   (3) retransmissions it gives up with status TIMEOUT, so a command is sent
   at most 4 times;
5. after the last step, hands the ECS reply to the protocol arbiter.

A step therefore costs one full round trip: a frame out, the SCA's response
time, and a frame back. That is at least 2 × 52 cycles plus the pipeline
registers.

## ECS command packet

A command packet is 2 to 6 words, written one after another to address
`0x000`:

| word | contents |
|------|----------|
| 0 | `[31:24]` tag, `[20:16]` SCA index, `[15:8]` channel, `[7:4]` op, `[2:0]` number of data words (0–4) |
| 1 | argument (meaning depends on the driver and op) |
| 2.. | data words (up to 4 × 32 bits = 16 bytes) |

The channels are numbered as on the GBT-SCA:

| channel | use |
|---------|-----|
| `0x00` | controller |
| `0x01` | SPI |
| `0x02` | GPIO |
| `0x03`–`0x12` | the 16 I2C masters |
| `0x13` | JTAG |
| `0x14` | ADC |
| `0x15` | DAC |

The ops of each driver are listed below.

| driver | op | SCA command sequence |
|--------|----|----------------------|
| controller | 0 / 1 | write / read control register B, C or D (`arg[9:8]`), value `arg[7:0]` |
| SPI | 0 | W_CTRL (`arg[15:0]`), W_SS (`arg[23:16]`), W_MOSI per data word, GO, R_MISO per word (captured) |
| GPIO | 0 / 1 / 2 / 3 | write outputs, read inputs, write direction, read direction |
| I2C | 0 | multi-byte write: W_CTRL (`{nbytes, speed}` from `arg[12:8]`, `arg[17:16]`), W_DATA0..3, M_7B_W to address `arg[6:0]` |
| I2C | 1 | multi-byte read: W_CTRL, M_7B_R, R_DATA per 4 bytes (captured) |
| I2C | 2 / 3 | single-byte write (`arg[31:24]`) / read |
| JTAG | 0 | W_CTRL (bit count `arg[6:0]`), W_TMS0 (`arg[31:16]`), W_TDO per word, GO, R_TDI per word (captured) |
| ADC | 0 / 1 | select input `arg[4:0]` and convert / read the multiplexer setting |
| DAC | 0 / 1 | write / read output `arg[9:8]` with value `arg[7:0]` |

An op that the driver does not know ends with status BAD_OP, and nothing is
sent to the SCA.

Here is the canonical example: 16 bytes written to an I2C device at 100 kHz.
It is one ECS packet with op 0 and 4 data words. The core turns it into six
SCA commands: W_CTRL (16 bytes, 100 kHz), four W_DATA commands each carrying
32 bits, and M_7B_W.

## ECS reply slot

| word | contents |
|------|----------|
| 0 (header, written last) | `[31:24]` tag, `[23]` done, `[22:20]` status, `[18:16]` number of data words, `[15:8]` SCA error flags, `[7:0]` channel |
| 1 | SCA index |
| 2–5 | captured data words |

The status codes are: 0 OK, 1 INACTIVE (SCA or channel not activated),
2 TIMEOUT, 3 SCA_ERR, 4 BAD_OP.

## Register map (32-bit words)

| address | access | meaning |
|---------|--------|---------|
| `0x000` | W | push one ECS command word (waitrequest while the FIFO is full) |
| `0x000` | R | `[31]` FIFO full, `[15:0]` fill level |
| `0x001` | RW | activated-SCA mask (reset: none; software activates SCAs first) |
| `0x002` | RW | reply timeout in cycles (reset: 2000) |
| `0x003` | W | link command: `[20:16]` SCA, `[7:0]` U-frame control byte |
| `0x003` | R | sticky mask of SCAs that acknowledged a link command |
| `0x020+s` | RW | activated-channel mask of SCA *s* (22 bits, reset: none) |
| `0x040+m` | RW | GBT slot of e-link *m* (reset: *m*) |
| `0x100+a` | R | ECS reply memory word *a* (slot = `a[6:3]`) |

Reads return `readdatavalid` one cycle later.

## Published design versus this design's choices

The published design gives the following, and this design follows it:

- the layering: Avalon slave, commands FIFO, reply memory, protocol layer,
  MAC layer per SCA, link layer;
- one protocol driver per SCA protocol;
- the activation check of SCA and channel, and runtime registers for
  activated SCAs, activated channels and the reply timeout;
- 16 + 1 SCAs per link, and a command FIFO and a reply FIFO for each of
  the 22 channels of an SCA;
- a 64-bit payload that moves in one cycle, with fields TR, CH, CMD/ERR,
  LEN and DATA;
- the HDLC frame with SOF, an unused address byte, control, payload, FCS
  and EOF, and a pair of bits per clock;
- a runtime-configurable routing matrix, and packet retransmission;
- the 16-byte I2C write example, reproduced command for command.

The following are this design's own:

- the ECS packet and reply layouts; the published design says its packet
  format is provisional;
- the register map;
- the status codes;
- the size of the reply memory and the 64-word commands FIFO;
- all the arbitration policies;
- the timeout default and the retry limit;
- the FCS polynomial, the bit order and the U-frame codes;
- the channel numbers and GBT-SCA command codes, which follow the GBT-SCA
  chip's conventions;
- the drop-on-full behaviour of the reply FIFOs;
- the FIFO depth of two entries. The published build reports 22 FIFO
  instances of 129 registers per SCA, so this MAC layer, with 44 such
  FIFOs, may hold about twice as many registers as the original.

The HDLC e-port is a fresh implementation, not a port of existing e-port
code.

The GBT-SCA command sequences of the drivers are fixed in the RTL. Only the
activated SCAs and channels, the timeout and the routing table can be changed
at runtime. A board with several links instantiates `stfc_sca_top` once per
link and decodes the Avalon addresses between the cores. No multi-link wrapper
is included, because the published resource estimate already puts 36 full
cores at about four times a large FPGA.

The published design was also built in a reduced configuration: 4 SCAs with
only the controller driver. This design always includes all seven drivers.
`NUM_SCA` can be set lower, but the drivers cannot be left out one by one.

## Size

A generic (technology-independent) synthesis of the default core, with 17
SCAs, gives about 66,000 logic cells, 11,600 flip-flop bits and 102,000
memory bits. Almost all of the memory bits are the 17 × 44 two-entry channel
FIFOs, 96,000 bits in all. The rest are the 128-word reply memory and the
64-word commands FIFO. Each MAC layer is about 3,750 cells. The protocol
layer, with all seven drivers, is about 1,800 cells.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. `tb/gbt_sca_model.sv` is a
behavioural model of the SCA chip, not synthesisable. It decodes HDLC frames
with its own copy of the e-port, answers each command with data
`{A5, channel, command, SCA id}`, acknowledges link commands, and can be told
to drop replies, flag errors or corrupt a frame.

`tb_stfc_sca_top` runs the complete core at its default size: 17 SCAs, all
FIFOs and memories full size. Its traffic covers:

- commands to all seven drivers, in parallel;
- the 16-byte I2C write, which must produce exactly six SCA commands;
- commands to inactive SCAs and channels;
- SCA error replies and bad ops;
- a lost reply, which is retransmitted;
- a corrupted frame, which is caught by the FCS check;
- a dead SCA, which takes 4 attempts and ends in TIMEOUT;
- a router remap;
- back-pressure on the commands FIFO;
- a CONNECT/UA exchange.

For each of these mechanisms, the testbench counts how often it happened and
fails if it never did. It also checks that a command/reply round trip takes
at least 104 cycles.

`tb_test_system` is the smallest real set-up: one link with a single SCA.
Every op of every driver (16 ECS commands, 35 SCA commands) is queued at once
and each reply is checked. `tb_fpga_elink` measures the e-port's sustained
rate. It sends frames back to back and checks that each 104-bit frame
occupies 52–53 clock cycles on the line, which is 2 bits per clock.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sca_pkg.sv tb/tb_stfc_sca_top.sv --top-module tb_stfc_sca_top
./obj_dir/Vtb_stfc_sca_top
```

Substitute any `tb_<module>` for the top-level test. The full-size top-level
test finishes in well under a minute.

## Files

`rtl/` holds one module or package per file. `sca_pkg` has the shared types,
constants, the CRC function and the reply header format. `rr_arbiter` is a
helper used by all the arbiters. `stfc_sca_top` is the top level. `tb/`
holds the testbenches and the SCA model.

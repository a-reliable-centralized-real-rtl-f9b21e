# Multi-protocol data collection module for shipboard buses

A ship's sensors and subsystems talk over several unrelated buses: MIL-STD-1553B, ARINC-429 and
RS-422/485. This design puts one acquisition front end for all of them into a single FPGA:

- three 1553 channels, one ARINC-429 channel and two RS-422 channels run in parallel;
- each channel validates what it receives and keeps the latest complete packet in on-chip RAM;
- once per processing cycle (20 ms), a gateway copies all six packets into one fixed-layout
  Ethernet frame and sends it to a monitoring host;
- in the other direction, the host sends small Ethernet control frames, and the gateway hands
  their payload to the addressed channel, which sends it in its own protocol.

The unusual part is on the 1553 side. There, the plain 1553 odd-parity bit is replaced by an
**extended Hamming (23,17) code**. Single bit errors on the bus are corrected on the fly and
double errors are detected. The price is a longer word on the wire: 26 µs instead of 20 µs.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`, one module or package
per file. Self-checking testbenches are in `tb/`.

```
            +-------------+   cmd buffer   +----------------+  buffer ports (x6)  +------------------+
 host  ---->| eth_rx_mac  |--------------->|                |<------------------->| rs422_channel x2 |--- RS-422 lines
 (GMII)     +-------------+                |  gateway_ctrl  |                     | arinc429_channel |--- ARINC-429 hi/lo
       <----| eth_tx_mac  |<---------------|  (dispatch /   |                     | mil1553_channel  |--- 1553 bus A/B
            +-------------+  aggregation   |   collect)     |                     |   x3 (RT1, BC2,  |    (x3)
                             buffer        +----------------+                     |   BC1)           |
                                                                                  +------------------+
```

## The 1553 word with an extended Hamming code

A standard 1553 word has 3 bit times of sync, 16 data bits and one odd-parity bit. Here the 16
data bits and the odd-parity bit form a 17-bit data field. Five Hamming check bits and one
overall parity bit are added to it, giving a 23-bit code word.

Bit positions are numbered 1..23 (array index + 1):

| index | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8–14 | 15 | 16–21 | 22 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| content | p0 | p1 | d0 | p3 | d1 | d2 | d3 | p7 | d4–d10 | p15 | d11–d16 | p22 |

- **Data bits.** d0..d15 are the 16-bit word. d16 is the 1553 odd parity over it, so the 17 data
  bits together always have odd parity.
- **Check bits.** The check bits sit at the power-of-two positions 1, 2, 4, 8 and 16. They are
  chosen so that the XOR of the positions of all 1-bits in indices 0..21 is zero.
- **p22.** This bit makes the parity of all 23 bits even.

Decoding (`hamming_dec`, purely combinational) computes two values:

- the **syndrome**: the XOR of the positions of all 1-bits in indices 0..21;
- the **overall parity** of all 23 bits.

| syndrome | overall parity | meaning | action |
|---|---|---|---|
| 0 | even | no error | pass |
| ≠ 0 | odd | one bit wrong, at position `syndrome` | invert that bit, `err_1bit` |
| 0 | odd | p22 itself wrong | invert p22, `err_1bit` |
| ≠ 0 | even | two bits wrong | `err_2bit`, word not used |
| > 22 | odd | impossible for one error | treated as `err_2bit` |

Three or more errors can look like a single error and are then miscorrected. This is the known
limit of any SEC-DED code.

Example: 0x0C000C is the code word for data field 0x06001. Flipping bit index 4 gives 0x0C001C;
the decoder reports position 5 and restores 0x0C000C. Also flipping bit index 10 gives
0x0C041C; the decoder reports syndrome 0x0E with a double error. These are the first checks in
`tb/tb_hamming.sv`.

**On the wire** (`mil_word_tx`, `mil_word_rx`):

- The sync comes first: 1.5 bit times high then 1.5 low for command/status words, the opposite
  for data words.
- Then come the 23 code bits in Manchester II, bit 22 first: a 1 is sent high-then-low.
- A word is 26 bit times, which is 26 µs at 1 Mbit/s.
- The line is a differential pair (`p`, `n`). Both low means the bus is idle.

The receiver checks the sync width (1.5 bit times ± 0.25). It then samples each bit at 1/4 and
3/4 of the bit time, and equal samples mean a Manchester error. Sampling is timed from the sync
alone, with no re-alignment on later edges. The decoder result is available in the same clock,
so correction adds no latency. A word is *good* (`word_ok_o`) when all three hold:

- no Manchester error;
- no double error;
- the corrected 17-bit data field has odd parity.

This format cannot be read by an unmodified 1553 terminal. Every terminal on a bus must use it.

## The 1553 channel (`mil1553_channel`)

Each of the three 1553 channels has three parts:

- a word transmitter;
- a word receiver, which listens to bus A and bus B together;
- a 256-word buffer built from two block RAMs.

`bus_sel_i` chooses the bus for transmission. The same module serves three roles set by
parameters:

| instance | role | monitored address | packet | transmit behaviour |
|---|---|---|---|---|
| RT1 | remote terminal, `RT_ADDR` 1 | 1 | 32 words | answers commands to address 1 |
| BC2 | bus controller, broadcasting | broadcast | 12 words | broadcasts host data (no status replies) |
| BC1 | bus controller, target RT 1 | 1 and broadcast | 47 words | sends host data to RT 1 |

**Acquisition is a passive monitor.** The monitor decodes every word on the bus. For messages
addressed to `MON_ADDR` or to the broadcast address 31, it keeps the data words. Those are the
words that follow a receive command, or that follow the RT's status word after a transmit
command. Mode codes (subaddress 0 or 31) are ignored. If any word of a message is not good, the
whole message is dropped. Words that the channel transmits itself are ignored, up to 2 bit
times after its transmitter goes quiet.

**Merging.** A 1553 message carries at most 32 data words, but BC1's packet has 47. The source
therefore sends it as two messages: 32 words, then 15. The monitor rebuilds the packet with this
rule:

- a message whose word count equals min(32, `PKT_WORDS`) starts a new packet;
- a shorter message is appended to the packet in progress;
- when `PKT_WORDS` words have been gathered, the packet is complete.

With this rule the 32-word RT packets and the 12-word broadcasts arrive whole, and the 32 + 15
pair becomes one 47-word packet.

**Transmitting.** The host writes words into the channel's transmit area and pulses
`WRITE_DONE` with the count.

- As a **bus controller**, the channel sends receive commands `{TGT_ADDR, R, SUBADDR, count}`,
  each with at most 32 words. So 47 words go out as CMD_1 with 32 words and CMD_2 with 15.
  After each message it waits up to `STATUS_TIMEOUT` (40 bit times) for the RT's status word.
  If none comes, it raises `ev_no_status_o` and goes on. It waits `MSG_GAP` (20 bit times)
  between messages. `TRANS_DONE` pulses after the last message.
- As a **remote terminal**, the channel answers a transmit command to `RT_ADDR` after `RESP_GAP`
  (5 bit times). The answer is the status word `{RT_ADDR, 11'b0}` followed by the requested
  words from the transmit area; `TRANS_DONE` then pulses. A receive command gets a status word
  once the whole message has arrived good. After a double error the RT stays silent, so the bus
  controller sees a missing status and sends the message again.

**Retransmission.** When a bus controller gets no status in time, it pulses `ev_no_status_o`.
It then waits `MSG_GAP` and sends the same message again, up to `RETRIES` times (default 1).
If the last attempt also gets no status, it goes on with the next message. So a word that
reaches the RT with a double error costs one extra message, not lost data.

## Channel buffers and the buffer port

All six channels present the same port to the gateway:

- `ram_we_i`, `ram_addr_i[7:0]` and `ram_din_i` write a word.
- `ram_dout_o` returns a read word one clock after the address.
- `write_done_i` with `tx_len_i` starts a transmission.
- `trans_done_o` reports that the transmission has finished.
- `rx_valid_o`, `rx_bank_o` and `rx_len_o` describe the latest complete received packet.

| address | area |
|---|---|
| 0–127 | transmit area, written by the gateway; reads return 0 |
| 128–191 | receive bank 0 |
| 192–255 | receive bank 1 |

Received packets are written into the two banks alternately (ping-pong). `rx_bank_o` changes
only when a packet is complete, so the gateway always reads a whole, consistent packet, even
while the next one is arriving.

## ARINC-429 channel (`arinc429_channel`, `arinc_tx`, `arinc_rx`)

The line is bipolar return-to-zero on two wires (`hi`, `lo`). The first half of each bit time
is a pulse on `hi` for a 1 or on `lo` for a 0. Bit 1 (the label LSB) goes first, and bit 32 is
odd parity. At least 4 idle bit times separate words.

- **Receiver.** The receiver is clocked by the pulses themselves, so it does not depend on the
  exact rate. A gap of 2 bit times ends a word. Only words with exactly 32 bits and odd parity
  are kept.
- **Storage.** Each ARINC word is stored as two 16-bit words, bits 32..17 first.
- **Packets.** The 32-word frame slot therefore holds 16 ARINC words. Every 16 good words make
  one packet.
- **Transmit path.** The transmit path reads word pairs from the transmit area and sends bits
  1..31 of each pair. It generates the parity bit itself.

## RS-422 channels (`rs422_channel`, `uart_tx`, `uart_rx`)

The lines use 8N1 serial format at 115200 baud. Packets have variable length. The
end-of-frame marker is a byte whose upper four bits are 0xF, so data bytes must not have 0xF in
their upper nibble. Received bytes are packed two per word, the first byte in the high half.

- **Odd byte count.** The last word gets a zero low byte.
- **Overflow.** Bytes beyond `MAX_WORDS` (the slot size, 18 or 16 words) are dropped and reported
  on `ev_overflow_o`.
- **Bad packets.** An empty packet, or one with a framing error, is discarded.

To transmit, the channel sends the words high byte first, followed by the marker byte 0xF0.

## Gateway and the upstream frame (`gateway_ctrl`, `eth_tx_mac`)

Every `CYCLE_CLKS` clocks (1,000,000, which is 20 ms at 50 MHz), the gateway copies the latest
packet of each channel into a 256-word aggregation RAM, one slot after another. Words past a
channel's packet length are sent as 0, and so is a channel that has no packet yet. The payload
then goes out as one Ethernet frame.

| slot | channel | words | payload bytes |
|---|---|---|---|
| 0 | RS-422 #1 | 18 | 0–35 |
| 1 | 1553 RT1 | 32 | 36–99 |
| 2 | 1553 BC2 | 12 | 100–123 |
| 3 | 1553 BC1 | 47 | 124–217 |
| 4 | RS-422 #2 | 16 | 218–249 |
| 5 | ARINC-429 (16 words as 32 halves) | 32 | 250–313 |

That is 157 words, or 314 bytes, each word high byte first. The frame is sent on a byte-wide
GMII-style interface (`eth_txd_o`, `eth_tx_en_o`, one byte per clock) and is laid out as:

- 7 × 0x55 and 0xD5;
- destination `HOST_MAC` (default broadcast);
- source `OWN_MAC`;
- EtherType 0x88B5;
- the payload;
- the CRC-32 FCS.

A frame takes about 350 clocks. If a cycle tick arrives while the previous frame is still being
collected or sent, that tick is skipped and `ev_o.overrun` pulses. With the default settings
this cannot happen.

A source that is slower than the cycle, such as BC1 at 20 Hz, has its latest packet repeated in
the frames until a new one completes. The frame carries no sequence number or freshness flag.

## Downstream control frames (`eth_rx_mac`)

A control frame is addressed to `OWN_MAC` (or to broadcast) and has EtherType 0x88B5. Its
payload is:

| byte | content |
|---|---|
| 0 | channel number, in slot order 0–5 |
| 1 | number of 16-bit words, 1–64 |
| 2… | the words, high byte first |

The words are written into a 128-word command buffer as they arrive. The command is released
to the gateway only if the frame passes three checks:

- the FCS is correct (CRC residue 0xDEBB20E3);
- the header is correct;
- the count fits the frame.

A bad frame is dropped and `ev_o.eth_cmd_bad` pulses. The gateway then copies the words into the
channel's transmit area and pulses that channel's `WRITE_DONE`.

## Top level (`vessel_daq_top`) and its parameters

| parameter | default | meaning |
|---|---|---|
| `MIL_CLKS_PER_BIT` | 50 | 1 Mbit/s at 50 MHz |
| `A429_CLKS_PER_BIT` | 500 | 100 kbit/s (ARINC high speed) |
| `UART_CLKS_PER_BIT` | 434 | 115200 baud |
| `CYCLE_CLKS` | 1,000,000 | 20 ms processing cycle |
| `OWN_MAC`, `HOST_MAC` | 02:00:00:00:15:53, broadcast | Ethernet addresses |
| `RT1_ADDR`, `BC1_TGT_ADDR`, `BC2_TGT_ADDR` | 1, 1, 31 | 1553 addresses (31 = broadcast) |

The 1553 ports are arrays `[channel][bus]`: channel 0 is RT1, 1 is BC2, 2 is BC1; bus 0 is A
and bus 1 is B.

`ev_o` (type `daq_events_t` in `daq_pkg`) carries one-clock event pulses:

- corrected and uncorrectable 1553 words;
- 1553 packets, messages and missing status words;
- ARINC good and bad words and packets;
- RS-422 packets and overflows;
- `TRANS_DONE` of each channel;
- bad control frames, dispatches, frames sent and overruns.

These pulses can drive counters or an LED. The design uses one clock domain and an active-low
asynchronous reset.

Generic synthesis of the top gives about 2500 cells, 1243 flip-flops and 30,720 bits of block
RAM in 14 RAMs of at most 4 Kbit each. That is comfortably within an Artix-7 XC7A35T.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each one also has a
watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/daq_pkg.sv tb/tb_vessel_daq_top.sv \
          --top-module tb_vessel_daq_top -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_hamming` | known vectors, then random no/single/double/triple error cases against an independent reference encoder (three errors must be miscorrected into another code word or flagged, never passed as the sent word) |
| `tb_mil_word` | waveform shape and sync types, 26-bit-time word length, corrected and rejected words, 32-word back-to-back bursts |
| `tb_mil1553_channel` | RT and BC roles against a behavioural 1553 terminal (`tb/mil_bfm.sv`); 32 + 15 split with status replies and message timing; missing status; 32 + 15 merge into 47 |
| `tb_arinc`, `tb_arinc429_channel` | ARINC line format, parity rejection, transmit timing, packets |
| `tb_uart`, `tb_rs422_channel` | serial format, variable-length packets, odd byte count, overflow |
| `tb_eth_mac` | frame format and CRC, command decoding, frames with a corrupted byte rejected |
| `tb_gateway_ctrl` | dispatch, slot order, zero padding, cycle period, overrun |
| `tb_sdp_ram` | block RAM model |
| `tb_vessel_daq_top` | end to end at short bit times (8 clocks per 1553 bit, 16 per ARINC/UART bit, 40,000-clock cycle) |
| `tb_vessel_daq_top_full` | the same scenario with the top at its default parameters (about 2.1 million clocks, a few seconds) |
| `tb_daq_rates` | default parameters, periodic sources for 160 ms: BC2 broadcasts at 50 Hz, BC1 sends 32 + 15 words at 20 Hz, RT1 receives 32 words every 20 ms; each of eight frames must hold whole, current packets, with none lost |

The end-to-end scenario is in `tb/daq_env.sv`. It works like this:

- It sends control frames to all six channels, plus one frame with a bad CRC.
- It drives traffic on every bus at the same time: corrected and rejected 1553 words, an RT
  transmit response, BC messages with and without status replies, a broadcast, a 32 + 15
  merge, an ARINC word with bad parity, and an RS-422 overflow.
- It checks every slot of the resulting frame against what was sent.
- It fails if any event type never occurs.

## Departures and design choices

The following details are not fixed by the description the design was built from. They are this
design's own choices:

- the 50 MHz clock;
- the ARINC and RS-422 bit rates;
- the 20 ms processing cycle;
- the Ethernet interface, addresses, EtherType and control-frame format;
- the buffer sizes and map;
- the 1553 response gap, message gap and status time-out;
- the RS-422 end-of-frame coding (four control bits, realised as an upper nibble of 0xF);
- the use of a passive monitor for 1553 acquisition.

Known differences from the published design:

- **Channel control.** In the original, an on-board MCU drives the 1553 boards through a host
  bus interface: an interface buffer, base address decoding and interrupt selection. Here the
  control is done by hardware state machines, and the host path is the Ethernet gateway. The
  MCU, the host bus interface, the CPU simulator and the configuration EPROM are not included.
  The analog 1553 transceivers and the Ethernet PHY are outside the FPGA and are not modelled.
- **CMD_2 word count.** The published oscilloscope capture of the BC1 transfer labels the
  messages "CMD_1 + 31 words" and "CMD_2 + 12 words". The text says 32 + 15 = 47. This design
  follows the text.
- **RAM size.** The original uses 30 of the 50 block RAMs of the XC7A35T. This design needs the
  equivalent of 7, because each channel buffer holds only 256 words.
- **Retries.** In the original, a double error raises a flag that asks for retransmission; the
  mechanism is not described. Here the RT's silence is that request: the bus controller resends
  the message after the status time-out, at most `RETRIES` times.
- **Bus controller schedule.** The BC channels send a message when the host delivers one in a
  control frame; they keep no transmit schedule of their own. The 20 Hz and 50 Hz packet rates
  are those of the equipment on the buses, and `tb_daq_rates` runs the module against them.
- **ARINC order.** ARINC words are kept in arrival order, not sorted by label.

# UDP-controlled readout system for SALTRO front-end boards

This design connects a PC to up to 40 front-end boards. The PC uses plain UDP over Gigabit Ethernet. Each board carries a SALTRO ADC chip and a small CPLD. The design has two chips:

* **SRU** (Serial Readout Unit, an FPGA). It receives UDP command packets. Each packet holds a list of 32-bit address/data pairs and a 41-bit node mask. The SRU hands the pairs to the addressed boards over serial DTC links. It also generates the L1/L2 trigger sequence, and it streams the events coming back from link 0 to a readout Ethernet MAC as an AXI4-Stream.
* **Front-end CPLD**, one per DTC link. It decodes triggers and commands from the link. It reads and writes CPLD and SALTRO registers. On each readout it pulls channel data out of the SALTRO and sends it back to the SRU as an event frame.

The top module `readout_system` joins the SRU (`sru_top`, 40 links) and one CPLD (`cpld_top`) on link 0, the way the prototype set-up was built. The other 39 links, the Ethernet receive and transmit streams and the SALTRO bus are ports.

## Clocks

| Clock | Frequency | Used by |
|---|---|---|
| `eth_clk` | 125 MHz | Ethernet receive side of the SRU: frame decoding, command distribution, write side of the per-link FIFOs |
| `dtc_clk` | 40 MHz | Everything else in the SRU, and the whole CPLD (RDOClk is the received DTC clock) |

There are three clock-domain crossings:

* The per-link dual-clock FIFO (`dcs_async_fifo`) uses Gray-coded pointers.
* The "payload loaded" level in `dcs_cmd_decoder` goes through a two-flop synchroniser.
* A few slowly changing status counters in `sru_top` are read without synchronisation. This is documented in that file.

Clock buffers, the SRU clock mux and PLL, and the CPLD's ADC-clock PLL are device primitives and are not included. The mux select (`dcs_src_sel`) and the ADC ratio select (`adc_div4`) come out as ports.

## The DTC link

Each link is a small set of DDR lines. The model works at 40 MHz and represents each DDR line as two bits per clock: bit [1] is the rising-edge half and bit [0] the falling-edge half.

**SRU → CPLD, the `dtc_trig` line** (`dtc_trig[1:0]`)

* `[1]` is the trigger half (FeeTrig).
  * L1 is a single `1` bit.
  * L2 is two `1` bits (`11`).
  * The CPLD trigger decoder sees these as shift-register patterns `0010` and `0011`/`0110`.
* `[0]` is the command half. Command bytes go out MSB first, one bit per clock, in slots of 8 clocks. The line idles at 0.
  * Every command code has its MSB set, so the first `1` bit frames a header.
  * Read/write command: header `0xE1`, then the 32-bit address word, then the 32-bit data word. That is 11 byte slots including one idle slot, or 88 clocks.
  * Fast commands are one byte each: channel readout `0xC3`, abort `0xA5`, front-end reset `0x99`.

**CPLD → SRU, the `data` and `return` lines**

* Four bits per clock form one nibble `{data[1], data[0], return[1], return[0]}`.
* A 16-bit word takes four clocks, most significant nibble first.
* The idle word is `0x0000`.
* Every frame starts with the sync word `0xBC50`. The SRU receiver aligns its word boundary on it.

| Frame | Words after `0xBC50` |
|---|---|
| reply | `0xF7F7`, address high, address low, data high, data low |
| status | `0xDCDC`, `0x0000`, status (bit 0 = SALTRO error, bit 1 = readout busy) |
| event | `0x5C5C`, then 32-bit words as high/low halves: data, or the dummy `0x80128012` while the CPLD waits for the SALTRO, then the trailer `0xC5D5C5D5`, then a status frame without sync word |

## Command path (SRU)

1. **`udp_rx_decoder`** buffers each Ethernet frame, 4096 bytes deep. It then checks the frame:
   * destination MAC;
   * EtherType IPv4, with no IP options;
   * protocol UDP;
   * destination IP;
   * the MAC's good-frame flag.

   Frames that fail are dropped and counted. For accepted frames it replays the UDP header and payload on a byte bus. The MAC and IP addresses are parameters.
2. **`udp_cmd_dist`** checks the UDP destination port (parameter `CMD_PORT`). It then reads NodeSel:
   * payload bytes 0–3 hold NodeSel[40:20] in their low 21 bits;
   * bytes 4–7 hold NodeSel[19:0].

   From payload byte 8 on, it raises `dcs_rx_dv[i]` for every selected node, one clock after the byte. Bit 40 selects the SRU itself.
3. **`dcs_cmd_decoder`** (41 copies: one per link, one for the SRU) writes the bytes into a 1024-word FIFO that packs 8 bits into 32. It waits until the whole payload is in the FIFO. Then, on the DTC clock, it pops one address word and one data word at a time and offers them to the link transmitter.
   * After each command a 160-clock watchdog runs before the next command is popped.
   * A packet may hold up to 500 commands, which is 1000 FIFO words.
   * Command address word: bit 31 is WR (1 = read), bit 30 is CType (1 = SALTRO, 0 = CPLD), bits 19:0 are the address.
4. **`sru_dtc_tx`** serialises commands onto the command half of `dtc_trig`. Its packing FSM has one state per byte slot, st0–st14. Priority order:
   1. readout (RDO);
   2. abort;
   3. CSR fast command;
   4. read/write command.

   Each fast-command input goes through a `cmd_ack_fsm`, so a pulse is held until the FSM takes it.
5. **`sru_csr`** is reached with NodeSel[40]. It decodes the low 16 address bits:

| Addr | Register |
|---|---|
| 0 | trigger mode: [0] periodic, [1] external |
| 1 | periodic trigger period (DTC clocks) |
| 2 | write: one software trigger |
| 3 | write: send fast command, code = data[7:0] |
| 4 | L1→L2 delay (DTC clocks) |
| 5 | [0] clock source select (1 = external) |
| 6 | write: realign all DTC receivers |
| 7 | status, read-only. Bits:<br>[0] link-0 RAM flag<br>[1] link-0 error<br>[2] SRU FIFO overflow<br>[3] any link FIFO overflow<br>[4] all links aligned<br>[5] any RAM overflow<br>[6] UDP frame in progress<br>[7] any TX busy<br>[15:8] link-0 dropped events<br>[31:16] command frames accepted |
| 8 | {abort count, trigger count} |
| 9 | {dropped Ethernet frames, missed triggers} |
| 10 | {ICMP echo replies, ARP replies} |

Read replies from the SRU CSRs and from the links come out as `sru_reply_*` / `link_reply_*`. They are not packed into UDP frames.

### ARP and ping

**`arp_icmp_reply`** listens to the same receive stream as `udp_rx_decoder` so that the PC can find the SRU and ping it. It produces:

* **ARP replies.** For an ARP request for the SRU's IP, it keeps the sender's MAC and IP and sends a 60-byte ARP reply.
* **ICMP echo replies.** For an echo request to the SRU's MAC and IP, it stores the frame in a 2048-byte buffer while it arrives. At the same time it sums the reply's ICMP checksum (type 0, checksum field 0). It then sends the stored frame back with the following changes:
  * MAC and IP addresses swapped;
  * type 0;
  * the new checksum.

  The IP header checksum is unchanged, because swapping addresses does not change its sum.

Replies go out on `eth_tx_data/valid/last/ready`, one byte per clock while ready is high. The first byte is ready two clocks after the frame ends, and a pending ARP reply goes before an echo reply. Only one echo is buffered at a time. A ping arriving while an echo reply is pending is dropped.

## Trigger and readout path

**`trigger_gen`** accepts three trigger sources:

* the periodic counter;
* the synchronised external input;
* the CSR write.

For each accepted trigger it sends L1, waits `l2_delay` clocks (at least 16), and sends L2 followed by a readout command to every link. If link 0's readout RAM still holds an unread event, it sends abort instead of L2/readout. Triggers that arrive during a sequence are counted as missed.

**In the CPLD:**

* **`cpld_trig_decoder`** turns the trigger patterns into the SALTRO's active-low trigger lines:
  * `trig_l1_n` is low for 10 clocks;
  * `trig_l2_n` is low for 2 clocks;
  * an unknown pattern is ignored for 6 clocks and counted.
* **`cpld_dtc_rx_decoder`** decodes the command half of the line. It produces fast-command flags and read/write commands.
* **`cpld_cmd_demux`** routes each command by CType:
  * to **`cpld_csr`**, which uses 8-bit addresses: 0x00 channel mask, 0x01 ADC clock ratio, 0x02 status, 0x10–0x17 counters, 0x60 scratch;
  * or to the SALTRO.

  For reads it packs the reply and runs the reply_rdy/frame_state handshake with the transmitter.
* **`saltro_controller`** owns the SALTRO bus. On a readout command it reads the unmasked channels one at a time with the CHRDO instruction:
  1. The SALTRO sends a channel last sample first, so the 40-bit words go into a 256-word channel RAM used as a LIFO.
  2. A transfer FSM reads that RAM backwards into the 1024-word event FIFO. Each 40-bit word (four 10-bit samples) becomes two 32-bit words, `{6'b0, s[39:30], 6'b0, s[29:20]}` and `{6'b0, s[19:10], 6'b0, s[9:0]}`.
  3. The next channel is requested only when the LIFO is empty (`con_busy` low) and the FIFO has room for a whole channel (`fifo_almost_full` low). This is the back-pressure point of the CPLD.
  4. After the last channel, a broadcast RPINC is sent and `event_done` is raised.
  5. A command that gets no answer is given up after 255 clocks.
* **`cpld_dtc_tx`** sends the frames described above. Its priority order is reply, then event, then status. It inserts the dummy word whenever the FIFO runs dry during an event. The SALTRO is much slower than the link, so this is the normal case.

**Back in the SRU:**

* **`sru_dtc_rx`** (one per link) does the following:
  1. It finds the `0xBC50` boundary.
  2. It decodes frames.
  3. It writes event words into a 1024-word RAM, skipping dummies.
  4. On the trailer it raises `ram_flag` and freezes the word count.

  Any of these conditions drops an event, which is counted or flagged:
  * it arrives while `ram_flag` is high;
  * its words go past the RAM depth.
* **`readout_fsm`** (link 0 only) puts the event size in bytes on `tuser`. It streams the words least significant byte first while `tready` is high, then releases the RAM. Links 1–39 release their RAMs at once.

## Sizes

All defaults are full size.

| Parameter | Default |
|---|---|
| `NLINKS` | 40 |
| command FIFO (`CMD_AW`) | 1024 words |
| watchdog | 160 |
| readout RAM (`RAM_AW`) | 1024 words |
| CPLD channels (`NCH`) | 16 |
| channel LIFO | 256 × 40 bit |
| event FIFO | 1024 × 32 bit |

One event can therefore hold 2048 samples. That is enough for 2 channels of 1024 samples, or one channel of 975 samples. It is not enough for 3 channels of 1024 samples, or for 16 channels of 150 samples (2400 samples); those events are cut at 1024 words and flagged. At the full defaults synthesis keeps about 1.4 Mbit of memory in the SRU: the 41 command FIFOs, the link-0 readout RAM and the frame buffer. The RAMs of links 1–39 are never read and are removed.

## Where this design departs from, or adds to, its specification

**Own choices where the specification gives no value:**

* the fast-command codes;
* the 8-clock byte slot;
* the start-bit framing of command bytes;
* the nibble-to-line mapping;
* the L2 delay and the abort-when-busy rule;
* all CSR maps;
* the SALTRO instruction codes, address bit positions and 10-bit packing;
* the UDP port, MAC and IP;
* the way "payload fully loaded" is detected.

**Differences from the specification:**

* **Event trailer.** The specification calls it a 32-bit word but prints a 48-bit value. The 32-bit `0xC5D5C5D5` is used.
* **Watchdog length.** The 160-clock watchdog was sized for a command taking a little over 128 clocks on the link. Here a command takes 88 clocks, so the watchdog is longer than needed. It is kept at 160.
* **Capacity.** The specification estimates that 16 channels × 150 samples fit in one event. With two samples per 32-bit word they do not (1200 > 1024 words).
* **Not included:** the Ethernet MACs and the clock primitives. CSR read replies therefore appear as ports, not as UDP frames. ARP and ping are answered.
* **IP header checksum.** It is not checked.
* **Sync word.** Every CPLD frame (reply, status and event) starts with `0xBC50`. The specification names the sync word for event frames only. Here the receiver needs it to find the word boundary before any frame.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb/saltro_model.sv` is a behavioural model of the SALTRO's digital bus:

* register access;
* CHRDO transfers whose data depend on event, channel and word index;
* an adjustable delay before each transfer;
* an adjustable number of words per channel.

Example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/readout_pkg.sv tb/tb_readout_system.sv
./obj_dir/Vtb_readout_system +verilator+rand+reset+2
```

`tb_readout_system` runs the whole chain at the default sizes (about ten seconds of wall time). It sends UDP command packets to the SRU CSRs and to link 5 and link 0. It reads and writes CPLD and SALTRO registers and runs software, external and periodic triggers with readout. It also exercises:

* FIFO back-pressure, where the CPLD stalls on `fifo_almost_full`;
* dummy words;
* abort while busy;
* reset;
* word realignment;
* status frames;
* a masked channel;
* an ARP request and a ping, answered on the transmit stream.

It checks every AXI4-Stream packet against the model's data. It counts each of these mechanisms and fails if one never happens.

`tb_workloads` also runs at the default sizes. It reads out events of the sizes discussed under *Sizes*:

* 2 channels × 1024 samples;
* two events of 976 samples;
* 3 channels × 1024 samples;
* 16 channels of about 150 samples.

It checks that the fitting events arrive complete. It checks that the oversized ones arrive as their first 1024 words, with the overflow flag set.

The block testbenches override sizes only where a smaller memory makes the test shorter.

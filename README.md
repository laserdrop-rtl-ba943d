# LaserDrop: a two-beam optical file link, FPGA side

LaserDrop moves a file between two computers that are about a metre apart,
over two visible/near-infrared laser beams instead of radio. Each computer
plugs into its own unit over USB. A unit is an FT232H USB transceiver, an
FPGA, two laser drivers (515 nm green, 793 nm infrared) and two photodiode
receivers. The two units point their beams at each other. Either unit can
send; the one whose computer starts a transaction becomes the sender and the
other the receiver.

The main idea is to treat the two beams as one 16-bit-wide channel. Each
laser carries an ordinary 8N1 UART stream at 6.25 Mbaud (a 50 MHz clock, 8
clocks per bit). The two lasers always start their frames together, so every
transfer is a **byte pair**: byte 0 on green, byte 1 on infrared. Everything
on the optical link is built from pairs: packet data, acknowledgements and
control messages. The receiver oversamples each bit eight times and takes a
majority vote. Together the two beams give 10 Mbit/s of bytes, against a
requirement of 4 Mbit/s of file data.

This repository holds the synthesizable FPGA logic of one unit and
testbenches for every block. It also has an end-to-end test in which two
units pass a file through a simulated optical channel with injected faults.
The analog parts (laser drivers, photodiodes, transimpedance amplifiers,
charge pumps, power) and the host application are not logic and are not
here. The RTL leaves their pins as top-level ports.

## Data on the wire

A file is cut by the host into **64-byte packets**:

| byte | content |
|------|---------|
| 0    | packet start `7E` |
| 1    | tag, incremented per packet, wraps at 256 |
| 2-61 | 60 data bytes |
| 62-63| 2 check bytes (Hamming code, computed and checked by the hosts) |

On the lasers a packet is 32 byte pairs. Control messages are single pairs
`{code, argument}`:

| pair | direction | meaning |
|------|-----------|---------|
| `{06, tag}` ACK | receiver → sender | packet with this tag arrived whole |
| `{15, 00}` FAIL | receiver → sender | a packet was cut short (framing error, lost beam, gap) |
| `{12, tag}` RESEND | receiver → sender | the receiving host found an uncorrectable error in this packet |
| `{7D, len}`, `{tag, 00}` STOP | sender → receiver | last packet's data length and tag |
| `{04, 00}` DONE | receiver → sender | receiving host has everything |

The host side uses single bytes with the same codes, plus `02` (start of
transaction) and `03` (transaction complete):

* Sender host → FPGA: `02`; then packets (`7E …`, 64 bytes); then `7D len tag`.
* Sender FPGA → host: `06 tag` (send the next packet), `12 tag` (send
  this old packet again), and `03` at the end.
* Receiver FPGA → host: `02`; then each good packet (64 bytes); then
  `7D len tag`; then `03`.
* Receiver host → FPGA: `12 tag` whenever its Hamming check fails, and `04`
  when it has the stop message and nothing is outstanding.

Only the packet layout, the message kinds and their order come from the
original design. The code values, the pair form of control messages and the
byte messages to the host are this implementation's choices.

## The transaction (`ld_ctrl`)

`ld_ctrl` is one state machine that serves both roles. The role is decided in
`S_INIT`, where the lasers are off and both square-wave detectors listen.

**Opening handshake.** A `02` from the host makes the unit the sender. It
sends a square wave on both lasers: 8 bit periods alternating 0/1, starting at
0 (`S_HS_SEND`). Then it waits for the same wave to come back (`S_HS_WAIT`).
It repeats the wave every `HS_TIMEOUT` cycles. After `HS_RETRIES` attempts it
gives up and returns to INIT. A unit in INIT that detects the wave on both
receivers becomes the receiver. It answers with its own wave (`S_HS_REPLY`)
and sends `02` to its host. The handshake also proves that both beams are
aligned, because detection needs both lanes within `SKEW_MAX` cycles of each
other.

**Sending a packet, a two-stage pipeline.** In `S_TX_HDR` the sender reads
one host byte. On `7E` it enters `S_TX_SEND`, where two counters run
against each other:

* `fcnt` counts bytes fetched from the host. Every second byte, the pair is
  written into the 512-bit packet register.
* `scnt` counts pairs handed to the laser transmitter. Pair *k* may go once
  `fcnt ≥ 2k+2`.

The host port moves one byte per microsecond. A pair occupies the lasers for
1.6 µs. So fetching runs ahead of sending, and the laser stage is kept busy
from the second pair on. Without the overlap a packet would cost 64 µs of
fetching before 51 µs of sending. After pair 31 the unit waits for the answer
(`S_TX_WAIT_RESP`):

* `{ACK, tag}` whose tag matches byte 1 of the register: the packet is done.
  `06 tag` goes to the host, and the unit returns to `S_TX_HDR`.
* Anything else resends the whole packet from the register, with no host
  traffic. That covers FAIL, an ACK with the wrong tag, a line error, and
  `RESP_TIMEOUT` cycles of silence.
* A FAIL that arrives while the packet is still going out restarts it at
  pair 0 at once.

`{RESEND, tag}` can arrive in any sender state. It is passed straight to the
host as `12 tag` and does not disturb the packet in flight. The host answers
by sending that old packet again as an ordinary packet.

**Stop and done.** `7D len tag` from the host goes out as two pairs. The
sender stays in `S_TX_HDR`, still sending any packets its host re-sends for
RESEND tags, until DONE arrives. It repeats the stop message every
`DONE_TIMEOUT` cycles. DONE starts the closing handshake, which uses the
same square wave as the opening one. When the answer arrives, `03` goes to
the host and the unit returns to INIT.

**The receiver's three parallel jobs.** The receiver works three
independent lines at once: laser in, host out and host in.

1. *Laser in → ACK/FAIL.* Pairs starting with `7E` open a packet
   (`S_RX_PKT`), and the next 31 pairs fill the register. A complete packet
   goes to `S_RX_RELAY`, which copies it into the host queue. Then
   `S_RX_RESP` sends `{ACK, tag}`. A framing/skew error, or a gap of more
   than `RX_GAP_CLKS` cycles inside a packet, sends FAIL and discards the
   partial packet. The receiver does not check the Hamming bytes; its host
   does.
2. *Host out.* Relayed packets, the stop message (`S_RX_STOP` collects its
   two pairs) and status bytes go through a 128-byte FIFO to the
   fast-serial port. The FIFO keeps the laser side running while the host
   briefly deasserts FSCTS.
3. *Host in.* A small sub-machine (`HC_IDLE → HC_TAG → HC_SEND`) turns
   `12 tag` from the host into `{RESEND, tag}` on the lasers. It can do this
   in the middle of collecting a packet, because the receiver's own laser
   transmitter is otherwise idle. A pending ACK/FAIL has priority. `04`
   sends `{DONE, 00}`, but only between packets. The receiver then waits in
   `S_RX_TERM_WAIT` for the closing wave and answers it
   (`S_RX_TERM_REPLY`).

If the sender goes silent for `RX_IDLE_TIMEOUT` cycles, the receiver gives
up and returns to INIT.

**Message register.** Host-bound status messages (`06 tag`, `12 tag`, `02`,
`03`, `7D len tag`) are built in a three-byte register, `msg`, and drained
one byte per accepted cycle. Laser messages arrive at least 1.6 µs apart, and
the host queue takes a byte every cycle. So a message is always gone before
the next one can be built. An assertion (`a_msg_free`) checks this.

## Laser link

**Transmit (`laser_link_tx`, `laser_uart_tx`, `laser_mod`).** There are two
UART transmitters, one per laser. They take a pair only when both are ready.
They accept the next pair in the last cycle of the stop bit, so frames follow
back to back with no idle bit (80 clocks per pair). A square-wave request
has priority over a waiting pair. The wave is driven on both lanes.

Each lane's bit drives `laser_mod`, a three-level laser drive:

| level | meaning | gates |
|-------|---------|-------|
| off | the unit is in INIT | none |
| low | logic 0 | low-power branch |
| high | logic 1 | both branches |

A 0 keeps the laser at low power instead of dark, because that switches
faster. The receiver's comparator sees only high as 1, so low and off both
read as 0. The gate outputs are registered, so the two gates never glitch
apart.

**Receive (`laser_link_rx`, `laser_uart_rx`, `square_wave_det`).** Each
comparator output passes through a two-flop synchroniser. `laser_uart_rx`
then works as follows:

* It finds the start edge.
* It takes eight samples per bit and counts the ones.
* It decides 5 or more as 1 and 3 or fewer as 0. A 4-4 tie goes to the
  middle (fifth) sample.
* A start bit that votes 1 is a glitch and is ignored.
* The stop bit is voted over its first 6 samples, so the receiver is ready
  for a start bit that follows immediately.
* A stop bit that votes 0 is a framing error. After one, the receiver waits
  for the line to be high again before it looks for a new frame. A blocked
  beam reads as a long 0 and must not be taken for a string of zero bytes.

`laser_link_rx` pairs the two lanes. Each lane's byte is held until its
partner arrives.

* If the partner misses a window of `SKEW_MAX` cycles (4 bit times), or
  either lane reports a framing error, the held byte is dropped and `err`
  pulses once.
* A partner byte that still turns up inside the window is also dropped, so
  one fault gives exactly one error.

`square_wave_det` measures the length of each run between edges. It counts
runs of `CLKS_PER_BIT ± TOL` clocks, and `MIN_RUNS` good runs in a row make a
detection. Data frames rarely contain six consecutive single-bit runs, and
detection is only enabled in the states that expect a wave. One side effect:
the 8-period wave also decodes as a UART byte `D5` on each lane. The
controller ignores pairs in the handshake states, so this is harmless.

## Host port (`ft_fast_serial`)

The FT232H's Fast Serial mode is a synchronous serial link clocked by the
FPGA. `FSCLK` is 50 MHz / 5 = 10 MHz. A frame is:

* a 0 start bit;
* 8 data bits, LSB first;
* a channel bit, 0 = channel A.

The frame format is the same in both directions. The FPGA changes FSDI on the
falling edge of FSCLK. It samples FSDO on the rising edge, in the same
system-clock cycle that raises FSCLK. No synchroniser is needed because this
block generates FSCLK.

Flow control works in both directions:

* Towards the host, a frame starts only while `FSCTS` is high.
* From the host, FSCLK stops while the one-byte receive register is full.
  The transceiver therefore cannot push a byte that would be lost.

Each direction carries 1 Mbyte/s.

## Top level (`laserdrop_top`)

`laserdrop_top` wires together the parts in the table below. Lane 0 is green
and lane 1 is infrared.

| part | role |
|------|------|
| `ft_fast_serial` | FT232H port |
| `byte_fifo` | host-bound queue, `HOST_FIFO_DEPTH` bytes |
| `packet_buffer` | 512-bit packet register; byte 1 is exported as the tag |
| `laser_link_tx` | pairs and square waves onto the lasers |
| two `laser_mod` | three-level drive of each laser |
| `laser_link_rx` | pairs, errors and square waves from the receivers |
| `ld_ctrl` | transaction state machine |

Pins:

* `fsclk`, `fsdi`, `fsdo`, `fscts`: FT232H.
* `las_gate_lo[1:0]`, `las_gate_hi[1:0]`: laser driver MOSFET gates.
* `pd_in[1:0]`: receiver comparator outputs.
* `tia_nen`, `tia_nidc_en`: amplifier and ambient-light-cancellation
  enables. They are held off in reset and on afterwards.
* `state`, `is_tx`, `ev`, `las_state`: debug and LED outputs. `ev` is a
  struct of one-cycle pulses, one per protocol mechanism.

Synthesis (generic yosys flow) gives about 1000 word-level cells, 420
flip-flop bits and 1536 memory bits: the FIFO and the packet register.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `CLKS_PER_BIT` | 8 | clocks per laser bit and oversampling ratio (6.25 Mbaud at 50 MHz) |
| `HS_BITS` | 8 | square-wave length in bit periods |
| `FSCLK_DIV` | 5 | system clocks per FSCLK period |
| `HOST_FIFO_DEPTH` | 128 | host-bound queue |
| `HS_TIMEOUT`, `HS_RETRIES` | 4096, 16 | handshake repeat interval and limit |
| `RESP_TIMEOUT` | 16384 | sender's wait for ACK before resending (328 µs) |
| `RX_GAP_CLKS` | 4096 | largest gap inside a packet before FAIL |
| `RX_IDLE_TIMEOUT`, `DONE_TIMEOUT` | 65536 | receiver give-up and stop-message repeat |

The packet size (64 bytes), the 8x oversampling, the two lanes, the 8-period
handshake and the 10 MHz host-side stage are the original design's numbers.
All time-outs and retry limits are this implementation's own choices.

## Where this departs from the original, and limits

* **Laser bit rate.** One passage puts the laser stage at "5 MHz or less".
  The rate analysis that picks oversampled UART gives 50 MHz / 8 = 6.25
  Mbaud per laser. This design uses 6.25 Mbaud. `CLKS_PER_BIT = 10` gives 5
  Mbaud if needed.
* **Hamming coding** stays in the host. The FPGA relays the two check bytes
  untouched, and it learns about bad packets only through `12 tag`.
* **ACK carries the tag**, and the sender accepts only its own tag. A stale
  ACK from a previous packet can therefore not advance the file.
* **No byte stuffing.** A packet is recognised by `7E` in byte 0 of a pair.
  After a FAIL, the rest of an interrupted packet could in principle contain
  a `7E` in pair position 0 and start a false packet. The sender restarts on
  FAIL straight away, and a false packet is caught by the tag check and the
  host's Hamming check. It is still a weakness.
* **Duplicates.** If an ACK is lost, the receiver gets the same packet
  twice. Its host must discard duplicates by tag. The test host does.
* **Tags wrap at 256.** The FPGA does not care. The hosts order wrapped tags
  by arrival.
* **Analog parts** (laser drivers, photodiode front ends, charge pumps,
  power) are outside the RTL. The receiver is assumed to deliver a clean
  logic level per lane.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_laser_uart_tx` | frame bits and bit times, back-to-back frames (80 clocks per byte) |
| `tb_laser_uart_rx` | random bit phase; one or two flipped samples per bit (majority vote); idle glitches; framing error; lost beam; 2% fast transmitter; latency |
| `tb_laser_mod` | level and gate mapping against a reference |
| `tb_packet_buffer` | pair and byte reads, tag, partial overwrite |
| `tb_square_wave_det` | jittered wave detected once at the 6th run; silent for a half-rate wave, a short wave, random data, and when disabled |
| `tb_laser_link_tx` | lanes in step, pairs back to back, square-wave shape and priority |
| `tb_laser_link_rx` | lane skew, lost lane, framing error gives a single `err`, two-lane wave detection |
| `tb_ft_fast_serial` | against a behavioural FT232H (`tb/ft232h_model.sv`): both directions, FSCTS stalls, clock stopping when the FPGA is not ready |
| `tb_ld_ctrl` | one controller against a scripted peer at pair level, both roles (details below) |
| `tb_laserdrop_top` | the whole design end to end (details below) |
| `tb_laserdrop_file` | file-size workloads on two units: 200 packets one way, then 2560 packets the other way through a failing channel (details below) |

`tb_ld_ctrl` steps through, in order:

* handshake retry;
* pipelined first send;
* FAIL;
* wrong-tag ACK;
* time-out;
* RESEND forwarding;
* ACK;
* stop, DONE and the closing handshake;
* then the receiver role: relay and ACK, FAIL on a line error, host RESEND,
  stop relay, DONE and the closing handshake.

`tb_laserdrop_top` runs two complete units at default parameters:

* behavioural FT232H and host programs on each side;
* an optical channel in which only high laser power reads as 1;
* a 12-packet file whose last packet is short.

It injects these faults:

* a blocked beam during the handshake;
* a flipped data bit, caught by the host's check;
* a beam blocked mid-packet;
* a lost ACK;
* FSCTS held low.

It checks:

* the file, byte for byte;
* that every protocol mechanism happened at least once (counted from the
  `ev` pulses);
* the data rate over the error-free stretch. The measured rate is about 6.5
  Mbit/s of file data, against the 4 Mbit/s requirement.

It is also the full-size test.

`tb_laserdrop_file` runs two transfers between two units at default
parameters. A behavioural host (`tb/ld_file_host.sv`) plays the application
on each side and resolves wrapped tags by position.

* A → B: a 200-packet file on a clean channel, at 6.5 Mbit/s.
* B → A: a 2560-packet file. The tag wraps ten times. The channel keeps
  failing:
  * a flipped bit in every 50th packet;
  * both beams blocked in the middle of every 97th packet;
  * the return beam blocked during every 131st ACK.

The second file still arrives intact, at 6.0 Mbit/s. Every recovery path is
counted against the faults injected.

One behaviour shows up there: a FAIL makes the sender restart at once. If the
beam is still blocked at that moment, the restarted packet's start pair is
lost too. The receiver then ignores the rest, and the sender's answer
time-out (328 µs) recovers the packet. A shorter `RESP_TIMEOUT` makes this
cheaper.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ld_pkg.sv tb/tb_laserdrop_top.sv --top-module tb_laserdrop_top
./obj_dir/Vtb_laserdrop_top +verilator+rand+reset+2
```

Replace `tb_laserdrop_top` with any other testbench name. The end-to-end test
takes a few seconds and the file workloads about 20 seconds.

# CLAWS node: an open IEEE 802.15.4 baseband for cross-layer experiments

This is the digital part of a software-defined IEEE 802.15.4 node (2.4 GHz band, O-QPSK,
250 kbit/s). Stock radio chips fix their PHY and lower MAC in silicon. This design opens both up:
- The preamble, SFD, CRC polynomial, maximum length, spreading code, modulation, pulse shape and
  power are all run-time registers.
- The time-critical MAC work (buffering, acknowledgements, CSMA/CA) runs in hardware next to the
  radio. A slow host link cannot stretch its timing.
- A numerically controlled frequency shifter on each path lets one node receive on one channel
  while it transmits on another. That makes a full-duplex multi-channel relay possible with no
  retuning delay.

At reset the node is a standard 802.15.4 radio. Every departure from the standard is a register
write away.

```
 host TX FIFO ─┐                                                       ┌─► host RX FIFO
               ├► tx_loader ► tx_framer ► chip_spreader ► oqpsk_mod    │
 MAC engine ───┘  (origin)   (SHR,PHR,     (4 bit → 32   (I/Q, Tc     rx_writer (destination)
     ▲                        FCS)          chips)        offset)      ▲        │
     │                                                        ▼        │        ▼
     │                                   pulse_shaper ► digital_shifter(TX) ► tx_i/tx_q
     │                                                                 │
     │   rx_i/rx_q ► digital_shifter(RX) ─┬► cca (RSSI, clear) ──► MAC │
     │                                    └► msk_demod ► chip_correlator ► sfd_detect ► packet_extractor
     │
     └──► mac_processor ◄──► shared_mem (RX buffer 0..127, TX buffer 128..255) ◄──► embedded CPU port
                                 phy_config: registers written by host or CPU, read by every block
```

`claws_top` is one node. The analog front end (DAC/ADC and RF), the host PC with its command
software and bus, and the embedded CPU that runs the network stack are outside the RTL. Their
signals are the top's ports.

## Clock, sample rate and latency

There is one clock, and one complex sample moves per clock in each direction. `OSR`, the samples
per chip, defaults to 8. At the 802.15.4 chip rate of 2 Mchip/s, the clock therefore runs at
16 MHz and the sample rate is 16 Msample/s. Every rate and time below assumes those defaults.

| path | latency |
|---|---|
| chip into `oqpsk_mod` → first shaped sample | 1 clock (modulator) + 1 (shaper) |
| digital shifter | 2 clocks |
| RX sample → demodulated chip | 4 clocks |
| chip → correlator verdict | 1 clock |
| last PSDU octet received → ACK transmission starts | ≤ 4 clocks, plus the programmable `ACK_DELAY` |
| CPU transmit request → PHY start, CCA disabled | a few clocks |

## Transmit chain

1. **tx_loader** selects the PSDU source (register bit `TX_SRC`).
   - From the host FIFO, a packet is one length word (PSDU length including FCS, bits 6:0),
     followed by the payload octets.
   - From the MAC engine, the length comes with a start request, and octets are pulled one by one.
   - The source is sampled only when the transmit chain is idle.
2. **tx_framer** builds the PPDU, nibble by nibble, low nibble first. In order:
   - 8 zero symbols of preamble;
   - the programmable SFD;
   - the PHR (7-bit length);
   - the PSDU octets;
   - if `TX_CRC` is set, a 16-bit FCS: a reflected CRC with the programmable polynomial,
     initial value 0, sent low byte first. The default 0x8408 is the ITU-T CRC-16 of the standard.

   Lengths of zero, above `TX_MAX_LEN`, or below 2 with FCS on are refused. `tx_len_err` pulses
   and nothing is sent.
3. **chip_spreader** looks up each symbol's 32-chip sequence in a writable table and sends chip
   c0 first. The reset contents are the standard table:
   - symbol 0 is `11011001110000110101001000101110` (c0 first);
   - symbols 1..7 are symbol 0 rotated by 4k chips;
   - symbols 8..15 are symbols 0..7 with every odd chip inverted.
4. **oqpsk_mod** puts even chips on I and odd chips on Q. Every pulse lasts 2 Tc (Tc = one chip
   period), and with `OFFSET` set, Q lags I by one Tc. With `OFFSET` clear, both branches start
   together (plain QPSK).
5. **pulse_shaper** gives each pulse the half-sine shape `sin(pi*(k+0.5)/(2*OSR))`, or a
   rectangle when `SHAPE` is set.
   - The sign comes from the chip.
   - The amplitude is half of full scale times `TX_GAIN/128`, so gains up to 255 cannot overflow.
   - The shape table is computed at elaboration.
6. **digital_shifter** (TX) multiplies by `exp(j*phase)`. The phase advances by `TX_FCW` each
   sample (32-bit accumulator, 1024-entry cos/sin table computed at elaboration).

## Receive chain: reading O-QPSK as MSK

Offset QPSK with half-sine pulses is exactly MSK. The phase moves by ±90° over every chip period,
so the receiver never has to recover the carrier phase. It only has to tell which way the phase
turned during each chip. The receiver is built on that:

**msk_demod**
- *Filter.* A moving average over OSR/2 samples (4 at the defaults) removes much of the noise
  outside the signal band. It is the only filter in the receiver.
- *Discriminator.* It computes `Im(x[n]·conj(x[n-1]))` on the top 8 bits of each filtered
  sample. The sign of this value gives the direction of rotation.
- *Carrier offset removal.* A frequency offset adds a constant to the discriminator. A running
  mean with a time constant of 512 samples estimates that constant, and it is subtracted.
- *Chip decision.* The corrected values are summed over a sliding window of one chip (OSR
  samples).
- *Timing.* For each of the OSR sampling phases, a running mean of `|sum|` is kept over about
  16 chips. The chip is taken at the current phase. The phase moves to a neighbour that is 1/8
  stronger, which follows a sampling-clock offset without toggling. It jumps straight to the
  strongest phase only if that one is 1/2 stronger, as at the start of a frame. At least OSR/2
  samples must pass between two chips, so a phase change never emits a chip twice.
- *Output.* One hard chip per Tc: 1 means counter-clockwise.

**MSK form of the chips.** The direction of rotation during the transition into chip m is a fixed
function of the transmitted chips:

    d[m] = c[m] xor c[m-1] xor (m odd)

So each 32-chip sequence has a known MSK pattern `d[1..31]`. `d[0]` depends on the last chip of
the previous symbol, so it is not used.

**chip_correlator**
- Keeps the last 31 MSK chips.
- For every incoming chip, compares them with the MSK pattern of all 16 table entries.
- Reports the best symbol and its number of agreeing chips (0..31).
- The patterns are derived from the same run-time table the transmitter uses. Writing a new
  spreading code therefore changes both sides.

**sfd_detect** finds symbol timing from the correlator output.
- *Search.* A verdict of symbol 0 with a score of at least 26 fixes the symbol boundary. From
  then on, only every 32nd verdict is used.
- *Preamble and SFD.* After at least two preamble symbols, the two SFD nibbles must follow. If a
  symbol breaks that pattern, the search starts again.
- *Lock.* When the SFD is found, `sfd_irq` pulses and the following symbols are passed on.
- *Errors.* Data symbols are passed on whatever their score. Bit errors are left to the FCS.

**packet_extractor**
- Assembles octets and reads the PHR.
- Refuses lengths of zero, above `RX_MAX_LEN`, or below 2 with FCS checking on. `rx_len_err`
  pulses.
- Outputs the PSDU octets, running the CRC over the whole PSDU including the FCS. A correct frame
  leaves zero in the CRC register.
- At the last octet it reports `done` with the FCS verdict, and tells `sfd_detect` to search
  again.

**rx_writer** sends the PSDU to the host RX FIFO, to the MAC engine, or to both (`RX_DST_H`,
`RX_DST_M`).

**cca** averages `I²+Q²` over blocks of 2048 samples (8 symbol periods) into `rssi`. The channel is
clear while `rssi < CCA_THRESH`.

Apart from the demodulator's short moving average, there is no channel-select filter. A signal
5 MHz away passes at about −13 dB, so adjacent-channel rejection is left to the analog side.
In simulation, a clean frame was still received when the receive shift was wrong by 5 MHz. At
that offset the one-sample discriminator aliases, and the offset removal absorbs what is left.
The end-to-end test therefore also uses a ±2.5 MHz pair, where such an error loses the frame.

## Multi-channel operation with the shifters

Each path has its own shifter. The frequency word is `f/fs·2^32`, signed, and covers ±8 MHz at
16 Msample/s.

For the relay case the front end is tuned to 2.410 GHz:
- `RX_FCW = 0xB000_0000` (−5 MHz) receives channel 11;
- `TX_FCW = 0x5000_0000` (+5 MHz) sends on channel 13;
- `FULL_DUP` keeps the receiver on while the node transmits.

With both words zero, the node is a plain single-channel radio.

## Lower-MAC engine (`mac_processor`)

**Receive**
- At `sfd_irq` it opens the receive buffer (shared memory 0..127) and stores every octet.
- It keeps its own copy of the frame-control and sequence-number octets.
- At the end of the frame it raises `rx_avail` with `rx_len` and `rx_fcs_ok`, and pulses
  `irq_rx`. With `FCS_FILTER` set, this happens only for a correct FCS.
- The buffer belongs to the CPU until it pulses `cpu_rx_release`. A frame that arrives before
  then is dropped and counted in `rx_dropped`.

**Acknowledgement**
- Sent when `AUTO_ACK` is set, the frame is correct, frame-control bit 5 (ACK request) is set,
  and the frame is not itself an ACK.
- The engine starts a 5-octet PSDU: `0x02 0x00 <sequence number>`, followed by the FCS from the
  framer.
- The ACK goes out `ACK_DELAY` clocks after the frame ends (0 by default) without channel
  sensing, and `ack_sent` pulses.

**Transmit**
- The CPU writes a frame into shared memory from address 128 and pulses `cpu_tx_req` with
  `cpu_tx_len` (including FCS).
- With `CCA_EN` set, unslotted CSMA/CA runs first:
  - a random backoff of 0..2^BE−1 units of 5120 clocks (20 symbols);
  - then a clear-channel decision on the second of two CCA blocks;
  - a busy channel raises BE from 3 up to 5 and retries;
  - after 4 busy decisions, `tx_fail` pulses and `busy_cca` counts each busy decision.
- With `CCA_EN` clear, the frame starts at once.
- `tx_done` pulses when the transmit chain is idle again. `tx_fail` pulses instead if the framer
  refused the length.

**Duplex**
- With `FULL_DUP` clear (standard), the receiver is disabled while the engine transmits, and a
  transmission waits until the receiver is no longer locked on a frame.
- With `FULL_DUP` set, both run at once.

**Transmit source.** MAC frames and ACKs only go out while `TX_SRC` selects the MAC. The host FIFO
path and the MAC path share one transmitter.

## Registers

Both the host port (`host_we/addr/wdata`) and the CPU port (`cpu_we/addr/wdata`) can write the
32-bit registers. When both write in the same clock, the host write wins.

| addr | name | reset | meaning |
|---|---|---|---|
| 0x00 | CTRL | 0x0000_0EF6 | bit 0 TX_SRC (0 host, 1 MAC), 1 TX_CRC, 2 OFFSET, 3 SHAPE, 4 RX_DST_H, 5 RX_DST_M, 6 RX_CRC, 7 CCA_EN, 8 FULL_DUP, 9 AUTO_ACK, 10 FCS_FILTER, 11 RX_EN |
| 0x01 | TX_CRC_POLY | 0x8408 | reflected CRC polynomial, transmit |
| 0x02 | TX_SFD | 0xA7 | SFD octet, low nibble sent first |
| 0x03 | TX_MAX_LEN | 127 | longest PSDU accepted for transmission |
| 0x04 | TX_GAIN | 128 | linear amplitude, 128 = nominal |
| 0x05 | TX_FCW | 0 | transmit shift, f/fs·2^32 |
| 0x06 | RX_FCW | 0 | receive shift, f/fs·2^32 |
| 0x07 | CCA_THRESH | 1000 | clear while rssi is below this |
| 0x08 | RX_CRC_POLY | 0x8408 | reflected CRC polynomial, receive |
| 0x09 | RX_SFD | 0xA7 | SFD expected |
| 0x0A | RX_MAX_LEN | 127 | longest PSDU accepted |
| 0x0B | ACK_DELAY | 0 | clocks between a received frame and its ACK |
| 0x40–0x4F | CHIP[s] | standard | chip sequence of symbol s, bit j = chip c_j |

## Host and CPU interfaces

**Host FIFOs.** Both are 256 entries of 9 bits, with valid/ready handshakes.
- TX words: one length word, then the payload octets. Leave out the FCS when `TX_CRC` is set.
- RX words: the PSDU octets (FCS included) with bit 8 clear, then one status word with bit 8 set
  and bit 0 = FCS correct. If the RX FIFO is full, words are lost and counted in `rx_overflow`.

**CPU port.** The embedded CPU sees:
- the register write port;
- its own port on the 256-byte dual-port shared memory (one clock read latency);
- the MAC command and status signals listed above.

## Departures from the original system

- **Receiver front end.** The original PHY has no fixed receiver algorithms. Here the
  demodulator, carrier-offset and timing recovery, correlator thresholds and SFD search rules are
  simple choices made for this design. The only filter is a 4-sample moving average; there is
  no decimation.
- **Receive modulation.** The receiver demodulates only O-QPSK with half-sine pulses. The
  transmitter's QPSK and rectangular-pulse alternatives can be generated but not received.
- **Sample rate.** The sample rate (`OSR`) is a build-time parameter, not a run-time setting.
- **MAC.** The original MAC is a small processor whose program can be replaced at run time.
  Here, the tasks it performs are a fixed state machine with register switches: auto-ACK, ACK
  delay, FCS filter, CSMA/CA on/off, half/full duplex. Changing MAC behaviour beyond those
  switches means changing the RTL.
- **Made up for this design:** the register map, the FIFO word formats and the shared-memory
  layout.
- **Taken from the 802.15.4 standard** (not from the original system's description): the CSMA/CA
  constants, the chip table and the FCS.

## Size

`claws_top` at its defaults synthesises in yosys to about 2,900 coarse cells (an adder or a
multiplier counts as one cell) and 1,560 flip-flops. Flattened and mapped by abc to generic
two-input gates, the logic is about 36,400 gates. It also uses 14 memories, 73 kbit in all:
- the two host FIFOs;
- the shared memory;
- two 1024×32 cos/sin tables;
- the pulse table.

## Verification

Each block has a self-checking testbench in `tb/`, `tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. Expected values are computed in the testbench, independently of
the RTL. Some examples:
- an MSB-first CRC on bit-reversed octets, to check the reflected CRC;
- real-valued half-sine and mixer models, for the shaper and the shifters;
- an analytically generated O-QPSK waveform with fractional timing, up to ±150 kHz carrier
  offset and white noise, for the demodulator.

`tb_claws_top` connects two complete nodes back to back, with the parameters at their defaults.
In about 489,000 clocks it exercises:
- the host path;
- MAC reception with an ACK request and the automatic ACK;
- CSMA/CA against a busy channel;
- FCS errors;
- transmit and receive length limits;
- ±5 MHz and ±2.5 MHz shifting;
- a 100 kHz carrier offset;
- half- versus full-duplex;
- a custom chip table;
- reception of four frames through white noise at 3 dB SNR per sample, about 12 dB in the
  2 MHz signal band.

It counts how often each of these happens and fails if any never does.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/claws_pkg.sv tb/tb_claws_top.sv --top-module tb_claws_top -Mdir obj -o sim
./obj/sim
```

Change the two `tb_claws_top` names to run another testbench. The design starts from random
register contents where it is not reset. All state that is read is reset synchronously by
`rst_n` (active low).

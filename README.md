# IEEE 802.15.4 868/915 MHz BPSK modem

This is the digital baseband of a low-rate wireless personal area network node
for the sub-GHz bands of IEEE 802.15.4. It sits between a small microcontroller
(an 8051 running the MAC layer) and a direct-conversion RF transceiver.

On the transmit side, the controller hands the modem a packet. The modem adds
the preamble, start-of-frame delimiter and checksum, spreads every bit into 15
chips and shapes the chips into samples for the transmitter's DAC. On the
receive side, it takes 4-bit I/Q samples from the receiver's ADC and does the
following:

- removes their DC offset;
- runs the receiver's gain control;
- locks onto the carrier and the chip timing;
- finds the start of a frame and checks its checksum;
- decides from the MAC header whether the frame is meant for this node;
- hands the controller the packet through a FIFO.

One top module, `lrwpan_modem`, covers both bands of the BPSK PHY. Its only
parameter is the clock frequency `CLK_HZ`.

| band          | chip rate    | bit rate | samples per chip | sample rate   | clocks per sample (12 MHz) |
|---------------|--------------|----------|------------------|---------------|----------------------------|
| 868–868.6 MHz | 300 kchip/s  | 20 kb/s  | 10               | 3 Msample/s   | 4                          |
| 902–928 MHz   | 600 kchip/s  | 40 kb/s  | 10               | 6 Msample/s   | 2                          |

Bit 1 of the CTRL register selects the band while the modem runs. Everything is
synchronous to one clock, `clk`, 12 MHz by default. The only reset is the
active-low asynchronous `rst_n`.

## Signal path

```
 MCU (SPI) ──► registers ──► Tx FIFO ─┐
                           Tx ACK buf ─┴► framer ─► diff. encoder ─► spreader ─► raised-cosine PSF ─► tx_dac
                                      (preamble, SFD, length, payload, FCS)

 rx_i/rx_q ─► DC offset ─┬► Costas loop (carrier) ─► chip timing ─► symbol correlator ─► diff. decoder
                         │                                                                   │
                         └► RSSI ─► AGC ─► pga_gain           Rx FIFO ◄── SFD / length / FCS ◄┘
                                                                  └─► header filter ─► rx_done, irq
 registers ─► RF SPI master ─► rf_sclk/rf_cs_n/rf_mosi          timing control: sample and chip strobes
```

The modem is half duplex. The receiver is held idle (`rx_run` low) while
`tx_on` is high, and whenever the receiver is disabled.

## Transmit chain

**Packet source** (`sync_fifo` as Tx FIFO, `ack_buffer`). The controller
writes a packet into the Tx FIFO, starting with its length octet and ending with
the last payload octet. The length counts the two FCS octets, as in
802.15.4, so the FIFO holds the length octet and `length-2` payload octets. An
acknowledgement is written once into the separate ACK buffer. The buffer is
read without being consumed, so the same ACK can be sent repeatedly without
disturbing a packet that waits in the Tx FIFO.

**Framer** (`tx_framer`). The framer is the data multiplexer and the bit
multiplexer. A command starts it, and it then sends, least significant bit first:

1. four zero octets of preamble;
2. the SFD 0xA7;
3. the length octet;
4. the payload;
5. a 16-bit FCS computed on the fly by `crc16`.

`crc16` is the 802.15.4 CRC: polynomial x^16+x^12+x^5+1, register initialised
to zero, bits in LSB first. A receiver that runs the same CRC over the payload
and the FCS ends with a zero remainder. The framer hands out one bit per
request (`bit_rd`) from the spreader, so the bit rate is set entirely by the
chip strobe.

**Differential encoder** (`diff_encoder`): `E_n = R_n xor E_(n-1)`. The
encoding makes the receiver immune to the 180° ambiguity of its carrier loop.

**Spreader** (`chip_spreader`). It maps each encoded bit to 15 chips, C0
first. Bit 0 becomes `1 1 1 1 0 1 0 1 1 0 0 1 0 0 0` and bit 1 becomes its
complement. One bit lasts exactly 15 chip strobes.

**Pulse-shaping filter** (`pulse_shaping_filter`). This is a raised-cosine
filter with roll-off 1, 61 taps, at 10 samples per chip:

    h[n] = p((n-30)/10 · Tc),   p(t) = sinc(t/Tc) · cos(πt/Tc) / (1 - 4t²/Tc²)

The upsampled input has only one non-zero value in ten. The filter therefore
keeps the last seven chips (±1) and at sample phase `k` adds
`±h[k + 10j]` over those seven chips. That is seven additions per sample instead of 61
multiplications. The taps are 9-bit integers, `round(240·p)`, computed by a
constant function in `lrwpan_pkg`. The sum is at most 254 in magnitude, and
`sum >>> 3` is the 6-bit DAC code `tx_dac`. `tx_on` stays high until the last
chip has left the filter.

## Receive front end

**DC offset** (`dc_offset_comp`). Each rail has a leaky integrator
`acc += x - acc>>>6` whose mean `acc>>>6` is subtracted from the sample. The
time constant is 64 samples, about 6 chips. Outputs are 6-bit signed.

**RSSI** (`rssi_estimator`). It averages `I² + Q²` over one symbol: 15 chips ×
10 samples = 150 samples. The division by 150 is done as a multiplication by
437 and a shift by 16. The block produces a new value every 150 samples.

**AGC** (`agc_control`). The receiver's PGA moves 1 dB per step of its 7-bit
control word and spans 10–100 dB. With each RSSI value, the AGC steps the
word down by one when RSSI is above 24+8 and up by one when it is below 24−8.
It freezes from the SFD to the end of a packet, so the gain does not change
inside a frame. With AGC disabled, the gain register drives the PGA directly.

## Receive synchronisation

This is the part of the design with the most of its own decisions. The
transmitter and receiver clocks are unrelated, so three quantities must be
found before a bit can be trusted: the carrier phase and frequency, the
sampling instant within a chip, and the symbol boundary. They are acquired in
that order, each stage gating the next.

### Carrier: Costas loop at the sample rate

`carrier_offset_comp` derotates every DC-free sample by an NCO phase θ. The
phase is 16 bits, where 2^16 is one full turn, and sin/cos come from a 64-entry
table of 8-bit values:

    I' = (I cos θ + Q sin θ) >>> 7        Q' = (Q cos θ − I sin θ) >>> 7

`phase_error_detector` forms `e = sign(I')·Q'`. The sign strips the BPSK data,
and what remains is proportional to the residual phase. A proportional-integral
loop filter closes the loop:

    freq ← freq + (e <<< 2)
    θ    ← θ + freq + (e <<< 6)

`freq` is the offset estimate in NCO units per sample. A reading of `f` means
`f/65536 · sample rate` Hz. The loop runs on every sample, not once per chip.
A crystal error of 80 ppm at 915 MHz is 73 kHz. That is 0.12 turns per chip
but only 0.012 turns per sample (0.023 at the 868 MHz sample rate), well inside
the loop's tested range of 0.025 turns per update. A loop updated once per chip
cannot hold such an offset. The loop locks with a 0° or 180° ambiguity, and the
differential coding removes it. The loop is restarted whenever the receiver
is switched off or starts transmitting; the chip timing below then simply
pauses, since it only moves on samples the loop passes on.

### Chip timing: maximum energy over a window

`chip_timing_recovery` receives 10 derotated samples per chip and must keep
the one nearest the chip centre. For each of the 10 sample phases it adds
`|I| + |Q|` over a window of 15 chips. At the end of the window, the phase with
the largest sum becomes the sampling phase. `|I|+|Q|` changes little with the
carrier phase (by at most a factor of √2), so the timing can be found while the
Costas loop is still pulling in, and the two loops do not fight. Two details make it robust:

- **No chip slips.** Chips are taken by a countdown that reloads with 10.
  When the chosen phase changes by `d` (wrapped into −5…+4), the next
  interval is lengthened or shortened by `d`. A move from phase 9 to phase 0
  thus becomes a one-sample step, neither losing nor repeating a chip.
- **`settled`.** This output is high once two consecutive windows picked the
  same phase. Symbol acquisition is allowed only while it is high, so a
  timing jump cannot happen in the middle of an acquisition.

### Symbol boundary and bit decisions

`symbol_correlator` makes a hard decision on each chip: 1 when I' ≥ 0. It
keeps the last 15 chips and counts the matches `m` against the bit-0 pattern.

- **Hunting** (and `settled`): when `m ≥ 14` or `m ≤ 1`, at most one chip wrong,
  this chip ends a symbol. The correlator locks, and the sign of the match gives
  the bit. The pattern's autocorrelation is low off its peak, so a false lock on
  preamble chips is unlikely.
- **Locked**: from then on it decides one bit every 15 chips, bit 0 when
  `m ≥ 8`. Up to 7 chip errors per symbol are corrected.

`diff_decoder` recovers `R_n = E_n xor E_(n-1)`. It restarts with the lock
from a previous bit of 0, so the first decoded bit may be wrong. That bit always
falls in the preamble, which the SFD search skips anyway.

### Frame delimiting, FCS and header filter

`rx_deframer` looks for the SFD in the decoded bit stream. It abandons the
search (`hunt_abort`) if no SFD follows within 64 bits, so the correlator goes
back to hunting. It does the same if the length octet is below 5. Otherwise it
writes the length octet and the `length` PSDU octets (FCS included) into the
Rx FIFO and runs the CRC over the PSDU. At the end it pulses `done` with
`crc_ok` and releases the correlator.

`header_filter` reads the first seven PSDU octets: frame control, sequence
number, destination PAN ID and destination short address. It applies the
802.15.4 rules:

- beacons pass;
- a short destination must match the node's PAN ID (or 0xFFFF) and its short
  address (or 0xFFFF);
- for an extended destination only the PAN ID is checked;
- frames with no destination pass.

With filtering enabled, a rejected frame is flushed from the Rx FIFO and raises
nothing. An accepted frame sets `rx_done` and the `irq` output. The controller
still sees `crc_ok` and must discard frames with a bad FCS itself.

## Controller interface

The 8051 reaches the modem through a 4-wire SPI slave (`mcu_spi_slave`): SPI
mode 0, MSB first. The system clock samples SCLK through synchronisers, so SCLK
must stay at least 4 clocks high and 4 clocks low, which at 12 MHz means up to
about 1.5 MHz.

A transfer, with CS_N low throughout, is a command octet `{W, A[6:0]}`
(W=1 write, W=0 read) followed by any number of data octets. Each data octet
repeats the access at address A, so one transfer can burst a whole packet into
the Tx FIFO or out of the Rx FIFO.

| addr | name     | access | contents |
|------|----------|--------|----------|
| 0x00 | CTRL     | r/w    | [0] receiver enable, [1] 915 MHz band, [2] header filter enable, [3] AGC enable |
| 0x01 | CMD      | w      | [0] send Tx FIFO, [1] send ACK buffer, [2] flush Rx FIFO, [3] flush Tx FIFO, [4] clear ACK buffer, [5] clear rx_done |
| 0x02 | STATUS   | r      | [0] tx busy, [1] rx_done, [2] crc_ok, [3] header match, [4] Rx FIFO empty, [5] Tx FIFO full, [6] RF SPI busy, [7] rx busy |
| 0x03 | TXFIFO   | w      | push into the Tx FIFO |
| 0x04 | RXFIFO   | r      | pop from the Rx FIFO |
| 0x05 | ACKBUF   | w      | append to the ACK buffer |
| 0x06/07 | PAN_L/H | r/w | own PAN ID |
| 0x08/09 | SADDR_L/H | r/w | own short address |
| 0x0A | RSSI     | r      | last RSSI value |
| 0x0B | GAIN     | r/w    | read: PGA word in use; write: manual gain (used with AGC off) |
| 0x0C | RFSPI_A  | r/w    | RF IC register address |
| 0x0D | RFSPI_D  | r/w    | writing starts a 16-bit write to the RF IC |
| 0x0E | RXCOUNT  | r      | bytes in the Rx FIFO |

The usual sequences are as follows:

- **Send a packet.** Burst length and payload into TXFIFO, then write CMD=0x01.
  STATUS[0] stays high until the last sample has been sent.
- **Send an ACK.** Clear the buffer with CMD=0x10, burst the ACK frame into
  ACKBUF, and write CMD=0x02 for each ACK to be sent.
- **Receive.** Wait for `irq` or STATUS[1] and read STATUS for `crc_ok`. Burst
  RXCOUNT octets out of RXFIFO, then write CMD=0x20 to clear `rx_done`.

`rf_spi_master` drives the transceiver's control port. Each write is 16 bits,
the address octet then the data octet, MSB first, mode 0, with SCLK at
clk/12 (1 MHz).

## Clocking

`timing_control` divides `clk` by `CLK_HZ / (10 · chip rate)` to make
`sample_tick`, and gives every tenth tick a `chip_tick`. `CLK_HZ` (default
12 000 000) must be a multiple of 3 MHz so that both bands divide exactly. The
DAC is updated and the ADC consumed at `sample_tick`. All other logic uses
enables, not derived clocks.

## Files

| file | contents |
|------|----------|
| `rtl/lrwpan_pkg.sv` | PN pattern, preamble/SFD, raised-cosine tap and sine functions, register map, configuration struct |
| `rtl/lrwpan_modem.sv` | top level, wiring of the chains above |
| `rtl/<block>.sv` | one file per block named in the text above |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_lrwpan_modem.sv` | two modems talking through a simulated radio channel |
| `tb/tb_lrwpan_cfo_per.sv` | frame loss against carrier offset, both bands |
| `tb/tb_util.svh` | check/result/watchdog macros |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops, and has a
watchdog. Run them from the repository root, because testbenches include
`tb/tb_util.svh` by that path. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -I. -Irtl \
        rtl/lrwpan_pkg.sv rtl/*.sv tb/tb_lrwpan_modem.sv --top-module tb_lrwpan_modem
    ./obj_dir/Vtb_lrwpan_modem

For a block, name its testbench in place of `tb_lrwpan_modem`.

`tb_lrwpan_modem` runs the unmodified top, two instances, at the default 12 MHz
clock. The radio channel between them is modelled as follows:

- a carrier offset rotation (40 ppm at 868 MHz);
- a path gain that follows the receiver's PGA word in 1 dB steps;
- a DC offset on each rail;
- 4-bit quantisation.

It writes to the RF IC over SPI and sends a data frame from node A to node B in
the 868 MHz band. It then has B answer from its ACK buffer, sends a frame
addressed to another node (rejected by B's header filter), and sends a frame the
channel corrupts (FCS error). Finally it switches both nodes to the 915 MHz
band and sends again. Every frame delivered is read back over SPI and compared
byte by byte. The testbench also counts that each mechanism occurred (AGC
steps, carrier tracking, reject, CRC error, ACK, band switch, RF SPI). It makes
94 checks and takes under a second.

`tb_lrwpan_cfo_per` sweeps the crystal error of the transmitting node over
−80, −40, 0, +40 and +80 ppm, in both bands. The error moves node A's carrier
and also its clock: node A runs on a clock of its own, off by the same ppm. At
each point node A sends 20 character-data frames and then one frame with a
127-octet PSDU. Over the long frame at 80 ppm, the chip timing has to follow a
drift of 1.3 chips. Every frame must arrive, and all 210 do. The run takes
about 100 s. Twenty frames per point can only show a packet error rate below
about 5 %; set `NPKT` to 100 or more to test a 1 % criterion.

## Trust and limits

The following parts come from the platform this modem was designed for:

- the two bands with their chip and bit rates;
- differential encoding;
- the 15-chip PN mapping;
- the roll-off-1 raised-cosine pulse;
- RSSI as a one-symbol average of I²+Q² at ten times the chip rate;
- the 1 dB-step PGA over 10–100 dB;
- a Costas loop for the carrier;
- correlation with the chip pattern for symbol decisions;
- the order of the blocks;
- FIFOs that hold packets from the length octet on;
- a separate ACK buffer;
- SPI links to the controller and to the RF IC.

This design's own choices are:

- the 12 MHz clock;
- all internal word widths;
- the DC estimator;
- the AGC law with its target and hysteresis;
- maximum-energy chip timing with its 15-chip window;
- the loop gains, NCO and table size;
- hard-decision correlation with its thresholds;
- the 64-bit SFD timeout and minimum length;
- both SPI frame formats;
- the register map;
- the flushing of rejected frames;
- FIFO depths of 128 (the largest 802.15.4 PSDU, 127 octets, plus its length).

Preamble, SFD, FCS and header-filter rules follow IEEE 802.15.4.

Two placements differ from a literal reading of the block list:

- The carrier loop runs at the sample rate, ahead of chip timing, instead of on
  chip-rate samples. A chip-rate loop could not track the 80 ppm offsets the
  platform was specified for.
- Chip timing recovery, which the block diagram does not draw, sits between
  the carrier loop and the correlator.

Known limits:

- Chip timing follows clock drift window by window: the sampling phase is
  chosen afresh every 15 chips. At 80 ppm the drift is 0.012 samples per
  window, so this has a wide margin. Drift has been simulated up to ±80 ppm
  with 127-octet frames.
- Noise is not modelled in the testbenches beyond 4-bit quantisation, so no
  sensitivity or error-rate-versus-SNR figure is claimed.
- The modem is half duplex. It does not time ACKs or do CSMA; that is left to
  the controller.
- The RF transceiver, PLL, clock generation and the 8051 are not part of this
  RTL. The top brings their connections out as ports.

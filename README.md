# UHF RFID interrogator baseband (EPC Class-1 Gen-2)

This is the digital physical layer of a UHF RFID reader for passive EPC
Class-1 Generation-2 (C1G2) tags, at 860–960 MHz. It sits between the reader's
control processor and a zero-IF I/Q radio. The processor runs the MAC layer:
it picks the command (Select, Query, ACK, Read and so on) and writes its bits
into a buffer. The baseband then does the bit-level work.

- **Transmit.** It frames the command with a preamble or frame-sync, appends
  CRC-5 or CRC-16, pulse-interval encodes it at the chosen Tari, maps it to
  DSB-, SSB- or PR-ASK, shapes the edges and hands I/Q samples to the DACs.
- **Receive.** It arms itself when the command ends. It then digs the tag's
  backscatter out of the I/Q ADC samples, finds the FM0 or Miller preamble,
  decodes the reply, checks its CRC-16, flags collisions, and leaves the bytes
  and a status word for the processor.

All protocol options are registers, so the processor can change link
parameters per command. The architecture follows the paper *Design and
Realization of a UHF RFID Interrogator* (an FPGA baseband with a soft-CPU MAC).
That paper names the blocks and what they do, but gives few internals. Where it
is silent, this RTL uses C1G2 rules or simple choices of its own. These are
marked in each file's header and summarised under
[Departures and open points](#departures-and-open-points).

```
            CPU register bus (bus_addr[8]: 0 = TX side, 1 = RX side)
                 |                                   |
   TX  tmpi (regs + 64-byte command buffer)     rmpi (regs + 64-byte reply buffer)   RX
        |                                             ^
   tx_control --- preamble_gen                   serial->parallel, status
        |     \-- crc_encoder                         ^
   pie_encoder  (symbols -> envelope)            crc_check <- decoder <- preamble_det
        |                                             ^            ^
   ask_modulator (DSB / SSB / PR levels)         bit_sync (chip timing)
        |                                             ^
   pulse_shaper (raised cosine)                  demodulator (DC removal, I/Q choice, slicer)
        |                                             ^
   hilbert_ssb  (Q = Hilbert(I) for SSB)         fir_filter x2 (I, Q)
        |                                             ^
   dac_i, dac_q  @ clk/4                          adc_i, adc_q  @ clk/16
                         rx_control arms, times out and reports
```

The top is `rfid_baseband`. Shared types, register layouts and the CRC step
functions are in `rfid_pkg`.

## Clock and sample rates

The default clock is 20.48 MHz (`CLK_HZ`). At that rate every Tari is a whole
number of cycles:

| Tari | cycles | data-0 rate |
|---|---|---|
| 6.25 µs | 128 | 160 kbit/s |
| 12.5 µs | 256 | 80 kbit/s |
| 25 µs | 512 | 40 kbit/s |

- **DAC rate.** `dac_stb` marks each DAC sample, at clk/`DAC_DIV` = 5.12 MS/s.
- **ADC rate.** `adc_stb` marks each ADC sample, at clk/`ADC_DIV` = 1.28 MS/s.
  At an 80 kHz backscatter link frequency (BLF), that is 16 samples per
  subcarrier period, or 8 samples per *chip*.
- **Chip.** In this design a chip is half a BLF period. It is the smallest unit
  of the reply: an FM0 bit is 2 chips and a Miller-M bit is 2M chips.

The link frequency itself is set by the tag from TRcal and DR. The reader only
has to program TRcal (in cycles) and the matching samples-per-chip value.

## Sending a command

### Symbols and framing

`tx_control` runs one command. It has four states: IDLE, SOF, DATA and DRAIN.

1. `preamble_gen` supplies the start of the frame: delimiter, data-0, RTcal and,
   only for a *preamble* (Query), TRcal. Other commands get the shorter
   *frame-sync*, which has no TRcal.
2. The command bits are read from the TMPI buffer by bit index, MSB of byte 0
   first.
3. They pass through `crc_encoder`. Data bits go straight through, and the CRC
   register follows them. After the last bit it appends:
   - CRC-5: x⁵+x³+1, preset 01001; or
   - the ones-complement of CRC-16: x¹⁶+x¹²+x⁵+1, preset FFFF; or
   - nothing.
4. Each resulting bit becomes a data-0 or data-1 symbol.
5. `done` pulses once the PIE encoder has finished the last symbol's low pulse.

Every block-to-block link is a valid/ready stream. `pie_encoder` accepts the
next symbol in the last cycle of the current one, so there are no gaps between
symbols.

### PIE timing

Each symbol is carrier-high followed by a low pulse of PW = Tari/2. The length
of the symbol carries the information:

| symbol | length |
|---|---|
| delimiter | 12.5 µs low (256 cycles) |
| data-0 | 1 Tari |
| data-1 | 2 Tari or 1.5 Tari (TXCFG bit 7) |
| RTcal | data-0 + data-1 |
| TRcal | TXCFG / TRCAL register, in cycles |

A tag decides between 0 and 1 by comparing each symbol's length with RTcal/2.
The envelope rests high (continuous wave) between commands while the carrier is
enabled. Turning the carrier on ahead of a round (the C1G2 power-up CW) is the
processor's job, through CTRL bit 1.

### Modulation

`ask_modulator` turns the envelope into a signed amplitude, one clock behind
`env`:

- **DSB-ASK and SSB-ASK:** two levels, AMP (1800 of 2047) for high and
  AMP·(1−depth/256) for low.
- **PR-ASK:** ±AMP. The sign flips at the start of every low pulse, and the
  amplitude is 0 during the pulse, so the RF envelope dips to zero as the phase
  reverses.

`pulse_shaper` is an 8-tap raised-cosine FIR. Its taps are 7, 24, 42, 55, 55,
42, 24, 7 (sum 256), from h[n] = 1−cos(2π(n+1)/9). Edges take about 1.5 µs,
which is under a third of the shortest Tari.

`hilbert_ssb` handles the Q branch:

- For SSB it puts the Hilbert transform of I on Q, using a 31-tap FIR. The
  taps are h[n] = 2/(πn)·(0.54+0.46·cos(πn/16)) for odd n, zero for even n,
  scaled by 4096.
- It delays I by the matching 15 samples.
- For DSB and PR, Q is zero.

The external quadrature modulator then cancels one sideband.

## Receiving a reply

The receive path does the most work, and most of it is this design's own.
The paper only says what each block is for.

### From I/Q samples to one bit per sample

The reader hears its own carrier far more strongly than the tag. On a zero-IF
receiver that leakage is a large DC level on both I and Q. The tag's
backscatter is a small two-level change on top of it, and it can lie at any
angle in the I/Q plane.

1. **Low-pass filtering.** Each channel goes through `fir_filter`, a 7-tap
   binomial low-pass (1, 6, 15, 20, 15, 6, 1)/64 that is narrower than a chip.
2. **DC removal.** `demodulator` subtracts a running DC estimate, a first-order
   average with a time constant of 32 samples. That is short enough to follow
   the mean of the reply once the pilot tone starts.
3. **Channel choice.** It averages the magnitude of four projections: I, Q,
   (I+Q)/2 and (I−Q)/2.
   - In ASK mode it uses the stronger of I and Q. This is the "one channel
     fades, the other carries the signal" idea behind a quadrature receiver.
   - In PSK mode it uses the stronger diagonal.
4. **Slicing.** The sign of the chosen projection is the sliced bit.
5. **Lock.** The choice is frozen from frame start to frame end. That way the
   polarity found on the preamble holds for the whole reply.

### Chip timing (`bit_sync`)

A counter runs over chip_len samples, and the chip value is the majority of
its samples. Every transition of the sliced stream realigns the counter:

- A transition after mid-chip closes the current chip early.
- A transition before mid-chip restarts the count.

FM0 has a transition at least every two chips and Miller at every chip. So
this tracks a tag clock that is off by more than 10 %. The testbench checks
±12 %. The C1G2 link-frequency tolerance can be that large.

### Frame synchronisation (`preamble_det`)

The last 96 chips sit in a shift register. The detector compares them with the
preamble of the selected code:

- **FM0:** the 12 chips of `1 0 1 0 v 1`, where *v* is a bit with its boundary
  transition missing. This can never occur in data.
- **Miller-M:** the baseband `0 1 0 1 1 1` multiplied by the subcarrier, 12·M
  chips.

The mismatch count is the correlation value. The frame starts when the count,
or the count against the complemented pattern, is at most `err_max`. The
second case sets `inv`: the chosen channel carries the reply upside down.
Use `err_max` = 0 for FM0, whose 12-chip pattern is short. For Miller-4 and
Miller-8, one or two tolerated errors buy sensitivity without false alarms.

### Decoding and collisions (`decoder`)

After frame start, chips are grouped into bits and corrected by `inv`.

- **FM0.** The level inverts at every bit boundary, and data-0 also inverts
  mid-bit, so bit = (first chip == second chip). A missing boundary inversion
  is a violation.
- **Miller-M.** Each half-bit is M chips. Its level is the majority of chips
  that agree with the subcarrier phase, so a single bad chip is outvoted.
  Data-1 inverts mid-bit. A boundary inversion is legal only between two
  data-0s.

Any violation sets `violation`. This design reads a violation as a
**collision**: several tags answering in the same slot overlap their
waveforms, and the sum breaks the coding rules. A corrupted reply is also
flagged.

The reader knows the reply length (RN16 16 bits, PC+EPC+CRC 128 bits, and so
on) and programs it in RXLEN. The tag's trailing dummy-1 is not examined.

### CRC and reporting

- `crc_check` runs CRC-16 over data plus the tag's CRC and expects the C1G2
  residue 1D0F.
- `rmpi` packs the bits MSB first into bytes and writes each byte to the RX
  buffer as it completes. When the frame ends it writes a last partial byte
  left-aligned. It keeps the bit count.
- `rx_control` ends a reception in one of two ways:
  - the decoder has all bits, and the result is reported one clock later, once
    the CRC has settled; or
  - the timeout runs out before a preamble is seen ("no data").

The status word holds `valid`, `crc_ok`, `collision`, `timeout`, the I/Q
projection used and the bit count. `valid` is set only when the CRC passed (or
was off) and there was no collision. The data are in the buffer either way.

## Register map

Word registers, 32-bit data. Writes act on the clock edge and reads are
combinational. `irq` is high while either done flag is set.

**TX side** (`bus_addr[8]` = 0):

| addr | name | fields |
|---|---|---|
| 0x00 | CTRL | w: bit0 start (pulse, ignored while busy), bit1 carrier on, bit2 arm RX when the command ends |
| 0x01 | TXCFG | [1:0] Tari (0: 6.25, 1: 12.5, 2: 25 µs), [3:2] modulation (0 DSB, 1 SSB, 2 PR), [5:4] CRC (0 none, 1 CRC-5, 2 CRC-16), [6] preamble (else frame-sync), [7] data-1 = 2 Tari (else 1.5), [15:8] depth/256 |
| 0x02 | TRCAL | [15:0] TRcal in cycles (2048 = 100 µs, DR = 8 → BLF 80 kHz) |
| 0x03 | TXLEN | [9:0] command bits, CRC excluded |
| 0x04 | STATUS | r: bit0 busy, bit1 done (sticky, cleared by start) |
| 0x80+n | buffer | command byte n |

**RX side** (`bus_addr[8]` = 1):

| addr | name | fields |
|---|---|---|
| 0x100 | CTRL | w: bit0 arm (pulse) |
| 0x101 | RXCFG | [1:0] code (FM0, M2, M4, M8), [2] PSK, [3] CRC check, [7:4] preamble errors allowed, [15:8] samples per chip |
| 0x102 | RXLEN | [9:0] reply bits expected (with CRC) |
| 0x103 | TIMEOUT | [19:0] samples to wait for the preamble |
| 0x104 | STATUS | r: bit0 busy, bit1 done, bit2 valid, bit3 CRC ok, bit4 collision, bit5 timeout, [7:6] projection (I, Q, I+Q, I−Q), [25:16] bits received |
| 0x180+n | buffer | reply byte n |

A typical inventory step follows the C1G2 flow the paper describes:

1. Carrier on, then wait about 5 ms.
2. Send Select with frame-sync and CRC-16, then wait about 300 µs of CW.
3. Send Query with preamble and CRC-5, and read the RN16.
4. Send ACK carrying the RN16, and read PC+EPC+CRC-16.

All of this timing is the processor's.

## Simulating

Any SystemVerilog-2017 simulator will do. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rfid_pkg.sv tb/tb_rfid_baseband.sv --top-module tb_rfid_baseband
obj_dir/Vtb_rfid_baseband
```

Swap in any `tb/tb_<block>.sv` for a single block. Every testbench prints
`TB_RESULT checks=N failures=M`. A watchdog ends a hung run with a failure.

`tb_rfid_baseband` runs the whole design at its default parameters. It plays
the processor on the register bus and a tag on the ADC inputs. For each
command it checks the transmitted envelope from its edge timing:

- delimiter, Tari, RTcal, TRcal and PW, to the cycle;
- every bit, against a reference CRC computed in the testbench.

The tag model answers with carrier DC, noise and a chosen I/Q angle, built from
the coding rules. It runs seven commands:

- Query → FM0 RN16 (0100010000000101 after a 12-zero pilot, as in the paper's
  capture).
- ACK → Miller-4 PC+EPC+CRC, inverted on Q, sent with SSB-ASK.
- QueryRep with PR-ASK and data-1 = 1.5 Tari, no reply (timeout).
- Req_RN with a garbled chip (collision).
- Miller-2 PSK reply with a bad CRC.
- Miller-8 reply with a good CRC.
- The 24-bit Read pattern from the paper's transmit measurement at Tari 25 µs.

It counts each mechanism and fails if one never happened: preamble and
frame-sync, each CRC, each Tari, each modulation, each code, ASK and PSK, I, Q
and diagonal channel, inverted polarity, timeout, collision, CRC error and
CRC good. It takes about a second in Verilator.

`tb_rx_sensitivity` also runs the whole design at default parameters. It arms
the receiver directly and feeds random RN16+CRC replies in Gaussian noise:
20 FM0 replies at 11 dB and 10 Miller-4 replies at 9 dB. At least 90 % must
decode with a good CRC.

The block testbenches check their units against independent references:

- CRCs computed bit by bit;
- FIR responses tap by tap;
- the Hilbert filter's 90° shift on a tone;
- symbol lengths to the cycle;
- chip recovery with ±12 % clock error;
- preamble detection in both polarities with and without tolerated errors;
- FM0/Miller decoding of random data;
- register fields.

## Departures and open points

**Outside this RTL.** These are ports or software, not logic here:

- the MAC on the processor: command choice, inventory timing and the
  access-password cover-coding (XOR of APwd halves with RN16s);
- the RF front end and the LO synthesiser;
- the high- and low-speed data converters;
- the SDRAM and flash;
- Ethernet, RS-232 and JTAG.

`dac_*` and `adc_*` are signed 12-bit two's complement samples. A DAC that
wants offset binary needs its MSB inverted.

**This design's choices where the paper gives none:**

- the clock and sample rates;
- PW = Tari/2;
- the 12.5 µs delimiter, CRC polynomials and preamble patterns (all from C1G2);
- all filter taps;
- the DC-tracking time constant;
- the PSK projections;
- edge-realigned chip timing in place of a correlator over the whole preamble;
- reading coding violations as collisions;
- the register maps;
- the 64-byte buffers.

**Reply hand-over.** In the paper, the receiver passes the reply to the
processor only after the CRC check succeeds. Here the bits always go into the
RX buffer as they arrive. The STATUS `valid` bit then says whether they passed
the CRC with no collision. The processor must check `valid` before using the
buffer. This keeps partial replies readable, which helps when debugging
collisions.

The 64-byte buffers hold 512 bits each way, so a Select with a very long mask
needs a larger `TX_BUF_BYTES`.

**Not enforced.** The C1G2 link timing rules are left to the processor or not
checked at all:

- T1/T2/T4 turnaround windows;
- the TRcal/RTcal ratio limits;
- the tag's dummy-1.

**Sensitivity.** The paper reports FM0 decoding at about 11 dB SNR, and at
least 2 dB less for Miller. `tb_rx_sensitivity` measures this on the full
design. Here SNR is the power of the tag's two-level signal over the Gaussian
noise power per ADC sample. The results:

- FM0: 20 of 20 replies decoded at 11 dB. Longer runs decode 98 of 100 at
  11 dB and 85 of 100 at 6 dB.
- Miller-4: 10 of 10 decoded at 9 dB. Longer runs decode 59 of 60 at 9 dB and
  49 of 60 at 6 dB.

So both paper figures are met, but Miller is not better than FM0 at equal
SNR here. The demodulator slices every sample to one bit. The bit
synchroniser then realigns its chip timing on each transition of that sliced
stream, and noise adds false transitions. The decoder also sees only hard
chips, so Miller's longer symbols give no integration gain. A soft-valued path
from demodulator to decoder, with symbol-wide correlation, would recover this
gain. It is not built.

**Not verified.** Real tags with slowly drifting phase, and two-tag collisions
that happen to obey the coding rules, are untested.

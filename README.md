# MODE-S reply receiver in SystemVerilog

Aircraft transponders answer secondary-radar interrogations, and broadcast
their position about once a second, with MODE-S replies on 1090 MHz. A small
receiver digitises the demodulated envelope with an 8-bit ADC at 16 MHz. It
then has to find each reply in that sample stream, decode its bits and check
its parity. This RTL does that in a short pipeline that handles one sample per
clock.

The hard part is finding the start of a reply. Real signals have no fixed
level: the "1" level may be anywhere from about 50 to 255 ADC counts. Edges
are slow, with a rise of 7-8 samples, and pulse timing can wander by up to
10 %. So a fixed threshold will not do. The receiver instead compares the shape
of the last 8 µs of signal with the known preamble template, using only integer
sums. It then decodes each bit by comparing the energy of the bit's two halves.
Neither step depends on the absolute amplitude.

The structure follows the paper *Hardware Implementation of Small-Sized MODE-S
Signal Receivers*. It describes an FPGA receiver (Spartan-6) made of these
stages: preamble detection, correlation-function analysis, Manchester decoding,
CRC control and output to a host computer. Where that paper gives no details,
this design makes its own choices. They are marked below and in the header
comment of each file.

## The signal

```
 preamble, 8 us = 128 samples                 data block: 56 or 112 bits, 1 us each
 _   _          _   _
| | | |        | | | |                        bit "1": pulse in first half   |‾‾‾‾|____|
| |_| |________| |_| |_______________  ...    bit "0": pulse in second half  |____|‾‾‾‾|
0  0.5 1      3.5  4.5              8.0 us    (16 samples per bit, 8 per half)
```

* The preamble has four 0.5 µs pulses (8 samples each), starting at 0, 1.0,
  3.5 and 4.5 µs. In a 128-sample window aligned with the preamble, the pulses
  fill positions 0-7, 16-23, 56-63 and 72-79. The other 96 positions are "0".
* The data block is pulse-position (Manchester-like) coded. It has 56 bits
  (short replies) or 112 bits (long replies and extended squitters). The last
  24 bits are the parity field.

## Pipeline

```
 in_data[7:0] ──► preamble_detector ──F[7:0]──► corr_analyzer ──start──► manchester_decoder ──bit──► crc_control ──msg[111:0]──► msg_output ──► out_data[7:0]
 (16 MHz ADC)     128-sample window   sample    local max of F   sample   16 samples → 1 bit         CRC-24 +        valid          byte frames
                  F per sample        ────────► delay line ───────────►   56/112 bits      Start ──► address table ──────────────► to the host
                                                                          busy ◄─────────  value
```

| module | file | job |
|---|---|---|
| `modes_receiver` | `rtl/modes_receiver.sv` | top: wires the chain, counts detected / decoded / rejected / dropped messages |
| `preamble_detector` | `rtl/preamble_detector.sv` | 128-entry sample queue and the preamble function F, one value per sample |
| `corr_analyzer` | `rtl/corr_analyzer.sv` | picks the true peak of F, checks that data follows, starts the decoder on the first data sample |
| `manchester_decoder` | `rtl/manchester_decoder.sv` | half-bit sum comparison, message length from the first bit |
| `crc_control` | `rtl/crc_control.sv` | assembles the message, MODE-S CRC, compares the syndrome with 0 and with a table of addresses |
| `msg_output` | `rtl/msg_output.sv` | sends accepted messages as byte frames over valid/ready |
| `modes_pkg` | `rtl/modes_pkg.sv` | sizes, pulse positions, CRC polynomial and step function |

## Finding the preamble

### The preamble function F

`preamble_detector` shifts each new sample into a 128-entry queue. Position k
holds the sample taken k sample periods after the oldest one. For every new
sample it sums the 32 pulse positions (S1) and the 96 gap positions (S0), and
forms

```
F = S1/32 − S0/96   =   (3·S1 − S0) / 96        (negative results → 0)
```

F is the mean pulse level minus the mean gap level. A full-scale preamble on a
silent background gives 255, and a preamble whose "1" level is 60 gives about
60. Because F measures contrast, not level, one detector works for weak and
strong replies alike. All of it is adders and one constant division. Each
value is registered one clock after its sample, so the detector keeps up with
the 16 MHz sample rate even when the clock runs at 16 MHz.

The paper prints the formula with a plus sign between the two means. Its own
description says the pulse positions are judged by how far they exceed the
gaps, so this design subtracts.

### Two shape checks

A contrast measure alone also fires on things that are not preambles. F is
forced to 0 in either of these cases:

1. **The gaps hold more than a quarter of the pulse level**
   (`4·mean_gap > mean_pulse`, that is `4·S0 > 3·S1`). Pulse-position data
   fills half of every microsecond. Bit patterns such as `1 1 x 0 0` still put
   all four template pulses on data pulses, with the gaps about a third full.
   Such data gives F peaks far above any usable threshold.
2. **Any one of the four pulses holds less than half the average pulse**
   (`8·P_i < S1`). Without this check, the last two pulses of a message
   followed by silence look like the first half of a preamble.

Without these checks, a single false start inside the data of a strong reply
keeps the decoder busy for up to 112 µs. The decoder then misses the next
reply, whose data in turn causes the next false start. The traffic testbench
showed this chain reaction.

### Taking the right maximum (`corr_analyzer`)

The true alignment gives the largest F. Partial alignments give smaller local
maxima. For example, pulses 1 and 2 of the reply can land on template pulses 3
and 4, 56 samples before the true peak, with about 40 % of the true value. So
the analyzer does not simply take the first local maximum:

* A value of F that reaches `THRESH` (16) and is larger than the current
  candidate becomes the new candidate.
* A candidate is accepted when `HOLD` (80) further samples have passed without
  a larger value. 80 covers the farthest partial alignment (72 samples before
  the true peak) with some margin.
* The sample stream goes through a `HOLD−1` = 79 sample delay line. When the
  candidate is accepted, the sample leaving the delay line is the first sample
  after the preamble. `start` is raised in the same clock, so the decoder is
  aligned without any back-tracking.
* **Data check.** When the candidate is due, the delay line holds the first
  4 data bits. Each 16-sample bit must sum to at least `4·F`, which is half of
  what a pulse at the preamble's level gives. If one does not, the candidate is
  dropped and `reject` pulses. This stops "end of a message, then silence" from
  passing for a preamble.
* While the decoder is busy, and for `BLANK` = 128 − HOLD = 48 samples after it
  finishes, F is ignored. The decoder lags the window by 79 samples, so for
  those 48 samples the window still holds the tail of the message just decoded.

`start_value` carries the accepted peak F. It travels with the message as a
quality score and becomes the first byte of the output frame.

Timing: the decoder starts HOLD samples + 1 clock after the last preamble
sample. The CRC verdict comes HOLD + 4 clocks after the last sample of the
reply, and the first output byte one clock after that. This is checked in
`tb_modes_receiver`.

## Decoding bits (`manchester_decoder`)

From `start` on, every 16 samples make one bit. The first 8 are summed, then
the last 8, and the bit is 1 if the first sum is larger. A tie gives 0. Using
sums makes the decision immune to the amplitude and tolerant of slow edges.
The first bit is the top bit of the MODE-S downlink format field: formats 16
and above are 112 bits long, the others 56. So the first bit sets the length.
`busy` stays high until the last bit. The bit clock is fixed from the start
and is never re-synchronised.

## Parity and the address table (`crc_control`)

Bits are shifted into a 112-bit register. The MODE-S CRC-24 (generator
`0x1FFF409`) is run serially over all but the last 24 bits. The result is
XORed with the received parity field to give the syndrome:

* syndrome = 0: the parity is plain, as in extended squitters (DF17/18) and
  all-call replies. The message is accepted.
* syndrome = an entry of the reference table: most replies carry the aircraft
  address XORed onto the parity, so the table holds the addresses of interest
  (8 entries, written through `tbl_we/tbl_addr/tbl_data/tbl_valid`). The
  message is accepted.
* otherwise `crc_bad` pulses and the message is discarded.

Accepted messages are left-aligned: the first received bit is `msg[111]`, and
a 56-bit message sits in `msg[111:56]`. The verdict comes two clocks after the
last bit.

## Output frames (`msg_output`)

Each accepted message becomes one frame on an 8-bit valid/ready stream:

| byte | content |
|---|---|
| 0 | preamble score (peak F) |
| 1 … 7 or 1 … 14 | message bytes, first received byte first |

`out_last` marks the final byte. If a new message is accepted while a frame is
still waiting for the host, the new one is dropped and counted in `n_dropped`.
At one byte per clock this cannot happen: a frame takes 15 clocks and replies
are at least 64 µs apart.

## Top-level interface (`modes_receiver`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_data` | in | 1, 8 | one ADC sample per strobe (16 MHz; clock ≥ sample rate) |
| `tbl_we`, `tbl_addr`, `tbl_data`, `tbl_valid` | in | 1, 3, 24, 1 | write one entry of the address table |
| `out_valid`, `out_data`, `out_last`, `out_ready` | out/in | 1, 8, 1, 1 | byte frames to the host |
| `busy` | out | 1 | decoder is taking a message |
| `n_detected`, `n_decoded` | out | 32 | preambles detected; messages accepted |
| `n_crc_bad`, `n_dropped`, `n_no_data` | out | 32 | parity failures; drops at the output; candidates with no data after them |
| `last_syndrome` | out | 24 | syndrome of the latest message |

Parameters: `HOLD` = 80 (must be ≥ 65 for the data check), `THRESH` = 16 and
`TBL_DEPTH` = 8. None of these values comes from the paper.

Coarse synthesis (yosys, before technology mapping) gives about 460 word-level
cells and 2.6 k flip-flops. Most of the flip-flops are the 128-sample window
and the 79-sample delay line.

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops on a watchdog if something hangs. With plain Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/modes_pkg.sv tb/modes_tb_pkg.sv \
          tb/tb_modes_receiver.sv --top-module tb_modes_receiver
./obj_dir/Vtb_modes_receiver
```

To run another testbench, swap in its file and top module.

| testbench | what it shows |
|---|---|
| `tb_preamble_detector` | F and the forwarded sample match a software model, sample by sample, including idle clocks; an ideal preamble of amplitude A gives F = A at alignment |
| `tb_corr_analyzer` | partial peak before the true one, sub-threshold peak, peak while busy, equal later peak, blanking after busy, missing data after the peak; delay-line alignment on every sample |
| `tb_manchester_decoder` | random 56/112-bit messages with slow edges and noise; bit values, `bit_valid` one clock after the bit's 16th sample, `bit_last`, `is_long`, ignored second start |
| `tb_crc_control` | a published extended squitter; random correct, corrupted and address-overlaid messages; the table written and cleared; verdict latency |
| `tb_msg_output` | byte order, `out_last`, data held under back-pressure, drop with `overflow` |
| `tb_modes_receiver` | end to end at default parameters: 80 transmissions with amplitudes 40-255, smoothed edges and noise. Long and short replies, address table hits and misses, bit errors, sub-threshold preambles, preambles with no data, preambles whose pulses are moved or resized by one sample, host stall with drop. Frames are compared byte by byte, counters are checked, and every case must occur |
| `tb_air_traffic` | 1500 replies at random spacing, levels mostly 50-100, one in eight overlapping its neighbour. No false accept is allowed, and every undisturbed reply must be decoded. It prints the overall share of replies decoded (about 80 % with the overlaps) |

The testbenches share `tb/modes_tb_pkg.sv`. It holds a CRC model written as
plain polynomial long division (a different method from the serial register
in the RTL), a message generator and the waveform envelope.

## Where this design departs from, or goes beyond, the paper

* **Sign in F.** The printed formula adds the two means; this design subtracts
  them (see above).
* **Queue order.** The paper writes each new sample at the head of the queue,
  but numbers the pulse registers 0-7, 16-23, 56-63 and 72-79 in the order the
  pulses are sent. Those numbers only fit the preamble if they count from the
  oldest sample, so this design reads them that way.
* **Speed.** The paper puts the computation of F at 45-55 ns, inside one
  62.5 ns sample period. Here F is registered one clock after its sample.
* **Added for robustness:** the two shape checks in the detector, the
  HOLD-based choice of maximum, the data check, blanking, and the threshold.
  The paper only asks for "the local maximum" of F.
* **CRC.** The paper only says the checksum is compared with a reference value
  kept in a table. The polynomial, the syndrome-versus-address-table rule and
  the table size are taken from the MODE-S standard or chosen here.
* **Message length** comes from the first decoded bit, as in the MODE-S
  format. The paper only says that the length depends on the type of request.
* **Output to the host.** The frame format, the valid/ready handshake and the
  drop policy are chosen here. The paper only shows an 8-bit output. Both boxes
  after the decoder are labelled "CRC control" in the paper's block diagram.
  The second one is built here as the output stage.
* **Not built.**
  * The ADC and the host computer are outside the design.
  * The paper mentions a discrete Fourier transform of the data block but
    gives no size and no role for it in the decoder, so there is none.
  * The correlation-integral detector and the microcontroller receiver, which
    the paper compares against, are not part of this design.
* **Known limits.**
  * Only one reply is decoded at a time. A stronger reply that starts while
    another is being decoded is lost (there is no re-trigger).
  * The data bit clock is fixed, so a reply stretched by several per cent over
    its whole length would drift out of step. The tests distort only the
    preamble pulses (±1 sample).
  * The paper's detection rates were measured on recorded air traffic. Those
    recordings are not reproduced here; the traffic test uses synthetic
    signals.

# DVM: LAN data and digital voice on one twisted pair

A desk with a telephone and a LAN terminal usually needs two wire pairs. The
Data/Voice Multiplexer (DVM) carries both on one pair. It sends a 1024 kb/s
Manchester-coded data stream and a slower Manchester-coded voice stream
(64, 128 or 160 kb/s) as a single three-level signal. The line carries the
*product* of the two streams, with each stream read as ±1:

* the **sign** of the line level is the voice stream;
* the **magnitude** of the line level is the data stream.

The receiver separates the two with a Schmitt trigger and an absolute-value
circuit. It then decodes each Manchester stream on its own. No carrier,
framing or clock channel is needed. This works cleanly when the data rate is
an integer multiple of the voice rate, so that voice edges fall on data edges.

This repository holds a SystemVerilog model of the complete DVM test
prototype. It covers the clock generator, two pseudo-noise (PN) test sources,
the Manchester encoders and front-panel switches, the multiplexer, the line,
cable and receiver, the demultiplexer, two Manchester decoders and two error
detectors. Everything runs on the prototype's 20.48 MHz master clock. The
analog parts (line drivers, cable and transformers, receive amplifier) are
behavioural models on 8-bit signed samples taken once per master cycle.

## Signal path

```
dvm_clock_gen --DATA.CLK--> pn_generator (data)  --PN.DATA --\
              --VOICE.CLK-> pn_generator (voice) --PN.VOICE--+--> dvm_sources
                                                             |    S1 random/constant
                                                             |    2x manchester_encoder
                                                             |    S2 internal/external
                                                             v
                       MCV, MCD --> dvm_mux --PLUS, MINUS--> line_driver
   --> twisted_pair_channel --> diff_amp --RCVSIG--> dvm_demux
   --R.MCV--> manchester_decoder (voice) --VOICE.BITS--> error_detector (voice)
   --R.MCD--> manchester_decoder (data)  --DATA.BITS --> error_detector (data)
```

The top module is `dvm_system`. Signal names follow the prototype's
schematics (TX.DATA, MCD, RCVSIG, R.MCD, D.CLK, DATA.BITS, D.ERR, ...). The
top brings all of them out as ports.

## Timing base

One master cycle is 48.83 ns. All rates are whole numbers of cycles:

| stream | rate | cycles per bit | decoder timer (3/4 bit) |
|---|---|---|---|
| data | 1024 kb/s | 20 | 15 |
| voice | 256 kb/s | 80 | 60 |
| voice | 160 kb/s | 128 | 96 |
| voice | 128 kb/s | 160 | 120 |
| voice | 64 kb/s | 320 | 240 |

`dvm_clock_gen` has the prototype's two counter chains:

* A 7-bit binary counter divides by 128 for CLK.160.
* A decade counter enables a 5-bit binary counter. Its bits give DATA.CLK
  (÷20), CLK.256 (÷80), CLK.128 (÷160) and CLK.64 (÷320).

Because the second chain is one counter, the 64/128/256 kHz edges always fall
on a DATA.CLK falling edge. The 160 kHz chain has no fixed relation to it.
This is the whole difference between the "orthogonal" rates and the DCP rate.

Each clock comes with `*_rise`/`*_fall` strobes. They are high in the cycle
before the clock level changes, so master-clock logic can act on the edge
without a second clock domain. The rate switch S3 (`rate_sel`) chooses
VOICE.CLK and, with it, the voice decoder's timer length.

## Test sources

**PN generators** (`pn_generator`). Each is a 16-stage shift register, of
which 14 stages form a maximal-length LFSR. Its feedback is the XOR of taps
2, 12, 13 and 14, and its period is 16383 bits. The two remaining stages give
delayed copies of the output.

An all-zero register would lock the LFSR. A guard counter prevents this. The
counter reloads 1 on every output 1 and counts output zeros. When the count
reaches 15 (fourteen zeros in a row) it forces the output and the feedback to
1 for one bit, which restarts the sequence. Reset clears the register, so
every start-up passes through this guard: fifteen zero bits, then the
sequence.

**Sources and switches** (`dvm_sources`):

* **S1** selects PN bits or constants: 1 for data and 0 for voice.
* Each stream is Manchester encoded as `clock XOR bit`. The clock is high in
  the first half of the bit, so a 0 is sent as `10` and a 1 as `01`.
* **S2** replaces both encoded streams with the external inputs EXT.MCV and
  EXT.MCD.

## Multiplexer and line

`dvm_mux` is a 4-to-1 code table selected by {MCV, MCD}:

| MCV | MCD | PLUS | MINUS |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| 0 | 1 | 0 | 1 |
| 1 | 0 | 0 | 0 |
| 1 | 1 | 1 | 0 |

PLUS − MINUS is +1, 0 or −1. It is zero whenever the data stream is 0, and
otherwise it has the voice stream's sign. Because the two bits are
Manchester coded, the three-level signal has no DC component, which is why
the prototype can couple it through pulse transformers.

The behavioural analog path is as follows:

* `line_driver` turns PLUS/MINUS into +32, 0 or −32.
* `twisted_pair_channel` is a low-pass filter: two cascaded first-order
  sections, `y += (x − y)/2` per cycle, with 4 fraction bits. Its −3 dB
  point is about 1.5 MHz, and a step settles within half a data bit. One
  register in all.
* `diff_amp` has gain 2 and saturates at ±127, so RCVSIG swings ±64.

The filter's order and coefficient are the top's `CH_ORDER` and `CH_SHIFT`
parameters.

## Demultiplexer

`dvm_demux` splits RCVSIG into two logic streams:

* **Voice (R.MCV)** uses a Schmitt trigger on RCVSIG itself, with levels
  ±32 (half the received level). The line is 0 while the data bit is 0. The
  trigger then holds its last state, so the voice value is bridged across
  data zeros.
* **Data (R.MCD)** uses the absolute value RCVABS, then a Schmitt trigger
  with levels 24 (falling) and 40 (rising). These are symmetric about half
  the level, so that a filtered rising edge and a filtered falling edge are
  recognised after the same delay. With asymmetric levels the falling edges
  come out late, and the data decoder then samples too late.

`schmitt_trigger` has a combinational output with the held state in one
flip-flop. The demultiplexer therefore adds no clock of delay. Neither
trigger inverts.

## Manchester decoder

`manchester_decoder` works as follows:

1. The input is delayed one cycle (about 49 ns).
2. The input is XORed with the delayed copy. This gives TRIG, a one-cycle
   pulse on every edge.
3. The rising edge of TRIG starts a **non-retriggerable** 3/4-bit timer.
   While the timer runs, further TRIG pulses are ignored.
4. When the timer ends, the input is sampled and the inverted sample is the
   NRZ bit. This is because the first half of a Manchester bit is the
   complement of the bit. A `bit_strobe` marks each new bit.

**Locking.** A Manchester stream always has an edge at the centre of each
bit, and has an edge at the cell boundary only when two equal bits follow
each other. A 3/4-bit timer started on a centre edge therefore covers the
next boundary edge and ends before the next centre edge. Once the timer has
started on a centre edge, it stays on centre edges.

It can start on a boundary edge after reset. It then moves to the centre
edges at the first `01` or `10` bit pair, because no boundary edge follows.
A stream of constant bits gives the decoder nothing to lock on. The
end-to-end bench therefore switches S1 to constant only after the decoders
have locked on random bits.

D.CLK/V.CLK is low while the timer runs, like the monostable's Q-bar output.
The sample is taken at its rising edge.

## Error detection and the delay budget

`error_detector` XORs the transmitted bit (TX.DATA/TX.VOICE) with the
recovered bit. It registers the result in the cycle before the transmit
clock falls (mid-bit) and counts each error in a 32-bit saturating counter,
which `err_clear` resets.

This comparison only works if the recovered bit lines up with the
transmitted one at mid-bit. The decoder recovers bit *n* from its first
half, sampled a quarter bit into it, so all the path delays together must
stay under a quarter bit. For data that is 5 cycles. In this model the total
is:

* one line register;
* the filter's rise to the trigger level;
* the decoder's output register.

DATA.BITS then carries bit *n* from 9 cycles after TX.DATA changed. That is
one cycle before the comparison. That one cycle is the whole margin, so a
change to the channel model has to respect this budget.

## The 160 kb/s (DCP) rate and the vee problem

At 160 kb/s, 1024/160 = 6.4 data bits per voice bit, so voice transitions
drift through every position inside a data bit. A voice transition while the
data stream is 1 swings the line from +64 to −64 through zero. After the
absolute value, that swing is a short notch (a "vee") in R.MCD. A vee close
to the data decoder's sample point gives a wrong data bit.

The model shows this. At 160 kb/s the end-to-end bench sees 35 vees in 640
data bits and 14 data errors, while the voice channel stays error-free.

**Not modelled.** The correction the prototype applies at this rate is not
part of this design. It moves the data sample point, and the model has no
description of how.

## Clock skew between the sources

`tb_dvm_skew` feeds the system through the external inputs. The voice bit
boundaries lag the data bit boundaries by 0 to 15 cycles (0–75 % of a data
bit, in 5 % steps). It sends 32 voice bits and 512 data bits at each step.
Data errors appear only where the voice edges, and so the vees, land on the
data sample point:

| skew | 0–20 % | 25 % | 30 % | 35–75 % |
|---|---|---|---|---|
| data errors / 512 | 0 | 22 | 29 | 0 |
| voice errors / 32 | 0 | 0 | 0 | 0 |

The original simulation study of this system found the same window, near
25 %, with similar error counts. Separate source clocks would therefore need
to keep their skew well away from a quarter bit; a common clock avoids the
question. The PN sources inside the
design share one clock, so they always run at zero skew.

## Channel bandwidth

`tb_dvm_bandwidth` runs four copies of the system side by side, each with a
different channel, and counts decoded-bit errors itself at the best
alignment of sent and received bits. Each copy sends 512 data bits and
32 voice bits, with 64 kb/s voice.

| channel (CH_ORDER, CH_SHIFT) | −3 dB | data errors | voice errors | D.ERR count |
|---|---|---|---|---|
| 1, 1 | 2.36 MHz | 0 | 0 | 0 |
| 2, 1 (default) | 1.50 MHz | 0 | 0 | 0 |
| 4, 1 | 1.01 MHz | 0 | 0 | 287 |
| 3, 2 | 0.48 MHz | 238 | 0 | 283 |

At about 1 MHz the decoders still deliver every bit correctly. The
built-in error detector nevertheless counts errors: the slower channel
pushes the recovered bits past its quarter-bit delay budget, so the detector
compares the wrong bits. The detector's count therefore says little below
1.5 MHz. Only the bench's own alignment shows whether the link works. At
0.5 MHz the data eye is closed and the data is lost. The voice channel
survives, because it only needs the sign of the line.

## Measured behaviour (end-to-end bench, default parameters)

| voice rate | data bits | data errors | voice bits | voice errors |
|---|---|---|---|---|
| 64 kb/s | 640 | 0 | 40 | 0 |
| 128 kb/s | 320 | 0 | 40 | 0 |
| 160 kb/s | 640 | 14 (35 vees) | 100 | 0 |
| 256 kb/s | 160 | 0 | 40 | 10 |

At 256 kb/s a voice edge is only visible while the data stream is 1. It
therefore reaches the receiver up to a data bit late. That is a large part
of an 80-cycle voice bit, and the voice decoder's timer is thrown off. At
64 kb/s the same jitter is small against the bit and causes no errors.

## Behavioural parts and where the model departs from the hardware

* **Cable and transformers.** These are a low-pass stand-in with no length
  or gauge parameter. Real cable behaviour (length, gauge, the
  transformers' low-frequency cut-off) is not modelled. The decoders still
  work at this model's ≈1.5 MHz bandwidth, because the model has no noise
  and its delays are exact.
* **Levels.** The line amplitude (32), receiver gain (2) and trigger levels
  are sampled-signal choices. Only the gain of 2 and the half-level voice
  trigger come from the prototype.
* **Delay element.** The decoder's delay element is one master cycle. The
  prototype uses gate delays of 30–40 ns.
* **Polarity.** The data trigger in the prototype is an inverting part, and
  the prototype's voice path has one more inversion. Here neither path
  inverts, so both decoders take the inverted sample.
* **Error counters.** These are built in. The prototype brings the error
  flags out to a frequency counter.
* **Reset.** Reset clears all state, so every start-up runs through the PN
  zero-run guard.
* **256 kb/s.** This rate is selectable on `rate_sel`, next to 64, 128
  and 160.

## Files

| file | content |
|---|---|
| `rtl/dvm_pkg.sv` | rate enum, master clock, `voice_div()`, `timer_len()` |
| `rtl/dvm_system.sv` | top level |
| `rtl/dvm_clock_gen.sv` | counter chains, bit clocks and edge strobes |
| `rtl/pn_generator.sv` | 14-of-16 stage PN generator with zero-run guard |
| `rtl/manchester_encoder.sv` | clock XOR bit |
| `rtl/dvm_sources.sv` | S1, encoders, S2 |
| `rtl/dvm_mux.sv` | PLUS/MINUS code table |
| `rtl/line_driver.sv` | behavioural line driver |
| `rtl/twisted_pair_channel.sv` | behavioural low-pass channel |
| `rtl/diff_amp.sv` | behavioural receive amplifier |
| `rtl/schmitt_trigger.sv` | hysteresis comparator |
| `rtl/dvm_demux.sv` | voice trigger, absolute value, data trigger |
| `rtl/manchester_decoder.sv` | delay, edge pulse, 3/4-bit timer, sampler |
| `rtl/error_detector.sv` | mid-bit compare and error counter |
| `tb/tb_<module>.sv` | self-checking bench for each module |
| `tb/tb_dvm_system.sv` | end-to-end bench at default parameters |
| `tb/tb_dvm_skew.sv` | voice-to-data skew sweep |
| `tb/tb_dvm_bandwidth.sv` | channel bandwidth sweep |

The end-to-end bench does the following:

* It runs all four rates.
* It runs S1 constant and S2 external.
* It checks the line product on every cycle.
* It checks the design's error counters against its own mid-bit comparison.
* It counts each mechanism: both PN guards, timer skips of boundary edges,
  vees, voice held through data zeros, rate switches, S1/S2 modes and
  flagged errors. It fails if any of them never happened.

## Simulating

Every bench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/dvm_pkg.sv tb/tb_dvm_system.sv \
          --top-module tb_dvm_system -Mdir obj_sys
./obj_sys/Vtb_dvm_system
```

Replace `tb_dvm_system` with any other bench name to run that bench. The
end-to-end, skew and bandwidth benches each run in well under a second.
To try another channel, change `CH_ORDER`/`CH_SHIFT` on `dvm_system`.
Keep the delay budget above in mind: a slower channel can push the data
path past it.

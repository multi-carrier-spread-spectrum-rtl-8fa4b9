# MNC-OOK wireless interface: multi-carrier, spread-spectrum digital transceiver for a wireless NoC

A wireless network-on-chip (WiNoC) links clusters of cores by on-chip radio. A
single-carrier on-off-keying (OOK) link at tens of Gb/s needs a very wide
receiver bandwidth. Narrowing that bandwidth saves power but raises the error
rate. This design avoids the trade-off in two ways:

* **Frequency division.** The link is split over four OOK carriers, f1..f4.
  Each carrier carries 8 chips per 312.5 MHz cycle, i.e. 2.5 Gchip/s.
* **Direct-sequence spreading.** On one carrier, several nodes can transmit at
  the same time. Each node spreads its bits with a different Hadamard code,
  and a receiver recovers one node's bits by correlating with that node's code.

This RTL is the digital part of one wireless interface (WI): the logic between
a router's 32-bit flit port and the four OOK modulators and four ADCs. The RF
front end is not part of it: oscillators, modulators, PAs, combiner, antenna,
LNAs, envelope detectors and ADCs.

## Communication patterns

Each carrier lane is configured on its own, separately for transmit and
receive, into one of three patterns (`mode_e` in `mnc_pkg`):

| pattern | use | data bits per 312.5 MHz cycle | chips per bit | flit time | rate per carrier |
|---|---|---|---|---|---|
| `MODE_UNI` | unicast / broadcast, one sender per carrier | 8 | 1 (no code) | 4 cycles | 2.5 Gb/s |
| `MODE_C4`  | multicast, 4-chip codes | 2 | 4 | 16 cycles | 625 Mb/s |
| `MODE_C8`  | multicast, 8-chip codes | 1 | 8 | 32 cycles | 312.5 Mb/s |

"Multicast" covers the patterns that need several senders on one carrier:
many-to-one, many-to-many and several unicasts at once. With all four lanes
uncoded, one interface sends 10 Gb/s. A 4-chip code gives 6 dB of processing
gain and an 8-chip code gives 9 dB. The longer code is more robust and leaves
more orthogonal codes free.

### Codes

Each size group has three codes, i = 1..3. That is enough for four nodes, of
which at most three transmit on one carrier. The codes are rows 1..3 of the
Sylvester Hadamard matrices of order 4 and 8. Chip k of row r is +1 when
popcount(r & k) is even; a +1 is sent as chip 1 (carrier on). Chip k sits at
bit k and chip 0 is sent first:

| index `code` | 4-chip code (bits 3..0) | 8-chip code (bits 7..0) |
|---|---|---|
| 0 (i=1) | `0101` | `01010101` |
| 1 (i=2) | `0011` | `00110011` |
| 2 (i=3) | `1001` | `10011001` |

Row 0 (all ones) is not used, because it is not balanced. `mnc_pkg::hadamard_row`
computes these rows; nothing is stored as a table.

## Data path of one carrier

```
 router flit (32b)
      |
  SER(32:1/2/8) --1b/2b--> DSSS encoder --8 chips--+
      |                                          Mux --> SER(8:1) --> chip @2.5 GHz --> OOK modulator f_i
      +-------------8b (uncoded)-------------------+

 ADC f_i: 8 x 4-bit samples per 312.5 MHz cycle
      +--> DSSS decoder --1b--> DESER(1:32) --> 1-flit buffer --+
      |                 --2b--> DESER(2:32) --> 1-flit buffer --+--> access control --> router
      +--> hard decision --8b--> DESER(8:32) --> 1-flit buffer --+
```

The access control sits across all four lanes. It holds the configuration,
hands each lane its code, switches off the sub-blocks the lane's pattern does
not use, steers router flits to lanes and merges received flits.

### Spreading (`dsss_encoder`)

The encoder holds a 4-bit and an 8-bit code register. A data bit 1 sends the
code C and a data bit 0 sends its complement ~C. In 4-chip mode the earlier
bit fills chips 0..3 and the later bit chips 4..7. The spreading is
combinational, so coded and uncoded words reach the Mux in the same cycle.

### Despreading (`dsss_decoder`)

The receiver is non-coherent: each ADC sample is the envelope on that carrier,
and each sender that has chip 1 adds its amplitude. The decoder correlates the
samples s_k with the code mapped to ±1:

```
corr = Σ_k (C[k] ? +s_k : −s_k)          (over chips 0..7, or 0..3 and 4..7)
bit  = corr > MARGIN · (chips / 2)
```

* A sender using this code gives `+A·chips/2` for a 1 and `−A·chips/2` for a 0.
* A sender using another code of the same size adds exactly 0. The codes are
  orthogonal and balanced, so any DC level cancels too.
* A silent carrier gives a correlation near 0. The small dead zone (`MARGIN`,
  default 1 ADC code per '+' chip) turns it into 0 bits, so an empty slot
  reads as an all-zero flit in the coded patterns, as it does when uncoded.

In uncoded mode the `hard_decision` slicer compares each sample with a fixed
mid-scale level (`HD_THRESHOLD` = 8 for the 4-bit ADC).

Amplitudes must not clip. The sum of the senders' envelopes has to stay within
the ADC range; otherwise codes no longer cancel. The front end's gain is
responsible for this.

## Slots, synchronisation and empty flits

Neither the transmitter nor the receiver adds a header. Flit boundaries come
from time:

1. **Configuration phase.** The host writes each lane's `{en, mode, code}`
   through `cfg_we`/`cfg_rx`/`cfg_lane`/`cfg_data` into shadow registers.
   `cfg_apply` then activates all of them at the next 312.5 MHz edge. All
   interfaces of the WiNoC are expected to apply at the same clock cycle.
2. **Transmit sync.** One 312.5 MHz cycle later, every transmitter lane starts
   a slot. From then on a slot lasts 4, 16 or 32 cycles, and a flit starts
   only at a slot boundary. If no flit is waiting, the slot is
   sent as silence (carrier off).
3. **Receive sync.** `RX_DELAY` cycles after the transmit sync, the receiver
   lanes treat the ADC word then present as the first of a slot. From then on,
   every 32/w decoded chunks make a flit.
4. **Empty slots.** A silent slot arrives as the all-zero flit. The receiver
   drops it and pulses `rx_idle_slot`. **The flit value 0 is therefore
   reserved**: a router must never send an all-zero flit.

`RX_DELAY` (default 3) is the link latency in 312.5 MHz cycles, measured from
a sender's slot start to the receiver's first ADC word. The default assumes an
ADC that adds no latency of its own. With a real converter and its pipeline,
set it to that converter's latency plus 3.

The radio has no back-pressure. If the router does not take a received flit
before the next flit of the same lane is complete, that next flit is lost and
`rx_overflow` pulses.

## Clocking and timing

There is one clock, `clk`, at the 2.5 GHz chip rate. The 312.5 MHz domain is
a clock enable, `ce`, high one cycle in eight, made by a 3-bit counter and
brought out as `adc_strobe`. Everything except `ser8` updates only on `ce`, so
those paths are 8-cycle multicycle paths for timing analysis.

Cycle-level behaviour, with cycles meaning `clk` cycles and strobes meaning
`ce` cycles:

* Each SER(32:1/2/8) has a one-flit holding register. `tx_ready` is high
  while the named lane's holding register is free, so the router port, which
  takes one flit per clk cycle, can keep all four lanes busy. A held flit
  enters the shift register at the next slot boundary. A lane with a backlog
  therefore takes a flit every 32, 128 or 256 cycles (uni / C4 / C8).
* Chip k of a word is on `tx_chip[i]` during the k-th cycle after the strobe
  edge that loaded it. Chip 0 of a flit's first chunk appears 8 cycles after
  the flit enters the shift register.
* `adc_samples[i]` must hold eight samples, with sample k for chip k, stable at
  the strobe edge. They are taken at that edge.
* From a flit entering the sender's shift register to the receiving router
  taking it there are `8·(32/w + 3) + 2` cycles (58, 154 or 282 cycles for
  w = 8, 2, 1). On top of that comes the wait in the holding register, up to
  one slot. This assumes an ADC model that completes its word on the strobe
  edge after the last chip. The end-to-end testbench checks this number.

## Access control (`access_control`)

* **Gating.** From the active configuration it drives per-lane enables:
  serializer, encoder and SER(8:1) on the transmit side; decoder, slicer and
  each deserializer/buffer pair on the receive side. Uncoded lanes run without
  encoder and decoder. Coded lanes run without the slicer. Disabled lanes are
  frozen and send nothing. The enables are clock enables; no clock-gating
  cells are inserted.
* **Transmit steering.** Each router flit names its carrier (`tx_lane`).
  `tx_ready` is that lane's ready. A flit for a disabled lane waits. A flit
  for a lane whose holding register is full blocks the port for the others
  until that lane's next slot boundary.
* **Receive merge.** The four lane outputs are merged round robin into one
  valid/ready stream, tagged with `rx_lane`.

Assertions check that at most one lane receives the router's flit, that a
lane is released only on a router handshake, and that a held buffer flit stays
stable.

## Where this RTL follows its source and where it chooses

Taken from the source description:

* four carriers;
* the transmit chain SER(32:1/2/8) → DSSS encoder → Mux → SER(8:1);
* the encoder built from 4- and 8-bit code registers that send the code or
  its complement;
* the 1-bit/8-chip and 2-bit/4-chip pairings, and uncoded 8-bit words for
  unicast/broadcast;
* the receiver of eight 4-bit samples per cycle feeding a DSSS decoder and a
  hard decision;
* DESER(1:32), DESER(2:32) and DESER(8:32), each with a one-flit buffer;
* an access control that switches off unused sub-blocks;
* the 312.5 MHz and 2.5 GHz rates, the 32-bit router width, and three codes
  per code size.

This design's own choices:

* the slot framing and sync scheme, and the reserved all-zero flit;
* the configuration port;
* the per-flit carrier index and round-robin merge;
* the holding register in front of each SER(32:1/2/8);
* the decoder. The source refers to an external decoder architecture without
  its channel compensation; here it is a plain correlator with a small dead
  zone;
* the hard-decision threshold;
* which Hadamard rows are used, the chip and bit order;
* drop-on-full buffers;
* reset values;
* one clock with an enable instead of two clocks;
* one SER(32:1/2/8) and one SER(8:1) per lane. The source draws each as one
  block spanning the four lanes.

Known limits:

* The uncoded rate is 10 Gb/s per interface, not the 16 Gb/s that
  single-carrier links reach.
* Flits left in the buffer of a pattern that is switched off stay there until
  that pattern is used again.
* Nothing here synchronises interfaces that are not driven by a common clock
  and apply signal.
* The source's BER curves, its area and power figures, and its processing
  gain come from analog models and from synthesis in a 28 nm library. None of
  these is checked here. The testbench channel is a simple sum of carrier
  amplitudes plus up to one ADC code of noise, not the channel model of the source.

## Files

| file | content |
|---|---|
| `rtl/mnc_pkg.sv` | widths, `mode_e`, `lane_cfg_t`, gate structs, Hadamard functions |
| `rtl/mnc_transceiver.sv` | top: clock enable, access control, 4 × (`tx_lane`, `rx_lane`) |
| `rtl/access_control.sv` | configuration, sync, gating, flit steering and merging |
| `rtl/tx_lane.sv` | `ser32` → `dsss_encoder` → Mux → `ser8` |
| `rtl/ser32.sv`, `rtl/dsss_encoder.sv`, `rtl/ser8.sv` | transmit sub-blocks |
| `rtl/rx_lane.sv` | `dsss_decoder`, `hard_decision`, 3 × `deser`, 3 × `flit_buffer` |
| `rtl/dsss_decoder.sv`, `rtl/hard_decision.sv`, `rtl/deser.sv`, `rtl/flit_buffer.sv` | receive sub-blocks |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/ook_channel_model.sv` | behavioural RF path and ADC, used by the end-to-end test |

Top parameters: `RX_DELAY` (3), `HD_THRESHOLD` (8) and `DEC_MARGIN` (1).
Widths (`FLIT_W` = 32, `N_LANES` = 4, 8 chips, 4-bit samples) are package
constants.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs. With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv --top-module tb_mnc_transceiver \
  rtl/mnc_pkg.sv tb/tb_mnc_transceiver.sv
./obj_dir/Vtb_mnc_transceiver
```

Replace the top module name to run another testbench. Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/mnc_pkg.sv rtl/mnc_transceiver.sv`.

`tb_mnc_transceiver` runs four interfaces at default parameters over a shared
channel model. The model sums the senders' envelopes per carrier, adds
one-code noise and makes 4-bit samples. The test goes through four
configuration phases:

* A: uncoded unicast and broadcast, with a router stall that forces overflows;
* B: 4-chip multicast with two senders on one carrier, next to an uncoded
  carrier;
* C: 8-chip multicast with three senders, plus 4-chip multicast with two;
* D: one node streaming uncoded on all four carriers at 10 Gb/s.

A scoreboard expects every flit at every node tuned to its carrier, pattern
and code, in order. It checks the latency from each flit's serializer load, the phase-D rate, and
that lost flits match the overflow pulses. It also counts each mechanism and requires
it at least once: each pattern, reconfiguration, broadcast, several codes on
one carrier, empty slots, overflow, receive-merge contention and gated
sub-blocks. It runs in about ten seconds.

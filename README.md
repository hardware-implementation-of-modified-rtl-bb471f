# Direct sequence spread spectrum link with a pseudo chaotic chip generator

This is a small digital spread spectrum link. Every information bit is sent as a whole
32-chip word, so the signal occupies about 32 times the bandwidth of the data. The
transmitter sends the current 32-chip word of a pseudo random ("pseudo chaotic") sequence
for a 1 bit and all zeros for a 0 bit. The receiver runs an identical generator, rebuilds
the same word and decides, word by word, which of the two was sent. It then packs the bits
back into bytes.

The sequence comes from a 17-bit linear feedback shift register with a user-controlled input
multiplexer, called a *universal asynchronous LFSR* (UALFSR) here. Each clock it either feeds
back the parity of four taps or loads a bit supplied by the user. The user's bit stream
therefore acts as a key: it decides where in the sequence both ends stand. Any feedback
polynomial can be chosen with a parameter.

Spreading factor (processing gain) is 32. Information words are 8 bits. With `shift_en` held
high a byte takes 8 × 32 = 256 clocks.

## Structure

```
                 ds_ss_system
 ┌───────────────────────────────────────────────────────────────────────────────┐
 │  ds_transmitter                               ds_receiver                     │
 │  valid,data_in ─► sync_fifo ─rd─► p2s ─bit─┐  ┌─► bit_correlator ─► s2p(8) ─► data_out
 │                                            ▼  │        ▲                      │
 │  ualfsr ─chip─► s2p(32) ─word──────────► mux ─┴─ spread_data                  │
 │                                               ualfsr ─chip─► s2p(32) ─ref─┘   │
 │  fill_sel, din, shift_en ──────────── shared by both generators ───────────   │
 └───────────────────────────────────────────────────────────────────────────────┘
```

| File | Role |
|---|---|
| `rtl/dsss_pkg.sv` | shared constants: 17-bit generator, taps {0,4,5,9}, 32 chips, 8-bit data, buffer depth 16 |
| `rtl/ualfsr.sv` | chaotic chip generator: shift register, parity generator, 2:1 input mux |
| `rtl/sync_fifo.sv` | transmit byte buffer |
| `rtl/p2s.sv` | parallel to serial converter: one information bit per spreading word |
| `rtl/s2p.sv` | serial to parallel converter, used for 32-chip words and for 8-bit bytes |
| `rtl/bit_correlator.sv` | XOR of received and local words, reduced to one decided bit |
| `rtl/ds_transmitter.sv` | buffer + converter + generator + chip gatherer + output mux |
| `rtl/ds_receiver.sv` | generator + chip gatherer + correlator + byte gatherer |
| `rtl/ds_ss_system.sv` | top: transmitter wired to receiver |

## The chip generator (`ualfsr`)

The register shifts right by one place on every clock with `shift_en` high. The bit leaving
position 0 is the chip output, so `seq_out` always shows `r[0]`. The bit entering position 16
is:

    msb_in = fill_sel ? din : r[0] ^ r[4] ^ r[5] ^ r[9]

The taps are the parameter `TAPS` (a bit mask); the width is the parameter `WIDTH`.

**Reset clears the register, and a cleared register only produces zeros.** The parity of an
all-zero register is 0, so the generator stays at zero until at least one 1 has been loaded
through `fill_sel`/`din`. A link started from reset with `fill_sel = 0` therefore sends
all-zero words for every bit, and every byte arrives as `00000000`. Always load a key first:
hold `fill_sel` high for 17 clocks with `shift_en` high, and present the key one bit per clock
on `din`. Chips are produced during the fill too. The receiver sees the same fill, so the two
ends stay in step.

## Transmitter timing

* A byte is written into the buffer on each clock with `valid` high, unless the buffer is full.
  A write into a full buffer is dropped and `overflow` pulses for one clock.
* The parallel to serial converter pops a byte whenever it is idle, or is just giving up its
  last bit. It presents the byte's bits MSB first.
* `s2p(32)` takes one chip per clock with `shift_en` high. The first chip of a word ends up
  in bit 31.
* On the clock edge after the one that shifts in the 32nd chip of a word, `spread_data` is
  loaded with that word (current bit 1) or zero (current bit 0), and `spread_valid` pulses.
  The converter then moves to its next bit.
* A word that completes while no byte is waiting is not sent: `spread_valid` stays low.
  The bits of a byte therefore always travel in 8 consecutive sent words.
* `shift_en` low freezes both generators and both chip gatherers. It stalls the link without
  losing alignment.

## Receiver: keeping in step and deciding a bit

The receiver has no acquisition or tracking logic. It stays aligned because its generator
receives exactly the same `fill_sel`, `din` and `shift_en` as the transmitter's. It also
counts chip words from the same reset. Its `s2p(32)` holds each completed reference word for
the next 32 chip clocks. A received word is paired with the reference word current at its
arrival. It must therefore arrive less than 32 clocks after its word completed; the
transmitter in this top delivers it one clock later. Byte boundaries are implied: the first
valid word after reset starts a byte.

`bit_correlator` XORs the received word with the reference word. For a clean channel the XOR
is all zeros when a 1 was sent and equals the reference word when a 0 was sent. The
implemented decision counts ones: the bit is 1 if fewer chips differ from the reference word
(`popcount(rx ^ ref)`) than from zero (`popcount(rx)`). It is combinational, one 32-bit
XOR and two 6-bit population counts. It decides correctly whenever fewer chips are corrupted
than half the number of ones in the reference word. A tie, including an all-zero reference word,
decides 0.

Recovered bytes appear on `data_out` with a one-clock `data_valid`. For the last bit's word,
`data_valid` rises two clock edges after the edge that completed that word.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `LFSR_W` | 17 | generator width |
| `TAPS` | `17'h00231` | feedback taps, bits 0, 4, 5, 9 |
| `CHIPS` | 32 | chips per information bit (spread word width) |
| `DATA_W` | 8 | information word width |
| `FIFO_DEPTH` | 16 | transmit buffer depth (power of two) |

The generator width, taps, 32 chips and 8-bit data are the design's published figures. The
buffer depth is this implementation's choice.

## Top-level ports (`ds_ss_system`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; reset, active high, asynchronous |
| `valid`, `data_in` | in | 1, 8 | byte to transmit |
| `fill_sel`, `din`, `shift_en` | in | 1 each | generator key input and chip enable, shared by both ends |
| `data_out`, `data_valid` | out | 8, 1 | recovered byte |
| `spread_data`, `spread_valid` | out | 32, 1 | channel word, for observation |
| `buf_rd` | out | 1 | the transmitter takes a byte from its buffer |
| `buf_full`, `overflow` | out | 1 each | transmit buffer status |

## What is fixed by the design and what was chosen here

These parts come from the design as published:

* the 17-bit right-shifting register with taps 0, 4, 5 and 9;
* the input mux selecting the user bit or the parity;
* the clear on reset, the shift enable and the LSB output;
* the transmitter chain (buffer, parallel to serial converter, generator, 32-bit serial to
  parallel converter, output mux sending the word or zero);
* the receiver chain (generator, two serial to parallel converters, XOR correlator);
* 32-bit spread words and 8-bit data.

These details were chosen for this implementation:

* **Decision rule.** The published correlator is only described as an XOR giving one bit. The
  nearest-hypothesis count above is this design's choice.
* **Synchronisation.** The two generators share their controls, and the link between the ends
  is a direct wire inside the top.
* **Protocol details.** These include:
  * bit order (MSB first, in both the converters and the chip words);
  * the registered transmitter output and its `spread_valid` strobe;
  * skipping words while the buffer is empty;
  * back-to-back bytes;
  * buffer depth 16, dropping writes while full, and the `overflow` flag.
* **Reset.** Reset is asynchronous and active high everywhere.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against a model written
independently in the testbench and ends with a `TB_RESULT checks=N failures=M` line.

| Testbench | What it establishes |
|---|---|
| `tb_ualfsr` | cycle-by-cycle match with the recurrence under random fill, data and stalls; reset clears; zero state is sticky; key load |
| `tb_sync_fifo` | against a queue model: order, empty/full, dropped write and overflow pulse |
| `tb_p2s` | MSB-first bit stream against a queue, back-to-back and idle transitions |
| `tb_s2p` | 32- and 8-bit words with random gaps: content, bit order, one strobe per word |
| `tb_bit_correlator` | decisions with 0 to 20 flipped chips against popcounts; ties and zero sequence |
| `tb_ds_transmitter` | every sent word equals the modelled chip word or zero, one clock after completion; bytes recovered in order; overflow; idle words; stalls |
| `tb_ds_receiver` | words with up to 3 chip errors and 1 to 20 clocks latency give the sent bytes; `data_valid` timing |
| `tb_ds_ss_system` | end-to-end at default parameters: zero-key case, keyed example byte, random traffic with stalls, idle, overflow burst and a re-key during traffic; each mechanism is counted and must occur |
| `tb_ds_ss_example` | `valid` and `shift_en` held high, `fill_sel`/`din` low, byte `10011100`: all-zero bytes without a key, `10011100` after a key |

Simulate one of them with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl rtl/dsss_pkg.sv tb/tb_ds_ss_system.sv \
        -y rtl --top-module tb_ds_ss_system
    ./obj_dir/Vtb_ds_ss_system

All testbenches run at the default sizes in a second or less. Verilator's lint (`-Wall`) reports only
style warnings, and none of them concerns a latch, a loop or a multiply driven net. They
are about the observation outputs that are left unused (`state`, `chip`, `rx_bit`,
`rx_exact`), package constants a module does not need, an unconnected strobe, and the reset
also being used by the buffer's assertion.

## Limits

* There is no chip-timing recovery, acquisition or channel model. The receiver depends on
  sharing the transmitter's clock and generator controls.
* The design has not been mapped to an FPGA. No timing or area figures are claimed for this
  RTL.
* The published example stimulus drives `valid` and `shift_en` high, `fill_sel` and `din` low
  and the byte `10011100`. Applied straight after reset it cannot carry data in this RTL,
  because the generators clear to zero as published. The byte comes out as `00000000`
  unless a key is loaded first (`tb_ds_ss_example` runs both cases).
* The published implementation outperformed a nonlinear-feedback generator on area and speed.
  That comparison design is not included.

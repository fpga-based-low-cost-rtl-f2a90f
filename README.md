# ROM-based BPSK and BFSK modulators

A binary modulator that stores its carriers instead of computing them. Each
of two small ROMs holds one bit's worth of carrier samples. While a data bit
is being sent, a counter plays back the ROM that belongs to that bit's value.
The same circuit is a BPSK modulator when the two ROMs hold the same sine 180
degrees apart. It is a BFSK modulator when they hold two sines of different
frequency. Nothing but the ROM contents differs between the two.

The design targets a small FPGA at a 50 MHz clock. It takes a 14-bit data word
in parallel and sends it one bit at a time, least significant bit first, at
625 kbit/s: 40 samples per bit, 2 clocks per sample, 80 clocks = 1.6 us per
bit. The output is one 32-bit IEEE-754 single-precision sample of the
modulated waveform. The current bit is also brought out.

## Block structure

```
            +---------------+  rom (every 2nd clock)    +----------------+
 clk ------>| control_block |-------------------------->| sample_counter |
            |               |                           |  mod 40, q[5:0]|
            |               |  bit_separator            +-------+--------+
            |               |  (every 80th clock)               | address
            +---------------+------+                 +----------+----------+
                                   v                 v                     v
 d_in[13:0] ----------------> +---------------+ +---------------+ +---------------+
                              | bit_separator | | carrier_rom   | | carrier_rom   |
                              |  LSB first    | | frequency_1   | | frequency_0   |
                              +-------+-------+ +-------+-------+ +-------+-------+
                                      | d_out           | q1 (data1x)     | q0 (data0x)
                                      |                 v                 v
                                      |            +---------------------------+
                                      +----------->| sample_mux  sel           |--> result[31:0]
                                      |            +---------------------------+
                                      +------------------------------------------> d_out
```

| Module | Role |
|---|---|
| `mod_pkg` | Sizes (40 samples per bit, 2 clocks per sample, 14-bit word, 32-bit sample) and the constant function that computes a ROM word |
| `control_block` | Phase counter 0..79; emits the sample strobe `rom` and the bit strobe `bit_separator` |
| `sample_counter` | Up counter of modulus 40 with enable. Both ROMs share its address |
| `carrier_rom` | 40 x 32-bit sample ROM with a synchronous read. Its contents are set by the parameters `CYCLES` and `PHASE_DEG` |
| `bit_separator` | Captures `d_in` at the start of each word and presents one bit per bit strobe |
| `sample_mux` | Outputs the `frequency_1` sample while `d_out` is 1 and the `frequency_0` sample while it is 0 |
| `modulator_core` | Wires the above together; generic in its two carriers |
| `bpsk_modulator` | `modulator_core` with 1 period at 0 degrees for bit 1 and 1 period at 180 degrees for bit 0 |
| `bfsk_modulator` | `modulator_core` with 2 periods for bit 1 and 1 period for bit 0, both starting at 0 degrees |
| `bpsk_bfsk_top` | Both modulators side by side on one clock and reset |

## The sample words

ROM word `k` (k = 0..39) of a carrier with `C` periods per bit and start phase
`P` degrees is

    word(k) = float32( sin(2*pi*(C*k/40 + P/360)) )

The float is rounded to nearest. One sample step is 9 degrees of a
one-period carrier. `mod_pkg::carrier_sample()` reduces the angle to a whole
number of steps first, then takes the second half period as the negated first
half. As a result the zero crossings are exact `0x00000000` words and the
table is exactly antisymmetric. The tables are built at elaboration, so no
memory-initialisation file is needed. Some words, for reference:

| angle | value | word |
|---|---|---|
| 0 | 0 | `00000000` |
| 9 | 0.1564 | `3E20305B` |
| 18 | 0.3090 | `3E9E377A` |
| 27 | 0.4540 | `3EE87171` |
| 36 | 0.5878 | `3F167918` |
| 54 | 0.8090 | `3F4F1BBD` |
| 72 | 0.9511 | `3F737871` |
| 90 | 1 | `3F800000` |

Negative values have the sign bit set, so sin(288 degrees) is `BF737871`.

The output is a float sample stream, not a DAC code. Driving a DAC would need a
float-to-fixed conversion after `result`, which this design does not include.

## Timing

This part needs the most care. The ROM read is registered, so `result` lags
the address by one clock. The strobes are phased so that a new bit and sample
0 of its carrier show up on the **same** clock edge. Counting rising edges
after reset is released as n = 1, 2, ..., after edge n:

    bit    b = (n-1) / 80          d_out  = d_in_word[b mod 14]
    sample k = ((n-1) mod 80) / 2  result = ROM_{d_out}[k]

Within one bit period (phase 0..79 of `control_block`):

| phase | `rom` strobe | `bit_separator` strobe | what changes at the end of the phase |
|---|---|---|---|
| 0 | 0 | 1 | `d_out` takes the next bit. `result` takes sample 0 of its carrier |
| 1 | 1 | 0 | the address goes 0 -> 1 |
| 2 | 0 | 0 | `result` takes sample 1 |
| ... | | | |
| 79 | 1 | 0 | the address wraps 39 -> 0 |

So every bit begins with the word `00000000` (sin 0) and each sample is held
for two clocks. Two assertions in `modulator_core` check this. At each bit
strobe the address must be 0, and the address may move only on a sample
strobe.

The first bit strobe comes in the first clock after reset. Bit 0 of the word
is therefore on `d_out` from edge 1 on. `bit_separator` captures `d_in` at bit
0 of each word and sends the word over and over. A change of `d_in` in the
middle of a word takes effect at the next word.

To change the rates, set `CLKS_PER_SAMPLE_P` and `SAMPLES_PER_BIT_P` on
`modulator_core`; the alignment above holds for any values. One ROM per bit
value fixes the carrier frequencies relative to the bit rate:
f = C x f_clk / (CLKS_PER_SAMPLE x SAMPLES_PER_BIT). At 50 MHz with the
defaults, the BPSK carrier is 625 kHz and the BFSK tones are 1.25 MHz and
625 kHz.

## BPSK and BFSK configurations

**BPSK.** Bit 1 plays sin(2 pi k/40) and bit 0 plays sin(2 pi k/40 + pi). The
classic view, a bipolar NRZ level multiplied by the carrier, gives the same
samples; here the multiplication is replaced by choosing a table. Because
every bit holds exactly one carrier period, the phase jumps by 180 degrees
only where the bit value changes. Around a 0 -> 1 change the output runs
`3F167918 3EE87171 3E9E377A 3E20305B | 00000000 3E20305B 3E9E377A`.

**BFSK.** Bit 1 plays two periods per bit and bit 0 one period. Both tones
start at 0 degrees and end a whole number of periods later, so the signal is
phase-continuous at every bit change. Around a 1 -> 0 change the output runs
`BF737871 BF4F1BBD BF167918 BE9E377A | 00000000 3E20305B 3E9E377A`. The 2:1
ratio comes from the sample words of the original traces, quoted here. The
original write-up also mentions a ratio of 20. At 40 samples per bit, a
20-period tone would have only two samples per period, and all its sine
samples would be zero. `bfsk_modulator` therefore exposes `F1_CYCLES` and
`F0_CYCLES` as parameters. Keep both below 20.

## Ports of the top

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, 50 MHz for the rates above |
| `rst` | in | 1 | synchronous reset, active high |
| `bpsk_d_in`, `bfsk_d_in` | in | 14 | data words |
| `bpsk_result`, `bfsk_result` | out | 32 | modulated sample, IEEE-754 single |
| `bpsk_d_out`, `bfsk_d_out` | out | 1 | bit being sent |

One modulator alone (`bpsk_modulator` or `bfsk_modulator`) uses
clk + rst + d_in(14) + result(32) + d_out = 49 pins. Its tables hold
2 x 40 x 32 = 2560 bits of samples. Each ROM is declared over the whole 6-bit
address range, so it has 64 words, and words 40..63 read 0. The address
counter never produces those addresses.

## Where this design departs or chooses

- **Reset.** The original design has no reset pin; it has 48 pins and relies
  on power-up state. This design adds a synchronous `rst`.
- **Bit order** is least significant bit first, read from the original
  traces. Capturing `d_in` once per word and repeating the word are choices of
  this design.
- **Strobe phases** are this design's choice. They were picked to give the
  bit/sample alignment described under Timing, which the original traces also
  show.
- **ROM contents** are computed in SystemVerilog rather than loaded from a
  file. The words agree with every sample word quoted above.
- **Tone ratio** for BFSK is 2:1; see above.
- **Control block internals** (one phase counter with two decodes) are the
  simplest circuit that gives the required strobes. The original describes
  only what the block outputs.
- **How the two modulators share a chip** was not described. The top simply
  places them side by side.

The bit-error-rate comparison of BPSK and BFSK over AWGN that goes with this
design is analytical: Q(sqrt(2Eb/N0)) for BPSK, Q(sqrt(Eb/N0)) for BFSK. It is
not part of the hardware, and no channel or demodulator is included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_control_block` | strobe positions against the clock count, at default and other parameters, and across a second reset |
| `tb_sample_counter` | random enables against a modulus-40 model, and the wrap |
| `tb_carrier_rom` | every word of three tables; the quoted sample words; the one-clock latency |
| `tb_sample_mux` | random selects and data |
| `tb_bit_separator` | LSB-first order, capture once per word, hold between strobes, reset |
| `tb_modulator_core` | two configurations, every sample and bit, random data changes, reset |
| `tb_bpsk_modulator`, `tb_bfsk_modulator` | the original data words (`01100101001011`, `00100101011010`); bit sequence, 1.6 us bit grid, the seven sample words around a symbol change |
| `tb_bpsk_bfsk_top` | full-size end-to-end run of both modulators. Every phase/tone change, new-word capture, repeated word and restart after reset must occur |

The sample-level checks use `tb/mod_scoreboard.sv`. It computes the expected
words independently: the whole angle goes through `$sin` in double precision,
and the result is rounded to single precision from the double's bit pattern.
Shared reference functions are in `tb/tb_ref_pkg.sv`.

To run one testbench with Verilator from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_bpsk_bfsk_top rtl/mod_pkg.sv tb/tb_ref_pkg.sv tb/tb_bpsk_bfsk_top.sv
./obj_dir/Vtb_bpsk_bfsk_top
```

The full-size top test takes about 11,000 clocks and runs in well under a
second.

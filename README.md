# Digital delay and 2-bit correlator for a 27-antenna interferometer

An interferometer correlates the signals of every pair of antennas. A signal
reaches each antenna at a different time, so each antenna's signal must first
be delayed until all of them line up again. This design does that digitally.
Each 100 MHz-wide IF signal is sampled at 200 MHz with 2 bits. The samples run
through a RAM ring buffer whose length, and the phase at which it is read, set
the delay in 10 ns steps. The delayed samples of every antenna pair then go to
a cross-correlator.

The correlator keeps only the products of two "large" samples (both
magnitudes above threshold). Each of these counts +1 or -1. For each pair it
keeps three lags: a centre lag and one on each side. All of this runs at
100 MHz per stream. Fast binary prescalers reduce the counts first. Only then,
at low speed, are the two sample streams combined and the two side lags
subtracted. Each cross correlation ends with two numbers:

* the centre lag;
* the difference of the two side lags.

The design follows a 1972 design study for the VLA's digital delay system. The
RTL gives the logic of that study. Where the study leaves a detail open, the
RTL fills it in and says so.

## Signal path

```
 per IF signal (27 antennas x 2 polarizations = 54)
   2-bit samples @200 MHz
        |
   sample_splitter ---- X stream (even samples) ----+
        |                                           |  delay_unit:
        +------------- Y stream (odd samples) ------+  delay_control
                                                    |  + 4 x delay_line
                                                    v  (sign, amp of X, Y)
                                       delayed X, Y of this IF
                                                    |
 per antenna pair i<j and polarization pair (pa,pb): 1404 of them
   baseline_correlator = correlator_hs (12 count pulses)
                       -> corr_lowspeed (12 prescalers, 2 up/down counters)
                                                    |
   correlator_control (multiplexer scan, dump timing, shared)
                                                    v
   data_storage: 2808 numbers, captured at each dump, read by the computer
```

The whole design runs on one clock, the 200 MHz sample clock `clk`. The
100 MHz logic advances on every second edge, through an enable (`en`, which is
the top's internal `phase` flip-flop). There is no divided clock and no
clock-domain crossing.

## Sample format and what is counted

A sample is `sample_t` (in `ddc_pkg`) and has two bits:

* `sign`: 1 = positive, 0 = negative.
* `amp`: 1 when the magnitude is above the sampler threshold Vo.

The four states stand for the values +1, +2, -1 and -2. A product is counted
only when it is +-4, that is, when both `amp` bits are 1:

* +1 goes to the channel's "+" counter when the signs agree;
* -1 goes to its "-" counter when the signs differ;
* every other product is 0.

This is the "low and intermediate products deleted, n = 2" two-bit correlator.
Its sensitivity is about 0.81 of an ideal analog correlator.

## The delay system (`delay_control`, `delay_line`, `delay_unit`)

This is the least obvious part. One `delay_control` drives four one-bit
`delay_line`s: the sign and amplitude bits of the X and Y streams of one IF.
All four share one address and one set of strobes.

**Counter.** A 14-bit counter advances once per 100 MHz clock:

* bits [13:4] are the RAM address;
* bits [3:0] are the phase inside a 16-clock (160 ns) memory cycle.

**Delay word.** The computer writes a 14-bit delay word `D` into a buffer
with `strobe`. The strobe also resets the counter. The word has two fields:

* `D[13:4]` sets the ring length. At the end of the memory cycle whose address
  equals `D[13:4]`, the counter returns to 0. The ring therefore holds
  `D[13:4] + 1` words of 16 bits.
* `D[3:0]` sets the fine delay within a word. The output strobe fires on phase
  `(D[3:0] + 2) mod 16`.

**One memory cycle:**

| phase | action |
|---|---|
| every clock | one bit enters the 16-bit input shift register; the output shift register shifts one bit out, earliest bit first |
| 0 | input shift register -> input buffer (`in_strobe`) |
| 1 | RAM[addr] -> output buffer (`rd_en`): the word written one ring length ago |
| 2 | input buffer -> RAM[addr] (`wr_en`) |
| (D[3:0]+2) mod 16 | output buffer -> output shift register (`out_strobe`) |
| 15, if addr = D[13:4] | counter back to 0 |

**Latency.** The offset of 2 in the output-strobe compare puts the strobe
after the read. That makes the delay a single straight line in `D`:

    delay = D + DELAY_LATENCY = D + 35 clocks of 100 MHz (10 ns each)

The delay has no jump where `D[3:0]` wraps. Timing convention: after `q`
enabled edges, `d_out` holds the bit that was sampled on enabled edge
`q - D - 35` (counting edges from 0). The range of `D` is 0 to 16383 (0 to
163.8 us). In 200 MHz samples the step is 2 samples. The original scheme gets
finer steps by moving the sampler's aperture phase. That is analog and is not
part of this RTL.

**After a reload.** When a new word is loaded, the ring still holds old data.
The output is meaningless for `D + 35 + 16` clocks. RAM contents are not
reset.

## High-speed correlator (`correlator_hs`)

Antenna A's two streams pass two register stages and antenna B's pass one:

    A1 = A.Y(t)   A2 = A.X(t)   A3 = A.Y(t-1)   A4 = A.X(t-1)   BX = B.X(t)   BY = B.Y(t)

X holds sample 2t and Y holds sample 2t+1. The six pairs give twelve count
channels (odd = "+", even = "-"). Lags are A minus B, in 5 ns samples:

| channels | pair | group | role | lag |
|---|---|---|---|---|
| 1, 2 | A2 x BX | X | centre | 0 |
| 5, 6 | A1 x BX | X | side "1" | +1 |
| 7, 8 | A3 x BX | X | side "3" | -1 |
| 3, 4 | A3 x BY | Y | centre | -2 |
| 9, 10 | A2 x BY | Y | side "1" | -1 |
| 11, 12 | A4 x BY | Y | side "3" | -3 |

These pairings are the original drawings' pairings, kept unchanged. With them,
the Y group's three lags sit two samples (10 ns) below the X group's. The
study does not say how the two groups are brought into line, and the RTL does
not add an alignment stage. One consequence: if B lags A by exactly one
sample, X-group channel 3 and Y-group channel 1 see the same correlation. The
two then cancel in the difference number. The baseline testbench shows this.

## Low-speed section (`corr_lowspeed`)

**Prescalers.** Each channel drives its own `PRESCALE_BITS`-bit binary
prescaler. The default of 8 counts one bit per stage of the original chain:
JK, 2 x D, 4-bit ripple counter, JK.

**Scanning.** Two multiplexers read the prescaler MSBs:

* a 4-input one over channels 1-4, using `sel[1:0]`;
* an 8-input one over channels 5-12, using `sel`.

A circulating 4-bit or 8-bit shift register holds the value each channel had
when it was last scanned. A 1 -> 0 change of the MSB is the prescaler's carry.
It steps a reversible counter by one:

* `acc_center` = ch1 - ch2 + ch3 - ch4
* `acc_diff` = (ch5 - ch6) - (ch7 - ch8) + (ch9 - ch10) - (ch11 - ch12),
  i.e. side "1" minus side "3", over both groups

Each count of these counters stands for 256 products. Per dump the result is
exactly `sum(direction * floor(n_channel / 2**PRESCALE_BITS))`. The prescaler
remainder at a dump is dropped.

**Rules the scan must keep:**

* `sel` must advance by one per scan. An assertion checks this.
* A full scan, 8 x `SCAN_SLOT` clocks, must be no longer than half a prescaler
  cycle, 2**(PRESCALE_BITS-1) clocks. Otherwise a carry could be missed. The
  top stops elaboration if the parameters break this.

## Correlator control and dump (`correlator_control`, `data_storage`)

One controller serves all correlators:

* It steps `sel` once every `SCAN_SLOT` (8) clocks and gives a `scan` pulse on
  the last clock of each slot.
* After `dump_period` clocks of counting, it blanks counting for one full scan
  (64 clocks), so that every carry reaches the counters.
* It then raises `dump` for one enabled clock. On that clock `data_storage`
  captures all 2808 counter values and every correlator clears.

One dump cycle is `dump_period + 65` clocks. A `dump_period` of 0 acts as 1.
The value is read at reset and at each dump. The maximum, 2^30 - 1 clocks,
covers the 10 s specification.

The computer reads the storage one word per clock: `rd_data` follows
`rd_addr` by one `clk`. Correlator `c` (numbering below) stores its centre
number at word `2c` and its difference number at word `2c+1`. `dump_count`
counts captures, so the reader can tell a new set from the old one.

## Top level (`vla_delay_correlator`)

**Numbering.** IF `k = antenna * N_POL + polarization`. Pairs are taken in the
order (0,1), (0,2) ... (0,26), (1,2) ... Correlator
`c = pair * N_POL^2 + pa * N_POL + pb` uses IF (i, pa) as A and IF (j, pb)
as B.

**Ports.** All are plain signals or arrays:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 200 MHz sample clock; synchronous reset |
| `samples[54]` | in | 2 each | one sample per IF per clock, from the samplers |
| `delay_word[54]` | in | 14 each | delay per IF, in 10 ns steps |
| `delay_strobe` | in | 54 | load the delay word; hold for two `clk` edges |
| `dump_period` | in | 30 | integration length in 100 MHz clocks |
| `rd_addr` | in | 12 | storage read address |
| `rd_data` | out | 32 signed | storage word |
| `dump` | out | 1 | high for one enabled clock per dump |
| `dump_count` | out | 16 | number of dumps captured |

**Parameters** (defaults are the full system):

| parameter | default | origin |
|---|---|---|
| `N_ANT` | 27 | 351 antenna pairs |
| `N_POL` | 2 | 4 polarization combinations per pair |
| `PRESCALE_BITS` | 8 | stages of the original prescaler chain |
| `ACC_W` | 32 | chosen; holds a 10 s dump |
| `SCAN_SLOT` | 8 | chosen |
| `PERIOD_W` | 30 | chosen; 10 s at 100 MHz |
| delay word / RAM | 14 bits / 1024 x 16 | original, in `ddc_pkg` |

## What is not here, and other departures

* **Samplers.** The level control, the 2-bit quantiser and the aperture phase
  shifter that gives sub-10 ns delay steps are analog parts outside the
  logic. Their 2-bit outputs are the `samples` ports.
* **Computer and interfaces.** Not designed. The computer's signals are plain
  ports.
* **50 Hz switching.** The specification lists a 50 Hz switching rate but
  does not describe what is switched. No switching logic is included.
* **Counting the difference before the counters.** This alternative (counts
  of +-1 and +-2 straight from the samples) was studied and rejected in
  favour of combining after the prescalers. It is not built.
* **Choices made here, where the original is silent:**
  * the phases of the memory-cycle controls and the ring wrap rule;
  * bit order in the delay line;
  * how a scanned prescaler bit steps the reversible counter;
  * the flush before each dump;
  * the total counter width;
  * parallel capture into storage;
  * a single shared correlator control;
  * which antenna of a pair is A;
  * reset behaviour.
* **Centre-channel sign rule.** The sign rule comes from the product
  identities (+2 x +2 counts +1): "+" when the signs agree, "-" when they
  differ.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Example with plain
Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
      --top-module delay_line_tb rtl/ddc_pkg.sv tb/delay_line_tb.sv
    ./obj_dir/Vdelay_line_tb

| testbench | checks |
|---|---|
| `sample_splitter_tb` | pair order and hold behaviour |
| `delay_control_tb` | address, phases, output strobe and wrap period against a reference count, with a random enable |
| `delay_line_tb`, `delay_unit_tb` | delay is exactly D + 35 for D from 0 to 16383, across word boundaries and after reloads |
| `correlator_hs_tb` | all 12 channels against integer products |
| `corr_lowspeed_tb` | both counters against floor(n/256) sums, up and down, and clear |
| `correlator_control_tb` | scan spacing and order, integration and blank lengths, changing periods |
| `baseline_correlator_tb` | one correlation with lag-shifted test signals that drive each number positive and negative |
| `data_storage_tb` | capture, enable qualification, read-back of all 2808 words |
| `vla_delay_correlator_tb` | 3 antennas, end to end (see below) |
| `vla_delay_correlator_6ant_tb` | the same test at 6 antennas (60 correlators), with every other parameter at its default |

The end-to-end test builds its own model of the whole path: samples, delay,
lag registers, products and the counting window. It feeds the antennas a
common signal with per-antenna geometric delays and sets delay words that
line them up. Midway it reloads new delays and changes the dump period. After
every settled dump it compares every stored word with the model. It also
counts the mechanisms it must see, and each must occur at least once:

* delay loads;
* ring wraps;
* sub-word delays;
* flush clocks;
* dumps;
* positive and negative centre and difference numbers;
* read-back words.

**Size simulated.** The largest configuration simulated end to end is 6
antennas: 12 IF signals, 60 correlators and 120 stored numbers. It uses the
default prescaler, scan slot, delay word and buffer size. Verilator builds it
in about two minutes and runs ten dumps in seconds.

The full size has not been simulated. It has 216 RAMs of 1024 x 16 and about
1404 x 230 flip-flops in the correlators. Its generated C++ takes more than ten
minutes to compile. Nothing in the RTL changes with `N_ANT` except the number
of generate copies and the storage size. To try it, copy
`vla_delay_correlator_6ant_tb.sv` and set `NA = 27`. Then lengthen the
watchdog and allow a long C++ build.

# Monte Carlo hit processor and random-timing pattern generator for an air-shower array

A surface array of particle detectors records, every 0.1 s, how many times one,
two, three or four detectors fired together. Part of those counts is accidental:
two unrelated cosmic rays can hit two detectors within the coincidence window
and look like a single two-fold event. Correcting for this needs a Monte Carlo
model in which every detector fires at random at its measured single rate, and
the hardware trigger is applied to the simulated hits. Done in software, this is
slow, and it gets slower once higher-order coincidences and timing are added.

This RTL does the simulation in hardware, one Bernoulli trial per detector per
clock:

* **MC processor** (`mc_processor`, 50 MHz, 94 detectors). Random detector hits
  are generated, with extra correlated two-, three- and four-fold hits added on
  top. Each hit is stretched into a 600 ns pulse. The number of overlapping
  pulses is compared with 1..4, and a 10 Hz scaler counts each trigger level.
  Its output is directly comparable with the scaler data of the real array.
* **Pattern generator** (`pattern_generator`, 250 MHz, 16 channels). Electrical
  test patterns for a trigger and TDC system. For each event, every channel
  produces one 20 ns pulse. The pulse's delay from the event start is drawn from
  a programmable distribution, for example the Gaussian spread of arrival times
  in a shower. Delays have 0.5 ns resolution over a 512 ns range.

`alpaca_mc_top` places the two side by side. They share no signals, and each
runs on its own clock.

```
 MC processor (50 MHz)
                                     +--> poisson_gen x94 --(m1)--+
 lfsr96 --seed words--> alfg --127 words/clk                       OR --> pulse_stretch --> hit_sum_trigger --> scaler --> counts
                                     +--> coinc_gen Any2/3/4 --(m2..m4)--+    (600 ns)        (sum, >=1..4)       (0.1 s)
 register bus <--> mcp_config (run, reseed, m1..m4, width, seed, scaler read-back)

 Pattern generator (250 MHz)
 lfsr96 --> rate_gen (Poisson | fixed) --event--> pg_control --16 x delay, mask--> delay_channel x16 --> 8-bit oversampled words
                 lfsr96 --16-bit uniform--> inv_sampler (inverse-CDF table) --^
                 stored patterns (pat_* stream, valid/ready) --------------^
```

## Random numbers: why two generators

A Bernoulli trial per detector per clock needs one new 32-bit uniform word per
detector per clock: 94 words, plus six for the coincidence generators.

**`lfsr96`** is a 96-bit Fibonacci LFSR. Its recurrence is
`x[n] = x[n-96] ^ x[n-94] ^ x[n-49] ^ x[n-47]`, evaluated 32 steps per clock.
Every clock the register shifts up by 32. The 32 vacated bits are filled with
`bit(31-k) = s[95-k] ^ s[93-k] ^ s[48-k] ^ s[46-k]`. All taps are at least 47
positions back, so no bit of a new word depends on another new bit. At 50 MHz
the period is thousands of years.

An LFSR per channel looks simple, but channels fed that way are correlated in
time. In a test, the any-one rate of all channels together did not match the
sum of the programmed channel rates, and the cause was traced to this
correlation. For that reason the channels here are fed by one wide generator
instead:

**`alfg`** is an additive lagged Fibonacci generator,
`X[n] = X[n-67] + X[n-97] mod 2^32`. It stores the last K = 97 terms. Each
enabled clock it computes the next P = 127 terms at once:

* Terms `n = 97..163` use stored values only.
* Terms 164..223 need `X[n-67]`, which was itself computed in the same clock. The
  adder chain is therefore two adders deep.
* The state then becomes terms 127..223, and the 127 new terms go out
  registered on `rnd`.
* `valid` marks the clocks whose words are new. Consumers must gate their
  trials with it. Otherwise stale words are compared again, or, after reset,
  all-zero words make every channel fire.

Seeding: the ALFG needs 97 random seed words, and at least one of them must be
odd for the full period. After reset, or when the control register asks for a
reseed, the following happens:

1. The LFSR is loaded from the 96-bit seed register.
2. It shifts 97 of its words into the ALFG, one per clock. The LSB of the first
   word is forced to 1.
3. `ready` rises, and generation starts if `run` is set.

A reseed request restarts this sequence at any time. The same seed always
reproduces the same hit sequence, and the tests check this.

## From a random word to a Poisson detector

`poisson_gen` fires when `rnd <= p`. At clock frequency f, the mean rate is

    lambda = f * (p + 1) / 2^32        p = lambda / f * 2^32 - 1

For small p, the gaps between hits follow a geometric distribution, which is
close to exponential, so the stream is Poisson with one-clock time resolution. At 50 MHz:

| single rate | p (m1) |
|---|---|
| 200 Hz | 17 178 |
| 300 Hz | 25 768 |
| 800 Hz | 68 718 |
| 820 Hz | 70 436 |
| 1000 Hz | 85 898 |

All 94 detectors share the threshold m1.

## Correlated hits: Any2, Any3, Any4

A real shower hits several detectors at once. `coinc_gen` models this with its
own Bernoulli trial, at rate m2, m3 or m4. When the trial succeeds, it hits MULT
detectors in the same clock. The first detector is drawn uniformly as
`base = (rnd_sel * 94) >> 32`, and the hit detectors are `base .. base+MULT-1`,
wrapping around. Each detector ORs its own hit with the three injections.

This choice of neighbouring channel numbers is this design's own. Only the
rates are given for these generators, so which detectors they hit is a free
choice. Replace the `pattern` logic in `coinc_gen` if a geometry-aware choice is
wanted.

## Coincidence window, hit sum and scaler

The hardware trigger of the array sees detector signals as fixed-width pulses.
`pulse_stretch` loads a per-channel counter with `width` (reset value 30 clocks
= 600 ns) on every hit. The output is high while the counter is non-zero, and a
new hit restarts it. Two detectors overlap when their hits are less than 600 ns
apart in either order, which is the 1200 ns coincidence window of the software
model.

`hit_sum_trigger` registers the number of high pulses (a 94-input popcount), then
registers `ge[n-1] = sum >= n` for n = 1..4.

`scaler` counts rising edges of each level over a gate of 5 000 000 clocks
(0.1 s), so one counted edge is one trigger:

* At the last clock of the gate, the counts (including an edge in that clock)
  are copied to `counts`.
* `valid` pulses for one clock, and counting restarts without a gap.
* Counters saturate.
* The scaler runs only while generation is active. Stopping clears the gate.

A useful check of the whole chain: with R independent hit groups per second,
the level-1 scaler should read about `0.1 s * R * exp(-R * 600 ns)`. A hit starts
a new edge only if no pulse is active. With 94 x 820 Hz plus 3 x 100 Hz of
coincidences, that is 7387 per gate. The full-size simulation reads 7431.

Latency from an ALFG word to the scaler input is five registers: ALFG output,
trial, pulse counter, sum, level.

## Setup registers (`mcp_config`)

The host writes the run parameters through a plain register bus:

* Writes take one clock with `bus_we` high.
* A read with `bus_re` high returns `bus_rdata` with `bus_rvalid` one clock
  later.
* In the full system, this bus sits behind the network link to the PC.

| addr | register |
|---|---|
| 0x00 | bit0 run, bit1 reseed (write 1: one-clock pulse; reads 0) |
| 0x01..0x04 | m1 (per detector), m2, m3, m4 (Any2/3/4 thresholds) |
| 0x05 | pulse width in clocks (reset 30 = 600 ns) |
| 0x08..0x0A | 96-bit LFSR seed, low word first |
| 0x10..0x13 | counts of the last scaler gate, levels >=1..>=4 (read only) |
| 0x14 | number of completed gates (read only) |

After reset the design is stopped, with m1..m4 = 0 and a fixed non-zero seed. A
reseed is issued automatically. The register map and the bus are this design's
own. The original design only names the parameters.

## Pattern generator

### Inverse sampling (`inv_sampler`)

A table of 2^16 entries of 10 bits holds the inverse cumulative distribution of
the wanted delay. Entry u is the smallest x in 0..1023 with
`CDF(x) >= (u + 0.5) / 65536`. Addressing the table with a uniform 16-bit number
returns x with the wanted distribution. 16 bits set how finely the distribution
is resolved, and 10 bits match the delay resolution.

The host fills the table through a write port, so any distribution can be
loaded. The tests compute a Gaussian of mean 510 and sigma 120 units (255 ns,
60 ns), truncated to 0..1023, in SystemVerilog. The read is registered, with one
clock of latency, as in a block RAM.

### Delay channel (`delay_channel`): 0.5 ns at 250 MHz

A 0.5 ns step needs 2 GHz sampling. The 250 MHz clock is used with 8x
oversampling: each clock, a channel outputs an 8-bit word `os`, and bit i stands
for the sub-sample at `(8c + i) x 0.5 ns` after the event reference (bit 0
earliest). An output stage placed after the channel must put the eight
sub-samples on the pin 0.5 ns apart. It can use phase-shifted copies of the
clock on both edges, or a serialiser. That stage is not in this RTL. Its input
is the `os` word. Note that four copies at 0, 90, 180 and 270 degrees give only
four distinct edge instants per 4 ns clock, because the falling edge of one
copy coincides with the rising edge of the copy 180 degrees away. Reaching
0.5 ns at 250 MHz takes eight distinct instants, for example four copies 45
degrees apart used on both edges.

How the channel works:

* A `start` strobe latches the delay d (10 bits).
* A clock counter c then runs. It is the coarse ("slow") part, with 4 ns steps.
* Bit i of each word is high while `d <= 8c+i < d+40`. This selection is the
  fine ("fast") part, with eight phases.
* The pulse therefore starts exactly d half-nanoseconds after the reference and
  lasts 20 ns.
* Word c = 0 appears on `os` two clock edges after the edge that samples
  `start`.

The original design first used a 1024-stage register bank per channel, and
later a short slow bank, an 8-element fast bank and some control logic. This RTL
uses a counter in place of the slow bank, which gives the same function with a
handful of flip-flops. Each channel holds one pending pulse, because a test
event has exactly one hit per channel. A new `start` replaces the old one.

### Main control (`pg_control`) and event generator (`rate_gen`)

`rate_gen` issues event strobes in one of two modes:

* `mode=0`: a Bernoulli trial per clock, as above.
* `mode=1`: one event every `period` clocks. 166 667 clocks gives 1.5 kEvents/s.

On an accepted event, `pg_control` runs this sequence:

1. For 16 clocks it presents a fresh 16-bit LFSR word to the sampler each clock,
   and stores what comes back one clock later as the delay of channel 0..15.
2. It pulses `start` for all channels together, so every delay refers to the
   same instant.
3. It holds `evt_window` for 125 clocks (500 ns). The window is delayed so that
   it rises in the clock of the channels' first output word: channel k's pulse
   starts `evt_dly[k] x 0.5 ns` after the window's rising edge.

Requests that arrive during the 143-clock busy period are dropped and counted in
`dropped`.

### Replaying stored patterns

With `src_ext = 1`, step 1 changes: the control does not sample delays. It
takes one stored pattern from the `pat_*` stream instead. A pattern carries a
16-bit hit mask and 16 delays. The stream uses a valid/ready handshake:

* `pat_ready` is high while an event waits for its pattern.
* The pattern is taken in the clock where `pat_valid` and `pat_ready` are both
  high.
* If no pattern is offered yet, the event waits; this is a stall, not a drop.
* The source must keep an offered pattern stable until it is taken. An
  assertion in `pg_control` checks this.

Only channels whose mask bit is set are started. Sampled events use an
all-ones mask, so every channel fires. `hit_mask` shows the mask of the current
event. The stream is meant to be fed from external memory. The memory and its
controller are not part of this RTL.

## Not in this RTL

* **Network link and PC.** Parameters and results cross a hardware TCP/IP stack.
  That stack is third-party IP and is not included. The register bus and the
  pattern generator's configuration inputs are top-level ports instead.
* **DRAM and its controller.** These would hold stored patterns, for example
  for 64 or more channels, and feed the `pat_*` stream. They are not included.
* **Multiphase output stage.** The stage that turns `os` words into 0.5 ns edges
  on the pins, using phase-shifted clocks, is not included.
* **Hit-sum trigger, TDC and scaler of the real DAQ under test.** These are
  outside both engines.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mcp_pkg` | `NDET`, `CLK_HZ`, `SCL_GATE`, `PW_RESET` | 94, 50 MHz, 5 000 000, 30 | detectors, clock, 0.1 s gate, 600 ns pulse |
| `mc_processor` | `NDET_P`, `GATE` | 94, 5 000 000 | at most 121 detectors, because the ALFG gives 127 words per clock |
| `alfg` | `W`, `J`, `K`, `P` | 32, 67, 97, 127 | word width, lags, words per clock |
| `pg_pkg` | `NCH`, `RND_N`, `DLY_M`, `PW_SUB`, `EVT_CYC` | 16, 16, 10, 40, 125 | channels, table address/data bits, pulse and window length |
| `pattern_generator` | `NCH_P`, `EVT_CYC_P` | 16, 125 | channels, event window |

The full array of the experiment has 97 detectors. Set `NDET_P = 97` on
`mc_processor` to model all of them; the top keeps the 94 channels of the
reference hardware.

Synthesis sizes at the defaults (yosys coarse synthesis, whole top): about 3700
word-level cells, 9800 flip-flop bits and one 640 kbit table.

## Simulation

Every module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal --top-module tb_mc_processor \
  -y rtl -y tb rtl/mcp_pkg.sv rtl/pg_pkg.sv tb/tb_mc_processor.sv
obj_dir/Vtb_mc_processor
```

What the tests establish:

* **Unit tests.** These compare every output against an independent reference
  model written in the testbench. Examples: the LFSR is stepped one bit at a
  time, the ALFG is run as a serial sequence, and the scaler, pulse widths and
  sub-sample positions are rebuilt in the testbench. Statistical tests check
  the Bernoulli rate and the sampled mean and sigma.
* **`tb_mc_processor`.** This uses a 3000-clock gate. It checks the sum and the
  levels against the pulses, every scaler result against the level edges, and
  the own-hit rate within 5 sigma. It checks that each injection has exactly
  MULT hits and that reseeding reproduces the same hits.
* **`tb_alpaca_mc_top`.** This runs the top at its default size, with no
  parameter overrides, for one full 0.1 s gate with the 820 Hz example. In the
  same 0.1 s, the pattern generator runs 149 events at 1.5 kEvents/s, followed
  by a Poisson burst that forces dropped requests, and then by 20 replayed
  patterns, some of which stall for their pattern. The run takes about 40 s.

Each testbench's comment header lists which mechanisms it requires to occur.

# Divider-less frequency calibration and lock assist for a 56 GHz sub-sampling PLL

A sub-sampling PLL (SSPLL) has very low noise, but its phase detector can only
hold a frequency it is already close to. It locks to whichever harmonic of the
reference the oscillator happens to be near, and it can fail to lock at all
when that harmonic lies outside its small lock-in range. The usual fix is a
second, divider-based PLL for frequency acquisition. At 56 GHz the divider is
large, hard to design and uses a lot of power.

This RTL is the digital half of a frequency-acquisition loop that needs no
high-speed divider. A slow clock of about 170 MHz samples the 56 GHz
oscillator. Each sample lands at a slightly later point of the reference
period, in the way an equivalent-time sampling oscilloscope works. Over eight
samples the oscillator's phase traces out a pattern, and the pattern tells
which harmonic of the reference the SSPLL is locked to. Three-bit ADCs turn
the samples, and the SSPLL's loop-capacitor voltage, into codes. From those
codes the digital core does four things:

* it steps the 4-bit coarse tuning word of the oscillator until the SSPLL
  locks to the wanted harmonic (64 × 875 MHz = 56 GHz);
* it sweeps the loop capacitor slowly when lock takes too long (lock assist);
* it pulls the capacitor back quickly whenever its voltage leaves the allowed
  range;
* it calibrates out a static phase error of the sampler at start-up.

The analog parts are not in the RTL: the SSPLL, the charge pump, loop filter
and ring oscillator of the auxiliary PLL, the track-and-hold, the ADC
comparators and the capacitor charger. Their digital signals are ports of
`afc_top`, and the testbenches use a behavioural model in their place
(`tb/sspll_model.sv`).

## Clocking: why 8/41 of the reference

The reference is f_ref = 875 MHz (T_ref ≈ 1.143 ns). The AFC clock is chosen
so that consecutive samples are k reference periods plus 1/(N_aux+1) of a
period apart:

    T_clk = T_ref · (k + 1/(N_aux+1)) = T_ref · (1 + k(N_aux+1)) / (N_aux+1)

The design uses N_aux = 7 and k = 5, so T_clk = T_ref · 41/8 and
f_clk = 875 MHz · 8/41 ≈ 170.7 MHz. Every eight AFC clocks, the AFC clock
edge lines up with a reference edge again. At that point f_sync = f_ref/41 ≈
21.3 MHz has its falling edge.

An auxiliary charge-pump PLL makes these clocks:

* `clk_divider #(41)` is REFDIV: it divides the reference and gives f_sync.
* `clk_divider #(8)` is FBDIV: it divides f_clk.
* `pfd` compares the two dividers' **falling** edges, because the falling
  edge of f_sync marks sample 0 of a frame. A divider by 41 cannot have a
  50 % duty cycle, and it does not need one.

In `afc_top` the clock `clk` is an input (the auxiliary VCO is analog), and
the PFD outputs `pfd_up`/`pfd_dn` are outputs.

### Frame alignment (`frame_sync`)

The core must know which sample is sample 0 of a frame. f_sync falls at a
rising edge of `clk`, so it is captured on the *falling* edge of `clk` first.
This gives about half a clock period (≈2.9 ns) of setup margin and of hold
margin. The flop's output then moves into the rising-edge domain. The ADC is
taken to deliver a code one clock after its sample. With that latency, the
code written into the sample memory at the edge where the falling f_sync is
seen is sample 0. `idx` counts 0…7 from there. `frame_end` is high when the
memory's newest sample is sample 7. The aligner re-aligns at every f_sync
edge, and `slip` pulses when that moved the count.

## How eight samples reveal the harmonic

This is the key idea of the design. Suppose the SSPLL is locked at
f_osc = M · f_ref. Sample j of a frame is taken j · T_clk after the aligned
edge, so it sees the oscillator at phase

    M · j · 41/8  (in periods)  ≡  (M mod 8) · j / 8  + φ0     (mod 1)

The pattern of a frame therefore depends only on m = M mod 8. A 10 % tuning
range at 56 GHz spans about ±3.2 harmonics around 64, so m can be read as a
signed state from −3 to +3. State 0 is harmonic 64, the wanted one. Because
the SSPLL is locked, the pattern is the same in every frame. φ0 is a static
phase error of the replica sampler against the SSPLL's own sampler: routing
delay, mismatch and so on.

The ideal patterns are computed in `afc_pkg::pattern_level`. The function
works in half-LSB units of the 3-bit ADC: a level is `7 + 7·sin(2π·phase)`,
rounded, in the range 0…14. ADC code c is compared as 2c+1, the middle of its
input interval. The phase is quantised to 1/16 of a period, which is also
the resolution of the phase correction. Some examples at φ0 = 0, samples
j = 0…7:

| state m | ideal level of samples 0…7 |
|---|---|
| 0 | 7 7 7 7 7 7 7 7 |
| +1 | 7 12 14 12 7 2 0 2 |
| −1 | 7 2 0 2 7 12 14 12 |
| +2 | 7 14 7 0 7 14 7 0 |

### The decoder (`freq_decoder`)

Samples are corrupted by jitter, ADC noise and offsets. The decoder must map
every plausible corrupted pattern onto the right state: a many-to-one
mapping. A table over all 2^48 memory contents cannot be stored, so the
decoder computes the same mapping by searching for the nearest pattern:

* When started at a frame end, it copies the 48-bit memory: 16 samples, the
  current frame and the one before it.
* It then tries one candidate per clock. For each candidate it forms the
  sum of absolute differences between the 16 samples and the candidate's
  ideal levels, and it keeps the smallest. On a tie the first candidate
  wins.
* **Normal mode:** the candidates are the 7 states −3…+3, all at the stored
  phase correction `phase_off`. The result is ready 7 clocks after start.
* **Calibration mode:** the state is known (`CAL_STATE`), and the candidates
  are the 16 phase offsets. The result, the offset, is ready after 16
  clocks.

Two limits come from the patterns themselves, not from the decoder. First,
when φ0 is exactly ¼ or ¾ of a period, the pattern of +m is the same as that
of −m, so the sign cannot be decoded; the decoder then returns the negative
state. The whole loop then steps the coarse word the wrong way and ends at
the edge of the range. So the static phase error must stay clear of a
quarter period. Half a grid step (1/32 period) either side of it was
enough in the tests. Second, state 0 gives a constant pattern that cannot tell φ0 from ½−φ0,
so state 0 can never serve as the calibration state.

## Lock detection, watchdog and lock assist

* **`sample_memory`** is a 48-bit shift register holding the 16 latest
  3-bit codes. `mem[0]` is the newest code and `mem[8]` is the code from the
  same position one frame earlier.
* **`lock_detector`**: in lock, each frame repeats the one before it. At
  every frame end the detector compares the two stored frames sample by
  sample. After `LOCK_FRAMES` (4) equal frames in a row it reports `locked`.
  The first unequal frame drops lock.
* **`watchdog`**: while the state machine waits for lock, it counts the
  clocks in which the newest sample differs from the sample one frame
  earlier. After `LIMIT` (1023) such clocks it raises `timeout`.
* **`charge_control`** drives the four charger switches (`up`, `down`,
  `up_fast`, `down_fast`) from the 3-bit code of the capacitor voltage:
  * When the code is below `VMIN` (1) or above `VMAX` (6), the fast switch
    pulls the voltage back into range, whatever the state machine is doing.
  * When lock assist is on, the slow switches sweep the voltage linearly.
    The direction turns at code 6 going up and at code 1 going down.
    Leaving the range through the fast path also sets the direction. While
    the sweep runs, the SSPLL's frequency moves through the harmonics until
    one falls inside its lock-in range. This is how the lock-in range is
    extended.

## The state machine (`afc_fsm`)

The state machine uses the shared 10-bit counter (`counter10`) for all its
waits. It goes through these states:

```
SYNC ──► WAIT_UNLOCK ──(unlocked, or STEP_WAIT after a coarse step)──► WAIT_LOCK
WAIT_LOCK ──locked──► SETTLE          WAIT_LOCK ──watchdog timeout──► CHARGE
CHARGE ──locked──► SETTLE             SETTLE ──lock lost──► WAIT_LOCK
SETTLE ──SETTLE_CYCLES passed, at a frame end──► DECODE ──result──► WAIT_UNLOCK
```

* **SYNC**: after reset, the machine waits for f_sync and two full frames.
  Then it sets the coarse word to its lowest value for self-calibration.
* **Self-calibration**: this is the first pass through lock, settle and
  decode, at coarse word 0000. The decoder runs in calibration mode and
  looks for the phase offset that makes the pattern match `CAL_STATE` (−3).
  That offset is stored in `phase_off` and used for every later decode.
  The coarse word is then set to the centre, 1000.
* **Coarse search**: each later decode gives the state s. If s = 0, the
  SSPLL is in true lock: `true_lock` goes high and the machine idles in
  WAIT_UNLOCK until the lock detector reports an unlock. Otherwise the word
  becomes `word − s·BANDS_PER_HARMONIC`, clamped to 0…15. With 2 bands per
  harmonic, a state of +1 at the centre word gives 1000 → 0110. The search
  starts at the centre of the oscillator's (roughly normal) spread and moves
  outwards by the decoded distance, rather than bisecting.
* **Settling**: after lock, and in particular after the charger has moved
  the capacitor, the machine waits `SETTLE_CYCLES` (1023 clocks, ≈6 µs)
  before it decodes. While the loop filter settles, the pattern still moves.
* **STEP_WAIT**: after a coarse step the SSPLL may re-lock to a neighbouring
  harmonic without ever looking unlocked. WAIT_UNLOCK therefore returns to
  WAIT_LOCK after `STEP_WAIT` clocks, so the new lock is decoded as well.

With self-calibration switched off (`CAL_EN = 0`), the machine goes through
the reference sequence of this AFC. `tb_lock_sequence` checks that sequence
state by state:

1. wait for lock, charge, settle, decode, at coarse word 1000;
2. wait for unlock, wait for lock, charge, settle, decode, at coarse word
   0110;
3. wait for unlock, idle in true lock.

In the second charge phase the sweep turns at the upper bound, and it locks
on the way down. By default (`CAL_EN = 1`), one calibration pass at word
0000 comes before this sequence.

## Files and hierarchy

```
afc_top                 clocking, ADC encoders, core
├── clk_divider (41)    REFDIV → fsync
├── clk_divider (8)     FBDIV  → fb_div
├── pfd                 falling-edge PFD of the auxiliary PLL
├── wallace_encoder ×2  7 comparator outputs → 3-bit code (ones count)
└── afc_core
    ├── frame_sync      f_sync alignment
    ├── sample_memory   16 × 3-bit samples (48 bits)
    ├── lock_detector
    ├── watchdog
    ├── freq_decoder
    ├── counter10
    ├── afc_fsm
    └── charge_control
afc_pkg                 constants, types (state enum, charger-command struct), pattern_level()
```

`wallace_encoder` counts ones with a four-full-adder tree. A single bubble
in the comparator outputs therefore costs at most one LSB.

`afc_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| ref_clk | in | 1 | 875 MHz reference |
| clk | in | 1 | f_clk from the auxiliary VCO; rising edges line up with fsync's falling edges |
| rst_n | in | 1 | asynchronous, active low, for both domains (drive a falling edge) |
| sample_therm, charge_therm | in | 7 | comparator outputs of the sample and V_cap ADCs |
| fsync, fb_div | out | 1 | divider outputs |
| pfd_up, pfd_dn | out | 1 | to the auxiliary charge pump |
| coarse | out | 4 | coarse tuning word of the 56 GHz oscillator |
| charge_cmd | out | 4 | {up, down, up_fast, down_fast} to the charger |
| state, locked, true_lock, calibrating, phase_off, dec_state, … | out | – | status and observation |

## Choices made here, and how far to trust them

These parts follow the published design closely: the clock ratios (41, 8,
170.7 MHz), N_aux = 7, 3-bit ADCs with a Wallace encoder, the 48-bit memory,
the 10-bit counter, the 4-bit coarse word with centre 1000, the block
partition, the state sequence, the lock assist and the fast-charge
behaviour, and self-calibration at the lowest setting.

The following are choices of this implementation and can be changed:

* **Decoder:** a nearest-pattern search stands in for a stored many-to-one
  table. The phase correction is a common phase offset in 1/16 period.
* **Memory contents:** the 48 bits are read as two frames of 8 samples.
  A frame has N_aux + 1 = 8 samples, because that is how many clocks pass
  before the clock edges line up with the reference again. The pattern could
  also be counted as N_aux = 7 samples (21 bits), leaving out sample 0, which
  sits at the aligned edge.
* **Watchdog counter:** the watchdog has its own 10-bit counter. The shared
  counter is busy with the settle and step-wait times.
* **Lock rule:** lock means 4 equal frames in a row, with exact equality
  (`TOL` = 0). The watchdog limit is 1023 differing samples.
* **Coarse step rule** (`BANDS_PER_HARMONIC` = 2): the real value depends on
  the oscillator's band spacing. Set it to the number of coarse codes per
  875 MHz.
* **Calibration:** `CAL_STATE` = −3 assumes the lowest coarse word locks at
  the lowest harmonic of the range. `CAL_COARSE` = 0.
* **Capacitor voltage limits:** codes 1…6 are allowed, and the sweep starts
  upwards.
* **Timing constants:** `SETTLE_CYCLES`, `STEP_WAIT` and the SYNC wait are
  all 1023 clocks or less. The STEP_WAIT exit from WAIT_UNLOCK is an
  addition.
* **Pipeline:** a one-clock ADC latency is assumed, and f_sync is captured
  on the falling clock edge.
* **PFD:** it compares falling edges. Its reset loop has zero delay in
  simulation; in silicon the AND gate's delay sets the minimum pulse.

Not covered: the analog blocks, any noise or jitter budget (the design
relies on the decoder's margin), and the power and area figures of the
silicon implementation.

## Simulating

Every module in `rtl/` compiles on its own with the package read first, for
example:

```
verilator --lint-only -Wall -Irtl rtl/afc_pkg.sv rtl/afc_top.sv --top-module afc_top
```

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog timer.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/afc_pkg.sv tb/tb_afc_top.sv --top-module tb_afc_top -o sim
./obj_dir/sim            # add +trace to print every state change
```

`tb_afc_top` runs the whole design with every parameter at its default,
against the SSPLL model. The scenario runs about 830 µs of simulated time
and takes under a second:

1. Start-up with the capacitor above range, which triggers fast discharge.
2. Self-calibration, with a watchdog timeout and a slow search.
3. The 1000 → 0110 step to true lock.
4. A frequency drift that unlocks the SSPLL and needs lock assist.
5. A capacitor dip below range, which triggers fast charge.
6. A second drift that makes the sweep turn at the upper bound and step the
   coarse word.

It checks every decoded state against the model's harmonic, every coarse
step, the calibrated phase, the settle time, the f_sync period and the PFD
pulse widths. It also counts each mechanism and fails if one never
happened.

`tb_afc_core` runs the core alone with shorter timing constants and a
different phase error. `tb_phase_sweep` runs 16 copies of the core side
by side, with static phase errors of k/16 + 0.01 period for k = 0…15. It
checks that calibration finds every offset, and that every copy except
k = 4 and 12 (the quarter-period cases) ends in true lock.
`tb_lock_sequence` runs the core with calibration
off and checks the reference state sequence, as described under the state
machine.

The model (`tb/sspll_model.sv`) keeps the oscillator frequency as a harmonic
number:

    x = X0 + (coarse − 8)·BAND + KV·(V_cap − 0.5)

It treats the SSPLL as locked when x is within `LOCKIN` of an integer, and
then it moves V_cap to hold x exactly there. Its numbers (X0 = 64.5, 0.5
harmonic per coarse code, 2 harmonics per volt) are illustrative, not those
of a real oscillator.

# 48-port optical clock distributor: FPGA logic

A single board sends a 125 MHz reference clock, and data alongside it, to up
to 48 optical ports. It also watches the phase of the clock that comes back
from each far end. The board has only a handful of multi-gigabit transceivers,
and those are needed for bulk data. So all 48 ports use the FPGA's ordinary
I/O pins and their 8:1 serializers and 1:8 deserializers:

* **Transmit.** Six serializers, each feeding a 1:8 electrical fanout chip,
  drive 48 SFP transmitters in six groups of eight.
* **Receive.** 48 independent differential inputs receive the returning
  streams.

The logic in this repository does three jobs on those pins:

1. **Sending.** Clocks, data, or a mix of the two go out with a fixed,
   repeatable latency.
2. **Receiving data and measuring phase on one input.** Each plain input pair
   receives serial data and, at the same time, measures the phase of the
   returning stream against the reference with a digital dual-mixer
   time-difference (DDMTD) meter.
3. **Holding the phase steady.** A loop trims a programmable output delay so
   that the phase at the far end does not drift with temperature.

Everything is SystemVerilog-2017 RTL in `rtl/`. There is one self-checking
testbench per block and one end-to-end testbench for the full 48-port top, all
in `tb/`.

## Clocks

| clock        | frequency             | use |
|--------------|-----------------------|-----|
| `clk_125`    | 125 MHz (F)           | serializer words (8 bits = 1 Gb/s), receivers, encoders |
| `clk_156`    | 156.25 MHz            | serializer words of the two 156.25 MHz links |
| `clk_31`     | 31.25 MHz             | the common-edge clock: one edge every 4 × 8 ns = 5 × 6.4 ns |
| `clk_off`    | F − ΔF, e.g. 124.875 MHz | DDMTD sampling clock; ΔF = F/1000 gives a 125 kHz beat |

The clock synthesizer (PLL), serializers, deserializers, output delay lines,
fanout chips and optics are outside the RTL. Their signals are ports of the
top, `clock_distributor_top`.

## Transmit groups (`tx_group_encoder`, `prbs15`)

Each 125 MHz cycle, a group's encoder produces the 8-bit word that its
serializer sends at 1 Gb/s, bit 0 first. The word alone decides what is on
the line, so each group's mode (`cd_pkg::tx_mode_e`) can change on any clock
cycle:

* **Clocks.** 125, 250 or 500 MHz (constant words `0000_1111`, `0011_0011`,
  `0101_0101`).
* **PRBS-15 data.** 1 Gb/s, 500 Mb/s or 250 Mb/s (bits repeated 1, 2 or 4
  times).
* **Duty-cycle modulated 125 MHz clock.** The clock is high for 3/8 or 5/8 of
  the period, carrying 125 Mb/s on the falling edge.
* **"01" frames.** 500 MBd frames `0 1 x y 0 1 ~x ~y`, 16 ns long. Every
  frame has a fixed 125 MHz edge, the two user bits, and then their
  complement. This is what the dual-function receiver expects.
* **Manchester code.** 250 Mb/s user data at 500 MBd (`1` = `10`), XORed with
  the 8-bit framing pattern `0x0F`, one byte every 4 cycles. It is meant for a
  multi-gigabit transceiver at the far end.

Data come from `tx_user_bits` (consumed when `tx_data_take` is high) or from
internal PRBS-15 generators (x^15 + x^14 + 1, seed all ones). The output word
is registered: one cycle of latency.

## Dual-function receiver (`dual_function_rx`)

This is the least obvious part of the design. An ordinary input pin has no
clock recovery, yet it must deliver data and also let the DDMTD logic see a
clean 125 MHz edge. The "01" frame format gives it both. Every 16 ns frame
starts its two halves with `0 1`, which is a fixed rising edge every 8 ns. The
user bits follow, and then their complement, so a frame can be checked on its
own.

**Sampling.** The input deserializer samples at 1 Gb/s, twice per 500 MBd
symbol, and delivers 8 samples per 125 MHz cycle (`samples[0]` oldest). The
receiver keeps the last 32 samples. Once per frame, every two cycles, it
takes three candidate windows, each made of every second sample:

* **Left** starts at `ali_pos`;
* **Center** starts at `ali_pos + 1`;
* **Right** starts at `ali_pos + 2`.

**Scoring.** Each 8-symbol window gets one point per rule it meets, 0 to 6:

* symbols 0 and 4 are `0`;
* symbols 1 and 5 are `1`;
* symbol 2 differs from symbol 6;
* symbol 3 differs from symbol 7.

Each score is also smoothed by a leaky average, `acc += score − acc/8`.

**Tracking.** If the Right average beats the Center one (and is at least the
Left one), `ali_pos` moves one sample right; if the Left one beats the
Center, it moves one sample left. After each move the averages restart from
the new scores and decisions pause for `HOLD_FRAMES` frames. The 16 offsets
span exactly one frame. When a slow drift pushes the offset past 15 it wraps
to 0, which skips one frame; a wrap from 0 to 15 repeats one. This is how the
receiver follows a drifting fibre without a recovered clock. The
end-to-end test slips port 0 by one sample every 4000 samples and sees
exactly one offset move per slip.

**Lock and search.** A window shifted by half a frame reads
`0 1 ~x ~y | 0 1 x' y'`, which spans two frames. It always meets the four
`0`/`1` rules and meets each complement rule half of the time. Its mean score
is 5, which can beat both of its neighbours. A plain hill-climb can therefore
settle there. Two rules
prevent this:

* **Lock rule.** Lock (`rx_aligned`) requires `LOCK_RUN` = 8 consecutive
  frames with a perfect Center score of 6. A half-frame position manages that
  with a probability of about 4^-8.
* **Search mode.** A receiver that has not been locked for `TRACK_FRAMES` =
  32 frames ignores its neighbours. It steps the offset by one sample per
  hold period until the lock rule is met. Once locked, it tracks only through
  the Left/Right comparison.

The result is that the true frame phase is found, and the data polarity is
never in doubt. From reset, lock takes up to about 170 frames (16 offsets ×
about 10 frames per step).

**Output.** Per frame: `rx_valid`, `rx_bits = {y, x}` from the Center window,
`ali_pos`, `ali_change`, and the three scores and averages (`sco_*`,
`sco_avg_*`) for a logic analyzer.

## DDMTD phase monitor (`ddmtd_deglitch`, `ddmtd_phase_meter`)

The reference clock and each returning stream (`rx_serial`) are sampled by
flip-flops clocked at `clk_off` = F − ΔF. The sampled signal is a slow beat at
ΔF. Its edge moves by one `clk_off` cycle for every T·ΔF/(F − ΔF) of real
phase, which is 8 ps with ΔF = F/1000.

**Deglitcher.** When the stream carries data, the beat signal oscillates near
its edges. The deglitcher therefore emits one `tag` only when its `N_ONES`
newest samples are all 1 and its `N_ZEROS` older ones are all 0 (4 and 4). It
is an AND gate with inverted older inputs, with a 6-cycle delay from the
first high sample to the tag as seen by a registered monitor. An edge so
noisy that no run of four zeros precedes four ones gives no tag; that beat is
simply skipped.

**Phase meter.** A counter restarts at each reference tag. Each echo tag
latches its value into `echo_phase`, the number of `clk_off` cycles from the
reference edge to the echo edge. With the offset clock below F, a later echo
reads as a larger count: an echo delayed by D gives about D/8 ps counts, in
0..999. The 16-bit counter saturates if reference tags stop. One
measurement per beat is 125 kHz.

Measuring the phase modulo one 8 ns period is enough, so a 150 m loop-back
fibre (about 750 ns) is no problem.

## Output delay regulation (`phase_corrector`)

Each group's serializer is followed by a tap delay line: 512 taps, up to
three cascaded, so taps 0..1535. Without regulation, the returning phase
moves by about 1.2 ns over a 30 °C swing.

`phase_corrector` (one per group, in the `clk_off` domain) takes the echo
phase of one port chosen by `reg_port_sel`. It works as follows:

1. It averages 2^`AVG_LOG2` = 16 measurements.
2. It compares the mean with `reg_setpoint`.
3. If the error exceeds `DEADBAND` = 1 count, it moves the tap by one step
   against the error (phase too large means one tap less) and pulses
   `dly_tap_load`.

The tap starts at mid-range (767) so the loop can correct either way. That
is about ±1.9 ns at the primitive's roughly 2.5 ps per tap, which covers the
1.2 ns drift.

## Fixed-latency links at 156.25 MHz

The ordinary-I/O serializer on this FPGA family only does 2:1, 4:1 and 8:1.
So 10-bit and 5-bit symbols made at 125 MHz pass through a gear box into
8-bit and 4-bit words at 156.25 MHz.

**`cycle_tagger`.** It numbers the cycles of both clocks from the same common
edge:

* A 31.25 MHz clock (their greatest common divisor) is divided by two into a
  toggle.
* Each domain samples the toggle in two flip-flops and detects its rising
  edge with an AND of the first flip-flop and the inverted second.
* That edge sets the domain's counter (mod 4 at 125 MHz, mod 5 at
  156.25 MHz) to `SET_VALUE` = 2, which accounts for the two flip-flops. Both
  counters then read 0 in the cycle that starts at a common edge.

**`gearbox`.** Register A (40 bits) shifts in one 10-bit symbol per 125 MHz
cycle. Register B shifts 8 bits out per 156.25 MHz cycle and loads all 40 bits
from A at the common edge, 31.25 times per µs. Both registers change only on
the common-edge grid, so the latency is the same after every reset. The
testbenches measure it identically across two resets taken at different
points of the grid. The same module, with 5-bit in and 4-bit out, serves the
duty-cycle link.

**`link8b10b_tx`.** This is the 1.25 GBd link: `msg_gen` → `enc8b10b` →
`gearbox`.

* **Idle.** The line sends K28.1 commas.
* **Messages.** Every `MSG_PERIOD` = 20 symbols, it sends K28.0 and then the
  32-bit value of a free-running 125 MHz counter, latched at that K28.0, as
  four data bytes, most significant first.
* **Encoder.** `enc8b10b` is a registered encoder with running disparity.
  It holds the standard tables, supports K28.y only, and puts bit `a` on the
  line first.

**`dcm_link_tx`.** This is the 625 MBd duty-cycle-modulated link,
`dcm_scrambler` → `dcm_encoder` → `gearbox(5→4)`:

* Every 8 ns, two data bits become `0 1` plus a 3-bit thermometer code.
* The line therefore stays a 125 MHz clock with a fixed rising edge and a
  20/40/60/80 % duty cycle, carrying 250 Mb/s.
* A receiver recovers the clock with an ordinary PLL.

Left alone, steady data would move the mean level of the line. So the data
are scrambled first, with a self-synchronizing x^15 + x^14 + 1 scrambler:

* It computes `s[n] = d[n] ^ s[n-14] ^ s[n-15]`, two bits per cycle, with
  `d[0]` first.
* The receiver computes `d[n] = s[n] ^ s[n-14] ^ s[n-15]` from the received
  bits alone. It falls into step after 15 bits with no frame marker.
* The history resets to all ones, so idle (all-zero) input still gives a
  balanced, pseudo-random stream.

## Manchester link into a multi-gigabit receiver (`gtp_align_ctrl`)

This block runs at the far end, in a receiver FPGA whose transceiver runs at
500 MBd with a 16-bit interface and a 31.25 MHz recovered clock. That clock
comes up at one of 16 phase offsets, so the byte boundary is unknown. The
link does not use commas. Instead, the controller resets the transceiver
until the offset is the right one:

* While the sender is idle, a correctly aligned word decodes to the framing
  pattern, with every Manchester pair valid.
* `CHECK_WORDS` = 16 such words in a row mean the link is aligned.
* Any mismatch pulses `gtp_reset` and starts another trial.

Each trial succeeds with probability 1/16, so about 16 trials are needed on
average. `trials` counts
the attempts. Once aligned, `rx_byte` = decoded ^ pattern. An invalid pair
restarts alignment.

## Top level (`clock_distributor_top`)

The top contains:

* `N_GROUPS` = 6 transmit encoders and 6 regulation loops;
* `N_RX` = 48 receivers, 48 echo deglitchers and phase meters, plus one
  deglitcher for the reference;
* the cycle tagger, both 156.25 MHz links, and the GTP-side aligner (placed
  here so that one simulation covers the whole system).

All ports are plain signals or unpacked arrays. They are:

* **Transmit:** `tx_mode`, `tx_use_prbs`, `tx_user_bits`, `tx_data_take`,
  `tx_ser_word`.
* **Regulation:** `reg_enable`, `reg_setpoint`, `reg_port_sel`, `dly_tap`,
  `dly_tap_load`.
* **Receive:** `rx_samples`, `rx_serial`, `rx_valid`, `rx_bits`,
  `rx_aligned`, `rx_ali_pos`, `echo_phase`, `echo_phase_valid`.
* **156.25 MHz links:** `cycles_125`, `cycles_156`, `tagger_locked`,
  `k_msg_start`, `k_ser_word`, `dcm_d`, `dcm_ser_word`.
* **GTP side:** `gtp_clk`, `gtp_rx_word`, `gtp_reset_done`, `gtp_reset`,
  `gtp_aligned`, `gtp_trials`, `gtp_rx_byte`, `gtp_rx_valid`.

## Where this RTL departs from, or adds to, the original design

* **Correction loop.** It was software on an embedded processor; here it is
  logic (`phase_corrector`). The averaging, dead band, one-tap step and
  mid-range start are choices made here.
* **Offset clock.** It is taken as F − ΔF. One drawing of the original shows
  F + ΔF. With F + ΔF the phase count runs the other way, and the corrector's
  direction would have to be swapped.
* **Receiver decision rules.** The scoring rules, averaging, hold time, the
  perfect-run lock rule and the search mode are this design's. The original
  gives the Left/Center/Right structure, the 32-sample history and the
  signal widths.
* **Duty-cycle link rate.** The link runs at 625 MBd (5 symbols per 8 ns).
  The original only asks for a scrambler. The self-synchronizing type and
  its polynomial are chosen here.
* **Values not given originally:**
  * the Manchester framing pattern (`0x0F`) and polarity;
  * the duty cycles of the modulated-clock transmit mode (3/8 and 5/8);
  * the deglitcher length (4 + 4);
  * the message period (20 symbols);
  * the GTP check length (16 words).

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`, and each has a watchdog. They run with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cd_pkg.sv tb/tb_clock_distributor_top.sv --top-module tb_clock_distributor_top
./obj_dir/Vtb_clock_distributor_top
```

`tb_clock_distributor_top` runs the top at full size with no parameter
overrides, about 0.8 ms of simulated time in about 20 s. It connects models
of the outside world:

* each group's serializer words loop back into its eight receivers with
  port-specific delays, and port 0 slowly slips;
* echo clocks are delayed per port, and port 0's delay follows the regulation
  tap;
* a transceiver model lands on a random offset after each reset.

It checks all ten transmit modes, receiver lock and data, offset moves and
wraps, every DDMTD phase, convergence of the regulation loop, cycle-tagger
lock, 8B/10B messages and commas, duty-cycle link symbols, and transceiver
alignment.

The block testbenches (`tb_<block>`) check each module against values
computed independently:

* `tb_prbs15` checks against a reference LFSR;
* `tb_link8b10b_tx` decodes with the standard code tables;
* `tb_gearbox` and the two link testbenches measure latency across resets;
* `tb_dcm_scrambler` checks the scrambler against a bit-serial reference,
  checks that a descrambler started mid-stream recovers the data, and checks
  the balance of the idle stream;
* `tb_gtp_align_ctrl` measures the mean trial count over 300 alignments.

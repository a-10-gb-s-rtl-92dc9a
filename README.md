# 10-Gb/s data-deskew clock and data recovery

Most clock and data recovery (CDR) circuits move a clock until it samples the
incoming data in the middle of each bit. This design works the other way
round. The receive clock is fixed and shared by every channel: eight 2.5-GHz
phases spaced 50 ps apart. Each channel instead puts its **data** through a
digitally controlled delay line (DCDL). The loop lengthens or shortens that
delay until the centre of every bit lines up with an even clock phase.

No clock is tuned, so there is no oscillator in the loop and no loop filter to
stabilise. The loop is first order and cannot ring. The price is a finite
delay range. The line can only absorb as much phase drift as it has delay
steps, so the design targets short bursts:

| Item | Value |
|---|---|
| Burst length | 1200 bits, including a 176-bit preamble |
| Frequency tolerance | ±500 ppm |
| Allowed TX/RX phase wander | 0.4 UI within a burst |

The repository holds three things:
- the CDR loop (`deskew_cdr`);
- the blocks of a test chip around it (`transceiver_chip`);
- a self-checking Verilator testbench for every block.

The delay line and the 10-Gb/s output driver are analog circuits in silicon.
Here they are behavioural models with delays. Everything else is
synthesizable RTL.

## Timing picture

- One bit (1 UI) is 100 ps.
- The clocks are quarter rate: each P<n> has a 400-ps period, and P<n> rises
  50·n ps after P<0>. In one P<0> period the eight rising edges therefore
  land alternately on four bit centres (even n) and four bit edges (odd n).
- Ck = P<0> clocks nearly all of the logic. Ckb = P<4> clocks one pipeline
  register in the confidence counter.
- Once the loop is locked, even phase 2j samples bit j of the word and odd
  phase 2j+1 samples the boundary between bit j and bit j+1.

The whole loop is: DCDL → 8 samplers → 4 phase detectors → confidence
counter → phase FSM → DCDL control code. Each stage is described below, in
loop order.

## The delay line (`dcdl`, behavioural)

### Structure
- A pre-amplifier (modelled as `PREAMP_PS` = 30 ps).
- A chain of eight equal cells (`CELL_PS` = 24 ps). Taps d<0..7> are taken
  after each cell.
- Two 4:1 multiplexers: one picks an even tap, the other an odd tap.
- An interpolator blends the two selected taps in quarter steps.

### Control
- Coarse control C<0:7> always enables exactly two adjacent taps, one even
  and one odd. Moving the coarse position by one changes only one of the
  two selected taps. The other tap stays put, so the output never jumps.
- Fine control F<0:3> is a thermometer code. Each set bit moves the output
  edge a quarter of a cell from the even tap towards the odd tap.

### The subtle point: which way the fine code counts
At coarse position k = 0, 2, 4 … the odd tap is the later one, so adding
fine bits adds delay. At k = 1, 3, 5 … the even tap is the later one, so
adding fine bits *removes* delay. For the delay to rise with the code, the
thermometer must therefore fill up on even coarse positions and drain on odd
ones. `fsm_decoder` does exactly that:

```
e_k = (S<4:2> == k),  C_k = e_(k-1) | e_k
F3 = S2
F2 = S2 ^ (S1 & S0)
F1 = S2 ^ S1
F0 = ~S2 ^ (~S1 & ~S0)
```

### Resulting delay
The result is 28 legal codes (0..27), each one step of `CELL_PS/4` = 6 ps
apart:

    delay = PREAMP_PS + CELL_PS * (1 + code/4)   = 54 + 6*code ps   (54 … 216 ps)

The tuning range is 27 × 6 = 162 ps. The specification asks for 1.4 UI:
- 1 UI to cancel an arbitrary static phase offset;
- 0.4 UI to follow frequency error during a burst.

### How the model works
Each cell is a continuous assignment with a delay. Every individual delay is
shorter than a bit, so simulation never swallows a data pulse. An illegal
coarse pattern makes the output hold its value. `delay_ps` reports the
present delay for observation only.

## Phase detectors (`phase_detector`)

### Samplers
Eight flip-flops sample the delayed data on P<0..7>, giving Q<0..7>. Four
quarter-rate Alexander (bang-bang) detectors each look at three consecutive
samples: a = centre of bit j, b = the edge after it, c = centre of bit j+1.

    Lead_j = a ^ b    (the edge was already passed: data early, add delay)
    Lag_j  = b ^ c    (the edge not reached yet: data late, remove delay)

### Special cases
- No transition (a = c): neither flag is set.
- An isolated pattern 010 or 101 sets both flags. This is a false event. The
  majority vote later cancels it, because it adds one to each count.

### Partial retiming
The samples do not arrive at the same time. Q<0..4> are therefore
re-registered on P<0> (Qr<0..4>). Q<5..7> and the next cycle's Q<0> are used
directly, because they are already stable when the XORs are evaluated. This
keeps the pipeline short, which matters for the loop-latency budget below.

`retiming_stage` takes the even samples Q0, Q2, Q4 and Q6 into two P<0>
registers. It delivers the recovered word D<0:3> with D<0> as the earliest
bit.

## Confidence counter (`confidence_counter`)

This block is the digital loop filter. It decides *when* to move the delay
line, not by how much.

1. **Encoders** (`cc_encoder`). The four Lead flags become a 3-bit count
   B = 0..4. The four Lag flags become a count A. These counts are
   registered on Ckb.
2. **Majority vote** (`cc_comparator`).
   - It forms B − A as B + ~A + 1 with carry look-ahead.
   - Equal counts give no vote.
   - A positive difference votes Lead; a negative one votes Lag.
   - The decision is per quarter-rate word, so one vote stands for four
     bits.
3. **Accumulator** (`cc_accumulator`).
   - It is a toggle-flip-flop up/down counter holding −5..+5.
   - A Lead vote in state +5 overflows. It pulses `lead_cc` for one Ck cycle
     and resets the counter to 0 in the same edge (dynamic reset). A Lag vote
     in −5 does the same with `lag_cc`.
   - So six more votes in one direction than the other are needed for a
     step. That is 24 bits of evidence, the design's "counter size"
     N = 24 (`LIMIT` = 6).

The value of N is a compromise:
- A large N averages out jitter and false events.
- A small N reacts faster to frequency error and shortens acquisition.
- The loop must also finish one decision before the next can start. The
  pipeline from the earliest sample to a changed DCDL code takes about three
  Ck cycles (≈1.2 ns) plus the line's own delay. That is inside the 2.4 ns
  that N = 24 allows.

## Phase FSM (`phase_fsm`, `fsm_decoder`)

- A 5-bit up/down counter S<0:4> holds the delay code.
- `lead_cc` adds one 6-ps step and `lag_cc` removes one.
- Reset loads code 14, the middle of the range, so the loop can move either
  way after a burst starts.
- At code 27 a further `lead_cc` changes nothing. The same holds for a
  further `lag_cc` at code 0. Either request raises `over_flag` for one cycle
  instead of wrapping round. A wrap would throw the data phase by the whole
  range.
- The decoder described above turns S into C<0:7> and F<0:3>.

## Loop behaviour and what fits

The step is 6 ps and a step needs at least 24 bits, so the loop slews by at
most 6 ps per 2.4 ns (2500 ppm). In practice it slews more slowly, because
not every bit has a transition.

| Case | Requirement | Result |
|---|---|---|
| Acquisition of an average 25-ps offset | 25/6 steps × 2.4 ns ÷ (15/16) ≈ 107 bits; worst case ≈ 213 bits; preamble is 176 bits | Simulation locks in 160–260 bits from a random start |
| ±500 ppm over a 1200-bit burst | 60 ps of drift | Fits within the 78 ps up / 84 ps down available from the initial code, if lock is reached near the centre |
| 1000 ppm total over 1300 bits | 130 ps | Does not fit: the line saturates after roughly 780 bits (816 in simulation) and `over_flag` shows it. This is the intended overflow behaviour. |
| Post-layout results of the original circuit: 1.55 UI range, 5.76-ps average step | 155 ps over 27 steps | These RTL defaults give 162 ps and 6 ps, the design targets |
| Running the chip at 12 Gb/s | 1.4 UI = 117 ps | Fits in 162 ps; the clocks follow the input clock, so the logic has no rate constant (not simulated) |
| Running the chip at 8 Gb/s | 1.4 UI = 175 ps | Does not fit: 162 ps is only 1.3 UI at that rate (not simulated) |

### Several channels

Several channels can share one set of P<0:7>. Each channel has its own delay
line, so each one locks to the nearest bit boundary. Two channels whose skew
differs by a whole bit then deliver words shifted by one bit position
relative to each other. Re-arranging words across channels is left to the
logic that uses the recovered data.

## Test chip (`transceiver_chip`)

The chip exercises one CDR from a tester that supplies a 10-GHz clock and
10-Gb/s data.

- **`clock_generator`**
  - A two-stage Johnson counter of master-slave flip-flops divides 10 GHz by
    four.
  - The slave outputs give P<0,2,4,6>. The master latches, half a 10-GHz
    cycle earlier, give the odd phases.
  - It has no reset: a two-stage Johnson counter falls into its single
    4-state cycle from any start state.
- **`serializer`**
  - A word D<0:3> taken on P<0> leaves as four 100-ps slots, 100 to 400 ps
    later.
  - All bits are first registered on P<0>. D<2> and D<3> get an extra half
    cycle in a falling-edge latch (the "1.5-cycle delay").
  - Two 2.5-GHz 2:1 muxes feed a final 2:1 mux clocked at 5 GHz (P<0> ^ P<2>).
- **`control_registers`**
  - Five pads Ct<0:4> are shared by two 5-bit registers. Register A holds the
    delay code of a second, stand-alone delay line (DCDL_T). Register B holds
    the output-buffer pre-emphasis.
  - Loading happens once every 512 Ck cycles. `bypass` = 1 loads A and
    `bypass` = 0 loads B.
- **`output_buffer`** (behavioural)
  - A main driver plus binary-weighted tri-state cells that drive the
    inverted previous bit, which is two-tap pre-emphasis.
  - `level = 64·s(now) − strength·s(previous)` with s = ±1. Transitions
    overshoot by 2·strength units.
- **Modes**
  - *Nominal* (`bypass` = 0): di → CDR → serializer → output buffer.
  - *Bypass* (`bypass` = 1): di → DCDL_T (code from register A) → output
    buffer. The tester can then step through all 28 delays and measure them.
  - *Debug* is always active. `dbg[0]` = `lead_cc`. `dbg[1]` = `lag_cc`, or
    the recovered bit D<0> when Ct<0> = 1.

`to_level` exposes the output amplitude.

The analog pad drivers for the debug outputs, the clock buffer that
distributes P<0:7>, and the TX/RX PLLs of a real link are not modelled. The
testbench drives the clocks directly.

## Files

| File | Contents |
|---|---|
| `rtl/cdr_pkg.sv` | Constants, the `vote_e` enum and the `dcdl_ctrl_t` struct (C<7:0>, F<3:0>) |
| `rtl/dcdl.sv` | Delay line, behavioural |
| `rtl/phase_detector.sv` | Phase detectors |
| `rtl/retiming_stage.sv` | Retiming stage |
| `rtl/cc_encoder.sv`, `rtl/cc_comparator.sv`, `rtl/cc_accumulator.sv`, `rtl/confidence_counter.sv` | Confidence counter |
| `rtl/phase_fsm.sv`, `rtl/fsm_decoder.sv` | Phase FSM and code decoder |
| `rtl/deskew_cdr.sv` | The closed loop |
| `rtl/clock_generator.sv`, `rtl/serializer.sv`, `rtl/control_registers.sv`, `rtl/output_buffer.sv` | Test-chip blocks |
| `rtl/transceiver_chip.sv` | Top |
| `tb/tb_<module>.sv` | One self-checking testbench per module |
| `tb/tb_cdr_workloads.sv` | The specified frequency-error, overflow, loop-latency and noise cases, run on `deskew_cdr` |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Verilator 5 with timing support is needed (the data path uses real
picosecond delays). For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/cdr_pkg.sv \
          tb/tb_transceiver_chip.sv --top-module tb_transceiver_chip -Mdir obj
./obj/Vtb_transceiver_chip +verilator+rand+reset+2
```

Replace the testbench name to run any other block.

### `tb_deskew_cdr`
The testbench acts as PLL and transmitter. It sends PRBS-31 data with a
chosen phase, frequency offset and random jitter. It runs four bursts:
- 0 ppm;
- +500 ppm;
- −500 ppm with 20 ps of jitter;
- +3000 ppm to force the line to its end.

It checks acquisition, error-free recovered words and overflow.

### `tb_cdr_workloads`
This testbench starts every burst already at the lock point of code 14, so
each later step is pure frequency tracking. It runs these cases:

| Case | Expected net steps | Measured |
|---|---|---|
| 600 bits at 0 ppm | 0 | 0 |
| 600 bits at +300 ppm | 3 (18 ps) | 2 |
| 600 bits at +500 ppm | 5 (30 ps) | 5 |

The pass band is ±1 step, since the loop dithers by one step around lock.

A fourth case runs 1300 bits at +1000 ppm. That needs 130 ps, but only 78 ps
is left above the initial code. `over_flag` first rises at about bit 816,
and Lead requests keep arriving while the code is held at 27.

A fifth case feeds a 1010… pattern, in which every bit boundary is an edge.
A loop that decides within N = 24 bit times settles into strictly
alternating steps: Lead, Lag, Lead, Lag. A slower loop would show runs
such as Lead, Lead, Lag, Lag. The testbench requires every step after
acquisition to reverse the previous one.
With twelve extra Ck cycles (4.8 ns) inserted between the accumulator and
the FSM, the same input gives runs of equal steps, and the check fails.

The last two cases repeat the average acquisition case: a 24-ps offset,
four steps from the initial code. They run once without input jitter and
once with 0.2 UI (20 ps) of peak-to-peak random jitter.
- Both come within one step of lock after about 80 bits.
- Both recover the data without errors.
- With jitter the loop steps less often at lock: 7 steps against 20.

### `tb_transceiver_chip`
This testbench runs the top at its default parameters. It checks:
- nominal-mode loop-back of 6000 bits with no errors;
- pre-emphasis levels;
- the debug mux;
- an overflow burst;
- bypass delays for codes 0, 13 and 27 (54, 132 and 216 ps).

It counts each mechanism and fails if any never happened: lead/lag steps,
false events, coarse tap moves, overflow, register loads, bypass and debug
selection. It simulates about 2 µs in well under a second.

## Where this RTL makes its own choices

These points are not fixed by the original design description. They are
choices made here, or a reading of it.

- **Cell and pre-amplifier delays.** The cell delay of 24 ps follows from
  the 6-ps resolution target, and gives 162 ps of range rather than exactly
  140 ps. The 30-ps pre-amplifier delay is a free choice. In silicon, both
  depend on layout and supply.
- **Fine-code equations.** The F equations and the 28-entry code table were
  rebuilt from the coarse/fine principle so that the delay is monotonic. The
  initial code 14 is the middle of that table.
- **Saturation.** The FSM saturates at the ends and reports `over_flag`. The
  original only says the line stops being tunable after overflow.
- **Ck and Ckb.** Ck = P<0> and Ckb = P<4>. The Ckb register placement in the
  confidence counter was chosen to fit the loop-latency budget.
- **Accumulator encoding.** The accumulator uses two's-complement state
  encoding. The overflow outputs are registered pulses.
- **Control registers.**
  - The divide-by-512 "slow clock" is a load enable on Ck, not a separate
    clock.
  - Reset clears both registers.
  - Which register `bypass` selects was read from the measurement procedure:
    B is set at `bypass` = 0 and A at `bypass` = 1.
- **Serializer.** The slot order (D<0> first), the 5-GHz select P<0> ^ P<2>,
  and the latch polarities are choices.
- **Debug output.** D<0> was chosen as the debug data lane.
- **DCDL_T input.** DCDL_T takes the same input pin as the CDR.
- **Clock generator.** The odd phases are taken from the master latches.
- **Behavioural models.** Both models are single-ended logic with ideal
  delays. Jitter, ISI and amplitude effects of the real delay line and
  driver are not represented, except the output buffer's two-tap level.

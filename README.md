# TDC64: a 64-phase counter time-to-digital converter

A plain counter measures the time between a start and a stop event in whole
clock periods. Whatever falls between the last clock edge and an event is
lost, so a 500 MHz counter resolves 2 ns. This design keeps the counter
but runs 64 of them. Each counter is clocked by its own copy of the 500 MHz
clock, and the copies are spaced 31.25 ps apart. Within one 2 ns period the
64 clocks together rise at 64 evenly spaced instants. The sum of all
counters is therefore the number of 31.25 ps steps that fit into the
interval:

    resolution = clock period / number of phases = 2000 ps / 64 = 31.25 ps

A 300 ns interval gives 150 counts in every counter and 64 x 150 = 9600 in
total. The reference simulation checks exactly this.

The design is written in SystemVerilog. The two parts that only exist as
fabric delays, the ring oscillator and the delay-line clock tree, are
behavioural models with the same ports. Everything else is synthesizable.

## Signal flow

```
 pulse_a ─┐
          DT (XOR) ── delta_interval (TM) ──────────────┐
 pulse_b ─┘                                              │ count enable
                                                         v
 reset, enable ─> CG ring oscillator ─ clk ─> MPC ─ clk_ph[63:0] ─> CS: 64 x 8-bit counters
                  (500 MHz)            │      (31.25 ps steps)          │ count[63:0]
                                       │                                v
                                       │                            AC: sum ── inst_soma
                                       │                                │
 pulse_b ─> SP: sync + edge ─ sample_ena ─────────────────────────> DV: hold ── end_soma
                                       │                                ^
                                       └── clk ─────────────────────────┘
 rst_sync ─> clears counters and end_soma
```

| Block | Module | What it does |
|---|---|---|
| DT, delta time | `tdc_delta_time` | `tm = pulse_a ^ pulse_b`: high from the start edge to the stop edge |
| CG, clock generator | `tdc_clock_gen` | Gated ring of three D-latches and one inverter with 1000 ps delay: 500 MHz *(behavioural)* |
| MPC, multi-phase clock | `tdc_multiphase_clock` | 64 clocks, phase k delayed by k x 31.25 ps *(behavioural)* |
| CS, counter set | `tdc_counter_set`, `tdc_phase_counter` | 64 independent 8-bit counters, counter k on phase k, all enabled by TM |
| AC, adder counter | `tdc_adder_counter` | Combinational sum of the 64 counts, 15 bits |
| SP, single pulse | `tdc_single_pulse` | One clk-cycle `sample_ena` after the stop edge |
| DV, D-latch vector | `tdc_dlatch_vector` | Holds the sum as `end_soma` when `sample_ena` is high |
| top | `tdc64` | Wires the blocks together and controls the counter clear |

Shared sizes are in `tdc64_pkg`: `N_PHASES = 64`, `CNT_W = 8`, `SUM_W = 15`,
`CLK_PERIOD = 2000.0` ps.

## How a measurement works

1. `pulse_a` rises. The XOR opens the window, and every counter starts
   adding one on each rising edge of its own phase clock.
2. `pulse_b` rises. The window closes and the counters stop. Counter k now
   holds the number of phase-k edges inside the window. Across all k, that
   is the number of instants `t_ref + j x 31.25 ps` inside the window.
3. `inst_soma`, the combinational sum, settles.
4. `pulse_b` passes a two-flop synchroniser in the `clk` domain. On the 2nd
   or 3rd clk edge after the stop, `sample_ena` is high for one cycle.
5. On the next clk edge `end_soma` takes `inst_soma`. The result is ready
   about 6 to 8 ns after the stop.
6. Two cycles later the counters are cleared automatically. The clear is
   held for two reference periods, so every one of the 64 clock domains sees
   it on one of its own edges. `end_soma` keeps the result.

The window is sampled asynchronously on purpose: the measurement *is* the
sampling of TM by 64 offset clocks. In silicon, a counter whose edge lands
on a TM transition may resolve either way. This is the ±1 LSB quantisation
of the converter, not an error. In simulation the delays are exact, so an
edge that ties exactly with a pulse edge depends on event order. The
testbenches place pulses a few femtoseconds off the edge grid.

### Rules for the user

- **Range.** Each counter is 8 bits and wraps without a flag, so intervals
  must be shorter than 256 x 2 ns = 512 ns. The 15-bit sum would hold more.
  The 15-bit width matches the result bus of the original hardware build.
- **Trailing window.** An XOR is also high between the *falling* edges when
  the pulses fall one after the other, as two delayed square waves do. Those
  counts are neither sampled nor cleared automatically. Before the next
  start, either lower both pulses together or pulse `rst_sync` after both
  have fallen. `rst_sync` clears the held result as well.
- **Restart of the oscillator.** Lowering `enable` freezes the ring, and
  raising it restarts the ring at once. The phase relation to the old clock
  is lost, which is harmless because all 64 phases derive from the new one.

## The clock tree: the part that makes the resolution

`tdc_clock_gen` models the gated ring oscillator. It has three transparent
latches in series, each with an active-low asynchronous reset and an
active-high gate. The ring is closed through one inverter with a 1000 ps
delay. The latches have zero delay in the model, so each level lasts
exactly 1000 ps and the output is 500 MHz. In reset all latches hold 0 and
the inverter output is 1, so the first rising edge comes as soon as reset is
released. Synthesis tools report this block as a combinational loop through
latches. That loop is the oscillator.

`tdc_multiphase_clock` builds the 64 phases as follows:

- CLK0 is the oscillator output.
- CLK32 is CLK0 inverted (180 degrees).
- CLK1 to CLK31 are CLK0 delayed by k x 31.25 ps.
- CLK33 to CLK63 are CLK32 delayed by (k − 32) x 31.25 ps.

No delay is longer than half a period. The step is 5.625 degrees. On an FPGA
these delays come from hand-placed buffers tuned to the target frequency.
The model uses transport delays, which a synthesis tool ignores. A
synthesized netlist of this block therefore shows only CLK0 and its
inverse. To port the design, replace this module with the target's tuned
delay chain, or with PLL/DLL phase outputs, and keep the same port list.

To scale the design, change `N_PHASES` in `tdc64_pkg`. The MPC, CS and AC
blocks follow, and the step becomes `CLK_PERIOD / N_PHASES`. Keep
`SUM_W >= log2(N_PHASES x 255 + 1)`.

## Where this RTL makes its own choices

The published design names these blocks and their connections, but does not
specify their insides:

- **SP.** The pulse generator is a two-flop synchroniser followed by a
  rising-edge detector. Only the rising edge of `pulse_b` triggers it.
- **DV.** The result register is built from enabled flip-flops on `clk`,
  not level-sensitive latches, because the block is drawn with a clock input.
- **AC.** The adder is a purely combinational sum. Synthesis turns it into an
  adder tree.
- **Counter clear.** The automatic clear two cycles after a capture, and the
  two-period stretching of both clears, are added here. The original design
  shows the counters returning to 0 once the result is held, but does not
  say how.
- **Resets.** `reset` is active low and asynchronous for the oscillator and
  all flops. `rst_sync` is active high and synchronous.
- **Overflow.** There is no overflow flag and no saturation.

After synthesis there are 534 flip-flops: 512 counter bits, 15 result bits,
3 synchroniser bits and 4 clear-control bits. This is close to the 528
registers reported for the original FPGA build.

What the original work measured on hardware is not modelled here. That
includes noise on the input pulses, DNL and INL from unequal buffer delays,
and the host processor that read out 1450 samples per run.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The expected values are computed
independently of the RTL.

| Testbench | What it checks |
|---|---|
| `tb_tdc64` | End to end at default sizes. Checks the oscillator period; 300 ns → 9600; all 21 intervals from 290 to 310 ns in 1 ns steps, with random sub-LSB offsets, each matched exactly against the count of 31.25 ps instants inside the window; stop-to-`sample_ena` latency of 2–3 cycles; automatic clear; the `rst_sync` clear after a trailing window; oscillator gating by `enable`. It fails if any of these mechanisms never occurred. |
| `tb_tdc64_repeat` | Repeated start/stop pairs shaped like a delayed square-wave generator. A host model pulses `rst_sync` after each pair. The stop has random sub-LSB jitter. Checks every sample and the mean against 300 ns / 31.25 ps. |
| `tb_tdc_delta_time` | XOR truth table and the start/stop sequence |
| `tb_tdc_clock_gen` | Low in reset, 1000 ps high / 2000 ps period, no edges while disabled |
| `tb_tdc_multiphase_clock` | Every phase k rises k x 31.25 ps after CLK0, with 50 % duty |
| `tb_tdc_counter_set` | Each counter against an edge count of its own phase; clear; hold with TM low; wrap at 256 |
| `tb_tdc_adder_counter` | Corner sums (0, 9600, 16320) and random vectors |
| `tb_tdc_single_pulse` | Exactly one cycle, on the 2nd or 3rd edge; no pulse on the falling edge |
| `tb_tdc_dlatch_vector` | Capture, hold, synchronous and asynchronous clear |

The testbenches need Verilator 5 with timing support. Time is in
picoseconds with femtosecond precision, so that 31.25 ps is exact. For
example:

```
verilator --binary --timing --assert -y rtl rtl/tdc64_pkg.sv tb/tb_tdc64.sv \
          --top-module tb_tdc64 -o sim
./obj_dir/sim
```

Each run takes under a second, except `tb_tdc64_repeat` (about 10 s). Lint with
`verilator --lint-only -Wall --timing -y rtl rtl/tdc64_pkg.sv rtl/<module>.sv`.

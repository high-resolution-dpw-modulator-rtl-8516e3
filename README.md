# High-resolution DPWM from four clock phases

A digital pulse-width modulator built from a counter and a comparator has a
time resolution of one clock period. Making the steps finer that way needs a
faster clock. This design gets a resolution of a quarter of the clock period
at the normal clock rate. It uses the four quadrant outputs of an FPGA clock
manager (DCM): CLK0, CLK90, CLK180 and CLK270. Every storage element is a
flip-flop on one of these clocks, except the output latch. There is no delay
line and no asynchronous logic that builds the reset.

The duty command `dc[M:0]` (13 bits at the default `M = 12`) is split in two
fields:

* the **coarse field** `dc[M:2]` counts whole periods of CK0;
* the **fine field** `dc[1:0]` picks which quadrant clock ends the pulse.

The result is

    Ton    = dc * Tck / 4
    period = 2^(M-1) * Tck          (2048 * Tck at the default size)

where `Tck` is the period of the input clock. With a 400 ns clock, one step
of `dc` is 100 ns of on-time, and `dc = 8 .. 15` gives 800 .. 1500 ns.

## How a pulse is made

Three stages run in sequence. The block names are the module names.

1. **pwm_generator** (CK0 domain). An `M-1` bit counter `CNT` runs freely.
   Two comparators watch it:
   * `SETD = (CNT == 0) && (dc[M:2] != 0)`
   * `CLRD = (CNT == dc[M:2])`

   Flip-flop FFe registers SETD. So `SET` is high for one cycle, starting at
   the CK0 edge that ends count 0.
2. **multiphase_circuit**. FF0 samples CLRD on CK0, which gives `CLR0`.
   FF1, FF2 and FF3 sample CLR0 on CK1, CK2 and CK3. So `CLR1..CLR3` are CLR0
   delayed by 1/4, 2/4 and 3/4 of a period. A 4:1 multiplexer steered by
   `dc[1:0]` passes one of them on as `RESET`.

   | dc[1:0] | RESET |
   |---------|-------|
   | 00      | CLR0  |
   | 01      | CLR1  |
   | 10      | CLR2  |
   | 11      | CLR3  |
3. **sr_latch**. SET sets it and RESET clears it. Its output is `pwm`.

Example with `M = 4` and `dc = 10010` (coarse 4, fine 2), times in CK0
periods from the start of count 0:

| time            | event                                                  |
|-----------------|--------------------------------------------------------|
| 0               | CNT = 0, so SETD is high                               |
| 1               | SET rises, so `pwm` rises                              |
| 4 .. 5          | CNT = 4 = coarse field, so CLRD is high                |
| 5               | CLR0 rises (FF0)                                       |
| 5.25            | CLR1 rises                                             |
| 5.5             | CLR2 rises. It is selected, so `pwm` falls             |
| 8               | CNT wraps and the next period starts                   |

The on-time is 5.5 − 1 = 4.5 periods, which is 18/4 = `dc`/4.

Only the path from CLR0 to FF1..FF3 crosses between clocks. Its timing
budget is 1/4, 2/4 and 3/4 of a period. The clocks come from one DCM, so
static timing analysis can check these paths like any others.

## Range of the duty command

The formula `Ton = dc * Tck/4` holds for `4 <= dc <= 4*(2^(M-1)-1)`, plus
the two exceptions below. The testbench checks both.

* **dc < 4.** The coarse field is 0, so SETD is suppressed and there is no
  pulse. Without this rule, SET and CLR0 would come in the same cycle.
* **Largest coarse field (2^(M-1)-1) with dc[1:0] != 0.** RESET comes
  `dc[1:0]` quarter-periods after the wrap, so it overlaps the next SET. The
  reset wins, and the pulse rises late, when RESET ends. The pulse is then
  `2^(M-1)-1` whole periods long, whatever `dc[1:0]` is.

`dc` goes straight into the comparators and the multiplexer. It has no
shadow register. Change it only between pulses, or the current period may get
a wrong width. For example, changing `dc[1:0]` while the selected CLR pulse
is high cuts RESET short.

## Blocks and files

| file                        | role                                                     |
|-----------------------------|----------------------------------------------------------|
| `rtl/hrpwm_pkg.sv`          | default width `DC_MSB_DEFAULT = 12` and the phase-select enum |
| `rtl/pwm_generator.sv`      | counter, CMP1, CMP2, FFe                                 |
| `rtl/multiphase_circuit.sv` | FF0..FF3 and the phase multiplexer                       |
| `rtl/sr_latch.sv`           | output latch                                             |
| `rtl/hrpwm_core.sv`         | the three above wired together; synthesizable, takes CK0..CK3 |
| `rtl/dcm.sv`                | behavioural model of the clock manager (simulation only) |
| `rtl/hrpwm_top.sv`          | DCM model plus core                                      |

Ports of `hrpwm_top`:

* `clk`: the input clock.
* `rst`: active-high reset.
* `dc[M:0]`: the duty command.
* `pwm`: the output, which goes to the gate drive.
* `locked`: the DCM lock status.
* `set`, `reset`, `cnt[M-2:0]`: observation outputs.

The gate drive circuit and the power stage it drives are outside this
design.

## The clock manager model

`dcm.sv` is not synthesizable. For an FPGA build, replace the `u_dcm`
instance in `hrpwm_top` with the vendor's DCM primitive, or instantiate
`hrpwm_core` directly. The model's ports are a subset of the primitive's:
CLKIN, CLKFB, RST, CLK0, CLK90, CLK180, CLK270, CLKFX and LOCKED.

How the model behaves:

* It measures the CLKIN period `T` between rising edges.
* After `LOCK_CYCLES` (4) rising edges it starts four 50 % duty clocks,
  spaced by `T/4`.
* It raises LOCKED at the next rising edge of CLKFB.
* `PHASE_SHIFT` (-255..255) delays all four clocks by `PHASE_SHIFT * T/256`.
  A negative value acts as `(256 + PHASE_SHIFT) * T/256`.
* CLKFX runs at `CLKFX_MULTIPLY/CLKFX_DIVIDE` times the CLKIN frequency
  (default 4/1). The modulator does not use it.
* RST stops the outputs and clears LOCKED.

Not modelled: removal of clock-distribution delay (the feedback path is
assumed to have none), the variable phase shifter, and CLK2X/CLKDV.

`hrpwm_top` holds the core in reset until LOCKED is high. Then the first
period starts with clean clocks.

## The output latch

The output has to fall on an edge of whichever quadrant clock produced
RESET. A flip-flop on one clock cannot do that, so the output is a
level-sensitive SR latch. It is written as `always_latch` with gate `S|R`
and data `S & ~R`, and maps to one latch cell. It is reset-dominant. The
system reset acts as a second R input. S and R both come straight from
flip-flops, so neither glitches. Synthesis reports this single latch bit
(`hrpwm_core`: 16 flip-flops and 1 latch at the default size). The latch is
intended.

## Simulation

Each testbench checks itself. It prints `TB_RESULT checks=N failures=F` and
has a watchdog. To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/hrpwm_pkg.sv rtl/*.sv tb/tb_hrpwm_top.sv --top tb_hrpwm_top
    ./obj_dir/Vtb_hrpwm_top

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_pwm_generator`      | CNT, SETD, CLRD and SET against a reference counter, cycle by cycle, for coarse values 0, 1, 4, 1234 and 2047; SET period of 2048 cycles |
| `tb_multiphase_circuit` | RESET delay of k·T/4 after the capturing CK0 edge for each `dc[1:0]`; RESET width of one period; the order of CLR0..CLR3 |
| `tb_sr_latch`           | 2000 random S/R/reset steps against a reference latch |
| `tb_dcm`                | lock sequence, period, duty, quadrant spacing, fixed shifts of +64 and −64, CLKFX at 4/1 and 3/2, reset |
| `tb_hrpwm_top`          | the whole design at default size with a 400 ns clock (details below) |

`tb_hrpwm_top` measures the on-time and the period for 45 commands:
8..15, 3, 11, 15, both ends of the range, and 16 random values. It checks
that each pulse starts while CNT = 1. It also counts four mechanisms and
fails if any never happens:

* the wait for DCM lock;
* each of the four phases ending a pulse;
* suppression of SET;
* the full-scale overlap.

It takes about one second.

## Where this design makes its own choices

The counter/comparator stage, the flip-flop chain on four clock phases, the
multiplexer coding and the SR output follow the architecture the design is
based on. The following are this design's own choices:

* asynchronous active-high reset of all flip-flops;
* an up-counter that wraps;
* a reset-dominant latch;
* the core held in reset until LOCKED;
* the behavioural DCM's lock rule and its CLKFX default;
* the 400 ns clock used in the tests, chosen to give 100 ns per step.

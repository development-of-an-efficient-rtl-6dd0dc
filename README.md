# Digital household energy meter

A single-phase energy meter in synchronous logic. It takes a stream of
voltage and current samples, forms power, and instead of integrating every
sample separately it groups consecutive equal power samples into *runs*:
a run's energy is its power level times its length, computed once when the
power changes. Energy is accumulated until it reaches one kilowatt-hour,
which counts one billing unit. Units and their charge are converted to
decimal and shown on two 8-digit multiplexed 7-segment displays, next to a
six-digit clock whose day counter closes the bill every 30 days.

The block structure, the widths of the arithmetic (5-bit voltage, 11-bit
current, 16-bit power, 24-bit to 8-digit conversion), the 20 MHz / 100 Hz
clocking, the add-3 converter with its restart loop, the display scheme and
the 30-day month follow a published FPGA meter design. Everything that
design leaves open (listed per block in each file's header and summarised
under *Design choices* below) was decided here.

## Signal flow

```
 current_in (mA) ─► scale_down ─┐
 voltage_in (5 b) ──────────────┴► power_calc ─► power_store ─► energy_calc ─► energy_store ─► billing
                                   P = v x i     runs: P, Σ, t    E = P x t      kWh units       cost, monthly bill
                                                                                     │              │
                                           bin2bcd ◄─ status_check (loop)  ◄─────────┘              │
                                           bin2bcd ◄─ status_check (loop)  ◄────────────────────────┘
                                              │ 8 BCD digits each
                                           display (energy), display (bill) ─► seg / digit select
 clk (20 MHz) ─► clk_div ─► tick (100 Hz) ─► enable of every block
                             digital_clock ─► 6 clock digits, month_end ─► billing, month LED
```

`energy_meter_top` wires these together; every block is in `rtl/` under its
own name, with shared widths in `rtl/meter_pkg.sv`.

## Clocking: one clock, one sample enable

Everything runs on the system clock. `clk_div` counts 200000 cycles (an
18-bit counter) and produces a 100 Hz square wave `clk_100hz` plus `tick`,
high for one system cycle per period. `tick` is the clock enable of the
sampling datapath, the converters, the displays and the clock, so one
voltage/current sample is taken per tick. The blocks after the sampling
point (`energy_calc`, `energy_store`, `billing`) react within a few system
cycles of their input and need no enable.

Timing of one sample, in ticks: the inputs present at tick *k* are
multiplied and registered by `power_calc` at tick *k* (`scale_down` is
combinational so current and voltage stay aligned), and `power_store` takes
that power at tick *k+1*. Right after reset `power_store` therefore first
sees the multiplier's reset value 0, which simply begins a run of zero
power.

## Power runs and energy (the part to understand first)

`power_store` keeps the previous sample, a running total and a length
counter. On each tick:

* same power as before: add it to the total, count one more sample;
* different power: hand on the finished run (`run_power`, `power_tot`,
  `clock_tot`, strobe `run_valid` for one system cycle) and start a new run
  with this sample (total = sample, length = 1);
* a run whose 16-bit length counter is full is handed on as if the power
  had changed, so nothing is lost on long steady loads.

For the sequence 15000 mA × 3, 4291 mA × 5, 209 mA × 6 at voltage code 5 the
runs come out as totals `57E4`, `29E5`, `0258` over 3, 5 and 6 samples.

`energy_calc` multiplies a run's level by its length (E = P × t, equal to
the run total; an assertion in `power_store` checks that identity) and
`energy_store` adds E to a 48-bit accumulator. Whenever the accumulator
holds `UNIT_ENERGY` or more, one unit is subtracted and the 24-bit unit
counter steps (`unit_pulse`). At most one unit is taken per system cycle,
which is always enough at the default sizes (a run never exceeds
65535 × 65535 < 3.6·10¹⁰ LSB).

**Energy units.** The meter's numbers are read as: voltage code in volts
(the input is a mains voltage scaled down to about 5 V), current in 10 mA
steps (`scale_down` divides the mA input by 10, saturating at 2047), and 100
samples per second. One energy LSB is then 1 V × 10 mA × 10 ms = 0.1 mJ and
1 kWh is `UNIT_ENERGY` = 3.6·10¹⁰ LSB. A real installation sets the voltage
scale through this one parameter: for a different volts-per-code, divide
3.6·10¹⁰ by it.

Consequence: the unit count only moves with the energy of *finished* runs.
A load that stays perfectly constant is accounted for at the latest when
its run counter fills (65535 samples, about 11 minutes at 100 Hz).

## Billing and the month

`billing` registers `cost = units × TARIFF` every cycle (TARIFF = 1 by
default, so cost equals units). `digital_clock` counts seconds from the tick
(`SEC_TICKS` = 100), then ten seconds, minutes, ten minutes and hours
00–23, and at midnight counts a day. When 30 days (`DAYS_PER_MONTH`) are
complete it pulses `month_end` for one cycle and lights `month_indicator`
until the following midnight. On `month_end`, billing latches the units used
since the previous month end (`month_units`) and their charge
(`month_bill`).

## Readings: converter loop and displays

Each reading (units, cost) has a `bin2bcd` and a `status_check`.
`bin2bcd` is the shift-and-add-3 converter, one bit per tick: a start loads
the 24-bit value; 24 steps later the eight digits are written to `bcd` and
`done` is high for one tick. `status_check` registers `done` and feeds it
back as the next `start`; its reset value is 1, so the first conversion
starts on the first tick after reset. The loop converts once every 26 ticks
(0.26 s) and the BCD output always holds the last complete result.

`display` steps a digit index every tick and registers the decoded segments
(`seg`, a in bit 6, lit = 1: `0` = 7E, `1` = 30, `5` = 5B) together with a
one-hot `digit_sel` (bit 0 = least significant digit). The six clock digits
are decoded permanently, with the other convention of `seven_seg_decoder`
(g in bit 6, lit = 0: `0` = 40, `1` = 79, `9` = 10), on `clock_seg[0]`
(seconds) to `clock_seg[5]` (tens of hours). 8 + 8 + 6 digits make the
meter's 22 displays.

Note: with the display scanned at the 100 Hz sample rate each digit is lit
12.5 times a second, which is what the source design's clocking implies
but will flicker on real hardware; a physical build would scan from a
faster enable, which only means connecting `display.en` to a different
divider output.

## Parameters (`energy_meter_top`)

| parameter        | default          | meaning |
|------------------|------------------|---------|
| `DIV`            | 200000           | system cycles per sample (20 MHz → 100 Hz) |
| `SEC_TICKS`      | 100              | samples per clock second |
| `DAYS_PER_MONTH` | 30               | days per billing month |
| `UNIT_ENERGY`    | 36 000 000 000   | energy LSBs (0.1 mJ) per billing unit (1 kWh) |
| `TARIFF`         | 1                | charge per unit |

Widths are in `meter_pkg`: `V_W` 5, `I_W` 11, `P_W` 16, `T_W` 16 (run
length), `PT_W`/`E_W` 32, `UNIT_W` 24, 8 BCD digits. Reset (`rst`) is
synchronous and active high throughout.

## Design choices

Beyond the published structure, these are choices made here:

* the 100 Hz divider output used as a clock enable rather than as a clock;
  the divider's output flips at half and at the full 200000-cycle count so
  the square wave really is 100 Hz;
* current divisor 10 (derived from the published power totals above),
  16-bit current input, saturation;
* run handling details: first sample after reset, flush on a full counter,
  32-bit run total;
* energy = run level × run length, the 0.1 mJ LSB, the 48-bit accumulator;
* flat tariff, monthly registers, 2²⁴ wrap of unit and cost;
* serial converter timing, display scan order and select polarity;
* 24-hour clock starting at 00:00:00, month indicator held for one day;
* the clock digits are decoded inside `digital_clock` and driven directly,
  not multiplexed through a `display` instance.

Not built: the meter's push buttons and the "toggle" input shown entering
the energy storage have no described function. The multiplier's second
output, mentioned but never named, is not built either.

Size: synthesis gives about 600 flip-flops and 320 word-level cells. The
published design fitted about 270 logic elements of a 576-element FPGA; the
wider registers chosen here (accumulator, run total, monthly latches) would
not fit that device without narrowing them.

## Verification

Each block has a self-checking testbench `tb/tb_<block>.sv` that computes
expected values independently and ends with a `TB_RESULT checks=N
failures=M` line. The system tests are:

* `tb_energy_meter_top` – reduced sizes (4 cycles per sample, one-second
  ticks, one-day month, 200000-LSB unit, tariff 3): 150+ random runs plus
  the published current sequence, every run total checked against the
  samples driven, a run that fills the length counter, the unit count
  against the energy of every sample, a month end and its bill, both BCD
  readings, a full scan of both displays and the clock digits. It fails if
  any of these mechanisms never happened.
* `tb_energy_meter_full` – the top at its default sizes for ~110 samples
  (22 million system cycles, a few seconds): 200000-cycle sample period and
  duty, the published run totals, the clock at 00:00:01 after 100 samples,
  zero readings on all digits.

* `tb_part2_reading` – the reading chain alone (two converter loops and
  two displays) with units and cost of 150: readings `00000150` within 26
  ticks, the displayed codes, and a new value picked up by the free-running
  loop.
* `tb_meter_kwh` – default unit size and tariff with a 2-cycle sample
  period: a full-scale load (46500 LSB per sample) until the first real
  kilowatt-hour unit, its residue, cost and BCD reading.

Run one with Verilator, e.g.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/meter_pkg.sv \
    tb/tb_energy_meter_top.sv --top-module tb_energy_meter_top
./obj_dir/Vtb_energy_meter_top
```

The testbenches initialise what they read, so they also run with
`+verilator+rand+reset+2`.

# Real-time clock unit for an 8051 core

An 8051 has timers, but no notion of wall-clock time: software that needs the
date has to count timer interrupts and carry seconds into minutes, hours,
days, months and years itself, including month lengths and leap years. This
RTL moves that job into hardware. The RTC unit sits in the 8051's special
function register (SFR) space next to the standard timers. It divides the
crystal clock down to one pulse per microsecond, counts a million of those
pulses to a second, and keeps a complete calendar (second, minute, hour,
day, month, 16-bit year) that the program can read and set like any other
SFR.

Only the RTC is given here. The rest of the 8051 core (CPU, timers, serial
port, interrupt unit, ports, memories) is not part of this RTL; the top module
`rtc_unit` brings out the SFR bus through which a CPU would reach the clock.

## Structure

```
            RTCON.OSC2..0  RTCON.EN  RTCON.CLR (to every stage)
                  |           |
 clk ---> rtc_clk_divider ----+--- us_tick (1 clock per microsecond)
                                      |
                              rtc_master_counter   MC: 0 .. 999999
                                      |
                                   sec_tick
                                      |
                              rtc_calendar  SEC -> MIN -> HOUR -> DAY -> MON -> YEAR
                                 (rtc_date_determiner: month length, leap year)

 SFR bus <--> rtc_sfr : RTCON, address decode, read-back, reload strobes
```

| Module | Role |
|---|---|
| `rtc_pkg` | RTCON bit positions, crystal codes, `rtc_time_t`, register encoding, default values |
| `rtc_clk_divider` | crystal clock -> one-clock pulse every microsecond |
| `rtc_master_counter` | 32-bit MC, counts microseconds, carries once per second |
| `rtc_date_determiner` | days in the current month, leap-year flag (combinational) |
| `rtc_calendar` | the cascaded calendar registers, reload and clear |
| `rtc_sfr` | RTCON register and the SFR interface to all RTC registers |
| `rtc_unit` | top: wires the above together |

## Programming model

### Register map

Twelve byte-wide SFRs, at `SFR_BASE` (parameter, default `0xC0`) onwards:

| Offset | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| +0 | RTCON | SEC | MIN | HOUR | DAY | MON | YEARL | YEARH |
| +8 | MCLL | MCLH | MCHL | MCHH | | | | |

MCLL..MCHH are bits 7..0, 15..8, 23..16 and 31..24 of MC. Every register
can be read and written. Addresses outside these twelve give `sfr_hit = 0`
and read as 0. The register set and its grouping into two rows are the
original design's. The base address is this implementation's choice: `0xC0`
lies in a part of the SFR map that a two-timer 8051 does not use.

### RTCON

| Bit | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| Name | OSC2 | OSC1 | OSC0 | - | - | - | CLR | EN |

* **EN**: 1 runs the clock, 0 stops it. Everything holds while it is
  stopped, including the position inside the current microsecond.
* **CLR**: while it is 1, the divider, MC and the calendar are held at their
  defaults: 00:00:00, day 1, month 1, year 0, MC 0. This is a level, not a
  pulse. Software sets it and then clears it again.
* **OSC2..OSC0**: the crystal frequency, which is also the divide ratio:

| OSC2..0 | 000 | 001 | 010 | 011 | 100 | 101 | 110, 111 |
|---|---|---|---|---|---|---|---|
| Crystal (MHz) | 6 | 10 | 12 | 20 | 24 | 48 | unused: no pulses |

* Bits 4..2 are reserved. They are not stored and read as 0.

Example: `RTCON = 0010_0001` runs the clock from a 10 MHz crystal.

### Setting and reading the time

To set the clock, write RTCON with EN = 0. Then write SEC, MIN, HOUR, DAY,
MON, YEARL, YEARH and, if needed, the MC bytes, and set EN.

The registers are binary, not BCD:
* SEC runs 0..59 and MIN 0..59.
* HOUR runs 0..23.
* DAY runs 1..28/29/30/31.
* MON runs 1..12.
* YEAR is a plain 16-bit year (e.g. 2004).

Nothing latches a multi-byte value, so reading while the clock runs can tear:

* The calendar can roll over between reads of SEC and MIN.
* MC can carry between reads of its low and high bytes.

Read twice and compare, or stop the clock while reading.

## How the counting chain works

This part takes the most care to understand, because everything happens on
single clock edges.

**Divider.** A 6-bit counter counts crystal clocks from 0 up to
*f*<sub>MHz</sub> − 1 and wraps. `us_tick` is high in the clock where the
counter holds *f*<sub>MHz</sub> − 1, so it is exactly one clock wide and
repeats every *f*<sub>MHz</sub> clocks. After EN is set, the first pulse
comes *f*<sub>MHz</sub> clocks later. EN acts as a clock enable on this
counter: the crystal clock itself is never gated.

**Master counter.** MC advances by one on each `us_tick`. On a pulse that
finds MC at 999999 (`TICKS_PER_SEC − 1`), MC returns to 0 and `sec_tick` is
raised combinationally for that same clock. So every MC value, 0 and 999999
included, lasts exactly one microsecond, and a second lasts exactly
10<sup>6</sup> × *f*<sub>MHz</sub> clocks.

**Calendar.** All carries are combinational and are evaluated from the
current register values:

```
ovsec  = sec_tick & (SEC  >= 59)
ovmin  = ovsec    & (MIN  >= 59)
ovhour = ovmin    & (HOUR >= 23)
ovday  = ovhour   & (DAY  >= days_in_month(MON, YEAR))
ovmon  = ovday    & (MON  >= 12)
```

On the clock edge where `sec_tick` is high, each register that receives a
carry either steps by one or, if its own carry is out, returns to its first
value. The whole cascade settles in one edge. At 10 MHz, with MC at 999996 and
the date 31.12.2003 23:59:59:

```
clock 0..9     MC 999996
clock 10..19   MC 999997
clock 20..29   MC 999998
clock 30..39   MC 999999   (us_tick in clock 39 -> sec_tick)
clock 40       MC 0, 00:00:00, 1.1.2004, leap = 1
```

The month length is computed from the month and year *before* the edge. This
is the length of the month that is ending, which is the one the day
comparison needs. Leap years follow the Gregorian rule: divisible by 4, but
not by 100 unless also by 400. So 2000 is a leap year and 1900 and 2100 are
not. After 31.12.65535 the year wraps to 0.

**Out-of-range values.** The `>=` tests keep a register loaded with an
impossible value from counting on forever. It returns to its first value at
its next step. For example, SEC = 75 becomes 0 at the next second, with a
carry into MIN. A month value outside 1..12 is treated as a 31-day month.

**Writes against counting.** A write to a register takes effect at the same
edge and wins over that register's own step:

* A carry that the register would have passed upward still goes to the
  register above it.
* A microsecond pulse that arrives together with a write to MC is dropped.

The hardware enforces no ordering. A program that sets the time with the
clock running must accept this, or stop the clock first.

## Interface and timing of `rtc_unit`

| Port | Dir | Width | |
|---|---|---|---|
| `clk` | in | 1 | crystal clock, also the core clock |
| `rst` | in | 1 | synchronous, active high: RTCON = 0, calendar and MC at defaults |
| `sfr_addr`, `sfr_we`, `sfr_wdata` | in | 8, 1, 8 | SFR write at the rising edge of `clk` |
| `sfr_rdata`, `sfr_hit` | out | 8, 1 | combinational read of the addressed register |
| `tm` | out | `rtc_time_t` | year, mon, day, hour, min, sec (for observation or direct use) |
| `mc` | out | 32 | master counter |
| `leap`, `days_in_month` | out | 1, 8 | leap-year flag, length of the current month |
| `div_count` | out | 6 | divider state |
| `us_tick`, `sec_tick`, `year_carry` | out | 1 | the microsecond, second and year carries |

Parameters:

* `SFR_BASE` (default `8'hC0`): the SFR address of RTCON.
* `TICKS_PER_SEC` (default 1 000 000): the number of microsecond pulses per
  second. Lower it only to make simulations shorter.

A new RTCON value takes effect in the clock after the write edge. The design
has one clock domain. The RTC counts from the same crystal as the CPU, so its
time is only as accurate as that crystal.

## What follows the original design and what does not

These parts follow the original design:

* the registers and their widths;
* the RTCON layout and the crystal table;
* the division to 1 µs, the 0..999999 master counter and the single-edge
  carry chain;
* the leap-year-aware calendar;
* the per-register reload and the clear bit.

These are choices of this implementation:

* The SFR addresses and the bus timing.
* Binary, not BCD, registers. Days and months counted from 1.
* The Gregorian leap rule. The original only asks for leap years to be taken
  into account.
* The year wrapping at 65535.
* The defaults that CLR and reset load. The original says only "default
  levels".
* CLR acting as a level. EN as a clock enable rather than a switch in the
  clock path.
* The reserved RTCON bits and the two unused crystal codes reading as 0 or
  stopping the clock.
* The precedence of writes over counting, and the `>=` range recovery.
* The MC bytes being writable.

The RTC raises no interrupt. None is part of the design.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Run one with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert --top-module tb_rtc_unit \
  -y rtl -y tb +libext+.sv -Irtl rtl/rtc_pkg.sv tb/tb_rtc_model_pkg.sv tb/tb_rtc_unit.sv
./obj_dir/Vtb_rtc_unit
```

| Testbench | What it shows |
|---|---|
| `tb_rtc_clk_divider` | pulse spacing for all six crystals, no pulses for unused codes, EN hold, CLR |
| `tb_rtc_master_counter` | a full 10<sup>6</sup>-pulse second, byte writes, write-over-pulse, out-of-range wrap, CLR |
| `tb_rtc_date_determiner` | every month of every year 0..65535 against the Gregorian rule |
| `tb_rtc_calendar` | hundreds of dates just before minute/hour/day/month/year ends, 28/29 Feb in 1900/2000/2004, year wrap, reload against a carry, CLR |
| `tb_rtc_sfr` | RTCON fields and reserved bits, one reload strobe per register, read-back of all twelve registers, no hits outside the map |
| `tb_rtc_unit` | end to end over the SFR bus with a 25-µs "second": all six crystals, exact second length, every carry including 29 February and the new year, EN stop, CLR, MC access; counts each mechanism and fails if one never occurred |
| `tb_rtc_unit_full` | full size (defaults untouched): the 31.12.2003 → 1.1.2004 roll-over at 10 MHz from MC = 999996, then one real second at each crystal. It checks that a second lasts 6·10<sup>6</sup> … 48·10<sup>6</sup> clocks. About 1.2·10<sup>8</sup> clocks, roughly 70 s in Verilator |

`tb_rtc_model_pkg` holds the reference calendar that the calendar and
end-to-end testbenches compare against. It is written from a month-length
table, independently of the RTL's carry chain.

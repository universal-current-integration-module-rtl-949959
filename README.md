# Current integration module (CIM) for handset battery gauging

A battery's remaining charge is the time integral of the current that has
flowed into and out of it. The CIM measures that integral directly. The
battery current flows through a small external resistor `r`. Once per clock
the CIM converts the voltage `VR` across `r` into a 3-bit code and adds the
code to a 32-bit running total. A host microcontroller reads the total a
byte at a time and turns it into mAh. It can also write the total a byte at
a time, for example to load a known capacity after a full charge.

The module knows nothing about cell chemistry. Self-discharge, temperature
and ageing are left to the host. This keeps the module usable with any
battery type.

This RTL models a late-1990s mixed-signal chip (0.25 µm CMOS, 5 V, 28 pins). The
analog front end is written as a behavioural model with `real` ports. The
digital part is synthesizable SystemVerilog.

## Signal path

```
 VR1 ─┐                                                    ┌─ OVERVOLTbar
      ├─ reference divider ─ VOT0..7 ─┐                   ├─ UNDERVOLT
 VR2 ─┘   (250 steps, lowest 8 used)  │     bound checker ─┘
                                       ├─ 8 comparators ─ vc[7:0]
 VR  ─────────────────────────────────┘        │
                                    one-hot encoder ─ binary encoder ─ code[2:0]
                                                                          │
           ┌───────────────────── integration core ──────────────────────┘
           │  sample reg ─ 3-bit adder ─ low reg (bits 2..0)
           │                   │ carry
           │         13-bit counter (bits 15..3)
           │                   │ carry
           │         16-bit counter (bits 31..16)
           │
 PD0..7, CIN, DCRHDIEN/DCRLDIEN ─ data setting (byte preset)
 DCRHDOEN/DCRLDOEN ─ byte selector ─ DATA0..7
```

### The converter

The reference divider cuts the span between `VR1` (top) and `VR2` (bottom)
into 250 equal steps. Only the lowest eight taps are used:
`VOT[k] = VR2 + (k+1)/250 · (VR1 − VR2)`. With `VR1` = 5 V and `VR2` = 0 V
the taps are 0.02, 0.04, … 0.16 V. The converter therefore resolves only
the small voltage a sense resistor develops, in 20 mV steps.

Each comparator outputs **1 when its reference lies above VR**. The bank
gives a thermometer code: `vc = 8'hFF << n`, where `n` is the number of
references below VR.

- The **one-hot encoder** has seven cells. Cell `k` is
  `~vc[k] & vc[k+1]`, so it fires when VR lies between `VOT[k]` and
  `VOT[k+1]`.
- The **binary encoder** turns cell `k` into code `k+1`. If no cell fires,
  the code is 0.

| VR (with VR1 = 5 V, VR2 = 0 V) | vc | code |
|---|---|---|
| below 0.02 V | 1111_1111 | 0, UNDERVOLT = 1 |
| 0.02 – 0.04 V | 1111_1110 | 1 |
| 0.04 – 0.06 V | 1111_1100 | 2 |
| 0.06 – 0.08 V (e.g. 0.07 V) | 1111_1000 | 3 |
| … | … | … |
| 0.14 – 0.16 V | 1000_0000 | 7 |
| above 0.16 V | 0000_0000 | 0, OVERVOLTbar = 0 |

A voltage outside the converter's range adds nothing to the total. The
bound checker reports it:

- `OVERVOLTbar` is the OR of all eight comparator outputs. It goes low when
  VR is above every reference.
- `UNDERVOLT` is the AND of all eight. It goes high when VR is below every
  reference.

### The integration core: why the total is split 3 + 13 + 16

Two 3-bit registers sit around a 3-bit adder.

1. On each rising clock edge the first register samples the code.
2. On the same edge the second register takes `sample + low bits`, where
   `sample` is the code sampled on the previous edge.
3. The adder's carry out is the count enable of the 13-bit counter. The
   13-bit counter's carry enables the 16-bit counter.

Together the three parts form one 32-bit accumulator:

```
 total[31:16] = 16-bit counter    total[15:3] = 13-bit counter    total[2:0] = low register
```

Only the low 3 bits need a real adder. The code is never larger than 7,
so the stage above gains at most one per clock, and a plain counter can
hold it.

**Latency:** a code sampled on edge *n* is in the total after edge *n+1*.
Under a constant code `c`, the total grows by exactly `c` per clock after
that first clock.

**Units:** one count is one clock period times one code step. The code
step is `(VR1 − VR2)/250` across `r`, which is 80 mA for a 0.25 Ω resistor
at 5 V. The host turns counts into mAh using its own knowledge of `r` and of
the clock period.

**Range:**

- Sampled once per second, the total holds far more than a handset needs.
  225 h of idle time is 810,000 samples, at most 5.67 million counts,
  against 2³² counts.
- Clocked fast, the total wraps quickly. At 10 MHz and code 7 it wraps
  after about one minute.
- Nothing flags a wrap. The carry out of the 16-bit counter exists inside
  `cim_digital` but has no pin.

The total only counts up. There is no direction input. A host that needs
to tell charge from discharge must do so itself, for example by reading
the total at the start and end of each phase.

### Host interface

The interface is byte-wide. Both select pairs use the same coding:
`00` = bits 7..0, `01` = 15..8, `10` = 23..16, `11` = 31..24. The first
pin of each pair (`…HD…`) is the upper select bit.

- **Read.** `{DCRHDOEN, DCRLDOEN}` chooses the byte that appears on
  `DATA0..7`. The path is combinational from the registers, so DATA is
  valid shortly after the select changes. The total may move on the next
  clock edge. A host that wants a consistent 32-bit value must read
  between edges or read twice.
- **Preset.** While `CIN` = 1, the byte on `PD0..7` is written into the
  byte chosen by `{DCRHDIEN, DCRLDIEN}` at each rising clock edge. The
  other bytes keep their values. While CIN is high no code is added and no
  carry ripples, so the accumulation simply pauses. Loading all four
  bytes takes four clocks.

Byte 0 (bits 7..0) spans the low register and the 13-bit counter. The
`cim_data_setting` decoder is therefore built once per slice of the total,
with the slice's bit offset as a parameter. Each instance gives every bit
of its slice a load flag and a load value.

### Reset

`rst_n` clears the sample register, the low register and both counters
asynchronously. The original chip's pin list has no reset; its counters had
preset/clear inputs driven from the host data path.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/cim_pkg.sv` | package | sizes (8 references, 250 steps, 3/13/16 bit split) and the byte-select enum |
| `rtl/cim_chip.sv` | **top** | analog module + digital module, the chip's pins (plus `rst_n`) |
| `rtl/cim_analog.sv` | behavioural | divider + comparators |
| `rtl/cim_rvg.sv` | behavioural | 250-step reference divider, 8 taps |
| `rtl/cim_vc.sv` | behavioural | 8 ideal comparators |
| `rtl/cim_digital.sv` | RTL | everything digital, wired as in the diagram above |
| `rtl/cim_vbc.sv` | RTL | bound checker |
| `rtl/cim_ohe.sv` | RTL | thermometer → one-hot |
| `rtl/cim_oh2b.sv` | RTL | one-hot → 3-bit code (asserts at most one bit set) |
| `rtl/cim_fa3.sv` | RTL | 3-bit ripple adder |
| `rtl/cim_integrator.sv` | RTL | sample register, adder, low register |
| `rtl/cim_counter.sv` | RTL | presettable up counter, used with WIDTH 13 and 16 |
| `rtl/cim_data_setting.sv` | RTL | byte-preset decoder for one slice |
| `rtl/cim_tgate.sv` | RTL | byte selector onto DATA |

Every module has a testbench `tb/tb_<module>.sv`. The counter has two,
`tb_cim_counter13` and `tb_cim_counter16`. Each testbench compares the
block against an independent integer or real-number model and prints
`TB_RESULT checks=N failures=M`.

`tb_cim_chip` runs the whole chip at its default size. It takes VR
through:

- 0.07 V, then 0.046 V and 0.073 V;
- a point inside each code range 1..7;
- over and under range;
- presets near bit 16 and near the 32-bit wrap;
- 2000 clocks of random voltage with random single-byte presets.

It reads the total back over DATA and checks it every 50 clocks. It also
counts carries into each counter, wraps, flag events, presets per byte and
readouts, and fails if any of them never happened.

`tb_cim_idle_225h` is a workload run: 225 hours of standby sampled once
per second (810,000 clocks). The input is mostly code 1, with a ten-sample
burst of code 7 every 600 samples. The total must match the model
(891,000 counts) and must not wrap.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/cim_pkg.sv \
          tb/tb_cim_chip.sv --top-module tb_cim_chip -Mdir obj -o sim
./obj/sim
```

Replace `tb_cim_chip` by any other testbench to run it. Each testbench
finishes in well under a second.

The analog models use `real` ports. Verilator and slang accept them.
Synthesis tools do not, so synthesize from `cim_digital`, whose input is
the 8-bit comparator code.

## Where this model departs from the original chip

- **Analog parts are ideal.** The comparators have no offset, hysteresis
  or delay, and the divider has no mismatch. The fabricated chip's
  measured conversion was off from the ideal curve by roughly a factor of
  two (about one bit). That error is not modelled, so the model gives the
  ideal codes.
- **One clock instead of ripple clocks.** The original clocked the 13-bit
  counter with the gated adder carry, and the 16-bit counter with the
  13-bit counter's output. Here every register runs on `clk`, and the
  carries are count enables. Totals are the same; only the internal
  timing differs.
- **Synchronous preset.** The original loaded the counters through their
  asynchronous preset/clear inputs. Here a per-bit load is taken on the
  clock edge while CIN is high, and accumulation pauses for that clock.
  How the original behaved when the host wrote while the converter was
  running is not known.
- **`rst_n` is added.** Without it the registers would start at unknown
  values until the host preset them.
- **Count-up only.** The accumulator has no borrow path and no direction
  input, as on the original chip's pin list.
- **Pin-order readings.** The upper select pin (`DCRHDxEN`) is taken as
  the upper select bit. The byte-3 slice is taken as bits 31..24.
- **Not modelled:** the output pad buffer on DATA and the other pads, and
  the power pins. DATA is driven straight from the byte selector.

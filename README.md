# DC-motor control device: I/O hardware and current-loop ASIC on a DSP56600 bus

A DC motor drive is controlled by two nested loops. The inner **current loop**
runs every Tc = 284 µs. It compares the measured armature current with a
reference and sets the pulse width α of a PWM stage. The outer **speed loop**
runs every Tm = 20 ms. It compares the measured speed with the wanted speed
and produces the current reference I_ref. Around the loops sit three I/O
functions:

* a **PWM** that turns α into two complementary switch commands C0/C1 at the
  period Tc;
* a **current acquisition** that samples a 10-bit ADC every 5 µs and averages
  the samples over each Tc period (i_m);
* a **speed acquisition** that derives the speed Ω_m from an incremental
  encoder (S0, S1). Architecture 1 counts encoder edges over 1 ms windows.
  Architecture 2 measures the period of S0 instead.

The speed loop always runs as software on a DSP56600 processor. This RTL
covers two ways of splitting the rest between that processor and custom
hardware. Both are built, side by side, in `dc_ctl_top`:

| | Architecture 1 (`a1_*` ports) | Architecture 2 (`a2_*` ports) |
|---|---|---|
| current loop | DSP software | custom ASIC (`arch2_asic`) |
| I/O functions | one I/O ASIC (`arch1_asic`) | one chip each, each with a one-register memory block |
| bus | DSP56600 external bus, DSP is the only master | one shared DSP56600 bus, DSP is the only master |
| synchronisation | ASIC raises IRQC once per Tc | current ASIC raises an interrupt once per Tc |

The processor, its software, the ADC and the encoder are outside the RTL.
Their signals are the top-level ports.

## How the hardware talks to the processor

This part needs the most care. All transfers are ordinary DSP56600 external
SRAM cycles. The bus has a 16-bit address A, 24-bit data D, and the active-low
strobes /MCS, /RD and /WR. Tri-state data is not modelled. The master drives a
`dsp_bus_m_t` struct. Each slave answers with a `dsp_bus_s_t`, which holds its
read data and an output-enable bit. A slave that is not driving returns zero,
so the slaves' replies can simply be ORed. `dc_ctl_top` does this for the
architecture-2 bus, and an assertion checks that at most one slave drives.

The slaves run on their own clock `clk`, not the bus. Every slave handles
the bus in the same way:

* /MCS, /RD and /WR pass through two-flip-flop synchronisers before any state
  machine looks at them.
* Write data is captured at every clock edge where the raw /WR and /MCS are
  low and A matches. It is committed when the synchronised /WR rises. The
  DSP's data hold time after /WR (fractions of a nanosecond) therefore does
  not matter.
* Read data is driven combinationally from the raw strobes and the address.
  It appears as soon as /RD falls.
* **Timing requirement:** the DSP must keep each strobe low, and each gap
  between cycles high, for at least **three `clk` periods**. At the default
  50 MHz that is 60 ns, so the DSP's bus control must add wait states. An
  un-stretched DSP56600 /WR pulse (about 19 ns) is too short to be seen.

### Architecture 1 exchange (`exch_slave`)

Once per Tc the I/O ASIC and the DSP swap their variables. The state machine
below follows the published state diagram of this exchange. Each RTL state
carries a comment giving the number it has in that diagram.

| step | ASIC state(s) | bus activity | effect |
|---|---|---|---|
| 1 | IRQ, A_SEL | IRQC high until a cycle to `ADDR_ALPHA` is seen | DSP enters its interrupt routine |
| 2 | A_WR_HI, A_WR_LO, A_LATCH | DSP writes `ADDR_ALPHA` (wait for /WR to fall, then rise) | α loaded into the PWM |
| 3 | A_END, I_SEL, I_RD_HI, I_DRV | DSP reads `ADDR_IM` | returns i_m |
| 4 | I_END, O_SEL, O_RD_HI, O_DRV, O_END | DSP reads `ADDR_OMEGA` | returns Ω_m (sign-extended) |

Each step waits for /MCS to end before it looks for the next cycle. A bus
cycle that arrives out of this order is not answered, and the state machine
keeps waiting. The exchange starts when the current average of the period
that has just ended is ready. That is SUM_W + 2 clock cycles after the PWM's
period start, about 0.4 µs. So the DSP always reads a fresh i_m. The α it
writes governs the period that is already running (see PWM below).

### Architecture 2 exchange (`arch2_asic` and three `bus_reg`s)

The I/O chips never synchronise with anyone. Each one keeps its result in a
one-register memory block (`bus_reg`) with memory-like pins: A, D, /CS = /MCS,
/OE = /RD and /WE = /WR. Each register is used in one direction only:

| register | chip | bus side | local side |
|---|---|---|---|
| Rα (`FF20`) | PWM (PE5) | written by the DSP | read by the PWM; every bus write loads the PWM |
| R_im (`FF21`) | current acquisition (PE4) | read by the DSP | loaded with each new average |
| R_Ωm (`FF22`) | speed acquisition (PE3) | read by the DSP | loaded with each new period of S0 (signed, µs) |

At each of its own Tc periods the current ASIC raises `irq`. The DSP then:

1. reads α from the ASIC (`FF10`);
2. writes it to Rα;
3. reads R_im;
4. writes i_m to the ASIC (`FF11`);
5. writes I_ref to the ASIC (`FF12`).

The ASIC follows steps 1, 4 and 5 and ignores the cycles to the registers.
After step 5 it runs one step of the control law, and the new α is read at
the start of the next period. The DSP reads R_Ωm once per speed period,
whenever it likes. If a period start arrives while an exchange is still
unfinished, `overruns` counts it and the exchange simply continues.

The chips of architecture 2 each have their own prescaler and period
counter. They are not phase-locked to one another, as separate chips would
not be.

## The I/O functions

**PWM (`pwm_gen`).** A counter advances on a 1 µs tick and wraps every
`TC_US` ticks. C0 is high from the period start while the counter is below
α_q, and C1 is always the inverse of C0. α_q is loaded by a `load` strobe
whenever a new width arrives. Because the width comes from the exchange, it
arrives a few microseconds into the period it is meant for. Once C0 has been
low at a tick, it stays low until the next period, so there is never a
second pulse in one period. Widths above `TC_US` are clamped. The PWM also
pulses `period_start`, which is the Tc time base of the architecture-1 ASIC.
There is no dead time between C0 and C1.

**Current acquisition (`acq_i`).** Every `TS_US` ticks the ADC word is added
to an accumulator. At each period start the sum and the sample count go to a
serial restoring divider, one quotient bit per clock. 284/5 is not an
integer, so a period holds 56 or 57 samples, and the divider uses the actual
count. The result is truncated. The ADC is assumed to present a valid word at
all times, with no conversion handshake.

**Speed acquisition (`acq_speed`).** S0 and S1 are synchronised and decoded
×4. Each change of either channel counts +1 when {S1,S0} goes 00→01→11→10→00,
and −1 in the other direction. A jump of both channels at once is ignored.
The signed sum over each `WIN_US` window is Ω_m, in encoder edges per
window. It saturates at ±(2^15−1). Architecture 1 uses this module.

**Period measurement (`acq_period`).** Architecture 2's speed chip times the
interval between rising edges of S0 in 1 µs ticks. The sign is taken from S1
at that edge: positive when S1 is low, which is the same forward direction as
`acq_speed`. Each result is loaded into R_Ωm as soon as it is known, so the
update rate follows the motor speed. The first edge after reset or after a
standstill only starts the timer. With no edge for `PMAX_US` (32 767) µs the
result is +`PMAX_US`. The DSP converts the period to a speed itself.

## The current control law (`pi_current`)

The current loop's control law was not published with the architecture. A
fixed-point PI law stands in for it. All the variables are integers, with
i_ref and i_m in ADC codes:

```
e     = i_ref - i_m
integ = clamp(integ + KI*e, 0, TC_US << SHIFT)
alpha = clamp((KP*e + integ) >> SHIFT, 0, TC_US)     // 0..284 us
```

The defaults are KP = 64, KI = 8 and SHIFT = 8: a proportional gain of 0.25 µs
per ADC code, and 1/32 µs per code per period of integral gain. `sat` marks a
clamped output. In architecture 1 the same law would run as DSP software.
The end-to-end testbench does exactly that.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `CLK_PER_US` | 50 | system clocks per µs (50 MHz) | chosen here |
| `TC_US` | 284 | current-loop period Tc, µs | specified |
| `TS_US` | 5 | current sampling period, µs | specified |
| `WIN_US` | 1000 | speed acquisition period, µs | specified |
| `ADC_W` | 10 | ADC resolution | specified |
| `ALPHA_W` | 9 | pulse-width word (0..284) | chosen here |
| `SPEED_W` | 16 | signed speed count | chosen here |
| bus widths | A 16, D 24 | DSP56600 external bus | the processor's |
| addresses | FF00–FF02, FF10–FF12, FF20–FF22 | see `dcctl_pkg` | chosen here |
| `KP`, `KI`, `SHIFT` | 64, 8, 8 | PI gains | chosen here |

At these defaults one Tc is 14 200 clocks. An exchange takes about 30–60
clocks with 3-cycle strobes, so the bus is almost always idle.

## Files

| file | content |
|---|---|
| `rtl/dcctl_pkg.sv` | widths, bus structs, addresses |
| `rtl/tick_gen.sv` | enable divider: 1 µs tick, 5 µs sampling, Tc |
| `rtl/pwm_gen.sv` | PWM with complementary outputs and period start |
| `rtl/acq_i.sv` | current sampling, averaging and serial divider |
| `rtl/acq_speed.sv` | quadrature decoder and windowed speed count |
| `rtl/acq_period.sv` | signed period of the encoder signal |
| `rtl/exch_slave.sv` | architecture-1 exchange state machine |
| `rtl/arch1_asic.sv` | architecture-1 I/O ASIC |
| `rtl/bus_reg.sv` | one-register memory block with bus and local sides |
| `rtl/pi_current.sv` | current control law |
| `rtl/arch2_asic.sv` | architecture-2 current-control ASIC with exchange |
| `rtl/dc_ctl_top.sv` | both architectures side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dc_ctl_top \
  rtl/dcctl_pkg.sv $(ls rtl/*.sv | grep -v dcctl_pkg) tb/tb_dc_ctl_top.sv
./obj_dir/Vtb_dc_ctl_top
```

Replace `tb_dc_ctl_top` with any other testbench name. The package must come
first on the command line.

`tb_dc_ctl_top` runs the whole design at its default parameters for 55 ms of
simulated time, which takes a few seconds. It contains:

* a motor model per architecture: the current follows the PWM duty with a
  50 µs time constant, and the speed follows the current with a 2 ms time
  constant;
* a DSP bus-master model per architecture, with the speed loop in software
  and, for architecture 1, the current loop in software as well.

The motors start turning backwards, so both speed signs occur. One
architecture-2 exchange is held back on purpose to cause an overrun. The
testbench checks every value that crosses a bus against the block that
produced it. It checks the ASIC's α against an integer model of the PI law,
and that both current loops settle on I_ref. It also counts every mechanism:
interrupts, each kind of transfer, PWM updates, control saturation, the
overrun, both speed signs and the period results of the speed chip. A mechanism that never occurs is a failure.

The module testbenches use small periods (for example Tc = 40 µs at 4
clocks/µs) so that many periods fit in a short run. Their checks cover:

* exact PWM high times;
* averages against an independent sum of the samples the block saw;
* speed counts against the edges that were generated;
* measured periods and their signs against the generated encoder signal;
* the exchange sequences, including foreign addresses and idle-time reads.

## Limits and departures

* **Invented parts.** The control law and its gains are stand-ins, and so
  are the addresses, word widths, clock frequency and synchronisers. They
  are listed under Parameters. The I/O functions, their periods and
  resolutions, the two partitions, the exchange orders and the
  interrupt-based synchronisation are as specified.
* **Speed measurement.** The speed acquisition is described in two ways:
  with a fixed 1 ms period, and as measuring the period of a variable
  frequency signal. Both are built. Architecture 1 uses the 1 ms window
  count, and architecture 2 uses the period measurement, which is where the
  second description appears.
* **Architecture-1 exchange start.** The exchange starts about 0.4 µs after
  the period begins, not exactly at the period start.
* **Wait states.** The bus-timing requirement above (three clocks per strobe)
  is a property of this implementation. A real DSP56600 must be programmed
  with matching wait states.
* **Unchecked cycles.** A DSP cycle to a slave at the wrong point in an
  exchange is not answered, and the slave waits. No timeout or error is
  reported except the architecture-2 overrun count.
* **Not built.** There is no ADC conversion control, no PWM dead time and no
  protection logic (overcurrent trip, PWM enable). None of these was part of
  the described design.

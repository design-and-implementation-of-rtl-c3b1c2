# Time-variable-gain (TVG) controller for a sonar receiver

An echo from a distant target is much weaker than one from a near target,
because sound spreads and is absorbed on the way out and back. The loss is
given by TL = 20 log10(R) + αR, where α is the absorption in dB/m. A sonar
or echo-sounder receiver corrects for it by raising its gain with the time
since the transmit pulse. That is time-variable gain.

This RTL drives the gain of a linear-in-dB variable-gain amplifier (an
AD605-class part). The amplifier takes its gain-control voltage from a
14-bit serial DAC (an AD5641-class part, 0 to 3.3 V). The FPGA writes a new
DAC code every 18.4 µs. Each cycle of about 100 ms (10 Hz pulse repetition)
has two parts:

* **Ramp.** The code rises by 4 per write: 4, 8, 12, … for 3601 writes,
  about 66 ms. This sweeps the control voltage linearly from 0 V up to
  about 2.9 V, so the gain in dB rises linearly with time.
* **Hold.** The code then stays at 14398, which is 2.9 V
  (14398 × 3.3 V / 16384), for the remaining 1799 writes. Late echoes are
  therefore not amplified further, and the receiver does not saturate on
  them.

After that the cycle restarts from the bottom of the ramp. A 0.1 ms transmit
gate marks the start of each cycle, so the ramp is locked to the
transmission.

## Blocks

| file | what it is |
|---|---|
| `rtl/tvg_pkg.sv` | DAC width, code type and state enumeration |
| `rtl/sclk_gen.sv` | divides the 50 MHz clock by 10 into the 5 MHz DAC serial clock and a one-clock `step` enable at each SCLK rising edge |
| `rtl/tvg_fsm.sv` | the TVG state machine: ramp accumulator, hold value, sample and gap counters, SPI serializer |
| `rtl/tx_gate.sv` | 0.1 ms transmit gate opened at each cycle start |
| `rtl/tvg_top.sv` | top level: the three blocks above, with the DAC pins brought out |

Everything runs on the single 50 MHz `clk`. SCLK is a registered divided
clock, not a second clock domain. Every other register changes only on
clocks where `step` is high. So the design advances one state per SCLK
period (200 ns).

## The state machine

Each state lasts exactly one SCLK period:

| state | SYNC# | SDIN | action |
|---|---|---|---|
| INIT | 1 | 0 | clear accumulator and sample count; `cycle_start` is high |
| ADDING | 1 | 0 | clear gap counter; if sample < 5400 then accumulator += 4 and go to SENDING_1, otherwise go to INIT |
| SENDING_1 | 0 | 0 | first power-down bit (PD1 = 0) |
| SENDING_2 | 0 | 0 | second power-down bit (PD0 = 0); if sample < 3601 go to RAMP, else HOLD_STATE |
| RAMP | 0 | accumulator[13 − i] | 14 periods, i = 0 … 13 |
| HOLD_STATE | 0 | 14398[13 − n] | 14 periods, n = 0 … 13 |
| SYNC_HIGH | 1 | 0 | the DAC has its 16 bits and updates its output |
| SENDING_3 | 1 | 0 | gap counter counts 0 … 73 (74 periods), then sample += 1 and go to ADDING |

This gives the following timing, in SCLK periods of 200 ns:

* **One write.** SYNC# is low for 16 periods (3.2 µs). The DAC clocks in 2
  power-down bits and then the 14 code bits, MSB first, on SCLK falling
  edges.
* **One sample.** 1 + 1 + 1 + 14 + 1 + 74 = 92 periods (18.4 µs).
* **One cycle.** INIT + 5400 samples + the final ADDING =
  1 + 5400 × 92 + 1 = 496 802 periods (99.3604 ms).

The design changes its outputs just after SCLK rises. The DAC samples
SDIN on the falling edge, half a period (100 ns) later. SYNC# and SDIN are
registered from the state, one 50 MHz clock (20 ns) after the state
register. This keeps decode glitches off the pins.

In sample k of a cycle (k from 0), ADDING has already added 4,
so the write carries 4·(k+1). The ramp therefore runs 4 … 14404. Its last
two values, 14400 and 14404, are slightly above the hold code 14398, by
6 codes at most, or 1.2 mV. This follows the limit of 3601 ramp samples. If
you want the ramp to end exactly at the hold value, set `RAMP_LIMIT` to 3600
and `STEP` to fit.

At a cycle restart the DAC is not written with 0. The first write of the
new cycle is code 4, one sample period (plus two SCLK periods) after the
last hold write.

## Parameters

All parameters are on `tvg_top` and are passed down. The defaults are the
design values.

| parameter | default | meaning |
|---|---|---|
| `DIV` | 10 | clk cycles per SCLK (50 MHz → 5 MHz) |
| `STEP` | 4 | ramp increment per write |
| `HOLD_CODE` | 14398 | code held after the ramp (2.9 V of 3.3 V) |
| `RAMP_LIMIT` | 3601 | writes with sample index below this carry the ramp |
| `CYCLE_SAMPLES` | 5400 | writes per TVG cycle |
| `GAP_LAST` | 73 | last value of the gap counter in SENDING_3 |
| `TX_STEPS` | 500 | transmit gate length in SCLK periods (0.1 ms) |

The sample counter is 13 bits wide, so `CYCLE_SAMPLES` must stay at or below 8191.
A sample lasts `18 + GAP_LAST + 1` SCLK periods.

## Ports of `tvg_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz board clock |
| `rst_n` | in | 1 | synchronous active-low reset; the machine restarts in INIT |
| `dac_sync_n` | out | 1 | DAC SYNC# |
| `dac_sclk` | out | 1 | DAC SCLK, 5 MHz, free running |
| `dac_sdin` | out | 1 | DAC SDIN |
| `tx_pulse` | out | 1 | transmit gate, high 0.1 ms from each cycle start |
| `cycle_start` | out | 1 | high for the INIT period of each cycle |
| `dout` | out | 14 | code of the write in progress (or the last one) |
| `state` | out | 3 | state machine state (`tvg_pkg::tvg_state_e`) |
| `sample_count` | out | 13 | sample index within the cycle |

## What is outside the RTL

The following parts are analog or bought in. They are not modelled as
synthesizable logic:

* **The DAC.** Its VOUT is the net GAIN_CONTROL. `tb/ad5641_model.sv` is a
  behavioural model of its serial interface, for the testbench only.
* **The amplifier.** A dual variable-gain amplifier with its two channels in
  series, up to 96 dB. The gain slope is 20 dB/V with VREF = 2.5 V, over a
  control range of 0.1 to 2.9 V. GAIN_CONTROL drives both gain inputs.
* **The transmitter.** `tx_pulse` is only its timing gate.

## Where this design makes its own choices

* **16-bit writes.** The two leading bits of each write are power-down bits,
  sent as 0 (normal operation) in SENDING_1 and SENDING_2. This makes the
  write the 16 SCLKs this DAC family expects. The state diagram itself shows
  only the 14 data bits.
* **Gap counter.** The counter in SENDING_3 runs to 73, which gives the
  99.36 ms cycle. That is just under the 100 ms repetition period.
* **Clearing.** INIT clears the accumulator and the sample counter. In the
  hold part the accumulator is no longer used.
* **Reset.** Reset is synchronous and active low. It returns everything to
  INIT, with SYNC# high, SCLK low and the transmit gate closed.
* **Transmit gate.** The gate is derived from the state machine's INIT
  period. How the transmit pulse is produced is not specified beyond its
  0.1 ms length, its 10 Hz rate and its alignment with the TVG.

## Simulation

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb/tb_sclk_gen.sv` | SCLK period and duty cycle, and `step` on each SCLK rise, for DIV = 10 and DIV = 4 |
| `tb/tb_tx_gate.sv` | gate length, rise on the step, no rise without a step, restart while open |
| `tb/tb_tvg_fsm.sv` | reduced sizes (STEP 3, hold 100, 11 ramp and 20 total samples, gap 5): every decoded word, power-down bits, SYNC# low time, write spacing, cycle length, `dout`, state order, reset in mid-write |
| `tb/tb_tvg_top.sv` | full default size, two complete cycles (199 ms simulated) decoded by the DAC model |

`tb_tvg_top` checks the following on every write and cycle:

* all 10 800 codes;
* the 16-period SYNC# low time;
* the 92-period write spacing, which is 94 across a restart;
* the 496 802-period cycle;
* the 0.1 ms transmit gate;
* the 2.9 V hold voltage.

It also counts ramp writes, hold writes, ramp-to-hold switches, restarts and
transmit gates, and fails if any of them never occurs. It takes about 15 s
with Verilator.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tvg_pkg.sv rtl/sclk_gen.sv rtl/tvg_fsm.sv rtl/tx_gate.sv rtl/tvg_top.sv \
    tb/ad5641_model.sv tb/tb_tvg_top.sv --top-module tb_tvg_top
./obj_dir/Vtb_tvg_top
```

For the block testbenches, replace the last testbench file and the top
module name. Each block testbench needs only `tvg_pkg.sv` and its block.

# Built-in delay and crosstalk measurement for an on-chip bus

An on-chip bus can be slowed down by three things: a weak driver, a resistive
or heavily loaded wire, or a receiver with too little gain. Neighbouring
wires also couple noise into each other, and that noise moves the switching
instant of a wire, which shows up as timing jitter. Probing such a bus from
outside disturbs it more than the effect being measured. This design puts the
measurement on chip, and it needs no analog parts. Each wire's delay is
converted into a count by an XOR gate and a counter. By reconfiguring which
ports launch and which loop back the test signal, a slow wire, driver or
receiver can be located. By launching the wire under test at controlled
offsets against its switching neighbours, the crosstalk acting on it can be
plotted over time.

The RTL is SystemVerilog (IEEE 1800-2017). The default configuration is a bus
of 4 wires with 4 ports, each port with its own measurement module, and it is
simulated end to end at that size.

## The measurement principle: an XOR and a counter

Send a square wave of period `T` down a path and compare what comes back (B)
with what was sent (A). `A xor B` is high for `d` picoseconds after every edge,
where `d` is the path delay. Its duty cycle is therefore `2d/T`, which is
`phi/pi` when the delay is read as a phase `phi`. Sample that XOR output `n`
times at instants that bear no relation to the wave. The number of ones `k`
then estimates the duty cycle:

    k = n * phi / pi        =>       d = k * T / (2 n)

No filter and no ADC are needed, only the XOR (the *phase detector*) and a
counter (the *phase difference counter*) clocked by a clock `clk` that is
asynchronous to the wave. Points to keep in mind when using it:

* **Range.** The reading is unambiguous only for `0 <= d < T/2`. Above `T/2`
  it folds back to `T - d`. Choose the test-wave period at least twice the
  longest round trip you expect.
* **Resolution and noise.** One count is `T/(2n)`: 2.4 ps for `T = 20 ns`
  and the default `n = 4096`. With truly random sampling, the statistical
  error is about `sqrt(n p (1-p))` counts, where `p = 2d/T` (at most
  32 counts, about 80 ps, at these settings). A sampling clock whose period
  is not a simple ratio of `T`, plus a little jitter, does better than that.
  A clock period that divides `T` exactly samples only a few phases and gives
  wrong results.
* **Offsets.** Anything in the path that is not the bus (the return
  multiplexer, the loop-back switches) adds delay. A delay element on the
  reference side cancels it. In this RTL those parts have no modelled delay,
  so the 100 ps default delay element appears as a constant −100 ps in every
  reading. The testbenches subtract it.

`phase_diff_counter` puts the asynchronous XOR output through two flops. The
first is the sampling point and the second guards against metastability. A
one-cycle `start` clears `k` and opens a window of exactly `N_SAMPLES` clock
cycles. `busy` is high during the window. `done` rises `N_SAMPLES` clock edges
after the edge that saw `start`, and `count` then holds `k` until the next
start.

## The fabric around the bus

```
            bus wires (4)  ====================================================
              |  drivers/receivers of port 0 ... port 3 (outside this RTL)
        drv_x/drv_e ^  | rcv
                    |  v
   logic --> port_mux <-- bdcm_module[p] --cfg chain--> bdcm_module[p+1] ...
                          |- source_module
                          |    |- timing_gen_chain (TGM) -> timing_select (TSM)
                          |    |        -> polarity_select (PSM)   [crosstalk]
                          |    |- delay_buffer (DMM)               [crosstalk]
                          |    |- return MUX, delay_buffer (delay element)
                          |    '- delay_meas_module: XOR + phase_diff_counter
                          '- loopback_module (switches)
```

`bdcm_top` has one `bdcm_module` per port. In normal mode the port's drivers
take their data and enables (`norm_x`, `norm_e`) from the internal logic. In
test mode the module owns them and plays one of three roles:

| role | drivers carry | enables |
|---|---|---|
| `ROLE_SOURCE` | the test wave, on every data line (the crosstalk variant is below) | `drv_en` |
| `ROLE_LOOPBACK` | `rcv[lb_src]` on wire `lb_dst`; 0 elsewhere | `drv_en` |
| `ROLE_IDLE` | – | none |

The receivers always feed both the logic and the module. The source module's
return multiplexer picks `rcv[ret_lane]` as signal B. The bus drivers,
receivers and wires are not part of the RTL. The top exposes their pins:
`drv_x` (data X), `drv_e` (enable E) and `rcv` (receiver output Y).

### Configuration chain

Every module holds a `bdcm_pkg::cfg_t` word (26 bits at the defaults). The
modules are daisy-chained, port 0 first. While `cfg_shift` is high, each
`clk` edge shifts `cfg_si` into port 0 and moves every module's MSB into the
next module. Shift the words of the last port first, each MSB first. One
`cfg_update` cycle then activates all ports together. `cfg_so` is the end of
the chain. Reset clears every word, which means normal mode.

| field | meaning |
|---|---|
| `test_mode` | 1: the module owns the port's drivers |
| `role` | idle / source / loop-back |
| `drv_en[3:0]` | drivers enabled in test mode |
| `ret_lane` | source: wire whose receiver is measured |
| `lb_src`, `lb_dst` | loop-back: wire received, wire driven back |
| `xt_en` | source: crosstalk configuration |
| `agg_mask[3:0]` | crosstalk: neighbour wires, driven through the DMM |
| `tap_sel` | crosstalk: TGM tap, `t_i = tap_sel × 500 ps` |
| `polarity` | crosstalk: P (0: neighbours switch with the victim, 1: against it) |
| `cal` | crosstalk: measure the tap delay itself (calibration) |

A measurement is started by pulsing `meas_start`. Only a module configured
as source in test mode reacts to it. `meas_done[p]` and `meas_count[p]` give
the result for port `p`. An assertion checks that no wire has enabled
drivers at two ports at once while in test mode.

## Delay measurement and fault diagnosis

A delay test enables exactly two drivers: one at the source port on wire `a`,
and one at a loop-back port on wire `b`. The loop-back port sends wire `a`'s
signal back on wire `b`. The source measures the round trip
`driver(src,a) + wire(a) + receiver(lb,a) + driver(lb,b) + wire(b) + receiver(src,b)`.
A test "fails" if the result is above the expected round trip plus a margin.
Comparing tests that share exactly one component locates a slow one:

* **Wire.** Run tests between adjacent wires (a→a+1, then a+1→a+2, …). A
  wire is slow if both tests that use it fail. If only one test fails, the
  cause is a driver or receiver in that test.
* **Source driver.** Launch on the suspect wire and loop back at two
  different ports onto two different return wires. If both tests fail, the
  common part, the source port's driver, is slow.
* **Source receiver.** Launch on two different wires, and loop both back at
  two different ports onto the suspect return wire. If both fail, the source
  port's receiver is slow.
* The drivers and receivers of the loop-back ports are tested the same way,
  once the source port is known to be good. Any port can take either role.

These decisions are made by the test procedure that reads `meas_count`.
There is no decision logic in hardware.

## Crosstalk profile

In the crosstalk configuration (`xt_en = 1`) the source port drives two kinds
of wire:

* **Neighbour wires** (`agg_mask`) get the wave through the *delay match
  module* (DMM, a fixed buffer).
* **The wire under test** gets the wave through the *timing generation module*
  (TGM, a 48-stage buffer chain), a tap picked by the *timing select module*
  (TSM), and an XOR with `P`, the *polarity select module* (PSM).

The wire under test therefore switches `t_i` after its neighbours, in the
same direction (P = 0) or the opposite one (P = 1). The XOR reference is the
victim signal itself, so the reading is the victim path's delay and does not
depend on `t_i`. The DMM is meant to cancel the TSM and PSM delay. The
procedure:

1. **Calibration.** Set `cal = 1`. The return multiplexer is bypassed and B is
   the DMM output, so the reading is the tap delay `t_i` itself. Do this for
   every tap, because real stage delays vary. Taps beyond `T/2` read folded,
   as `T - t_i`.
2. **Intrinsic delay.** Disable the neighbour drivers and measure `tau_0`.
3. **In-phase.** Set P = 0 and measure `tau_0i` for every tap.
4. **Out-of-phase.** Set P = 1 and measure `tau_1i` for every tap.

`delta_tau_pi = tau_pi - tau_0` plotted against `t_i` is the crosstalk delay
profile. Coupled noise speeds up an edge when the neighbours switch the same
way and delays it when they switch the other way. Because the test wave is
periodic, a tap of `t_i` is also `t_i - T/2` against the neighbours' next
edge, which has the opposite direction. A single sweep therefore shows both a
negative and a positive hump. Taps near `T` stand for small negative
offsets. The 24 ns chain covers a 22 ns window of offsets, for example −2 ns
to +20 ns with `T = 20 ns`.

The return wire can itself have switching neighbours (in the 4-wire setup,
wire 3 returns next to neighbour wire 2). Its edges then pick up crosstalk
too, and the profile is the sum of both. The end-to-end testbench accounts
for that.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NPORTS` | 4 | `bdcm_top` | ports on the bus |
| `BUS_LANES` | 4 | `bdcm_pkg` | wires per port |
| `N_SAMPLES` | 4096 | all measuring blocks | samples per measurement, n |
| `DELAY_PS` | 100 | source | delay element on the reference path |
| `DMM_PS` | 100 | source | delay match module |
| `TGM_STAGES` | 48 | `bdcm_pkg` | TGM stages (taps 0..48) |
| `STAGE_PS` | 500 | source / TGM | TGM stage delay |

Four ports of four wires, the XOR detector, the counter, the source and
loop-back modules, and TGM/TSM/PSM/DMM make up the architecture implemented
here. The sample count, the buffer delays, the chain length, the
configuration chain and the encoding of its word are this design's own
choices.

## Behavioural parts and synthesis

* `delay_buffer` (the delay element and the DMM) and `timing_gen_chain` (the
  TGM) are **behavioural models**: `assign #delay`. A synthesis tool turns
  them into plain wires. In silicon they are buffer chains sized in layout,
  and the calibration step exists because their real delays are not known in
  advance.
* Everything else is synthesizable: about 300 word-level cells and 328
  flip-flops for the 4-port top, mostly the four 13-bit counters, their
  window counters and the configuration registers.
* The XOR output and the receiver outputs are asynchronous to `clk`. Only the
  XOR output is sampled, and it goes through the synchronizer. The test wave
  and `clk` must come from unrelated sources. `clk` also clocks the
  configuration chain.
* All files declare `timeunit 1ps`. The behavioural delays are in ps.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_phase_diff_counter` | k against a reference count of a random bit stream at five densities; window length; restart |
| `tb_delay_meas_module` | delays 0, 1.9, 2.7, 3.9, 7.3 ns between two 20 ns waves, within 100 ps |
| `tb_delay_buffer`, `tb_timing_gen_chain` | edge-to-edge delays, per tap |
| `tb_timing_select`, `tb_polarity_select`, `tb_port_mux`, `tb_loopback_module` | exhaustive or random truth tables |
| `tb_source_module` | return MUX on every wire, crosstalk drive data for both polarities, calibration, crosstalk-mode round trip |
| `tb_bdcm_module` | configuration chain (shift, update, shift-out), normal mode, idle, loop-back and source roles |
| `tb_bdcm_top` | the whole fabric at default parameters on a bus model |
| `tb_bus_delay_range` | one-way delay of a wire with its neighbours switching the same way, silent, and the other way (1.9 / 2.7 / 3.9 ns), through the whole fabric |

`tb_bdcm_top` uses `tb/bus_model.sv`, a behavioural bus. Driver, wire and
receiver delays are 0.4 + 1.9 + 0.4 ns, for 2.7 ns one way. Each can be
raised to inject a fault. A neighbour that switches between 2 ns before and
1.5 ns after an edge speeds that edge up by 0.4 ns (same direction) or slows
it down by 0.6 ns (opposite direction). With both neighbours switching, a
wire's one-way delay therefore ranges from 1.9 ns to 3.9 ns. The testbench runs normal mode; delay
tests on all wires; wire, driver and receiver fault diagnosis with injected
0.8 ns faults; calibration of all 49 taps; the intrinsic delay; and both
polarity sweeps. Every reading is compared with the bus model's delays.
Every mechanism is counted, and one that never happens counts as a failure.
It makes 999 checks and runs in about 30 s.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
          rtl/bdcm_pkg.sv tb/tb_bdcm_top.sv --top-module tb_bdcm_top -o sim
./obj_dir/sim
```

Replace `tb_bdcm_top` with any other testbench name.

## Departures and limitations

* **One loop per loop-back module.** A loop-back module closes one loop at a
  time. Two loops could be set up at once on one port, but the source has one
  return multiplexer and measures them one after the other anyway.
* **Delay element in the crosstalk configuration.** The same delay element
  sits on the reference path in both configurations, so both read the same
  offset.
* **Calibration bypass.** How the TGM taps are calibrated is this design's
  choice: a bypass of the return multiplexer (`cal`).
* **Unmodelled delays.** The multiplexers, switches and XOR have no modelled
  delay. On silicon, `DELAY_PS` and `DMM_PS` must be matched to the extracted
  delays. The −100 ps offset in the readings only holds for this model.
* **Offsets before the neighbours' edge.** With the DMM default, tap 0
  switches 100 ps before the neighbours. Larger lead times come only from the
  periodic wave (taps near `T`), or from a larger `DMM_PS`.
* **Not in this RTL.** The bus drivers, receivers and wires, the test-wave
  generator, and the test procedure that sequences configurations and
  interprets the counts.
* **Bus model accuracy.** The bus model's crosstalk is a step function of
  edge timing, not a circuit simulation. It exercises the measurement
  mechanics, not the shape of a real profile.

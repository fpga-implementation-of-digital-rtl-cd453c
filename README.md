# Digital controller for a three-phase shunt active power filter

A shunt active power filter sits in parallel with a nonlinear load. It injects a
current that cancels the harmonic and reactive part of the load current, so the
supply only delivers a sinusoidal current in phase with its voltage. This RTL is
the digital part of such a filter. It takes sampled currents and produces the
gate pulses for the inverter legs.

Each phase has two parts:

1. A **PI regulator** built as a small FSMD (finite-state machine with
   datapath). It compares the reference current with the measured load current
   and turns the error into a current command `I_inj_num`. One 25-bit ALU and a
   16-word RAM do all the arithmetic in sequence: thirty states, 29 of them
   computing, one command every 29 clocks.
2. A **hysteresis current controller (HCC)** that turns the command into the
   complementary gate signals `C` and `C'` of one inverter leg. It uses an
   up/down counter, a comparator with a band, a clock divider and a dead band.

The design follows a published FPGA controller: the FSMD regulator, its state
schedule, ALU codes and memory addresses, and the HCC structure and signals.
Widths, gains, step sizes and the exact role of the HCC counter are not fully
specified there. Where this design had to choose, the sections below and the
opening comment of each file say so.

```
             iref_num[p] iload_num[p]                 hcc_band  hcc_load hcc_ena
                  |          |                              |       |       |
            +-----v----------v-----------------+     +-----v-------v-------v------+
  start --->|  pi_regulator  (per phase p)     |     |  hcc  (per phase p)        |
            |  pi_fsm --ctrl_t--> pi_datapath  |     |  clk_div -> updown_counter |
            |            pi_ram, pi_mux,       |     |  comparator, dead band     |
            |            pi_alu, pi_reg        |     |                            |
            +------------+-----------+---------+     +--------+-----------+-------+
                         | inj_num   | inj_en  -------------->|           |
                         +---------------------------------->  gate_c[p]  gate_cn[p]
```

`apf_controller` (the top) holds three such pairs for phases a, b and c.

## The PI regulator

### Arithmetic

Inputs are 16-bit signed samples. `I_ref_num` is the wanted source current and
`I_load_num` the measured one, both scaled to full scale 2^15. With `I_max` the
full-scale current in amperes, the error in units of 1/1024 A is

    e(n) = ((I_ref_num * I_max) >>> 5) + ((I_load_num * (-I_max)) >>> 5)

(1024 / 2^15 = 2^-5). The regulator is the incremental PI law

    u(n) = u(n-1) + K * e(n) + K(h/T - 1) * e(n-1)

Here K is the proportional gain, h the update period and T the integral time.
The two gains are stored coded × 1024. The command is

    I_inj_num = limit( u(n) >>> 5 ),  limit = ±LIMIT (default ±32767)

Every ALU result saturates to 25 bits; nothing wraps around. `u` saturates the
same way, so a long stretch at the limit cannot wind the accumulator beyond
±2^24.

### ALU operations (`alu_op_e`)

| code | operation | used for |
|------|-----------|----------|
| 000 | a + b | error sum, gain-term sum, accumulation |
| 001 | a × b | scaling the samples by ±I_max |
| 010 | (a × b) >>> 10 | products with the gains |
| 011 | a >>> 5 | the two ">>5" scalings |
| 100 | a | copying e(n) and u(n) into their "previous" words |
| 101 | clamp a to ±LIMIT | limiter |
| 110 | a − b | available, not used by the schedule |

### Memory map (16 words × 25 bits)

| addr | content | addr | content |
|------|---------|------|---------|
| 0 | I_ref_num | 8 | I_ref·I_max, then the load term >>5 |
| 1 | I_load_num | 9 | I_load·(−I_max), then e(n−1)·K2 |
| 2 | I_max (constant) | 10 | reference term >>5 |
| 3 | −I_max (constant) | 11 | e(n) |
| 4 | e(n−1) | 12 | e(n)·K |
| 5 | K (constant) | 13 | e(n)·K + e(n−1)·K2 |
| 6 | K2 = K(h/T − 1) (constant) | 14 | u(n) |
| 7 | u(n−1) | 15 | u(n) >>> 5 |

Reset loads the constants from the parameters `IMAX`, `K1` and `K2` and clears
every other word. The RAM has two ports. Reads are asynchronous, like LUT RAM.
Port A writes the input multiplexer's output: the ALU result register, I_ref_num
or I_load_num. Port B writes the ALU result register.

### The state schedule

Most operations take two states. The first addresses the operands and selects
the ALU operation; the result goes into the ALU result register on that clock
edge. The second writes the result to RAM.

| state | action | state | action |
|-------|--------|-------|--------|
| S0 | mem[0] ← I_ref_num | S14 | mem[4] × mem[6] (gain) |
| S1 | mem[1] ← I_load_num | S15 | mem[9] ← e(n−1)·K2 |
| S2 | mem[0] × mem[2] | S16 | pass mem[11] |
| S3 | mem[8] ← product | S17 | mem[4] ← e(n) (port B) |
| S4 | mem[1] × mem[3] | S18 | mem[12] + mem[9] |
| S5 | mem[9] ← product | S19 | mem[13] ← du |
| S6 | mem[8] >>> 5 | S20 | mem[13] + mem[7] |
| S7 | mem[10] ← result | S21 | mem[14] ← u(n) (port B) |
| S8 | mem[9] >>> 5 | S22 | pass mem[14] |
| S9 | mem[8] ← result (port B) | S23 | mem[7] ← u(n) |
| S10 | mem[10] + mem[8] | S24 | mem[14] >>> 5 |
| S11 | mem[11] ← e(n) | S25 | mem[15] ← result |
| S12 | mem[11] × mem[5] (gain) | S26 | limit mem[15] |
| S13 | mem[12] ← e(n)·K | S27 | output register ← result |
| | | S28 | `inj_en` high: new `inj_num` valid |

**Differences from the published schedule.** The published table copies e(n)
into address 4 (S14/S15) and only then reads address 4 as e(n−1) (S16). It also
stores u(n) in address 10 before adding address 10 as u(n−1) (S20–S22), and S7
of every pass overwrites address 10. Read literally, the regulator would use
e(n) and u(n) twice each and would lose its integral state. This design keeps
the 29 states, the ALU codes and the other addresses, and:

- multiplies e(n−1) by K2 first (S14/S15), then copies e(n) (S16/S17);
- keeps u(n−1) in address 7, which the published table leaves unused;
- forms u(n) (S20/S21) and then copies it into address 7 (S22/S23).

**Timing.** The machine sits in the idle state `TOP` while `rst` is high or
`start` is low. `start` low sends it back to `TOP` at once, even mid-pass. With
`start` high it steps S0…S28 and then goes straight back to S0. The inputs are
sampled at the ends of S0 and S1. `inj_num` changes on the edge that ends S27.
`inj_en` is high for the single clock of S28, so `inj_num` is valid whenever
`inj_en` is high. The first `inj_en` comes 29 clocks after the edge that sees
`start` high, and later ones every 29 clocks. At 50 MHz, for example, that is
one update every 580 ns per phase.

`sat` goes high when the last limiter step clamped its operand. It is the
datapath's status signal; the schedule itself does not branch on it.

## The hysteresis current controller (`hcc`)

The HCC latches the command when `inj_en` is high. An up/down counter makes a
current ramp. The counter steps by `STEP` once per pulse of the clock divider,
which comes every `DIV` clocks. It counts up while the upper switch is on and
down while it is off (`DOWN` = not C). So the ramp acts as a digital model of
the current the leg injects. With `delta = ramp − command`, the comparator
applies the classic two-level rule:

- `delta > band`: upper switch off, lower on (C = 0);
- `delta < −band`: upper switch on (C = 1);
- inside the band: no change.

The ramp therefore oscillates around the command, within about `band + STEP`.
Each swing across the band lasts about `ceil(2·band / STEP) · DIV` clocks. So
the switching frequency is roughly

    f_sw ≈ f_clk / (2 · DIV · ceil(2·band / STEP))

This mirrors f = V/(ΔI·L) for a real leg: the ramp slope plays the part of
V/L and the band the part of ΔI.

Every change of the switch state first turns both gates off. The new gate turns
on only after the dead band: exactly `DEAD + 1` clocks with both outputs low.
An assertion checks that `C` and `C'` are never high together. `ena` low
freezes the comparator, so no switching happens. `load` restarts the ramp at
the latched command.

The original design names an up/down counter whose band is compared with the
command. It does not say what the counter counts. Reading it as the ramp above
is this design's interpretation. For a leg driven from measured inverter
current, replace the counter output with the sampled current. The comparator
and dead band stay the same.

## Parameters

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| `NPH` | 3 | phases | original design (three HCCs) |
| `IMAX` | 20 | full-scale current, A | this design |
| `K1` | 102 | K × 1024 (K = 0.1) | this design, after the filter's KP = 0.1 |
| `K2` | −51 | K(h/T − 1) × 1024 (h/T = 0.5) | this design |
| `LIMIT` | 32767 | limiter bound | this design (16-bit output) |
| `DIV` | 8 | clock divider | this design |
| `STEP` | 64 | ramp step per divider pulse | this design |
| `DEAD` | 4 | dead band, clocks | this design |
| `apf_pkg::DATA_W` | 25 | RAM/ALU word | original design (25-bit ALU) |
| `apf_pkg::IO_W` | 16 | sample and command width | original design |

The gains and `I_max` depend on the plant. Set them for the inverter, the
inductor and the sampling rate in use.

## Top-level ports (`apf_controller`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; asynchronous active-high reset |
| `start` | in | 1 | run the regulators |
| `iref_num[3]`, `iload_num[3]` | in | 16 signed | reference and load current samples per phase |
| `hcc_load`, `hcc_ena` | in | 1 | restart the ramps; enable the comparators |
| `hcc_band` | in | 16 | hysteresis band |
| `gate_c`, `gate_cn` | out | 3 | C and C' per leg |
| `inj_num[3]`, `inj_en` | out | 16 / 3 | commands and their strobes |
| `sat`, `busy`, `ramp[3]` | out | | limiter status, regulator active, HCC ramps |

`start`, `hcc_load`, `hcc_ena` and `hcc_band` are shared by the three phases.
Every phase has its own regulator, and the three run in lock step.

## Files

- `rtl/apf_pkg.sv`: widths, ALU and multiplexer codes, the control word
  `ctrl_t`, the memory map.
- `rtl/pi_fsm.sv`, `rtl/pi_datapath.sv`, `rtl/pi_ram.sv`, `rtl/pi_alu.sv`,
  `rtl/pi_mux.sv`, `rtl/pi_reg.sv`, `rtl/pi_regulator.sv`: the regulator.
- `rtl/clk_div.sv`, `rtl/updown_counter.sv`, `rtl/hcc.sv`: the HCC.
- `rtl/apf_controller.sv`: the top.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -Irtl --top-module tb_apf_controller \
          rtl/apf_pkg.sv tb/tb_apf_controller.sv
./obj_dir/Vtb_apf_controller
```

Use the same command for any other testbench; change the name twice.
`tb_apf_controller` runs the top at its default parameters. It drives three
50 Hz-like references (64 updates per period, 120° apart) against load currents
that carry a fifth harmonic and a reactive part, for 1000 updates per phase.
It checks every command against an integer model of the PI law and the 29-clock
update period. Every clock it checks that the gates of a leg never overlap,
and that each leg's comparator turns off the right gate when its ramp leaves
the band around that leg's own command. It also pushes phase a into the
limiter, stops and restarts the regulators, pulses LOAD and holds Ena low. It counts each of these events and fails if one never
happens. The whole run takes a few seconds.

`tb_hcc` also checks the ramp direction, the band bound, the dead-band length
and the half-period length. `tb_pi_fsm` compares every control word of the 29
states with an independently written table.

## Limits

- The reference-current extraction is outside this RTL: the synchronous
  reference frame transform, its PLL and low-pass filter, and the DC-link
  voltage regulator. `I_ref_num` and `I_load_num` arrive as samples.
- The analog front end and the inverter are outside it too.
- Only the fixed-band two-level HCC is built. The three-level and adaptive-band
  controllers are not.
- The RAM is reset to its constants, so synthesis maps it to flip-flops, not to
  LUT RAM: 3 × 16 × 25 bits. Move the constant loading into states before S0 if
  LUT RAM is wanted.
- The ramp-based HCC reproduces the switching law, but not a measured-current
  loop. See the end of the HCC section.

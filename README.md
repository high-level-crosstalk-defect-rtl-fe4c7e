# Crosstalk coupling-defect model for an SoC bus

Long on-chip buses are dominated by the coupling capacitance between
neighbouring wires. When aggressor wires switch, they inject current into a
victim wire. The victim then sees a glitch, or its own edge becomes slower or
faster. A process variation or a manufacturing defect that enlarges some
coupling capacitances can turn this noise into a wrong value at the receiver.
Checking whether a test (functional, scan or BIST) catches such *crosstalk
defects* normally takes SPICE, which is too slow to run over a whole test
program.

This RTL replaces the wires of a bus, inside an ordinary digital
simulation, with a **coupling defect-simulation model**. For every vector the
drivers put on the bus, the model decides from a handful of calibrated
numbers whether each receiver samples a correct value, a glitch, a late edge
or an early edge. It then hands the digitized result to the receiving logic.
Defects are injected by changing coupling capacitances in a parameter file,
so the same test can be re-run against many defects at simulation speed.

The design is written as synthesizable SystemVerilog, so it can also be
placed in an emulator or an FPGA prototype next to the cores it connects.

## From coupling capacitance to a digital error

Model each driver as a ramp source with a linear resistance. The noise on a
victim wire *i* then grows linearly with

    CC_eff(i) = sum over j != i of  S_j * C_ij

where `C_ij` is the coupling capacitance between wires *i* and *j* and `S_j`
is the transition direction of wire *j*: +1 rising, −1 falling, 0 stable.
Two properties of capacitive crosstalk with strong drivers make this sum
sufficient:

* the noise depends on the **sum** of the triggered coupling capacitances,
  not on how that sum is split among the aggressors;
* the noise grows **monotonically** with that sum.

So for each kind of error there is a **threshold capacitance** `Cth`. It is
calibrated once, by circuit simulation, for a given receiver (threshold
voltage, setup and hold time, sampling instant). An error occurs exactly
when `CC_eff` reaches it. The receiver's voltage levels and timing window
never need to be modelled. Only the ratio `CR = CC_eff / Cth` matters,
compared with ±1. The hardware compares `CC_eff` with `±Cth` directly, with
no divider.

Example with four wires. Wire 1 stays at 0, wire 2 rises, wire 3 falls and
wire 4 rises (vector `0010 → 0101`, wire 1 written first). Then
`CC_eff(1) = C12 − C13 + C14`, and wire 1 shows a positive glitch if that
reaches its positive-glitch threshold.

## The six errors, and what the receiver samples

The victim's own transition selects which errors can happen. The sign of
`CC_eff` selects which one does:

| victim    | condition             | error           | receiver samples (this design)             |
|-----------|-----------------------|-----------------|--------------------------------------------|
| 0 → 0     | `CC_eff ≥ +Cth_pg`    | positive glitch | 1 instead of 0                             |
| 1 → 1     | `CC_eff ≤ −Cth_ng`    | negative glitch | 0 instead of 1                             |
| 0 → 1     | `CC_eff ≤ −Cth_rd`    | rising delay    | the old 0                                  |
| 1 → 0     | `CC_eff ≥ +Cth_fd`    | falling delay   | the old 1                                  |
| 0 → 1     | `CC_eff ≥ +Cth_sr`    | rising speedup  | this word correct; **previous** word gets 1 |
| 1 → 0     | `CC_eff ≤ −Cth_sf`    | falling speedup | this word correct; **previous** word gets 0 |

A delay means opposing aggressors slowed the edge, so it misses the
sampling instant. A speedup means aggressors moving the same way make the
edge arrive early. The early edge is harmless for the word it carries, but it
breaks the hold time of the flop that is still capturing the word before.
The model therefore keeps each word for one extra clock, so that the next
vector's speedups can still reach it. This is why a word leaves the model
two clocks after it entered.

How each effect appears in a cycle-level receiver word is this design's
reading. The method itself describes the effects as waveforms: a pulse, a
late edge and an early edge.

A threshold of 0 disables its fault.

## Calibration values

Capacitances are 16-bit unsigned numbers in units of 0.1 fF
(1 pF = 10000). The defaults describe the six-wire bus on which the method
was validated. Wire *k* is bit *k−1* of every vector.

* Nominal couplings, all of them couplings of wire 3: C13 = 0.20 pF,
  C23 = 0.30 pF, C34 = 0.30 pF, C35 = 0.20 pF, C36 = 0.098 pF. Their sum is
  1.098 pF. All other pairs are 0.
* The threshold for a rising delay on wire 3 depends on the design margin,
  i.e. the slack left for process variation. It is 1.098 pF × (1 + margin):

  | `DESIGN_MARGIN` | 0 %       | 5 % (default) | 10 %      | 15 %      |
  |-----------------|-----------|---------------|-----------|-----------|
  | `Cth`           | 1.0980 pF | 1.1529 pF     | 1.2080 pF | 1.2627 pF |

  At reset, every fault of every receiver starts with this threshold. Other
  receivers and faults were not calibrated. Write their own values through
  the configuration port when they are known.

So the defect-free bus never errs at a 5 % margin. The worst case on wire 3
is 1.098 pF against 1.1529 pF. About +5 % on the couplings of wire 3 is
enough to reach an error.

The published coupling table labels its first column C12. Since every row's
threshold is the sum of all five columns, and the experiment excites all of
them against wire 3, this design reads that column as C13.

## Defects and the defect library

`xtalk_defect_injector` holds a library of 32 entries. Each entry is
`{a, b, pct, last}`: "scale coupling C_ab by (100 + pct) / 100". A defect is
a run of entries that ends at one with `last` set, so one defect can touch
several couplings.

* `inj_start` with `inj_idx` walks the run and writes one perturbed
  capacitance per clock into the parameter files.
* `inj_restore` writes the nominal values of the same pairs back.

The perturbation always starts from the nominal value, so defects do not
accumulate. Results are clamped to 0 … 6.5535 pF. The entry format, the
percent scaling and the library size are this design's choices.

## The bidirectional bus (`xtalk_bidir_bus`)

```
            a_tx ──► [ coupling model A→B ] ──► b_rx
 core A                     ▲ param file A→B ◄─┐            core B
 (ports)    a_rx ◄── [ coupling model B→A ] ◄── b_tx        (ports)
                            ▲ param file B→A ◄─┤
                                               └── defect library / injector
```

Core A and core B drive the same wires in turn (`dir = 0`: A drives;
`dir = 1`: B drives). Drivers and receivers swap with the direction, so
there is one model per direction. Each model has its own parameter file,
because the thresholds belong to the receivers of that direction. A defect
is a change of the physical wires, so the injector writes it into both files
in the same clock.

Ports (N = 6, all synchronous to `clk`, active-low synchronous `rst_n`):

* `a_tx_valid/a_tx_data`, `b_tx_valid/b_tx_data`: driver vectors, one per
  clock. A vector on the side that is not driving is ignored.
* `*_rx_valid`, `*_rx_data`: the word the receivers sample, two clocks after
  it was driven.
* `*_rx_effect[i]`: the error code (`effect_e`) of the transition into that
  word on wire *i*.
* `*_rx_hold_mask`: bits that a speedup of the following word overwrote.
* `*_rx_err`: set when any of the above is present.
* `cfg_en/cfg_sel/cfg_wr`: one write per clock into the A→B (`cfg_sel = 0`)
  or B→A parameter file. `cfg_wr.kind` is `PW_CAP` for a coupling, written
  symmetrically, or `PW_CTH` for threshold `b` (a `fault_e` index) of
  receiver `a`. Writes are allowed only while `cfg_ready` is high; an
  assertion enforces this.
* `lib_we/lib_addr/lib_wdata`, `inj_start/inj_idx/inj_restore`,
  `inj_busy/inj_done`: the defect library.

Each model remembers the last vector it carried. After reset the wires are
taken to rest at all zeros. The cores and their bus protocol are outside
this design. The `*_tx`/`*_rx` ports are where they connect.

## Inside one model (`xtalk_coupling_model`)

One input vector per clock goes through three combinational stages:

1. `xtalk_transition_dir`: `S` for each wire, from the previous and the new
   vector.
2. `xtalk_noise_est`: `CC_eff` for every wire at once. This is an
   add/subtract tree per victim, 20-bit signed, which cannot overflow for
   N = 6.
3. `xtalk_error_digitizer`: the table above.

The sampled value and speedup mask are then registered into a one-word hold
stage, and from there into the output register. Described as software, the
method walks the wires one after another. Here all N wires are evaluated in
the same cycle, which gives the same result.

## Files

| file                               | contents                                              |
|------------------------------------|-------------------------------------------------------|
| `rtl/xtalk_pkg.sv`                 | types, encodings, nominal couplings, thresholds per margin |
| `rtl/xtalk_transition_dir.sv`      | transition direction S                                |
| `rtl/xtalk_noise_est.sv`           | effective coupling capacitance                        |
| `rtl/xtalk_error_digitizer.sv`     | error criteria                                        |
| `rtl/xtalk_coupling_model.sv`      | one direction of the bus                              |
| `rtl/xtalk_param_file.sv`          | couplings and thresholds, writable                    |
| `rtl/xtalk_defect_injector.sv`     | defect library and injection                          |
| `rtl/xtalk_bidir_bus.sv`           | top: bidirectional bus                                |
| `tb/tb_*.sv`                       | self-checking testbenches, one per module, plus `tb_xtalk_margin_sweep` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its
own. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/xtalk_pkg.sv tb/tb_xtalk_bidir_bus.sv --top-module tb_xtalk_bidir_bus
./obj_dir/Vtb_xtalk_bidir_bus
```

Replace the testbench name to run any other one. All run in well under a
second.

* The block testbenches compare against arithmetic done independently in
  the testbench. This includes exhaustive direction checks, threshold
  boundaries (`CC_eff = Cth` errs, one unit less does not) and random
  matrices. `tb_xtalk_coupling_model` checks the model at 6 and at 24 wires,
  through the helper `tb_xtalk_model_checker`.
* `tb_xtalk_bidir_bus` runs the top at its default size. It covers:
  * nominal traffic with no false errors;
  * threshold calibration;
  * 200 random defects on wire 3 between −20 % and +30 %, where a rising
    delay must appear exactly when the perturbed sum reaches 1.1529 pF;
  * random defects with random traffic, gaps and direction changes.

  It also counts that each error type, the speedup hold corruption,
  injection, restore and a direction change all occurred.
* `tb_xtalk_margin_sweep` runs the validation grid: design margins of 5, 10
  and 15 %, perturbation ranges of ±10 … ±30 % on the five couplings of
  wire 3, and five vector pairs with 40 defects each. It prints the number of
  erring cases per cell. A typical run:

  ```
  margin | +/-10%  +/-15%  +/-20%  +/-25%  +/-30%
     5%  |     2       6       5       9      10
    10%  |     0       0       0       3       5
    15%  |     0       0       0       0       2
  ```

## How far to trust it

* The model is only as good as the capacitive abstraction. It ignores
  inductance, distributed RC and driver non-linearity. In the published
  comparison with circuit simulation, the model agreed in about 98–99 % of
  random cases. The disagreements clustered where `CC_eff` lies within
  roughly ±9 % of `Cth`. Treat results in that band as uncertain.
* One threshold for all six faults and all receivers is a placeholder
  until each is calibrated.
* The cycle-level reading of the effects is a choice of this design:
  sampled value inverted, old value, or previous word corrupted. A design
  whose sampling instant or hold margin differs may need another mapping.
  The place to change it is the `rx_now`/`speedup` logic in
  `xtalk_coupling_model`.
* The method's model wakes up on any change of the bus wires. This design
  is clocked: it takes one vector per clock, as on a synchronous bus.
* `inj_restore` and every perturbation start from the compile-time nominal
  couplings in `xtalk_pkg::default_cap`, not from couplings written later
  through the configuration port. To change the layout, edit that function.
* After a direction change, each model computes transitions from the last
  vector it carried itself, not from the last vector the other side drove.
* The symbolic vector pairs of the published accuracy tables are not
  available. The sweep testbench uses random pairs instead, plus the one
  pair that drives wire 3 against all its aggressors.

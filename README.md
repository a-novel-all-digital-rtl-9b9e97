# A 4-bit flash ADC built mostly from digital gates

A flash converter compares its input against every decision level at once.
One comparator per level, 2^N − 1 = 15 of them for 4 bits, produces a
thermometer code. An encoder turns that code into binary. This design pushes
as much of that as possible into standard digital logic:

* **The comparators** are not differential amplifiers. Each one is a resistor
  summer, two symmetric inverters and a few NAND/NOR-style gates. A small
  feedback loop moves the common-mode level until the inverters can tell the
  two inputs apart.
* **The encoder** does not decode the thermometer code. It *counts the ones*
  with a Wallace tree of full adders. A bubble in the thermometer code then
  shifts the result by only the number of misplaced bits. It cannot produce a
  wild code.
* **The encoder is pipelined**, with a row of flip-flops between the adder
  levels. Each 5 ns clock period (200 MS/s) then has to cover only one level
  of full adders.

Only the resistor ladder and the analog front end of each comparator stay
analog. In this repository those parts are behavioural SystemVerilog models.
The decision logic of the comparator and the whole encoder are synthesizable
RTL.

```
 vrefh ─┬─ R/2 ─┬─ R ─┬─ ... ─┬─ R/2 ─ vrefl        ref_ladder
        │   vref[14]  vref[13]  ...  vref[0]
        │       │      │               │
 vin ───┼──►[cmp 15] [cmp 14]  ...  [cmp 1]          15 x diff_comparator
                │      │               │             (cmp k: vin vs vref[k-1])
             thermo[14]  ...        thermo[0]
                └──────┴───────┬───────┘
                        wallace_encoder_pipe         FA tree + register rows
                               │
                             y[3:0]
```

## Signal levels in simulation

The analog nodes are integers in microvolts, of type `flash_adc_pkg::uvolt_t`
(signed 32 bit). The nodes are the input, the references, the ladder taps and
each comparator's feedback node. With integers they can travel through
ordinary ports and packed arrays. Nothing is `real`, and no simulator-specific
mixed-signal features are needed.

The operating point lives in `flash_adc_pkg`:

| constant | value | meaning |
|---|---|---|
| `ADC_BITS` | 4 | resolution N |
| `N_CMP` | 15 | comparators, 2^N − 1 |
| `VDD_UV` | 1.8 V | supply; inverter trip point is VDD/2 = 0.9 V |
| `VREFH_UV` | 1.5 V | top of the ladder |
| `VREFL_UV` | 0.7 V | bottom of the ladder |
| `CLK_PERIOD_PS` | 5000 | 200 MS/s |

## The gate-based comparator (`diff_comparator`, `cmp_logic`)

This is the unusual part of the design.

A CMOS inverter is a crude comparator against a fixed level, its trip point
(VDD/2 for a symmetric inverter). Two inverters fed with V_P and V_N tell
which input is larger only if the trip point lies between them. When both
inputs are below the trip point, or both above, the two inverter outputs
agree. They then carry no information.

The circuit removes that restriction with common-mode feedback:

1. A four-resistor summer forms VS_P = (V_P + Vf)/2 and VS_N = (V_N + Vf)/2.
   Vf is a voltage held on a small capacitor Cf, and both inputs get the same
   Vf.
2. Inverter chains turn VS_P and VS_N into logic levels O_P and O_N.
3. The decision logic looks only at O_P and O_N:

   | O_P | O_N | outputs FV_OUTP / FV_OUTN | feedback |
   |---|---|---|---|
   | 1 | 0 | 1 / 0 (V_P > V_N) | idle |
   | 0 | 1 | 0 / 1 (V_P < V_N) | idle |
   | 0 | 0 | hold previous | raise Vf (`fb_up`) |
   | 1 | 1 | hold previous | lower Vf (`fb_dn`) |

Both summed voltages move together with Vf. When Vf rises, the larger input
crosses the trip point first. When Vf falls, the smaller input drops below it
first. Either way, the loop stops in a state where O_P ≠ O_N, and that state
says which input is larger. The trip point never has to sit between the raw
inputs.

In the flash ADC, vin goes to the positive input and a ladder tap to the
negative input. Comparator k therefore outputs 1 when vin is above tap k − 1.

**`cmp_logic`** is the synthesizable decision block:

* `fb_up` = NOR(O_P, O_N).
* `fb_dn` = AND(O_P, O_N).
* The output pair is a latch that is transparent while O_P ≠ O_N. It models
  the output transistors, which stay off until the feedback has produced
  distinguishable levels.
* `rst_n` puts the latch in the "input below reference" state.

This latch is intentional. It is the only latch in the design, 15 bits in the
full converter.

**`diff_comparator`** is the behavioural model around `cmp_logic`:

* O_P is `(vinp + vf) > VDD`, which is the same as VS_P > VDD/2. O_N is
  formed the same way.
* Every 50 ps (`STEP_PS`), Vf moves in the requested direction by at most
  50 mV (`VF_SLEW_UV`, 1 V/ns). It never moves past the point where the first
  inverter switches, which stands in for Cf charging only until a decision
  appears. Vf is clamped to 0..VDD.
* The decision reaches `fv_outp`/`fv_outn` after a fixed 2.96 ns (`T_PD_PS`),
  the delay quoted for this comparator.
* The model resolves any non-zero input difference, down to 1 µV. Exactly
  equal inputs never resolve, and the outputs then keep their last value.
* Offset (about 5 mV in transistor-level Monte Carlo), noise and power are
  not modelled.
* The slew rate and the time step are this model's own choices.

The worst case for settling comes when the input crosses a threshold after
sitting far from it. Vf then has to move across the whole gap, at most
0.8 V, which takes ≤ 0.8 ns. Worst-case settling is therefore about 3.8 ns,
inside the 5 ns period.

## The Wallace tree encoder (`wallace_encoder`, `wallace_encoder_pipe`)

The output code is the number of ones among the 15 comparator outputs. The
tree builds that count from full adders only, 2^N − N − 1 = 11 of them for
N = 4:

* **Level 1.** Four full adders each count three input bits into a 2-bit
  count.
* **Level L > 1.** Each node (`wallace_node`, width W = L) adds two L-bit
  counts from the level below. It is a ripple of L full adders. One further
  input bit enters the carry-in of the lowest adder. The result has L + 1
  bits.
* **Level N − 1.** A single node. Its 4-bit result is `y`.

| level | nodes | full adders | counts |
|---|---|---|---|
| 1 | 4 | 4 | 3 bits each → 2-bit |
| 2 | 2 | 2 × 2 | 7 bits each → 3-bit |
| 3 | 1 | 3 | 15 bits → 4-bit |

Input assignment (a choice of this design; the count does not depend on it):

* Node j of level L counts the contiguous range of input bits
  `[j·2^(L+1), (j+1)·2^(L+1) − 2]`.
* The middle bit of that range, `j·2^(L+1) + 2^L − 1`, is the node's carry-in.
* The bits below the middle belong to child 2j, and the bits above it to
  child 2j + 1.

Node outputs are packed into one flat vector. The offset of level L is
`sum over k < L of 2^(N−1−k)·(k+1)`, computed by a constant function.

Because the encoder only counts, it needs no bubble corrector:

* A first-, second- or third-order bubble (zeros inside the run of ones)
  lowers the code by the number of zeros.
* A stray one above the run raises it by one.

**Pipelining.** `wallace_encoder_pipe` inserts D flip-flop rows between adder
levels. `PIPE_MASK` bit L − 1 puts a row after level L, for L = 1 … N − 2.

* A row holds the node outputs of its level. It also holds every input bit
  that a later level still needs, so each level's three operands always come
  from the same sample.
* Level-1 inputs and last-level outputs are not registered.
* With the default mask `2'b11`, rows sit after levels 1 and 2. The input is
  sampled at a rising edge and its code appears on `y` after the second
  following rising edge (latency 2). One sample is accepted per clock.
* `PIPE_MASK = 2'b10` keeps only the row in front of the last level
  (latency 1). This is the placement found in the reference synthesized
  netlist, except that the one input bit that bypasses the registers there is
  registered here. Without that register, the bit would be added to a count
  from the previous sample.

## The reference ladder (`ref_ladder`)

The ladder is a resistor string with R/2 at both ends and R between the 15
taps. Tap k sits at

    vref[k] = vrefl + (vrefh − vrefl) · (2k + 1) / 30

With 1.5 V and 0.7 V, the taps run from 726.7 mV to 1473.3 mV in steps of
53.3 mV. The string is ideal: no loading and no mismatch. Values are rounded
to the nearest microvolt.

## The converter (`flash_adc`)

Parameters:

| parameter | default | effect |
|---|---|---|
| `N` | 4 | resolution |
| `PIPELINED` | 1 | 1: `wallace_encoder_pipe`; 0: combinational `wallace_encoder` |
| `PIPE_MASK` | `2'b11` | register rows of the pipelined encoder |
| `T_PD_PS` | 2960 | comparator propagation delay |

Ports:

* `clk`
* `rst_n`: asynchronous, active low. It clears the encoder registers and the
  comparator output latches.
* `vin`, `vrefh`, `vrefl`: microvolts.
* `y[3:0]`: the output code.
* `thermo[14:0]`: the comparator outputs, brought out for observation.

Timing:

* The comparators run continuously. There is no sample-and-hold.
* The first encoder register row is the sampling point. `vin` must have been
  stable for about 3–3.8 ns before that rising edge.
* With the defaults, `y` carries the code of the sample taken at edge e from
  edge e + 2 on.

Synthesizability:

* `flash_adc`, `ref_ladder` and `diff_comparator` are simulation-only,
  because they contain the behavioural analog parts.
* `full_adder`, `wallace_node`, `wallace_encoder`, `wallace_encoder_pipe` and
  `cmp_logic` are synthesizable.

## Where this RTL departs from, or goes beyond, its source description

* **Ladder step.** The ladder follows the drawn topology (R/2 ends, 14 × R),
  so the step is (vrefh − vrefl)/15 = 53.3 mV. The source's LSB formula
  divides by 16 and quotes 50 mV.
* **Bottom reference.** It is 0.7 V. That value agrees with the quoted LSB
  and with the input range used to exercise the converter. A 0.5 V figure
  also appears in the source.
* **Thermometer polarity.** A comparator outputs 1 when vin is above its tap.
* **Pipeline placement.** The default places a register row between every
  pair of adder levels. The alternative placement described above is
  available through `PIPE_MASK`.
* **Additions of this design.** Reset, the sampling point and the latency are
  not specified by the source. Neither is the gate mapping of `cmp_logic`.
* **Comparator dynamics.** The feedback slew rate, the time step and the
  initial Vf are assumptions. The comparator's offset is not modelled.
  Because the model is ideal, the converter shows essentially zero DNL/INL.
  The transistor-level circuit is reported at about ±0.25 LSB DNL and
  ±0.6 LSB INL.
* **Not built.** A "pipelined" variant of the comparator is mentioned in the
  source but not described, so it is not included.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_wallace_node` | W = 1, 2, 3, every input combination |
| `tb_wallace_encoder` | the 16 clean codes; bubbles of order 1–3 and stray ones; all 2^15 inputs; a 5-bit instance on random words |
| `tb_wallace_encoder_pipe` | default (latency 2), one-row (latency 1) and 5-bit (latency 3) instances; a new random, bubbled or clean word every cycle, output checked against the count from exactly LATENCY cycles earlier; reset state |
| `tb_cmp_logic` | random (rst_n, O_P, O_N) sequence against a reference model of hold / follow / feedback requests |
| `tb_diff_comparator` | 400 input pairs at common modes 0.05–1.75 V and differences 1 µV–0.8 V; the 2.96 ns delay to ±100 ps; hold at equal inputs; the feedback must both raise and lower Vf |
| `tb_ref_ladder` | every tap against the formula for four reference pairs |
| `tb_flash_adc` | default parameters, end to end: 1 mV-step ramp 0.65–1.55 V with DNL/INL; sines at 10 MHz / 200 MS/s, 1.66 MHz / 100 MS/s, 33.2 MHz / 200 MS/s with SNDR/ENOB; every code, both feedback directions and multi-code jumps must occur |
| `tb_flash_adc_modes` | the combinational-encoder and one-row variants of the converter on a ramp |
| `tb_flash_adc_sweep` | SNDR/ENOB against input frequency up to Nyquist at 100 and 200 MS/s |

Results of the converter model, with ideal quantization:

* Ramp: max |DNL| 0.012 LSB and max |INL| 0.019 LSB. This is the 1 mV
  resolution of the measurement.
* SNDR: 23.5–25.9 dB (ENOB 3.6–4.0) over the frequency sweep.

Run a testbench with plain Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert --no-sched-zero-delay --top-module tb_flash_adc \
    -y rtl -y tb +libext+.sv rtl/flash_adc_pkg.sv tb/tb_flash_adc.sv
./obj_dir/Vtb_flash_adc
```

Replace `tb_flash_adc` with any testbench name. The package file must come
first; the other modules are found through `-y`. `--no-sched-zero-delay`
tells Verilator that the clock generators, whose half period is a variable
so that the sample rate can change during a run, never wait `#0`. All files declare
`timeunit 1ps`. To try another operating point, change `flash_adc_pkg`, or
drive `vrefh`/`vrefl` differently in a testbench. The ladder and the
reference formulas in the testbenches follow the ports.

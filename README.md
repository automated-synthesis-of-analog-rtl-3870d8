# Synthesizable ADCs from standard digital cells

Each converter here is built the way a digital block is built: from library
logic cells, placed and routed by digital tools, with no hand-drawn analog
circuit. The analog parts are ordinary cells used in an unusual way:

- **Comparator.** Two cross-coupled 3-input NAND gates, with an SR latch after
  them, form a clocked comparator.
- **Delay cell.** A NAND3 whose discharge speed depends on an input voltage is a
  voltage-controlled delay cell.
- **DAC cell.** A NAND3 whose input edge couples a small charge onto a node is a
  DAC cell.

Minimum-size cells have large random offsets, with a sigma of tens to over a
hundred millivolts. The first two converters do not fight this. They use the
random offsets as the comparator thresholds.

Four converters are provided. They are independent and sit side by side in the
top level `synth_adc_top`:

| Converter | Module | Idea | Output |
|---|---|---|---|
| Single-group stochastic flash | `sg_stochastic_adc` | 2047 comparators, all with 0 V reference. The offsets are Gaussian, so the count of ones is the Gaussian CDF of the input. A piecewise-linear inverse CDF straightens it. | 12-bit signed code; optional decimate-by-8 |
| Two-group stochastic flash | `two_group_adc` | Two groups of 3840 comparators with references at -a and +a, where a = 1.078 sigma. Their CDFs add to a nearly linear curve. PDF folding moves useless offsets into range. Groups of 192 comparators can be switched off. | sum of two 12-bit counts |
| Domino | `domino_adc` | The held input sets how fast a chain of 63 dynamic cells ripples during the evaluate phase. The number of fired cells is the code. Two chains work pseudo-differentially. | 7-bit signed difference |
| DINOSAR | `dinosar_adc` | 6-bit charge-redistribution SAR. The comparator is the NAND3 comparator. The DAC is NAND3 cells pulling the held input nodes down. | 6-bit code every 7 cycles |

## Modelling convention

Analog voltages are `adc_pkg::uvolt_t`, a signed 24-bit count of microvolts.
Every cell that is analog in silicon is a behavioural model. Its first comment
says so. These models are:

- `nand3_comparator`;
- `ref_comparator`;
- `sample_hold`;
- `domino_chain`;
- `nand_cdac`.

Each comparator instance gets a constant offset at elaboration from
`adc_pkg::gauss_uv(seed, index, sigma)`. This function is a deterministic
approximate Gaussian: it sums twelve xorshift32 uniforms (Irwin-Hall). The
offset enters the comparator through a model-only input `OFFSET_UV`, which the
real cell does not have. Noise is not modelled, so every run is repeatable.

The rest is synthesizable:

- ones adders;
- un-Gaussian correction;
- decimator;
- fold controller;
- thermometer decoder;
- subtractor;
- SAR logic.

### Clock edges

- Comparators decide on the rising edge of their clock.
- The digital logic that consumes their outputs registers on the falling edge,
  half a cycle later.
- The domino converter runs on its sample phase `phi`. `phi = 1` means reset and
  sample; `phi = 0` means evaluate.

## Single-group stochastic flash ADC

`sg_stochastic_adc` chains four stages:

1. **Comparators.** 2047 `nand3_comparator`s share the input pair.
2. **Ones adder.** `wallace_ones_adder` counts the ones.
   - It is a Wallace tree of full adders used as 3:2 compressors.
   - There is a register after every layer.
   - One final registered carry-propagate adder finishes the sum.
   - For N = 2047 there are 14 compressor layers, so the count appears 15
     falling edges after the comparators decide.
3. **Correction.** `un_gaussian` linearises the count.
   - It works on v = count - 1023.
   - It applies five straight segments with slopes 2.5, 1.5, 1, 1.5 and 2.5.
   - The break points are at |v| = 549 and |v| = 775.
   - The offsets are 274 and 1049, which makes the curve continuous.
   - The slopes need only shifts and adds: 1.5v = v + v/2, and 2.5v = 2v + v/2.
   - For other N the break points scale by N/2047.
   - It adds one register.
4. **Decimator.** `decimator` handles the decimate-by-8 option.
   - With `dec_en = 1`, a free-running 3-bit counter lets the output update only
     when the counter is zero.
   - Otherwise the output updates every cycle.
   - It adds one register. Total input-to-`out` latency is 17 cycles.

The segment test in the correction orders its cases from the top:
v > 775, then v > 549, then v ≥ -549, then v ≥ -775, then the rest. This
ordering is this design's reading of the formula.

`tb_sg_stochastic_adc` runs the full 2047-comparator converter. It checks:

- the raw count and the corrected code against a model, cycle by cycle;
- both latencies;
- the decimation period;
- that correction lowers the INL of a ramp from about 7.5% to about 1.6% of
  full scale.

## Two-group stochastic flash ADC

`two_group_adc` has two groups, A and B. Each has `N_SUB` × `SUB_SIZE` =
20 × 192 = 3840 comparators (`ref_comparator`).

- **References.** Each comparator subtracts its group's differential reference.
  The references are analog ports. Set them to ∓1.078 sigma (sigma = 140 mV) to
  put the two CDFs where their sum is most linear.
- **Subgroup enables.** The `en_a`/`en_b` bits gate the outputs of each block of
  192 comparators to zero. This trades power for resolution.
- **Ones adders.** `rca_tree_ones_adder` counts each group.
  - The first level compresses each group of three bits to 2 bits.
  - Each later level adds pairs with an adder one bit wider.
  - There is a register after every level.
  - For 3840 inputs that is 12 cycles. The group sum follows one cycle later.

### PDF folding

Folding is done by `pdf_fold_ctrl`, one per comparator.

Only about half of a group's offsets fall inside the signal range. Folding
recovers the rest. Each comparator has four switches that can swap both its
input pair and its reference pair. Swapping mirrors its offset about the
reference. The output passes through an XOR with the swap state, so the sense
of the decision is kept.

A comparator in group A belongs on the negative side of its reference
(`RIGHT = 0`). Group B's comparators belong on the positive side (`RIGHT = 1`).

The controller does the following with `fold_en = 1`:

- While the corrected decision shows the offset on the wrong side, the
  comparator's swap flip-flop toggles every cycle.
- The first time the decision is on the right side, a lock flip-flop sets and
  freezes the swap state.
- `lock_rst` clears the locks so the search runs again, for example during a
  different input.
- `fold_en = 0` clears both flip-flops.

Drive a slow full-scale signal, such as a sine or a ramp, while folding locks.
Comparators with offsets outside the swing then end up mirrored into it.

`tb_two_group_adc` runs a 4 × 48 per group version against a cycle-accurate
model. It shows the output span growing from 198 to 375 codes once folding is
on.

## Domino ADC

`domino_adc` runs during each `phi` period.

- **Sample and reset.** While `phi = 1`, two `sample_hold`s track `vinp`/`vinn`,
  and both `domino_chain`s are reset.
- **Evaluate.** When `phi` falls, the held values set each chain's per-cell
  delay: tau = 250 ps + (v - 0.9 V) / (1.667 mV/ps). A higher input means a
  slower chain.
- **Count.** At the end of an 8 ns evaluation window, 8000/tau cells have fired,
  clamped to 0..63.

The delay law's constants are this design's own. They are chosen so that about
±300 mV around 0.9 V covers the chain.

At the next rising `phi`, the two thermometer codes are registered. Then:

- **Decoders.** `thermo_mux_decoder` turns each code into 6 bits by binary
  search. The MSB is cell 31. Each lower bit is a multiplexer whose select is
  the bits above it.
- **Subtractor.** `rca_subtractor` computes negative minus positive as a
  7-bit two's-complement value: a + ~b + 1 through a full-adder chain.
- **Output.** `out` is registered at the following rising `phi`. A sample
  therefore appears two rising edges of `phi` after it was taken.

The 1/tau law bends the transfer curve. The pseudo-differential subtraction
cancels its even-order part. `tb_domino_adc` measures this: the even-order
error of a symmetric sweep is 18 codes on one chain alone and 0 on the
difference.

The short `phi = 1` pulse comes from a pulse generator made of gate delays. It
is not part of the RTL. `phi` is an input.

## DINOSAR (NAND3 SAR ADC)

`dinosar_adc` uses two `sample_hold`s, two `nand_cdac`s, one `nand3_comparator`
and `sar_logic`. A conversion takes N + 1 = 7 cycles of `clk`:

1. **Sample.** `sample` is high. Both held nodes track the inputs, and all DAC
   bits are 1.
2. **Compare.** Each of the next six falling edges stores the comparator's last
   decision as the next result bit, MSB first. After each of the first five,
   the DAC bit of matching weight is pulled low on the side that was higher.
   That lowers that node by LSB·2^k.
3. **Finish.** At the sixth compare, `dout` takes the six bits and `valid`
   pulses for one cycle. The next sample starts.

- **Default range.** `LSB_UV = 5625` gives 360 mV of differential full scale.
  The code is offset-binary: 32 means zero input.
- **Reset.** `rst_n` resets the controller asynchronously.
- **Assertion.** One assertion checks that the step counter stays in range. Its
  `disable iff` on the reset makes lint report the reset as both synchronous
  and asynchronous. That report is harmless.

## Top level and simulation

`synth_adc_top` brings out every converter's ports with prefixes `sg_`, `tg_`,
`dom_` and `sar_`. Its defaults are the full sizes:

- 2047 comparators in the single-group converter;
- 2 × 3840 in the two-group converter;
- 6 bits for the domino converter;
- 6 bits for DINOSAR.

Every file in `tb/` is a self-checking testbench. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. To run one with
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/adc_pkg.sv \
        tb/tb_domino_adc.sv --top-module tb_domino_adc -Mdir obj -o sim
    obj/sim

`tb_synth_adc_top` drives all four converters at once, with the top at its
defaults. It checks their outputs against models and counts every mechanism.
A failure is counted for any mechanism that never happens. The mechanisms are:

- all five un-Gaussian segments;
- decimation;
- subgroups switched off;
- fold swaps and locks;
- domino conversions;
- SAR conversions, including an over-range input.

The full-size build is large: about 9,700 comparator instances. Expect
Verilator compile times of about ten minutes on one core (use `-j`).

## Departures and limits

- **Two-group output.** The two-group output is the plain sum of the group
  counts, with no digital correction.
- **Offset sigma of the single-group converter.** The default of 46 mV is a
  choice. The correction works in codes, so sigma only sets the input range.
- **Fold decision rule.** The rule (toggle until the output is on the group's
  side, then lock) is the simplest circuit that folds outside offsets into
  range.
- **Reference servo.** A servo loop that would trim the group references in the
  background is not built. The references are inputs.
- **Second-order effects.** Not modelled: the pulse generator, charge
  injection, comparator noise, mismatch of the DAC steps, and the change of
  sigma with the reference common mode.

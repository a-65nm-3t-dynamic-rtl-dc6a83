# DARAM computing-in-memory CNN accelerator

A convolution layer is mostly multiply-accumulate work. This design does
that work inside the weight memory. Each weight is a 4-bit value. It is
stored as an analog voltage in a three-transistor dynamic cell (DARAM), not
as four SRAM bits. Each activation becomes a time pulse on its row. Each
column's read bitline then collects a charge equal to the dot product of the
column's 64 weights with the 64 activations. A 4b x 4b MAC needs one read,
not one read per bit.

The analog array is cheap. What remains costly is the conversion back to
digital, so the design tries to avoid conversions:

- **MAC-based ADC skipping.** A column is not converted while its bitline
  drop is small. The next cycle's charge is added on top of it.
- **ReLU-based termination.** An output that is clearly heading negative
  stops converting, because ReLU will clip it to zero anyway.
- **Input sparsity.** A zero activation fires no pulse.
- **Weight shift.** Weights are stored lowered where a column does not use
  the full range. This lowers the cell currents, and so the MAC energy.

The RTL has two parts:

- a synthesizable ASIC core: sequencer, sparsity logic, skip control,
  termination check, post-processing and SRAMs;
- behavioural models of the mixed-signal parts: DTC, write DAC, DARAM array
  and SAR ADC.

Together they simulate the whole accelerator cycle by cycle, bit-exactly
against a reference model.

## Architecture

```
            host ports (SRAM load, config, start)
                       |
   +-------------------+--------------------+
   | weight SRAM 64KB (1024 x 512b)          |
   +-------------------+--------------------+
                       | one row of all 4 macros per word
   +-------+  +--------+---------------------------+  +-------+
   | CIM   |  | ASIC core                          |  | CIM   |
   | macro |--|  data_sequencer  input_sparsity    |--| macro |
   | 0     |  |  adc_skip_ctrl   relu_term         |  | 1     |
   +-------+  |  post_proc  (offset, 8b, accum)    |  +-------+
   | CIM 2 |--|  shift / calibration registers     |--| CIM 3 |
   +-------+  +--------+---------------------------+  +-------+
                       | one input vector of all 4 macros per word
   +-------------------+--------------------+
   | activation SRAM 96KB (768 x 1024b)      |
   +-----------------------------------------+
```

There are four macros of 64 rows x 32 columns. Each works on its own 64
inputs. The same column index in all four macros feeds the same output, so
one clock cycle computes 32 dot products of 256 inputs each. The four
partial sums are added digitally in `post_proc`.

An **accumulation** is `n_cycles` such cycles. Each cycle brings a new input
vector, and the weights stay stationary. A run is `n_groups` accumulations
read from consecutive activation SRAM words, and it produces one 32-value
result vector per accumulation. How a CNN layer is cut into such
accumulations is up to the software that fills the SRAMs.

## Inside a CIM macro (`cim_macro` and its models)

| part | model | behaviour |
|---|---|---|
| `cim_dtc` (one per row) | activation -> pulse width | 50 ps per LSB; no pulse for a disabled or zero row |
| `cim_dac` (one per column) | weight code -> MEM voltage, 0.45-1.0 V | non-linear curve `V = 0.45 + sqrt(code*K)` that cancels the square law of the read transistor |
| `daram_array` | 64 x 32 stored voltages | cell current `(V-0.45)^2/K`, rounded to whole weight LSBs; leakage drift; column charge = sum of current x pulse |
| bitline, comparator | per column | drop kept until precharged, saturates at full swing; `below_th` while the drop is below `vth_pct` % of full swing |
| `cim_sar_adc` (one per column) | 5 b SAR | code = floor(drop / 512), saturated at 31 |

Charge is counted in integer units of one activation LSB times one weight
LSB. The largest single-cycle MAC is 64 x 15 x 15 = 14400 units. The ADC
full swing is 32 x 512 = 16384 units. The skip threshold is set at run time
(`skip_vth_pct`, in percent of full swing). The nominal setting is 27 %,
which is 4423 units.

Because of the DAC's compensation, a freshly written array computes an exact
integer MAC. Without it (`dac_comp_en = 0`, used only in `tb_cim_dac`) the
cell current is no longer proportional to the weight.

Writing goes one row per clock through the column DACs, so a full macro
takes 64 cycles. All four macros are written in parallel from one weight
SRAM word.

## Merging MACs on the bitline (ADC skipping)

The bitline behaves as an accumulator. In each MAC cycle, for each column,
the macro reports the drop *including this cycle's charge*. The skip
controller (`adc_skip_ctrl`) decides in the same cycle:

- **convert and precharge** when the drop has reached the threshold, or
  when this is the last cycle of the accumulation;
- **skip** otherwise. The ADC stays idle, there is no precharge, and the
  next cycle's charge lands on the same bitline.

This example is the one `tb_adc_skip_ctrl` and `tb_cim_macro` replay:

| cycle | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|
| this cycle's drop (% full swing) | 12 | 56 | 9 | 12 | 33 |
| drop on the bitline | 12 | 68 | 9 | 21 | 54 |
| action | skip | convert | skip | skip | convert |

The converted code holds the charge of several cycles. The post-processing
adds `code x 512` to the output, so nothing is lost as long as the merged
drop stays below full swing.

When it does not, the bitline saturates and the ADC returns 31. That is
the occasional overflow error this scheme accepts. `stat_ovf` counts such
conversions, and the end-to-end test provokes them on purpose.

The threshold trades conversions against overflow. On the synthetic data of
`tb_cim_accel_top`, five accumulations with skipping off need 6400
conversions. Raising the threshold removes a growing share of them:

| threshold (% of full swing) | conversions saved |
|---|---|
| 2 | 2 % |
| 27 | 55 % |
| 47 | 68 % |

At 27 % and above, some merged drops also overflow.

A terminated column never converts and is precharged every cycle. In 8b
mode skipping is switched off, because consecutive cycles there carry
different nibble weights.

## Signed weights in unsigned cells: offset and weight shift

A cell current cannot be negative. A signed 4b weight `w` (-8..7) is
therefore stored as

    u = w + 8 - s

where `s` is the **weight shift** of that macro column (0 when unused). The
software chooses `s` so that `u` stays in 0..15. The analog MAC is then
`sum(a*w) + (8 - s) * sum(a)`.

The correction needs only the sum of the activations, once per macro and
cycle. `input_sparsity` computes that sum next to the zero detection, and
`post_proc` restores

    value_j = sum(codes x 512) + sum over macros of (s_mj - 8) * act_sum_m + cal_j

Here `cal_j` is a per-output calibration offset, meant to cancel ADC and DAC
offsets measured on a chip. Shifts and offsets are configuration registers:
`cfg_addr` m*32+c holds the shift of macro m, column c, and 128+j holds the
calibration offset of output j.

## ReLU termination

After more than 70 % of an accumulation's cycles (`100*t > 70*n_cycles`,
where `t` is the number of cycles already accumulated), `relu_term` compares
each output's running value with the signed threshold `relu_thresh`. The
running value includes the offsets.

An output below the threshold is terminated:

- its columns stop converting;
- its result is forced to 0.

If every output of the accumulation is terminated, the sequencer drops the
remaining cycles. One more cycle is already in flight. After it, a single
"flush" slot with no MAC closes the accumulation, and the read address jumps
to the next accumulation.

## 8b mode

With `mode8 = 1`:

- An 8b weight is stored as `U = w + 128 - s`. Its high nibble goes in
  column 2j and its low nibble in column 2j+1, so each macro has 16 outputs.
- An 8b input takes two cycles, high nibble first. Activation SRAM words
  alternate high and low nibbles, and `n_cycles` must be even.
- `post_proc` weights the even column by 16 and the high-nibble cycle by 16.
  The offset uses 128, and the shift of output j is taken from column 2j.

## Retention and refresh

The stored voltage leaks. The array model lowers it linearly with the
cycles since its row was written, by 10 mV at `RETENTION_CYCLES` (41000 by
default, the typical-corner retention). 10 mV is about half of the top code
step, so values start to read one LSB low at around that age.

The sequencer counts cycles since the last weight write. Once
`REFRESH_INTERVAL` (5500, the fast-corner figure) has passed, it rewrites
all 64 rows between two accumulations. This costs 64 / 5500 = 1.2 % of the
cycles in the worst case.

## Timing

- `start` to the first MAC: 65 cycles (64 row writes).
- Then one MAC cycle per clock. SRAM reads take one cycle, and the macro,
  skip decision and accumulation complete in the cycle the data arrives.
- A result appears one cycle after the last MAC of its accumulation.
- `done` follows the last result by one cycle.
- Total run: `1 + 64*(1 + refreshes) + MAC slots + flush slots + 2` cycles.
  The testbenches check this.
- The host may write the SRAMs only while `busy` is low. An assertion flags
  violations.

Statistics counters (`stat_mac_cycles`, `stat_conv`, `stat_skip`,
`stat_zero_rows`, `stat_ovf`, `stat_term`, `stat_refresh`, `stat_flush`)
count the events of each mechanism since reset.

## How far to trust it

These parts follow the published design:

- array size and count;
- 4b cells and 4b/8b support;
- DTC resolution, 5b ADC and the 0.45-1 V DAC range;
- 64-cycle write;
- the 27 % nominal skip threshold, adjustable as in the published threshold sweep;
- the 70 % / threshold termination rule;
- the offset for unsigned weights, weight shift, inter-macro accumulation
  and calibration offsets;
- zero-input DTC disabling;
- the retention and refresh figures.

These are this design's own choices:

- **Charge scale.** The units, and an ADC LSB of 512 units (full swing just
  above the largest single-cycle MAC).
- **Skip timing.** The skip decision is made in the same cycle, and a
  conversion is forced at the last cycle of an accumulation.
- **8b layout.** Nibbles on column pairs and in successive cycles; skipping
  off in 8b mode.
- **SRAM split.** 64 KB weights, 96 KB activations, out of the 172 KB total.
- **Interfaces and word layouts.** The host ports and SRAM word layouts, and
  results delivered on an output port, not written back to activation SRAM.
- **Refresh placement.** Refresh only between accumulations.
- **Analog laws.** Square-law cell current, linear leakage drift, and
  currents rounded to whole LSBs. Real cells add noise, mismatch and a
  continuous transfer curve. The model is meant for checking the digital
  side, not for predicting accuracy.

Not built:

- **Input-stationary mode.** It is only named, without a data flow.
- **Physical parts.** The per-cell 3D metal capacitor, the 0.8 V write
  bitline bias and the DAC's transistor-level structure. They appear only
  through the model parameters.

The behavioural models use `real` arithmetic. Synthesis tools will not map
them; in a chip they are replaced by the analog macro.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. With verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/cim_pkg.sv tb/cim_ref_pkg.sv tb/tb_cim_accel_top.sv \
    --top-module tb_cim_accel_top -o sim
./obj_dir/sim
```

For a unit testbench, drop `tb/cim_ref_pkg.sv` and name the testbench.

| testbench | what it covers |
|---|---|
| `tb_cim_accel_top` | three runs (4b with refresh, all-terminated early end, 8b) and a skip-threshold sweep; results and event counts against `cim_ref_pkg`; refresh interval 150, retention 2000 |
| `tb_cim_accel_full` | the top at default parameters: 30 4b accumulations and 3 8b accumulations |
| `tb_cim_macro` | MAC codes, comparator, the five-cycle skip example, overflow |
| `tb_daram_array` | exact MAC after write, drift past retention, restore by rewrite |
| `tb_post_proc` | accumulation, offsets, 8b combination, termination, ReLU |
| `tb_data_sequencer` | write order, address stream, refresh, flush, cycle count |
| others | one per small block (`cim_dac`, `cim_dtc`, `cim_sar_adc`, `input_sparsity`, `adc_skip_ctrl`, `relu_term`, `sram_sp`) |

To change the design:

- Sizes shared by all blocks are in `rtl/cim_pkg.sv`.
- The SRAM depths, refresh interval and retention are parameters of
  `cim_accel_top`.
- `tb/cim_ref_pkg.sv` is the executable description of what the
  accelerator computes. Keep it in step with any change to skip,
  termination or offset rules.

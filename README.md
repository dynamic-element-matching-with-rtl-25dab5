# Dynamic element matching with a signal-independent transition count

A multibit delta-sigma DAC built from M identical unit elements suffers from
two kinds of element error:

* **static mismatch**: each element is slightly too large or too small;
* **inter-symbol interference (ISI)**: each element adds a small error
  whenever it switches, and the error of an up transition (0 → 1) differs
  from that of a down transition.

Classic dynamic element matching (DEM) rotates the elements so that
mismatch error is pushed out of band. But rotation adds switching, and the
number of elements that switch on in a sample, Γ[n], then depends on the
signal. The ISI error is roughly ε·Γ[n], so it turns into harmonic distortion.

This encoder fixes the total number of transitions (up plus down) per sample
to **K[n] ∈ {L−1, L, L+1}** and makes that number independent of the code
d[n]. Because

    up − down = d[n] − d[n−1]      and      up + down = K[n],

the number of up transitions is

    Γ[n] = (K[n] + d[n] − d[n−1]) / 2.

That is a linear function of the signal plus a term that carries no signal.
The ISI error therefore causes no distortion. A small delta-sigma loop picks
K[n], so K[n] − L is also high-pass shaped, and the common part of the ISI
error moves out of band too. Within each sample, the encoder picks *which*
elements switch by how often each has been used. This keeps the usual
first-order (optionally second-order) shaping of the mismatch error.

## How one sample is encoded (`dem_core`)

Each clock with `en_i` high does the following, all in one combinational pass
from the registered state:

1. **Parity and K[n]** (`k_gen`). An XOR of the low bits of L, d[n] and
   d[n−1] gives the parity of L + d[n] − d[n−1]. K[n] must have this parity
   so that Γ[n] is an integer. If the sum is even, K[n] = L. If it is odd, a
   zero-input delta-sigma loop picks K[n] = L + y[n] with y[n] = ±1:
   * The loop's integrator holds −Σy.
   * The quantizer takes the sign of the integrator plus a ±½ LSB dither
     from a 16-bit LFSR (`dither_lfsr`).
   * The running sum of K − L therefore stays within ±1. This is first-order
     shaping.
   * Whether y is +1 or −1 is decided by the loop state and the dither, never
     by the code. So K[n] is uncorrelated with d[n].
2. **Plan** (`transition_planner`). The planner works out two counts:
   * Γ[n] elements to switch on;
   * keep = d[n] − Γ[n] elements to keep on.

   It also checks that there are enough elements for both:
   * Γ ≤ M − d[n−1];
   * 0 ≤ keep ≤ d[n−1];
   * Γ ≥ 0.

   Together these say |d[n] − d[n−1]| ≤ K ≤ d[n] + d[n−1] ≤ 2M − K.
3. **Selection** (two `vq_select` vector quantizers). Each element has a
   usage key from `usage_filter`. A larger key means the element has been
   used less. An indicator bit above the key sets each quantizer's priority:
   * **Vq1** has its indicator set for elements that were *off*. It selects
     Γ[n] elements, so it turns on the least-used off elements.
   * **Vq2** has its indicator set for elements that were *on*. It selects
     keep[n] elements, so it keeps on the least-used on elements and turns
     off the most-used ones.

   The OR of the two selections is the new element pattern d_i[n]. Exactly
   K[n] elements change and exactly Γ[n] switch on.
4. **Usage update** (`usage_filter`). Each element integrates the error
   e_i = M·d_i[n] − d[n]. Scaling by M avoids fractions, and the keys sum to
   zero, so they need no normalisation. With the default first-order shaping
   the key is the integrator output. With `ORDER = SHAPE_ORDER2` a second
   integrator is added and the key becomes 2·x1 + x2.

### Fallback near full scale

The conditions in step 2 cannot all hold in two cases:
* the code is within about K/2 of 0 or M;
* the code step |d[n] − d[n−1]| is larger than K.

For such a sample, `fallback_o` is raised and the encoder becomes a plain
mismatch-shaping encoder:
* Vq1 selects the d[n] least-used elements, with all indicator bits equal.
* Vq2 selects none.
* The K loop holds its state.

Every code 0..M is therefore still encoded correctly. Only the transition
control is lost for that sample.

Choose L to be at least the largest code step the modulator produces. That
step is about the modulator's largest out-of-band NTF gain. For example, L ≥ 2
for a gain of 2. A larger L gives faster scrambling and a lower mismatch noise
floor. Its costs are more switching and a narrower usable code range. For
M = 32 and L = 2, the controlled range of a steady code is 1..31. For L = 4 it
is about 2..30, plus room for the code steps.

### Second-order shaping

`ORDER = SHAPE_ORDER2` makes two changes:

* **In `k_gen`**: a second integrator x2 (accumulating x1) is added, with a
  feed-forward path into the quantizer. The quantizer input is 4·x1 + x2.
  The usual weight of 2, which gives NTF = (1 − z⁻¹)², was only marginally
  stable here. The loop can act only on the odd-parity samples, about half
  of them, which halves its effective gain. With weight 4, the double
  running sum of K − L stays within about ±25 over long runs.
* **In `usage_filter`**: a second integrator is added per element, and the
  key becomes 2·x1 + x2. Each element's double running sum of usage error
  stays bounded.

Both choices are this design's own. The source describes the second-order
structures only in outline.

## Reduced-complexity tree form (`dem_tree`, `splitter`)

Each vector quantizer ranks M keys with M·(M−1) comparators. For large M, the
tree form instead:

1. splits the code into two half-range codes,

       d_a = (d + s)/2,   d_b = (d − s)/2,

   where s = 0 for even d. For odd d, s = ±1, chosen by a first-order
   dithered loop. This keeps the two halves equally used on average.
2. encodes each half with its own M/2-element `dem_core` with average
   transition count L/2.

The total K then lies in L−2..L+2 and still averages L. Elements 0..M/2−1
belong to half a, and M/2..M−1 to half b. Comparator count drops by about a
factor of two. The cost is a somewhat higher mismatch noise floor.

## Top level (`sit_dem_top`)

The top holds both forms side by side. Each has its own ports and drives its
own DAC:

| port (direct / tree)            | dir | width          | meaning                                   |
|---------------------------------|-----|----------------|-------------------------------------------|
| `clk`, `rst_n`                  | in  | 1              | clock; active-low synchronous reset       |
| `en_i` / `t_en_i`               | in  | 1              | sample enable: one code per enabled edge  |
| `d_i` / `t_d_i`                 | in  | ⌈log2(M+1)⌉    | code d[n], 0..M                           |
| `elem_o` / `t_elem_o`           | out | M              | element controls d_i[n], registered       |
| `k_o` / `t_k_o`                 | out | ⌈log2(L+2)⌉+1  | planned K[n]                              |
| `gamma_o` / `t_gamma_o`         | out | ⌈log2(M+1)⌉    | planned Γ[n]                              |
| `fallback_o` / `t_fallback_o`   | out | 1              | sample encoded without transition control |

**Timing.** A code sampled on a rising edge appears on `elem_o` right after
that edge, so latency is one clock. The status outputs (`k_o`, `gamma_o`,
`fallback_o`) are registered with it. When the enable is low, nothing
changes. Reset clears all elements (d[−1] = 0), so the first sample after
reset usually falls back.

**Not included.** Two parts of a complete DAC are outside the top:
* The digital delta-sigma modulator that produces d[n]. In the evaluated
  system it is fifth order, with an out-of-band NTF gain of 2. Its
  coefficients are not available here.
* The analog unit elements.

The code inputs and element outputs are the ports that connect to them.

**Parameters** (top and `dem_core`):

| parameter | default        | meaning |
|-----------|----------------|---------|
| `M`       | 32             | unit elements (the evaluated DAC) |
| `L`       | 4              | long-term average of K[n]; values 3 to 5 are also typical |
| `ORDER`   | `SHAPE_ORDER1` | shaping order of K[n] and of the mismatch |
| `UW`      | 16             | usage-integrator width (dem_core, dem_tree); saturating |

**Code width.** The code input is ⌈log2(M+1)⌉ bits, 6 bits for M = 32, so that
both 0 and M can be represented. The tree's half codes are 5 bits for the same
reason.

## Design choices not fixed by the algorithm

* **Ties.** Ties between equal usage keys go to the lower element index.
* **Dither.** The dither is one bit from a 16-bit maximal-length LFSR
  (x¹⁶+x¹⁵+x¹³+x⁴+1). It adds ±½ LSB to the K-loop and splitter quantizers.
* **Saturation.** All integrators saturate rather than wrap:
  * the K-loop integrators at 8 bits;
  * the splitter integrator at 4 bits;
  * the usage integrators at `UW` bits.
* **Fallback granularity.** Fallback is decided per sample from the planned K
  only. The other value of L±1 is not tried first.
* **Sorting method.** The vector quantizers sort by rank counting in one
  combinational pass. This is O(M²) comparators. At M = 32 the whole top
  synthesises to roughly 24k word-level cells and about 200 flip-flops plus
  the usage registers. For high clock rates, pipeline `vq_select` or use the
  tree form.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=F`. The shared monitor `dem_checker` checks
every sample of an encoder:
* the element count equals the code;
* the realised number of changed elements equals the planned K[n];
* the realised number of up transitions equals the planned Γ[n];
* K = L for even parity and L ± 1 for odd parity;
* with a first-order usage model, the selection policy: elements switched on
  are the least used of the off ones, and elements kept on are the least used
  of the on ones;
* nothing changes on idle cycles.

`code_source` is a first-order delta-sigma modulator used as stimulus. It
turns a sine into codes, with optional full-scale bursts that force fallback.

| testbench               | what it covers |
|-------------------------|----------------|
| `tb_sit_dem_top`        | both forms at default parameters, 2¹⁶+ samples; requires corr(K, d) and corr(K, step) below 0.05, Γ tracking the step, bounded Σ(K−L), and every mechanism (K = L−1/L/L+1, fallback, idle) |
| `tb_dem_core`           | direct form, -3 dBFS sine, selection policy, latency |
| `tb_dem_tree`           | tree form: per-half transition counts, half balance |
| `tb_second_order`       | `ORDER = 2`: double running sums of K−L and of each element's usage error stay bounded |
| `tb_workloads`          | M = 32 with L = 3, 4, 5, and M = 16 with L = 2 |
| `tb_isi_distortion`     | harmonics 2–5 of the ISI and mismatch errors, through a behavioural element model, against thermometer coding |
| `tb_k_gen`, `tb_transition_planner`, `tb_vq_select`, `tb_usage_filter`, `tb_splitter`, `tb_dither_lfsr` | unit tests against reference models; the planner test is exhaustive |

In the default run at -1.5 dBFS, K[n] is uncorrelated with the code (|r| <
0.002). About 3 % of samples fall back, mostly during the forced full-scale
bursts. The usage spread between the most- and least-used element stays within
8 uses.

`unit_dac_model` is a behavioural model of the analog elements. For element i
it computes

    v_i = (1 + Δ_i)·d_i[n] + α + β·d_i[n] + γ·d_i[n−1] + ε_i·up_i[n]

with 1 % random mismatch Δ_i, ISI error ε = 2 %, and 1 % spread of ε_i.
`tb_isi_distortion` drives two identical models over 48 sine periods: one
from this encoder and one from plain thermometer coding. It then takes
single-bin DFTs at the harmonics. A typical run gives:

| harmonic | ISI error, encoder | ISI error, thermometer | mismatch error, encoder | mismatch error, thermometer |
|---------:|-------------------:|-----------------------:|------------------------:|----------------------------:|
| 2        | −149 dBc           | −92 dBc                | −125 dBc                | −60 dBc                     |
| 3        | −146 dBc           | −98 dBc                | −119 dBc                | −71 dBc                     |

The encoder's harmonics stay at the noise floor of the bin.

Full SNDR and SFDR figures are not reproduced here. They need the actual
fifth-order modulator and a thermal-noise model.

To simulate with Verilator (package first):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dem_pkg.sv tb/tb_sit_dem_top.sv --top-module tb_sit_dem_top
    ./obj_dir/Vtb_sit_dem_top

## Files

* `rtl/dem_pkg.sv`: defaults, the shaping-order enum, saturating add.
* `rtl/sit_dem_top.sv`, `dem_core.sv`, `dem_tree.sv`: the encoders.
* `rtl/k_gen.sv`, `transition_planner.sv`, `vq_select.sv`,
  `usage_filter.sv`, `splitter.sv`, `dither_lfsr.sv`: their parts.
* `tb/`: testbenches, plus the helpers `dem_checker.sv`, `code_source.sv` and
  `unit_dac_model.sv`.

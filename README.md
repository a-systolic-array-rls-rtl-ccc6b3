# Systolic-array RLS processor and adaptive-array receiver

This is RTL for a recursive-least-squares (RLS) parameter estimator built as a
triangular systolic array. It is used here as the weight computer of an MMSE
adaptive antenna array. The array applies the forgetting factor and estimates
up to 10 complex parameters `w`. It minimises

    sum_k  beta^(2(n-k)) * | d(k) - w^H u(k) |^2

from a block of training samples `(u(k), d(k))`, such as the unique word of a
burst. It then reads the weights out of the array with *serial weight
flushing*. The cost of plain RLS grows with the square of the number of
parameters. The array instead splits the work into many small cells that
update in parallel, one input row per clock. The update is a QR
decomposition by Givens rotations in square-root-free form, which behaves
well in fixed point.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017). The
arithmetic is 32-bit complex fixed point.

## The array

For `NPARAM = 3` the array looks like this. Column `j` carries `u_j` and the
last column carries the reference `d`:

```
     u1   u2   u3   d
      |    |    |   |
   1->(B)->[I]->[I]->[I]        (B) boundary cell, stores real x
        .    |    |   |         [I] internal cell, stores complex x
         .   v    v   v          .  storage element (delta delay)
          (B)->[I]->[I]         (x) final cell, e = delta * u
            .    |    |
             .   v    v
             (B)->[I]
               .    |
                .   v
                  (x) -> e
```

* **Boundary cell** (`boundary_cell`) sits on the diagonal and stores a real
  energy `x`. For an input `u` from above and a scale `delta` from the
  diagonal:
  * If `u = 0` or `delta = 0`: `x <- beta2*x`, `s = 0`, `delta_out = delta`.
  * Otherwise: `x' = beta2*x + delta*|u|^2`, `c = beta2*x/x'`,
    `s = delta*u/x'`, `delta_out = c*delta`, `x <- x'`.

  In both cases `z = u`. The cell sends `s` and `z` along its row and
  `delta_out` down the diagonal.
* **Internal cell** (`internal_cell`) stores a complex `x`. It computes
  `u_out = u_in - z*x`, sends it down, and then updates
  `x <- conj(s)*u_out + x`. It passes `s` and `z` on to the right. The
  forgetting factor enters only in the boundary cells.
* **Final cell** (`final_cell`) computes `e = delta*u`. During training this
  is the a-posteriori error `d - w^H u`.
* **Storage elements** (`storage_element`) delay `delta` on the diagonal.

The zero branch of the boundary cell makes a column with `u = 0` transparent.
Its boundary cell passes `delta` through unchanged and sends `s = z = 0`, so
the internal cells below leave their data alone. The processor uses this to
estimate fewer parameters than the array has: unused columns are fed zero.

### Timing and skew

Every cell registers its outputs, so one row enters per clock. Row `n` meets
cell `(i, j)` on clock `t + i + j`. Column `j` of a row must therefore enter
`j` clocks after column 0; `input_skew` adds these delays in front of the
array. Between boundary cells `i` and `i+1`, `delta` needs two clocks: the
boundary cell's output register and one storage element. An assertion in
`systolic_array` checks that the diagonal value and the row it belongs to
always meet. `e` for a row is registered `2*NPARAM` clock edges after the
edge that takes in the row's column 0.

### Row tags

Every value moving through the array carries a 4-bit tag `{valid, freeze,
first, last}` (`rls_pkg::tag_t`). Because of the tags, the array never needs
a global mode signal or pause, and rows may have gaps:

* `valid`: a real row. Cells change state only on valid rows.
* `first`: the cell uses zero instead of its stored value. This is the
  start of a new estimation.
* `freeze`: a flushing row. Outputs are computed but nothing is stored. In
  the boundary cell, `delta_out = delta_in`.
* `last`: the final flushing row. Only the weight collector reads it.

Internal cells get the tag both from above and from the left. An assertion
checks that the two copies agree.

## Reading the weights: serial weight flushing

The array never holds `w` explicitly. It holds a triangular factor and a
transformed reference. To read parameter `i`, updating is halted and the row
`u = e_i` (unit vector `i`), `d = 0` is fed in. The error of that row is
`e = d - w^H u = -conj(w_i)`. After the training rows, `flush_sequencer`
issues one such row per parameter, tagged `freeze`. In those rows `delta`
stays 1 down the whole diagonal, so the final cell outputs the a-priori
error. `weight_collector` turns each output into `w_i = -conj(e)`. On the
`last` row it publishes the whole vector.

The flushing rows follow the training rows back to back. The next
estimation's first row (tagged `first`) may follow the flushing rows at
once. A complete estimation with `P` parameters and `K` training samples
therefore takes `K + P` input clocks. The weights are out
`P + 2*NPARAM + 2` clocks after the last training sample was accepted. For
10 parameters and a 31-symbol unique word this is 41 rows, and the weights
are ready 62 clocks after the first sample.

## Fixed-point format

`rls_pkg` defines the word as 32-bit two's complement with `FRAC_W = 20`
fraction bits. That gives a range of about +/-2048 and a resolution of about
1e-6. A complex value is a packed `{re, im}` pair of words (`cplx_t`).
Products are formed at double width and then shifted, which rounds towards
minus infinity. Each result saturates, so an overflow clips rather than
wraps. The boundary cell's divisions (both parts of `s`, and `c`) divide the
double-width product by the 32-bit `x'`. If `x'` rounds to zero, the cell
takes the zero branch instead of dividing.

The 20/12 split is this design's choice. To change it, edit `FRAC_W`; the
constants that depend on it (`FIX_ONE`, the reset value of `beta^2`) follow
automatically. Input samples have to be scaled into this format. In the
testbenches, element samples have magnitudes below about 1. The boundary
energies then stay well below the range limit for `beta^2 = 0.99`, since
they grow to at most about `|u|^2 / (1 - beta^2)`.

## Processor (`rls_processor`)

```
host port -> config_regs --beta2, num_param, num_uw--+
                                                     v
(u,d) -> flush_sequencer -> input_skew -> systolic_array -> weight_collector -> w, err
        in_valid/in_ready
```

* **Host registers** (`config_regs`) are written with a synchronous strobe
  and read back combinationally:

  | address | register | notes |
  |---|---|---|
  | 0 | `BETA2` | fixed-point word; reset 0.99 |
  | 1 | `NUM_PARAM` | clipped to 1..NPARAM; reset NPARAM |
  | 2 | `NUM_UW` | training samples per estimation, clipped to 1..65535; reset 31 |

* **Input**: a `valid/ready` handshake takes one `(u, d)` sample per clock.
  `in_ready` drops for `num_param` clocks while the flushing rows go out.
  `num_param` and `num_uw` are sampled when the first row of an estimation
  is accepted.
* **Output**: `w_update` pulses for one clock when `w_out` changes. Entries
  at or beyond `num_param` read zero. `err/err_valid` carries the
  a-posteriori error of every training row.

## Receiver (`rls_array_receiver`, the top)

Each clock, the receiver takes one vector of `NELEM` antenna element outputs
and a flag `x_uw` that says whether the sample is part of the unique word.
Frame timing is assumed known.

* Unique-word samples, together with the known symbol `d_ref`, go to the
  processor.
* Information samples pass through a delay line of `INFO_DELAY = 3*NELEM+4`
  clocks. The beamformer then computes `y = sum conj(w_i) x_i`, and the QPSK
  detector decides one bit per axis: bit 0 is set when I < 0, bit 1 when
  Q < 0.

The delay is long enough that information samples which directly follow a
unique word are combined with the weights estimated from that same unique
word. A unique-word sample that arrives while the processor is flushing is
dropped and counted in `uw_dropped`. With 384 information symbols per frame
this cannot happen.

## Simulating

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M`,
ends with `$finish`, and has a cycle watchdog. Build and run one with plain
Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rls_pkg.sv tb/tb_rls_pkg.sv tb/tb_rls_array_receiver.sv \
    --top-module tb_rls_array_receiver -o sim
./obj_dir/sim
```

`tb/tb_rls_pkg.sv` provides the independent reference: conversions between
words and `real`, and a complex exponentially weighted least-squares solver
(normal equations, Gaussian elimination).

| testbench | what it checks |
|---|---|
| `tb_boundary_cell`, `tb_internal_cell`, `tb_final_cell` | the cell equations against a real-valued model, with zero inputs, `first`, `freeze` and idle clocks |
| `tb_storage_element`, `tb_input_skew` | delays of exactly 1 and `j` clocks, with tags |
| `tb_systolic_array` | 3-parameter array: weights from flushing against least squares, a second flush giving the same weights (nothing stored), a-posteriori error, a transparent column, `beta^2 = 0.9`, latency `2*NPARAM` |
| `tb_flush_sequencer`, `tb_weight_collector`, `tb_config_regs` | row stream and tags, weight vector assembly, register map and clipping |
| `tb_beamformer`, `tb_qpsk_detector` | combiner sum and quadrant decisions |
| `tb_rls_processor` | default size (10 parameters): three estimations with different settings; weights against least squares; weight latency `P + 2*NPARAM + 2`; `in_ready` low for `P` clocks |
| `tb_rls_array_receiver` | default size (10 elements), no parameter overrides; details below |
| `tb_workload_dynamic_range` | default size: 20 estimations of 10 parameters from 31 samples whose amplitudes spread over 40 dB; fixed-point weights within 5% of floating point (worst seen about 0.7%); 62 clocks from first sample to weights |

`tb_rls_array_receiver` models five frames of 31 + 384 QPSK symbols. One
desired user arrives from 0 degrees and three equal-power interferers from
10, 30 and 40 degrees, on a half-wavelength linear array with noise. The
frames use 8, 4, 2, 1 and 10 elements. The testbench checks the weights, and
each decision against the decision made with the reference weights. In that
run, 4 or more elements suppress the three interferers (no bit errors), and
1 or 2 elements do not. The testbench also requires every mechanism to
happen at least once:

* an estimation;
* the flushing clocks;
* a fresh array start;
* transparent columns;
* a host write;
* a dropped sample.

The whole suite runs in well under a second per testbench.

## Where this RTL makes its own choices

The cell equations, the diagonal storage elements, the skewed input and
weight flushing with halted updates follow the published architecture. The
32-bit word and the limit of 10 parameters also come from it. The following
are this implementation's own:

* **Word format**: 20 fraction bits, saturation and truncating products. The
  original allocation was found by simulation and is not known here.
* **Cell timing**: each cell is a single combinational stage plus a register,
  so each boundary cell holds three double-width-by-word dividers (for the
  two parts of `s` and for `c`). The original board
  took about 80 ns per boundary-cell operation and about 500 ns per
  internal-cell operation, spread over 19 ASICs. A practical implementation
  would pipeline or iterate the cells: the divider especially, and the two
  chained complex multiplies in the internal cell. Such a change would alter
  the latency figures above.
* **Tags**: the row tags, the zero-state start of each estimation (exact
  initialisation, no regularisation) and the use of zero columns for fewer
  parameters.
* **Host port**: the register map, widths and clipping.
* **Receiver**: the unique-word/information switch, the information delay
  line, the detector's bit mapping and the `valid/ready` handshake.
* **Not modelled**: the partition over several chips. The channel simulator
  (fading, array response, noise and receiver filter) that produced the
  element signals exists only as a real-valued model inside the receiver
  testbench.

## Files

`rtl/`: `rls_pkg` (types and arithmetic), `boundary_cell`, `internal_cell`,
`final_cell`, `storage_element`, `systolic_array`, `input_skew`,
`flush_sequencer`, `weight_collector`, `config_regs`, `rls_processor`,
`beamformer`, `qpsk_detector`, `rls_array_receiver` (top).
`tb/`: one `tb_<module>.sv` per module, plus `tb_rls_pkg.sv`.

All parameters have defaults (`NPARAM`/`NELEM = 10`). The array grows as
`NPARAM*(NPARAM+1)/2` internal cells. Each internal cell carries eight
32x32 multipliers; each boundary cell carries three dividers.

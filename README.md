# A collapsed CORDIC array for linear signal processing

This is RTL for a programmable array of CORDIC units. The array computes one
family of matrix transformations,

    Theta * [ V1  V2 ]  =  [ V1'  V2' ]
            [ W1  W2 ]     [ 0    W2' ]

where `V1` (upper triangular, `N_V1 x N_V1`) and `V2` (`N_V1 x N_V2`) live
inside the array, and `[W1 W2]` is streamed in one row at a time. `Theta` is
chosen to annihilate `W1`. The array's state is updated to `V1'` and `V2'`,
and `W2'` streams out. A run-time mode decides what kind of `Theta` is used.
With that single primitive, the same hardware does all of the following:

- QR decompositions and QR updating and downdating
- least-squares and regularised least-squares solutions
- matrix products, matrix inverses and solutions of linear systems
- a step of the Schur algorithm
- an adaptive RLS equaliser

The architecture follows Vollmer and Götze, *An Adiabatic Architecture for
Linear Signal Processing*. They target adiabatic (energy-recovering) CMOS.
That logic family is slow and pipelines every gate, so the natural design is
highly parallel and deeply pipelined. Their key observation is this: in the
classic triangular QR array, each CORDIC cell waits for its own result to
travel around its feedback loop, so the pipeline is mostly bubbles. A single
CORDIC per row can instead do the work of all the rotation cells to its right
in those idle cycles. The triangle of cells then collapses into **one column
of CORDIC devices**, one device per row of `V`.

The RTL here is a functional, bit-true model of that column in ordinary
synchronous SystemVerilog. It has one register per CORDIC stage. The
transistor-level adiabatic circuits are not modelled. A small functional
model of phase-aligned adiabatic gates is included separately (see
"Four-phase adiabatic logic").

## The modes

| mode (`mode_e`) | `Theta` | effect | typical use |
|---|---|---|---|
| `MODE_ORT` | orthogonal (Givens rotations) | `V1'^T V1' = V1^T V1 + W1^T W1`, `V1'^T V2' = V1^T V2 + W1^T W2` | QR decomposition / updating; with `V1 = 0`, `W1 = X`, `W2 = y` you get `V1 = R`, `V2 = Q^T y` |
| `MODE_LIN` | `[I 0; Δ I]` (Gaussian elimination) | `W2' = W2 - W1 V1^-1 V2`, `V` unchanged | back-substitution, products, inverses, filtering |
| `MODE_HYP` | J-orthogonal (hyperbolic rotations) | `V1'^T V1' = V1^T V1 - W1^T W1` | QR downdating, Schur algorithm |
| `MODE_SET` | — | `V1' = diag(W1)`, `V2' = 0`, `W2' = W2` | initialisation, e.g. `V1 = σI` for the regularised solution |
| `MODE_COPY` | — | `V` unchanged; the row whose `W1` entry is nonzero sends its `V2` row out as `W2'` | reading `V2` back: feed `W1 = I`, `W2 = 0` |

Some recipes, all of them exercised by the testbenches:

- **Least squares** `min ||Xw - y||`. Run `SET` with zeros, then `ORT` with
  the rows `[x_i  y_i]`, then `LIN` with `W1 = -I`, `W2 = 0`. The `LIN` rows
  return `w = R^-1 Q^T y`, one element per row in column 0.
- **Regularised solution** `(X^T X + σ²I)^-1 X^T y`. Same as least squares,
  but the first `SET` row is `W1 = [σ σ ... σ]`.
- **Inverse** `A^-1`. Run `SET` with zeros, then `ORT` with `[A  I]`, then
  `LIN` with `W1 = -I`.
- **Product** `A B`. Run `SET` with zeros, then `ORT` with `[I  B]`, which
  leaves `V1 = I`, `V2 = B`. Then run `LIN` with `W1 = -A`, `W2 = 0`. Note
  the sign: a linear run with `W1 = A` gives `-AB`, as the formula in the
  table says.

## How the column works

### One device per row, one ring slot per column

`cordic_device` is a ring of `NSTAGE` pipeline stages: first `NROT`
micro-rotation stages, then `NSCALE` scaling stages. Each stage has two
datapaths:

- **x (stored values).** The x output of the last stage feeds back into the
  first stage. The ring therefore holds `NSTAGE` values in circulation, and
  those values are the device's row of `[V1 V2]`: slot `j` holds column `j`.
  There is no separate register file; the pipeline registers are the storage.
- **y (input column).** The y path is open. It takes a column value from the
  device above and hands the transformed value to the device below.

An input row enters as a burst of consecutive columns, one per clock. Every
burst starts on ring slot 0, so column `j` of every row always meets stored
column `j`.

Device `r` treats the first column it receives as its diagonal (the *vector
slot*, marked `tag.first`). Each micro-rotation stage looks at the signs of x
and y in that slot. It chooses the direction `d` that drives y towards zero,
and **stores `d` in its own CTRL register**. In the following clocks the
remaining columns of the same row pass the stage, and the stage applies the
stored `d` to them: these are the *rotation slots*. So the stage that found
the rotation applies it to the whole row, one column per clock. This
self-feedback of the control replaces the horizontal control wires of the
triangular array.

On the way out, device `r` drops its diagonal column, whose y is the
annihilated element. It then marks the next column as `first`. Device `r+1`
therefore sees column `r+1` as its diagonal, which is the triangular shape
done in time instead of space.

```
 row in ──► row_input_buffer ──► device 0 ──► device 1 ──► ... ──► device N_V1-1 ──► row_output_buffer ──► W2'
           (slot-aligned burst)   cols 0..N-1   cols 1..N-1          cols N_V1-1..N-1   (V2-part columns)
```

Each column carries a tag (`tag_t`) with these fields:

- `valid`
- `first` (the vector slot)
- `v2` (the column belongs to the V2/W2 part)
- `mode`

So the mode can change from one row to the next: training rows and filtering
rows, for instance, can alternate freely.

### Timing

- Ring period `NSTAGE` = `NROT + NSCALE` = 36 clocks at the default
  precision.
- Rate: one row per ring period. Rows offered back to back leave exactly 36
  clocks apart. Idle slots simply circulate their values unchanged.
- Columns per row: `N_V1 + N_V2` must not exceed `NSTAGE`. In the
  architecture's terms, the ring length (the old pipeline bubble) sets how
  many columns collapse into one device.
- Latency: column `j` leaves device `r` exactly `NSTAGE` clocks after it
  entered. The output row appears `N_V1*NSTAGE + N_V1 + N_V2` clocks after
  its first column entered device 0, which is 152 clocks at the defaults.
  An accepted row first waits up to one ring period for slot 0.

### A micro-rotation stage (`cordic_rot_stage`)

    x' = x - μ·d·(y >>> s)      μ = +1 orthogonal, 0 linear, -1 hyperbolic
    y' = y +   d·(x >>> s)

- `d` is -1, 0 or +1. In the vector slot, `d = -sign(x)·sign(y)`, with zero
  counting as positive. This drives y to zero and keeps the sign of x, so a
  negative diagonal stays negative.
- Each adder is a `+/-/0` unit: with `d = 0` the stage passes its data
  unchanged.
- The shift sequence over the stages is 0, 1, 2, 3, 4, 4, 5, …, 13, 13,
  14, 15, 16.
- The repeated shifts 4 and 13 are needed for hyperbolic convergence. They
  are active only in hyperbolic mode.
- Shift 0 would be a rotation by an infinite hyperbolic angle, so it is
  bypassed in hyperbolic mode.
- Set, copy and idle slots bypass every stage.

### Gain compensation and forgetting (`cordic_scale_stage`)

CORDIC rotations stretch vectors by a constant gain: `K ≈ 1.6468` (circular)
or `K ≈ 0.8282` (hyperbolic). After the rotations come `FRAC_W+1` scaling
stages with shifts 0, 1, …, `FRAC_W`. Each one multiplies both paths by
`(1 + e·2^-s)`, where `e` is -1, 0 or +1.

The directions `e` are constants per mode. They are computed at elaboration
(`adi_pkg::scale_dir`) by a greedy search that brings the product closest to
the target:

- `FORGET/K_circ` for orthogonal mode
- `1/K_hyp` for hyperbolic mode
- 1 (no scaling) for the other modes

The forgetting factor `FORGET_Q16` (Q16, default 1.0) shrinks every
orthogonal rotation by that factor. With 0.97, as used for the RLS
equaliser, old rows fade by 0.97 per row. The default is 1.0 because QR,
least squares and the other exact results need an unscaled rotation.

### Set and copy

These two modes involve no arithmetic. A multiplexer at the ring entry
handles them:

- **Set.** The vector slot loads the incoming value into x; the other slots
  load 0. The y values pass on, so `W1` elements reach the diagonal of the
  row they belong to.
- **Copy.** A nonzero input in the vector slot selects the row. In a
  selected row, the `V2`-part slots put their stored value onto the y path.

## Numbers and their limits

- Two's complement with `DATA_W = 22` bits, `FRAC_W = 16` of them
  fractional, so values lie in ±32 with a resolution of 1.5·10⁻⁵.
- Intermediate values grow by up to `K ≈ 1.65` before scaling, so stored
  values should stay below about ±19.
- Shifts truncate. Observed errors against an exact floating-point model are
  below 3·10⁻⁴ for values of order 1, over dozens of chained operations.
- CORDIC range limits apply and are not checked in hardware:
  - **Hyperbolic:** needs `|w/v| < 0.8` at every diagonal. Downdating must
    leave the matrix positive definite.
  - **Linear:** needs `|w/v| < 2` at every diagonal, so `V1` should be well
    conditioned and scaled so that its diagonal is not small.
  - **Orthogonal:** converges for any input.
- Conditioning matters more than in floating point. Each device adds about
  10⁻⁴ of truncation noise. Where a diagonal of `R` is not much larger
  than that, the next rotation in that row is decided by noise. One
  example is the first four rows of a fit with condition number near 500:
  the residual they produce was off by 0.04. Scale problems so that `R` is
  well conditioned. For solves, use `W1 = -c·I` with `c < 1`, which returns
  `c·w` and keeps linear mode inside its range.

## The RLS equaliser front end (`rls_delay_line`)

An RLS equaliser fits FIR coefficients `w` so that `X1 w ≈ y1`, where `X1`
is the convolution (Toeplitz) matrix of the signal received during training,
and it then filters the payload as `y2 = X2 w`. The front end builds those
matrices implicitly. A delay line of `N_V1` taps holds
`[x_i, x_{i-1}, …, x_{i-N_V1+1}]`, and each accepted sample produces one
array row:

- **training** (`smp_train = 1`): `W1 = taps`, `W2 = [y_i 0 …]`, orthogonal
  mode. This is a QR update, and `V` becomes `R, Q^T y`.
- **filtering** (`smp_train = 0`): `W1 = -taps`, `W2 = 0`, linear mode.
  `W2'[0]` is `taps · R^-1 Q^T y = taps · w`, the equalised sample.
- **clear** (`clr_valid`): a set-mode row of zeros (`V = 0`), and the delay
  line is emptied.

Samples are accepted with valid/ready. The array takes one row per ring
period, so the sample port is back-pressured to that rate.

## Four-phase adiabatic logic (`adi_phase_gen`, `adi_inv`)

Adiabatic gates are powered by four trapezoidal clocks, a quarter period
apart. A gate samples its inputs while its clock rises, holds its output
while the clock is high, and gives its charge back while the clock falls.
Gates in series therefore form a pipeline automatically: the next gate must
use the clock one phase later.

For functional simulation, one clock edge marks each phase:

- `adi_phase_gen` numbers the phases 0–3.
- `adi_inv #(PHASE)` stores `~i` at the edge that starts `PHASE` and raises
  `o_valid`. It drops `o_valid` at the edge that starts `PHASE+2`, the
  recovery.

The output is thus valid for two phases, which is what a follower aligned
with `PHASE+1` needs. A two-state simulator has no "undefined" value, so
`o_valid` stands in for it. Dual-rail signalling is not modelled.

The top holds the two-inverter example: gates on phases 1 and 2, with
`inv_out = inv_in` two phases later. It stands beside the array and shares
only clock and reset. In a real adiabatic implementation of the array, each
CORDIC stage would likewise be one phase; the RTL uses one ordinary clock
per stage.

## Top level (`adiabatic_top`) and interfaces

Parameters:

| parameter | default |
|---|---|
| `N_V1` | 4 |
| `N_V2` | 4 |
| `DATA_W` | 22 |
| `FRAC_W` | 16 |
| `FORGET_Q16` | 65536 |
| `INV1_PHASE` | 1 |

Ports:

- **Source select.** `src_rls` chooses the row source: 1 for the RLS
  delay line, 0 for the host port. The source that is not selected sees
  `ready` low.
- **Host port.** `host_valid`, `host_ready`, `host_mode`, and `host_w1[N_V1]`
  and `host_w2[N_V2]` (signed, Q`FRAC_W`). A row is accepted on a clock edge
  where valid and ready are both high.
- **Sample port.** `smp_valid`, `smp_ready`, `smp_x`, `smp_y`, `smp_train`,
  plus `clr_valid` and `clr_ready`.
- **Output.** `out_valid` is a one-clock pulse, with `out_mode` and
  `out_w2[N_V2]`. There is no back-pressure; the receiver must take the row
  in that clock.
- **Inverter example.** `inv_in`, `phase`, `inv_mid`, `inv_mid_valid`,
  `inv_out`, `inv_out_valid`.

Reset (`rst_n`, asynchronous, active low) clears `V1` and `V2` to zero and
empties all buffers.

## Files

| file | content |
|---|---|
| `rtl/adi_pkg.sv` | modes, slot tag, shift sequence, scaling-table functions, gain constants |
| `rtl/cordic_rot_stage.sv` | micro-rotation stage with its CTRL register |
| `rtl/cordic_scale_stage.sv` | gain-compensation / forgetting stage |
| `rtl/cordic_device.sv` | the ring of stages: one row of the array, vector and rotation roles |
| `rtl/row_input_buffer.sv` | row handshake, slot-aligned column burst |
| `rtl/row_output_buffer.sv` | collects `W2'` |
| `rtl/cordic_column_array.sv` | input buffer, `N_V1` devices, output buffer |
| `rtl/rls_delay_line.sv` | Toeplitz-row generator for the RLS equaliser |
| `rtl/adi_phase_gen.sv`, `rtl/adi_inv.sv` | four-phase functional model |
| `rtl/adiabatic_top.sv` | top level |
| `tb/array_model_pkg.sv` | floating-point reference model of the array (used by the testbenches) |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus two workload tests |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. With
Verilator 5:

    verilator --binary --timing -Wno-fatal -Mdir obj -y rtl \
        rtl/adi_pkg.sv tb/array_model_pkg.sv tb/tb_adiabatic_top.sv \
        --top-module tb_adiabatic_top
    ./obj/Vtb_adiabatic_top

Substitute any other testbench name. `array_model_pkg.sv` is needed only by
the testbenches that use the model:

- `tb_cordic_device`
- `tb_cordic_column_array`
- `tb_adiabatic_top`
- `tb_rls_forgetting`
- `tb_qr_downdate`

What the testbenches establish:

- **`tb_adiabatic_top`** runs the whole design at its default size. It runs
  the RLS example: clear, 24 training samples from a known 4-tap filter, then
  16 filtered samples. Every filtered output must equal the known filter
  applied to the samples, i.e. the array must really have solved the
  least-squares problem. It then drives copy, hyperbolic and set rows from
  the host port. It checks every output row against the reference model,
  checks the inverter pipeline, and counts each mechanism: every mode,
  back-pressure, both row sources.
- **`tb_cordic_column_array`** covers the following, in every mode:
  - the exact rate, one row per 36 clocks
  - the latency
  - a matrix product and a matrix inverse; the inverse is checked as
    `A·A^-1 = I`
  - the regularised estimator, checked against the normal equations solved
    directly
- **`tb_rls_forgetting`** runs the equaliser with forgetting factor 0.97
  through a channel change. The filter must track the new channel.
- **`tb_qr_downdate`** fits 10 rows by QR updating and then removes 2 of
  them again in hyperbolic mode. The solution must match the
  normal-equation solution of the 8 rows that remain, within 10⁻³. It runs
  three random problems.
- **Block tests.** `tb_cordic_device`, `tb_cordic_rot_stage`,
  `tb_cordic_scale_stage`, `tb_row_input_buffer`, `tb_row_output_buffer`,
  `tb_rls_delay_line`, `tb_adi_phase_gen` and `tb_adi_inv` test each block
  against its own model. The stage tests are bit-exact.

## Where this RTL departs from, or adds to, the published architecture

Taken from the source:

- the transformation and its five modes
- the collapsed single column of CORDIC devices, with the control stored per
  stage and the feedback loop as storage
- stages built from `+/-/0` adders with `2^-i` shifters and CTRL units,
  micro-rotation stages followed by scaling stages
- the 4 × 4 + 4 array size shown for the triangular array
- the delay-line RLS front end, switched between orthogonal training and
  linear filtering
- the forgetting factor as a change of the scaling
- the four-phase gate model

Two readings where the source contradicts itself:

- One sentence says the transformation annihilates `W2`. The defining
  equation, and the description of the vector cells, annihilate `W1`. This
  RTL annihilates `W1`.
- The matrix-product recipe claims that a linear run with `W1 = A` gives
  `AB`. The linear-mode formula gives `-AB`, and the RTL follows the formula
  (see "The modes").

Choices made here, because the source leaves them open:

- **Numbers.** Word length, fraction width, shift sequence (with hyperbolic
  repeats) and truncating arithmetic. The default precision gives 36 stages
  per device, which matches the stage count the authors' simulation
  waveforms show, though they do not give the split.
- **Sign and scaling.** The direction rule, and the greedy scaling tables.
- **Set and copy.** How they are done (an entry multiplexer), and how copy
  selects a row.
- **Interface.** The slot tag, the row buffers, the handshakes, the clear
  request, and the host/RLS source multiplexer.
- **Clocking.** One clock per stage instead of one adiabatic phase per
  stage.
- **Reset.** What reset does.

Not built:

- **The naive triangular array.** It uses one vector cell plus rotation
  cells per row, and it is the version the column replaces.
- **The adiabatic power-clock generator and the dual-rail gate circuits.**
  They are analog and transistor-level, with no logic function beyond what
  `adi_phase_gen` and `adi_inv` model.
- **CORDIC range checks.** Inputs outside the convergence range give wrong
  results silently.

# CORDIC-based QR decomposition for MIMO channel pre-processing

A MIMO detector (successive interference cancellation, V-BLAST, sphere
decoding) does not work on the channel matrix `H` directly. It first splits it
as `H = Q R`, with `Q` unitary and `R` upper triangular, rotates the received
vector as `y' = Q^H y`, and then solves the triangular system one layer at a
time. This RTL computes that decomposition for small channel matrices with
Givens rotations. Each rotation is found and applied with CORDIC, so the
decomposition datapath is built from adders, subtractors and fixed shifts
only. It has no multipliers, no dividers, no squaring and no square roots.

Three engines are provided. They stand side by side in `qrd_top`:

| engine           | matrix       | R ready after | Q ready after | new matrix every |
|------------------|--------------|---------------|---------------|------------------|
| `qrd2x2_real`    | 2x2 real     | 26 cycles     | 28 cycles     | 3 cycles         |
| `qrd2x2_complex` | 2x2 complex  | 52 cycles     | 54 cycles     | 55 cycles        |
| `qrd4x4_real`    | 4x4 real     | 108 cycles    | 112 cycles    | 112 cycles       |

In `qrd_top`, each engine is followed by a unit that takes the received
vector `y` along with the matrix and returns `y' = Q^H y`:

* `qrd_rx_rotate` follows each real engine. It returns `y'` one cycle after
  `Q^T`: at cycle 29 for the 2x2 engine and cycle 113 for the 4x4 engine.
* `qrd_rx_rotate_cplx` follows the complex engine and returns `y'` at
  cycle 56.

## One Givens rotation = one vectoring CORDIC + one rotation CORDIC

To zero `h21` in a 2x2 matrix, take the rotation `G` that turns the first
column `(h11, h21)` onto the x axis:

    G H = [ c  s ] [h11 h12]  =  [ r11 r12 ]     r11 = sqrt(h11^2 + h21^2)
          [-s  c ] [h21 h22]     [  0  r22 ]     c = h11/r11, s = h21/r11

`G` is never formed as numbers `c` and `s`:

1. The **vectoring CORDIC** (`cordic_vectoring`) takes the first column. It
   returns its length, which is `r11`, and its angle `phi`. Each of its 13
   micro-rotations turns the vector by `+-atan(2^-i)`. The sign of `y` picks
   the direction, so `y` is driven to zero and `z` accumulates the angle.
2. The **rotation CORDIC** (`cordic_rotation`) then turns the other vectors by
   `-phi`. Each micro-rotation's direction comes from the sign of the
   remaining angle. Those vectors are column 2, which gives `(r12, r22)`, and
   the identity columns `e1` and `e2`, which give the columns of `G`.

For real data `G = Q^T = Q^H`. The engines therefore output `G` itself, which
is exactly what the detector applies to `y`.

Details that matter when changing the CORDICs:

* **Micro-rotation stages** (`cordic_vec_stage`, `cordic_rot_stage`). Each
  stage does one iteration `x' = x - d y 2^-i`, `y' = y + d x 2^-i`,
  `z' = z - d atan(2^-i)` and registers the result. So a 13-stage pipeline has
  a latency of 13 cycles and accepts one vector per cycle. The elementary
  angles come from a small ROM (`cordic_atan_rom`). Each stage reads it at its
  own constant address.
* **Quadrant pre-rotation.** Thirteen iterations starting at `i = 0` converge
  only for angles within about +-99.9 degrees. So the vectoring CORDIC negates
  any vector with `x < 0` and starts `z` at pi. The rotation CORDIC negates
  the vector and subtracts pi whenever `|angle| > pi/2`. Both steps are
  combinational, in front of the first stage.
* **Scale correction** (`cordic_scale`). The micro-rotations stretch a
  vector by `1/K`, where `K = 0.60725` for 13 iterations. The correction
  multiplies by `x/2 + x/8 - x/64 = 0.609375`, using two adders per output.
  This is the cheapest shift-and-add form and leaves a gain error of **+0.35 %
  per CORDIC pass**. The vectoring CORDIC scales only its length output. The
  rotation CORDIC scales both outputs. The correction is combinational after
  the last stage, so it adds no cycle.
* **Angles** are binary: 16 bits, with `2^15` standing for pi. Wrap-around
  is then free, and `+pi` and `-pi` share one code.

### Adder budget

Each 13-stage CORDIC uses 3 adders per stage, 39 in all. Add 2 for the single
scale unit of the vectoring CORDIC and 4 for the two scale units of the
rotation CORDIC. That makes 84 adders per real 2x2 engine: 41 for vectoring
and 43 for rotation. Two engines make up the complex 2x2 engine (168 adders)
and four Givens units the 4x4 engine (336). The pre-rotation negations and the
rounding of outputs come on top of these counts.

## Number format

Set in `qrd_pkg`:

* Matrix elements in and out are 16-bit two's complement with 13 fraction
  bits (Q3.13, range +-4). The tests use entries up to +-1.5.
* Inside a CORDIC, a sample has 21 bits. Two extra integer bits absorb the
  CORDIC gain of 1.647 and the growth of a column norm by up to sqrt(2).
  Three extra fraction bits keep 13 truncating shifts from eating into the
  output precision. Outputs are rounded and saturated back to 16 bits.

Accuracy seen in the testbenches:

* Values are within 0.4 % + 0.004 of exact arithmetic for one pass (2x2
  real). The gain error above accounts for most of that.
* For two passes (2x2 complex), they are within about 0.8 %.
* For the 4x4 engine, `Q^T H` matches `R` to about 0.01, and the rows of
  `Q^T` are orthonormal to within the accumulated gain, up to about 1.4 %.

## Real 2x2 engine (`qrd2x2_real`)

    h ──► col 1 ─► cordic_vectoring ──► r11, angle ───────────────┐
      │                                                            ▼
      └─► col 2, e1, e2 ─► qrd_in_buffer (13-deep delay line) ─► cordic_rotation ─► qrd_out_buffer ─► r12, r22, Q^T

* **Buffer and reshaping** (`qrd_in_buffer`). Column 2 and the two identity
  columns wait 13 cycles in a delay line, the time the vectoring CORDIC
  takes. When the angle arrives they enter the single rotation pipeline on
  three consecutive cycles, all with the negated angle. A tag carries each
  vector's index and `r11` along the pipeline.
* **Output buffer** (`qrd_out_buffer`). It reports rotated column 2 at once,
  with `r11` taken from the tag. It keeps the two `G` columns and presents
  them together when the second one arrives.

Timing, counted from the cycle in which the matrix is accepted:

    cycle 0      h accepted; column 1 enters the vectoring CORDIC
    cycle 13     angle ready; column 2 enters the rotation CORDIC
    cycle 14,15  e1, e2 enter the rotation CORDIC
    cycle 26     r_valid: r11, r12, r22
    cycle 28     q_valid: qt (= G = Q^T)

The rotation CORDIC takes three vectors per matrix, so `in_ready` drops for two
cycles after each accepted matrix. The engine then runs fully pipelined, with
about nine matrices in flight.

## Complex 2x2 engine (`qrd2x2_complex`)

A complex number `a + jb` is the 2-vector `(a, b)`, and multiplying it by a
phase `e^{-j phi}` is a rotation of that vector. The engine uses two real 2x2
engines, A and B, twice over:

1. **Pass 1 makes column 1 real.** Engine A decomposes
   `[Re h11, Re h12; Im h11, Im h12]`. Its "r11" is `|h11|`. Its "r12, r22"
   are the real and imaginary parts of `p1 h12`, with `p1 = e^{-j arg h11}`.
   The first column of its `G` is `p1` itself. Engine B does the same for
   row 2 at the same time.
2. **Pass 2 is a real Givens rotation `G2`** of `(|h11|, |h21|)`. `G2` is
   real, so it acts on the real and imaginary parts of column 2 separately.
   Engine A rotates the real parts and engine B the imaginary parts. Both use
   the same pivot column and hence the same angle.

Pass 2 starts in the cycle pass 1 delivers its `R`, at cycle 26. So `R` is
ready at cycle 52 and `Q^H` at cycle 54. The result is:

* `r11` is real and non-negative.
* `r12` and `r22` are complex, as `{x = re, y = im}`. Making `r22` real would
  take a third pass.
* `Q^H = G2 · diag(p1, p2)` is delivered in that factored form: `qh_rot = G2`
  and `qh_phase = {p1, p2}`. To apply it, first rotate element k of `y` by
  `p_k`, then apply `G2` to the real parts and to the imaginary parts.
  `qrd_rx_rotate_cplx` does this with multipliers; CORDIC rotations could
  do the same without them.

The engine handles one matrix at a time: `in_ready` is low from acceptance
until `q_valid`.

## Real 4x4 engine (`qrd4x4_real`)

Six rotations clear the lower triangle. Running two in parallel where the
rows allow, they fit in four steps. The engine has four Givens units, A to D,
each a `qrd_givens_stream`:

| step | unit | rows   | pivot column | zeroes     |
|------|------|--------|--------------|------------|
| 1    | A    | 1, 2   | 1            | h21        |
| 1    | B    | 3, 4   | 1            | h41        |
| 2    | C    | 1, 3   | 1            | h31        |
| 2    | D    | 2, 4   | 2            | h42        |
| 3    | A    | 2, 3   | 2            | h32        |
| 4    | B    | 3, 4   | 3            | h43        |

A `qrd_givens_stream` unit takes its row pair as a **stream of columns**, one
per cycle, with the pivot column first. The matrix columns come first,
followed by the four identity columns, so the same rotations build
`Q^T = G6 ... G1`.

* The vectoring CORDIC works on the pivot.
* All elements wait 13 cycles in a delay line, so the angle is ready when the
  pivot reaches the rotation CORDIC. The angle is then held for the rest of
  the stream.
* The pivot leaves as `(norm, 0)`.

Latency is 26 cycles, and a stream may follow the previous one directly.

A step's stream starts with its own pivot column, and each step's pivot column
is one to the right of the last. The outputs of two units therefore line up
column by column, so units can feed one another with no buffering. The one
exception is row 4: it leaves unit D in step 2 but is needed by unit B in
step 4, so it waits in a 26-deep delay line. Units A and B serve twice, in
steps 1 and 3 and in steps 1 and 4. A tag bit tells their two streams apart.

    cycle 0     A, B start (column 1)             ... step 1 out at 26
    cycle 26    C starts (column 1), D at 27 (col 2)  step 2 out at 52/53
    cycle 53    A starts again (column 2)             step 3 out at 79
    cycle 80    B starts again (column 3)             last R entry at 107
    cycle 108   r_valid (R registered)
    cycle 112   q_valid (Q^T registered)

Rows 3 and 4 pass through different numbers of CORDICs before step 4 (three
and two). Their gain errors therefore differ slightly. `Q^T H = R` still holds
to the precision above, because each row of `Q^T` goes through the same
rotations as the matching row of `R`.

## Received-vector rotation (`qrd_rx_rotate`, `qrd_rx_rotate_cplx`)

The detector needs `y'`, not `Q` itself. A real engine may hold several
matrices at once: the 2x2 engine holds up to ten, since it takes one every 3
cycles and needs 28. So `y` must be paired with the right `Q^T`:

* `y` is written into a FIFO in the cycle its matrix is accepted.
  `qrd_top` drives `y_valid` with the engine's `in_valid && in_ready`.
* The engine's `q_valid` pops the oldest `y`. The block then forms
  `y' = qt * y` with N x N products and an adder tree.
* The result is rounded half-up to the 16-bit format, saturated, and
  registered. `out_valid` follows `q_valid` by one cycle.

`DEPTH` must cover the matrices in flight: 16 for the 2x2 engine, 2 for the
4x4 engine. Assertions flag a push into a full FIFO and a `q_valid` with no
vector waiting. These units are the only place that uses multipliers: 4 for
N = 2 and 16 for N = 4. For the 2x2 engine, `y` could instead go through the rotation
CORDIC as a fourth vector. That would cost a fourth pipeline slot per matrix
and change the engine's throughput, so it was not done.

`qrd_rx_rotate_cplx` applies the factored `Q^H = G2 · diag(p1, p2)` of the
complex engine in that order:

1. In the `q_valid` cycle, each element is multiplied by its phase,
   `u_k = p_k y_k`, as a complex product. The result is rounded and
   registered together with `G2`.
2. In the next cycle, `G2` is applied to the real parts `(u1, u2).x` and to
   the imaginary parts `(u1, u2).y`. The result is rounded and registered.

`y'` is therefore valid two cycles after `q_valid`. This takes 16
multipliers. The complex engine holds one matrix at a time, so a FIFO depth
of 2 is enough.

## Interfaces

* All engines use the same input handshake: the matrix is taken in a cycle
  where `in_valid && in_ready`. It need not be held afterwards.
* Results are valid only in the cycle their `*_valid` bit is high.
* Arrays are indexed `[row][col]`.
* The reset `rst_n` is asynchronous and active low. It clears valid bits and
  control state only. Datapath registers start undefined, and no output
  depends on them before the matching valid bit.

Assertions check the internal timing rules. The in-buffer checks that a new
angle never arrives while the previous set is still being issued. The complex
engine checks that its two real engines run in lock step. The 4x4 engine
checks that its streams line up, that the row-4 buffer is filled in time, and
that step 1 and step 3 never overlap on unit A.

## Where this design goes beyond, or departs from, the published description

The published design was built from FPGA DSP library blocks. It gives the
algorithm, the 13-stage pipelines, the scale constant, the adder counts and
the latencies, but no word lengths, handshakes or internals of its buffers.
The following points are choices made here:

* The word lengths, the binary angle format and the reset behaviour.
* The quadrant pre-rotations. Without them a column with a negative first
  element would not converge.
* The rotation-mode direction rule is taken from the sign of the residual
  angle. This is the rule that makes rotation mode work.
* The scale factor is 0.609375 (two adders) rather than the exact 0.60725.
  The description quotes K = 0.6057 and two additions per scale unit.
* The elementary-angle table is an asynchronous ROM, so each micro-rotation
  still takes one cycle. The published design reads the angles from block
  RAM.
* In the real 2x2 engine, `Q^T` comes two cycles after `R`, at 28 rather than
  26 cycles. This is because the two identity columns share the one rotation
  pipeline with column 2.
* The complex algorithm (two passes on two engines) is one reading of
  "two modules operating in parallel, 52 cycles". `r22` stays complex, and
  `Q^H` is returned in factored form.
* The 4x4 schedule, the streaming Givens unit and the reuse of two units are
  this design's own. The published figure is 104 cycles; the column skew
  between steps brings this implementation's `R` to 108 cycles.
* There is no flow control on the outputs. A consumer must take results in
  the cycle they are valid.

* The rotation of the received vector is specified only by its result,
  `y' = Q^H y`. The FIFO and the direct multiply-accumulate of
  the two `qrd_rx_rotate` units are this design's own.

Not included: the detector that uses `R` and `y'`.

## Files

    rtl/qrd_pkg.sv            formats, types, rounding helpers
    rtl/cordic_atan_rom.sv    elementary angles atan(2^-i)
    rtl/cordic_vec_stage.sv   one vectoring micro-rotation
    rtl/cordic_rot_stage.sv   one rotation micro-rotation
    rtl/cordic_scale.sv       K scaling with two adders
    rtl/cordic_vectoring.sv   13-stage vectoring CORDIC
    rtl/cordic_rotation.sv    13-stage rotation CORDIC
    rtl/qrd_in_buffer.sv      delay line + serialiser in front of the rotation CORDIC
    rtl/qrd_out_buffer.sv     collects rotated vectors into R and Q
    rtl/qrd2x2_real.sv        real 2x2 engine
    rtl/qrd2x2_complex.sv     complex 2x2 engine (two real engines, two passes)
    rtl/qrd_givens_stream.sv  streaming Givens unit
    rtl/qrd4x4_real.sv        real 4x4 engine (four Givens units)
    rtl/qrd_rx_rotate.sv      y' = Q^T y with a FIFO pairing y and its Q^T
    rtl/qrd_rx_rotate_cplx.sv y' = G2 diag(p1, p2) y for the complex engine
    rtl/qrd_top.sv            the three engines side by side, with y rotation
    tb/tb_<module>.sv         one self-checking testbench per module

The number of micro-rotations is the parameter `N_STAGES` of the two CORDIC
pipelines (default 13, at most 16). The engines use the package constant
`NUM_STAGES`, and their latencies scale with it.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
They compare against real-arithmetic references, check latencies, and stop
through a watchdog if a result never comes. `tb_qrd_top` runs all three
engines at once at their default sizes. It also counts each mechanism of the
design: input throttling, both kinds of pre-rotation, the complex second
pass, the 4x4 unit reuse, the row-4 buffer and the y FIFO holding several
vectors. Every matrix, real or complex, comes with `y = H s` for a random
`s`. The test checks that `y' = R s`, the triangular system a detector then
solves. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/qrd_pkg.sv tb/tb_qrd_top.sv --top-module tb_qrd_top -o sim
    ./obj_dir/sim

Replace `tb_qrd_top` with any other `tb_*` to test one block. Each testbench
finishes in well under a second of simulation time. Lint a module with

    verilator --lint-only -Wall -Irtl -y rtl rtl/qrd_pkg.sv rtl/qrd_top.sv --top-module qrd_top

Verilator reports `SYNCASYNCNET` for `rst_n`, because the reset is
asynchronous in the flip-flops and also used in the `disable iff` of the
assertions. That warning is expected.

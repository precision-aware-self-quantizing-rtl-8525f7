# Self-quantizing 2-D 9/7 wavelet processor

This processor computes a multilevel two-dimensional discrete wavelet
transform (DWT) of an image, using the lossy 9/7 filter pair of JPEG 2000.
It writes back **quantization indices, not coefficients**. Each final
coefficient goes through a dead-zone quantizer on its way into memory. The
quantizer's step follows the JPEG 2000 rule for the coefficient's level, so
no separate quantization pass is needed.

Three things can be chosen per run:

- the number of decomposition levels (1 to 4);
- the quantization step, which sets the target precision;
- which of two 1-D filter engines does the arithmetic.

The two filter engines compute the same function:

- **Bit-parallel core.** Takes one sample per clock and computes in
  fixed-point two's complement.
- **Digit-serial core.** Works one signed digit per clock, most significant
  digit first ("online" arithmetic). It is far smaller per operator. Its
  word length is a run-time input, so precision can be traded against time
  without changing the hardware.

Both engines use the *flipping structure* of the lifting scheme. The
multiplications are arranged so that no multiplier sits in a chain after
another within one lifting step, which keeps the critical path short.

## Data flow through the processor

```
 host port ──► dp_buffer bank 0 ──► dwt_controller ──► dwt_split ──► 1-D core ──► dz_quantizer ──► dp_buffer
                    ▲   (reads with symmetric     (even/odd       (bit-parallel or   (final
                    │    extension)                pairs)          digit-serial)      coefficients only)
                    └───────────────────────── bank 1 (row-pass results) ◄──────────────────────┘
```

The buffer (`dp_buffer`) holds two images:

- **Bank 0** holds the input image and, in the end, the results.
- **Bank 1** holds the intermediate result of a row pass.

One level consists of two passes:

1. **Row pass.** Every row of the current LL region is read from bank 0 and
   filtered. The low-pass half is written to the left of the same row in
   bank 1, the high-pass half to the right.
2. **Column pass.** Every column of that region is read from bank 1 and
   filtered. The results are written to bank 0: low-pass to the top,
   high-pass to the bottom.

After level L, the top-left block of (ROWS>>L) × (COLS>>L) samples is LL_L.
The next level works on that block only. Everything outside it is final, so
the layout is the usual dyadic one:

- LL is top-left;
- HL is to its right;
- LH is below it;
- HH is on the diagonal.

Quantization applies only to final data:

- The HL, LH and HH outputs of every column pass are quantized.
- So are all four sub-bands of the last level.
- The LL of an intermediate level is written at full precision, because the
  next level reads it.

## Lines, boundaries and the schedule (`dwt_controller`)

A line of length N is filtered as a whole.

**Symmetric extension.** The controller reads the line with whole-sample
symmetric extension, four samples beyond each end (x[-i] = x[i],
x[N-1+i] = x[N-1-i]). That makes N+8 reads. The 1-D cores have a lag of two
pairs, so the first four result pairs are warm-up and are dropped. The
remaining N/2 pairs give s[k] at position k of the line and d[k] at
position N/2+k.

**Bit-parallel timing.** Lines are processed one after the other. Each line
takes N+13 clocks: N+8 reads plus a drain of the pipeline. A complete run
therefore takes

    sum over levels l of  R_l*(C_l+13) + C_l*(R_l+13)   clocks,

where R_l × C_l is the LL region at the start of level l.

**Line-length rule.** Every line must be even and at least 6 long. This
means ROWS>>(levels-1) and COLS>>(levels-1) must be even and at least 6.

**Digit-serial timing.** The controller is paced by two inputs,
`allow_even` and `allow_odd`. In bit-parallel mode both are held high. In
digit-serial mode the top raises them only on the two clocks before a frame
starts, so each frame receives exactly one pair. A line then takes
(N+8)/2 frames of n_l clocks, where n_l is the digit count of the level
(see the iteration table below), plus a drain of at most about three
frames.

## The flipping-structure datapath (`dwt97_bp_core`)

**Lifting constants.** The lifting factorisation of the 9/7 filter uses:

- α = -1.586134342
- β = -0.05298011854
- γ = 0.8829110762
- δ = 0.4435068522
- ζ = 1.149604398

**Flipped constants.** The flipping structure divides each lifting step by
its coefficient, so each step becomes "add, then multiply". It uses six
constants. Scale factors of 16, 32 and 4 keep the constants small, and the
right shifts in the node equations below undo them.

| constant | value       | meaning              |
|----------|-------------|----------------------|
| C0       | -0.6304     | 1/α                  |
| C1       | 0.74375     | 1/(αβ) / 16          |
| C2       | -0.66807    | 1/(βγ) / 32          |
| C3       | 0.63844     | 1/(γδ) / 4           |
| C4       | 2.06524     | 32αβγ / ζ            |
| C5       | 2.42102     | 64αβγδζ              |

**Node equations.** Per input pair (s_in = even, d_in = odd), with `_q`
meaning the value of the previous pair:

    D2  = s_in + s0_q          D0 = C0*d0_q        D3  = D0 + D2
    D1  = C1*s0_q              D4 = (D3 + D3_q) >>> 4
    D5  = D1 + D4              D6 = C2*D3_q        D7  = (D5 + D5_q) >>> 1
    D9  = D6 + D7              D8 = C3*D5_q        D10 = (D9 + D9_q) >>> 1
    D11 = D8 + D10
    low-pass  s = C5*D11       high-pass d = C4*D9

Here s0 and d0 are the input samples. The outputs have the normal 9/7
scaling: the low-pass gain at DC is 1, and so is the high-pass gain at
Nyquist. The pair computed from the input pair at time m is the coefficient
pair of index m-2; the controller's warm-up handles this lag.

**Number format.** All nodes share one format:

- 28-bit words, `DATA_W`;
- 12 fractional bits, `FRAC_B`;
- constants of 20 bits, 17 of them fractional.

Sixteen integer bits are enough for four 2-D levels of 8-bit pixels, since
the LL band grows by about a factor of two per level. Internal products are
truncated toward minus infinity. The final outputs are rounded toward zero
by the quantizer. These widths were chosen by simulation: at four levels
with a level-1 step of 4.0, every index is within one of an ideal
real-arithmetic transform, and almost all are exact.

The data paths were not optimised node by node. The original architecture
sizes each node's integer and fractional bits separately, by analysis and
simulation. This design uses one common format instead.

## Self-quantization (`dz_quantizer`)

**The step.** The step is a power of two: 2^`step_shift` data LSBs at
level 1, halving at each further level. `step_shift` = FRAC_B + 2 means a
step of 4.0 at level 1, 2.0 at level 2, and so on.

**The index.** The index is the coefficient's magnitude shifted right,
rounded toward zero, with the sign put back. So the bin around zero is twice
as wide as the others: a dead zone. The index is stored as a two's
complement word in place of the coefficient.

**What this replaces.** The original architecture reaches the target
precision by sizing the last multiplier's output. Here a shift after the
multiplier does the same job, so the step can change at run time.

## The digit-serial core (`ds_dwt97_core`)

This is the least obvious part of the design. It computes the same
equations as the bit-parallel core, with every operator working on streams
of radix-2 signed digits. Each signed digit is -1, 0 or +1, encoded on two
bits as 10, 00, 01. Digits travel one per clock, most significant first.

### Frames

**Frame layout.** A word is a frame of `len` digits, and all operators run
in lock-step on frames. Each frame:

- serialises one even and one odd input sample (`sd_serializer`, which maps
  the sign bit to a -1 digit);
- runs them through the datapath;
- turns the two result streams back into two's complement
  (`sd_deserializer`).

**Throughput and latency.**

- One pair goes in per frame.
- A result appears `len + 10` clocks after the frame's `in_ready`.
- The lag is again two pairs.

**Bubble frames.** A frame whose input is marked invalid is a bubble. It
flows through the pipeline but produces no `out_valid`. The core is held in
reset while it is not running, so each run starts from empty delay lines.

### Operators

**`online_sd_adder`.** The two-step transfer/sum adder; nothing carries
further than two positions.

- Within a frame, its output equals (X + Y)/4. The result has two more
  integer digits, so it can never overflow.
- It has an online delay of two digits plus one register.

**`online_sd_mult`.** Multiplies by a constant. The constant is scaled to
|C|/2^K ≤ 1/2, with K accounted for outside.

- A residual recurrence picks each output digit: R' = 2R + C·x_j; the
  digit is +1, 0 or -1 by comparing R' with ±1/2.
- The product is exact to half a unit of the frame.
- It has an online delay of zero, plus one register.

**`cfg_delay_line`.** A shift register with a multiplexer that taps any
stage, so its delay is a run-time input. It is used for two jobs:

- the word delays (z^-1), tapped at `len`;
- short fixed digit delays.

### Binary points without shifters

There are no variable shifters. Each node carries a *scale exponent* r: the
real value of a frame is its integer reading × 2^(r + WI - len). Three
operations change r:

- An adder adds 2 to r.
- A multiplier by C adds K.
- A right shift by m digits is either a change of r, or, where operands of
  an adder must be aligned, a delay of m digits with the first m digits of
  the frame forced to zero.

Every node also has a fixed clock offset from the input frame. The header
of `ds_dwt97_core.sv` lists the offset and exponent of every node. The
deepest path is nine digit stages, matching the nine-stage pipeline of the
original architecture.

The results come out scaled as follows, in input LSBs:

- low-pass = `s_out` · 2^(WI − LMAX + 13);
- high-pass = `d_out` · 2^(WI − LMAX + 10).

### Precision

Digits that would fall beyond the end of a frame are dropped. A shorter
`len` therefore gives a coarser result in fewer clocks. With long frames
the error is set by the F-bit rounding of the constants instead. Measured
against real arithmetic:

- With 16-bit inputs and 40 digits, the testbench measures an error of at
  most 0.03 input LSB.
- With 32 digits, it measures 0.09 input LSB.

In the 2-D processor the core is built with 28-bit inputs and up to 48
digits (`DS_LMAX`). Its outputs are truncated to the common data format
before quantization.

### The iteration table (`iteration_table`)

Deeper levels need more precision: the quantization step halves per level
while the low band grows. So the digit count is set per level, by a small
register file with one entry per level:

- The host writes entries through `it_we` / `it_level` / `it_len` while the
  processor is idle.
- After reset every entry is `DS_LMAX`.
- When the controller moves to the next level, the top stops the
  digit-serial core for one clock and restarts it with that level's count.
  No read is issued in that clock.
- All results of the previous level have been written by then, so nothing
  in flight is lost.

A target precision is selected by loading the table that belongs to it.

**Per-operator counts.** The original architecture keeps a count per
operator, produced by an offline error analysis. This design uses one count
per level for all operators of the core.

## Using the top module (`dwt2d_top`)

**Parameters.**

| parameter    | default | meaning |
|--------------|---------|---------|
| `ROWS`, `COLS` | 480, 640 | image size |
| `MAX_LEVELS` | 4 | deepest decomposition supported |
| `W`          | 28 | data word (12 fractional bits) |
| `DS_LMAX`    | 48 | longest digit-serial frame |

**Running a transform.**

1. While `busy` is low, write the image into bank 0 through `host_we` /
   `host_waddr` / `host_wdata`. The address is r·COLS + c, and the values
   are in the data format (pixel × 2^12).
2. Pulse `start` for one clock, with `levels`, `step_shift`, `ds_mode`
   (0 = bit-parallel, 1 = digit-serial) valid. These values are captured
   at `start`. For digit-serial runs, first load the digit count of each
   level (28 to 48) into the iteration table; the reset values are 48.
3. Wait for `done`. `busy` is high in between, and `pass` shows whether a
   row or a column pass is running.
4. Read the indices back through `host_re` / `host_raddr`. The word appears
   on `host_rdata` one clock later.

The buffer is 2 × ROWS × COLS words. Its contents are not reset.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_dwt97_bp_core` | bit-exact against the node equations, and within 0.125 of real-arithmetic lifting |
| `tb_dwt_split`, `tb_dz_quantizer`, `tb_dp_buffer` | pairing across lines; random values against integer division by the step; writes and reads against a model memory |
| `tb_dwt_controller` | the read/write address sequence, with a stand-in core |
| `tb_sd_serializer`, `tb_sd_deserializer` | the conversions to and from signed digits |
| `tb_online_sd_adder`, `tb_online_sd_mult` | the value of each output frame against integer arithmetic |
| `tb_cfg_delay_line` | every tap |
| `tb_ds_dwt97_core` | the real-arithmetic 9/7 at two word lengths, and the latency |
| `tb_iteration_table` | reset values, writes (out-of-range levels ignored) and reads against a model |
| `tb_dwt2d_top` | end to end on a 24 × 32 image (below) |
| `tb_dwt2d_top_full` | end to end at the default size (below) |

**`tb_dwt2d_top`.** Runs four transforms on a 24 × 32 image:

- bit-parallel, 3 levels;
- bit-parallel, 1 level;
- digit-serial, 2 levels, 36 digits at level 1 and 48 at level 2;
- digit-serial, 1 level, 36 digits.

It compares every index with a real-arithmetic reference quantized the same
way. An index may differ by at most one, and at least 90% must be exact. It
checks the clock count against the schedule. It also counts that each
mechanism occurs:

- row and column passes;
- extension at both ends;
- quantized and unquantized writes;
- level steps;
- reconfiguration;
- digit-serial words and bubbles;
- a change of digit count between levels.

**`tb_dwt2d_top_full`.** Runs the same checks at the default 480 × 640 size:

- 4 levels bit-parallel;
- 2 levels bit-parallel;
- 1 level digit-serial, 48 digits;
- 2 levels digit-serial, 44 digits at level 1 and 48 at level 2.

It takes about a minute in Verilator. Results at this size:

| run | indices exact |
|-----|---------------|
| 4 levels, bit-parallel | 99.9% (306,867 of 307,200) |
| 2 levels, bit-parallel | 99.7% |
| 1 level, digit-serial | 99.99% |
| 2 levels, digit-serial | 99.99% |

The 4-level bit-parallel run takes 843,301 clocks. The 1-level
digit-serial run takes 15.0 million clocks, about 18 times as many as the
bit-parallel core would need for the same single level.

`tb/dwt_ref_pkg.sv` holds the reference model: a real-valued lifting
transform with symmetric extension, the dead-zone index, and the sub-band
level of a position.

## Simulating

With Verilator 5 (`--binary --timing`), from the directory holding `rtl/`
and `tb/`. The package `dwt_pkg` must be given first; the other modules are
found through `-y`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt2d_top.sv \
        --top-module tb_dwt2d_top -Mdir obj
    ./obj/Vtb_dwt2d_top

Replace `tb_dwt2d_top` with any other testbench name to run it.

## Departures from the original architecture

- Both 1-D engines are built into one processor and selected per run. The
  original presents them as alternative designs.
- The iteration table holds one digit count per level, not one per
  operator. Its contents are loaded by the host, not computed by an error
  analysis.
- Node widths are one common format, not individually optimised. Area,
  speed and energy were not evaluated.
- How the image enters and leaves the buffer is not specified in the
  original. This design adds a simple host port that is active while the
  processor is idle.
- Boundary handling (whole-sample symmetric extension), the ping-pong use of
  the two buffer banks, the line-by-line schedule and all handshakes are
  this design's own choices.
- The original also describes preprocessing steps ("bit interchange",
  "bit quantization", a coefficient matrix) without saying what they
  compute. Those are not built.

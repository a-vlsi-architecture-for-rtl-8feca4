# Real-time 2-D IIR filtering with a cascadable state-space processor

This RTL implements a processor array for two-dimensional, discrete linear shift-invariant
(DLSI) systems. Such systems include 2-D IIR filters for images, spatial-domain filters and
simulation or control models. A second-order system with quarter-plane support is given by

    g(m,n) = Σ_{j,k=0..2} a(j,k)·f(m-j,n-k)  −  Σ_{j,k=0..2, j+k>0} b(j,k)·g(m-j,n-k)

Here `f` is the input image and `g` is the output, with `m` the position in a row and `n`
the row number. Evaluated directly, this takes 17 multiplications and 16 additions per pixel.
It also needs eight earlier inputs and outputs, from this row and from the two rows above.

The design recasts the filter in **state-space form**. It keeps eight state variables that
carry everything the future needs. Each state variable, and the output, is then one instance
of a single computational primitive:

    q = [c·f + r] + [d·y + q']

where

- `f` is the current input;
- `y` is the current output, used as a feedback term;
- `r` is a *horizontal* state, delayed by one sample;
- `q'` is a *vertical* state, delayed by one row;
- `c` and `d` are coefficients.

One processor has nine arithmetic units, one per primitive instance. It evaluates the whole
second-order system for one pixel in every processor cycle. The processor needs only the
current pixel plus its own state, and data passes between processors in one direction only.
As a result, processors can be chained into a pipeline for higher orders. Each processor runs
whenever its data is available: FIFOs between the processors absorb timing differences.

## The state-space decomposition

The output and each state variable get one arithmetic unit. With `d = −b`:

| unit | computes | c | d | r (horizontal in) | q' (vertical in) | stored in |
|---|---|---|---|---|---|---|
| 0 | output `g` | a(0,0) | – | h(1,0) | v1 | OBUF |
| 1 | h(2,0) | a(2,0) | −b(2,0) | 0 | 0 | results register |
| 2 | h(1,0) | a(1,0) | −b(1,0) | h(2,0) | 0 | results register |
| 3 | h(2,1) | a(2,1) | −b(2,1) | 0 | 0 | results register |
| 4 | h(1,1) | a(1,1) | −b(1,1) | h(2,1) | 0 | results register |
| 5 | v1 | a(0,1) | −b(0,1) | h(1,1) | v2 | QBUF |
| 6 | h(2,2) | a(2,2) | −b(2,2) | 0 | 0 | results register |
| 7 | h(1,2) | a(1,2) | −b(1,2) | h(2,2) | 0 | results register |
| 8 | v2 | a(0,2) | −b(0,2) | h(1,2) | 0 | QBUF |

Read each row of the table as "unit *i* produces the new value of its state from the current
`f` and `g` and the listed old states". The structure comes from the block diagram of the
general-order system:

- Row *k* of the diagram is a chain of one-sample delays `h(j,k)`. Each delay collects
  `a(j,k)·f − b(j,k)·g` and passes the sum one step along the chain.
- The end of chains 1 and 2 feeds a one-row delay, `v1` or `v2`.
- `v2` feeds the head of chain 1, and `v1` feeds the output.

Units 1–8 need the current output `g` as their `y` input, so unit 0 must finish first. The
phase plan below handles this ordering.

Where each kind of state lives:

- **Horizontal states** are one-sample delays. They are simply the results registers of
  units 1–4 and 6–7. At the first pixel of a row they read as zero.
- **Vertical states** are one-row delays. The pair `(v1, v2)` computed at column `m` is
  written to QBUF, an external FIFO of 32-bit words. It is read back at column `m` of the
  next row. In the first row of a frame they read as zero. The last row writes none, so
  QBUF is empty between frames.
- The **boundary conditions** follow from this: zero initial conditions at the top and left
  edges of the image.

Only two vertical states per column have to be kept for a whole row. This is the minimum for
a filter of order two in `n`, and it keeps the off-chip row storage small (2 × 16 bits per
column).

The total work is 17 multiplications and 16 additions per pixel. This is the same operation
count as the direct form, but it needs no past pixels and no past outputs.

## One processor cycle: four phases

A processor cycle is four clocks, marked by a one-hot four-phase generator. Each arithmetic
unit has one 16×16 multiplier, which it uses twice per cycle. Its 32-bit product is split at
the coefficients' binary point:

- the **MSB register** takes the whole-number part (the upper 18 bits);
- the **LSB registers** take the 14 fraction bits. There are two of them in a chain, so the
  fraction of the first product is still there when the second arrives.

Two adders follow. The LSB adder sums the two fraction fields. The main adder sums the MSB
register, the accumulator and the LSB adder's carry. The accumulator starts each cycle with
the two state variables `r + q'`. With P1 = c·f and P2 = d·y:

| phase | multiplier → registers | accumulator | results register |
|---|---|---|---|
| PH0 | MSB, LSB1 ← P1; LSB2 ← 0 | `acc ← r + q'` | – |
| PH1 | – | `acc ← acc + MSB` | unit 0 latches `g = rnd_sat(acc + MSB, LSB1)` |
| PH2 | MSB, LSB1 ← P2 (y = g); LSB2 ← LSB1 | – | – |
| PH3 | – | `acc ← acc + MSB + carry` | units 1–8 latch `rnd_sat(acc + MSB + carry, LSB1 + LSB2)` |

Rounding sees the whole-number sum joined to the low 14 bits of the LSB adder. The fractions
of both products are therefore added before rounding. The result is exactly the rounded value
of `r + q' + (c·f + d·y)/2^14`.

The results for one pixel are stored in PH3:

- `g` goes to OBUF;
- `(v1, v2)` go to QBUF;
- the new horizontal states are kept in the results registers.

The next pixel and its vertical states are fetched on the same clock edge, if they are
available. An unstalled processor therefore delivers **one output every four clocks**. At a
40 MHz clock this is one output per 100 ns.

The sequence control suspends the processor in two places:

- **Before PH0**, when IBUF is empty, or when QBUF is empty in any row but the first.
- **In PH3**, when OBUF is full, or when QBUF is full in any row but the last. The results
  are held until there is room.

The `stall_in` and `stall_out` outputs show each of these waits.

## Number format

- **Data and state variables:** 16-bit two's-complement integers.
- **Coefficients:** 16-bit two's complement with 14 fractional bits, so `c = round(a·2^14)`
  and `d = round(−b·2^14)`. The range is [−2, 2).
- **Products:** 32 bits: an 18-bit whole part and a 14-bit fraction. The accumulator holds
  whole numbers in 20 bits and never overflows internally.
- **Rounding and saturation:** every state and the output are rounded half up to an integer,
  then saturated to 16 bits (`round_sat`). Each saturation raises an overflow pulse. The
  processor keeps these pulses as a sticky `ovf_status` for the frame.

Because every state is rounded, results differ slightly from the ideal difference equation.
For the test filters the largest deviation was 2.7 LSB. The testbenches therefore compare
bit-exactly with a fixed-point model of the same state-space order, and separately check
closeness to the real-valued difference equation.

## Buffers, cascade and system controller

`dsp_system` is the complete system:

    in_* → IBUF → proc 1 → FIFO → proc 2 → … → proc NSEC → OBUF → out_*
                    ↕ QBUF           ↕ QBUF                ↕ QBUF

- **Cascade.** Each processor realises one second-order section with its own coefficients.
  `NSEC` sections realise an order-`2·NSEC` system whose transfer function is the product of
  the sections' transfer functions. The default is two sections, a fourth-order filter.
  `NSEC = 1` is the single-processor system. Adding sections adds a few clocks of latency
  but does not lower throughput.
- **Buffer sizes.** IBUF, OBUF and every QBUF hold `ROW_DEPTH` = 512 words. **A QBUF must
  hold one full row:** in the first row the processor writes a vertical-state pair for every
  column before it reads any. If a row is longer than QBUF, the system deadlocks. Rows of up
  to `ROW_DEPTH` samples and up to 65535 rows per frame are supported. The FIFOs between
  processors are `LINK_DEPTH` = 16 words deep. A producer and its consumer run at the same
  rate, so these FIFOs only absorb jitter.
- **System controller (`sys_ctrl`).** It takes coefficients and commands from the host. For
  each frame it:
  1. loads all `NSEC × 9` coefficient pairs into the processors, one per clock;
  2. starts the processors;
  3. admits exactly `rows × cols` input samples into IBUF;
  4. reports `host_done` once the last output has left OBUF.
- **Automatic gain control.** When `host_agc_en` is set and any processor saturated during a
  frame, the scale factor `host_scale` goes up by one. The first section's `c` coefficients
  are shifted right by the scale factor when they are loaded, so each step halves the gain of
  the whole cascade for the next frame. A frame started with gain control off resets the
  scale to zero.
- **Adaptive operation.** Coefficient writes made while a frame runs go straight to the
  processor. There they land in holding registers, which are copied into the working C and D
  registers when the next pixel is fetched. A pixel therefore never uses a mix of old and new
  coefficients.

### Host protocol

1. Write each coefficient pair with a one-clock `host_coef_we` pulse. Give the section in
   `host_coef_sec`, the unit (0–8, as in the table above) in `host_coef.unit`, and the values
   in `host_coef.c` and `host_coef.d`. `d` of unit 0 is unused.
2. Pulse `host_start` with `host_rows` and `host_cols` valid.
3. Offer pixels row by row on `in_valid`/`in_data`. A pixel is taken when `in_ready` is also
   high.
4. Take outputs in the same order: `out_data` is taken when both `out_valid` and
   `out_ready` are high. `host_done` pulses after the last one.

## Files

| file | contents |
|---|---|
| `rtl/dsp_pkg.sv` | widths, the phase enum, the QBUF word and coefficient-write structs |
| `rtl/round_sat.sv` | rounding, saturation and the overflow flag (16-bit control logic) |
| `rtl/arith_unit.sv` | one arithmetic unit: multiplier, adders, accumulator, results register |
| `rtl/phase_gen.sv` | four-phase generator (one-hot ring of enables) |
| `rtl/seq_ctrl.sv` | sequence control: handshakes, suspend rules, row/column counting |
| `rtl/dsp_core.sv` | the processor: nine units, F/C/D/Q registers, unit wiring |
| `rtl/fifo.sv` | elastic FIFO used for IBUF, OBUF, QBUF and the links |
| `rtl/sys_ctrl.sv` | system controller with coefficient store and gain control |
| `rtl/dsp_system.sv` | top level: controller, buffers and the cascade of processors |
| `tb/iir_ref_pkg.sv` | fixed-point state-space model, real-valued difference equation, test filters |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dsp_system_full` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/dsp_pkg.sv tb/iir_ref_pkg.sv rtl/*.sv tb/tb_dsp_system.sv \
        --top-module tb_dsp_system -Mdir obj_sys
    ./obj_sys/Vtb_dsp_system

Each testbench covers the following:

- **`tb_round_sat`:** corner and random values against an integer model.
- **`tb_arith_unit`:** random operands and random idle clocks between phases. Both result
  phases are exercised, including saturation.
- **`tb_phase_gen`:** phase order, holding when not advanced, and one-hot state.
- **`tb_fifo`:** random traffic against a queue model, including full and empty.
- **`tb_seq_ctrl`:**
  - the handshake rules;
  - the QBUF row rules;
  - exactly 4 clocks per pixel when nothing stalls;
  - correct behaviour under random stalls.
- **`tb_dsp_core`:** three frames. In all of them every output is compared with the
  fixed-point model.
  - A free-running frame. It is also checked against the difference equation, and must take
    4 clocks per pixel.
  - A frame with random stalls on every buffer flag, and a coefficient change halfway
    through.
  - A saturating frame, which must raise the overflow status.
- **`tb_sys_ctrl`:** coefficient loading, input admission, scaling, gain control and
  coefficient forwarding during a frame.
- **`tb_dsp_system`:** the two-section cascade at small buffer sizes, end to end. It runs
  four frames: free-running, with random stalls, overflowing, and scaled. Every output is
  checked against the cascaded model. It counts input stalls, output stalls, full link FIFOs,
  overflows and scale changes, and each must happen at least once.
- **`tb_lowpass_single`:** the single-processor system running a separable second-order
  Butterworth low-pass filter. A constant image must come out at unit gain, a
  checkerboard must be suppressed, and a random image must match the model exactly.
- **`tb_dsp_system_full`:** the default configuration (two sections, 512-word buffers) runs a
  512 × 512 image. All 262,144 outputs are checked, and the frame must take 4 clocks per
  pixel plus 28 clocks of fixed overhead.

## Where this implementation makes its own choices

- **One clock.** The architecture is meant to be asynchronous: each processor runs at its own
  pace, tied to its neighbours only by elastic buffers and handshakes. Here everything runs
  from one clock. The asynchrony survives as data-driven stalls: a processor waits on
  empty/full flags, never on a global schedule. Separate clock domains would need
  dual-clock FIFOs in place of `fifo`.
- **Phases as enables.** The non-overlapping four-phase clock is a one-hot ring of enables,
  not four clock signals.
- **Split point and LSB clearing.** The product is split at the coefficients' binary point
  (bit 14). The second LSB register is cleared at the start of each cycle, so the output
  unit's PH1 result rounds c·f alone.
- **Other choices.** The coefficient format (14 fractional bits), the rounding rule (half
  up), the phase plan, the unit-to-equation assignment, the boundary conditions, the
  gain-control rule (a power-of-two shift of the first section's input coefficients) and the
  host interface are all specific to this implementation.
- **Buffers on chip.** IBUF, OBUF and QBUF are described as off-chip memories or FIFO chips.
  Here they are synthesizable FIFOs inside `dsp_system`. The buffer depths (512 and 16) and
  the default number of sections (2) are this implementation's choices; no sizes are fixed
  for them.
- **Not built:**
  - Reconfiguring the units for other algorithms.
  - A microprogrammed sequencer, which was offered as an alternative.
  - The chip-level aspects: custom arithmetic layout, 1.25 µm CMOS, 40 MHz timing closure.
  - The earlier single-chip processor with three adders per unit. It is only a predecessor
    of this design.

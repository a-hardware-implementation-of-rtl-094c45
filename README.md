# ECC-B233: a small scalar-multiplication engine for the NIST B-233 curve

This RTL computes the elliptic-curve scalar product **Q = k·P** on the NIST
B-233 curve

    y² + xy = x³ + x² + b      over GF(2²³³),   f(x) = x²³³ + x⁷⁴ + 1

with a 233-bit secret key `k` and an affine input point `P`. Q = k·P is the
core operation of ECDH key agreement and ECDSA. The design is built for a small
area, not for speed. Every field operation runs on one of two bit-serial units:

- a shift-and-add multiplier, which takes 233 cycles per product or square;
- an extended-Euclidean divider, which takes 466 cycles per quotient.

The divider makes affine coordinates practical: a field division costs only
twice as much as a multiplication, so no separate inversion is needed. The key
is processed with a Montgomery ladder. Every key bit after the leading one
costs exactly one point addition and one point doubling, whatever its value.
After the leading one, the sequence of operations does not depend on the key
bits, which guards against simple power analysis.

One scalar multiplication with a 232-bit key takes about 489,000 clock cycles,
which is 8.9 ms at 55 MHz. The design has about 4,000 flip-flops. Most of them
are in seven 233-bit working registers and in the two field units.

The RTL is a re-implementation from a published description of a 0.35 µm
ECC-B233 processor chip. It follows that description's block structure,
register set, state names and cycle budget. Where the description stops, the
choices are this design's own. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
            16-bit pins                       233-bit buses
 iDATA ──► ┌───────────┐  data, k_in/gx_in/gy_in  ┌─────────┐ data_a,data_b ┌───────────┐
 iK_IN ──► │ io_buffer │ ───────────────────────► │ reg_add │ ────────────► │ alu_gf233 │
 iGX_IN ─► │           │ ◄─────────────────────── │ 7 × 233 │ ◄──────────── │ mul_gf233 │
 iGY_IN ─► │           │  data_x, data_y          │ + XORs  │   data_alu    │ div_gf233 │
 iSTART ─► │           │  start_ecc ──┐           └─────────┘               └───────────┘
 oDATA_X ◄ │           │  end_ecc ◄─┐ │  state_smul, state_afds, │  ▲             ▲   │
 oDATA_Y ◄ │           │            │ ▼  one_count, k_shift      ▼  │ k_msb        │   │ end_mul
 oEND_ECC◄ └───────────┘         ┌──────────────┐                    start_mul/div │   │ end_div
                                 │ control_unit │ ─────────────────────────────────┘   │
                                 │ FSM_MML      │ ◄────────────────────────────────────┘
                                 │ FSM_OP       │
                                 └──────────────┘
```

| File | Block | Role |
|---|---|---|
| `rtl/ecc_pkg.sv` | – | field size, polynomial, curve constant `a`, state enums |
| `rtl/mul_gf233.sv` | Mul_GF233 | bit-serial multiplier, 233 cycles |
| `rtl/div_gf233.sv` | Div_GF233 | Euclidean divider, 466 cycles |
| `rtl/alu_gf233.sv` | Alu_GF233 | both units behind shared operand and result buses |
| `rtl/reg_add.sv` | Reg_Add | the seven 233-bit registers, XOR adders, operand selection and write-back |
| `rtl/control_unit.sv` | Control unit | ladder FSM (FSM_MML) and field-operation sequencer (FSM_OP) |
| `rtl/io_buffer.sv` | BUFFER | 16-bit ↔ 233-bit conversion |
| `rtl/ecc_b233.sv` | top | wires the blocks together |

## Using the processor

All I/O goes through a 16-bit port. A 233-bit value is zero-extended to 240
bits and sent as 15 words, most significant word first. The first word
therefore carries only 9 significant bits.

1. **Load.** For each of `k`, `Px` and `Py`, hold the matching select line
   (`iK_IN`, `iGX_IN` or `iGY_IN`) high for 15 consecutive clocks and give one
   word on `iDATA` in each of them. The value is written into the register file
   two clocks after the 15th word. Drop the select line between two values.
2. **Start.** Raise `iSTART_ECC`. Only the rising edge counts, so holding it
   high does not restart the processor.
3. **Read.** When the ladder ends, `oEND_ECC` goes high for exactly 15 clocks.
   In each of them `oDATA_X` and `oDATA_Y` carry the two result words of the
   same weight, most significant first.

`rst` is an asynchronous reset and is **active low**. The processor runs with
`rst = 1`.

Timing of one run:

| Phase | Cycles |
|---|---|
| MAINTAIN: skip the leading zero bits of k | (leading zeros) + 1 |
| INIT: the first doubling, P1 = 2P | 1,173 |
| each key bit after the leading one | 2,111 = 2 × (466+2) + 5 × (233+2) |
| hand-off to the output | 1 |

For the standard test key (its top set bit is bit 231) this gives 488,818
cycles from `iSTART_ECC` to `oEND_ECC`. The published chip needs 490,699.

The result overwrites P. Load `Px` and `Py` again before every run; `k` must
be loaded again as well, because it is shifted out during the run.

## Field arithmetic

Field elements are 233-bit vectors in the polynomial basis: bit *i* is the
coefficient of xⁱ. Addition is XOR. Because f(x) = x²³³ + x⁷⁴ + 1, reducing a
single overflowing bit x²³³ only needs XOR with the constant `x⁷⁴ + 1`
(`F_LOW` in `ecc_pkg`).

### Multiplier (`mul_gf233`)

This is a right-to-left shift-and-add multiplier with three registers:

- `Shift_reg` holds operand `a` and shifts right one bit per clock.
- `B_reg` holds operand `b` and is multiplied by x on every clock. It shifts
  left by one bit, and its old top bit gates `F_LOW` into the XOR that reduces
  the result.
- `C_reg` is the accumulator. The load clock sets it to `a[0] ? b : 0`. After
  that it adds the new `B_reg` value (b·xⁱ mod f) on each clock where
  `Shift_reg[1]`, which is bit *i* of `a`, is 1.

After the load and 232 shift clocks, `C_reg` holds a·b mod f. `done` pulses 233
clock edges after the edge that sampled `start`. Squaring uses the same unit
with `a = b`.

### Divider (`div_gf233`): the part that needs the most explanation

Dividing by b normally means inverting b, which takes many multiplications,
and then multiplying. This unit instead runs a binary extended Euclidean
algorithm. It carries the dividend along as the starting cofactor, so the
quotient falls out directly.

| Register | Width | Starts as | Meaning |
|---|---|---|---|
| `R_reg` | 233 | b (divisor) | first remainder |
| `S_reg` | 234 | f(x) | second remainder, needs the x²³³ bit |
| `U_reg` | 233 | a (dividend) | cofactor of R, scaled by a |
| `V_reg` | 233 | 0 | cofactor of S; holds a/b at the end |
| `state_div` | 1 | 0 | which remainder is currently "ahead" |
| `count_div` | 8 | 0 | degree difference between the remainders |

Each of the 465 iteration clocks does the following, where `r0 = R_reg[0]`:

```
state 0:  count_div += 1
          if r0: (R, S) <= (R+S, R);  (U, V) <= (U+V, U);  state <= 1
state 1:  count_div -= 1
          if r0: R <= R+S;  U <= U+V
          if count_div reaches 0: state <= 0
always:   R <= R / x            (R is even after the step above)
          U <= U / x mod f      (add f first if U is odd, then shift right)
```

U and V follow R and S as their cofactors. When the remainders are added or
swapped, U and V are added or swapped the same way. Each division of R by x is
matched by a division of U by x modulo f. The counter keeps track of which
remainder is ahead. Adding the two remainders cancels a low-order term, so
after 2·233 − 1 steps S has been reduced to 1 and V holds a·b⁻¹. The number of steps is fixed
and does not depend on the data. `count_div` never exceeds 233, so 8 bits are
enough. The load clock plus 465 iterations make the 466-cycle latency.

The original design shifts `R_reg` and its reduced register to the **left**.
This RTL writes its recurrence with coefficients in natural order, so its
registers shift **right** and the controller looks at bit 0. It keeps the
original's 2m-cycle latency and its main registers, but it is not a copy of
the original's exact recurrence, which is not published. A dividend of 0 gives 0. A divisor of 0 is undefined and gives
0.

## The ladder and how the registers are shared

The scan of the key starts at its most significant bit.

- **MAINTAIN** consumes one key bit per clock while the bits are 0. There is
  no point at infinity to start from, so nothing is computed yet. This is
  what lets the key have leading zeros.
- At the first 1, **INIT** sets P0 = P and P1 = 2P.
- Each following bit selects one of two ladder states:

  | Key bit | State | Operations |
  |---|---|---|
  | 1 | `ADDP0_DBLP1` | P0 ← P0 + P1, P1 ← 2·P1 |
  | 0 | `ADDP1_DBLP0` | P1 ← P0 + P1, P0 ← 2·P0 |

The difference P1 − P0 stays equal to P, so after the last bit P0 = k·P. Both
states run the same seven field operations. Only the choice of registers
differs: Pd is the addition destination and Ps the doubling source.

| Step | Unit | Operation (affine formulas) |
|---|---|---|
| A_DIV | div | λ ← (y0 + y1) / (x0 + x1) |
| A_SQR | mul | x_sec ← λ² + λ + x0 + x1 + a |
| A_MUL | mul | yd ← λ·(xd + x_sec) + x_sec + yd ;  xd ← x_sec |
| D_DIV | div | λ ← xs + ys / xs |
| D_SQR | mul | x_sec ← λ² + λ + a |
| D_MUL | mul | λ ← (λ + 1)·x_sec |
| D_SQX | mul | ys ← xs² + λ ;  xs ← x_sec |

INIT runs only the four D steps, with Ps = P1. The addition always goes
first. It reads the old value of the point that the doubling will then
overwrite, and it does not disturb the point being doubled. This lets seven
registers be enough: `k_reg`, `x0`, `y0`, `x1`, `y1`, `x_sec` and `lamda`.
All the "+" terms in the table are XORs applied on the write-back path in
`reg_add`. The ALU only ever sees one multiplication or division at a time.

`control_unit` holds two state machines:

- **FSM_MML** walks IDLE → MAINTAIN → INIT → ladder states → DONE → IDLE.
- **FSM_OP** walks the seven steps. For each step it pulses `start_mul` or
  `start_div` and waits for `end_mul` or `end_div`. On that end signal
  `reg_add` writes the result back, and the next step is issued two cycles
  after the ALU finished.

`k_reg` shifts left as bits are consumed, so `k_msb` is always the next bit.
`count` tells when all 233 bits are consumed.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.
`tb/ecc_ref_pkg.sv` holds a reference model written separately from the RTL:

- full carry-less products reduced from the top down;
- Fermat inversion;
- affine point arithmetic with the point at infinity;
- double-and-add scalar multiplication;
- a curve-membership test.

| Testbench | What it checks |
|---|---|
| `tb_mul_gf233` | 206 products including edge cases, exact 233-cycle latency, one-cycle `done` |
| `tb_div_gf233` | 157 quotients (q·b = a, and against Fermat inversion), exact 466-cycle latency |
| `tb_alu_gf233` | random mix of both units through the shared buses |
| `tb_reg_add` | G → (G, 2G) → (3G, 4G) → (6G, 7G) through INIT and both ladder states, with the testbench acting as ALU; key shifting |
| `tb_control_unit` | leading-zero skipping, state per key bit, operation order, single `end_ecc`, exact cycle formula, zero key (with a fast ALU model) |
| `tb_io_buffer` | word assembly, load pulses, start-edge detection, output framing |
| `tb_ecc_b233` | full size, through the pins only; see below |

`tb_ecc_b233` runs the full-size processor through its pins only:

- It multiplies the B-233 base point by the published test key
  `0c7e814dd40466073ef4cfd3319b2f0488d3eed4bba24dc189a1c65c202`. It expects
  x = `1f485a65e59b336e1401c8a311f01c92626c663e69f12a627e53e8f0675` and
  y = `1bf338ce75adfb07debd962e1d80c101587269ac9951b40422b12e9da3e`, and a
  run length within 1 % of 490,699 cycles.
- It multiplies G by the small keys 1, 2, 3 and a random 16-bit key, and
  compares each result with the reference model.
- It runs an ECDH exchange with two random keys. The two shared points must
  match, and the points must lie on the curve.

It also counts each mechanism of the design and fails if one never happens:
MAINTAIN skips, INIT, both ladder states, both field units, loads and output
frames. The whole run takes a few seconds.

To run a testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_b233.sv --top-module tb_ecc_b233 -o sim
./obj_dir/sim
```

For another testbench, replace `tb_ecc_b233` with its name. The simulator is
two-state, so every register has a reset value.

## Departures and own choices

These points follow the published design:

- the block split and the signal names between the blocks;
- the 16-bit data pins;
- the seven registers and their names;
- the four ladder states IDLE, MAINTAIN, ADDP0_DBLP1 and ADDP1_DBLP0;
- the multiplier data path;
- the divider's main registers (R, S, U, V), its 8-bit counter and its 2m-cycle latency;
- the affine point formulas;
- the field polynomial.

The following are this design's own:

- **Divider recurrence.** The published text names the algorithm but does not
  give the exact steps. The recurrence here is a standard one, and it shifts
  right rather than left. An extra register of the original, T_reg, which is
  loaded with 0, has no role in this recurrence and is left out.
- **Operation schedule and register allocation** (the table above), and the
  extra INIT and DONE states.
- **Handshakes:** one-cycle start and end pulses, and one field operation at a
  time. The original's overhead per operation is not known. Here it is 2
  cycles, which gives 488,818 cycles against the published 490,699.
- **I/O protocol:** the word order, strobe-framed loading, edge-triggered
  start and the 15-cycle `oEND_ECC` frame. The published waveform shows the
  I/O buses labelled 233 bits wide, but the block diagram and text give
  16 bits; 16 bits are used.
- **Reset polarity:** active low. It is inferred from the published waveform,
  where `rst` is 1 during operation.
- **Curve coefficient `a = 1`** is a constant in `ecc_pkg`. It is not loaded
  from the pins. The coefficient b is never needed by the point formulas.

## Limitations

- A point at infinity inside the ladder is not handled. For a key below the group order it can only arise in
  the rare case (2j+1)·P = O.
- k = 0 returns P unchanged instead of the point at infinity.
- The input point is not checked to be on the curve.
- Only B-233 is supported. `mul_gf233` and `div_gf233` take `M` and `FPOLY`
  parameters and work for other binary fields. The rest of
  the design uses the package constants.
- Start and end pulses are single cycles, and a new start while a field unit is
  busy restarts it. The controller never does that.

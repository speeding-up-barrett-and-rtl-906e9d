# Digit-serial Barrett and Montgomery multipliers without precomputation

Interleaved modular multiplication, `Z = X*Y mod M` one digit of `Y` at a
time, has one awkward step per digit: estimating the quotient digit `q`.
Barrett reduction multiplies the top of the running remainder by a
precomputed reciprocal `mu`. Montgomery reduction multiplies the low digit by a
precomputed inverse `M'`. Either way a single-precision multiplication by a
constant sits on the critical path, right in front of the `q*M` multiplier.

This RTL implements the alternative described in the paper *Speeding Up
Barrett and Montgomery Modular Multiplications*. The modulus is restricted to
one of four large sets. In each set `mu` or `M'` is a power of two, one less
than a power of two, or ±1, so the quotient digit comes from a shift or a
negation of the remainder. The critical path shrinks to one w x w multiplier
plus one adder. Nothing has to be precomputed when the modulus changes. The
same idea gives two multipliers for binary fields GF(2^n).

The design has four independent units, placed side by side in `modmul_top`:

| unit | module | computes | modulus |
|---|---|---|---|
| Barrett | `barrett_modmul` | `X*Y mod M` | `M` in S1 or S2 |
| Montgomery | `montgomery_modmul` | `X*Y*2^(-w*NW) mod M` | `M` in S3 or S4 |
| GF(2^n) Barrett | `gf2m_barrett_mul` | `A*B mod M(x)` | `M = x^n + D(x)`, `deg D <= n-w` |
| GF(2^n) Montgomery | `gf2m_montgomery_mul` | `A*B*x^(-w*NW) mod M(x)` | `M = 1 mod x^w` |

Here `n` is the operand width, `w` the digit size, `NW = ceil(n/w)` the
number of digits, and `alpha = w + 3`.

## The moduli sets

All four sets leave most of the modulus free. Only a run of about `w` bits is
fixed, at the top for the Barrett sets and at the bottom for the Montgomery
sets.

| set | form | fixed bits | quotient digit |
|---|---|---|---|
| S1 | `M = 2^n - D`, `0 < D <= floor(2^n / (1 + 2^alpha))` | bit n-1 = 1, then ~alpha ones | `q = floor(Z / 2^n)` |
| S2 | `M = 2^(n-1) + D`, `0 < D <= floor(2^(n-1) / (2^(alpha+1) - 1))` | bit n-1 = 1, then ~alpha zeros | `q = floor(Z / 2^(n-1))` |
| S3 | `M = D*2^w + 1`, `2^(n-w-1) <= D < 2^(n-w)` | bits w-1..1 zero, bit 0 one | `q = -Z mod 2^w` |
| S4 | `M = D*2^w - 1`, `2^(n-w-1) < D <= 2^(n-w)` | bits w-1..0 one | `q = Z mod 2^w` |

The reasons are short. For S1, `floor(2^(n+alpha)/M) = 2^alpha`, so the
Barrett estimate reduces to a shift. For S2 the constant is
`2^(alpha+1) - 1`. For S3 and S4, `M = ±1 mod 2^w`, so `M' = ∓1`.

Each unit works out which rule to use from the modulus itself:

- The Barrett unit reads bit n-2 of `M`: 1 means S1, 0 means S2.
- The Montgomery unit reads bit 1 of `M`: 0 means S3, 1 means S4.

**The units do not check that `M` is in a set.** A modulus outside the sets
gives wrong results. The Barrett unit may also trip its assertions.

The standard prime-field moduli fall into these sets:

- P-192, P-384 and P-521 are in S1 and S4.
- P-224 is in S1 and S3.
- P-256 is in S4 for any `w` up to 96. It is in S1 only for `w <= 29`, so at
  the default `w = 32` only the Montgomery unit can use it.

## Integer datapath

Both integer units use one datapath with three pieces:

```
     X   Y_i                 M   q  <-------------------+
     |   |                   |   |                      |
  +--v---v--------+      +---v---v----------+           |
  | pi1: w x w    |      | pi2: l x l       |           |
  | mult + adder  |      | mult + adder     |           |
  | (n+w)-bit acc |      | (n+l)-bit acc    |           |
  +------+--------+      +--------+---------+           |
         |  X*Y_i                 |  q*M                |
         +-----------+------------+                     |
                     v                                  |
            Z adder (one operand per cycle)             |
                     |                                  |
             (n+l+1)-bit Z register --------------------+
                      quotient digit = shift of Z (Barrett)
                                     or low digit of Z (Montgomery)
```

**pi1 and pi2 (`pi_multiplier`).** Each multiplies a long operand by one
digit. Inside is one small multiplier, one adder and an accumulator. The long
operand is consumed one digit at a time, most significant digit first:
`acc <- acc*2^DW + b*a_j`. A product is ready `ceil(N/DW)` cycles after
`start`.

- pi1 computes `X*Y_i` with `w`-bit digits.
- pi2 computes `q*M` with `l`-bit digits. `l = w + 4` for Barrett and `l = w`
  for Montgomery.
- In the Barrett unit, pi2 treats `q` as a two's complement number.

**Z adder.** Each cycle it adds one of the two products to the Z register.

- Barrett: `Z <- Z*2^w + X*Y_i`, then `Z <- Z - q*M`.
- Montgomery: `Z <- Z + X*Y_i`, then `Z <- (Z + q*M) / 2^w`. The division is
  a wired shift.

**Quotient path.** The quotient digit goes straight from the Z register into
pi2's multiplier. It is an arithmetic shift (Barrett) or the low `w` bits,
negated for S3 (Montgomery). There is no multiplication by a constant on this
path.

**Overlap.** pi1 runs on the next digit of `Y` while pi2 reduces with the
current one.

### Schedule and latency

Per digit of `Y` the controller steps through these states:

1. `ADD`: waits for pi1, then adds its product into Z.
2. `P2_GO`: starts pi2 and, if digits remain, starts pi1 on the next digit.
3. `RED`: waits for pi2, then applies its product to Z.

After the last digit comes the correction phase (`CORR`), described below.
`done` pulses when Z is in `[0, M)`.

Latency, from the cycle in which `start` is high to the cycle in which `done`
is high, with `NL = ceil(n/l)` and `k` correction steps:

- Barrett: `NW + 2 + (NW-1)*(1 + max(NL+1, NW)) + (k+1)*(NL+2)`
- Montgomery: `NW + 2 + (NW+k)*(NW+2)`

At n = 256, w = 32 both come to `90 + 10k` cycles.

### The Barrett remainder can go negative

This is the least obvious part of the design. For S1 the estimate
`floor(Z/2^n)` never exceeds the true quotient. For S2 the exact Barrett
value is `floor(Z/2^(n-1))` or one less, depending on a bit of `Z`. The unit
always takes the larger value, so it can overshoot by one and leave `Z`
negative. The next digit starts from that negative remainder.

Because of this:

- Z is a signed register, n + w + 5 bits wide.
- The quotient digit is signed, w + 4 bits.
- pi2 multiplies a signed digit by unsigned modulus digits.

The paper's bound allows up to two additions of `M` at the end, or one
subtraction. At w = 32, no operation in the tests needed more than one
addition. Each estimate overshoots by at most one, and a negative remainder
after the last step stays above `-M`. The controller still loops until `Z`
is in range.

Three assertions guard the sizes:

- The quotient fits its `w+4` bits.
- The shift by `w` loses no significant bits.
- There are at most two additions or one subtraction.

### Final corrections through pi2

The datapath has no direct path from `M` into the Z adder. Each correction
step therefore runs pi2 with a quotient digit of +1 (subtract `M`) or -1 (add
`M`). A step costs `NL + 2` cycles, and there are at most a few per
operation. The Montgomery unit needs at most one subtraction, because `Z`
stays below `2M`.

## Binary-field units

Both binary-field units process one digit per clock cycle. Each has two
carry-less (AND/XOR) multipliers, one n x w and one w x n. `done` pulses
`NW + 1` cycles after `start`. No final correction is needed because `Z`
always keeps degree below `n`.

- **`gf2m_barrett_mul`**:
  - Step: `T = Z*x^w + A*B_i`, `q = floor(T / x^n)` (the top `w`
    coefficients), `Z = (T + q*M) mod x^n`.
  - `B` is consumed highest digit first.
  - Requires `deg D <= n - w`.
- **`gf2m_montgomery_mul`**:
  - Step: `T = Z + A_i*B`, `q = T mod x^w`, `Z = (T + q*M) / x^w`.
  - `A` is consumed lowest digit first.
  - Requires `m_0 = 1` and `m_1..m_(w-1) = 0`.

The `m` port holds the coefficients below `x^n`; the `x^n` term is implied.
Whether `M(x)` is irreducible does not matter to the logic.

## Interface

Each unit has the same handshake.

- Operands are captured in the cycle where `start` is high while the unit is
  idle. `busy` is high from the next cycle until `done`.
- `done` is a one-cycle pulse. The result `z` stays valid until the next
  `start`.
- `start` is ignored while `busy` is high.
- Reset is asynchronous and active low.

The integer units also report how their last operation went:

- Barrett: `set_s2`, `corr_adds` and `corr_subs`.
- Montgomery: `set_s4` and `corr_sub`.

`modmul_top` exposes each unit's ports with the prefixes `bar_`, `mon_`,
`gfb_` and `gfm_`.

| parameter | default | meaning |
|---|---|---|
| `N` | 256 | integer operand width n |
| `W` | 32 | integer digit size w |
| `GF_N` | 256 | binary field degree |
| `GF_W` | 32 | binary field digit size |

The paper evaluates n = 192, 256 and 512 with w = 8, 16 and 32. The defaults
are the 256/32 point. Every one of those combinations is simulated.

## How far it follows the paper

**Taken from the paper:**

- The four sets of moduli and their quotient rules.
- Algorithms 6 and 7 (integer) and 9 and 11 (binary field).
- The pi1/pi2/Z structure of the proposed architecture, with its widths
  `n+w`, `n+l` and `n+l+1`.
- `l = w` for Montgomery.

**Choices of this design:**

- The controller, its schedule and the handshake. The paper gives no timing.
- The digit order inside pi1 and pi2.
- `l = w + 4` for the proposed Barrett unit. The paper gives that width only
  for the standard design; it covers the signed estimate.
- Running the corrections through pi2.
- Detecting the set from a modulus bit.
- Both binary-field datapaths. The paper gives algorithms only for these.
- The GF sizes.

**One deliberate departure.** The binary-field Barrett algorithm as printed
takes the quotient as `floor(T / x^(n-1))`. That does not reduce: `q*M` would
then carry a term of degree `n+w`. This design uses `floor(T / x^n)`, which
is what the paper's own lemma (Barrett constant `x^(w-1)`) gives.

**Not built.** The standard architecture has a third multiplier, by `mu` or
`M'`. It is not part of this design, because removing it is the point.

The paper's area and frequency figures come from a 0.13 um standard-cell
flow. They are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F`.

- **`tb_pi_multiplier`**: signed and unsigned products, including operands
  that are not a whole number of digits, and the latency.
- **`tb_barrett_modmul`** and **`tb_montgomery_modmul`**:
  - Random moduli over each set's full range, including both ends of `D`.
  - Operands 0, 1, `M-1` and random values.
  - P-256 on the Montgomery unit.
  - Two sizes, 256/32 and 61/8.
  - Latency against the formulas above.
  - Montgomery results are checked as `Z*2^(w*NW) = X*Y (mod M)`, so no
    modular inverse is needed.
- **`tb_gf2m_barrett_mul`** and **`tb_gf2m_montgomery_mul`**: comparison
  against bit-serial polynomial arithmetic, at 256/32 and 163/16.
- **`tb_modmul_top`**:
  - Runs all four units at once at the default sizes.
  - Counts each mechanism: S1, S2, S3 and S4 rules, Barrett final
    addition/subtraction, Montgomery final subtraction, all units busy at
    once.
  - Fails if any mechanism never occurred.
- **`tb_workloads`**:
  - Both integer units at n ∈ {192, 224, 256, 384, 512, 521} and
    w ∈ {8, 16, 32}.
  - Every NIST prime on every unit whose set contains it.
  - Checks that each prime is in some set for w = 8 and 16.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/modmul_pkg.sv rtl/pi_multiplier.sv \
  rtl/barrett_modmul.sv rtl/montgomery_modmul.sv rtl/gf2m_barrett_mul.sv \
  rtl/gf2m_montgomery_mul.sv rtl/modmul_top.sv tb/tb_modmul_top.sv \
  --top-module tb_modmul_top
./obj_dir/Vtb_modmul_top
```

For another testbench, swap in its file and `--top-module`. `tb_workloads`
builds 36 instances and takes about a minute to compile.

## Files

- `rtl/modmul_pkg.sv`: digit-count function, Z-adder operation encoding
- `rtl/pi_multiplier.sv`: pi1/pi2 digit-serial multiplier
- `rtl/barrett_modmul.sv`, `rtl/montgomery_modmul.sv`: integer units
- `rtl/gf2m_barrett_mul.sv`, `rtl/gf2m_montgomery_mul.sv`: binary-field units
- `rtl/modmul_top.sv`: all four units side by side
- `tb/`: the testbenches listed above

# A small-area ECDSA engine for any prime-field curve

This is synthesizable SystemVerilog for an engine that signs and verifies
ECDSA signatures, the signature scheme that blockchain nodes check on every
transaction. The engine trades speed for area. There is no wide multiplier
and no pipelining. All field arithmetic comes down to one unit: a
bit-serial modular multiplier driven by an iteration counter. Inversion uses
the extended Euclidean algorithm, built from a bit-serial divider, that same
multiplier and a modular subtractor. Point arithmetic uses affine
coordinates, so every point addition and point doubling needs exactly one
inversion.

Nothing about the curve is fixed in hardware. The field prime `p`, the
coefficient `a`, the base point `G` and the group order `n` are run-time
inputs. Any short-Weierstrass curve `y^2 = x^3 + a x + b` whose numbers fit
in `N` bits can be used; `b` is never needed. `N` is a parameter and defaults
to 256.

## Arithmetic hierarchy

```
ecdsa_top                       mode switch: sign or verify
 |- ecdsa_sign                  r = x(kG) mod n,  s = k^-1 (z + d r) mod n
 |   |- point_mult              k * P, left-to-right double and add
 |   |   |- point_double        2P   (1 inversion, 5 multiplications)
 |   |   '- point_add           P+Q  (1 inversion, 3 multiplications)
 |   |- mod_inv                 extended Euclid
 |   |   |- int_divider         restoring divider, q and r
 |   |   |- mod_mult            counter-driven modular multiplier
 |   |   '- mod_sub
 |   |- mod_mult
 |   '- mod_add
 '- ecdsa_verify                w = s^-1, u1 = z w, u2 = r w, x(u1 G + u2 Q) mod n == r
     |- 2 x point_mult          u1 G and u2 Q, run at the same time
     |- point_add, point_double final sum (doubling if u1 G == u2 Q)
     |- mod_inv, mod_mult
```

Every sequential unit has the same handshake. Operands are sampled on a
one-cycle `start` pulse. `busy` is high while the unit works. `done` pulses
for one cycle when the outputs are valid, and the outputs hold until the next
`start`. An assertion in each unit flags a `start` while it is busy. All
units reset asynchronously on `rst_n` low.

## The counter-driven modular multiplier (`mod_mult`)

This is the core of the design. Every multiplication and squaring in the
engine goes through an instance of it.

The product `A*B mod q` is written as a sum of shifted copies of `A`, one for
each set bit of `B`. The unit walks through `B` one bit per clock, from bit
`N-1` down to bit 0, using Horner's rule. An iteration counter `ctr` runs
from 0 to `N`. In each iteration the accumulator `F` is:

1. doubled (the shift-by-one), then reduced by one conditional subtraction
   of `q`;
2. if the current bit of `B` is 1, increased by `A` (the adder and the mux
   selected by that bit), then reduced by one more conditional subtraction.

Both reductions need only a single subtraction. `F` stays below `q`, so `2F`
and `F + A` are both below `2q`. This interleaved reduction lets the unit
finish in `N` iterations. Reducing the full `2N`-bit product afterwards by
repeated subtraction could take up to 2^N steps.

When `ctr` reaches `N`, `F` is copied to the output register and a final
`value >= q ? value - q : value` correction is applied. `done` rises exactly
**N+1 cycles after `start`**: 257 cycles at 256 bits.

Requirements: `a < m`; `b` may be any `N`-bit value; `m` must not be zero.
Squaring is the same unit with `a = b`.

## Modular inversion by extended Euclid (`mod_inv`, `int_divider`)

Two remainder registers start at `(m, a)` and two coefficient registers at
`(0, 1)`. Each step does three things:

- divides the first remainder by the second on `int_divider`, giving
  quotient `q` and remainder `r` (one bit per clock, `N+1` cycles);
- forms `t = P_prev - q * P (mod m)` on `mod_mult` and `mod_sub`
  (`N+1` cycles);
- shifts both pairs along.

Every coefficient satisfies `remainder ≡ coefficient * a (mod m)`. So the
step whose remainder is 1 produces the inverse in `t`. A remainder of 0
before that means `gcd(a, m) ≠ 1`, and the output is 0. The inputs `a = 0`
and `a = 1` return at once.

A step costs about `2N + 5` cycles. The number of steps depends on the data.
At 256 bits the test measured **about 68,600 cycles per inversion** on
average, roughly 150 steps. The inversion dominates everything above it.

## Point arithmetic (`point_add`, `point_double`)

Both units use affine coordinates and textbook formulas.

- **Addition:** `m = (qy - py) / (qx - px)`, `rx = m² - px - qx`,
  `ry = m (px - rx) - py`. The steps run in sequence: two subtractions, the
  inversion, the slope multiplication, the squaring, two subtractions into
  `X`, then a multiplication and a subtraction into `Y`. The caller must
  make sure the two points are neither equal nor opposite.
- **Doubling:** `m = (3 px² + a) / (2 py)`. Two branches start together.
  One squares `px`, multiplies by the constant 3 on a full multiplier and
  adds `a`. The other forms `2 py` and inverts it. The rest matches addition,
  with `rx = m² - 2 px`. `py` must not be zero.

Each box of the datapath has its own multiplier instance: three in the adder
and five in the doubler. They never run in parallel except during the
doubler's first stage. Sharing one multiplier would save area and cost no
time.

## Scalar multiplication (`point_mult`)

This unit uses left-to-right double and add. It first skips the leading zero
bits of `k`, one per clock, and loads `R = P` at the top set bit. For each
lower bit it doubles `R`, and when the bit is 1 it adds `P`. `k = 0` returns
the point at infinity (`inf = 1`).

The loop does not represent the point at infinity. This is safe for
`1 <= k < n` on a curve of prime order `n`, because the running point `jP`
always has `1 <= j < k`. A 256-bit scalar needs about 255 doublings and 128
additions, each about 70,000 cycles.

## ECDSA (`ecdsa_sign`, `ecdsa_verify`, `ecdsa_top`)

**Signing** computes `kG` and reduces `x` mod `n` to get `r`. It then forms
`k^-1`, `d r`, `z + d r` and `s`. Reductions mod `n` of `x` and of the hash
`z` use one conditional subtraction. This needs `p < 2n` and `z < 2n`, which
holds for 256-bit curves of cofactor 1. `ok` is low when `r` or `s` is
zero; the caller must then sign again with a new nonce.

**Verification** works in this order:

1. It rejects at once unless `1 <= r, s < n`.
2. It computes `w`, `u1` and `u2`.
3. It runs `u1 G` and `u2 Q` on two point multipliers at the same time.
4. It adds the two products. If they are equal it doubles instead. A product
   at infinity is skipped. A sum at infinity rejects the signature.
5. It accepts when `x mod n == r`.

**`ecdsa_top`** holds a signer and a verifier. `mode` (`MODE_SIGN` or
`MODE_VERIFY` from `ecdsa_pkg`) picks which one a `start` pulse launches.
`busy` and `done` combine both units. Ports:

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n`, `start` | in | 1 | clock, async active-low reset, start pulse |
| `mode` | in | `ecdsa_mode_e` | sign or verify |
| `curve_a`, `p`, `n`, `gx`, `gy` | in | N | curve and base point |
| `z` | in | N | message hash (both modes) |
| `d`, `k` | in | N | private key and nonce (sign) |
| `qx`, `qy`, `r_in`, `s_in` | in | N | public key and signature (verify) |
| `busy`, `done` | out | 1 | status |
| `r_out`, `s_out`, `sig_ok` | out | N, N, 1 | signature, both parts non-zero |
| `verify_ok` | out | 1 | signature accepted |

The message hash (SHA-1 or another hash) and the random nonce `k` are not
part of the engine. They must come from outside.

## Performance at 256 bits

| operation | cycles (simulated) |
|---|---|
| multiplication / squaring | 257 (N+1) |
| inversion | about 68,600 on average |
| point addition or doubling | about 70,000 |
| signature, secp256k1, random 256-bit nonce | 30.5 million |
| verification, secp256k1 | 30.7 million (the two scalar products run in parallel) |

This RTL has not been synthesized for timing. For scale: the architecture
it follows was reported at about 137 MHz on a Virtex-7 FPGA at 256 bits.
At that clock a signature or a verification takes about 0.22 s. Almost all
of that is the one inversion per point operation.

## Where this RTL departs from the algorithm as published, and why

- **Reduction inside the multiplier loop.** The published multiplier
  accumulates the full product and then subtracts `q` until the result falls
  below `q`. Taken literally that is exponential in `N`, and it contradicts
  the stated `N` and `N+1` cycle counts. Here each iteration reduces instead.
  The cycle count matches; the final correction stage is kept.
- **Curve coefficient `a`.** The published doubling datapath has no input
  for `a`, which only fits `a = 0` curves such as secp256k1. The slope
  formula needs `3x² + a`, so an adder for `a` is included.
- **Leading zeros of `k`.** The published double-and-add starts from
  `Q = P` at bit `N-2`, which assumes bit `N-1` of `k` is 1. Leading zeros
  are skipped instead, so any `k` works.
- **Operation counts.** The datapaths here have one squaring and two
  multiplications per addition, and two squarings and three
  multiplications (one of them by the constant 3) per doubling. Both counts
  follow the published block diagrams. The published operation counts are
  2M+2S for addition and 3M+1S for doubling, which do not match those
  diagrams.
- **Retry condition.** A new nonce is needed when `r = 0` **or** `s = 0`.
- **Verification compare.** `x` is reduced mod `n` before it is compared
  with `r`, as standard ECDSA requires.
- **Choices of this implementation:**
  - the bit order of the multiplier (MSB first);
  - the restoring divider;
  - the parallel scalar multiplications in verification;
  - the special cases of the final addition;
  - the `start`/`busy`/`done` handshake;
  - the asynchronous reset;
  - the mode input of the top level.

## How far it is verified

Each unit has a self-checking testbench in `tb/`. It compares the unit with
an independent reference in `tb/ecc_ref_pkg.sv`. The reference uses plain
`%` arithmetic, Fermat inversion, and right-to-left scalar multiplication
with full point-at-infinity handling. Its `2G` is checked against the
published secp256k1 value.

| testbench | covers |
|---|---|
| `tb_mod_addsub` | modular add/subtract, 256 and 16 bits |
| `tb_mod_mult` | 120 products at 256 bits, squaring, corners, exact N+1 latency |
| `tb_int_divider` | quotient and remainder, divisors of all sizes, N+1 latency |
| `tb_mod_inv` | inverses mod the secp256k1 `p` and `n`, no-inverse case |
| `tb_point_add`, `tb_point_double` | secp256k1; doubling also on a 16-bit curve with `a ≠ 0` |
| `tb_point_mult` | all `k` classes on the 16-bit curve, short and full-length `k` on secp256k1 |
| `tb_ecdsa_sign`, `tb_ecdsa_verify` | reference signatures, tampered inputs, every special case |
| `tb_ecdsa_top` | sign-then-verify end to end at N = 16; counts each mechanism (below) |
| `tb_bitwidth_sweep` | multiplier and inverter built at 24, 32, 64, 86, 103, 142, 160, 163, 192, 224 and 256 bits |
| `tb_ecdsa_full` | one signature and its verification at the default N = 256 on secp256k1 |

`tb_ecdsa_top` counts each mechanism and requires it to occur at least once:

- a mode switch;
- a signature retry;
- a skipped leading zero;
- an addition and a doubling inside the scalar loop;
- a range rejection;
- a product at infinity;
- the doubling path of the final sum;
- a sum at infinity.

The 16-bit test curve is `y^2 = x^3 + 4x + 12` over GF(65519), with
`G = (0, 19386)` of prime order 65287.

Not verified:

- timing closure or area on any FPGA or process;
- curves with cofactor > 1;
- inputs that break the stated requirements, such as unreduced operands or
  `p >= 2n`.

## Simulating

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`. It
also has a cycle-count watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecdsa_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecdsa_top.sv --top-module tb_ecdsa_top
./obj_dir/Vtb_ecdsa_top
```

Swap in any other `tb_*.sv` name. The unit tests finish in seconds.
`tb_point_mult` takes about a minute and `tb_ecdsa_full` a few minutes. To
change the width, set `N` on any module. `ecdsa_pkg::ECC_N` is the default
for all of them.

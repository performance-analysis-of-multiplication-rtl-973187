# Bit-serial GF(2^m) multiplier and inverter in a Type-I optimal normal basis

This RTL multiplies and inverts elements of the finite field GF(2^m). Both
units work in a **Type-I optimal normal basis (ONB)**. In a normal basis,
squaring is a cyclic shift of the bit vector, so exponentiation and inversion
are cheap. Multiplication is the hard part. Here it is done bit-serially by
a row of m+1 identical AND-XOR cells, one operand bit per clock, in about
m clocks. The inverter reuses the same cell row and computes B^-1 as a chain
of squarings (shifts) and multiplications.

The datapath is regular and has a fixed gate count. For field size m it needs
m+1 two-input ANDs, 2m+1 two-input XORs and 3m+3 flip-flops, plus a small
controller.

## The idea: multiply as a cyclic convolution

A Type-I ONB exists when p = m+1 is prime and 2 is a primitive root modulo p.
The valid sizes are m = 2, 4, 10, 12, 18, 28, 36, 52, 58, 60, 66, 82, 100, ...
The basis is generated by a root alpha of the all-one polynomial

    G(x) = 1 + x + x^2 + ... + x^m,

so alpha^(m+1) = 1. The basis element alpha^(2^i) is therefore just
alpha^(2^i mod (m+1)). Because 2 is primitive mod m+1, the exponents
2^i mod (m+1) for i = 0..m-1 cover 1..m exactly once. The normal basis
{alpha^(2^i)} is thus a **permutation** of the "shifted standard" basis
{alpha^1, ..., alpha^m}. Changing between the two bases costs only wiring.

In the shifted basis, add the always-zero coefficient of alpha^0. An element
then becomes a vector of m+1 bits in the ring GF(2)[x]/(x^(m+1)+1). Since
G(x)(x+1) = x^(m+1)+1, the field is a quotient of this ring. A product in
the ring is a plain cyclic convolution:

    c'_k = XOR over t of  a'_t AND b'_((k - t) mod (m+1)),   k = 0..m

To return to m coefficients, use 1 = alpha + ... + alpha^m. The alpha^0 term
is removed by XORing c'_0 into every other coefficient (the "fold"). Then
the inverse permutation gives the normal basis result.

## Multiplier datapath (`onb_mult`)

```
 a --P--> S[m:0] --S[0] broadcast--+----------+-- ... --+
                                   |          |         |
 b --P--> D[m:0] (rotates) ---> U_0 cell   U_1 cell ... U_m cell
                                   |          |         |
                                 u[0] --XOR into u[1..m]-- (onb_fold) --P^-1--> c
```

* **P (`onb_perm_fwd`)** sends normal basis bit i to position 2^i mod (m+1).
  Bit 0 is a constant 0.
* **S** holds A'. It shifts toward bit 0 each clock, so cycle t broadcasts
  a'_t to all cells.
* **D** holds B'. It rotates upward each clock (D_k <= D_(k-1)), so in cycle t
  cell k sees b'_((k-t) mod (m+1)).
* **U_k (`onb_u_cell`)**: u_k <= u_k XOR (s AND d_k). After m+1 clocks,
  u_k = c'_k.
* **Fold (`onb_fold`)** and **P^-1 (`onb_perm_inv`)** are combinational. The
  output c follows the U register, so it stays valid while the unit is idle.

Timing: `start` is sampled while idle, and the load takes one clock. Then
m+1 accumulate clocks follow. `done` pulses one clock later, **m+2 clocks
after the start clock** (12 at m = 10). A `start` that arrives while `busy` is
ignored. The operands need to be valid only in the start clock.

## Inverter (`onb_inv`)

Fermat gives B^-1 = B^(2^m - 2) = B^2 · B^4 · ... · B^(2^(m-1)). That is m-1
factors, each the square of the one before. The inverter adds register T (m
bits) to the multiplier's datapath. T is loaded with B and rotated once per
factor, because squaring is a rotation in a normal basis. P converts T into D.
The running product lives in S. The cell row multiplies D by S, and the
result goes back into S.

The important point is that **S is never reduced between products.** It keeps
the (m+1)-bit redundant value, including a possibly non-zero alpha^0 bit. This
is correct because the cell row computes modulo x^(m+1)+1, which is a multiple
of G(x). So the redundant value is still the right field element. For this
reason every one of the m+1 accumulate clocks matters here. Only the final S
passes through the fold and P^-1.

Control sequence (one line per state):

| state  | clocks | action |
|--------|--------|--------|
| start (idle) | 1 | T <= B, U <= 0 |
| SHIFT  | 1 | T rotated: T now holds the next square |
| LOAD_D | 1 | D <= P(T); first pass only: S <= 1 (only S_0 set) |
| SQ1    | 1 | first pass only: one accumulate clock, D held, so U = 1·D = B^2 |
| MUL    | m+1 | later passes: U accumulates S_0·D while S and D rotate |
| STORE  | 1 | S <= U, U <= 0; finish after m-2 products, else SHIFT |

The total latency is **5 + (m-2)(m+4) clocks** from start to `done` (117 at
m = 10). The result stays valid until the next start. B = 0 gives 0. At m = 2
no multiplication follows B^2.

## Top level (`gf_onb_top`)

The top holds one multiplier and one inverter. Each has its own
`start`/`busy`/`done` handshake, and the two may run at the same time. All
values are normal basis vectors: bit i is the coefficient of alpha^(2^i), and
the all-ones vector is the field element 1. To divide A / B, invert B and
then multiply by A. The end-to-end testbench does exactly that.

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| mul_start, mul_a, mul_b | in | 1, M, M | start a product A·B |
| mul_busy, mul_done, mul_c | out | 1, 1, M | running; one-clock done pulse; product |
| inv_start, inv_b | in | 1, M | start an inversion of B |
| inv_busy, inv_done, inv_result | out | 1, 1, M | running; one-clock done pulse; B^-1 |

## Field size

The parameter `M` (default in `gf_onb_pkg::M_DEFAULT`) must be a Type-I ONB
size. Elaboration fails with an error message for any other value. The
default is **M = 10**. The published results this design follows were
reported for 8-bit operands. However, GF(2^8) has no Type-I ONB, because 9 is
not prime. So 10, the smallest valid size of at least 8 bits, is used. At
M = 10 the top has 95 flip-flops.

## How faithful it is

These parts follow the published architecture:

* the index map 2^i mod (m+1) and the zero bit fed to D_0 and S_0;
* the AND-XOR cell row and the broadcast of one S bit;
* the fold XOR row and the gate counts;
* T squaring by rotation;
* deriving B^2 by a unit S with D held;
* m-2 further products of m+1 clocks each.

These are this design's own choices:

* **Accumulate clocks.** The multiplier runs m+1 accumulate clocks. The
  source gives both "m" and "m+1" clocks, and the m+1-term convolution needs
  m+1 in the inverter. In the multiplier the first clock adds a'_0 = 0, so it
  could be skipped.
* **Shift directions.** The shift direction of S and D was chosen to satisfy
  the convolution above.
* **Clocking of the inverter.** The T shift, the D load and the store of S
  each take their own clock.
* **Control.** The handshake, the counters, the asynchronous reset and the
  per-product clearing of U.

In the multiplier only S_0 is read. S still rotates, like the inverter's S,
so lint reports its other bits as unused.

## Files

| file | content |
|------|---------|
| `rtl/gf_onb_pkg.sv` | default size, 2^i mod p, Type-I ONB check |
| `rtl/onb_perm_fwd.sv`, `rtl/onb_perm_inv.sv` | permutations P and P^-1 (wiring only) |
| `rtl/onb_fold.sv` | XOR row that removes the alpha^0 term |
| `rtl/onb_u_cell.sv` | one AND-XOR accumulate cell |
| `rtl/onb_rot_reg.sv` | parallel-load cyclic shift register (D, S, T) |
| `rtl/onb_mult.sv`, `rtl/onb_inv.sv` | multiplier and inverter |
| `rtl/gf_onb_top.sv` | top level |
| `tb/gf_ref_pkg.sv` | reference arithmetic: polynomials mod G(x), basis built by repeated squaring of x |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

The testbenches check the hardware against `gf_ref_pkg`. This package never
uses the 2^i mod (m+1) shortcut: it builds alpha^(2^i) by squaring x modulo
G(x).

* `tb_onb_mult`: at M = 4, all 256 operand pairs, compared bit for bit. At
  M = 10, corner and 300 random pairs, plus an exact m+2 latency check and a
  start issued while busy.
* `tb_onb_inv`: every element at M = 10, M = 4 and M = 2. Each test checks
  B·B^-1 = 1 (or 0 -> 0) and the exact latency.
* `tb_gf_onb_top`: runs at the default M = 10 with no parameter override. It
  performs 43 divisions, each overlapped with an independent multiplication.
  It counts the mechanisms used: inversions, multiplications, B^2 steps, T
  squarings (m-1 per inversion), accumulate passes (m-2 per inversion),
  ignored starts, overlap and zero operands.
* The permutation, fold, cell and register testbenches compare against
  independent models.
* The end-to-end test also passes with `M` set to 12 and to 18.

Each testbench prints `TB_RESULT checks=N failures=F` and has a cycle
watchdog. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/gf_onb_pkg.sv tb/gf_ref_pkg.sv tb/tb_gf_onb_top.sv \
    --top-module tb_gf_onb_top -o sim && ./obj_dir/sim
```

To try another field size, override `M` with a valid Type-I size
(for example `-GM=12` on the top for lint), or change `M_DEFAULT`.

# Shared AES S-box / inverse S-box on a composite-field inverter

AES SubBytes and InvSubBytes share one expensive part: the multiplicative
inverse in GF(2^8). This design builds that inverse once, in the composite
field GF(((2^2)^2)^2), and puts small linear blocks around it. A single
select bit turns the block into either the S-box or the inverse S-box. The
inverter is not the textbook chain of GF(2^4) squarer, constant multiplier,
multipliers and adders. Its parts are merged into three flat blocks:
**Stage 1**, a GF(2^4) inverter (**X^-1**) and **CombineXAXB**. The goal is a
low gate count and a short critical path, about eleven gate levels through the
inverter.

The architecture was first published as a full-custom 130 nm layout of about
147 gates. This RTL describes the same logic structure in portable,
synthesizable SystemVerilog. It is purely combinational: one byte in, one byte
out, no clock and no reset.

## Data path

```
                    +------------+
                +-->| inv_affine |--> 0 \
                |   +------------+       mux --> mult_inverse --> inv_iso_map --+----------------> 0 \
data_in --> iso_map ----------------> 1 /                                       |   +--------+        mux --> data_out
                                                                                +-->| affine |-----> 1 /
                                                                                    +--------+
both multiplexers are selected by enc_dec
```

| enc_dec | operation   | result                                   |
|---------|-------------|------------------------------------------|
| 1       | SubBytes    | `data_out = A * inv(data_in) + {63}`      |
| 0       | InvSubBytes | `data_out = inv(A^-1 * (data_in + {63}))` |

`A` is the AES affine matrix and `inv(0) = 0`. Both directions use Map T,
the inverter and T^-1. The only other parts are the two multiplexers, the
inverse affine block (used only to decrypt) and the affine block (used only to
encrypt).

The inverse affine step comes **after** Map T, so it works on
composite-field values. For a ciphertext byte `y`, the inverter must receive
`T * A^-1 * (y + {63})`. Map T has already produced `T*y`, so `inv_affine`
applies the folded matrix `T * A^-1 * T^-1` and adds the constant
`T * A^-1 * {63} = {44}`. The affine block on the encrypt side stays in the
ordinary AES basis, after T^-1.

## Field representation

Every level uses a polynomial basis. The high coefficient sits in the high
bits.

| level             | defined as                    | constant                   |
|-------------------|-------------------------------|----------------------------|
| GF(2^2)           | GF(2)[x] / (x^2 + x + 1)      |                            |
| GF((2^2)^2)       | GF(2^2)[y] / (y^2 + y + phi)  | phi = {10} = x             |
| GF(((2^2)^2)^2)   | GF(2^4)[z] / (z^2 + z + lambda) | lambda = {1000} = x*y    |

A composite byte `{q, w}` stands for `q*z + w`. `q` is bits 7:4 and `w` is
bits 3:0.

**Isomorphism.** Map T sends the AES generator {02} to `beta = {7a}`, a root
of `x^8 + x^4 + x^3 + x + 1` in the composite field. Column `i` of T is
`beta^i`, and T^-1 is its inverse. The polynomial has eight such roots, and
each gives a valid T. {7a} is the one for which T and `A*T^-1` together hold
54 ones, which is the count the original design quotes for its matrices. All
four matrices are written row by row in `rtl/aes_sbox_pkg.sv`: T, T^-1, A and
the folded inverse affine. Output bit `r` is the parity of `row[r] & input`.
To use another root, recompute the columns `beta^i` and derive the other
matrices from them.

## The inverter

The inverse of `q*z + w` in GF(2^8) over GF(2^4) is

```
gamma = lambda*q^2 + (q+w)*w          -- stage1
theta = gamma^-1                      -- gf4_inv
inverse = { q*theta , (q+w)*theta }   -- combine_xaxb
```

**Stage 1** (`rtl/stage1.sv`) computes this with one flat XOR/AND expression
per output bit. It outputs `m = q ^ w` and builds the sub-sums `chi = w3^w1`,
`v = w2^w0`, `th = w3^w2`, `x = w0^w1`, `rho = chi^v` and `kappa = q3^q2`.
The term `lambda*q^2` reduces to a few XORs of `q` bits (`q3^q0`,
`kappa^q1`, `kappa`, `q2`). The `m*w` product uses four AND terms per bit.
These equations are used exactly as the original design gives them.

**X^-1** (`rtl/gf4_inv.sv`) is a two- or three-level network of AND, NAND, OR
and XOR gates. It has no GF(2^2) sub-operations:

```
theta3 = g3&~g0  ^  g2&~(g3&g1)
theta2 = g3&(g0|g2)  ^  g2&~g3&~g1
theta1 = g1&~(g3&g2)  ^  g3&~(g1&g0)  ^  g2&~g0
theta0 = (g0^g1)&~g3&~g2  ^  g2&(~g0|g1)  ^  g3&g1&g0
```

**CombineXAXB** (`rtl/combine_xaxb.sv`) does both final multiplications.
They share the multiplier `theta`, so its sub-sums are formed once:
`eps = t3^t2`, `alp = t3^t1`, `bet = t2^t0`, `eta = t0^t1` and
`zet = t3^t2^t1^t0`. Each of the eight output bits is then four AND terms
XORed together.

## How far to trust it, and where it departs

- **The function is exact.** The top level was checked against a reference
  S-box for all 256 inputs in both directions. The reference is built from a
  searched GF(2^8) inverse and the AES affine. The check also includes the
  FIPS-197 sample entries and a round trip for every byte.
- **`gf4_inv` has one product of its own.** The sum-of-products above follows
  the original formulation of the GF(2^4) inverse, with the doubly negated
  pairs of `theta3` and `theta1` read as NAND gates. `theta0` carries one
  product, `g3&g1&g0`, that this design adds so that the function is the true
  inverse for all 16 inputs; the exhaustive test confirms it.
- **The CombineXAXB sub-sums are inferred.** The original names them but does
  not define them. The definitions above follow the pattern of Stage 1 and
  make each half an exact GF(2^4) product.
- **The isomorphism matrices are derived.** The original does not print them.
  The root choice above matches its count of 54 ones, but any other root
  would give an equally correct S-box.
- **Gate counts are not reproduced.** The original reports 147 gates: 105
  XOR, 38 AND, 3 NAND and 1 OR. Its per-block counts also differ in places
  from the AND terms its own equations contain. This RTL follows the
  equations, so a synthesis tool will report different numbers. It also
  re-optimizes the logic anyway.
- **Not included.** The full-custom layout, the six-transistor XOR cell and
  the bonding pads have no counterpart here. The ports of `sbox_invsbox` are
  the chip's pins: Data_In0..7, Enc/Dec and Data_Out0..7, with bit 0 taken as
  the least significant bit.
- **`enc_dec` polarity.** 1 means encrypt and 0 means decrypt. This follows
  the numbering of the multiplexer inputs in the original block diagram.

## Timing

Everything is combinational, so the output is valid one propagation delay
after an input changes. The original full-custom circuit took 3.235 ns
worst case, about 309 million bytes per second. In this RTL the delay
depends only on the target technology. To use it in a clocked AES data path,
register the inputs or outputs around it.

## Files

| file                  | content                                                   |
|-----------------------|-----------------------------------------------------------|
| `rtl/aes_sbox_pkg.sv` | types, the four GF(2) matrices, the matrix-vector function |
| `rtl/sbox_invsbox.sv` | top: Map T, muxes, inverter, T^-1, affine                 |
| `rtl/iso_map.sv`      | Map T                                                     |
| `rtl/inv_affine.sv`   | inverse affine folded into the composite domain           |
| `rtl/mult_inverse.sv` | composite-field inverter: stage1 -> gf4_inv -> combine_xaxb |
| `rtl/stage1.sv`       | lambda*q^2 + (q^w)*w, and m = q^w                         |
| `rtl/gf4_inv.sv`      | GF(2^4) inverse                                           |
| `rtl/combine_xaxb.sv` | {q*theta, m*theta}                                        |
| `rtl/inv_iso_map.sv`  | Map T^-1                                                  |
| `rtl/affine.sv`       | AES affine transformation                                 |
| `tb/sbox_ref_pkg.sv`  | reference arithmetic for the testbenches (loop-based, independent of the RTL) |
| `tb/tb_*.sv`          | one self-checking testbench per module, plus `tb_fips197_aes` (complete AES runs) |

## Simulating

Every testbench checks itself, exhaustively where the input space is small.
Each one prints `TB_RESULT checks=N failures=M` and ends with a watchdog. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/aes_sbox_pkg.sv tb/sbox_ref_pkg.sv tb/tb_sbox_invsbox.sv \
  --top-module tb_sbox_invsbox -o sim
./obj_dir/sim
```

For any other module, swap in its testbench, for example `tb_gf4_inv`. The
top-level test also counts the encrypt and decrypt evaluations, the mode
switches with the data held and the inverter's zero case. A mechanism that
never happens counts as a failure.

- `tb_fips197_aes` runs the FIPS-197 known-answer examples (Appendix B and
  C.1 to C.3: AES-128, -192 and -256) as complete encryptions and
  decryptions. Every SubBytes, InvSubBytes and key-schedule SubWord byte goes
  through `sbox_invsbox`, and the rest of AES is testbench code.
- `tb_iso_map` and `tb_inv_iso_map` check that the mappings preserve
  multiplication, comparing the AES multiplier with the tower multiplier on
  random pairs.
- `tb_stage1`, `tb_gf4_inv`, `tb_combine_xaxb` and `tb_mult_inverse` sweep
  their whole input spaces.

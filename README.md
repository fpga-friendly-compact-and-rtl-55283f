# A compact AES-like 8×8 S-box in composite-field hardware

AES gets all of its nonlinearity from one 8-bit S-box, S(a) = M·a⁻¹ ⊕ c. It
inverts the byte in GF(2⁸) and then applies a fixed affine map. Hardware does
not store this as a 256-entry table. Instead it moves the byte into a *tower
field* GF(((2²)²)²), where inversion breaks down into a handful of 2-bit and
4-bit operations, and then moves the result back. How cheap this is depends on
the irreducible polynomial that defines GF(2⁸), the affine map and the tower
basis chosen.

This RTL implements a different S-box from the AES one, built the same way but
with parameters chosen to be cheaper on FPGA LUTs:

| parameter | value |
|---|---|
| field polynomial | x⁸+x⁷+x⁶+x⁵+x⁴+x²+1 (`0x1f5`) |
| affine matrix M | `0x45` (rows given below) |
| affine constant c | `0x09` |
| tower basis generators (y, z, w) | (`0x13`, `0x7a`, `0x5d`), as polynomial-basis bytes mod `0x1f5` |

These choices are reported to give the same cryptographic strength as the AES
S-box. The testbench `tb_sbox_properties` measures that on the RTL:
differential uniformity 4, linearity 32 (nonlinearity 112), boomerang
uniformity 6, differential and linear branch number 2, algebraic degree 7,
no fixed points and no linear structures. The forward and inverse S-boxes
both meet all of these. The reported saving is one LUT or more per S-box on
Xilinx devices: 31 instead of 32 LUTs on Artix-7/Virtex-7, and 57 instead of
60 LUTs on Virtex-4 parts. This RTL does not reproduce those counts,
since they depend on the vendor's synthesis tool.

## Datapath of one S-box

```
 a ──► X⁻¹ ──► inverse in GF(((2²)²)²) ──► M·X ──► ⊕ 0x09 ──► S(a)
      (8×8 bit        (gf256_inv)          (8×8 bit
       matrix)                               matrix)
```

`sbox_fwd` is these three stages, all combinational:

1. **Convert** (`gf2_matrix8` with X⁻¹). This rewrites the polynomial-basis
   byte in the tower basis.
2. **Invert** (`gf256_inv`) in the tower field. Zero maps to zero.
3. **Convert back and apply the affine matrix** in one step (`gf2_matrix8` with
   the product M·X), then add the constant.

The inverse S-box (`sbox_inv`) runs the same pieces backwards. It removes the
constant, multiplies by (M·X)⁻¹ to land directly in the tower basis, inverts,
and converts back with X. It shares the tower inverter design with the
forward S-box.

### The affine matrix

M is written row by row, top row first. The top row gives output bit 7, and
the leftmost column multiplies input bit 7:

```
s7   0 1 0 0 0 1 0 1
s6   1 0 0 0 1 0 1 0
s5   0 0 0 1 0 1 0 1
s4   0 0 1 0 1 0 1 0
s3   0 1 0 1 0 1 0 0
s2   1 0 1 0 1 0 0 0
s1   0 1 0 1 0 0 0 1
s0   1 0 1 0 0 0 1 0
```

These are the rows that reproduce the published table. Do not rebuild M from
a generic "rotate the first row" formula: that gives a different matrix and
a different S-box.

## The tower field, which is the hard part

A byte g in the tower field is written

    g = γ1·y¹⁶ + γ0·y,      γ1, γ0 ∈ GF(2⁴)
    γ = Γ1·z⁴ + Γ0·z,       Γ1, Γ0 ∈ GF(2²)
    Γ = β1·w² + β0·w,       β1, β0 ∈ GF(2)

Every level uses a *normal basis*: a generator and its conjugate, {y¹⁶, y},
{z⁴, z} and {w², w}. The eight basis elements χ0…χ7 are products w^i·z^j·y^k.
Bit 7 of a tower byte is the coefficient of χ0 = w²z⁴y¹⁶ and bit 0 that of
χ7 = w·z·y. So the upper half of any sub-field word always holds the
conjugate coefficient. Computed in the polynomial basis, the χ values are
`f4 ec 54 a2 d2 c7 2e d4`, and they are the columns of the conversion map X.

In a normal basis {Yᵠ, Y} with τ = Y + Yᵠ (trace) and ν = Y·Yᵠ (norm), the
formulas the RTL uses are:

* **product**, used by `gf16_mul`:
  `p1 = a1·b1·τ + (a1+a0)(b1+b0)·ν/τ` and `p0 = a0·b0·τ + (a1+a0)(b1+b0)·ν/τ`
* **inverse**, used by `gf16_inv` and `gf256_inv`:
  `N = a1·a0·τ² + (a1+a0)²·ν` lies in the subfield, and
  `inv(a) = {a0·N⁻¹, a1·N⁻¹}`. Zero maps to zero without a special case,
  because N = 0 gives N⁻¹ = 0.
* in GF(2²) both τ and ν are 1, so the product needs three ANDs, and
  squaring and inversion are a swap of the two bits.

The AES tower basis usually quoted in the literature has trace 1 at every
level, so τ drops out. This basis does not: τ_z = w², ν_z = 1, τ_y = w and
ν_y = w·z. The general formulas above are therefore used, and the constant
scalings are left for synthesis to fold into XORs. `gf256_inv` holds three
general GF(2⁴) products, two multiplications by a constant, one squaring and
one GF(2⁴) inverter, and each GF(2⁴) block is built from GF(2²) operations
(`sbox_pkg::gf4_mul`, `gf4_sq`). These inverter and multiplier structures
are the standard normal-basis ones. The source names the tower field and the
basis but leaves their insides to the earlier literature, so the structure
here is this design's choice.

### Where the constants come from

`rtl/sbox_pkg.sv` holds only the published parameters: the polynomial, M, c
and (y, z, w). Everything else is computed by constant functions while the
design elaborates:

* X, whose column j is χj, computed by polynomial multiplication mod `0x1f5`;
* X⁻¹ and (M·X)⁻¹, by Gauss–Jordan elimination over GF(2);
* M·X, by matrix product;
* τ, τ², ν and ν/τ at each level, each found by searching for its coordinates
  in the sub-field basis.

To try another polynomial, matrix, constant or basis, change those
localparams. The basis must be valid: w² + w + 1 = 0, z¹⁶ = z and the eight
χ values linearly independent. The testbenches keep their own copy of the
reference values: the polynomial, z and w, and the χ columns in
`tb/tb_gf_ref_pkg.sv`, plus the stored tables `tb/sbox_fwd_table.hex` and
`tb/sbox_inv_table.hex`. Update them together with the package.

## Substitution layer (top level)

`sbox_sub_layer` is the top. It holds the S-boxes one round of an AES-style
128-bit cipher needs: 16 for the state (SubBytes) and 4 for the key-schedule
word (SubWord). These are the defaults of `N_STATE` and `N_KEY`.

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; synchronous active-low reset |
| `in_valid` | 1 | a beat is presented this cycle |
| `in_inverse` | 1 | state lanes use the inverse S-box (decryption) |
| `state_in` | N_STATE×8 | state bytes s0…s15 (lane i = sᵢ, state stored column by column) |
| `word_in` | N_KEY×8 | key-schedule word bytes |
| `out_valid` | 1 | result valid, exactly one cycle after `in_valid` |
| `out_inverse` | 1 | mode used by that result |
| `state_out`, `word_out` | | substituted bytes |

The S-boxes are combinational and one register stage sits at the output.
The latency is one clock, a new beat can enter every clock, and there is no
back-pressure. The outputs keep their value while `in_valid` is low. Each
state lane holds a forward and an inverse S-box behind a mux. The key lanes
are forward only, since key expansion uses SubWord in both directions. Two
concurrent assertions check the valid timing. The lane counts come from the
source. The single register stage, the valid/mode handshake, the reset and
the shared forward/inverse lane are this design's own choices, because the
source only says that the S-boxes are "pipelined".

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_gf16_mul` | all 256 operand pairs; the results are mapped to GF(2⁸) and compared with polynomial multiplication mod `0x1f5` |
| `tb_gf16_inv` | all 16 inputs against an inverse found by search |
| `tb_gf256_inv` | all 256 inputs, mapped through the χ columns, against the polynomial-basis inverse |
| `tb_gf2_matrix8` | X columns equal the χ values; X⁻¹·X = I; M·X equals the expected product and equals M applied after X; (M·X)⁻¹ undoes M·X |
| `tb_sbox_fwd` | all 256 entries against the reference table, the example S(0x7a) = 0xe5, bijectivity |
| `tb_sbox_inv` | all 256 entries against the inverse table, and S⁻¹(S(a)) = a |
| `tb_sbox_sub_layer` | 4000 random cycles at full size: results, one-cycle latency, outputs held through bubbles, and counts of forward beats, inverse beats, mode switches, bubbles, back-to-back beats and zero bytes (each must occur) |
| `tb_sbox_properties` | the security metrics listed at the top, measured from the RTL for both S-boxes |

The reference arithmetic in `tb/tb_gf_ref_pkg.sv` works in the plain
polynomial basis and does not use the design's package. Run everything from
the repository root, since the testbenches load `tb/*.hex` by relative path.
For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sbox_pkg.sv tb/tb_gf_ref_pkg.sv tb/tb_sbox_sub_layer.sv \
  --top-module tb_sbox_sub_layer -o sim
./obj_dir/sim
```

Swap the testbench name to run any other. All of them finish in well under
a second.

## How far to trust it, and where it departs from the source

* The forward and inverse S-boxes match the published 256-entry tables
  exactly, and their measured security properties match the published ones.
* The three-stage datapath, including merging the back-conversion with M
  into one M·X matrix, follows the source. The insides of the tower-field
  inverter and multipliers, and deriving X⁻¹ and the other matrices from the
  basis rather than writing them out, are implementation choices. So are the
  register stage, handshake and reset of the top.
* The FPGA LUT counts are not reproduced. The RTL is written for clarity,
  using generic multipliers by constants, and leaves minimisation to
  synthesis.
* Other ways of building the S-box that the source compares against, such as
  a 256-byte table, a block-RAM lookup or the AES S-box with its own tower
  basis, are not included. Neither is a full cipher around the substitution
  layer.

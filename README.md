# CRC-checked finite-field multiplier and CRC_ECC unit

A multiplier over GF(2^m) is a large block of XOR and AND gates. One upset
gate, whether from noise, a transient or a deliberate fault injection, gives a
wrong product that nothing downstream can recognise. This design splits the
multiplier into many small modules and gives each one its own check. Every
module computes a CRC-5 signature of what it actually produced. It also
predicts that signature from its own inputs. The two are compared bit by bit,
and any difference raises one of five error flags for that module.

The RTL holds two independent units, placed side by side in one top module:

* `gf_mult_crc` is the CRC-protected GF(2^m) multiplier (default m = 8). It is
  the main design.
* `crc_ecc` is a 16-bit error-control unit. It encodes data into a 23-bit
  CRC-7 codeword, takes an injected error pattern, computes the syndrome and
  returns corrected data.

Everything is combinational. There is no clock, no reset and no handshake. The
outputs settle one propagation delay after the inputs change.

## The multiplier and its three kinds of module

The product C = A·B mod f(x) is formed in polynomial basis as
C = Σ b_i · α^i · A, where α is the root of f(x). Three kinds of module build
it:

| module | count | does |
|---|---|---|
| alpha (`gf_alpha`) | m−1 | x^(i) = α · x^(i−1) mod f(x): shift up by one and, if the top bit falls out, XOR in the low terms of f(x) |
| pass-thru (`gf_pass_thru`) | m | p_i = b_i · x^(i): AND every bit with b_i |
| sum (`gf_sum`) | m−1 | s_i = s_(i−1) ⊕ p_i, with s_0 = p_0 and C = s_(m−1) |

The alpha modules form the *alpha array*. It produces A, αA, α²A, … in a
chain. The pass-thru modules select the powers of α that B calls for, and the
sum chain adds them up.

## Actual and predicted CRC

This is the part that needs care. Every module `X` is wrapped as `X_edc`
(`alpha_edc`, `pass_thru_edc`, `sum_edc`), which contains:

* the datapath module itself;
* an **actual CRC** (`crc_actual`), which computes y(x) mod g(x) over the
  module's M-bit output y. Each of the five remainder bits is the parity of a
  fixed group of output bits, so the output is covered by five parity groups;
* a **predicted CRC**, which computes the same five bits from the module's
  *inputs* only, with separate logic;
* an XOR of the two signatures. Bit k−1 of `ef` is error flag EF_k.

The predictions rely on the CRC being linear over GF(2):

* **sum**: crc(a ⊕ b) = crc(a) ⊕ crc(b). `crc_pred_sum` computes a CRC of
  each addend and XORs them.
* **pass-thru**: crc(b·a) = b · crc(a). `crc_pred_pass_thru` gates a CRC of
  `a` with `b`.
* **alpha**: the map a ↦ (αa mod f) mod g is linear in the bits of a. Input bit
  i therefore contributes a fixed five-bit column, ((α·x^i) mod f) mod g.
  `crc_pred_alpha` XORs together the columns of the bits that are set. The
  columns are constants, worked out at elaboration by a function in
  `gf_crc_pkg`, so the hardware is a plain XOR network fed by `a`. The alpha
  module's output never enters it.

**What is detected.** If a module's output is corrupted by an error pattern
e, its flags read exactly e(x) mod g(x). The fault is missed only when e is a
multiple of g(x). Both default generators are primitive with period 31, so
with m ≤ 31 every single-bit and every double-bit error on a module output is
caught. About 1 in 32 random patterns is missed. The end-to-end testbench
injects g(x) itself as a fault to show this case.

**Where the fault is.** Each prediction is taken from the module's own
inputs. A wrong value that flows into later modules therefore looks correct to
them, because their actual and predicted CRCs both see the same wrong input.
Only the faulty module raises its flags, so the flags locate the fault as well
as detect it. `error` on `gf_mult_crc` is the OR of all flags. The default
multiplier has 22 modules, giving 110 flags.

**Fault injection.** Every `_edc` wrapper has an M-bit `fault` input. It is
XORed onto the datapath output after the datapath and before the actual CRC.
`gf_mult_crc` brings these out as `fault_alpha[i-1]`, `fault_pt[i]` and
`fault_sum[i-1]`, for alpha module i, pass-thru module i and sum module i. Tie
them to zero in normal use.

## Polynomials

The scheme calls for CRC-5 and compares "primitive" with "standardized"
generators, but names neither. It also leaves the field polynomial open. The
defaults chosen here are:

| parameter | default | meaning |
|---|---|---|
| `M` | 8 | field width m |
| `F_POLY` | `8'h1B` | low terms of f(x) = x^8+x^4+x^3+x+1, the byte field used by LUOV |
| `CRC_W` | 5 | CRC-5 |
| `G_POLY` | `5'h05` | low terms of g(x) = x^5+x^2+1 (primitive, also the USB CRC-5) |

The alternative generator is `G_POLY = 5'h09`, g(x) = x^5+x^3+1 (primitive,
the EPC Gen2 RFID CRC-5). Other field sizes can be set through `M` and
`F_POLY`, for example `M=7, F_POLY=7'h03` for x^7+x+1. The package functions
handle polynomials of up to 128 bits.

## The CRC_ECC unit

```
data_in[15:0] ─► crc_parity_generator (E1) ─► parity_out[22:0] ─┐
                                                      ⊕ line_error
error_in[22:0] ─┬────────► ecc_actual_crc (U1) ◄──────────────────┘
                │            │ alpha[6:0]  │ error_data[22:0]
                └────────► ecc_predicted_crc (U2) ─► crc_ec_out[15:0], uncorrectable
```

* **Codeword.** `parity_out[22:16]` holds seven check bits and
  `parity_out[15:0]` holds the data. In 1-based naming these are
  Parity_out[23:17] and Parity_out[16:1]. The check bits are
  data(x)·x^7 mod g(x) with g(x) = x^7+x^3+1. This g(x) is primitive, so the
  (23,16) code is a shortened cyclic Hamming code: each of the 23 single-bit
  errors has its own nonzero syndrome. For syndrome work the word is reordered
  into polynomial order, with the data in the top coefficients.
* **U1** XORs the injection pattern `error_in` onto the codeword. It then
  computes the syndrome `alpha`, the remainder of the received word. For a
  single error at polynomial position j, this equals x^j mod g(x), a power of
  the generator's root.
* **U2** knows the injected pattern. It predicts that pattern's syndrome and
  XORs it with `alpha`. What remains is the syndrome of any error the unit was
  not told about:
  * **zero**: the injected pattern is removed and the data is exact;
  * **equal to a single-bit syndrome**: the pattern is removed and that bit is
    flipped;
  * **anything else**: the pattern is removed and `uncorrectable` is raised.
* **`line_error`** is an error on the codeword that the unit is not told
  about. It is applied between the encoder and U1.

With `line_error = 0` the unit behaves as the original four-port block:
`crc_ec_out` always equals `data_in`, whatever is injected. A synthesis tool
will reduce it to that. The correction logic does real work only on
`line_error`. A single-bit line error is always corrected. Of random
double-bit line errors, about 70 % are flagged and the rest are miscorrected,
as with any distance-3 code.

## How this RTL relates to the published scheme

Taken from the scheme:

* the three module kinds and how they connect into the alpha array, pass-thru
  row and sum chain;
* actual and predicted CRC-5 per module, compared by XOR into five error flags
  per module;
* the CRC_ECC block: its four ports and widths, its three sub-blocks and how
  they are wired, and the check bits above the data in Parity_out.

This design's own choices:

* f(x), both g(x) values, and the CRC-7 code inside CRC_ECC;
* the construction of every predicted CRC;
* the fault-injection masks, the combined `error` output, and the CRC_ECC
  correction rule;
* the `line_error` input and the `uncorrectable` output;
* purely combinational timing.

The published behavioural waveform of CRC_ECC shows data 000B with a
14-bit injected pattern returning 000B. This RTL reproduces that. The same
waveform prints check bits 0110000 for that data, which no CRC-7 with a
constant term gives, so the check-bit values here differ.

Not built: the rest of a LUOV signature engine, and the parity-based
multiplier used as a comparison baseline. The FPGA area, delay and power
figures of the original implementation are not reproduced.

## Files

`rtl/` holds one module or package per file:

* `gf_crc_pkg`: polynomial remainder and multiply-by-α functions.
* `gf_alpha`, `gf_pass_thru`, `gf_sum`: the datapath modules.
* `crc_actual`, `crc_pred_alpha`, `crc_pred_pass_thru`, `crc_pred_sum`: the
  CRC units.
* `alpha_edc`, `pass_thru_edc`, `sum_edc`: the checked modules.
* `gf_mult_crc`: the multiplier.
* `crc_parity_generator`, `ecc_actual_crc`, `ecc_predicted_crc`, `crc_ecc`:
  the CRC_ECC unit.
* `crc_edc_top`: both units, with all of their ports.

`tb/` holds one self-checking testbench per module, named `tb_<module>`,
plus `tb_gf_mult_crc_wide` and `tb_ref_pkg`. The reference package is written independently of the RTL. It
computes remainders bit-serially and products by Horner's rule.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog fails the run if it hangs. To run one:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/gf_crc_pkg.sv tb/tb_ref_pkg.sv tb/tb_gf_mult_crc.sv --top-module tb_gf_mult_crc
./obj_dir/Vtb_gf_mult_crc
```

Most testbenches finish in under a second. `tb_gf_mult_crc_wide` takes a
few seconds. They cover:

* all 65 536 GF(2^8) products, with no false alarm;
* a GF(2^79) instance (f(x) = x^79+x^9+1) on random products and faults;
* faults injected into every module, checking that only that module flags
  and that its flags equal e mod g;
* a GF(2^7) instance and both CRC-5 generators;
* the CRC_ECC unit under injected patterns and single and double codeword
  errors.

`tb_crc_edc_top` runs both units at their default parameters. It counts every
mechanism: products, faults located in each module kind, undetectable
patterns, injected patterns removed, single errors corrected, and
uncorrectable words flagged. It fails if any of them never happens.

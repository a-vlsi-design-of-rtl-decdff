# Self-checking OLS codec: double error correction with concurrent error detection

Orthogonal Latin Square (OLS) codes protect memory words with more check bits
than a Hamming or BCH code, but in exchange they decode in one step: every
data bit is repaired by a single majority vote over a few check equations, with
no iterative search. That makes them attractive for caches and fast memories.
This RTL implements a double-error-correcting (t = 2) OLS codec for a 16-bit
data block extended to 20 data bits at no extra check-bit cost, and adds two
kinds of self-checking on top of it:

* **Concurrent error detection (CED) of the logic itself.** A fault inside the
  encoder or the syndrome logic is caught while the circuit runs. It uses
  *parity prediction*, which costs a few XOR gates because of a property of
  OLS codes (see below).
* **Detection of words with more than t errors.** The decoder flags these
  instead of silently passing on mis-corrected data.

The architecture follows the article *A VLSI Design of a Novel Architecture
for Orthogonal Latin Square Codes*. Where that description stops, this design
makes its own choices. Those are listed in [Departures and own choices](#departures-and-own-choices).

## The code

An OLS code with `m*m` data bits that corrects `t` errors has `2*t*m` check
bits. The check bits fall into `2t` **groups** of `m` bits. The design's main
configuration is `m = 4`, `t = 2`: 16 check bits in four groups of four.

Number the data bits of the plain code as the cells `(i, j)` of an `m x m`
square. Bit index is `i*m + j`, and data bit `d_n` (1-based) is `d[n-1]`.
Each data bit has exactly one 1 in every group:

| group | rule for the check bit (0..m-1 inside the group) | matrix |
|---|---|---|
| 0 | `i` | M1: row r covers a whole row of the square |
| 1 | `j` | M2 = [I I ... I] |
| g >= 2 | `((g-1) * i) XOR j`, product in GF(m) | Latin squares |

For `m = 4` the full parity check matrix (data part) is as follows. Each row
lists the data bits of one check equation (1-based). Bits 17-20 are the
extension.

| check | data bits | check | data bits |
|---|---|---|---|
| c1 | 1 2 3 4 17 | c9  | 1 6 11 16 19 |
| c2 | 5 6 7 8 17 | c10 | 2 5 12 15 19 |
| c3 | 9 10 11 12 17 | c11 | 3 8 9 14 19 |
| c4 | 13 14 15 16 17 | c12 | 4 7 10 13 19 |
| c5 | 1 5 9 13 18 | c13 | 1 7 12 14 20 |
| c6 | 2 6 10 14 18 | c14 | 2 8 11 13 20 |
| c7 | 3 7 11 15 18 | c15 | 3 5 10 16 20 |
| c8 | 4 8 12 16 18 | c16 | 4 6 9 15 20 |

Rows c1-c8 restricted to bits 1-16 form the single-error-correcting
(t = 1) code with 8 check bits.

Two properties make one-step decoding work:

1. every data column has exactly `2t` ones;
2. two columns share at most one check bit.

With at most `t` errors, a wrong bit sees at least `t+1` of its `2t`
equations fail. A correct bit sees at most `t-1` fail.

### Extension: more data bits for free

Within one group, every existing column has at most a single 1. A new column
whose `2t` ones all lie in one group therefore shares at most one check bit
with every existing column, and the two properties still hold. New columns in
the same group must also share at most one bit with each other.

* For `m = 4, t = 2` the only such column per group sets all four bits. That
  gives bits 17-20 in the table above, so k goes from 16 to 20.
* For `m = 8` each group is split into two disjoint blocks of four. That
  gives 2 columns per group, so k goes from 64 to 72.
* When `l = m/(2t) >= 2t`, each group of `m` bits can carry a whole smaller
  OLS code with `l*l` data bits, including that code's own extension:
  * `m = 16`: 20 columns per group (the extended m = 4 code), so k goes from
    256 to 336;
  * `m = 32`: 72 columns per group, so k goes from 1024 to 1312.

A counting bound limits what any construction can add per group:
`m(m-1)/2 >= N_G * 2t(2t-1)/2`. For `m = 16, t = 2` this allows 20 columns,
which is what this construction reaches.

All of this happens at elaboration time in `ols_pkg`. Its functions are:

* `col_row(m, t, col, n)` gives the global check bit index of the n-th one of
  a data column;
* `row_mask` gives one row of the matrix;
* `data_bits` and `check_bits` give the widths.

`m` must be a power of two up to 64, and `2t-1 <= m`. An unsupported
combination stops elaboration with an error.

## Parity prediction for the encoder and the syndrome

The encoder (`ols_encoder`) is one independent XOR tree per check bit. No
gate is shared between trees, so a single faulty node changes at most one
check bit.

Each column of G has `2t` ones, an even number, so the XOR of all check bits
of any code word is zero:

    c1 ^ c2 ^ ... ^ c(2tm) = 0

This gives the checker:

* A single fault inside the encoder makes this parity odd.
* The encoder is made of XOR gates only, so no fault is masked by the logic.
* Together these make the encoder fault-secure and self-testing for single
  stuck-at faults.

Other codes do not allow this shortcut. In a Hamming code many columns of G
have odd weight, and predicting the parity needs real logic.

`parity_checker` checks the parity on two rails:

* `r1` is the parity of the lower half of the check bits, `r2` that of the
  upper half.
* Both halves together have even parity, so a healthy circuit gives `00` or
  `11`. The rails form a repetition code.
* `01` or `10` signals an error.
* A fault inside the checker itself also shows up as `01`/`10` for some
  input, so the checker checks itself too.

For the t = 1, m = 4 code the halves are c1-c4 and c5-c8. For the default
code they are c1-c8 and c9-c16.

The same argument protects the syndrome computation (`syndrome_gen`):

* The syndrome is `s = G*d_rx XOR c_rx`.
* The recomputed part `G*d_rx` has even parity, so `parity(s)` must equal
  `parity(c_rx)`.
* These two values are the checker's two rails.

In the top level, both checkers run beside the encoder and the majority
decoder, off their critical paths.

## Majority decoding and the uncorrectable-word flag

`mld_corrector` builds one majority circuit per data bit. Each circuit looks
at the `2t` syndrome bits of that data bit and flips the bit through an XOR
correction gate when at least `t+1` of them are set. For t = 2 this is a
3-of-4 vote.

A check bit takes part in one equation only, so an error in a check bit
never causes a data bit to be flipped.

With `t+1` or more errors, OS-MLD can mis-correct. `ued_detector` catches
most of these cases:

1. It recomputes which equations the flipped bits account for:
   `s_res = s XOR G*flip`.
2. With at most `t` errors, the set bits of `s_res` are exactly the wrong
   check bits, so `popcount(flip) + popcount(s_res)` is the number of errors.
3. If that sum exceeds `t`, the word is flagged uncorrectable.

This never raises a false alarm for `t` or fewer errors. For the default
code it flags 6460 of the 7140 possible three-bit error patterns (90.5 %).
The remaining patterns look exactly like a correctable pattern of at most two
errors, so no decoder can tell them apart from one.

## Top level: `ols_top`

```
 wr_d ──► ols_encoder ──► enc_c ─────────────────────────► [reg] ─► enc_c, enc_d
                    └──► parity_checker (r1,r2) ──────────► [reg] ─► enc_rr, enc_err
 rd_d, rd_c ──► syndrome_gen ──► s ──► mld_corrector ─────► [reg] ─► dec_d, dec_corrected
                    │                 └─ flip ─► ued_detector ► [reg] ─► dec_uncorrectable
                    └── parity check of s vs c_rx ────────► [reg] ─► dec_rr, dec_ced_err
```

The write side encodes a word for storage. The read side decodes a word read
back. The memory between them is not part of the design.

| port | dir | width (default) | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset of the output registers |
| `wr_d` | in | K = 20 | data to encode |
| `enc_d`, `enc_c` | out | 20, 16 | code word: data and check bits |
| `enc_rr`, `enc_err` | out | 2, 1 | encoder checker rails `{r2,r1}` and their XOR |
| `rd_d`, `rd_c` | in | 20, 16 | code word read back |
| `dec_d` | out | 20 | corrected data |
| `dec_syn` | out | 16 | syndrome |
| `dec_corrected` | out | 1 | at least one data bit was flipped |
| `dec_uncorrectable` | out | 1 | more than T errors detected |
| `dec_rr`, `dec_ced_err` | out | 2, 1 | syndrome checker rails and their XOR |

Timing: all logic is combinational from the inputs to a single rank of
output registers. There is no register-to-register path. Every output
belongs to the inputs of the previous clock edge, and a new word can be
applied on both sides every cycle.

Parameters, shared by every module of the codec:

| parameter | default | meaning |
|---|---|---|
| `M` | 4 | size of the Latin squares; data bits of the plain code `M*M` |
| `T` | 2 | errors corrected; check bits `2*T*M` |
| `EXT` | 1 | add the extension columns (20 data bits instead of 16) |

Sizes exercised in simulation:

| M | T | EXT | data bits | check bits |
|---|---|---|---|---|
| 4 | 1 | 0 | 16 | 8 |
| 4 | 2 | 0 | 16 | 16 |
| 4 | 2 | 1 | 20 | 16 (default) |
| 8 | 2 | 1 | 72 | 32 |
| 16 | 2 | 1 | 336 | 64 |
| 32 | 2 | 1 | 1312 | 128 |

## Files

| file | contents |
|---|---|
| `rtl/ols_pkg.sv` | matrix construction functions, widths |
| `rtl/ols_encoder.sv` | check bit generator (XOR trees) |
| `rtl/parity_checker.sv` | two-rail self-checking parity checker |
| `rtl/syndrome_gen.sv` | syndrome and its parity-prediction check |
| `rtl/mld_corrector.sv` | majority circuits and correction gates |
| `rtl/ued_detector.sv` | uncorrectable-word flag |
| `rtl/ols_top.sv` | codec top level with output registers |
| `tb/ols_ref_pkg.sv` | reference model: the m = 4 matrix typed in by hand, software encoder and decoder |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_ols_top.sv` | end-to-end test at the default size |
| `tb/tb_ols_sizes.sv`, `tb/ols_size_check.sv` | workload at every size in the table above |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
To build and run one:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ols_pkg.sv tb/ols_ref_pkg.sv rtl/*.sv tb/tb_ols_top.sv --top-module tb_ols_top
./obj_dir/Vtb_ols_top
```

Substitute another testbench as needed. `tb_ols_sizes` also needs
`tb/ols_size_check.sv`, but not `ols_ref_pkg`. Verilator warns that
`ols_pkg` is listed twice when `rtl/*.sv` is used. That warning is harmless.
You can avoid it by listing the files one by one.

What the testbenches establish:

* **`tb_ols_encoder`**:
  * every unit vector, 2000 random words and the all-ones word are checked
    against the hand-typed matrix, for both t = 2/k = 20 and t = 1/k = 16;
  * the check bits always have even parity;
  * for m = 8 and m = 16, every column has weight 4 and no two columns share
    more than one check bit.
* **`tb_mld_corrector`** and **`tb_ued_detector`**:
  * every pattern of up to two errors over the 36-bit code word is corrected
    exactly and never flagged;
  * all 7140 three-error patterns match the reference decoder.
* **`tb_ols_top`** runs the whole codec at its default parameters through a
  64-word memory model and 4000 reads with 0 to 3 errors. It:
  * checks every output one cycle after its inputs;
  * checks reset and the corrected, uncorrectable and check-bit-only cases;
  * forces a wrong check bit into the encoder and a wrong syndrome bit into
    the decoder, to show that `enc_err` and `dec_ced_err` fire.
* **`tb_ols_sizes`** runs random words with up to t errors through five
  sizes. The expected data is the written word itself. The m = 32 instance
  takes about a minute and a half to build; the run itself is instant.

## Departures and own choices

* **Matrix rule.** The GF(m) rule for groups 3 and up reproduces the m = 4
  matrix exactly. For other sizes it is this design's way of building the
  orthogonal Latin squares.
* **Extension columns.** The columns for m = 8 (disjoint blocks) and for
  m = 32 (an extended 8x8 code per group, 72 columns) are this design's own.
  The original gives counts, not columns, for these sizes.
* **Syndrome CED and uncorrectable flag.** Their circuits are this design's
  own. The original architecture names the aims: CED of the syndrome
  computation, and detection of errors on more than two bits. It does not
  give the circuits.
* **Read side.** The published implementation's top level is only the
  encoder, with an 8-bit output, a clocked error-detection stage and a 32-bit
  data port for the extended code. Here the decoder sits beside the encoder
  in the same top level. The data port is exactly 20 bits wide, and all 16
  check bits are brought out.
* **Reset.** Synchronous and active-high.
* **Bit order and rails.** The bit order and the choice of rails for codes
  larger than t = 1 are this design's conventions.

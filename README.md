# Crossbar switches that route addresses through Galois-field logic

A full crossbar lets every one of n sources reach any free one of n receivers
at the same time. Built directly it needs n² switching points, each with its
own control. The switches here work differently. Each source's data bit does
not travel through a matrix. It *strobes* a short word that names the
receiver. That word goes through cheap bitwise logic and a binary decoder, and
the decoder's output lines for receiver j are ORed across all sources. Each
channel is then just an adder or checker plus a decoder. Because the routed
object is a code word, error-correcting codes can be used for it. A channel
with a few wrong address bits still delivers to the right receiver, and it
reports an address it cannot trust.

Three one-bit 15 × 15 switches are provided. They are separate designs that
share a clock and reset in `galois_crossbar_top`:

| switch | address per source | what the address logic does | latency |
|---|---|---|---|
| GF(2^m) switch (`gf_crossbar`) | 4-bit field element | adds the source's own field element, decodes the sum | combinational |
| Hamming switch (`hamming_crossbar`) | 7-bit (7,4) Hamming code word | corrects 1 wrong bit per address | 1 clock |
| BCH switch (`bch_crossbar`) | 15-bit (15,5) BCH code word | corrects up to 2 wrong bits per address, detects 3 | 1 clock |

A source that sends 0 presents the all-zero word. That word decodes to the
unused output 0, so it delivers nothing. If two sources send to the same
receiver, the receiver sees the OR of their bits.

## Field elements and bit order

All three switches work in GF(2^4) built on F(X) = X⁴ + X + 1. One rule runs
through every file, and it matters most when you build control words by hand:
**a field element is written with the coefficient of a⁰ leftmost, in the most
significant bit.**

```
a^0  = 1000   a^4  = 1100   a^8  = 1010   a^12 = 1111
a^1  = 0100   a^5  = 0110   a^9  = 0101   a^13 = 1011
a^2  = 0010   a^6  = 0011   a^10 = 1110   a^14 = 1001
a^3  = 0001   a^7  = 1101   a^11 = 0111   (a^15 = a^0)
```

- Addition is a bitwise XOR.
- Multiplying by a is a right shift. If a bit falls off the right end, `1100`
  (that is, a⁴ = 1 + a) is XORed back in.
- `gf_pkg` has these operations for any m up to 16 (`gf_mul_alpha`,
  `gf_alpha_pow`). It also has fixed GF(16) versions for the BCH logic
  (`gf16_mul`, `gf16_sq`, `gf16_inv`, where the inverse is computed as x¹⁴).

Code words use the same convention. Bit position 0 of a printed word is the
leftmost character and the most significant bit of the vector. In a BCH word,
position i carries a^i.

## GF(2^m) switch

Source i (i = 1..15) owns the element a^(i-1). In `gf_switch_unit` the data
bit drives the adder lines where a^(i-1) has ones. The other lines are tied
low. The data bit also strobes the modulo-2 adder (`gf_mod2_adder`). The
4-bit sum goes to a binary decoder (`binary_decoder`) whose output j lights
when the sum, read as a binary number, equals j.

To send source i to receiver j, give source i the control word

```
addr[i] = a^(i-1) XOR j        (j as a 4-bit number)
```

For example, source 2 (a¹ = 0100) with control word 0001 gives 0101, so
receiver 5. A control word equal to a^(i-1) gives the sum 0, which leaves
the source unconnected. All 15 control words together are 60 bits. Any
assignment of sources to receivers can be set, one-to-one or many-to-one.

The path is four logic levels deep: encoder AND, XOR, strobe AND and decoder
AND, followed by the OR that joins the lines. There is no register.

`gf_crossbar` has the parameters `M` (field degree), `POLY` (field
polynomial, bit k = coefficient of Xᵏ) and `N` (default 2^M − 1). Other sizes
need only another primitive polynomial. Examples are m = 3 with X³+X+1 (7 × 7,
exercised by the testbenches), m = 6 with X⁶+X+1, m = 7 with X⁷+X+1, m = 9
with X⁹+X⁴+1 and m = 10 with X¹⁰+X³+1. A reducible polynomial such as
X⁵+X²+X+1 does not give a field. For m = 5 use X⁵+X²+1. For a 16 × 16 switch
take m = 5 and use 16 of the 31 lines.

## Hamming switch

Receiver n (1..15) is addressed by the systematic (7,4) code word with
generator g(X) = 1 + X + X³. The word is three check symbols followed by the
four bits of n, least significant first:

```
 1 110 1000    4 111 0010    7 010 1110   10 110 0101   13 100 1011
 2 011 0100    5 001 1010    8 101 0001   11 000 1101   14 001 0111
 3 101 1100    6 100 0110    9 011 1001   12 010 0011   15 111 1111
```

`hamming_pkg::ham_encode(n)` produces these words. Every address is the XOR
of the words for 1, 2, 4 and 8.

One channel (`hamming_switch_unit`) has these stages:

1. **AND group** (`strobe_gate`): the data bit gates the 7 address bits.
2. **Parity check** (`hamming_parity_check`): gives a 3-bit syndrome from the
   rows of H = {0010111, 0101110, 1011100}. The syndrome is 000 for a code
   word. With one wrong bit it is that bit's column of H, for example 100 for
   the seventh bit.
3. **D1** (`hamming_d1`): compares the syndrome with the columns of the four
   information positions and flags the one bit to invert. An error in a check
   symbol needs no correction of the receiver number.
4. **Rg** (`correction_register`): loads the information bits and inverts the
   flagged bit at the same clock edge, so it holds the corrected receiver
   number.
5. **D2** (`binary_decoder`): drives the receiver line.

`corrected` tells, per source and aligned with the data, that an address bit
was repaired. All 15 channels can each have one wrong address bit at the same
time.

## BCH switch

The addresses are code words of the (15,5) BCH code. It has n = 15, designed
distance 7, and generator

```
g(X) = (1+X+X^4)(1+X+X^2+X^3+X^4)(1+X+X^2) = 1+X+X^2+X^4+X^5+X^8+X^10
```

The word for receiver n has ten check symbols at positions 0..9. The five bits
of n, least significant first, sit at positions 10..14. `bch_pkg::bch_encode(n)`
produces it, using the same systematic layout as the Hamming switch.

A channel (`bch_switch_unit`) has these stages:

1. **AND group**: as in the Hamming switch, but 15 bits wide.
2. **Syndromes** (`bch_syndrome`): S1, S3 and S5 are the field sums of a^i,
   a^3i and a^5i over the positions i that hold a 1. A code word gives all
   three as 0. An error pattern with locators X_k gives S_j = Σ X_k^j.
3. **Determinants and error count** (`bch_det_mcs`): these are the
   determinants of Peterson's matrices:

   ```
   det L1 = S1
   det L2 = S1^3 + S3
   det L3 = S1^6 + S1^3·S3 + S1·S5 + S3^2
   ```

   Each is ORed down to a "non-zero" bit. The majority-coincidence outputs
   `t_ge[j]` are the OR of the flags of det L_j..det L3 and mean "at least j
   errors". Inverting the next determinant's flag gives exact counts:

   | condition | decision |
   |---|---|
   | all three = 0 | no error |
   | det L1 ≠ 0, det L2 = 0 | one error: `t_eq1` |
   | det L2 ≠ 0, det L3 = 0 | two errors: `t_eq2` |
   | det L3 ≠ 0 | three or more: `t_ge3` |

   A word with S1 = 0 but S3 ≠ 0 has det L2 = S3 and det L3 = S3², both
   non-zero, so it is counted as three or more, not as error-free.

4. **Error locator** (`bch_error_locator`):
   - **One error:** S1 is the locator a^p.
   - **Two errors:** the locator polynomial X² + S1·X + (S1³+S3)/S1 becomes
     Y² + Y + d under X = S1·Y, with d = (S1³ + S3)/S1³ = det L2 / S1³.
   - A 16-entry table holds one root Y1 for every d. It is computed at
     elaboration from the field, with no data file.
   - Then X1 = S1·Y1 and X2 = S1 + X1. The locators are matched against
     a⁰..a¹⁴ to form a 15-bit flip mask.
   - A d whose quadratic has no root in GF(16) cannot come from two errors.
     It is treated like `t_ge3`.
5. **Rg and D2**: as in the Hamming switch, with 5 information bits. A 5-to-15
   decoder drives the lines.

When three or more errors are detected, the channel **delivers nothing**,
and its `status.t_ge3` flag is set one clock later. `status` is a packed
`bch_status_t` struct with the fields `{t_eq1, t_eq2, t_ge3}`.

Worked case: errors at positions 4 and 9 (the fifth and tenth from the left)
give S1 = a¹⁴, S3 = 0 and S5 = a¹⁰. Then det L2 = a¹², det L3 = 0 and d = a⁰.
Y1 = a⁵, so X1 = a⁴ and X2 = a⁹. The testbenches of the BCH blocks check this
case.

The guarantees hold for up to three wrong bits per address. With four or more
the count can be wrong. For example, a pattern with S1 = S3 = 0 but S5 ≠ 0
is taken as error-free, and the decoder reads the received information bits
as they are.

## Top level and timing

`galois_crossbar_top` brings out each switch's ports separately. B stands
for `DATA_BITS`:

- `gf_din[B][15]`, `gf_addr[B][15][4]`, `gf_dout[B][15]`
- `ham_din[B][15]`, `ham_addr[15][7]`, `ham_dout[B][15]`, `ham_corrected[B][15]`
- `bch_din[B][15]`, `bch_addr[15][15]`, `bch_dout[B][15]`, `bch_status[B][15]`
- `clk` and `rst_n`, used by the two coded switches

Index [b][i] of a data input is bit b of source i+1. Bit [b][j] of an output
is bit b of receiver j+1.

Timing:

- **GF switch:** combinational.
- **Hamming and BCH switches:** data bits and addresses set up before a rising
  edge of `clk` appear on the receiver lines and flags after that edge. A new
  set can be given every cycle.
- **Reset:** `rst_n` is asynchronous and active low. It clears the registers,
  so no receiver line is active.

Parameters of the top: `GF_M` = 4, `GF_POLY` = X⁴+X+1 and `DATA_BITS` = 1.
The coded switches are fixed at 15 × 15 by their codes.

## Wider sources

A B-bit switch is B one-bit switches, one per bit plane. The wrappers are
`gf_crossbar_wide`, `hamming_crossbar_wide` and `bch_crossbar_wide`.

- **GF switch:** each plane has its own control words, B × 15 × 4 bits in all.
  Different bits of one source can therefore go to different receivers.
- **Coded switches:** the planes share one address per source, so all bits of
  a source go to one receiver. Each plane still has its own gating and
  correction logic, because each plane's bit strobes the address separately.
  A plane whose bit is 0 sees no address and reports nothing.

The top's default `DATA_BITS` = 1 gives the one-bit switches.

## What follows the source design, and what is this design's own

These parts follow the source design:

- the three switch structures
- the field and its polynomial
- the Hamming code, its address table and H
- the BCH generator, its syndromes, the determinant formulas and the four-way
  decision
- the quadratic-root method with a stored table
- the 15 × 15 sizes

These are choices made here:

- **Rg as a clocked register.** It is a rising-edge register with asynchronous
  reset, loaded every cycle. Its "set" and "count" actions are merged into one
  load of `info ^ flip`. The status flags ride along in the same register.
- **Joining by OR.** The joined decoder outputs are modelled as an OR.
- **Unconnected source.** In the GF switch, a sum of 0 is used to leave a
  source unconnected.
- **BCH addresses.** The systematic layout of the BCH addresses is a choice.
  Only the code itself is given.
- **BCH channel structure.** The BCH channel reuses the Hamming channel's
  register and decoder, with the syndrome, determinant and locator stages in
  place of the parity check and D1.
- **Withholding.** A BCH delivery is withheld when three or more errors are
  detected.
- **Logic instead of PROMs.** The products in the determinant circuit are
  built as GF(16) logic. A table memory addressed by the two operands would do
  the same.

Two formulas are used in their corrected form:

- The normalised quadratic constant is det L2 / S1³. Only this form turns the
  substitution X = S1·Y into Y² + Y + d and reproduces the worked case.
- A sum of 0101 in the GF switch goes to receiver 5, which is its binary
  value. As a field element, 0101 is a⁹.

Not built:

- **A faster Hamming decoder.** It would replace the syndrome, D1 and Rg path
  with one full decoder per receiver that also accepts every one-bit
  corruption of that receiver's address. That cuts the delay from about ten
  gate delays to about three, at the cost of more gates.
- **Gate-delay figures.** No timing model of gate delays is given. The
  estimates of about 4 gate delays for the GF switch and about 10 for the
  Hamming switch describe the structure above, not a measured netlist.

## Files

`rtl/`:

| file | content |
|---|---|
| `gf_pkg.sv` | field arithmetic, printed bit order |
| `hamming_pkg.sv` | (7,4) code tables, `ham_encode` |
| `bch_pkg.sv` | (15,5) generator, `bch_encode`, `bch_status_t` |
| `strobe_gate.sv` | AND group |
| `gf_mod2_adder.sv` | strobed field adder |
| `binary_decoder.sv` | decoder with output 0 dropped |
| `gf_switch_unit.sv`, `gf_crossbar.sv` | GF switch |
| `hamming_parity_check.sv`, `hamming_d1.sv`, `correction_register.sv`, `hamming_switch_unit.sv`, `hamming_crossbar.sv` | Hamming switch |
| `bch_syndrome.sv`, `bch_det_mcs.sv`, `bch_error_locator.sv`, `bch_switch_unit.sv`, `bch_crossbar.sv` | BCH switch |
| `gf_crossbar_wide.sv`, `hamming_crossbar_wide.sv`, `bch_crossbar_wide.sv` | B-bit wide versions |
| `galois_crossbar_top.sv` | all three side by side |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. They
share `gf_ref_pkg.sv`, which holds reference values written out as tables:
the 15 field elements, the Hamming address table and H columns, the rows of
the BCH transposed parity check matrix, and a BCH encoder that does long
division by g(X). The reference values do not reuse the RTL's arithmetic.

Each testbench prints `TB_RESULT checks=N failures=F` and stops. A watchdog
stops a run that hangs and counts it as a failure.

`tb_galois_crossbar_top` runs the top at its default parameters with 2000
cycles of random traffic on all three switches. It counts each mechanism and
fails if any of them never happened:

- deliveries on each switch
- unconnected and silent sources
- merged receivers
- Hamming corrections
- BCH one-error and two-error corrections
- BCH three-error detections

`tb_galois_crossbar_top_wide` runs the same traffic with `DATA_BITS` = 4. It
also requires coded addresses that carry several bits at once.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf_pkg.sv rtl/hamming_pkg.sv rtl/bch_pkg.sv tb/gf_ref_pkg.sv \
    tb/tb_galois_crossbar_top.sv --top-module tb_galois_crossbar_top
./obj_dir/Vtb_galois_crossbar_top
```

Replace the last testbench file and top name to run any other testbench. The
full run takes well under a second.

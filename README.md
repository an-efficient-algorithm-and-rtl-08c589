# Key-locked 13-point DST-IV engine on quasi-band correlation systolic arrays

This design computes the type IV discrete sine transform of length N = 13:

    Y(k) = sqrt(2/N) * sum_{i=0}^{12} x(i) * sin((2i+1)(2k+1) * pi / (4N)),   k = 0..12

It does not multiply a 13 x 13 matrix. The transform is rewritten into six
independent 3 x 3 products, and each product has a *quasi-band* (Hankel) matrix:
every anti-diagonal holds one value, up to sign. Each product runs on a
3-PE linear systolic array fed by five coefficients. The whole core has 18
processing elements, each with one multiplier and one adder.

Each PE adds or subtracts its product according to a sign bit. Those sign bits
are hidden behind an 18-bit obfuscation key. Every PE has a small multiplexer
that passes either its correct sign sequence or a corrupted one, depending on
one key bit. With the right key the engine computes the DST-IV. With any other
key it quietly produces wrong numbers. The netlist alone does not tell which
multiplexer input is the correct one.

## 1. From DST-IV to six short quasi-band products

Let alpha = pi/(2N) and theta_k = (2k+1) alpha / 2. The engine computes the
following.

**Input recursion.** It forms alternating suffix sums
`x_p(12) = x(12)` and `x_p(i) = (-1)^i x(i) + x_p(i+1)`. These give
`x(i) = (-1)^i (x_p(i) - x_p(i+1))`. Substituting into the definition and using
`sin((2i+1)t) + sin((2i-1)t) = 2 sin(2it) cos t` gives

    Y(k) = x_p(0) sin(theta_k) + 2 cos(theta_k) T_a(k)
    T_a(k) = sum_{i=1}^{12} (-1)^i x_p(i) sin(i (2k+1) alpha)

**Output recursion.** Adding two neighbouring T_a terms removes the odd part of
the angle:

    T_a(0) = sum_i (-1)^i x_p(i) sin(i alpha)
    T_a(k) = T(k) - T_a(k-1),      k = 1..12
    T(k)   = sum_{i=1}^{12} (-1)^i x_C(i) s(i k),   x_C(i) = x_p(i) cos(i alpha),
    s(m)   = 2 sin(2 m alpha) = 2 sin(m pi / 13)

So the expensive part is the 12 x 12 kernel `(-1)^i s(ik)`.

**Folding.** For i = 1..6, `s(k(13-i)) = -(-1)^k s(ik)`. The kernel therefore
folds to 6 x 6:

* even k uses the sums `u(i) = x_C(i) + x_C(13-i)`;
* odd k uses the differences `d(i) = x_C(i) - x_C(13-i)`.

**Splitting into cosets.** Modulo 13, the powers of 3 give {1, 3, 9}. Up to
sign, these are the classes {1, 3, 4}. The other coset is {2, 5, 6}. Order
inputs and outputs by these cosets. Each 6 x 6 kernel then becomes a 2 x 2
arrangement of 3 x 3 Hankel blocks [[P, Q], [R, S]], and R equals -Q up to a
signed row permutation. The four block products then need only three 3 x 3
products, because B = Q (with signs) is shared:

    out_A = (P + B) a + B v,      out_C = (S' - B) c + B v,      v = c - a

For the even half, with `a = [u4, u3, u1]` and `c = [u2, -u5, u6]`:

    A = | s5-s3    -(s1+s6)  -(s2+s4) |   B = |  s5  -s6  -s2 |   C = | -(s4+s5)  s6-s3     s2-s1    |
        | -(s1+s6) -(s2+s4)   s5-s3   |       | -s6  -s2   s5 |       | s6-s3     s2-s1    -(s4+s5)  |
        | -(s2+s4)  s5-s3    -(s1+s6) |       | -s2   s5  -s6 |       | s2-s1    -(s4+s5)   s6-s3    |

    [T4, T10, T12] = A a + B v          [-T2, T8, -T6] = C c + B v

For the odd half, with `a = [d4, d3, d1]` and `c = [d2, -d5, -d6]`:

    A = | s3-s5    -(s1+s6)  -(s2+s4) |   B = | -s5  -s6  -s2 |   C = | s4+s5    s6-s3     s2-s1    |
        | s1+s6    -(s2+s4)   s5-s3   |       |  s6  -s2   s5 |       | s3-s6    s2-s1    -(s4+s5)  |
        | s2+s4     s5-s3    -(s1+s6) |       |  s2   s5  -s6 |       | s1-s2   -(s4+s5)   s6-s3    |

    [T9, T3, T1] = A a + B v            [-T11, T5, -T7] = C c + B v

Every one of these matrices has the form `M[r][c] = ±h[r+c]`. One array can
therefore compute it from the five-value stream h[0..4], plus one sign bit per
PE and row. Section 3 describes that array. The six streams and the sign tables
are in `rtl/dst4_pkg.sv`.

This decomposition was checked against the definition in floating point. The
bit-accurate RTL differs from a floating-point DST-IV by at most 2 LSB.

## 2. Datapath

```
 x[0..12] --> dst4_preproc --vec[j][0..2]--> qbc_array j (j = 0..5) --rows--> dst4_postproc --> y[0..12]
               x_p, x_C, u/d,              ^  each with an obf_control     T(k), T_a(k),
               T_a(0), x_p(0)              |  driven by key[3j+2:3j]       x_p(0) sin + 2 T_a cos,
                                    dst4_ctrl (streams, tags, row, strobes)     * sqrt(2/N)
```

* **dst4_preproc** computes x_p with a chain of adders. It weights x_p by
  cos(i alpha) and folds the result into u/d. It then forms the six input
  vectors `a`, `v = c - a` and `c` for each half, and computes T_a(0). All of
  this is registered on `load`.
* **qbc_array** (x6) computes the 3 x 3 quasi-band products. Arrays 0, 1 and 2
  are A, B and C of the even half. Arrays 3, 4 and 5 are the odd half.
* **obf_control** (x6) supplies each array's sign sequences, which are gated by
  the key.
* **dst4_postproc** sums the row pairs, maps them onto T(k), runs the T_a
  recursion and applies the output rotation. It then applies the
  sqrt(2/N) multiplier, which is kept out of the core and applied once at the end.
* **dst4_ctrl** is a one-hot token shift register. It issues the shared stream
  indices and strobes. All six arrays run in lockstep.

## 3. The systolic array and its processing element

`dst4_pe` has the following behaviour:

* The links x_e1, x_e2, c1, c2 and the tags tc, tc1 pass to the next PE through
  one register each.
* While `tc = 1`, the data on x_e1/x_e2 is stored in x_i1/x_i2, and that same
  data is used in the product in that cycle.
* The coefficient register takes c1 when tc1 = 1, otherwise c2.
* The output is `y_o = y ± x*c`. `sign[1]` selects subtraction and `sign[0]`
  selects the second data word. The partial-sum path through the PE is
  combinational.

`qbc_array` chains three PEs. The data link has a second register between
neighbouring PEs, so data moves at half the speed of the tag. One tag pulse
sent with the third data word therefore leaves word 2 in PE 1, word 1 in PE 2
and word 0 in PE 3. The words then stay in place. The coefficients move one PE
per cycle and pass through each PE's coefficient register. As a result, in
row r every PE multiplies by h[r + its column]. The three products add up
along the combinational partial-sum chain, so one full row leaves PE 3 every
cycle. That row is registered at the array output.

| frame cycle n | data link | tc | coefficient | row in PEs | array output |
|---|---|---|---|---|---|
| 0 | x[0] | 0 | – | – | – |
| 1 | x[1] | 0 | h[0] | – | – |
| 2 | x[2] | 1 | h[1] | – | – |
| 3 | – | 0 | h[2] | – | – |
| 4 | – | 0 | h[3] | 0 | – |
| 5 | – | 0 | h[4] | 1 | row 0 |
| 6 | – | 0 | – | 2 | row 1 |
| 7 | – | 0 | – | – | row 2 |

A new frame can start at n = 5 of the previous one. Its tag reaches PE 1 at
n = 7, after the old words have been used. The engine therefore accepts a frame
every 5 cycles.

In this engine the second data link, the second coefficient link and tc1 are
not used: x2 = 0, c2 = 0, tc1 = 1 and sign[0] = 0. They remain on the PE and
the array so that the PE keeps its full function, and `tb_qbc_array` tests the
second link.

## 4. Sign obfuscation and the key

Each PE needs a 3-bit sequence with one subtract bit per output row. For each
PE, `obf_control` builds the correct sequence C and an altered copy C' (C with
its lowest 1 cleared). It forms the two AND gates `C & C` and `C & C'` and feeds
them to a 2:1 multiplexer steered by that PE's key bit. For some PEs the correct
sequence sits on input 0, and for others on input 1. The correct key is
therefore a sequence of bits that is not revealed by the structure.

* Key bit `key[3j + p]` belongs to PE p+1 of array j.
* The correct key is `dst4_pkg::KEY_OK`. Per array (K[3j], K[3j+1], K[3j+2])
  it is: 0,1,0 / 1,1,0 / 0,1,1 / 1,0,1 / 0,0,1 / 1,0,0.
* Every PE's correct sequence has exactly one 1. The middle coefficient of
  every stream is sent with inverted polarity to make sure of this. So every
  single wrong key bit turns one subtraction into an addition and corrupts the
  result. The end-to-end test flips each of the 18 bits and checks this.

## 5. Interface and timing (`dst4_top`)

| port | width | meaning |
|---|---|---|
| clk, rst_n | 1 | clock, asynchronous active-low reset |
| start | 1 | request to take the frame on `x` |
| x | 13 x 16 signed | input samples |
| key | 18 | obfuscation key |
| ready | 1 | a frame is taken in a cycle where start and ready are both 1 |
| out_valid | 1 | one-cycle pulse; `y` holds that frame's result from then until the next result |
| y | 13 x 20 signed | Y(0..12), same scale as the input (orthonormal transform) |

* Latency is 10 cycles, from the cycle that takes the frame to the `out_valid`
  cycle.
* Throughput is one frame every 5 cycles. Holding `start` high gives that rate.
* Results return in order.

## 6. Number formats and accuracy

| quantity | format |
|---|---|
| samples | 16-bit signed integers |
| x_p | 20 bits |
| constants (cos, sin, sqrt(2/13), array coefficients) | round(value * 2^18); array coefficients are 22 bits because \|h\| < 4 |
| data after the cos weighting | 4 guard fraction bits (26-bit array data) |
| array accumulators | 50 bits |
| post-processing words | 36 bits |
| output | rounded to the input scale |

The worst error measured against a floating-point DST-IV is 2 LSB, on random
and full-scale (±32767) frames. Each table in `dst4_pkg.sv` gives the formula
it was computed from.

## 7. What comes from the source architecture and what is this design's own

The following follow the source architecture:

* the definition and N = 13;
* the x_p recursion, the x_C weighting, the T_a recursion and the output formula;
* the decomposition into six equally sized 3 x 3 quasi-band products, split by
  the two cosets of the subgroup generated by g = 3, with sums for even outputs
  and differences for odd ones;
* six 3-PE linear arrays (18 PEs);
* the PE register transfers and its add/subtract table;
* loading of the stationary data by a tag, and the five-coefficient streams;
* one obfuscation control per array with three multiplexers and six AND gates;
* a correct key of 0,1,0 for the first array;
* the scaling multiplier at the end.

The following are this design's own choices or corrections:

* **The 3 x 3 matrices, vector signs and output pairing.** The source's
  decomposition could not be made to reproduce the transform as written. The
  matrices in section 1 were re-derived with the same structure: cosets
  {4,3,1} and {2,5,6}, a shared middle product, and "A + B" / "C ± B" output
  rows. They are exact. The pairing of C rows with B rows and several signs
  differ from the source. As a consequence, the correct sign sequences differ
  too: for the first array this design has PE1 100, PE2 010, PE3 001, where the
  source gives 100, 101, 001.
* **T_a(0)** carries the alternating sign (-1)^i, which the transform requires.
* **Key length.** The key is 18 bits, 3 per array. The source describes the
  last array's key both as two bits and as three; three is used.
* **Key bits of arrays 2 to 5** (the third to sixth) are not given in the source and were chosen
  here.
* **Polarity of the middle coefficient** in each stream, chosen so that every
  key bit matters.
* **All cycle-level timing.** This covers the link delays, the combinational
  partial-sum chain, the frame schedule, the overlap of frames and the
  start/ready handshake.
* **All word widths, rounding and the reset style.**

The survey of other hardware-security techniques (PUFs, tamper response,
secure boot, encryption, side-channel protection) is not part of this RTL.
Only obfuscation is built into the architecture.

## 8. Files and simulation

`rtl/` (one unit per file):

* `dst4_pkg.sv`: widths, types, constant tables and the key;
* `dst4_pe.sv`, `qbc_array.sv`, `obf_control.sv`;
* `dst4_preproc.sv`, `dst4_ctrl.sv`, `dst4_postproc.sv`;
* `dst4_top.sv`: the top level.

`tb/` has one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_dst4_top` | random, small and full-scale frames against a floating-point DST-IV; exact 10-cycle latency; 30 back-to-back frames at 5-cycle spacing; ignored start requests; all 18 single-bit key errors |
| `tb_qbc_array` | overlapping frames with random coefficients and signs against a direct Hankel product |
| `tb_dst4_pe` | every register transfer and all eight tc/sign cases |
| `tb_obf_control` | all keys for all six arrays |
| `tb_dst4_preproc` | the input stage against a floating-point model |
| `tb_dst4_ctrl` | the whole schedule and the ready rule |
| `tb_dst4_postproc` | T(k) rows built from the definition, checked against the DST-IV |

To run one testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal rtl/dst4_pkg.sv rtl/*.sv tb/tb_dst4_top.sv \
        --top-module tb_dst4_top -Mdir obj_top -o sim && obj_top/sim

For the unit testbenches, replace the testbench file and top module. The
end-to-end test runs at the default parameters in well under a second.

## 9. Changing the design

* **Another key.** Edit `KEY_OK` in `dst4_pkg.sv`. The sequences and
  multiplexer orientation follow automatically.
* **Wider samples.** Raise `W_IN`, then raise `W_XP`, `W_D`, `W_T` and `W_OUT`
  with it. The present widths were sized for 16-bit samples (x_p grows by
  at most 13 times).
* **Other N.** The coefficient streams, vector permutations and output pairing
  are specific to N = 13. Another prime N needs a new decomposition along the
  lines of section 1.

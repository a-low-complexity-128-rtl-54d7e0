# 128-point four-path mixed-radix FFT for MB-OFDM UWB

An MB-OFDM ultra-wideband receiver samples at 528 MHz and needs a 128-point
FFT per OFDM symbol. That rate is too high for one sample per clock, so this
processor takes **four samples per clock**: at 132 MHz it keeps up with the
air interface, and at higher clocks it has headroom (4 samples per clock is
1 Gsample/s at 250 MHz). The design is a pipelined, continuous-flow FFT with
four parallel radix-2 data paths. Its main idea is in how the 128-point
transform is split up. The first four stages use a *modified radix-2^4*
decomposition. The last three use a *radix-2^3* one. As a result:

* only **stage 4** needs general complex multipliers (four Booth multipliers
  with a twiddle ROM);
* stage 2 needs only seven fixed twiddle factors, which four small constant
  multipliers (CCM1) produce from shifts and adds;
* stage 6 needs only `W8^1` and `-j W8^1`, handled by one CCM2 and one CCM3;
* every other twiddle is `-j`, which is just a swap of real and imaginary
  parts plus a negation.

The RTL follows the architecture published by S.-I. Cho and K.-M. Kang ("A
Low-Complexity 128-Point Mixed-Radix FFT Processor for MB-OFDM UWB Systems").
That publication leaves many details open: the handshake, the word growth, the
control logic and the inner workings of the Booth multiplier. Where it does,
the choices made here are listed under
[Choices not taken from the published design](#choices-not-taken-from-the-published-design).

## The decomposition

Write the time index `n` (0..127) and the frequency index `k` in binary:

    n = 64 n1 + 32 n2 + 16 n3 + 8 n4 + 4 n5 + 2 n6 + n7
    k = k1 + 2 k2 + 4 k3 + 8 k4 + 16 k5 + 32 k6 + 64 k7

Stage `s` is a radix-2 decimation-in-frequency butterfly. It consumes time bit
`ns` and produces frequency bit `ks`. The twiddle factors between the stages
come from splitting `W128^(nk)`:

    W128^(nk) = W16^((8n1+4n2+2n3+n4)(k1+2k2+4k3+8k4))      16-point part
              * W128^((4n5+2n6+n7)(k1+2k2+4k3+8k4))          stage-4 twiddle
              * W8^((4n5+2n6+n7)(k5+2k6+4k7))                 8-point part

A plain radix-2^4 split of the 16-point part places `W8^(n3(k1+2k2))` after
stage 2 and `W16^(n4(k1+2k2+4k3))` after stage 3. The second factor needs real
multipliers. The modified split notes that

    W16^(n4(k1+2k2+4k3)) = W16^(n4(k1+2k2)) * W4^(n4 k3)

and moves the first factor forward to stage 2. Stage 3 is then left with a
pure `-j`. The twiddles per stage are:

| after stage | factor                                   | hardware                         |
|-------------|------------------------------------------|----------------------------------|
| 1           | `W4^(n2 k1)` = `-j` or 1                 | -j unit of BU2                   |
| 2           | `W16^((k1+2k2)(2n3+n4))`                 | CCM1 (one per path)              |
| 3           | `W4^(n4 k3)`                             | -j unit of BU2                   |
| 4           | `W128^((4n5+2n6+n7)(k1+2k2+4k3+8k4))`    | CBM: Booth multiplier + ROM      |
| 5           | `W4^(n6 k5)`                             | -j unit of BU2 in paths 2 and 3  |
| 6           | `W8^(n7(k5+2k6))`                        | CCM2 (k6=0), CCM3 (k6=1)         |

After stage 2 the exponent `(k1+2k2)(2n3+n4)` can only be 0, 1, 2, 3, 4, 6 or
9. These map to the seven factors 1, `W16^1`, `W8^1`, `W16^3`, `-j`,
`-jW8^1` and `-W16^1`.

## Data flow

Path `p` (0..3) receives `x(4m+p)`, one sample per clock, `m = 0..31`. The
time bits `n6 n7` therefore select the path, and `n1..n5` are the position
`m` inside the path's 32-sample stream.

**Stages 1 to 5** (`fft_lane`, one per path) pair samples 16, 8, 4, 2 and 1
positions apart within a path. Each of these stages is a radix-2 *single-path
delay-feedback* stage: a butterfly plus a feedback buffer of 16, 8, 4, 2 or 1
words. In the first half of each block of `2L` samples, the butterfly writes
the new samples into the buffer and sends on the differences left over from
the previous block. In the second half, it sends on the sums at once and
writes the differences back into the buffer. Each stage delays the stream by
`L` and replaces time bit `ns` by frequency bit `ks` in the same position, so
the stream order is kept. After stage 5, position `t` of a path holds

    t = 16 k1 + 8 k2 + 4 k3 + 2 k4 + k5.

Across the four paths this makes 31 words per path, or 124 complex buffer
words in all.

**Stages 6 and 7** (`fft_tail`) pair the paths. Stage 6 combines paths 0 and 2
and paths 1 and 3 (bit `n6`). Stage 7 combines the results one path apart
(bit `n7`). In stage 6 the 1/3 sum (`n7=1, k6=0`) is multiplied by `W8^k5`
in CCM2, and the 1/3 difference (`k6=1`) by `-jW8^k5` in CCM3.

**Output order.** At output index `t`, output lane `q` holds `X(k)` where `k`
is the 7-bit reversal of `4t+q`:

| lane | t=0   | t=1    | t=2    | ... |
|------|-------|--------|--------|-----|
| 0    | X(0)  | X(16)  | X(8)   |     |
| 1    | X(64) | X(80)  | X(72)  |     |
| 2    | X(32) | X(48)  | X(40)  |     |
| 3    | X(96) | X(112) | X(104) |     |

**Control** (`fft_ctrl`). One 5-bit counter counts the enabled clocks. Each
select is a bit of the stream position seen by its stage, which is the counter
minus that stage's latency, modulo 32. The latencies come from the butterfly
delays (16, 8, 4, 2, 1) and the pipeline registers:

| signal                 | position      | value                                  |
|------------------------|---------------|----------------------------------------|
| stage-1 butterfly      | cnt           | pos[4]                                 |
| stage-1 -j             | cnt-16        | pos[4] & pos[3]                        |
| stage-2 butterfly      | cnt-17        | pos[3]                                 |
| CCM1 selects           | cnt-26        | k1=pos[4], k2=pos[3], n3=pos[2], n4=pos[1] |
| stage-3 butterfly, -j  | cnt-27, cnt-31| pos[2]; pos[2] & pos[1]                |
| stage-4 butterfly      | cnt-32        | pos[1]                                 |
| CBM exponent           | cnt-35        | (4 pos[0] + p)(pos[4]+2pos[3]+4pos[2]+8pos[1]) |
| stage-5 butterfly, -j  | cnt-36, cnt-37| pos[0]                                 |
| CCM2/CCM3 select       | cnt-39        | pos[0]                                 |
| output                 | cnt-40        |                                        |

## The constant multipliers

**Shift-and-add units.** The three 10-bit coefficients are
`a = cos(pi/8) = 0.111011001b`, `b = sin(pi/8) = 0.011000011b` and
`c = cos(pi/4) = 0.101101010b`. They share sub-terms, so `smu_abc` computes
`a*y`, `b*y` and `c*y` with six adders:

    A1 = y/2 + y/4          A2 = A1 + A1/16        A3 = y/2 + y/128
    A4 = A1 + A1/64
    b*y = A4/2      c*y = A2/4 + A3      a*y = A2 + A3/4

For CCM2 and CCM3, `smu_c` computes `c*z` with three adders:
`B1 = z/2 + z/8`, `B2 = B1 + B1/8`, `c*z = B2 + z/256`.

**CCM1** multiplies `x + jy` by one of the seven stage-2 factors, using two
`smu_abc` units and four select signals:

* `sel1` swaps the real and imaginary inputs, giving `y1` and `y2`.
* `sel2` selects the `c` products instead of the `a`/`b` products.
* `sel3` takes the two adder results `P = a*y1 + b*y2` and
  `Q = a*y2 - b*y1` (or their `c` versions) instead of `(y1, y2)`.
* `sel4` routes `(P, Q)` to the output as `(P,Q)`, `(-P,-Q)`, `(Q,-P)` or
  `(P,-Q)`.

| factor | 1 | W8^1 | -j | -jW8^1 | W16^1 | W16^3 | -W16^1 |
|--------|---|------|----|--------|-------|-------|--------|
| sel1   | 0 | 0    | 0  | 0      | 0     | 1     | 0      |
| sel2   | 0*| 1    | 0* | 1      | 0     | 0     | 0      |
| sel3   | 0 | 1    | 0  | 1      | 1     | 1     | 1      |
| sel4   | 0 | 0    | 2  | 2      | 0     | 3     | 1      |

(* don't care, driven as 0.) `fft_pkg::ccm1_decode` holds this table.

**CCM2** multiplies by `W8^ks`: it either passes the input through or
outputs `c(x+y) + j c(y-x)`. **CCM3** is CCM2 followed by a fixed `-j`.

**CBM.** The stage-4 multiplier reads `cos` and `-sin` of `2*pi*e/128` from
an 11-bit ROM (`tf4_rom`, computed at elaboration). Each coefficient is
radix-4 Booth encoded (`booth_enc`, two encoders). Four partial-product
generators and adders (`booth_ppg`) form the four real products. Two more
adders and rounding to 10 bits complete the complex product.

## Number format and scaling

All data are 10-bit two's complement integers (parameter `W`). Without
scaling, the word would grow by up to one bit per stage. The butterflies of
stages 1, 3, 5 and 7 halve their results with round-half-up; stages 2, 4 and
6 keep full scale. Every result saturates to the 10-bit range. The processor
therefore outputs `X(k)/16`. A random OFDM-like input keeps its level, and a
full-scale DC input saturates `X(0)` at 511. The `STAGE_SCALE` parameter sets
which stages halve; `STAGE_SCALE[s-1]` is stage `s`.

The constant multipliers extend their input by 8 fractional bits (`G`) before
shifting, then round the result. The CBM rounds its full product.
Round-half-up has a small positive bias. In the DC bin it accumulates to about
+4 LSB. On random symbols, the other bins stay within 4 LSB of an exact DFT
scaled by 1/16, with an rms error of about 0.85 LSB per component. The
signal-to-quantization-noise ratio on such symbols is about 23.6 dB at 8
bits, 35.3 dB at 10 bits and 46.6 dB at 12 bits.

## Interface

| port                    | dir | meaning                                                |
|-------------------------|-----|--------------------------------------------------------|
| `clk`, `rst_n`          | in  | clock; synchronous active-low reset of the control     |
| `in_valid`              | in  | a set of four samples is present; the whole pipeline advances only then |
| `in_ifft`               | in  | 1: inverse transform for this sample set               |
| `in_re[4]`, `in_im[4]`  | in  | `x(4m+p)` on lane `p`                                  |
| `out_valid`             | out | one result set (registered, one clock per set)         |
| `out_sop`               | out | first result set of a symbol                           |
| `out_ifft`              | out | mode of the symbol being output                        |
| `out_re[4]`, `out_im[4]`| out | `X(bitrev7(4t+q))` on lane `q`                         |

* The first valid set after reset is set 0 of a symbol. After that, each
  symbol is 32 valid sets, and symbols follow back to back.
* `in_valid` may drop at any time. Nothing moves while it is low.
* Result set `t` of a symbol is registered on the valid clock that enters
  input set `t+40`. With `in_valid` held high, results start 41 clocks after a
  symbol's first set and then follow at one set per clock.
* Because 40 > 32, the last symbol leaves only after 40 more sets are entered,
  for example the next symbol or dummy data.
* The IFFT uses `x(n) = (1/N) conj(sum conj(X(k)) W^(nk))`: the processor
  conjugates the input, and the mode bit travels with the data to conjugate
  the output. The mode may change from one symbol to the next. The IFFT
  output is `128/16 = 8` times `x(n)`.

## Module hierarchy

    fft128_mr                top
      fft_ctrl               counter and all selects
      fft_lane x4            stages 1-5 of one path
        bu2, bu1             type-II / type-I butterflies (bu2 = bu1 + neg_j)
        delay_line           feedback buffers 16, 8, 4, 2, 1
        ccm1 -> smu_abc x2   stage-2 constant multiplier
        cbm -> tf4_rom, booth_enc x2, booth_ppg x4
      fft_tail               stages 6-7
        bu3 x4, ccm2, ccm3 -> smu_c x2
    fft_pkg                  constants, twiddle/select types, select table
    bf_addsub, rnd_sat       adder pair with scaling/saturation; rounding

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. They need no data files. To run the
end-to-end test:

    verilator --binary --timing -Irtl -y rtl rtl/fft_pkg.sv tb/tb_fft128_mr.sv \
              --top-module tb_fft128_mr -o sim && obj_dir/sim

`tb_fft128_mr` runs the top at its default parameters. It feeds eight
symbols and two flush symbols:

* random symbols back to back;
* random symbols with random input stalls;
* IFFT symbols, so the mode switches in both directions;
* full-scale DC symbols, which saturate.

Every result is compared with a floating-point DFT scaled by 1/16 and
clipped, to within 6 LSB (8 for the DC bin). The rms error must stay below
1.5 LSB. The test also checks the output
order, `out_sop`, `out_ifft`, the latency of 40 enabled cycles and the
41-clock input-to-output delay for back-to-back symbols. It fails if any
mechanism (stall, mode switch, saturation) never happened. It runs in well
under a second.

`tb_fft128_wordlen` runs the same random-symbol test with the word length
overridden to 8, 10 and 12 bits and prints the signal-to-quantization-noise
ratio of each.

The block tests are:

* `tb_bu1`, `tb_bu2`, `tb_bu3`: butterflies, both scaling modes, including
  full-scale operands.
* `tb_delay_line`: depth 16 and 1, with a random enable.
* `tb_smu_abc`, `tb_smu_c`: every 10-bit input against the exact
  10-bit-coefficient products.
* `tb_ccm1`, `tb_ccm2`, `tb_ccm3`, `tb_cbm`: against exact complex products.
* `tb_tf4_rom`, `tb_booth_ppg`: all 128 ROM words; all 11-bit coefficients.
* `tb_fft_ctrl`: every select against the position formulas.
* `tb_fft_lane`: stages 1-5 of all four paths against the decomposition
  above.
* `tb_fft_tail`: stages 6-7, including the hold behaviour with the enable
  low.

## Choices not taken from the published design

* **Handshake.** The published design gives none. Here `in_valid` acts as a
  clock enable for the whole pipeline, and `out_valid`/`out_sop` are
  registered. That adds one output register after stage 7, which the
  published block diagram does not have.
* **Word growth.** Halving in stages 1, 3, 5, 7 and saturation everywhere
  (see above). The published design fixes only the 10-bit internal word.
* **Rounding.** Constant multipliers work with 8 extra fractional bits. The
  Booth multiplier computes the full product and rounds it. The published
  fixed-width Booth multiplier with error-compensation bias is not
  reproduced; this costs area but not accuracy.
* **Negation.** Negating -512 saturates to 511.
* **Twiddle ROM.** 11 bits with 9 fractional bits, so that 1.0 is exact.
* **Buffers** are enabled shift registers, and only the control is reset.

## Limits

* The published clock rate, gate count and power come from a 0.18 um
  standard-cell implementation, and this RTL has not been checked against
  them. The published SQNR of about 24, 35 and 47 dB at 8, 10 and 12 bits is
  close to what `tb_fft128_wordlen` measures (see above), although the test
  signal used for the published figures is not known. The RTL matches the
  published resource counts: 124 complex buffer
  words, 48 complex adders in the butterflies, four general complex
  multipliers, four CCM1s, one CCM2 and one CCM3.
* The whole datapath between two pipeline registers is combinational, for
  example the CBM with its ROM. Whether it meets 250 MHz depends on the
  process and the synthesis.

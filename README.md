# 8-point forward DCT with approximated rotation angles

This is a pipelined, multiplier-free 8-point forward discrete cosine transform
(DCT) for 9-bit samples, the 1-D kernel of 8x8 image transforms.

The usual way to build a fixed-point DCT is to round the cosine coefficients to
a few signed digits. That breaks the orthogonality of the transform, so the
inverse no longer reconstructs the input exactly. This design instead keeps the
fast-DCT structure of Chen, Smith and Fralick, where everything beyond two
butterfly stages is a set of 2x2 plane rotations. It then approximates each
rotation *angle* by a short sequence of "mu-rotations". A mu-rotation is an
orthogonal 2x2 step whose coefficients are powers of two. Every step stays
orthogonal, so the whole transform stays orthogonal. The only arithmetic left
is shift-and-add with fixed wiring, plus one factorised scaling constant per
angle.

The architecture and all its shift amounts follow C. V. Schimpfle, P. Rieder
and J. A. Nossek, "A Power Efficient Implementation of the Discrete Cosine
Transform" (called "the publication" below). The last section lists where this
RTL departs from it.

One 8-sample vector enters per clock cycle. The eight coefficients leave together
14 cycles later.

## The transform computed

The outputs form the orthonormal DCT-II:

    X(k) = c(k)/2 * sum_{n=0..7} x(n) cos((2n+1) k pi / 16),   c(0) = 1/sqrt(2), c(k>0) = 1

This holds to within the angle and word quantisation. Over 10000 uniform
random vectors in [-256, 255], the peak error is 0.47 and the mean square error
is at most 0.012 per coefficient (0.006 overall). The mean error is at most
0.013 per coefficient. All of these are inside the limits of the IEEE 1180
accuracy test. `tb/tb_dct8_fdct.sv` measures them on every run.

The matrix that the hardware actually applies can be measured from impulse
responses. It is orthogonal to within 0.001 per entry of M^T M - I, and within
0.0004 of the exact DCT matrix. Its transpose therefore inverts it. Rebuilding
random vectors with the transpose of the measured matrix gives every sample
back to within 0.35. `tb/tb_dct8_orthogonal.sv` checks this.

## Data flow

```
x(0..7) -> input register (x * 2^5 in a 16-bit word)
        -> B8:  a(k) = x(k) + x(7-k),  a(7-k) = x(k) - x(7-k),   k = 0..3
even:   B4:  b0 = a0+a3, b1 = a1+a2, b2 = a1-a2, b3 = a0-a3
        rot_pi4  (ODD=0)  (b0, b1) -> X(0), X(4)
        rot_3pi8          (b2, b3) -> X(6), X(2)
odd:    rot_pi4  (ODD=1)  (a5, a6) -> c5, c6        a4, a7 wait 6 cycles
        butterfly SP=1:   d4 = a4/2 + c5, d5 = a4/2 - c5, d7 = a7/2 + c6, d6 = a7/2 - c6
        rot_3pi16         (d5, d6) -> X(5), X(3)
        rot_7pi16         (d4, d7) -> X(7), X(1)
        delay registers align all eight outputs
```

The factor 1/2 of the DCT normalisation is not applied at one place. It enters
as edge weights of 2^-1: in the two pi/4 rotations, in the first step of the
67.5 degree rotation, and on the a4/a7 inputs of the odd butterfly.

## The approximated rotations

This is the core of the design and the part that needs the closest reading.
Two kinds of step are used (`mu_rot_class1`, `mu_rot_class2`):

| step | matrix (before scaling) | angle |
|---|---|---|
| class I, index i | `[1, -2^-i; 2^-i, 1]` | atan(2^-i) |
| class II, index i | `[1-2^-(2i+1), -2^-i; 2^-i, 1-2^-(2i+1)]` | atan(2^-i / (1-2^-(2i+1))) |

Their norms are sqrt(1+2^-2i) and sqrt(1+2^-(4i+2)). A class II step costs two
more adders than a class I step. In exchange it is much closer to a pure
rotation, so a class II step with index i needs far less correction than a
class I step with the same index.

Each step module has four sign parameters (`DT ST SB DB`) for the four edges
and a pre-scale `PRE`. Some steps are reflections, with one diagonal negated.
A reflection supplies the 90-degree part of the 67.5 and 78.75 degree angles.
`PRE = 1` adds the 2^-1 normalisation to the same step.

| block | target | steps (in order) | result | scaling |
|---|---|---|---|---|
| `rot_pi4` | 45 | class I i=0, weights 2^-1 | 45 exactly | (1-2^-2)(1-2^-5)(1-2^-6)(1-2^-7)(1-2^-8) = 0.70685 ~ 1/sqrt 2 |
| `rot_3pi8` | 67.5 | reflection with class II i=1 (PRE=1), class I i=3 (-), class I i=9 (-) | 90 - 22.508 = 67.492 | (1-2^-6) |
| `rot_3pi16` | 33.75 | class II i=1 (+), class I i=3 (+), class II i=4 (-), class I i=7 (+) | 33.734 | (1-2^-6) |
| `rot_7pi16` | 78.75 | reflection with class II i=3, class I i=7 (+), class II i=4 (+) | 90 - 11.212 = 78.788 | none, residual 1-2^-14 |

Each scaling factor is a product of terms (1 - 2^-k). `scale_chain` applies
them one registered shift-and-subtract at a time. The product matches the
inverse norm of the step sequence to within 3e-4.

In each rotation block the exact orientation (which row gets +sin and which
gets -sin, and which output is which) is set by the sign parameters. The
header comment of each block gives the exact formulas. The testbench of each
block checks those formulas against floating point.

## Number format and rounding

- Input: 9-bit two's complement, -256..255.
- Datapath and output: 16-bit two's complement with 5 fraction bits.
  - The integer part is 11 bits: 9 for the sample and 2 guard bits for the
    transform's growth. The largest coefficient is 8*256/sqrt(8) = 724.
  - The 5 fraction bits absorb the rounding noise of the shift-and-add
    chain.
- A coefficient X(k) is `X_o[k] / 32.0`.
- Every weight 2^-k rounds to nearest, half up. It is an arithmetic shift that
  takes the most significant dropped bit as carry-in. With plain truncation
  the mean error grows to about 0.1 per coefficient, which is outside the
  IEEE 1180 mean-error limit. Rounding costs only the carry input of the adder
  that follows.
- Overflow cannot occur for inputs in range. Orthogonality bounds every
  intermediate pair by the input vector's length times the small growth of the
  unscaled steps. The widest intermediate values are the B4 outputs, which stay
  within +-1024.

## Pipeline and interface (`dct8_fdct`)

| port | width | meaning |
|---|---|---|
| `clk` | 1 | clock, all registers on the rising edge |
| `rst_n` | 1 | asynchronous active-low reset of the valid pipeline only |
| `in_valid` | 1 | `x_i` holds a vector this cycle |
| `x_i[0:7]` | 8 x 9 | samples x(0)..x(7) |
| `out_valid` | 1 | `X_o` holds a coefficient vector |
| `X_o[0:7]` | 8 x 16 | X(0)..X(7), 5 fraction bits |

Every node of the flow graph is a register: each butterfly, each mu-rotation
step and each scaling step. This gives short carry-ripple paths and few
glitches. The paths differ in depth after the input register:

| outputs | depth (cycles) |
|---|---|
| X(0), X(4) | 8 |
| X(2), X(6) | 6 |
| X(1), X(7) | 11 |
| X(3), X(5) | 13 |

`delay_line` registers pad the shorter paths. Total latency is `LAT_TOTAL = 14`
cycles from the edge that takes `in_valid` to the edge where `out_valid` is
seen. The throughput is one vector per cycle with no stalls. Gaps in `in_valid`
simply travel through the pipe. Data registers have no reset. A reset clears
the valid pipeline, so vectors in flight are dropped.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | widths and per-block pipeline depths |
| `rtl/mu_rot_class1.sv`, `rtl/mu_rot_class2.sv` | one registered mu-rotation step |
| `rtl/scale_chain.sv` | factorised scaling constant |
| `rtl/butterfly.sv` | registered sum/difference pair |
| `rtl/rot_pi4.sv`, `rtl/rot_3pi8.sv`, `rtl/rot_3pi16.sv`, `rtl/rot_7pi16.sv` | the four approximated angles |
| `rtl/delay_line.sv` | path-balancing registers |
| `rtl/dct8_fdct.sv` | the complete transform (top) |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_dct8_activity.sv` | switching activity of the top under 10000 random vectors |
| `tb/tb_dct8_orthogonal.sv` | measured transform matrix: orthogonality and reconstruction |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. It
also has a watchdog. The end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
  rtl/dct_pkg.sv tb/tb_dct8_fdct.sv --top-module tb_dct8_fdct -o sim
./obj_dir/sim
```

The end-to-end test runs the top at its default parameters. It sends:

- corner vectors: all-extreme and alternating-extreme vectors, and impulses;
- 10000 random vectors, mostly back to back, with random gaps;
- a reset in the middle of a burst.

It checks the latency of every vector and compares every coefficient with a
floating-point DCT. It prints the accuracy statistics and how often each
mechanism occurred: back-to-back vectors, gaps, reset flush and extreme
vectors. The block testbenches check the following:

- `mu_rot_class1`, `mu_rot_class2`, `scale_chain` and `butterfly` are checked
  bit-exactly against integer arithmetic.
- The four rotation blocks are checked against the exact rotation. The
  tolerance is 1e-3 of the vector length plus 8 LSB. They are also checked
  against the product of their step matrices, to within 6 LSB.

`tb_dct8_orthogonal` measures the transform matrix from positive and negative
impulses. It checks M^T M against the identity and M against the exact DCT.
It then rebuilds 2000 random vectors with the transpose of M.

`tb_dct8_activity` sends 10000 uniform random vectors back to back and checks
every coefficient. It prints the average number of switches per adder output
bit and input pattern.

## Changing the design

- A different approximation of an angle means editing the rotation block. The
  steps to change are the instance list, the sign parameters and the scaling
  shifts. Then update that block's `LAT_*` constant in `dct_pkg` and the delay
  of `a4`/`a7` if `rot_pi4` changes. The top checks at elaboration that its
  path depths add up to `LAT_TOTAL`.
- `W` and `F` are parameters throughout. A wider word lowers the quantisation
  error. It leaves the angle error unchanged.

## Where this RTL departs from, or goes beyond, the publication

- **Registers.** Every graph node is an edge-triggered flip-flop stage. The
  publication allows registers or latches.
- **Output alignment and handshake.** The publication builds the graph as a
  rectangular bit-slice layout and does not say how outputs of different
  depth are collected. The delay registers, `in_valid`/`out_valid` and the
  reset are this design's own.
- **Rounding.** The publication gives the word format (2 guard bits, 5 fraction
  bits) but not how a shifted-out bit is treated. Round-half-up was chosen
  because truncation misses the mean-error limit of the accuracy standard the
  publication claims to meet.
- **Signs of the flow graph.** Where the published graph leaves a sign implicit
  (an unlabelled straight edge), it was chosen so that the graph computes the
  DCT. Two spots in the 78.75 degree sub-graph read oddly:
  - One diagonal of its first step is printed as +2^-7. It is implemented as
    the diagonal of a reflection, -(1 - 2^-7).
  - Its inputs are labelled as if the x(0)-x(7) path entered on top. With the
    printed coefficients only the x(3)-x(4) path on top yields the DCT, and
    that is what is built.
- **67.5 degree angle.** The printed step coefficients give 67.492 degrees.
  The publication's table of angles lists 67.508. The coefficients were followed.
  The error is 0.008 degrees either way.
- **Pipeline depths.** The publication quotes 8, 7, 7 and 15 computational steps for
  its four pairs of rows. Here they are 8, 6, 11 and 13, one register per
  node; the 11 counts the wait of the x(3)-x(4) and x(0)-x(7) rows alongside
  the pi/4 stage.
- **Adder count.** The publication quotes 64 shift-and-add operations. This RTL
  has exactly 64 registered step outputs of 16 bits, each one shift-and-add
  operation:
  - 8 in B8, 4 in B4, 4 in the odd butterfly;
  - 2 x 12 in the pi/4 rotations;
  - 8, 10 and 6 in the other three rotations.

  An output of a class II step adds three operands, so it takes two 16-bit
  adders. That gives 74 two-operand adders, or 1184 full-adder bits, against
  the publication's 1064 full adders. The publication does not say how it
  counts full adders (1064 is not a multiple of 16). The rounding carries are
  not counted.
- **Switching activity.** The publication reports 0.516 switches per adder
  output and per input pattern change. It got that figure from a gate-level
  simulation of 10000 random patterns. `tb/tb_dct8_activity.sv` runs the same
  workload on this RTL. It counts changes of the 1024 registered adder-output
  bits and measures 0.458. Register outputs do not see the glitches inside the
  carry chains, which a gate-level count includes. The power figures in mW
  depend on a cell library and are not reproduced.
- **Not in this RTL.** The word-interleaved bit-slice placement, the layout
  generators and the physical layout have no logic of their own.

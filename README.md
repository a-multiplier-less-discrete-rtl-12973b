# Approximate majority-logic adders in a multiplier-less 8-point DCT

Image and audio compression tolerate small arithmetic errors, and a discrete
cosine transform (DCT) spends almost all of its hardware on additions. This
design trades accuracy for hardware in the smallest place possible: the
one-bit full adder. It uses an approximate full adder built from a single
three-input majority gate and no inverter. That adder fills the low bits of
every adder/subtractor in a pipelined, multiplier-less 8-point DCT made of 24
adder/subtractors.

The RTL describes the logic only. The adder cells were first conceived as
transistor-level circuits in a carbon-nanotube FET process. That electrical
side is outside what RTL can express.

## The approximate full adder

A majority gate `M(a,b,c)` outputs 1 when at least two inputs are 1. That is
exactly the carry of a full adder. The approximate cell (`ml_afa`) keeps that
carry and drops the sum logic altogether:

    Cout = M(A, B, Cin)        Sum = A

| A B Cin | exact Cout Sum | approximate Cout Sum |
|---------|----------------|----------------------|
| 000     | 0 0            | 0 0                  |
| 001     | 0 1            | 0 0                  |
| 010     | 0 1            | 0 0                  |
| 011     | 1 0            | 1 0                  |
| 100     | 0 1            | 0 1                  |
| 101     | 1 0            | 1 1                  |
| 110     | 1 0            | 1 1                  |
| 111     | 1 1            | 1 1                  |

Four of the eight rows are wrong, each by one unit. The error rate is therefore
0.5, and the mean error distance normalised to the largest output (3) is
1/6 ≈ 0.166. The exact majority-logic full adder (`ml_exact_fa`) needs three
majority gates and two inverters:
`Cout = M(A,B,Cin)`, `Sum = M(~Cout, Cin, M(A,B,~Cin))`.

The key property is that **the carry stays exact**. In a ripple chain of these
cells, every carry is the true carry of the low-order bits. So the error stays
inside the approximate bit positions and never spreads upward.

## Adder/subtractor word (`ml_addsub`)

Each of the 24 arithmetic units is fixed at elaboration time (`SUB`) as
either `a + b` or `a - b`. It is a `W`-bit ripple chain:

| bit positions       | cell                                                   |
|---------------------|--------------------------------------------------------|
| 0                   | half adder, or half subtractor when `SUB = 1`          |
| 1 .. `APPROX_BITS`  | approximate full adder `ml_afa`                        |
| above               | exact majority-logic full adder `ml_exact_fa`          |

Subtraction computes `a + ~b + 1`. The `+1` is absorbed by the half
subtractor in bit 0: its "no borrow" output is the carry into bit 1.

Because the carries are exact, the result has a closed form. It is the exact
sum or difference (mod 2^W) with bits `1..APPROX_BITS` replaced by the same
bits of `a`. It follows that:

* the error is below `2^(APPROX_BITS+1)` in magnitude (at most 14 for the
  default of 3);
* the bits above the approximate field are exact, so the result never wraps
  unless the exact result does;
* output bits `1..APPROX_BITS` are plain wires from `a`, and synthesis
  reports them as such.

A word built only from approximate cells would just return `a`, which is
useless. That is why the approximate cells sit only in the low bits.
`APPROX_BITS = 0` gives an exact unit.

## The transform: signed DCT in 24 additions (`ml_dct8`)

The DCT-II coefficient `k` of eight samples is
`X_k = sum_n cos((2n+1)k*pi/16) x_n`. The multiplier-less transform built
here keeps only the **sign** of each cosine. Every coefficient is then ±1,
so the transform needs no multiplier. Its fast form takes exactly 24
adder/subtractors in three stages of eight:

    stage 1 (butterflies)  a_n = x_n + x_(7-n)      d_n = x_n - x_(7-n)     n = 0..3
    stage 2 (even)         b0 = a0 + a3   b1 = a1 + a2   b2 = a0 - a3   b3 = a1 - a2
            (odd)          s  = d0 + d1   p  = d0 - d1   q  = d2 + d3   r  = d2 - d3
    stage 3                y0 = b0 + b1   y4 = b0 - b1   y2 = b2 + b3   y6 = b2 - b3
                           y1 = s + q     y5 = p + q     y3 = p - q     y7 = p + r

Expanded, this gives the sign rows of the DCT matrix:

    y0 = a0+a1+a2+a3    y2 = a0+a1-a2-a3    y4 = a0-a1-a2+a3    y6 = a0-a1+a2-a3
    y1 = d0+d1+d2+d3    y3 = d0-d1-d2-d3    y5 = d0-d1+d2+d3    y7 = d0-d1+d2-d3

The odd rows are the least obvious part. They share `p = d0 - d1` three
times, and that sharing brings the odd half down to eight units.

Each stage widens the words by one bit: 8-bit inputs, then 9, 10 and 11 bits.
Nothing can overflow: `|y0| <= 8 * 128 = 1024` fits 11 signed bits. No
output scaling is applied. The signed DCT approximates the true DCT only up
to a per-row scale factor, and applying that factor is left to the next
stage of the system (for example, folded into quantisation).

### Error at the outputs

Every one of the 24 units has approximate low bits, so errors add up along
the three stages. Stage 1 adds at most 14. A stage-2 value carries its own 14
plus the errors of two stage-1 operands. A coefficient therefore carries at
most `14 + 2*(14 + 2*14) = 98` (at the default `APPROX_BITS = 3`). With
uniform random 8-bit inputs, about 97 % of the coefficients differ from the
exact signed DCT, and the largest error seen is around 62. That is small
next to the 11-bit output range (±1024). Set `APPROX_BITS = 0` for an exact
signed DCT.

## Interface and timing

| port          | dir | width                   | meaning                                 |
|---------------|-----|-------------------------|-----------------------------------------|
| `clk_i`       | in  | 1                       | clock                                   |
| `rst_ni`      | in  | 1                       | asynchronous reset, active low          |
| `in_valid_i`  | in  | 1                       | `x_i` carries a vector this cycle       |
| `x_i[0:7]`    | in  | `DATA_W` signed each    | samples x0..x7                          |
| `out_valid_o` | out | 1                       | `y_o` carries a result                  |
| `y_o[0:7]`    | out | `DATA_W+3` signed each  | coefficients y0..y7 in natural order    |

Each adder stage is followed by a register. A vector accepted at a rising
edge appears on `y_o` after the third edge: latency 3, one vector per
cycle. The data registers load only when their stage holds a valid vector.
There is no back-pressure. Reset clears every register. Two assertions
state the timing rule: every accepted vector comes out exactly three cycles
later, and nothing else comes out.

Parameters of `ml_dct8`:

| parameter     | default | meaning                                               |
|---------------|---------|-------------------------------------------------------|
| `DATA_W`      | 8       | input sample width (two's complement)                 |
| `APPROX_BITS` | 3       | approximate full-adder positions per adder (bits 1..K) |

After generic synthesis, the default configuration has 243 flip-flops (three
register stages plus three valid bits) and about 2,600 gate-level cells.

## What is fixed and what is chosen

Taken from the design this RTL documents:

* the approximate full adder's function (Cout = majority, Sum = A; one
  majority gate, no inverter);
* the exact majority-logic adder's gate count;
* an 8-input, multiplier-less, pipelined DCT with 24 adder/subtractors;
* half adders, half subtractors and flip-flops as the DCT's other building
  blocks.

Chosen here, where the source of the design gives no detail:

* **The transform.** The DCT structure came from elsewhere and is not
  specified beyond "24 adder/subtractors, multiplier-less". The signed DCT
  was chosen because its fast form needs exactly 24 adder/subtractors and
  nothing else.
* **The left-shift circuit.** A 1-bit left-shift circuit is also listed
  among the DCT's parts, without its place. The signed DCT needs no shift,
  so there is none in this RTL.
* **Word-parallel datapath.** Three register stages, 8-bit signed inputs and
  width growth of one bit per stage.
* **Approximate bit positions.** The approximate cell sits in bits
  `1..APPROX_BITS` of each adder, default 3. The half adder or subtractor is
  in bit 0 and exact cells are above.
* **Control.** The valid bit, the reset style and the absence of
  back-pressure.

The transistor-level side is not represented: the CNTFET process,
gate-diffusion-input cells and dynamic-threshold swing restoration. Neither
is any power or delay figure. The RTL models the logic functions those
circuits implement.

## Files

| file                        | contents                                              |
|-----------------------------|-------------------------------------------------------|
| `rtl/maj3.sv`               | three-input majority gate                             |
| `rtl/ml_afa.sv`             | approximate full adder (1 majority gate)              |
| `rtl/ml_exact_fa.sv`        | exact majority-logic full adder (3 majority gates)    |
| `rtl/ml_addsub.sv`          | W-bit approximate adder or subtractor                 |
| `rtl/ml_dct_pkg.sv`         | shared constants (points, latency, stage widths)      |
| `rtl/ml_dct8.sv`            | the pipelined 8-point DCT (top)                       |
| `tb/maj3_tb.sv`             | all 8 input combinations                              |
| `tb/ml_afa_tb.sv`           | truth table, error rate and NMED                      |
| `tb/ml_addsub_tb.sv`        | exhaustive 9-bit and random 12-bit add/sub, K = 0, 3, 5 |
| `tb/ml_dct8_tb.sv`          | end-to-end test at default parameters                 |
| `tb/ml_dct8_exact_tb.sv`    | exact configuration against the signed-DCT formula    |

`ml_dct8_tb` streams 3,000 cycles of random vectors, with idle cycles,
extreme vectors and a reset in mid-stream. It checks every coefficient bit
for bit against an arithmetic model of the datapath. It also checks the error
against the exact signed DCT (computed with `$cos`) and the latency of every
vector. It counts each situation and fails if one never happened.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end. With
Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -y rtl -y tb rtl/ml_dct_pkg.sv tb/ml_dct8_tb.sv --top-module ml_dct8_tb
    ./obj_dir/Vml_dct8_tb

Replace `ml_dct8_tb` with any other testbench name. The testbenches use only
`$urandom`; no data files are needed. To try another trade-off, change
`APPROX_BITS` and set the matching local parameter `K` in `ml_dct8_tb`; its
reference model and error bound are computed from `K`.

# MCAS/BS stream generation for lower random error in combinational stochastic circuits

In stochastic computing a number p in [0, 1] travels as a bit stream of
length n in which n·p bits are 1; an AND gate then multiplies, a multiplexer
adds with scaling, and so on. The result is read back by counting ones, and
because the input streams are random the count fluctuates: this *random
error* usually dominates every other error source. The conventional
generator makes each input a Bernoulli-like sequence (BS): an LFSR and a
comparator.

This design generates some inputs instead as a **maximal concentrated
autocorrelation sequence (MCAS)**: all n·p ones first, then all zeros. An
MCAS generator is just a comparator against an up counter, and one counter
can be shared by every MCAS generator in the system. Chosen correctly, the
MCAS inputs leave the expected value of the circuit's output unchanged and
make its variance no larger, often much smaller, than with all-BS inputs.
This works for any combinational stochastic circuit and any stream length.

The RTL provides the two generators, the four benchmark circuits used to
evaluate the scheme (AND multiplier, XOR gate, and two Bernstein-polynomial
circuits), and a top level that runs all four with the scheme's choice of
MCAS and BS inputs and counts the ones of each output stream.

## Which inputs may be MCAS

This is the part that needs care. An MCAS is strongly correlated with itself
(its ones are bunched together), and two MCAS inputs are strongly correlated
with each other: an AND of two MCAS streams of values a and b gives min(a, b),
not a·b. The rule for choosing them comes from writing the circuit's
Boolean function as an integer polynomial in the input bits:

    Z(i) = sum over terms of  A · X_1(i)^l1 · X_2(i)^l2 · ... · X_k(i)^lk,  l_r in {0,1}

For example, OR(AND(X1, X2), X3) = X1·X2 + X3 − X1·X2·X3. Each non-zero
product term has a set of *factors* (the inputs whose exponent is 1). An
input X_r is a *positive input stream* if the sum of all terms that contain
X_r, divided by X_r, is ≥ 0 for every value of the other input bits (in the
example all three inputs are positive; in XOR = X1 + X2 − 2·X1·X2 neither
is).

The selection then runs as follows:

* If the circuit has positive inputs, choose the MCAS set among the
  positive inputs only, such that **no product term has more than one MCAS
  factor**, and among such sets take the one that puts an MCAS factor into
  the most product terms.
* If it has none, make **exactly one input** an MCAS, again the one that
  appears in the most product terms.
* Every other input is a BS.

Either choice keeps the output's expected value equal to the all-BS case
(each product term has at most one MCAS factor, and an MCAS has the right
mean over the stream). The second-order terms can only shrink, so the
output variance does not exceed that of the all-BS case. Applied to the
benchmarks:

| circuit | function | MCAS inputs | BS inputs |
|---|---|---|---|
| AND | x1·x2 | X1 | X2 |
| XOR | x1 + x2 − 2·x1·x2 | X1 | X2 |
| Bernstein, degree k | Σ b_i·C(k,i)·x^i·(1−x)^(k−i) | the k+1 coefficient streams | the k x streams |

In the Bernstein circuit the coefficient streams are all positive and no
product term contains two of them (only one coefficient is selected each
clock), so all of them can be MCAS at once.

The selection is done when the circuit is designed, not in hardware. In this
RTL it appears as a state-vector parameter per circuit (one bit per input,
1 = BS) that the generator bank `sc_sng_bank` reads when it is built.

## The generators

A stream of n = 2^L bits carries the integer `nex` = n·E_X, 0..n (L+1 bits
wide, so that E_X = 1 can be expressed).

* **MCAS generator** (`sc_mcas_gen`): `x = nex > count`, where `count` comes
  from the shared up counter (`sc_upcounter`) and runs 0..n−1. Bit i of the
  stream is therefore 1 exactly for i ≤ n·E_X. The generator has no state of
  its own.
* **BS generator** (`sc_bs_gen`): `x = nex > r`, where r is the upper L bits
  of the generator's own LFSR (`sc_lfsr`). All LFSRs use the same polynomial
  and differ only in their seed.

The LFSR is **2M bits wide by default** (24 bits for the 12-bit counter).
The cost argument for the scheme assumes an M-bit LFSR. With an M-bit LFSR,
though, a 2^M-bit stream covers the LFSR's full period, so every BS carries
an exact number of ones and no longer behaves like a Bernoulli sequence. The
all-BS reference then shows errors unlike the published 1/√n-like curves. A
2M-bit LFSR makes the stream length the square root of the LFSR period, and
the BS error then follows the expected Bernoulli behaviour. Set `LW = M` for
the narrow version.

Seeds come from `sc_pkg::lfsr_seed`, an integer hash of the generator's
index. Do not replace it with something like `idx * constant`. Doubling a
seed shifts it left by one bit, which is the next state of this
left-shifting LFSR, and two generators would then produce the same stream
one bit apart. In simulation that made an all-BS AND gate about seven times
less accurate at n = 4096.

## Benchmark circuits

* `sc_and`: z = x1 & x2, i.e. multiplication.
* `sc_xor`: z = x1 ^ x2, i.e. x1 + x2 − 2·x1·x2.
* `sc_mux`: N-input multiplexer. With N = 2 and a select stream S it is the
  scaled adder s·x1 + (1−s)·x2 (d[1] = X1, d[0] = X2).
* `sc_bernstein #(K)`: 2K+1 input streams. A population count of the K
  x-stream bits selects one of the K+1 coefficient streams through `sc_mux`.
  With i ones among K independent streams of value x occurring with
  probability C(K,i)·x^i·(1−x)^(K−i), the output stream has the value of
  the Bernstein polynomial. The top builds two of them: B1 is degree 6 with
  the gamma-correction coefficients (0.0955, 0.7207, 0.3476, 0.9988, 0.7017,
  0.9695, 0.9939), and B2 is degree 3 with the coefficients (0.25, 0.625,
  0.375, 0.75). The coefficients are inputs, not constants.

## Top level: `sc_benchmark_top`

One shared up counter, four generator banks (AND: 1 MCAS + 1 BS, XOR: 1 + 1,
B1: 7 + 6, B2: 4 + 3), the four circuits, and a ones counter
(`sc_stream_counter`) on each output.

| port | width | meaning |
|---|---|---|
| `start` | 1 | begin a stream; ignored while `busy` |
| `len_log2` | 4 | stream length n = 2^len_log2, up to 2^M (larger values act as M) |
| `and_nex[2]`, `xor_nex[2]` | M+1 each | n·E_X of the gate inputs |
| `b1_coef_nex[7]`, `b1_x_nex` | M+1 each | n·b_i and n·x for B1 (x drives all six x generators) |
| `b2_coef_nex[4]`, `b2_x_nex` | M+1 each | the same for B2 |
| `busy` | 1 | a stream is running |
| `done` | 1 | one-clock pulse: results valid |
| `and_ones` … `b2_ones` | M+1 each | ones in each output stream; the value is ones / n |

Timing: at the clock edge where `start` is seen, the inputs and length are
captured and the counter and ones counters are cleared. The next n clocks
produce one bit of every stream, and `done` is high n + 1 clocks after the
start edge. Results stay until the next start. The MCAS counter restarts with
every stream. The LFSRs are seeded by reset and then run freely, so
successive streams of the same value see different random bits. Parameters:
`M` (12), `LW` (2M), and the state vectors `V_AND`, `V_XOR`, `V_B1`, `V_B2`.
Set a state vector to all ones for the conventional all-BS generation.

Assertions in the top check that `done` is a one-clock pulse, that it never
overlaps `busy`, and that a stream ends exactly when the counter reaches
n − 1.

## Measured random error

`tb_sc_random_error` builds two tops at the default size: one with the
scheme's state vectors and one with all-BS inputs. Both run the same 5000
pseudo-random sample points at every length from 32 to 4096. The numbers are
the mean |result − exact value|, with the exact value computed in floating
point from the same quantised inputs, so quantisation error is excluded:

| n | AND all-BS | AND scheme | XOR all-BS | XOR scheme | B1 all-BS | B1 scheme | B2 all-BS | B2 scheme |
|---|---|---|---|---|---|---|---|---|
| 32 | 0.0625 | 0.0481 | 0.0804 | 0.0714 | 0.0606 | 0.0482 | 0.0854 | 0.0450 |
| 128 | 0.0327 | 0.0254 | 0.0413 | 0.0386 | 0.0314 | 0.0255 | 0.0413 | 0.0237 |
| 512 | 0.0165 | 0.0127 | 0.0209 | 0.0197 | 0.0164 | 0.0132 | 0.0204 | 0.0122 |
| 1024 | 0.0120 | 0.0094 | 0.0148 | 0.0142 | 0.0112 | 0.0094 | 0.0144 | 0.0087 |
| 4096 | 0.0058 | 0.0046 | 0.0074 | 0.0070 | 0.0058 | 0.0046 | 0.0072 | 0.0043 |

The scheme is better at every length for every circuit. The gain is largest
for the Bernstein circuits and smallest for XOR, where only one of the two
inputs may be an MCAS. The magnitudes are close to the published ones (for
example about 0.0045 for an all-BS AND at n = 4096, and 0.0033 with the
scheme). The published comparison also covers other stream types: fixed-ones
random-permutation sequences and deterministic streams. These are not
reproduced here: neither is generated by this hardware.

## Where this RTL goes beyond or departs from the source description

* **LFSR width** 2M instead of M by default (see *The generators*). The
  source gives both an n-bit LFSR for 2^n-bit streams and a statement that
  ties the LFSR size to the square root of the stream length. 2M is the
  reading that reproduces its error curves.
* **BS comparator input**: the upper bits of the LFSR. The source does not
  say which bits feed the comparator.
* **B2 state vector**: X1..X4 MCAS, X5..X7 BS. A degree-3 Bernstein circuit
  has 7 inputs. One listing in the source names nine (X1..X5 MCAS, X6..X9
  BS), which does not fit that circuit, so the general rule (coefficients
  MCAS, x streams BS) was followed.
* **Run-time stream length** (`len_log2`), **start/busy/done sequencing**,
  input capture, free-running LFSRs, asynchronous active-low reset, and
  `nex` one bit wider than the counter: all are this design's choices. The
  source defines the generators and circuits, not their control.
* The conversion of the output stream to a number is a plain ones counter.
  The division by n is left to whoever reads `*_ones`.
* The floating-point reference and the averaging of the error are not
  hardware. The testbenches do them.

## Files

| file | content |
|---|---|
| `rtl/sc_pkg.sv` | sequence-type enum, LFSR tap table (2..24 bits), seed hash |
| `rtl/sc_upcounter.sv` | shared MCAS counter, stream-length decode |
| `rtl/sc_lfsr.sv` | maximal-length Fibonacci LFSR |
| `rtl/sc_mcas_gen.sv`, `rtl/sc_bs_gen.sv` | the two generators |
| `rtl/sc_sng_bank.sv` | K generators chosen by a state-vector parameter |
| `rtl/sc_and.sv`, `rtl/sc_xor.sv`, `rtl/sc_mux.sv`, `rtl/sc_bernstein.sv` | circuits |
| `rtl/sc_stream_counter.sv` | ones counter |
| `rtl/sc_benchmark_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_sc_benchmark_top.sv` | end-to-end test at the default size, bit-exact against a model |
| `tb/tb_sc_random_error.sv` | the random-error comparison above |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/sc_pkg.sv tb/tb_sc_benchmark_top.sv --top tb_sc_benchmark_top -o sim
    ./obj_dir/sim

Substitute any other testbench name. `tb_sc_benchmark_top` takes well under
a second. `tb_sc_random_error` simulates about 41 million clock cycles and
takes about a minute; lower `SAMPLES` in it for a quicker run. The testbenches rely
on reset and not on initial values, so they also pass with
`+verilator+rand+reset+2`.

To use the generators in another circuit, instantiate one `sc_upcounter`
and one `sc_sng_bank` per circuit, with the state vector chosen by the rule
above. Share the counter's `count` and drive every bank's `en` with the
counter's enable.

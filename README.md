# Linear-phase FIR filter with folded coefficients

A linear-phase FIR filter has a symmetric impulse response, h(n) = h(N-1-n).
Every output therefore multiplies two different input samples by the same
coefficient. The filter in this repository uses that fact. It adds each such
pair of samples first and multiplies the sum once, so an N-tap filter needs
only ceil(N/2) multipliers and coefficient registers instead of N:

```
y(n) = sum_{k < N/2} b_k * ( x(n-k) + x(n-(N-1-k)) )    [+ b_mid * x(n-(N-1)/2)  if N is odd]
```

The default build is a 7-tap filter with 8-bit signed samples and 8-bit
signed coefficients. It has 4 multipliers, 3 of them behind a pre-adder.
The same RTL builds any length (the 8-tap even-length form is tested) and,
through one parameter, the antisymmetric types h(n) = -h(N-1-n).

## Structure

The filter is made of four units:

```
             +-----------------+   taps[0..N-1]  +---------------------+  prods[0..M-1]  +------------+   +-----+
 in_data --->| register unit   |---------------->| inner product unit  |---------------->| adder unit |-->| reg |--> out_data
 in_valid -->| fir_register_   |                 | fir_ipu:            |                 | fir_adder_ |   +-----+
             | unit            |                 | M x fir_ipc         |                 | unit       |
             +-----------------+                 +---------------------+                 +------------+
                                                           ^ coefs[0..M-1]
 coef_we/addr/data --->  coefficient storage unit (fir_coef_store)
```

| Module | Role |
|---|---|
| `fir_pkg` | Default sizes; functions for the number of coefficients M = ceil(N/2) and the word widths |
| `fir_register_unit` | Delay line. `taps[0]` is the incoming sample and `taps[k]` = x(n-k). It holds N-1 words and shifts only when `in_valid` is high |
| `fir_coef_store` | Register file of the M distinct coefficients b_0..b_{M-1}. It has one write port and all entries are read in parallel |
| `fir_ipc` | Inner product cell: `(x_a + x_b) * coef`. It computes `(x_a - x_b) * coef` when antisymmetric, and `x_a * coef` as a centre cell |
| `fir_ipu` | Inner product unit: M cells. Cell k pairs `taps[k]` with `taps[N-1-k]` |
| `fir_adder_unit` | Sums the M products |
| `fir_linear_phase` | Top level: wires the four units together and registers the output |

### Pairing the taps

The delay line and the coefficient store are indexed so that the
folding is plain wiring:

| N | Cells | Pairs (tap indices) | Centre cell |
|---|---|---|---|
| 7 (default) | 4 | (0,6) (1,5) (2,4) | tap 3 with b_3 |
| 8 | 4 | (0,7) (1,6) (2,5) (3,4) | none |

Coefficient address k holds b_k = h(k) = h(N-1-k). To load a 7-tap filter
with h = {h0, h1, h2, h3, h2, h1, h0}, write h0..h3 to addresses 0..3.

With `ANTISYM = 1` each pre-adder subtracts, so b_k = h(k) = -h(N-1-k). For
odd N the centre product is forced to zero, because an antisymmetric
response always has h((N-1)/2) = 0.

## Interface and timing of `fir_linear_phase`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all state changes on the rising edge |
| `rst_n` | in | 1 | synchronous, active low. Clears the sample history, the coefficients and the output |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, $clog2(M), COEF_W | write coefficient b_addr. Addresses at or above M are ignored |
| `in_valid`, `in_data` | in | 1, DATA_W | one signed sample per cycle in which `in_valid` is high |
| `out_valid`, `out_data` | out | 1, OUT_W | y(n) for the sample accepted at the previous edge |

- **Throughput:** one sample per clock.
- **Latency:** one cycle. The sample on `in_data` at a rising edge is
  already part of the sum, and `out_data` shows the result right after that
  edge, with `out_valid` high for one cycle.
- **Idle cycles:** while `in_valid` is low, the delay line and `out_data` hold.
- **Coefficient writes:** a write takes effect from the next cycle. It can
  be made while samples are streaming. An output computed on the same edge
  as the write still uses the old value.
- **Formats:** samples and coefficients are two's complement, and their
  binary point is up to the user. The output keeps full precision:
  OUT_W = DATA_W + 1 + COEF_W + $clog2(M) bits, which is 19 for the default.
  Nothing is rounded or saturated, and the output cannot overflow.

Parameters: `TAPS` (7), `DATA_W` (8), `COEF_W` (8), `ANTISYM` (0).

The path from the input through the multipliers to the output register
is purely combinational. There is no pipelining inside the IPU or the adder
unit. For long filters or fast clocks, a register after the pre-adders or
after the products is the natural place to cut.

## How far it follows its source, and where it departs

Taken from the source design:
- the four units of the block diagram and the IPU built from inner product
  cells;
- the folding rule h(n) = h(N-1-n) and the 7-tap odd and 8-tap even examples;
- the 8-bit word length, which the design's cost comparison is counted in.

Choices made here, where the source gives no detail:
- signed two's-complement numbers;
- the valid-qualified input and output;
- the write port of the coefficient store;
- the synchronous reset to zero;
- the one-cycle latency and full-precision output;
- the antisymmetric option.

The source names four linear-phase types but develops only the symmetric one.

The source also costs two "proposed structures" with 3 and with 1
multiplier. Their organisation is not described, and neither count matches a
folded 7- or 8-tap filter, which needs 4. The single-multiplier structure is
therefore not provided. The filter here is the fully parallel folded form.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_fir_register_unit` | Taps against a software shift register, with random idle cycles and reset |
| `tb_fir_coef_store` | Random writes, out-of-range writes ignored (5-tap instance), hold, reset |
| `tb_fir_ipc` | Symmetric, antisymmetric and centre cells against integer arithmetic, including all extreme operands |
| `tb_fir_ipu` | 7- and 8-tap IPUs, symmetric and antisymmetric, against the pairing rule |
| `tb_fir_adder_unit` | Sums including the extremes of the product range |
| `tb_fir_linear_phase` | Default filter end to end (details below) |
| `tb_fir_lengths` | Other lengths and types (details below) |

`tb_fir_linear_phase` runs the default 7-tap filter, with no parameter
overrides, against a direct-form convolution over all 7 taps. It covers:
- coefficient loading, and reloading while samples stream;
- idle cycles;
- a symmetric impulse response;
- the 5-tap example h = {1/4, 1/2, 3/4, 1/2, 1/4} in Q1.7, loaded with b_0 = 0;
- the largest-magnitude operands;
- a reset in the middle of the stream.

It counts each of these and fails if one never happened.

`tb_fir_lengths` runs these cases, using the helper `fir_lp_harness`:
- the 8-tap even-length filter;
- 7- and 8-tap antisymmetric filters;
- 15- and 16-tap filters;
- the 5-tap example at `TAPS=5`, through its impulse and step responses.

To simulate with Verilator (5.x), pass the package first:

```
verilator --binary --timing --assert -Wno-fatal rtl/fir_pkg.sv rtl/*.sv \
    tb/tb_fir_linear_phase.sv --top-module tb_fir_linear_phase
./obj_dir/Vtb_fir_linear_phase
```

For `tb_fir_lengths`, also add `tb/fir_lp_harness.sv`. Every
testbench runs in well under a second.

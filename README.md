# Block FIR filter from inner product units and parallel accumulation

This is an N-tap FIR filter,

    y(n) = sum_{t=0}^{N-1} h(t) * x(n - t),

that takes a **block of L input samples per clock** and returns a block of L
output samples per clock. It does not use one long multiply-accumulate chain.
The N taps are cut into M groups of L consecutive taps. Each group is handled
by its own **inner product unit (IPU)**. A **pipelined adder unit (PAU)** then
adds the M group results together, in parallel across the L lanes of a block.
The default size is N = 32 taps, M = 4 IPUs and L = N/M = 8 samples per block,
with 32-bit samples, 4-bit coefficients and 32-bit outputs.

```
            +------------- coefficient storage unit (CSU), N registers -------------+
            |   h(0..7)            h(8..15)                        h(24..31)        |
            +------+-------------------+-------------------------------+-----------+
                   | L coefficients    | L                             | L
 x (L samples)     v                   v                               v
 ---> RU ==+==> IPU 0             ==> IPU 1          ...          ==> IPU M-1
           |       | L results    |      | L                      |      | L
           +=======|==============+======|========================+      |
      window of    v                     v                               v
      2L-1 samples +------------- pipelined adder unit (PAU) ------------+---> y (L samples)
```

## How a block is computed

Number the input blocks k = 0, 1, 2, .... Block k is `x[j] = x(kL + j)` for
j = 0..L-1, with j = 0 the oldest sample. Write each tap index as
t = mL + i, where m is the group (0..M-1) and i is the position inside the
group (0..L-1). Output j of block k is then

    y(kL + j) = sum_m  sum_i  h(mL + i) * x((k - m)L + j - i).

The inner sum uses the same samples for every group, shifted by m whole blocks.
Define it as

    r_m(k)[j] = sum_{i=0}^{L-1} h(mL + i) * x(kL + j - i),

the inner product of group m's coefficients with block k. Then

    y_k[j] = r_0(k)[j] + r_1(k-1)[j] + ... + r_{M-1}(k-M+1)[j].

Two facts follow, and the design is built on them.

1. **All IPUs read the same samples.** `r_m(k)` needs only the samples
   x(kL - (L-1)) .. x(kL + L-1), i.e. the current block and the last L-1
   samples of the previous block. The register unit presents this 2L-1 sample
   window once, and every IPU reads it.
2. **Time alignment is done after the multipliers, in whole blocks.** IPU m's
   result for block k is needed m blocks later. The PAU is a chain of M
   registered adder stages, clocked once per block:

       s[M-1] <= r[M-1]
       s[m]   <= r[m] + s[m+1]      for m = M-2 .. 0
       y       = s[0]

   Each stage adds one IPU's current result to the partial sum the next stage
   made one block earlier. After block k, s[0] holds exactly the sum above.
   This is a transposed-form FIR in which each delay holds a whole block of L
   partial sums rather than one sample. The L lanes are independent and are
   accumulated side by side.

## Units

| Unit | Module | What it holds or does |
|------|--------|-----------------------|
| Coefficient storage unit (CSU) | `fir_csu` | N coefficient registers, loaded serially |
| Register unit (RU) | `fir_ru` | current block and L-1 samples of the previous one; outputs the 2L-1 sample window |
| Inner product cell (IPC) | `fir_ipc` | one signed product, sample x coefficient, at full precision |
| Inner product unit (IPU) | `fir_ipu` | L x L IPCs and L adders: `r[j] = sum_i c[i] * win[j-i+L-1]`; combinational |
| Pipelined adder unit (PAU) | `fir_pau` | M stages of L registered adders, as above |
| Top | `fir_top` | wires CSU, RU, M IPUs and PAU |
| Package | `fir_pkg` | default sizes |

The window layout is `win[e] = x(kL - (L-1) + e)`, for e = 0..2L-2. IPU m
receives coefficients `c[i] = h(mL + i)`.

## Interface and timing (`fir_top`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low **synchronous** reset |
| `h_load`, `h` | in | 1, H_W | serial coefficient load |
| `x_valid`, `x` | in | 1, L x X_W | input block, `x[j] = x(kL+j)` |
| `y_valid`, `y` | out | 1, L x Y_W | output block, `y[j] = y(kL+j)` |

- **Coefficients.** Each clock with `h_load` high shifts `h` into the
  store. Load h(0) first and h(N-1) last: N clocks in all. Reset clears every
  coefficient to zero, so the coefficients must be loaded after each reset.
- **Blocks.** A block is taken on each clock edge where `x_valid` is high. Its
  output appears one clock edge later: `y_valid` is high for the one cycle
  after that edge. At full rate the filter takes one block per clock, which is
  L samples per clock. `x_valid` may stay low for any number of cycles. The RU
  and the PAU then hold, and the filter carries on with the next block as if
  there had been no gap.
- **Reset** also clears the sample history and the partial sums. The first
  outputs after reset therefore treat earlier samples as zero.
- **Reloading coefficients while blocks are in flight** is allowed. Partial
  sums made with the old coefficients are still in the PAU, though. The next
  M-1 output blocks mix the old and new sets. Flush the filter (reset, or
  feed blocks of zeros) if that matters.

## Arithmetic

Samples and coefficients are signed two's complement. Each product is exact
(X_W + H_W bits). All sums are kept to Y_W bits, so every output is exact
modulo 2^Y_W. With the defaults, a full-scale input can exceed 32 bits and
wraps. Make `Y_W` at least `X_W + H_W + clog2(N)` (41 for the defaults) to get
exact results for every input.

## Parameters

| Parameter | Default | Origin |
|-----------|---------|--------|
| `N` | 32 | size of the published design's simulation |
| `M` | 4 | size of the published design's simulation |
| `L` | N/M = 8 | derived (localparam in `fir_top`); N must be a multiple of M |
| `X_W` | 32 | width of the published design's input `x[31:0]` |
| `H_W` | 4 | width of the published design's coefficient input `h[3:0]` |
| `Y_W` | 32 | width of the published design's output `y[31:0]` and its 32-bit accumulator |

The published description fixes the structure: a D-flip-flop coefficient store
and register unit, M inner product units built from multiply cells, and a
chain of pipelined adders that pass partial sums from stage to stage. The
following are this design's own choices:

- the width of one sample: `x[31:0]` is read as one sample;
- a parallel input: the block arrives as L samples in one clock. A source
  that delivers one sample per clock needs a serial-to-parallel register in
  front of `x`;
- the 2L-1 sample window;
- the order of the adder chain, which gives each IPU its delay in blocks;
- the valid handshake and the serial coefficient load port;
- signed arithmetic;
- synchronous reset;
- keeping the IPUs combinational, so one register stage follows the
  multipliers.

The published design's FPGA resource, power and timing figures come from a
different, much smaller implementation. They are not reproduced here: this
design at its defaults has 256 multipliers.

## Verification

Each unit has a self-checking testbench in `tb/`. Each compares the unit's
outputs with values worked out independently in 64-bit arithmetic.

- `fir_ipc_tb`: random and extreme products.
- `fir_csu_tb`: load order, hold, partial reload, reset.
- `fir_ru_tb`: window contents against the full input history, with random
  gaps.
- `fir_ipu_tb`: one-hot windows, which pick out single coefficients, plus
  random and extreme data.
- `fir_pau_tb`: delayed sums of random IPU results, with random gaps.
- `fir_top_tb`: the whole filter at the default parameters. A reference model
  keeps the whole input stream and computes y(n) = sum_t h(t) x(n-t)
  directly. The test checks every output sample and checks that each output
  block arrives exactly one clock edge after its input block. It runs
  back-to-back blocks, random stalls, coefficient reloads in mid-stream,
  reset in mid-stream, a constant input 0x20 with all coefficients 0xA (the
  published design's own stimulus), and full-scale values that wrap. It
  counts each of these and fails if one never happened.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`. The package
must come first:

```
verilator --binary --timing --assert --top-module fir_top_tb \
    rtl/fir_pkg.sv rtl/fir_csu.sv rtl/fir_ru.sv rtl/fir_ipc.sv \
    rtl/fir_ipu.sv rtl/fir_pau.sv rtl/fir_top.sv tb/fir_top_tb.sv
./obj_dir/Vfir_top_tb
```

Replace `fir_top_tb` with any other testbench name to run that unit's test.
To change the size, override `N`, `M`, `X_W`, `H_W` and `Y_W` on `fir_top`.
The testbenches take their sizes from `fir_pkg`.

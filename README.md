# Unary Positional System (UPS) arithmetic in SystemVerilog

Binary arithmetic is fast but its area grows quickly with word width: a
multiplier grows with the square of the width. Unary (bit-stream) arithmetic
is tiny, since a product is one AND gate and a sum is one counter, but a value
up to V takes V clock cycles, so its latency grows exponentially with
precision. The Unary Positional System sits between the two. A number has
**N positions** of weight R^n, like a radix-R positional number, and each
position is a **unary bit stream of R clock cycles**. R and N set the balance:
N=1 is pure unary, R=2 is close to binary, and anything in between trades
area for time.

This repository holds synthesizable RTL for the UPS building blocks (a
counting memory, an adder, an array multiplier in unsigned and signed form)
and for two applications built from them: a matrix multiplier (GEMM) and a
radix-2 FFT butterfly. Every block has a self-checking testbench.

## Number format

`UP(R,N)` is a number with N positions `d[N-1] ... d[0]`, value
`sum d[n] * R^n`, `0 <= d[n] <= R-1`. Position n travels on its own wire as
a stream of R slots (one slot per clock). Its digit is the **number of 1s**
in the stream, and slot R-1, the last one, is always 0. Where the 1s sit in
the stream does not matter to the arithmetic. All stream sources in this
design put them first (`d` ones, then zeros), but every block accepts any
placement.

Example, R=4, N=4: `3212` is `3*64 + 2*16 + 1*4 + 2 = 230`. Its streams are
`1110`, `1100`, `1000`, `1100` (slot 0 first).

**Signed numbers** use the top position as the sign (0 for positive, R-1 for
negative) and are stored as the complement `R^N - |x|`. To complement a
digit stream, invert its first R-1 slots. That turns d into R-1-d. Then add 1
at position 0. Example: `-0212` becomes `3122` (`256 - 38 = 218`). Sums of
complements are taken modulo R^N, as in binary two's complement.

## The Counting Memory (`ups_cmem`)

Every UPS block is built from one cell, the counting memory (CMem). It holds
one digit in a small binary counter:

* **write** (`en=1, rw=1`): each cycle it adds the number of 1s on its
  `NIN` stream inputs plus the carry count on `cin`. The digit is kept modulo
  R, and the number of wraps goes out on `c` one cycle later (registered).
  `NIN=1` is the single-input CMem and `NIN=2` the dual-input one. Larger
  NIN is used for the many-input adder. `c` and `cin` are
  `clog2(NIN+1)` bits wide, which is always enough.
* **read** (`en=1, rw=0`): it plays its digit back on `dout`, 1 for the
  first d cycles and then 0. The read counts the digit down, so R read cycles
  empty the CMem and leave slot R-1 at 0.
* `en=0` holds the digit. `rst` clears it synchronously. `value` shows the
  digit in binary, which is how binary data can enter or leave UPS form.

Because carries are registered, a carry moves up one position per clock. The
blocks below add settling cycles for it.

## Adder (`ups_adder`)

There are N dual-input CMems, one per position, and position n's carry feeds
position n+1. The adder has no sequencer of its own: `rw` drives it.

| phase | cycles | inputs |
|---|---|---|
| write operands | R | `dinA`, `dinB` streams |
| carry settle | N | streams 0 (carries ripple up) |
| read sum | R | `rw=0`, sum on `dout` |

`c` pulses when a carry leaves the top position (unsigned overflow, or the
discarded modulo carry for complements). `cin` (0..2) is counted into
position 0 and carries the "+1" of complemented operands. The same adder
serves unsigned and signed addition.

## Array multiplier (`ups_multiplier`)

This is the most involved block. It multiplies `UP(R,N) x UP(R,N)` into
`UP(R,2N)`. `dinA` is the multiplicand and `dinB` the multiplier.

**Single-digit product.** Two digits a and b, each an (R-1)-slot pattern,
are multiplied by *extending* both to (R-1)^2 slots. A's pattern is repeated
R-1 times, and each bit of B is held for R-1 cycles. Each 1 of A then meets
each 1 of B exactly once, so the AND of the two extended streams holds
exactly a*b ones. For example, with R=4, `110` and `101` extend to
`110110110` and `111000111`, whose AND has 4 ones.

**The array.** Row i of a partial-product array multiplies the whole of A by
digit B[i]. Its CMem in column i+j counts `A[j]_ext AND B[i]_ext`, and
wraps carry into column i+j+1 of the same row. All rows work at the same
time. The rows are then summed one after another into an accumulator row of
2N dual-input CMems, each row read out at its column offset.

Sequence, started by `en=1, rw=1` (that cycle is slot 0 of the operands) and
held until `done`:

| phase | cycles | what happens |
|---|---|---|
| LOAD | R | first R-1 slots of every operand stream captured |
| MUL | (R-1)^2 | extended ANDs counted in the partial-product rows |
| MFL | 2N | row carries settle |
| ACC | N x (R + 2N) | row i read into the accumulator, then carries settle |

Write latency: `R + (R-1)^2 + 2N + N(R+2N)` cycles, which is 69 at R=4, N=4
and 85 at R=8, N=2. Then `done=1`, and `en=1, rw=0` reads the product for R
cycles.

**Signed (`BIPOLAR=1`).** This follows the complement identity
`C(X*Y) = C(X) * (-Sgn(y[N-1]) R^(N-1) + y[N-2] R^(N-2) + ... + y[0])`:

* *sign padding*: A's sign digit is repeated into every column up to 2N-1,
  so each row is the sign-extended partial product.
* The top row multiplies by the *sign* of B (0 or 1) instead of its digit.
* *complementing*: while it is read into the accumulator, that row is
  complemented. Its data slots are inverted and one 1 is added at column N-1,
  which subtracts `A * R^(N-1)`.
* The result is taken modulo R^2N. Signed operands must have a sign digit
  of 0 or R-1.

Worked check (R=4, N=4): `3102 x 0222 = 02021310` (unsigned, 210*42) and
`33201310` (signed, -46*42), with the same signed result for `0222 x 3102`.

## GEMM (`ups_pe`, `ups_multi_adder`, `ups_gemm`)

`C = A B`, where A is M x KD, B is KD x P and C is M x P. The array has M x P
processing elements. PE(i,j) gets row i of A, shared along its PE row, and
column j of B, shared along its PE column.

A PE holds KD multipliers working in parallel. When they are done, all KD
products are read out at once (R cycles) into a KD-input UPS adder
(`ups_multi_adder`), whose carries then settle for NC cycles. That adder has
one KD-input CMem per position, and it passes carry counts between positions.

* Result width `NC = 2N + G`, where G is the smallest value with
  `R^G >= KD`, so a sum of KD products cannot overflow. In signed mode each
  product is sign-extended into the G guard positions by repeating its top
  stream. That stream is all-0 or all-(R-1) for a product of two signed
  operands.
* Write latency: `Tmul + 1 + R + NC` (83 cycles at the defaults). Then
  `rw=0` reads every C element in parallel for R cycles.
* All PEs share one `en`/`rw` and run in lockstep.
* Larger arrays are a parameter setting. 8x8x8 GEMMs (512 multipliers) have been
  simulated signed in UP(8,3), a 9-bit equivalent, and unsigned in UP(16,2),
  an 8-bit equivalent. A 16x16x16 array
  (4096 multipliers) is the same parameter setting, but it has not been
  simulated.

## FFT butterfly (`ups_butterfly`, `ups_input_buffer`, `ups_data_converter`)

The butterfly computes `X0 = x0 + W x1` and `X1 = x0 - W x1` on complex
values. The data path is:

1. **Input buffer.** It stores |Re W|, |Re x1|, |Im W| and |Im x1| as binary
   digits (`UP(R,N)` magnitudes) and plays them as streams.
2. **Four unsigned multipliers** form ReW*Rex1, ImW*Imx1, ReW*Imx1 and
   ImW*Rex1.
3. **Data converter 1.** It widens each product by one sign position to
   ND = 2N+1 positions and complements it when its sign is negative. The sign
   comes from the operand sign bits and from the minus in
   `Re = ReW*Rex1 - ImW*Imx1`. The converter inverts the data slots. Its
   `add_one` output becomes a carry into the next adder's position 0.
4. **Two adders** give Re(W x1) and Im(W x1) as ND-position complements.
5. **Data converter 2** complements W x1 for the X1 outputs.
6. **Four adders** add x0.

Number format: W and x1 are sign-magnitude, with N radix-R positions plus a
sign bit each (`sign[3:0]` = Re W, Re x1, Im W, Im x1). x0 and the outputs
are ND-position complements at the scale of the integer product of the
magnitudes. No twiddle scaling is applied. Results are modulo R^ND, so keep
`|x0| + 2(R^N-1)^2 < R^ND / 2`.

Timing: a `start` pulse loads W and x1. `x0_re` and `x0_im` must carry the x0
streams exactly while `x0_rd=1` (R cycles). The first output slot comes
`1 + Tmul + 1 + 2(R + ND)` cycles after start (113 at R=8, N=2). Then
`out_valid` stays high for R cycles, and `done` rises after that.

**Running whole FFTs.** The butterfly is one operation; memory, twiddle
storage and stage sequencing around it are left to the user. A radix-2
decimation-in-time FFT on bit-reversed data works as follows:

* A 4-point FFT needs only the twiddles 1 and -j and runs unscaled. It takes
  four butterfly operations, 484 cycles at R=8, N=2 and 228 at R=4, N=2. The
  result is exact as long as every x1 operand fits N positions (inputs up to
  |15| at R=8 and |7| at R=4).
* An 8-point FFT also needs (+-1-j)/sqrt(2). The butterfly works on integers,
  so scale the twiddles by S (S=32 at R=8, giving 23 for 0.7071, and S=8 at
  R=4), feed x0 multiplied by S, and divide each output by S with rounding
  before storing it. Twelve operations take 1452 cycles at R=8 and 684 at
  R=4. With inputs up to |15| (R=8) or |3| (R=4), the results stay within 1
  of the exact DFT.
* N=1 turns the butterfly into a purely unary one. At R=16 (the operand
  range of R=4, N=2) a 4-point FFT takes 1268 cycles and an 8-point FFT
  3804.

## Top level (`ups_top`)

The GEMM (`g_*` ports) and the butterfly (`f_*` ports) stand side by side.
They share only clock and reset.

| parameter | default | meaning |
|---|---|---|
| `G_R`, `G_N` | 4, 4 | GEMM element format UP(4,4), the equivalent of 8 bits |
| `G_M`, `G_K`, `G_P` | 4, 4, 4 | matrix sizes (8 and 16 are the other sizes of interest) |
| `G_BIPOLAR` | 1 | signed GEMM |
| `F_R`, `F_N` | 8, 2 | butterfly operands: 2 radix-8 positions plus sign (an R=4 variant is the other configuration) |

All blocks are parameterized in R and N, and any R >= 2 works. In the
cores, R does not need to be a power of two.

## Choosing R and N

For a fixed range R^N, a smaller R with more positions costs area (the
multiplier has N x 2N partial-product cells) and saves time. A larger R with
fewer positions does the opposite, since the multiplier's time grows with
(R-1)^2. Cycle counts of this RTL, write plus read:

| R, N | binary equivalent | addition (2R+N) | multiplication |
|---|---|---|---|
| 2, 8 | 8 bits | 12 | 165 |
| 4, 4 | 8 bits | 12 | 73 |
| 16, 2 | 8 bits | 34 | 301 |
| 2, 16 | 16 bits | 20 | 581 |
| 4, 8 | 16 bits | 16 | 193 |
| 16, 4 | 16 bits | 36 | 361 |

With registered carries, each accumulation step of the multiplier costs 2N
settling cycles. That is why R=2 is not the fastest choice here.

## Where this implementation makes its own choices

The UPS cells and their arrangement (CMem, the adder chain, the
array-multiplier rows with sign padding and complemented last row, the PE of
multipliers plus one adder, the PE array, the butterfly data path) follow the
published architecture. The following are choices of this RTL:

* A synchronous active-high reset. A carry input on the CMem and the adder.
  Carries registered one cycle per position, with explicit settling cycles.
  Because of that, the multiplier spends 2N settle cycles after each
  accumulation step, where the original claims that accumulation needs no
  extra carry time.
* Destructive (count-down) read of a CMem.
* Operand capture registers in the multiplier. A separate accumulator row for
  summing the partial-product rows. The `done` output and the start/hold
  protocol.
* The many-input adder's insides, the PE guard positions and sign extension.
* Sign-magnitude operands in the butterfly, the product scale and the
  timing of the x0 inputs, and the twiddle scaling for 8-point FFTs. The
  latencies do not reproduce the published cycle counts of the FFT
  processor. At R=8, N=2 those are 263 cycles for a 4-point and 735 for an
  8-point FFT, against 484 and 1452 here with one butterfly used serially.
* Not built: the coarse-grained "block pipeline" of the UPS units, whose
  structure is not specified. The memory and sequencing of a full FFT
  processor (only the butterfly is specified; the FFT workload testbench does
  that sequencing itself). The superconductor (Josephson-junction) cell
  implementation: this RTL is plain synchronous logic.

## Files

`rtl/`: `ups_pkg` (helpers), `ups_cmem`, `ups_adder`, `ups_multi_adder`,
`ups_multiplier`, `ups_pe`, `ups_gemm`, `ups_input_buffer`,
`ups_data_converter`, `ups_butterfly`, `ups_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`), plus three
workload tests. `tb_ups_arith_sweep` runs the adder and both multipliers at
12 (R, N) points from 3- to 16-bit equivalents, R=2 to 16 and N=1 to 16.
`tb_ups_fft` runs 4- and 8-point FFTs on the butterfly at R=8, N=2, at
R=4, N=2 and at R=16, N=1. `tb_ups_gemm_sizes` runs 8x8x8 GEMMs, signed in
UP(8,3) (129 cycles per product) and unsigned in UP(16,2) (323 cycles).
`tb_ups_top` runs the whole design at its default sizes: a 4x4x4 signed
GEMM and random butterflies. It also counts that sign padding, complemented
partial products, converter complements and carries all occurred. Each
testbench prints
`TB_RESULT checks=<n> failures=<m>`.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/ups_pkg.sv tb/tb_ups_top.sv \
    --top-module tb_ups_top -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` by name through `-Irtl`. The
full-size top-level test runs in well under a minute; the 8x8x8 GEMM test
takes about six minutes to compile.

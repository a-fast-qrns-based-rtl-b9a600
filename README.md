# 8-point DCT in quadratic residue arithmetic

This RTL computes an 8-point discrete cosine transform (DCT) whose
arithmetic core has no carry chain longer than the width of one small
modulus. Two ideas combine to do it.

1. **One DFT, no cosines.** The samples are reordered:
   `y(n) = x(2n)` and `y(7-n) = x(2n+1)`. The DCT then becomes the real part
   of a scaled 8-point DFT of `y`:
   `X(m) = Re Z(m)`, with `Z(m) = H_m * Y(m)` and
   `H_m = sqrt(2/8) * K_m * exp(-j*pi*m/16)` (`K_0 = 1/sqrt(2)`, `K_m = 1` otherwise).
   The symmetry `Re Z(8-m) = -Im Z(m)` means that only `Z(0), Z(1), Z(2), Z(4), Z(5)`
   have to be formed:

   ```
   X = { Re Z0, Re Z1, Re Z2, -Im Z5, Re Z4, Re Z5, -Im Z2, -Im Z1 }
   ```

2. **Complex arithmetic as independent table look-ups.** All arithmetic
   runs in residue channels, one per modulus `m`. Each modulus is
   chosen so that `-1` has a square root `r` modulo `m`. A complex integer
   `a + jb` is then held as the pair `(|a + r b|_m, |a - r b|_m)`. This is
   the quadratic residue number system (QRNS). In it, addition and
   multiplication work on each component separately. Multiplying by a
   complex twiddle factor is two table look-ups, not four multiplications
   and two additions. The channels never exchange carries, so every adder is
   at most 8 bits wide.

The processor is fully pipelined. It accepts one 8-sample vector per clock.
With the optional serial output converter (`CRT_SERIAL = 1`) it accepts one
vector every 8 clocks instead.

## Dataflow

```
 x(0..7) ──reorder──► bin2rns ──► qrns_fct_channel ──► qrns2rns ──► dct_res ──► ecrt_conv ──► dct_out
 8 x 8-bit            residue      FFT + H_m scaling    Re / -Im     residues     one per     OUT_W-bit
 unsigned             per channel  (per channel)        residues     of 2^19 X    output      2's complement
                      └──────────────── repeated for each of the L moduli ────────┘
```

With `CRT_SERIAL = 1`, one `ecrt_serial` takes the place of the eight
`ecrt_conv`s; the results leave one per clock on `ser_out`.

| stage | module | latency (clk) |
|---|---|---|
| input residue | `bin2rns` | 1 |
| FFT stage 1, 2, 3 (+ `H_m`) | `qrns_fct_channel` | 2 + 2 + 2 |
| QRNS to residues | `qrns2rns` | 2 |
| **residues valid (`res_valid`)** | | **9** |
| table + sliced adder | `ecrt_conv` | 1 + ceil(OUT_W/8) |
| **binary output valid (`out_valid`)** | | **13 for 24-bit outputs** |

## The pruned FFT inside a channel

`qrns_fct_channel` is a radix-2 decimation-in-frequency FFT over three
stages. Every node that leads only to `Z(3), Z(6)` or `Z(7)` is removed.

```
stage 1 (pairs n, n+4)          stage 2                          stage 3 (+ H_m)
a_n = y_n + y_{n+4}             a'0  = a0 + a2                   Z0 = H0 (a'0 + a'1)
b_n = (y_n - y_{n+4}) W8^n      a'1  = a1 + a3                   Z4 = H4 (a'0 - a'1)
      n = 0..3                  a''0 = (a0 - a2) W8^0            Z2 = H2 (a''0 + a''1)
                                a''1 = (a1 - a3) W8^2            Z1 = H1 (b'0 + b'1)
                                b'0  = b0 + b2                   Z5 = H5 (b'0 - b'1)
                                b'1  = b1 + b3
```

**Real and complex nodes.** The inputs are real. A real value in QRNS has
two equal components, so a real node needs only one modular unit. Nodes stay
real until they meet a complex twiddle. A complex node needs two units. Real
nodes are: `y`, `a_n`, `b0`, `a'0`, `a'1`, `a''0`, the stage-3 sums
`a'0 + a'1` and `a'0 - a'1`, and `Z0`. Every other node is complex.

`qrns_addsub` and `qrns_cmul` take `*_REAL` parameters and build one or two
units to match. Per channel the graph has 24 modular adders or subtractors
and 19 table multipliers. Five of those multipliers take a real input and a
complex constant: `b1`, `b2`, `b3`, `a''1` and `Z4`. Their two products
share one address. For 7- and 8-bit moduli `qrns_cmul` therefore reads both
from one table of `2^n` entries of `2n` bits, which is one 2^8 x 16 embedded
memory on an FPGA. A channel then needs 14 tables, not 19.

**Fixed-point coefficients.** Twiddle factors are stored as
`round(2^9 * W8^k)`: `W8^0 = 512`, `W8^1 = 362 - 362j`, `W8^2 = -512j`,
`W8^3 = -362 - 362j`. Scale factors are stored as `round(2^10 * H_m)`, for
example `H_0 = 362` and `H_1 = 502 - 100j`.

The paths to `Z0` and `Z4` pass through no twiddle multiplier. So `H_0` and
`H_4` carry an extra exact factor `2^9`. Every output then leaves the
channel as exactly `2^19` times its DCT value, up to coefficient rounding.
In random trials the error against the DCT
definition stayed below 0.36 for 8-bit inputs.

**Modular constants.** Each constant enters a channel as its QRNS pair
modulo that channel's `m`. The pairs are computed at elaboration by
`qrns_pkg::qrns_c1/qrns_c2`. Every table is generated from a formula, so no
data files are needed.

## Modular arithmetic elements

- **`mod_add`: two carry-propagate adders.** It forms `s1 = a + b` (carry
  `c1`), then `s2 = s1 + (2^n - m)` (carry `c2`). If `c1 | c2`, the sum
  reached `m` and `s2` is the result; otherwise `s1` is. Here
  `n = ceil(log2 m)`.
- **`mod_sub`.** It computes `a + ~b + 1` with carry `c1`. When `c1 = 0`
  (a borrow), it adds `m` back by subtracting `2^n - m` modulo `2^n`.
- **`lut_mul`: constant multiplication `|u*C|_m` as a ROM.** The
  organisation suits 4-input-LUT FPGAs:
  - `n <= 4`: one table.
  - `n = 5`: two 16-entry tables on `u[3:0]` and a multiplexer on `u[4]`.
  - `n = 6`: four 16-entry tables, two multiplexers on `u[4]` and one on `u[5]`.
  - `n >= 7`: one `2^n`-entry table, meant for an embedded memory block.
- **`qrns_butterfly`.** One adder, one subtractor and one `lut_mul` per QRNS
  component, as used in FFT stages 1 and 2.

## Number systems and converters

**Modulus sets.** Default is `L = 4` moduli `{221, 229, 233, 241}` with
roots `{47, 107, 89, 177}` (`r^2 = -1 mod m`). This gives
`M = 2,841,847,177`, about 31.4 bits. The largest `|2^19 X|` for 8-bit inputs
is 378,101,760, well inside `M/2`.

The alternative all-logic set has moduli of at most 6 bits:
`{53, 41, 29, 25, 17, 13, 37}` with roots `{23, 9, 12, 7, 4, 5, 6}`. Select it
with `L = 7` and the `MODS`/`ROOTS` overrides shown in `qrns_dct8.sv`. The
set as published has `5` as its seventh modulus. But `5` shares a factor with
`25`, so the residues could not be inverted. `37` is the smallest modulus of
the form 4k+1 that keeps the set pairwise coprime.

Every modulus must be a product of primes of the form 4k+1, or `r` does not
exist. Elaboration stops with an error if a root is wrong or two moduli share
a factor.

**`bin2rns`.** Inputs are unsigned 8-bit samples. For moduli of 128 or more,
`x < 2m`, so one compare and one subtract give `|x|_m`. For smaller moduli the
sample is split into two 4-bit blocks. Two 16-entry tables give
`|x[3:0]|_m` and `|16*x[7:4]|_m`, and a `mod_add` combines them.

**`qrns2rns`.** It recovers the residues of the real and imaginary parts:
`re = |2^-1 (z1 + z2)|_m` and `im = |(2r)^-1 (z1 - z2)|_m`. That is one
adder, one subtractor and one constant table per output. With `NEG_IM = 1`
the subtractor operands are swapped, which yields `-Im` for free.

**`ecrt_conv`: auto-scaling CRT.** For residues `x_i`:

```
X/M = frac( sum_i |x_i * M_i^-1|_{m_i} / m_i ),   M_i = M / m_i
T_i[v] = round( 2^OUT_W * |v * M_i^-1|_{m_i} / m_i )  mod 2^OUT_W
y = sum_i T_i[x_i]  mod 2^OUT_W   ≈  X * 2^OUT_W / M   (two's complement)
```

There is one `2^8 x OUT_W` table per modulus, registered. An `OUT_W`-bit
multi-operand adder then sums the `L` table outputs. It is cut into 8-bit
slices with one register stage each. Stage `s` adds slice `s` of every
operand plus the carry from stage `s-1`; that carry is below `L`. Operands
for the higher slices are delayed to meet their stage, and finished low
slices ride along to the output. A 24-bit result thus takes three adder
stages, a 16-bit one two and an 8-bit one one. The error is at most `L/2`
LSB.

To read a DCT value from `dct_out[m]`, use
`X(m) ≈ dct_out[m] * M / 2^(OUT_W + 19)`. At the defaults one output LSB is
about 0.00032. If the exact value is needed, convert `dct_res` with a full
CRT.

**`ecrt_serial`: one converter for all eight outputs.** Eight converters cost
eight sets of tables. With `CRT_SERIAL = 1` the top uses a single `ecrt_conv`
instead. `ecrt_serial` latches all eight residue vectors when `res_valid`
rises. A 3-bit counter then feeds them to the converter one per clock, in
index order. A delayed copy of the counter comes out as `ser_idx`. The
throughput drops to one transform every 8 clocks. A new vector may enter
exactly 8 clocks after the previous one: the load then coincides with the
issue of the previous set's last entry. `crt_busy` is high while a new
result set would overrun the sequencer; an assertion flags that case.

## Interface of `qrns_dct8`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything is rising-edge |
| `rst_n` | in | 1 | asynchronous active-low reset of the valid pipeline only |
| `in_valid` | in | 1 | `x` holds a vector this cycle (no back-pressure) |
| `x[8]` | in | 8 each | unsigned samples `x(0..7)` |
| `res_valid` | out | 1 | `dct_res` valid, 9 cycles after `in_valid` |
| `dct_res[8][L]` | out | 8 each | residue of `2^19 X(m)` modulo `MODS[c]` |
| `out_valid` | out | 1 | `dct_out` valid, `10 + ceil(OUT_W/8)` cycles after `in_valid` |
| `dct_out[8]` | out | `OUT_W` each | `2^19 X(m) * 2^OUT_W / M`, signed (parallel mode) |
| `crt_busy` | out | 1 | serial mode: a vector entering now would overrun the converter |
| `ser_valid` | out | 1 | serial mode: `ser_out` valid |
| `ser_idx` | out | 3 | serial mode: index `m` of `ser_out` |
| `ser_out` | out | `OUT_W` | serial mode: `2^19 X(ser_idx) * 2^OUT_W / M`; `X(0)` leaves `11 + ceil(OUT_W/8)` cycles after `in_valid`, `X(7)` seven cycles later |

Parameters: `L` (default 4), `MODS`, `ROOTS` (8-entry arrays, unused
entries 0), `OUT_W` (default 24; 16 and 8 also work) and `CRT_SERIAL`
(default 0: eight parallel converters). In parallel mode the serial outputs
stay 0; in serial mode `out_valid` and `dct_out` do. The residue outputs
work in both modes. The data registers are not reset. Their contents are meaningless until the valid
flags mark them.

## Where this design makes its own choices

- **Pipeline register placement** (two per FFT stage, the converter
  latencies above) is this design's own. The source only says that
  registers come free with the logic.
- **Coefficient precision.** The split of the 10-bit coefficient precision
  into `2^9` for twiddles and `2^10` for `H_m` is a choice. So is the
  compensation by `2^9` on the `Z0`/`Z4` paths.
- **Input format.** Inputs are unsigned, matching the compare-and-subtract
  converter. Signed pixels would need a different `bin2rns`.
- **Modular adder count.** A complex node costs two units, so the
  channel uses 24 modular adders. Published operation counts for this
  algorithm give 22. The 19 table multipliers agree.
- **ε-CRT pipeline cut.** Published converters used 3, 2 and 1 adder
  stages for 24-, 16- and 8-bit outputs. This design reads that as one
  stage per 8-bit slice of the sum and cuts the adder that way.
- **Converter mode.** Both a parallel and a serial output converter
  are known for this processor. Parallel is the default here because it
  keeps the one-vector-per-clock rate. The serial sequencer (hold
  register, counter, index output) is this design's own.
- **Fixed length.** Only the 8-point transform is built. The flow graph is
  written out for `N = 8`, so a 16-point DCT needs a new channel module.
- **Not reproduced.** Speed and FPGA resource figures are outside what RTL
  simulation can confirm. This includes logic element counts. The tables
  are organised for 14 memories per 8-bit channel, but which memory
  primitive each becomes is up to the synthesis tool.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb_mod_add`, `tb_mod_sub` | all operand pairs for 12 moduli (3 to 8 bits) |
| `tb_lut_mul` | all addresses, flat / 2-table / 4-table organisations |
| `tb_bin2rns` | all 256 inputs for 12 moduli, 1-cycle latency |
| `tb_qrns_butterfly` | random complex and real operands, 2-cycle latency |
| `tb_qrns2rns` | random complex integers, `Im` and `-Im` |
| `tb_qrns_fct_channel` | QRNS pairs of `Z(0,1,2,4,5)` against an exact complex-integer model |
| `tb_ecrt_conv` (+ `tb_ecrt_lane`) | both modulus sets, 24/16/8-bit outputs, error ≤ L/2 LSB |
| `tb_qrns_dct8` | default configuration, end to end (details below) |
| `tb_qrns_dct8_set6` | the same with the seven 6-bit-or-smaller moduli |
| `tb_qrns_dct8_out16`, `tb_qrns_dct8_out8` | the same with 16- and 8-bit converter outputs |
| `tb_ecrt_serial` | serial converter alone: loads every 8 clocks or later, order, index, timing |
| `tb_qrns_dct8_serial` | the top with `CRT_SERIAL = 1`: 80 vectors, `ser_out` against the DCT, timing |

The four parallel-mode end-to-end tests stream 400 vectors with random idle gaps. They
check:

- exact residues against the reference model;
- converted outputs within `L/2` LSB;
- recovered DCT values within 0.5 of the floating-point definition, plus
  the converter's `L/2` LSB;
- exact latencies.

They also confirm that input reduction, negative and positive outputs,
back-to-back vectors and idle gaps each occur.

`qrns_ref_pkg` holds the reference arithmetic. It recomputes the
coefficients from `cos`/`sin` and uses plain complex integers.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/qrns_pkg.sv tb/qrns_ref_pkg.sv tb/tb_qrns_dct8.sv --top-module tb_qrns_dct8
./obj_dir/Vtb_qrns_dct8
```

Each run takes a few seconds. Lint with
`verilator --lint-only -Wall rtl/qrns_pkg.sv -y rtl rtl/qrns_dct8.sv`.

## Files

`rtl/qrns_pkg.sv` holds the shared types and constants. The other modules,
bottom-up: `mod_add`, `mod_sub`, `lut_mul`, `qrns_addsub`, `qrns_cmul`,
`qrns_butterfly`, `bin2rns`, `qrns_fct_channel`, `qrns2rns`, `ecrt_conv`,
`ecrt_serial`, and the top, `qrns_dct8`.

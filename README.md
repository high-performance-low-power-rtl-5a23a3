# Five-tap FIR filter on two-cycle Montgomery multipliers

This design is a small five-tap FIR filter. Each tap's product comes from a
digit-serial Montgomery multiplier, and a 12:6 ripple compressor adds the
multiplier's carry-save result into a binary word. Everything is 6 bits wide:
the sample, the coefficients, the modulus and the output.

Each tap computes a **Montgomery product**, not an ordinary product. Its value
is `x * h * 2^-6 mod N` for an odd modulus `N`, with no final subtraction. The
taps are summed modulo 64:

    y(n) = sum_{k=0..4}  MM(x(n-k), h_k)   mod 64
    MM(P, Q) = P * Q * 2^-6  (mod N),  partially reduced, low 6 bits kept

This arithmetic is meant for the moduli `N = 3` and `N = 7`. Any odd `N` below
64 works. For these two moduli `2^6 = 1 (mod N)`, so every tap term is
congruent to `x*h mod N`.

## Datapath of one multiplier (`montgomery_mult`)

The second operand `Q` is read one 3-bit digit per clock, so one product takes
two cycles. Each cycle runs through three stages. Nothing between them is
registered except the carry registers.

1. **Digit selection** (`digit_select_mux`). Three 2:1 multiplexers pass
   `q[2:0]` when the select line is high (first cycle) and `q[5:3]` when it is
   low (second cycle).
2. **Processing stage** (`mont_processing_stage`). An AND network forms the
   three rows `(P & q_i) << i`. Three rows of 3:2 full adders fold them into
   the carried value. In the first cycle the carried value is forced to zero.
3. **Division stage** (`mont_division_stage`). Three rows of full adders take
   `N` as one input. Each row adds `N` if the running value is odd and then
   halves it. Together the three rows divide by 8 modulo `N`. The bits where
   `N` was added form the quotient digit `u`, which is output as `u_dbg`.
4. **Carry registers.** After the first cycle the two carry-save vectors (7
   bits each) are stored. In the second cycle they feed back into the
   processing stage.
5. **12:6 astute compressor** (`astute_compressor`). In the second cycle the
   low 6 bits of both vectors go through a ripple chain: a `half_adder` in bit
   0, then one modified full adder (`mfa`) per higher bit. The carry out of
   the top bit is dropped.

### Why carry-save works here

The running value stays below `2^7` between cycles. Inside a cycle it stays
below `2^10`. The stages use 7-bit and 10-bit vectors, so no carry is ever
lost. Before each halving the low bit of both vectors is zero:

- the carry row always has bit 0 clear;
- adding an odd `N` clears the sum bit.

Shifting each vector on its own is therefore exact.

After two digits, the value lies in `[0, P + N)`. That is congruent to
`P*Q*2^-6 mod N`, but it can be `N` or more. The compressor keeps only 6 bits.
With `P` near 63 and a large `N`, bit 6 of the value can be lost. For `N = 7`
this happens for 3 of the 4096 operand pairs (all with `P` of 61 or more). For
`N = 3` it never happens.

### Timing

| signal | cycle `t` | cycle `t+1` |
|---|---|---|
| `start` | 1 | 0 |
| digit used | `q[2:0]`, carry = 0 | `q[5:3]`, carry registers |
| `done`, `result` | – | valid (combinational) |

`P`, `Q` and `N` must stay stable for both cycles. The next `start` may come
at `t+2`, and an assertion flags a `start` at `t+1`. A second assertion checks
that `N` is odd.

## The filter (`mont_fir_filter`, top)

The filter is in transposed form. All five multipliers get the same sample. A
6-bit `carry_forward_adder` (a half adder plus full adders, 6-bit result)
adds each product to the delay register coming from the next tap:

    z4 <= MM(x,h4)
    z3 <= MM(x,h3) + z4
    z2 <= MM(x,h2) + z3
    z1 <= MM(x,h1) + z2
    y  <= MM(x,h0) + z1

Each adder has one multiplier output and one register output as inputs. The
longest path is one multiplier cycle plus one adder.

Interface:

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears delay line and control) |
| `x_valid`, `x_ready` | in/out | 1 | sample handshake |
| `x` | in | 6 | sample (multiplicand `P` of every tap) |
| `h[5]` | in | 6 each | coefficients `h0..h4` (multiplier `Q`); hold stable while running |
| `n` | in | 6 | modulus, odd (3 or 7 intended) |
| `y_valid`, `y` | out | 1, 6 | output sample, one-cycle valid pulse |
| `ovf_any` | out | 1 | some adder wrapped when `y` was produced |

A sample accepted in cycle `t` is copied into an input register. The
multipliers run in cycles `t+1` and `t+2`. The delay line and `y` load at the
end of `t+2`, so `y_valid` is high in cycle `t+3`. `x_ready` is low only while
the multipliers are in their first cycle. The filter therefore takes one
sample every two clocks. If coefficients or `N` change, reset first: the delay
line still holds terms computed with the old values.

Example: `x = 10` held, `h0..h4 = 5,4,3,2,1`.

- With `N = 7` the outputs are 1, 6, 8, 14, 17, 17, ...
- With `N = 3` the outputs are 2, 3, 6, 8, 9, 9, ...

## Sizes and parameters

`mont_fir_pkg` holds the defaults:

- `DATA_W = 6`: operand and sum width `W`;
- `DIGIT_W = 3`: digit width `D`;
- `TAPS = 5`.

Each module has typed parameters `W`, `D` and `NTAP` that default to these
values. The digit multiplexer and the multiplier are written for two digits
(`W = 2*D`), and an elaboration-time assertion checks this. The adders and the
compressor work for any `W`. `NTAP` can be any value of 2 or more.

After coarse synthesis the whole filter has about 490 word-level cells and 110
flip-flop bits: 14 carry-register bits and 1 control bit per multiplier, the
delay line, the input and output registers, and control.

## Where this RTL departs from, or fills in, the description it follows

- **Taps.** The design is called five-stage and shows five coefficients. One
  formula for it lists six (a fifth-order filter). Five taps are built, and
  `NTAP` changes this.
- **Widths.** The arithmetic is 6 bits throughout, as the datapath description
  gives it. One published simulation of the filter uses an 8-bit sample, 3-bit
  coefficients and an 8-bit output. Its output values are not reproduced here.
- **Modified full adder.** The transistor-level cell is reported to fail for
  the input pattern 1-0-1, while the multiplier is reported to be exact. The
  `mfa` here is an exact full adder. It uses a multiplexer for the carry
  (`cout = a^b ? cin : a`).
- **Carry registers.** The description counts 13 storage bits (two 6-bit
  registers and one single bit). Here they are two 7-bit vectors, which hold
  any value the iteration can reach.
- **Own choices.** The following are not given by the description:
  - the operand roles (sample = `P`, coefficient = `Q`);
  - no final subtraction of `N`;
  - the valid/ready handshake;
  - the input and output registers;
  - the reset style;
  - the `ovf_any` and `u_dbg` observation outputs;
  - the arrangement of the full-adder rows in the processing and division
    stages.
- **Not built.** The conventional multiplier, which has a multiplexer-based
  reduction cell in place of the compressor, is only a point of comparison.
  The 64-tap low-pass filter mentioned as prior work would need `NTAP = 64`
  and coefficients that are not given.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. `tb/mont_ref_pkg.sv`
is the reference. It computes the Montgomery product with whole-digit integer
arithmetic: `u = -T * N^-1 mod 8` for each digit. It does not use the
bit-serial carry-save method of the RTL.

| testbench | what it covers |
|---|---|
| `tb_half_adder`, `tb_full_adder`, `tb_mfa` | all input combinations |
| `tb_astute_compressor`, `tb_carry_forward_adder` | all 4096 operand pairs (plus `ovf`) |
| `tb_digit_select_mux` | all `q`, both select values |
| `tb_mont_processing_stage` | every `P` and digit, random carried vectors; the vectors must sum to `V + P*q` |
| `tb_mont_division_stage` | random values and odd `N`; checks `u` and `(V + u*N)/8` |
| `tb_montgomery_mult` | all 4096 `(P,Q)` pairs for `N = 3` and `N = 7`, 3000 random cases with other odd `N`; congruence with `P*Q*2^-6 mod N`; `done` exactly one cycle after `start`; products back to back |
| `tb_mont_fir_filter` | the example stimulus above, then about 4000 random samples at full and random rate for `N = 3`, `N = 7` and random odd `N`; checks every output, the 3-cycle latency and the 2-cycle sample interval; counts input stalls, adder wrap-around, partially reduced products and both moduli, and fails if any of them never happened |

The filter testbench runs the top at its default sizes. With plain Verilator,
from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mont_fir_pkg.sv tb/mont_ref_pkg.sv tb/tb_mont_fir_filter.sv \
        --top-module tb_mont_fir_filter -o sim
    ./obj_dir/sim

To run another test, use the same command with that testbench's file and top
module name. Every test finishes in well under a second.

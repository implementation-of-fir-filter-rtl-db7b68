# Four-tap FIR filter with Booth multipliers and carry skip adders

A direct-form FIR (finite impulse response) filter computes

    y(n) = a(0) x(n) + a(1) x(n-1) + a(2) x(n-2) + a(3) x(n-3)

from a stream of 8-bit signed samples x(n), producing one 16-bit signed
output per clock. The arithmetic is where this design is specific: every tap
product a(k) x(n-k) is formed by a radix-2 **Booth multiplier**, and the
products are summed by a chain of **carry skip adders**. Both are classic
choices for trading area against delay in small DSP datapaths: Booth
recoding handles two's complement operands directly and skips work on runs
of equal multiplier bits, and a carry skip adder shortens the worst-case
carry path of a ripple adder with little extra logic.

## Structure

```
 filter_in ─┬──────────────┬──────────────┬──────────────┐
 x(n)       │   [Register] │   [Register] │   [Register] │
            │     x(n-1)   │     x(n-2)   │     x(n-3)   │
        a(0)×         a(1)×          a(2)×          a(3)×      Booth multipliers
            │              │              │              │
            └──────────(+)─┴──────────(+)─┴──────────(+)─┴─[reg]─ filter_out
                      carry skip adders (16 bit)                y(n)
```

| Module | Role |
|---|---|
| `Booth_Mul_Carry_Skip_Add_Top` | the filter: ports `clk`, `reset`, `filter_in[7:0]`, `filter_out[15:0]` |
| `fir_delay_line` | the register chain giving x(n-1) .. x(n-3) |
| `booth_multiplier` | one per tap, signed 8 x 8 -> 16 bit, combinational |
| `carry_skip_adder` | one per adder in the sum chain, 16 bit, 4-bit groups |
| `fir_pkg` | widths, tap count and default coefficients |

## Timing and interface

* One sample is accepted on every rising edge of `clk`; there is no valid or
  ready handshake.
* `filter_out` is registered. The output for the sample present on
  `filter_in` at a rising edge appears right after that same edge: one clock
  of latency.
* `reset` is synchronous and active high. It clears the delay line and the
  output register, so the filter restarts as if all earlier samples were 0.
* Samples, coefficients and the output are signed two's complement. The
  16-bit sum wraps on overflow; nothing saturates. With the default
  coefficients the largest possible |y| is 128 x 160 = 20480, so the default
  filter never wraps.

## The Booth multiplier

`booth_multiplier` implements the textbook add/shift form of radix-2 Booth
multiplication for an x-bit multiplicand m and a y-bit multiplier r:

1. Build three words: A = m followed by zeros, S = -m followed by zeros,
   and the product word P = zeros, then r, then one extra 0 bit on the right.
2. Look at the two lowest bits of P: `01` adds A, `10` adds S (subtracts m),
   `00` and `11` do nothing. Carries out of the top are ignored.
3. Shift P right arithmetically by one.
4. After y rounds, drop the lowest bit; what remains is m x r.

Example (x = y = 4): 3 x (-4). P starts at `0000 1100 0`; two rounds see `00`
and only shift, the third sees `10` and adds S = `1101 0000 0`, the fourth
sees `11`. The result is `1111 0100` = -12. `tb_booth_multiplier` checks
this case.

In the filter the y rounds are unrolled: each round is one add/subtract
stage followed by a wired shift, so the multiplier is a combinational array
and the filter keeps up with one sample per clock. The coefficient is the
multiplicand m and the sample is the multiplier r.

One deliberate difference from the usual register lengths (x + y + 1 bits):
the m field of A, S and P is one bit wider here. With only x bits, -m cannot
be represented when m is the most negative value (-128 for 8 bits), and that
operand gives a wrong product. The wider field makes all 65,536 operand pairs
of the 8 x 8 multiplier correct, which the testbench checks exhaustively.

## The carry skip adder

`carry_skip_adder` splits a 16-bit addition into four 4-bit ripple-carry
groups (bits 3:0, 7:4, 11:8, 15:12). For the two middle groups a group
propagate signal P = AND over the group of (a[i] XOR b[i]) is formed. When P
is 1 every bit of the group would pass a carry straight through, so the
group's carry-out is taken from its carry-in through a multiplexer rather
than waiting for the ripple. When P is 0 the ripple carry-out does not depend
on the carry-in at all. The worst carry path therefore ripples through the
lowest group, passes the two skip multiplexers, and ripples through the
highest group, instead of rippling through all 16 bits. The lowest and
highest groups have no skip logic; their carry-outs are plain ripple carries. `WIDTH` and `BLOCK` are parameters (`WIDTH` a multiple of `BLOCK`);
skip logic goes on every group except the first and the last.

The skip path does not change the sum, only how fast the carry arrives, so
in simulation it can only be observed by breaking it; the adder testbench
drives operands in which the middle groups propagate with a carry arriving
from below, and a faulty skip multiplexer fails thousands of its checks.

## Parameters

| Parameter | Default | Where it comes from |
|---|---|---|
| `TAPS` | 4 | the four-coefficient filter structure a(0)..a(3) |
| `DATA_W` | 8 | 8-bit input samples, `filter_in[7:0]` |
| `OUT_W` | 16 | `filter_out[15:0]` |
| `COEF_W` | 8 | own choice |
| `COEF` | {-8, 72, 72, -8} | own choice: a symmetric low-pass set summing to 128 |
| `carry_skip_adder.BLOCK` | 4 | four 4-bit groups of the 16-bit adder |

The filter elaborates for any `TAPS` of 2 or more: pass a `COEF` array of the
same length, e.g.
`Booth_Mul_Carry_Skip_Add_Top #(.TAPS(16), .COEF(my_coefs)) u (...)`.
The coefficients are constants; there is no port to load them.

## How far it can be trusted, and what is this design's own

Taken from the design this RTL follows: the direct-form structure with the
current sample feeding the first multiplier and three delay registers, Booth
multipliers for the taps, carry skip adders for the summation, the 16-bit
four-group carry skip adder with skip logic on the middle groups, the Booth
algorithm and its worked example, the module name and the port names and
widths.

This design's own choices, where the source says nothing: the coefficient
values and width; the registered output and its one-clock latency; the
synchronous active-high reset; the wrap-around (non-saturating) sum; the
Booth multiplier being a combinational array rather than a y-cycle
sequential unit; the one-bit-wider Booth m field; using ordinary adders,
not carry skip adders, inside the Booth multiplier; and the tap count of 4.
The last is worth a note: the FPGA utilisation reported for the original
filter (about 147 flip-flops) is more than the 40 this four-tap build needs
and would fit a filter of about 16 taps, so the original may well have been
longer. `tb_fir_long` runs a 16-tap instance.

Not built: the baseline multipliers the original is compared with
(a plain array multiplier, shift-add, multiple-constant multiplication) and
a radix-4 variant mentioned only in passing. The reported FPGA delay
(3.42 ns) and power (52.27 mW) have not been reproduced; they depend on a
device and tool flow not available here.

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_carry_skip_adder` | 16/4 and 32/8 adders against a + b + cin: directed long-carry cases, skip-oriented and random operands; counts skip events |
| `tb_booth_multiplier` | all 65,536 8 x 8 operand pairs and all 4 x 4 pairs against signed multiplication, plus the worked example; counts add/subtract/no-op actions |
| `tb_fir_delay_line` | every tap after every edge against a reference history, including a mid-stream reset |
| `tb_fir_top` | the filter at its default parameters against an integer model: reset, impulse response (replays the coefficients), step response (settles at 128), full-scale inputs, mid-stream reset, 3,000 random samples; checks the one-clock latency on every sample and that Booth add/subtract/no-op, the carry skip path and a mid-stream reset all occurred |
| `tb_fir_long` | a 16-tap instance with coefficients including -128, against a model; counts wrapped outputs and fails if none wrapped |

To run one with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top -o sim
./obj_dir/sim
```

Replace `tb_fir_top` with any other testbench name. Each finishes in well
under a second.

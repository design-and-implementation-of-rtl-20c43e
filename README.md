# Two low-power 8-tap FIR filters

Much of the dynamic power in an FIR filter goes on registers and adders
that switch to compute bits the data never needed. This applies when a
sample is small, or when the upper half of a sum is only sign extension.
This RTL holds two filters. Each avoids that switching in its own way.

* **Variable-precision pipelined filter (`vp_fir`).** This filter has 8 taps,
  with unsigned 8-bit samples and coefficients. Each multiplier is a short
  pipeline. A pipeline stage loads its registers only if the sample has
  significant bits for that stage to work on. A bypass row of registers
  keeps the latency fixed whatever the precision.
* **DPDT filter (`dpdt_fir`, data transition power diminution).** This
  filter has 8 taps, with signed 8-bit samples, 16-bit coefficients and a
  32-bit output. Every adder is cut into a least significant part (LSP) and
  a most significant part (MSP). When both operands fit the LSP, the MSP is
  closed: its operand latches freeze and the sign extension of the LSP
  result stands in for its sum. The radix-4 Booth multipliers use the same
  idea on their upper partial products.

The two filters are alternatives, not parts of one datapath. `lpfir_top`
places them side by side. Only the clock and the reset are shared.

## Variable-precision multiplier (`vp_mult`)

The multiplier computes `p = a * b` (unsigned, W = 8) in `STAGES` pipeline
stages. Stage k owns one digit of `b`, each digit `W/STAGES` bits wide. A
stage is a register stage followed by a functional block. The block adds
`a * digit_k`, shifted to the digit's weight, to the running sum.

```
 b ─► precision ─► last ─► [mask reg] ─► [mask reg] ─► ... ─────────────┐
      detector      │                                                   │
                    ▼ en1           ▼ en2                               ▼
 a,b ────────► [stage reg 1] ─► FB1 ─► [stage reg 2] ─► FB2 ─► ... ─► MUX ─► p
                                 │           [bypass] ─────────► ... ─┘
                                 └──────────►   row
```

The three rows of the pipeline work as follows:

* **Precision detector.** `last` is the highest stage whose digit of `b`
  is non-zero. It is 0 when `b = 0`.
* **Mask row.** `last` travels down its own row of registers, which are
  always clocked. Register stage k loads only when `last >= k`. In silicon
  this enable is the AND of a mask with the clock: a gated clock. Here it is
  written as a clock enable, which behaves the same. A gated stage keeps
  its old contents, so it does not switch. The values of a gated functional
  block are garbage and are never used.
* **Bypass row.** One register sits at each inner stage boundary. When a
  product's last needed stage is k, its sum is dropped into the bypass
  register after stage k. It then moves one register per cycle alongside
  the pipeline. At the end, the output MUX takes the last functional block
  when every stage was needed, and the bypass row otherwise. So every
  product comes out exactly `STAGES` cycles after its operands, whatever
  its precision.

Timing: `a` and `b` are taken at a rising edge. `p` is valid after the
`STAGES`-th rising edge, counting that one. A new product can start every
cycle. `stage_en` shows which register stages load in the current cycle.

The module's default is four stages of 2-bit digits, which is the generic
gating picture. The filter uses two stages of 4-bit digits: a product is
split into two pipeline halves.

## Variable-precision filter (`vp_fir`)

The filter is in transposed form. Every sample `x(n)` is broadcast to all
eight multipliers, with the sample as the gated operand `b`. A sample below
16 therefore leaves the second stage of every multiplier idle, and a zero
sample leaves both stages idle. The products enter a chain of registered
adders. The product of `h[7]` is registered, and each later link adds the
product of the next lower tap. The last link holds

    y(n) = sum_{k=0..7} h[k] * x(n-k)        (19 bits, no overflow)

Each chain adder (`vp_adder`) gates its own upper half. The lower half is
added and registered every cycle. The upper-half register loads only when
an upper operand bit is set or the lower half carries out. An output
multiplexer shows zeros in the upper half when it was not loaded.

Latency: `y(n)` is valid after the third rising edge, counting the one that
takes `x(n)`. That is two cycles for the multiplier and one for the chain.
The filter takes one sample per clock. The reset is synchronous and active
high, and it clears all state. The filter then starts from `x = 0`.

## DPDT adder (`dpdt_adder`)

The adder is 16 bits, cut between bits 7 and 8. The LSP adder always runs.
The adder is closed when bits 15..7 of `a` are all equal and bits 15..7 of
`b` are also all equal. Then each operand is an 8-bit number sign-extended,
and the true sum fits in 9 bits. Its bit 8 is

    sign = a[7] ^ b[7] ^ cout_lsp

While closed, the adder does three things:

* the latches on `a[15:8]` and `b[15:8]` hold their previous values, so the
  MSP adder sees no transition and does not switch or glitch;
* the carry into the MSP is blocked;
* the sign-extension unit drives `sum[15:8]` with `sign`, and `cout` is
  formed from the two sign bits and `cout_lsp`.

While the adder is open, the latches are transparent and the MSP adds with
the LSP carry. In both modes, `sum` and `cout` equal an ordinary 16-bit
addition of `a + b + cin`. The latches are intended. They are the
mechanism, and lint tools will report them. The module is combinational
apart from the latches, and parameterised in width and cut.

## Booth multiplier with DPDT (`booth_ppg`, `dpdt_booth_mult`)

`booth_ppg` forms the multiples +A, -A, +2A and -2A of the 16-bit
multiplicand, each 17 bits wide. It has eight multiplexers, one per radix-4
digit of `b` (bits `b[2i+1], b[2i], b[2i-1]`). Each picks 0, ±A or ±2A as
partial product `P_i`, of weight 4^i.

The four upper multiplexers take the multiples through latches:

* P7 and P6 through a latch closed by `close1` (`b[15:11]` all equal);
* P5 and P4 through a latch closed by `close2` (`b[15:7]` all equal).

When `b` is only sign extension above bit 7, those Booth digits are all
zero and their multiplexers output zero. The closed latches keep changes
of the multiples from reaching them.

`dpdt_booth_mult` adds the partial products in a tree. In every adder, the
second operand has the larger weight and is shifted left first.

| level | adders | inputs | output width |
|---|---|---|---|
| 1 | A1 = P0 + P1<<2, A2 = P2 + P3<<2, D1 = P4 + P5<<2, D2 = P6 + P7<<2 | 17-bit | 20 |
| 2 | A3 = A1 + A2<<4, D3 = D1 + D2<<4 | 20-bit | 24 |
| 3 | A4 = A3 + D3<<8 | 24-bit | 32 (product) |

A1 to A4 are ordinary adders. D1, D2 and D3 carry the upper partial
products and are DPDT adders, each cut at half its width. With a small `b`,
their inputs are zero and they stay closed. The multiplier is combinational.
It is exact for all signed operands except `a = -32768`: with a digit of
-2, that value would need an 18-bit partial product.

## DPDT filter (`dpdt_fir`)

This is a direct-form filter. The 8-bit sample runs down a delay line of
seven registers. Tap k multiplies `x(n-k)`, sign-extended to 16 bits as the
Booth operand, by the 16-bit coefficient `h[k]`. A chain of seven 32-bit
DPDT adders, cut at 16 bits, sums the products from tap 0 upward, and the
result is registered. After the rising edge that takes `x(n)`:

    y = sum_{k=0..7} h[k] * x(n-k)   (32-bit two's complement)

An 8-bit sample never needs the upper Booth digits. So in this filter, all
Booth latches and all D1, D2 and D3 adders stay closed throughout. The
chain adders close whenever both the partial sum and the product fit in 16
bits. The `*_close` outputs expose every close flag. The reset is
synchronous and active high, and it clears the delay line and `y`.

## Top level (`lpfir_top`)

| port group | direction | meaning |
|---|---|---|
| `clk`, `rst` | in | shared clock; synchronous, active-high reset |
| `vp_x[7:0]`, `vp_h[8][7:0]` | in | VP filter sample and coefficients (unsigned) |
| `vp_y[18:0]` | out | VP output, 3 cycles of latency |
| `vp_mult_stage_en[8][1:0]`, `vp_add_hi_en[6:0]` | out | which VP registers load this cycle |
| `dp_x[7:0]`, `dp_h[8][15:0]` | in | DPDT sample and coefficients (signed) |
| `dp_y[31:0]` | out | DPDT output, registered |
| `dp_mult_ppg_close[8][1:0]`, `dp_mult_add_close[8][2:0]`, `dp_add_close[6:0]` | out | DPDT close flags |

Sizes are in `lpfir_pkg`.

## What follows the published design and what does not

These points follow the published design:

* two 8-tap filters;
* in the VP filter, 8-bit words, multipliers split into two gated pipeline
  stages, a fixed latency through bypass registers and an output
  multiplexer, and the transposed adder chain;
* in the DPDT filter, the 16-bit adder cut at 8/8 with latches, a gated
  carry and a sign-extension unit;
* the 16-bit radix-4 Booth multiplier with two latch groups, 17-bit partial
  products, and the A1/A2/D1/D2/A3/D3/A4 tree with widths 20, 24 and 32;
* the direct-form DPDT filter with an 8-bit input, 16-bit coefficients and
  a 32-bit output.

These are this design's own choices:

* how a product is split over stages (one digit of the sample per stage)
  and the rule that gates a stage;
* clock enables in place of gated clocks;
* the inside of the variable-precision adder, which the published design
  names but does not describe;
* unsigned arithmetic in the VP filter, and the sample rather than the
  coefficient as the gated operand;
* the exact close conditions, and which multiplexers each latch guards;
* the LSP/MSP cut of the multiplier's DPDT adders and of the chain adders;
* the carry-out formula of a closed adder;
* the registered DPDT output and the synchronous resets;
* coefficients as input ports. No coefficient sets or filter responses are
  specified.

Known limits and departures:

* In the Booth multiplier, the published text says the third level's output
  is sign-extended by 6 bits. The widths 24 → 32 and the weights need a
  shift of 8, so a shift of 8 is used.
* The multiplicand value -32768 is not supported (see above).
* The published simulation of the DPDT filter shows a separate close clock
  (`close_clk`). Its role is not described. Here the close signals come from
  the data range alone.
* Nothing here reproduces the FPGA results: frequency, power, delay and
  gate count.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For
example:

    verilator --binary --timing --assert -Irtl -y rtl --top-module lpfir_top_tb \
        tb/lpfir_top_tb.sv rtl/lpfir_pkg.sv
    obj_dir/Vlpfir_top_tb

The testbenches do the following:

* `lpfir_top_tb` runs both filters at full size against reference sums. It
  counts every mechanism: a fully gated multiplier, a bypass result, full
  precision, an adder upper half gated and live, closed Booth latches,
  closed multiplier adders, chain adders closed and open, and reset.
* `vp_mult_tb` checks the products and the fixed latency for four and for
  two stages. It also checks that each stage's enable matches the operand's
  precision, and that a gated stage's registers hold.
* `dpdt_adder_tb` and `booth_ppg_tb` check that a closed part's latches do
  not change.
* The remaining testbenches check their block against exact arithmetic.

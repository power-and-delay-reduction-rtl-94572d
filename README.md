# 16-bit carry select adder with time-shared D-latch groups

A carry select adder (CSLA) splits a wide addition into groups. Every group
above the lowest one computes its result twice, once assuming a carry-in of 0
and once assuming 1, and the real carry from the group below only has to pick
one of the two through a multiplexer. That removes the long carry ripple, at
the cost of a second adder (or an add-one circuit) in every group.

This design removes the second adder in a different way: each upper group has
**one** ripple carry adder, and **the clock is its carry input**. While the
clock is high the adder produces `a + b + 1`; while it is low it produces
`a + b + 0`. D-latches catch each result in its own half of the cycle, and a
2:1 multiplexer per bit picks the right one with the incoming carry. Two
additions are done by one adder in one clock cycle.

## Structure

```
 bits   15..11     10..7      6..4       3..2       1..0
       +--------+ +--------+ +--------+ +--------+ +-------+
       | group5 | | group4 | | group3 | | group2 | | group1|<- cin
       | 5 bit  | | 4 bit  | | 3 bit  | | 2 bit  | | 2-bit |
       |dl_group| |dl_group| |dl_group| |dl_group| |  rca  |
       +--------+ +--------+ +--------+ +--------+ +-------+
  cout <--+   ^------+   ^------+   ^------+   ^-----+
        (selected carry of each group is the select of the next)
```

| group | bits   | module     | latch bits |
|-------|--------|------------|-----------:|
| 1     | 1:0    | `rca`      | 0          |
| 2     | 3:2    | `dl_group` | 5          |
| 3     | 6:4    | `dl_group` | 7          |
| 4     | 10:7   | `dl_group` | 9          |
| 5     | 15:11  | `dl_group` | 11         |

The lowest group is an ordinary 2-bit ripple carry adder fed by `cin`. The
group widths live in `csla_pkg::GROUP_W`. The 2-bit first and second groups
follow the original description of the adder. The 3/4/5 split of the other 12
bits is this design's choice: it is the usual square-root split, and it gives
exactly 32 latch bits, which matches the register count reported for the
original implementation.

## Inside one D-latch group (`dl_group`)

For a group of width W:

* one W-bit ripple adder (`rca`, a chain of `full_adder`s) whose carry input is
  `clk`;
* W + 1 latches enabled by `clk`: the carry-in-1 sum and its carry;
* W latches enabled by `~clk`: the carry-in-0 sum;
* a (W+1)-bit 2:1 multiplexer (`mux2`; for W = 2 this is a 6:3 mux) choosing
  `{carry, sum}` by `sel`, the carry coming from the group below.

There is no latch for the carry-in-0 carry. That carry is taken straight from
the adder, which is computing the carry-in-0 result exactly while the clock is
low, when the output is used. This gives 2W + 1 latches per group: five for the
2-bit group.

## Timing: when is the sum valid?

This is the part that needs care when using the adder.

1. Apply `a`, `b` and `cin` at a rising clock edge and hold them for the whole
   cycle.
2. **High half:** every group adder computes `a + b + 1`. The carry-in-1
   latches are transparent and follow it. The outputs are **not** valid: the
   carry-in-0 path still shows the previous operands' sum, and the adder is
   computing with carry-in 1.
3. **Low half:** the carry-in-1 latches hold. The adders compute `a + b + 0`,
   and the carry-in-0 latches follow. The carry out of group 1 (plain
   combinational) ripples up through the select muxes. `sum` and `cout` are
   valid here and should be sampled at the next rising edge.

So the adder accepts one pair of operands per clock cycle and delivers its
result by the end of that same cycle. Each half period must be long enough for
the widest group adder (5 bits) to settle. The low half must also cover the
2-bit ripple of group 1 plus one mux per upper group. Operands that change
in the middle of a cycle give a wrong result for that cycle.

The latches and the clock-as-data connection are intentional. Static timing
tools and clock-tree flows treat such a structure specially (clock fanning into
data logic, time borrowing through latches), so expect to constrain it by hand.

## Files

| file | what it is |
|------|-----------|
| `rtl/csla_pkg.sv`   | word width, number of groups, group widths, `group_lsb()` |
| `rtl/dl_csla16.sv`  | the 16-bit adder (top) |
| `rtl/dl_group.sv`   | one D-latch carry select group |
| `rtl/rca.sv`        | W-bit ripple carry adder |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/d_latch.sv`    | W-bit level-sensitive latch (`always_latch`) |
| `rtl/mux2.sv`       | W-bit 2:1 multiplexer |
| `tb/tb_*.sv`        | one self-checking testbench per module |

Top-level ports of `dl_csla16`: `clk`, `a[15:0]`, `b[15:0]`, `cin` in;
`sum[15:0]`, `cout` out. There is no reset: every latch is rewritten in each
half cycle, so nothing stale can be selected once a full cycle has passed.

## Verification

Each testbench compares the outputs with values it computes itself. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_full_adder`, `tb_mux2`: exhaustive.
* `tb_rca`: exhaustive at 2 and 5 bits.
* `tb_d_latch`: transparency while enabled, hold while disabled and `d` changes.
* `tb_dl_group`: 2-bit and 5-bit groups, 2000 cycles. In the low half of every
  cycle it checks both select values. With `sel = 1` the result must come from
  the latches, while the adder is already computing with carry-in 0.
* `tb_dl_csla16`: the full 16-bit adder at its default configuration. It runs
  directed corner cases (all ones, a carry that ripples through every group,
  repeated operands) and 20 000 random additions. Each result is checked one
  time unit before the next rising edge. It counts how often each upper group
  was selected with carry 0 and with carry 1, and both values of `cin` and
  `cout`. A case that never occurred counts as a failure.

Running one with Verilator (5.x, timing enabled):

```
verilator --binary --timing -Irtl -y rtl rtl/csla_pkg.sv tb/tb_dl_csla16.sv \
          --top-module tb_dl_csla16
./obj_dir/Vtb_dl_csla16
```

Synthesis of `dl_csla16` with Yosys gives 32 latch bits, no flip-flops, and
the XOR/AND/OR gates of the 16 full adders plus the select muxes.

## Where this departs from, or adds to, the original description

* **Group widths 3/4/5** of the three top groups are chosen here (see above).
* **`cin` port.** A carry input into the lowest group is added so the adder can
  be chained. With `cin = 0` it is a plain 16-bit adder.
* **Select chain.** Each upper group is selected by the selected carry of the
  group directly below, as in any square-root CSLA. The description only says
  that the carry of the previous stage drives the multiplexer.
* **Carry-in-0 carry.** It is taken from the adder, not latched. The
  description counts five latches in a 2-bit group (four sum, one carry) and
  says that for carry-in 0 the adder itself is used, so this design follows it.
* **Not included:** the conventional CSLA (two ripple adders per group) and the
  binary-to-excess-1 (BEC) CSLA. They are the baselines this adder is compared
  against. Also not included is an FIR filter that uses this adder: it is
  mentioned as an application, but no filter structure is specified.
* The reported area, delay and power figures are for an FPGA implementation.
  They have not been reproduced. Only the latch count (32) has been
  cross-checked.

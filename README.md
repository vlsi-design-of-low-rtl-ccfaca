# Low-power pipelined MAC unit with block enabling

A multiply-accumulate (MAC) unit computes `sum a_k * b_k`. DSP kernels such as
FIR filters run it over and over. This MAC saves power with *block enabling*.
The datapath is a chain of blocks: operand registers, multiplier, product
register, adder and accumulator register. Each block switches only in the clock
cycle when its input data is actually there. The rest of the time, the block's
combinational inputs are forced to zero and its registers hold. An idle block
therefore has no switching activity, even while the rest of the chain is busy.

The main configuration multiplies unsigned 4-bit operands and adds up to four
products in a 10-bit accumulator. Set the parameter `N = 8` to get the 8-bit
variant: 8-bit operands, a 16-bit product, a 17-bit product register and adder,
and an 18-bit accumulator.

The arithmetic is built from small cells on purpose:
- a full adder made of 2:1 multiplexers, with an enable;
- a half adder;
- AND gates;
- an array multiplier made of these cells;
- a ripple-carry adder;
- a register-file cell with separate write and read selects.

The original circuits are custom CMOS cells (transmission gates, a MUX-based
full adder, clock-gated registers). This RTL keeps their logic function and
their structure. It does not model their transistors or power.

## Datapath

```
 a[N-1:0]  b[N-1:0]
    |         |
 [reg A]   [reg B]         N bits each                  en_1
     \       /
  [N x N array multiplier]  2N-bit product               en_2
          |
  [product register]        2N+1 bits (top bit 0)        en_3
          |
  [(2N+1)-bit ripple adder] + half adder for bit 2N+1   en_4
          |        ^
          |        |  feedback, ANDed with fb_en
  [accumulator register]    2N+2 bits, register-file cells   en_5
          |
       acc_out              read port, 0 unless acc_valid
```

| N | operands | product | product reg / adder | accumulator | worst 4-term sum |
|---|----------|---------|---------------------|-------------|------------------|
| 4 (default) | 4 | 8 | 9 | 10 | 4*15*15 = 900 < 1024 |
| 8 | 8 | 16 | 17 | 18 | 4*255*255 = 260100 < 262144 |

The accumulator is two bits wider than the product. That is exactly enough
for four full-scale products. This is why one sum holds at most four terms
(`MAX_TERMS = 4`), and the accumulator can never overflow. An assertion in
`mac_unit` checks this. The adder is one bit narrower than the accumulator.
The top accumulator bit comes from a half adder that combines the adder's
carry-out with the top feedback bit.

## Block enabling and pipeline timing

`control_logic` generates the five block enables, named `en_1` to `en_5` in
pipeline order (`mac_pkg::stage_en_t`). A term is one operand pair. It travels
through the pipeline as a valid bit, and every block is enabled exactly one
stage delay (one clock) after the block before it:

```
cycle        t          t+1            t+2            t+3
in_valid     1
en_1         1  (A, B written at the end of t)
en_2, en_3              1  (multiply, product register written)
en_4, en_5                             1  (add, accumulator written)
acc_valid                                             1  if the term closed a sum
```

- **Combinational blocks** (the multiplier, and the adder with its full
  adders) pass their inputs through AND gates with their enable. While
  disabled, they compute 0 from all-zero inputs.
- **Registers** load only when enabled. The source design gates their clocks.
  Here that is written as a load enable, which synthesis may map back to a
  clock gate.
- A new term may enter every clock. The throughput is one product per clock,
  and the latency from operands to finished sum is three clocks.
- When no term is in flight, all five enables are 0.

The source design also switches off the supply of idle blocks. Power gating
has no logic-level equivalent, so it is not modelled.

## Accumulation protocol

Drive `a`, `b` with `in_valid = 1` for one cycle per term. Set `in_last = 1`
on the term that closes the sum. A sum closes on `in_last`, or on its fourth
term in any case. The next term then starts a new sum.

The first term of a sum must not add the old accumulator value. The control
logic therefore keeps a `first` flag alongside the valid bit. In the adder
stage it drives `fb_en = 0`, and the AND gates on the feedback path then zero
the accumulator value for that term. `term_cnt` tells how many terms of the
open sum have been accepted so far.

The accumulator register is built of register-file cells. Its read select is
raised for exactly the one cycle after a closing term is written. That is when
`acc_valid = 1` and `acc_out` shows the sum. At all other times the read port
drives 0. In the transistor cell this is a tristate buffer; two-state RTL
drives 0 instead. The cell's stored value feeds the adder directly.

## Arithmetic cells

**Full adder** (`full_adder`). The three inputs are ANDed with `en`, and the
adder itself is three multiplexers:

```
p = b ? ~a : a;     sum = p ? ~cin : cin;     carry = p ? cin : a;
```

**Array multiplier** (`array_multiplier`, any `N >= 2`). The partial-product
bit `a[j] & b[i]` has weight `i+j`. The array works like this:
- Row 0 is `a & b[0]`.
- Rows 1 to N-1 are carry-save rows of N full adders. The adder in column `j`
  of row `i` adds three bits: the partial product `a[j] & b[i]`, the sum from
  column `j+1` of the row above, and the carry from column `j` of the row
  above. The carries of row 1 are 0.
- The column-0 sums are the product bits `p[0]` to `p[N-1]`.
- A final ripple row forms `p[N]` to `p[2N-1]`. It is a half adder, then N-2
  full adders, then a half adder.

Only this final row has a carry chain.

**Ripple-carry adder** (`ripple_carry_adder`): W full adders sharing one
enable, with the carries chained.

## Files

| file | content |
|------|---------|
| `rtl/mac_pkg.sv` | default sizes, `stage_en_t`, width functions |
| `rtl/mac_unit.sv` | top: the pipelined MAC |
| `rtl/control_logic.sv` | enable sequencer, term counter, read select |
| `rtl/array_multiplier.sv` | NxN unsigned array multiplier with enable |
| `rtl/ripple_carry_adder.sv` | W-bit ripple-carry adder with enable |
| `rtl/full_adder.sv`, `rtl/half_adder.sv`, `rtl/and_gate.sv` | cells |
| `rtl/enable_register.sv` | operand and product registers |
| `rtl/reg_file_cell.sv`, `rtl/acc_register.sv` | accumulator register |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mac_unit_8bit` |

## Departures and open points

- **Pipelined, not single-cycle.** The source describes the whole
  multiply-and-accumulate as happening in one clock cycle. It also shows a
  pipelined, block-enabled version with a register between the multiplier and
  the adder. This RTL follows the pipelined version.
- **Stage delays.** The source enables each block "after the expected delay"
  of the block before it, but gives no delays. Here every delay is one clock.
- **Widths.** Some descriptions give the accumulator register 8 or 9 bits and
  the adder 8 bits. This RTL uses the widths of the architecture diagram,
  9/9/10 bits, which also match the stated 8-bit variant (17/17/18 bits).
- **Feedback register.** The architecture diagram has a separate 10-bit
  feedback register beside the accumulator register. Here the accumulator
  register feeds the adder itself.
- **This design's own choices.** The `in_valid`/`in_last` handshake, the
  forced close after four terms, the clearing of the feedback on a sum's first
  term, the read-select timing, and the asynchronous active-high reset `rst`
  that clears every register.
- **Not modelled.** The memory that supplies operands and receives results
  (operands and result are plain ports), power gating, and every
  transistor-level property: power, transistor count, transmission-gate
  implementation.

## Verification

Each testbench compares its block with an independently computed reference
and prints `TB_RESULT checks=<n> failures=<n>`:
- The cells and the multiplier are checked exhaustively. The 4x4, 2x2 and 5x5
  multipliers are exhaustive; the 8x8 multiplier is checked with random and
  corner operands.
- The registers and `control_logic` are checked against cycle models.
- `tb_mac_unit` (default size) and `tb_mac_unit_8bit` (N = 8) run 3000 cycles
  of random terms, gaps and sum lengths, followed by full-scale sums. Every
  cycle they check the enables, `term_cnt`, `acc_valid` (exactly three clocks
  after the closing term) and `acc_out`. They also require that each of these
  occurred at least once: a sum closed at four terms, a sum closed early, a
  one-term sum, back-to-back terms, idle cycles with every block off, and a
  full-scale sum.

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mac_pkg.sv tb/tb_mac_unit.sv \
    --top-module tb_mac_unit -Mdir obj_mac
./obj_mac/Vtb_mac_unit
```

To change the operand width, set `N` on `mac_unit`. The product register,
adder and accumulator widths follow from `mac_pkg::prod_reg_width` and
`mac_pkg::acc_width`. `MAX_TERMS` may be lowered, but not raised above 4:
the accumulator width only guarantees four products.

# Two-stage pipelined shift-and-add multiplier (8 x 8 -> 16 bits)

An unsigned 8 x 8 multiplier built on the shift-and-add rule, cut into two
pipeline stages so that each clock cycle has only half of the partial-product
work in it. Each stage handles four of the eight multiplier bits. The clock can
then run at about twice the rate of a single-cycle version of the same
multiplier. The cost is the pipeline register between the stages: more area
and more power. A product leaves the pipeline two cycles after its operands
went in, and a new pair of operands may enter on every cycle.

## Shift and add, and where the pipeline cuts it

For operands `a` (multiplicand) and `b` (multiplier) the product is

    p = sum over i = 0..7 of  b[i] ? (a << i) : 0

Each term is a partial product. A control check on multiplier bit `i` decides
whether the term is the multiplicand shifted to weight `2^i` or zero. Zero
terms need no addition. A serial shift-and-add multiplier makes one term per
step and shifts the multiplicand by one place between steps. Here the shifts
are fixed wiring, so a whole group of terms is formed at once.

The eight terms are split into two groups of four:

| cycle | stage | work | result |
|-------|-------|------|--------|
| 1 | `mult_stage1` | terms for `b[3:0]` (weights 1, 2, 4, 8), summed | `s1_sum = a * b[3:0]` (12 bits) |
| 2 | `mult_stage2` | terms for `b[7:4]` (weights 16..128), added to `s1_sum` | `p = a * b` (16 bits) |

Between the stages a register holds everything stage 2 still needs: the valid
bit, `a`, `b[7:4]` and the 12-bit partial sum. Stage 1 needs only the low half of `b`,
so the high half rides along in the register. At the end of stage 2 the 16-bit
product is registered. The two registers are the two pipeline stages.

```
 a,b ──► pp_gen(bits 0-3) ─► pp_adder(0 + 4 terms) ─►┐ stage-1 register
                                                     │ {valid, a, b[7:4], s1_sum}
         pp_gen(bits 4-7) ◄──────── a, b[7:4] ───────┤
              │                                      │
              └────► pp_adder(s1_sum + 4 terms) ◄────┘
                              │
                       output register ─► out_valid, p
```

## Timing

- Operands and `in_valid` are sampled on a rising edge, say edge *k*.
- `p` and `out_valid` show the product after edge *k+1*. The latency is 2 cycles.
- One operation may enter per cycle. A cycle with `in_valid` low travels
  down the pipe as a cycle with `out_valid` low.
- `p` keeps its last value while `out_valid` is low, because the data
  registers load only for valid operations.
- `rst_n` is asynchronous and active low. It clears both valid bits and all
  data registers, so whatever is in flight is dropped.

There is no stall and no back-pressure: the consumer must take every product
in the cycle that `out_valid` is high.

## Modules

| file | role |
|------|------|
| `rtl/mul_pkg.sv` | default sizes: `A_W_DEF = 8`, `B_W_DEF = 8`, `GROUP_DEF = 4`, `P_W_DEF = 16` |
| `rtl/pp_gen.sv` | control check and shift for `GROUP` multiplier bits at weight `OFFSET`; combinational |
| `rtl/pp_adder.sv` | adder block: `sum_in` plus `GROUP` partial products; combinational |
| `rtl/mult_stage1.sv` | stage 1 and the register between the stages |
| `rtl/mult_stage2.sv` | stage 2 and the output register |
| `rtl/pipelined_mult.sv` | top: `clk, rst_n, in_valid, a[7:0], b[7:0]` in, `out_valid, p[15:0]` out |

The top's parameters are `A_W`, `B_W` and `GROUP`. `GROUP` is the number of
multiplier bits handled by stage 1, and stage 2 takes the other `B_W - GROUP`
bits. The 8/8/4 defaults are the intended configuration. Other sizes elaborate,
but only the defaults are tested end to end.

## What is specified and what was chosen here

These parts come from the description of the design:
- the shift-and-add rule;
- the per-bit control that replaces a term by zero when the bit is 0;
- 8-bit operands and a 16-bit product;
- two stages, the first working on bits 0-3 and the second on bits 4-7;
- an adder block that produces the final 16-bit result.

These are choices made for this RTL:
- **Valid bit.** A valid bit travels with each operation, and there are
  `in_valid`/`out_valid` ports.
- **Reset.** The reset is asynchronous and active low.
- **Unsigned operands.**
- **No input register.** The operands go straight into stage 1, and the
  pipeline registers are the ones between the stages and at the output.
- **Adders in both stages.** Each stage has its own adder, and only a 12-bit
  partial sum crosses the stage register. The alternative is to carry four
  raw partial products across and do all the addition in stage 2.
- **Adder structure.** Each adder is a plain chain of word additions, and
  synthesis chooses how to build it.

For reference, the 180 nm implementation this design is modelled on was
reported at about 645 MHz for the pipelined multiplier. The same multiplier
without the pipeline register was reported at about 323 MHz. That implementation
was 312 cells against 169 and drew 550 µW against 466 µW. These are
results of a particular standard-cell flow. The RTL alone neither reproduces
nor checks them. The single-cycle multiplier they are compared with is not part
of this RTL. The chip-level IO and corner pads of that implementation are not
included either: `pipelined_mult`'s ports are plain signals.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `pp_gen_tb` tries every 8-bit multiplicand with every 4-bit group, at
  offsets 0 and 4.
- `pp_adder_tb` uses random words and all-ones words, so that carries run the
  full length of the word.
- `mult_stage1_tb` and `mult_stage2_tb` check the contents of each register
  cycle by cycle. They also check that data holds while valid is low, and
  that reset clears the registers.
- `pipelined_mult_tb` runs the top at its default parameters. It multiplies
  all 65,536 operand pairs in shuffled order, back to back with random gaps.
  Every product is compared with `a * b`, and its latency must be exactly 2
  cycles. A 200-operation burst must give 200 products in a row. Finally a
  reset with a full pipeline must produce nothing afterwards. The test also
  counts how often each case occurs, and each count must be non-zero:
  back-to-back issue, gaps, a zero low half, a zero high half, and the reset
  flush. A zero half means every partial product of one stage is skipped.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mul_pkg.sv tb/pipelined_mult_tb.sv --top-module pipelined_mult_tb -o sim
./obj_dir/sim
```

The full run takes well under a second.

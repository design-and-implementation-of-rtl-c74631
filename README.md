# Modified iterative logarithmic multiplier

A 16 × 16-bit unsigned multiplier that never multiplies. It finds the leading
'1' of each operand, shifts and adds, and gets a close approximation of the
product. Then it feeds the error of that approximation back through the same
hardware until the error is gone. The result is the exact 32-bit product. The
bulk of the logic is one pipelined "basic block" that is used again and
again: there is no chain of correction stages.

## The arithmetic

Write each operand as its leading one plus a residue, `N = 2^K + R`, where `K`
is the position of the most significant '1' and `R = N - 2^K` is everything
below it. Then

```
N1 * N2 = 2^(K1+K2) + R1*2^K2 + R2*2^K1   +   R1*R2
          \_______________________________/   \___/
                 approximation P(0)           error E(0)
```

`P(0)` needs only leading-one detection, two shifts, a decode and two
additions. This is the logarithmic (Mitchell-style) approximation. It is
never larger than the true product and is at most 25 % below it. The error
`E(0) = R1*R2` is itself a product, of the two residues. So the same
procedure gives its approximation `C(1)` and a smaller error `E(1)`, and so
on:

```
N1 * N2 = P(0) + C(1) + C(2) + ... + C(i) + E(i)
```

Each round removes one '1' from each operand. Once one residue has no '1'
left, the error is zero and the sum is exact. A product therefore takes

```
T = number of '1' bits in the operand that has fewer of them   (T >= 1)
```

terms. For 16-bit operands T ranges from 1 (a zero or a power of two) to 16
(`0xFFFF * 0xFFFF`). After `i` correction terms the relative error of the
running sum is at most `2^-(2i+2)`: 25 %, 6.25 %, 1.56 %, 0.39 %, …

Worked example, 106 × 42:

| term | operands | K1, K2 | value | running sum |
|---|---|---|---|---|
| P(0) | 106, 42 | 6, 5 | 2048 + 42·32 + 10·64 = 4032 | 4032 |
| C(1) | 42, 10 | 5, 3 | 256 + 10·8 + 2·32 = 400 | 4432 |
| C(2) | 10, 2 | 3, 1 | 16 + 2·2 + 0·8 = 20 | 4452 = 106·42 |

After C(2) the second residue is 0, so the product is complete after T = 3
terms. 42 has three '1' bits.

## One block, used recursively

```
          m1 ──►┌──────────────┐ n1   ┌─────────────────────────────┐ p  ┌─────────────────┐
                │ select_logic ├─────►│                             ├───►│ recursive_adder ├──► p_approx
          m2 ──►│   (× 2)      │ n2   │ basic_block (4 stages)      │    │ (accumulator)   ├──► p_result
                └──▲───┬───▲───┘─────►│                             │    └─────────────────┘
                   │   │   │          └────┬────────────────────────┘
               sel │   │res_zero           │ res1, res2 (stage-1 register)
                ┌──┴───▼───┴──┐            │
 in_valid ─────►│recursive_ctrl│◄──────────┘
 in_ready ◄─────└─────────────┘
```

- **select_logic** (one per operand) passes either the new multiplicand
  (`sel` high) or the residue fed back from the basic block (`sel` low). Its
  status output flags a zero residue: no further correction is needed.
- **recursive_ctrl** looks at the residues in the basic block's first
  pipeline register. If they are valid and both non-zero, it selects them
  and issues the next correction term. New operands wait (`in_ready` low).
  Otherwise it selects, and accepts, the next operand pair.
- **basic_block** computes one term per clock in a four-stage pipeline. Each
  term carries a small tag (`valid`, `first`, `last`, see `ilm_pkg`). `last`
  is set in stage 1 when either residue is zero.
- **recursive_adder** restarts its sum on a `first` term and adds every other
  term. It shows the running sum every clock and the finished product on a
  `last` term.

The residue loop spans only the first pipeline stage. So a new term, and
with it a better approximation, enters every clock. The three later stages
of one term overlap with the first stages of the following terms.

## The basic block pipeline

| stage | logic | register holds |
|---|---|---|
| 1 | 2 × leading-one detector with zero detector, 2 × encoder | K1, K2, residues R1, R2, zero flag, tag (residues go back to the select logic from here) |
| 2 | K1 + K2; 2 × 32-bit barrel shifter: R1·2^K2, R2·2^K1 | K12, both shifted residues |
| 3 | decoder 2^K12; adder R1·2^K2 + R2·2^K1 | both values |
| 4 | adder of the two | term `p` |

If either operand is zero, the zero flag blanks the decoder and the residue
sum, so the term is 0. A zero operand gives a one-term product of 0.

## Interface and timing (`modified_ilm`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous reset, active high |
| `in_valid` / `in_ready` | in / out | 1 | operand handshake: a pair is taken on a rising edge where both are high |
| `m1`, `m2` | in | 16 | unsigned multiplicands |
| `approx_valid`, `p_approx` | out | 1, 32 | running approximation P(0), P(0)+C(1), …; one update per clock |
| `result_valid`, `p_result` | out | 1, 32 | exact product, one-clock pulse |
| `result_terms` | out | 6 | T, the number of terms that were summed |

Number the rising edge that takes the operands edge 1:

- P(0) is at the basic block's output after edge 4.
- `p_approx` shows P(0) after edge 5 and one more term after each later edge.
- `p_result` / `result_valid` appear after edge T + 4.
- `in_ready` is low during the T − 1 clocks that issue correction terms. The
  next pair can be taken on edge T + 1, so back-to-back products use the
  basic block every clock.

`in_ready` depends only on registers, not on `in_valid`.

## Where this RTL makes its own choices

- **Iteration count.** The controller iterates until a residue is zero, with
  no cap. This is what makes the result exact. A 16-bit product can
  therefore take up to 16 terms, so its result needs up to 20 clocks. The
  description this design follows also quotes "1 to 7 clock cycles" for the
  result. That figure does not fit the exact-result rule above and is not
  implemented.
- **Handshake.** The design adds the `in_valid`/`in_ready` handshake. It
  adds the tag that carries `first` and `last` down the pipeline. It adds
  the `result_terms` output.
- **Recursive adder.** Its structure is not specified. It is one adder and
  an accumulator register, which costs one clock after the basic block.
- **Reset and blocks.** Reset is synchronous and active high. The internal
  structures of the leading-one detector (prefix-OR), the encoder (OR
  network) and the adders (`+`) are this design's choices.
- **Operands.** They are unsigned. Signed multiplication is not covered.

The width is a parameter (`N`, default 16). The product grid and
shift-amount widths follow from it.

## Files

| file | content |
|---|---|
| `rtl/ilm_pkg.sv` | shared width helper and the term tag struct |
| `rtl/lod.sv` | leading-one detector with zero detector |
| `rtl/lod_encoder.sv` | one-hot to bit-position encoder |
| `rtl/barrel_shifter.sv` | logarithmic left shifter |
| `rtl/k_decoder.sv` | K1+K2 to 2^(K1+K2) decoder with enable |
| `rtl/ilm_adder.sv` | adder with carry-out |
| `rtl/basic_block.sv` | four-stage basic block |
| `rtl/select_logic.sv` | operand / residue selector with zero status |
| `rtl/recursive_ctrl.sv` | iterate-or-load control |
| `rtl/recursive_adder.sv` | term accumulator |
| `rtl/modified_ilm.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Verification

Each testbench checks against values it computes itself. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_lod`: all 65 536 operands.
- `tb_lod_encoder`, `tb_k_decoder`, `tb_recursive_ctrl`: every input.
- `tb_barrel_shifter`, `tb_ilm_adder`, `tb_select_logic`: random and corner
  values.
- `tb_recursive_adder`: random term groups; checks the running sum, the
  result, the term count and the one-clock latency.
- `tb_basic_block`: a random operand stream. Checks the residues after one
  clock, the term after exactly four clocks, the tags, and that
  `P + R1·R2 = N1·N2`.
- `tb_modified_ilm`: about 4 000 products at the default size, including
  106×42, 234×198, 0xFFFF×0xFFFF, zeros and powers of two. For each product
  it checks:
  - the exact product;
  - T;
  - the T + 4 latency;
  - every intermediate approximation, against `N1·N2 − R1(i)·R2(i)` and the
    `2^-(2i+2)` error bound.

  It also requires each of these to happen at least once: input stalls,
  back-to-back loads, zero operands, single-term products, products of more
  than seven terms, the 16-term worst case.

- `tb_ilm_error_table`: streams 20 000 products, random and dense all-ones,
  back to back. It measures the worst relative error of `p_approx` after i
  correction terms and prints it next to the bound:

  | correction terms | worst error seen | bound |
  |---|---|---|
  | 0 | 24.999 % | 25 % |
  | 1 | 6.249 % | 6.25 % |
  | 2 | 1.562 % | 1.5625 % |
  | 3 | 0.390 % | 0.391 % |
  | 4 | 0.0976 % | 0.0977 % |
  | 5 | 0.0244 % | 0.0244 % |

  It checks that every approximation is within its bound and that every final
  result is exact.

Design assertions check the encoder's one-hot input and that no adder
overflows.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ilm_pkg.sv tb/tb_modified_ilm.sv \
          --top-module tb_modified_ilm -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. All of them finish in well
under a second.

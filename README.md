# Arbitrary-precision integer arithmetic unit: convolve and merge

Exact arithmetic needs integers of any length. Software libraries store them as
arrays of machine words and process them word by word. This unit does the same
work in hardware with one fixed p-bit multiplier (p = 64 by default). It
multiplies, adds and subtracts integers of any length up to the size of its
memories, and it convolves arbitrary-length sequences of words.

The main idea is to split multiplication into two processes that run at the
same time:

1. A **MAC process**. Write the operands as polynomials in x = 2^p:
   A = Σ A_i x^i, B = Σ B_i x^i. The product's coefficients are convolution sums:

       C_i = Σ_k A_(i-k) B_k ,   i = 0 .. n1+n2-2

   Each C_i is a sum of up to min(n1, n2) products of 2p bits. It fits in 3p
   bits: C_i = Q_low_i + Q_high_i x + Δ_i x^2.
2. A **merging process**. It turns the coefficients into the final result words
   while the MAC is still working on later coefficients:

       S_i = δ_(i-1) + Q_low_i + Q_high_(i-1) + Δ_(i-2)
       result word i = S_i mod x,   δ_i = S_i div x   (δ_i ≤ 2)

   Each new coefficient adds its low part at word i, its high part at word i+1
   and its Δ at word i+2. By the time C_i arrives, everything that can still
   land on word i is known. So word i can be written out at once. The merger
   only keeps Q_high of the last coefficient, Δ of the last two coefficients,
   and a 2-bit carry.

Both processes take one word pair per clock cycle. There is no back-pressure
and no stall. An n1 × n2-word product takes n1·n2 + 2 issue cycles plus a
fixed pipeline latency.

## Operations

| `op`      | result                               | written to the C memory                                |
|-----------|--------------------------------------|--------------------------------------------------------|
| `OP_MUL`  | A · B                                | n1+n2+1 words (the last is always 0)                   |
| `OP_ADD`  | A + B                                | max(n1,n2)+1 words                                     |
| `OP_SUB`  | A − B                                | max(n1,n2)+1 words, two's complement (top word all ones if negative) |
| `OP_CONV` | c_i = Σ a_k b_(i-k), i = 0..n1+n2−2  | nothing; 3p-bit coefficients on the `conv_*` stream    |

- Operands are unsigned.
- Operands are stored least significant word first.
- An operand has at least one word.
- For addition and subtraction, the shorter operand is read as if it were
  padded with zero words.
- Addition and subtraction skip the MAC. The operand words go straight into
  the merger: B_i takes the place of Q_high_(i-1). For subtraction the merger
  gets ~B_i and starts with a carry of 1.
- Convolution uses only the MAC. Its coefficients are the raw C_i.

## Structure

```
             start/op/n1/n2                     a_rdata  b_rdata
                   |                               |        |
            +--------------+  a_addr/b_addr   (MEM_LAT)     |
            | conv_        |---------------->  memories     |
            | scheduler    |  tag (first, last, zero) --> delay MEM_LAT
            +--------------+                         |      |
                                                     v      v
                          MUL/CONV  +-------------------------------+
                        +---------->| mac_unit                      |
                        |           |  pipelined_multiplier (p x p) |
                        |           |  nl_accumulator (3p bits)     |
                        |           +-------------------------------+
                        |                |C_i                  \ CONV: conv_valid/conv_data
                        | ADD/SUB        v
                        +---------> merger ---> c_we/c_addr/c_wdata
```

| module                 | role |
|------------------------|------|
| `ap_pkg`               | Operation enum `op_e`, schedule tag `term_tag_t` and default sizes. |
| `conv_scheduler`       | Walks the convolution schedule. It gives one slot per cycle: A index i−k, B index k, and a tag with the first/last term of each C_i. Addition gets one slot per word. Tail slots flush the merger. |
| `pipelined_multiplier` | p × p → 2p multiplier. Built from four half-width partial products over `LAT` stages. |
| `nl_accumulator`       | Sums the products of one coefficient into 3p bits, one product per cycle. |
| `mac_unit`             | Multiplier plus accumulator. Latency L_mac = MUL_LAT + 3. |
| `merger`               | Computes the S_i equation above. Latency L_merger = `LAT`. |
| `ap_arith_unit`        | Top level. Handles the command, memory addressing, the MAC bypass for add/sub, output counting and `done`. |

## The schedule

For each i from 0 to n1+n2−2, k runs from max(0, i−n1+1) to min(i, n2−1). The
scheduler issues these terms one per cycle, coefficient after coefficient.
Each coefficient may have a different number of terms. The short ones sit at
both ends of the triangle: C_0 and C_(n1+n2−2) have a single term each.
Because the merger keeps up with one coefficient per cycle, these short
coefficients do not cause stalls.

After the last coefficient of a multiplication, the scheduler issues two empty
**tail** slots. Both of their read addresses are masked to zero. They push
C_(n1+n2−1) = C_(n1+n2) = 0 through the merger. This emits the last two words,
S_(n1+n2−1) and S_(n1+n2). The second of these is always zero; it is written
because the merging equation runs to i = n1+n2. Addition gets one tail slot,
which gives the carry word. For subtraction the same slot gives the sign word.

## The accumulator (the subtle part)

A 3p-bit (192-bit) adder with a feedback loop would limit the clock. The
accumulator state is instead kept in redundant form:

- It has three p-bit chunks, `acc0`, `acc1` and `acc2`.
- Two carry flip-flops sit between the chunks, `cy0` and `cy1`.
- Each cycle, chunk 0 adds the low half of the product.
- Chunk 1 adds the high half of the product plus the carry that chunk 0
  produced one cycle earlier.
- Chunk 2 adds the carry from chunk 1.

No loop contains more than a p-bit carry chain. The state is exact at all
times, but split across chunks and pending carries.

When the last term of a coefficient is accumulated, the state (chunks plus
pending carries) is copied into a hand-off register. A two-stage resolve
pipeline then folds the carries upwards. In the same cycle, the accumulator
starts the next coefficient from zero. A coefficient is ready 3 cycles after
its last term.

Δ is kept in p bits. The carry digits of a coefficient grow as log(min(n1, n2)).
p bits of Δ are enough for any operand shorter than p·2^p bits, which is far
beyond any memory.

## The merger

The merger has two stages:

- **Stage 1** adds Q_low_i, Q_high_(i-1) and Δ_(i-2). It has no feedback.
- **Stage 2** adds the running carry δ (0..2) and holds the only loop: a p-bit
  increment by at most 2.

With `LAT = 2` (the 64-bit unit) stage 1 is registered. With `LAT = 1` (the
32-bit unit) it is combinational.

A `clear` pulse at the start of an operation resets the history registers and
loads `cin` into the carry. A word still in stage 2 when `clear` arrives
finishes with the old carry.

## Interface of `ap_arith_unit`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse; ignored while `busy` |
| `op` | in | 2 | `ap_pkg::op_e` |
| `n1`, `n2` | in | LEN_W | operand lengths in words (≥ 1) |
| `a_base`, `b_base`, `c_base` | in | ADDR_W | word address of A_0, B_0 and result word 0 |
| `busy`, `done` | out | 1 | operation running; one-cycle pulse at the end |
| `a_re`, `a_addr`, `a_rdata` | out/out/in | 1/ADDR_W/P | A read port; data MEM_LAT cycles after `a_re` |
| `b_re`, `b_addr`, `b_rdata` | out/out/in | 1/ADDR_W/P | B read port |
| `c_we`, `c_addr`, `c_wdata` | out | 1/ADDR_W/P | result write port; result word i goes to `c_base + i` |
| `conv_valid`, `conv_idx`, `conv_data` | out | 1/LEN_W+1/3P | convolution coefficient stream, `{Δ, Q_high, Q_low}` |

A, B and C can be three separate memory banks or one memory with three ports.
The read latency `MEM_LAT` must match the memory.

**Timing.**

- The first slot is issued two cycles after `start`.
- A multiplication issues n1·n2 + 2 slots back to back.
- Its last word is written MEM_LAT + L_mac + L_merger cycles after the last
  slot, and `done` follows one cycle later.
- Counted from the cycle in which `start` is raised to the cycle in which
  `done` is seen:

      multiplication   n1·n2 + 2      + MEM_LAT + L_mac + L_merger + 2
      add / subtract   max(n1,n2) + 1 + MEM_LAT + L_merger + 2
      convolution      n1·n2          + MEM_LAT + L_mac + 2

With the defaults these give the following cycle counts:

| operands | multiply | add |
|---|---|---|
| 64 bit (1 word) | 19 | 7 |
| 1024 bit (16 words) | 274 | 22 |
| 4096 bit (64 words) | 4114 | 70 |
| 10240 bit (160 words) | 25618 | 166 |

The MAC is busy on 99.9% of the cycles of a 160 × 160-word product.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `P` | 64 | word length p |
| `MUL_LAT` | 8 | multiplier stages; L_mac = MUL_LAT + 3 = 11 |
| `MERGE_LAT` | 2 | merger latency L_merger (1 or 2) |
| `ADDR_W` | 19 | memory address width: 512K-word banks |
| `MEM_LAT` | 1 | memory read latency in cycles |
| `LEN_W` | ADDR_W+1 | width of the word counts |

The defaults describe a 64-bit unit with L_mac = 11 and L_merger = 2, attached
to 512K × 64-bit memories at 100 MHz. A 32-bit unit with L_mac = 4 and
L_merger = 1 is `P = 32, MUL_LAT = 1, MERGE_LAT = 1`. `P` must be even.

## What is fixed by the method and what is a choice here

The following come from the convolve-and-merge method:

- the split into a MAC process and an in-place merging process;
- the coefficient format Q_low / Q_high / Δ;
- the merging equation and its range;
- the MAC bypass for addition and subtraction;
- convolution through the MAC alone;
- the word length;
- the latencies L_mac = 11 / L_merger = 2 (64-bit) and 4 / 1 (32-bit);
- the 512K × 64 memory size.

This implementation chose the following:

- The start/busy/done handshake, the base-address ports, `MEM_LAT` and the
  `conv_*` stream.
- The order of terms within the schedule, and the tail slots.
- How the multiplier is built: four half products. The distribution of the
  11 MAC cycles: 8 multiplier stages, 1 accumulate, 2 resolve.
- How the accumulator avoids a 3p-bit loop: the chunked, carry-delayed
  redundant form above. The method only requires that the accumulator be a
  non-linear (feedback) pipeline that keeps up with the multiplier.
- How operand words enter the merger for addition and subtraction. The
  two's-complement format of a difference.
- A counter, rather than the convolution schedule, produces the result write
  addresses. The order is the same: word i is written i-th.

**Efficiency model.** An analysis of the original method predicts a pipeline
efficiency of L_mac / (L_mac + L_merger) for very long operands: 84.6% for
p = 64 and 80% for p = 32. This implementation does not reproduce that loss.
Its merger accepts one coefficient per cycle, so the MAC never waits, and the
measured utilisation tends to 100%. Expect this RTL to be faster per clock
than that model.

**Not included:**

- Division. It is left out of the method as well.
- Signed operands.
- Floating-point formats.
- Switching to faster multiplication algorithms (Karatsuba, Toom-Cook, FFT)
  for large operands. The unit always uses the schoolbook O(n1·n2) method.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_conv_scheduler` | Every slot, in order, against the schedule listed from the convolution sum, including tails. Checks gap-free issue and `done` timing for all four operations and 1–13 words. |
| `tb_pipelined_multiplier` | Random and all-ones products against a 128-bit product; exact latency. |
| `tb_nl_accumulator` | Coefficients of 1–40 terms, back to back and with gaps, against a 192-bit sum; 3-cycle latency. Checks that carries were pending between chunks. |
| `tb_mac_unit` | Sums of products against a 192-bit reference; latency 11; Δ > 1 occurs. |
| `tb_merger` | Random coefficient streams against a word-serial big-integer sum, plus bypass add/sub. Checks the latency, and that a carry of 2 occurs. |
| `tb_ap_arith_unit` | The whole unit at default parameters with three memory models. 80 mixed operations with frequent mode switches, then a size sweep up to 10240-bit operands. Every result word is checked, and so is the exact cycle count. Counts mode switches, bypassed words, zero-padded words, tail slots, pending accumulator carries, Δ ≠ 0, merge carries, single-term coefficients, negative differences and convolution words, and fails if any count stays at zero. |
| `tb_ap_arith_unit_p32` | The 32-bit configuration (L_mac = 4, L_merger = 1): all operations, 1–40 words, results and cycle counts. |

The reference big-integer routines are in `tb/bignum_ref_pkg.sv`. They compute
products row by row with a running carry, independently of the column order
used by the hardware. `tb/obm_model.sv` is a behavioural word memory with a
configurable read latency.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ap_pkg.sv tb/bignum_ref_pkg.sv tb/tb_ap_arith_unit.sv \
    --top-module tb_ap_arith_unit -o sim
./obj_dir/sim
```

Replace the last file and `--top-module` with any other testbench. Every run
takes a few seconds at most. Lint the design with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ap_pkg.sv rtl/ap_arith_unit.sv`.

The Verilator lint warnings that remain are harmless:

- unused package constants;
- the top index bit that the memory address does not use;
- the reset used both as an asynchronous reset and in the `disable iff` of
  the assertions.

# Sparse matrix-vector multiply for conjugate gradient on two FPGAs

A conjugate-gradient (CG) solver for `A x = b` spends almost all of its time
computing `q = A p` for a sparse, symmetric positive-definite matrix `A` that
never changes during the solve. This RTL is a hardware module that takes over
exactly that product. The matrix is copied into the module's local memory
once per solve. After that, each CG iteration only sends the search direction
`p` (n doubles) in and gets `q` (n doubles) back. All arithmetic is IEEE-754
double precision.

The module is split over two FPGAs:

* **F1** forms one K-wide dot product per clock cycle. Each one is a slice of
  up to K non-zeros of a single matrix row, multiplied by the matching
  elements of `p`.
* **F2** adds these dot products into per-row sums. It uses a *partial
  summation array*, so that a deeply pipelined floating-point adder can take
  a new operand every cycle even when consecutive operands belong to the same
  row. It then reduces each row and sends the `q_i` back.

With the default sizes (K = 4, matrices up to 2,048 rows and 262,144
non-zeros) one multiply takes

    cycles = G + n + 122

where G is the number of K-wide groups of non-zeros and n the number of rows.
For the largest test matrix (n = 2,000, 254,066 non-zeros, G = 64,272) that is
66,394 cycles, or 0.66 ms at 100 MHz.

## Data layout: k-aligned CSR

The matrix arrives in compressed sparse row (CSR) form: `val` (the
non-zeros), `col` (their column indices) and `ptr` (where each row starts).
The host pads every row with zeros up to a multiple of K. Each run of K
consecutive padded entries is a **k-group**, and a k-group always lies within
one row. K-group `g` is stored at address `g` of the local memory banks:

| bank (K = 4)   | content at address g                                          |
|----------------|---------------------------------------------------------------|
| 0 .. K-1       | value h of the k-group (0.0 for padding), one bank per dot-product leaf |
| K .. K+K/4-1   | the K column indices, 16 bits each, four per 64-bit word: index h in bank K + h/4, bits 16(h mod 4)+15 : 16(h mod 4) |
| last           | `jptr(g)`, the row the k-group belongs to, in the low bits    |

Padding entries use column 0. Their value is zero, so they contribute nothing
as long as `p` holds no Inf or NaN.

For example, a row with 5 non-zeros `v1..v5` in columns `c1..c5` takes two
k-groups: `(v1 v2 v3 v4 | c1..c4)` and `(v5 0 0 0 | c5 0 0 0)`.

The row-pointer RAM on F1 holds `ptr(i)` = the first k-group of row i, for
i = 0..n. Only `ptr(n)`, the number of k-groups G, is used by the hardware.
Row 0 must start at k-group 0. Entries are 17 bits wide, so that the end
pointer of a full matrix (2^16 k-groups) fits.

The local memory has 6 banks for K = 4 (4 val, 1 col, 1 jptr). For K = 8 it
has 11 (8 val, 2 col, 1 jptr). It is modelled as 2^16 words per bank, which
is all the module can address.

## The four sequences

1. **Startup**, once per solve. The host writes the banks through
   `mem_we/mem_wbank/mem_waddr/mem_wdata` and the row pointers through
   `ptr_we/ptr_waddr/ptr_wdata`, then sets `n_rows`. After reset, F2 spends
   N_MAX cycles clearing its summation array. `ready` goes high when that is
   done.
2. **Input**, once per iteration. While the module is idle, the host streams
   n words on `p_valid/p_data`. Each word is written into all K copies of `p`
   on F1, because the dot product needs K different elements of `p` in the
   same cycle.
3. **Execute**. The host pulses `start`. F1 reads `ptr(n)` and then reads
   k-group 0, 1, ..., G-1 from the local memory, one per cycle:
   * the col word is unpacked into K addresses into the K copies of `p`;
   * meanwhile the K values wait one cycle in registers;
   * so each `a_ij` reaches the dot product together with its `p_j`.
   
   The dot products cross to F2 one per cycle. The last one is flagged.
4. **Output**. F2 reduces each row of its summation array to `q_i`, in row
   order, one per cycle. The `q_i` go back through F1 to `q_valid/q_data`.
   `done` pulses after the n-th one. The module is then ready for the next
   `p`.

The matrix stays in the local memory, so later iterations repeat only steps
2 to 4.

## Partial summation (F2) — the core idea

A row's dot products arrive back to back, and the adder has a 14-cycle
latency (`ALPHA_A`). Summing them with a single adder loop would stall 14
cycles per product. Instead, F2 keeps an array `S` of N_MAX rows by `ALPHA_V`
columns (2,048 x 14 doubles). Product number j (counted from 0 in each
iteration) is added into

    S( jptr(j), j mod ALPHA_V )

This works as a read-modify-write through the pipelined adder:

* The element is read when the product arrives.
* The sum is written back ALPHA_A cycles later.
* Consecutive products go to consecutive columns. So one element of S is
  touched at most once every ALPHA_V cycles, however long the row is.

As long as `ALPHA_V >= ALPHA_A`, a read never sees a stale value, and the
loop takes one product per cycle with no stalls. An assertion checks that
condition.

With the default `ALPHA_V = ALPHA_A = 14`, the write of a sum happens in the
same cycle as the next read of that element. `psum_unit` forwards the sum
being written to the adder input in that case, which behaves like a
write-first RAM port. The top-level output `psum_fwd` shows when this
happens. It happens whenever a row has more than K x ALPHA_V = 56 non-zeros.

After the last product, F2 waits until the adder pipeline is empty. It then
reads rows 0..n-1 of S, one per cycle: all ALPHA_V columns of a row go into
the **accumulator**, an ALPHA_V-input adder tree. Each row is cleared in the
same cycle it is read, so S is all zeros for the next iteration.

The row index of each product comes from the `jptr` bank. F2 reads that bank
itself, always one address ahead of the product stream. Because of that, the
channel latency between the FPGAs does not matter.

## Arithmetic units

* **`dot_product`**: K multipliers followed by a full binary tree of lg K
  adder levels. Latency `ALPHA_M + ALPHA_A * lg K` = 10 + 14 x 2 = 38
  cycles. One result per cycle.
* **`accumulator`**: a binary tree of adders with ceil(lg ALPHA_V) levels.
  When a level has an odd number of values, the last one goes through a delay
  unit of ALPHA_A cycles to stay aligned with the others. For 14 inputs the
  levels hold 14, 7, 4, 2 and 1 values. Latency 14 x 4 = 56 cycles.
* **`fp_add64` / `fp_mul64`**: binary64 adder (latency 14) and multiplier
  (latency 10). Each is one combinational stage followed by a register
  pipeline of the stated depth. The registers are meant to be redistributed
  by retiming in synthesis. Rounding is to nearest, ties to even, and results
  match IEEE arithmetic bit for bit on normal numbers. Simplifications:
  * subnormal inputs are read as zero, and results that would be subnormal
    become signed zero;
  * Inf and NaN propagate, and a NaN result is always `0x7FF8000000000000`.

## Timing budget of one multiply

The fixed 122 cycles of the formula above break down as follows. From
`start` to the first dot product leaving F1:

* 2 cycles to read `ptr(n)`;
* 1 cycle to issue the first address;
* 2 cycles for the bank read and the `p` read;
* 38 cycles through the dot product.

After that come the 4-cycle channel to F2, up to 15 cycles to drain the
partial-sum adder, the 56-cycle accumulator, the 4-cycle channel back to F1,
and one cycle for `done`. The execute sequence adds one cycle per k-group,
and the output sequence one cycle per row.

## Parameters (`cg_spmv_top`)

| parameter  | default | meaning |
|------------|---------|---------|
| `K`        | 4       | dot-product width (value banks, copies of p) |
| `ALPHA_V`  | 14      | columns of S = interval between touches of one S element |
| `ALPHA_M`  | 10      | multiplier latency |
| `ALPHA_A`  | 14      | adder latency |
| `N_MAX`    | 2,048   | largest matrix order (rows of S, depth of the p copies) |
| `NZ_MAX`   | 262,144 | largest non-zero count; NZ_MAX/K k-groups of local memory |
| `CHAN_LAT` | 4       | latency of each inter-FPGA channel (this design's choice) |

The other parameters are derived widths. `K` must be a power of two.
K = 8 with N_MAX = 4,096 was checked; it needs `mem_wbank` to be 4 bits wide.

## Files

* `rtl/cg_pkg.sv`: shared type `fp64_t`, default sizes, bank-count
  function.
* `rtl/cg_spmv_top.sv`: the whole module: F1, F2, two channels and the
  local memory.
* F1:
  * `rtl/fpga1.sv`: the F1 datapath;
  * `rtl/f1_ctrl.sv`: its controller;
  * `rtl/ptr_ram.sv`: the row-pointer RAM;
  * `rtl/p_copies.sv`: the K copies of `p`;
  * `rtl/dot_product.sv`: the dot product.
* F2:
  * `rtl/fpga2.sv`: the F2 datapath;
  * `rtl/f2_ctrl.sv`: its controller;
  * `rtl/psum_unit.sv`: the partial summation unit;
  * `rtl/s_array.sv`: the summation array S;
  * `rtl/accumulator.sv`: the row adder tree.
* Shared pieces:
  * `rtl/stream_channel.sv`: a channel between the FPGAs;
  * `rtl/local_memory.sv`: the local memory banks;
  * `rtl/fp_add64.sv`, `rtl/fp_mul64.sv`: the floating-point units;
  * `rtl/fp_delay.sv`: a delay line.

## Where this RTL departs from or goes beyond the original design

The block structure, the k-aligned layout, the partial-summation scheduling
rule, the tree shapes, the latencies and all default sizes follow the
original design. The following are choices of this implementation:

* **Floating-point cores.** The original uses existing library cores. Here
  they are written from scratch, with the simplifications listed above.
* **Control.** The state machines, the start/done/ready handshake, the `last`
  flag on the channel, and the p-address counter (reset after every
  iteration) are this design's own.
* **Forwarding.** The original relies on the vendor tool's pipelined-loop
  interval. Here the explicit bypass in `psum_unit` provides the
  ALPHA_V = ALPHA_A case.
* **Clearing S.** Rows of S are cleared as they are read, and all of S is
  cleared once after reset.
* **Memory timing.**
  * S is read combinationally. In block RAM it would take one more pipeline
    register, which the ALPHA_V interval covers.
  * The other memories have one-cycle registered reads.
  * The local memory depth is cut to the 2^16 words the module can address.
* **Channels and host side.** The channels are fixed-latency pipelines that
  never stall. The host's DMA engines are replaced by plain stream ports.
  Padding the rows and building `jptr` is the host's job.
* **Not covered.** Nothing checks for an empty matrix (G = 0), a `start`
  before `ready`, or column indices of n or more.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench (with the simulator's own
double arithmetic, or with small-integer data whose sums are exact). Where
the design has a latency or rate, the testbench checks the cycle count too.

* `tb_fp_add64`, `tb_fp_mul64`: 4,000 random operand pairs each, plus
  special values. Results must match bit for bit.
* `tb_dot_product`: results must arrive exactly 38 cycles after their
  inputs. `tb_accumulator`: exactly 56 cycles.
* `tb_psum_unit`: every element of S must equal the independently scheduled
  sum. The testbench also checks that forwarding occurs.
* `tb_f1_ctrl`, `tb_f2_ctrl`, `tb_fpga1`, `tb_fpga2`: address sequences,
  clearing, drain ordering, and one-per-cycle streams.
* `tb_cg_spmv_top`: end to end at the default parameters. A 48-row matrix,
  three iterations on the stored matrix, every `q_i` bit-exact. It also
  checks the cycle budget, that the dot-product stream has no gaps, and that
  padding and forwarding were exercised.
* `tb_cg_trials`: default parameters, nine matrices with the orders
  (1,000 / 1,500 / 2,000) and exact non-zero counts (about 12.5 k, 54 k and
  253 k) of the original evaluation. The matrices are randomly generated,
  not the original ones. Two iterations each, all `q_i` exact, and each
  multiply takes G + n + 122 cycles. It runs in about 10 seconds.
* `tb_cg_solve`: a complete CG solve that calls the module for every
  `q = A p`. It is set up like the original evaluation: A = L Lᵀ for a
  banded lower-triangular L, b = A x_h with x_h all 100s, x₀ = 0, and a
  stopping test of ‖r‖/‖r₀‖ ≤ 1e-9. With n = 1,000 and 6,988 non-zeros it
  converges in 21 iterations, and x matches x_h to 1.2e-8 relative. Here
  `q` is checked against a software product within rounding, because the
  hardware sums in a different order.
* `tb_cg_k8`: K = 8, N_MAX = 4,096, on a 4,096-row matrix and a
  254,066-non-zero matrix. The second one needs 34,789 cycles per multiply
  against 66,394 with K = 4.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -Itb rtl/cg_pkg.sv rtl/*.sv \
        tb/tb_cg_trials.sv --top-module tb_cg_trials
    ./obj_dir/Vtb_cg_trials

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. Each
has a cycle-count watchdog that ends the run with a failure if it hangs.

## Resource notes

* S: 2,048 x 14 doubles, 1.8 Mbit (112 block RAMs of 16 kbit).
* The K copies of `p`: 4 x 2,048 doubles, 0.5 Mbit.
* Each double-precision adder is a wide barrel-shifter design, and the
  module contains 17 of them: 3 in the dot product, 13 in the accumulator
  and 1 in the partial summation unit. It also has 4 multipliers of 53 x 53
  bits. Logic synthesis of the whole top is therefore slow.

# Word-serial radix-2 Montgomery multiplier with speculative MSB selection

This is synthesizable SystemVerilog for a Montgomery modular multiplier of
the kind used in RSA, DSA, Diffie-Hellman and elliptic-curve hardware. It
computes

    Z = MP(X, Y, M) = X * Y * 2^-n mod M,      0 <= Z < 2M

for an odd n-bit modulus M and 0 <= X, Y < M, with a linear array of
e = ceil((n+1)/w) processing elements (PEs), each owning one w-bit word of
the operands. At the default size (n = 1024, w = 16) the array has 65 PEs and
a multiplication takes n + e - 1 = 1088 clock cycles of computation.

The architecture is the one published as "An Optimized Hardware Architecture
for Montgomery Multiplication Algorithm". Its point is to run the classic
word-serial algorithm with neighbouring PEs only **one** cycle apart instead of
two. A PE has to start an iteration before it knows one bit of its input, so
it computes both possible results and picks the right one a cycle later. That
halves the latency of the classic Tenca-Koc array (2n + e - 1 cycles) for
about the same area.

## The algorithm

The multiple-word radix-2 algorithm (MWR2MM) scans the multiplier X one bit
x_i at a time and the multiplicand Y, the modulus M and the partial result S
one w-bit word at a time (word j is written Y^(j), bit k of a word S_k):

    S = 0
    for i = 0 .. n-1:
        q_i = (x_i * Y_0^(0)) xor S_0^(0)
        (C^(1), S^(0)) = x_i*Y^(0) + q_i*M^(0) + S^(0)
        for j = 1 .. e-1:
            (C^(j+1), S^(j)) = C^(j) + x_i*Y^(j) + q_i*M^(j) + S^(j)
            S^(j-1) = (S_0^(j), S^(j-1)_{w-1..1})        -- shift right by one bit
        S^(e-1) = (C_0^(e), S^(e-1)_{w-1..1})
    Z = S

q_i makes S + x_i*Y + q_i*M even, so the division by 2 is exact. The carry
C between words is at most 2 (2 bits). The result is below 2M. There is no
final subtraction: a value in [M, 2M) can be fed straight into the next
product. To get an ordinary modular product, move the operands into the
Montgomery domain and back out again:

    X' = MP(X, 2^2n mod M)   Y' = MP(Y, 2^2n mod M)
    Z' = MP(X', Y')          Z  = MP(Z', 1)  = X*Y mod M

The hardware computes MP only; the conversions are separate uses of it. The
end-to-end testbench runs this sequence, reducing each result below M before
it is used again.

## Why each PE speculates

PE #j handles word j for every iteration, and runs one cycle behind PE #j-1.
In clock cycle t it computes iteration i = t - j. It gets:

* the carry C^(j) of the same iteration, which PE #j-1 produced one cycle
  earlier. This dependence is what sets the one-cycle offset;
* bits w-1..1 of its own previous result, which it holds itself;
* the most significant bit of its incoming word. That bit is bit 0 of word j+1
  from the **previous** iteration. PE #j+1 computes it in this very cycle.

So in cycle t, PE #j computes the sum twice, with that MSB taken as 1
(candidates CO, SO) and as 0 (candidates CE, SE). It registers both carries,
both bit-(w-1) values, and bits w-2..0, which are the same in both sums. In
cycle t+1 the missing bit S_0^(j+1) is sitting in PE #j+1's register. It
drives two 2:1 multiplexers that pick the carry C^(j+1) for PE #j+1 and the
MSB of the word. The picked word, shifted right by one, feeds PE #j's adders
for iteration i+1 in the same cycle. The critical path is therefore adder,
register, then one multiplexer before the next adder.

Schedule for e = 3 (`i` is the iteration each PE computes in that cycle):

    cycle   PE#0   PE#1   PE#2
      1      0      -      -
      2      1      0      -
      3      2      1      0
     ...
     n      n-1    n-2    n-3
     n+1     -     n-1    n-2
     n+2     -      -     n-1      -> n+e-1 = n+2 compute cycles

## Processing elements

| PE | module | role |
|---|---|---|
| #0, type D | `mm_pe_first` | no carry in; computes q_i combinationally from x_i, Y_0^(0) and bit 1 of its resolved previous word; speculates on its MSB like type E |
| #1..#e-2, type E | `mm_pe_main` | the speculative PE described above |
| #e-1, type F | `mm_pe_last` | top word. Its incoming MSB is its own carry bit C_0^(e), which it already holds, so it does not speculate |

Every PE has `en`, which takes a new iteration and otherwise holds, and `clr`,
which empties the PE (S = 0) at the start of a multiplication. When a PE is
cleared, both of its candidates are zero. This gives the S = 0 initial word
whatever the select bit is.

The type F PE keeps only bit 0 of C^(e). Every partial result stays below 2M,
so a sum before the shift stays below 4M <= 2^(e*w+1). C^(e) can therefore
never reach 2. An assertion checks this. Two further assertions check the PEs:
in type E, both candidates have the same low bits; in type D, the sum is even.

## Shift registers and control

* `mm_q_shift`: 1 bit wide, e-1 stages. It delays q_i from PE #0 so that PE #j
  gets q_i j cycles later, in the cycle it computes iteration i.
* `mm_x_shift`: e stages. X enters LSB first, and stage j feeds x_{i-j} to
  PE #j. Each stage also carries a control token (`mm_pkg::mm_tok_t`: `valid`,
  `last`). The token enables PE #j for exactly the n cycles in which it has
  real iterations, and marks iteration n-1.

The top, `mm_montgomery`, holds the operand registers and a counter that feeds
n bits into the x shift register. It keeps a one-cycle-delayed copy of the
tokens (which iteration each PE *holds*) and collects the result:

* bits w-2..0 of result word j are bits w-1..1 of PE #j's resolved word. They
  are read in the cycle PE #j holds iteration n-1;
* bit w-1 of word j is S_0^(j+1). It is read one cycle later, when PE #j+1
  holds iteration n-1;
* word e-1 is read directly from the type F PE.

## Interface and timing (`mm_montgomery`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `start` | in | 1 | on a clock edge with `busy` low, latch `x`, `y`, `m` and begin; ignored while `busy` |
| `x`, `y`, `m` | in | N | multiplier, multiplicand, odd modulus M < 2^N, with X, Y < M (the testbenches use moduli with their top bit set, n = N) |
| `busy` | out | 1 | multiplication in progress |
| `done` | out | 1 | `z` valid; stays high until the next accepted `start` |
| `z` | out | E*W | Z = X*Y*2^-N mod M, 0 <= Z < 2M; bits above N are zero |

Timing, counted from the edge that accepts `start`:

* 1 cycle loads the first bit into the x shift register;
* n+e-1 cycles have at least one PE computing;
* 1 cycle writes `z`.

So `done` rises N+E+1 edges after the accepting edge: 1090 at the default
size. A new `start` can be given in the cycle `done` is seen.

## Parameters and sizes

`N` (operand width, default 1024) and `W` (word width, default 16) are
parameters of `mm_montgomery`. `E = ceil((N+1)/W)` is derived from them.
W must be at least 2 and N at least W (at least two PEs).

| n | PEs (e) | compute cycles (n+e-1) | simulated in |
|---|---|---|---|
| 1024 | 65 | 1088 | `tb_mm_montgomery` (defaults) |
| 2048 | 129 | 2176 | `tb_mm_workloads` |
| 3072 | 193 | 3264 | `tb_mm_workloads` |
| 4096 | 257 | 4352 | `tb_mm_workloads` |

These are the sizes, PE counts and cycle counts of the published FPGA results
(Xilinx Virtex-II 6000 at 100 MHz). Those PE counts imply w = 16, which is the
default here. The published slice counts are not reproduced: they depend on
the FPGA tools.

## What is taken from the published design and what is not

Taken from it: the array of D, E…E, F PEs; the PE datapaths, including the
two speculative sums, the registered candidates, the select by S_0^(j+1), the
(w-1)-bit feedback and the 2-bit carries; the q and x shift registers and
their depths; the one-cycle PE offset; and the n+e-1 latency.

This design's own choices, because the published description does not cover
them:

* parallel operand inputs with a start/busy/done handshake;
* asynchronous active-low reset and a synchronous per-operation clear;
* the valid/last token that enables the PEs;
* how the result words are collected;
* the one-bit C^(e) register in the type F PE;
* one cycle for loading operands and one for writing the result, around the
  n+e-1 compute cycles.

Not built:

* the radix-4 version, which the publication lists only as a row of a
  comparison table;
* the baseline arrays it is compared with;
* any final subtraction or domain-conversion sequencer.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line.

| testbench | what it checks |
|---|---|
| `tb_mm_pe_main`, `tb_mm_pe_first`, `tb_mm_pe_last` | each PE every cycle, against a model that sums the held iteration once the select bit is known; random data, enables and clears; q_i for type D |
| `tb_mm_q_shift`, `tb_mm_x_shift` | every tap against the history of the input |
| `tb_mm_montgomery` | the top at default size (1024/16/65): corner cases; random products, one with a `start` pulse while busy; a full X*Y mod M through the Montgomery domain |
| `tb_mm_workloads` | 2048, 3072 and 4096 bits, the same checks |
| `tb_mm_small_configs` | thousands of random products at n = 5…96 and w = 2…32, including the two-PE array |

The top-level checks are in `tb/mm_mont_harness.sv`. Each product is
compared:

* bit for bit with a bit-serial model of the same algorithm;
* with the identity Z * 2^n = X * Y (mod M), computed by shift-and-add;
* for its latency: exactly n+e-1 compute cycles, and `done` after n+e+1
  edges.

The testbenches also count how often the late select picked each candidate,
and how often q_i was 0 and 1. A mechanism that never happened counts as a
failure.

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/mm_pkg.sv tb/tb_mm_montgomery.sv --top-module tb_mm_montgomery --Mdir obj -o sim
    ./obj/sim

Replace the testbench name to run another one. The default-size run takes
about 20 s to build and well under a second to simulate.

## Files

* `rtl/mm_pkg.sv`: default sizes, `num_words()`, the control token type
* `rtl/mm_pe_first.sv`, `rtl/mm_pe_main.sv`, `rtl/mm_pe_last.sv`: PE types D, E, F
* `rtl/mm_q_shift.sv`, `rtl/mm_x_shift.sv`: the q and x shift registers
* `rtl/mm_montgomery.sv`: the top
* `tb/`: the testbenches above and the shared harness `mm_mont_harness.sv`

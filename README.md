# Carry-save Montgomery modular multipliers

Public-key cryptography (RSA, for example) spends most of its time on modular
multiplications of very long integers. Montgomery's method avoids the trial
division: it computes `S = A * B * R^-1 mod N` using only additions and shifts
by one bit. Each step looks only at the least significant bit of the partial
result to decide whether to add the odd modulus `N`, which makes the sum even
so that it can be halved exactly. In hardware, a long binary addition in every
step would put a K-bit carry chain on the critical path. These multipliers
keep the partial result in **carry-save form**, as a pair of vectors (SS, SC)
whose sum is the value. Each step is then one row of full adders. The same
adder row is reused for the few additions that need real carry propagation:
precomputing operand sums before the loop, and converting the carry-save
result back to binary after it.

Two multipliers are provided. They share the full adder cell and most
building blocks, and sit side by side in `montgomery_top`:

| | MSCS-MM (`mscs_mm`) | SCS-MM-New (`scs_mm_new`) |
|---|---|---|
| adder | one-level CSA, full adders only | configurable CSA (CCSA): full-adder row, or two serial half-adder rows |
| result | `A*B*2^-(K+2) mod N` | `A*B*2^-(K+3) mod N` |
| iterations | K+2, one per cycle | K+3, but an iteration that would add zero costs no cycle |
| carry propagation | 1 bit position per cycle | 2 bit positions per cycle |
| mean latency, K = 4 (simulated) | 12.3 cycles | 12.1 cycles |
| mean latency, K = 1024 (simulated) | 1047 cycles | 836 cycles |

In both, `N` is odd and K bits wide, and the operands `A` and `B` are below
`2N`. The result is below `2N` too, so it can go straight back in as an
operand with no final subtraction. This is what a modular exponentiation
needs. The default `K = 4` is the size at which the multipliers were
characterised at transistor level. `K` is an ordinary parameter, and the
testbenches also build K = 1 and K = 1024.

## The arithmetic both multipliers share

The bit-serial Montgomery loop is

    T = 0
    for i in 0 .. m-1:
        q_i = (T + A_i*B) mod 2
        T   = (T + A_i*B + q_i*N) / 2
    S = T

After `m` iterations, `S = A*B*2^-m mod N`. The bound `S < A*B/2^m + N` gives
`S < 2N` when `A, B < 2N` and `2^m >= 4N`; that is why `m = K+2` and not `K`.

The term added in iteration i, `x_i = A_i*B + q_i*N`, is one of
`0, N, B, D = B + N`. `D` is precomputed once, so each iteration adds three
vectors: SS, SC and `x_i`. Three vectors go through one full-adder row.

**Where the halving happens.** The registers SS and SC hold the sum before it
is halved (`V_i = T_i + x_i`), not `T_{i+1}`. The division by two is done by
wiring: in the next cycle, the feedback multiplexers M1 (for SC) and M2 (for
SS) pass their register shifted right by one. In MSCS-MM this is exact:
`V_i` is even, and bit 0 of both vectors is zero (the carry vector is shifted
left, and the sum bit 0 is then the parity of `V_i`), so
`T_{i+1} = (SS >> 1) + (SC >> 1)`. SCS-MM-New needs a small correction, see
`alpha` below.

**Quotient look-ahead.** The select of the operand multiplexer must not wait
for the adder. The next quotient bit `q_{i+1}` is the lowest bit of
`T_{i+1}`, which is bit 1 of `V_i`. That bit depends only on the lowest two
bits of the shifted SS, the shifted SC and `x_i`. A 2-bit adder computes it in
parallel with the wide adder, and it is stored in a flip-flop together with
`A_{i+1}`. The critical path is one 4-to-1 multiplexer plus one full adder.

**Conversion.** After the loop, one more step halves the last sum with `x = 0`.
Then `(SS, SC) = SS + SC + 0` repeats until the carry vector is zero; the
zero detector is one wide NOR. Each repetition moves every pending carry one
place (two in SCS-MM-New), so the number of repetitions is the length of the
longest carry chain. This is usually a few cycles and at most about W.

## MSCS-MM

`mscs_mm.sv` holds the registers A (a shift register), N, B, D, SS and SC,
and a small state machine:

1. `PRE`: `(SS, SC) = N + B + 0`; M1 passes N and M2 passes B.
2. `PROP`: repeat `SS + SC + 0` until SC = 0, then `D = SS`, clear SS and SC,
   and load Q_L with `A_0` and `q_0 = A_0 & B_0`.
3. `MAIN`: K+2 cycles of `(SS>>1) + (SC>>1) + x_i`. M3 picks `x_i` from the
   Q_L flip-flops, and Q_L computes `q_{i+1}` for the next cycle.
4. `SHIFT`, then `CONV` until SC = 0: the result is SS.

Latency, counted from the cycle after the one with `start` high up to and
including the `done` cycle:
`K + 6 + p_D + c` cycles, where `p_D` and `c` are the carry-propagation
repetitions of `B + N` and of the final conversion.

## SCS-MM-New

SCS-MM-New has the same outer structure. Three ideas reduce its cycle count.

### Configurable carry-save adder (`ccsa.sv`)

A full adder is two half adders in series. In `CSA_FA` mode each bit of the
row is an ordinary full adder on `x, y, z`. In `CSA_2HA` mode, the third input
of each cell comes from the first half adder's carry of the bit below. The
cell's carry output is ANDed with the cell's propagate term, so that only the
second half adder's carry remains. The row then performs two serial two-input
carry-save additions per cycle, and every carry-propagation loop (operand
precomputation and final conversion) takes about half as many cycles. The main
iterations use FA mode.

### An even B^, so the quotient no longer depends on A

Before the loop, the multiplier forms `B^ = B + B_0*N`, which is even and
congruent to B, and `D^ = B^ + N`. For odd B this takes two 2HA-mode
propagation loops, and one loop for even B. Because `B^` is even, adding
`A_i*B^` never changes the parity of the partial result, so
`q_i = T_i mod 2` whatever `A_i` is. The price is that `B^` can reach `3N`.
K+3 iterations are then needed to keep the result below 2N, hence
`R = 2^(K+3)`.

### Skipping iterations that add nothing (`skip_d.sv`)

An iteration with `A_i = 0` and `q_i = 0` adds 0 and only halves. Skip_D
recognises such an iteration one cycle ahead. The iteration is then merged
into the next cycle: M1 and M2 pass SS and SC shifted by **two**, and the next
operand is chosen with `q_{i+2}` and `A_{i+2}`. In the cycle that forms `V_i`,
Skip_D needs only three-bit windows:

* the low three bits of the shifted SS and SC, from the 3-bit multiplexers M5
  and M4 (shift by one or two, following the current cycle);
* the low three bits of the selected operand, and the correction `alpha`
  (below);
* `A_{i+1}` and `A_{i+2}` from the bottom of the A shift register.

From `v = V_i mod 8` it produces:

* `q_{i+1} = v[1]`;
* `skip = !A_{i+1} & !q_{i+1}`;
* `(q^, A^) = skip ? (v[2], A_{i+2}) : (v[1], A_{i+1})`.

These go into three flip-flops that steer SM3, M1/M2 and M4/M5 in the next
cycle. At most one iteration is skipped per cycle. The last iteration can be
skipped too; the final halving step is then a shift by two.

The look-ahead needs a cycle before iteration 0. That cycle is **iteration
−1**: it adds 0 to `SS = SC = 0` with `q^ = A^ = 0`, and its only work is to
let Skip_D decide about iteration 0. The iteration phase therefore takes
`K + 4 − (skipped iterations)` cycles.

### The shift correction `alpha`

When a pair is shifted by two, bit 1 of SS and of SC can both be 1 while
their sum is still a multiple of 4. Then `(SS + SC) / 4` is
`(SS >> 2) + (SC >> 2)` **plus the carry out of the dropped low bits**, which
is 0 or 1. The same holds for a shift by one once that carry has been put
into bit 0 of SC.
The multiplier computes it from the low two bits of SS and SC and injects it
as `alpha` into bit 0 of the new carry vector, which the left-shifted carries
leave free. It is also used in the final halving step. Without it, the results
are wrong.

Latency, counted the same way:
`(B odd ? 2 + p_B : 0) + 2 + p_D + (K + 4 − skipped) + 1 + c + 1`, with the
propagation counts now in 2HA steps.

## The full adder cell (`cmos_fa.sv`)

Every adder in the design is a row of one cell: the 14-transistor CMOS full
adder. Its logic is

    p    = A xor B
    Sum  = p xor Cin
    Cout = p ? Cin : A        (a pass-gate 2-to-1 multiplexer)

The cell brings out `p` because the CCSA uses it. The transistor-level
advantages of this cell (power, delay) are outside what RTL describes; in
synthesis it becomes whatever full adder the target library offers.

## Interface and timing

Both multipliers (and the two halves of `montgomery_top`, with prefixes
`mscs_` and `new_`) have the same ports:

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | rising edge |
| `rst_n` | in | 1 | asynchronous, active low |
| `start` | in | 1 | one-cycle pulse while `busy` is low; loads `a`, `b`, `n` |
| `a`, `b` | in | K+1 | operands, below 2N |
| `n` | in | K | odd modulus |
| `busy` | out | 1 | high from the cycle after `start` until `done` |
| `done` | out | 1 | one-cycle pulse |
| `s` | out | K+1 | result, below 2N; valid from `done` until the next `start` |

`start` is ignored while `busy` is high. The inputs are sampled only in the
`start` cycle. Assertions check that the result is below 2N and, in
SCS-MM-New, that B^ is even when the iterations begin.

## Files

| file | block |
|---|---|
| `rtl/mm_pkg.sv` | select and mode encodings |
| `rtl/cmos_fa.sv` | full adder cell |
| `rtl/csa_row.sv` | one-level CSA of MSCS-MM |
| `rtl/ccsa.sv` | configurable CSA |
| `rtl/shift_mux.sv` | M1 / M2 feedback multiplexers (>>1, >>2, pass, operand) |
| `rtl/operand_mux.sv` | M3 / SM3: 0, N, B, D from A_i, q_i |
| `rtl/window_mux.sv` | M4 / M5: 3-bit windows for the skip detector |
| `rtl/zero_d.sv` | SC = 0 detector |
| `rtl/q_l.sv` | quotient look-ahead of MSCS-MM |
| `rtl/skip_d.sv` | skip detector of SCS-MM-New |
| `rtl/mscs_mm.sv`, `rtl/scs_mm_new.sv` | the multipliers, with their control |
| `rtl/montgomery_top.sv` | both multipliers side by side |

## What follows the original architecture and what does not

These parts follow the published architecture:

* the block structure of both multipliers: registers, multiplexers M1–M5 and
  SM3, Zero_D, Q_L, Skip_D, the CCSA and the `alpha` input;
* the precomputation of D = B + N on the same adder;
* the `SS + SC + 0` conversion loop;
* K+2 iterations for MSCS-MM;
* the look-ahead of A_i and q_i;
* iteration −1 with q^ = A^ = 0;
* the full adder cell.

These are this design's own choices:

* the state machines, the select encodings, the handshake and the reset;
* the form of B^ and D^ and the resulting K+3 iterations of SCS-MM-New;
* the meaning of `alpha` as the shift correction;
* the inside of Skip_D. It uses a 3-bit adder plus two 2-to-1 multiplexers,
  so its gate count differs from the published four XOR, three AND, one NOR
  and two multiplexers;
* how the CCSA reuses one full adder cell for both modes;
* A is loaded in parallel into a shift register. The characterised 4-bit
  circuit showed a single `a` input, which suggests that A was fed serially.

The two multipliers use different `R`, so their results for the same inputs
differ by a factor of 2 mod N. They agree in every other respect.

Not modelled: anything at transistor level, i.e. the power, delay and
power-delay figures the cell and the 1-bit and 4-bit multipliers were
characterised by.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/mm_pkg.sv tb/mm_ref_pkg.sv tb/tb_montgomery_top.sv \
        --top-module tb_montgomery_top
    ./obj_dir/Vtb_montgomery_top

`tb/mm_ref_pkg.sv` holds word-level reference models: the bit-serial
Montgomery loop and double-width `mod`. They are independent of the
carry-save datapath.

* `tb_montgomery_top`: the design at default size. It runs random products on
  both multipliers at once for every odd N < 16, and modular exponentiations
  in Montgomery form. It counts each mechanism (carry propagation in each
  phase, the B^ = B + N path, skips, a final shift by two, `alpha`, both
  multipliers busy) and fails if one never occurs.
* `tb_mscs_mm`, `tb_scs_mm_new`: every odd N < 16 with every A, B < 2N. They
  check the exact result, the bound and the congruence, and count the cycles
  of the iteration phase: K+2, or K+4 minus the skipped iterations.
* `tb_mm_1bit`, `tb_mm_k1024`: the top built at K = 1 and K = 1024. The K =
  1024 one includes a 24-bit-exponent modular exponentiation and prints the
  mean latencies quoted above.
* One testbench per building block, exhaustive where the input space allows.

To change the operand size, set `K` on `montgomery_top`, `mscs_mm` or
`scs_mm_new`. The carry-save registers are K+3 bits wide, and nothing else
scales with K.

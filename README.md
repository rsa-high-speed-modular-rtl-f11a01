# Radix-4 sign-estimation modular multiplier and 1024-bit RSA processor

This RTL computes `M^e mod N` for a 1024-bit modulus. It is built around a
modular multiplier that never propagates a carry inside its main loop. The
partial result stays in carry-save form (two vectors whose sum is the value).
Reduction modulo N is decided by *estimating* the sign of that sum from a few
of its top bits. Each cycle consumes one radix-4 Booth digit of the
multiplier, so one `A*B mod N` takes `n/2+3` clock cycles: 515 for n = 1024.
Unlike Montgomery multiplication, the result has no extra `2^-k` factor, and
no per-modulus constant has to be computed first.

Two multipliers run side by side. One squares M, the other multiplies C by M.
With a right-to-left scan of the exponent, one exponent bit then costs one
multiplication time. A full 1024-bit exponentiation takes
`1024 * 515 + 1 = 527,361` cycles. At the 40 MHz the design was originally
evaluated at, that is 13.2 ms, or about 78 kbit/s.

## The multiplier loop: value ranges and reduction

Notation: `n` = `N_BITS` is the modulus width. `W = n+4` is the carry-save
width. `T = n-2` is the truncation point of the sign estimator. X is the
value `C+S` held in the carry-save registers. The modulus must satisfy
`2^(n-1) <= N < 2^n`, so its top bit must be set. A and B are `(n+1)`-bit
two's complement numbers in `[-N, N)`. The processor only ever passes values
in `[0, N)`.

**Invariant.** After every loop cycle, `0 <= X < N + 2^T`. X is never fully
reduced inside the loop. It may exceed N by at most `2^T`, the estimator's
uncertainty.

**One cycle** (`r4mm_step`) has four carry-save adder (CSA) levels. Each is
followed by a sign estimate:

| level | operation | kept when |
|---|---|---|
| 1 | `X0 = 4X + d*B`, d the Booth digit in {-2..2} | always |
| | `sign0 = est(X0) >= 0` picks the branch | |
| 2 | reduce: `X0 - 4N` / restore: `X0 + N` | reduce: its estimate >= 0; restore: always |
| 3 | reduce: `- 2N` / restore: `+ N` | reduce: its estimate >= 0; restore: if level 2 was still estimated negative |
| 4 | reduce: `- N` / restore: pass through | reduce: its estimate >= 0 |

Each subtraction is a CSA fed with the inverted multiple of N. The missing
+1 goes into bit 0 of the CSA's carry vector, which is always free because
the carry vector is shifted left. "Kept" is a 2:1 multiplexer on the
estimated sign.

**Why the ranges close.** The estimator guarantees two things:

- An estimate >= 0 proves the true value is >= 0.
- An estimate < 0 proves the true value is < `2^T`.

So a rejected trial `X - kN` shows that `X < kN + 2^T`. After the `-4N`,
`-2N`, `-N` sequence, any start value in `[0, 8N + 2^T)` ends in
`[0, N + 2^T)`. The largest possible level-1 value is `4(N + 2^T) + 2N`.
This is `6N + 2^n`, which is below `8N + 2^T` because `N >= 2^(n-1)`. In the
restore branch, `X0 >= -2N` and `X0 < 2^T`. At most two additions of N bring
it into range.

**Departure from the published schedule.** The algorithm as originally
described subtracts 2N, 2N, N. Its range argument counts one multiple of B
per step. With a Booth digit of +2, the level-1 value can reach
`6N + 2^(T+2)`. The 2N+2N+N sequence only handles values below `6N + 2^T`.
A random test at n = 16 with extreme operands mixed in shows the difference:

- with 2N, 2N, N: about 4% of iterations leave the invariant;
- with 4N, 2N, N: none do.

This RTL therefore subtracts 4N at the first reduction level. It has the same
number of CSA levels, and only the constant differs.

**Final phase** (2 cycles). The result register pair is added in two ways:

- `P = C+S`;
- `P' = C+S-N`, using one more CSA.

Two high-speed adders form both sums. `P'` is returned when its sign bit is
0. Since `X < N + 2^T <= 2N`, this gives a result in `[0, N)`.

## Sign estimation

`sign_est` drops the low T bits of both carry-save vectors and adds only
bits `T..W-1` (6 bits at the defaults) with a carry look-ahead adder. The
sign bit of that short sum is the estimate. The dropped bits can only make
the estimate too small, by less than `2^(T+1)`. That is where the two
guarantees above come from. The carry-save width `W = n+4` leaves enough
headroom that the estimate never wraps around: every intermediate value lies
in `(-2^(n+2), 7*2^n)`.

The original description gives both "t = n-2" and a 5-bit estimator over
bits n-1..n+3, which is t = n-1. This RTL uses t = n-2, with a 6-bit
estimator. The 4N/2N/N schedule needs `N >= 0.75*2^n` when t = n-1, but
only `N >= 2^(n-1)` when t = n-2.

## Booth digits

`booth_pp` recodes three bits `(A[2j+1], A[2j], A[2j-1])` into a digit with
the standard radix-4 table:

| bits | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| digit | 0 | +1 | +1 | +2 | -2 | -1 | -1 | 0 |

It outputs `|d|*B`, sign-extended to W bits and inverted for a negative
digit, plus a carry-in bit. A is sign-extended to n+2 bits, which gives
`n/2+1` digits. They are consumed most significant first, so each step is
the Horner form `4X + d*B`.

## Cycle timing of one multiplication (`r4mm`, `r4mm_ctrl`)

Edges are counted from the one that samples `start`.

| edges | work |
|---|---|
| 1 .. n/2+1 | loop iterations. The first happens on the start edge itself, with C = S = 0. |
| n/2+2 | low halves (514 bits) of both final additions, registered with their carries |
| n/2+3 | high halves, using the registered carries; `done` is high during this cycle and `p` is valid; C and S are cleared |

Operands must stay stable from `start` to `done`. `p` is combinational and
valid only while `done` is high. A new `start` is accepted in the cycle after
`done`. An assertion flags a `start` while busy.

## High-speed adder (`hs_adder`, `hs_adder_2c`)

This is a carry-skip / carry-select adder whose blocks grow by one bit each:
bits 0 | 1-2 | 3-5 | 6-9 | ... Each block ripples twice, with carry-in 0 and
with carry-in 1. From this it gets both candidate sums, its generate
(carry-out with carry-in 0) and its propagate (every bit propagates). The
inter-block path is only `C[k+1] = G[k] | P[k] & C[k]`, and `C[k]` selects
the block's sum. A 514-bit half needs 32 blocks. `hs_adder_2c` splits a
1028-bit addition at bit 514 across two cycles with a registered carry.
`r4mm` uses two of them: one for `P` and one for `P'`.

## Exponentiation and the processor

`rsa_controller` runs the right-to-left binary method over all `E_BITS`
exponent bits:

    C := 1
    for i = 0 .. E_BITS-1:
        (C, M) := (e[i] ? C*M mod N : C,  M*M mod N)

Both products use the old M and run at the same time on the two multipliers.
C*M is computed on every bit, so the run time does not depend on the
exponent. The results are written on the multipliers' last edge. The next
start is issued in the following cycle, so each bit takes exactly `n/2+3`
cycles. `operand_reg` holds C and M.

Host access (`host_if`, `rsa_top`) uses 32-bit words, least significant
word first:

| signal | use |
|---|---|
| `host_we`, `host_sel`, `host_widx`, `host_wdata` | write word `host_widx` of the modulus (`SEL_MODULUS`), exponent (`SEL_EXPONENT`) or message (`SEL_MESSAGE`) register |
| `host_go` | start; ignored while busy, as are writes |
| `host_busy`, `host_done` | status; `done` stays high until the next start |
| `host_ridx` → `host_rdata` | read word of the result, combinational |

Sequence:

1. Reset (asynchronous, active low).
2. Write the 32 words of N (top bit set), e, and M (< N).
3. Pulse `host_go`.
4. Wait for `host_done`. It rises `E_BITS*(N_BITS/2+3)+1` edges after the
   edge that sampled `go`.
5. Read the 32 result words.

## Files

| file | contents |
|---|---|
| `rtl/rsa_pkg.sv` | shared types: Booth digit struct, register select enum, host width |
| `rtl/rsa_top.sv` | processor top |
| `rtl/host_if.sv`, `rtl/word_reg.sv`, `rtl/operand_reg.sv` | host interface; modulus, exponent and message registers; C/M registers |
| `rtl/rsa_controller.sv` | exponentiation sequencer |
| `rtl/r4mm.sv`, `rtl/r4mm_ctrl.sv` | modular multiplier and its cycle sequencer |
| `rtl/r4mm_step.sv`, `rtl/booth_pp.sv`, `rtl/csa.sv`, `rtl/sign_est.sv` | loop datapath |
| `rtl/hs_adder.sv`, `rtl/hs_adder_2c.sv` | final adder |
| `tb/tb_*.sv` | one self-checking bench per module, plus `tb_rsa_full` and `tb_rsa_roundtrip` |

Every module has a typed parameter. The defaults are the 1024-bit
configuration: `N_BITS = 1024`, `E_BITS = 1024`. `N_BITS` must be even and at
least 4.

## Verification

Each bench ends with `TB_RESULT checks=<n> failures=<m>`, and each has a
watchdog. Summary:

- The multiplier loop step, at n = 16, is checked for 200,000 random and
  worst-case inputs. The result must stay in range and agree with the
  product modulo N.
- `tb_r4mm` runs 3,000 16-bit multiplications with signed operands and 12
  multiplications at 1024 bits. Each is checked against a wide-integer
  reference, and each must take exactly `n/2+3` cycles.
- `tb_rsa_top`, at 32 bits, runs random exponentiations and an RSA round
  trip (N = 65521·65519, e = 65537 and its private exponent). It counts
  every mechanism: reduce and restore branches, accept and reject at each
  level, final correction taken or skipped, exponent bits 0 and 1, and
  blocked writes.
- `tb_rsa_full` performs one complete 1024-bit exponentiation at the default
  parameters. It checks the result against a 2048-bit square-and-multiply
  reference and the cycle count against 527,361. It simulates in about 10 s.
- `tb_rsa_roundtrip` runs a genuine 1024-bit RSA key at the default
  parameters. The primes are p = 2^512-569 and q = 2^512-629, with
  e = 65537; the private exponent is derived in the bench. The bench
  encrypts a random message, decrypts the result, and requires the
  original message back. It takes about 20 s.

To run a bench with plain Verilator:

    verilator --binary --timing --assert -Irtl rtl/rsa_pkg.sv tb/tb_rsa_full.sv \
              --top-module tb_rsa_full -Mdir obj_full
    ./obj_full/Vtb_rsa_full

## Deliberate choices not fixed by the original description

- The first reduction level subtracts 4N, not 2N, and t = n-2 with a 6-bit
  estimator (both explained above).
- The loop has n/2+1 iterations: A has n+1 bits, sign-extended to n+2. The
  algorithm listing shows n/2+2 iterations with an (n+3)-bit A, but the
  stated cycle budget has n/2+1 loop cycles.
- The modulus must have its top bit set. Odd moduli are not required.
- The two-cycle final addition is split at the middle bit. The adder blocks
  continue the 1, 2, 3, 4 pattern up to 514 bits.
- The host bus protocol, word order, result read-out, reset style, operand
  hold requirements and the one load cycle before an exponentiation are all
  this design's own.
- Not modelled: anything of the physical implementation, such as the gate
  count, the 40 MHz timing closure or the 46.5 ns adder delay.

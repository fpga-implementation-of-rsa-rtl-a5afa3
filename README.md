# RSA modular exponentiator on Montgomery multipliers

RSA encryption and decryption are both one operation: a modular
exponentiation `C = P^E mod M` (encrypt with the public exponent E) or
`P = C^D mod M` (decrypt with the private exponent D). This design computes
`h_cryp = mess^clef mod m` in hardware. It does so with nothing but
shift-and-add Montgomery multipliers, so it needs no divider and no
multiplier array. The reference configuration is a small one: an 8-bit key,
message and modulus, at about 20 MHz on a small programmable device. The RTL
is generic in the key length `K`. A 1024-bit instance is simulated as well.

The design has three pieces:

| module    | role |
|-----------|------|
| `monpro2` | bit-serial Montgomery multiplier, `A*B*2^-n mod M`, one bit of B per clock |
| `r2mod`   | computes the mapping constant `C = 2^(2n) mod M` |
| `monexp2` | top level: right-to-left exponentiation on two `monpro2` running in parallel |
| `rsa_pkg` | shared constants (`KEY_BITS = 8`, `n = k + 2`) and the controller's state type |

## The Montgomery product and why n = k + 2

For an odd modulus M of k bits, the Montgomery product is
`MonPro(A, B) = A * B * 2^-n mod M`. The radix-2 loop computes it with
additions only. Start with S = 0. Then for each bit b_i of B, from bit 0
upward:

```
q_i = (S + b_i*A) mod 2          -- the LSB decides whether M is added
S   = (S + b_i*A + q_i*M) / 2    -- the sum is even, so this is a shift
```

Adding `q_i*M` changes nothing modulo M. It only makes the sum even, so the
halving is exact. After n steps, `S = A*B*2^-n (mod M)`.

The subtle part is the range of S, because this design never performs the
usual final "if S >= M then S -= M". The loop runs n = k + 2 times, not k
times, and then `4M < 2^n`. For operands below 2M, the result is
`S = (A*B + Q*M) / 2^n` with `Q < 2^n`. That is below `4M^2/2^n + M`, which
is below 2M. So a result below 2M can go straight back into the multiplier
as an operand, and the exponentiation never needs a comparison inside its
loop. The cost is one extra bit on every operand: values are K+1 bits wide.
While the loop runs, the partial sum is bounded only by `M + A < 3M`, so
the S register is K+2 bits wide.

Only one comparison is left at the very end, after the result has been
mapped back out of the Montgomery domain. There the value is at most M, and
it equals M only when the message is a multiple of M. `monexp2` turns M
into 0 with a single compare-and-subtract.

### Two forms of the multiplier loop (`monpro2`, parameter `SHIFT_A`)

* `SHIFT_A = 0` (default): the plain "double adder" datapath. The first adder
  forms `S + b_i*A`. Its LSB is `q_i`. The second adder adds `q_i*M`, and the
  result is shifted right by one. `q_i` has to wait for the first adder, so
  the two adders form one long path. Latency: **n = K+2 cycles**.
* `SHIFT_A = 1`: A is used shifted up one bit (2A). `b_i*2A` is always
  even, so `q_i` is simply the LSB of S, and it no longer waits for an
  addition. This form adds `q_i*M` first and `b_i*2A` second. The extra
  factor 2 is removed by one more iteration, on a zero bit of B. Latency:
  **n + 1 cycles**. Here the partial sum is bounded by `M + 2A < 5M`, so S
  is K+3 bits wide.

Both forms return the same residue and the same bound below 2M.
`monexp2` has its own `SHIFT_A` parameter and passes it to both of its
multipliers. The default is the plain form.

Interface of `monpro2`: `a`, `b` (K+1 bits, each below 2M) and `m` (K bits,
odd) are captured on the clock edge where `load` is high. One iteration
runs on each following edge. `done` pulses for one cycle when `r` is
valid, n (or n+1) cycles after the load edge. `r` holds until the next
load.

## The exponentiator (`monexp2`)

Montgomery products work on values scaled by `2^n`. The exponentiation
therefore has three stages:

1. **Mapping.** `r2mod` computes `C = 2^(2n) mod M`. It starts from 1 and
   doubles modulo M 2n times, one doubling per clock. Then two multipliers
   run in parallel: `P = MonPro(C, mess) = mess*2^n mod M` and
   `R = MonPro(C, 1) = 2^n mod M`.
2. **Right-to-left scan of the key.** For each key bit e_i, from bit 0 to
   bit K-1, the P multiplier squares, `P = MonPro(P, P)`. In the same cycles,
   if e_i = 1, the R multiplier multiplies, `R = MonPro(R, P_old)`. If
   e_i = 0, the R multiplier is not started and keeps R on its output.
   Square and multiply are independent in this order, which is what lets
   two multipliers halve the time of a one-multiplier, left-to-right
   schedule.
3. **Re-mapping.** `R = MonPro(R, 1)` removes the `2^n` factor. Then comes
   the final correction described above.

The two multipliers' output registers hold P and R themselves, so there
are no separate P and R registers. The controller only selects each
multiplier's operands and decides when to raise its `load`.

Two bounds keep every product below 2M:
* The message always goes to the bit-scanned side of the mapping product,
  with C on the other side. Any K-bit message therefore works, even one
  larger than M.
* In the loop, both operands are already below 2M.

### Timing

Each product stage costs n+1 cycles: n iterations, plus the cycle in which
`done` is seen and the next product is loaded. A full exponentiation takes
`2n + 1 + (n+1)(K+2)` cycles from the `start` edge to `done`, with n = K+2.
Every key bit takes the same time, whether or not its multiply runs.
With `SHIFT_A = 1`, every product is one cycle longer, and the total is
`2n + 1 + (n+2)(K+2)` cycles.

| K    | n    | cycles per exponentiation |
|------|------|---------------------------|
| 8    | 10   | 131 (6.55 us at 20 MHz)   |
| 1024 | 1026 | 1,055,755                 |

### Interface (`monexp2`, the top level)

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1 | clock |
| `rst`    | in  | 1 | synchronous reset, active high |
| `start`  | in  | 1 | while idle: capture `mess`, `clef`, `m` and begin |
| `mess`   | in  | K | message (plaintext or ciphertext) |
| `clef`   | in  | K | exponent (E to encrypt, D to decrypt) |
| `m`      | in  | K | modulus, must be odd |
| `h_cryp` | out | K | `mess^clef mod m`, held until the next start |
| `busy`   | out | 1 | exponentiation in progress |
| `done`   | out | 1 | one-cycle pulse when `h_cryp` is valid |

The inputs are needed only on the `start` edge. Assertions check that
the modulus is odd, that a product is never loaded into a busy multiplier,
and that the multiply never outlasts the square beside it.

At K = 8, synthesis gives about 150 flip-flops: two multipliers of about
40 each, the constant generator, and the captured operands and controller.

## Where this RTL departs from the reference design

* **Handshake.** The reference exponentiator has only MESS, CLEF, M, CLK,
  RST and H_CRYP: 34 pins at K = 8. It runs once after reset and gives no
  completion signal. This RTL adds `start`, `busy` and `done`, so that
  exponentiations can follow each other without a reset.
* **Widths.** The reference gives 8-bit ports and 8-bit adders for its
  8-bit key. Values below 2M need K+1 bits, and the partial sums need more
  (see above). The operands are K+1 bits wide and the adders K+3 (K+4 with
  `SHIFT_A = 1`). Only the top-level ports are K bits.
* **Final correction.** The reference algorithm has no final subtraction. The
  one added here matters only for messages that are multiples of M, which
  would otherwise come out as M instead of 0.
* **Mapping constant.** C is computed on chip before every exponentiation,
  which costs 2n cycles. The reference design also suggests loading C (and M,
  E, D) into registers once and reusing them across many operations, for
  instance to keep both E and D on chip for signing. That register bank is
  not part of this RTL.
* **Timing.** The multiplier's load/done protocol and the one-cycle gap
  between products are choices of this design. The reference gives no cycle
  counts for the exponentiator.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=F` and has a watchdog.

* `tb_monpro2` runs both loop forms side by side: the worked example
  `MonPro(11, 11, 21)`, extreme operands, and 150 random odd moduli with
  operands below 2M. It checks `r*2^n = A*B (mod M)`, `r < 2M`, and the
  latency (n and n+1).
* `tb_r2mod` checks every modulus from 1 to 255 against `2^20 mod M` and
  checks the latency of 2n cycles.
* `tb_monexp2` tests the top level at its default size, and is the
  full-size test. It covers:
  * the worked example `2^17 mod 21 = 11`;
  * an RSA round trip with M = 187 = 11*17, E = 7, D = 23, where every
    third message is encrypted and decrypted again;
  * exponent 0 and all ones, and messages that are multiples of M;
  * 300 random cases, all against a 64-bit square-and-multiply model.

  It checks the 131-cycle latency. It counts the cycles in which square
  and multiply run in parallel, the key bits whose multiply was skipped,
  and the final corrections. It fails if any of these never happened.
* `tb_monexp2_wide` runs three random 1024-bit exponentiations (random
  modulus, message and full-length exponent) against a 2048-bit reference.
  Two instances run side by side, one with each multiplier form, and the
  latency of each is checked. The test takes a few seconds.

Not verified: timing closure or area on any FPGA. The reference design
reaches 20 MHz at K = 8. At large K, the ripple adders of the default loop
form will limit the clock.

## Simulating

All files are IEEE 1800-2017. `rsa_pkg.sv` must be read first. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rsa_pkg.sv tb/tb_monexp2.sv --top-module tb_monexp2
./obj_dir/Vtb_monexp2
```

Replace `tb_monexp2` with `tb_monpro2`, `tb_r2mod` or `tb_monexp2_wide` to
run the other testbenches.

To change the key length, set `K` on `monexp2`, or change `KEY_BITS` in
`rsa_pkg`. Nothing else depends on the size. The iteration count
`n = K + 2` comes from `rsa_pkg::monpro_iters`, and all internal widths
follow from K.

# Side-channel-protected Curve25519 (X25519) core

This core computes the X25519 Diffie-Hellman function: given a secret 255-bit
scalar `k` and the x coordinate `u` of a point `P` on Curve25519, it returns
the x coordinate of `k·P`. Arithmetic is modulo the pseudo-Mersenne prime
p = 2^255 − 19. The architecture targets FPGA DSP slices and block RAM. It has
three layers:

| layer  | block(s)                     | job |
|--------|------------------------------|-----|
| field  | `mod_mul`, `mod_addsub`, `fe_ram` | multiply, add and subtract modulo p; store field elements |
| group  | `arith_ctrl`                 | Montgomery-ladder step, inversion, coordinate randomization, all as microcode |
| scalar | `core_ctrl`                  | command interface; one ladder step per scalar bit, then one inversion |

The Montgomery ladder runs the same operations for every key bit. Its timing is
therefore constant, which defeats timing and simple power analysis. Three
masking and hiding measures sit on top of the ladder against differential power
analysis (DPA):

* **Scalar blinding** (`scalar_blinder`). The core runs the ladder on
  k' = k + r·#E, where r is a fresh 24-bit random number and #E is the
  curve's group order. k'·P = k·P, but the key bits the ladder sees change on
  every run.
* **Randomized projective coordinates** (`arith_ctrl`, program INIT). The
  starting point is (λ·u : λ) instead of (u : 1), with a fresh 255-bit λ. This
  makes every intermediate value random.
* **Memory address scrambling** (`addr_scrambler`). A 6-bit mask is XORed onto
  every memory address. Before each run the mask is re-derived from a 6-bit
  LFSR mixed with 6 fresh random bits. Which physical word is read first
  depends on the key bit, and the mask hides that.

`curve25519_core` is the top level and connects all of the above.

## Field multiplication (`mod_mul`)

This is the largest and least obvious block. It uses 255 = 15 × 17: each
operand is 15 limbs of 17 bits, and a 17 × 17 unsigned product fits one DSP
multiplier.

**Stage 1: partial products (15 cycles).** Horner's rule runs over the limbs of
B, from the most significant limb down:

    acc ← acc · 2^17 + A · b_j          (j = 14 … 0)

`acc` is 15 column accumulators of 48 bits each. No carries propagate between
them. Each cycle, 15 multipliers form `a_i · b_j` and add it into column `i`.
Multiplying by 2^17 shifts every column up one place. The column that falls
off the top weighs 2^255 ≡ 19 (mod p), so it re-enters column 0 multiplied by
19. That one ×19 multiplier is the *pre-reduction*.

A partial product moves up at most 14 places, so it wraps at most once. The
worst-case column is then 15 · 19 · (2^17 − 1)^2 < 2^43, which stays well
inside 48 bits.

**Stage 2: post-reduction (2 × 15 cycles).**

* Pass 1 propagates the carries column by column. This leaves fifteen 17-bit
  limbs and a carry `c` worth c · 2^255 ≡ 19c.
* Pass 2 adds 19c into limb 0 and propagates again. A second chain computes the
  same value plus 19 at the same time.
* If pass 2 overflows 2^255, or value + 19 reaches 2^255 (so value ≥ p), the
  result is (value + 19) mod 2^255. Otherwise it is the value itself.

The output is always fully reduced (< p). Inputs may be any 255-bit numbers.

Stage 1, pass 1 and pass 2 each have their own registers, and each hands its
work on as soon as the next one is free. Up to three products are in flight,
and a new one can start every 16 cycles (`ready` is high). Latency is
3·15 + 3 = 48 cycles from `start` to `done`, and results come out in the order
the products went in.

## Field addition and subtraction (`mod_addsub`)

The operands are padded to 8 digits of 34 bits and processed one digit per
cycle, least significant first. Two carry chains run in step:

* S = A + B, and the candidate T = S − p, or
* S = A − B, and the candidate T = S + p.

After the last digit, the carry out of T (for addition) or the borrow of S (for
subtraction) picks the reduced result. The latency is always 9 cycles.
Inputs must be reduced (< p).

## Memory (`fe_ram`) and memory map

`fe_ram` is a true dual-port memory of 64 words × 255 bits with one-cycle
synchronous reads, like an FPGA block RAM. Logical map (before scrambling):

| addr   | content |
|--------|---------|
| 0, 1   | R0 = (X : Z); holds k·P at the end |
| 2, 3   | R1 = (X : Z) |
| 4      | x1, the affine input u |
| 5      | a24 = 121665 |
| 6      | λ |
| 7      | constant 0 |
| 8      | result x = X · Z^(p−2) |
| 16–29  | temporaries T0–T13 |

## Group arithmetic: the microcode (`arith_ctrl`)

A program is a list of operations, each one product or one sum/difference.
They issue strictly in program order, at most one every two cycles. An
operation issues when all of these hold:

* its unit can take it (`mul_ready` or `add_ready`);
* no operation in flight still has to write one of its operands or its
  destination (a scoreboard bit per memory word);
* no result is being written back in this cycle.

Issuing reads both operands on the two memory ports, and the unit starts in
the next cycle. Products are written back through port A and sums through
port B, in the cycle the unit reports done. The operation order interleaves
products and sums, so the adder and up to three products in the multiplier
pipeline work at the same time. Hazards depend only on the program, never on
data or key, so the schedule is fixed. A multiplication can also repeat in
place (dst ← dst²) up to 127 times, which the inversion's long squaring runs
use; nothing else issues during such a run.

**Ladder step** (RFC 7748 formulas, a24 = 121665). It has 18 operations,
10 products and 8 sums, and takes 244 cycles:

| #  | unit | operation            | #  | unit | operation            |
|----|------|----------------------|----|------|----------------------|
| 0  | add  | A = X2 + Z2          | 9  | mul  | X2 ← AA·BB           |
| 1  | mul  | AA = A²              | 10 | mul  | a24·E                |
| 2  | add  | B = X2 − Z2          | 11 | add  | DA + CB              |
| 3  | mul  | BB = B²              | 12 | add  | DA − CB              |
| 4  | add  | D = X3 − Z3          | 13 | mul  | X3 ← (DA + CB)²      |
| 5  | mul  | DA = D·A             | 14 | mul  | (DA − CB)²           |
| 6  | add  | C = X3 + Z3          | 15 | add  | AA + a24·E           |
| 7  | mul  | CB = C·B             | 16 | mul  | Z2 ← E·(AA + a24·E)  |
| 8  | add  | E = AA − BB          | 17 | mul  | Z3 ← x1·(DA − CB)²   |

(X2 : Z2) is the point being doubled and (X3 : Z3) the other one. The program
never swaps data. Instead, the controller flips bit 1 of addresses 0–3 when the
scalar bit is 1, so R0 and R1 trade roles. Both bit values run the same
operations in the same number of cycles, and the testbench checks this.

**Inversion** (program INVERT). It raises Z to p − 2 = 2^255 − 21 with the
standard addition chain: 254 squarings and 11 multiplications, then one more
product with X gives the affine x. That is 266 products and 12,816 cycles.
Each product needs the one before it, so the pipeline does not help here.

**Randomization** (program INIT). R1.X = x1 · λ runs on the multiplier. In
parallel, the adder computes R1.Z = λ + 0, which reduces λ modulo p.

## Scalar layer (`core_ctrl`) and interface

Commands use a valid/ready handshake with `cmd_op`/`cmd_data`. Every command
gets exactly one response, using `rsp_valid`/`rsp_ready` with
`rsp_op`/`rsp_data`.

| command      | data | response |
|--------------|------|----------|
| `CMD_LOAD_K` | 256-bit scalar, as an integer | `RSP_ACK` |
| `CMD_LOAD_U` | x coordinate (bit 255 ignored) | `RSP_ACK` |
| `CMD_RUN`    | –    | `RSP_RESULT`, x(k·P) in `rsp_data` |
| other        | –    | `RSP_ERROR` |

Scalars and coordinates are plain integers. RFC 7748 encodes them as 32-byte
little-endian strings, so the host reverses the byte order.

`CMD_RUN` samples the random inputs `rnd_r` (24 bits), `rnd_lambda` (255 bits)
and `rnd_seed` (6 bits). They must come from a true random number generator,
which is not part of this RTL. A run then does the following:

1. Clamp k as X25519 requires.
2. Blind k and re-seed the address scrambler, in parallel (about 22 cycles).
3. Write the start values into memory.
4. Run INIT.
5. Run 280 ladder steps over k', most significant bit first. k' can be up to
   280 bits long. The count is fixed, whatever the leading bits are.
6. Run INVERT.
7. Read back the result.

One run takes 81,784 cycles, the same for every key and random input:
280 × 246 for the ladder (244 per step plus 2 to call it), 12,816 for the
inversion and 88 for set-up and read-out.

Reset is asynchronous and active low. The memory is not reset, and every word
is written before it is read.

## How this compares with the architecture it follows

The partitioning, the limb and digit sizes and the countermeasures follow the
reference architecture. The list below gives what is different or left out.

* **Speed.** The reference reports 68,880 cycles for the protected ladder,
  14,372 for the inversion and 83,252 in total. This core takes 68,880,
  12,816 and 81,784. The reference's optimized inversion dataflow is not
  reproduced; the inversion here is a plain chain of dependent products.
* **Multiplier pipeline.** The reference arranges the multiplier in two
  stages. Here the post-reduction stage is split into its two carry passes,
  each with its own registers, so three products can be in flight.
* **Memory width.** Each memory word holds a whole field element. The
  reference keeps narrower block-RAM words and streams them through the units.
* **Adder timing.** The second (reduction) chain of the adder works on the
  first chain's digit in the same cycle, not one cycle later.
* **Blinding width.** The blinding factor r is only 24 bits, as in the
  reference's proof of concept; about 128 bits would be needed in practice.
  Changing `R_W` changes the scalar length, the ladder count and the run time
  together.
* **Twist points.** Blinding with the curve order is only correct for points
  on the curve. X25519 also accepts points on the quadratic twist, and for
  those the blinded result is wrong. Send only points on the curve, or run
  with `rnd_r = 0`.
* **Scrambler limits.** The address mask is the state of a 6-bit LFSR, so it
  takes 63 values and never 0. XOR scrambling keeps the relative layout of the
  memory map.
* **λ = 0.** If λ ≡ 0 (mod p), the result is wrong. The chance of that is
  about 2^−255.
* **Multi-core version.** It is not included. That version puts several cores
  at a lower clock around a shared extended-Euclid inverter.
* **Unprotected mode.** There is no separate unprotected build. Running with
  `rnd_r = 0` gives the same result and timing.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares against
values computed independently with wide-integer arithmetic, checks latencies
and has a watchdog.

`tb/x25519_ref_pkg.sv` is a plain reference model. It uses the `%` operator on
510-bit products and an explicit-swap ladder, and it shares no code with the
RTL.

The end-to-end test, `tb_curve25519_core`, runs the top level at its default
parameters and checks these results:

* the RFC 7748 key-agreement vectors: Alice's and Bob's public keys, and the
  shared secret computed from both sides;
* a random key against the reference model;
* the same key and point with new random inputs give the same result, while
  the blinded scalar and the starting Z differ;
* the same key with `rnd_r = 0` (no blinding) gives the same result;
* equal run times for every key;
* a ladder step of at most 254 cycles (in the controller's own test);
* error responses and response back-pressure.

It also counts how often each mechanism fires: ladder bits 0 and 1, blinding,
masking, randomized Z, parallel multiplier/adder activity and inversions.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/c25519_pkg.sv tb/x25519_ref_pkg.sv tb/tb_curve25519_core.sv \
        --top-module tb_curve25519_core
    ./obj_dir/Vtb_curve25519_core

Replace the testbench name to run another block's test. Each test prints
`TB_RESULT checks=<n> failures=<n>`. The full-size end-to-end test takes about
a second.

## Files

* `rtl/c25519_pkg.sv`: constants (p, a24, group order), memory map, microcode
  and command types.
* `rtl/mod_mul.sv`, `rtl/mod_addsub.sv`, `rtl/fe_ram.sv`: field layer.
* `rtl/arith_ctrl.sv`: microcode programs and the in-order issue logic.
* `rtl/core_ctrl.sv`, `rtl/scalar_blinder.sv`, `rtl/addr_scrambler.sv`:
  scalar layer and countermeasures.
* `rtl/curve25519_core.sv`: top level.
* `tb/`: one testbench per block, plus the reference model package.

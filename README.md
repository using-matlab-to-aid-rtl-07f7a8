# Word-serial Montgomery RSA core

This is an RSA exponentiation engine, z = x^e mod n, for 1024-bit moduli. All of its
arithmetic goes through one multiplier. That multiplier takes a 16-bit word of one operand
per clock, multiplies it by all 64 words of the other operand in parallel (64 small 16x16
multipliers, one FPGA DSP block each), and returns one 16-bit word of the product per clock,
least significant word first. Modular reduction uses Montgomery's method, so the core never
divides. A Montgomery product is three passes through the multiplier, one word-serial add
and one word-serial subtract. An exponentiation is a chain of such products.

The architecture follows the multiplication engine described in *Using MatLab to aid the
implementation of a fast RSA processor on a Xilinx FPGA*. That work gives the split into
16-bit words, the 64-lane "matrix multiply", the shift-down accumulator, the Montgomery
data flow and the square-and-multiply schedule. The rest was not specified there and was
designed here: the control sequencing, the RAM organisation, the host port and the exact
pipeline. Section "What is given and what is chosen" lists these choices.

## Arithmetic background

- **Montgomery product.** r = 2^1024. For an odd modulus n and n' = -n^-1 mod r, the
  product MontProd(a, b) = a·b·r^-1 mod n is computed as:
  - t = a·b
  - m = (t mod r)·n' mod r
  - y1 = t + m·n, whose low 1024 bits are zero
  - y1/r, which is below 2n
  - subtract n once if y1/r ≥ n
- **Montgomery form.** Numbers are kept multiplied by r. With x~ = x·r mod n and A = r mod n,
  the usual left-to-right square-and-multiply works on A unchanged. A final MontProd(1, A)
  removes the factor r.
- **Cost of one exponentiation.** 3 + (exponent bits) + (one bits) Montgomery products.
  - The 3 are: x into Montgomery form, producing the starting value r, and converting back.
  - For e = 17 this is 10 products.
  - r mod n depends only on the modulus. When it is kept from an earlier run with the same
    key (`reuse_r`), the cost drops to 2 + bits + ones, which is 9 products for e = 17.

The host must supply n' and r^2 mod n. Both depend only on the modulus, so they are computed
once per key, in software (for example with an extended GCD).

## The multiplication engine (`mult_engine`)

This is the part that takes the most thought. The engine multiplies a 1024-bit multiplicand
X by a 1024-bit multiplicator Y. Y arrives 16 bits at a time, starting with y_0.

**Product part (`mm_product`).**
- X is shifted once into `ser2par`, a 64-word register, at one word per clock.
- For every multiplicator word y_k, `vec_mult` forms the 64 products P_i = y_k · x_i. Each is
  32 bits.
- The multiplicator and the products are each registered once.
- A switch then forces all products to zero when the step is a `restart` or a `not_domult`
  step.

**Accumulator part (`mm_accum`).** The running sum is kept as 65 lanes S_0..S_64 of 18 bits
each: a 16-bit word plus a 2-bit carry. Each P_i is split into a low and a high 16-bit half.
The high half of P_i carries weight 2^16 relative to P_i, so it lands in lane i+1. On every
step:

```
T_j      = S_j + lo(P_j) + hi(P_(j-1))          (lane 0 has no hi term, lane 64 no lo term)
out      = T_0[15:0]                            exact: bits 0..15 of the true sum
S_j next = T_(j+1)[15:0] + T_j[17:16]           shift down one word, carry moves with it
S_64 next= T_64[17:16]                          zero word concatenated at the top
```

Each lane's carry is passed down one lane per cycle instead of rippling, so each lane is a
short adder and the clock rate does not depend on the 1024-bit width. A lane never exceeds
2^16 + 2. T_j is then at most 3·2^16, so two carry bits always suffice. The word shifted out
is exact even though the upper lanes are redundant. The reason: every lane other than T_0
carries a multiple of 2^16.

**Producing the full product.**
- 64 steps with the words of Y give the low 1024 bits of X·Y, one word per clock.
- 64 more steps with `not_domult` high add nothing. They only shift the stored upper half
  out. That gives all 2048 bits in 128 clocks.
- When only X·Y mod 2^1024 is needed, the engine stops after 64 steps. A `restart` token
  before the next product clears the leftover sum.
- The result word of a step given in cycle c appears in cycle c+3.

**Reading the multiplicand back.** `shift` rotates the multiplicand register by one word and
`dataout_m` shows its lowest word. The stored operand can therefore be read back serially,
which the Montgomery step uses to read n.

## The Montgomery product (`mont_mult`)

One engine runs the three products in turn. t is kept in a private 128-word RAM. The phases
of one product, at the default size (NW = 64 words):

| phase   | what happens                                                         | cycles   |
|---------|----------------------------------------------------------------------|----------|
| LOAD_B  | b → engine multiplicand                                              | NW+1     |
| MUL_T   | restart, stream a, NW zero steps; t = a·b (2NW words) → t RAM         | 2NW+5    |
| LOAD_NP | n' → engine                                                          | NW+1     |
| MUL_M   | restart, stream t_0..t_63, NW steps only; m = t·n' mod r → slot M     | NW+5     |
| LOAD_N  | n → engine                                                           | NW+1     |
| MUL_Y   | restart, stream m, NW zero steps; each word of m·n is added to the same word of t as it leaves the engine; upper NW words (y1/r) → slot dst_u, carry kept | 2NW+6 |
| SUB     | read y1/r back, subtract n (rotated out of the engine), → slot dst_y2 | NW+1     |

- **Total.** Including the start and done cycles, one product takes 9·NW+21 = 597 cycles.
- **Zero low half.** The low half of t + m·n must be zero. An assertion checks this on every
  word.
- **Final selection.** The result is y1/r when the subtraction borrows and y1/r has no bit
  1024. Otherwise it is y1/r − n. No extra copy is made: `res_slot` says which of the two
  destination slots holds the result.
- **Operand reuse.** Both operands are completely read by the end of MUL_T. The destination
  slots can therefore be the same as the operand slots, which is how A = A·A is done in place.

## Exponentiation (`exp_ctrl`)

The controller issues the Montgomery products and records where each result landed:

```
x~ = MontProd(x, r^2)        into XT0/XT1
R  = MontProd(1, r^2)        into R0/R1     (= r mod n; skipped when reused)
A  = R
for i = exp_len-1 downto 0:
    A = MontProd(A, A)
    if e[i]: A = MontProd(A, x~)
z  = MontProd(1, A)
```

It reads one exponent bit per iteration from the exponent slot, 16 bits per RAM word. Bits
above `exp_len` are ignored, so a 17-bit public exponent costs 17 iterations, not 1024.
`exp_len` = 0 gives z = 1.

R is kept in its own slot pair. A start with `reuse_r` high skips recomputing R, provided an
earlier run since reset computed it. It is the host's job to keep `reuse_r` low after
loading a new modulus.

## Operand RAM and host protocol (`rsa_core`)

The operand RAM has 1024 words of 16 bits (one 18 Kbit block RAM), in 16 slots of 64 words.
An address is `{slot[3:0], word[5:0]}`, and word 0 is the least significant.

| slot | contents            | slot | contents                  |
|------|---------------------|------|---------------------------|
| 0    | n (odd)             | 5, 6 | x~ (result pair)          |
| 1    | n' = −n^-1 mod 2^1024 | 7, 8 | A (result pair)          |
| 2    | r^2 mod n           | 9    | m (scratch)               |
| 3    | x (< n)             | 15   | reads as the constant 1   |
| 4    | e                   | 10, 11 | r mod n (result pair, kept) |

Using the core:
1. While `busy` is low, write the slots with `host_we`/`host_addr`/`host_wdata`.
2. Pulse `start` with `exp_len` set. Also set `reuse_r` if n is unchanged since the last run.
3. Wait for the one-cycle `done` pulse.
4. Read the result from slot `res_slot`. `host_rdata` returns the word at `host_addr` one
   cycle later.

While the core is busy, the RAM belongs to it and host accesses are ignored. Reset is
asynchronous and active low, and clears only control state.

The RAM has one read port. While a product runs it belongs to `mont_mult`. Between products
`exp_ctrl` uses it to fetch exponent words, and an assertion checks that the two never claim
it together.

## Performance

- **Exponentiation.** Cycles = 2 + (3 − reuse_r + exp_len + ones(e)) · (9·NW + 22) + 2 · exp_len.
- **e = 17.** 5992 cycles, or 5394 with `reuse_r`.
  - At 150 MHz this is about 25,000 exponentiations per second.
  - At 204 MHz it is about 34,000.
  - The reference design reported 33,000 and 52,000 for this case. It did not state its
    cycle count or its schedule.
- **Decryption with a full 1024-bit private exponent.** About 1,530 products, 921,000
  cycles, about 160 per second at 150 MHz.
- **Idle engine.** About 40 % of the cycles are operand loads (LOAD_*) and the subtraction,
  while the engine is idle. Loading the next multiplicand during the zero steps of the
  previous product would remove most of them. This is not done here.

## What is given and what is chosen

Given by the reference design:
- 16-bit words and 64 parallel 16x16 multipliers.
- The product-part structure: multiplicand register `ser2par`, two unit delays, and a
  restart/not_domult switch to zero.
- The accumulator: low 16 bits and upper 2 bits of each lane, and a zero word concatenated
  at the top when shifting down.
- The rates: 16 result bits per cycle, 64 cycles for a product mod 2^1024, 128 for the full
  product.
- The Montgomery data flow t, m, m2, y1, y1/r, y2 and the borrow b.
- Square-and-multiply with conversion into and out of Montgomery form.
- Skipping the computation of r mod n when the modulus is fixed.
- Precomputed n' and r^2.

Chosen here, where nothing was specified:
- The behaviour of `ser2par` (shift in at the top, rotate on `shift`).
- Delaying the switch controls inside `mm_product` so callers present them with the data.
- The exact carry arithmetic of the lanes.
- The phase schedule of `mont_mult` and its private t RAM.
- Reading n for the final subtraction by rotating the engine register.
- Serial add and subtract units.
- The RAM slot map and the host port.
- The `exp_len` and `reuse_r` inputs.
- Reset behaviour.

The reference design was generated from a Simulink model. This RTL is an independent
description of the same hardware and is not derived from that generated code.

## Parameters

`W` (word width, 16) and `NW` (words per operand, 64) are parameters throughout, with
defaults in `rsa_pkg`. The testbenches run at the defaults. NW must be a power of two,
because a RAM address is `{slot, word}` and is `SLOT_W + log2(NW)` bits wide. Smaller
values give a faster simulation of the same logic. The end-to-end test also passes with
NW = 4 (64-bit operands) and NW = 8 when its `NW` constant is changed and passed to
`rsa_core`.

## Files and simulation

`rtl/`:
- `rsa_pkg.sv`: constants and slot map.
- `rsa_core.sv`: top.
- `exp_ctrl.sv`, `mont_mult.sv`.
- `mult_engine.sv`, `mm_product.sv`, `mm_accum.sv`, `ser2par.sv`, `vec_mult.sv`.
- `serial_addsub.sv`, `word_ram.sv`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.
- `tb_rsa_core` runs complete 1024-bit exponentiations: e = 17, 3, 65537, a random 24-bit
  exponent, 1 and 0. It computes n', r^2 and x^e mod n itself with wide integer arithmetic,
  and checks results and cycle counts.
- It also confirms that restart, not_domult, mod-r products, multiplicand rotation, both
  outcomes of the final subtraction, and reuse of r mod n all occur.
- `tb_rsa_roundtrip` generates a real 1024-bit RSA key: two 512-bit primes and
  d = 17^-1 mod (p-1)(q-1). It encrypts with e = 17, decrypts with d on the core and checks
  that the message comes back. This takes about 10 s of simulation.

Build and run with Verilator 5 from the folder that holds `rtl/` and `tb/` (`-y rtl` lets
Verilator find each module by its file name; the package is named first):

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/rsa_pkg.sv tb/tb_rsa_core.sv \
          --top-module tb_rsa_core -o sim && ./obj_dir/sim
```

Any other testbench runs the same way with its own name. The full-size end-to-end test
simulates in well under a second.

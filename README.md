# RNS Cox-Rower modular multiplier with a double-level Montgomery Rower

This is SystemVerilog for a Residue Number System (RNS) modular multiplier
of the Cox-Rower kind, as used for elliptic-curve cryptography over any
prime field F_p. Its central part is a Rower ALU that reduces by an *inner*
Montgomery reduction (radix 2^r) inside each residue channel. The *outer*
Montgomery reduction works over the whole RNS base. Hence the name
"double-level Montgomery".

The classical Rower reduces modulo m = 2^r − μ by folding the high half
twice. That only works while μ < √(2^r). The Montgomery Rower only needs m
to be odd. So the moduli can use the full range that exact base extension
allows, which is a much larger range. With r = 17, one 17×17 DSP multiplier
per product then gives enough moduli for a 521-bit p (n = 31 moduli per
base, μ up to 2^10). The classical μ < 362 limit stops at 256 bits.

The default configuration is that 521-bit one: r = 17, n = 31 Rowers,
Cox width q = 7, α = 0.5.

## Number representation

* Two bases, B = {m_0 … m_{n−1}} and B' = {m'_0 … m'_{n−1}}. All 2n moduli
  are pairwise coprime and have the form 2^r − μ. M and M' are the
  products of the two bases.
* Rower j holds residue j of every value in **both** bases: modulo m_j and
  modulo m'_j. Each operation picks the base it works in.
* Residues are stored in the inner Montgomery domain, x̃ = x·2^r mod m. The
  ALU's product a ⊗ b = a·b·2^−r mod m keeps that domain stable:
  x̃ ⊗ ỹ is the domain form of x·y.
* A command computes S with S·M ≡ A·B (mod p). S is not fully reduced: it
  is below 3p when A and B are, so results can be fed straight back in as
  operands. Values enter and leave in the domain of the outer Montgomery
  reduction, with a factor of M.

## The Rower ALU (`mont_rower_alu`)

There are five register stages and one operation per cycle. Latency is 5
cycles and there are no stalls.

| stage | work | multiplier |
|---|---|---|
| 1 | operand registers a, b, μ, −m^−1 mod 2^r | |
| 2 | c = a·b | r×r → 2r |
| 3 | q0 = (c mod 2^r)·(−m^−1) mod 2^r | r×r → r, low half only |
| 4 | q0·m, with c carried alongside | r×r → 2r |
| 5 | s = q0·m + c; s1 = s >> r; z = (acc ? z : 0) + s1, reduced | adder + adder/reducer |

* For a < 2^r and b < m, s1 is below 2m. With the accumulator below m,
  the stage-5 sum is below 3m. The reducer therefore subtracts 0, m or 2m,
  with m formed as 2^r − μ.
* The stage-5 register is both the result and the **single accumulator**.
  An operation issued with `in_acc = 1` adds its product to the previous
  result. A chain of products can therefore be issued back to back, which
  is how the base extensions' sums of n terms are formed.
* Each multiplier only needs the *low* half of the previous one. This
  keeps the multiplier-to-multiplier path short, and the design is meant
  to sit in three DSP blocks.
* **The even modulus.** One modulus of a base may be 2^r itself (μ = 0).
  For μ = 0 the ALU skips the reduction and returns (acc + a·b) mod 2^r.
  That Rower's residues and constants then carry no 2^r factor. The array
  supports this, and the full-size test uses it.

## The Cox and the two bounds (`cox`, `cr_pkg`)

Extending a value from base B to base B' (each ξ_i below is a value
broadcast by Rower i) uses

  x = Σ ξ_i·M_i − k·M,  with k = ⌊Σ ξ_i / m_i⌋.

The Cox estimates k cheaply. It takes m_i ≈ 2^r and keeps only the top q
bits of each ξ_i:

  k̂ = ⌊α + Σ trunc_q(ξ_i) / 2^r⌋.

In hardware, this is a register with q fraction bits and a few integer
bits. `init` loads α and each `add` adds `xi[r-1 -: q]`. k is the integer
part, one cycle later.

The estimate is exact, k̂ = k, for x < (1 − α)·M, provided the moduli and
q satisfy two conditions. The package gives both as integer-exact
functions:

* **μ bound** (`mu_bound_ok`, `mu_max_bound`):
  μ_max ≤ 2^r·α/n − 2^(r−q) + 1.
  At the defaults this allows μ up to 1091.
* **q bound** (`q_min`):
  2^−q ≤ α/n + 2^−r − μ_max/2^r.
  q = 7 is the smallest width for n = 31 and μ_max ≤ 1024.

The first extension starts the Cox at α = 0. Its estimate may then be one
short, which adds M to the quotient and p to the result (hence S < 3p).
The second extension starts at errinit = α·2^q (64 at the defaults). It is
exact because S < M'/2.

## One modular multiplication (`mmr_sequencer`)

The command `rd ← ra ⊗ rb` runs these steps on all n Rowers in lockstep.
The same control word goes to every Rower, and each Rower uses its own
constants. Bracketed values are per-Rower constants, which the host loads
once per (p, B, B') set.

| step | state | work in Rower j | base | issues |
|---|---|---|---|---|
| 1 | MUL_B, MUL_BP | x̃ = ã ⊗ b̃ | B, then B' | 2 |
| 2 | QI | ξ_j = x̃_j ⊗ [(−p^−1)·M_j^−1]. Cox ← 0 | B | 1 |
| 3 | BE1 (i = 0…n−1) | Rower i broadcasts ξ_i, the Cox adds it, and acc += ξ_i ⊗ [M_i·p·M^−1·M'_j^−1·2^r] | B' | n |
| 4 | BE1_X | acc += x̃'_j ⊗ [M^−1·M'_j^−1] | B' | 1 |
| 5 | BE1_K | acc += k ⊗ [(−M)·p·M^−1·M'_j^−1·2^r], giving ξ'_j. Cox ← α | B' | 1 |
| 6 | BE2 (i = 0…n−1) | Rower i broadcasts ξ'_i, the Cox adds it, and acc += ξ'_i ⊗ [M'_i·2^2r] | B | n |
| 7 | BE2_K | s̃_j = acc + k ⊗ [(−M')·2^2r], written to rd | B | 1 |
| 8 | FIN | s̃'_j = ξ'_j ⊗ [M'_j·2^2r], written to rd | B' | 1 |

* **Plain values for the Cox.** ξ_j and ξ'_j come out as plain residues,
  not domain residues, because the Cox must see the real values. The
  constants of steps 2–5 are chosen so the 2^r factors cancel. Steps 6–8
  bring the result back into the domain.
* **Drain waits.** Before steps 2, 3 and 6, and after step 8, the
  sequencer waits for the 5-stage pipeline to drain (`ALU_LAT` cycles).
* **Latency.** A command takes **2n + 28 cycles** from `start` to `done`
  (90 cycles at n = 31). The ALUs issue 2n + 7 operations in that time.
* **Step order.** The x'-term (step 4) is issued before the k-term
  (step 5), so the Cox's last addition has landed when k is read.
* **Broadcast bus.** The broadcast is an n-to-1 multiplexer of the Rowers'
  memory read ports. The sequencer names the Rower (`bc_idx`) and the word
  (`bc_addr`). The selected value drives every ALU's A operand and the
  Cox input in the same cycle.

## Rower and local memory (`rower`, `cr_pkg`)

Each Rower has one memory of 16 + 2n + 2·NREG words of r bits (110 words
at the defaults). The memory is read without a clock edge: two operand
ports, the broadcast port and the host port. It has one write port, and
result write-back takes priority over the host.

| address | content (Rower j) |
|---|---|
| 0 `A_QINV` | (−p^−1)·M_j^−1 mod m_j |
| 1 `A_XC` | M^−1·M'_j^−1 mod m'_j |
| 2 `A_K1` | (−M)·p·M^−1·M'_j^−1·2^r mod m'_j |
| 3 `A_K2` | (−M')·2^2r mod m_j |
| 4 `A_SC` | M'_j·2^2r mod m'_j |
| 5, 6 | μ_j, −m_j^−1 mod 2^r (base B) |
| 7, 8 | μ'_j, −m'_j^−1 mod 2^r (base B') |
| 9–12 | scratch: x̃, x̃', ξ_j, ξ'_j |
| 16 + i | M_i·p·M^−1·M'_j^−1·2^r mod m'_j |
| 16 + n + i | M'_i·2^2r mod m_j |
| 16 + 2n + 2k (+1) | register k, residue in B (B') |

* M_i = M/m_i and M'_i = M'/m'_i.
* For the even modulus, drop every 2^r factor of that Rower's own
  channel.
* `tb/tb_cox_rower_top.sv` computes all of these from scratch (tasks
  `load_constants` and `load_reg`). It is the reference for the host-side
  precomputation.

## Top-level interface (`cox_rower_top`)

* **Host write:** `hw_en`, `hw_rower`, `hw_addr`, `hw_data` write one word
  of one Rower at the clock edge. This is allowed only while `busy` is
  low; an assertion checks it.
* **Host read:** `hr_addr` returns that word of every Rower at once on
  `hr_data[N]`, combinationally.
* **Command:** pulse `start` with the register numbers `ra`, `rb`, `rd`
  while `busy` is low. `done` pulses for one cycle when both result
  residues are written, 2n + 28 cycles later.
* **Reset:** `rst_n` is asynchronous and active low. It clears the
  pipeline, the Cox and the sequencer, but not the memories.

Parameters: `R` (17), `N` (31), `Q` (7), `ALPHA` (64, meaning α = 64/2^Q),
`NREG` (16).

Sizes for other curves, with α = 0.5:

| p bits | n | q | μ_max |
|---|---|---|---|
| 160 | 10 | 5 | 2^7 |
| 192 | 12 | 5 | 2^7 |
| 224 | 14 | 5 | 2^8 |
| 256 | 16 | **6** | 2^8 |
| 384 | 23 | 6 | 2^9 |
| 521 | 31 | 7 | 2^10 |

For n = 16, the q bound rules out q = 5 at α = 0.5 whatever μ_max is. So
q = 6 is used there, although the published configuration table lists 5.
A 31-Rower array also runs every smaller p unchanged; its extensions are
just longer.

## Verification

Each testbench checks its results against values computed independently,
and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_mont_rower_alu` | ~3000 random chains of products: μ over the whole range, the even modulus, largest operands, back-to-back accumulation. Each result is checked against a 64-bit model, and so is its arrival exactly 5 cycles after issue. |
| `tb_cox` | random α and ξ sequences, including all-ones values; init-over-add priority |
| `tb_rower` | random operations with operand A from memory, broadcast or Cox, in both bases, with write-back. A model memory is updated in the cycle the Rower must write, and all words are read back at the end. |
| `tb_mmr_sequencer` | every control output, cycle by cycle, against the step table above; `done` at 2n + 28 |
| `tb_cox_rower_top` | full default size (n = 31, 521-bit random p). See below. |
| `tb_cox_rower_curves` | the same kind of checks on separate arrays for 160-, 192-, 224-, 256- and 384-bit p (helper `cr_curve_run`) |

`tb_cox_rower_top` works as follows:

* **Setup.** It picks 62 coprime moduli inside the μ bound, with one of
  them even, and a random odd p coprime to them. It computes and loads
  every constant.
* **Run.** It then runs about 60 multiplications, including squarings and
  results written over their own operands.
* **Checks on each result:**
  * S·M ≡ A·B (mod p);
  * S < 3p;
  * S equals the exact (X + Qp)/M or that value plus p;
  * all 62 residues agree;
  * the latency is 2n + 28 cycles.
* **Outcome counts.** It requires that both outcomes of the first extension
  (exact and one short) happen, and that both extensions remove a nonzero
  multiple.

To run one with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/cr_pkg.sv tb/tb_cox_rower_top.sv --top-module tb_cox_rower_top
./obj_dir/Vtb_cox_rower_top
```

Replace the testbench name for the others. All of them finish within
seconds.

## What is not here, and where this departs from the published design

* **Only modular multiplication is built.** The complete processor also
  has a sequencer program for Montgomery-ladder scalar multiplication in
  projective coordinates, binary↔RNS conversion, a final inversion, and
  one-cycle RNS addition/subtraction. The published description gives
  their cycle counts but not their operation sequences, nor the datapath
  for addition and subtraction. None of these are included.
* **Host interface.** It is a plain memory port of this design's own. The
  real interface is unspecified.
* **Latency.** Multiplication is quoted at 2n + 3 cycles, presumably with
  independent operations overlapped in the pipeline. This sequencer runs
  one command at a time and waits for the pipeline to drain between
  dependent phases, so it takes 2n + 28 cycles. Overlapping independent
  commands would recover most of that.
* **This design's own choices:**
  * the memory map and port structure;
  * the number of registers;
  * the accumulate flag on each operation;
  * the reducer built from compare-and-subtract;
  * asynchronous reset.
* **Bit-exact to the published design:**
  * the ALU stage structure, its three multipliers and single accumulator;
  * the μ = 0 plain-product mode;
  * the Cox truncation, with α = 0 for the first extension and errinit
    for the second;
  * the reduction steps and their constants;
  * the default sizes.

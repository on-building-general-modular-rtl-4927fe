# One adder for any modulus 2^n − δ

This is a modulo-m adder for residue-number-system (RNS) channels with
m = 2^n − δ. The same circuit serves every δ with 0 ≤ δ < 2^(n−1). The
modulus lives in a small writable register, so changing it means writing that
register, not building a new adder. The datapath uses only standard parts: a
carry-save adder (CSA), one ordinary n-bit carry-propagate adder (CPA) and a
few gates. Only one n-bit adder is on the critical path.

The trick is the number format. A plain modular adder must compute
A + B + δ and then, if that did not overflow 2^n, subtract δ again. That
takes a second adder, or a multiplexer with a fan-out of n on its select
line. This design never does that subtraction. It records it in a flag bit
and leaves it for the next addition, which can absorb it for free.

## The excess-δ residue format

A residue X mod m is carried as a pair (φ, μ). Here φ is a 1-bit flag and μ
is an n-bit magnitude, with

    X ≡ μ − φ·δ   (mod m)

A set flag means "δ still has to be subtracted from μ". A value can have
more than one code. For example, with m = 29 (n = 5, δ = 3), the value 28
is (0, 28) or (1, 31). Zero is (0, 0), (1, 3) or (0, 29).

## The addition

For operands A = (φa, μa) and B = (φb, μb):

    W  = A + B + δ = μa + μb + (1 − φa − φb)·δ
    φs = NOT w_n          (w_n is the bit of weight 2^n of W)
    μs = W mod 2^n

Why this works:

- If W ≥ 2^n, then μs = W − 2^n = A + B − m ≡ A + B. The flag is 0.
- Otherwise μs = W = A + B + δ. The flag is 1, so the encoded value is
  μs − δ = A + B.

The correction term F = (1 − φa − φb)·δ can only be +δ, 0 or −δ. It depends
on the flags of both inputs. This is how the pending subtraction of an input
is absorbed.

Worked examples for m = 29 (n = 5, δ = 3). The testbench checks each row
exactly.

| A  | (φa, μa) | B  | (φb, μb) | W  | (φs, μs) | S  |
|----|----------|----|----------|----|----------|----|
| 28 | (0, 28)  | 1  | (1, 4)   | 32 | (0, 0)   | 0  |
| 0  | (0, 29)  | 0  | (0, 0)   | 32 | (0, 0)   | 0  |
| 3  | (1, 6)   | 28 | (1, 31)  | 34 | (0, 2)   | 2  |
| 3  | (0, 3)   | 25 | (1, 28)  | 31 | (1, 31)  | 28 |
| 28 | (1, 31)  | 28 | (1, 31)  | 59 | (0, 27)  | 27 |
| 1  | (0, 1)   | 2  | (0, 2)   | 6  | (1, 6)   | 3  |

### Operand domain

The result is correct as long as 0 ≤ W < 2^(n+1). That holds when both
operand values μ − φ·δ lie in [0, m] ([0, m − 1] when δ = 0). The sum then
lies in the same range again, so sums can be fed straight back as operands.
The value m is just a second code for zero. If both operands are in
[0, m − 1], the sum is too.

Under simulation, an assertion in `excess_delta_mod_adder` fires when
operands outside this domain reach it. Without that check the result would
silently be wrong.

## The datapath

```
 delta_reg ──δ──► f_box ◄── φa, φb
                    │ f[n-1:0]          μa      μb
                    ▼                    │       │
                   csa  (μa + μb + f  →  u + 2·v)
                    │ u[n-1:0]   v_n..v_1
                    │            │   └────────────────┐
                    ▼            ▼                    ▼
   kspp_adder:  u + {v_{n-1}..v_1, f_{n-1}} ──► μs,  c_n
                                                      │
   flag_logic:  φs = ¬c_n·(¬v_n + f_{n-1}) + ¬v_n·f_{n-1}
```

**F box (`f_box`).** This block writes F as an n-bit 1's-complement number:

- Its sign bit is f_{n−1} = φa·φb.
- Each lower bit f_i is d_i when both flags are 0, NOT d_i when both are 1,
  and 0 otherwise.

1's complement is one short of −δ. The missing +1 is free: the weight-1
position of the CSA's carry word is always empty, so f_{n−1} goes in there.

**CSA (`csa`, `full_adder`).** This is n full adders side by side. They
reduce μa + μb + f to a sum word u and a carry word v. No carry crosses
between bits.

**Carry-propagate adder (`kspp_adder`).** This is a Kogge-Stone parallel-prefix
adder. The pg boxes use an OR propagate, p = a | b, and form a half-sum
h = p & ~g. There are ⌈log2 n⌉ prefix levels, and the sum bits are
h_i ^ c_i. The design would accept any n-bit adder here, for example
ripple-carry for low area. Kogge-Stone is the fast choice. Its top two
carries come out of the last prefix level together, so the flag is ready
as early as the top sum bit.

**Flag (`flag_logic`).** Writing W with the carries gives
w_n = v_n − f_{n−1} + c_n. In the domain above this is always 0 or 1, and
the gate equation for its complement is the one shown in the figure.

**δ register (`delta_reg`).** This holds δ in n − 1 bits, which enforces
δ < 2^(n−1).

## Interface of `excess_delta_mod_adder`

| port          | dir | width | meaning                                    |
|---------------|-----|-------|--------------------------------------------|
| `clk`, `rst_n`| in  | 1     | clock and async active-low reset (δ register only) |
| `delta_we`    | in  | 1     | write `delta_wdata` into δ at the rising edge |
| `delta_wdata` | in  | N−1   | new δ; the modulus becomes 2^N − δ          |
| `delta_q`     | out | N−1   | current δ                                  |
| `phi_a`, `mu_a` | in | 1, N | operand A                                  |
| `phi_b`, `mu_b` | in | 1, N | operand B                                  |
| `phi_s`, `mu_s` | out | 1, N | sum                                       |

Parameters:

| parameter     | default | meaning |
|---------------|---------|---------|
| `N`           | 5       | word width n; must be at least 2 |
| `DELTA_RESET` | 3       | δ after reset; the default gives modulus 29 |

Both defaults come from the package `mod_adder_pkg`.

**Timing.** The sum is purely combinational from the operands and the δ
register. There are no pipeline stages. A δ written at a clock edge takes
effect from that edge on.

## Choices made here, not fixed by the method

- **Adder type.** The method fixes only that the carry-propagate adder is
  some n-bit adder. Kogge-Stone is used here.
- **δ register.** The method requires only that δ is writable. The write
  port, clock edge, asynchronous reset and reset value 3 are choices of
  this implementation.
- **Pipelining and I/O registers.** There are none. The adder is a
  combinational block, as in the delay and area figures it was evaluated
  with.
- **Domain assertion.** This is a simulation-only addition.
- **Conversion.** Conversion between binary and excess-δ residues is not
  part of this RTL. Forward conversion of a value X < m is just (0, X). The
  reverse is μ − φ·δ, reduced mod m, and has no hardware here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it does |
|-----------|--------------|
| `tb_excess_delta_mod_adder` | Full design at default parameters. Checks the reset value of δ, the six examples above, then every δ from 0 to 15 written through the register. For each δ it applies every operand pair in the domain, in every encoding. Flag and magnitude must equal W computed with integers. It also checks that a δ write takes effect exactly one edge later, and runs accumulation chains that feed the sum back. It counts each mechanism: F = +δ, 0, −δ; both flag values; δ rewrites; feedback. |
| `tb_design_points` | The moduli 17 (n=5, δ=15), 29 (n=5, δ=3), 131 (n=8, δ=125) and 191 (n=8, δ=65). Uses a 5-bit and an 8-bit instance and runs all operand pairs exhaustively. |
| `tb_rns_channels` | Eight identical 5-bit adders with δ = 0, 1, 3, 5, 7, 9, 13, 15. Together they form the RNS {32, 31, 29, 27, 25, 23, 19, 17}, with a dynamic range of 144 259 293 600 (about 2^37). Checks random integer additions and a running sum, channel by channel. |
| `tb_f_box` | Exhaustive at N = 5 and N = 8. The output is read as a 1's-complement number. |
| `tb_csa` | Exhaustive at N = 5, checked bit by bit. |
| `tb_kspp_adder` | Exhaustive at N = 5 and 8, random at N = 13 and 32. |
| `tb_flag_logic` | Every input combination that can occur. |
| `tb_delta_reg` | Reset, write, hold and asynchronous reset. |

To run one with Verilator, for example the full design:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mod_adder_pkg.sv tb/tb_excess_delta_mod_adder.sv \
    --top-module tb_excess_delta_mod_adder -o sim
./obj_dir/sim
```

All testbenches finish in well under a second.

## Changing it

- **Another word width.** Set `N`. δ can then be anything below 2^(N−1).
  The RTL has no width-specific code.
- **Another adder.** To trade speed for area, replace `kspp_adder` with any
  adder that has the same ports (`a`, `b`, `sum`, `cout`, no carry-in).
  `tb_kspp_adder` checks any such adder.
- **Several RNS channels.** Instantiate one adder per modulus and load each
  δ register. `tb_rns_channels` shows the pattern.

## Known limits

- Operands outside the domain give wrong sums. Examples are two operands
  both worth 2^n − 1 with δ > 1, or a flagged magnitude smaller than δ.
  In simulation the assertion reports them. In hardware nothing flags them.
- The area, delay and power of this adder were compared against other
  mod-(2^n − δ) adders at a 0.13 µm process. None of those comparison
  designs is included here, and no timing or area figures are claimed for
  this RTL.

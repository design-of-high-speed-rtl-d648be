# Pipelined elliptic-curve scalar multiplier over GF(2^163)

This RTL computes Q = k·P for a 163-bit scalar k and a point P on a binary elliptic curve
y² + xy = x³ + ax² + b over GF(2^163). It returns Q in affine coordinates.
All field arithmetic runs on two units that share one small register bank:

- **FF MAC**: a finite-field multiply-accumulate unit, MR = A·B + C. It has three pipeline stages
  and is built on a Karatsuba–Ofman multiplier.
- **FF squarer**: a combinational squaring unit, SR = S².

A 64-word by 18-bit control ROM drives the bank. Every clock it sets the eight 4:1 input muxes
of the bank. A small state machine walks the ROM addresses.
The main idea is to keep the MAC busy every clock. One Montgomery-ladder step per key bit
(one point addition plus one point doubling) takes six multiplications and five squarings.
The schedule overlaps them so that a step costs 2n + 1 = 7 clocks for an n = 3 stage MAC.

A whole operation takes **1368 clocks**:

| phase | clocks |
|---|---|
| initialisation | 8 |
| ladder, 163 steps × 7 | 1141 |
| y-recovery products | 13 |
| inversion | 197 |
| affine conversion | 9 |

## Block structure

```
 start_i, k_i ──► ecsm_fsm ──addr(6)──► control_rom ──ctrl(18)──► reg_bank ◄── xp_i, yp_i, b_i
                      │ swap                                       │  ▲   │
                      └────────────────────────────────────────────┘  │   └─► xq_o (T4), yq_o (T3)
                                                  A,B,C ──► ff_mac ─MR┤
                                                      S ──► ff_sqr ─SR┘
```

| file | role |
|---|---|
| `rtl/ecsm_pkg.sv` | Field size, reduction polynomial, reduction function, mux-select enums, control word struct and ROM address map. |
| `rtl/gf_cm.sv` | Schoolbook ("classical") GF(2) polynomial multiplier for the Karatsuba leaves. It contains the first pipeline register. |
| `rtl/kom_mult.sv` | Three-level Karatsuba–Ofman multiplier tree (generate loops), 163 → 81/82 → 40/41 → 20/21. It gives a 325-bit product. |
| `rtl/ff_mac.sv` | kom_mult, then a product register, then reduction mod f(x) merged with + C. |
| `rtl/ff_sqr.sv` | Bit-spreading squarer with the same reduction. |
| `rtl/reg_bank.sv` | T1–T4 cache registers and the A, B, C, S operand registers, each behind one 4:1 mux. Also the swap logic. |
| `rtl/control_rom.sv` | The microprogram (49 used words). |
| `rtl/ecsm_fsm.sv` | Address sequencer, key shift register, swap flag and loop counters. |
| `rtl/ecsm_top.sv` | Wires all of the above together. |

Field: polynomial basis with f(x) = x^163 + x^7 + x^6 + x^3 + 1, the NIST B-163 pentanomial.
The field size and split sizes are the design's. The polynomial is a choice: change `K1..K3` in
the package to use another pentanomial with K1 < M/2.

## The FF MAC pipeline

The MAC takes A and B in clock t and C in clock t + 2. MR = A·B + C is a combinational output
during clock t + 2. The bank captures it at the end of that clock, so MR can feed straight back
into A, B, C, S or T1–T4.

The pipeline stages are:
1. Inside each 20/21-bit leaf multiplier, the partial products of the low and high halves of the
   multiplier bits are XOR-summed and registered separately.
2. The leaf outputs are combined up the three Karatsuba levels into the 325-bit product, which
   is registered.
3. Reduction mod f(x) (two folds) and the XOR with C, which is combinational.

C is a register of the bank. It is loaded one clock later than A and B, which is why it arrives
in the last stage. This lets a multiplication chain onto the one just finished (e.g. x·Z + P)
without an extra clock.

## Ladder step and the swap trick

The ladder keeps two projective points in fixed slots, and the inputs always come from the
same slots:

| slot | X | Z |
|---|---|---|
| "A" (sum) | arrives on MR | T3 |
| "D" (doubled) | T1 | T2 |

Instead of branching on the key bit, the state machine computes swap = k_i XOR k_(i+1).
When swap is set, two ROM words with a swap enable flip the LSB of their S or T2 select:

- the squarer reads the other point's Z;
- T2 takes the other point's X.

So the point that must be doubled is always the one the schedule squares. Except for these two
enables, the ROM program is the same for every key bit.

One step, by clock (c1…c7):

| clock | squarer | MAC launched | other |
|---|---|---|---|
| c1 | Zn² | X_A·Z_D | T2 ← Xn |
| c2 | Zn⁴ | b·Zn⁴ (C = Xn⁴ added in c4) | |
| c3 | Xn² | Xn²·Zn² | T1 ← P1 |
| c4 | Xn⁴ | P1·P2 | |
| c5 | (P1 + P2)² via S = MR ⊕ T1 | x·Z_A (+ P1·P2 in c7) | new X_D, Z_A |
| c6 | – | x·Z_A + X_A (spare slot) | new Z_D |
| c7 | next Zn² prepared | X_D·Z_A | |

Here Zn and Xn are the coordinates of the point being doubled, chosen by the swap flag.
P1 = X_D·Z_A and P2 = X_A·Z_D.
The c6 slot is otherwise free. It computes x·Z_A + X_A on every step, and only the value from
the last step is used, by the y recovery. The swap flag changes at word c6, between the two
swap-enabled reads.

The ladder starts from the pair (O, P) = ((1 : 0), (x : 1)). It therefore runs all 163 key
bits and needs no special first step. Leading zero bits just double O.

## After the ladder

The ROM does not branch. It computes these products:
- X1·Z2 and X2·Z1, the two cross products
- Z1·Z2
- T = x·Z1·Z2
- (x·Z1 + X1)·(x·Z2 + X2)
- the remaining terms of the López–Dahab y-recovery formula

It then inverts T by Itoh–Tsujii, using only the MAC and the squarer. This is an addition chain
over the bits of 162: 1, 2, 4, 5, 10, 20, 40, 80, 81, 162. That makes seven doubling steps and
two "+1" steps, then one final squaring. The state machine repeats the single squaring word of
each step the required number of times. The last nine words form:
- x_Q = X1·(x·Z2)·T⁻¹
- y_Q from the numerator W

The results are left in T4 (x) and T3 (y).

## Interface and timing

- `rst_ni`: active-low asynchronous reset.
- `start_i`: pulse for one clock while `busy_o` is low. `k_i` is captured on that clock. Hold
  `xp_i`, `yp_i` and `b_i` stable until `done_o`. A start while busy is ignored.
- `done_o`: a single-clock pulse 1369 clocks after the clock edge that samples `start_i`.
  From then on `xq_o` and `yq_o` hold the result until the next start.
- There is no handling of the point at infinity. If k·P or (k+1)·P is O, the inversion input is
  0 and the output is meaningless. For a prime-order base point, this happens only for
  k ≡ 0 or −1 mod the order.

## Where this departs from the reference architecture

The architecture follows a published high-speed design. These are the places where this RTL
makes its own choices:

- **Register-bank mux inputs.** A and B take {MR, SR, T2, T3} and {T2, T4, T1, x}, as in the
  reference. The other registers differ:
  - C = {MR, T2, 0, SR}: SR added.
  - S = {T3, T2, MR ⊕ T1, SR}: T3 in place of MR.
  - T1 = {hold, MR, SR, 1}
  - T2 = {hold, T3, T1, MR}
  - T3 = {hold, MR, y, SR}
  - T4 = {hold, MR, b, 0}

  Each register still has exactly one 4:1 mux.
- **Order of operations within a step.** This design squares Z², Z⁴, X², X⁴. The reference
  interleaves Z², X², Z⁴, X⁴. Because of this the doubled X can be read from T2 after the swap.
  The MAC order differs too. Here the addition's cross products come first and last, and the
  free slot is c6. The reference starts with both cross products and leaves c6 idle. The set of
  six MAC operations and five squarings per step is the same.
- **Post-processing.** The reference counts 11 multiplications plus one inversion. This design
  uses 14 multiplications plus an Itoh–Tsujii inversion (9 MAC products and 162 squarings)
  whose algorithm the reference does not fix.
- **Clock count.** The total is 1368 clocks against 1363 quoted for the reference.
- **ROM read.** The ROM read is asynchronous (a case table). It is not a registered block RAM.
- **Leaf pipeline cut.** The position of the first pipeline register inside the leaf multipliers
  is a choice.

## Simulating

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The reference model in `tb/ecsm_ref_pkg.sv` contains:
- bit-serial field multiply
- Fermat inversion
- affine point add/double
- double-and-add k·P

`tb_ecsm_top` runs six full-size scalar multiplications on the NIST B-163 curve (about 2 s).
For each one it checks x, y, on-curve, and the 1369-clock latency. It also counts the mechanisms
exercised: both swap values, both post-process cases (k0 = 0/1), and the inversion's doubling
and +1 steps.

```sh
verilator --binary --timing -Wno-fatal -y rtl rtl/ecsm_pkg.sv tb/ecsm_ref_pkg.sv \
          tb/tb_ecsm_top.sv --top-module tb_ecsm_top -o sim
./obj_dir/sim
```

Replace `tb_ecsm_top` with `tb_kom_mult`, `tb_ff_mac`, `tb_ff_sqr`, `tb_reg_bank`,
`tb_control_rom` or `tb_ecsm_fsm` for the unit tests.

`tb_control_rom` runs the complete microprogram on a behavioural datapath with an independently
generated address sequence. This makes it the place to check a change to the schedule before
running the full design.

## How far to trust it

All testbenches pass. For each block, a deliberately broken copy makes its testbench fail.

The end-to-end results match the reference model for the small scalars 2 and 7, and for random
161-bit scalars. The random scalars are tried with the generator and with other base points (small multiples of it). What has not been done: gate-level simulation, timing closure
on any FPGA, and checks against other curves or reduction polynomials.

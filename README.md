# ECDH key-agreement processor over GF(2^163)

This is a small-area hardware engine for elliptic-curve Diffie-Hellman (ECDH)
on the NIST binary curve B-163 (`y^2 + xy = x^3 + x^2 + b` over GF(2^163)).
One point-multiplication unit does all the work. Each party asks it twice:

1. **Public key.** `Q = d * G`, where `d` is the private scalar and `G` is the
   built-in base point.
2. **Shared secret.** `SK = d * Q_other`, where `Q_other` is the other
   party's public key, taken from the input pins.

Both parties end up with the same point, `d_A * d_B * G`.

The design trades speed for area throughout:

- The field multiplier is a bit-serial shift-and-add unit that takes 163
  cycles per product.
- Inversion uses no hardware of its own. It is a sequence of squarings and
  multiplications on the same squarer and multiplier (Itoh-Tsujii).
- The scalar multiplication is a Montgomery ladder. Every key bit costs the
  same instructions and the same time, whatever its value.

One point multiplication takes 164 470 clock cycles. A complete key
agreement (public key, then shared secret) takes twice that.

The RTL is SystemVerilog-2017. It follows a published FPGA architecture: a
"DESIGN-I" point-multiplication unit wrapped into a "DESIGN-II"
key-agreement processor. The section "Departures and open points" lists
where this implementation had to choose something itself.

## Block structure

```
 ecdh_top ───────────────────────────────────────────────────────────────
 │ ecdh_controller   IDLE / PKG / SKG; passes ST on, drives M1/M2, D_PM/D_SS
 │ point_select_mux  M1, M2: base point G  or  other party's key (Qss)
 │ ecpm  (point multiplication unit) ──────────────────────────────────
 │ │ ecpm_controller   instruction sequencer (+ itoh_tsujii sub-sequencer)
 │ │ register_array    8 x 163 bit, two read ports (D_RA, DT2), one write port
 │ │ ecpm_route_mux    M3 (x / y / b), M4 (DT1 = parameter or D_RA), M5 (write-back)
 │ │ gf_adder          XOR, 1 cycle
 │ │ gf_square         zero interleave + nist_reduce, 1 cycle
 │ │ gf_mult           bit-serial shift-and-add + nist_reduce, 163 cycles
```

The datapath is a small load/store machine:

- **Operands.** DT1 comes from M4: either the ECC parameter chosen by M3
  (`x_p`, `y_p` or `b`) or register read port A. DT2 always comes from
  register read port B.
- **Units.** The adder, squarer and multiplier all see these operands. The
  squarer uses only DT1.
- **Write-back.** M5 picks one unit's result and writes it to the register
  array.

## The instruction stream

`ecpm_controller` drives the datapath with one instruction per cycle, an
`ecc_pkg::instr_t`. The instruction has these fields:

| field     | meaning                                            |
|-----------|----------------------------------------------------|
| `op`      | `ADD`, `SQR`, `MUL`, `ONE` (preset to 1) or `NOP`   |
| `dt1_par` | M4 select: 1 = DT1 is the ECC parameter            |
| `par`     | M3 select: `x_p`, `y_p`, `b`                       |
| `ra`      | register read address of port A                    |
| `rb`      | register read address of port B                    |
| `wa`      | register write address                             |

- `ADD` and `SQR` write at the end of their cycle.
- `MUL` is held unchanged for 163 cycles. The multiplier raises `mul_done`
  in the last of them, and the product is written at that clock edge.
- The multiplier has no operand registers. It relies on the controller
  keeping DT1 and DT2 stable, and an assertion in `gf_mult` checks this.

The registers are used as follows:

| reg | name | use                                                     |
|-----|------|---------------------------------------------------------|
| 0   | X1   | ladder point P1, then x_q                               |
| 1   | Z1   | ladder point P1, then x_p + x_q                         |
| 2   | X2   | ladder point P2, then 1/Z1                              |
| 3   | Z2   | ladder point P2, then scratch                           |
| 4   | T1   | ladder temporary, then y_q                              |
| 5-7 | T2-T4| conversion and inversion temporaries                    |

### Phase 1: affine to projective (6 cycles)

| cycle | operation                                                  |
|-------|------------------------------------------------------------|
| 1     | `Z1 = 1` (register preset)                                 |
| 2     | `T1 = T1 + T1` (always 0 in GF(2))                         |
| 3     | `X1 = x_p + T1` (copies `x_p` through the adder)           |
| 4     | `Z2 = x_p^2`                                               |
| 5     | `X2 = Z2^2`                                                |
| 6     | `X2 = X2 + b`                                              |

After this phase, (X1:Z1) = P and (X2:Z2) = 2P.

### Phase 2: the ladder (14 instructions per key bit)

The loop runs for key bits `i = 161 … 0`. The top bit `d[162]` is taken to
be 1 and is not examined. For each bit the controller issues seven
point-addition instructions into (X1,Z1), then seven point-doubling
instructions on (X2,Z2). These use the Lopez-Dahab x-only formulas:

```
PA:  Z1=X2*Z1  X1=X1*Z2  T1=X1+Z1  X1=X1*Z1  Z1=T1^2  T1=x_p*Z1  X1=X1+T1
PD:  Z2=Z2^2   T1=Z2^2   T1=b*T1   X2=X2^2   Z2=X2*Z2 X2=X2^2    X2=X2+T1
```

When `d_i = 0`, the same 14 instructions run with the register pairs
(X1,Z1) and (X2,Z2) exchanged. The instruction table has only one version;
`loop_instr()` swaps the register addresses. Each bit therefore costs 6
multiplications, 3 additions and 5 squarings, which is `6*163 + 8 = 986`
cycles whatever the bit value.

### Phase 3: projective to affine

The conversion evaluates:

```
x_q = X1 / Z1
y_q = (x_p + x_q) * [(X1 + x_p Z1)(X2 + x_p Z2) + (x_p^2 + y_p) Z1 Z2] / (x_p Z1 Z2) + y_p
```

It takes 18 steps: 9 multiplications, 7 one-cycle operations and two
inversions (of `Z1` and of `x_p*Z1*Z2`). The list is `conv_step()` in
`ecpm_controller.sv`, and each step carries its formula as a comment. At the
end, x_q is in X1 and y_q in T1. While idle, the controller keeps read
port A on X1 and read port B on T1, so the result appears on
`qx`/`qy` (`r_xp`/`r_yp` at the top).

### Inversion (`itoh_tsujii`)

Let `beta_k = a^(2^k - 1)`. Then `a^-1 = beta_162^2`.

The sequencer builds `beta_162` from the binary expansion of
`m - 1 = 162 = 1010 0010b`, taking bits from the most significant down:

- Every further bit doubles k: `beta_2k = beta_k^(2^k) * beta_k`.
- A 1 bit adds one more step: `beta_(k+1) = beta_k^2 * a`.

This gives the chain 1, 2, 4, 5, 10, 20, 40, 80, 81, 162. That is 9
multiplications and 161 squarings, plus the final squaring:
`9*163 + 162 = 1629` cycles.

The sequencer uses three registers: the operand `a` (left unchanged), an
accumulator `beta` and a scratch register `tmp`. When started, it issues
its first instruction in the same cycle. It raises `done` in the cycle of
the final square. The controller hands it the register addresses for each
of the two inversions.

## Cycle budget

| part                                   | cycles (m = 163)              |
|----------------------------------------|-------------------------------|
| affine to projective                   | 6                             |
| ladder, (m-1)(6m+8)                    | 159 732                       |
| two inversions, 2 x (10m-1)            | 3 258                         |
| rest of the conversion, 9m + 7         | 1 474                         |
| **one point multiplication**           | **164 470**                   |
| key agreement (public + shared key)    | 328 940                       |

These counts run from `start` to the `done` pulse of `ecpm`. At the top
level, `d_pm`/`d_ss` rise one cycle after that pulse. The original
architecture was clocked at 296 MHz on its own and at 280 MHz inside the
key-agreement processor. At those clocks one multiplication takes about
556 us and a key agreement about 1.17 ms.

The original architecture quotes 163 902 cycles per multiplication. That
figure allows only 906 cycles for the non-inversion part of the conversion,
and this implementation needs 1 474 for it. Every other term matches.

## Arithmetic units

- **`gf_mult`** scans DT2 from its most significant bit down. Each cycle it
  shifts a 325-bit accumulator and XORs in DT1 when the scanned bit is 1.
  The 163rd step is not stored. It goes straight through the reduction to
  `m_out`, so that a multiplication including write-back costs exactly 163
  cycles.
- **`gf_square`** spreads the operand bits to even positions and reduces
  the result. It is purely combinational.
- **`nist_reduce`** reduces modulo `z^163 + z^7 + z^6 + z^3 + 1` in two
  folds. The first fold maps coefficient `z^(163+j)` onto
  `z^j (z^7 + z^6 + z^3 + 1)`. The second fold does the same for the at
  most seven coefficients that the first fold pushed back above `z^162`.
  This is the NIST fast reduction, written on whole polynomials rather than
  32-bit words.
- **`gf_adder`** is a 163-bit XOR.

## Interface and timing (`ecdh_top`)

| port              | dir | width | meaning                                                     |
|-------------------|-----|-------|-------------------------------------------------------------|
| `clk`             | in  | 1     | clock                                                       |
| `rst`             | in  | 1     | synchronous reset, active high                              |
| `st`              | in  | 1     | start, one cycle; ignored while `busy`                      |
| `sel`             | in  | 2     | `01` public key (base point G), `10` shared key (uses `qss_*`), `00`/`11` nothing |
| `d`               | in  | 163   | private scalar, bit 162 must be 1                           |
| `qss_xp`, `qss_yp`| in  | 163   | other party's public key                                    |
| `r_xp`, `r_yp`    | out | 163   | result point, valid while `d_pm` or `d_ss` is high          |
| `d_pm`, `d_ss`    | out | 1     | public key / shared secret ready; held until the next `st`  |
| `busy`            | out | 1     | an operation is running                                     |

All inputs are sampled in the `st` cycle, so they may change afterwards.

Parameters: `M` (163), the curve constant `B`, and the base point `GX`,
`GY`. The defaults are the NIST B-163 values from `ecc_pkg`.

The `sel = 10` path accepts any curve point. It can therefore also produce
a "public key" on a user-chosen base point.

## Departures and open points

- **Conversion cycles.** The projective-to-affine conversion costs 1 474
  cycles outside the inversions, against 906 in the original. The step list
  is this implementation's own.
- **Register preset.** The register array can preset a register to 1
  (`set_one`). The projective form needs `Z1 = 1` at the start, and none of
  the arithmetic units can produce that constant.
- **Own choices.** These are choices of this implementation:
  - the select encodings of M3, M4 and M5 and the instruction format;
  - capturing `d` and the input point at start;
  - held (not pulsed) done flags;
  - treating `sel = 11` as no operation.
- **Result outputs.** `r_xp`/`r_yp` come directly from the register
  array's read ports. They show intermediate values while `busy` is high.
- **Unsupported inputs.** The design does not detect a point at infinity:
  `Z1 = 0` at the end makes the inversion return 0. A scalar whose top bit
  is 0 gives a wrong result, because the ladder assumes `d[162] = 1`, as
  the algorithm it implements requires.
- **No side-channel hardening.** The constant-time ladder is the only
  protection.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F`.

The reference model, `tb/tb_gf_ref.sv`, is deliberately different from the
RTL:

- multiplication with interleaved reduction;
- inversion by Fermat exponentiation;
- affine double-and-add point multiplication;
- its own copy of the B-163 constants, checked to lie on the curve.

The testbenches cover the following:

- **Arithmetic units.** Random and corner operands. The multiplier test
  also checks the 163-cycle latency.
- **`tb_itoh_tsujii` and `tb_ecpm_controller`.** These run the sequencers
  against a behavioural datapath (`tb/tb_dp_model.sv`). They check results,
  cycle counts and the instruction mix.
- **`tb_ecpm`.** Runs the complete unit on the base point and on a second
  point, and checks the latency.
- **`tb_ecdh_top`.** A full key agreement at default parameters. Two users
  generate public keys, exchange them and derive shared secrets. The test
  checks `SK_A == SK_B == reference` and the timing of every request. It
  also exercises no-operation selects, requests while busy, both key-bit
  values in the ladder, the inversions and the external-point path. It runs
  in about two seconds.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ecc_pkg.sv tb/tb_gf_ref.sv tb/tb_ecdh_top.sv --top-module tb_ecdh_top
./obj_dir/Vtb_ecdh_top
```

Replace `tb_ecdh_top` with any other `tb_*` module. Verilator finds the
other modules through `-Irtl -Itb`.

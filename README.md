# RSA coprocessor on a one-row Montgomery systolic multiplier

RSA encryption and decryption are a single operation: modular exponentiation,
`C = X^E mod M`, on integers of 512 to 2048 bits. This design computes it in
hardware with the square-and-multiply method. Each step of that method needs
two modular multiplications. Both use the same multiplier, so they can run
side by side. Each multiplication is done by Montgomery's method, which avoids
any division by M. All of the multiplications run on one row of a bit-level
systolic array. The row has m+4 one-bit cells for an m-bit modulus, and it
interleaves the two multiplications of a step clock by clock.

Around that core sit the parts a coprocessor needs. The long-integer divider
forms the Montgomery constant R^2 mod M. The other parts are a long
multiplier, a conditional subtractor, an extended-Euclid unit for modular
inverses, and a register port through which a host (behind a PCI bus
controller, which is not part of this RTL) loads operands, starts commands and
reads results. The default size is a 512-bit modulus and exponent.

All RTL is SystemVerilog-2017 in `rtl/`, one module or package per file. Each
module has a self-checking testbench in `tb/`.

## The arithmetic

Let M be the odd m-bit modulus. The design uses radix 2 and
`R = 2^(m+2)`. The Montgomery product computed is

    MonMult(A, B) = A * B * 2^-(m+2)  (mod M),     for A, B < 2M, result < 2M

It iterates over the bits a_0 .. a_(m+2) of A. The top two bits are forced to
zero.

    P_0 = 0
    for i = 0 .. m+2:   q_i = p_(i,0)                    (bit 0 of P_i)
                        P_(i+1) = (P_i + q_i*M)/2 + a_i*B

The plain Montgomery recurrence has been simplified in three ways:

* **No subtraction per multiplication.** Inputs and outputs only need to stay
  below 2M, so one product feeds the next directly. The usual compare and
  subtract after each multiplication is left out. Only one subtraction is
  needed, at the very end of the exponentiation. Two extra iterations keep the
  result under 2M.
* **B shifted up one bit.** Adding `a_i*B` after the halving is the same as
  adding `a_i*2B` before it. Bit 0 of 2B is zero, so the quotient bit is just
  `q_i = p_(i,0)`. The price is one more iteration, m+3 in total.
* **m+4 columns.** Before the halving the partial sum stays below 10M. It
  therefore fits in m+4 bits, and the row has that many columns.

The exponentiation works entirely in the Montgomery domain (exponent bits
e_0 first, n bits):

    P = MonMult(1, R^2 mod M)        Z = MonMult(X, R^2 mod M)         -- step 1
    for i = 0 .. n-1:
        Ptmp = MonMult(P, Z)         Z = MonMult(Z, Z)                 -- step 2, in parallel
        if e_i = 1: P = Ptmp
    P = MonMult(P, 1)                                                  -- step 4
    if P >= M: P = P - M                                               -- final subtraction

Step 4 returns a value that is at most M. It equals M only when X is a
multiple of M that was not reduced first, for example X = M. The final
subtraction is therefore almost always a no-op, but it is kept so that the
result is always fully reduced.

## The systolic row (`mm_cell`, `systolic_row`)

Column j (0 .. m+3) works on bit j of the partial result. For iteration i it
computes

    p_out + 2*c_out = p_in + a_i*b_(j-1) + q_i*m_j + c_in

* `p_in` is bit j of P_i. It comes from column j+1, which produced it in the
  previous iteration.
* `c_in` (0..2, two bits) comes from column j-1 in the same iteration.
* `p_out` is bit j-1 of P_(i+1). It is the halving, done by wiring.

Every cell registers its outputs. The multiplier bit a_i and the quotient bit
q_i move one column to the left per clock. Three columns differ:

* **Column 0** takes q_i from the incoming bit p_(i,0). Its own sum bit is
  always 0.
* **Column m+2** has no M bit and no B bit.
* **Column m+3**, the leftmost, has no inputs except its carry. That carry is at
  most 1, and it becomes the top result bit. An assertion checks the bound.

**Timing, the key to the design.** Column j handles iteration i of a
multiplication started at clock t0 at clock `t0 + 2i + j`. The bit p_(i+1,0)
that the next iteration needs comes out of column 1 one clock after column 0
used iteration i. So the next iteration of the *same* multiplication can
enter column 0 only two clocks later. The free clocks carry a *second*
multiplication. The row therefore always holds two multiplications, called
slot 0 and slot 1, on alternate clocks:

| clock at column 0 | 1 | 2 | 3 | 4 | 5 | ... |
|---|---|---|---|---|---|---|
| slot 0 iteration | 0 | | 1 | | 2 | |
| slot 1 iteration | | 0 | | 1 | | |

A multiplication takes m+3 iterations. Result bit k leaves column k+1 at
`t0 + 2(m+3) + k`: the latency to the first result bit is 2(m+3) clocks. The
next pair starts as soon as bit 0 exists, so a pair of multiplications
completes every 2(m+3) clocks, which averages one multiplication per m+3
clocks.

**Control token.** A small struct (`rsa_pkg::mm_token_t`) travels with a_i and
q_i. It holds:

* valid
* slot
* first: iteration 0, where P_0 = 0 replaces the incoming bit
* last: the outputs are result bits
* wen: write the result back
* updb: the result replaces B

**Register B is distributed.** Column j holds b_(j-1). B is the squaring result
Z, and it is the multiplier of both multiplications in the next step. When
the slot-1 (squaring) token with `updb` finishes its last iteration in column
j, that column copies its own result bit into its B bit. This happens in the
clock right after the old bit's last use there, so the next pair can start
with no gap. B can also be loaded in parallel (`b_load`). That is done with
R^2 mod M before step 1 and with 1 before step 4.

**Results** come out per slot on `res_valid[s]` / `res_bit[s]`. They appear as
m+3 consecutive bits, least significant first.

## Exponentiation sequencing (`modexp_unit`)

The operands P and Z live in two one-bit-wide RAMs (`bit_ram`), addressed by
bit index. The row reads them one multiplier bit at a time and writes them one
result bit at a time, least significant first. The sequence:

1. **Load:** P RAM ← 1 and Z RAM ← X (m+3 clocks), and B ← R^2 mod M.
2. **Pairs:** step 1, then one pair per exponent bit, back to back, 2(m+3)
   clocks each. Slot 0 reads P and slot 1 reads Z, and both use B. The slot-1
   result is written to the Z RAM and to B. The slot-0 result is written to
   the P RAM only when e_i = 1 (for step 1, always).
3. **Bypass:** when one pair follows another, its first multiplier bit is
   needed in the same clock that the previous result's bit 0 is written. The
   RAM read path therefore returns the bit being written (write-through).
4. **Drain, then step 4:** wait until the row is empty, load B ← 1, and run
   MonMult(P, 1) in slot 0 alone. Its result bits are collected into a shift
   register.
5. **Final subtraction** by `long_sub`, then `done`.

Clock count for n exponent bits and m-bit M (the unit testbench checks it
exactly):

    (m+3) + 2(m+3)(n+1) + (m+5) + 2(m+3) + (m+5) + ceil((m+1)/8) + 1

For m = n = 512 that is 531,035 clocks.

## Supporting arithmetic

| module | operation | structure | clocks |
|---|---|---|---|
| `long_sub` | res = a >= b ? a-b : a, plus diff and borrow | 8-bit digits, LSB first, borrow flip-flop | ceil(W/8) |
| `long_div` | quotient and remainder | restoring, 1 quotient bit per clock | NW (dividend width) |
| `long_mul` | 2W-bit product | shift-and-add | W |
| `eea_unit` | gcd(f, e) and e^-1 mod f | Euclid steps; each step is a restoring division that builds q*t1 Horner-style at the same time | (W+1) per step, at most about 1.44 W steps |

The divider's dividend is 2m+5 bits wide, so it can hold 2^(2m+4) = R^2. Each
exponentiation command first divides R^2 by M. That costs 2m+5 clocks, about
0.2% of an exponentiation. `eea_unit` requires e < f. Its inverse output is
meaningful only when the gcd is 1.

## Host register port (`rsa_coprocessor`)

32-bit words; `host_addr = {region[3:0], word}`; writes at the clock edge,
reads combinational. Wide values are stored least significant word first.

| region | contents |
|---|---|
| 0, word 0 | write: command (bits 2:0): 1 MODEXP, 2 MUL, 3 DIV, 4 INV; ignored while busy. Read: status `{cmd[2:0] at bits 6:4, gcd==1 at bit 3, done at bit 1, busy at bit 0}` |
| 0, word 1 | exponent length n in bits |
| 1 / 2 / 3 | M / E / X |
| 4 / 5 | OPA / OPB for MUL, DIV, INV |
| 6 | RES (2 x operand width, read only) |

The commands:

* MODEXP: RES = X^E mod M.
* MUL: RES = OPA * OPB.
* DIV: low half of RES = OPA div OPB, high half = OPA mod OPB.
* INV: low half of RES = OPB^-1 mod OPA, high half = gcd.

`irq_done` follows the done bit. The done bit is cleared when the next
command starts.

Requirements on the operands:

* M must be odd and X < M.
* To get RSA results, give the full exponent length n.
* MW is the only size parameter to change. EW, WORDS, RA and HAW follow from
  it.

## How far it can be trusted

Every module has a self-checking testbench that compares against independent
arithmetic: plain wide-integer `*`, `/`, `%` and software square-and-multiply.

| testbench | what it covers |
|---|---|
| `tb_mm_cell` | every cell input combination |
| `tb_bit_ram` | every address of a 2048 x 1 RAM, and reading a bit in the clock after its write |
| `tb_systolic_row` | 40 back-to-back pairs at m = 24: results mod M and below 2M, the 2(m+3) latency and pair spacing, B update, suppressed writes |
| `tb_modexp_unit` | random 64-bit exponentiations and corner cases, with the exact clock count |
| `tb_long_sub`, `tb_long_div`, `tb_long_mul`, `tb_eea_unit` | random and corner operands, clock counts |
| `tb_rsa_coprocessor` | all four commands through the host port at m = 64. It also counts that every mechanism occurred: R^2 division, overlapping slots, the write-through bypass, skipped P updates, B reload, final subtraction taken and not taken, and a command ignored while busy |
| `tb_rsa_full` | the top at its default size: four 512-bit exponentiations (two with random 512-bit exponents, one with e = 65537, one with X = M) plus MUL, DIV and INV (about 20 s of simulation) |
| `tb_rsa_roundtrip` | a real 512-bit RSA key: two 256-bit primes found by the testbench, N and phi formed with MUL, D = 65537^-1 mod phi with INV, then encryption and decryption with MODEXP and a check that the message comes back |

Run one with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rsa_coprocessor \
              -y rtl -y tb +libext+.sv rtl/rsa_pkg.sv tb/tb_rsa_coprocessor.sv
    ./obj_dir/Vtb_rsa_coprocessor

Each testbench prints `TB_RESULT checks=N failures=F`.

## Where the RTL makes its own choices

From the source description, the design takes:

* the radix-2 algorithm with B shifted up one bit and q_i = p_(i,0)
* the m+4-column single row and its cell equation
* the two interleaved multiplications and the 2(m+3) timing
* register B, the P and Z RAMs, and the step sequence
* the postponed final subtraction
* the list of supporting modules (extended Euclid, long subtraction,
  multiplication, division) and the PCI host connection

This design's own choices are:

* the control token and the distributed, locally updated B register
* the write-through bypass that lets pairs run back to back
* the draining before step 4
* the asynchronous-read one-bit RAMs, sized m+3 deep rather than one 2048 x 1
  block
* all internals of the subtractor (8-bit digits), divider, multiplier and
  Euclid unit, which are described only by name
* computing R^2 mod M on chip, with the divider
* the host register map and command set
* the operand and result registers of the top (M, E, X, OPA, OPB, RES) are
  flip-flops, not embedded RAM blocks; M must be applied to all columns of the
  row at once and E is read one bit per step

Not included:

* the PCI bus controller, which is vendor logic; the host port is where it
  would attach
* the higher-radix variant, which is described only as an algorithm
* the full (m+3)-row array, which is a reference point, not the proposed design

The default size is 512 bits. A 2048-bit key needs `MW = 2048`. That size has
not been simulated, and its 2051-bit operand RAMs exceed a single 2048 x 1
block.

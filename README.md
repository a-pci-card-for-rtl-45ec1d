# GF(2^191) elliptic-curve scalar-multiplication processor

This is a hardware accelerator for elliptic-curve cryptography over the binary field
GF(2^191). It computes the scalar multiplication Q = k·P, the core of ECDSA and EC
Diffie-Hellman, plus a point addition Q = Q + P. A host, for example a server through a PCI bridge,
loads the curve, the point and the scalar over a 32-bit register bus, starts the command
and reads back an affine result. All point arithmetic stays on the chip.

Three ideas make it fast and small:

* **The whole datapath is as wide as the field.** One 191-bit accumulator register (C) is
  used for every field operation. Addition, squaring and loading take one cycle each.
* **The multiplier is digit-serial.** It handles 8 multiplier bits per cycle (radix 256),
  so a 191 × 191-bit multiplication over GF(2^191) takes 25 cycles. Reduction modulo
  f(x) = x^191 + x^9 + 1 is built into the adder, so intermediate results never grow
  wider than 199 bits.
* **Projective coordinates and microcode.** Points are kept in López-Dahab projective
  coordinates, so a scalar multiplication needs only one field inversion, done at the
  very end by exponentiation. A small state machine controls the main phases. A 128-word × 10-bit
  microcode ROM supplies the control signals cycle by cycle.

A full-length scalar multiplication takes about 58,900 clock cycles. At 66 MHz that is
about 1,120 multiplications per second, without host I/O.

This RTL is a SystemVerilog design written from the published description of this
accelerator (J. Wolkerstorfer, W. Bauer, "A PCI-Card for Accelerating Elliptic Curve
Cryptography"). The architecture, the arithmetic unit, the reduction and squaring
circuits, the register file, the microcode word format and the command set follow that
description. The description does not print the microcode, the host-bus protocol, the
status layout or the point formulas, so those are this design's own. The point formulas
were chosen because their operation counts match the published ones exactly. They are listed under
[Departures and open points](#departures-and-open-points).

## Block structure

```
            host bus (from the PCI bridge)
                 │ ▲           irq
                 ▼ │
         ┌───────────────┐  cmd / io_req   ┌─────────────────────────────┐
         │ host_interface│────────────────▶│ ecc_control_unit            │
         │ data, command,│◀────────────────│  state machine              │
         │ status, irq   │  busy / done    │  microprogram (ROM + 7-bit  │
         └──┬────────▲───┘                 │  address counter)           │
        din │        │ dout                └──┬──────────────┬───────────┘
            │        │                addr,we │              │ op   ▲ busy
            │        │               ┌────────▼─────────┐    │      │
            │        │               │ register_file    │    │      │
            │        │               │ 16 × 191 bit     │    │      │
            │        │               └────────┬─────────┘    │      │
            │        │                   a(x) │  ▲ c(x)      │      │
            ▼        │               ┌────────▼──┴───────────▼──────┴──┐
            └────────┴──────────────▶│ arith_unit                       │
                                     │ C, M, digit multiplier, squarer, │◀─┐
                                     │ adder with reduction             │  │ b(x) = c(x)
                                     └───────────────┬──────────────────┘  │
                                                     └─────────────────────┘
```

`ecc_processor` is the top level and holds all four units. The arithmetic unit's output
c(x) is the register file's write data and, outside the unit, also its own second input
b(x). The register file has one address, shared by its always-active read port and its
write port. So in every cycle the microcode names one register: the arithmetic unit reads
it as a(x), and the register can take the current value of C at the same time.

## The arithmetic unit

Everything revolves around register C. In every cycle the unit computes

    C ← ( a(x)·m_i(x)  +  muxb(b) )  mod f(x)

Here m_i(x) is a digit of 0 to 8 bits and muxb picks one of five feedback forms:

| op   | m_i(x)             | muxb               | effect                    | cycles |
|------|--------------------|--------------------|---------------------------|--------|
| HOLD | 0                  | b                  | C unchanged               | 1 |
| LOAD | 1                  | 0                  | C ← a                     | 1 |
| ADD  | 1                  | b                  | C ← a + C                 | 1 |
| SQR  | 0                  | square(b)          | C ← C² mod f              | 1 |
| IO   | 0                  | {b ≪ 32, din}      | shift 32 host bits into C | 1 |
| MUL  | 0, then digits of M| 0, then b ≪ 8      | C ← a·C mod f             | 25 |

**Multiplication** (`arith_unit`, `gf_digit_multiplier`). In the first cycle, C is
copied into register M (192 bits, 24 digits) and C is cleared. In each of the next 24
cycles the top 8-bit digit of M goes to the digit multiplier, and M shifts left by 8.
The accumulator then becomes C·x⁸ + a·m_i mod f, most significant digit first. The
operand a(x) must stay on the register-file output for all 25 cycles, so the microcode word
(and its address) is held while the unit signals `busy`. `busy` is low in the last cycle of
the multiplication only. The digit multiplier ANDs a(x) with each digit bit and adds the
8 shifted rows in a balanced XOR tree, so its depth grows with log2 of the digit width.

**Reduction** (`gf_reduce`). The adder input is 199 bits wide (m + w). For every bit at
position 191+s it removes that bit and adds it at positions s and 9+s, because
x^191 ≡ x^9 + 1. With an 8-bit digit each excess bit needs a single fold, at most
two XOR gates per output bit. The module takes the low terms of f(x) as a bit vector, so
any trinomial or pentanomial works. Folds run from the top bit down, so a fold that lands
above bit 190 is folded again.

**Squaring** (`gf_square`). Squaring is linear in GF(2^m), so it is only a question of
wiring. The input is split into a low half a_l = a[95:0] and a high half
a_h = a[190:96], and each half is squared by putting a zero between its bits. Only the
high half overflows: a_h²·x^192 = a_h²·x·x^191 ≡ a_h²·(x^10 + x). The squarer outputs
a_l² + a_h²·x + a_h²·x^10, which reaches at most bit 198. The adder's reduction stage
folds that down to 191 bits in the same cycle.

**I/O.** Host data enters through the IO operation: C shifts left by 32 and the new word
fills the bottom. The top 32 bits of C are always visible as `dout`. A 191-bit value
therefore moves as six 32-bit words, most significant word first.

## Control: state machine and microcode

`ecc_control_unit` runs the major phases of a scalar multiplication:

1. **Preshift.** When MULT arrives, k is copied from register C into a shift register.
   It is shifted left one bit per cycle until its top bit is 1.
2. **Init.** The working point (X, Y, Z) becomes (Px, Py, 1).
3. **Double-and-add.** For each remaining bit of k, most significant first, the point
   is doubled (DBL). If the bit is 1, P is added (ADD).
4. **Inversion.** T1 = 1/Z by Z^(2^m − 2): m − 1 = 190 steps of "square, then
   multiply".
5. **Affine conversion.** Qx = X·Z⁻¹, Qy = Y·Z⁻², written to registers QX and QY.

The ADD command runs INITQ (working point = Q), one ADD routine, then steps 4 and 5.

For each routine the state machine gives `microprogram` an entry address. The ROM word
has 10 bits:

| bits | field | meaning |
|------|-------|---------|
| 9:8  | seq   | 0 next word, 1 last word, 2 last word with the register address taken from the host command |
| 7:4  | addr  | register-file address |
| 3    | we    | write the current C into that register |
| 2:0  | op    | arithmetic-unit operation (table above) |

A new routine can be started in the cycle in which the previous one ends, so the
datapath never idles between routines. 96 of the 128 words are used:

| routine | words | MUL | SQR | ADD | cycles (w = 8) | computes |
|---------|-------|-----|-----|-----|----------------|----------|
| DBL     | 25 | 5  | 5 | 4 | 145 | Z2 = X²·Z², X2 = X⁴ + b·Z⁴, Y2 = b·Z⁴·Z2 + X2·(a·Z2 + Y² + b·Z⁴) |
| ADD     | 40 | 10 | 4 | 8 | 280 | R = Py·Z² + Y, B = Px·Z + X, L = Z·B, D = B²·(L + a·Z²), Z2 = L², E = R·L, X2 = R² + D + E, Y2 = E·(X2 + Px·Z2) + Z2·(X2 + Py·Z2) |
| INVITER | 5  | 1  | 1 | 0 | 29  | T0 ← T0², T1 ← T1·T0 |
| AFFINE  | 7  | 2  | 1 | 0 | 55  | QX = X·T1, QY = Y·T1² |
| INITP / INITQ | 6 | | | | 6 | (X, Y, Z) ← (P or Q, 1) |
| INVINIT | 4 | | | | 4 | T1 ← 1, T0 ← Z |
| READ / WRITE / IO | 1 | | | | 1 | host transfers |

The curve is y² + xy = x³ + a·x² + b. A point (X, Y, Z) stands for the affine point
(X/Z, Y/Z²), after López and Dahab. DBL, ADD and AFFINE have exactly the published
operation counts.
The microcode reads the register file as follows:

| reg | name | content | reg | name | content |
|-----|------|---------|-----|------|---------|
| 0 | A   | curve coefficient a | 7  | X  | working point, projective |
| 1 | B   | curve coefficient b | 8  | Y  | |
| 2 | ONE | the constant 1      | 9  | Z  | |
| 3 | PX  | input point P       | 10–14 | T0–T4 | temporaries (15 is free) |
| 4 | PY  |                     | | | |
| 5 | QX  | result point Q      | | | |
| 6 | QY  |                     | | | |

**Cycle count.** Let N = ⌈m/w⌉ (24 for w = 8). Let L be the bit length of k and h its
number of 1 bits. Then MULT keeps the processor busy for

    (m − L + 1) + 6 + (L−1)(25 + 5N) + (h−1)(40 + 10N) + 4 + (m−1)(5 + N) + (7 + 2N)

cycles. For a random 191-bit k this is about 58,900 cycles with w = 8, 34,200 with w = 16
and 21,800 with w = 32. The published design reports 62,296, 36,905 and 24,205 cycles,
host I/O included, so this design is 5–10 % faster than those figures before I/O. The
ADD command takes 6 + (40 + 10N) + 4 + (m−1)(5 + N) + (7 + 2N) cycles, which is 5,855
for w = 8. Almost all of the time goes into multiplications: the inversion alone takes
190 × 29 = 5,510 cycles.

## Host interface and programming

The bus port is synchronous. An access is a one-cycle `bus_sel` pulse with `bus_wr`
(1 = write) and a one-bit `bus_addr`. Read data appears on `bus_rdata` in the following
cycle.

| bus_addr | write | read |
|----------|-------|------|
| 0 (data) | shift the word into C (IO) | return the top 32 bits of C, then shift C left by 32 with zeros |
| 1 (control) | command byte | status: bit 0 busy, bit 1 interrupt pending, bit 2 overrun; the read clears bits 1 and 2 |

Commands:

| byte | name | operation |
|------|------|-----------|
| `0000AAAA` | READ  | C ← reg[AAAA] |
| `0010AAAA` | WRITE | reg[AAAA] ← C |
| `I100xxxx` | MULT  | (QX, QY) ← k·(PX, PY), k taken from C |
| `I110xxxx` | ADD   | (QX, QY) ← (QX, QY) + (PX, PY) |

If the I bit is set, `irq` rises when the command ends and stays high until the status is
read. Data and command accesses made while the processor is busy are ignored and set the
overrun flag, so software should poll the busy flag or wait for the interrupt.

A typical sequence:

1. **Load the curve and the point.** For each of A, B, ONE, PX and PY: write six data
   words, most significant first, then send WRITE with the register number. The 192
   bits written are {0, value}; C keeps the low 191 bits.
2. **Shift in k.** Write six data words with k; k stays in C.
3. **Start.** Send MULT (0xC0 with the interrupt enabled). Wait until busy is 0 or for
   the interrupt.
4. **Read the result.** Send READ 5, then read six data words. Their concatenation is
   {Qx, 0}: shift it right by one bit. Do the same with READ 6 for Qy.

Curve constants only need loading once. After a MULT, the ADD command adds P to the
result.

## Parameters

`ecc_pkg` holds the defaults: `FIELD_M = 191`, `FIELD_LOW` (the low terms of f(x), here
x^9 + 1), `DIGIT_W = 8`, `IO_W = 32` and `NREGS = 16`. `ecc_processor` takes `M`,
`F_LOW`, `W` and `D` as parameters.

* **Digit width.** Set `W` to 16 or 32 for the faster configurations. Multiplication then
  takes 1 + ⌈m/w⌉ cycles; the microcode does not change.
* **Another field.** Set `M` and `F_LOW`, for example `M = 163` with
  `F_LOW` = x^7 + x^6 + x^3 + 1. The reduction and squaring circuits adapt. The squarer folds
  its own output if a large middle term of f(x) and a narrow digit require it.
* **Assumed limits.** `D < M`. The register map and the 4-bit address assume 16 registers.

## Departures and open points

* **Microcode.** The published description does not print the microcode or name the
  projective coordinates. The routines above are this design's own. They use López-Dahab
  coordinates because those give exactly the published operation counts: doubling 5
  multiplications, 5 squarings and 4 additions; mixed addition 10, 4 and 8; affine
  conversion one inversion, 1 squaring and 2 multiplications. The word-by-word
  schedule, and so the exact cycle count, is this design's own.
* **Constants in registers.** The routines read a, b and the constant 1 (the initial
  Z) from the register file. The host loads all three like curve parameters.
* **Source of k.** k is taken from register C when MULT starts; how the original design
  feeds k to its state machine is not described.
* **ADD command operands.** ADD adds P to the affine point in QX/QY. Its exact operands
  in the original design are not described.
* **Special cases are not handled.** Nothing detects the point at infinity or an
  addition with Q = ±P inside the double-and-add loop. For k smaller than the group
  order and P of that order, those cases do not occur. k = 0 ends MULT immediately and
  leaves QX/QY unchanged.
* **Reduction input width.** The reduction stage folds w excess bits (m + w = 199-bit
  input), as the multiply step (C·x^w + a·m_i) requires. The published reduction figure
  folds w − 1 bits for its w = 4 example.
* **Squarer split.** The squarer splits its input at bit 96 and multiplies the high half
  by x^10 + x. A split written as x^((m−1)/2) with a factor x^9 + 1 would not be exact.
* **Host interface.** The bridge's local-bus timing, the status bits beyond busy, the
  overrun flag, how the interrupt is cleared, and the zeros shifted in on reads are all
  this design's own choices.
* **Reset.** Registers C and M, the counters, the state machine and the interface reset
  asynchronously on `rst_n` low. The register file is not reset.
* **Not included.** The PCI bridge chip and the board are not part of the RTL; the top's
  bus ports are where the bridge connects. No FPGA size or clock frequency has been
  measured for this RTL.

## Verification

Every testbench checks itself and ends by printing `TB_RESULT checks=… failures=…`.
The reference arithmetic in `tb/gf_ref_pkg.sv` is written independently of the RTL. It
multiplies carry-less and reduces by long division. Point arithmetic uses affine
formulas with explicit inversions, and k·P is computed least significant bit first.

| testbench | what it checks |
|-----------|----------------|
| `tb_gf_digit_multiplier` | 512 products against shift-and-XOR |
| `tb_gf_reduce` | random 199-bit sums for x^191+x^9+1, and a pentanomial field (m = 163) |
| `tb_gf_square` | squares for both fields; with a 4-bit digit the squarer folds part of its own output |
| `tb_register_file` | all 16 words; old data during a write, new data after |
| `tb_arith_unit` | every operation against the reference; MUL takes exactly 25 cycles |
| `tb_microprogram` | per-routine counts of words and operations, stall handling, back-to-back routines, command address |
| `tb_ecc_control_unit` | exact routine sequence for many k (m = 13), preshift length, busy cycles; one full-size run |
| `tb_host_interface` | data/command/status paths, irq set and clear, overrun; a random run of reads, writes and commands against a model of C |
| `tb_ecc_processor` | full size, through the bus only: k = 1, 3, random, random with leading zeros, 0; ADD command; exact cycle counts; a rejected access; every mechanism exercised at least once |
| `tb_table2_sweep` | one k·P with 8-, 16- and 32-bit digits side by side, results and cycle counts |
| `tb_x962_curve` | the ANSI X9.62 example curve over this field (c2pnb191v1): (n−1)·G must equal −G, a random k·G, and 2G + G with the ADD command |

Run a testbench with Verilator 5 (about ten seconds for the full-size one):

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/gf_ref_pkg.sv tb/tb_ecc_processor.sv \
    --top-module tb_ecc_processor -Mdir build
./build/Vtb_ecc_processor
```

For another testbench, replace `tb_ecc_processor` with its name. The RTL contains
assertions for the multiplication protocol (op held at MUL until the multiplication
ends), for routine starts, and for writes during a multiplication.

## Files

* `rtl/ecc_pkg.sv`: field constants, operation and sequence encodings, microcode word
  type, register map, entry points, command opcodes
* `rtl/gf_digit_multiplier.sv`, `rtl/gf_reduce.sv`, `rtl/gf_square.sv`: combinational
  field arithmetic
* `rtl/arith_unit.sv`, `rtl/register_file.sv`: the datapath
* `rtl/microprogram.sv`, `rtl/ecc_control_unit.sv`: the control path
* `rtl/host_interface.sv`: the bus port
* `rtl/ecc_processor.sv`: the top level
* `tb/`: the reference package and the testbenches listed above

# Vectorised big-integer arithmetic with 64-bit carry chains

Schoolbook big-integer arithmetic breaks every operation into a loop of
one scalar against one vector of 64-bit digits. Addition passes a 1-bit
carry from digit to digit. Multiplication by a digit, division by a digit and
multi-digit shifts pass a whole 64-bit word from digit to digit instead: the
high half of a product, the remainder of a division, or the bits shifted out
of a word. This design is an execution core for a vector extension of a
64-bit RISC register file (the SVP64 style: a vector is a run of consecutive
scalar registers, and a vector instruction means "run the scalar operation
once per element, in element order"). It gives each digit loop a single
instruction by making the three word-carrying operations *3-in, 2-out*. The
second output is the 64-bit carry. When the carry register is named as both
an input and the second output, a vector instruction chains it from element
to element:

```
sv.maddedu *r0, *r8, r17, r16    # r0..r3 = r8..r11 * r17, carry in r16
```

That is one row of a long multiplication in one instruction. Because the
whole chain is known when the instruction issues, the hardware can keep the
carry internal rather than going through the register file. Additions can go
to a wide adder several digits at a time. Neither changes the architectural
result.

The RTL is synthesizable SystemVerilog-2017. Every block has a self-checking
testbench, and the core is also tested end to end. That includes a complete
Knuth long division built only from the core's instructions.

## The five element operations

All operands are 64-bit registers. CA is the 1-bit carry flag.

| operation   | element semantics                                                       | carry that chains |
|-------------|-------------------------------------------------------------------------|-------------------|
| `adde`      | RT = RA + RB + CA; CA = carry out                                       | CA (1 bit)        |
| `subfe`     | RT = ~RA + RB + CA (= RB - RA - 1 + CA); CA = carry out (1 = no borrow) | CA (1 bit)        |
| `maddedu`   | p = RA*RB + RC (128 bits); RT = p[63:0]; RS = p[127:64]                 | RS into next RC   |
| `dsrd`      | n = RB[5:0]; RT = (RA >> n) with RC's top n bits; RS = RA << (64-n)     | RS into next RC   |
| `divmod2du` | RT = low 64 bits of (RC:RA) / RB; RS = (RC:RA) % RB                     | RS into next RC   |

Notes on each:

* `maddedu` cannot overflow: (2^64-1)^2 + (2^64-1) < 2^128. It needs no flag.
* `dsrd` uses only a 64-bit rotator. RA is rotated right by n. The low 64-n
  bits of the result are `RA >> n`. The other n bits are exactly the bits
  that fell off, already in the top n positions. A mask splits the two
  parts: RT takes the low part plus RC's top n bits, and RS takes the top
  part. Run from the most significant digit down, each element's RS is
  exactly what the element below needs in its top bits. The chain then
  shifts a whole number right by 0..63 bits in place. n = 0 gives RT = RA
  and RS = 0.
* `divmod2du` with RC starting at 0 and chained downwards divides a big
  number by one digit. The remainder never reaches the divisor, so the
  quotient always fits. Used once as a scalar, it gives the 128/64 quotient
  estimate of long division. When RC >= RB the quotient does not fit 64
  bits. The instruction has no overflow flag, so software compares RC with
  RB first. The core returns the low 64 bits of the true quotient and the
  exact remainder. Division by zero returns RT = all ones and RS = 0.
  Both of these results are this design's choices.

## Running an instruction over a vector

The core receives an already decoded instruction, `sv_instr_t` in
`bigint_pkg`. Its fields:

* `op`
* four register numbers: `rt`, `ra`, `rb` and `rc`
* a vector/scalar mark per operand: `rt_v`, `ra_v`, `rb_v` and `rc_v`
* `rs_mode`
* `reverse`
* `vl` (the number of elements)
* `maxvl`

Element *i* of an operand with base register R uses register R+i if the
operand is a vector, or R if it is a scalar. Register numbers wrap modulo
128.

Where the second result goes, RS, is chosen by one mode bit:

* **RS=RC**: the result goes back where RC came from. With a *scalar* RC
  this is the chaining mode: RC is a 64-bit carry. With a *vector* RC each
  element writes its own high half over its own addend.
* **RS=RT+MAXVL**: the result goes to the register MAXVL above RT (plus *i*
  if RT is a vector). A vector of high halves then lands next to the vector
  of low halves without overwriting RC.

With `reverse` set the elements run from VL-1 down to 0. That is the order
the shift and divide chains need. When RT and RS name the same register, RS
is written last and wins.

The contract is strict element order. The registers and CA after the
instruction must equal what VL scalar operations, issued one after another,
would leave. That holds for any overlap between operands, such as a
destination one register above a source. It is how the testbench checks
the core: it runs the same instruction on its own register model, one
element at a time.

## Carry chains without the register file: the two fusions

A 3-in 2-out scalar instruction would need three read ports and two write
ports. Inside a vector chain most of that traffic is the carry going out to
a register and straight back in. `svp64_bigint_core` removes it in two
cases. It decides at issue, from the register numbers alone. The results
are identical either way. Parameters `FUSE_ADD` and `CHAIN_FWD` switch the
two fusions off.

**Carry forwarding** (3-in 2-out operations). All of these must hold:

* the mode is RS=RC;
* RC is a scalar;
* no element of RT, RA or RB touches RC.

The carry then lives in an internal register (`chain_q`). RC is read from
the register file only by the first element and written only by the last.
Every element in between costs two reads (RA, RB) and one write (RT). If an
operand does touch RC, the core falls back to reading and writing RC every
element. That is still correct, just not forwarded.

**Wide add** (`adde` / `subfe`). All of these must hold:

* RT, RA and RB are all vectors;
* the order is not reversed;
* RT either equals each source or does not overlap it at all.

The instruction then goes to `wide_adde` four elements (`LANES`) at a time.
The wide adder reads CA once and propagates the carry across the lanes. Each
lane has a generate bit (its sum overflowed) and a propagate bit (its sum
is all ones). It keeps only the carry out of the last lane. The overlap rule
guarantees that no element of a group reads a register that another element
of the same group writes. Without the rule, the group would see stale
values that the element-by-element order would not.

## Dividing 128 bits by 64

Long division needs a 128/64 divide for every quotient digit. The
multiply-subtract that follows cannot start without it. Two dividers with
the same interface and the same results are provided. `DIV_GOLDSCHMIDT`
selects one of them.

**`goldschmidt_divider`** (default) converges quadratically:

1. Normalise the divisor by its leading-zero count s, so that
   d = (RB << s) / 2^64 lies in [0.5, 1).
2. Scale the dividend by the same factor, n = (RC:RA) * 2^s / 2^64, so
   that n / d is still the quotient.
3. Take a seed F ~ 1/d, good to about 9 bits, from a 256-entry table.
   The table is indexed by the 8 bits below the divisor's leading one.
   Entry i is floor(2^21 / (513 + 2i)), the reciprocal of the interval's
   midpoint with 11 fraction bits. A function computes it at elaboration.
4. Repeat five times: `n <- n*F`, `d <- d*F`, `F <- 2 - d`. The two products
   are independent and use two multipliers side by side. The error goes
   2^-9, 2^-18, 2^-36, 2^-72, 2^-144. Fractions carry 136 bits (`FW`), so
   after five steps the integer part of n is the quotient, or one less
   because of truncation.
5. Compute the remainder N - q*RB exactly and step q by one while the
   remainder is outside [0, RB).

The result is exact for every operand, including quotient overflow.
`done` comes 7 cycles after `start`, plus one cycle per correction. The
tests accept at most two corrections, and require that some divides need
none. The
price is area: the two multipliers are 265x138 and 138x138 bits.

**`divmod2du_serial`** is the restoring compare-shift-subtract divider. It
produces one quotient bit per cycle, 128 cycles in all. The partial
remainder stays below the divisor, so it fits 64 bits. It is small, but it
leaves the multiply hardware idle while each quotient digit is estimated.

## Big-integer kernels on the core

The testbenches build these from the instructions. They are the intended
uses:

* **Add / subtract** (`sv.adde` / `sv.subfe`, CA = 0 / 1 on entry). This is
  an N-digit add in one instruction, N/4 cycles when fused. Numbers larger
  than the register file are added in strips: load VL digits of each
  operand, issue one `sv.adde`, store the result, and repeat. CA carries
  from one strip to the next. `tb_strip_add` does this for 4096 digits,
  with the testbench doing the loads and stores.
* **Long multiply, one row per digit of B**:
  `sv.maddedu *tmp, *A, b_j, c` with c = 0 forms A * b_j. The final carry
  becomes the top digit, and `sv.adde *R+j, *R+j, *tmp` accumulates the row.
  See `tb_svp64_bigint_core` (4x4 digits).
* **Right shift by s < 64**: one reversed `sv.dsrd *R, *U, s, c` with c = 0.
  Larger shifts just start from a higher register.
* **Divide by a digit**: one reversed `sv.divmod2du *Q, *U, d, k` with k = 0.
  k ends as the remainder.
* **Long division (Knuth D)**: `tb_knuth_divide` runs it on the core. Per
  quotient digit:
  1. A scalar `divmod2du` gives qhat and rhat. The remainder goes to
     RT+MAXVL. If the top digit already equals the divisor's top digit,
     software uses qhat = all ones instead.
  2. Software refines qhat with a compare against the third digit.
  3. `sv.maddedu` and `sv.subfe` do the multiply-subtract.
  4. A final CA of 0 means qhat was one too large. One `sv.adde` adds the
     divisor back.

  At the end, one `sv.dsrd` shifts the remainder back.

## Core interface and timing (`svp64_bigint_core`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears registers, CA, state) |
| `issue_valid` / `issue_ready` | in / out | 1 | handshake; ready only when idle |
| `instr` | in | `sv_instr_t` (53 bits) | decoded instruction, sampled on the accepting edge |
| `done` | out | 1 | pulses on the edge that writes the last result |
| `host_we`, `host_waddr`, `host_wdata` | in | 1, 7, 64 | register write, idle only |
| `host_raddr` / `host_rdata` | in / out | 7 / 64 | combinational register read |
| `host_ca_we`, `host_ca_wdata`, `ca` | in, in, out | 1 | CA write (idle only) and current CA |
| `ev_element`, `ev_wide_group`, `ev_chain_fwd`, `ev_div_stall` | out | 1 | one-cycle event pulses for performance counting |

Count clock edges from the one that accepts the instruction to the one that
raises `done`:

| instruction | cycles |
|-------------|--------|
| adde / subfe, fused | ceil(VL / 4) |
| any other non-divide | VL |
| divmod2du, Goldschmidt | 9 to 11 per element (1 start + divider + 1 write-back) |
| divmod2du, bit-serial | 130 per element |
| VL = 0 | 0: `done` on the accepting edge, nothing changes |

Two assertions check the rules: VL <= MAXVL at issue, and the divider is
never started while busy.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `LANES` | 4 | elements per fused add |
| `FUSE_ADD` | 1 | enable the wide add |
| `CHAIN_FWD` | 1 | enable carry forwarding |
| `DIV_GOLDSCHMIDT` | 1 | 1: Goldschmidt divider; 0: bit-serial divider |

The register file has 2*LANES+2 read ports and LANES+2 write ports.

## Files

| file | contents |
|------|----------|
| `rtl/bigint_pkg.sv` | widths, opcodes, `sv_instr_t`, element-register helpers |
| `rtl/svp64_bigint_core.sv` | top: sequencer, fusion decisions, write-back |
| `rtl/gpr_file.sv` | 128 x 64-bit multi-port register file |
| `rtl/adde_unit.sv`, `rtl/wide_adde.sv` | element adder, 4-lane carry-propagating adder |
| `rtl/maddedu_unit.sv`, `rtl/dsrd_unit.sv` | multiply-add, double shift right |
| `rtl/goldschmidt_divider.sv`, `rtl/divmod2du_serial.sv` | the two 128/64 dividers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_svp64_bigint_core.sv` | end-to-end core test at the default parameters |
| `tb/tb_svp64_bigint_core_serial.sv` | core built with the bit-serial divider: divide chains and their 130-cycle timing |
| `tb/tb_knuth_divide.sv` | long division on the core |
| `tb/tb_strip_add.sv` | 4096-digit add in strips of 32 digits, CA carried between strips |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bigint_pkg.sv tb/tb_svp64_bigint_core.sv --top-module tb_svp64_bigint_core
./obj_dir/Vtb_svp64_bigint_core
```

Swap in any other `tb_*` name. The core tests run in seconds at the default
parameters.

## How far it is tested

* Every unit is compared with an independently written model:
  * the multiply from 32-bit partial products;
  * the shift as a 128-bit funnel shift;
  * the dividers against the simulator's 128-bit `/` and `%`, with
    overflow and division by zero included;
  * the wide adder against a 256-bit add.
* The core tests compare all 128 registers and CA after every instruction
  with an element-by-element model. They run:
  * the kernels above;
  * 150 random instructions with random marks, modes, orders and register
    overlaps.

  They check the cycle count of every instruction. They fail if any of these
  never happened: wide add, element add, forwarding, divider stall, both RS
  modes, reverse order, VL = 0.
* The long-division test does 302 divisions. It includes forced cases of
  the all-ones estimate and of the add-back step.
* Each testbench was also run against a deliberately broken copy of its
  module and reported failures.

No gate-level or timing work has been done. The single-cycle 64x64
multiplier and the wide Goldschmidt multipliers are written as plain `*`.
A real implementation would pipeline them.

## What is this design's own, and what is left out

These follow the instruction definitions:

* the element operations and their formulas;
* the two RS modes;
* scalar/vector marking of all four operands;
* strict element order;
* a wide adder for vector adds and internal forwarding of chained carries;
* a fast Goldschmidt divider with two parallel multipliers, and the 128-cycle
  bit-serial divider as the simple alternative.

These are choices made here:

* the decoded instruction format, instead of real prefix bits;
* the `reverse` flag;
* the overlap rules that decide when fusing is safe;
* lane count and port counts;
* the divider handshake, seed table, iteration count and correction step;
* the overflow and divide-by-zero results;
* all timing.

Not included:

* instruction fetch and prefix decoding;
* loads and stores. The strip-mined loop for numbers larger than the
  register file needs them.
* predication;
* element widths other than 64 bits;
* the `addex` variant of add;
* the vertical-first loop mode.

The core covers register-resident operands up to the 128-register file:
about 42 digits per operand for a three-vector add.
